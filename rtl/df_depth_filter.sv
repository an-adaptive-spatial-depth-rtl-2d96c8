// df_depth_filter: the depth filter of the rasterizer, 2-plane SDBR form.
//
// Every fragment from the rasterizer looks up a 2-bit code for its pixel:
//   MASK  some fragment in front of the filter plane (z < t) has already been
//         drawn here this frame;
//   SDBR  some fragment has already been drawn here this frame (the pixel's
//         z-buffer entry holds a real depth, "skipping depth buffer reading"
//         is not allowed).
// A fragment with MASK set and z >= t is hidden by that earlier fragment
// under a less-than depth test, so it is dropped here, before texturing. Any
// other fragment goes on with its pixel's SDBR bit, which lets the depth
// test write the depth without reading it when the bit is 0, and then
// marks its pixel: SDBR is set, and MASK too when z < t.
//
// The planes for the 512 x 512 screen live in external frame-buffer memory
// as 8 x 8-pixel tiles of 2 x 64 bits. A direct-mapped, write-back cache of
// CACHE_LINES tiles holds the tiles in use; the tile's line index is the low
// bits of its tile number {ty, tx}. A miss writes back a dirty victim and
// then fetches the tile. One flag bit per tile records whether the tile has
// been written to external memory during this frame; a tile without it is
// known to be all zero and is installed without any memory read, so the
// planes need no clear pass in external memory. frame_start invalidates the
// cache and clears the flags in one cycle.
//
// Follows the published algorithm: the filter plane at position t, the
// 2-bit code, the rejection rule, the SDBR bit sent down the pipeline and
// the storage in the external frame buffer with 64-pixel transfers. This design's own choices:
// the less-than depth function, updating the code when the fragment leaves
// the filter, the 8 x 8 tile shape, the cache organisation and size, the
// per-tile clear flags and the handshakes.
//
// Timing: on a hit a fragment is taken in one cycle and appears on the
// registered output the next cycle, one fragment per clock. A miss stalls
// the input (in_ready low) for the write-back and fill round trips.
// Interfaces: in_* and out_* are valid/ready; mem_* is a request held until
// a one-cycle mem_ack, mem_rdata valid with the ack; mem_addr is a tile
// number. frame_start must only be pulsed while no fragment is offered.
// Reset is synchronous, active low. The default 64 lines hold one full row
// of tiles across the 512-pixel screen, so scan-line order traversal reuses
// each tile for its 8 lines.
module df_depth_filter
  import df_pkg::*;
#(
  parameter int unsigned CACHE_LINES = 64,
  parameter int unsigned STAT_W      = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        frame_start,
  input  z_t          t,
  // fragments from the rasterizer
  input  logic        in_valid,
  output logic        in_ready,
  input  frag_t       in_frag,
  // fragments to texturing
  output logic        out_valid,
  input  logic        out_ready,
  output dfrag_t      out_frag,
  // external frame-buffer memory, one tile per transfer
  output logic                  mem_req,
  output logic                  mem_we,
  output logic [TILE_IDX_W-1:0] mem_addr,
  output logic [LINE_W-1:0]     mem_wdata,
  input  logic                  mem_ack,
  input  logic [LINE_W-1:0]     mem_rdata,
  // per-frame statistics
  output logic [STAT_W-1:0] stat_in,
  output logic [STAT_W-1:0] stat_rejected,
  output logic [STAT_W-1:0] stat_sdbr_skip,
  output logic [STAT_W-1:0] stat_fills,
  output logic [STAT_W-1:0] stat_writebacks
);

  localparam int unsigned IDX_W = $clog2(CACHE_LINES);
  localparam int unsigned TAG_W = TILE_IDX_W - IDX_W;
  localparam int unsigned TILES = 1 << TILE_IDX_W;

  typedef enum logic [1:0] {S_RUN, S_WB, S_FILL} state_t;
  state_t state;

  logic [LINE_W-1:0] line_data  [CACHE_LINES];
  logic [TAG_W-1:0]  line_tag   [CACHE_LINES];
  logic [CACHE_LINES-1:0] line_valid, line_dirty;
  logic [TILES-1:0]  touched;

  logic [TILE_IDX_W-1:0] in_tile, miss_tile;
  logic [IDX_W-1:0]      in_idx, miss_idx;
  logic [TAG_W-1:0]      in_tag;
  logic [TILE_OFF_W-1:0] in_off;
  logic [DF_BITS-1:0]    code, new_code;
  logic hit, hidden, out_free, accept;

  assign in_tile = {in_frag.y[Y_W-1:TILE_SHIFT], in_frag.x[X_W-1:TILE_SHIFT]};
  assign in_idx  = in_tile[IDX_W-1:0];
  assign in_tag  = in_tile[TILE_IDX_W-1:IDX_W];
  assign in_off  = {in_frag.y[TILE_SHIFT-1:0], in_frag.x[TILE_SHIFT-1:0]};
  assign miss_idx = miss_tile[IDX_W-1:0];

  assign hit      = line_valid[in_idx] && (line_tag[in_idx] == in_tag);
  assign code     = line_data[in_idx][in_off*DF_BITS +: DF_BITS];
  assign hidden   = code[DF_MASK] && (in_frag.z >= t);
  assign out_free = !out_valid || out_ready;
  assign in_ready = (state == S_RUN) && hit && out_free && !frame_start;
  assign accept   = in_valid && in_ready;

  always_comb begin
    new_code          = code;
    new_code[DF_SDBR] = 1'b1;
    if (in_frag.z < t) new_code[DF_MASK] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_RUN;
      line_valid <= '0;
      line_dirty <= '0;
      touched    <= '0;
      miss_tile  <= '0;
      out_valid  <= 1'b0;
      out_frag   <= '0;
      mem_req    <= 1'b0;
      mem_we     <= 1'b0;
      mem_addr   <= '0;
      mem_wdata  <= '0;
      stat_in <= '0; stat_rejected <= '0; stat_sdbr_skip <= '0;
      stat_fills <= '0; stat_writebacks <= '0;
    end else if (frame_start) begin
      state      <= S_RUN;
      line_valid <= '0;
      line_dirty <= '0;
      touched    <= '0;
      mem_req    <= 1'b0;
      if (out_ready) out_valid <= 1'b0;
      stat_in <= '0; stat_rejected <= '0; stat_sdbr_skip <= '0;
      stat_fills <= '0; stat_writebacks <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      unique case (state)
        S_RUN: begin
          if (accept) begin
            stat_in <= stat_in + 1'b1;
            if (hidden) begin
              stat_rejected <= stat_rejected + 1'b1;
            end else begin
              out_valid <= 1'b1;
              out_frag  <= '{x: in_frag.x, y: in_frag.y, z: in_frag.z,
                             sdbr: code[DF_SDBR]};
              if (!code[DF_SDBR]) stat_sdbr_skip <= stat_sdbr_skip + 1'b1;
              line_data[in_idx][in_off*DF_BITS +: DF_BITS] <= new_code;
              line_dirty[in_idx] <= 1'b1;
            end
          end else if (in_valid && !hit) begin
            miss_tile <= in_tile;
            if (line_valid[in_idx] && line_dirty[in_idx]) begin
              state     <= S_WB;
              mem_req   <= 1'b1;
              mem_we    <= 1'b1;
              mem_addr  <= {line_tag[in_idx], in_idx};
              mem_wdata <= line_data[in_idx];
            end else if (touched[in_tile]) begin
              state    <= S_FILL;
              mem_req  <= 1'b1;
              mem_we   <= 1'b0;
              mem_addr <= in_tile;
            end else begin
              // tile not yet written this frame: it is all zero
              line_data[in_idx]  <= '0;
              line_tag[in_idx]   <= in_tag;
              line_valid[in_idx] <= 1'b1;
              line_dirty[in_idx] <= 1'b0;
            end
          end
        end
        S_WB: begin
          if (mem_ack) begin
            stat_writebacks    <= stat_writebacks + 1'b1;
            touched[mem_addr]  <= 1'b1;
            line_dirty[miss_idx] <= 1'b0;
            if (touched[miss_tile]) begin
              state    <= S_FILL;
              mem_req  <= 1'b1;
              mem_we   <= 1'b0;
              mem_addr <= miss_tile;
            end else begin
              state                <= S_RUN;
              mem_req              <= 1'b0;
              line_data[miss_idx]  <= '0;
              line_tag[miss_idx]   <= miss_tile[TILE_IDX_W-1:IDX_W];
              line_valid[miss_idx] <= 1'b1;
            end
          end
        end
        S_FILL: begin
          if (mem_ack) begin
            stat_fills           <= stat_fills + 1'b1;
            state                <= S_RUN;
            mem_req              <= 1'b0;
            line_data[miss_idx]  <= mem_rdata;
            line_tag[miss_idx]   <= miss_tile[TILE_IDX_W-1:IDX_W];
            line_valid[miss_idx] <= 1'b1;
            line_dirty[miss_idx] <= 1'b0;
          end
        end
        default: state <= S_RUN;
      endcase
    end
  end

  // A fragment offered and not taken stays offered.
  a_in_hold: assert property (@(posedge clk) disable iff (!rst_n || frame_start)
    in_valid && !in_ready |=> in_valid);
  // A memory request is held until acknowledged.
  a_mem_hold: assert property (@(posedge clk) disable iff (!rst_n || frame_start)
    mem_req && !mem_ack |=> mem_req);

endmodule
