// df_depth_test: the conventional depth test, with the SDBR read skip and the
// adaptation block of the depth filter inside it.
//
// Each fragment arriving from the fog/stencil/alpha stage is compared with
// the z-buffer in external frame-buffer memory under a less-than test. When
// its SDBR bit is 1 the stored depth is valid: the test reads it, and the
// fragment passes only if its z is smaller, in which case the new depth is
// written. When the SDBR bit is 0 nothing has been drawn at the pixel this
// frame, so the stored depth would be the cleared 1.0: the read is skipped
// and the depth is written directly. Passing fragments go on to the
// per-pixel operations. Every fragment entering the test is also shown to
// df_adaptation, which owns the filter position t that this block hands
// back to the depth filter.
//
// The read skip and the place of the adaptation block follow the
// published algorithm; the less-than depth function, the
// one-fragment-at-a-time sequencing and the handshakes are this design's
// choices.
//
// Timing: a fragment is taken when the block is idle and its output register
// is empty. A skipped read costs the write round trip only, a read adds a
// second round trip. With a memory that acknowledges in the cycle after it
// sees a request, one fragment is taken every 4 cycles when the read is
// skipped and every 6 when it is made (at full output rate). The
// z-buffer port is a request held until a one-cycle zb_ack, zb_rdata valid
// with the ack, zb_addr = y * 512 + x. Reset is synchronous, active low.
module df_depth_test
  import df_pkg::*;
#(
  parameter int unsigned CNT_W  = 32,
  parameter int unsigned STAT_W = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        frame_end,
  // fragments from the fog/stencil/alpha stage
  input  logic        in_valid,
  output logic        in_ready,
  input  dfrag_t      in_frag,
  // fragments that passed, to the per-pixel operations
  output logic        out_valid,
  input  logic        out_ready,
  output frag_t       out_frag,
  // z-buffer in external frame-buffer memory
  output logic                 zb_req,
  output logic                 zb_we,
  output logic [X_W+Y_W-1:0]   zb_addr,
  output z_t                   zb_wdata,
  input  logic                 zb_ack,
  input  z_t                   zb_rdata,
  // filter position for the depth filter, and the adaptation counts
  output z_t                   t,
  output logic [CNT_W-1:0]     fp_count,
  output logic [CNT_W-1:0]     sp_count,
  // per-frame statistics
  output logic [STAT_W-1:0]    stat_tested,
  output logic [STAT_W-1:0]    stat_passed,
  output logic [STAT_W-1:0]    stat_reads,
  output logic [STAT_W-1:0]    stat_reads_skipped
);

  typedef enum logic [1:0] {S_IDLE, S_READ, S_WRITE} state_t;
  state_t state;
  frag_t  cur;
  logic   accept;

  assign in_ready = (state == S_IDLE) && !out_valid;
  assign accept   = in_valid && in_ready;

  df_adaptation #(.Z_W(Z_W), .CNT_W(CNT_W)) u_adapt (
    .clk, .rst_n,
    .obs_valid (accept),
    .obs_z     (in_frag.z),
    .frame_end,
    .t,
    .fp_count,
    .sp_count
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cur       <= '0;
      out_valid <= 1'b0;
      out_frag  <= '0;
      zb_req    <= 1'b0;
      zb_we     <= 1'b0;
      zb_addr   <= '0;
      zb_wdata  <= '0;
      stat_tested <= '0; stat_passed <= '0;
      stat_reads  <= '0; stat_reads_skipped <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (frame_end) begin
        stat_tested <= '0; stat_passed <= '0;
        stat_reads  <= '0; stat_reads_skipped <= '0;
      end
      unique case (state)
        S_IDLE: begin
          if (accept) begin
            cur      <= '{x: in_frag.x, y: in_frag.y, z: in_frag.z};
            zb_req   <= 1'b1;
            zb_addr  <= {in_frag.y, in_frag.x};
            zb_wdata <= in_frag.z;
            if (!frame_end) stat_tested <= stat_tested + 1'b1;
            if (in_frag.sdbr) begin
              state <= S_READ;
              zb_we <= 1'b0;
              if (!frame_end) stat_reads <= stat_reads + 1'b1;
            end else begin
              state <= S_WRITE;
              zb_we <= 1'b1;
              if (!frame_end) stat_reads_skipped <= stat_reads_skipped + 1'b1;
            end
          end
        end
        S_READ: begin
          if (zb_ack) begin
            if (cur.z < zb_rdata) begin
              state <= S_WRITE;
              zb_we <= 1'b1;
            end else begin
              state  <= S_IDLE;
              zb_req <= 1'b0;
            end
          end
        end
        S_WRITE: begin
          if (zb_ack) begin
            state     <= S_IDLE;
            zb_req    <= 1'b0;
            zb_we     <= 1'b0;
            out_valid <= 1'b1;
            out_frag  <= cur;
            if (!frame_end) stat_passed <= stat_passed + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A z-buffer request is held until acknowledged.
  a_zb_hold: assert property (@(posedge clk) disable iff (!rst_n)
    zb_req && !zb_ack |=> zb_req);

endmodule
