// df_render_top: the depth-filter slice of a 3D rendering engine.
//
// Fragments from the rasterizer pass the depth filter, which drops those
// hidden behind the filter plane and tags the rest with the SDBR bit. The
// survivors leave on tex_* towards texture mapping and fog/stencil/alpha
// testing, which are not part of this design, and come back on zt_* into the
// depth test. The depth test skips the z-buffer read for fragments whose
// SDBR bit is 0, and its adaptation block counts FP and SP and sets the
// filter position t for the next frame, which this module feeds back to the
// filter. Both the filter planes (df_mem_*) and the z-buffer (zb_*) sit in
// external frame-buffer memory.
//
// frame_end is pulsed once after the frame's last fragment has left the
// depth test: it moves t and starts the next frame in the filter (cache
// invalidated, planes cleared). The unit order follows the published
// rendering-engine block diagram; the single frame_end signal and the
// separate memory ports are this design's choices. Reset is synchronous, active low.
// Rate: one fragment per cycle through the filter on a tile hit; one per 4
// cycles (read skipped) or 6 (read made) through the depth test when the
// memory acknowledges in the cycle after a request.
module df_render_top
  import df_pkg::*;
#(
  parameter int unsigned CACHE_LINES = 64,
  parameter int unsigned CNT_W       = 32,
  parameter int unsigned STAT_W      = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        frame_end,
  // rasterizer output
  input  logic        rast_valid,
  output logic        rast_ready,
  input  frag_t       rast_frag,
  // to texture mapping
  output logic        tex_valid,
  input  logic        tex_ready,
  output dfrag_t      tex_frag,
  // from fog / stencil / alpha test
  input  logic        zt_valid,
  output logic        zt_ready,
  input  dfrag_t      zt_frag,
  // to per-pixel operations
  output logic        pix_valid,
  input  logic        pix_ready,
  output frag_t       pix_frag,
  // external memory: depth-filter planes, one 8 x 8 tile per transfer
  output logic                  df_mem_req,
  output logic                  df_mem_we,
  output logic [TILE_IDX_W-1:0] df_mem_addr,
  output logic [LINE_W-1:0]     df_mem_wdata,
  input  logic                  df_mem_ack,
  input  logic [LINE_W-1:0]     df_mem_rdata,
  // external memory: z-buffer
  output logic                  zb_req,
  output logic                  zb_we,
  output logic [X_W+Y_W-1:0]    zb_addr,
  output z_t                    zb_wdata,
  input  logic                  zb_ack,
  input  z_t                    zb_rdata,
  // filter position and per-frame statistics
  output z_t                    t,
  output logic [CNT_W-1:0]      fp_count,
  output logic [CNT_W-1:0]      sp_count,
  output logic [STAT_W-1:0]     df_in,
  output logic [STAT_W-1:0]     df_rejected,
  output logic [STAT_W-1:0]     df_sdbr_skip,
  output logic [STAT_W-1:0]     df_fills,
  output logic [STAT_W-1:0]     df_writebacks,
  output logic [STAT_W-1:0]     zt_tested,
  output logic [STAT_W-1:0]     zt_passed,
  output logic [STAT_W-1:0]     zt_reads,
  output logic [STAT_W-1:0]     zt_reads_skipped
);

  df_depth_filter #(.CACHE_LINES(CACHE_LINES), .STAT_W(STAT_W)) u_filter (
    .clk, .rst_n,
    .frame_start     (frame_end),
    .t,
    .in_valid        (rast_valid),
    .in_ready        (rast_ready),
    .in_frag         (rast_frag),
    .out_valid       (tex_valid),
    .out_ready       (tex_ready),
    .out_frag        (tex_frag),
    .mem_req         (df_mem_req),
    .mem_we          (df_mem_we),
    .mem_addr        (df_mem_addr),
    .mem_wdata       (df_mem_wdata),
    .mem_ack         (df_mem_ack),
    .mem_rdata       (df_mem_rdata),
    .stat_in         (df_in),
    .stat_rejected   (df_rejected),
    .stat_sdbr_skip  (df_sdbr_skip),
    .stat_fills      (df_fills),
    .stat_writebacks (df_writebacks)
  );

  df_depth_test #(.CNT_W(CNT_W), .STAT_W(STAT_W)) u_ztest (
    .clk, .rst_n,
    .frame_end,
    .in_valid           (zt_valid),
    .in_ready           (zt_ready),
    .in_frag            (zt_frag),
    .out_valid          (pix_valid),
    .out_ready          (pix_ready),
    .out_frag           (pix_frag),
    .zb_req, .zb_we, .zb_addr, .zb_wdata, .zb_ack, .zb_rdata,
    .t,
    .fp_count,
    .sp_count,
    .stat_tested        (zt_tested),
    .stat_passed        (zt_passed),
    .stat_reads         (zt_reads),
    .stat_reads_skipped (zt_reads_skipped)
  );

endmodule
