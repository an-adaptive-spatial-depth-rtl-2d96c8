// df_adaptation: moves the depth-filter plane once per frame.
//
// The filter rejects the most fragments when the plane sits where FP, the
// number of fragments in front of it, equals SP, the number behind it that
// the filter let through. This block sits in the depth test and counts both
// for every fragment that reaches the depth test: z < t counts as FP,
// z >= t as SP. At frame_end it moves t toward the crossing point:
//   FP > SP  the plane is too far back, t decreases;
//   FP < SP  the plane is too near, t increases;
//   FP = SP  t stays.
// The step is 2^-STEP_SHIFT of the depth range scaled by the ratio of
// |FP - SP| to FP + SP, where the ratio is taken as a power of two from the
// two values' leading-one positions: step = 2^(Z_W-STEP_SHIFT) >> (lod(FP+SP)
// - lod(|FP-SP|)). A large imbalance moves the plane a quarter of the range,
// a small one a few LSBs, so t settles within a few frames. The counters
// then clear for the next frame.
//
// The counters, the leading-one detectors and the per-frame update follow
// the published algorithm; the step formula, the quarter-range largest
// step, the start position of 0.5 and the clamping to [0, 1) are this
// design's choices.
//
// Interface: obs_valid/obs_z sample a fragment entering the depth test;
// frame_end is a one-cycle pulse after the frame's last fragment; t is the
// filter position, valid for the whole next frame. t changes on the clock
// edge that samples frame_end; a fragment observed in that same cycle is
// counted in the new frame, against the new t. Reset (synchronous, active
// low) puts t at 0.5.
module df_adaptation #(
  parameter int unsigned Z_W        = 24,
  parameter int unsigned CNT_W      = 32,
  parameter int unsigned STEP_SHIFT = 2,
  parameter logic [Z_W-1:0] T_INIT  = Z_W'(1) << (Z_W - 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           obs_valid,
  input  logic [Z_W-1:0] obs_z,
  input  logic           frame_end,
  output logic [Z_W-1:0] t,
  output logic [CNT_W-1:0] fp_count,
  output logic [CNT_W-1:0] sp_count
);

  localparam int unsigned SUM_W = CNT_W + 1;
  localparam int unsigned LOD_W = $clog2(SUM_W);

  logic [SUM_W-1:0] total, delta;
  logic [LOD_W-1:0] lod_total, lod_delta;
  logic             total_nz, delta_nz;
  logic [LOD_W-1:0] shift;
  logic [Z_W-1:0]   step, t_next;
  logic             fp_more;

  assign fp_more = fp_count > sp_count;
  assign total   = SUM_W'(fp_count) + SUM_W'(sp_count);
  assign delta   = fp_more ? SUM_W'(fp_count - sp_count) : SUM_W'(sp_count - fp_count);

  leading_one_detector #(.W(SUM_W)) u_lod_total (
    .in(total), .pos(lod_total), .found(total_nz)
  );
  leading_one_detector #(.W(SUM_W)) u_lod_delta (
    .in(delta), .pos(lod_delta), .found(delta_nz)
  );

  always_comb begin
    shift = lod_total - lod_delta;   // delta <= total, so no wrap
    step  = (Z_W'(1) << (Z_W - STEP_SHIFT)) >> shift;
    t_next = t;
    if (total_nz && delta_nz) begin
      if (fp_more) t_next = (t > step) ? t - step : '0;
      else         t_next = (t < ~step) ? t + step : '1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      t        <= T_INIT;
      fp_count <= '0;
      sp_count <= '0;
    end else if (frame_end) begin
      t        <= t_next;
      fp_count <= (obs_valid && obs_z <  t_next) ? CNT_W'(1) : '0;
      sp_count <= (obs_valid && obs_z >= t_next) ? CNT_W'(1) : '0;
    end else if (obs_valid) begin
      if (obs_z < t) fp_count <= fp_count + 1'b1;
      else           sp_count <= sp_count + 1'b1;
    end
  end

endmodule
