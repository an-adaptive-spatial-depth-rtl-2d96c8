// tb_df_workloads: the four evaluation scenes at full screen size.
//
// Runs four copies of the slice side by side, each with every parameter at
// its default, on a full 512 x 512 screen for four frames:
//   (a) random columns, depth complexity 4.50
//   (b) objects at depth complexity 3.49
//   (c) objects at depth complexity 2.54
//   (d) a flat textured picture, depth complexity 1.00
// The depth complexities are those of the published test scenes; the scene
// contents are synthetic (random opaque rectangles over the whole depth
// range), since the original models are not available. Every fragment and
// z-buffer word is checked against a conventional z-buffer renderer. The
// filter must reject some fragments in (a) to (c), none in (d), where every
// z read must be skipped instead, and the last-frame rejection ratio of (c),
// the scene of lowest depth complexity, must be below those of (a) and (b).
module tb_df_workloads;
  logic clk = 0;
  bit   done [4];
  int   checks [4], failures [4];
  real  rr [4];
  int   c, f;

  always #5 clk = ~clk;

  df_top_harness #(.REG_W(512), .REG_H(512), .FRAMES(4), .DC_X100(450),
                   .FULL_RANGE(1'b1), .SEED(11), .NAME("model_a"))
    u_a (.clk, .done(done[0]), .checks(checks[0]), .failures(failures[0]), .last_rr(rr[0]));
  df_top_harness #(.REG_W(512), .REG_H(512), .FRAMES(4), .DC_X100(349),
                   .FULL_RANGE(1'b1), .SEED(12), .NAME("model_b"))
    u_b (.clk, .done(done[1]), .checks(checks[1]), .failures(failures[1]), .last_rr(rr[1]));
  df_top_harness #(.REG_W(512), .REG_H(512), .FRAMES(4), .DC_X100(254),
                   .FULL_RANGE(1'b1), .SEED(13), .NAME("model_c"))
    u_c (.clk, .done(done[2]), .checks(checks[2]), .failures(failures[2]), .last_rr(rr[2]));
  df_top_harness #(.REG_W(512), .REG_H(512), .FRAMES(4), .DC_X100(100),
                   .IMAGE(1'b1), .SEED(14), .NAME("model_d"))
    u_d (.clk, .done(done[3]), .checks(checks[3]), .failures(failures[3]), .last_rr(rr[3]));

  initial begin
    repeat (100000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks.sum(), failures.sum() + 1);
    $finish;
  end

  initial begin
    wait (done[0] && done[1] && done[2] && done[3]);
    c = checks.sum() + 2;
    f = failures.sum();
    if (!(rr[0] > rr[2] && rr[1] > rr[2])) begin
      f++;
      $display("FAIL rejection ratio of (c) is not the lowest of (a) to (c)");
    end
    if (rr[3] != 0.0) f++;
    $display("last-frame rejection ratios: a %0.1f%%  b %0.1f%%  c %0.1f%%  d %0.1f%%",
             100.0 * rr[0], 100.0 * rr[1], 100.0 * rr[2], 100.0 * rr[3]);
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end
endmodule
