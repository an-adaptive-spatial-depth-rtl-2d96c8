// tb_df_render_top: end-to-end test of the depth-filter slice.
//
// Eight frames in a 128 x 128 corner of the screen at depth complexity 3:
// four frames of near objects, which pull the filter plane forward, then
// four of far objects, which push it back. Every fragment reaching the
// per-pixel stage and every z-buffer word is checked against a conventional
// z-buffer renderer, and every mechanism of the slice must occur at least
// once (see df_top_harness).
module tb_df_render_top;
  logic clk = 0;
  bit done;
  int checks, failures;
  real last_rr;

  always #5 clk = ~clk;

  df_top_harness #(.REG_W(128), .REG_H(128), .FRAMES(8), .DC_X100(300),
                   .SWITCH_FRAME(4), .REQUIRE_ALL(1'b1), .SEED(7), .NAME("columns"))
    u_h (.clk, .done, .checks, .failures, .last_rr);

  initial begin
    repeat (20000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
