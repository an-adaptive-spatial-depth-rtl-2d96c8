// tb_df_adaptation: checks the per-frame FP/SP counting and the update of
// the filter position.
//
// Each frame feeds a random number of fragment depths, checks fp_count and
// sp_count against counts kept here, pulses frame_end and checks the new t
// against a reference computed here from the counts (power-of-two ratio of
// |FP - SP| to FP + SP, a quarter of the range at most, clamped to [0, 1)).
// A second phase feeds depths z = u^2 for uniform u, whose median is 0.25,
// and checks that t settles near the median (with no filter in the loop,
// SP is all fragments behind t, so FP = SP at the median). The update must
// take effect on the clock edge that samples frame_end.
module tb_df_adaptation;
  localparam int unsigned Z_W = 24;
  localparam int unsigned CNT_W = 32;

  logic clk = 0, rst_n = 0;
  logic obs_valid = 0, frame_end = 0;
  logic [Z_W-1:0] obs_z = '0, t;
  logic [CNT_W-1:0] fp_count, sp_count;
  int checks = 0, failures = 0;
  int moved_up = 0, moved_down = 0;

  df_adaptation #(.Z_W(Z_W), .CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int flog2(longint unsigned v);
    int p = -1;
    while (v != 0) begin v >>= 1; p++; end
    return p;
  endfunction

  function automatic longint unsigned ref_next(longint unsigned tc, longint unsigned fp,
                                               longint unsigned sp);
    longint unsigned d, tot, st, maxv;
    maxv = (64'd1 << Z_W) - 1;
    tot = fp + sp;
    d = (fp > sp) ? fp - sp : sp - fp;
    if (tot == 0 || d == 0) return tc;
    st = (64'd1 << (Z_W - 2)) >> (flog2(tot) - flog2(d));
    if (fp > sp) return (tc > st) ? tc - st : 0;
    return (tc + st > maxv) ? maxv : tc + st;
  endfunction

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // one frame of n depths drawn by mode: 0 uniform, 1 u^2, 2 near, 3 far
  task automatic run_frame(int n, int mode);
    longint unsigned efp = 0, esp = 0, t_exp, t_old;
    for (int i = 0; i < n; i++) begin
      longint unsigned u, z;
      u = $urandom & ((1 << Z_W) - 1);
      case (mode)
        0: z = u;
        1: z = (u * u) >> Z_W;
        2: z = u >> 3;
        default: z = ((1 << Z_W) - 1) - (u >> 3);
      endcase
      obs_valid <= ($urandom % 4) != 0;
      obs_z     <= Z_W'(z);
      @(posedge clk);
      if (obs_valid) begin
        if (obs_z < t) efp++; else esp++;
      end
    end
    obs_valid <= 0;
    @(posedge clk);
    check(fp_count == efp && sp_count == esp,
          $sformatf("counts fp=%0d sp=%0d expected %0d %0d", fp_count, sp_count, efp, esp));
    t_old = t;
    t_exp = ref_next(t, efp, esp);
    frame_end <= 1;
    @(posedge clk);
    frame_end <= 0;
    #1;
    check(t == t_exp, $sformatf("t=%h expected %h", t, t_exp));
    check(fp_count == 0 && sp_count == 0, "counters not cleared at frame end");
    if (t > t_old) moved_up++;
    if (t < t_old) moved_down++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    check(t == (1 << (Z_W - 1)), "reset position is not 0.5");
    // empty frame keeps t
    run_frame(0, 0);
    check(t == (1 << (Z_W - 1)), "empty frame moved t");
    for (int f = 0; f < 6; f++) run_frame(50 + $urandom % 200, 2);  // near scene: t drops
    for (int f = 0; f < 12; f++) run_frame(50 + $urandom % 200, 3); // far scene: t rises
    check(t == (1 << Z_W) - 1 || t > (7 << (Z_W - 3)), "far scene did not push t back");
    // convergence on z = u^2, median 0.25
    for (int f = 0; f < 14; f++) run_frame(2000, 1);
    check(t > (1 << (Z_W - 2)) - (1 << (Z_W - 5)) && t < (1 << (Z_W - 2)) + (1 << (Z_W - 5)),
          $sformatf("did not settle near 0.25: t=%f", real'(t) / (2.0 ** Z_W)));
    // a fragment in the frame_end cycle counts in the new frame
    obs_valid <= 1; obs_z <= '0; frame_end <= 1;
    @(posedge clk);
    obs_valid <= 0; frame_end <= 0;
    #1;
    check(fp_count == 1 && sp_count == 0, "fragment in frame_end cycle lost");
    check(moved_up > 0 && moved_down > 0, "t never moved both ways");
    $display("t moved up %0d times, down %0d times", moved_up, moved_down);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
