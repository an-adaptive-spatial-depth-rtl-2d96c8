// tb_df_depth_test: checks the depth test with its SDBR read skip and the
// adaptation counts.
//
// A reference z-buffer and a per-pixel "drawn this frame" flag are kept
// here. Each fragment is sent with the SDBR bit a correct depth filter would
// give it (1 once the pixel has been drawn this frame), so a skipped read
// that should have been a read would lose a nearer depth and show up as a
// wrong output. Passing fragments are compared in order with the reference
// less-than test; at frame end the z-buffer model is compared word by word
// with the reference, and the read/skip/pass statistics and the FP/SP counts
// with those counted here. Random output back-pressure is applied. A timing
// check sends 20 fragments that skip the read and 20 that need it, with a
// zero-latency memory, and expects the read to cost 2 more cycles per
// fragment (one cycle of slack for where the measurement starts).
module tb_df_depth_test;
  import df_pkg::*;

  localparam int unsigned NPIX = SCREEN_W * SCREEN_H;

  logic clk = 0, rst_n = 0, frame_end = 0, zb_clear = 0;
  logic in_valid = 0, in_ready;
  dfrag_t in_frag = '0;
  logic out_valid, out_ready = 1;
  frag_t out_frag;
  logic zb_req, zb_we, zb_ack;
  logic [X_W+Y_W-1:0] zb_addr;
  z_t zb_wdata, zb_rdata, t;
  logic [31:0] fp_count, sp_count, stat_tested, stat_passed, stat_reads, stat_reads_skipped;
  int unsigned n_reads, n_writes;

  int checks = 0, failures = 0, n_acc = 0;
  longint cycle = 0;
  z_t ref_z [NPIX];
  bit ref_drawn [NPIX];
  frag_t exp_q [$];
  int e_fp, e_sp, e_reads, e_skips, e_pass;
  bit bp_on = 1;

  df_depth_test dut (.*);

  df_ext_mem_model #(.AW(X_W + Y_W), .DW(Z_W), .LATENCY(0), .CLEAR_VAL('1)) u_zb (
    .clk, .clear(zb_clear), .req(zb_req), .we(zb_we), .addr(zb_addr),
    .wdata(zb_wdata), .ack(zb_ack), .rdata(zb_rdata), .n_reads, .n_writes
  );

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  always @(negedge clk) out_ready = bp_on ? (($urandom % 3) != 0) : 1'b1;

  always @(posedge clk) begin
    cycle++;
    if (rst_n && out_valid && out_ready) begin
      if (exp_q.size() == 0) check(0, "unexpected output fragment");
      else check(out_frag == exp_q.pop_front(), "output fragment differs");
    end
    if (rst_n && in_valid && in_ready) begin
      int p;
      p = int'(in_frag.y) * SCREEN_W + int'(in_frag.x);
      n_acc++;
      if (in_frag.z < t) e_fp++; else e_sp++;
      if (in_frag.sdbr) e_reads++; else e_skips++;
      ref_drawn[p] = 1;
      if (in_frag.z < ref_z[p]) begin
        ref_z[p] = in_frag.z;
        e_pass++;
        exp_q.push_back('{x: in_frag.x, y: in_frag.y, z: in_frag.z});
      end
    end
  end

  task automatic send(x_t x, y_t y, z_t z);
    int n0;
    in_valid = 1;
    in_frag = '{x: x, y: y, z: z, sdbr: ref_drawn[int'(y) * SCREEN_W + int'(x)]};
    n0 = n_acc;
    do @(negedge clk); while (n_acc == n0);
    in_valid = 0;
  endtask

  task automatic start_frame();
    zb_clear = 1;
    @(negedge clk);
    zb_clear = 0;
    foreach (ref_z[i]) begin ref_z[i] = '1; ref_drawn[i] = 0; end
    e_fp = 0; e_sp = 0; e_reads = 0; e_skips = 0; e_pass = 0;
  endtask

  task automatic finish_frame();
    z_t t_before;
    int bad = 0;
    repeat (20) @(negedge clk);
    check(exp_q.size() == 0, "passing fragments missing");
    check(fp_count == e_fp && sp_count == e_sp,
          $sformatf("fp=%0d sp=%0d expected %0d %0d", fp_count, sp_count, e_fp, e_sp));
    check(stat_tested == e_reads + e_skips && stat_reads == e_reads &&
          stat_reads_skipped == e_skips && stat_passed == e_pass,
          $sformatf("stats tested=%0d reads=%0d skipped=%0d passed=%0d", stat_tested,
                    stat_reads, stat_reads_skipped, stat_passed));
    for (int i = 0; i < int'(NPIX); i++) if (u_zb.mem[i] != ref_z[i]) bad++;
    check(bad == 0, $sformatf("%0d z-buffer words differ", bad));
    $display("frame: %0d tested, %0d reads, %0d reads skipped, %0d passed, FP %0d SP %0d",
             stat_tested, stat_reads, stat_reads_skipped, stat_passed, fp_count, sp_count);
    t_before = t;
    frame_end = 1;
    @(negedge clk);
    frame_end = 0;
    check(fp_count == 0 && sp_count == 0, "counts not cleared at frame end");
    if (e_fp != e_sp) check(t != t_before, "filter position did not move");
  endtask

  initial begin
    longint c0, c_skip, c_read;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // timing: no back-pressure, zero-latency memory
    bp_on = 0;
    start_frame();
    c0 = cycle;
    for (int i = 0; i < 20; i++) send(x_t'(i), '0, z_t'(1000 - i));
    c_skip = cycle - c0;
    c0 = cycle;
    for (int i = 0; i < 20; i++) send(x_t'(i), '0, z_t'(900 - i));
    c_read = cycle - c0;
    check(c_read - c_skip >= 39 && c_read - c_skip <= 41, $sformatf("20 skips took %0d cycles, 20 reads %0d", c_skip, c_read));
    finish_frame();
    bp_on = 1;
    // random frames over a 64 x 64 corner, depth complexity about 4
    for (int fr = 0; fr < 3; fr++) begin
      start_frame();
      for (int i = 0; i < 16000; i++)
        send(x_t'($urandom % 64), y_t'($urandom % 64), z_t'($urandom >> (fr * 2)));
      finish_frame();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
