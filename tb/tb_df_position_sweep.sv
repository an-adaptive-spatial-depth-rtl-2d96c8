// tb_df_position_sweep: checks the rule the adaptation block relies on.
//
// The filter rejects the most fragments near the plane position where the
// fragments in front of it (FP) equal the survivors behind it (SP). This
// testbench replays one fixed scene (random opaque rectangles over a
// 256 x 256 corner, depth complexity 3, depths 0.05 to 0.95) through the
// depth filter alone, once for each plane position t = k/16, k = 1..15, and
// records for each the rejection ratio and FP and SP among the survivors.
// It checks that FP grows and SP shrinks with t, and that the rejection
// ratio at the position where FP and SP are closest is at least 90 % of the
// best one found in the sweep. The filter output is checked fragment by
// fragment against a per-pixel model of both planes, as in the block test.
module tb_df_position_sweep;
  import df_pkg::*;

  localparam int unsigned REG   = 256;
  localparam int unsigned NRECT_MAX = 4096;
  localparam int unsigned ZMAX  = (1 << Z_W) - 1;

  logic clk = 0, rst_n = 0, frame_start = 0;
  z_t t = '0;
  logic in_valid = 0, in_ready;
  frag_t in_frag = '0;
  logic out_valid, out_ready = 1;
  dfrag_t out_frag;
  logic mem_req, mem_we, mem_ack;
  logic [TILE_IDX_W-1:0] mem_addr;
  logic [LINE_W-1:0] mem_wdata, mem_rdata;
  logic [31:0] stat_in, stat_rejected, stat_sdbr_skip, stat_fills, stat_writebacks;
  int unsigned n_reads, n_writes;

  df_depth_filter dut (.*);

  df_ext_mem_model #(.AW(TILE_IDX_W), .DW(LINE_W), .LATENCY(1)) u_mem (
    .clk, .clear(1'b0), .req(mem_req), .we(mem_we), .addr(mem_addr),
    .wdata(mem_wdata), .ack(mem_ack), .rdata(mem_rdata), .n_reads, .n_writes
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_acc = 0;
  bit ref_mask [SCREEN_W*SCREEN_H];
  bit ref_sdbr [SCREEN_W*SCREEN_H];
  bit exp_q [$];                       // expected SDBR bit of each survivor
  int nrect = 0;
  int rx [NRECT_MAX], ry [NRECT_MAX], rw [NRECT_MAX], rh [NRECT_MAX], rz [NRECT_MAX], rs [NRECT_MAX];
  longint fp, sp;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      if (exp_q.size() == 0) check(0, "unexpected output fragment");
      else check(out_frag.sdbr == exp_q.pop_front(), "wrong SDBR bit");
      if (out_frag.z < t) fp++; else sp++;
    end
    if (rst_n && in_valid && in_ready) begin
      int p;
      p = int'(in_frag.y) * SCREEN_W + int'(in_frag.x);
      n_acc++;
      if (!(ref_mask[p] && in_frag.z >= t)) begin
        exp_q.push_back(ref_sdbr[p]);
        ref_sdbr[p] = 1;
        if (in_frag.z < t) ref_mask[p] = 1;
      end
    end
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(frag_t f);
    int n0;
    in_valid = 1; in_frag = f;
    n0 = n_acc;
    do @(negedge clk); while (n_acc == n0);
    in_valid = 0;
  endtask

  initial begin
    longint area = 0;
    real rr [16];
    longint fps [16], sps [16];
    int kbest, kcross;
    longint dmin;
    // the scene, fixed for the whole sweep
    while (area < 3 * REG * REG && nrect < int'(NRECT_MAX)) begin
      rw[nrect] = 4 + $urandom % (REG / 4);
      rh[nrect] = 4 + $urandom % (REG / 4);
      rx[nrect] = $urandom % (REG - rw[nrect] + 1);
      ry[nrect] = $urandom % (REG - rh[nrect] + 1);
      rz[nrect] = ZMAX / 20 + $urandom % (ZMAX / 20 * 18);
      rs[nrect] = $urandom % 256;
      area += rw[nrect] * rh[nrect];
      nrect++;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 1; k < 16; k++) begin
      frame_start = 1; t = z_t'(k << (Z_W - 4));
      @(negedge clk);
      frame_start = 0;
      foreach (ref_mask[i]) begin ref_mask[i] = 0; ref_sdbr[i] = 0; end
      fp = 0; sp = 0;
      for (int r = 0; r < nrect; r++)
        for (int y = ry[r]; y < ry[r] + rh[r]; y++)
          for (int x = rx[r]; x < rx[r] + rw[r]; x++)
            send('{x: x_t'(x), y: y_t'(y), z: z_t'(rz[r] + (x - rx[r]) * rs[r])});
      repeat (10) @(negedge clk);
      check(exp_q.size() == 0, "survivors missing");
      rr[k] = real'(stat_rejected) / real'(stat_in);
      fps[k] = fp; sps[k] = sp;
      $display("t=%0.4f  rejection ratio %0.1f%%  FP %0d  SP %0d", real'(k) / 16.0, 100.0 * rr[k], fp, sp);
    end
    kbest = 1; kcross = 1; dmin = -1;
    for (int k = 1; k < 16; k++) begin
      longint d;
      d = (fps[k] > sps[k]) ? fps[k] - sps[k] : sps[k] - fps[k];
      if (rr[k] > rr[kbest]) kbest = k;
      if (dmin < 0 || d < dmin) begin dmin = d; kcross = k; end
      if (k > 1) begin
        check(fps[k] >= fps[k-1], "FP does not grow with t");
        check(sps[k] <= sps[k-1], "SP does not shrink with t");
      end
    end
    $display("best rejection %0.1f%% at t=%0.4f; FP = SP closest at t=%0.4f with %0.1f%%",
             100.0 * rr[kbest], real'(kbest) / 16.0, real'(kcross) / 16.0, 100.0 * rr[kcross]);
    check(rr[kcross] >= 0.9 * rr[kbest], "rejection at the FP = SP point is far from the best");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
