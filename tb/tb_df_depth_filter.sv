// tb_df_depth_filter: checks the depth filter's rejections, SDBR bits, tile
// cache traffic and hit throughput.
//
// A per-pixel model of the two bit planes is kept here for the whole screen.
// For each fragment sent it predicts, in order, whether the filter must drop
// it (some earlier fragment of the frame at that pixel lay in front of t and
// this one does not) and, if not, the SDBR bit it must carry. The outputs
// are compared one by one with that prediction, under random input gaps and
// random output back-pressure. Fragments are spread over 32 x 4 tiles, many
// more than the 64 cache lines, so tiles are written back and fetched again
// through the external-memory model; the model powers up with random words,
// so a tile read before it was written would corrupt the prediction. Each
// frame uses a new t and starts with frame_start, which must forget the
// previous frame. Per-frame statistics are checked against the model, and a
// burst of fragments in one resident tile must be taken one per clock.
module tb_df_depth_filter;
  import df_pkg::*;

  logic clk = 0, rst_n = 0, frame_start = 0;
  z_t t;
  logic in_valid = 0, in_ready;
  frag_t in_frag;
  logic out_valid, out_ready = 1;
  dfrag_t out_frag;
  logic mem_req, mem_we, mem_ack;
  logic [TILE_IDX_W-1:0] mem_addr;
  logic [LINE_W-1:0] mem_wdata, mem_rdata;
  logic [31:0] stat_in, stat_rejected, stat_sdbr_skip, stat_fills, stat_writebacks;
  int unsigned n_reads, n_writes;

  int checks = 0, failures = 0;
  bit ref_mask [SCREEN_W*SCREEN_H];
  bit ref_sdbr [SCREEN_W*SCREEN_H];
  dfrag_t exp_q [$];
  int e_in, e_rej, e_skip;
  longint cycle = 0, last_accept = 0;
  int n_acc = 0;

  df_depth_filter dut (.*);

  df_ext_mem_model #(.AW(TILE_IDX_W), .DW(LINE_W), .LATENCY(3)) u_mem (
    .clk, .clear(1'b0), .req(mem_req), .we(mem_we), .addr(mem_addr),
    .wdata(mem_wdata), .ack(mem_ack), .rdata(mem_rdata), .n_reads, .n_writes
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  // output monitor with random back-pressure
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      dfrag_t e;
      if (exp_q.size() == 0) check(0, "unexpected output fragment");
      else begin
        e = exp_q.pop_front();
        check(out_frag == e, $sformatf("output x=%0d y=%0d z=%h sdbr=%0b expected x=%0d y=%0d z=%h sdbr=%0b",
              out_frag.x, out_frag.y, out_frag.z, out_frag.sdbr, e.x, e.y, e.z, e.sdbr));
      end
    end
    if (rst_n && in_valid && in_ready) begin
      predict(in_frag);
      n_acc++;
      last_accept = cycle;
    end
  end

  bit bp_on = 1;
  always @(negedge clk) out_ready = bp_on ? (($urandom % 4) != 0) : 1'b1;

  task automatic predict(frag_t f);
    int p = int'(f.y) * SCREEN_W + int'(f.x);
    e_in++;
    if (ref_mask[p] && f.z >= t) e_rej++;
    else begin
      exp_q.push_back('{x: f.x, y: f.y, z: f.z, sdbr: ref_sdbr[p]});
      if (!ref_sdbr[p]) e_skip++;
      ref_sdbr[p] = 1;
      if (f.z < t) ref_mask[p] = 1;
    end
  endtask

  // inputs change at the falling edge, acceptance is seen at the rising one
  task automatic send(frag_t f, bit gaps);
    int n0;
    if (gaps) repeat ($urandom % 2) @(negedge clk);
    in_valid = 1; in_frag = f;
    n0 = n_acc;
    do @(negedge clk); while (n_acc == n0);
    in_valid = 0;
  endtask

  task automatic new_frame(z_t tnew);
    repeat (5) @(negedge clk);
    frame_start = 1; t = tnew;
    @(negedge clk);
    frame_start = 0;
    foreach (ref_mask[i]) begin ref_mask[i] = 0; ref_sdbr[i] = 0; end
    e_in = 0; e_rej = 0; e_skip = 0;
  endtask

  task automatic end_frame();
    repeat (50) @(negedge clk);
    check(exp_q.size() == 0, $sformatf("%0d fragments missing at frame end", exp_q.size()));
    check(stat_in == e_in && stat_rejected == e_rej && stat_sdbr_skip == e_skip,
          $sformatf("stats in=%0d rej=%0d skip=%0d expected %0d %0d %0d",
                    stat_in, stat_rejected, stat_sdbr_skip, e_in, e_rej, e_skip));
    $display("frame: %0d in, %0d rejected, %0d read skips, %0d fills, %0d write-backs",
             stat_in, stat_rejected, stat_sdbr_skip, stat_fills, stat_writebacks);
  endtask

  initial begin
    int fills_total = 0, wb_total = 0, rej_total = 0;
    longint c0;
    t = '0; in_frag = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int fr = 0; fr < 3; fr++) begin
      new_frame(z_t'((fr + 1) << (Z_W - 2)));
      // hit throughput: one resident tile, no back-pressure, no gaps
      bp_on = 0;
      send('{x: 9'(8 * fr), y: 9'(8 * fr), z: '1}, 0);
      repeat (3) @(negedge clk);
      c0 = cycle;
      for (int i = 0; i < 32; i++)
        send('{x: 9'(8 * fr + (i % 8)), y: 9'(8 * fr + (i / 8)), z: z_t'($urandom)}, 0);
      check(cycle - c0 == 32, $sformatf("32 hits took %0d cycles", cycle - c0));
      bp_on = 1;
      // random scene over 32 x 4 tiles plus a few stray pixels
      for (int i = 0; i < 6000; i++) begin
        frag_t f;
        if ($urandom % 50 == 0) f = '{x: 9'($urandom), y: 9'($urandom), z: z_t'($urandom)};
        else f = '{x: 9'($urandom % 256), y: 9'($urandom % 32), z: z_t'($urandom)};
        send(f, 1);
      end
      end_frame();
      fills_total += stat_fills; wb_total += stat_writebacks; rej_total += stat_rejected;
    end
    check(fills_total > 0 && wb_total > 0, "no tile was written back and fetched again");
    check(rej_total > 0, "nothing was rejected");
    check(n_reads == fills_total && n_writes == wb_total, "memory traffic differs from statistics");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
