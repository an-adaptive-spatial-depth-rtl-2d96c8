// df_top_harness: drives df_render_top through whole frames and checks it
// against a conventional z-buffer renderer.
//
// Each frame is a synthetic scene of opaque, randomly placed rectangles
// ("columns") inside a REG_W x REG_H corner of the screen, generated until
// the fragment count reaches DC_X100 / 100 times the region's area (the
// scene's depth complexity). Each rectangle has one depth plus a small slope
// along x. Frames before SWITCH_FRAME use near depths (0.05 to 0.5), later
// ones far depths (0.5 to 0.95), so the filter position has to move both
// ways; with FULL_RANGE set every frame uses 0.05 to 0.95. With IMAGE set a
// frame is instead one flat picture covering the region once (depth
// complexity 1), in which nothing can be rejected and every z read can be
// skipped. Texture and fog/stencil/alpha are stood in for by a link that
// randomly stalls; the per-pixel stage applies random back-pressure.
//
// The reference is a plain less-than z-buffer over all fragments in order:
// since the filter may only drop fragments that would fail the depth test,
// the fragments reaching the per-pixel stage must be exactly those, in the
// same order, and the z-buffer must end each frame equal to the reference.
// Per frame it prints the filter position, the rejection ratio (fragments
// dropped by the filter over all fragments) and the share of z reads
// skipped, and an estimate of the memory traffic per fragment (five 4-byte
// accesses per surviving fragment, one fewer when its z read is skipped,
// plus 16 bytes per filter tile transfer) against the 20 bytes a pipeline
// without the filter needs. With REQUIRE_ALL set it counts a failure for
// every mechanism that never happened: rejection, read skip, z read, tile
// write-back and fetch, input stall, output back-pressure, t moving down and
// t moving up.
module df_top_harness
  import df_pkg::*;
#(
  parameter int unsigned REG_W        = 128,
  parameter int unsigned REG_H        = 128,
  parameter int unsigned FRAMES       = 4,
  parameter int unsigned DC_X100      = 300,
  parameter int unsigned SWITCH_FRAME = 1000,
  parameter bit          REQUIRE_ALL  = 1'b0,
  parameter bit          FULL_RANGE   = 1'b0,
  parameter bit          IMAGE        = 1'b0,
  parameter int unsigned SEED         = 1,
  parameter string       NAME         = "scene"
) (
  input  logic clk,
  output bit   done,
  output int   checks,
  output int   failures,
  output real  last_rr
);

  localparam int unsigned NPIX = SCREEN_W * SCREEN_H;
  localparam int unsigned ZMAX = (1 << Z_W) - 1;

  logic rst_n = 0, frame_end = 0, zb_clear = 0;
  logic rast_valid = 0, rast_ready;
  frag_t rast_frag = '0;
  logic tex_valid, tex_ready, zt_valid, zt_ready, link_open = 1;
  dfrag_t tex_frag, zt_frag;
  logic pix_valid, pix_ready = 1;
  frag_t pix_frag;
  logic df_mem_req, df_mem_we, df_mem_ack;
  logic [TILE_IDX_W-1:0] df_mem_addr;
  logic [LINE_W-1:0] df_mem_wdata, df_mem_rdata;
  logic zb_req, zb_we, zb_ack;
  logic [X_W+Y_W-1:0] zb_addr;
  z_t zb_wdata, zb_rdata, t;
  logic [31:0] fp_count, sp_count, df_in, df_rejected, df_sdbr_skip, df_fills,
               df_writebacks, zt_tested, zt_passed, zt_reads, zt_reads_skipped;
  int unsigned dfm_reads, dfm_writes, zbm_reads, zbm_writes;

  df_render_top u_top (.*);

  df_ext_mem_model #(.AW(TILE_IDX_W), .DW(LINE_W), .LATENCY(2)) u_df_mem (
    .clk, .clear(1'b0), .req(df_mem_req), .we(df_mem_we), .addr(df_mem_addr),
    .wdata(df_mem_wdata), .ack(df_mem_ack), .rdata(df_mem_rdata),
    .n_reads(dfm_reads), .n_writes(dfm_writes)
  );

  df_ext_mem_model #(.AW(X_W + Y_W), .DW(Z_W), .LATENCY(1), .CLEAR_VAL('1)) u_zb_mem (
    .clk, .clear(zb_clear), .req(zb_req), .we(zb_we), .addr(zb_addr),
    .wdata(zb_wdata), .ack(zb_ack), .rdata(zb_rdata),
    .n_reads(zbm_reads), .n_writes(zbm_writes)
  );

  // texture / fog / stencil / alpha stand-in: a link that sometimes stalls
  assign zt_valid  = tex_valid && link_open;
  assign tex_ready = zt_ready && link_open;
  assign zt_frag   = tex_frag;

  always @(negedge clk) begin
    link_open = ($urandom % 8) != 0;
    pix_ready = ($urandom % 6) != 0;
  end

  z_t ref_z [NPIX];
  frag_t exp_q [$];
  int n_acc = 0;
  longint n_stall = 0, n_bp = 0, n_rej = 0, n_skip = 0, n_read = 0, n_fill = 0,
          n_wb = 0, n_down = 0, n_up = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("%s: FAIL %s", NAME, msg);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && pix_valid && pix_ready) begin
      if (exp_q.size() == 0) check(0, "unexpected fragment at the per-pixel stage");
      else begin
        frag_t e;
        e = exp_q.pop_front();
        check(pix_frag == e, $sformatf("pixel x=%0d y=%0d z=%h expected x=%0d y=%0d z=%h",
              pix_frag.x, pix_frag.y, pix_frag.z, e.x, e.y, e.z));
      end
    end
    if (rst_n && rast_valid && rast_ready) n_acc++;
    if (rst_n && rast_valid && !rast_ready) n_stall++;
    if (rst_n && tex_valid && !tex_ready) n_bp++;
  end

  // reference z-buffer, in rasterizer order
  function automatic void reference(frag_t f);
    int p;
    p = int'(f.y) * SCREEN_W + int'(f.x);
    if (f.z < ref_z[p]) begin
      ref_z[p] = f.z;
      exp_q.push_back(f);
    end
  endfunction

  task automatic send(frag_t f);
    int n0;
    rast_valid = 1;
    rast_frag  = f;
    n0 = n_acc;
    do @(negedge clk); while (n_acc == n0);
    rast_valid = 0;
    reference(f);
  endtask

  task automatic render_frame(int fr);
    longint target, sent = 0;
    int zlo, zhi;
    target = longint'(DC_X100) * REG_W * REG_H / 100;
    zlo = (fr < int'(SWITCH_FRAME)) ? ZMAX / 20      : ZMAX / 2;
    zhi = (fr < int'(SWITCH_FRAME)) ? ZMAX / 2       : ZMAX / 20 * 19;
    if (FULL_RANGE) begin zlo = ZMAX / 20; zhi = ZMAX / 20 * 19; end
    if (IMAGE) begin
      for (int y = 0; y < int'(REG_H); y++)
        for (int x = 0; x < int'(REG_W); x++)
          send('{x: x_t'(x), y: y_t'(y), z: z_t'(ZMAX / 2)});
      return;
    end
    while (sent < target) begin
      int w, h, x0, y0, zc, slope;
      w  = 4 + $urandom % (REG_W / 4);
      h  = 4 + $urandom % (REG_H / 4);
      x0 = $urandom % (REG_W - w + 1);
      y0 = $urandom % (REG_H - h + 1);
      zc = zlo + $urandom % (zhi - zlo);
      slope = $urandom % 256;
      for (int y = y0; y < y0 + h; y++)
        for (int x = x0; x < x0 + w; x++) begin
          send('{x: x_t'(x), y: y_t'(y), z: z_t'(zc + (x - x0) * slope)});
          sent++;
        end
    end
  endtask

  task automatic finish_frame(int fr);
    int bad;
    z_t t_old;
    int waited;
    // wait until everything sent has left the pipeline
    waited = 0;
    do begin
      @(negedge clk);
      waited++;
    end while (!(df_in == n_acc && zt_tested == df_in - df_rejected &&
                 exp_q.size() == 0 && !zb_req && !pix_valid && !tex_valid) &&
               waited < 100000);
    check(waited < 100000, $sformatf("frame %0d did not drain", fr));
    repeat (4) @(negedge clk);
    bad = 0;
    for (int i = 0; i < int'(NPIX); i++) if (u_zb_mem.mem[i] != ref_z[i]) bad++;
    check(bad == 0, $sformatf("frame %0d: %0d z-buffer words differ", fr, bad));
    check(zt_reads + zt_reads_skipped == zt_tested && zt_reads_skipped == df_sdbr_skip,
          "read and skip counts disagree between filter and depth test");
    check(fp_count + sp_count == zt_tested, "FP + SP differs from fragments tested");
    $display("%s frame %0d: t=%0.3f fragments=%0d rejected=%0d RR=%0.1f%% reads skipped=%0.1f%% tile fills=%0d write-backs=%0d",
             NAME, fr, real'(t) / real'(ZMAX + 1), df_in, df_rejected,
             100.0 * real'(df_rejected) / real'(df_in),
             100.0 * real'(zt_reads_skipped) / real'(zt_tested), df_fills, df_writebacks);
    // traffic estimate: every surviving fragment costs five 4-byte accesses
    // (z read, z write, colour read, colour write, texel), minus the z read
    // when it is skipped; each tile transfer costs 16 bytes
    $display("%s frame %0d: estimated memory traffic %0.2f B/fragment, against 20 without the filter",
             NAME, fr, (16.0 * real'(zt_reads_skipped) + 20.0 * real'(zt_reads) +
                        16.0 * real'(df_fills + df_writebacks)) / real'(df_in));
    last_rr = real'(df_rejected) / real'(df_in);
    n_rej += df_rejected; n_skip += zt_reads_skipped; n_read += zt_reads;
    n_fill += df_fills; n_wb += df_writebacks;
    t_old = t;
    frame_end = 1; zb_clear = 1;
    @(negedge clk);
    frame_end = 0; zb_clear = 0;
    if (t < t_old) n_down++;
    if (t > t_old) n_up++;
    n_acc = 0;
    foreach (ref_z[i]) ref_z[i] = '1;
  endtask

  initial begin
    void'($urandom(SEED));
    done = 0; checks = 0; failures = 0;
    zb_clear = 1;
    repeat (3) @(negedge clk);
    zb_clear = 0;
    rst_n = 1;
    foreach (ref_z[i]) ref_z[i] = '1;
    for (int fr = 0; fr < int'(FRAMES); fr++) begin
      render_frame(fr);
      finish_frame(fr);
    end
    $display("%s mechanisms: rejections %0d, read skips %0d, reads %0d, tile fills %0d, write-backs %0d, input stalls %0d, output back-pressure %0d, t down %0d, t up %0d",
             NAME, n_rej, n_skip, n_read, n_fill, n_wb, n_stall, n_bp, n_down, n_up);
    if (IMAGE) begin
      check(n_rej == 0, "the filter rejected part of a flat picture");
      check(n_read == 0, "a z read was made for a flat picture");
    end else begin
      check(n_rej > 0, "the filter never rejected a fragment");
    end
    check(n_skip > 0, "no z read was ever skipped");
    if (REQUIRE_ALL) begin
      check(n_read > 0, "no z read was ever made");
      check(n_fill > 0 && n_wb > 0, "no tile was written back and fetched again");
      check(n_stall > 0, "the filter never stalled its input");
      check(n_bp > 0, "the filter output never saw back-pressure");
      check(n_down > 0, "t never moved down");
      check(n_up > 0, "t never moved up");
    end
    done = 1;
  end

endmodule
