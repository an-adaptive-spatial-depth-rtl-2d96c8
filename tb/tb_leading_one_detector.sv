// tb_leading_one_detector: checks the leading-one detector against a
// reference that shifts the value right until it is 1, on zero, every
// single-bit word and random words of random length.
module tb_leading_one_detector;
  localparam int unsigned W = 33;
  logic [W-1:0] in;
  logic [$clog2(W)-1:0] pos;
  logic found;
  int checks = 0, failures = 0;

  leading_one_detector #(.W(W)) dut (.in, .pos, .found);

  function automatic int ref_lod(logic [W-1:0] v);
    int p = -1;
    while (v != 0) begin v = v >> 1; p++; end
    return p;
  endfunction

  task automatic check(logic [W-1:0] v);
    int r;
    in = v; #1;
    r = ref_lod(v);
    checks++;
    if (found != (r >= 0) || (r >= 0 && int'(pos) != r)) begin
      failures++;
      $display("FAIL in=%h pos=%0d found=%0b expected %0d", v, pos, found, r);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0);
    for (int i = 0; i < W; i++) check(W'(1) << i);
    for (int i = 0; i < 2000; i++) begin
      logic [W-1:0] v;
      v = {$urandom, $urandom} ;
      v = v >> ($urandom % W);
      check(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
