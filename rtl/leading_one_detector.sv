// leading_one_detector: finds the most significant 1 of a word.
//
// The adaptation block uses two of these to compare the frame's FP and SP
// counts by order of magnitude: the position of the leading one is the
// integer part of log2 of the value. Purely combinational, no latency.
//
//   in     word to search
//   pos    index of its highest set bit (0 when in is zero)
//   found  1 when in has at least one bit set
//
// The published algorithm names leading-one detectors as part of the
// adaptation hardware; the priority-scan structure here is this design's
// choice.
module leading_one_detector #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0]         in,
  output logic [$clog2(W)-1:0] pos,
  output logic                 found
);

  always_comb begin
    pos   = '0;
    found = 1'b0;
    for (int i = 0; i < W; i++) begin
      if (in[i]) begin
        pos   = ($clog2(W))'(i);
        found = 1'b1;
      end
    end
  end

endmodule
