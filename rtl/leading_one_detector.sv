// leading_one_detector: priority encoder with priority to the MSB.
//
// Counts the zeros above the most significant one of `din` (the normalisation
// left-shift amount of the adder's N-path) and flags an all-zero input.
// The document names only a priority encoder; the loop form is this design's
// choice. Combinational.
module leading_one_detector #(
  parameter int unsigned W     = 53,
  parameter int unsigned CNT_W = $clog2(W + 1)
) (
  input  logic [W-1:0]     din,
  output logic [CNT_W-1:0] lz,     // leading zero count (W when din == 0)
  output logic             zero
);
  always_comb begin
    lz = CNT_W'(W);
    for (int i = 0; i < W; i++) begin
      if (din[i]) lz = CNT_W'(W - 1 - i);
    end
  end
  assign zero = (din == '0);
endmodule
