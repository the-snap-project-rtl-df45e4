// Priority encoder: number of zeros above the leading one of a W-bit string.
//
// Turns the leading-one predictor's indicator string into the normalizing
// left-shift distance. 'zero' is set when the string has no one (the count is
// then W). Combinational.
module fadd_penc #(
  parameter int W  = 54,
  parameter int CW = $clog2(W + 1)
) (
  input  logic [W-1:0]  f,
  output logic [CW-1:0] count,
  output logic          zero
);
  always_comb begin
    count = CW'(W);
    for (int i = 0; i < W; i++)
      if (f[i]) count = CW'(W - 1 - i);
  end
  assign zero = ~|f;

endmodule
