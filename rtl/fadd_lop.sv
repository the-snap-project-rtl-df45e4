// Leading-one predictor for the CLOSE path subtraction X - Y.
//
// Works on the operands, not on the difference, so it runs in parallel with the
// compound adder. With t = x ^ ~y, g = x & ~y and z = ~x & y (the complemented
// subtrahend as in X + ~Y + 1), the indicator string
//   f[i] = t[i+1] & (g[i] & ~z[i-1] | z[i] & ~g[i-1])
//        | ~t[i+1] & (z[i] & ~z[i-1] | g[i] & ~g[i-1])
// has its leading one either at the leading one of |X - Y| or one position
// above it, for positive and negative differences alike. A sign position
// above the operands (x = 0, ~y = 1) closes the string at the top. The
// one-bit error is corrected after the shift. Combinational.
module fadd_lop #(
  parameter int W = 54
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] f
);
  logic [W:0] xe, ye, t, g, z;

  assign xe = {1'b0, x};
  assign ye = {1'b1, ~y};
  assign t  = xe ^ ye;
  assign g  = xe & ye;
  assign z  = ~xe & ~ye;

  always_comb begin
    for (int i = 0; i < W; i++) begin
      logic zl, gl;
      zl = (i == 0) ? 1'b0 : z[i-1];
      gl = (i == 0) ? 1'b0 : g[i-1];
      f[i] = ( t[i+1] & ((g[i] & ~zl) | (z[i] & ~gl)))
           | (~t[i+1] & ((z[i] & ~zl) | (g[i] & ~gl)));
    end
  end

endmodule
