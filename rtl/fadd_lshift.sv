// Normalizing left shifter with one-bit correction.
//
// Shifts the CLOSE path difference left by the predicted distance and then by
// one more bit if the top bit is still zero, which absorbs the one-position
// error of the leading-one predictor. MAXSH bounds the predicted distance: the
// full-length shifter of the second cycle uses MAXSH = W-1, the small
// multiplexor that finishes short shifts in the first cycle uses MAXSH = 2.
// 'total' is the distance actually applied. Combinational.
module fadd_lshift #(
  parameter int W     = 54,
  parameter int MAXSH = 53,
  parameter int CW    = 6
) (
  input  logic [W-1:0]  din,
  input  logic [CW-1:0] sh,
  output logic [W-1:0]  dout,
  output logic [CW-1:0] total
);
  logic [W-1:0]  s1;
  logic [CW-1:0] shc;

  assign shc = (sh > CW'(MAXSH)) ? CW'(MAXSH) : sh;
  assign s1  = din << shc;
  assign dout  = s1[W-1] ? s1 : (s1 << 1);
  assign total = s1[W-1] ? shc : shc + CW'(1);

endmodule
