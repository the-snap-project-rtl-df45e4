// FAR path aligning right shifter.
//
// Shifts the small significand right by the exponent difference and returns
// 56 bits: the 53 bits that line up with the large significand followed by a
// guard bit, a round bit and a sticky bit that is the OR of everything shifted
// further out. Distances of 56 or more leave only the sticky bit. Combinational.
module fadd_rshift (
  input  logic [52:0] ms,
  input  logic [11:0] sh,
  output logic [55:0] aligned
);
  logic [5:0]   shc;
  logic [108:0] wide;

  assign shc  = (sh > 12'd63) ? 6'd63 : sh[5:0];
  assign wide = {ms, 56'd0} >> shc;
  assign aligned = {wide[108:54], wide[53] | (|wide[52:0])};

endmodule
