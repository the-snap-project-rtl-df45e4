// FAR path first stage: true exponent difference and conditional swap.
//
// An 11-bit subtraction gives the signed difference of the biased exponents.
// The operand with the larger exponent becomes the large operand L, the other
// the small operand S, and the magnitude of the difference is the aligning
// right-shift distance. 'far_path' flags a difference of more than one, which
// selects the FAR path for the whole operation. Combinational.
module fadd_expdiff_swap (
  input  logic [10:0] ea,
  input  logic [10:0] eb,
  input  logic [52:0] ma,
  input  logic [52:0] mb,
  output logic        swap,    // b has the larger exponent
  output logic [10:0] el,      // exponent of the large operand
  output logic [52:0] ml,      // significand of the large operand
  output logic [52:0] ms,      // significand of the small operand
  output logic [11:0] absd,    // |ea - eb|
  output logic        far_path      // |ea - eb| > 1
);
  logic [11:0] d;

  assign d    = {1'b0, ea} - {1'b0, eb};
  assign swap = d[11];
  assign absd = swap ? (~d + 12'd1) : d;
  assign el   = swap ? eb : ea;
  assign ml   = swap ? mb : ma;
  assign ms   = swap ? ma : mb;
  assign far_path  = absd > 12'd1;

endmodule
