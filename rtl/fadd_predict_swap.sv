// CLOSE path first stage: exponent difference prediction and swap.
//
// Only the two low exponent bits are inspected. Their difference modulo four
// is 0, +1 or -1 whenever the true difference is at most one in magnitude, so
// the CLOSE path can swap and align long before the FAR path's 11-bit
// subtraction finishes; if the true difference is larger the CLOSE result is
// simply not used. The outputs are the two 54-bit addends of the CLOSE
// compound adder: X = large significand with a zero guard bit, Y = small
// significand aligned by 0 or 1 bit. Combinational.
module fadd_predict_swap (
  input  logic [1:0]  ea_lo,
  input  logic [1:0]  eb_lo,
  input  logic [52:0] ma,
  input  logic [52:0] mb,
  output logic        valid,   // predicted |difference| <= 1
  output logic        swap,    // predicted difference is -1
  output logic        d1,      // predicted |difference| is 1
  output logic [53:0] x,
  output logic [53:0] y
);
  logic [1:0]  dl;
  logic [52:0] ml, ms;

  assign dl    = ea_lo - eb_lo;
  assign valid = dl != 2'd2;
  assign swap  = dl == 2'd3;
  assign d1    = dl[0];
  assign ml    = swap ? mb : ma;
  assign ms    = swap ? ma : mb;
  assign x     = {ml, 1'b0};
  assign y     = d1 ? {1'b0, ms} : {ms, 1'b0};

endmodule
