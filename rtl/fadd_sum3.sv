// Half-adder row followed by compound adders: returns A+B, A+B+1 and A+B+2.
//
// The half-adder row rewrites A+B as S + C with S = A^B and C = (A&B)<<1, which
// leaves the least significant bit of C free. A first compound adder adds S and
// C (giving A+B and A+B+1); a second one adds S and C with that free bit set to
// one (giving A+B+1 and A+B+2). The adder's rounding logic selects among the
// three results instead of running a separate rounding incrementer, which is
// needed for the directed rounding modes when the sum carries out and the
// rounding position moves up one bit. Combinational; results are W+2 bits.
module fadd_sum3 #(
  parameter int W = 53
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W+1:0] s0,
  output logic [W+1:0] s1,
  output logic [W+1:0] s2
);
  logic [W:0] hs, hc, hc1;
  logic [W+1:0] r00, r01, r10, r11;

  assign hs  = {1'b0, a ^ b};
  assign hc  = {a & b, 1'b0};
  assign hc1 = {a & b, 1'b1};

  compound_adder #(.W(W+1)) u_cadd0 (.a(hs), .b(hc),  .sum0(r00), .sum1(r01));
  compound_adder #(.W(W+1)) u_cadd1 (.a(hs), .b(hc1), .sum0(r10), .sum1(r11));

  assign s0 = r00;
  assign s1 = r01;
  assign s2 = r11;

endmodule
