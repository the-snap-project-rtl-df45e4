// Compound adder: produces A+B and A+B+1 from one carry network.
//
// A Kogge-Stone parallel prefix computes group generate G[i:0] and group
// propagate P[i:0] for every bit. The carry into bit i is G[i-1:0] for the sum
// and G[i-1:0] | P[i-1:0] for the sum plus one, so both results share the
// prefix tree and differ only in the final XOR row. Purely combinational.
// Both results are W+1 bits wide (carry out on top).
module compound_adder #(
  parameter int W = 53
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W:0]   sum0,   // a + b
  output logic [W:0]   sum1    // a + b + 1
);
  localparam int LVL = $clog2(W) + 1;

  logic [W-1:0] p, g;
  logic [W-1:0] gp [LVL+1];
  logic [W-1:0] pp [LVL+1];

  assign p = a ^ b;
  assign g = a & b;

  always_comb begin
    gp[0] = g;
    pp[0] = p;
    for (int l = 0; l < LVL; l++) begin
      for (int i = 0; i < W; i++) begin
        if (i >= (1 << l)) begin
          gp[l+1][i] = gp[l][i] | (pp[l][i] & gp[l][i-(1<<l)]);
          pp[l+1][i] = pp[l][i] & pp[l][i-(1<<l)];
        end else begin
          gp[l+1][i] = gp[l][i];
          pp[l+1][i] = pp[l][i];
        end
      end
    end
  end

  logic [W:0] c0, c1;   // carry into each bit position (bit W = carry out)
  always_comb begin
    c0[0] = 1'b0;
    c1[0] = 1'b1;
    for (int i = 1; i <= W; i++) begin
      c0[i] = gp[LVL][i-1];
      c1[i] = gp[LVL][i-1] | pp[LVL][i-1];
    end
  end

  assign sum0 = {c0[W], p ^ c0[W-1:0]};
  assign sum1 = {c1[W], p ^ c1[W-1:0]};

endmodule
