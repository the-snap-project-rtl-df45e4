// Booth-3 (radix-8) recoding and partial product generation.
//
// The unsigned multiplier y is scanned in overlapping 4-bit groups
// y[3j+2:3j-1], each recoded to a digit in -4..+4. The partial product of a
// digit selects 0, X, 2X, 3X or 4X; 3X is the 'hard' multiple and comes from
// an adder (X + 2X), the others are wires. A negative digit takes the one's
// complement of the multiple, sign-extended to the full width, and places the
// missing +1 in a separate row of 'hot ones' (all at distinct positions 3j).
// Outputs ND partial products plus the hot-one row, all W = 2N bits wide, so
// that their sum modulo 2^W is x*y. Combinational.
module booth3_ppgen #(
  parameter int N  = 64,
  parameter int W  = 2 * N,
  parameter int ND = (N + 3) / 3      // ceil((N+1)/3) digits for unsigned y
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [W-1:0] pp [ND+1]
);
  logic [N+1:0]    x1, x2, x3, x4;
  logic [3*ND+1:0] ye;

  assign x1 = {2'b00, x};
  assign x2 = {1'b0, x, 1'b0};
  assign x4 = {x, 2'b00};
  assign x3 = x1 + x2;                  // hard multiple
  assign ye = {{(3*ND+1-N){1'b0}}, y, 1'b0};

  always_comb begin
    logic [W-1:0] hot;
    hot = '0;
    for (int j = 0; j < ND; j++) begin
      logic [3:0]   grp;
      logic [N+1:0] m;
      logic         neg;
      logic [W-1:0] v;
      grp = ye[3*j +: 4];
      unique case (grp)
        4'b0000, 4'b1111: m = '0;
        4'b0001, 4'b0010, 4'b1101, 4'b1110: m = x1;
        4'b0011, 4'b0100, 4'b1011, 4'b1100: m = x2;
        4'b0101, 4'b0110, 4'b1001, 4'b1010: m = x3;
        default: m = x4;          // 0111 and 1000
      endcase
      neg = grp[3] & ~(&grp[2:0]);
      v = {{(W-N-2){1'b0}}, m};
      if (neg) v = ~v;
      pp[j] = v << (3 * j);
      hot[3*j] = neg;
    end
    pp[ND] = hot;
  end

endmodule
