// Pipelined unsigned significand multiplier: Booth-3 partial products,
// (3,2) counter array, final carry-propagate adder.
//
// Stage 1 recodes the multiplier and forms the partial products (including the
// 3X hard multiple) into the first register. Stage 2 reduces them with the
// (3,2) array to a sum and a carry row in the second register. Stage 3 is the
// final adder; its product leaves combinationally so that the user can round
// in the same cycle and register the result (three cycles in total). A new
// pair of operands is accepted every cycle. A sideband word travels with each
// operation. Synchronous active-low reset clears the valid bits.
module booth3_mult #(
  parameter int N    = 64,
  parameter int SB_W = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [N-1:0]    in_x,
  input  logic [N-1:0]    in_y,
  input  logic [SB_W-1:0] in_sb,
  output logic            out_valid,   // stage 3 holds an operation
  output logic [2*N-1:0]  out_prod,
  output logic [SB_W-1:0] out_sb
);
  localparam int W  = 2 * N;
  localparam int ND = (N + 3) / 3;

  logic [W-1:0] pp [ND+1];
  logic [W-1:0] pp_q [ND+1];
  logic [W-1:0] cs_s, cs_c, s_q, c_q;
  logic         v1_q, v2_q;
  logic [SB_W-1:0] sb1_q, sb2_q;

  booth3_ppgen #(.N(N), .W(W), .ND(ND)) u_ppgen (.x(in_x), .y(in_y), .pp(pp));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1_q <= 1'b0;
      v2_q <= 1'b0;
    end else begin
      v1_q <= in_valid;
      v2_q <= v1_q;
    end
  end

  always_ff @(posedge clk) begin
    pp_q  <= pp;
    sb1_q <= in_sb;
    s_q   <= cs_s;
    c_q   <= cs_c;
    sb2_q <= sb1_q;
  end

  csa32_array #(.W(W), .NR(ND + 1)) u_array (.rows(pp_q), .sum(cs_s), .carry(cs_c));

  assign out_valid = v2_q;
  assign out_prod  = s_q + c_q;
  assign out_sb    = sb2_q;

endmodule
