// Pipelined double precision multiplier shared with the divider.
//
// One Booth-3 significand multiplier (64 x 64 bits, wider than the 53 bits a
// double needs so that division can carry extra guard bits) serves two
// requesters. An FP multiplication on the mul_* port always has priority; the
// divider's raw fixed-point requests on the div_req_* port are accepted only
// in cycles without one (div_req_ready). Both kinds have the same three-cycle
// latency and a throughput of one per cycle.
//   Cycle 1: operand unpacking, special operands, Booth-3 partial products.
//   Cycle 2: (3,2) counter array.
//   Cycle 3: final adder, then for FP multiplications normalization (one bit)
//            and IEEE rounding into the output register; divider requests
//            get the full 128-bit product.
// Significands enter left-aligned ({1, fraction, 11 zeros}). Denormals are
// read as zero and tiny results flush to zero, as in the rest of the unit.
// The choice of a three-cycle pipeline and the priority rule are this
// design's; the use of Booth-3 recoding, a (3,2) counter array and a
// multiplier wider than the format follow the published FPU organization.
module fp_multiplier
  import snap_pkg::*;
#(
  parameter int TAG_W = 4,
  parameter int ID_W  = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // FP multiplication
  input  logic             mul_valid,
  input  logic [63:0]      mul_a,
  input  logic [63:0]      mul_b,
  input  rmode_e           mul_rm,
  input  logic [TAG_W-1:0] mul_tag,
  output logic             mul_out_valid,
  output logic [63:0]      mul_out_result,
  output logic [TAG_W-1:0] mul_out_tag,
  // raw 64 x 64 multiplications for the divider
  input  logic             div_req_valid,
  output logic             div_req_ready,
  input  logic [63:0]      div_req_x,
  input  logic [63:0]      div_req_y,
  input  logic [ID_W-1:0]  div_req_id,
  output logic             div_rsp_valid,
  output logic [127:0]     div_rsp_prod,
  output logic [ID_W-1:0]  div_rsp_id
);

  typedef struct packed {
    logic             is_div;
    logic [ID_W-1:0]  id;
    logic [TAG_W-1:0] tag;
    rmode_e           rm;
    logic             sign;
    logic signed [13:0] exp;     // ea + eb - bias
    logic             special;
    logic [63:0]      special_res;
  } sb_t;

  localparam int SB_W = $bits(sb_t);

  // ---------------------------------------------------------- stage 1: unpack
  logic        sa, sb, a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  assign sa     = mul_a[63];
  assign sb     = mul_b[63];
  assign a_zero = mul_a[62:52] == 11'd0;
  assign b_zero = mul_b[62:52] == 11'd0;
  assign a_inf  = (mul_a[62:52] == 11'h7FF) & (mul_a[51:0] == 52'd0);
  assign b_inf  = (mul_b[62:52] == 11'h7FF) & (mul_b[51:0] == 52'd0);
  assign a_nan  = (mul_a[62:52] == 11'h7FF) & (mul_a[51:0] != 52'd0);
  assign b_nan  = (mul_b[62:52] == 11'h7FF) & (mul_b[51:0] != 52'd0);

  sb_t         sb_in;
  logic [63:0] op_x, op_y;
  logic        issue;

  assign div_req_ready = ~mul_valid;
  assign issue = mul_valid | div_req_valid;

  always_comb begin
    sb_in        = '0;
    sb_in.is_div = ~mul_valid;
    sb_in.id     = div_req_id;
    sb_in.tag    = mul_tag;
    sb_in.rm     = mul_rm;
    sb_in.sign   = sa ^ sb;
    sb_in.exp    = 14'(mul_a[62:52]) + 14'(mul_b[62:52]) - 14'(BIAS);
    sb_in.special = a_zero | b_zero | a_inf | b_inf | a_nan | b_nan;
    if (a_nan | b_nan | (a_inf & b_zero) | (b_inf & a_zero)) sb_in.special_res = QNAN;
    else if (a_inf | b_inf) sb_in.special_res = {sa ^ sb, 11'h7FF, 52'd0};
    else                    sb_in.special_res = {sa ^ sb, 63'd0};
    if (mul_valid) begin
      op_x = {1'b1, mul_a[51:0], 11'd0};
      op_y = {1'b1, mul_b[51:0], 11'd0};
    end else begin
      op_x = div_req_x;
      op_y = div_req_y;
    end
  end

  // --------------------------------------------------- significand multiplier
  logic         m_valid;
  logic [127:0] m_prod;
  logic [SB_W-1:0] m_sb_bits;
  sb_t          m_sb;

  booth3_mult #(.N(64), .SB_W(SB_W)) u_core (
    .clk(clk), .rst_n(rst_n),
    .in_valid(issue), .in_x(op_x), .in_y(op_y), .in_sb(sb_in),
    .out_valid(m_valid), .out_prod(m_prod), .out_sb(m_sb_bits)
  );
  assign m_sb = sb_t'(m_sb_bits);

  // ------------------------------------------------ stage 3: normalize, round
  logic [63:0] fp_res;
  always_comb begin
    logic [53:0] sig;
    logic        up, g, st, top;
    logic signed [13:0] e;
    top = m_prod[127];
    if (top) begin
      sig = {1'b0, m_prod[127:75]};
      g   = m_prod[74];
      st  = |m_prod[73:0];
    end else begin
      sig = {1'b0, m_prod[126:74]};
      g   = m_prod[73];
      st  = |m_prod[72:0];
    end
    up  = round_up(m_sb.rm, m_sb.sign, sig[0], g, st);
    sig = sig + 54'(up);
    e   = m_sb.exp + 14'(top);
    if (sig[53]) begin
      sig = {2'b01, 52'd0};
      e   = e + 14'sd1;
    end
    fp_res = m_sb.special ? m_sb.special_res : fp_pack(m_sb.sign, e, sig[52:0], m_sb.rm);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mul_out_valid <= 1'b0;
      div_rsp_valid <= 1'b0;
    end else begin
      mul_out_valid <= m_valid & ~m_sb.is_div;
      div_rsp_valid <= m_valid &  m_sb.is_div;
    end
  end

  always_ff @(posedge clk) begin
    mul_out_result <= fp_res;
    mul_out_tag    <= m_sb.tag;
    div_rsp_prod   <= m_prod;
    div_rsp_id     <= m_sb.id;
  end

endmodule
