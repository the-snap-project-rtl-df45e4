// Variable latency pipelined double precision adder/subtractor.
//
// Two significand paths run side by side. The FAR path (exponent difference
// greater than one) takes three cycles: exponent difference and swap, aligning
// right shift, then a half-adder row and compound adders whose sum, sum+1 and
// sum+2 are selected by the rounding logic. The CLOSE path (difference of at
// most one) starts at once from a two-bit exponent prediction, adds with a
// compound adder while a leading-one predictor and priority encoder compute
// the normalizing distance in parallel, and finishes:
//   * in the first cycle for effective additions and for effective
//     subtractions whose predicted shift is at most SHORT_SHIFT bits (small
//     shift multiplexor, plus one correction bit);
//   * in the second cycle for longer shifts (full-length shifter).
// At the end of the first cycle the true exponent difference from the FAR path
// decides which path holds the result. Zero, infinity and NaN operands finish
// in the first cycle. Results reach one registered output port through the
// collision logic; a result that loses the port to an older one moves one
// stage on and is emitted a cycle later (never later than the third cycle).
// A new operation is accepted every cycle.
//
// Interface: in_valid/in_a/in_b/in_sub/in_rm/in_tag issue an operation
// (in_sub=1 computes a-b). out_valid/out_result/out_tag return it 1, 2 or 3
// clock edges later; out_latency gives that count and out_natural the latency
// the operation would have had without a collision. Results may return out of
// issue order, hence the tag. Synchronous active-low reset clears the valid
// bits only.
//
// The split into paths, the two-bit prediction, the 1/2/3 cycle schedule, the
// compound-adder rounding and the short-shift case follow the published
// design. The priority rule of the collision logic, the handling of special
// operands and flush-to-zero of denormals are choices of this design.
module vla_fp_adder
  import snap_pkg::*;
#(
  parameter int TAG_W       = 4,
  parameter int SHORT_SHIFT = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [63:0]      in_a,
  input  logic [63:0]      in_b,
  input  logic             in_sub,
  input  rmode_e           in_rm,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [63:0]      out_result,
  output logic [TAG_W-1:0] out_tag,
  output logic [1:0]       out_latency,
  output logic [1:0]       out_natural
);

  typedef enum logic [1:0] {K_DONE, K_FAR, K_CLOSE_LONG} kind_e;

  // first pipeline register: after stage 1
  typedef struct packed {
    logic             valid;
    kind_e            kind;
    logic [1:0]       natural;
    logic [63:0]      res;
    logic [TAG_W-1:0] tag;
    rmode_e           rm;
    logic             sign;
    logic [10:0]      el;
    logic [52:0]      ml;
    logic [52:0]      ms;
    logic [11:0]      absd;
    logic             eff_sub;
    logic [53:0]      r;      // CLOSE difference to normalize
    logic [5:0]       lzp;    // predicted normalizing distance
  } s1_t;

  // second pipeline register: after stage 2
  typedef struct packed {
    logic             valid;
    kind_e            kind;
    logic [1:0]       natural;
    logic [63:0]      res;
    logic [TAG_W-1:0] tag;
    rmode_e           rm;
    logic             sign;
    logic [10:0]      el;
    logic [52:0]      ml;
    logic [55:0]      yal;    // aligned small significand with G, R, sticky
    logic             eff_sub;
  } s2_t;

  s1_t s1_q, s1_d;
  s2_t s2_q, s2_d;

  // ------------------------------------------------------------------ stage 1
  logic        sa, sb, a_zero, b_zero, a_inf, b_inf, a_nan, b_nan, eff_sub;
  logic [10:0] ea, eb;
  logic [52:0] ma, mb;

  assign sa = in_a[63];
  assign sb = in_b[63] ^ in_sub;
  assign ea = in_a[62:52];
  assign eb = in_b[62:52];
  assign ma = {1'b1, in_a[51:0]};
  assign mb = {1'b1, in_b[51:0]};
  assign a_zero = ea == 11'd0;
  assign b_zero = eb == 11'd0;
  assign a_inf  = (ea == 11'h7FF) & (in_a[51:0] == 52'd0);
  assign b_inf  = (eb == 11'h7FF) & (in_b[51:0] == 52'd0);
  assign a_nan  = (ea == 11'h7FF) & (in_a[51:0] != 52'd0);
  assign b_nan  = (eb == 11'h7FF) & (in_b[51:0] != 52'd0);
  assign eff_sub = sa ^ sb;

  logic        special;
  logic [63:0] special_res;
  always_comb begin
    special = a_zero | b_zero | (ea == 11'h7FF) | (eb == 11'h7FF);
    if (a_nan | b_nan | (a_inf & b_inf & eff_sub)) special_res = QNAN;
    else if (a_inf)                                special_res = {sa, in_a[62:0]};
    else if (b_inf)                                special_res = {sb, in_b[62:0]};
    else if (a_zero & b_zero)
      special_res = {(sa & sb) | (eff_sub & (in_rm == RM_RM)), 63'd0};
    else if (a_zero)                               special_res = {sb, in_b[62:0]};
    else                                           special_res = in_a;
  end

  // FAR path: exponent difference and swap
  logic        f_swap, far_path;
  logic [10:0] f_el;
  logic [52:0] f_ml, f_ms;
  logic [11:0] f_absd;

  fadd_expdiff_swap u_expdiff (
    .ea(ea), .eb(eb), .ma(ma), .mb(mb),
    .swap(f_swap), .el(f_el), .ml(f_ml), .ms(f_ms), .absd(f_absd), .far_path(far_path)
  );

  // CLOSE path: prediction, swap, compound adder, LOP and PENC
  logic        c_valid, c_swap, c_d1;  // c_d1 is folded into cy by the predictor
  logic [53:0] cx, cy;

  fadd_predict_swap u_predict (
    .ea_lo(ea[1:0]), .eb_lo(eb[1:0]), .ma(ma), .mb(mb),
    .valid(c_valid), .swap(c_swap), .d1(c_d1), .x(cx), .y(cy)
  );

  logic [52:0] c_yh;
  logic        c_yl;
  logic [54:0] c_q0, c_q1, c_q2;

  assign c_yl = cy[0];
  assign c_yh = eff_sub ? ~cy[53:1] : cy[53:1];

  fadd_sum3 #(.W(53)) u_close_add (.a(cx[53:1]), .b(c_yh), .s0(c_q0), .s1(c_q1), .s2(c_q2));

  logic [53:0] lop_f;
  logic [5:0]  lzp;
  logic        lop_zero;

  fadd_lop  #(.W(54)) u_lop  (.x(cx), .y(cy), .f(lop_f));
  fadd_penc #(.W(54), .CW(6)) u_penc (.f(lop_f), .count(lzp), .zero(lop_zero));

  logic        c_sign_l;
  logic [10:0] c_el;
  assign c_sign_l = c_swap ? sb : sa;
  assign c_el     = c_swap ? eb : ea;

  // CLOSE effective addition: finishes in cycle 1 with compound-adder rounding
  logic [63:0] c_add_res;
  always_comb begin
    logic [52:0] sig;
    logic        up, cout, rovf;
    logic signed [13:0] e;
    cout = c_q0[53];
    if (!cout) begin
      up   = round_up(in_rm, c_sign_l, c_q0[0], c_yl, 1'b0);
      sig  = up ? c_q1[52:0] : c_q0[52:0];
      rovf = up & (c_q1[53] != c_q0[53]);
    end else begin
      up   = round_up(in_rm, c_sign_l, c_q0[1], c_q0[0], c_yl);
      sig  = up ? c_q2[53:1] : c_q0[53:1];
      rovf = up & c_q2[54];
    end
    e = 14'(c_el) + 14'(cout) + 14'(rovf);
    if (rovf) sig = 53'h10_0000_0000_0000;
    c_add_res = fp_pack(c_sign_l, e, sig, in_rm);
  end

  // CLOSE effective subtraction: difference and recomplementation by selection
  logic        c_cin, c_pos, c_rzero;
  logic [54:0] c_base, c_base1;
  logic [53:0] c_r;
  assign c_cin   = ~c_yl;
  assign c_base  = c_cin ? c_q1 : c_q0;
  assign c_base1 = c_cin ? c_q2 : c_q1;
  assign c_pos   = c_base[53];
  assign c_r     = c_pos ? {c_base[52:0], c_yl} : {~c_q0[52:0], 1'b0};
  assign c_rzero = c_r == 54'd0;

  logic        c_res_sign;
  assign c_res_sign = c_pos ? c_sign_l : ~c_sign_l;

  // short shifts: small multiplexor in cycle 1
  logic [53:0] sh_out;
  logic [5:0]  sh_tot;
  fadd_lshift #(.W(54), .MAXSH(2), .CW(6)) u_short_shift (
    .din(c_r), .sh(lzp), .dout(sh_out), .total(sh_tot)
  );

  logic        c_short;
  logic [63:0] c_sub_res;
  assign c_short = c_rzero | (lzp <= 6'(SHORT_SHIFT));
  always_comb begin
    logic [52:0] sig;
    logic        up, rovf;
    logic signed [13:0] e;
    sig = '0; up = 1'b0; rovf = 1'b0; e = '0;
    if (c_rzero) begin
      c_sub_res = {in_rm == RM_RM, 63'd0};
    end else if (sh_tot == 6'd0) begin
      // no normalization: the guard bit c_r[0] may require rounding
      up   = round_up(in_rm, c_res_sign, c_r[1], c_r[0], 1'b0);
      sig  = up ? c_base1[52:0] : c_base[52:0];
      rovf = up & (c_base1[52:0] == 53'd0);
      if (rovf) sig = 53'h10_0000_0000_0000;
      e = 14'(c_el) + 14'(rovf);
      c_sub_res = fp_pack(c_res_sign, e, sig, in_rm);
    end else begin
      e = 14'(c_el) - 14'(sh_tot);
      c_sub_res = fp_pack(c_res_sign, e, sh_out[53:1], in_rm);
    end
  end

  // stage 1 outcome
  logic        st1_done;
  logic [63:0] st1_res;
  logic [1:0]  st1_nat;
  kind_e       st1_kind;
  always_comb begin
    if (special) begin
      st1_kind = K_DONE; st1_res = special_res; st1_nat = 2'd1;
    end else if (far_path) begin
      st1_kind = K_FAR; st1_res = 64'd0; st1_nat = 2'd3;
    end else if (!eff_sub) begin
      st1_kind = K_DONE; st1_res = c_add_res; st1_nat = 2'd1;
    end else if (c_short) begin
      st1_kind = K_DONE; st1_res = c_sub_res; st1_nat = 2'd1;
    end else begin
      st1_kind = K_CLOSE_LONG; st1_res = 64'd0; st1_nat = 2'd2;
    end
    st1_done = in_valid & (st1_kind == K_DONE);
  end

  // ------------------------------------------------------------------ stage 2
  logic [53:0] l_out;
  logic [5:0]  l_tot;
  fadd_lshift #(.W(54), .MAXSH(53), .CW(6)) u_long_shift (
    .din(s1_q.r), .sh(s1_q.lzp), .dout(l_out), .total(l_tot)
  );

  logic [55:0] r_aligned;
  fadd_rshift u_rshift (.ms(s1_q.ms), .sh(s1_q.absd), .aligned(r_aligned));

  logic        st2_done;
  logic [63:0] st2_res;
  always_comb begin
    st2_res  = s1_q.res;
    if (s1_q.kind == K_CLOSE_LONG)
      st2_res = fp_pack(s1_q.sign, 14'(s1_q.el) - 14'(l_tot), l_out[53:1], s1_q.rm);
    st2_done = s1_q.valid & (s1_q.kind != K_FAR);
  end

  // ------------------------------------------------------------------ stage 3
  logic [52:0] f_b;
  logic [54:0] f_q0, f_q1, f_q2;
  assign f_b = s2_q.eff_sub ? ~s2_q.yal[55:3] : s2_q.yal[55:3];

  fadd_sum3 #(.W(53)) u_far_add (.a(s2_q.ml), .b(f_b), .s0(f_q0), .s1(f_q1), .s2(f_q2));

  logic [63:0] st3_res;
  always_comb begin
    logic [2:0]  yl, low;
    logic [52:0] sig;
    logic        up, rovf, cin, g, st;
    logic [54:0] base, base1;
    logic signed [13:0] e;
    yl = s2_q.yal[2:0];
    low = '0; sig = '0; up = 1'b0; rovf = 1'b0; cin = 1'b0; g = 1'b0; st = 1'b0;
    base = '0; base1 = '0; e = '0;
    st3_res = s2_q.res;
    if (s2_q.kind == K_FAR) begin
      if (!s2_q.eff_sub) begin
        if (!f_q0[53]) begin
          up   = round_up(s2_q.rm, s2_q.sign, f_q0[0], yl[2], |yl[1:0]);
          sig  = up ? f_q1[52:0] : f_q0[52:0];
          rovf = up & f_q1[53];
          e    = 14'(s2_q.el) + 14'(rovf);
        end else begin
          up   = round_up(s2_q.rm, s2_q.sign, f_q0[1], f_q0[0], |yl);
          sig  = up ? f_q2[53:1] : f_q0[53:1];
          rovf = up & f_q2[54];
          e    = 14'(s2_q.el) + 14'd1 + 14'(rovf);
        end
      end else begin
        cin   = yl == 3'd0;
        low   = ~yl + 3'd1;
        base  = cin ? f_q1 : f_q0;
        base1 = cin ? f_q2 : f_q1;
        if (base[52]) begin
          up   = round_up(s2_q.rm, s2_q.sign, base[0], low[2], |low[1:0]);
          sig  = up ? base1[52:0] : base[52:0];
          rovf = up & (base1[52:0] == 53'd0);
          e    = 14'(s2_q.el) + 14'(rovf);
        end else begin
          g    = low[1];
          st   = low[0];
          up   = round_up(s2_q.rm, s2_q.sign, low[2], g, st);
          if (!up)          sig = {base[51:0], low[2]};
          else if (!low[2]) sig = {base[51:0], 1'b1};
          else              sig = {base1[51:0], 1'b0};
          rovf = up & low[2] & (base1[51:0] == 52'd0);
          e    = 14'(s2_q.el) - 14'd1 + 14'(rovf);
        end
      end
      if (rovf) sig = 53'h10_0000_0000_0000;
      st3_res = fp_pack(s2_q.sign, e, sig, s2_q.rm);
    end
  end

  // --------------------------------------------------------- collision logic
  localparam int DW = 64 + TAG_W + 2;
  logic          o_valid, defer1, defer2;
  logic [DW-1:0] o_data;
  logic [1:0]    o_stage;

  fadd_collision #(.DW(DW)) u_collision (
    .rdy1(st1_done), .rdy2(st2_done), .rdy3(s2_q.valid),
    .d1({st1_res, in_tag, st1_nat}),
    .d2({st2_res, s1_q.tag, s1_q.natural}),
    .d3({st3_res, s2_q.tag, s2_q.natural}),
    .out_valid(o_valid), .out_data(o_data), .out_stage(o_stage),
    .defer1(defer1), .defer2(defer2)
  );

  // next-state of the pipeline registers
  always_comb begin
    s1_d         = '0;
    s1_d.valid   = in_valid & ((st1_kind != K_DONE) | defer1);
    s1_d.kind    = st1_kind;
    s1_d.natural = st1_nat;
    s1_d.res     = st1_res;
    s1_d.tag     = in_tag;
    s1_d.rm      = in_rm;
    s1_d.eff_sub = eff_sub;
    s1_d.ml      = f_ml;
    s1_d.ms      = f_ms;
    s1_d.absd    = f_absd;
    if (st1_kind == K_FAR) begin
      s1_d.sign = f_swap ? sb : sa;
      s1_d.el   = f_el;
    end else begin
      s1_d.sign = c_res_sign;
      s1_d.el   = c_el;
    end
    s1_d.r   = c_r;
    s1_d.lzp = lzp;

    s2_d         = '0;
    s2_d.valid   = s1_q.valid & ((s1_q.kind == K_FAR) | defer2);
    s2_d.kind    = (s1_q.kind == K_FAR) ? K_FAR : K_DONE;
    s2_d.natural = s1_q.natural;
    s2_d.res     = st2_res;
    s2_d.tag     = s1_q.tag;
    s2_d.rm      = s1_q.rm;
    s2_d.sign    = s1_q.sign;
    s2_d.el      = s1_q.el;
    s2_d.ml      = s1_q.ml;
    s2_d.yal     = r_aligned;
    s2_d.eff_sub = s1_q.eff_sub;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_q      <= '0;
      s2_q      <= '0;
      out_valid <= 1'b0;
    end else begin
      s1_q      <= s1_d;
      s2_q      <= s2_d;
      out_valid <= o_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (o_valid) begin
      {out_result, out_tag, out_natural} <= o_data;
      out_latency <= o_stage;
    end
  end

  // a CLOSE operation is only ever chosen when the two-bit prediction holds
  a_close_predict: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && !special && !far_path) |-> c_valid);

endmodule
