// Newton-Raphson division control with variable latency rounding.
//
// Computes a/b in double precision on the shared pipelined multiplier. Up to
// NCTX divisions are in progress at once, each in its own context; every cycle
// the lowest-numbered context that has a multiplication ready issues it, so
// the cycles one division leaves idle while it waits for a product are used by
// another. Per division:
//   1. Start: special operands finish at once. Otherwise the reciprocal cache
//      is looked up with the divisor fraction. A hit supplies the reciprocal
//      and skips step 2; a miss starts from the 8-bit table value x0.
//   2. NR_ITERS iterations x <- x * (2 - b*x), two dependent multiplications
//      each, with 2 - t formed as the one's complement of t. All values are
//      64-bit fixed point with 63 fraction bits. The final reciprocal is
//      written into the cache.
//   3. q = a * x, kept with M guard bits; the quotient is normalized by an
//      exact significand comparison (a < b), not by the estimate.
//   4. Rounding control: rounded at once, or, near a rounding boundary, one
//      more multiplication (boundary times divisor) and a comparison with the
//      dividend decide the direction.
// Latency with a free multiplier: each multiplication costs 4 cycles (issue
// plus the multiplier's 3), plus one cycle each for start, rounding and
// output: 31 cycles for a miss (7 multiplications), 7 for a cache hit (one),
// 4 more with a back-multiplication, 2 for special operands.
//
// Interface: div_valid/div_ready handshake for starting a division;
// div_out_valid/result/tag for one finished division per cycle (results may
// overtake each other), with div_out_hit and div_out_back telling whether the
// reciprocal came from the cache and whether a back-multiplication was made.
// The table, cache and multiplier are separate blocks wired to the ports.
//
// Newton-Raphson iteration, the table, the cache and the guard-bit rounding
// follow the published FPU organization; the context count, the fixed-point
// formats and the issue priority are this design's choices.
module nr_div_ctrl
  import snap_pkg::*;
#(
  parameter int TAG_W    = 4,
  parameter int NCTX     = 2,
  parameter int NR_ITERS = 3,
  parameter int M        = 8,
  parameter int ID_W     = (NCTX > 1) ? $clog2(NCTX) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // division requests and results
  input  logic             div_valid,
  output logic             div_ready,
  input  logic [63:0]      div_a,
  input  logic [63:0]      div_b,
  input  rmode_e           div_rm,
  input  logic [TAG_W-1:0] div_tag,
  output logic             div_out_valid,
  output logic [63:0]      div_out_result,
  output logic [TAG_W-1:0] div_out_tag,
  output logic             div_out_hit,
  output logic             div_out_back,
  // initial approximation table
  output logic [7:0]       tbl_idx,
  input  logic [7:0]       tbl_x0,
  // reciprocal cache
  output logic [51:0]      ck_key,
  input  logic             ck_hit,
  input  logic [63:0]      ck_data,
  output logic             ck_wr_en,
  output logic [51:0]      ck_wr_key,
  output logic [63:0]      ck_wr_data,
  // shared multiplier
  output logic             mreq_valid,
  input  logic             mreq_ready,
  output logic [63:0]      mreq_x,
  output logic [63:0]      mreq_y,
  output logic [ID_W-1:0]  mreq_id,
  input  logic             mrsp_valid,
  input  logic [127:0]     mrsp_prod,
  input  logic [ID_W-1:0]  mrsp_id
);

  typedef enum logic [3:0] {
    C_IDLE, C_M1, C_M1W, C_M2, C_M2W, C_Q, C_QW, C_RND, C_BK, C_BKW, C_DONE
  } cstate_e;

  typedef struct packed {
    cstate_e            st;
    logic [52:0]        a_sig;
    logic [52:0]        b_sig;
    logic               sign;
    logic signed [13:0] exp;
    rmode_e             rm;
    logic [TAG_W-1:0]   tag;
    logic [63:0]        x;       // reciprocal estimate, 63 fraction bits
    logic [63:0]        e;       // 2 - b*x
    logic [1:0]         iter;
    logic [63:0]        q;       // quotient estimate, 52+M fraction bits
    logic [63:0]        c;       // boundary point for back-multiplication
    logic               alb;     // a significand < b significand
    logic               hit;
    logic               back;
    logic [63:0]        res;
  } ctx_t;

  ctx_t ctx_q [NCTX];
  ctx_t ctx_d [NCTX];

  // ---------------------------------------------------------- start decoding
  logic        sa, sb, a_zero, b_zero, a_inf, b_inf, a_nan, b_nan, special;
  logic [63:0] special_res;
  assign sa     = div_a[63];
  assign sb     = div_b[63];
  assign a_zero = div_a[62:52] == 11'd0;
  assign b_zero = div_b[62:52] == 11'd0;
  assign a_inf  = (div_a[62:52] == 11'h7FF) & (div_a[51:0] == 52'd0);
  assign b_inf  = (div_b[62:52] == 11'h7FF) & (div_b[51:0] == 52'd0);
  assign a_nan  = (div_a[62:52] == 11'h7FF) & (div_a[51:0] != 52'd0);
  assign b_nan  = (div_b[62:52] == 11'h7FF) & (div_b[51:0] != 52'd0);
  assign special = a_zero | b_zero | a_inf | b_inf | a_nan | b_nan;
  always_comb begin
    if (a_nan | b_nan | (a_zero & b_zero) | (a_inf & b_inf)) special_res = QNAN;
    else if (a_inf | b_zero) special_res = {sa ^ sb, 11'h7FF, 52'd0};
    else                     special_res = {sa ^ sb, 63'd0};
  end

  assign tbl_idx = div_b[51:44];
  assign ck_key  = div_b[51:0];

  // first free context
  logic [ID_W-1:0] free_id;
  logic            any_free;
  always_comb begin
    any_free = 1'b0;
    free_id  = '0;
    for (int i = NCTX - 1; i >= 0; i--)
      if (ctx_q[i].st == C_IDLE) begin any_free = 1'b1; free_id = ID_W'(i); end
  end
  assign div_ready = any_free;

  // ------------------------------------------------------ multiplier issue
  logic [ID_W-1:0] iss_id;
  logic            any_iss;
  always_comb begin
    any_iss = 1'b0;
    iss_id  = '0;
    for (int i = NCTX - 1; i >= 0; i--)
      if (ctx_q[i].st inside {C_M1, C_M2, C_Q, C_BK}) begin
        any_iss = 1'b1; iss_id = ID_W'(i);
      end
  end

  always_comb begin
    ctx_t c;
    c = ctx_q[iss_id];
    unique case (c.st)
      C_M1:    begin mreq_x = {c.b_sig, 11'd0}; mreq_y = c.x; end
      C_M2:    begin mreq_x = c.x;              mreq_y = c.e; end
      C_Q:     begin mreq_x = {c.a_sig, 11'd0}; mreq_y = c.x; end
      default: begin mreq_x = c.c;              mreq_y = {11'd0, c.b_sig}; end
    endcase
  end
  assign mreq_valid = any_iss;
  assign mreq_id    = iss_id;

  // ------------------------------------------------------- rounding control
  logic        rc_need [NCTX];
  logic [63:0] rc_c    [NCTX];
  logic [52:0] rc_sigd [NCTX];
  logic        rc_ovfd [NCTX];
  logic [52:0] rc_sigb [NCTX];
  logic        rc_ovfb [NCTX];
  logic        rem_gt, rem_eq;
  logic [127:0] dividend_scaled;

  // exact remainder sign: a * 2^(52+M+alb) against c * b
  assign dividend_scaled = {11'd0, ctx_q[mrsp_id].a_sig, 64'd0} >> (12 - M - int'(ctx_q[mrsp_id].alb));
  assign rem_gt = dividend_scaled > mrsp_prod;
  assign rem_eq = dividend_scaled == mrsp_prod;

  for (genvar i = 0; i < NCTX; i++) begin : g_rc
    div_round_ctrl #(.M(M)) u_rc (
      .q_est(ctx_q[i].q), .rm(ctx_q[i].rm), .sign(ctx_q[i].sign),
      .need_back(rc_need[i]), .c_val(rc_c[i]),
      .sig_direct(rc_sigd[i]), .ovf_direct(rc_ovfd[i]),
      .rem_gt(rem_gt), .rem_eq(rem_eq),
      .sig_back(rc_sigb[i]), .ovf_back(rc_ovfb[i])
    );
  end

  // ------------------------------------------------------------ result port
  logic [ID_W-1:0] out_id;
  logic            any_done;
  always_comb begin
    any_done = 1'b0;
    out_id   = '0;
    for (int i = NCTX - 1; i >= 0; i--)
      if (ctx_q[i].st == C_DONE) begin any_done = 1'b1; out_id = ID_W'(i); end
  end

  // ------------------------------------------------------ context next state
  always_comb begin
    ck_wr_en   = 1'b0;
    ck_wr_key  = '0;
    ck_wr_data = '0;
    for (int i = 0; i < NCTX; i++) begin
      ctx_t c;
      c = ctx_q[i];
      // start
      if (div_valid && any_free && free_id == ID_W'(i)) begin
        c.a_sig = {1'b1, div_a[51:0]};
        c.b_sig = {1'b1, div_b[51:0]};
        c.sign  = sa ^ sb;
        c.alb   = div_a[51:0] < div_b[51:0];
        c.exp   = 14'(div_a[62:52]) - 14'(div_b[62:52]) + 14'(BIAS)
                  - 14'(div_a[51:0] < div_b[51:0]);
        c.rm    = div_rm;
        c.tag   = div_tag;
        c.iter  = '0;
        c.hit   = ck_hit & ~special;
        c.back  = 1'b0;
        c.res   = special_res;
        c.x     = ck_hit ? ck_data : {2'b01, tbl_x0, 54'd0};
        c.st    = special ? C_DONE : (ck_hit ? C_Q : C_M1);
      end
      // issue
      if (any_iss && mreq_ready && iss_id == ID_W'(i)) begin
        unique case (c.st)
          C_M1:    c.st = C_M1W;
          C_M2:    c.st = C_M2W;
          C_Q:     c.st = C_QW;
          default: c.st = C_BKW;
        endcase
      end
      // product returns
      if (mrsp_valid && mrsp_id == ID_W'(i)) begin
        unique case (c.st)
          C_M1W: begin
            c.e  = ~mrsp_prod[126:63];
            c.st = C_M2;
          end
          C_M2W: begin
            c.x    = mrsp_prod[126:63];
            c.iter = c.iter + 2'd1;
            if (c.iter == 2'(NR_ITERS)) begin
              c.st       = C_Q;
              ck_wr_en   = 1'b1;
              ck_wr_key  = c.b_sig[51:0];
              ck_wr_data = c.x;
            end else begin
              c.st = C_M1;
            end
          end
          C_QW: begin
            c.q  = c.alb ? 64'(mrsp_prod[127:73-M]) : 64'(mrsp_prod[127:74-M]);
            c.st = C_RND;
          end
          C_BKW: begin
            c.res = fp_pack(c.sign, c.exp + 14'(rc_ovfb[i]), rc_sigb[i], c.rm);
            c.st  = C_DONE;
          end
          default: ;
        endcase
      end
      // rounding decision
      if (ctx_q[i].st == C_RND) begin
        if (rc_need[i]) begin
          c.c    = rc_c[i];
          c.back = 1'b1;
          c.st   = C_BK;
        end else begin
          c.res = fp_pack(c.sign, c.exp + 14'(rc_ovfd[i]), rc_sigd[i], c.rm);
          c.st  = C_DONE;
        end
      end
      // result leaves
      if (any_done && out_id == ID_W'(i)) c.st = C_IDLE;
      ctx_d[i] = c;
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < NCTX; i++) begin
      if (!rst_n) ctx_q[i].st <= C_IDLE;
      else        ctx_q[i]    <= ctx_d[i];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) div_out_valid <= 1'b0;
    else        div_out_valid <= any_done;
  end

  always_ff @(posedge clk) begin
    div_out_result <= ctx_q[out_id].res;
    div_out_tag    <= ctx_q[out_id].tag;
    div_out_hit    <= ctx_q[out_id].hit;
    div_out_back   <= ctx_q[out_id].back;
  end

  // a product only returns to a context that is waiting for one
  a_rsp_expected: assert property (@(posedge clk) disable iff (!rst_n)
    mrsp_valid |-> (ctx_q[mrsp_id].st inside {C_M1W, C_M2W, C_QW, C_BKW}));

endmodule
