// Floating point unit: variable latency adder, Booth-3 multiplier and
// Newton-Raphson divider with reciprocal cache.
//
// Three issue ports, one per operation class, each with its own result port:
//   add: vla_fp_adder, one operation per cycle, results after 1, 2 or 3
//        cycles (out of order, matched by tag);
//   mul: fp_multiplier, one per cycle, 3 cycles;
//   div: nr_div_ctrl, up to two divisions in flight (div_ready), variable
//        latency (cache hit, iterations, back-multiplication).
// The divider has no multiplier of its own: its iterations, quotient and
// back-multiplications use the FP multiplier in cycles without an FP
// multiplication. The initial approximation table and the reciprocal cache
// sit beside the multiplier as in the published organization. All ports are
// synchronous to clk; reset is synchronous and active low.
module fpu_top
  import snap_pkg::*;
#(
  parameter int TAG_W = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  // addition / subtraction
  input  logic             add_valid,
  input  logic [63:0]      add_a,
  input  logic [63:0]      add_b,
  input  logic             add_sub,
  input  rmode_e           add_rm,
  input  logic [TAG_W-1:0] add_tag,
  output logic             add_out_valid,
  output logic [63:0]      add_out_result,
  output logic [TAG_W-1:0] add_out_tag,
  output logic [1:0]       add_out_latency,
  output logic [1:0]       add_out_natural,
  // multiplication
  input  logic             mul_valid,
  input  logic [63:0]      mul_a,
  input  logic [63:0]      mul_b,
  input  rmode_e           mul_rm,
  input  logic [TAG_W-1:0] mul_tag,
  output logic             mul_out_valid,
  output logic [63:0]      mul_out_result,
  output logic [TAG_W-1:0] mul_out_tag,
  // division
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
  output logic             div_out_back
);

  vla_fp_adder #(.TAG_W(TAG_W)) u_adder (
    .clk(clk), .rst_n(rst_n),
    .in_valid(add_valid), .in_a(add_a), .in_b(add_b), .in_sub(add_sub),
    .in_rm(add_rm), .in_tag(add_tag),
    .out_valid(add_out_valid), .out_result(add_out_result), .out_tag(add_out_tag),
    .out_latency(add_out_latency), .out_natural(add_out_natural)
  );

  logic         mreq_valid, mreq_ready, mrsp_valid;
  logic [63:0]  mreq_x, mreq_y;
  logic [0:0]   mreq_id, mrsp_id;
  logic [127:0] mrsp_prod;

  fp_multiplier #(.TAG_W(TAG_W), .ID_W(1)) u_mult (
    .clk(clk), .rst_n(rst_n),
    .mul_valid(mul_valid), .mul_a(mul_a), .mul_b(mul_b), .mul_rm(mul_rm), .mul_tag(mul_tag),
    .mul_out_valid(mul_out_valid), .mul_out_result(mul_out_result), .mul_out_tag(mul_out_tag),
    .div_req_valid(mreq_valid), .div_req_ready(mreq_ready),
    .div_req_x(mreq_x), .div_req_y(mreq_y), .div_req_id(mreq_id),
    .div_rsp_valid(mrsp_valid), .div_rsp_prod(mrsp_prod), .div_rsp_id(mrsp_id)
  );

  logic [7:0]  tbl_idx, tbl_x0;
  logic [51:0] ck_key, ck_wr_key;
  logic        ck_hit, ck_wr_en;
  logic [63:0] ck_data, ck_wr_data;

  recip_table u_table (.idx(tbl_idx), .x0(tbl_x0));

  recip_cache u_cache (
    .clk(clk), .rst_n(rst_n),
    .lk_key(ck_key), .lk_hit(ck_hit), .lk_data(ck_data),
    .wr_en(ck_wr_en), .wr_key(ck_wr_key), .wr_data(ck_wr_data)
  );

  nr_div_ctrl #(.TAG_W(TAG_W), .NCTX(2)) u_div (
    .clk(clk), .rst_n(rst_n),
    .div_valid(div_valid), .div_ready(div_ready), .div_a(div_a), .div_b(div_b),
    .div_rm(div_rm), .div_tag(div_tag),
    .div_out_valid(div_out_valid), .div_out_result(div_out_result),
    .div_out_tag(div_out_tag), .div_out_hit(div_out_hit), .div_out_back(div_out_back),
    .tbl_idx(tbl_idx), .tbl_x0(tbl_x0),
    .ck_key(ck_key), .ck_hit(ck_hit), .ck_data(ck_data),
    .ck_wr_en(ck_wr_en), .ck_wr_key(ck_wr_key), .ck_wr_data(ck_wr_data),
    .mreq_valid(mreq_valid), .mreq_ready(mreq_ready),
    .mreq_x(mreq_x), .mreq_y(mreq_y), .mreq_id(mreq_id),
    .mrsp_valid(mrsp_valid), .mrsp_prod(mrsp_prod), .mrsp_id(mrsp_id)
  );

endmodule
