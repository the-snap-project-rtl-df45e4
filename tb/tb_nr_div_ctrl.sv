// Self-checking testbench of the Newton-Raphson division control.
//
// Wires the controller to the initial approximation table, the reciprocal
// cache and the shared multiplier, as in the full unit, and runs random
// divisions in all rounding modes. The reference quotient comes from the
// simulator's double precision division (round to nearest); for the directed
// modes the exact sign of the remainder a - q*b, found with Dekker's exact
// product, decides the neighbouring value. Divisors are drawn from a small pool
// part of the time so that the reciprocal cache hits. Checks latency of the
// three kinds of division (miss 31, hit 7, +4 for a back-multiplication,
// 2 for special operands) when
// they run alone, and that two divisions overlap, the cache hits and the
// back-multiplication happens.
module tb_nr_div_ctrl;
  import snap_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        div_valid, div_ready, div_out_valid, div_out_hit, div_out_back;
  logic [63:0] div_a, div_b, div_out_result;
  rmode_e      div_rm;
  logic [3:0]  div_tag, div_out_tag;
  logic [7:0]  tbl_idx, tbl_x0;
  logic [51:0] ck_key, ck_wr_key;
  logic        ck_hit, ck_wr_en;
  logic [63:0] ck_data, ck_wr_data;
  logic        mreq_valid, mreq_ready, mrsp_valid;
  logic [63:0] mreq_x, mreq_y;
  logic [0:0]  mreq_id, mrsp_id;
  logic [127:0] mrsp_prod;
  logic        mul_out_valid;
  logic [63:0] mul_out_result;
  logic [3:0]  mul_out_tag;

  nr_div_ctrl dut (.*);
  recip_table u_table (.idx(tbl_idx), .x0(tbl_x0));
  recip_cache u_cache (.clk(clk), .rst_n(rst_n), .lk_key(ck_key), .lk_hit(ck_hit),
                       .lk_data(ck_data), .wr_en(ck_wr_en), .wr_key(ck_wr_key), .wr_data(ck_wr_data));
  fp_multiplier u_mult (.clk(clk), .rst_n(rst_n), .mul_valid(1'b0), .mul_a(64'd0), .mul_b(64'd0),
                        .mul_rm(RM_RN), .mul_tag(4'd0), .mul_out_valid(mul_out_valid),
                        .mul_out_result(mul_out_result), .mul_out_tag(mul_out_tag),
                        .div_req_valid(mreq_valid), .div_req_ready(mreq_ready),
                        .div_req_x(mreq_x), .div_req_y(mreq_y), .div_req_id(mreq_id),
                        .div_rsp_valid(mrsp_valid), .div_rsp_prod(mrsp_prod), .div_rsp_id(mrsp_id));

  int checks = 0, failures = 0, cycle = 0;
  int n_hit = 0, n_back = 0, n_overlap = 0;
  logic [63:0] exp_res [16];
  int          issue_cyc [16];
  logic        pending [16];
  logic        solo [16];
  logic        spec [16];

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (rst_n && (dut.ctx_q[0].st != 0) && (dut.ctx_q[1].st != 0)) n_overlap++;
    if (rst_n && div_out_valid) begin
      int lat, want;
      checks++;
      lat = cycle - issue_cyc[div_out_tag];
      if (!pending[div_out_tag] || div_out_result !== exp_res[div_out_tag]) begin
        failures++;
        $display("FAIL tag %0d: got %h expected %h", div_out_tag, div_out_result, exp_res[div_out_tag]);
      end
      want = div_out_hit ? 7 : 31;
      if (div_out_back) want += 4;
      if (spec[div_out_tag]) want = 2;
      if (solo[div_out_tag] && lat != want) begin
        failures++;
        $display("FAIL tag %0d: latency %0d expected %0d", div_out_tag, lat, want);
      end
      n_hit  += int'(div_out_hit);
      n_back += int'(div_out_back);
      pending[div_out_tag] = 1'b0;
    end
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] pool [8];

  task automatic issue(logic [63:0] a, logic [63:0] b, rmode_e rm, int tag, logic alone);
    @(negedge clk);
    while (!div_ready) @(negedge clk);
    div_valid = 1'b1; div_a = a; div_b = b; div_rm = rm; div_tag = 4'(tag);
    exp_res[tag] = ref_div(a, b, rm);
    issue_cyc[tag] = cycle;
    pending[tag] = 1'b1;
    solo[tag] = alone;
    spec[tag] = (a[62:52] == 0) || (a[62:52] == 11'h7FF) || (b[62:52] == 0) || (b[62:52] == 11'h7FF);
    @(negedge clk);
    div_valid = 1'b0;
  endtask

  initial begin
    logic [63:0] a, b;
    int tag;
    div_valid = 0; div_a = 0; div_b = 0; div_rm = RM_RN; div_tag = 0;
    foreach (pending[i]) pending[i] = 1'b0;
    foreach (pool[i]) pool[i] = rand_fp(1000, 1040);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    tag = 0;
    // back-to-back divisions, two in flight
    for (int n = 0; n < 3000; n++) begin
      a = rand_fp(900, 1150);
      b = ($urandom % 3 == 0) ? pool[$urandom % 8] : rand_fp(900, 1150);
      if (n % 50 == 0) b = {1'b0, 11'd1023, 52'd0};
      if (n % 61 == 0) a = 64'h4008_0000_0000_0000 ^ 64'($urandom % 2);   // exact quotients
      if (n % 97 == 0) b = 64'd0;
      while (pending[tag]) @(negedge clk);
      issue(a, b, rmode_e'($urandom % 4), tag, 1'b0);
      tag = (tag + 1) % 16;
    end
    // one at a time, for the latency check
    for (int n = 0; n < 60; n++) begin
      a = (n == 7) ? 64'd0 : rand_fp(1000, 1040);
      b = (n % 2) ? pool[$urandom % 8] : rand_fp(1000, 1040);
      while (pending[tag] || !div_ready || dut.ctx_q[0].st != 0 || dut.ctx_q[1].st != 0) @(negedge clk);
      issue(a, b, rmode_e'($urandom % 4), tag, 1'b1);
      tag = (tag + 1) % 16;
    end
    repeat (100) @(posedge clk);
    foreach (pending[i]) if (pending[i]) begin failures++; $display("FAIL tag %0d lost", i); end
    $display("hits %0d back-multiplications %0d overlapped cycles %0d", n_hit, n_back, n_overlap);
    checks++;
    if (n_hit == 0 || n_back == 0 || n_overlap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
