// Testbench of the FP multiplier: random FP multiplications in all rounding
// modes against the simulator's double precision product, with Dekker's exact
// product deciding the directed modes; results must come three cycles after
// issue. Divider requests run alongside: they must return the exact 128-bit
// product three cycles after acceptance and must be held off (ready low)
// whenever an FP multiplication is issued in the same cycle.
module tb_fp_multiplier;
  import snap_pkg::*;
  import fp_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         mul_valid, mul_out_valid, div_req_valid, div_req_ready, div_rsp_valid;
  logic [63:0]  mul_a, mul_b, mul_out_result, div_req_x, div_req_y;
  rmode_e       mul_rm;
  logic [3:0]   mul_tag, mul_out_tag;
  logic [0:0]   div_req_id, div_rsp_id;
  logic [127:0] div_rsp_prod;

  fp_multiplier dut (.*);

  int checks = 0, failures = 0, cycle = 0, n_stall = 0, n_div = 0;
  logic [63:0]  want [16];
  int           icyc [16];
  logic [127:0] dwant [$];
  int           dcyc [$];
  logic [0:0]   did [$];
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (mul_out_valid) begin
      checks++;
      if (mul_out_result !== want[mul_out_tag] || cycle - icyc[mul_out_tag] != 3) begin
        failures++;
        $display("FAIL tag %0d got %h want %h lat %0d rm %0d", mul_out_tag, mul_out_result, want[mul_out_tag], cycle - icyc[mul_out_tag], dut.m_sb.rm);
      end
    end
    if (div_rsp_valid) begin
      checks++; n_div++;
      if (dwant.size() == 0) failures++;
      else if (div_rsp_prod !== dwant.pop_front() || cycle - dcyc.pop_front() != 3
               || div_rsp_id !== did.pop_front()) begin
        failures++; $display("FAIL raw product id %0d", div_rsp_id);
      end
    end
    if (div_req_valid && !div_req_ready) n_stall++;
    if (div_req_valid && div_req_ready) begin
      dwant.push_back(128'(div_req_x) * 128'(div_req_y));
      dcyc.push_back(cycle);
      did.push_back(div_req_id);
    end
    if (mul_valid && div_req_ready) begin failures++; $display("FAIL ready while FP multiplication issued"); end
  end

  initial begin
    logic [63:0] a, b;
    int tag;
    mul_valid = 0; mul_a = 0; mul_b = 0; mul_rm = RM_RN; mul_tag = 0;
    div_req_valid = 0; div_req_x = 0; div_req_y = 0; div_req_id = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    tag = 0;
    for (int n = 0; n < 10000; n++) begin
      @(negedge clk);
      a = rand_fp(600, 1450); b = rand_fp(600, 1450);
      case (n % 20)
        0: b = 64'd0;
        1: a = 64'h7FF0_0000_0000_0000;
        2: begin a = 64'h7FF0_0000_0000_0000; b = 64'd0; end
        3: a = rand_fp(1900, 2046);
        4: begin a = rand_fp(1, 60); b = rand_fp(900, 1000); end
        5: b = 64'h7FF8_0000_0000_0001;
        default: ;
      endcase
      mul_valid = ($urandom % 3 != 0);
      mul_a = a; mul_b = b; mul_rm = rmode_e'($urandom % 4); mul_tag = 4'(tag);
      want[tag] = ref_mul(a, b, mul_rm);
      icyc[tag] = cycle;
      if (mul_valid) tag = (tag + 1) % 16;
      if (!div_req_valid || div_req_ready) begin
        div_req_valid = ($urandom % 2 == 0);
        div_req_x = {$urandom, $urandom}; div_req_y = {$urandom, $urandom};
        div_req_id = 1'(n);
      end
    end
    @(negedge clk) begin mul_valid = 0; div_req_valid = 0; end
    repeat (5) @(posedge clk);
    checks++;
    if (n_stall == 0 || n_div == 0) failures++;
    $display("divider requests %0d, held off %0d cycles", n_div, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
