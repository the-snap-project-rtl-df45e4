// End-to-end testbench of the floating point unit at its default parameters.
//
// Drives all three issue ports at once with random operands and rounding
// modes: additions/subtractions every cycle they are enabled, FP
// multiplications on a random part of the cycles, and a stream of divisions
// (some with repeated divisors). Every result is compared with the reference
// arithmetic of fp_ref_pkg, and matched by tag. It counts, and requires to
// happen at least once, each mechanism of the design: adder results after
// one, two and three cycles (CLOSE addition, short CLOSE subtraction, long
// CLOSE subtraction, FAR path), result collisions in the adder, divider
// requests held off by FP multiplications, two divisions in flight together,
// reciprocal cache hits and misses, and back-multiplications in the rounding.
module tb_fpu_top;
  import snap_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        add_valid, add_sub, add_out_valid;
  logic [63:0] add_a, add_b, add_out_result;
  rmode_e      add_rm, mul_rm, div_rm;
  logic [3:0]  add_tag, add_out_tag, mul_tag, mul_out_tag, div_tag, div_out_tag;
  logic [1:0]  add_out_latency, add_out_natural;
  logic        mul_valid, mul_out_valid;
  logic [63:0] mul_a, mul_b, mul_out_result;
  logic        div_valid, div_ready, div_out_valid, div_out_hit, div_out_back;
  logic [63:0] div_a, div_b, div_out_result;

  fpu_top dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  int n_add_lat[4], n_collide = 0, n_mul = 0, n_div = 0, n_hit = 0, n_miss = 0, n_back = 0;
  int n_held = 0, n_overlap = 0;
  logic [63:0] add_want [16], mul_want [16], div_want [16];
  int          add_cyc [16], mul_cyc [16];
  logic        div_pend [16];

  always @(posedge clk) cycle <= cycle + 1;

  function automatic logic [63:0] ref_add(logic [63:0] a, logic [63:0] b, logic sub, rmode_e rm);
    real ra, rb, s, bb, err;
    logic [63:0] sbits;
    a = ref_ftz(a); b = ref_ftz(b ^ {sub, 63'd0});
    ra = $bitstoreal(a); rb = $bitstoreal(b);
    s = ra + rb;
    sbits = $realtobits(s);
    if (ref_is_nan(sbits)) return QNAN;
    if (a[62:52] == 11'h7FF || b[62:52] == 11'h7FF) return sbits;
    if (sbits[62:52] == 11'h7FF) return ref_ovf(sbits[63], rm);
    if (s == 0.0) begin
      if (ra == 0.0 && rb == 0.0) return {(a[63] & b[63]) | ((a[63] ^ b[63]) & (rm == RM_RM)), 63'd0};
      return {rm == RM_RM, 63'd0};
    end
    bb  = s - ra;
    err = (ra - (s - bb)) + (rb - bb);
    return ref_ftz(ref_direct(sbits, rm, err > 0.0, err < 0.0));
  endfunction

  // checkers
  always @(posedge clk) if (rst_n) begin
    if (add_out_valid) begin
      checks++;
      if (add_out_result !== add_want[add_out_tag] || cycle - add_cyc[add_out_tag] != int'(add_out_latency)) begin
        failures++; $display("FAIL add tag %0d: %h want %h", add_out_tag, add_out_result, add_want[add_out_tag]);
      end
      n_add_lat[add_out_natural]++;
      if (add_out_latency != add_out_natural) n_collide++;
    end
    if (mul_out_valid) begin
      checks++; n_mul++;
      if (mul_out_result !== mul_want[mul_out_tag] || cycle - mul_cyc[mul_out_tag] != 3) begin
        failures++; $display("FAIL mul tag %0d: %h want %h", mul_out_tag, mul_out_result, mul_want[mul_out_tag]);
      end
    end
    if (div_out_valid) begin
      checks++; n_div++;
      if (!div_pend[div_out_tag] || div_out_result !== div_want[div_out_tag]) begin
        failures++; $display("FAIL div tag %0d: %h want %h", div_out_tag, div_out_result, div_want[div_out_tag]);
      end
      div_pend[div_out_tag] = 1'b0;
      if (div_out_hit) n_hit++; else n_miss++;
      if (div_out_back) n_back++;
    end
    if (dut.u_div.mreq_valid && !dut.u_div.mreq_ready) n_held++;
    if (dut.u_div.ctx_q[0].st != 0 && dut.u_div.ctx_q[1].st != 0) n_overlap++;
  end

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] pool [6];

  // adder and multiplier stimulus
  initial begin
    int at = 0, mt = 0;
    add_valid = 0; add_a = 0; add_b = 0; add_sub = 0; add_rm = RM_RN; add_tag = 0;
    mul_valid = 0; mul_a = 0; mul_b = 0; mul_rm = RM_RN; mul_tag = 0;
    repeat (3) @(posedge clk);
    for (int n = 0; n < 20000; n++) begin
      logic [63:0] a, b;
      @(negedge clk);
      a = rand_fp(950, 1100);
      case ($urandom % 4)
        0: b = rand_fp(950, 1100);
        1: begin b = rand_fp(950, 1100); b[62:52] = a[62:52]; end
        2: b = a ^ (64'd1 << ($urandom % 50));
        default: begin b = rand_fp(950, 1100); b[62:52] = a[62:52] - 11'd1; end
      endcase
      add_valid = ($urandom % 4 != 0);
      add_a = a; add_b = b; add_sub = 1'($urandom); add_rm = rmode_e'($urandom % 4); add_tag = 4'(at);
      add_want[at] = ref_add(a, b, add_sub, add_rm);
      add_cyc[at]  = cycle;
      if (add_valid) at = (at + 1) % 16;
      mul_valid = ($urandom % 3 == 0);
      mul_a = rand_fp(800, 1250); mul_b = rand_fp(800, 1250);
      mul_rm = rmode_e'($urandom % 4); mul_tag = 4'(mt);
      mul_want[mt] = ref_mul(mul_a, mul_b, mul_rm);
      mul_cyc[mt]  = cycle;
      if (mul_valid) mt = (mt + 1) % 16;
    end
    @(negedge clk);
    add_valid = 0; mul_valid = 0;
  end

  // divider stimulus and end of test
  initial begin
    int dt = 0;
    div_valid = 0; div_a = 0; div_b = 0; div_rm = RM_RN; div_tag = 0;
    foreach (div_pend[i]) div_pend[i] = 1'b0;
    foreach (pool[i]) pool[i] = rand_fp(1000, 1050);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1500; n++) begin
      logic [63:0] a, b;
      a = rand_fp(900, 1150);
      b = ($urandom % 2) ? pool[$urandom % 6] : rand_fp(900, 1150);
      @(negedge clk);
      while (!div_ready || div_pend[dt]) @(negedge clk);
      div_valid = 1'b1; div_a = a; div_b = b; div_rm = rmode_e'($urandom % 4); div_tag = 4'(dt);
      div_want[dt] = ref_div(a, b, div_rm);
      div_pend[dt] = 1'b1;
      dt = (dt + 1) % 16;
      @(negedge clk);
      div_valid = 1'b0;
    end
    repeat (200) @(posedge clk);
    foreach (div_pend[i]) if (div_pend[i]) begin failures++; $display("FAIL division %0d lost", i); end
    $display("adder latency 1:%0d 2:%0d 3:%0d collisions:%0d", n_add_lat[1], n_add_lat[2], n_add_lat[3], n_collide);
    $display("mul %0d div %0d (hits %0d misses %0d back-multiplications %0d)", n_mul, n_div, n_hit, n_miss, n_back);
    $display("divider held off %0d cycles, two divisions in flight %0d cycles", n_held, n_overlap);
    checks++;
    if (n_add_lat[1] == 0 || n_add_lat[2] == 0 || n_add_lat[3] == 0 || n_collide == 0 || n_mul == 0
        || n_hit == 0 || n_miss == 0 || n_back == 0 || n_held == 0 || n_overlap == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
