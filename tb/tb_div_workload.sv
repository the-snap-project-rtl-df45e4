// Workload testbench of the division path of the FPU (fpu_top at its default
// parameters): how often the guard bits avoid the back-multiplication, and
// what the reciprocal cache saves when divisors repeat.
//
// Divisions are issued one at a time, so each runs with the multiplier to
// itself and its latency must be exactly 31 cycles (cache miss) or 7 (hit),
// plus 4 when a back-multiplication was made. Every quotient is compared with
// a reference built from the simulator's 'real' division and the exact
// remainder, in a random rounding mode.
//   Phase 1: 2000 divisions with fresh random divisors. The share of
//   back-multiplications must lie between 1% and 3%: with 8 guard bits and a
//   window of 5 guard-bit codes around the rounding boundary, 5/256 = 2% of
//   random quotients are expected.
//   Phase 2: 2000 divisions whose divisor comes from a set of 32 values three
//   times in four. The cache hit rate and the average latency against phase 1
//   are reported; the hit rate must exceed 40% (first uses, conflicts in the
//   direct-mapped cache and the fresh divisors cost hits).
module tb_div_workload;
  import snap_pkg::*;
  import fp_ref_pkg::*;

  localparam int N_DIV = 2000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        add_valid = 1'b0, add_sub = 1'b0, mul_valid = 1'b0;
  logic [63:0] add_a = '0, add_b = '0, mul_a = '0, mul_b = '0;
  rmode_e      add_rm = RM_RN, mul_rm = RM_RN;
  logic [3:0]  add_tag = '0, mul_tag = '0;
  logic        add_out_valid, mul_out_valid;
  logic [63:0] add_out_result, mul_out_result;
  logic [3:0]  add_out_tag, mul_out_tag;
  logic [1:0]  add_out_latency, add_out_natural;

  logic        div_valid, div_ready, div_out_valid, div_out_hit, div_out_back;
  logic [63:0] div_a, div_b, div_out_result;
  rmode_e      div_rm;
  logic [3:0]  div_tag, div_out_tag;

  fpu_top dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  int n_div[2], n_hit[2], n_back[2], lat_sum[2];
  int phase = 0;
  logic [63:0] exp_res;
  int          issue_cyc;
  logic        got;

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (rst_n && div_out_valid) begin
      int lat, want;
      lat  = cycle - issue_cyc;
      want = (div_out_hit ? 7 : 31) + (div_out_back ? 4 : 0);
      checks++;
      if (div_out_result !== exp_res || lat != want) begin
        failures++;
        if (failures < 10)
          $display("FAIL: got %h want %h, latency %0d want %0d", div_out_result, exp_res, lat, want);
      end
      n_div[phase]++;
      n_hit[phase]   += int'(div_out_hit);
      n_back[phase]  += int'(div_out_back);
      lat_sum[phase] += lat;
      got = 1'b1;
    end
  end

  task automatic divide(logic [63:0] a, logic [63:0] b);
    @(negedge clk);
    while (!div_ready) @(negedge clk);
    div_valid = 1'b1; div_a = a; div_b = b; div_rm = rmode_e'($urandom % 4); div_tag = '0;
    exp_res   = ref_div(a, b, div_rm);
    issue_cyc = cycle;
    got       = 1'b0;
    @(negedge clk);
    div_valid = 1'b0;
    while (!got) @(negedge clk);
  endtask

  logic [63:0] pool [32];

  initial begin
    real avg0, avg1;
    div_valid = 1'b0; div_a = '0; div_b = '0; div_rm = RM_RN; div_tag = '0;
    foreach (pool[i]) pool[i] = rand_fp(1000, 1040);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N_DIV; i++) divide(rand_fp(990, 1050), rand_fp(1000, 1040));
    phase = 1;
    for (int i = 0; i < N_DIV; i++)
      divide(rand_fp(990, 1050), ($urandom % 4 != 0) ? pool[$urandom % 32] : rand_fp(1000, 1040));
    avg0 = real'(lat_sum[0]) / real'(n_div[0]);
    avg1 = real'(lat_sum[1]) / real'(n_div[1]);
    $display("fresh divisors: %0d divisions, %0d hits, %0d back-multiplications (%0.2f%%), average latency %0.2f",
             n_div[0], n_hit[0], n_back[0], 100.0 * real'(n_back[0]) / real'(n_div[0]), avg0);
    $display("repeated divisors: %0d divisions, %0d hits (%0.1f%%), %0d back-multiplications, average latency %0.2f, speedup %0.2f",
             n_div[1], n_hit[1], 100.0 * real'(n_hit[1]) / real'(n_div[1]), n_back[1], avg1, avg0 / avg1);
    checks += 3;
    if (n_div[0] != N_DIV || n_div[1] != N_DIV) failures++;
    if (n_back[0] < N_DIV / 100 || n_back[0] > 3 * N_DIV / 100) failures++;
    if (n_hit[1] < 4 * N_DIV / 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * N_DIV * 45 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
