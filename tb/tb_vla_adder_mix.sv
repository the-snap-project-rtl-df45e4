// Workload testbench of the variable latency adder: the operand mix of
// floating point programs.
//
// Published measurements of double precision additions in floating point
// benchmark programs found 57% of the operations in the FAR path, 20% CLOSE
// effective additions and 23% CLOSE effective subtractions, 52.5% of which
// need a normalizing shift of at most two bits. This testbench draws random
// operands in those proportions, classifying each candidate by its exact
// result (so the class does not depend on the adder), and runs them in round
// to nearest.
//   Phase 1 issues one operation every 4 cycles, so no results collide. Every
//   result is compared with the simulator's 'real' addition, its latency must
//   follow the path rules (FAR 3, CLOSE addition 1, subtraction with a shift
//   of at most 2: 1, of 4 or more: 2, of exactly 3: 1 or 2, since the shift
//   class is decided from the predicted count), and the average latency must
//   come within 0.05 of the 2.25 cycles those proportions give
//   (0.57*3 + 0.20*1 + 0.23*(0.525*1 + 0.475*2)), and the share finished in
//   one cycle within 30..36% of the 20% + 0.525*23% = 32% expected.
//   Phases 2 and 3 issue the same mix with a random gap of 0 or 1 cycles
//   (two operations every three cycles) and then every cycle, and report how
//   much the collisions on the single result port add; every latency must
//   stay <= 3. At one addition per cycle the port is busy every cycle, so
//   once a FAR result has taken a slot three cycles after its issue, every
//   later result is held to three cycles as well: the average then tends to 3
//   whatever the arbitration. The early results pay off when the issue rate
//   leaves gaps.
module tb_vla_adder_mix;
  import snap_pkg::*;

  localparam int N_OPS = 4000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        in_valid, in_sub;
  logic [63:0] in_a, in_b;
  rmode_e      in_rm;
  logic [3:0]  in_tag;
  logic        out_valid;
  logic [63:0] out_result;
  logic [3:0]  out_tag;
  logic [1:0]  out_latency, out_natural;

  vla_fp_adder dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  int n_class[4];
  int lat_sum[3], lat_cnt[3], n_one = 0;
  logic [63:0] exp_res [16];
  int          issue_cyc [16];
  int          lat_lo [16], lat_hi [16];
  int          phase = 0;

  always @(posedge clk) cycle <= cycle + 1;

  function automatic logic [63:0] mk(logic s, int e, logic [51:0] f);
    return {s, 11'(e), f};
  endfunction

  function automatic logic [51:0] rfrac();
    return {$urandom, $urandom} & 52'hF_FFFF_FFFF_FFFF;
  endfunction

  // class 0: FAR, 1: CLOSE addition, 2: CLOSE short subtraction,
  // 3: CLOSE long subtraction. Returns the operands of a new operation.
  task automatic gen(input int cls, output logic [63:0] a, output logic [63:0] b,
                     output logic sub, output int lo, output int hi);
    int ea, eb, sh;
    logic sa, sb, eff_sub;
    logic [63:0] r;
    real ra, rb;
    forever begin
      ea  = 1000 + int'($urandom % 40);
      sa  = 1'($urandom);
      sub = 1'($urandom);
      if (cls == 0) begin
        eb = ($urandom % 2) ? ea + 2 + int'($urandom % 58) : ea - 2 - int'($urandom % 58);
        sb = 1'($urandom);
      end else begin
        eb = ea + int'($urandom % 3) - 1;
        eff_sub = (cls != 1);
        sb = sa ^ sub ^ eff_sub;
      end
      a = mk(sa, ea, rfrac());
      b = mk(sb, eb, rfrac());
      if (cls == 3 && ($urandom % 2) && ea == eb)
        b[51:0] = a[51:0] ^ (rfrac() >> ($urandom % 52));
      ra = $bitstoreal(a);
      rb = $bitstoreal(b);
      r  = $realtobits(sub ? ra - rb : ra + rb);
      if (cls == 0) begin lo = 3; hi = 3; return; end
      if (cls == 1) begin lo = 1; hi = 1; return; end
      if (r[62:0] == 63'd0) continue;
      sh = (ea > eb ? ea : eb) - int'(r[62:52]);
      if (cls == 2 && sh <= 2) begin lo = 1; hi = 1; return; end
      if (cls == 3 && sh >= 3) begin lo = (sh == 3) ? 1 : 2; hi = 2; return; end
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      automatic int t = int'(out_tag);
      automatic int lat = cycle - issue_cyc[t];
      checks++;
      if (out_result !== exp_res[t] || lat != int'(out_latency) || lat > 3 ||
          (phase == 0 && (lat < lat_lo[t] || lat > lat_hi[t]))) begin
        failures++;
        if (failures < 10)
          $display("FAIL tag %0d: got %h want %h, latency %0d (allowed %0d..%0d)",
                   t, out_result, exp_res[t], lat, lat_lo[t], lat_hi[t]);
      end
      if (phase == 0 && lat == 1) n_one++;
      lat_sum[phase] += lat;
      lat_cnt[phase]++;
    end
  end

  task automatic issue(input int gap, input int tag);
    int r, cls, lo, hi;
    logic [63:0] a, b;
    logic sub;
    r   = int'($urandom % 1000);
    cls = (r < 570) ? 0 : (r < 770) ? 1 : (r < 891) ? 2 : 3;
    n_class[cls]++;
    gen(cls, a, b, sub, lo, hi);
    @(negedge clk);
    in_valid = 1'b1; in_a = a; in_b = b; in_sub = sub; in_rm = RM_RN; in_tag = 4'(tag);
    exp_res[tag]   = $realtobits(sub ? $bitstoreal(a) - $bitstoreal(b) : $bitstoreal(a) + $bitstoreal(b));
    issue_cyc[tag] = cycle;
    lat_lo[tag] = lo; lat_hi[tag] = hi;
    repeat (gap) begin
      @(negedge clk);
      in_valid = 1'b0;
    end
  endtask

  initial begin
    real avg0, avg1, avg2;
    in_valid = 1'b0; in_a = '0; in_b = '0; in_sub = 1'b0; in_rm = RM_RN; in_tag = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N_OPS; i++) issue(4, i % 16);
    repeat (6) @(negedge clk);
    phase = 1;
    for (int i = 0; i < N_OPS; i++) issue(int'($urandom % 2), i % 16);
    @(negedge clk) in_valid = 1'b0;
    repeat (6) @(negedge clk);
    phase = 2;
    for (int i = 0; i < N_OPS; i++) issue(0, i % 16);
    @(negedge clk) in_valid = 1'b0;
    repeat (6) @(negedge clk);
    avg0 = real'(lat_sum[0]) / real'(lat_cnt[0]);
    avg1 = real'(lat_sum[1]) / real'(lat_cnt[1]);
    avg2 = real'(lat_sum[2]) / real'(lat_cnt[2]);
    $display("mix: FAR %0d, CLOSE add %0d, short sub %0d, long sub %0d",
             n_class[0], n_class[1], n_class[2], n_class[3]);
    $display("average latency %0.3f without collisions (expected 2.25)", avg0);
    $display("average latency %0.3f at 2 additions per 3 cycles, %0.3f at 1 per cycle", avg1, avg2);
    $display("finished in one cycle: %0.1f%% (expected 32%%)", 100.0 * real'(n_one) / real'(N_OPS));
    checks += 3;
    if (avg0 < 2.20 || avg0 > 2.30) failures++;
    if (real'(n_one) < 0.30 * N_OPS || real'(n_one) > 0.36 * N_OPS) failures++;
    if (lat_cnt[0] != N_OPS || lat_cnt[1] != N_OPS || lat_cnt[2] != N_OPS) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12 * N_OPS + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
