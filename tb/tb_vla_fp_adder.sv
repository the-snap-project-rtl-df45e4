// Self-checking testbench of the variable latency adder.
//
// Issues one random operation per cycle (with idle gaps) and compares every
// result with a reference computed from the simulator's own double precision
// arithmetic: round-to-nearest comes straight from 'real' addition, the
// directed modes from the exact rounding error obtained with the TwoSum
// algorithm. It also checks that each result returns after the cycle count it
// reports, that the natural latency matches the path rules (FAR: 3, CLOSE add
// and short subtraction: 1, long subtraction: 2) and that collisions occur.
module tb_vla_fp_adder;
  import snap_pkg::*;

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
  int n_lat[4], n_collide = 0;
  logic [63:0] exp_res [16];
  int          issue_cyc [16];
  int          exp_nat [16];   // 0 = 1 or 2 allowed
  logic        pending [16];

  always @(posedge clk) cycle <= cycle + 1;

  function automatic logic [63:0] ftz(logic [63:0] x);
    return (x[62:52] == 0) ? {x[63], 63'd0} : x;
  endfunction

  function automatic logic [63:0] step(logic [63:0] x, bit up_mag);
    return up_mag ? x + 64'd1 : x - 64'd1;
  endfunction

  function automatic logic [63:0] ref_add(logic [63:0] a, logic [63:0] b, logic sub, rmode_e rm);
    real ra, rb, s, bb, err;
    logic [63:0] sbits;
    logic sgn;
    a = ftz(a); b = ftz(b^{sub,63'd0});
    ra = $bitstoreal(a); rb = $bitstoreal(b);
    s = ra + rb;
    sbits = $realtobits(s);
    if (sbits[62:52] == 11'h7FF && sbits[51:0] != 52'd0) return QNAN;
    if (sbits[62:52] == 11'h7FF && a[62:52] != 11'h7FF && b[62:52] != 11'h7FF) begin
      sgn = sbits[63];
      if (rm == RM_RZ || (rm == RM_RP && sgn) || (rm == RM_RM && !sgn))
        return {sgn, 11'h7FE, {52{1'b1}}};
      return sbits;
    end
    if (a[62:52] == 11'h7FF || b[62:52] == 11'h7FF) return sbits;
    if (s == 0.0) begin
      if (ra == 0.0 && rb == 0.0) return {(a[63] & b[63]) | ((a[63]^b[63]) & (rm == RM_RM)), 63'd0};
      return {rm == RM_RM, 63'd0};
    end
    bb  = s - ra;
    err = (ra - (s - bb)) + (rb - bb);
    if (err != 0.0 && rm != RM_RN) begin
      sgn = sbits[63];
      // err > 0 means the exact sum lies above s
      if (rm == RM_RZ && ((err > 0.0) == sgn)) sbits = step(sbits, 1'b0);
      if (rm == RM_RP && err > 0.0) sbits = step(sbits, !sgn);
      if (rm == RM_RM && err < 0.0) sbits = step(sbits, sgn);
    end
    return ftz(sbits);
  endfunction

  // independent latency rule: 3 for |ea-eb| > 1, 1 for additions, for
  // subtractions 1 when the normalizing shift is <= 2, 2 when it is >= 4
  function automatic int ref_nat(logic [63:0] a, logic [63:0] b, logic sub);
    int d, lz;
    logic [54:0] x, y, r;
    if (a[62:52] == 0 || b[62:52] == 0 || a[62:52] == 11'h7FF || b[62:52] == 11'h7FF) return 1;
    d = int'(a[62:52]) - int'(b[62:52]);
    if (d > 1 || d < -1) return 3;
    if ((a[63] ^ b[63] ^ sub) == 1'b0) return 1;
    x = {2'b01, a[51:0], 1'b0};
    y = {2'b01, b[51:0], 1'b0};
    if (d == 1)  y = y >> 1;
    if (d == -1) x = x >> 1;
    r = (x > y) ? x - y : y - x;
    if (r == 0) return 1;
    lz = 0;
    for (int i = 53; i >= 0; i--) begin if (r[i]) break; lz++; end
    if (lz <= 2) return 1;
    if (lz >= 4) return 2;
    return 0;
  endfunction

  function automatic logic [63:0] rand_num(int emin, int emax);
    logic [63:0] r;
    r = {$urandom, $urandom};
    r[62:52] = 11'(emin + ($urandom % (emax - emin + 1)));
    return r;
  endfunction

  task automatic make_ops(output logic [63:0] a, output logic [63:0] b);
    int k;
    k = $urandom % 10;
    a = rand_num(900, 1100);
    case (k)
      0, 1: begin b = rand_num(900, 1100); end
      2, 3: begin b = {$urandom, $urandom}; b[62:52] = a[62:52]; end
      4:    begin b = {$urandom, $urandom}; b[62:52] = a[62:52] + 11'd1; end
      5:    begin b = a ^ (64'd1 << ($urandom % 52)) ^ 64'(($urandom % 4)); end
      6:    begin b = a; b[63] = ~a[63]; b[62:52] = a[62:52] - 11'd1;
                  b[51:0] = {52{1'b1}} ^ 52'($urandom % 8); end
      7:    begin b = rand_num(int'(a[62:52]) - 60, int'(a[62:52]) + 60); end
      8:    begin a = rand_num(2040, 2046); b = rand_num(2040, 2046); end
      default: begin
        b = rand_num(1000, 1010);
        case ($urandom % 6)
          0: a = 64'd0;
          1: a = 64'h7FF0_0000_0000_0000;
          2: a = 64'hFFF0_0000_0000_0000;
          3: a = 64'h7FF8_0000_0000_1234;
          4: b = 64'h8000_0000_0000_0000;
          default: b = a;
        endcase
      end
    endcase
  endtask

  // response checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int lat;
      checks++;
      lat = cycle - issue_cyc[out_tag];
      if (!pending[out_tag] || out_result !== exp_res[out_tag]) begin
        failures++;
        $display("FAIL tag %0d: got %h expected %h", out_tag, out_result, exp_res[out_tag]);
      end
      if (lat != int'(out_latency) || lat < 1 || lat > 3) begin
        failures++;
        $display("FAIL tag %0d: latency %0d reported %0d", out_tag, lat, out_latency);
      end
      if (int'(out_latency) < int'(out_natural)) failures++;
      if (int'(out_latency) != int'(out_natural)) n_collide++;
      if (exp_nat[out_tag] != 0 && exp_nat[out_tag] != int'(out_natural)) begin
        failures++;
        $display("FAIL tag %0d: natural latency %0d expected %0d", out_tag, out_natural, exp_nat[out_tag]);
      end
      if (exp_nat[out_tag] == 0 && out_natural == 2'd3) failures++;
      n_lat[out_natural]++;
      pending[out_tag] = 1'b0;
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] a, b;
    logic sub;
    rmode_e rm;
    int tag;
    in_valid = 0; in_a = 0; in_b = 0; in_sub = 0; in_rm = RM_RN; in_tag = 0;
    foreach (pending[i]) pending[i] = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    tag = 0;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      if ($urandom % 5 == 0) begin
        in_valid = 1'b0;
      end else begin
        make_ops(a, b);
        sub = 1'($urandom);
        rm  = rmode_e'($urandom % 4);
        in_valid = 1'b1; in_a = a; in_b = b; in_sub = sub; in_rm = rm; in_tag = 4'(tag);
        exp_res[tag]   = ref_add(a, b, sub, rm);
        exp_nat[tag]   = ref_nat(a, b, sub);
        issue_cyc[tag] = cycle;
        pending[tag]   = 1'b1;
        tag = (tag + 1) % 16;
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (6) @(posedge clk);
    foreach (pending[i]) if (pending[i]) begin failures++; $display("FAIL tag %0d lost", i); end
    $display("natural latency 1:%0d 2:%0d 3:%0d collisions:%0d", n_lat[1], n_lat[2], n_lat[3], n_collide);
    if (n_lat[1] == 0 || n_lat[2] == 0 || n_lat[3] == 0 || n_collide == 0) failures++;
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
