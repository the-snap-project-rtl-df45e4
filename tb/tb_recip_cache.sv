// Testbench of the reciprocal cache: random writes and lookups against an
// associative-array model of a direct-mapped cache (128 lines indexed by the
// low 7 key bits), plus reset invalidation.
module tb_recip_cache;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [51:0] lk_key, wr_key;
  logic        lk_hit, wr_en;
  logic [63:0] lk_data, wr_data;
  int checks = 0, failures = 0, hits = 0;

  recip_cache dut (.*);

  logic [51:0] mkey [128];
  logic [63:0] mdata [128];
  logic        mval [128];
  logic [51:0] keys [32];

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check_lookup(logic [51:0] k);
    logic want_hit;
    lk_key = k;
    #1;
    want_hit = mval[k[6:0]] && mkey[k[6:0]] == k;
    checks++;
    if (lk_hit !== want_hit || (want_hit && lk_data !== mdata[k[6:0]])) begin
      failures++; $display("FAIL key %h hit %b want %b", k, lk_hit, want_hit);
    end
    if (want_hit) hits++;
  endtask

  initial begin
    wr_en = 0; wr_key = 0; wr_data = 0; lk_key = 0;
    foreach (mval[i]) mval[i] = 1'b0;
    foreach (keys[i]) keys[i] = 52'({$urandom, $urandom});
    keys[1] = {keys[0][51:7] ^ 45'd1, keys[0][6:0]};   // same line, other tag
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      check_lookup(keys[$urandom % 32]);
      wr_en = ($urandom % 3 == 0);
      wr_key = keys[$urandom % 32];
      wr_data = {$urandom, $urandom};
      @(posedge clk);
      if (wr_en) begin
        mval[wr_key[6:0]] = 1'b1; mkey[wr_key[6:0]] = wr_key; mdata[wr_key[6:0]] = wr_data;
      end
      #1 wr_en = 0;
      if (n == 2000) begin
        rst_n = 1'b0; @(posedge clk); #1 rst_n = 1'b1;
        foreach (mval[i]) mval[i] = 1'b0;
      end
    end
    checks++;
    if (hits == 0) failures++;
    $display("hits %0d", hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
