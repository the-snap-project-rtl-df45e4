// Testbench of the pipelined Booth-3 multiplier: one random 64x64 product per
// cycle; each product must appear with its sideband two clock edges after
// issue (the third stage is combinational at the output).
module tb_booth3_mult;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic         in_valid, out_valid;
  logic [63:0]  in_x, in_y;
  logic [7:0]   in_sb, out_sb;
  logic [127:0] out_prod;
  logic [127:0] want [256];
  int checks = 0, failures = 0, issued = 0;

  booth3_mult dut (.*);

  initial begin
    #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int cycle = 0, icyc [256];
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (out_prod !== want[out_sb] || cycle - icyc[out_sb] != 2) begin
      failures++; $display("FAIL sb %0d", out_sb);
    end
  end

  initial begin
    in_valid = 0; in_x = 0; in_y = 0; in_sb = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      in_valid = ($urandom % 4 != 0);
      in_x = {$urandom, $urandom}; in_y = {$urandom, $urandom};
      if (n % 50 == 0) begin in_x = '1; in_y = '1; end
      in_sb = 8'(n);
      want[8'(n)] = 128'(in_x) * 128'(in_y);
      icyc[8'(n)] = cycle;
      if (in_valid) issued++;
    end
    @(negedge clk) in_valid = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (checks - 1 != issued) begin failures++; $display("FAIL %0d issued, %0d returned", issued, checks - 1); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
