// Testbench of the Booth-3 partial product generator: the sum of all rows
// (modulo 2^128) must equal x*y for random and corner operands, and the
// number of non-zero hot-one bits must equal the number of negative digits.
module tb_booth3_ppgen;
  logic [63:0]  x, y;
  logic [127:0] pp [23];
  int checks = 0, failures = 0;

  booth3_ppgen dut (.*);

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [127:0] s;
      int neg;
      x = {$urandom, $urandom}; y = {$urandom, $urandom};
      if (n == 0) begin x = '1; y = '1; end
      if (n == 1) begin y = 64'h5555_5555_5555_5555; end
      if (n == 2) begin y = 64'hB6DB_6DB6_DB6D_B6DB; end
      #1;
      s = '0;
      for (int i = 0; i < 23; i++) s += pp[i];
      neg = 0;
      for (int j = 0; j < 22; j++) begin
        logic [3:0] g;
        g = 4'((({2'b00, y, 1'b0}) >> (3 * j)) & 67'hF);
        if (g[3] && g != 4'hF) neg++;
      end
      checks++;
      if (s !== 128'(x) * 128'(y) || $countones(pp[22]) != neg) begin
        failures++; $display("FAIL x=%h y=%h", x, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
