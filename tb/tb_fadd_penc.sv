// Testbench of the priority encoder: leading-zero count and zero flag for
// every single-one position, random strings and the all-zero string.
module tb_fadd_penc;
  localparam int W = 54;
  logic [W-1:0] f;
  logic [5:0]   count;
  logic         zero;
  int checks = 0, failures = 0;

  fadd_penc dut (.*);

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int lz;
      if (n < W) f = W'(1) << n;
      else if (n == W) f = '0;
      else f = W'({$urandom, $urandom}) >> ($urandom % W);
      #1;
      lz = W;
      for (int i = 0; i < W; i++) if (f[i]) lz = W - 1 - i;
      checks++;
      if (count !== 6'(lz) || zero !== (f == 0)) begin failures++; $display("FAIL %h: %0d", f, count); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
