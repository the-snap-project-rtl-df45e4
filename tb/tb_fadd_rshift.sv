// Testbench of the aligning right shifter: the kept bits and the sticky bit
// are recomputed bit by bit for random significands and distances 0..70.
module tb_fadd_rshift;
  logic [52:0] ms;
  logic [11:0] sh;
  logic [55:0] aligned, want;
  int checks = 0, failures = 0;

  fadd_rshift dut (.*);

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      logic st;
      ms = {1'b1, 52'({$urandom, $urandom})};
      if (n % 4 == 0) ms[20:0] = '0;
      sh = 12'($urandom % 71);
      if (n == 0) sh = 12'd2000;
      #1;
      // bit k of the 56-bit window holds ms bit k + 3 - sh
      want = '0; st = 1'b0;
      for (int k = 55; k >= 1; k--)
        if (k + int'(sh) - 3 <= 52 && k + int'(sh) - 3 >= 0) want[k] = ms[k + int'(sh) - 3];
      for (int j = 0; j <= 52; j++) if (j - int'(sh) + 3 <= 0 && ms[j]) st = 1'b1;
      want[0] = st;
      checks++;
      if (aligned !== want) begin failures++; $display("FAIL ms=%h sh=%0d %h %h", ms, sh, aligned, want); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
