// Testbench of the FAR path exponent difference and swap, against integer
// arithmetic on random exponents: one third equal or adjacent, one third
// with differences of -4..4 (the FAR/CLOSE boundary), the rest unrelated.
module tb_fadd_expdiff_swap;
  logic [10:0] ea, eb, el;
  logic [52:0] ma, mb, ml, ms;
  logic        swap, far_path;
  logic [11:0] absd;
  int checks = 0, failures = 0;

  fadd_expdiff_swap dut (.*);

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      int d;
      ea = 11'($urandom); eb = (n % 3 == 0) ? ea + 11'($urandom % 3) - 11'd1
         : (n % 3 == 1) ? ea + 11'($urandom % 9) - 11'd4 : 11'($urandom);
      ma = {1'b1, 52'({$urandom, $urandom})}; mb = {1'b1, 52'({$urandom, $urandom})};
      #1;
      d = int'(ea) - int'(eb);
      checks++;
      if (swap !== (d < 0) || absd !== 12'(d < 0 ? -d : d) || far_path !== (d > 1 || d < -1)
          || el !== (d < 0 ? eb : ea) || ml !== (d < 0 ? mb : ma) || ms !== (d < 0 ? ma : mb)) begin
        failures++;
        $display("FAIL ea=%0d eb=%0d", ea, eb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
