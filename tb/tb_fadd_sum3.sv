// Testbench of the half-adder row plus compound adders: A+B, A+B+1 and A+B+2
// against the simulator's addition for random and all-ones operands.
module tb_fadd_sum3;
  localparam int W = 53;
  logic [W-1:0] a, b;
  logic [W+1:0] s0, s1, s2, r;
  int checks = 0, failures = 0;

  fadd_sum3 dut (.*);

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      a = W'({$urandom, $urandom});
      b = W'({$urandom, $urandom});
      if (n % 5 == 0) b = ~a;
      if (n % 9 == 0) begin a = '1; b = '1; end
      #1;
      r = (W+2)'(a) + (W+2)'(b);
      checks++;
      if (s0 !== r || s1 !== r + 1 || s2 !== r + 2) begin
        failures++;
        $display("FAIL %h + %h: %h %h %h", a, b, s0, s1, s2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
