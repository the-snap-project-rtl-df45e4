// Testbench of the compound adder: random and corner operands at the adder's
// default width, both results compared with the simulator's own addition.
module tb_compound_adder;
  localparam int W = 53;
  logic [W-1:0] a, b;
  logic [W:0]   sum0, sum1;
  int checks = 0, failures = 0;

  compound_adder dut (.*);

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      a = W'({$urandom, $urandom});
      b = W'({$urandom, $urandom});
      if (n % 7 == 0) b = ~a;
      if (n % 11 == 0) a = '1;
      #1;
      checks++;
      if (sum0 !== {1'b0, a} + {1'b0, b} || sum1 !== {1'b0, a} + {1'b0, b} + 1'b1) begin
        failures++;
        $display("FAIL %h + %h: %h %h", a, b, sum0, sum1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
