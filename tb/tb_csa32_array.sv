// Testbench of the (3,2) counter array: for random rows the two output rows
// must add up to the sum of the 23 input rows modulo 2^128.
module tb_csa32_array;
  logic [127:0] rows [23];
  logic [127:0] sum, carry;
  int checks = 0, failures = 0;

  csa32_array dut (.*);

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [127:0] s;
      s = '0;
      for (int i = 0; i < 23; i++) begin
        rows[i] = {$urandom, $urandom, $urandom, $urandom};
        if (n % 3 == 0) rows[i] = '1;
        s += rows[i];
      end
      #1;
      checks++;
      if (sum + carry !== s) begin failures++; $display("FAIL %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
