// Testbench of the normalizing left shifter: given the true leading-zero count
// or one less (the predictor's two possible answers) the output must be
// normalized with the top bit set and the applied distance must be the true
// count.
module tb_fadd_lshift;
  localparam int W = 54;
  logic [W-1:0] din, dout;
  logic [5:0]   sh, total;
  int checks = 0, failures = 0;

  fadd_lshift dut (.*);

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      int lz;
      lz  = $urandom % W;
      din = (W'({$urandom, $urandom}) | (W'(1) << (W - 1))) >> lz;
      sh  = 6'((lz > 0 && ($urandom % 2)) ? lz - 1 : lz);
      #1;
      checks++;
      if (dout !== din << lz || total !== 6'(lz)) begin
        failures++; $display("FAIL din=%h sh=%0d: %h %0d", din, sh, dout, total);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
