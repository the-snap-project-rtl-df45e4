// Testbench of the initial reciprocal table: every entry must be the rounded
// reciprocal of its interval midpoint, and x0 must approximate 1/b within
// 2^-8 relative error over each whole interval.
module tb_recip_table;
  logic [7:0] idx, x0;
  int checks = 0, failures = 0;
  real worst = 0.0;

  recip_table dut (.*);

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      real mid, want, x, err;
      idx = 8'(i);
      #1;
      mid  = 1.0 + (i + 0.5) / 256.0;
      want = $floor(512.0 / mid + 0.5) - 256.0;
      x = (256.0 + x0) / 512.0;
      for (int k = 0; k <= 8; k++) begin
        real b;
        b = 1.0 + (i + k / 8.0) / 256.0;
        err = (x * b - 1.0);
        if (err < 0) err = -err;
        if (err > worst) worst = err;
      end
      checks++;
      if (real'(x0) != want) begin failures++; $display("FAIL entry %0d: %0d want %0.0f", i, x0, want); end
    end
    checks++;
    if (worst > 1.0 / 256.0) begin failures++; $display("FAIL worst error %g", worst); end
    $display("worst relative error %g", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
