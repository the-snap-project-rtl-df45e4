// Testbench of the CLOSE path prediction and swap: for true exponent
// differences -1, 0, +1 the prediction must hold and the addends must be the
// larger significand and the smaller one aligned by the difference; for larger
// differences with low bits 2 apart the prediction must be rejected.
module tb_fadd_predict_swap;
  logic [1:0]  ea_lo, eb_lo;
  logic [52:0] ma, mb;
  logic        valid, swap, d1;
  logic [53:0] x, y;
  int checks = 0, failures = 0;

  fadd_predict_swap dut (.*);

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int ea, eb, d;
      ea = 1 + $urandom % 2000;
      d  = int'($urandom % 5) - 2;
      eb = ea - d;
      ea_lo = 2'(ea); eb_lo = 2'(eb);
      ma = {1'b1, 52'({$urandom, $urandom})}; mb = {1'b1, 52'({$urandom, $urandom})};
      #1;
      checks++;
      if (d == 2 || d == -2) begin
        if (valid) begin failures++; $display("FAIL d=%0d accepted", d); end
      end else begin
        logic [53:0] wx, wy;
        wx = (d >= 0) ? {ma, 1'b0} : {mb, 1'b0};
        wy = (d >= 0) ? {mb, 1'b0} : {ma, 1'b0};
        if (d != 0) wy = wy >> 1;
        if (!valid || x !== wx || y !== wy || swap !== (d < 0) || d1 !== (d != 0)) begin
          failures++; $display("FAIL d=%0d", d);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
