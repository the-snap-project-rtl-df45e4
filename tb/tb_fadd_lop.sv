// Testbench of the leading-one predictor: for random CLOSE path operand pairs
// (including heavy cancellation and negative differences) the predicted
// leading position must equal the true leading one of |X - Y| or lie one
// place above it.
module tb_fadd_lop;
  localparam int W = 54;
  logic [W-1:0] x, y, f;
  int checks = 0, failures = 0, n_exact = 0, n_off = 0;

  fadd_lop dut (.*);

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      logic [W-1:0] r;
      int tp, pp;
      x = {1'b1, 52'({$urandom, $urandom}), 1'b0};
      y = {1'b1, 52'({$urandom, $urandom}), 1'b0};
      case (n % 4)
        0: y = x ^ W'(64'({$urandom, $urandom}) >> ($urandom % 64));
        1: y = y >> 1;
        default: ;
      endcase
      #1;
      r = (x >= y) ? x - y : y - x;
      if (r == 0) continue;
      tp = -1; pp = -1;
      for (int i = 0; i < W; i++) begin
        if (r[i]) tp = i;
        if (f[i]) pp = i;
      end
      checks++;
      if (pp == tp) n_exact++;
      else if (pp == tp + 1) n_off++;
      else begin failures++; $display("FAIL x=%h y=%h true %0d predicted %0d", x, y, tp, pp); end
    end
    $display("exact %0d one above %0d", n_exact, n_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
