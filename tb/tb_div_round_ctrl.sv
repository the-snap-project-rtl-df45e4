// Testbench of the division rounding control. An exact quotient is drawn as a
// fixed-point number with 6 bits below the estimate's last place; the
// estimate given to the block is that value truncated, plus an error of -1, 0
// or +1 units. Where the block asks for a back-multiplication, the testbench
// answers with the exact comparison of the quotient with the boundary point
// the block names. The rounded significand (direct or after the
// back-multiplication) must equal the correctly rounded exact quotient in
// every rounding mode, for random quotients and for quotients placed on and
// next to halfway points and machine numbers.
module tb_div_round_ctrl;
  import snap_pkg::*;
  localparam int M = 8;
  logic [63:0] q_est, c_val;
  rmode_e      rm;
  logic        sign, need_back, ovf_direct, rem_gt, rem_eq, ovf_back;
  logic [52:0] sig_direct, sig_back;
  int checks = 0, failures = 0, n_back = 0;

  div_round_ctrl dut (.*);

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      logic [66:0] qt;       // exact quotient, 52+M+6 fraction bits, in [1,2)
      logic [53:0] want, got;
      logic [5:0]  below;
      logic        mag_up, g, st;
      logic [52:0] hi;
      int err;
      qt = {1'b1, 66'({$urandom, $urandom, $urandom})};
      case (n % 4)
        1: qt[M+5:0] = {1'b1, (M+5)'(0)} ^ (M+6)'($urandom % 3);  // near halfway
        2: qt[M+5:0] = (M+6)'($urandom % 3) - (M+6)'(1);          // near a machine number
        3: qt[M+5:0] = '0;                                          // exact
        default: ;
      endcase
      rm = rmode_e'($urandom % 4); sign = 1'($urandom);
      err = int'($urandom % 3) - 1;
      q_est = 64'(qt >> 6) + 64'(err);
      // correctly rounded reference
      hi = qt[66:M+6];
      g  = qt[M+5];
      st = |qt[M+4:0];
      mag_up = ((rm == RM_RP) & ~sign) | ((rm == RM_RM) & sign);
      if (rm == RM_RN) want = {1'b0, hi} + 54'(g & (st | hi[0]));
      else             want = {1'b0, hi} + 54'(mag_up & (g | st));
      #1;
      if (need_back) begin
        logic [66:0] c6;
        n_back++;
        c6 = 67'(c_val) << 6;
        rem_gt = qt > c6; rem_eq = qt == c6;
        #1;
        got = ovf_back ? {1'b1, 53'd0} : {1'b0, sig_back};
      end else begin
        got = ovf_direct ? {1'b1, 53'd0} : {1'b0, sig_direct};
      end
      checks++;
      if (got !== want) begin
        failures++; $display("FAIL qt=%h rm=%0d sign=%b err=%0d: %h want %h", qt, rm, sign, err, got, want);
      end
    end
    checks++;
    if (n_back == 0) failures++;
    $display("back-multiplications %0d", n_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
