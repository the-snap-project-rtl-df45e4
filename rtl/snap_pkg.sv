// Shared types, constants and helper functions of the floating point unit.
//
// All three units work on IEEE 754 double precision (1 sign bit, 11 exponent
// bits, 52 fraction bits, 53-bit significand with the hidden one). The four
// IEEE rounding modes are encoded in rmode_e. Denormal operands are treated as
// zero and results below the normal range are flushed to a signed zero; this is
// a choice of this design, the arithmetic of the units otherwise follows IEEE
// rounding exactly.
package snap_pkg;

  localparam int BIAS   = 1023;

  // Canonical quiet NaN produced for invalid operations.
  localparam logic [63:0] QNAN = 64'h7FF8_0000_0000_0000;

  typedef enum logic [1:0] {
    RM_RN = 2'd0,   // round to nearest, ties to even
    RM_RZ = 2'd1,   // round toward zero
    RM_RP = 2'd2,   // round toward +infinity
    RM_RM = 2'd3    // round toward -infinity
  } rmode_e;

  // Decide whether the truncated magnitude must be incremented by one ulp.
  function automatic logic round_up(rmode_e rm, logic sign, logic lsb, logic g, logic st);
    unique case (rm)
      RM_RN:   return g & (st | lsb);
      RM_RZ:   return 1'b0;
      RM_RP:   return (g | st) & ~sign;
      default: return (g | st) & sign;
    endcase
  endfunction

  // Pack sign, biased exponent (signed, may be out of range) and a normalized
  // 53-bit significand (its hidden bit sig[52] is implied, not stored). Overflow gives infinity or the largest finite number
  // as the rounding mode demands; underflow flushes to a signed zero.
  function automatic logic [63:0] fp_pack(logic sign, logic signed [13:0] exp,
                                          logic [52:0] sig, rmode_e rm);
    logic to_inf;
    if (exp >= 14'sd2047) begin
      to_inf = (rm == RM_RN) | ((rm == RM_RP) & ~sign) | ((rm == RM_RM) & sign);
      return to_inf ? {sign, 11'h7FF, 52'd0} : {sign, 11'h7FE, {52{1'b1}}};
    end else if (exp <= 14'sd0) begin
      return {sign, 63'd0};
    end else begin
      return {sign, exp[10:0], sig[51:0]};
    end
  endfunction

endpackage
