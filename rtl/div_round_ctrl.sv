// Variable latency rounding control for division by functional iteration.
//
// The iterations deliver a quotient estimate q_est = q * 2^(52+M) that carries
// M guard bits beyond the 53-bit significand and is within 2 units of its last
// place of the exact quotient q (normalized to [1,2)). Only estimates close
// to a rounding boundary can round either way:
//   * round to nearest: boundary = halfway point, guard bits 100..0;
//   * directed modes:   boundary = a machine number, guard bits 00..0.
// If the guard bits are more than 2 units away from the boundary the result is
// rounded at once (need_back = 0, sig_direct). Otherwise (need_back = 1) the
// caller back-multiplies the boundary point c_val by the divisor, compares
// with the dividend and reports whether the exact quotient lies above
// (rem_gt) or on (rem_eq) the boundary; sig_back is the correctly rounded
// result for that outcome. Significands come out 53 bits wide with 'ovf' set
// when rounding carried into the next binade (exponent + 1). Combinational.
//
// The guard-bit technique and the back-multiplication near boundaries follow
// the published design; the 2-unit window is this design's error budget for
// its 64-bit iterations, so about 5 in 2^M quotients need the
// back-multiplication.
module div_round_ctrl
  import snap_pkg::*;
#(
  parameter int M = 8
) (
  input  logic [63:0]   q_est,
  input  rmode_e        rm,
  input  logic          sign,
  output logic          need_back,
  output logic [63:0]   c_val,
  output logic [52:0]   sig_direct,
  output logic          ovf_direct,
  input  logic          rem_gt,
  input  logic          rem_eq,
  output logic [52:0]   sig_back,
  output logic          ovf_back
);
  localparam int QW = 53 + M;
  localparam logic [M-1:0] HALF = M'(1) << (M - 1);

  logic [QW-1:0] q;
  logic [52:0]   hi;
  logic [M-1:0]  low;
  logic          mag_up, nearest;
  logic [53:0]   d_sig, b_sig, mhi;

  // clamp the estimate to [1, 2) in units of 2^-(52+M)
  always_comb begin
    if (q_est < (64'd1 << (QW - 1)))   q = QW'(64'd1 << (QW - 1));
    else if (q_est >= (64'd1 << QW))   q = '1;
    else                               q = q_est[QW-1:0];
  end

  assign hi      = q[QW-1:M];
  assign low     = q[M-1:0];
  assign nearest = rm == RM_RN;
  assign mag_up  = ((rm == RM_RP) & ~sign) | ((rm == RM_RM) & sign);

  always_comb begin
    logic signed [M+1:0] delta;
    delta = $signed({2'b00, low}) - $signed({2'b00, HALF});
    if (nearest) begin
      need_back = (delta >= -2) & (delta <= 2);
      c_val     = 64'({hi, HALF});
      d_sig     = {1'b0, hi} + 54'(low > HALF);
      mhi       = {1'b0, hi};
    end else begin
      need_back = (low <= M'(2)) | (low >= M'(-2));
      mhi       = low[M-1] ? ({1'b0, hi} + 54'd1) : {1'b0, hi};
      c_val     = 64'({mhi, M'(0)});
      d_sig     = {1'b0, hi} + 54'(mag_up);
    end
    // outcome of the back-multiplication
    if (nearest) begin
      if (rem_eq)      b_sig = {1'b0, hi} + 54'(hi[0]);
      else if (rem_gt) b_sig = {1'b0, hi} + 54'd1;
      else             b_sig = {1'b0, hi};
    end else begin
      if (rem_eq)      b_sig = mhi;
      else if (rem_gt) b_sig = mag_up ? mhi + 54'd1 : mhi;
      else             b_sig = mag_up ? mhi : mhi - 54'd1;
    end
  end

  assign ovf_direct = d_sig[53];
  assign sig_direct = d_sig[53] ? {1'b1, 52'd0} : d_sig[52:0];
  assign ovf_back   = b_sig[53];
  assign sig_back   = b_sig[53] ? {1'b1, 52'd0} : b_sig[52:0];

endmodule
