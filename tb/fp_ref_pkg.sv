// Package: reference arithmetic for the testbenches, built on the simulator's IEEE
// double precision 'real' type (round to nearest). Directed rounding is
// derived from the exact rounding error: TwoSum for sums, Dekker's splitting
// for products and for division remainders. Denormals are read as zero and
// results below the normal range are expected as signed zero, as the design
// does.

package fp_ref_pkg;
  import snap_pkg::*;

function automatic logic [63:0] rand_fp(int emin, int emax);
  logic [63:0] r;
  r = {$urandom, $urandom};
  r[62:52] = 11'(emin + ($urandom % (emax - emin + 1)));
  return r;
endfunction

function automatic logic [63:0] ref_ftz(logic [63:0] x);
  return (x[62:52] == 0) ? {x[63], 63'd0} : x;
endfunction

function automatic logic ref_is_nan(logic [63:0] x);
  return (x[62:52] == 11'h7FF) && (x[51:0] != 0);
endfunction

// move one ulp up (mag_up=1) or down in magnitude
function automatic logic [63:0] ref_step(logic [63:0] x, bit mag_up);
  return mag_up ? x + 64'd1 : x - 64'd1;
endfunction

// exact product split: p + e == x * y (Dekker)
function automatic void two_prod(real x, real y, output real p, output real e);
  real c, xh, xl, yh, yl;
  p  = x * y;
  c  = 134217729.0 * x; xh = c - (c - x); xl = x - xh;
  c  = 134217729.0 * y; yh = c - (c - y); yl = y - yh;
  e  = ((xh * yh - p) + xh * yl + xl * yh) + xl * yl;
endfunction

// apply a directed rounding mode to the nearest result s, given the sign of
// (exact - s): err_pos / err_neg, none when exact
function automatic logic [63:0] ref_direct(logic [63:0] sbits, rmode_e rm, bit err_pos, bit err_neg);
  logic sgn;
  sgn = sbits[63];
  if (rm == RM_RZ && ((err_pos && sgn) || (err_neg && !sgn))) return ref_step(sbits, 1'b0);
  if (rm == RM_RP && err_pos) return ref_step(sbits, !sgn);
  if (rm == RM_RM && err_neg) return ref_step(sbits, sgn);
  return sbits;
endfunction

// overflowed nearest result in a directed mode
function automatic logic [63:0] ref_ovf(logic sgn, rmode_e rm);
  if (rm == RM_RZ || (rm == RM_RP && sgn) || (rm == RM_RM && !sgn))
    return {sgn, 11'h7FE, {52{1'b1}}};
  return {sgn, 11'h7FF, 52'd0};
endfunction

// set the exponent field of a normal number to 'e' (exact power-of-two
// scaling, used to keep Dekker's splitting far from overflow)
function automatic real rescale(logic [63:0] x, int e);
  return $bitstoreal({x[63], 11'(e), x[51:0]});
endfunction

function automatic logic [63:0] ref_mul(logic [63:0] a, logic [63:0] b, rmode_e rm);
  real ra, rb, p, e;
  logic [63:0] pb;
  a = ref_ftz(a); b = ref_ftz(b);
  ra = $bitstoreal(a); rb = $bitstoreal(b);
  p = ra * rb;
  pb = $realtobits(p);
  if (ref_is_nan(pb)) return QNAN;
  if (a[62:52] == 11'h7FF || b[62:52] == 11'h7FF || a[62:52] == 0 || b[62:52] == 0) return pb;
  if (pb[62:52] == 11'h7FF) return ref_ovf(pb[63], rm);
  if (pb[62:52] == 0) return {pb[63], 63'd0};
  // exact error on operands scaled to [1,2); scaling by powers of two
  // leaves the nearest product scaled alike, so the error term is the answer
  two_prod(rescale(a, 1023), rescale(b, 1023), p, e);
  return ref_ftz(ref_direct(pb, rm, e > 0.0, e < 0.0));
endfunction

function automatic logic [63:0] ref_div(logic [63:0] a, logic [63:0] b, rmode_e rm);
  real ra, rb, q, p, e, r;
  logic [63:0] qb;
  a = ref_ftz(a); b = ref_ftz(b);
  ra = $bitstoreal(a); rb = $bitstoreal(b);
  q = ra / rb;
  qb = $realtobits(q);
  if (ref_is_nan(qb)) return QNAN;
  if (a[62:52] == 11'h7FF || b[62:52] == 11'h7FF || a[62:52] == 0 || b[62:52] == 0) return qb;
  if (qb[62:52] == 11'h7FF) return ref_ovf(qb[63], rm);
  if (qb[62:52] == 0) return {qb[63], 63'd0};
  // remainder a - q*b, exact; its sign relative to b's gives the error sign
  // on operands scaled to [1,2): a' - q'*b' with q' = q * 2^-(ea-eb)
  q = rescale(qb, int'(qb[62:52]) - int'(a[62:52]) + int'(b[62:52]));
  two_prod(q, rescale(b, 1023), p, e);
  r = (rescale(a, 1023) - p) - e;
  if (rb < 0.0) r = -r;
  return ref_ftz(ref_direct(qb, rm, r > 0.0, r < 0.0));
endfunction

endpackage
