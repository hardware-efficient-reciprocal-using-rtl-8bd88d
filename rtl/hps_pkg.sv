// hps_pkg: number formats and coefficient generation shared by the
// reciprocal datapath built on second order harmonized parabolic synthesis
// with the squaring shrunk second sub-function.
//
// The reciprocal z = 1/v, 1 <= v < 2, is normalised to y = 2/(1+x) - 1 with
// x = v - 1 in [0,1) and y in (0,1]. y is the product of two sub-functions:
//   s1(x) = 0.5*(x - 1.5)^2 - 0.125                (second order, no table)
//   s2(x) = p_i*(x_w + m_i)^2 + k_i                 (one parabola per interval)
// where i is the interval index (top n bits of x) and x_w the remaining
// fractional bits of x scaled to [0,1). The coefficients follow from the first
// help function f1(x) = f(x)/s1(x) = 2/((1+x)(2-x)), which is symmetric about
// x = 0.5, so p and k need only I/2 entries while m needs I entries.
//
// Per interval, with xs/xe/xm the start, end and middle of the interval:
//   l = f1(xs), k2 = f1(xe) - f1(xs), c = 4*(f1(xm) - l - k2/2), j = k2 + c
//   p = -c, m = -j/(2c), k = l + j^2/(4c)
// The functions below evaluate these in real arithmetic at elaboration time
// and round them to the fixed-point table formats; nothing here is used at
// run time.
//
// Fixed-point formats (widths of the published architecture for n = 4; the scalings are this
// design's choice and are chosen so they stay valid for n = 4, 5 and 6):
//   x   : 15 bits, unsigned, 15 fractional bits
//   m   : 15 bits, signed, n-1 integer bits, 15-n fractional bits
//   p   : 10 bits, unsigned, value = P * 2^-(2n+10)
//   k   : 17 bits, unsigned, 17 fractional bits
//   s1  : 15 bits, unsigned, 15 fractional bits, s1 = 1 saturates to 1-2^-15
//   s2  : 17 bits, unsigned, 16 fractional bits
//   y   : 16 bits, unsigned, 15 fractional bits
//   v   : 16 bits, 1 integer bit, 15 fractional bits
//   z   : 16 bits, 16 fractional bits, z = 1 saturates to 1-2^-16
package hps_pkg;

  localparam int unsigned X_W  = 15;  // normalised input x
  localparam int unsigned V_W  = 16;  // reciprocal operand v
  localparam int unsigned Y_W  = 16;  // normalised result y
  localparam int unsigned Z_W  = 16;  // reciprocal z
  localparam int unsigned S1_W = 15;  // first sub-function
  localparam int unsigned S2_W = 17;  // second sub-function
  localparam int unsigned U_W  = 17;  // x - 3/2 (its magnitude is kept)
  localparam int unsigned H_W  = 16;  // (x - 3/2)^2 / 2
  localparam int unsigned P_W  = 10;  // table width of p
  localparam int unsigned M_W  = 15;  // table width of m, also of x_w + m
  localparam int unsigned K_W  = 17;  // table width of k
  localparam int unsigned T2_W = 18;  // (x_w + m)^2
  localparam int unsigned PR_W = 16;  // p * (x_w + m)^2, 19 fractional bits

  // Default number of interval index bits n (I = 2^n intervals).
  localparam int unsigned N_DEFAULT = 4;

  // First help function of the second order first sub-function.
  function automatic real help_f1(real x);
    return 2.0 / ((1.0 + x) * (2.0 - x));
  endfunction

  // Round to nearest, ties upward, for either sign.
  function automatic longint round_real(real r);
    longint t;
    t = longint'($rtoi(r + 0.5));
    if (real'(t) > r + 0.5) t = t - 1;
    return t;
  endfunction

  // Interpolation constants l, j, c of interval i out of 2^n.
  function automatic real coef_l(int unsigned n, int unsigned i);
    return help_f1(real'(i) / real'(2 ** n));
  endfunction

  function automatic real coef_k2(int unsigned n, int unsigned i);
    return help_f1(real'(i + 1) / real'(2 ** n)) - help_f1(real'(i) / real'(2 ** n));
  endfunction

  function automatic real coef_c(int unsigned n, int unsigned i);
    real xm;
    xm = (real'(i) + 0.5) / real'(2 ** n);
    return 4.0 * (help_f1(xm) - coef_l(n, i) - 0.5 * coef_k2(n, i));
  endfunction

  function automatic real coef_j(int unsigned n, int unsigned i);
    return coef_k2(n, i) + coef_c(n, i);
  endfunction

  // Squaring shrunk coefficients in table format.
  function automatic longint table_p(int unsigned n, int unsigned i);
    return round_real(-coef_c(n, i) * real'(2.0 ** (2 * n + 10)));
  endfunction

  function automatic longint table_m(int unsigned n, int unsigned i);
    return round_real(-coef_j(n, i) / (2.0 * coef_c(n, i)) * real'(2.0 ** (X_W - n)));
  endfunction

  function automatic longint table_k(int unsigned n, int unsigned i);
    real j, c;
    j = coef_j(n, i);
    c = coef_c(n, i);
    return round_real((coef_l(n, i) + j * j / (4.0 * c)) * real'(2.0 ** K_W));
  endfunction

endpackage
