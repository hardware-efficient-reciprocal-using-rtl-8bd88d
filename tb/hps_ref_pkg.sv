// hps_ref_pkg: bit-accurate reference model of the reciprocal datapath, used
// by the testbenches to predict every pipeline output.
//
// It is written independently of the RTL: the interpolation points come from
// y(x)/s1(x) evaluated directly (using the mirror x -> 1-x where that ratio
// would be 0/0), the coefficients from the quadratic through the start, middle
// and end points of each interval, and the datapath from plain integer
// arithmetic on the fixed-point formats documented in the RTL.
package hps_ref_pkg;

  // First help function as the ratio of the target function and s1.
  function automatic real ref_f1(real x);
    real xx, yv, s1v;
    xx  = (x > 0.5) ? 1.0 - x : x;
    yv  = 2.0 / (1.0 + xx) - 1.0;
    s1v = 1.0 - 0.5 * xx * (3.0 - xx);
    return yv / s1v;
  endfunction

  function automatic longint rnd(real r);
    longint t;
    t = longint'($rtoi(r + 0.5));
    if (real'(t) > r + 0.5) t = t - 1;
    return t;
  endfunction

  // p, m, k in table format for interval i of 2^n.
  function automatic void ref_coef(input int n, input int i,
                                   output longint p, output longint m, output longint k);
    real a, b, mid, lv, kv, cv, jv;
    a   = ref_f1(real'(i) / real'(1 << n));
    b   = ref_f1(real'(i + 1) / real'(1 << n));
    mid = ref_f1((real'(i) + 0.5) / real'(1 << n));
    lv  = a;
    kv  = b - a;
    cv  = 4.0 * (mid - lv - 0.5 * kv);
    jv  = kv + cv;
    p   = rnd(-cv * (2.0 ** (2 * n + 10)));
    m   = rnd((-jv / (2.0 * cv)) * (2.0 ** (15 - n)));
    k   = rnd((lv + jv * jv / (4.0 * cv)) * (2.0 ** 17));
  endfunction

  function automatic longint ref_s1(longint x);
    longint u, h, d;
    u = 49152 - x;
    h = (u * u) >> 16;
    d = h - 4096;
    return (d > 32767) ? 32767 : d;
  endfunction

  function automatic longint ref_s2(int n, longint x);
    longint p, m, k, idx, xw, pk, t, t2, prod;
    int mf;
    mf  = 15 - n;
    idx = x >> mf;
    xw  = x & ((longint'(1) << mf) - 1);
    pk  = (idx >= (1 << (n - 1))) ? ((1 << n) - 1 - idx) : idx;
    ref_coef(n, int'(idx), p, m, t);    // m of the interval itself
    ref_coef(n, int'(pk), p, t, k);     // p and k of the stored half
    t    = xw + m;
    if (t < 0) t = -t;
    t2   = (t * t) >> (2 * mf - (18 - 2 * (n - 1)));
    prod = (t2 * p) >> 11;
    return ((k << 2) + prod) >> 3;
  endfunction

  function automatic longint ref_y(int n, longint x);
    return (ref_s1(x) * ref_s2(n, x)) >> 16;
  endfunction

  function automatic longint ref_z_from_y(longint y);
    longint z;
    z = y + 32768;
    return (z > 65535) ? 65535 : z;
  endfunction

endpackage
