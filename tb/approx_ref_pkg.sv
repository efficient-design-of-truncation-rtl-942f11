// Reference model of the truncation- and rounding-based approximate product,
// for the testbenches. It evaluates the same equation as the hardware but
// with real arithmetic and by a different route (downward bit scan, real
// fractions, comparison with 1.5 x 2^-j for the power-of-two rounding), so
// a fault in the fixed-point datapath shows up as a mismatch.
package approx_ref_pkg;

  // Position of the highest set bit of x (x > 0), scanning from the top.
  function automatic int lead_one(input longint unsigned x, input int n);
    for (int i = n - 1; i >= 0; i--)
      if (x[i]) return i;
    return 0;
  endfunction

  // Truncate a fraction in [0,1) to t bits and round to odd (add half an LSB).
  function automatic real trunc_odd(input real x, input int t);
    return ($floor(x * (2.0 ** t)) + 0.5) / (2.0 ** t);
  endfunction

  // Round v in (0,1) to the nearest power of two, linear midpoint.
  function automatic real round_pow2(input real v);
    real p;
    p = 1.0;
    while (p > v) p = p / 2.0;       // now p <= v < 2p
    if (v >= 1.5 * p) return 2.0 * p;
    return p;
  endfunction

  // Approximate product of unsigned operands a, b (n bits wide).
  function automatic longint unsigned approx_mul(input longint unsigned a,
                                                 input longint unsigned b,
                                                 input int n, input int t,
                                                 input int h);
    int k1, k2;
    real xa, xb, at, bt, aa, ba, ar, br, m;
    if (a == 0 || b == 0) return 0;
    k1 = lead_one(a, n);
    k2 = lead_one(b, n);
    xa = (real'(a) - 2.0 ** k1) / (2.0 ** k1);
    xb = (real'(b) - 2.0 ** k2) / (2.0 ** k2);
    at = trunc_odd(xa, t);
    bt = trunc_odd(xb, t);
    aa = trunc_odd(xa, h);
    ba = trunc_odd(xb, h);
    ar = round_pow2(aa);
    br = round_pow2(ba);
    m  = 1.0 + at + bt + (aa * br + ba * ar - ar * br);
    return longint'($floor(m * (2.0 ** (k1 + k2))));
  endfunction

endpackage
