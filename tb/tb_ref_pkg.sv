// tb_ref_pkg: reference model of the k-stage polynomial evaluator for the
// testbenches. It is a plain sequential model written independently of the
// RTL: quantise the real coefficients, form the powers of x by repeated
// truncated multiplication, run the grouped Horner recursion with
// truncation to P+G bits after every step, and round to P bits.
package tb_ref_pkg;

  // Real value of the scaled function: sin(x)/2 or 2^(x-1).
  function automatic real fref(bit is_sine, real x);
    return is_sine ? $sin(x) / 2.0 : $pow(2.0, x - 1.0);
  endfunction

  function automatic real coef_real(bit is_sine, int j);
    return is_sine ? fe_pkg::sine_coef(j) : fe_pkg::pow2_coef(j);
  endfunction

  function automatic int degree(bit is_sine);
    return is_sine ? 6 : 4;
  endfunction

  // Round-to-nearest quantisation to a w-bit fraction.
  function automatic longint qcoef(real v, int w);
    real s;
    s = v * (2.0 ** (w - 1));
    return (s >= 0.0) ? longint'($rtoi(s + 0.5)) : -longint'($rtoi(-s + 0.5));
  endfunction

  // Sign-wrap a value to w bits.
  function automatic longint wrap(longint v, int w);
    longint m;
    m = longint'(1) <<< w;
    v = v % m;
    if (v < 0) v += m;
    if (v >= m / 2) v -= m;
    return v;
  endfunction

  // P-bit truncated power x^e (e >= 1), saturating at 1 - ulp.
  function automatic longint xpow(longint x, int e, int p);
    longint r;
    r = x;
    for (int i = 2; i <= e; i++) begin
      r = (r * x) >>> (p - 1);
      if (r > (longint'(1) <<< (p - 1)) - 1) r = (longint'(1) <<< (p - 1)) - 1;
    end
    return r;
  endfunction

  // Bit-accurate evaluator result for input code x.
  function automatic longint ref_eval(bit is_sine, int p, int g, int k, longint x);
    int     n, cpe, w;
    longint q [64];
    longint acc, s, r;
    n   = degree(is_sine);
    cpe = (n + k) / k;
    w   = p + g;
    for (int j = 0; j < 64; j++) q[j] = (j <= n) ? qcoef(coef_real(is_sine, j), w) : 0;
    acc = 0;
    for (int c = 0; c < cpe; c++) begin
      int base;
      base = (cpe - 1 - c) * k;
      s = q[base] <<< (p - 1);
      for (int t = 1; t < k; t++) s += q[base + t] * xpow(x, t, p);
      s += xpow(x, k, p) * acc;
      acc = wrap(s >>> (p - 1), w);
    end
    r = (acc + (longint'(1) <<< (g - 1))) >>> g;
    if (r > (longint'(1) <<< (p - 1)) - 1) r = (longint'(1) <<< (p - 1)) - 1;
    return r;
  endfunction

endpackage
