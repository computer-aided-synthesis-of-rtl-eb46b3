// bdct_ref_pkg: reference model used by the testbenches.
//
// Works out, in plain integer and real arithmetic, what the chip's stages
// must produce, independently of the RTL:
//   coef()     orthonormal DCT matrix entry C[m][k]
//   lut_ref()  distributed-arithmetic table word: round(2^frac * sum of
//              C[m][k] over the set address bits)
//   mdct_ref() a whole 1-D stage, bit-exact: butterfly, table binary point
//              frac = rs-2-(clog2(n)-2)/2, sum over bit planes
//              of +/- table words times 2^q (minus for the sign plane),
//              one rounding to nearest (halves up) dropping frac-g bits,
//              saturation to os bits
//   rabs()     absolute value of a real
//   dct_real() the exact real-valued 1-D DCT, scaled by 2^g
// Vectors are fixed arrays of 16 entries of which the first n are used.
package bdct_ref_pkg;

  typedef longint vec_t [16];
  typedef real    rvec_t [16];

  function automatic real coef(input int n, input int m, input int k);
    real pi;
    pi = 4.0 * $atan(1.0);
    if (k == 0) return 1.0 / $sqrt(n);
    return $sqrt(2.0 / n) * $cos(pi * k * (2 * m + 1) / (2.0 * n));
  endfunction

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic longint rnd(input real v);
    if (v >= 0.0) return longint'($floor(v + 0.5));
    return -longint'($floor(-v + 0.5));
  endfunction

  function automatic longint lut_ref(input int n, input int k, input int frac, input int addr);
    real s;
    s = 0.0;
    for (int m = 0; m < n / 2; m++)
      if (addr[m]) s += coef(n, m, k);
    return rnd(s * (2.0 ** frac));
  endfunction

  function automatic vec_t mdct_ref(input int n, input int iw, input int os, input int rs,
                                    input int g, input vec_t x);
    vec_t z, s, d;
    int w, frac, sh;
    w    = iw + 1;
    frac = rs - 2 - ($clog2(n) - 2) / 2;
    sh   = frac - g;
    for (int m = 0; m < n / 2; m++) begin
      s[m] = x[m] + x[n-1-m];
      d[m] = x[m] - x[n-1-m];
    end
    for (int k = 0; k < n; k++) begin
      longint t, r, lim;
      t = 0;
      for (int q = 0; q < w; q++) begin
        int addr;
        longint l;
        addr = 0;
        for (int m = 0; m < n / 2; m++)
          addr[m] = ((((k % 2) == 0 ? s[m] : d[m]) >>> q) & 1) != 0;
        l = lut_ref(n, k, frac, addr);
        if (q == w - 1) t -= l * (longint'(1) << q);
        else            t += l * (longint'(1) << q);
      end
      r   = (t + (longint'(1) << (sh - 1))) >>> sh;
      lim = longint'(1) << (os - 1);
      if (r > lim - 1) r = lim - 1;
      if (r < -lim)    r = -lim;
      z[k] = r;
    end
    for (int k = n; k < 16; k++) z[k] = 0;
    return z;
  endfunction

  function automatic rvec_t dct_real(input int n, input int g, input vec_t x);
    rvec_t y;
    for (int k = 0; k < 16; k++) y[k] = 0.0;
    for (int k = 0; k < n; k++)
      for (int m = 0; m < n; m++)
        y[k] += coef(n, m, k) * x[m] * (2.0 ** g);
    return y;
  endfunction

endpackage
