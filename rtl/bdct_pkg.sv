// bdct_pkg: constants and elaboration-time helpers shared by the 8x8 DCT chip.
//
// The default sizes are the chip's: block order N = 8, 8-bit input pixels,
// 11-bit intermediate words (MDCT1 output = TMEM word = MDCT2 input),
// 14-bit output coefficients, 11-bit look-up-table words, and a system clock
// running at twice the pixel rate.  dct_coef() gives the orthonormal DCT
// matrix entry C[m][k] (0-based row m = sample, column k = frequency):
//   C[m][0] = sqrt(1/N),  C[m][k] = sqrt(2/N) cos((2m+1) k pi / 2N).
// It is only ever evaluated while the design elaborates (look-up tables).
package bdct_pkg;

  localparam int N_DEF   = 8;   // transform order
  localparam int IS1_DEF = 8;   // input pixel bits
  localparam int OS1_DEF = 11;  // MDCT1 output bits = TMEM word = MDCT2 input bits
  localparam int OS2_DEF = 14;  // output coefficient bits
  localparam int RS_DEF  = 11;  // look-up-table word bits (both MDCTs)
  localparam int CPP_DEF = 2;   // clocks per pixel (27 MHz clock, 13.5 MHz pixels)

  localparam real PI = 3.14159265358979323846;

  // Orthonormal DCT matrix entry, sample m, frequency k.
  function automatic real dct_coef(input int n, input int m, input int k);
    if (k == 0) return $sqrt(1.0 / n);
    return $sqrt(2.0 / n) * $cos((2.0 * m + 1.0) * k * PI / (2.0 * n));
  endfunction

  // Round to nearest, halves away from zero.
  function automatic longint round_real(input real v);
    return (v < 0.0) ? -longint'($rtoi(-v + 0.5)) : longint'($rtoi(v + 0.5));
  endfunction

endpackage
