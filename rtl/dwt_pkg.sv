// dwt_pkg: types, constants and helper functions shared by the 2-D DWT
// engine.
//
// The engine computes a J-level separable 2-D discrete wavelet transform of
// an N x N image with a K-tap low-pass filter a[0..K-1] and a K-tap
// high-pass filter b[0..K-1]. Filtering is causal, y(n) = sum_i c(i)*x(n-i),
// decimated by two on the odd input samples, as in the published data flow.
//
// The filter coefficients are signed fixed-point numbers with COEF_FRAC
// fractional bits. The coefficient values are this design's choice: the
// architecture is independent of them. The defaults are the four-tap
// Daubechies (D4) pair rounded to 8 fractional bits:
//   a = {0.4830, 0.8365, 0.2241, -0.1294} * 256 -> {124, 214, 57, -33}
//   b(i) = (-1)^i * a(K-1-i)                   -> {-33, -57, 214, -124}
// Each filter pass rescales its result by an arithmetic right shift of
// COEF_FRAC bits (floor), so samples keep DATA_W bits from level to level.
package dwt_pkg;

  // Largest filter length the coefficient type can hold.
  localparam int unsigned KMAX = 16;

  localparam int unsigned COEF_W    = 12;
  localparam int unsigned COEF_FRAC = 8;

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef coef_t coef_vec_t [KMAX];

  // Default low-pass (a) and high-pass (b) taps, D4 in Q.8.
  localparam coef_vec_t D4_LO = '{12'sd124, 12'sd214, 12'sd57, -12'sd33,
                                  12'sd0, 12'sd0, 12'sd0, 12'sd0,
                                  12'sd0, 12'sd0, 12'sd0, 12'sd0,
                                  12'sd0, 12'sd0, 12'sd0, 12'sd0};
  localparam coef_vec_t D4_HI = '{-12'sd33, -12'sd57, 12'sd214, -12'sd124,
                                  12'sd0, 12'sd0, 12'sd0, 12'sd0,
                                  12'sd0, 12'sd0, 12'sd0, 12'sd0,
                                  12'sd0, 12'sd0, 12'sd0, 12'sd0};

  // Ceiling log2 with a floor of 1, for counter and address widths.
  function automatic int unsigned cw(input int unsigned v);
    return (v <= 2) ? 1 : $clog2(v);
  endfunction

  // Size of the line delay needed at decomposition level lvl (1-based):
  // the row of a level-lvl input is N/2^(lvl-1) samples, stage 1 halves it.
  function automatic int unsigned ld_len(input int unsigned n,
                                         input int unsigned lvl);
    return n >> lvl;
  endfunction

endpackage
