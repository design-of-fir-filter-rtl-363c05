// fir_pkg: sizes, default coefficients and table functions shared by the
// LUT-based and the memory-based transposed-form FIR filters.
//
// Both filters multiply an 8-bit input sample by fixed coefficients without
// a multiplier: the sample is split into two 4-bit nibbles, each nibble
// addresses a 16-word table holding 0*|h| .. 15*|h|, and the two words are
// combined by a shift-add (product = word(hi) * 16 + word(lo)). The sign of
// each coefficient is not stored; it selects an adder or a subtractor in the
// tap's add/subtract cell.
//
// The 8-bit sample, the two 4-bit addresses, the 16-word tables and the
// shift by four follow the published structure. The tap count (16), the
// coefficient magnitude width (8 bits), the coefficient values and the
// unsigned reading of the input sample are this design's own choices.
package fir_pkg;

  // Input sample width and its split into two table addresses.
  localparam int unsigned X_W       = 8;
  localparam int unsigned NIB_W     = 4;
  localparam int unsigned LUT_DEPTH = 1 << NIB_W;   // 16 words per table

  // Coefficient magnitude width and default number of taps.
  localparam int unsigned H_W    = 8;
  localparam int unsigned N_TAPS = 16;

  // Default coefficients: a symmetric (linear-phase) 16-tap low-pass with
  // magnitudes below 2**H_W and negative outer taps, so that both adder and
  // subtractor cells are present.
  localparam int DEFAULT_COEF [N_TAPS] = '{
    -3, -6, -4, 9, 31, 60, 87, 102, 102, 87, 60, 31, 9, -4, -6, -3
  };

  // Width of one table word: |h| * 15 fits in H_W + NIB_W bits.
  function automatic int unsigned word_width(int unsigned h_w);
    return h_w + NIB_W;
  endfunction

  // Width of one tap product |h| * x.
  function automatic int unsigned prod_width(int unsigned h_w);
    return h_w + X_W;
  endfunction

  // Width of the signed partial sums: product width, growth over n taps,
  // and one sign bit.
  function automatic int unsigned acc_width(int unsigned h_w, int unsigned n);
    return h_w + X_W + $clog2(n) + 1;
  endfunction

  // Magnitude of a coefficient.
  function automatic int unsigned coef_mag(int h);
    return (h < 0) ? -h : h;
  endfunction

endpackage
