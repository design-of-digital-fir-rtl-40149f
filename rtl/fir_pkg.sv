// Shared constants and helper functions of the linear-phase FIR filter.
//
// The filter folds a symmetric impulse response h(n) = h(N-1-n) so that
// every pair of samples that share a coefficient is added before it is
// multiplied. With N taps only M = ceil(N/2) distinct coefficients and
// multipliers are needed. The word lengths follow the 8-bit adders and
// registers the design is costed with; the default tap count is the
// 7-tap odd-length example. Signed two's-complement samples and
// coefficients are this design's own choice.
package fir_pkg;

  // Default word lengths and tap count.
  localparam int unsigned DATA_W_DEF = 8;
  localparam int unsigned COEF_W_DEF = 8;
  localparam int unsigned TAPS_DEF   = 7;

  // Number of distinct coefficients (and IPCs) of an N-tap symmetric filter.
  function automatic int unsigned n_coefs(input int unsigned taps);
    return (taps + 1) / 2;
  endfunction

  // Width of a symmetric-pair sum: one bit more than a sample.
  function automatic int unsigned pair_w(input int unsigned data_w);
    return data_w + 1;
  endfunction

  // Width of one IPC product.
  function automatic int unsigned prod_w(input int unsigned data_w, input int unsigned coef_w);
    return data_w + 1 + coef_w;
  endfunction

  // Width of the filter output: product width plus growth for M terms.
  function automatic int unsigned sum_w(input int unsigned data_w, input int unsigned coef_w,
                                        input int unsigned taps);
    return prod_w(data_w, coef_w) + $clog2(n_coefs(taps));
  endfunction

endpackage
