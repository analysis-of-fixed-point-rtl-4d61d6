// fft_pkg: types and helpers shared by the fixed-point / floating-point FFT.
//
// Two number formats are supported, picked per instance with an arith_e
// parameter:
//   ARITH_FXP  fixed point S0.(WL-1): two's complement, sign bit plus WL-1
//              fraction bits, value range [-1, 1).
//   ARITH_FLP  floating point with an "encoded" exponent: word = {e, M},
//              e is an EW-bit unsigned number standing for the exponent -e
//              (the exponent is only ever zero or negative), M is an MW-bit
//              two's complement fraction (MW-1 fraction bits, sign included),
//              value = M * 2^-e.  Mantissas are normalised to |M| in [0.5, 1)
//              where the exponent allows; at e = 2^EW-1 they may stay
//              unnormalised (gradual underflow).  Zero is M = 0, e = 2^EW-1.
// Every operator keeps the word length of its inputs: the exact result is
// truncated toward zero and saturated (positive overflow to the largest
// value, negative overflow to -1).  A complex word is packed {re, im}.
//
// From the study: the two formats, fixed point S0.(WL-1) and floating point with an
// encoded non-positive exponent.  The enum and helper are this design's own.
package fft_pkg;

  typedef enum logic {
    ARITH_FXP = 1'b0,
    ARITH_FLP = 1'b1
  } arith_e;

  // Width of one real word in the selected format.
  function automatic int word_w(arith_e arith, int fxp_wl, int flp_ew, int flp_mw);
    return (arith == ARITH_FXP) ? fxp_wl : flp_ew + flp_mw;
  endfunction

endpackage
