// dpd_model_pkg: reference arithmetic for the predistorter testbenches.
//
// Integer models, written independently of the RTL, of the power index, the
// bin mapping bin = min(NUM_BINS-1, (p - Pmin) / dP), the complex multiply and
// the tap sum with its rescale by 2**COEF_FRAC and saturation to 16 bits.
package dpd_model_pkg;

  function automatic longint m_power(input int re, input int im);
    return longint'(re) * re + longint'(im) * im;
  endfunction

  // returns -1 for "below Pmin" (bypass)
  function automatic int m_bin(input longint p, input longint pmin,
                               input longint dp, input int nbins);
    longint b;
    if (p < pmin) return -1;
    if (dp == 0) return nbins - 1;
    b = (p - pmin) / dp;
    if (b > nbins - 1) b = nbins - 1;
    return int'(b);
  endfunction

  function automatic int m_sat(input longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  // arithmetic shift right of a signed value (floor division by 2**s)
  function automatic longint m_asr(input longint v, input int s);
    return v >>> s;
  endfunction

endpackage
