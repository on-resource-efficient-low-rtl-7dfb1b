// Shared constants of the folded FIR filters: the IS-95 / WCDMA pulse-shaping
// filter of the design (33 taps, 8-bit samples, 16-bit coefficients, folded by
// 11 onto 3 multiplier-adders) and the full-precision data-bus width
// w = m + b + ceil(log2 K).
package fir_pkg;
  localparam int unsigned TAPS    = 33;  // K
  localparam int unsigned NUM_MA  = 3;   // r
  localparam int unsigned X_W     = 8;   // m, input sample width
  localparam int unsigned H_W     = 16;  // b, coefficient width
  function automatic int unsigned fold_factor(int unsigned k, int unsigned r);
    return (k + r - 1) / r;
  endfunction
  function automatic int unsigned bus_width(int unsigned xw, int unsigned hw, int unsigned k);
    return xw + hw + $clog2(k);
  endfunction
endpackage
