// fir_pkg: constants shared by the low-power FIR filter family.
//
// All filters in this library process 8-bit two's-complement samples with
// 8-bit two's-complement coefficients over 8 taps; these are the sizes the
// filters are specified for.  The accumulator width is chosen here so that the
// sum of TAPS full-scale products can never overflow (a design choice, the
// original design gives no accumulator width).
package fir_pkg;

  localparam int unsigned DATA_W = 8;   // input sample width
  localparam int unsigned COEF_W = 8;   // coefficient width
  localparam int unsigned TAPS   = 8;   // filter length

  // Guard bits needed to add n values without overflow.
  function automatic int unsigned guard_bits(input int unsigned n);
    return (n <= 1) ? 0 : $clog2(n);
  endfunction

endpackage
