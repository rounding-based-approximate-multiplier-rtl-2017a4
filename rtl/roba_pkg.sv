// roba_pkg: sizes and helpers shared by the rounding-based approximate (RoBA)
// multiplier and the FIR filter built from it.
//
// The multiplier replaces each operand X by its nearest power of two Xr = 2^n
// and keeps only the cheap terms of
//   A*B = (Ar-A)*(Br-B) + Ar*B + Br*A - Ar*Br,
// dropping the (Ar-A)*(Br-B) term. The default sizes below are this design's
// own choice: no word length or tap count is fixed for the multiplier or the
// filter, so a 16-bit operand and an 8-tap filter are used.
package roba_pkg;

  // Default operand width of the multipliers and of the filter samples.
  localparam int unsigned DefaultWidth = 16;

  // Default number of taps of the FIR filter.
  localparam int unsigned DefaultTaps = 8;

  // Width of an exponent n that can name every power of two 2^0 .. 2^width.
  // An operand of `width` bits can round up to 2^width, hence width+1 values.
  function automatic int unsigned exp_width(int unsigned width);
    return $clog2(width + 1);
  endfunction

endpackage
