// tb_roba_ref_pkg: reference model of RoBA multiplication for the testbenches,
// written independently of the RTL. Rounding is done by brute force (the power
// of two at the smallest distance, ties to the larger one except for 3), and
// the product is evaluated as Ar*B + Br*A - Ar*Br in 64-bit integers.
package tb_roba_ref_pkg;

  // Nearest power of two of a > 0 as a value; 0 for a = 0.
  function automatic longint round_pow2(longint a, int width);
    longint best = 0, best_d = -1, p, d;
    if (a == 0) return 0;
    for (int n = 0; n <= width; n++) begin
      p = longint'(1) << n;
      d = (a > p) ? a - p : p - a;
      if (best_d < 0 || d < best_d || (d == best_d && a != 3)) begin
        best = p;
        best_d = d;
      end
    end
    return best;
  endfunction

  // Unsigned RoBA product of a and b (both < 2^width).
  function automatic longint roba_u(longint a, longint b, int width);
    longint ar = round_pow2(a, width);
    longint br = round_pow2(b, width);
    return ar * b + br * a - ar * br;
  endfunction

  // Signed RoBA product: the unsigned scheme on magnitudes, sign reapplied.
  function automatic longint roba_s(longint a, longint b, int width);
    longint ma = (a < 0) ? -a : a;
    longint mb = (b < 0) ? -b : b;
    longint p  = roba_u(ma, mb, width);
    return ((a < 0) != (b < 0)) ? -p : p;
  endfunction

endpackage
