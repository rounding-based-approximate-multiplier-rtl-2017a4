// roba_multiplier_signed: signed (two's complement) RoBA multiplier.
//
// Rounding to a power of two only pays off for positive numbers: a negative
// two's complement value rounded to -2^n is not a plain shift pattern. So the
// signed multiplier works in sign and magnitude:
//   sign detector  takes |A| and |B| (two's complement negation when the sign
//                  bit is set) and the product sign sA xor sB;
//   core           the unsigned RoBA multiplier on the WIDTH-bit magnitudes
//                  (|-2^(WIDTH-1)| = 2^(WIDTH-1) still fits in WIDTH bits);
//   sign set       negates the magnitude product when the signs differ.
// The magnitude product never exceeds 2^(2*WIDTH-2), so the signed result
// always fits in 2*WIDTH bits. The error is that of the unsigned scheme on
// the magnitudes: P = A*B - sign*(|A|r-|A|)*(|B|r-|B|).
//
// Purely combinational. Sign-magnitude handling around the unsigned core
// follows the RoBA scheme; the exact (two's complement) absolute value is this
// design's choice.
module roba_multiplier_signed #(
  parameter int unsigned WIDTH = roba_pkg::DefaultWidth
) (
  input  logic signed [WIDTH-1:0]   a,
  input  logic signed [WIDTH-1:0]   b,
  output logic signed [2*WIDTH-1:0] product
);

  logic             sign_a, sign_b, sign_p;
  logic [WIDTH-1:0] mag_a, mag_b;
  logic [2*WIDTH-1:0] mag_p;

  // Sign detector
  assign sign_a = a[WIDTH-1];
  assign sign_b = b[WIDTH-1];
  assign sign_p = sign_a ^ sign_b;
  assign mag_a  = sign_a ? WIDTH'(-a) : WIDTH'(a);
  assign mag_b  = sign_b ? WIDTH'(-b) : WIDTH'(b);

  roba_multiplier_unsigned #(.WIDTH(WIDTH)) u_core (
    .a(mag_a), .b(mag_b), .product(mag_p)
  );

  // Sign set
  assign product = sign_p ? -$signed(mag_p) : $signed(mag_p);

endmodule
