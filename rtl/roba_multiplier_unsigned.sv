// roba_multiplier_unsigned: unsigned rounding-based approximate multiplier.
//
// Computes P ~ A*B as Ar*B + Br*A - Ar*Br, where Ar and Br are A and B rounded
// to their nearest powers of two (roba_round). The exact product also holds
// the term (Ar-A)*(Br-B); it is dropped, so P = A*B - (Ar-A)*(Br-B). The
// result is above the exact product when one operand rounds up and the other
// down, and below it when both round the same way.
//
// With Ar = 2^na and Br = 2^nb every remaining product is a shift:
//   Ar*B  = B << na,  Br*A = A << nb,  Ar*Br = Ar << nb.
// Two rounding units, three barrel shifters and one add/subtract make the
// datapath. If either operand is zero the product is forced to zero.
//
// P is always in [0, 2^(2*WIDTH)): the dropped term is at most A*B/4 when both
// operands round the same way, and when they round in opposite directions
// P <= Ar*B < 2^(2*WIDTH). So the add/subtract is done modulo 2^(2*WIDTH) and
// the (possibly 2^(2*WIDTH)-valued) Ar*Br term may wrap without harm.
//
// Purely combinational, no clock. The equation and the rounding rule are the
// RoBA scheme; the zero forcing and the plain adder/subtractor (no specific
// adder architecture) are this design's choices.
module roba_multiplier_unsigned #(
  parameter int unsigned WIDTH = roba_pkg::DefaultWidth
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  output logic [2*WIDTH-1:0] product
);

  localparam int unsigned EW = roba_pkg::exp_width(WIDTH);
  localparam int unsigned PW = 2 * WIDTH;

  logic [EW-1:0]    exp_a, exp_b;
  logic             zero_a, zero_b;
  logic [WIDTH:0]   a_round;            // Ar = 2^na, up to 2^WIDTH
  logic [PW-1:0]    ar_times_b;         // Ar * B
  logic [PW-1:0]    br_times_a;         // Br * A
  logic [PW-1:0]    ar_times_br;        // Ar * Br

  roba_round #(.WIDTH(WIDTH)) u_round_a (.operand(a), .exponent(exp_a), .is_zero(zero_a));
  roba_round #(.WIDTH(WIDTH)) u_round_b (.operand(b), .exponent(exp_b), .is_zero(zero_b));

  assign a_round = (WIDTH+1)'(1) << exp_a;

  roba_barrel_shifter #(.IN_WIDTH(WIDTH), .OUT_WIDTH(PW), .SH_WIDTH(EW)) u_shift_b (
    .data(b), .shift(exp_a), .result(ar_times_b)
  );
  roba_barrel_shifter #(.IN_WIDTH(WIDTH), .OUT_WIDTH(PW), .SH_WIDTH(EW)) u_shift_a (
    .data(a), .shift(exp_b), .result(br_times_a)
  );
  roba_barrel_shifter #(.IN_WIDTH(WIDTH+1), .OUT_WIDTH(PW), .SH_WIDTH(EW)) u_shift_r (
    .data(a_round), .shift(exp_b), .result(ar_times_br)
  );

  always_comb begin
    if (zero_a || zero_b) product = '0;
    else                  product = ar_times_b + br_times_a - ar_times_br;
  end

endmodule
