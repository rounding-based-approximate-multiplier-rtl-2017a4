// roba_round: rounding unit of the RoBA multiplier.
//
// Rounds an unsigned operand A to its nearest power of two Ar = 2^exponent.
// A lies in [2^k, 2^(k+1)) where k is the position of its leading one; the
// midpoint of that range is 3*2^(k-1), and A is at or above it exactly when
// bit k-1 is set. So A rounds up to 2^(k+1) when bit k-1 is one and down to
// 2^k otherwise. A value 3*2^(p-2) is equally far from 2^p and 2^(p-1); it is
// rounded up, as the RoBA scheme prescribes, except for A = 3 (k = 1), which
// rounds down to 2. A = 0 has no power of two; is_zero flags it and exponent
// is then 0. An operand of all ones rounds to 2^WIDTH, so the exponent has
// $clog2(WIDTH+1) bits.
//
// Purely combinational. The tie rule follows the RoBA scheme; the leading-one
// search written as a priority loop and the zero flag are this design's own.
module roba_round #(
  parameter int unsigned WIDTH = roba_pkg::DefaultWidth,
  localparam int unsigned EW   = roba_pkg::exp_width(WIDTH)
) (
  input  logic [WIDTH-1:0] operand,
  output logic [EW-1:0]    exponent,
  output logic             is_zero
);

  logic [EW-1:0] lead;   // position k of the leading one
  logic          up;     // round up to 2^(k+1)

  always_comb begin
    lead = '0;
    for (int unsigned i = 0; i < WIDTH; i++) begin
      if (operand[i]) lead = EW'(i);
    end
  end

  always_comb begin
    up = 1'b0;
    // Bit k-1 set with k >= 2: at or above the midpoint, ties go up.
    // k = 1 (A = 2 or 3) always rounds down to 2.
    for (int unsigned i = 2; i < WIDTH; i++) begin
      if (lead == EW'(i) && operand[i-1]) up = 1'b1;
    end
  end

  assign is_zero  = (operand == '0);
  assign exponent = up ? lead + EW'(1) : lead;

endmodule
