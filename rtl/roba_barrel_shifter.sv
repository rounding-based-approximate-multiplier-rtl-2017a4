// roba_barrel_shifter: logarithmic left shifter of the RoBA multiplier.
//
// Multiplying by a rounded operand Ar = 2^n is a shift: Ar*B = B << n. The
// shifter has one stage per bit of the shift amount; stage s moves the word
// left by 2^s places when bit s of `shift` is set, so the delay grows with
// log2 of the range rather than with the width. The result is OUT_WIDTH bits
// wide and bits shifted past it are dropped (the multiplier sizes OUT_WIDTH so
// that none is lost that matters).
//
// Purely combinational. The shift-based products follow the RoBA scheme; the
// logarithmic structure is this design's choice.
module roba_barrel_shifter #(
  parameter int unsigned IN_WIDTH  = roba_pkg::DefaultWidth,
  parameter int unsigned OUT_WIDTH = 2 * roba_pkg::DefaultWidth,
  parameter int unsigned SH_WIDTH  = roba_pkg::exp_width(roba_pkg::DefaultWidth)
) (
  input  logic [IN_WIDTH-1:0]  data,
  input  logic [SH_WIDTH-1:0]  shift,
  output logic [OUT_WIDTH-1:0] result
);

  logic [OUT_WIDTH-1:0] stage [SH_WIDTH+1];

  assign stage[0] = OUT_WIDTH'(data);

  for (genvar s = 0; s < SH_WIDTH; s++) begin : g_stage
    assign stage[s+1] = shift[s] ? (stage[s] << (2 ** s)) : stage[s];
  end

  assign result = stage[SH_WIDTH];

endmodule
