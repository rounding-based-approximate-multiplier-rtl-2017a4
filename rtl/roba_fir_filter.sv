// roba_fir_filter: direct-form FIR filter whose multipliers are signed RoBA
// approximate multipliers. This is the top of the design.
//
//   y[n] = sum_{k=0}^{TAPS-1} c[k] (*) x[n-k]
//
// where (*) is the rounding-based approximate product. The filter is built from
// the three parts an FIR needs: a delay line of TAPS-1 sample registers, one
// RoBA multiplier per tap, and an adder that sums the tap products.
//
// Interface and timing:
//   * x_in is taken when in_valid is high at a rising clock edge. On that
//     same edge y_out is loaded with the filter output for that sample
//     (x_in itself is tap 0, the delay line holds x[n-1] .. x[n-TAPS+1]) and
//     out_valid goes high for one cycle: latency one clock, one sample per
//     clock at full rate.
//   * When in_valid is low the delay line and y_out hold and out_valid is low.
//   * coeff holds the TAPS signed coefficients; they are read every cycle and
//     are expected to be static while samples stream.
//   * rst_n (active low, synchronous) clears the delay line, y_out and
//     out_valid.
// y_out is 2*WIDTH + $clog2(TAPS) bits wide, so the sum cannot overflow.
//
// Replacing the tap multipliers with RoBA multipliers follows the design's
// intent; the tap count, the word length, the direct form, the handshake,
// the run-time coefficient port and the reset are this design's own choices.
module roba_fir_filter #(
  parameter int unsigned TAPS  = roba_pkg::DefaultTaps,
  parameter int unsigned WIDTH = roba_pkg::DefaultWidth,
  localparam int unsigned OW   = 2 * WIDTH + $clog2(TAPS)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [WIDTH-1:0] x_in,
  input  logic signed [WIDTH-1:0] coeff [TAPS],
  output logic                    out_valid,
  output logic signed [OW-1:0]    y_out
);

  logic signed [WIDTH-1:0]   tap_x   [TAPS];    // x[n-k] seen by tap k
  logic signed [WIDTH-1:0]   delay   [TAPS-1];  // x[n-1] .. x[n-TAPS+1]
  logic signed [2*WIDTH-1:0] tap_p   [TAPS];    // c[k] (*) x[n-k]
  logic signed [OW-1:0]      acc;

  assign tap_x[0] = x_in;
  for (genvar k = 1; k < TAPS; k++) begin : g_tap_x
    assign tap_x[k] = delay[k-1];
  end

  for (genvar k = 0; k < TAPS; k++) begin : g_mult
    roba_multiplier_signed #(.WIDTH(WIDTH)) u_mult (
      .a(coeff[k]), .b(tap_x[k]), .product(tap_p[k])
    );
  end

  always_comb begin
    acc = '0;
    for (int k = 0; k < TAPS; k++) acc += OW'(tap_p[k]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS - 1; k++) delay[k] <= '0;
      y_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        delay[0] <= x_in;
        for (int k = 1; k < TAPS - 1; k++) delay[k] <= delay[k-1];
        y_out <= acc;
      end
    end
  end

endmodule
