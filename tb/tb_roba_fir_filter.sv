// tb_roba_fir_filter: end-to-end test of the RoBA FIR filter at its default
// size (8 taps, 16-bit samples and coefficients), with no parameter changed.
//
// Samples are streamed with random gaps in in_valid. A reference model keeps
// the sample history and computes y[n] = sum c[k] (*) x[n-k] with the
// independent RoBA product model. Every cycle the test checks that out_valid
// follows in_valid with exactly one clock of latency, that y_out matches the
// reference when valid and holds its value when not. Three phases:
//   1. random coefficients and random samples (full range, zeros, -2^15);
//   2. a mid-stream reset, after which the delay line must read as zeros;
//   3. a low-pass (smoothing) filter on a slow triangle wave with noise,
//      where the approximate output is also compared with the exact FIR and
//      the mean relative error is reported.
// It counts the mechanisms the design has: operands rounded up, rounded down,
// ties rounded up, the 3 -> 2 exception, zero operands, negative products,
// idle (bubble) cycles and resets; each must occur at least once.
module tb_roba_fir_filter;
  import tb_roba_ref_pkg::*;
  localparam int TAPS = roba_pkg::DefaultTaps;
  localparam int W    = roba_pkg::DefaultWidth;
  localparam int OW   = 2 * W + $clog2(TAPS);

  logic                 clk = 1'b0;
  logic                 rst_n;
  logic                 in_valid;
  logic signed [W-1:0]  x_in;
  logic signed [W-1:0]  coeff [TAPS];
  logic                 out_valid;
  logic signed [OW-1:0] y_out;

  roba_fir_filter dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in), .coeff(coeff),
    .out_valid(out_valid), .y_out(y_out)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_up = 0, n_down = 0, n_tie = 0, n_three = 0, n_zero = 0, n_neg = 0;
  int n_bubble = 0, n_reset = 0, n_outputs = 0;
  longint hist [TAPS];            // reference delay line, hist[0] newest
  longint expect_y = 0;
  longint exact_y  = 0;
  real    rel_err_sum = 0.0;
  int     rel_err_n = 0;
  bit     measure_error = 0;

  function automatic real abs_real(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // Classify how the magnitude of v is rounded.
  function automatic void count_round(longint v);
    longint m = (v < 0) ? -v : v;
    longint r = round_pow2(m, W);
    if (m == 0) n_zero++;
    else if (m == 3) n_three++;
    else if (r > m) n_up++;
    else if (r < m) n_down++;
    if (m >= 6 && (m % 3 == 0) && (((m / 3) & ((m / 3) - 1)) == 0)) n_tie++;
  endfunction

  // Advance the reference model by one sample.
  function automatic void ref_push(longint x);
    longint p;
    for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = x;
    expect_y = 0;
    exact_y  = 0;
    for (int k = 0; k < TAPS; k++) begin
      p = roba_s(longint'(coeff[k]), hist[k], W);
      expect_y += p;
      exact_y  += longint'(coeff[k]) * hist[k];
      if (p < 0) n_neg++;
      count_round(hist[k]);
      count_round(longint'(coeff[k]));
    end
  endfunction

  // Drive one cycle: present (valid, x) before the edge, check after it.
  task automatic cycle(bit valid, longint x);
    longint held;
    @(negedge clk);
    in_valid = valid;
    x_in     = W'(x);
    held     = longint'(y_out);
    if (valid) ref_push(x);
    else n_bubble++;
    @(posedge clk);
    #1;
    checks++;
    if (out_valid !== valid) begin
      failures++;
      if (failures < 10) $display("FAIL out_valid=%0b expected %0b", out_valid, valid);
    end
    checks++;
    if (valid && longint'(y_out) != expect_y) begin
      failures++;
      if (failures < 10) $display("FAIL y_out=%0d expected %0d", y_out, expect_y);
    end else if (!valid && longint'(y_out) != held) begin
      failures++;
      if (failures < 10) $display("FAIL y_out changed while idle");
    end
    if (valid) begin
      n_outputs++;
      if (measure_error && exact_y != 0) begin
        rel_err_sum += abs_real(real'(expect_y - exact_y) / real'(exact_y));
        rel_err_n++;
      end
    end
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst_n    = 1'b0;
    in_valid = 1'b0;
    @(posedge clk);
    #1;
    @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < TAPS; k++) hist[k] = 0;
    n_reset++;
    checks++;
    if (out_valid !== 1'b0 || y_out != '0) begin
      failures++;
      $display("FAIL outputs not cleared by reset");
    end
  endtask

  function automatic longint rand_sample();
    case ($urandom_range(9))
      0:       return 0;
      1:       return -32768;
      2:       return 3 * (longint'(1) << $urandom_range(13)) * (($urandom_range(1) == 1) ? 1 : -1);
      3:       return longint'($urandom_range(15)) - 8;
      default: return longint'($urandom_range(65535)) - 32768;
    endcase
  endfunction

  initial begin
    longint tri_v;
    rst_n    = 1'b0;
    in_valid = 1'b0;
    x_in     = '0;
    for (int k = 0; k < TAPS; k++) coeff[k] = W'($urandom);
    coeff[1] = 16'sd3;
    coeff[2] = 16'sd0;
    coeff[3] = -16'sd24576;
    repeat (2) @(posedge clk);
    do_reset();

    // Phase 1: random coefficients, random stream with bubbles.
    repeat (3000) begin
      if ($urandom_range(3) == 0) cycle(1'b0, 0);
      else cycle(1'b1, rand_sample());
    end

    // Phase 2: reset mid-stream, then new coefficients.
    do_reset();
    for (int k = 0; k < TAPS; k++) coeff[k] = W'(rand_sample());
    repeat (2000) begin
      if ($urandom_range(4) == 0) cycle(1'b0, 0);
      else cycle(1'b1, rand_sample());
    end

    // Phase 3: smoothing filter (binomial-like low-pass, Q15) on a noisy
    // triangle wave; report the error against the exact filter.
    do_reset();
    coeff[0] = 16'sd512;  coeff[1] = 16'sd2048; coeff[2] = 16'sd5120; coeff[3] = 16'sd8192;
    coeff[4] = 16'sd8192; coeff[5] = 16'sd5120; coeff[6] = 16'sd2048; coeff[7] = 16'sd512;
    measure_error = 1;
    for (longint n = 0; n < 4000; n++) begin
      tri_v = longint'((n % 400 < 200) ? (n % 400) * 150 - 15000 : (400 - n % 400) * 150 - 15000);
      cycle(1'b1, tri_v + longint'($urandom_range(2000)) - 1000);
    end
    measure_error = 0;

    checks++;
    if (n_up == 0 || n_down == 0 || n_tie == 0 || n_three == 0 || n_zero == 0 ||
        n_neg == 0 || n_bubble == 0 || n_reset < 2) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("outputs=%0d bubbles=%0d resets=%0d", n_outputs, n_bubble, n_reset);
    $display("operands rounded up=%0d down=%0d ties=%0d three=%0d zero=%0d negative_products=%0d",
             n_up, n_down, n_tie, n_three, n_zero, n_neg);
    $display("smoothing filter: mean absolute relative error vs exact FIR = %f %%",
             100.0 * rel_err_sum / real'(rel_err_n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
