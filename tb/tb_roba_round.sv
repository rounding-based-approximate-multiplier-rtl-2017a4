// tb_roba_round: exhaustive self-checking test of the rounding unit at its
// default 16-bit width. For every operand the expected exponent is found by
// brute force: the power of two 2^n (n = 0..WIDTH) at the smallest distance,
// a tie taking the larger power except for the operand 3, which takes 2.
// Zero must raise is_zero. Also counts how many operands rounded up, down,
// were exact powers of two, and were ties, and fails if any class is unseen.
module tb_roba_round;
  localparam int unsigned WIDTH = roba_pkg::DefaultWidth;
  localparam int unsigned EW    = roba_pkg::exp_width(WIDTH);

  logic             clk = 1'b0;
  logic [WIDTH-1:0] operand;
  logic [EW-1:0]    exponent;
  logic             is_zero;
  int checks = 0, failures = 0;
  int n_up = 0, n_down = 0, n_exact = 0, n_tie = 0;

  roba_round #(.WIDTH(WIDTH)) dut (.operand(operand), .exponent(exponent), .is_zero(is_zero));

  always #5 clk = ~clk;

  function automatic int ref_exp(longint a);
    int     best = 0;
    longint best_d = -1;
    longint p, d;
    for (int n = 0; n <= int'(WIDTH); n++) begin
      p = longint'(1) << n;
      d = (a > p) ? a - p : p - a;
      if (best_d < 0 || d < best_d || (d == best_d && a != 3)) begin
        best = n;
        best_d = d;
      end
    end
    return best;
  endfunction

  initial begin
    int     e;
    longint p;
    for (longint a = 0; a < (longint'(1) << WIDTH); a++) begin
      operand = WIDTH'(a);
      #1;
      checks++;
      if (a == 0) begin
        if (!is_zero) begin
          failures++;
          $display("FAIL zero not flagged");
        end
      end else begin
        e = ref_exp(a);
        p = longint'(1) << e;
        if (is_zero || int'(exponent) != e) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d exp=%0d expected %0d", a, exponent, e);
        end
        if (p == a) n_exact++;
        else if (p > a) n_up++;
        else n_down++;
        if (a >= 3 && (a % 3 == 0) && (((a / 3) & ((a / 3) - 1)) == 0)) n_tie++;
      end
    end
    checks++;
    if (n_up == 0 || n_down == 0 || n_exact == 0 || n_tie == 0) begin
      failures++;
      $display("FAIL a rounding class was never exercised");
    end
    $display("rounded up=%0d down=%0d exact=%0d ties=%0d", n_up, n_down, n_exact, n_tie);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
