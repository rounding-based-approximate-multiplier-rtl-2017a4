// tb_roba_multiplier_unsigned: self-checking test of the unsigned RoBA
// multiplier. An 8-bit instance is checked on all 65536 operand pairs and the
// default 16-bit instance on 200000 random pairs plus corner cases, against
// the independent reference model. Also checks that the error equals
// -(Ar-A)*(Br-B), and counts results above, below and equal to the exact
// product and zero operands; each class must occur.
module tb_roba_multiplier_unsigned;
  import tb_roba_ref_pkg::*;
  localparam int W  = roba_pkg::DefaultWidth;
  localparam int WS = 8;

  logic            clk = 1'b0;
  logic [W-1:0]    a, b;
  logic [2*W-1:0]  p;
  logic [WS-1:0]   as, bs;
  logic [2*WS-1:0] ps;
  int checks = 0, failures = 0;
  int n_above = 0, n_below = 0, n_equal = 0, n_zero = 0;

  roba_multiplier_unsigned dut (.a(a), .b(b), .product(p));
  roba_multiplier_unsigned #(.WIDTH(WS)) dut_small (.a(as), .b(bs), .product(ps));

  always #5 clk = ~clk;

  task automatic classify(longint x, longint y, longint got);
    longint exact = x * y;
    if (x == 0 || y == 0) n_zero++;
    else if (got > exact) n_above++;
    else if (got < exact) n_below++;
    else n_equal++;
  endtask

  task automatic check16(longint x, longint y);
    longint expect_p, err;
    a = W'(x);
    b = W'(y);
    #1;
    expect_p = roba_u(x, y, W);
    err = (round_pow2(x, W) - x) * (round_pow2(y, W) - y);
    checks++;
    if (longint'(p) != expect_p || (x != 0 && y != 0 && x * y - longint'(p) != err)) begin
      failures++;
      if (failures < 10) $display("FAIL 16b a=%0d b=%0d p=%0d expected %0d", x, y, p, expect_p);
    end
    classify(x, y, longint'(p));
  endtask

  initial begin
    longint expect_p;
    for (int x = 0; x < (1 << WS); x++) begin
      for (int y = 0; y < (1 << WS); y++) begin
        as = WS'(x);
        bs = WS'(y);
        #1;
        expect_p = roba_u(longint'(x), longint'(y), WS);
        checks++;
        if (longint'(ps) != expect_p) begin
          failures++;
          if (failures < 10) $display("FAIL 8b a=%0d b=%0d p=%0d expected %0d", x, y, ps, expect_p);
        end
        classify(longint'(x), longint'(y), longint'(ps));
      end
    end
    check16(0, 12345);
    check16(65535, 65535);
    check16(65535, 49151);
    check16(3, 3);
    check16(49152, 24576);
    check16(1, 65535);
    repeat (200000) check16(longint'($urandom_range(65535)), longint'($urandom_range(65535)));
    // small operands, where ties and the exception for 3 are frequent
    repeat (20000) check16(longint'($urandom_range(15)), longint'($urandom_range(65535)));
    checks++;
    if (n_above == 0 || n_below == 0 || n_equal == 0 || n_zero == 0) begin
      failures++;
      $display("FAIL an error class was never exercised");
    end
    $display("above=%0d below=%0d equal=%0d zero=%0d", n_above, n_below, n_equal, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
