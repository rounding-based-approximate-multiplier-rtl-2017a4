// tb_roba_multiplier_signed: self-checking test of the signed RoBA multiplier.
// An 8-bit instance is checked on all 65536 two's complement operand pairs and
// the default 16-bit instance on 200000 random pairs plus the extreme values,
// against the independent reference model (unsigned scheme on magnitudes, sign
// reapplied). Counts each sign combination and fails if one never occurs.
module tb_roba_multiplier_signed;
  import tb_roba_ref_pkg::*;
  localparam int W  = roba_pkg::DefaultWidth;
  localparam int WS = 8;

  logic                   clk = 1'b0;
  logic signed [W-1:0]    a, b;
  logic signed [2*W-1:0]  p;
  logic signed [WS-1:0]   as, bs;
  logic signed [2*WS-1:0] ps;
  int checks = 0, failures = 0;
  int n_pp = 0, n_pn = 0, n_np = 0, n_nn = 0;

  roba_multiplier_signed dut (.a(a), .b(b), .product(p));
  roba_multiplier_signed #(.WIDTH(WS)) dut_small (.a(as), .b(bs), .product(ps));

  always #5 clk = ~clk;

  task automatic count_signs(longint x, longint y);
    if (x >= 0 && y >= 0) n_pp++;
    else if (x >= 0) n_pn++;
    else if (y >= 0) n_np++;
    else n_nn++;
  endtask

  task automatic check16(longint x, longint y);
    longint expect_p;
    a = W'(x);
    b = W'(y);
    #1;
    expect_p = roba_s(x, y, W);
    checks++;
    if (longint'(p) != expect_p) begin
      failures++;
      if (failures < 10) $display("FAIL 16b a=%0d b=%0d p=%0d expected %0d", x, y, p, expect_p);
    end
    count_signs(x, y);
  endtask

  initial begin
    longint expect_p;
    for (int x = -(1 << (WS - 1)); x < (1 << (WS - 1)); x++) begin
      for (int y = -(1 << (WS - 1)); y < (1 << (WS - 1)); y++) begin
        as = WS'(x);
        bs = WS'(y);
        #1;
        expect_p = roba_s(longint'(x), longint'(y), WS);
        checks++;
        if (longint'(ps) != expect_p) begin
          failures++;
          if (failures < 10) $display("FAIL 8b a=%0d b=%0d p=%0d expected %0d", x, y, ps, expect_p);
        end
        count_signs(longint'(x), longint'(y));
      end
    end
    check16(-32768, -32768);
    check16(-32768, 32767);
    check16(32767, -32767);
    check16(-3, -3);
    check16(-1, 0);
    repeat (200000)
      check16(longint'($urandom_range(65535)) - 32768, longint'($urandom_range(65535)) - 32768);
    checks++;
    if (n_pp == 0 || n_pn == 0 || n_np == 0 || n_nn == 0) begin
      failures++;
      $display("FAIL a sign combination was never exercised");
    end
    $display("signs ++=%0d +-=%0d -+=%0d --=%0d", n_pp, n_pn, n_np, n_nn);
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
