// tb_roba_barrel_shifter: self-checking test of the logarithmic left shifter
// at its default sizes (16-bit data, 32-bit result, 5-bit shift). Every shift
// amount 0..31 is applied to random data and to all-ones data, and the result
// is compared with a 64-bit shift truncated to the result width.
module tb_roba_barrel_shifter;
  localparam int unsigned IW = roba_pkg::DefaultWidth;
  localparam int unsigned OW = 2 * roba_pkg::DefaultWidth;
  localparam int unsigned SW = roba_pkg::exp_width(roba_pkg::DefaultWidth);

  logic          clk = 1'b0;
  logic [IW-1:0] data;
  logic [SW-1:0] shift;
  logic [OW-1:0] result;
  int checks = 0, failures = 0;

  roba_barrel_shifter #(.IN_WIDTH(IW), .OUT_WIDTH(OW), .SH_WIDTH(SW)) dut (
    .data(data), .shift(shift), .result(result)
  );

  always #5 clk = ~clk;

  task automatic check(logic [IW-1:0] d, int s);
    logic [63:0] expect_full;
    data  = d;
    shift = SW'(s);
    #1;
    expect_full = 64'(d) << s;
    checks++;
    if (result !== OW'(expect_full)) begin
      failures++;
      if (failures < 10) $display("FAIL data=%h shift=%0d result=%h", d, s, result);
    end
  endtask

  initial begin
    for (int s = 0; s < (1 << SW); s++) begin
      check('1, s);
      check(IW'(1), s);
      repeat (50) check(IW'($urandom), s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
