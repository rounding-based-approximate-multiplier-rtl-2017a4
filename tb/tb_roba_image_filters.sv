// tb_roba_image_filters: image smoothing and sharpening with the signed RoBA
// multiplier, the two applications the RoBA scheme is meant for.
//
// A 48x48 8-bit test image (gradient, a bright disc and pseudo-random
// texture) is generated in the testbench. Two kernels are applied:
//   smoothing  5x5 Gaussian, integer weights 1..41, sum 273;
//   sharpening 3x3, centre 9, neighbours -1.
// Every pixel-times-weight product goes through the multiplier (16-bit, the
// default width) and is compared with the independent reference model; the
// windowing, summing, normalising and clipping are done here in the
// testbench. For each kernel the PSNR of the approximate image against the
// exactly filtered image is reported and must exceed 20 dB.
module tb_roba_image_filters;
  import tb_roba_ref_pkg::*;
  localparam int W  = roba_pkg::DefaultWidth;
  localparam int SZ = 48;

  logic                  clk = 1'b0;
  logic signed [W-1:0]   a, b;
  logic signed [2*W-1:0] p;
  int checks = 0, failures = 0;

  roba_multiplier_signed dut (.a(a), .b(b), .product(p));

  always #5 clk = ~clk;

  int img [SZ][SZ];
  int gauss [5][5] = '{'{1, 4, 7, 4, 1}, '{4, 16, 26, 16, 4}, '{7, 26, 41, 26, 7},
                       '{4, 16, 26, 16, 4}, '{1, 4, 7, 4, 1}};
  int sharp [3][3] = '{'{-1, -1, -1}, '{-1, 9, -1}, '{-1, -1, -1}};

  function automatic int clip8(longint v);
    return (v < 0) ? 0 : (v > 255) ? 255 : int'(v);
  endfunction

  // One product through the multiplier, checked against the model.
  task automatic mul(int pix, int wt, output longint prod);
    a = W'(wt);
    b = W'(pix);
    #1;
    prod = longint'(p);
    checks++;
    if (prod != roba_s(longint'(wt), longint'(pix), W)) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d gave %0d", wt, pix, prod);
    end
  endtask

  // Filter the image with a KxK kernel; return the PSNR against exact math.
  task automatic run_kernel(string name, int k, int norm, output real psnr);
    longint acc_a, acc_e, prod;
    int     ya, ye, r, px;
    real    mse = 0.0;
    int     n = 0;
    r = k / 2;
    for (int y = r; y < SZ - r; y++) begin
      for (int x = r; x < SZ - r; x++) begin
        acc_a = 0;
        acc_e = 0;
        for (int i = 0; i < k; i++) begin
          for (int j = 0; j < k; j++) begin
            int wt = (k == 5) ? gauss[i][j] : sharp[i][j];
            px = img[y + i - r][x + j - r];
            mul(px, wt, prod);
            acc_a += prod;
            acc_e += longint'(px) * longint'(wt);
          end
        end
        ya = clip8((acc_a + longint'(norm) / 2) / longint'(norm));
        ye = clip8((acc_e + longint'(norm) / 2) / longint'(norm));
        mse += real'((ya - ye) * (ya - ye));
        n++;
      end
    end
    mse = mse / real'(n);
    psnr = (mse == 0.0) ? 99.0 : 10.0 * $log10(255.0 * 255.0 / mse);
    $display("%s: %0d pixels, PSNR vs exact = %f dB", name, n, psnr);
  endtask

  initial begin
    real psnr_s, psnr_h;
    int  dx, dy;
    for (int y = 0; y < SZ; y++) begin
      for (int x = 0; x < SZ; x++) begin
        dx = x - SZ / 2;
        dy = y - SZ / 2;
        img[y][x] = (x * 255) / (SZ - 1) / 2 + int'($urandom_range(40));
        if (dx * dx + dy * dy < (SZ / 4) * (SZ / 4)) img[y][x] = 200 + int'($urandom_range(55));
      end
    end
    run_kernel("smoothing 5x5 Gaussian", 5, 273, psnr_s);
    run_kernel("sharpening 3x3", 3, 1, psnr_h);
    checks++;
    if (psnr_s < 20.0 || psnr_h < 20.0) begin
      failures++;
      $display("FAIL PSNR below 20 dB");
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
