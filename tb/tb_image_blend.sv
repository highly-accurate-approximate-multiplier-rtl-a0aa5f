// Image-blending workload for approx_mult8.
//
// Two 64x64 8-bit grey images are generated in the testbench: a diagonal
// ramp, I1(x,y) = (4x + 2y) mod 256, and a radial bowl,
// I2(x,y) = min(255, 255 * ((x-32)^2 + (y-32)^2) / 2048). Blending multiplies
// the two pixels at each location and scales the 16-bit product back to
// 8 bits by dropping the low byte. The blended image made with the
// approximate multiplier is compared with the one made with exact products
// through the peak signal-to-noise ratio,
//   PSNR = 10 log10(255^2 / MSE),  MSE = mean squared pixel difference.
// Checks: PSNR is at least 45 dB (blending natural photographs with this
// multiplier gives 45 to 50 dB) and the images are not identical (the
// approximation is visible at all). The largest pixel difference is printed.
module tb_image_blend;
  import approx_mult_pkg::*;

  localparam int SIZE = 64;

  logic [WIDTH-1:0]  a, b;
  logic [PWIDTH-1:0] p;
  int checks = 0, failures = 0;

  approx_mult8 dut (.a(a), .b(b), .p(p));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pix1(int x, int y);
    return (4 * x + 2 * y) % 256;
  endfunction

  function automatic int pix2(int x, int y);
    int r2 = (x - 32) * (x - 32) + (y - 32) * (y - 32);
    return (r2 < 2048) ? (r2 * 255) / 2048 : 255;
  endfunction

  initial begin
    longint sq_err = 0;
    int n_diff = 0, max_diff = 0;
    int exact_px, approx_px, d;
    real mse, psnr;
    for (int y = 0; y < SIZE; y++) begin
      for (int x = 0; x < SIZE; x++) begin
        a = 8'(pix1(x, y));
        b = 8'(pix2(x, y));
        #1;
        exact_px  = (pix1(x, y) * pix2(x, y)) >> 8;
        approx_px = int'(p) >> 8;
        d = approx_px - exact_px;
        if (d != 0) n_diff++;
        if (d < 0) d = -d;
        if (d > max_diff) max_diff = d;
        sq_err += longint'(d * d);
      end
    end
    mse  = real'(sq_err) / real'(SIZE * SIZE);
    psnr = (mse > 0.0) ? 10.0 * $log10(255.0 * 255.0 / mse) : 999.0;
    $display("blend: MSE %f, PSNR %f dB, %0d of %0d pixels differ, largest difference %0d",
             mse, psnr, n_diff, SIZE * SIZE, max_diff);
    checks++;
    if (psnr < 45.0) begin
      failures++;
      $display("FAIL PSNR %f dB below 45 dB", psnr);
    end
    checks++;
    if (n_diff == 0) begin
      failures++;
      $display("FAIL blended images identical");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
