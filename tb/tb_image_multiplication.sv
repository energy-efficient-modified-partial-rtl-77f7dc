// Workload testbench: blending two 8-bit images by pixel-wise
// multiplication with the four approximate multipliers.
//
// Two 128x128 grey-level images are generated here (the original test
// images are not part of this design).  Image A is a diagonal ramp with a
// black band at the top, a white band at the bottom and a ripple; image B is
// a checkerboard of 16x16 tiles whose levels include 0 and 255, with
// pseudo-random texture from a fixed seed.  A colour image would be the same
// computation once per channel.  Each pixel pair goes through
// approx_mult8_top at its default parameters.  The output pixel is the top
// byte of the 16-bit product (a*b/256), a choice of this testbench.
//
// Per multiplier it reports, against the exact product:
//   MSE  = mean over pixels of (I - K)^2, I and K the exact and approximate
//          output pixels;
//   PSNR = 10*log10(255^2 / MSE) in dB;
//   average NED = mean over pixels of |p - a*b| / 65025 on the full product.
// Checks, following the trends reported for these multipliers on real
// images: Multipliers 3 and 4 stay above 45 dB and below 0.3e-2 average
// NED; Multipliers 1 and 2 stay between 20 and 35 dB; Multiplier 1 has the
// lowest PSNR of the four; black and white pixels carry part of the
// error of every multiplier; zero pixels give a zero product.
module tb_image_multiplication;
  localparam int W = 128;
  localparam int H = 128;

  logic [7:0] a, b;
  logic [15:0] p [4];
  logic zero;
  int checks = 0, failures = 0;

  approx_mult8_top dut (.a, .b, .p1(p[0]), .p2(p[1]), .p3(p[2]), .p4(p[3]), .zero);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic logic [7:0] clip8(int v);
    return (v < 0) ? 8'd0 : (v > 255) ? 8'd255 : 8'(v);
  endfunction

  // Image A: diagonal ramp, black top band, white bottom band, ripple.
  function automatic logic [7:0] pixel_a(int x, int y);
    int ripple;
    if (y < 8) return 8'd0;
    if (y >= H - 8) return 8'd255;
    ripple = ((x / 4) % 2 == 0) ? 6 : -6;
    return clip8((x + y) * 255 / (W + H - 2) + ripple);
  endfunction

  // Image B: 16x16 tiles cycling through five levels, plus texture.
  function automatic logic [7:0] pixel_b(int x, int y, int noise);
    int level;
    case (((x / 16) + 2 * (y / 16)) % 5)
      0: level = 0;
      1: level = 64;
      2: level = 128;
      3: level = 192;
      default: level = 255;
    endcase
    if (level == 0 || level == 255) return 8'(level);
    return clip8(level + noise);
  endfunction

  initial begin
    longint sq_err [4];
    longint abs_err [4];
    longint ends_err [4];
    longint pixels [1];
    longint zero_bad [1];
    int seed;
    seed = 7;
    void'($urandom(seed));
    for (int k = 0; k < 4; k++) begin
      sq_err[k] = 0;
      abs_err[k] = 0;
      ends_err[k] = 0;
    end
    pixels[0] = 0;
    zero_bad[0] = 0;

    for (int y = 0; y < H; y++) begin
      for (int x = 0; x < W; x++) begin
        int noise;
        int exact;
        noise = int'($urandom_range(16)) - 8;
        a = pixel_a(x, y);
        b = pixel_b(x, y, noise);
        #1;
        exact = int'(a) * int'(b);
        pixels[0] += 1;
        for (int k = 0; k < 4; k++) begin
          int d;
          int ad;
          int dpix;
          d = int'(p[k]) - exact;
          ad = (d < 0) ? -d : d;
          dpix = int'(p[k][15:8]) - (exact >> 8);
          sq_err[k] += longint'(dpix * dpix);
          abs_err[k] += longint'(ad);
          if (a == 8'd0 || a == 8'd255 || b == 8'd0 || b == 8'd255)
            ends_err[k] += longint'(ad);
          if ((a == 8'd0 || b == 8'd0) && p[k] != 16'd0) zero_bad[0] += 1;
        end
      end
    end

    check(pixels[0] == W * H, $sformatf("pixel count %0d", pixels[0]));
    check(zero_bad[0] == 0, $sformatf("zero pixel gave a non-zero product %0d times", zero_bad[0]));
    begin
      real psnr [4];
      real ned [4];
      for (int k = 0; k < 4; k++) begin
        real mse;
        mse = real'(sq_err[k]) / real'(W * H);
        psnr[k] = (mse == 0.0) ? 99.0 : 10.0 * $log10(255.0 * 255.0 / mse);
        ned[k] = real'(abs_err[k]) / real'(W * H) / 65025.0;
        $display("Multiplier %0d: PSNR %.1f dB  average NED %.4f e-2  (MSE %.3f)",
                 k + 1, psnr[k], ned[k] * 100.0, mse);
        check(ends_err[k] > 0, $sformatf("M%0d no error on black or white pixels", k + 1));
      end
      for (int k = 0; k < 2; k++)
        check(psnr[k] > 20.0 && psnr[k] < 35.0, $sformatf("M%0d PSNR %.1f dB", k + 1, psnr[k]));
      for (int k = 2; k < 4; k++) begin
        check(psnr[k] > 45.0, $sformatf("M%0d PSNR %.1f dB", k + 1, psnr[k]));
        check(ned[k] < 0.3e-2, $sformatf("M%0d average NED %.5f", k + 1, ned[k]));
      end
      check(psnr[0] < psnr[1] && psnr[0] < psnr[2] && psnr[0] < psnr[3],
            "Multiplier 1 does not have the lowest PSNR");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
