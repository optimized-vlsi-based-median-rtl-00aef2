// tb_mf_dc_image: salt-and-pepper denoising of a whole generated image with
// the 3x3 median filter.
//
// A 512 x 512 8-bit test image (smooth gradients with a bright disc and
// hard-edged bars) is generated in the test. A fixed-seed generator turns
// about 20 % of its pixels into impulses, half salt (255) and half pepper
// (0). The filter is then applied at every pixel: the test cuts the 3x3
// neighbourhood out of the noisy image (edges replicated) and drives it on
// the filter's nine inputs, as a line-buffer front end would. Every output is
// checked against a software median of the same window. At the end the test
// checks that the filtered image is much closer to the clean image than the
// noisy one (mean squared error and count of impulse-valued pixels), and
// prints both PSNR values.
`timescale 1ns/1ps
module tb_mf_dc_image;
  localparam int W    = mf_dc_pkg::PIXEL_W;
  localparam int IMG  = 512;
  localparam int NOISE_PERMILLE = 200;

  logic [W-1:0] clean [IMG][IMG];
  logic [W-1:0] noisy [IMG][IMG];
  logic [W-1:0] p [9];
  logic [W-1:0] median;
  int checks = 0, failures = 0;

  mf_dc dut (
    .p0(p[0]), .p1(p[1]), .p2(p[2]), .p3(p[3]), .p4(p[4]),
    .p5(p[5]), .p6(p[6]), .p7(p[7]), .p8(p[8]),
    .median(median)
  );

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clampi(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic int ref_median(input logic [W-1:0] w [9]);
    int s [9];
    int t, k;
    for (int i = 0; i < 9; i++) begin
      t = int'(w[i]);
      k = i;
      while (k > 0 && s[k-1] > t) begin s[k] = s[k-1]; k--; end
      s[k] = t;
    end
    return s[4];
  endfunction

  function automatic real psnr(real mse);
    return 10.0 * $log10(255.0 * 255.0 / mse);
  endfunction

  initial begin
    logic [W-1:0] w [9];
    int dx, dy, v, r;
    longint se_noisy = 0, se_filt = 0;
    int imp_noisy = 0, imp_filt = 0, n_noise = 0;
    real mse_noisy, mse_filt;
    int unsigned seed;

    // Clean image.
    for (int y = 0; y < IMG; y++)
      for (int x = 0; x < IMG; x++) begin
        v = 40 + (x * 120) / IMG + (y * 60) / IMG;
        dx = x - IMG / 3; dy = y - IMG / 2;
        if (dx * dx + dy * dy < (IMG / 6) * (IMG / 6)) v = 200 - (dx * dx + dy * dy) / 600;
        if ((x / 32) % 4 == 3 && y > IMG / 2 + 40) v = 25;
        clean[y][x] = W'(clampi(v, 1, 254));
      end

    // Salt-and-pepper noise, fixed-seed linear congruential generator.
    seed = 32'h1234_5678;
    for (int y = 0; y < IMG; y++)
      for (int x = 0; x < IMG; x++) begin
        seed = seed * 32'd1664525 + 32'd1013904223;
        r = int'(seed >> 16) % 1000;
        if (r < NOISE_PERMILLE) begin
          noisy[y][x] = (r % 2 == 0) ? '1 : '0;
          n_noise++;
        end else begin
          noisy[y][x] = clean[y][x];
        end
      end

    // Filter every pixel.
    for (int y = 0; y < IMG; y++)
      for (int x = 0; x < IMG; x++) begin
        for (int j = 0; j < 3; j++)
          for (int i = 0; i < 3; i++)
            w[3 * j + i] = noisy[clampi(y + j - 1, 0, IMG - 1)][clampi(x + i - 1, 0, IMG - 1)];
        p = w;
        #1;
        checks++;
        if (int'(median) != ref_median(w)) begin
          failures++;
          if (failures < 10)
            $display("FAIL pixel (%0d,%0d): median=%0d expected %0d", x, y, median, ref_median(w));
        end
        se_noisy += longint'((int'(noisy[y][x]) - int'(clean[y][x])) ** 2);
        se_filt  += longint'((int'(median) - int'(clean[y][x])) ** 2);
        if (noisy[y][x] == '0 || noisy[y][x] == '1) imp_noisy++;
        if (median == '0 || median == '1) imp_filt++;
      end

    mse_noisy = real'(se_noisy) / real'(IMG * IMG);
    mse_filt  = real'(se_filt) / real'(IMG * IMG);
    $display("image %0dx%0d, %0d impulses injected", IMG, IMG, n_noise);
    $display("impulse-valued pixels: noisy %0d, filtered %0d", imp_noisy, imp_filt);
    $display("PSNR noisy %0.2f dB, filtered %0.2f dB", psnr(mse_noisy), psnr(mse_filt));
    checks++;
    if (imp_filt * 20 > imp_noisy) begin
      failures++;
      $display("FAIL: too many impulses left after filtering");
    end
    checks++;
    if (psnr(mse_filt) < psnr(mse_noisy) + 15.0) begin
      failures++;
      $display("FAIL: filtering did not improve PSNR by 15 dB");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
