// tb_mf_dc: end-to-end self-checking test of the 3x3 median filter at its
// default parameters (8-bit pixels).
//
// The reference median is the fifth smallest of the nine pixels, found here
// by an insertion sort that shares nothing with the comparator network.
// Stimulus, in order:
//   - two worked examples with known medians: the window
//     4E 56 69 FF 34 38 4D 3F 47 (median 4D) and the window
//     92 65 10 75 95 90 20 50 53 (median 65);
//   - all 512 windows of 0/1 pixels. The median is a selection network, and
//     a comparator network that is right for every 0/1 input is right for
//     every input (0-1 principle), so this part alone proves the wiring;
//   - constant windows and windows with salt (255) and pepper (0) impulses;
//   - 200,000 random windows, half of them drawn from a narrow value range
//     so that equal pixels are common.
// The network is combinational: the test allows 1 ns after each new window
// and checks there is no clocked latency (the output must already be right).
//
// Besides the pass/fail checks it counts how often each path of the final
// three-value stage delivered the median (lowest row-high, median of the row
// medians, highest row-low, worked out here from independently sorted
// rows), how often an impulse at the centre pixel was replaced, and how often
// ties occurred. Each of these must happen at least once.
`timescale 1ns/1ps
module tb_mf_dc;
  localparam int W = mf_dc_pkg::PIXEL_W;
  localparam int N = mf_dc_pkg::WINDOW_SIZE;

  logic [W-1:0] p [N];
  logic [W-1:0] median;
  int checks = 0, failures = 0;
  int n_from_minh = 0, n_from_medm = 0, n_from_maxl = 0;
  int n_impulse_removed = 0, n_ties = 0;

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

  function automatic int ref_median(input logic [W-1:0] w [N]);
    int s [N];
    int t, k;
    for (int i = 0; i < N; i++) begin
      t = int'(w[i]);
      k = i;
      while (k > 0 && s[k-1] > t) begin
        s[k] = s[k-1];
        k--;
      end
      s[k] = t;
    end
    return s[N/2];
  endfunction

  function automatic int max3(int a, int b, int c);
    int m = (a > b) ? a : b;
    return (m > c) ? m : c;
  endfunction
  function automatic int min3(int a, int b, int c);
    int m = (a < b) ? a : b;
    return (m < c) ? m : c;
  endfunction
  function automatic int mid3(int a, int b, int c);
    return a + b + c - max3(a, b, c) - min3(a, b, c);
  endfunction

  // Apply one window, wait for the network, compare, and record which
  // candidate of the last stage carried the result.
  task automatic apply(input logic [W-1:0] w [N], input int expect_med = -1);
    int exp_med, minh, medm, maxl, nr;
    bit tie;
    p = w;
    #1;
    exp_med = ref_median(w);
    checks++;
    if (int'(median) != exp_med) begin
      failures++;
      if (failures < 10)
        $display("FAIL window %p: median=%0d expected %0d", w, median, exp_med);
    end
    if (expect_med >= 0) begin
      checks++;
      if (int'(median) != expect_med || exp_med != expect_med) begin
        failures++;
        $display("FAIL worked example %p: median=%02h expected %02h", w, median, expect_med);
      end
    end
    minh = min3(max3(w[0], w[1], w[2]), max3(w[3], w[4], w[5]), max3(w[6], w[7], w[8]));
    medm = mid3(mid3(w[0], w[1], w[2]), mid3(w[3], w[4], w[5]), mid3(w[6], w[7], w[8]));
    maxl = max3(min3(w[0], w[1], w[2]), min3(w[3], w[4], w[5]), min3(w[6], w[7], w[8]));
    // Count a path only when it alone carries the median value.
    nr = int'(minh == exp_med) + int'(medm == exp_med) + int'(maxl == exp_med);
    if (nr == 1) begin
      if (minh == exp_med) n_from_minh++;
      if (medm == exp_med) n_from_medm++;
      if (maxl == exp_med) n_from_maxl++;
    end
    if ((w[4] == '0 || w[4] == '1) && int'(median) != int'(w[4])) n_impulse_removed++;
    tie = 0;
    for (int i = 0; i < N; i++)
      for (int j = i + 1; j < N; j++)
        if (w[i] == w[j]) tie = 1;
    if (tie) n_ties++;
  endtask

  initial begin
    logic [W-1:0] w [N];
    int lo, span;

    // Worked examples.
    w = '{8'h4E, 8'h56, 8'h69, 8'hFF, 8'h34, 8'h38, 8'h4D, 8'h3F, 8'h47};
    apply(w, 8'h4D);
    w = '{8'd92, 8'd65, 8'd10, 8'd75, 8'd95, 8'd90, 8'd20, 8'd50, 8'd53};
    apply(w, 8'd65);

    // 0-1 principle: every binary window, with 0 -> 0 and 1 -> all ones.
    for (int m = 0; m < (1 << N); m++) begin
      for (int i = 0; i < N; i++) w[i] = m[i] ? '1 : '0;
      apply(w);
    end

    // Constant windows and single/multiple impulses on a flat background.
    for (int v = 0; v < 256; v += 17) begin
      for (int i = 0; i < N; i++) w[i] = W'(v);
      apply(w, v);
      for (int k = 0; k < N; k++) begin
        for (int i = 0; i < N; i++) w[i] = W'(v);
        w[k] = (k % 2) ? '1 : '0;
        w[4] = (v > 128) ? '0 : '1;
        apply(w, v);
      end
    end

    // Random windows.
    for (int n = 0; n < 200000; n++) begin
      if (n % 2 == 0) begin
        for (int i = 0; i < N; i++) w[i] = W'($urandom);
      end else begin
        span = 1 + int'($urandom_range(7));
        lo   = int'($urandom_range(255 - span));
        for (int i = 0; i < N; i++) w[i] = W'(lo + int'($urandom_range(span)));
      end
      apply(w);
    end

    $display("median from lowest row-high: %0d, from median of row medians: %0d, from highest row-low: %0d",
             n_from_minh, n_from_medm, n_from_maxl);
    $display("centre impulses replaced: %0d, windows with ties: %0d", n_impulse_removed, n_ties);
    checks++;
    if (n_from_minh == 0) begin failures++; $display("FAIL: lowest row-high path never used"); end
    checks++;
    if (n_from_medm == 0) begin failures++; $display("FAIL: row-median path never used"); end
    checks++;
    if (n_from_maxl == 0) begin failures++; $display("FAIL: highest row-low path never used"); end
    checks++;
    if (n_impulse_removed == 0) begin failures++; $display("FAIL: no impulse removed"); end
    checks++;
    if (n_ties == 0) begin failures++; $display("FAIL: no ties"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
