// tb_dc_sort3: self-checking test of the three-comparator sorting group.
//
// Part 1 applies every (x, y, z) combination of a 4-bit instance (4,096
// cases, covering all orderings and ties). Part 2 applies 50,000 random
// triples to the default 8-bit instance. Expected high, median and low are
// found here by explicit pairwise swaps on integers. The group is
// combinational; results are sampled 1 ns after each input change.
`timescale 1ns/1ps
module tb_dc_sort3;
  logic [3:0] sx, sy, sz, shi, smed, slo;
  logic [7:0] x, y, z, hi, med, lo;
  int checks = 0, failures = 0;

  dc_sort3 #(.DATA_W(4)) dut_small (.x(sx), .y(sy), .z(sz), .hi(shi), .med(smed), .lo(slo));
  dc_sort3                dut       (.x(x),  .y(y),  .z(z),  .hi(hi),  .med(med),  .lo(lo));

  function automatic void ref_sort3(input int a, input int b, input int c,
                                    output int rhi, output int rmed, output int rlo);
    int t;
    if (a > b) begin t = a; a = b; b = t; end
    if (b > c) begin t = b; b = c; c = t; end
    if (a > b) begin t = a; a = b; b = t; end
    rlo = a; rmed = b; rhi = c;
  endfunction

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int eh, em, el;
    x = '0; y = '0; z = '0;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        for (int k = 0; k < 16; k++) begin
          sx = 4'(i); sy = 4'(j); sz = 4'(k);
          #1;
          ref_sort3(i, j, k, eh, em, el);
          checks++;
          if (int'(shi) != eh || int'(smed) != em || int'(slo) != el) begin
            failures++;
            if (failures < 10)
              $display("FAIL(4b) %0d %0d %0d -> %0d %0d %0d, expected %0d %0d %0d",
                       i, j, k, shi, smed, slo, eh, em, el);
          end
        end
    for (int n = 0; n < 50000; n++) begin
      x = 8'($urandom); y = 8'($urandom); z = 8'($urandom);
      #1;
      ref_sort3(int'(x), int'(y), int'(z), eh, em, el);
      checks++;
      if (int'(hi) != eh || int'(med) != em || int'(lo) != el) begin
        failures++;
        if (failures < 10)
          $display("FAIL(8b) %0d %0d %0d -> %0d %0d %0d, expected %0d %0d %0d",
                   x, y, z, hi, med, lo, eh, em, el);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
