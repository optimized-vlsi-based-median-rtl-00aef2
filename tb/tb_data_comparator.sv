// tb_data_comparator: exhaustive self-checking test of the data-comparator
// cell at its default 8-bit width.
//
// Every one of the 65,536 (A, B) pairs is applied; H must equal the larger
// and L the smaller value, worked out here with plain integer compares. The
// cell is combinational, so each result is sampled 1 ns after the inputs
// change. The test also counts how often each multiplexer select value
// (A < B and A >= B) was exercised, and that ties occurred.
`timescale 1ns/1ps
module tb_data_comparator;
  localparam int W = 8;

  logic [W-1:0] a, b, h, l;
  int checks = 0, failures = 0;
  int n_sel1 = 0, n_sel0 = 0, n_tie = 0;

  data_comparator #(.DATA_W(W)) dut (.a(a), .b(b), .h(h), .l(l));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_h, exp_l;
    for (int i = 0; i < (1 << W); i++) begin
      for (int j = 0; j < (1 << W); j++) begin
        a = W'(i);
        b = W'(j);
        #1;
        exp_h = (i > j) ? i : j;
        exp_l = (i > j) ? j : i;
        if (i < j) n_sel1++; else n_sel0++;
        if (i == j) n_tie++;
        checks++;
        if (int'(h) != exp_h || int'(l) != exp_l) begin
          failures++;
          if (failures < 10)
            $display("FAIL a=%0d b=%0d: h=%0d l=%0d, expected h=%0d l=%0d",
                     i, j, h, l, exp_h, exp_l);
        end
      end
    end
    $display("select=1 (A<B): %0d, select=0: %0d, ties: %0d", n_sel1, n_sel0, n_tie);
    checks++;
    if (n_sel1 == 0 || n_sel0 == 0 || n_tie == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
