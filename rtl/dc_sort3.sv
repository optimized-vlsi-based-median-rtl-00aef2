// dc_sort3: a group of three data comparators that sorts three values.
//
// This is the repeated three-cell group of the median network:
//   DC-a compares x and y,
//   DC-b compares the low output of DC-a with z, and its low output is the
//        minimum of all three,
//   DC-c compares the high output of DC-a with the high output of DC-b; its
//        high output is the maximum and its low output the median.
// The median network uses it five times: once per window row (three
// instances), once on the three row medians and once for the final median.
//
// Interface: x, y, z in; hi >= med >= lo out, a permutation of the inputs.
// Purely combinational: three comparator delays on the longest path (x or y
// to med/hi).
//
// The wiring follows the described three-comparator group; only the port
// names are this implementation's.
module dc_sort3 #(
  parameter int unsigned DATA_W = mf_dc_pkg::PIXEL_W
) (
  input  logic [DATA_W-1:0] x,
  input  logic [DATA_W-1:0] y,
  input  logic [DATA_W-1:0] z,
  output logic [DATA_W-1:0] hi,
  output logic [DATA_W-1:0] med,
  output logic [DATA_W-1:0] lo
);

  logic [DATA_W-1:0] a_h, a_l;  // DC-a: max(x,y), min(x,y)
  logic [DATA_W-1:0] b_h;       // DC-b: max(min(x,y), z)

  data_comparator #(.DATA_W(DATA_W)) u_dc_a (.a(x),   .b(y),   .h(a_h), .l(a_l));
  data_comparator #(.DATA_W(DATA_W)) u_dc_b (.a(a_l), .b(z),   .h(b_h), .l(lo));
  data_comparator #(.DATA_W(DATA_W)) u_dc_c (.a(a_h), .b(b_h), .h(hi),  .l(med));

endmodule
