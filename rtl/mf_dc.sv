// mf_dc: median filter for a 3x3 pixel window built only from data
// comparators (compare-and-swap cells).
//
// The nine pixels P0..P8 of the window arrive in parallel and the median M
// leaves in the same combinational pass. The network has 19 comparators in
// four levels:
//   1. Each window row (P0-P2, P3-P5, P6-P8) is sorted by a three-comparator
//      group (DC-1..3, DC-6..8, DC-15..17) into high Hi, median Mi, low Li.
//   2. Two comparators keep the lowest of the row highs H1, H2, H3
//      (DC-4, DC-5); two keep the highest of the row lows L1, L2, L3
//      (DC-18, DC-19); a three-comparator group takes the median of the row
//      medians M1, M2, M3 (DC-9..11).
//   3. A last three-comparator group (DC-12..14) takes the median of those
//      three values; its final comparator's low output is M.
// Why this gives the true median: the lowest row-high is larger than or
// equal to at least five pixels, the highest row-low is smaller than or
// equal to at least five, and the median of the three candidates is the
// fifth smallest of the nine.
//
// Interface: p0..p8 in (DATA_W bits each, unsigned), median out. There is no
// clock: the output is valid one network delay (9 comparator levels on the
// longest path) after the inputs settle, and a new window can be applied
// every evaluation. Registers around the network, and the line buffers that
// would cut the windows out of an image, belong to the surrounding system.
//
// The network, its grouping and its comparator numbering follow the
// described design; the width parameter (default 8-bit pixels) and the
// assignment of DC-4/DC-5 and DC-18/DC-19 to particular pairs of inputs are
// this implementation's choices.
module mf_dc #(
  parameter int unsigned DATA_W = mf_dc_pkg::PIXEL_W
) (
  input  logic [DATA_W-1:0] p0,
  input  logic [DATA_W-1:0] p1,
  input  logic [DATA_W-1:0] p2,
  input  logic [DATA_W-1:0] p3,
  input  logic [DATA_W-1:0] p4,
  input  logic [DATA_W-1:0] p5,
  input  logic [DATA_W-1:0] p6,
  input  logic [DATA_W-1:0] p7,
  input  logic [DATA_W-1:0] p8,
  output logic [DATA_W-1:0] median
);

  // Row results.
  logic [DATA_W-1:0] h1, m1, l1;
  logic [DATA_W-1:0] h2, m2, l2;
  logic [DATA_W-1:0] h3, m3, l3;

  // Level 2 results.
  logic [DATA_W-1:0] dc4_l, dc18_h;      // partial min / max
  logic [DATA_W-1:0] min_h, max_l, med_m;
  logic [DATA_W-1:0] dc4_h, dc5_h, dc18_l, dc19_l;  // discarded outputs
  logic [DATA_W-1:0] g9_hi, g9_lo, g12_hi, g12_lo;  // discarded outputs

  // Level 1: sort each row (DC-1..3, DC-6..8, DC-15..17).
  dc_sort3 #(.DATA_W(DATA_W)) u_row0 (.x(p0), .y(p1), .z(p2), .hi(h1), .med(m1), .lo(l1));
  dc_sort3 #(.DATA_W(DATA_W)) u_row1 (.x(p3), .y(p4), .z(p5), .hi(h2), .med(m2), .lo(l2));
  dc_sort3 #(.DATA_W(DATA_W)) u_row2 (.x(p6), .y(p7), .z(p8), .hi(h3), .med(m3), .lo(l3));

  // Level 2a: lowest of the row highs (DC-4, DC-5).
  data_comparator #(.DATA_W(DATA_W)) u_dc4  (.a(h1),    .b(h2), .h(dc4_h), .l(dc4_l));
  data_comparator #(.DATA_W(DATA_W)) u_dc5  (.a(dc4_l), .b(h3), .h(dc5_h), .l(min_h));

  // Level 2b: highest of the row lows (DC-18, DC-19).
  data_comparator #(.DATA_W(DATA_W)) u_dc18 (.a(l2),    .b(l3),     .h(dc18_h), .l(dc18_l));
  data_comparator #(.DATA_W(DATA_W)) u_dc19 (.a(l1),    .b(dc18_h), .h(max_l),  .l(dc19_l));

  // Level 2c: median of the row medians (DC-9..11).
  dc_sort3 #(.DATA_W(DATA_W)) u_mid (.x(m1), .y(m2), .z(m3), .hi(g9_hi), .med(med_m), .lo(g9_lo));

  // Level 3: median of the three candidates (DC-12..14); M is the low output
  // of DC-14, which is the med output of the group.
  dc_sort3 #(.DATA_W(DATA_W)) u_final (.x(min_h), .y(med_m), .z(max_l),
                                       .hi(g12_hi), .med(median), .lo(g12_lo));

endmodule
