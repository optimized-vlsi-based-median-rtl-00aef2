// data_comparator: the data-comparator (DC) cell, a compare-and-swap of two
// unsigned values.
//
// One magnitude comparator evaluates A < B. Its result is the shared select
// line of two 2:1 multiplexers. The high multiplexer has A on data input 0
// and B on data input 1, so it passes B when A < B and A otherwise. The low
// multiplexer has the inputs the other way round (B on 0, A on 1), so it
// passes A when A < B and B otherwise. When A == B both outputs carry the
// same value, so the tie needs no special case.
//
// Interface: a, b in; h = max(a, b), l = min(a, b) out. Purely
// combinational, no clock and no latency.
//
// The comparator-plus-two-muxes structure and the multiplexer input order
// follow the described design; the parameterised width (default 8 bits) is
// this implementation's choice.
module data_comparator #(
  parameter int unsigned DATA_W = mf_dc_pkg::PIXEL_W
) (
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  output logic [DATA_W-1:0] h,
  output logic [DATA_W-1:0] l
);

  logic sel;  // 1 when A < B

  always_comb begin
    sel = (a < b);
    // High mux: data input 0 = A, data input 1 = B.
    h = sel ? b : a;
    // Low mux: data input 0 = B, data input 1 = A.
    l = sel ? a : b;
  end

endmodule
