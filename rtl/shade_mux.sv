// shade_mux: two-input multiplexer written, as in the document's example,
// from the primitive gates: o = (NOT s AND a) OR (s AND b).
//
// Ports: s (select), a (chosen when s = 0), b (chosen when s = 1), o.
// Purely combinational.
// The gate structure follows the document's example exactly.
module shade_mux (
  input  logic s,
  input  logic a,
  input  logic b,
  output logic o
);
  logic sel_a, sel_b;
  always_comb begin
    sel_a = ~s & a;
    sel_b = s & b;
    o     = sel_a | sel_b;
  end
endmodule
