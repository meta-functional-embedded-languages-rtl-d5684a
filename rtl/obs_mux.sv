// obs_mux: observer circuit for a two-input multiplexer.
//
// Property (from the document): if both data inputs are equal, the output
// equals them, whatever the select. ok = (a == b) implies (o == a).
// The observer sees the mux's inputs and output and drives ok high while the
// property holds; s is part of the observed interface but does not enter
// the property. Combinational.
// The property is the document's; nothing here is a free choice.
module obs_mux (
  input  logic s,
  input  logic a,
  input  logic b,
  input  logic o,
  output logic ok
);
  logic unused_s;
  always_comb begin
    unused_s = s;
    ok = ~(a ~^ b) | (o ~^ a);
  end
endmodule
