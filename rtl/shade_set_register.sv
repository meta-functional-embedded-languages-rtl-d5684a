// shade_set_register: the document's loop example, a one-bit register.
//
// The output `now` is a multiplexer between the previous output (`old`, a
// delay gate with initial value low fed back from `now`) and `new_val`,
// selected by `set`. So now = set ? new_val : old, with old(0) = low.
// The loop is closed through the delay, so there is no combinational cycle.
//
// Ports: set, new_val in; now out (combinational from set/new_val).
// Follows the document's loop example; the reset is this design's choice.
module shade_set_register (
  input  logic clk,
  input  logic rst_n,
  input  logic set,
  input  logic new_val,
  output logic now
);
  logic old;

  shade_delay #(.INIT(1'b0)) u_old (
    .clk(clk), .rst_n(rst_n), .d(now), .q(old)
  );

  shade_mux u_mux (.s(set), .a(old), .b(new_val), .o(now));
endmodule
