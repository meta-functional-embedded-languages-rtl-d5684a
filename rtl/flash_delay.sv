// flash_delay: compilation scheme of the Flash `Delay` instruction.
//
// A one-cycle register from start to finish; the block never shouts.
// Timing: finish(t) = start(t-1); the register is low after reset (the
// document's delay elements start low unless stated otherwise).
// Follows the published Delay scheme; the reset is this design's choice.
module flash_delay (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic shout,
  output logic finish
);
  shade_delay #(.INIT(1'b0)) u_reg (.clk, .rst_n, .d(start), .q(finish));
  assign shout = 1'b0;
endmodule
