// obs_flash_started: observer for the Flash compiler invariant "a program
// that finishes must have been started at some point up to now":
// ok = finish implies sometimes(start).
//
// Ports: start, finish of the observed program; ok high while the invariant
// holds. ok is combinational in the current start/finish plus the history
// flag of shade_temporal; rst_n clears the history.
// The property is the document's; sometimes() includes the current cycle,
// which is how this design reads "at some point in time".
module obs_flash_started (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic finish,
  output logic ok
);
  logic started;
  logic unused_always, unused_never, unused_once, unused_amo;

  shade_temporal u_hist (
    .clk, .rst_n, .x(start),
    .sometimes(started), .always_true(unused_always), .never(unused_never),
    .once(unused_once), .at_most_once(unused_amo)
  );

  assign ok = ~finish | started;
endmodule
