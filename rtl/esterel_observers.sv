// esterel_observers: observer circuits for the control-path invariants of
// compiled Esterel programs.
//
// A compiled Esterel program has a start input `go`, an emit output `e` and
// up to three finish wires f1, f2, f3. Two finishes in one cycle are encoded
// as f1 = f2 = 1, one finish as f1 = 1, f2 = 0. Each output is high while
// its invariant holds:
//   inv1  f2 implies f1                     (the encoding is never (0,1))
//   inv2  never(go) implies not (f1 or f2)  (no start, no finish)
//   inv3  once(go) implies never(f2) and (never(f1) or once(f1))
//                                           (single start, single finish)
//   inv4  always(used_well) implies
//           (f1 implies go or was_running) and (f2 implies go and was_running)
//                                           (one finish for each start)
//   inv5  always(used_well) implies (f2 implies f2 was low last cycle)
//   inv6  always(used_well) implies not f3  (a third finish wire is unused)
//
// The invariant formulas follow the document. Its `once` is taken as
// "exactly once so far" (shade_temporal.once). The document leaves the
// environment observer used_well and the running flag unspecified beyond
// their purpose; here the observer counts the program's live activations:
// running(t) = go + was_running - f1 - f2 - f3 > 0, was_running is that
// value one cycle earlier (low after reset), and used_well = not go, or the
// program is not running, or it finishes (f1) in the same cycle -- the
// program may be restarted only once its previous run has ended.
//
// Ports: clk, rst_n, go, e, f1, f2, f3 in; inv1..inv6, used_well,
// was_running out. e does not enter any of the invariants.
module esterel_observers (
  input  logic clk,
  input  logic rst_n,
  input  logic go,
  input  logic e,
  input  logic f1,
  input  logic f2,
  input  logic f3,
  output logic used_well,
  output logic was_running,
  output logic inv1,
  output logic inv2,
  output logic inv3,
  output logic inv4,
  output logic inv5,
  output logic inv6
);
  // History circuits.
  logic go_never, go_once, f1_never, f1_once, f2_never, uw_always;
  logic go_some, go_always, go_amo, f1_some, f1_always, f1_amo;
  logic f2_some, f2_always, f2_once, f2_amo, uw_some, uw_never, uw_once, uw_amo;

  shade_temporal u_go (.clk, .rst_n, .x(go), .sometimes(go_some), .always_true(go_always),
                       .never(go_never), .once(go_once), .at_most_once(go_amo));
  shade_temporal u_f1 (.clk, .rst_n, .x(f1), .sometimes(f1_some), .always_true(f1_always),
                       .never(f1_never), .once(f1_once), .at_most_once(f1_amo));
  shade_temporal u_f2 (.clk, .rst_n, .x(f2), .sometimes(f2_some), .always_true(f2_always),
                       .never(f2_never), .once(f2_once), .at_most_once(f2_amo));
  shade_temporal u_uw (.clk, .rst_n, .x(used_well), .sometimes(uw_some), .always_true(uw_always),
                       .never(uw_never), .once(uw_once), .at_most_once(uw_amo));

  // Activation count and the running flag.
  logic [2:0] live;
  logic       running;
  always_comb begin
    live    = 3'(go) + 3'(was_running);
    live    = live - 3'(f1) - 3'(f2) - 3'(f3);
    // live is in -3..2; negative (bit 2 set) means more finishes than runs.
    running = ~live[2] & (live != 3'd0);
  end
  shade_delay #(.INIT(1'b0)) u_run (.clk, .rst_n, .d(running), .q(was_running));

  // f2 was low in the previous cycle: delay T (inv f2).
  logic f2_low_before;
  shade_delay #(.INIT(1'b1)) u_f2d (.clk, .rst_n, .d(~f2), .q(f2_low_before));

  logic unused_e;
  always_comb begin
    unused_e  = e;
    used_well = ~go | ~was_running | f1;
    inv1 = ~f2 | f1;
    inv2 = ~go_never | ~(f1 | f2);
    inv3 = ~go_once | (f2_never & (f1_never | f1_once));
    inv4 = ~uw_always | ((~f1 | go | was_running) & (~f2 | (go & was_running)));
    inv5 = ~uw_always | ~f2 | f2_low_before;
    inv6 = ~uw_always | ~f3;
  end
endmodule
