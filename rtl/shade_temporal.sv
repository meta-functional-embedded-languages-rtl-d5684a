// shade_temporal: history circuits over one signal x, each covering the past
// up to and including the current cycle.
//
//   sometimes    x has been high at least once
//   always_true  x has been high in every cycle
//   never        x has never been high
//   once         x has been high exactly once
//   at_most_once x has been high at most once
//
// sometimes and always are the document's loops `or2(x, delay F ok)` and
// `and2(x, delay T ok)`; never and once are only named there and are built
// the same way here: never is `and2(not x, delay T ok)`, once and
// at_most_once come from two delayed flags, "seen before" and "seen at least
// twice before". The document defines `once` as exactly once and, where it
// uses it in an Esterel invariant, describes it as at most once; both are
// provided.
//
// Timing: every output is combinational in x of the current cycle plus one
// register per flag; rst_n starts a fresh history.
module shade_temporal (
  input  logic clk,
  input  logic rst_n,
  input  logic x,
  output logic sometimes,
  output logic always_true,
  output logic never,
  output logic once,
  output logic at_most_once
);
  logic some_q, all_q, never_q, seen_q, multi_q;
  logic seen_now, multi_now;

  always_comb begin
    sometimes    = x | some_q;
    always_true  = x & all_q;
    never        = ~x & never_q;
    seen_now     = x | seen_q;
    multi_now    = multi_q | (x & seen_q);
    once         = seen_now & ~multi_now;
    at_most_once = ~multi_now;
  end

  shade_delay #(.INIT(1'b0)) u_some  (.clk, .rst_n, .d(sometimes), .q(some_q));
  shade_delay #(.INIT(1'b1)) u_all   (.clk, .rst_n, .d(always_true),   .q(all_q));
  shade_delay #(.INIT(1'b1)) u_never (.clk, .rst_n, .d(never),     .q(never_q));
  shade_delay #(.INIT(1'b0)) u_seen  (.clk, .rst_n, .d(seen_now),  .q(seen_q));
  shade_delay #(.INIT(1'b0)) u_multi (.clk, .rst_n, .d(multi_now), .q(multi_q));
endmodule
