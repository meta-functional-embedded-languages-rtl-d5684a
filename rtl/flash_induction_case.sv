// flash_induction_case: the observer circuit for one case of the structural
// induction proof of a Flash compiler invariant.
//
// The construct OP is compiled with empty sub-programs (holes): the holes'
// start wires are outputs of this circuit and their shout/finish wires are
// free inputs, which a model checker (or a random testbench) quantifies
// over. The invariant observer -- here obs_flash_started, "finish implies
// started sometime" -- is attached to the outer block and to each hole.
// The circuit's output is
//   TEMPORAL = 1:  always(inner oks) implies outer ok   (temporal induction)
//   TEMPORAL = 0:  inner oks now     implies outer ok   (naive induction)
// so the case is proved when ok is constantly high. For Skip, Shout and
// Delay there are no holes and ok is the outer observer alone.
//
// The naive form admits the counterexample in which a hole breaks the
// invariant once and then behaves; the temporal form, which keeps the hole's
// failure in memory, is the one this design proves with.
//
// Ports: start/cond of the construct; hole inputs p_/q_shout, p_/q_finish;
// hole outputs p_start, q_start; the construct's shout/finish; the three
// observer outputs and ok. All combinational apart from observer histories.
// The construction follows the document's recipe; fixing the invariant to
// obs_flash_started is this design's choice (swap the observer for others).
module flash_induction_case
  import flash_pkg::*;
#(
  parameter flash_op_e OP       = F_SEQ,
  parameter bit        TEMPORAL = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic cond,
  input  logic p_shout,
  input  logic p_finish,
  input  logic q_shout,
  input  logic q_finish,
  output logic p_start,
  output logic q_start,
  output logic shout,
  output logic finish,
  output logic p_ok,
  output logic q_ok,
  output logic outer_ok,
  output logic ok
);
  localparam bit HAS_P = OP inside {F_SEQ, F_ITE, F_PAR, F_WHILE};
  localparam bit HAS_Q = OP inside {F_SEQ, F_ITE, F_PAR};

  logic q_start_int;

  // The construct with its holes.
  case (OP)
    F_SKIP: begin : g_skip
      assign shout = 1'b0;  assign finish = start;
      assign p_start = 1'b0; assign q_start_int = 1'b0;
    end
    F_SHOUT: begin : g_shout
      assign shout = start; assign finish = start;
      assign p_start = 1'b0; assign q_start_int = 1'b0;
    end
    F_DELAY: begin : g_delay
      flash_delay u_c (.clk, .rst_n, .start, .shout, .finish);
      assign p_start = 1'b0; assign q_start_int = 1'b0;
    end
    F_SEQ: begin : g_seq
      flash_seq u_c (.start, .shout, .finish, .p_start, .p_shout, .p_finish,
                     .q_start(q_start_int), .q_shout, .q_finish);
    end
    F_ITE: begin : g_ite
      flash_ite u_c (.start, .cond, .shout, .finish, .p_start, .p_shout, .p_finish,
                     .q_start(q_start_int), .q_shout, .q_finish);
    end
    F_PAR: begin : g_par
      flash_par u_c (.clk, .rst_n, .start, .shout, .finish, .p_start, .p_shout,
                     .p_finish, .q_start(q_start_int), .q_shout, .q_finish);
    end
    default: begin : g_while
      flash_while u_c (.start, .cond, .shout, .finish, .p_start, .p_shout, .p_finish);
      assign q_start_int = 1'b0;
    end
  endcase
  assign q_start = q_start_int;

  // Observers on the outer block and on the holes.
  logic p_obs, q_obs;
  obs_flash_started u_outer (.clk, .rst_n, .start, .finish, .ok(outer_ok));
  obs_flash_started u_pobs  (.clk, .rst_n, .start(p_start), .finish(p_finish), .ok(p_obs));
  obs_flash_started u_qobs  (.clk, .rst_n, .start(q_start), .finish(q_finish), .ok(q_obs));
  assign p_ok = HAS_P ? p_obs : 1'b1;
  assign q_ok = HAS_Q ? q_obs : 1'b1;

  // Induction hypothesis: now, or always up to now.
  logic hyp_now, hyp_always, hyp;
  logic unused_some, unused_never, unused_once, unused_amo;
  assign hyp_now = p_ok & q_ok;
  shade_temporal u_hyp (
    .clk, .rst_n, .x(hyp_now),
    .sometimes(unused_some), .always_true(hyp_always), .never(unused_never),
    .once(unused_once), .at_most_once(unused_amo)
  );
  assign hyp = TEMPORAL ? hyp_always : hyp_now;

  assign ok = ~hyp | outer_ok;
endmodule
