// flash_verif_top: a compiled Flash program together with the observer
// circuits that check the compiler.
//
// Four parts stand side by side, each with its own ports:
//  * prog:  the program PROG compiled by the recursive Flash compiler
//           (flash_program), with the "finish implies started" observer on
//           its interface (prog_ok).
//  * ic_*:  the seven structural-induction cases of that invariant, one per
//           Flash construct (index = flash_op_e value: Skip, Shout, Delay,
//           Seq, ITE, Par, While), in the temporal-induction form. Their
//           holes' shout/finish wires are inputs of the top, to be driven
//           freely; a case is proved when its ic_ok bit stays high.
//  * sr_*, mux_*: the Shade examples, the set-register loop and a
//           multiplexer with its observer (mux_ok).
//  * est_*: the Esterel control-path invariant observers, for a compiled
//           Esterel program attached from outside.
//
// The default program is
//   While w (Sequential Delay (Parallel (IfThenElse v Shout Skip) Delay))
// (w = cond[0], v = cond[1]). It is loop-free as a circuit: each iteration
// passes a Delay register before the body can finish. Programs whose loop
// body can finish in the cycle it starts compile to a combinational cycle
// (see flash_while).
//
// All sequential parts share clk and the asynchronous active-low rst_n.
module flash_verif_top
  import flash_pkg::*;
#(
  parameter int unsigned NODES = DEF_NODES,
  parameter int unsigned NCOND = DEF_NCOND,
  parameter flash_node_t [NODES-1:0] PROG = DEF_PROG
) (
  input  logic             clk,
  input  logic             rst_n,
  // compiled program
  input  logic             start,
  input  logic [NCOND-1:0] cond,
  output logic             shout,
  output logic             finish,
  output logic             prog_ok,
  // induction cases, one bit per construct
  input  logic [6:0]       ic_start,
  input  logic [6:0]       ic_cond,
  input  logic [6:0]       ic_p_shout,
  input  logic [6:0]       ic_p_finish,
  input  logic [6:0]       ic_q_shout,
  input  logic [6:0]       ic_q_finish,
  output logic [6:0]       ic_p_start,
  output logic [6:0]       ic_q_start,
  output logic [6:0]       ic_shout,
  output logic [6:0]       ic_finish,
  output logic [6:0]       ic_ok,
  // Shade examples
  input  logic             sr_set,
  input  logic             sr_new,
  output logic             sr_now,
  input  logic             mux_s,
  input  logic             mux_a,
  input  logic             mux_b,
  output logic             mux_o,
  output logic             mux_ok,
  // Esterel invariant observers
  input  logic             est_go,
  input  logic             est_e,
  input  logic             est_f1,
  input  logic             est_f2,
  input  logic             est_f3,
  output logic             est_used_well,
  output logic [5:0]       est_inv
);
  // Compiled program and its observer.
  flash_program #(.NODES(NODES), .NCOND(NCOND), .PROG(PROG)) u_prog (
    .clk, .rst_n, .start, .cond, .shout, .finish
  );
  obs_flash_started u_prog_obs (.clk, .rst_n, .start, .finish, .ok(prog_ok));

  // Induction cases.
  for (genvar k = 0; k < 7; k++) begin : g_case
    logic unused_p_ok, unused_q_ok, unused_outer_ok;
    flash_induction_case #(.OP(flash_op_e'(k)), .TEMPORAL(1'b1)) u_case (
      .clk, .rst_n,
      .start(ic_start[k]), .cond(ic_cond[k]),
      .p_shout(ic_p_shout[k]), .p_finish(ic_p_finish[k]),
      .q_shout(ic_q_shout[k]), .q_finish(ic_q_finish[k]),
      .p_start(ic_p_start[k]), .q_start(ic_q_start[k]),
      .shout(ic_shout[k]), .finish(ic_finish[k]),
      .p_ok(unused_p_ok), .q_ok(unused_q_ok), .outer_ok(unused_outer_ok),
      .ok(ic_ok[k])
    );
  end

  // Shade examples.
  shade_set_register u_sr (.clk, .rst_n, .set(sr_set), .new_val(sr_new), .now(sr_now));
  shade_mux u_mux (.s(mux_s), .a(mux_a), .b(mux_b), .o(mux_o));
  obs_mux   u_mux_obs (.s(mux_s), .a(mux_a), .b(mux_b), .o(mux_o), .ok(mux_ok));

  // Esterel observers.
  logic unused_was_running;
  esterel_observers u_est (
    .clk, .rst_n, .go(est_go), .e(est_e), .f1(est_f1), .f2(est_f2), .f3(est_f3),
    .used_well(est_used_well), .was_running(unused_was_running),
    .inv1(est_inv[0]), .inv2(est_inv[1]), .inv3(est_inv[2]),
    .inv4(est_inv[3]), .inv5(est_inv[4]), .inv6(est_inv[5])
  );
endmodule
