// flash_sync: the synchroniser that joins the two branches of a Parallel.
//
// It finishes in the first cycle by which both branches have finished. A
// branch that finishes first is remembered in a flag (one per branch) until
// the other one finishes; both flags clear in the cycle the synchroniser
// finishes. A finish of both branches in the same cycle passes straight
// through. The document names this block but does not draw its insides;
// this flag-per-branch form is the simplest circuit with that behaviour.
//
// A branch finish that arrives while its flag is already set (a second
// finish from the same branch before the other has finished) is absorbed:
// one pulse on a finish wire can stand for only one termination, which is
// why a lost finish leaves the synchroniser waiting for the other branch.
//
// Ports: p_finish, q_finish in; finish out (combinational from the inputs
// and the flags). Flags are clear after reset.
module flash_sync (
  input  logic clk,
  input  logic rst_n,
  input  logic p_finish,
  input  logic q_finish,
  output logic finish
);
  logic p_wait_q, q_wait_q;
  logic p_done, q_done;

  always_comb begin
    p_done = p_finish | p_wait_q;
    q_done = q_finish | q_wait_q;
    finish = p_done & q_done;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_wait_q <= 1'b0;
      q_wait_q <= 1'b0;
    end else begin
      p_wait_q <= p_done & ~finish;
      q_wait_q <= q_done & ~finish;
    end
  end
endmodule
