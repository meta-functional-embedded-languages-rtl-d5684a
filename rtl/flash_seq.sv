// flash_seq: compilation scheme of `Sequential P Q`.
//
// The block's start starts P; P's finish starts Q; Q's finish is the block's
// finish; the block shouts whenever P or Q shouts (an OR gate).
// P and Q are "holes": the block drives their start and receives their
// shout and finish, so the same scheme serves for real sub-programs (in the
// compiler) and for free inputs (in an induction case).
// Combinational; the latency is that of P plus that of Q.
// The scheme is the published Sequential scheme; grouping the sub-program
// wires into hole ports is this design's choice.
module flash_seq (
  input  logic start,
  output logic shout,
  output logic finish,
  output logic p_start,
  input  logic p_shout,
  input  logic p_finish,
  output logic q_start,
  input  logic q_shout,
  input  logic q_finish
);
  always_comb begin
    p_start = start;
    q_start = p_finish;
    finish  = q_finish;
    shout   = p_shout | q_shout;
  end
endmodule
