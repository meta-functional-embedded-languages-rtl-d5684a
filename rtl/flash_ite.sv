// flash_ite: compilation scheme of `IfThenElse c P Q`.
//
// Two AND gates steer the start pulse: to P when cond is high, to Q when it
// is low (the second gate has an inverted cond input). The block shouts when
// either branch shouts and finishes when either branch finishes (OR gates).
// P and Q are holes, as in flash_seq. Combinational.
// The scheme is the published IfThenElse scheme; the hole ports are this
// design's choice.
module flash_ite (
  input  logic start,
  input  logic cond,
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
    p_start = start & cond;
    q_start = start & ~cond;
    shout   = p_shout | q_shout;
    finish  = p_finish | q_finish;
  end
endmodule
