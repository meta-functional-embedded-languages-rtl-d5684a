// flash_while: compilation scheme of `While c P`.
//
// An OR gate merges the block's start with the body's finish ("the loop is
// entered"). If cond is high at that moment the body is (re)started, if it is
// low the block finishes (two AND gates, one with an inverted cond input).
// The body's shout is the block's shout. P is a hole, as in flash_seq.
//
// The scheme feeds the body's finish back to its start without a register,
// so a body that can finish in the cycle it starts closes a combinational
// loop. Flash programs keep such bodies out of loops or accept that the loop
// settles within the cycle; see the README.
// The gate structure is the published While scheme; the hole ports are this
// design's choice.
module flash_while (
  input  logic start,
  input  logic cond,
  output logic shout,
  output logic finish,
  output logic p_start,
  input  logic p_shout,
  input  logic p_finish
);
  logic enter;
  always_comb begin
    enter   = start | p_finish;
    p_start = enter & cond;
    finish  = enter & ~cond;
    shout   = p_shout;
  end
endmodule
