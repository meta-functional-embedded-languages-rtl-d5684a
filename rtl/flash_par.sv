// flash_par: compilation scheme of `Parallel P Q` (fork-join).
//
// The start pulse starts both branches; the block shouts when either
// branch shouts (OR gate) and finishes through flash_sync once both branches
// have finished. P and Q are holes, as in flash_seq.
// Timing: finish comes in the cycle the later branch finishes.
// The scheme is the published Parallel scheme; the hole ports and the
// synchroniser's insides (see flash_sync) are this design's choice.
module flash_par (
  input  logic clk,
  input  logic rst_n,
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
    q_start = start;
    shout   = p_shout | q_shout;
  end

  flash_sync u_sync (
    .clk, .rst_n, .p_finish(p_finish), .q_finish(q_finish), .finish(finish)
  );
endmodule
