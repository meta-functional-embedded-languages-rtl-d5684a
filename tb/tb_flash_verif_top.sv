// tb_flash_verif_top: end-to-end test of the top at its default parameters.
//
// Runs all four parts of the top at once for 4000 cycles:
//  * the compiled default program
//      While w (Sequential Delay (Parallel (IfThenElse v Shout Skip) Delay))
//    with random w, v and start pulses given while it is idle, against a
//    reference derived from the language timing (an iteration re-enters the
//    loop two cycles after it was entered and shouts after one cycle if v);
//    the program's own observer must stay high;
//  * the seven temporal induction cases with random hole behaviour (While:
//    a body finishes only after it was started): every ok must stay high;
//  * the set register and the multiplexer with its observer, random inputs;
//  * the Esterel observers on a well-behaved random activation trace (all
//    invariants high), with one deliberately malformed finish encoding
//    (f2 without f1) every 500 cycles, which invariant 1 must flag.
// Each mechanism is counted and a failure is counted for any that never
// happened: loop iteration, loop exit, loop not entered, then branch, else
// branch, synchroniser waiting for its slower branch, outer finish of each
// induction case, set-register load and hold, Esterel double finish, and
// Esterel violation caught.
module tb_flash_verif_top;
  import flash_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, shout, finish, prog_ok;
  logic [1:0] cond;  // {v, w}
  logic [6:0] ic_start, ic_cond, ic_p_shout, ic_p_finish, ic_q_shout, ic_q_finish;
  logic [6:0] ic_p_start, ic_q_start, ic_shout, ic_finish, ic_ok;
  logic sr_set, sr_new, sr_now, mux_s, mux_a, mux_b, mux_o, mux_ok;
  logic est_go, est_e, est_f1, est_f2, est_f3, est_used_well;
  logic [5:0] est_inv;

  flash_verif_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_iter = 0, n_exit = 0, n_empty = 0, n_then = 0, n_else = 0, n_wait = 0;
  int n_load = 0, n_hold = 0, n_double = 0, n_caught = 0;
  int n_case_fin [7];

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  task automatic need(int count, string what);
    checks++;
    $display("  %-34s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    // program reference state
    bit active; int next_entry, shout_at, started_at;
    logic entering, exp_shout, exp_finish;
    // induction-case state
    bit body_started;
    // set register reference
    logic sr_old, sr_exp;
    // Esterel environment state
    bit est_running;

    start = 1'b0; cond = '0;
    {ic_start, ic_cond, ic_p_shout, ic_p_finish, ic_q_shout, ic_q_finish} = '0;
    {sr_set, sr_new, mux_s, mux_a, mux_b} = '0;
    {est_go, est_e, est_f1, est_f2, est_f3} = '0;
    foreach (n_case_fin[k]) n_case_fin[k] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    active = 1'b0; next_entry = -1; shout_at = -1; started_at = 0;
    body_started = 1'b0; sr_old = 1'b0; est_running = 1'b0;

    for (int cyc = 0; cyc < 4000; cyc++) begin
      // ---- stimulus ----
      start   = !active && (($urandom % 4) == 0);
      cond[0] = 1'(($urandom % 4) != 0);
      cond[1] = 1'($urandom);

      ic_start    = 7'($urandom) & 7'($urandom) & 7'($urandom);
      ic_cond     = 7'($urandom);
      ic_p_shout  = 7'($urandom);
      ic_q_shout  = 7'($urandom);
      ic_p_finish = 7'($urandom) & 7'($urandom);
      ic_q_finish = 7'($urandom) & 7'($urandom);
      if (!body_started) ic_p_finish[F_WHILE] = 1'b0;

      sr_set = 1'(($urandom % 4) == 0);
      sr_new = 1'($urandom);
      {mux_s, mux_a, mux_b} = 3'($urandom);

      est_go = 1'(($urandom % 3) == 0);
      est_f1 = (est_running || est_go) && (($urandom % 3) == 0);
      if (est_go && est_running && !est_f1) est_go = 1'b0;
      est_f2 = est_go && est_running && est_f1 && (($urandom % 2) == 0);
      est_f3 = 1'b0;
      est_e  = 1'($urandom);
      if (cyc % 500 == 499) begin   // malformed encoding (0,1)
        est_f1 = 1'b0; est_f2 = 1'b1; est_go = 1'b0;
      end
      #1;

      // ---- compiled program ----
      entering   = start || (active && cyc == next_entry);
      exp_shout  = active && (cyc == shout_at) && cond[1];
      exp_finish = entering && !cond[0];
      // the Parallel joins here, one cycle after its left branch finished:
      // the synchroniser has held that finish while the right Delay ran
      if (active && cyc == next_entry && cyc == shout_at + 1) n_wait++;
      if (active && cyc == shout_at) begin
        if (cond[1]) n_then++; else n_else++;
      end
      if (start) started_at = cyc;
      if (entering && cond[0]) begin
        if (!start) n_iter++;
        active = 1'b1; shout_at = cyc + 1; next_entry = cyc + 2;
      end else if (entering) begin
        active = 1'b0;
        if (cyc == started_at) n_empty++; else n_exit++;
      end
      check(shout, exp_shout, "program shout");
      check(finish, exp_finish, "program finish");
      check(prog_ok, 1'b1, "program observer");

      // ---- induction cases ----
      for (int k = 0; k < 7; k++) begin
        check(ic_ok[k], 1'b1, $sformatf("induction case %0d", k));
        if (ic_finish[k]) n_case_fin[k]++;
      end
      if (ic_p_start[F_WHILE]) body_started = 1'b1;
      if (cyc % 40 == 39) begin   // start fresh histories from time to time
        @(negedge clk) rst_n = 1'b0;
        #1 rst_n = 1'b1;
        body_started = 1'b0; active = 1'b0; sr_old = 1'b0; est_running = 1'b0;
        continue;
      end

      // ---- Shade examples ----
      sr_exp = sr_set ? sr_new : sr_old;
      check(sr_now, sr_exp, "set register");
      if (sr_set) n_load++; else n_hold++;
      sr_old = sr_exp;
      check(mux_o, mux_s ? mux_b : mux_a, "mux output");
      check(mux_ok, 1'b1, "mux observer");

      // ---- Esterel observers ----
      if (cyc % 500 == 499) begin
        check(est_inv[0], 1'b0, "Esterel invariant 1 flags (f1,f2) = (0,1)");
        if (!est_inv[0]) n_caught++;
        est_running = 1'b0;
        // the malformed trace breaks the environment: restart the histories
        @(negedge clk) rst_n = 1'b0;
        #1 rst_n = 1'b1;
        body_started = 1'b0; active = 1'b0; sr_old = 1'b0;
        continue;
      end else begin
        for (int i = 0; i < 6; i++) check(est_inv[i], 1'b1, $sformatf("Esterel invariant %0d", i + 1));
        check(est_used_well, 1'b1, "Esterel environment well behaved");
      end
      if (est_f2) n_double++;
      est_running = (int'(est_go) + int'(est_running) - int'(est_f1) - int'(est_f2)) > 0;

      @(negedge clk);
    end

    $display("mechanisms:");
    need(n_iter,  "loop iterations (While restart)");
    need(n_exit,  "loop exits");
    need(n_empty, "loop not entered");
    need(n_then,  "IfThenElse then branch (Shout)");
    need(n_else,  "IfThenElse else branch (Skip)");
    need(n_wait,  "synchroniser waiting cycles");
    for (int k = 0; k < 7; k++) need(n_case_fin[k], $sformatf("induction case %0d outer finish", k));
    need(n_load,  "set register loads");
    need(n_hold,  "set register holds");
    need(n_double, "Esterel double finish (f1,f2)=(1,1)");
    need(n_caught, "Esterel violation caught");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
