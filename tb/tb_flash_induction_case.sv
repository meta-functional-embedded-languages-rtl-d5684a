// tb_flash_induction_case: simulates the induction-case observers for the
// invariant "finish implies started sometime".
//
// 1. All seven cases in the temporal form, with the holes' shout/finish
//    driven at random (the hole outputs are universally quantified in the
//    proof): ok must stay high. For While, the hole may finish only after it
//    was started in an earlier cycle (a loop body takes at least one cycle);
//    without that, see 3.
// 2. The document's counterexample for the naive Sequential case, two
//    cycles: P finishes unstarted in cycle 1, Q finishes in cycle 2. Naive
//    ok must drop in cycle 2; the temporal form must stay high. Every wire
//    of the document's table is checked.
// 3. A While hole that finishes in the cycle it is restarted by its own
//    finish (cond high), then finishes again with cond low: the temporal
//    While case must report a violation (ok low) in the second cycle.
module tb_flash_induction_case;
  import flash_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [6:0] start, cond, p_shout, p_finish, q_shout, q_finish;
  logic [6:0] p_start, q_start, shout, finish, p_ok, q_ok, outer_ok, ok;
  // naive Sequential case
  logic n_start, n_p_finish, n_q_finish;
  logic n_p_start, n_q_start, n_shout, n_finish, n_p_ok, n_q_ok, n_outer_ok, n_ok;
  int checks = 0, failures = 0;

  for (genvar k = 0; k < 7; k++) begin : g_case
    flash_induction_case #(.OP(flash_op_e'(k)), .TEMPORAL(1'b1)) dut (
      .clk, .rst_n, .start(start[k]), .cond(cond[k]),
      .p_shout(p_shout[k]), .p_finish(p_finish[k]), .q_shout(q_shout[k]), .q_finish(q_finish[k]),
      .p_start(p_start[k]), .q_start(q_start[k]), .shout(shout[k]), .finish(finish[k]),
      .p_ok(p_ok[k]), .q_ok(q_ok[k]), .outer_ok(outer_ok[k]), .ok(ok[k]));
  end

  flash_induction_case #(.OP(F_SEQ), .TEMPORAL(1'b0)) dut_naive (
    .clk, .rst_n, .start(n_start), .cond(1'b0),
    .p_shout(1'b0), .p_finish(n_p_finish), .q_shout(1'b0), .q_finish(n_q_finish),
    .p_start(n_p_start), .q_start(n_q_start), .shout(n_shout), .finish(n_finish),
    .p_ok(n_p_ok), .q_ok(n_q_ok), .outer_ok(n_outer_ok), .ok(n_ok));

  always #5 clk = ~clk;

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  task automatic do_reset();
    @(negedge clk) rst_n = 1'b0;
    @(negedge clk) rst_n = 1'b1;
  endtask

  initial begin
    bit body_started;
    int outer_finishes;
    {start, cond, p_shout, p_finish, q_shout, q_finish} = '0;
    {n_start, n_p_finish, n_q_finish} = '0;

    // 1. random holes
    outer_finishes = 0;
    for (int run = 0; run < 100; run++) begin
      do_reset();
      body_started = 1'b0;
      for (int t = 0; t < 30; t++) begin
        start    = 7'($urandom) & 7'($urandom) & 7'($urandom);
        cond     = 7'($urandom);
        p_shout  = 7'($urandom);
        q_shout  = 7'($urandom);
        p_finish = 7'($urandom) & 7'($urandom);
        q_finish = 7'($urandom) & 7'($urandom);
        if (!body_started) p_finish[F_WHILE] = 1'b0;
        #1;
        for (int k = 0; k < 7; k++) begin
          check(ok[k], 1'b1, $sformatf("case %0d ok", k));
          if (finish[k]) outer_finishes++;
        end
        if (p_start[F_WHILE]) body_started = 1'b1;
        @(negedge clk);
      end
    end
    checks++;
    if (outer_finishes == 0) begin failures++; $display("FAIL: no outer finish seen"); end

    // 2. the counterexample for naive induction on Sequential
    {start, cond, p_shout, p_finish, q_shout, q_finish} = '0;
    do_reset();
    n_start = 1'b0; n_p_finish = 1'b1; n_q_finish = 1'b0;   // time unit 1
    start[F_SEQ] = 1'b0; p_finish[F_SEQ] = 1'b1; q_finish[F_SEQ] = 1'b0;
    #1;
    check(n_finish, 1'b0, "t1 finish");   check(n_outer_ok, 1'b1, "t1 inv");
    check(n_p_ok,   1'b0, "t1 inv1");
    check(n_q_start, 1'b1, "t1 start2");  check(n_q_ok, 1'b1, "t1 inv2");
    check(n_ok, 1'b1, "t1 naive ok");     check(ok[F_SEQ], 1'b1, "t1 temporal ok");
    @(negedge clk);
    n_p_finish = 1'b0; n_q_finish = 1'b1;                   // time unit 2
    p_finish[F_SEQ] = 1'b0; q_finish[F_SEQ] = 1'b1;
    #1;
    check(n_finish, 1'b1, "t2 finish");   check(n_outer_ok, 1'b0, "t2 inv");
    check(n_p_ok,   1'b1, "t2 inv1");
    check(n_q_start, 1'b0, "t2 start2");  check(n_q_ok, 1'b1, "t2 inv2");
    check(n_ok, 1'b0, "t2 naive ok (counterexample)");
    check(ok[F_SEQ], 1'b1, "t2 temporal ok");
    @(negedge clk);

    // 3. While hole restarting itself
    {start, cond, p_shout, p_finish, q_shout, q_finish} = '0;
    {n_start, n_p_finish, n_q_finish} = '0;
    do_reset();
    p_finish[F_WHILE] = 1'b1; cond[F_WHILE] = 1'b1;
    #1;
    check(p_start[F_WHILE], 1'b1, "while: body restarted by its own finish");
    check(ok[F_WHILE], 1'b1, "while: cycle 1 ok");
    @(negedge clk);
    cond[F_WHILE] = 1'b0;
    #1;
    check(finish[F_WHILE], 1'b1, "while: loop finishes");
    check(ok[F_WHILE], 1'b0, "while: unstarted finish reported");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
