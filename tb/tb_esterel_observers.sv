// tb_esterel_observers: drives random interface traces of a compiled
// Esterel program (go, e, f1, f2, f3), each after a reset, and compares the
// six invariant outputs with a reference built from integer counts of
// starts and finishes since reset and a running flag (activations left
// after each cycle's finishes, counted as go + was_running - finishes). Traces are drawn both
// from a well-behaved generator (finishes only for live activations,
// restarts only when the previous run ends) and from an unconstrained one,
// so that every invariant is seen both holding and failing.
module tb_esterel_observers;
  logic clk = 1'b0, rst_n = 1'b0;
  logic go, e, f1, f2, f3;
  logic used_well, was_running, inv1, inv2, inv3, inv4, inv5, inv6;
  int checks = 0, failures = 0;
  int fails_seen [6];

  esterel_observers dut (.clk, .rst_n, .go, .e, .f1, .f2, .f3, .used_well, .was_running,
                         .inv1, .inv2, .inv3, .inv4, .inv5, .inv6);

  always #5 clk = ~clk;

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    int n_go, n_f1, n_f2, live, prev_live;
    bit uw_all, prev_f2, wr, uw;
    logic [5:0] exp;
    {go, e, f1, f2, f3} = '0;
    foreach (fails_seen[i]) fails_seen[i] = 0;
    for (int run = 0; run < 300; run++) begin
      @(negedge clk) rst_n = 1'b0;
      @(negedge clk) rst_n = 1'b1;
      n_go = 0; n_f1 = 0; n_f2 = 0; live = 0; uw_all = 1; prev_f2 = 0;
      for (int t = 0; t < 16; t++) begin
        wr = (live > 0);
        if (run % 2 == 0) begin
          // well-behaved: start when idle (or as the run ends), finish live runs
          go = 1'(($urandom % 3) == 0);
          f1 = (wr || go) && (($urandom % 3) == 0);
          if (go && wr && !f1) go = 1'b0;
          f2 = go && wr && f1 && (($urandom % 2) == 0);
          f3 = 1'b0;
          if (run % 20 == 2) f3 = f1 && f2;   // occasionally a third finish
        end else begin
          {go, f1, f2} = 3'($urandom) & 3'($urandom);
          f3 = 1'(($urandom % 8) == 0);
        end
        e = 1'($urandom);
        #1;
        if (go) n_go++;
        if (f1) n_f1++;
        if (f2) n_f2++;
        uw = !go || !wr || f1;
        uw_all = uw_all && uw;
        exp[0] = !f2 || f1;
        exp[1] = (n_go != 0) || !(f1 || f2);
        exp[2] = (n_go != 1) || (n_f2 == 0 && n_f1 <= 1);
        exp[3] = !uw_all || ((!f1 || go || wr) && (!f2 || (go && wr)));
        exp[4] = !uw_all || !f2 || !prev_f2;
        exp[5] = !uw_all || !f3;
        check(used_well, uw, "used_well");
        check(was_running, wr, "was_running");
        check(inv1, exp[0], "inv1");
        check(inv2, exp[1], "inv2");
        check(inv3, exp[2], "inv3");
        check(inv4, exp[3], "inv4");
        check(inv5, exp[4], "inv5");
        check(inv6, exp[5], "inv6");
        for (int i = 0; i < 6; i++) if (!exp[i]) fails_seen[i]++;
        // the running flag: any activation left after this cycle's finishes
        live = int'(go) + int'(wr) - int'(f1) - int'(f2) - int'(f3);
        live = (live > 0) ? 1 : 0;
        prev_f2 = f2;
        @(negedge clk);
      end
    end
    for (int i = 0; i < 6; i++) begin
      checks++;
      if (fails_seen[i] == 0) begin
        failures++;
        $display("FAIL: invariant %0d never seen failing", i + 1);
      end
    end
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
