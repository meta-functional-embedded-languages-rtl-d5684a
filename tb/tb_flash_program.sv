// tb_flash_program: runs the default compiled program
//   While w (Sequential Delay (Parallel (IfThenElse v Shout Skip) Delay))
// with random w and v and random start pulses given only while the program
// is idle. The reference is the program's timing worked out from the
// language: each loop entry with w high starts an iteration that shouts one
// cycle later if v is high then, and re-enters the loop two cycles after
// its entry; an entry with w low finishes the program in that cycle.
// Checks shout and finish every cycle and the two-cycle iteration period.
module tb_flash_program;
  import flash_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start;
  logic [1:0] cond;  // {v, w}
  logic shout, finish;
  int checks = 0, failures = 0;
  int iterations = 0, runs = 0, empty_runs = 0, shouts = 0;

  flash_program dut (.clk, .rst_n, .start, .cond, .shout, .finish);

  always #5 clk = ~clk;

  initial begin
    bit active;
    int cyc, next_entry, shout_at, started_at;
    logic entering, exp_shout, exp_finish;
    start = 1'b0; cond = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    active = 1'b0; next_entry = -1; shout_at = -1; started_at = 0;
    for (cyc = 0; cyc < 3000; cyc++) begin
      start = !active && (($urandom % 4) == 0);
      cond[0] = 1'(($urandom % 4) != 0);  // w: loop continues 3 times in 4
      cond[1] = 1'($urandom);              // v
      #1;
      entering   = start || (active && cyc == next_entry);
      exp_shout  = active && (cyc == shout_at) && cond[1];
      exp_finish = entering && !cond[0];
      if (start) begin runs++; started_at = cyc; end
      if (entering && cond[0]) begin
        iterations++;
        active = 1'b1;
        shout_at = cyc + 1;
        next_entry = cyc + 2;
      end else if (entering) begin
        active = 1'b0;
        if (cyc == started_at) empty_runs++;
      end
      if (exp_shout) shouts++;
      checks += 2;
      if (shout !== exp_shout) begin
        failures++;
        $display("FAIL cycle %0d: shout=%0b expected %0b", cyc, shout, exp_shout);
      end
      if (finish !== exp_finish) begin
        failures++;
        $display("FAIL cycle %0d: finish=%0b expected %0b", cyc, finish, exp_finish);
      end
      @(negedge clk);
    end
    checks++;
    if (runs == 0 || empty_runs == 0 || iterations <= runs || shouts == 0) begin
      failures++;
      $display("FAIL coverage: runs=%0d empty_runs=%0d iterations=%0d shouts=%0d",
               runs, empty_runs, iterations, shouts);
    end
    $display("runs=%0d empty_runs=%0d iterations=%0d shouts=%0d", runs, empty_runs, iterations, shouts);
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
