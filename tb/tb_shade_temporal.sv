// tb_shade_temporal: drives random streams (with a reset between runs) and
// compares each history output with a count of the high cycles and of all
// cycles since reset, including the current one.
module tb_shade_temporal;
  logic clk = 1'b0, rst_n = 1'b0;
  logic x;
  logic sometimes, always_true, never, once, at_most_once;
  int checks = 0, failures = 0;

  shade_temporal dut (.clk, .rst_n, .x, .sometimes, .always_true, .never, .once, .at_most_once);

  always #5 clk = ~clk;

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    int highs, cycles, density;
    x = 1'b0;
    for (int run = 0; run < 40; run++) begin
      @(negedge clk) rst_n = 1'b0;
      @(negedge clk) rst_n = 1'b1;
      highs = 0; cycles = 0;
      density = 1 + (run % 8);  // x high with probability 1/density
      for (int i = 0; i < 30; i++) begin
        x = (run % 8 == 7) ? 1'b1 : 1'(($urandom % density) == 0);
        #1;
        cycles++;
        if (x) highs++;
        check(sometimes,    highs >= 1,      "sometimes");
        check(always_true,  highs == cycles, "always");
        check(never,        highs == 0,      "never");
        check(once,         highs == 1,      "once");
        check(at_most_once, highs <= 1,      "at_most_once");
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
