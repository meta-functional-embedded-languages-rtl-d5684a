// tb_shade_delay: checks the delay gate with both initial values.
// After reset q must equal INIT; afterwards q must equal d of the previous
// clock edge, for random d.
module tb_shade_delay;
  logic clk = 1'b0, rst_n = 1'b0;
  logic d;
  logic q0, q1;
  int checks = 0, failures = 0;

  shade_delay #(.INIT(1'b0)) dut0 (.clk, .rst_n, .d, .q(q0));
  shade_delay #(.INIT(1'b1)) dut1 (.clk, .rst_n, .d, .q(q1));

  always #5 clk = ~clk;

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    logic prev;
    d = 1'b1;
    repeat (2) @(posedge clk);
    #1;
    check(q0, 1'b0, "INIT=0 after reset");
    check(q1, 1'b1, "INIT=1 after reset");
    @(negedge clk) rst_n = 1'b1;
    d = 1'b0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      d = 1'($urandom);
      prev = d;
      @(posedge clk); #1;
      check(q0, prev, "q0 follows d");
      check(q1, prev, "q1 follows d");
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
