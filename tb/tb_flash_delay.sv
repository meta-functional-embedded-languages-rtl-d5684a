// tb_flash_delay: a Delay must finish exactly one cycle after each start
// and never shout.
module tb_flash_delay;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start, shout, finish;
  int checks = 0, failures = 0;

  flash_delay dut (.clk, .rst_n, .start, .shout, .finish);

  always #5 clk = ~clk;

  initial begin
    logic prev;
    start = 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    checks++;
    if (finish !== 1'b0) begin failures++; $display("FAIL finish high after reset"); end
    prev = 1'b0;
    for (int i = 0; i < 200; i++) begin
      start = 1'(($urandom % 3) == 0);
      #1;
      checks += 2;
      if (finish !== prev) begin failures++; $display("FAIL cycle %0d: finish=%0b expected %0b", i, finish, prev); end
      if (shout !== 1'b0)  begin failures++; $display("FAIL cycle %0d: shout high", i); end
      prev = start;
      @(negedge clk);
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
