// tb_obs_flash_started: random start/finish streams, each after a reset,
// against a reference that counts starts so far (current cycle included):
// ok = !finish || starts > 0. Also counts that both outcomes were seen.
module tb_obs_flash_started;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start, finish, ok;
  int checks = 0, failures = 0, violations = 0;

  obs_flash_started dut (.clk, .rst_n, .start, .finish, .ok);

  always #5 clk = ~clk;

  initial begin
    int starts;
    logic exp;
    start = 1'b0; finish = 1'b0;
    for (int run = 0; run < 50; run++) begin
      @(negedge clk) rst_n = 1'b0;
      @(negedge clk) rst_n = 1'b1;
      starts = 0;
      for (int i = 0; i < 20; i++) begin
        start  = 1'(($urandom % 6) == 0);
        finish = 1'(($urandom % 3) == 0);
        #1;
        if (start) starts++;
        exp = !finish || (starts > 0);
        if (!exp) violations++;
        checks++;
        if (ok !== exp) begin
          failures++;
          $display("FAIL run %0d cycle %0d: ok=%0b expected %0b", run, i, ok, exp);
        end
        @(negedge clk);
      end
    end
    checks++;
    if (violations == 0) begin
      failures++;
      $display("FAIL: no violating trace was generated");
    end
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
