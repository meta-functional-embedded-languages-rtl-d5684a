// tb_flash_sync: random branch finishes against a reference that tracks,
// per branch, whether it has finished since the last join. The join must
// come in the cycle the later branch finishes. Counts joins where one
// branch waited, joins where both finished together, and second finishes
// of an already-waiting branch, which must be absorbed (a lost finish).
module tb_flash_sync;
  logic clk = 1'b0, rst_n = 1'b0;
  logic p_finish, q_finish, finish;
  int checks = 0, failures = 0, waited = 0, together = 0, absorbed = 0;

  flash_sync dut (.clk, .rst_n, .p_finish, .q_finish, .finish);

  always #5 clk = ~clk;

  initial begin
    logic p_seen, q_seen, exp;
    p_finish = 1'b1; q_finish = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    p_seen = 1'b0; q_seen = 1'b0;
    for (int i = 0; i < 400; i++) begin
      p_finish = 1'(($urandom % 4) == 0);
      q_finish = 1'(($urandom % 4) == 0);
      #1;
      exp = (p_finish || p_seen) && (q_finish || q_seen);
      checks++;
      if (finish !== exp) begin
        failures++;
        $display("FAIL cycle %0d: finish=%0b expected %0b", i, finish, exp);
      end
      if (exp && (p_seen || q_seen)) waited++;
      if (exp && p_finish && q_finish && !p_seen && !q_seen) together++;
      // a second finish from a branch that is already waiting is absorbed
      if (!exp && ((p_finish && p_seen) || (q_finish && q_seen))) absorbed++;
      if (exp) begin
        p_seen = 1'b0; q_seen = 1'b0;
      end else begin
        p_seen = p_seen || p_finish;
        q_seen = q_seen || q_finish;
      end
      @(negedge clk);
    end
    checks++;
    if (waited == 0 || together == 0 || absorbed == 0) begin
      failures++;
      $display("FAIL: waited=%0d together=%0d absorbed=%0d", waited, together, absorbed);
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
