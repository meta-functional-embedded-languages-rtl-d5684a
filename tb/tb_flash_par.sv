// tb_flash_par: the Parallel scheme with random hole behaviour: both
// branches start with the block, shout is the OR of the branch shouts, and
// the block finishes in the cycle by which both branches have finished.
module tb_flash_par;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start, shout, finish, p_start, p_shout, p_finish, q_start, q_shout, q_finish;
  int checks = 0, failures = 0, joins = 0;

  flash_par dut (.clk, .rst_n, .start, .shout, .finish, .p_start, .p_shout, .p_finish,
                 .q_start, .q_shout, .q_finish);

  always #5 clk = ~clk;

  initial begin
    logic p_seen, q_seen, exp_fin;
    {start, p_shout, p_finish, q_shout, q_finish} = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    p_seen = 1'b0; q_seen = 1'b0;
    for (int i = 0; i < 400; i++) begin
      {start, p_shout, q_shout} = 3'($urandom);
      p_finish = 1'(($urandom % 3) == 0);
      q_finish = 1'(($urandom % 3) == 0);
      #1;
      exp_fin = (p_finish || p_seen) && (q_finish || q_seen);
      checks++;
      if ({p_start, q_start, shout, finish} !== {start, start, p_shout || q_shout, exp_fin}) begin
        failures++;
        $display("FAIL cycle %0d: p_start=%0b q_start=%0b shout=%0b finish=%0b (exp finish %0b)",
                 i, p_start, q_start, shout, finish, exp_fin);
      end
      if (exp_fin) begin
        joins++;
        p_seen = 1'b0; q_seen = 1'b0;
      end else begin
        p_seen = p_seen || p_finish;
        q_seen = q_seen || q_finish;
      end
      @(negedge clk);
    end
    checks++;
    if (joins == 0) begin failures++; $display("FAIL: no join"); end
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
