// tb_shade_set_register: random set/new_val sequence against a reference
// register: now = set ? new_val : (value of now in the previous cycle),
// starting from low.
module tb_shade_set_register;
  logic clk = 1'b0, rst_n = 1'b0;
  logic set, new_val, now;
  logic ref_old;
  int checks = 0, failures = 0, loads = 0, holds = 0;

  shade_set_register dut (.clk, .rst_n, .set, .new_val, .now);

  always #5 clk = ~clk;

  initial begin
    logic exp;
    set = 1'b0; new_val = 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    ref_old = 1'b0;
    for (int i = 0; i < 300; i++) begin
      set = 1'(($urandom % 4) == 0);
      new_val = 1'($urandom);
      #1;
      exp = set ? new_val : ref_old;
      checks++;
      if (now !== exp) begin
        failures++;
        $display("FAIL cycle %0d: now=%0b expected %0b", i, now, exp);
      end
      if (set) loads++; else holds++;
      @(posedge clk);
      ref_old = exp;
      @(negedge clk);
    end
    checks++;
    if (loads == 0 || holds == 0) begin
      failures++;
      $display("FAIL: loads=%0d holds=%0d", loads, holds);
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
