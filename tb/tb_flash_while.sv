// tb_flash_while: exhaustive check of the While scheme: on start or body
// finish the body is restarted if cond is high, otherwise the loop finishes;
// the body's shout is the loop's shout.
module tb_flash_while;
  logic start, cond, shout, finish, p_start, p_shout, p_finish;
  int checks = 0, failures = 0;

  flash_while dut (.start, .cond, .shout, .finish, .p_start, .p_shout, .p_finish);

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic enter;
      {start, cond, p_shout, p_finish} = 4'(v);
      #1;
      enter = start || p_finish;
      checks++;
      if ({p_start, finish, shout} !== {enter && cond, enter && !cond, p_shout}) begin
        failures++;
        $display("FAIL inputs %04b: p_start=%0b finish=%0b shout=%0b",
                 v[3:0], p_start, finish, shout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
