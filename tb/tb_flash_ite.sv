// tb_flash_ite: exhaustive check of the IfThenElse scheme: start goes to P
// when cond is high and to Q when it is low; shout and finish are ORs.
module tb_flash_ite;
  logic start, cond, shout, finish, p_start, p_shout, p_finish, q_start, q_shout, q_finish;
  int checks = 0, failures = 0;

  flash_ite dut (.start, .cond, .shout, .finish, .p_start, .p_shout, .p_finish,
                 .q_start, .q_shout, .q_finish);

  initial begin
    for (int v = 0; v < 64; v++) begin
      {start, cond, p_shout, p_finish, q_shout, q_finish} = 6'(v);
      #1;
      checks++;
      if ({p_start, q_start, finish, shout} !==
          {start && cond, start && !cond, p_finish || q_finish, p_shout || q_shout}) begin
        failures++;
        $display("FAIL inputs %06b: p_start=%0b q_start=%0b finish=%0b shout=%0b",
                 v[5:0], p_start, q_start, finish, shout);
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
