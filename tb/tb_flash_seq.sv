// tb_flash_seq: exhaustive check of the Sequential scheme over its start
// and hole inputs: P starts with the block, Q starts when P finishes, the
// block finishes with Q and shouts when either shouts.
module tb_flash_seq;
  logic start, shout, finish, p_start, p_shout, p_finish, q_start, q_shout, q_finish;
  int checks = 0, failures = 0;

  flash_seq dut (.start, .shout, .finish, .p_start, .p_shout, .p_finish,
                 .q_start, .q_shout, .q_finish);

  initial begin
    for (int v = 0; v < 32; v++) begin
      {start, p_shout, p_finish, q_shout, q_finish} = 5'(v);
      #1;
      checks++;
      if ({p_start, q_start, finish, shout} !==
          {start, p_finish, q_finish, p_shout | q_shout}) begin
        failures++;
        $display("FAIL inputs %05b: p_start=%0b q_start=%0b finish=%0b shout=%0b",
                 v[4:0], p_start, q_start, finish, shout);
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
