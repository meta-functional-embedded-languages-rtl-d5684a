// tb_obs_mux: exhaustive check of the multiplexer observer: ok must be low
// exactly when a == b and o differs from them.
module tb_obs_mux;
  logic s, a, b, o, ok;
  int checks = 0, failures = 0;

  obs_mux dut (.s, .a, .b, .o, .ok);

  initial begin
    for (int v = 0; v < 16; v++) begin
      {s, a, b, o} = 4'(v);
      #1;
      checks++;
      if (ok !== !((a == b) && (o != a))) begin
        failures++;
        $display("FAIL s=%0b a=%0b b=%0b o=%0b ok=%0b", s, a, b, o, ok);
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
