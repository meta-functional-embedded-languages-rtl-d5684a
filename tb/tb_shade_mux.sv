// tb_shade_mux: exhaustive check of the gate-level multiplexer against
// o = s ? b : a.
module tb_shade_mux;
  logic s, a, b, o;
  int checks = 0, failures = 0;

  shade_mux dut (.s, .a, .b, .o);

  initial begin
    for (int v = 0; v < 8; v++) begin
      {s, a, b} = 3'(v);
      #1;
      checks++;
      if (o !== (s ? b : a)) begin
        failures++;
        $display("FAIL s=%0b a=%0b b=%0b o=%0b", s, a, b, o);
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
