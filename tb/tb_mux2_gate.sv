// tb_mux2_gate -- exhaustive check of the four-gate 2:1 mux.
// All eight input combinations; the expected output is d1 when s is 1 and d0
// otherwise.
module tb_mux2_gate;

  logic d0, d1, s, y;
  int checks = 0, failures = 0;

  mux2_gate dut (.d0(d0), .d1(d1), .s(s), .y(y));

  initial begin
    for (int i = 0; i < 8; i++) begin
      {s, d1, d0} = 3'(i);
      #1;
      checks++;
      if (y !== (s ? d1 : d0)) begin
        failures++;
        $display("FAIL s=%0b d1=%0b d0=%0b y=%0b", s, d1, d0, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
