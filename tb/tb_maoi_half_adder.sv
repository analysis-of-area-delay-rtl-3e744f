// tb_maoi_half_adder -- exhaustive check of the M-AOI half adder.
// {c, s} must equal the integer sum a + b for all four input pairs.
module tb_maoi_half_adder;

  logic a, b, s, c;
  int checks = 0, failures = 0;

  maoi_half_adder dut (.a(a), .b(b), .s(s), .c(c));

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if ({c, s} !== 2'(int'(a) + int'(b))) begin
        failures++;
        $display("FAIL a=%0b b=%0b -> c=%0b s=%0b", a, b, c, s);
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
