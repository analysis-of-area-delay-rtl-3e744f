// tb_maoi_xor -- exhaustive check of the four-gate XOR cell.
// Applies all four input pairs and compares y against a truth table written
// out by hand (not the ^ operator). A watchdog ends the run if it hangs.
module tb_maoi_xor;

  logic a, b, y;
  int checks = 0, failures = 0;
  // Expected y for {a,b} = 00, 01, 10, 11.
  localparam logic [3:0] TRUTH = 4'b0110;

  maoi_xor dut (.a(a), .b(b), .y(y));

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if (y !== TRUTH[i]) begin
        failures++;
        $display("FAIL a=%0b b=%0b y=%0b expected %0b", a, b, y, TRUTH[i]);
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
