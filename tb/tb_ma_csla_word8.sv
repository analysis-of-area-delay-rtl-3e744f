// tb_ma_csla_word8 -- 8-bit word workload on the 16-bit adder.
//
// Every pair of 8-bit operands with both carry-in values (2^17 additions) is
// applied to the default 16-bit adder with the upper operand bits at zero.
// The 8-bit result must appear in sum[7:0], its carry in sum[8], and
// sum[15:9] and cout must stay 0. Operands of this size exercise groups 1-3
// fully and group 4 (bits 10:7) through its low bit.
module tb_ma_csla_word8;

  logic [15:0] a, b, sum;
  logic        cin, cout;
  int checks = 0, failures = 0;

  ma_csla dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    for (int i = 0; i < (1 << 17); i++) begin
      a   = {8'h00, i[16:9]};
      b   = {8'h00, i[8:1]};
      cin = i[0];
      #1;
      checks++;
      if ({cout, sum} !== 17'(int'(i[16:9]) + int'(i[8:1]) + int'(i[0]))) begin
        failures++;
        if (failures < 10)
          $display("FAIL a=%h b=%h cin=%0b -> cout=%0b sum=%h", a, b, cin, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
