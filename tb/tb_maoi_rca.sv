// tb_maoi_rca -- exhaustive check of the ripple carry adder with carry-in.
// For widths 2 (group 1, the default), 1, 3 and 5, every a, b and cin is
// applied and {cout, sum} is compared with the integer a + b + cin.
module tb_maoi_rca;

  // Widths under test; the first is the module's default.
  localparam int NW = 4;
  localparam int WS [NW] = '{2, 1, 3, 5};

  int checks = 0, failures = 0;
  logic [NW-1:0] done = '0;

  for (genvar k = 0; k < NW; k++) begin : g_w
    localparam int W = WS[k];
    logic [W-1:0] a, b, s;
    logic ci, co;
    if (k == 0) begin : g_def
      maoi_rca dut (.a(a), .b(b), .cin(ci), .sum(s), .cout(co));
    end else begin : g_par
      maoi_rca #(.W(W)) dut (.a(a), .b(b), .cin(ci), .sum(s), .cout(co));
    end
    initial begin
      for (int i = 0; i < (1 << (2*W+1)); i++) begin
        {a, b, ci} = (2*W+1)'(i);
        #1;
        checks++;
        if ({co, s} !== (W+1)'(int'(a) + int'(b) + int'(ci))) begin
          failures++;
          $display("FAIL W=%0d a=%0d b=%0d cin=%0b -> %0d", W, a, b, ci, {co, s});
        end
      end
      done[k] = 1'b1;
    end
  end

  initial begin
    wait (&done);
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
