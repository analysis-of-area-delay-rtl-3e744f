// tb_maoi_rca_c0 -- exhaustive check of the carry-in-0 ripple adder.
// For widths 2 (default), 1, 3, 4 and 5 every a, b is applied and
// {cout, sum} is compared with the integer a + b.
module tb_maoi_rca_c0;

  // Widths under test; the first is the module's default.
  localparam int NW = 5;
  localparam int WS [NW] = '{2, 1, 3, 4, 5};

  int checks = 0, failures = 0;
  logic [NW-1:0] done = '0;

  for (genvar k = 0; k < NW; k++) begin : g_w
    localparam int W = WS[k];
    logic [W-1:0] a, b, s;
    logic co;
    if (k == 0) begin : g_def
      maoi_rca_c0 dut (.a(a), .b(b), .sum(s), .cout(co));
    end else begin : g_par
      maoi_rca_c0 #(.W(W)) dut (.a(a), .b(b), .sum(s), .cout(co));
    end
    initial begin
      for (int i = 0; i < (1 << (2*W)); i++) begin
        {a, b} = (2*W)'(i);
        #1;
        checks++;
        if ({co, s} !== (W+1)'(int'(a) + int'(b))) begin
          failures++;
          $display("FAIL W=%0d a=%0d b=%0d -> %0d", W, a, b, {co, s});
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
