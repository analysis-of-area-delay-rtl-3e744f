// tb_maoi_excess1 -- exhaustive check of the excess-1 converter.
// For widths 3 (default), 2, 4, 5 and 6 every input b is applied and x is
// compared with (b + 1) mod 2^N, including the all-ones wrap to zero.
module tb_maoi_excess1;

  // Widths under test; the first is the module's default.
  localparam int NW = 5;
  localparam int WS [NW] = '{3, 2, 4, 5, 6};

  int checks = 0, failures = 0;
  logic [NW-1:0] done = '0;

  for (genvar k = 0; k < NW; k++) begin : g_w
    localparam int W = WS[k];
    logic [W-1:0] bi, x;
    if (k == 0) begin : g_def
      maoi_excess1 dut (.b(bi), .x(x));
    end else begin : g_par
      maoi_excess1 #(.N(W)) dut (.b(bi), .x(x));
    end
    initial begin
      for (int i = 0; i < (1 << W); i++) begin
        bi = W'(i);
        #1;
        checks++;
        if (x !== W'((i + 1) % (1 << W))) begin
          failures++;
          $display("FAIL N=%0d b=%0d -> x=%0d", W, bi, x);
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
