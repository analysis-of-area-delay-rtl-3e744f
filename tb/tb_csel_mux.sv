// tb_csel_mux -- check of the 2N:N carry-select mux.
// For N = 3 (default), 4, 5 and 6 all (d0, d1) pairs are applied with both
// select values; y must equal d1 when sel is 1 and d0 otherwise.
module tb_csel_mux;

  // Widths under test; the first is the module's default.
  localparam int NW = 4;
  localparam int WS [NW] = '{3, 4, 5, 6};

  int checks = 0, failures = 0;
  logic [NW-1:0] done = '0;

  for (genvar k = 0; k < NW; k++) begin : g_w
    localparam int W = WS[k];
    logic [W-1:0] d0, d1, y;
    logic sel;
    if (k == 0) begin : g_def
      csel_mux dut (.d0(d0), .d1(d1), .sel(sel), .y(y));
    end else begin : g_par
      csel_mux #(.N(W)) dut (.d0(d0), .d1(d1), .sel(sel), .y(y));
    end
    initial begin
      for (int i = 0; i < (1 << (2*W+1)); i++) begin
        {sel, d1, d0} = (2*W+1)'(i);
        #1;
        checks++;
        if (y !== (sel ? d1 : d0)) begin
          failures++;
          $display("FAIL N=%0d sel=%0b d1=%0h d0=%0h y=%0h", W, sel, d1, d0, y);
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
