// tb_csla_group -- exhaustive check of one carry-select group.
// For the widths of groups 2..5 (2 is the default, then 3, 4, 5) every a, b
// and incoming carry is applied; {c_out, sum} must equal a + b + c_in. Both
// select values are counted per width, and a width where either never
// occurred counts as a failure.
module tb_csla_group;

  // Widths under test; the first is the module's default.
  localparam int NW = 4;
  localparam int WS [NW] = '{2, 3, 4, 5};

  int checks = 0, failures = 0;
  logic [NW-1:0] done = '0;

  for (genvar k = 0; k < NW; k++) begin : g_w
    localparam int W = WS[k];
    logic [W-1:0] a, b, s;
    logic ci, co;
    int n_sel0 = 0, n_sel1 = 0;
    if (k == 0) begin : g_def
      csla_group dut (.a(a), .b(b), .c_in(ci), .sum(s), .c_out(co));
    end else begin : g_par
      csla_group #(.W(W)) dut (.a(a), .b(b), .c_in(ci), .sum(s), .c_out(co));
    end
    initial begin
      for (int i = 0; i < (1 << (2*W+1)); i++) begin
        {a, b, ci} = (2*W+1)'(i);
        #1;
        checks++;
        if (ci) n_sel1++; else n_sel0++;
        if ({co, s} !== (W+1)'(int'(a) + int'(b) + int'(ci))) begin
          failures++;
          $display("FAIL W=%0d a=%0d b=%0d c_in=%0b -> %0d", W, a, b, ci, {co, s});
        end
      end
      checks++;
      if (n_sel0 == 0 || n_sel1 == 0) failures++;
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
