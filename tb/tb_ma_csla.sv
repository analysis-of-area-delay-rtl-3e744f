// tb_ma_csla -- end-to-end check of the 16-bit carry select adder at its
// default parameters.
//
// Applies directed corner cases (zero, all ones, alternating patterns, carry
// chains that run through every group) and then random operands, and compares
// {cout, sum} with a + b + cin computed in 17-bit integer arithmetic.
// It also counts how the carry-select mechanism was exercised: for each of
// groups 2..5, how often its mux selected the carry-0 result and how often
// the carry-1 result (the carry into a group is taken from the reference sum
// of the bits below it, not from the design); how often a carry rippled from
// cin through every group; and how often cout was 1. A mechanism that never
// occurred counts as a failure. A watchdog ends the run if it hangs.
module tb_ma_csla;

  localparam int WIDTH   = 16;
  localparam int NGROUPS = 5;
  localparam int GLSB [NGROUPS] = '{0, 2, 4, 7, 11};   // lowest bit per group
  localparam int NRAND   = 200000;

  logic [WIDTH-1:0] a, b, sum;
  logic             cin, cout;
  int checks = 0, failures = 0;
  int n_sel0 [NGROUPS];
  int n_sel1 [NGROUPS];
  int n_full_ripple = 0;
  int n_cout = 0;

  ma_csla dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  task automatic apply(input logic [WIDTH-1:0] ta, input logic [WIDTH-1:0] tb,
                       input logic tc);
    logic [WIDTH:0] expect_v;
    logic [WIDTH:0] low;
    a = ta; b = tb; cin = tc;
    #1;
    expect_v = {1'b0, ta} + {1'b0, tb} + {{WIDTH{1'b0}}, tc};
    checks++;
    if ({cout, sum} !== expect_v) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%h b=%h cin=%0b -> cout=%0b sum=%h, expected %h",
                 ta, tb, tc, cout, sum, expect_v);
    end
    // Carry into each upper group, from the reference arithmetic.
    for (int g = 1; g < NGROUPS; g++) begin
      low = ({1'b0, ta} & ((17'd1 << GLSB[g]) - 1)) +
            ({1'b0, tb} & ((17'd1 << GLSB[g]) - 1)) + {{WIDTH{1'b0}}, tc};
      if (low[GLSB[g]]) n_sel1[g]++; else n_sel0[g]++;
    end
    if (tc && ((ta ^ tb) == '1)) n_full_ripple++;
    if (expect_v[WIDTH]) n_cout++;
  endtask

  initial begin
    for (int g = 0; g < NGROUPS; g++) begin n_sel0[g] = 0; n_sel1[g] = 0; end

    // Directed cases.
    apply('0, '0, 1'b0);
    apply('0, '0, 1'b1);
    apply('1, '0, 1'b1);          // carry through all groups
    apply(16'h5555, 16'haaaa, 1'b1);
    apply('1, '1, 1'b1);
    apply('1, '1, 1'b0);
    apply(16'h8000, 16'h8000, 1'b0);
    for (int g = 1; g < NGROUPS; g++) begin
      // All-ones below group g plus cin: the carry enters group g.
      apply(16'((1 << GLSB[g]) - 1), '0, 1'b1);
      apply(16'((1 << GLSB[g]) - 1), '1, 1'b1);
    end
    for (int i = 0; i < WIDTH; i++) begin
      apply(16'(1 << i), 16'(1 << i), 1'b0);
      apply(16'(1 << i), 16'hffff, 1'b0);
    end

    // Random operands.
    for (int i = 0; i < NRAND; i++) apply(16'($urandom), 16'($urandom), 1'($urandom));

    for (int g = 1; g < NGROUPS; g++) begin
      $display("group %0d: carry-0 selected %0d times, carry-1 selected %0d times",
               g + 1, n_sel0[g], n_sel1[g]);
      checks++;
      if (n_sel0[g] == 0 || n_sel1[g] == 0) begin
        failures++;
        $display("FAIL group %0d did not see both carry values", g + 1);
      end
    end
    $display("carry rippled from cin through all groups %0d times", n_full_ripple);
    $display("carry-out set %0d times", n_cout);
    checks += 2;
    if (n_full_ripple == 0) failures++;
    if (n_cout == 0) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
