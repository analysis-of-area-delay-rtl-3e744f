// csla_group -- one W-bit group of the modified square-root carry select adder.
//
// The group adds its slice of A and B before the carry from the group below
// is known, for both possible values of that carry:
//   * a W-bit ripple adder with carry-in 0 (maoi_rca_c0) gives r0 = a + b
//     as a (W+1)-bit word {cout, sum};
//   * a (W+1)-bit M-AOI excess-1 converter (maoi_excess1) turns r0 into
//     r1 = r0 + 1, the result for a carry of 1;
//   * a 2(W+1):(W+1) multiplexer (csel_mux) picks r0 or r1 once c_in
//     arrives.
// The path from c_in to the outputs is therefore a single mux level, which is
// what lets the groups grow by one bit each towards the top of the word.
//
// Interface: a, b (W bits) and c_in in; sum (W bits) and c_out out, with
// {c_out, sum} = a + b + c_in. Combinational. W defaults to 2 (group 2).
module csla_group #(
  parameter int unsigned W = 2
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         c_in,
  output logic [W-1:0] sum,
  output logic         c_out
);
  logic [W:0] r0;   // result for carry-in 0, {cout, sum}
  logic [W:0] r1;   // result for carry-in 1
  logic [W:0] y;

  maoi_rca_c0  #(.W(W))   u_rca (.a(a), .b(b), .sum(r0[W-1:0]), .cout(r0[W]));
  maoi_excess1 #(.N(W+1)) u_ex1 (.b(r0), .x(r1));
  csel_mux     #(.N(W+1)) u_mux (.d0(r0), .d1(r1), .sel(c_in), .y(y));

  assign sum   = y[W-1:0];
  assign c_out = y[W];
endmodule
