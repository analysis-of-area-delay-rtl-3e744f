// maoi_rca_c0 -- W-bit ripple carry adder whose carry-in is fixed at 0.
//
// In every carry-select group above group 1, this adder computes the result
// for an incoming carry of 0. With no carry to add in bit 0, that bit is a
// half adder; bits 1..W-1 are full adders. All XORs are the four-gate M-AOI
// form.
//
// Interface: a, b (W bits) in; sum (W bits), cout out, {cout, sum} = a + b.
// Combinational. W defaults to 2 (group 2); the groups use 2, 3, 4 and 5.
module maoi_rca_c0 #(
  parameter int unsigned W = 2
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] c;

  maoi_half_adder u_ha (.a(a[0]), .b(b[0]), .s(sum[0]), .c(c[1]));

  for (genvar i = 1; i < W; i++) begin : g_bit
    maoi_full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(sum[i]), .co(c[i+1]));
  end

  // c[0] is not used: bit 0 is a half adder. Tie it so the vector is fully
  // driven.
  assign c[0] = 1'b0;
  assign cout = c[W];
endmodule
