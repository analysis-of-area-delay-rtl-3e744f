// maoi_rca -- W-bit ripple carry adder of M-AOI full adders, with a carry-in.
//
// This is group 1 of the adder, the two least significant bits, which has
// the external carry-in available and so needs no carry selection. Each bit
// is a maoi_full_adder; the carry ripples from bit 0 upwards.
//
// Interface: a, b (W bits) and cin in; sum (W bits) and cout out, with
// {cout, sum} = a + b + cin. Combinational; the delay grows by one full adder
// per bit. W defaults to 2, the width of group 1.
module maoi_rca #(
  parameter int unsigned W = 2
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    maoi_full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(sum[i]), .co(c[i+1]));
  end

  assign cout = c[W];
endmodule
