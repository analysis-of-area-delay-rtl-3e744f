// maoi_excess1 -- N-bit binary to excess-1 converter with M-AOI XORs.
//
// Produces x = b + 1 (mod 2^N) without a carry chain of full adders:
//   x[0] = ~b[0]
//   x[i] = b[i] ^ (b[0] & b[1] & ... & b[i-1])      for i >= 1
// The running AND is a chain of two-input ANDs and every XOR is the
// four-gate maoi_xor. In a carry-select group of W bits it takes the
// (W+1)-bit result {cout, sum} of the carry-0 ripple adder and turns it into
// the result for a carry of 1, replacing the second ripple adder. Because
// a + b is at most 2^(W+1) - 2, the increment never wraps in that use.
//
// Interface: b (N bits) in, x (N bits) out. Combinational. N defaults to 3,
// the converter of group 2; the groups use 3, 4, 5 and 6.
module maoi_excess1 #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0] b,
  output logic [N-1:0] x
);
  // all_ones[i] = b[0] & ... & b[i-1]
  logic [N-1:0] all_ones;

  assign all_ones[0] = 1'b1;
  assign x[0]        = ~b[0];

  for (genvar i = 1; i < N; i++) begin : g_bit
    assign all_ones[i] = all_ones[i-1] & b[i-1];
    maoi_xor u_xor (.a(b[i]), .b(all_ones[i]), .y(x[i]));
  end
endmodule
