// maoi_half_adder -- half adder with a four-gate M-AOI XOR.
//
// s = a ^ b through maoi_xor (four gates) and c = a & b (one gate): five gates
// and three gate levels, the area and delay figures the M-AOI adder uses for
// its half adder. It is the bit-0 cell of each ripple carry adder whose
// carry-in is tied to 0, so no carry input is needed there.
//
// Interface: a, b in; s (sum), c (carry) out. Combinational.
// Splitting the five gates as XOR plus AND is this design's reading of the
// gate count.
module maoi_half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  maoi_xor u_xor (.a(a), .b(b), .y(s));

  always_comb c = a & b;
endmodule
