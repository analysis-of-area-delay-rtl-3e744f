// maoi_full_adder -- full adder with both XORs in four-gate M-AOI form.
//
//   p  = a ^ b          (maoi_xor)
//   s  = p ^ ci         (maoi_xor)
//   co = (a & b) | (ci & p)
// Two four-gate XORs, two ANDs and one OR give the eleven-gate count of the
// M-AOI full adder (against thirteen with five-gate XORs).
//
// Interface: a, b, ci in; s (sum), co (carry-out) out. Combinational.
// The carry expression that reuses p is this design's choice; the design
// gives only the gate count and delay of the cell.
module maoi_full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  logic p;
  logic g;
  logic t;

  maoi_xor u_xor_ab (.a(a), .b(b),  .y(p));
  maoi_xor u_xor_s  (.a(p), .b(ci), .y(s));

  always_comb begin
    g  = a & b;
    t  = ci & p;
    co = g | t;
  end
endmodule
