// maoi_xor -- two-input exclusive OR built from four basic gates.
//
// This is the XOR cell of the modified AND-OR-INVERT (M-AOI) adder. The usual
// AND-OR-NOT form of an XOR, (a & ~b) | (~a & b), takes five gates (two
// inverters, two ANDs, one OR). De Morgan's law gives a four-gate form:
//   y = (a | b) & ~(a & b)
// that is one OR, one AND, one inverter and a final AND. Every XOR in the adder
// (half adders, full adders, excess-1 converters) uses this cell, which is
// where the adder saves one gate per XOR.
//
// Interface: a, b in; y = a ^ b out. Purely combinational, no clock.
// The gate structure is the one the design describes; the net names are this
// implementation's own.
module maoi_xor (
  input  logic a,
  input  logic b,
  output logic y
);
  logic g_or;    // a | b
  logic g_and;   // a & b
  logic g_nand;  // ~(a & b)

  always_comb begin
    g_or   = a | b;
    g_and  = a & b;
    g_nand = ~g_and;
    y      = g_or & g_nand;
  end
endmodule
