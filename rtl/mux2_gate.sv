// mux2_gate -- one-bit 2:1 multiplexer of four basic gates.
//
// y = (d0 & ~s) | (d1 & s): one inverter, two ANDs and one OR, which is the
// four-gate, three-level cell (area 4, delay 3 in unit-gate terms) that the
// carry-select multiplexers of the adder are counted in. The gate structure
// is this design's choice; the design only gives the cell's gate count and
// delay.
//
// Interface: d0 is passed when s = 0, d1 when s = 1. Combinational.
module mux2_gate (
  input  logic d0,
  input  logic d1,
  input  logic s,
  output logic y
);
  logic s_n;
  logic p0;
  logic p1;

  always_comb begin
    s_n = ~s;
    p0  = d0 & s_n;
    p1  = d1 & s;
    y   = p0 | p1;
  end
endmodule
