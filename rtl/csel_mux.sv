// csel_mux -- 2N:N carry-select multiplexer of gate-level 2:1 muxes.
//
// Chooses between the two precomputed results of a carry-select group:
// d0 = {cout, sum} for an incoming carry of 0, d1 = the same for a carry of
// 1. sel is the carry arriving from the group below. Each bit is a
// four-gate mux2_gate, so a 6:3 mux (group 2) costs twelve gates. The groups
// use 6:3, 8:4, 10:5 and 12:6 muxes (N = 3..6).
//
// Interface: d0, d1 (N bits), sel in; y (N bits) out. Combinational.
// Building the wide mux from independent 2:1 cells is this design's choice.
module csel_mux #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0] d0,
  input  logic [N-1:0] d1,
  input  logic         sel,
  output logic [N-1:0] y
);
  for (genvar i = 0; i < N; i++) begin : g_bit
    mux2_gate u_mux (.d0(d0[i]), .d1(d1[i]), .s(sel), .y(y[i]));
  end
endmodule
