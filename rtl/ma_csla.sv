// ma_csla -- 16-bit modified square-root carry select adder (MA-CSLA).
//
// The word is cut into groups that grow by about one bit per group towards
// the most significant end: bits [1:0], [3:2], [6:4], [10:7] and [15:11]
// (widths 2, 2, 3, 4, 5). Group 1 is a plain 2-bit ripple carry adder that
// takes the external carry-in. Every higher group (csla_group) computes its
// sum for both values of the carry from below -- a ripple adder with carry 0
// plus an excess-1 converter for carry 1 -- and a multiplexer then selects
// one result when the lower group's carry arrives. The carry therefore
// crosses each upper group through one mux level, while the group's own
// adder works in parallel; growing the groups by one bit keeps each group's
// local result ready about when its select carry arrives. All XORs in the
// adder use the four-gate AND-OR-INVERT form (maoi_xor), which is the area
// saving this adder is built around.
//
// Interface: a, b (WIDTH bits) and cin in; sum (WIDTH bits) and cout out,
// {cout, sum} = a + b + cin. Purely combinational: no clock, no reset, no
// registers. The default group widths are the 16-bit configuration; GW can be
// changed (NGROUPS entries summing to WIDTH, each at least 1, the first being
// the ripple group) to build other widths.
module ma_csla #(
  parameter int unsigned WIDTH          = 16,
  parameter int unsigned NGROUPS        = 5,
  parameter int unsigned GW [NGROUPS]   = '{2, 2, 3, 4, 5}
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  // Lowest bit of group g.
  function automatic int unsigned group_lsb(int unsigned g);
    int unsigned o = 0;
    for (int unsigned k = 0; k < g; k++) o += GW[k];
    return o;
  endfunction

  if (group_lsb(NGROUPS) != WIDTH) begin : g_bad_widths
    $error("ma_csla: group widths do not add up to WIDTH");
  end

  // c[g] is the carry into group g; c[NGROUPS] is the carry-out.
  logic [NGROUPS:0] c;

  assign c[0] = cin;

  // Group 1: ripple carry adder with the external carry-in.
  maoi_rca #(.W(GW[0])) u_grp1 (
    .a   (a[GW[0]-1:0]),
    .b   (b[GW[0]-1:0]),
    .cin (c[0]),
    .sum (sum[GW[0]-1:0]),
    .cout(c[1])
  );

  // Groups 2..NGROUPS: carry select.
  for (genvar g = 1; g < NGROUPS; g++) begin : g_grp
    localparam int unsigned LSB = group_lsb(g);
    localparam int unsigned W   = GW[g];

    csla_group #(.W(W)) u_grp (
      .a    (a[LSB+W-1:LSB]),
      .b    (b[LSB+W-1:LSB]),
      .c_in (c[g]),
      .sum  (sum[LSB+W-1:LSB]),
      .c_out(c[g+1])
    );
  end

  assign cout = c[NGROUPS];
endmodule
