# 16-bit square-root carry select adder with four-gate XORs

A ripple carry adder is small but slow: the carry has to pass through every
bit in turn. A carry select adder breaks that chain. It cuts the word into
groups. Each group works out its sum twice, once for an incoming carry of 0
and once for 1, before that carry is known. A multiplexer then picks the right
result when the carry arrives. The carry crosses each group through one mux
level instead of a chain of full adders.

This adder refines that idea in two ways:

* **Excess-1 conversion instead of a second adder.** A group does not need a
  second ripple adder for the carry-1 case. The carry-1 result is just the
  carry-0 result plus one, so a cheap incrementer (a binary to excess-1
  converter) derives it from the carry-0 result.
* **Four-gate XORs.** Built from AND, OR and NOT, an XOR usually takes five
  gates: `(a & ~b) | (~a & b)`. De Morgan's law gives a four-gate form,
  `(a | b) & ~(a & b)`. Every XOR in the adder uses it: in the half adders,
  the full adders and the incrementers. This is the "modified AND-OR-INVERT"
  (M-AOI) form.

The result is a 16-bit combinational adder: `{cout, sum} = a + b + cin`. It
has no clock, reset or registers.

## Group structure

The groups grow towards the top of the word ("square-root" sizing). The carry
into a high group arrives late, which leaves time for a wider local adder:

| group | bits     | carry-0 adder           | carry-1 result          | select mux |
|-------|----------|-------------------------|-------------------------|------------|
| 1     | [1:0]    | 2-bit ripple, uses `cin` | none                   | none       |
| 2     | [3:2]    | 2-bit ripple, carry 0   | 3-bit excess-1 converter | 6:3       |
| 3     | [6:4]    | 3-bit ripple, carry 0   | 4-bit excess-1 converter | 8:4       |
| 4     | [10:7]   | 4-bit ripple, carry 0   | 5-bit excess-1 converter | 10:5      |
| 5     | [15:11]  | 5-bit ripple, carry 0   | 6-bit excess-1 converter | 12:6      |

Group 1 is a plain ripple carry adder fed by `cin`. Inside each group `k` > 1
(`csla_group`), with width W:

```
 a[W-1:0] b[W-1:0]
      |      |
  +---v------v---+   r0 = {cout,sum} = a + b          (W+1 bits)
  | maoi_rca_c0  |-----------+------------------+
  +--------------+           |                  |
                     +-------v-------+          |
                     | maoi_excess1  |  r1 = r0 + 1
                     +-------+-------+          |
                             | d1               | d0
                          +--v------------------v--+
   carry from group k-1 ->|  csel_mux  2(W+1):(W+1) |--> {carry to group k+1, sum}
                          +-------------------------+
```

The carry-0 adder has no carry to add in bit 0, so bit 0 is a half adder and
bits 1..W-1 are full adders.

### The excess-1 converter

For an N-bit input `b` it gives `x = b + 1 (mod 2^N)` with no adder cells:

```
x[0] = ~b[0]
x[i] = b[i] ^ (b[0] & b[1] & ... & b[i-1])      i >= 1
```

A chain of two-input ANDs forms the prefix ANDs. Each XOR is the four-gate
cell. The input is the whole W+1-bit carry-0 result, carry bit included. So
the converter's top output is the carry-out for the carry-1 case. `a + b` is
at most `2^(W+1) - 2`, so in this use the increment never wraps.

### Why the carry path is short

Once `cin` enters group 1, the carry passes through two full adders. It then
crosses one 2:1 mux level per upper group: four mux levels for the 16-bit
word. All the ripple adders and converters in the upper groups work at the
same time, and each finishes roughly when its select carry arrives. That is
the reason for the 2-2-3-4-5 sizing.

## Gate-level cells and their cost

Each leaf module is written as the basic gates it stands for, so gate counts
can be read straight off the RTL:

| cell              | module            | gates | gate levels |
|-------------------|-------------------|-------|-------------|
| XOR               | `maoi_xor`        | 4 (OR, AND, NOT, AND) | 3 |
| 2:1 mux           | `mux2_gate`       | 4 (NOT, 2 AND, OR)    | 3 |
| half adder        | `maoi_half_adder` | 5 (XOR + AND)         | 3 |
| full adder        | `maoi_full_adder` | 11 (2 XOR, 2 AND, OR) | 6 |

The reference figures are 5 and 11 gates for the M-AOI half and full adder
(13 for a full adder with five-gate XORs), and 4 gates and 3 levels for the
2:1 mux. These cells match them. How the gates are split inside the adders
and the mux is this implementation's choice.

Counted by construction, the adder has 294 gates: 22 in group 1, then 38, 58,
78 and 98 in groups 2 to 5. Group 2 is 16 in the adder, 10 in the converter
and 12 in the mux. The published hand count for group 2 is 37. Its breakdown
of the converter gates does not map onto a specific circuit, so this design
does not try to match it to the gate. Logic synthesis merges some shared
inverters and gives about 240 two-input cells.

## Modules

| module            | role |
|-------------------|------|
| `ma_csla`         | top: group 1 plus four carry-select groups |
| `csla_group`      | one carry-select group (adder, converter, mux) |
| `maoi_rca`        | ripple adder with carry-in (group 1) |
| `maoi_rca_c0`     | ripple adder with carry-in fixed at 0 |
| `maoi_excess1`    | excess-1 converter |
| `csel_mux`        | 2N:N select mux of `mux2_gate` cells |
| `mux2_gate`, `maoi_full_adder`, `maoi_half_adder`, `maoi_xor` | leaf cells |

`ma_csla` has three parameters:

* `WIDTH` (16)
* `NGROUPS` (5)
* `GW`, an unpacked array of group widths (`'{2, 2, 3, 4, 5}`)

To build another width, override all three together. `GW` is listed from the
least significant group up. Its first entry is the ripple group, and the
widths must add up to `WIDTH`, which elaboration checks. The sub-modules have
one width parameter each: `W` for the adders and groups, `N` for the
converter and the mux.

## How far it follows the published design, and where it departs

Taken from the published design:

* the group boundaries and widths
* the carry-0 adder plus excess-1 converter plus mux in each upper group
* the half adder in bit 0 of each carry-0 adder
* the converter equations
* the four-gate XOR and its use everywhere
* the mux sizes 6:3 to 12:6
* the gate counts of the leaf cells

This implementation's own choices:

* the gate structure of the mux, half adder and full adder (only their gate
  counts and delays are given)
* the ripple AND chain in the converter
* full adders in every bit of group 1
* the parameterisation of the widths

Not built:

* **Wider configurations.** The design is also described as scalable to a
  64-bit word, with muxes up to 24:11. No grouping is given for that size, so
  only the 16-bit configuration is the default. The `GW` parameter can express
  a wider one, but such a grouping would be a guess.
* **Physical results.** The published numbers (about 460 µW, 374.94 MHz and
  0.132 mm² in a 45 nm CMOS process) come from a transistor-level layout. They
  say nothing about this RTL and are not modelled.
* **The 8-bit comparison adder.** An 8-bit version of the adder is compared
  against a dual-ripple and an excess-1 carry select adder, but its grouping
  is not given. The 8-bit test below runs 8-bit operands through the 16-bit
  adder instead.
* **Baselines.** The baseline adders (dual ripple, and the excess-1 converter
  with five-gate XORs) are only for comparison and are not included.

## Verification

Every module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
compares outputs with integer arithmetic or truth tables worked out in the
testbench. Each prints `TB_RESULT checks=N failures=M` and has a watchdog.

* Leaf cells, ripple adders, converters, muxes and groups are checked
  exhaustively, at every group width the adder uses (1 to 6 bits).
* `tb_ma_csla` runs the 16-bit top at its default parameters, with no
  parameter overrides. It applies 47 directed vectors and 200,000 random ones.
  The directed vectors include carries that ripple from `cin` through every
  group. It also counts, per upper group, how often each mux input was
  selected, and it fails if any group never saw both carry values or if the
  full-length carry never occurred.
* `tb_ma_csla_word8` applies all 2^17 combinations of 8-bit operands and
  carry-in to the 16-bit adder.

Each testbench was also run against a copy of its module with one deliberate
bug, for example swapped mux inputs or a carry-in tied to 0, and it reported
failures.

To simulate with Verilator (5.x):

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
          --top-module tb_ma_csla tb/tb_ma_csla.sv
./obj_dir/Vtb_ma_csla
```

Swap in any other testbench name the same way. To lint the RTL:
`verilator --lint-only -Wall -y rtl rtl/ma_csla.sv`.
