# Bypassing array multipliers

An array multiplier adds its partial products with a grid of full adders.
For an N x N unsigned multiply, a full adder in row r and column j adds the
partial product a_j·b_r. Whenever b_r or a_j is 0, that partial product is 0.
The adder then does no useful work, but it still switches and burns power.
A *bypassing* multiplier detects these cells. It holds their inputs still and
routes the signals that would pass through them around the adder.

This repository holds synthesizable SystemVerilog for three bypassing
variants of the N x N Braun array multiplier, and for the plain Braun
multiplier they are measured against:

| variant | skips a cell when | extra hardware |
|---|---|---|
| Braun, no bypassing (`braun_multiplier`) | never | none: N² AND gates, N(N-1) full adders |
| row bypassing (`row_bypass_multiplier`) | its multiplier bit b_r = 0 (whole row) | 2 muxes per cell, right-edge carry correction chain |
| column bypassing (`col_bypass_multiplier`) | its multiplicand bit a_j = 0 (whole column) | 1 mux per cell, AND gates on the last row's carries |
| two-dimensional (`bypass_2d_multiplier`) | b_r = 0 **or** a_j = 0 | 2 muxes per cell, bypass logic in (N-3)² cells, correction chain |

All four compute the same exact product. They differ only in which adders
sit idle for a given pair of operands, and so in power, delay and area. The
last stage of every array is a carry-propagate adder. It can be a ripple
carry, carry lookahead or carry select adder (parameter `ADDER`).

The top level `bypass_multiplier_top` places the four multipliers side by
side, each with its own ports. It is a container for comparing the variants,
not a single datapath.

## The common array

Every variant uses the same carry-save Braun array. Only the cells differ:
in the plain Braun multiplier every cell is a full adder that always works.

- Product bit 0 is a_0·b_0.
- Partial-product row 0 (a_{j+1}·b_0) enters as the sum inputs of row 1.
- Rows r = 1 … N-1 each hold N-1 cells, for columns j = 0 … N-2. Cell (r, j)
  adds three things:
  - the partial product a_j·b_r (weight 2^(r+j));
  - the sum of cell (r-1, j+1), which has the same weight. The leftmost cell
    instead takes the leftover partial product a_{N-1}·b_{r-1};
  - the carry of cell (r-1, j), also of the same weight. Row 1 has carry
    inputs of 0.
- Column 0 of row r delivers product bit r.
- The last row's N-1 carries and N-1 sums (with a_{N-1}·b_{N-1} on top) go
  into an (N-1)-bit final adder. It gives product bits N … 2N-1.

So sums move diagonally down and to the right, and carries move straight
down. Each cell's sum output has weight r+j and its carry output weight
r+j+1. Keeping these weights in mind is the key to the bypass paths below.

Inside a bypassed cell the adder's inputs are held at 0. The original
circuit isolates them with three-state buffers; here AND gates stand in for
them. This keeps the adder from switching and is plain synthesizable logic.

## Row bypassing

When b_r = 0, row r adds nothing. Each `row_bypass_cell` in the row passes
its incoming sum straight to its sum output, which already has the right
weight.

The carries are less simple. The carry entering cell (r, j) has weight r+j.
The carry output of cell (r, j), however, is read by the next row at weight
r+j+1. If the bypassed cell simply passed its own carry down, every carry
would double in value. Instead, the carry multiplexer of cell (r, j) passes
the carry that enters its **left neighbour** (r, j+1), which has weight
r+j+1. The leftmost cell passes 0. In effect, the carries of a bypassed row
shift one cell to the right.

The carry that entered column 0 of a bypassed row has no cell to its right.
It leaves the array, with weight 2^r. The `carry_correction` block adds it
back. This block is a ripple chain of full adders at product bits 2 … N-1.
At bit r it adds three inputs:

- the sum leaving column 0 of row r;
- the dropped carry k_r = c_in(r,0) AND NOT b_r;
- the carry from the adder at bit r-1.

Its sum is product bit r. Its last carry has weight 2^N and feeds the carry
input of the final adder. Row 1 never drops a carry, so product bit 1 is
taken directly. For a 4x4 array the chain is two full adders, at bits 2 and 3.

## Column bypassing

When a_j = 0, every partial product of column j is 0. By induction down the
column, starting from row 1 (whose carry inputs are 0), every carry inside
the column is 0 as well. So a cell of that column outputs:

- carry 0;
- as its sum, the sum arriving from its upper-left cell.

The `col_bypass_cell` therefore needs only one multiplexer, on the sum. Only
two of its adder inputs are isolated: the partial product and the sum. The
carry input goes straight in. Since no carry ever moves sideways, no
correction chain is needed. As a guard, each last-row carry is ANDed with its
column bit before it reaches the final adder. With the zero-forcing isolation
used here, that AND never changes a value. It stays because it protects the
final adder if the isolation is ever built so that it holds a stale value
instead.

## Two-dimensional bypassing

The `bypass_2d_cell` skips on either condition:

- row bit 0: the sum passes, and the carry is taken from the left neighbour
  (as in row bypassing);
- row bit 1 but column bit 0: the sum passes and the carry is 0 (as in
  column bypassing).

Combining the two breaks the column argument. A bypassed row shifts carries
one column to the right. So a column whose bit is 0 can receive a carry of 1
from the column to its left, two rows up. A column-bypassed cell would drop
that carry. The 2-D array fixes this in two ways.

**Bypass logic (BL).** A cell with bypass logic is active when its row bit
is 1 and either its column bit is 1 or a carry comes in:

    active = b_r AND (a_j OR c_in)

When a BL cell becomes active, any carry it produces goes to the cell below.
That cell sees the carry and becomes active too, so a carry chain down a
column is always computed to its end.

BL is needed only where such a carry can arrive:

- rows 1 and 2 can never get one;
- row 3 and lower can, because a bypassed row 2 or lower has shifted carries
  to the right;
- the leftmost column (j = N-2) never gets one, because the left neighbour it
  would come from does not exist.

This gives BL in rows 3 … N-1 and columns 1 … N-3: (N-3)² cells. That is one
cell, (3, 1), for 4x4 and 25 cells for 8x8. The generic array contains an
assertion for every cell without BL outside column 0. The assertion fails if
such a cell is ever column-bypassed while a carry arrives. It never fires in
the exhaustive tests.

**Column 0.** Column 0 has no BL. When one of its cells is inactive, the
carry that entered it leaves the array. This happens either because the row
is bypassed or because a_0 = 0. The same `carry_correction` chain as in the
row-bypassing design adds that carry back into product bit r:
k_r = c_in(r,0) AND NOT active(r,0).

The 2-D multiplier brings out its cell activity map `cell_active`. Bit
(r-1)·(N-1)+j is 1 when cell (r, j) computes. The function
`bm_pkg::cell_idx` gives this index.

## Final adders

`final_adder` picks one of three adders by `ADDER` (type `bm_pkg::adder_e`):

- `ADDER_RCA`, `rca_adder`: a chain of `full_adder`s. This is the default.
- `ADDER_CLA`, `cla_adder`: `cla4_block`s (4-bit lookahead, with group
  propagate PG and group generate GG). A second lookahead level predicts all
  block carries from cin in sum-of-products form, so no carry ripples between
  blocks.
- `ADDER_CSLA`, `csla_adder`: built by halving. A 2n-bit carry select adder
  is an n-bit one for the low half plus two n-bit ones for the high half, one
  with carry-in 0 and one with 1. The low half's carry selects between the
  two high-half results. The group carry out is G + P·c, where G and P are
  the carry outs of the two copies. The smallest pieces are 4-bit ripple
  adders, so a 16-bit adder has:
  - a ripple adder for bits 3:0;
  - a selected pair of 4-bit ripple adders for bits 7:4;
  - a selected pair of 8-bit carry select adders for bits 15:8.

  The RTL writes this as 4-bit blocks merged pairwise over log2 levels.

A width that does not fit a whole number of blocks is zero-padded: to a
multiple of 4 for the lookahead adder, and to 4·2^k for the carry select
adder. The 8x8 array's final adder, for example, is 7 bits wide.

## Files and hierarchy

```
bypass_multiplier_top
├── braun_multiplier ─────── full_adder
│                          └ final_adder
├── row_bypass_multiplier ── row_bypass_cell ── full_adder
│                          ├ carry_correction ── full_adder
│                          └ final_adder ── rca_adder | cla_adder (cla4_block) | csla_adder (rca_adder)
├── col_bypass_multiplier ── col_bypass_cell ── full_adder
│                          └ final_adder
└── bypass_2d_multiplier ─── bypass_2d_cell ── full_adder
                           ├ carry_correction
                           └ final_adder
```

`rtl/bm_pkg.sv` holds the `adder_e` enum and `cell_idx`. Every file opens
with a comment on its function, interface and timing.

## Parameters and interface

| parameter | default | meaning |
|---|---|---|
| `N` | 8 | operand width (N ≥ 3); tested at 4, 5, 8 and 16 |
| `ADDER` | `ADDER_RCA` | final adder of the array |

Each multiplier has these ports:

- inputs: `a` (multiplicand, N bits) and `b` (multiplier, N bits);
- output: `p` (2N bits);
- the 2-D multiplier also has `cell_active`, (N-1)² bits.

The operands are unsigned. Everything is combinational. There is no clock,
no reset and no latency: the product is valid one settling time after the
operands change. To pipeline it, register the operands and the product
outside.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops through a watchdog if it hangs. The
testbenches compare against the simulator's own integer arithmetic:

- The multiplier testbenches check 4x4, 5x5 and 8x8 exhaustively, the 8x8
  with all three final adders. They check 16x16 on corner cases and 20 000
  random pairs, biased towards sparse operands.
- The bypassing testbenches count row bypasses, column bypasses,
  bypass-logic activations and carries picked up by the correction chain.
  Each count must be nonzero.
- `tb_bypass_multiplier_top` runs all four variants at the default size on
  all 65 536 operand pairs.
- It also adds up the active adder cells of each array over those pairs, as
  a rough measure of switching work. A row-bypassing cell counts as active
  when b_r = 1 and a column-bypassing cell when a_j = 1. A 2-D cell counts
  when `cell_active` says so, and a Braun cell always counts. The totals are
  Braun 3 211 264, row 1 605 632, column 1 605 632 and 2-D 843 850. The
  testbench requires both one-dimensional arrays to stay below Braun and the
  2-D array to stay below both, which is the power ranking the original
  reports.

To run one testbench with plain Verilator (5.x), from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/bm_pkg.sv \
    tb/tb_bypass_multiplier_top.sv --top-module tb_bypass_multiplier_top -Mdir obj
./obj/Vtb_bypass_multiplier_top
```

Replace the testbench name to run any other. Each testbench takes a few
seconds at most.

## How this RTL relates to the original design

The cell structures, bypass conditions, correction and protection circuits
come from the thesis *Design of Bypassing Multiplier* (M. Ahuja, Thapar
University, 2013). So do the BL placement rule, the (N-3)² count and the
three final-adder choices. That thesis in turn draws on published row-,
column- and 2-D-bypassing multipliers. The following are choices made here:

- **Isolation.** Three-state input buffers are modelled as AND gates that
  force the adder inputs to 0.
- **Bypassed carry routing.** The description says the carries of a bypassed
  row move to the next row. Here the exact source is fixed by binary weight:
  the carry entering the left neighbour.
- **Correction chain.** Its exact form is a ripple of full adders over
  product bits 2 … N-1. The original figures show the 4x4 instance only, and
  their gate types are not copied.
- **Bypass logic.** The BL circuit is the simplest logic that meets the
  activation rule above. The column-0 fix reuses the correction chain.
- **Carry select adder.** The original gives only the 16-bit example. The
  halving rule extends it to any width.
- **Activity map.** `cell_active` on the 2-D multiplier is an added
  observation port. The row and column variants have none: their activity is
  simply b_r or a_j. The Braun array is always fully active.
- **Braun baseline.** The original gives only the adder and gate counts.
  The array here is the bypassing array with multiplexers and isolation
  removed, and it offers the same choice of final adder.

The following are not reproduced:

- **Measurements.** The source measured delay, area (in NAND-gate
  equivalents) and dynamic power on a Xilinx Spartan-3E
  (xc3s500e-4fg320) at 4x4, 8x8 and 16x16, and for 8x8 with each final
  adder. It reports column bypassing as the fastest and the 2-D design as the
  lowest in power and area of the bypassing versions. Those numbers depend on
  the FPGA flow and are not reproduced here. Only the power ranking is
  checked, through the active-cell count described under Simulation.
- **Other multipliers.** The survey of other multipliers (ROM-based, modulo
  2^n+1, BZ-FAD shift-and-add, OBA, incrementer-based bypassing) is not part
  of this design.

## Trust

All products are exact for every input tested:

- every pair of 4-, 5- and 8-bit operands, for all four variants and all
  three final adders;
- 20 000 corner and random pairs per variant and adder at 16 bits.

Each testbench was also run against a deliberately broken copy of its module
and failed, so its checks do observe the module. The power advantage of
bypassing depends on how the isolation is realised in a real library. The
RTL captures which cells are idle, not how much energy that saves.
