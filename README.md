# Parity preserving reversible adder/subtractors

Reversible logic maps every input pattern to a distinct output pattern. A
reversible gate therefore has as many outputs as inputs, no signal fans out and
nothing feeds back. A *parity preserving* reversible gate also keeps the XOR of
its outputs equal to the XOR of its inputs. A single stuck or flipped line then
shows up as a parity mismatch, which makes such circuits fault detecting.

This RTL describes a small family of arithmetic units built from such gates:

* a 1-bit full adder/subtractor cell (FTFA/S) with a mode input `ctrl`;
* an N-bit ripple carry ("parallel") adder/subtractor made of N cells;
* an N-bit carry skip adder/subtractor. It uses the same cells plus a skip path
  built from a Feynman double gate (F2G), New Fault Tolerant (NFT) gates used
  as AND gates, and a Fredkin gate used as a multiplexer.

The defaults are the 4-bit units. Everything is combinational and has no clock
or reset. The RTL models the logic function of each reversible gate as ordinary
logic: the gates appear as modules with their full reversible line sets, so the
structure of each unit can be read from the netlist.

## Operation

| `ctrl` | operation | `sd` | `cbout` |
|---|---|---|---|
| 0 | add | `(a + b + cbin) mod 2^N` | carry out |
| 1 | subtract | `(a - b - cbin) mod 2^N` | borrow out, 1 when `a < b + cbin` |

Operands are unsigned, with the LSB at index 0. In both modes the
sum/difference bit of a cell is `a ^ b ^ cbin`; only the carry/borrow differs.

## The cell: `ftfas_cell`

The cell forms a propagate signal

    prop = (a ^ ctrl) ^ b

prop is 1 exactly when the incoming carry/borrow passes to the output unchanged.
When prop is 0, `a ^ ctrl` equals `b`, and `b` is then the carry/borrow the cell
generates (if it is 1) or kills (if it is 0). So one Fredkin gate controlled by
`prop` gives the carry/borrow-out:

    cbout = prop ? cbin : b

The Fredkin gate's pass-through line also supplies the cell's `prop` output,
which the carry skip unit uses. `ctrl_out` repeats `ctrl` so that the next cell
gets its own copy of the mode line, since a reversible circuit cannot fan a
signal out.

**Departure to know about.** The propagate output is often described as
`a xor b`. That is the right skip condition for addition. For subtraction a
borrow passes through a bit when `a == b`, so `a xor b` would skip borrows
wrongly. Here the cell outputs `(a xor ctrl) xor b`, which is `a xor b` when
adding. The tests check that the carry skip unit gives correct borrows.

**What is not modelled.** The cell is meant to be built from a dedicated 5x5
parity preserving gate (called BBFS, quantum cost 12) followed by a Fredkin
gate. Its total is 6 inputs (a, b, cbin, ctrl and two constants) and 6 outputs
(sum/difference, carry/borrow, propagate and three garbage lines), with
quantum cost 17. The 5x5 gate's output equations are not available. The part
of the cell before the Fredkin gate is therefore plain logic with the same
result. The two constant inputs and the garbage outputs do not exist in this
RTL, and the cell as written is not a 6x6 reversible, parity preserving
mapping. Its arithmetic outputs are exact.

## Reversible gates

| module | equations | role here | quantum cost |
|---|---|---|---|
| `fredkin_gate` | P=A, Q=A'B+AC, R=A'C+AB | carry/borrow select in the cell; skip multiplexer | 5 |
| `f2g_gate` | P=A, Q=A^B, R=A^C | with B=C=0: three copies of the group carry/borrow-in | 2 |
| `nft_gate` | P=A^B, Q=B'C^AC', R=BC^AC' | with A=0: R = B AND C, ANDs propagate signals | 5 |

All three gates are reversible and parity preserving. Their testbenches check
both properties exhaustively as well as the equations.

## Ripple carry unit: `pp_parallel_addsub`

N cells are chained, with the carry/borrow going from bit 0 to bit N-1 and
`ctrl` handed along through `ctrl_out`. The delay grows linearly with N. The
cells' propagate outputs are unused here, as are the gates' garbage lines in
both units (lint reports them as unused signals).

## Carry skip unit: `pp_carry_skip_addsub`

The N bits are split into N/GROUP groups of GROUP cells. Per group:

1. `f2g_gate(cin, 0, 0)` copies the group's carry/borrow-in: one copy goes to
   the first cell, one goes to the skip gate, and the third is garbage.
2. The cells ripple as in the ripple carry unit.
3. A chain of GROUP-1 `nft_gate`s (each with A=0) ANDs the cells' `prop`
   outputs into the group propagate P.
4. `fredkin_gate(P, cin_copy, rippled_cout)` outputs on R the copied
   carry/borrow-in when P=1 and the rippled carry/borrow when P=0. R is the
   group's carry/borrow-out.

When P=1 every cell passes its carry/borrow unchanged, so both paths give the
same value. The skip only shortens the route a carry takes to the next group.
The output `skip[g]` shows group g's P.

**Group size.** The default is a single group spanning all four bits
(`GROUP = N = 4`). This matches the gate budget given for the design: one F2G,
one Fredkin gate and n-1 NFT gates for n bits. For 4 bits that is 13 gates in
all, counting each cell as two gates, with quantum cost
5 + 2 + 3·5 + 4·17 = 90. A drawing with two groups of two bits is also
described for the 4-bit unit; set `GROUP = 2` to build it, and the tests run
that variant too. N must be a multiple of GROUP, and elaboration stops with an
error otherwise.

## Top: `pp_addsub_top`

The two units are alternatives, not parts of one datapath, so the top places
them side by side. Each has its own port set: `rca_*` for ripple carry, `csa_*`
for carry skip, plus `csa_skip`. Parameters are `N` (default 4) and `GROUP`
(default 4).

## Cost figures

Reversible designs are compared by gate count, constant inputs, garbage
outputs and quantum cost. The target figures for this family are:

| unit | gates | constant inputs | garbage outputs | quantum cost |
|---|---|---|---|---|
| 1-bit cell | 2 | 2 | 3 | 17 |
| n-bit ripple carry | 2n | 2n | 2n+1 | 17n |
| n-bit carry skip (one group) | 3n+1 | 3n+1 | 4n+2 | 22n+2 |

The ripple carry and carry skip figures match this RTL's gate structure. The
cell figures depend on the 5x5 gate, which is not modelled (see above).

## Files

`rtl/`: `fredkin_gate.sv`, `f2g_gate.sv`, `nft_gate.sv`, `ftfas_cell.sv`,
`pp_parallel_addsub.sv`, `pp_carry_skip_addsub.sv`, `pp_addsub_top.sv`.

`tb/`: one self-checking testbench per module, `tb_<module>.sv`. Each compares
with integer arithmetic or truth tables computed independently, and prints
`TB_RESULT checks=<n> failures=<m>`.

* The gate and cell tests are exhaustive.
* The 4-bit units get all 1024 combinations of `a`, `b`, `cbin` and `ctrl`.
  8-bit instances get random vectors, and the carry skip test also covers
  GROUP=2.
* `tb_pp_addsub_top` runs the top at its default parameters. It counts add,
  subtract, mode switches, carry-outs, borrow-outs, skipped groups, rippled
  groups and carries delivered through the skip path, and fails if any of
  them never occurs.

## Simulating

    verilator --binary --timing -y rtl -y tb +libext+.sv tb/tb_pp_addsub_top.sv
    ./obj_dir/Vtb_pp_addsub_top

Replace the testbench name to run another one. To lint a module:

    verilator --lint-only -Wall -y rtl +libext+.sv rtl/pp_carry_skip_addsub.sv
