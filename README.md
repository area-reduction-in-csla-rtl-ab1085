# Square-root carry-select adder with BEC (128-bit)

A ripple-carry adder is small but slow, because the carry has to pass
through every bit. A carry-select adder (CSLA) removes most of that wait. It
cuts the word into groups and computes each group's result twice, once for
an incoming carry of 0 and once for a carry of 1. When the real carry
arrives, a multiplexer only has to pick one of the two results. The
classic CSLA pays for this with two ripple-carry adders per group.

This design keeps the speed of the carry-select scheme and saves most of the
second adder. Each group has one ripple-carry adder (RCA) with carry in 0.
The carry-in-1 result is derived from it with a **Binary to Excess-1
Converter (BEC)**, a small "add one" circuit:

    {c1, s1} = {c0, s0} + 1

An N-bit group needs an (N+1)-bit BEC, since the group's carry out is
included. That is one inverter plus a chain of N AND gates and N XOR gates:

    x[0] = ~b[0]
    x[i] =  b[i] ^ (b[0] & b[1] & ... & b[i-1])

A full N-bit adder would need N full adders. The BEC sits beside the carry
path, not on it. The carry still crosses each group through a single 2:1
multiplexer.

For comparison, the source publication reports these results at 128 bits, in
its own standard-cell library:

| Adder                | Area      | Delay    |
|----------------------|-----------|----------|
| Dual-RCA SQRT CSLA   | 6353 gates | 14.24 ns |
| This BEC variant     | 5156 gates | 15.04 ns |

That is about 19 % less area for about 6 % more delay. It also gives results
for 8, 16, 32 and 64 bits. This RTL does not reproduce those numbers, which
depend on the library.

## Group layout: why "square root"

Group g can only use its incoming carry once that carry has passed the
groups below it, one multiplexer per group. Higher groups therefore have
more time to ripple internally, and can be wider. Letting each group grow by
one bit balances the two delays. The number of groups then grows roughly as
the square root of the word width.

The layout is computed in `csla_pkg` with constant functions:

* group 0: 2 bits, a plain RCA fed by the adder's `cin`;
* group 1: 2 bits; group g >= 2: g + 1 bits;
* the last group takes whatever bits remain.

| WIDTH | groups (LSB first)                          |
|-------|---------------------------------------------|
| 8     | 2-2-3-1                                     |
| 16    | 2-2-3-4-5                                   |
| 32    | 2-2-3-4-5-6-7-3                             |
| 64    | 2-2-3-4-5-6-7-8-9-10-8                      |
| 128   | 2-2-3-4-5-6-7-8-9-10-11-12-13-14-15-7 (16 groups) |

The source's group sizes are not known. This layout is the common
square-root one and this design's own choice. At 128 bits it has sixteen
groups, and the last one holds bit 126. Both facts match the source's
critical-path report, which ends in the sixteenth group at sum bit 126. To
use another layout, change `nominal_size` in `csla_pkg.sv`. Every other
function follows from it.

## Carry path and timing

The design is purely combinational: no clock, no reset, no latency in
cycles. The worst-case path from the operands to the top sum bits is:

1. the 2-bit RCA of group 0, giving the carry into group 1;
2. one multiplexer per select group, 15 of them at 128 bits.

The RCA and BEC of a wide group work in parallel with the carry chain below
it. For the select in a group to be the last signal to settle, the group's
RCA plus BEC must finish before its select carry arrives. The growing group
sizes are meant to keep that true. How much margin is left depends on the
cell library, and is not modelled here.

## Modules

| Module            | Function | Parameters |
|-------------------|----------|------------|
| `sqrt_csla_bec`   | top: `{cout, s} = a + b + cin` | `WIDTH` (128) |
| `csla_bec_group`  | one select group: RCA(cin = 0), BEC, 2:1 multiplexer | `N` (2) |
| `rca`             | N-bit ripple-carry adder | `N` (2) |
| `bec`             | N-bit binary to excess-1 converter, `x = b + 1 mod 2^N` | `N` (3) |
| `full_adder`      | one-bit full adder | none |
| `csla_pkg`        | group layout: `num_groups`, `group_lsb`, `group_size` | none |

Ports of `sqrt_csla_bec`:

| Port   | Dir | Width | Meaning |
|--------|-----|-------|---------|
| `a`    | in  | WIDTH | addend |
| `b`    | in  | WIDTH | addend |
| `cin`  | in  | 1     | carry in |
| `s`    | out | WIDTH | sum |
| `cout` | out | 1     | carry out |

Inside the top, `c[g]` is the carry into group g, and `c[NG]` is `cout`.
Generate blocks are named `g_grp[g].g_first` (group 0) and `g_grp[g].g_sel`
(the others), so each group can be found in a waveform viewer.

## Verification

Each testbench checks the outputs against a behavioural `+` of the same
width. It ends with the line `TB_RESULT checks=N failures=M`.

* `tb_rca`: exhaustive at 2 and 6 bits. This also covers `full_adder`.
* `tb_bec`: every input at 3 and 9 bits, including the wrap of all-ones to
  zero.
* `tb_csla_bec_group`: exhaustive at 2 and 5 bits, with both select values.
* `tb_sqrt_csla_bec`: 128 bits at default parameters, 20 000+ vectors.
  * It includes the vector of the source's 128-bit simulation:
    `a = b = 8c41` repeated eight times and `cin = 1`, giving
    `s = 1883` repeated eight times and `cout = 1`.
  * It also covers all-ones corner cases.
  * Half of the random vectors have `b` close to `~a`, which makes long
    carry chains.
  * For each of the 15 select groups it counts how often the RCA result
    and the BEC result were selected, working out the group's carry from
    the operands alone. A group where either never happened counts as a
    failure. It also counts vectors whose carry crossed every group.
* `tb_sqrt_csla_widths`: instances at 8, 16, 32, 64 and 128 bits, side by
  side on shared random operands.

Running a testbench with plain Verilator:

    verilator --binary --timing -Irtl -Itb rtl/csla_pkg.sv \
        tb/tb_sqrt_csla_bec.sv --top-module tb_sqrt_csla_bec -Mdir obj
    ./obj/Vtb_sqrt_csla_bec

The package has to come first on the command line. Verilator finds the other
modules through `-Irtl`.

## What follows the source and what does not

From the source:

* the architecture: square-root CSLA, one RCA plus one BEC per group, with
  multiplexer selection;
* the main width of 128 bits and the other evaluated widths (8 to 64 bits);
* the port set: two 128-bit operands, a carry in, a 128-bit sum and a carry
  out, 386 port bits in all;
* the 128-bit test vector.

This design's own choices:

* the exact group sizes (see above);
* the gate form of the BEC;
* the choice of a BEC over N+1 bits, so that the group's carry out is
  selected along with its sum;
* plain ripple-carry adders made of full adders.

The source's area and delay figures come from a commercial library and
synthesis flow. They are not reproduced here.

The dual-RCA carry-select adder the source compares against is not
included. It differs only in replacing each BEC with a second RCA that has
carry in 1.
