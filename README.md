# 128-bit regular square-root carry-select adder

A ripple carry adder is small but slow: the carry has to pass through every bit
position. A carry-select adder (CSLA) cuts that chain into groups. Each group is
added twice, once assuming its incoming carry is 0 and once assuming it is 1.
When the real carry arrives, it only has to drive a multiplexer that picks the
matching result. In the *square-root* arrangement each group is one bit wider
than the one below it. A wider group takes longer to compute both of its
candidate results, but its carry also arrives later, so the two roughly line up.

This RTL builds a 128-bit adder out of eight identical 16-bit square-root CSLA
blocks in a carry chain. It is purely combinational: `{cout, sum} = a + b + cin`
in a single pass. There is no clock, no register and no reset.

## The 16-bit block

Each block covers 16 bits and is split like this. Bits are numbered from 0 at
the least significant end.

| bits      | unit                        | carry in                 | mux     |
|-----------|-----------------------------|--------------------------|---------|
| [1:0]     | one 2-bit ripple adder      | block carry in           | none    |
| [3:2]     | two 2-bit ripple adders     | carry out of bits [1:0]  | 6:3     |
| [6:4]     | two 3-bit ripple adders     | carry out of bits [3:2]  | 8:4     |
| [10:7]    | two 4-bit ripple adders     | carry out of bits [6:4]  | 10:5    |
| [15:11]   | two 5-bit ripple adders     | carry out of bits [10:7] | 12:6    |

A mux is named by its bit counts. "MUX 2k:k" takes two k-bit words and passes
one. Each word is a group's W sum bits plus its carry out, so k = W + 1. For
example, the 6:3 mux chooses between two (2 sum + 1 carry) results. Its select
is the carry coming out of the group below:

- select 0 passes the result of the adder whose carry in was tied to 0;
- select 1 passes the result of the adder whose carry in was tied to 1.

The carry out of the 5-bit group's mux is the block's carry out.

Inside a block, the carry path from `cin` to `cout` is two full-adder carry
stages, followed by four 2:1 mux stages. All the group adders work in parallel
with that path. The 5-bit group needs five full-adder carry stages to settle.
Its select arrives after two full-adder stages plus three muxes, so the two
finish at about the same time.

## From 16 to 128 bits

The wider adders are built by doubling:

- `sqrt_csla32` is two `sqrt_csla16` blocks.
- `sqrt_csla64` is two `sqrt_csla32`.
- `sqrt_csla128` is two `sqrt_csla64`.

At each level, the lower half's carry out is wired straight to the upper half's
carry in. The upper half is **not** duplicated for the two carry values. At the
block level, then, the adder is a ripple chain of eight blocks. The worst-case
carry path through the 128-bit word is:

    8 x (2 full-adder carry stages + 4 mux stages)

So the delay grows linearly with the width, while the area grows only by the
blocks added. Published FPGA results for this architecture show the same trend:

| width | 4-input LUTs | max combinational path |
|-------|--------------|------------------------|
| 16    | 57           | 17.7 ns                |
| 32    | 113          | 26.8 ns                |
| 64    | 223          | 45.0 ns                |
| 128   | 442          | 81.9 ns                |

The 128-bit adder has 386 I/O signals: 2 x 128 operand bits, 128 sum bits, a
carry in and a carry out. This RTL has the same ports.

## Gate-level cells

- `xor_aoi`: two-input XOR in AND-OR-INVERT form, `y = a·~b + ~a·b`. It has three
  gate levels (inverters, ANDs, OR), which is the unit used to cost the adders.
- `full_adder`: `p = a ^ b`, `s = p ^ cin`, `cout = a·b + p·cin`. Both XORs are
  `xor_aoi` cells.
- `rca #(W)`: W full adders in a chain. The default W = 4.
- `csla_mux #(W)`: the 2(W+1):(W+1) selector, written as a plain `if`/`else`.
  The default W = 3 gives the 8:4 mux.
- `csla_group #(W)`: two `rca #(W)` with carry in 0 and 1, plus one
  `csla_mux #(W)`. The default W = 2.

The package `csla_pkg` holds the block layout:

- `BLOCK_W = 16`
- `FIRST_RCA_W = 2`
- `GROUP_W = '{2, 3, 4, 5}`
- `group_lsb(g)`, which gives the bit where group g starts.

`sqrt_csla16` builds its groups from these constants. It stops elaboration with
an error if they do not add up to `BLOCK_W`. You can try another split by
editing the package, as long as the total stays 16. The wider adders assume
16-bit blocks and do not need any change.

## Where this RTL goes beyond the published description

- **Full adder structure.** The published material gives the full adder as a
  truth table, so the shared half-sum form above is this design's choice. The
  XOR in AND/OR/NOT form does follow the published basic-gate model.
- **Mux structure.** The mux is specified only by what it does. Its gate-level
  form is left to synthesis.
- **Carry between halves.** Between 16-bit blocks and between halves, the carry
  is handed over directly. The description says the lower half's carry "is fed
  as carry input" to the upper half. A variant drawing of a wide adder, with
  groups up to 64 bits and a 130:65 mux, was not followed: it does not add up to
  128 bits and does not match the doubling construction.
- **No timing.** Power and FPGA resource figures are results of a vendor
  implementation flow, so nothing here models them.

## Files

| file                   | contents                                            |
|------------------------|-----------------------------------------------------|
| `rtl/csla_pkg.sv`      | block layout constants                              |
| `rtl/xor_aoi.sv`       | AND-OR-INVERT XOR                                   |
| `rtl/full_adder.sv`    | full adder                                          |
| `rtl/rca.sv`           | W-bit ripple carry adder                            |
| `rtl/csla_mux.sv`      | carry-select mux                                    |
| `rtl/csla_group.sv`    | dual RCA + mux group                                |
| `rtl/sqrt_csla16.sv`   | 16-bit block                                        |
| `rtl/sqrt_csla32.sv`   | 32-bit adder                                        |
| `rtl/sqrt_csla64.sv`   | 64-bit adder                                        |
| `rtl/sqrt_csla128.sv`  | 128-bit adder, top                                  |
| `tb/tb_<module>.sv`    | self-checking testbench of each module              |

## Testbenches

Every testbench does three things:

- It compares the outputs against values worked out independently.
- It ends by printing `TB_RESULT checks=<n> failures=<m>`.
- It has a watchdog that counts a failure and stops the run if the test hangs.

What each testbench covers:

- The cells are tested exhaustively.
  - `tb_xor_aoi`: all 4 input pairs.
  - `tb_full_adder`: all 8 rows of the truth table.
  - `tb_rca`: all 512 vectors at 4 bits.
  - `tb_csla_mux`: all 512 input words at W = 3.
  - `tb_csla_group`: 2-bit and 5-bit groups, all 2048 vectors.
- `tb_sqrt_csla16`, `tb_sqrt_csla32`, `tb_sqrt_csla64` and `tb_sqrt_csla128`
  apply directed corner cases and then 10,000 (20,000 for 128 bits)
  pseudo-random vectors.
  - The corner cases are zeros, all ones, a carry rippling through every bit,
    and a carry generated at the top of each block.
  - Half of the random operands are made of runs of equal bits, so that long
    carry chains occur often.
  - The reference is the integer sum `a + b + cin`.
- The wide-adder testbenches also recover the carry into every bit as
  `a ^ b ^ sum`. They fail if any of these never happens:
  - a group selects its carry-0 result;
  - a group selects its carry-1 result;
  - a carry between two blocks is 0, and is 1;
  - the carry out is 0, and is 1;
  - a carry ripples through the whole word.

`tb_sqrt_csla128` runs the top at full size. To run it with Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/csla_pkg.sv \
        tb/tb_sqrt_csla128.sv --top-module tb_sqrt_csla128 -Mdir obj
    ./obj/Vtb_sqrt_csla128

To run another testbench, replace the testbench name. Verilator finds the
modules in `rtl/` by file name. Each testbench finishes in well under a second
of simulation time.
