# Multi-operand modular adders from FPGA look-up tables

This design adds many small residues modulo M in an FPGA using nothing but
look-up tables. The operands are 5-bit residues, the digits of a residue
number system (RNS) channel in an FFT or FIR filter. The design computes

    r = (x[0] + x[1] + ... + x[N-1]) mod M

There are no carry chains and no comparators. Every partial sum and every
modulo reduction is read out of a small table with at most 6 or 7 address bits.
Each table is a handful of FPGA LUTs used as 2^k x 1 ROMs, one LUT per output
bit.

Two ways to build an eight-operand adder are implemented side by side:

| structure | blocks | LUT levels = pipeline stages (N = 8) |
|---|---|---|
| TOMA tree | 7 two-operand adders in 3 levels | 9 |
| FOMA tree | 2 four-operand adders, then 1 two-operand adder | 7 |

The second structure reduces modulo M less often: once per four operands
instead of once per two. That is why it is shallower.

## The operand split

A 5-bit operand is split into a 3-bit low segment (bits 2..0) and a 2-bit
high segment (bits 4..3). Adding two low segments needs 6 address bits. The
table returns a 3-bit sum and a carry. Adding two high segments plus that
carry needs 5 address bits. Every table therefore fits in one level of 6-input
LUTs, except two tables of the four-operand adder, which need 7 inputs.

A 7-input table is built from two 6-input halves that are read in parallel.
A 2:1 multiplexer driven by the address MSB picks one half (`lut_ram`,
`g_split`). On Xilinx parts this is the slice's wide-function multiplexer.

All table contents are computed at elaboration by
`moma_pkg::init_table(kind, AW, DW, M)`. Entry `e` of a table holds:

- `LUT_ADD`: `a + b`, where `e = {a, b}` and `a`, `b` are `AW/2` bits each;
- `LUT_ADD_CIN`: `a + b + c`, where `e = {a, b, c}` and `a`, `b` are `(AW-1)/2` bits each;
- `LUT_MOD`: `e mod M`.

## TOMA: two-operand modulo adder (`toma`)

| table | address | output |
|---|---|---|
| RAM1 | `a[2:0], b[2:0]` (6) | `{c3, s[2:0]}` (4 LUTs) |
| RAM2 | `a[4:3], b[4:3], c3` (5) | `s[5:3]` (3 LUTs) |
| RAM3 | `{s[5:3], s[2:0]}` (6) | `s mod M` (5 LUTs) |

That is 12 LUTs and three LUT levels. RAM3 holds the remainder of every 6-bit
sum, so inputs that are not yet reduced (up to 31) also give the right result.

## FOMA: four-operand modulo adder (`foma`)

The four-operand adder sums two pairs in binary, adds the two pair sums, and
reduces only once.

| stage | table | address bits | output |
|---|---|---|---|
| 1 | RAM1A, RAM1B | low segments of x0,x1 and of x2,x3 (6) | `{c3, s[2:0]}` per pair |
| 2 | RAM2A, RAM2B | high segments of a pair and its c3 (5) | pair sum bits 5..3 |
| 2 | RAM3 | the two 3-bit low pair sums (6) | `{c3', S[2:0]}` |
| 3 | RAM4 | the two 3-bit high pair sums and c3' (7) | `S[6:3]` |
| 4 | RAM5 | `{S[6:3], S[2:0]}` (7) | `S mod M` |

RAM3 depends only on RAM1A/B, so it runs in parallel with RAM2A/B. The adder
is therefore four LUT levels deep. The carry into RAM4 is the carry out of
RAM3, i.e. of the total low sum. The address of RAM5 is the complete 7-bit
binary sum of the four operands.

## Trees (`moma_toma_tree`, `moma_foma_tree`)

- **`moma_toma_tree`** adds pairs (x0,x1), (x2,x3), … and then pairs of
  results. It uses N-1 TOMAs in log2 N levels, for any power of two N ≥ 2.
- **`moma_foma_tree`** uses FOMA levels on groups of four (x0..x3, x4..x7, …).
  When log2 N is odd, one TOMA adds the last two results. Its latency is
  `4*floor(log2 N / 2) + 3*(log2 N mod 2)`: 7 for N = 8 and 8 for N = 16.

`moma_top` feeds the same operands to both trees. It brings out both results,
each with its own valid flag.

## Timing and interface

- **Registers.** Every table output is registered, as in the slice flip-flops
  after the LUTs. Operand bits and partial sums that skip a level are delayed
  by extra registers, so the stages stay aligned.
- **Throughput.** Each adder is a pipeline that accepts one operand set per
  clock.
- **Latency.** The result of an operand set sampled on clock edge t appears
  after edge t+L-1 and is sampled at edge t+L. L is 3 for the TOMA, 4 for the
  FOMA, 9 for the TOMA tree and 7 for the FOMA tree (N = 8).
- **Valid flags.** The trees carry `in_valid` to `out_valid` in a shift
  register of depth L. `rst` is synchronous and active high. It only clears
  this shift register, so sets in flight at a reset are dropped.
- **No reset on the data path.** It carries no reset and needs none, because
  the tables are constant.
- **Ports.** `x` is an unpacked array `operand_t x [N]` of 5-bit operands
  (`moma_pkg::operand_t`). Parameters: `N` (default 8) and `M` (default 29,
  any value from 2 to 32).

## Where this design makes its own choices

- **The modulus.** The described design fixes only the operand width of 5 bits.
  M = 29 is an arbitrary default, and the testbenches also use 17 and 31.
- **Pipeline alignment.** The alignment registers, the valid/reset handshake
  and placing RAM3 in stage 2 of the FOMA are this design's choices.
- **FOMA wiring.** RAM4's carry input is the carry out of RAM3, the carry of
  the total low sum, not the carry of one operand pair. RAM5 reduces the whole
  7-bit sum {RAM4 output, RAM3 low bits}. These are the only wirings for which
  the four-operand result is correct.
- **Cost of a TOMA tree.** A tree of n operands has n-1 TOMAs, so
  12·(n-1) LUT outputs. It is 3·log2 n LUT levels deep.
- **Operand order.** The FOMA tree's grouping of operands (consecutive fours)
  is not specified by the source and is the simplest choice.
- **Operand count.** Both trees support only powers of two for N.

## Expected size

For N = 8, the TOMA tree has 7 × 12 = 84 LUT table outputs. The published
Virtex-6 result for that structure is 84 LUTs (21 LUT5 and 63 LUT6), at
332 MHz.

The FOMA tree was published at 335 MHz, using 4 LUT3, 32 LUT5 and 64 LUT6.
Each FOMA here has 27 table outputs. The 7-input tables RAM4 and RAM5 take two
6-input LUTs per output bit, so a FOMA maps to 36 LUTs, and the eight-operand
tree to 2 × 36 + 12 = 84.

These counts come from the RTL structure. They were not checked by a vendor
synthesis run.

## Files

`rtl/`:

- `moma_pkg.sv`: widths, latencies, table kinds and the table-content function
- `lut_ram.sv`: registered LUT table, including the 7-input split
- `toma.sv`, `foma.sv`: the two basic adders
- `moma_toma_tree.sv`, `moma_foma_tree.sv`: the N-operand trees
- `moma_top.sv`: both eight-operand adders side by side

`tb/`:

- `tb_lut_ram.sv`: checks every address of each table shape
- `tb_toma.sv`: all 1024 operand pairs, streamed, for M = 29 and 31, plus an
  isolated latency check
- `tb_foma.sv`: corner and random sets, streamed, for M = 29 and 31
- `tb_moma_toma_tree.sv`, `tb_moma_foma_tree.sv`: N = 8 at the defaults,
  N = 2 and N = 16, with random idle cycles
- `tb_moma_top.sv`: end-to-end run at the default parameters. It cross-checks
  the two trees and reports how often each case occurred: reduction, sums of
  2M or more, group sums of 64 or more, back-to-back sets, idle cycles, and a
  reset with sets in flight.
- `moma_scoreboard.sv`: reference model that checks each result and its
  latency

Each testbench prints `TB_RESULT checks=<n> failures=<n>`. For example:

    verilator --binary --timing --assert -Irtl -Itb rtl/moma_pkg.sv rtl/lut_ram.sv \
      rtl/toma.sv rtl/foma.sv rtl/moma_toma_tree.sv rtl/moma_foma_tree.sv \
      rtl/moma_top.sv tb/moma_scoreboard.sv tb/tb_moma_top.sv --top-module tb_moma_top
    ./obj_dir/Vtb_moma_top

Each testbench runs in well under a second.
