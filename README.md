# Carry-select carry chain for an FPGA logic column

An FPGA adder is normally built on a dedicated carry chain running down a
column of logic cells. A plain ripple chain puts one 2:1 mux per bit on the
critical path, so a carry that enters at the bottom of a 32-cell column
passes 31 muxes before it reaches the top. This design keeps the cells and
the mux-based chain but cuts the chain into **carry-select blocks of growing
length**: each block computes its carries twice, once for a carry in of 1 and
once for 0, while the carry in is still on its way, and then picks one with a
single mux. A 32-cell column reaches its last carry after 8 mux levels
instead of 31, and a carry computation can still start at any cell of the
column.

Everything is combinational. There is no clock and no reset.

## The logic cell and its carry code (`logic_cell`)

Each cell looks at its two operand bits X and Y and produces two carry
candidates. **C1** is the carry out if the carry in is 1. **C0** is the carry
out if the carry in is 0. For an adder bit, C1 = X | Y (an OR gate) and
C0 = X & Y (an AND gate). The chain then only has to compute

    Cout[i] = Cout[i-1] ? C1[i] : C0[i]

Read as a pair, (C1, C0) is a carry code:

| C1 C0 | Cout       | meaning           |
|-------|------------|-------------------|
| 0 0   | 0          | kill              |
| 1 0   | Cin        | propagate         |
| 1 1   | 1          | generate          |
| 0 1   | not Cin    | inverse propagate |

An adder cell only ever produces kill, propagate or generate. The chain still
handles all four codes.

The cell has five muxes:

* **mux1** is steered by the cell's third input Z. It picks the OR output
  (Z = 1) or the AND output (Z = 0).
* **mux2** and **mux3** set C1 and C0. Each one takes either its gate output
  or mux1's output.
* **mux5** sets the cell output F. It takes either this cell's carry out,
  which comes back from the chain, or mux1's output.

Which select value picks which input is a choice made in this RTL. The three
configuration bits sit in `csel_pkg::cell_cfg_t` (`c1_sel`, `c0_sel`,
`f_sel`). A bit set to 1 selects mux1's output.

**Starting a carry computation.** If a cell sets both `c1_sel` and `c0_sel`,
then C1 = C0 = mux1. The cell's carry out then no longer depends on the carry
coming from below, so a new computation starts at that cell. With X and Y as
operand bit 0 and Z as the adder's carry in, mux1 gives
`Z ? X|Y : X&Y`, which is exactly the carry out of bit 0. An adder of W bits
therefore takes W cells, and its first cell can be anywhere in the column.

## The carry-select chain (`fast_carry_logic`, `csel_block`)

The column of N = 32 positions is cut up like this:

| block | cells | length | muxes |
|-------|-------|--------|-------|
| ripple | 0-1 | 2 | Cout0 = C1[0]; mux M1 for cell 1 |
| 1 | 2-3   | 2 | M2-M5 |
| 2 | 4-6   | 3 | M6-M12 |
| 3 | 7-10  | 4 | M13-M22 |
| 4 | 11-15 | 5 | M23-M35 |
| 5 | 16-21 | 6 | |
| 6 | 22-28 | 7 | |
| 7 | 29-31 | 3 (cut short at the end of the column) | |

A block of L cells (`csel_block`) contains:

* a **true chain**. It starts from C1 of the block's first cell and ripples
  through L-1 muxes.
* a **false chain**. It starts from C0 and ripples the same way.
* **L output muxes**. The block's real carry in, which is the carry out of
  the cell just below the block, picks the true or the false carry for each
  cell.

Why the blocks grow by one cell: the chains of an L-cell block are ready
after L-1 mux delays. A block's carry in arrives one mux level after the
carry in of the block before it. Because each block is one cell longer than
the one before, its chains finish just as its carry in arrives. The block
layout comes from the functions `block_start`, `block_len_in` and
`num_blocks` in `csel_pkg`. For any N, the last block is cut where the
column ends.

Cout[0] is C1[0], and C0[0] is not used. The chain has no carry input of its
own. Its bottom cell starts a computation the same way any other cell does,
as described above. Lint reports C0[0] as an unused bit, and that is
expected.

Mux depth from C1/C0 to each carry out, for N = 32:

* ripple chain: i muxes to Cout[i], so 31 at the top;
* this chain: 1 at cells 0-1, 2 up to cell 3, 3 up to cell 6, and so on, up
  to 8 at the top.

These are levels of 2:1 muxes. Real gate and wire delays are not modelled.

## The column (`carry_chain_column`, top level)

This module holds N logic cells on one `fast_carry_logic`. The C1/C0 of each
cell go into the chain, and each cell's carry out goes back to that cell's
mux5.

| port     | dir | width | meaning |
|----------|-----|-------|---------|
| `x_i`    | in  | N     | X of each cell |
| `y_i`    | in  | N     | Y of each cell |
| `z_i`    | in  | N     | Z of each cell (mux1 select) |
| `cfg_i`  | in  | N x `cell_cfg_t` | configuration bits of each cell |
| `cout_o` | out | N     | carry out of each cell |
| `f_o`    | out | N     | F of each cell |

To map a W-bit adder `a + b + cin` at cell s:

* cell s: `cfg = {c1_sel:1, c0_sel:1}`, `x = a[0]`, `y = b[0]`, `z = cin`;
* cells s+1 to s+W-1: both selects 0, `x = a[k]`, `y = b[k]`.

`cout_o[s+k]` is then the carry out of bit k. The sum bits are
`a[k] ^ b[k] ^ (k == 0 ? cin : cout_o[s+k-1])`. The column does not produce
them: F is either the carry or mux1's output, so the XOR belongs to the logic
around the column. One 32-bit adder fills the column. It can also hold up to
four 8-bit adders, or any mix of adders at any start cell.

The configuration bits are ports here. In an FPGA they would come from
configuration memory, which is not part of this RTL.

## Where this RTL makes its own choices

* The mux select polarities in the cell (see above).
* The chain has no separate carry-in pin; a carry enters through the first
  cell's Z. A simpler drawing of the same chain shows a Cin input on the
  carry logic. The detailed carry-select structure instead takes Cout0
  straight from C1 of cell 0, and that structure was followed.
* The layout of cells 7-10 and of everything above cell 15 follows the rule
  that each block is one cell longer than the one before. Only the blocks up
  to cell 15 are drawn in detail.
* There is one module per carry-select block. The drawings show individual
  muxes instead.
* Not built: the plain ripple-carry cell, with a mux4 fed by Cin and a delay
  of 2n+2 for n bits. It is only the comparison point. The configuration
  memory is not built either.

## Files

* `rtl/csel_pkg.sv`: the configuration struct, the size constant and the
  block-layout functions
* `rtl/logic_cell.sv`: one logic cell
* `rtl/csel_block.sv`: one carry-select block, parameter `LEN`
* `rtl/fast_carry_logic.sv`: the blocked chain, parameter `N` (default 32)
* `rtl/carry_chain_column.sv`: the top level, parameter `N` (default 32)
* `tb/*_tb.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=… failures=…`.

## Testbenches

* `logic_cell_tb` drives all 128 input and configuration combinations.
* `csel_block_tb` drives a 4-cell block exhaustively and a 7-cell block with
  random values, against a bit-serial ripple.
* `fast_carry_logic_tb` runs the 32-cell and 9-cell chains. It uses random
  pairs, pairs drawn from all four codes, and long propagate runs. It also
  checks the block layout and the 8-level worst mux depth.
* `carry_chain_column_tb` runs at the default size. It covers:
  * 32-bit additions with carry in;
  * an 8-bit adder at each of the 25 possible start cells;
  * four 8-bit adders packed into one column;
  * random configurations, checked against a reference cell model.

  It counts, for every block, how often the true chain and the false chain
  were selected while they disagreed. It also counts full-length carry runs,
  chain restarts, and both F sources. A mechanism that never occurs counts
  as a failure.

To simulate with Verilator (package first):

    verilator --binary --timing --assert rtl/csel_pkg.sv rtl/logic_cell.sv \
      rtl/csel_block.sv rtl/fast_carry_logic.sv rtl/carry_chain_column.sv \
      tb/carry_chain_column_tb.sv --top-module carry_chain_column_tb
    ./obj_dir/Vcarry_chain_column_tb

To lint: `verilator --lint-only -Wall` on the same RTL files with
`--top-module carry_chain_column`. The only expected warning is the unused
`c0_i[0]` described above.
