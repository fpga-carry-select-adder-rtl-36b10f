// csel_pkg -- shared types and block-layout functions for the carry-select
// carry chain of an FPGA logic column.
//
// The chain is cut into blocks. Block 0 (cells 0 and 1) is a plain ripple
// chain. Every later block b (b >= 1) holds b+1 cells, so the block lengths
// run 2, 2, 3, 4, 5, 6, 7, ... The growth by one cell per block is what the
// design is built on: a block of L cells needs L-1 mux delays to form its two
// speculative carries, which is the time its carry-in takes to arrive. The
// last block of a chain is cut short where the chain ends.
//
// cell_cfg_t holds the three configuration bits ("P" in the cell drawing) of
// one logic cell; their polarity is this design's own choice (see logic_cell).
package csel_pkg;

  // Number of cells in the column: the chain resource spans 32 bit positions.
  localparam int unsigned CHAIN_BITS = 32;

  // Cells in the leading ripple block (cells 0 and 1, handled by mux1).
  localparam int unsigned RIPPLE_CELLS = 2;

  typedef struct packed {
    logic c1_sel;  // mux2: 0 = C1 from the OR gate, 1 = C1 from mux1
    logic c0_sel;  // mux3: 0 = C0 from the AND gate, 1 = C0 from mux1
    logic f_sel;   // mux5: 0 = F is the chain's Cout, 1 = F is mux1
  } cell_cfg_t;

  // First cell of carry-select block b (b >= 1).
  function automatic int unsigned block_start(int unsigned b);
    int unsigned s;
    s = RIPPLE_CELLS;
    for (int unsigned k = 1; k < b; k++) s += k + 1;
    return s;
  endfunction

  // Nominal length of carry-select block b (b >= 1): one cell more than the
  // block before it, starting from 2.
  function automatic int unsigned block_len(int unsigned b);
    return b + 1;
  endfunction

  // Number of carry-select blocks needed after the ripple block to cover n
  // cells (the last one possibly cut short).
  function automatic int unsigned num_blocks(int unsigned n);
    int unsigned b;
    b = 0;
    while (block_start(b + 1) < n) b++;
    return b;
  endfunction

  // Length of block b once cut to a chain of n cells.
  function automatic int unsigned block_len_in(int unsigned b, int unsigned n);
    int unsigned s;
    s = block_start(b);
    return (s + block_len(b) > n) ? n - s : block_len(b);
  endfunction

endpackage
