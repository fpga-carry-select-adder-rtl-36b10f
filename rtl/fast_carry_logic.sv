// fast_carry_logic -- carry-select carry chain across a column of N cells.
//
// Inputs are the per-cell carry candidates C1 (carry out if the carry in is
// 1) and C0 (carry out if it is 0); outputs are the real carry out of every
// cell, Cout[i] = Cout[i-1] ? C1[i] : C0[i]. Instead of one long ripple of N
// muxes, the chain is cut into blocks:
//   * cells 0 and 1 ripple: Cout[0] is C1[0] and Cout[1] is mux1 of cell 1;
//   * after that come carry-select blocks (csel_block) of 2, 3, 4, 5, ...
//     cells, each fed with the carry out of the last cell of the block before.
// A block of L cells has its speculative carries ready after L-1 mux delays,
// just when its carry in arrives, so the worst carry out of the column comes
// after about as many mux delays as there are blocks (8 for 32 cells) rather
// than N-1.
//
// Cout[0] is taken straight from C1[0], as in the chain drawings: the chain
// has no carry input of its own. A carry computation starts at a cell whose
// C1 and C0 are equal (the logic cell can force this); its carry out is then
// that value whatever the carry in, so a computation can begin at any cell.
// C0[0] is therefore not used, as in the drawings (it stays a port so that
// every cell connects the same way); lint reports it as an unused bit.
//
// Purely combinational. N defaults to the 32-cell chain resource; the last
// block is cut short where the column ends (for N = 32 the blocks are
// 2 | 2 3 4 5 6 7 | 3).
module fast_carry_logic
  import csel_pkg::*;
#(
  parameter int unsigned N = CHAIN_BITS   // cells in the column, at least 2
) (
  input  logic [N-1:0] c1_i,    // per-cell carry if carry in = 1
  input  logic [N-1:0] c0_i,    // per-cell carry if carry in = 0
  output logic [N-1:0] cout_o   // per-cell carry out
);

  localparam int unsigned NB = num_blocks(N);

  // Ripple block: cells 0 and 1 (mux1).
  assign cout_o[0] = c1_i[0];
  assign cout_o[1] = cout_o[0] ? c1_i[1] : c0_i[1];

  for (genvar b = 1; b <= NB; b++) begin : g_block
    localparam int unsigned S = block_start(b);
    localparam int unsigned L = block_len_in(b, N);
    csel_block #(.LEN(L)) u_block (
      .c1_i  (c1_i[S+L-1:S]),
      .c0_i  (c0_i[S+L-1:S]),
      .cin_i (cout_o[S-1]),
      .cout_o(cout_o[S+L-1:S])
    );
  end

  if (N < RIPPLE_CELLS) begin : g_bad_size
    $error("fast_carry_logic: N must be at least 2");
  end

endmodule
