// csel_block -- one carry-select block of the fast carry logic.
//
// The block covers LEN consecutive cells. It runs two short ripple chains at
// once, without waiting for its carry in: the "true" chain assumes the carry
// in is 1 and starts from C1 of the block's first cell, the "false" chain
// assumes 0 and starts from C0. Each further cell k passes the chain's carry
// through a 2:1 mux, chain[k] = chain[k-1] ? C1[k] : C0[k]. When the real
// carry in arrives, one output mux per cell picks the true or false chain's
// carry. A block of LEN cells thus holds 2*(LEN-1) chain muxes and LEN output
// muxes (for LEN = 3: true chain M6, M7; false chain M8, M9; outputs M10..M12).
//
// The carry in is only ever a mux select here, so the delay from carry in to
// any carry out of the block is one mux, and the chains are ready after LEN-1
// mux delays.
//
// Purely combinational. Block structure after the carry-select drawings; the
// helper split into one module per block is this design's own.
module csel_block #(
  parameter int unsigned LEN = 2   // cells in this block
) (
  input  logic [LEN-1:0] c1_i,    // carry out of each cell if its carry in is 1
  input  logic [LEN-1:0] c0_i,    // carry out of each cell if its carry in is 0
  input  logic           cin_i,   // carry into the block's first cell
  output logic [LEN-1:0] cout_o   // carry out of each cell
);

  logic [LEN-1:0] t_chain;  // carries assuming cin_i = 1
  logic [LEN-1:0] f_chain;  // carries assuming cin_i = 0

  assign t_chain[0] = c1_i[0];
  assign f_chain[0] = c0_i[0];

  for (genvar k = 1; k < LEN; k++) begin : g_chain
    assign t_chain[k] = t_chain[k-1] ? c1_i[k] : c0_i[k];
    assign f_chain[k] = f_chain[k-1] ? c1_i[k] : c0_i[k];
  end

  // Output muxes: the real carry in picks one chain per cell.
  assign cout_o = cin_i ? t_chain : f_chain;

endmodule
