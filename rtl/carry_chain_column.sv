// carry_chain_column -- a column of N FPGA logic cells joined by the
// carry-select fast carry logic.
//
// Each cell (logic_cell) turns its X and Y into carry candidates C1/C0; the
// fast carry logic (fast_carry_logic) resolves them into every cell's carry
// out, which goes back to the cell and out of the column. Cell outputs F are
// either that carry or the cell's mux1 value, per configuration.
//
// Using it as an adder of width W starting at cell s: cell s takes operand
// bit 0 with c1_sel = c0_sel = 1 and its Z input as the carry in, so that
// C1 = C0 = (Z ? X|Y : X&Y), the carry out of bit 0, whatever comes before
// cell s. Cells s+1 .. s+W-1 take the other operand bits with both selects
// clear (C1 = X|Y, C0 = X&Y). cout[s+k] is then the carry out of operand bit
// k; sum bit k is x ^ y ^ (k == 0 ? Z : cout[s+k-1]), formed by the
// surrounding logic, not by this column. A 32-bit adder fills the column;
// shorter adders can start at any cell and several can share the column.

// Purely combinational. The cell-to-chain wiring follows the cell and chain
// drawings; the port layout (flat per-cell vectors and a configuration array)
// is this design's own.
module carry_chain_column
  import csel_pkg::*;
#(
  parameter int unsigned N = CHAIN_BITS   // cells in the column
) (
  input  logic      [N-1:0] x_i,     // X input of each cell
  input  logic      [N-1:0] y_i,     // Y input of each cell
  input  logic      [N-1:0] z_i,     // Z input of each cell
  input  cell_cfg_t [N-1:0] cfg_i,   // configuration of each cell
  output logic      [N-1:0] cout_o,  // carry out of each cell
  output logic      [N-1:0] f_o      // F output of each cell
);

  logic [N-1:0] c1;
  logic [N-1:0] c0;

  for (genvar i = 0; i < N; i++) begin : g_cell
    logic_cell u_cell (
      .x_i   (x_i[i]),
      .y_i   (y_i[i]),
      .z_i   (z_i[i]),
      .cfg_i (cfg_i[i]),
      .cout_i(cout_o[i]),
      .c1_o  (c1[i]),
      .c0_o  (c0[i]),
      .f_o   (f_o[i])
    );
  end

  fast_carry_logic #(.N(N)) u_fcl (
    .c1_i  (c1),
    .c0_i  (c0),
    .cout_o(cout_o)
  );

endmodule
