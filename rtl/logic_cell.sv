// logic_cell -- the FPGA logic cell that feeds the fast carry logic.
//
// The cell turns its two operand bits X and Y into the pair of carry
// candidates the chain needs: C1, the carry out if the carry in is 1, and C0,
// the carry out if the carry in is 0. For an adder bit these are C1 = X | Y
// and C0 = X & Y, which the cell forms with an OR and an AND gate. Reading
// (C1, C0) as a code: 00 kills the carry, 10 propagates it, 11 generates one,
// and 01 propagates its inverse.
//
// mux1, steered by the third input Z, picks one of the two gate outputs. The
// configuration bits let mux2 and mux3 replace C1 and C0 by mux1's output;
// setting both makes C1 = C0, so the cell's carry out no longer depends on the
// carry in and a new carry computation can start at this cell. mux5 chooses
// the cell output F: the chain's carry out for this position (cout_i, from the
// fast carry logic) or mux1's output.
//
// The gates, the five-mux arrangement and the signals come from the cell
// drawing. Which mux input each select value picks is not given and is this
// design's choice: z = 1 picks the OR output in mux1, and a configuration bit
// of 1 picks mux1's output in mux2, mux3 and mux5.
//
// Purely combinational.
module logic_cell
  import csel_pkg::*;
(
  input  logic      x_i,     // operand bit X
  input  logic      y_i,     // operand bit Y
  input  logic      z_i,     // third input, steers mux1
  input  cell_cfg_t cfg_i,   // configuration bits of mux2, mux3, mux5
  input  logic      cout_i,  // this position's carry out, from the chain
  output logic      c1_o,    // carry out assuming carry in = 1
  output logic      c0_o,    // carry out assuming carry in = 0
  output logic      f_o      // cell output F
);

  logic cout1;  // OR gate
  logic cout0;  // AND gate
  logic m1;     // mux1

  always_comb begin
    cout1 = x_i | y_i;
    cout0 = x_i & y_i;
    m1    = z_i ? cout1 : cout0;
    c1_o  = cfg_i.c1_sel ? m1 : cout1;
    c0_o  = cfg_i.c0_sel ? m1 : cout0;
    f_o   = cfg_i.f_sel ? m1 : cout_i;
  end

endmodule
