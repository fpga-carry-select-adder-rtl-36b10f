// logic_cell_tb -- exhaustive self-check of logic_cell.
//
// Drives all 128 combinations of X, Y, Z, the three configuration bits and
// the chain's carry out. Expected values come from counting the ones among X
// and Y (OR means at least one, AND means two), not from the cell's gates.
module logic_cell_tb;
  import csel_pkg::*;

  logic      x, y, z, cout;
  cell_cfg_t cfg;
  logic      c1, c0, f;
  int        checks = 0, failures = 0;

  logic_cell dut (
    .x_i(x), .y_i(y), .z_i(z), .cfg_i(cfg), .cout_i(cout),
    .c1_o(c1), .c0_o(c0), .f_o(f)
  );

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    int   ones;
    logic e_or, e_and, e_m1, e_c1, e_c0, e_f;
    for (int v = 0; v < 128; v++) begin
      {x, y, z, cfg, cout} = 7'(v);
      #1;
      ones  = int'(x) + int'(y);
      e_or  = (ones >= 1);
      e_and = (ones == 2);
      e_m1  = z ? e_or : e_and;
      e_c1  = cfg.c1_sel ? e_m1 : e_or;
      e_c0  = cfg.c0_sel ? e_m1 : e_and;
      e_f   = cfg.f_sel ? e_m1 : cout;
      checks += 3;
      if (c1 !== e_c1) begin failures++; $display("v=%0d c1=%b exp %b", v, c1, e_c1); end
      if (c0 !== e_c0) begin failures++; $display("v=%0d c0=%b exp %b", v, c0, e_c0); end
      if (f  !== e_f ) begin failures++; $display("v=%0d f=%b exp %b",  v, f,  e_f ); end
      // In adder mode (no config bit set) the pair must encode the carry
      // behaviour of the bit: kill 00, propagate 10, generate 11.
      if (cfg == '0) begin
        checks++;
        if ({c1, c0} != (ones == 0 ? 2'b00 : ones == 1 ? 2'b10 : 2'b11)) begin
          failures++;
          $display("v=%0d pair %b%b wrong for %0d ones", v, c1, c0, ones);
        end
      end
      // Both selects set: C1 = C0, the cell ignores the incoming carry.
      if (cfg.c1_sel && cfg.c0_sel) begin
        checks++;
        if (c1 != c0) begin failures++; $display("v=%0d c1 != c0 with both selects", v); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
