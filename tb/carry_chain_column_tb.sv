// carry_chain_column_tb -- end-to-end self-check of the 32-cell column at
// its default size.
//
// The column is used the way an FPGA mapping would use it:
//   * one 32-bit adder over the whole column: cell 0 holds operand bit 0
//     with both selects set and Z as the carry in, cells 1..31 the other
//     bits; every carry out is compared with the carries of the integer sum
//     a + b + cin, and the sum bits formed from them with a + b + cin;
//   * an 8-bit adder placed at every start cell from 0 to 24, with random
//     values in the cells around it;
//   * four independent 8-bit adders filling one column;
//   * random configurations, Z inputs and operands, checked against a
//     reference cell model (counting ones) followed by a bit-serial ripple;
//     this also covers F, which shows either the carry or mux1.
// Mechanism counters: for each carry-select block, cases where its carry in
// was 1 and was 0 while its two speculative chains disagreed at the block's
// last cell (so the output muxes had a real choice); carries out of bit 0
// that travel through every block to cell 31; an adder starting right after
// a cell whose carry differs from the adder's own first carry (the chain
// restarts); F taken from mux1 and from the carry. A mechanism that
// never occurs counts as a failure.
module carry_chain_column_tb;
  import csel_pkg::*;

  localparam int unsigned N = CHAIN_BITS;

  logic      [N-1:0] x, y, z, cout, f;
  cell_cfg_t [N-1:0] cfg;
  int                checks = 0, failures = 0;

  int unsigned n_sel_true[8], n_sel_false[8];
  int unsigned n_full_run = 0, n_restart = 0, n_f_m1 = 0, n_f_cout = 0;
  int unsigned n_add32 = 0, n_add8 = 0, n_packed = 0;

  carry_chain_column dut (
    .x_i(x), .y_i(y), .z_i(z), .cfg_i(cfg), .cout_o(cout), .f_o(f)
  );

  // Reference: cell model by counting ones, then ripple from Cout[0] = C1[0].
  task automatic reference(output logic [N-1:0] e_cout, output logic [N-1:0] e_f,
                           output logic [N-1:0] e_c1, output logic [N-1:0] e_c0);
    logic [N-1:0] m1;
    for (int i = 0; i < N; i++) begin
      int ones;
      ones    = int'(x[i]) + int'(y[i]);
      m1[i]   = z[i] ? (ones > 0) : (ones == 2);
      e_c1[i] = cfg[i].c1_sel ? m1[i] : (ones > 0);
      e_c0[i] = cfg[i].c0_sel ? m1[i] : (ones == 2);
    end
    e_cout[0] = e_c1[0];
    for (int i = 1; i < N; i++) e_cout[i] = e_cout[i-1] ? e_c1[i] : e_c0[i];
    for (int i = 0; i < N; i++) e_f[i] = cfg[i].f_sel ? m1[i] : e_cout[i];
  endtask

  // Compare everything with the reference and update the block counters.
  task automatic check_all(string what);
    logic [N-1:0] e_cout, e_f, e_c1, e_c0;
    #1;
    reference(e_cout, e_f, e_c1, e_c0);
    checks += 2;
    if (cout !== e_cout) begin
      failures++;
      $display("%s: cout=%h exp %h", what, cout, e_cout);
    end
    if (f !== e_f) begin
      failures++;
      $display("%s: f=%h exp %h", what, f, e_f);
    end
    for (int i = 0; i < N; i++)
      if (cfg[i].f_sel) n_f_m1++; else n_f_cout++;
    for (int unsigned b = 1; b <= num_blocks(N); b++) begin
      logic t, fc;
      int unsigned s, l;
      s  = block_start(b);
      l  = block_len_in(b, N);
      t  = 1'b1;
      fc = 1'b0;
      for (int unsigned k = 0; k < l; k++) begin
        t  = t  ? e_c1[s+k] : e_c0[s+k];
        fc = fc ? e_c1[s+k] : e_c0[s+k];
      end
      if (t != fc) begin
        if (e_cout[s-1]) n_sel_true[b]++; else n_sel_false[b]++;
      end
    end
  endtask

  // Configure cells s .. s+w-1 as a w-bit adder. The first cell sets both
  // selects, so C1 = C0 = mux1 = (Z ? X|Y : X&Y): the carry out of bit 0 for
  // a carry in of Z, independent of whatever the chain brings in.
  task automatic place_adder(int unsigned s, int unsigned w, logic [31:0] a, logic [31:0] b,
                             logic cin);
    for (int unsigned k = 0; k < w; k++) begin
      cfg[s+k] = '{c1_sel: (k == 0), c0_sel: (k == 0), f_sel: 1'b0};
      x[s+k]   = a[k];
      y[s+k]   = b[k];
      z[s+k]   = (k == 0) ? cin : 1'($urandom);
    end
  endtask

  // Check the carries of an adder placed by place_adder against integers:
  // cout[s+k] must be the carry out of operand bit k, and the sum bits formed
  // from them (as a LUT next to the chain would) must match a + b + cin.
  task automatic check_adder(string what, int unsigned s, int unsigned w, logic [31:0] a,
                             logic [31:0] b, logic cin);
    logic [32:0] sum, part, mask;
    logic [31:0] got_sum, low;
    sum     = (33'(a) + 33'(b) + 33'(cin));
    mask    = (33'd1 << w) - 33'd1;
    got_sum = '0;
    for (int unsigned k = 0; k < w; k++)
      got_sum[k] = a[k] ^ b[k] ^ ((k == 0) ? cin : cout[s+k-1]);
    checks++;
    if ((33'(got_sum) & mask) !== (sum & mask) || cout[s+w-1] !== sum[w]) begin
      failures++;
      $display("%s at %0d: %h + %h + %b -> sum %h cout %b, exp %h %b", what, s, a, b, cin,
               got_sum, cout[s+w-1], sum & mask, sum[w]);
    end
    for (int unsigned k = 0; k < w; k++) begin
      low  = (k == 31) ? 32'hffff_ffff : ((32'd1 << (k + 1)) - 32'd1);
      part = 33'(a & low) + 33'(b & low) + 33'(cin);
      checks++;
      if (cout[s+k] !== part[k+1]) begin
        failures++;
        $display("%s at %0d: carry out of bit %0d is %b, exp %b", what, s, k, cout[s+k],
                 part[k+1]);
      end
    end
  endtask

  task automatic randomize_column();
    for (int i = 0; i < N; i++) begin
      cfg[i] = cell_cfg_t'($urandom);
      x[i]   = 1'($urandom);
      y[i]   = 1'($urandom);
      z[i]   = 1'($urandom);
    end
  endtask

  initial begin : watchdog
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    logic [31:0] a, b;
    logic        cin;
    foreach (n_sel_true[i]) begin n_sel_true[i] = 0; n_sel_false[i] = 0; end

    // 32-bit adder over the whole column, including long propagate runs.
    for (int it = 0; it < 3000; it++) begin
      a   = $urandom;
      b   = $urandom;
      cin = 1'($urandom);
      if (it % 7 == 0) begin b = ~a; cin = 1'b1; end
      if (it % 11 == 0) begin a = 32'h0000_0001; b = 32'hffff_ffff; cin = 1'b0; end
      place_adder(0, 32, a, b, cin);
      check_all("add32");
      check_adder("add32", 0, 32, a, b, cin);
      if (((a[0] & b[0]) | ((a[0] | b[0]) & cin)) && ((a ^ b) >> 1) == 32'h7fff_ffff) n_full_run++;
      n_add32++;
    end

    // One 8-bit adder at every start cell, random cells around it.
    for (int unsigned s = 0; s + 8 <= N; s++)
      repeat (200) begin
        randomize_column();
        a   = $urandom & 32'hff;
        b   = $urandom & 32'hff;
        cin = 1'($urandom);
        if ($urandom_range(0, 3) == 0) b = ~a & 32'hff;
        place_adder(s, 8, a, b, cin);
        check_all("add8");
        check_adder("add8", s, 8, a, b, cin);
        if (s > 0 && cout[s-1] != ((a[0] & b[0]) | ((a[0] | b[0]) & cin))) n_restart++;
        n_add8++;
      end

    // Four independent 8-bit adders filling one column.
    repeat (2000) begin
      logic [31:0] a4[4], b4[4];
      logic        c4[4];
      for (int k = 0; k < 4; k++) begin
        a4[k] = $urandom & 32'hff;
        b4[k] = $urandom & 32'hff;
        c4[k] = 1'($urandom);
        place_adder(8 * k, 8, a4[k], b4[k], c4[k]);
      end
      check_all("packed");
      for (int k = 0; k < 4; k++) check_adder("packed", 8 * k, 8, a4[k], b4[k], c4[k]);
      n_packed++;
    end

    // Arbitrary configurations.
    repeat (5000) begin
      randomize_column();
      check_all("random");
    end

    $display("add32=%0d add8=%0d packed=%0d full_run=%0d restart=%0d f_m1=%0d f_cout=%0d",
             n_add32, n_add8, n_packed, n_full_run, n_restart, n_f_m1, n_f_cout);
    for (int unsigned bl = 1; bl <= num_blocks(N); bl++) begin
      $display("block %0d (cells %0d..%0d): picked true chain %0d, false chain %0d", bl,
               block_start(bl), block_start(bl) + block_len_in(bl, N) - 1, n_sel_true[bl],
               n_sel_false[bl]);
      checks += 2;
      if (n_sel_true[bl] == 0)  begin failures++; $display("block %0d never picked true", bl); end
      if (n_sel_false[bl] == 0) begin failures++; $display("block %0d never picked false", bl); end
    end
    checks += 4;
    if (n_full_run == 0) begin failures++; $display("no carry ran through the column"); end
    if (n_restart == 0)  begin failures++; $display("no chain restart seen"); end
    if (n_f_m1 == 0)     begin failures++; $display("F never took mux1"); end
    if (n_f_cout == 0)   begin failures++; $display("F never took the carry"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
