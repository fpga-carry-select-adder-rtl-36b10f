// fast_carry_logic_tb -- self-check of the carry-select chain.
//
// Checks, for the 32-cell default and a short 9-cell chain:
//   * the block layout: ripple cells 0-1, then blocks 2-3, 4-6, 7-10, 11-15,
//     ... (lengths 2, 3, 4, 5, ...), the last one cut at the chain's end;
//   * the carry outputs against a bit-serial ripple from Cout[0] = C1[0],
//     over random C1/C0 pairs, over pairs drawn from the four codes (kill,
//     propagate, generate, inverse propagate) and over long propagate runs;
//   * Cout3 against its closed form in Cout1, C1/C0 of cells 2 and 3;
//   * the depth in 2:1 muxes from C1/C0 to the last carry out, worked out
//     from the layout: 8 for 32 cells where a plain ripple needs 31.
module fast_carry_logic_tb;
  import csel_pkg::*;

  localparam int unsigned NL = 32;
  localparam int unsigned NS = 9;

  logic [NL-1:0] l_c1, l_c0, l_cout;
  logic [NS-1:0] s_c1, s_c0, s_cout;
  int            checks = 0, failures = 0;

  fast_carry_logic dut_l (.c1_i(l_c1), .c0_i(l_c0), .cout_o(l_cout));
  fast_carry_logic #(.N(NS)) dut_s (.c1_i(s_c1), .c0_i(s_c0), .cout_o(s_cout));

  function automatic logic [NL-1:0] ripple(input logic [NL-1:0] c1, input logic [NL-1:0] c0,
                                           input int n);
    logic [NL-1:0] r;
    r    = '0;
    r[0] = c1[0];
    for (int i = 1; i < n; i++) r[i] = r[i-1] ? c1[i] : c0[i];
    return r;
  endfunction

  task automatic check_l(string what);
    logic [NL-1:0] e;
    #1;
    e = ripple(l_c1, l_c0, NL);
    checks++;
    if (l_cout !== e) begin
      failures++;
      $display("%s N=32 c1=%h c0=%h cout=%h exp %h", what, l_c1, l_c0, l_cout, e);
    end
  endtask

  task automatic check_s(string what);
    logic [NL-1:0] e;
    #1;
    e = ripple(NL'(s_c1), NL'(s_c0), NS);
    checks++;
    if (s_cout !== e[NS-1:0]) begin
      failures++;
      $display("%s N=9 c1=%h c0=%h cout=%h exp %h", what, s_c1, s_c0, s_cout, e[NS-1:0]);
    end
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    automatic int unsigned exp_start[8] = '{0, 2, 4, 7, 11, 16, 22, 29};
    automatic int unsigned exp_len[8]   = '{0, 2, 3, 4, 5, 6, 7, 3};
    int unsigned depth[NL];
    int unsigned worst;

    // Layout of a 32-cell chain.
    checks++;
    if (num_blocks(NL) != 7) begin failures++; $display("num_blocks(32)=%0d", num_blocks(NL)); end
    for (int unsigned b = 1; b <= 7; b++) begin
      checks++;
      if (block_start(b) != exp_start[b] || block_len_in(b, NL) != exp_len[b]) begin
        failures++;
        $display("block %0d: start %0d len %0d, exp %0d %0d",
                 b, block_start(b), block_len_in(b, NL), exp_start[b], exp_len[b]);
      end
    end

    // Mux depth to each carry out: ripple cells need one mux per cell; in a
    // block the chains are ready after j muxes at its j-th cell and the
    // output mux waits for both the chain and the block's carry in.
    depth[0] = 0;
    depth[1] = 1;
    worst    = 1;
    for (int unsigned b = 1; b <= num_blocks(NL); b++)
      for (int unsigned j = 0; j < block_len_in(b, NL); j++) begin
        int unsigned cin_d;
        cin_d = depth[block_start(b) - 1];
        depth[block_start(b) + j] = ((j > cin_d) ? j : cin_d) + 1;
        if (depth[block_start(b) + j] > worst) worst = depth[block_start(b) + j];
      end
    checks++;
    if (worst != 8) begin failures++; $display("worst mux depth %0d, exp 8", worst); end
    // Balanced blocks: each full block's chains are ready no later than its carry in.
    for (int unsigned b = 1; b < num_blocks(NL); b++) begin
      checks++;
      if (block_len_in(b, NL) - 1 > depth[block_start(b) - 1]) begin
        failures++;
        $display("block %0d chains later than its carry in", b);
      end
    end

    // Block 1 against its closed form, Cout3 in terms of Cout1:
    //   Cout3 = (C1_3 C1_2 + C0_3 ~C1_2) Cout1 + (C1_3 C0_2 + C0_3 ~C0_2) ~Cout1
    for (int v = 0; v < 64; v++) begin
      logic e3;
      l_c1 = NL'($urandom);
      l_c0 = NL'($urandom);
      {l_c1[3:2], l_c0[3:2], l_c1[1], l_c0[1]} = 6'(v);
      l_c1[0] = 1'b1;
      #1;
      e3 = ((l_c1[3] & l_c1[2]) | (l_c0[3] & ~l_c1[2])) & l_cout[1]
         | ((l_c1[3] & l_c0[2]) | (l_c0[3] & ~l_c0[2])) & ~l_cout[1];
      checks++;
      if (l_cout[3] !== e3) begin
        failures++;
        $display("closed form: cout3=%b exp %b (v=%0d)", l_cout[3], e3, v);
      end
    end

    // Random pairs.
    repeat (5000) begin
      l_c1 = NL'($urandom);
      l_c0 = NL'($urandom);
      check_l("random");
      s_c1 = NS'($urandom);
      s_c0 = NS'($urandom);
      check_s("random");
    end
    // Pairs drawn from the four codes, propagate-heavy so carries travel far.
    repeat (5000) begin
      for (int i = 0; i < NL; i++) begin
        int unsigned r;
        r = $urandom_range(0, 15);
        {l_c1[i], l_c0[i]} = (r == 0) ? 2'b00 : (r == 1) ? 2'b11 : (r == 2) ? 2'b01 : 2'b10;
      end
      check_l("codes");
    end
    // A carry started in cell 0 runs through every block.
    for (int unsigned s = 0; s < NL; s++) begin
      l_c1 = '1;
      l_c0 = '0;
      l_c1[0] = 1'b1;
      if (s > 0) begin l_c1[s] = 1'b0; l_c0[s] = 1'b0; end  // kill at s
      check_l("propagate");
      l_c1[s] = 1'b1;
      l_c0[s] = 1'b1;                                       // generate at s
      l_c1[0] = (s == 0);
      check_l("generate");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
