// csel_block_tb -- self-check of one carry-select block.
//
// A 4-cell block is driven exhaustively (all C1, C0 and carry-in values) and
// a 7-cell block with random values. The expected carries come from a plain
// bit-serial ripple, Cout[k] = Cout[k-1] ? C1[k] : C0[k], started from the
// real carry in.
module csel_block_tb;

  logic [3:0] a_c1, a_c0, a_cout;
  logic       a_cin;
  logic [6:0] b_c1, b_c0, b_cout;
  logic       b_cin;
  int         checks = 0, failures = 0;

  csel_block #(.LEN(4)) dut4 (.c1_i(a_c1), .c0_i(a_c0), .cin_i(a_cin), .cout_o(a_cout));
  csel_block #(.LEN(7)) dut7 (.c1_i(b_c1), .c0_i(b_c0), .cin_i(b_cin), .cout_o(b_cout));

  function automatic logic [6:0] ripple(input logic [6:0] c1, input logic [6:0] c0,
                                        input logic cin, input int len);
    logic [6:0] r;
    logic       c;
    r = '0;
    c = cin;
    for (int k = 0; k < len; k++) begin
      c    = c ? c1[k] : c0[k];
      r[k] = c;
    end
    return r;
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    logic [6:0] e;
    for (int v = 0; v < 512; v++) begin
      {a_cin, a_c1, a_c0} = 9'(v);
      #1;
      e = ripple({3'b0, a_c1}, {3'b0, a_c0}, a_cin, 4);
      checks++;
      if (a_cout !== e[3:0]) begin
        failures++;
        $display("LEN4 c1=%b c0=%b cin=%b cout=%b exp %b", a_c1, a_c0, a_cin, a_cout, e[3:0]);
      end
    end
    for (int v = 0; v < 4000; v++) begin
      b_c1  = 7'($urandom);
      b_c0  = 7'($urandom);
      b_cin = 1'($urandom);
      #1;
      e = ripple(b_c1, b_c0, b_cin, 7);
      checks++;
      if (b_cout !== e) begin
        failures++;
        $display("LEN7 c1=%b c0=%b cin=%b cout=%b exp %b", b_c1, b_c0, b_cin, b_cout, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
