// Testbench of inv_coder.
//
// 1. A ten-word 8-bit audio example: each word is coded against the word sent
//    before it (starting from zero). The expected bus words and invert flags
//    are written out below; the total of 30 bus toggles (36 uncoded) is
//    recomputed from them.
// 2. 16-bit words: 1000000010000001 followed by 1100000001111111 differs in
//    exactly 8 = W/2 bits, a tie that the strict rule leaves uninverted; one
//    more differing bit (1100000001111110) makes it invert.
// 3. Random words at 8 bits against the rule Hamming > W/2, and the candidate
//    outputs (~x and its toggle count).
module tb_inv_coder;
  import codec_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [7:0] x, prev, y, cand;
  logic       inv;
  logic [3:0] cand_cost, base_cost;

  logic [15:0] x16, prev16, y16, cand16;
  logic        inv16;
  logic [4:0]  cc16, bc16;

  inv_coder #(.W(8)) dut (
    .x(x), .prev(prev), .y(y), .inv(inv),
    .cand(cand), .cand_cost(cand_cost), .base_cost(base_cost)
  );

  inv_coder #(.W(16)) dut16 (
    .x(x16), .prev(prev16), .y(y16), .inv(inv16),
    .cand(cand16), .cand_cost(cc16), .base_cost(bc16)
  );

  localparam logic [7:0] XS [10] = '{8'b10001100, 8'b10000011, 8'b10010010, 8'b10010111,
                                     8'b10001000, 8'b01011101, 8'b01010011, 8'b10000010,
                                     8'b10010001, 8'b10101010};
  localparam logic [7:0] YS [10] = '{8'b10001100, 8'b10000011, 8'b10010010, 8'b10010111,
                                     8'b01110111, 8'b01011101, 8'b01010011, 8'b10000010,
                                     8'b10010001, 8'b01010101};
  localparam logic       INVS [10] = '{0, 0, 0, 0, 1, 0, 0, 0, 0, 1};

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int coded_toggles = 0, raw_toggles = 0;
    logic [7:0] p = '0, praw = '0;
    for (int i = 0; i < 10; i++) begin
      x = XS[i]; prev = p;
      #1;
      check($sformatf("word %0d y", i), int'(y), int'(YS[i]));
      check($sformatf("word %0d inv", i), int'(inv), int'(INVS[i]));
      coded_toggles += hd(32'(YS[i]), 32'(p), 8);
      raw_toggles += hd(32'(XS[i]), 32'(praw), 8);
      p = y;
      praw = XS[i];
    end
    check("coded toggles", coded_toggles, 30);
    check("uncoded toggles", raw_toggles, 36);

    prev16 = 16'b1000000010000001; x16 = 16'b1100000001111111;
    #1;
    check("16-bit tie inv", int'(inv16), 0);
    check("16-bit tie y", int'(y16), int'(16'b1100000001111111));
    x16 = 16'b1100000001111110;
    #1;
    check("16-bit inv", int'(inv16), 1);
    check("16-bit y", int'(y16), int'(16'b0011111110000001));
    prev16 = 16'b1000000100110101; x16 = 16'b1000000010000001;
    #1;
    check("16-bit no inv", int'(inv16), 0);

    for (int k = 0; k < 3000; k++) begin
      int h;
      x = 8'($urandom); prev = 8'($urandom);
      #1;
      h = hd(32'(x), 32'(prev), 8);
      check("rand inv", int'(inv), int'(h > 4));
      check("rand y", int'(y), (h > 4) ? int'(8'(~x)) : int'(x));
      check("rand cand", int'(cand), int'(8'(~x)));
      check("rand cand_cost", int'(cand_cost), hd(32'(~x), 32'(prev), 8));
      check("rand base_cost", int'(base_cost), h);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
