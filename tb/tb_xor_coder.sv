// Testbench of xor_coder.
//
// 1. The ten-word 8-bit audio example coded with the XOR rule, each word
//    against the word sent before it (starting from zero): expected bus words
//    and XOR flags are listed below; the total bus toggles are recomputed
//    from the listed bus words (25, against 36 for the uncoded words).
// 2. Random words against the rule Hamming(x,prev) > Hamming(x^prev,prev).
module tb_xor_coder;
  import codec_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [7:0] x, prev, y, cand;
  logic       sel;
  logic [3:0] cand_cost, base_cost;

  xor_coder #(.W(8)) dut (
    .x(x), .prev(prev), .y(y), .sel(sel),
    .cand(cand), .cand_cost(cand_cost), .base_cost(base_cost)
  );

  localparam logic [7:0] XS [10] = '{8'b10001100, 8'b10000011, 8'b10010010, 8'b10010111,
                                     8'b10001000, 8'b01011101, 8'b01010011, 8'b10000010,
                                     8'b10010001, 8'b10101010};
  localparam logic [7:0] YS [10] = '{8'b10001100, 8'b00001111, 8'b10011101, 8'b10010111,
                                     8'b00011111, 8'b01011101, 8'b01010011, 8'b11010001,
                                     8'b10010001, 8'b00111011};
  localparam logic       SELS [10] = '{0, 1, 1, 0, 1, 0, 0, 1, 0, 1};

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int coded_toggles = 0;
    logic [7:0] p = '0;
    for (int i = 0; i < 10; i++) begin
      x = XS[i]; prev = p;
      #1;
      check($sformatf("word %0d y", i), int'(y), int'(YS[i]));
      check($sformatf("word %0d sel", i), int'(sel), int'(SELS[i]));
      coded_toggles += hd(32'(YS[i]), 32'(p), 8);
      p = y;
    end
    check("coded toggles", coded_toggles, 25);

    for (int k = 0; k < 3000; k++) begin
      int hb, hc;
      x = 8'($urandom); prev = 8'($urandom);
      #1;
      hb = hd(32'(x), 32'(prev), 8);
      hc = hd(32'(x ^ prev), 32'(prev), 8);
      check("rand sel", int'(sel), int'(hb > hc));
      check("rand y", int'(y), (hb > hc) ? int'(x ^ prev) : int'(x));
      check("rand cand_cost", int'(cand_cost), hc);
      check("rand cand_cost = ones(x)", int'(cand_cost), ones(32'(x), 8));
      check("rand base_cost", int'(base_cost), hb);
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
