// Testbench of group_encoder.
//
// For a 4-bit group (the default split of an 8-bit bus) every pair of new
// value and previous bus value is tried; for an 8-bit group, random pairs.
// Checks: the chosen function is the one with the fewest bus toggles (ties in
// the order transparent, INV, XOR, XNOR), the output word is that function
// applied to the data, the reported cost equals the toggles of the word, the
// cost never exceeds that of sending the data unchanged, and applying the
// inverse function recovers the data. Each function must be chosen at least
// once.
module tb_group_encoder;
  import codec_ref_pkg::*;
  import pa_codec_pkg::codec_mode_e;

  int checks = 0, failures = 0;
  int used [4] = '{0, 0, 0, 0};

  logic [3:0] x4, p4, y4;  codec_mode_e m4; logic [2:0] c4;
  logic [7:0] x8, p8, y8;  codec_mode_e m8; logic [3:0] c8;

  group_encoder #(.W(4)) dut4 (.x(x4), .prev(p4), .y(y4), .mode(m4), .cost(c4));
  group_encoder #(.W(8)) dut8 (.x(x8), .prev(p8), .y(y8), .mode(m8), .cost(c8));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic check_one(int w, logic [31:0] x, logic [31:0] p, logic [31:0] y,
                           int m, int c);
    int em = choose(x, p, w);
    check("mode", m, em);
    check("word", int'(y), int'(apply(em, x, p, w)));
    check("cost", c, hd(y, p, w));
    checks++;
    if (c > hd(x, p, w)) failures++;
    check("round trip", int'(undo(m, y, p, w)), int'(x));
    used[m]++;
  endtask

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        x4 = 4'(i); p4 = 4'(j);
        #1;
        check_one(4, 32'(x4), 32'(p4), 32'(y4), int'(m4), int'(c4));
      end
    end
    for (int k = 0; k < 4000; k++) begin
      x8 = 8'($urandom); p8 = 8'($urandom);
      #1;
      check_one(8, 32'(x8), 32'(p8), 32'(y8), int'(m8), int'(c8));
    end
    // Hand-worked 4-bit cases: prev 0000, data 1111 -> INV sends 0000 (0 toggles);
    // prev 0110, data 0000 -> XOR sends 0110 (lines keep their value);
    // prev 0110, data 1111 -> XNOR sends 0110 as well.
    x4 = 4'b1111; p4 = 4'b0000; #1;
    check("hand INV mode", int'(m4), MODE_INV);
    check("hand INV word", int'(y4), 0);
    x4 = 4'b0000; p4 = 4'b0110; #1;
    check("hand XOR mode", int'(m4), MODE_XOR);
    check("hand XOR word", int'(y4), int'(4'b0110));
    x4 = 4'b1111; p4 = 4'b0110; #1;
    check("hand XNOR mode", int'(m4), MODE_XNOR);
    check("hand XNOR word", int'(y4), int'(4'b0110));
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (used[m] == 0) begin
        failures++;
        $display("FAIL function %0d never chosen", m);
      end
    end
    $display("functions chosen: trans=%0d inv=%0d xor=%0d xnor=%0d",
             used[0], used[1], used[2], used[3]);
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
