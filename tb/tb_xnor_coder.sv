// Testbench of xnor_coder: hand-worked words and random words against the
// rule Hamming(x,prev) > Hamming(~(x^prev),prev).
module tb_xnor_coder;
  import codec_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [7:0] x, prev, y, cand;
  logic       sel;
  logic [3:0] cand_cost, base_cost;

  xnor_coder #(.W(8)) dut (
    .x(x), .prev(prev), .y(y), .sel(sel),
    .cand(cand), .cand_cost(cand_cost), .base_cost(base_cost)
  );

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    // 7 toggles uncoded; XNOR word 00000100 toggles only 1 line.
    x = 8'b11111011; prev = 8'b00000000;
    #1;
    check("hand1 sel", int'(sel), 1);
    check("hand1 y", int'(y), int'(8'b00000100));
    check("hand1 cost", int'(cand_cost), 1);
    // 4 toggles uncoded; XNOR word 11110000 would toggle 5.
    x = 8'b10000011; prev = 8'b10001100;
    #1;
    check("hand2 sel", int'(sel), 0);
    check("hand2 y", int'(y), int'(8'b10000011));
    check("hand2 cost", int'(cand_cost), 5);

    for (int k = 0; k < 3000; k++) begin
      int hb, hc;
      x = 8'($urandom); prev = 8'($urandom);
      #1;
      hb = hd(32'(x), 32'(prev), 8);
      hc = hd(32'(~(x ^ prev)), 32'(prev), 8);
      check("rand sel", int'(sel), int'(hb > hc));
      check("rand y", int'(y), (hb > hc) ? int'(8'(~(x ^ prev))) : int'(x));
      check("rand cand_cost = zeros(x)", int'(cand_cost), 8 - ones(32'(x), 8));
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
