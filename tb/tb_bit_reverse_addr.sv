// Testbench of bit_reverse_addr: the 5-bit example 01101 -> 10110, all 5-bit
// addresses at every span, and random 32-bit addresses, against a model that
// rebuilds the address bit by bit.
module tb_bit_reverse_addr;

  int checks = 0, failures = 0;

  logic [4:0]  a5, r5;  logic [2:0] s5;
  logic [31:0] a32, r32; logic [5:0] s32;

  bit_reverse_addr #(.W(5))  dut5  (.addr(a5),  .span(s5),  .rev(r5));
  bit_reverse_addr #(.W(32)) dut32 (.addr(a32), .span(s32), .rev(r32));

  function automatic logic [31:0] model(logic [31:0] x, int span);
    logic [31:0] r = x;
    for (int i = 0; i < span; i++) r[i] = x[span - 1 - i];
    return r;
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    a5 = 5'b01101; s5 = 3'd5; #1;
    check("example", 32'(r5), 32'(5'b10110));
    for (int x = 0; x < 32; x++)
      for (int s = 0; s <= 5; s++) begin
        a5 = 5'(x); s5 = 3'(s); #1;
        check("5-bit", 32'(r5), model(32'(x), s) & 32'h1F);
      end
    for (int k = 0; k < 5000; k++) begin
      a32 = $urandom; s32 = 6'($urandom % 33); #1;
      check("32-bit", r32, model(a32, int'(s32)));
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
