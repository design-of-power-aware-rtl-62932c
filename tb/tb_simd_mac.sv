// Testbench of simd_mac: a hand-worked dual 16-bit step, then random
// sequences of word MACs, dual-halfword MACs, clears and idle cycles against
// a 64-bit integer model. Each operation must take effect in one cycle.
module tb_simd_mac;
  import dsp_pkg::*;

  int checks = 0, failures = 0;
  int n_op [4] = '{0, 0, 0, 0};

  logic clk = 0, rst_n = 0;
  mac_op_e op = MAC_NONE;
  logic [31:0] a = '0, b = '0, acc_next, acc;

  simd_mac dut (.clk(clk), .rst_n(rst_n), .op(op), .a(a), .b(b), .acc_next(acc_next), .acc(acc));

  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %0t %s: got %h expected %h", $time, what, got, exp);
    end
  endtask

  function automatic longint sx16(logic [15:0] v);
    return longint'($signed(v));
  endfunction

  initial begin
    longint model = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // A1 = -2, A2 = 3, B1 = 7, B2 = 5: ACC = 0 + (-14) + 15 = 1
    op = MAC_HALF; a = {16'd3, 16'hFFFE}; b = {16'd5, 16'd7};
    #1; check("hand acc_next", acc_next, 32'd1);
    @(negedge clk);
    check("hand acc after one cycle", acc, 32'd1);
    model = 1;
    for (int k = 0; k < 20000; k++) begin
      op = mac_op_e'($urandom % 4);
      if (op == MAC_CLEAR && ($urandom % 8 != 0)) op = MAC_WORD;
      a = $urandom; b = $urandom;
      if (k % 3 == 0) begin a = a >>> 20; b = b >>> 20; end
      case (op)
        MAC_WORD:  model = model + longint'($signed(a)) * longint'($signed(b));
        MAC_HALF:  model = model + sx16(a[15:0]) * sx16(b[15:0]) + sx16(a[31:16]) * sx16(b[31:16]);
        MAC_CLEAR: model = 0;
        default: ;
      endcase
      n_op[op]++;
      #1;
      check("acc_next", acc_next, 32'(model));
      @(negedge clk);
      check("acc", acc, 32'(model));
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (n_op[i] == 0) failures++;
    end
    $display("none=%0d word=%0d half=%0d clear=%0d", n_op[0], n_op[1], n_op[2], n_op[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
