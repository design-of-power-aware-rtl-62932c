// Testbench of simd_alu: every operation in every lane mode on random and
// corner operands, against a lane-by-lane model built from shifts and masks,
// plus hand-worked cases showing that carries stop at lane boundaries.
module tb_simd_alu;
  import dsp_pkg::*;

  int checks = 0, failures = 0;

  alu_op_e op;
  lane_e   lane;
  logic [31:0] a, b, y;

  simd_alu dut (.op(op), .lane(lane), .a(a), .b(b), .y(y));

  function automatic logic [31:0] model(alu_op_e o, lane_e l, logic [31:0] x1, logic [31:0] x2);
    int lw = (l == LANE_H16) ? 16 : (l == LANE_B8) ? 8 : 32;
    logic [63:0] m = (64'd1 << lw) - 64'd1;
    logic [31:0] r = '0;
    case (o)
      ALU_INV:  return ~x1;
      ALU_SHR:  return {1'b0, x1[31:1]};
      ALU_SHL:  return {x1[30:0], 1'b0};
      ALU_MOVB: return x2;
      ALU_MOVL: return (x1 & 32'hFFFF_0000) | (x2 & 32'h0000_FFFF);
      ALU_MOVU: return (x2 << 16) | (x1 & 32'h0000_FFFF);
      default: ;
    endcase
    for (int lo = 0; lo < 32; lo += lw) begin
      logic [63:0] p = (64'(x1) >> lo) & m;
      logic [63:0] q = (64'(x2) >> lo) & m;
      logic [63:0] v;
      case (o)
        ALU_ADD: v = p + q;
        ALU_SUB: v = p - q;
        ALU_MUL: v = p * q;
        ALU_AND: v = p & q;
        ALU_OR:  v = p | q;
        default: v = p ^ q;
      endcase
      r |= 32'((v & m) << lo);
    end
    return r;
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s op=%0d lane=%0d a=%h b=%h: got %h expected %h",
                                  what, op, lane, a, b, got, exp);
    end
  endtask

  initial begin
    // hand-worked: carries stay inside a lane
    op = ALU_ADD; a = 32'h00FF_00FF; b = 32'h0001_0001;
    lane = LANE_W32; #1; check("add w32", y, 32'h0100_0100);
    lane = LANE_H16; #1; check("add h16", y, 32'h0100_0100);
    lane = LANE_B8;  #1; check("add b8",  y, 32'h0000_0000);
    op = ALU_SUB; a = 32'h0000_0000; b = 32'h0001_0001;
    lane = LANE_H16; #1; check("sub h16", y, 32'hFFFF_FFFF);
    op = ALU_MUL; a = 32'h0003_0010; b = 32'h0005_0010;
    lane = LANE_H16; #1; check("mul h16", y, 32'h000F_0100);
    op = ALU_MOVU; a = 32'h1234_5678; b = 32'h0000_ABCD;
    #1; check("movu", y, 32'hABCD_5678);
    for (int k = 0; k < 20000; k++) begin
      op = alu_op_e'($urandom % 12);
      lane = lane_e'($urandom % 3);
      a = $urandom; b = $urandom;
      if (k % 10 == 0) a = 32'hFFFF_FFFF;
      if (k % 15 == 0) b = 32'h8080_8080;
      #1;
      check("random", y, model(op, lane, a, b));
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
