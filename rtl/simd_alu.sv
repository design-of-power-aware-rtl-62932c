// SIMD arithmetic/logic unit of the host processor's ALU stage.
//
// Performs one operation per cycle, combinationally, on 32-bit operands a and
// b. Add, subtract, multiply, AND, OR and XOR work on one 32-bit lane, on two
// independent 16-bit lanes or on four independent 8-bit lanes (lane), as the
// processor's word, "H" (halfword) and "B" (byte) SIMD instructions do: 8-bit
// image or 16-bit speech samples are processed several at a time. Carries do
// not cross lane boundaries; each lane keeps the low bits of its own result
// (wrap-around, a product keeps the lane's low half). Invert, the one-bit
// shifts and the moves work on the whole word whatever lane says. The lane
// split and the operation list follow the instruction tables; wrap-around
// arithmetic and the low-half products are this design's choices.
module simd_alu
  import dsp_pkg::*;
(
  input  alu_op_e          op,
  input  lane_e            lane,
  input  logic [XLEN-1:0]  a,
  input  logic [XLEN-1:0]  b,
  output logic [XLEN-1:0]  y
);

  logic [XLEN-1:0] y_w, y_h, y_b;

  // the operation on one lane, its operands zero-extended to 32 bits
  function automatic logic [XLEN-1:0] lane_op(alu_op_e o, logic [XLEN-1:0] x1,
                                              logic [XLEN-1:0] x2);
    unique case (o)
      ALU_ADD: return x1 + x2;
      ALU_SUB: return x1 - x2;
      ALU_MUL: return x1 * x2;
      ALU_AND: return x1 & x2;
      ALU_OR:  return x1 | x2;
      ALU_XOR: return x1 ^ x2;
      default: return x1;
    endcase
  endfunction

  always_comb begin
    y_w = lane_op(op, a, b);
    for (int i = 0; i < 2; i++) begin
      logic [XLEN-1:0] r;
      r = lane_op(op, XLEN'(a[16*i +: 16]), XLEN'(b[16*i +: 16]));
      y_h[16*i +: 16] = r[15:0];
    end
    for (int i = 0; i < 4; i++) begin
      logic [XLEN-1:0] r;
      r = lane_op(op, XLEN'(a[8*i +: 8]), XLEN'(b[8*i +: 8]));
      y_b[8*i +: 8] = r[7:0];
    end
  end

  always_comb begin
    unique case (op)
      ALU_INV:  y = ~a;
      ALU_SHR:  y = a >> 1;
      ALU_SHL:  y = a << 1;
      ALU_MOVB: y = b;
      ALU_MOVL: y = {a[31:16], b[15:0]};
      ALU_MOVU: y = {b[15:0], a[15:0]};
      default: begin
        unique case (lane)
          LANE_H16: y = y_h;
          LANE_B8:  y = y_b;
          default:  y = y_w;
        endcase
      end
    endcase
  end

endmodule
