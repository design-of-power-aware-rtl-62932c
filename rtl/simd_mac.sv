// Single-cycle multiply-accumulate unit with a dual 16-bit SIMD mode.
//
// Holds a 32-bit accumulator ACC. In one cycle it can
//   MAC_WORD: ACC = ACC + a * b                       (32-bit MAC)
//   MAC_HALF: ACC = ACC + A1*B1 + A2*B2               (MACHR)
//             with A1/B1 the lower and A2/B2 the upper 16-bit halves of a/b
//   MAC_CLEAR: ACC = 0
// acc_next is the new value, combinationally, so the instruction can write it
// to its destination register in the same cycle as ACC takes it ("Rd = ACC =
// ACC + A1 x B1 + A2 x B2"); acc is the registered ACC. The one-cycle MAC, the
// 32-bit ACC and the 16-bit A1, B1, A2, B2 follow the description; signed
// two's-complement operands, which half is A1, keeping the low 32 bits and
// the clear operation are this design's choices. Reset clears ACC.
module simd_mac
  import dsp_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  mac_op_e          op,
  input  logic [XLEN-1:0]  a,
  input  logic [XLEN-1:0]  b,
  output logic [XLEN-1:0]  acc_next,
  output logic [XLEN-1:0]  acc
);

  logic        [XLEN-1:0]   p_word;   // low half of the product
  logic signed [XLEN-1:0]   p_lo, p_hi;

  assign p_word = a * b;             // low 32 bits: same for signed and unsigned
  assign p_lo   = $signed(a[15:0])  * $signed(b[15:0]);
  assign p_hi   = $signed(a[31:16]) * $signed(b[31:16]);

  always_comb begin
    unique case (op)
      MAC_WORD:  acc_next = acc + p_word;
      MAC_HALF:  acc_next = acc + p_lo + p_hi;
      MAC_CLEAR: acc_next = '0;
      default:   acc_next = acc;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) acc <= '0;
    else        acc <= acc_next;
  end

endmodule
