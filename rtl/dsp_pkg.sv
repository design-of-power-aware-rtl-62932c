// Shared definitions of the host processor's DSP datapath units.
//
// The operation list mirrors the processor's arithmetic/logic and SIMD
// instructions: add, subtract, multiply, AND, OR, XOR on a whole 32-bit word,
// on two 16-bit halves ("H" instructions) or on four bytes ("B"
// instructions); invert and one-bit shifts on the word; and the two moves
// that load a 16-bit constant into the lower or upper half of a register.
// The encodings of these enums are internal to this RTL and unrelated to the
// instruction opcodes.
package dsp_pkg;

  localparam int unsigned XLEN = 32;

  typedef enum logic [3:0] {
    ALU_ADD  = 4'd0,
    ALU_SUB  = 4'd1,
    ALU_MUL  = 4'd2,
    ALU_AND  = 4'd3,
    ALU_OR   = 4'd4,
    ALU_XOR  = 4'd5,
    ALU_INV  = 4'd6,   // ~a
    ALU_SHR  = 4'd7,   // a >> 1 (logical)
    ALU_SHL  = 4'd8,   // a << 1
    ALU_MOVB = 4'd9,   // b
    ALU_MOVL = 4'd10,  // {a[31:16], b[15:0]}  lower half from a constant
    ALU_MOVU = 4'd11   // {b[15:0], a[15:0]}   upper half from a constant
  } alu_op_e;

  typedef enum logic [1:0] {
    LANE_W32 = 2'd0,   // one 32-bit lane
    LANE_H16 = 2'd1,   // two 16-bit lanes
    LANE_B8  = 2'd2    // four 8-bit lanes
  } lane_e;

  typedef enum logic [1:0] {
    MAC_NONE  = 2'd0,  // accumulator unchanged
    MAC_WORD  = 2'd1,  // ACC += a * b            (MAC rd,rs1,rs2 / MAC rd,rs1,data)
    MAC_HALF  = 2'd2,  // ACC += a.lo*b.lo + a.hi*b.hi   (MACHR)
    MAC_CLEAR = 2'd3   // ACC = 0
  } mac_op_e;

endpackage
