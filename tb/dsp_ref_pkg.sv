// Behavioural reference of the DSP datapath operations, written
// independently of the RTL: per-lane arithmetic on 64-bit integers and a
// 64-bit accumulator truncated to 32 bits.
package dsp_ref_pkg;
  import dsp_pkg::*;

  function automatic logic [31:0] alu(alu_op_e o, lane_e l, logic [31:0] x1, logic [31:0] x2);
    int lw = (l == LANE_H16) ? 16 : (l == LANE_B8) ? 8 : 32;
    logic [63:0] m = (64'd1 << lw) - 64'd1;
    logic [31:0] r = '0;
    case (o)
      ALU_INV:  return ~x1;
      ALU_SHR:  return x1 >> 1;
      ALU_SHL:  return x1 << 1;
      ALU_MOVB: return x2;
      ALU_MOVL: return {x1[31:16], x2[15:0]};
      ALU_MOVU: return {x2[15:0], x1[15:0]};
      default: ;
    endcase
    for (int lo = 0; lo < 32; lo += lw) begin
      longint p = longint'((64'(x1) >> lo) & m);
      longint q = longint'((64'(x2) >> lo) & m);
      longint v;
      case (o)
        ALU_ADD: v = p + q;
        ALU_SUB: v = p - q;
        ALU_MUL: v = p * q;
        ALU_AND: v = p & q;
        ALU_OR:  v = p | q;
        default: v = p ^ q;
      endcase
      r |= 32'((64'(v) & m) << lo);
    end
    return r;
  endfunction

  function automatic longint s16(logic [15:0] v);
    return longint'($signed(v));
  endfunction

  // new accumulator after one MAC operation
  function automatic logic [31:0] mac(mac_op_e o, logic [31:0] acc, logic [31:0] x1, logic [31:0] x2);
    longint s = longint'($signed(acc));
    case (o)
      MAC_WORD:  s = s + longint'($signed(x1)) * longint'($signed(x2));
      MAC_HALF:  s = s + s16(x1[15:0]) * s16(x2[15:0]) + s16(x1[31:16]) * s16(x2[31:16]);
      MAC_CLEAR: s = 0;
      default: ;
    endcase
    return 32'(s);
  endfunction

  function automatic logic [31:0] bitrev(logic [31:0] x, int span);
    logic [31:0] r = x;
    for (int i = 0; i < span; i++) r[i] = x[span - 1 - i];
    return r;
  endfunction
endpackage
