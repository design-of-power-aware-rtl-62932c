// Execute and register stages of the host processor's DSP datapath.
//
// Ties the register file to the SIMD ALU, the MAC unit and the bit-reverse
// address generator, as one single-cycle register-to-register step: the two
// source registers are read, the selected unit computes, and at the clock
// edge the result is written to the destination register (and, for a MAC,
// to the accumulator). A constant (imm) can replace the second operand, as in
// the "rd,data" instruction forms. The address unit does not write a
// register: it produces a bit-reversed memory address from rs1 (indirect) or
// from imm (direct) for the load/store path, reversing its low rev_span
// bits.
//
// Interface: the control inputs are what an instruction decoder would drive;
// the decoder, the pipeline registers, forwarding, branches and the caches
// are not part of this module. Timing: result and rev_addr are valid in the
// cycle the controls are applied; the register write happens at the end of
// that cycle when valid is high. Which units exist and what they compute
// follow the processor description; this way of wiring them is this design's
// own.
module dsp_datapath
  import dsp_pkg::*;
#(
  parameter int unsigned NREG = 32,
  parameter int unsigned AW   = $clog2(NREG)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             valid,
  input  logic [1:0]       unit,      // 0: ALU, 1: MAC, 2: address
  input  alu_op_e          alu_op,
  input  lane_e            lane,
  input  mac_op_e          mac_op,
  input  logic [AW-1:0]    rs1,
  input  logic [AW-1:0]    rs2,
  input  logic [AW-1:0]    rd,
  input  logic [XLEN-1:0]  imm,
  input  logic             use_imm,
  input  logic [5:0]       rev_span,
  output logic [XLEN-1:0]  result,
  output logic [XLEN-1:0]  rev_addr,
  output logic [XLEN-1:0]  acc
);

  logic [XLEN-1:0] op_a, op_b, rf_b, alu_y, acc_next;
  logic            is_alu, is_mac, rf_we;

  assign is_alu = (unit == 2'd0);
  assign is_mac = (unit == 2'd1);
  assign rf_we  = valid && (is_alu || is_mac);

  register_file #(.NREG(NREG), .XW(XLEN)) u_rf (
    .clk (clk),
    .rst_n (rst_n),
    .ra1 (rs1),
    .rd1 (op_a),
    .ra2 (rs2),
    .rd2 (rf_b),
    .we  (rf_we),
    .wa  (rd),
    .wd  (result)
  );

  assign op_b = use_imm ? imm : rf_b;

  simd_alu u_alu (
    .op   (alu_op),
    .lane (lane),
    .a    (op_a),
    .b    (op_b),
    .y    (alu_y)
  );

  simd_mac u_mac (
    .clk      (clk),
    .rst_n    (rst_n),
    .op       ((valid && is_mac) ? mac_op : MAC_NONE),
    .a        (op_a),
    .b        (op_b),
    .acc_next (acc_next),
    .acc      (acc)
  );

  bit_reverse_addr #(.W(XLEN)) u_rev (
    .addr (use_imm ? imm : op_a),
    .span (rev_span),
    .rev  (rev_addr)
  );

  assign result = is_mac ? acc_next : alu_y;

endmodule
