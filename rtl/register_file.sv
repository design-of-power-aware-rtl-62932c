// Register file of the host processor.
//
// 32 registers of 32 bits: 16 general-purpose registers (0..15) and 16
// registers for external and internal interrupts and configuration (16..31),
// the split the description gives. Two read ports, read combinationally
// (the REG stage fetches two source operands), and one write port written on
// the rising clock edge (write-back). A read of the register being written in
// the same cycle returns the old value; forwarding is the pipeline's job.
// Reset clears all registers; the port count and reset are this design's
// choices.
module register_file #(
  parameter int unsigned NREG = 32,
  parameter int unsigned XW   = 32,
  parameter int unsigned AW   = $clog2(NREG)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] ra1,
  output logic [XW-1:0] rd1,
  input  logic [AW-1:0] ra2,
  output logic [XW-1:0] rd2,
  input  logic          we,
  input  logic [AW-1:0] wa,
  input  logic [XW-1:0] wd
);

  logic [XW-1:0] regs [NREG];

  assign rd1 = regs[ra1];
  assign rd2 = regs[ra2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NREG); i++) regs[i] <= '0;
    end else if (we) begin
      regs[wa] <= wd;
    end
  end

endmodule
