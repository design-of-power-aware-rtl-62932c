// Bit-reverse address generator for FFT addressing.
//
// Reverses the order of the low `span` bits of an address and leaves the bits
// above them unchanged, so one unit serves FFTs of any power-of-two size up
// to 2**W points. With span = W the whole address is reversed: for W = 5,
// 01101 becomes 10110, the example the processor description gives for its
// bit-reverse addressing mode (default width 5 taken from that example).
// span = 0 or 1 leaves the address as it is. Combinational.
module bit_reverse_addr #(
  parameter int unsigned W  = 5,
  parameter int unsigned SW = $clog2(W + 1)
) (
  input  logic [W-1:0]  addr,
  input  logic [SW-1:0] span,
  output logic [W-1:0]  rev
);

  always_comb begin
    rev = addr;
    for (int unsigned i = 0; i < W; i++) begin
      if (i < 32'(span)) rev[i] = addr[32'(span) - 1 - i];
    end
  end

endmodule
