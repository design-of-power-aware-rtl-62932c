// Hamming distance of two W-bit words.
//
// The distance is the number of bit positions in which a and b differ: one
// XOR gate per bit followed by an adder that counts the ones, the structure
// the codec description gives for its Hamming unit (8 XOR gates and adders
// for an 8-bit word). Purely combinational; the result is 0..W and is
// DW = clog2(W+1) bits wide. The default width of 8 is the one drawn in the
// coding-unit diagrams.
module hamming_dist #(
  parameter int unsigned W  = 8,
  parameter int unsigned DW = $clog2(W + 1)
) (
  input  logic [W-1:0]  a,
  input  logic [W-1:0]  b,
  output logic [DW-1:0] hd
);

  logic [W-1:0] diff;

  assign diff = a ^ b;

  always_comb begin
    hd = '0;
    for (int unsigned i = 0; i < W; i++) begin
      hd = hd + DW'(diff[i]);
    end
  end

endmodule
