// Decoder of one bit group.
//
// Undoes the function the sender applied, chosen by the group's extra lines:
//   transparent: x = y        INV:  x = ~y
//   XOR:         x = y ^ prev XNOR: x = ~y ^ prev
// where y is the group value now on the bus and prev the value the same lines
// held before it, which the receiving end keeps in a register (codec_port).
// The description gives the decoder's inputs (bus data and extra bits) and its
// four functions selected through a MUX; the inverse formulas follow from the
// encoder's functions. Combinational, no clock.
module group_decoder
  import pa_codec_pkg::*;
#(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] y,
  input  codec_mode_e  mode,
  input  logic [W-1:0] prev,
  output logic [W-1:0] x
);

  always_comb begin
    unique case (mode)
      MODE_TRANS: x = y;
      MODE_INV:   x = ~y;
      MODE_XOR:   x = y ^ prev;
      MODE_XNOR:  x = ~(y ^ prev);
      default:    x = y;
    endcase
  end

endmodule
