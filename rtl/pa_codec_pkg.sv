// Shared definitions of the power-aware data bus codec.
//
// Every bit group of the bus carries two extra lines that tell the receiver
// which of the four coding functions the sender applied to that group:
// transparent (no change), INV (bitwise inversion), XOR with the previous bus
// value of the group, or XNOR with it. The four functions and the need for
// extra lines follow the codec description; the numeric code given to each
// function on the extra lines is this design's own choice.
package pa_codec_pkg;

  // Number of extra (control) lines per bit group.
  localparam int unsigned MODE_W = 2;

  typedef enum logic [MODE_W-1:0] {
    MODE_TRANS = 2'b00,  // group sent as it is
    MODE_INV   = 2'b01,  // group sent inverted
    MODE_XOR   = 2'b10,  // group sent as data XOR previous bus value
    MODE_XNOR  = 2'b11   // group sent as data XNOR previous bus value
  } codec_mode_e;

  // Width of a Hamming distance result for a W-bit word (0..W).
  function automatic int unsigned hd_width(int unsigned w);
    return $clog2(w + 1);
  endfunction

endpackage
