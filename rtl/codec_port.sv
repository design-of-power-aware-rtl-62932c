// One end of the coded data bus: encoder and decoder sharing one history.
//
// The DATA_W-bit word is cut into NUM_GROUPS bit groups of GROUP_W bits
// (group 0 holds the least significant bits). Each group has its own adaptive
// encoder and decoder and two extra lines that carry its function code, so the
// bus is DATA_W data lines plus 2*NUM_GROUPS extra lines. The default of an
// 8-bit word in two 4-bit groups is the configuration the description
// evaluates as its main one; the split into groups, the per-group encoders,
// the four functions and the feedback of the sent value as "previous value"
// follow it.
//
// The bus is shared by both directions (a write goes from the host end to the
// memory end, a read comes back), so both ends must agree on what the lines
// held before each word. Each end keeps that value in hist, updated with every
// word on the bus, whichever end sent it. This bookkeeping for a two-way bus
// is this design's own.
//
// Timing
//   send:    tx_valid/tx_data in cycle t; the coded word is registered and
//            appears on bus_out/extra_out in cycle t+1 with bus_oe high for
//            that one cycle, then bus_out holds it (one cycle of latency, one
//            word per cycle).
//   receive: bus_in_valid marks the cycle in which a new word from the other
//            end is on bus_in/extra_in; rx_data/rx_valid are decoded from it
//            combinationally in the same cycle.
//   An end may send in the cycle in which it receives (its encoder then uses
//   the word arriving now as the previous bus value); the two ends must not
//   send in the same cycle. Reset clears the history and the drive register
//   to zero with transparent codes.
module codec_port
  import pa_codec_pkg::*;
#(
  parameter int unsigned DATA_W     = 8,
  parameter int unsigned NUM_GROUPS = 2,
  parameter int unsigned GROUP_W    = DATA_W / NUM_GROUPS,
  parameter int unsigned EXTRA_W    = MODE_W * NUM_GROUPS
) (
  input  logic               clk,
  input  logic               rst_n,
  // local side, outgoing
  input  logic               tx_valid,
  input  logic [DATA_W-1:0]  tx_data,
  // to the bus lines
  output logic [DATA_W-1:0]  bus_out,
  output logic [EXTRA_W-1:0] extra_out,
  output logic               bus_oe,
  // from the bus lines
  input  logic [DATA_W-1:0]  bus_in,
  input  logic [EXTRA_W-1:0] extra_in,
  input  logic               bus_in_valid,
  // local side, incoming
  output logic [DATA_W-1:0]  rx_data,
  output logic               rx_valid
);

  if (DATA_W != GROUP_W * NUM_GROUPS) begin : g_bad_split
    $error("codec_port: DATA_W must be NUM_GROUPS whole groups of GROUP_W bits");
  end

  logic [DATA_W-1:0]  hist;       // value the bus lines held before now
  logic [DATA_W-1:0]  enc_prev;   // previous bus value seen by the encoder
  logic [DATA_W-1:0]  enc_word;
  logic [EXTRA_W-1:0] enc_extra;

  // A word arriving now is the bus value our next word will follow.
  assign enc_prev = bus_in_valid ? bus_in : hist;

  for (genvar g = 0; g < NUM_GROUPS; g++) begin : g_group
    codec_mode_e enc_mode;

    group_encoder #(.W(GROUP_W)) u_enc (
      .x    (tx_data[g*GROUP_W +: GROUP_W]),
      .prev (enc_prev[g*GROUP_W +: GROUP_W]),
      .y    (enc_word[g*GROUP_W +: GROUP_W]),
      .mode (enc_mode),
      .cost ()
    );
    assign enc_extra[g*MODE_W +: MODE_W] = enc_mode;

    group_decoder #(.W(GROUP_W)) u_dec (
      .y    (bus_in[g*GROUP_W +: GROUP_W]),
      .mode (codec_mode_e'(extra_in[g*MODE_W +: MODE_W])),
      .prev (hist[g*GROUP_W +: GROUP_W]),
      .x    (rx_data[g*GROUP_W +: GROUP_W])
    );
  end

  assign rx_valid = bus_in_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_out   <= '0;
      extra_out <= '0;
      bus_oe    <= 1'b0;
      hist      <= '0;
    end else begin
      bus_oe <= tx_valid;
      if (tx_valid) begin
        bus_out   <= enc_word;
        extra_out <= enc_extra;
        hist      <= enc_word;
      end else if (bus_in_valid) begin
        hist      <= bus_in;
      end
    end
  end

endmodule
