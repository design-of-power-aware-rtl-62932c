// Switch activity monitor for the coded data bus.
//
// Counts bit transitions so that the saving of the codec can be measured in
// hardware: on each cycle with sample high it adds the Hamming distance
// between the current and the previously sampled value of
//   bus_data  (coded data lines)     -> sa_data
//   bus_extra (extra/control lines)  -> sa_extra
//   raw_data  (the same words uncoded, i.e. what an uncoded bus would carry)
//                                    -> sa_raw
// and counts the samples in words. The switch activity reduction of the
// codec is then (sa_raw - sa_data - sa_extra) / sa_raw. The description
// mentions a module that calculates the switch activity of the data going to
// external memory; its counters, their width and the saturation-free
// wrap-around are this design's choices. The previous values start at zero
// after reset, as the bus does; clear restarts the counters without touching
// them. Counters update on the clock edge after the sample.
module switch_activity_monitor #(
  parameter int unsigned DATA_W  = 8,
  parameter int unsigned EXTRA_W = 4,
  parameter int unsigned CNT_W   = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic               sample,
  input  logic [DATA_W-1:0]  bus_data,
  input  logic [EXTRA_W-1:0] bus_extra,
  input  logic [DATA_W-1:0]  raw_data,
  output logic [CNT_W-1:0]   sa_data,
  output logic [CNT_W-1:0]   sa_extra,
  output logic [CNT_W-1:0]   sa_raw,
  output logic [CNT_W-1:0]   words
);

  localparam int unsigned DDW = $clog2(DATA_W + 1);
  localparam int unsigned EDW = $clog2(EXTRA_W + 1);

  logic [DATA_W-1:0]  prev_data, prev_raw;
  logic [EXTRA_W-1:0] prev_extra;
  logic [DDW-1:0]     hd_data, hd_raw;
  logic [EDW-1:0]     hd_extra;

  hamming_dist #(.W(DATA_W),  .DW(DDW)) u_hd_data  (.a(bus_data),  .b(prev_data),  .hd(hd_data));
  hamming_dist #(.W(EXTRA_W), .DW(EDW)) u_hd_extra (.a(bus_extra), .b(prev_extra), .hd(hd_extra));
  hamming_dist #(.W(DATA_W),  .DW(DDW)) u_hd_raw   (.a(raw_data),  .b(prev_raw),   .hd(hd_raw));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_data  <= '0;
      prev_extra <= '0;
      prev_raw   <= '0;
      sa_data    <= '0;
      sa_extra   <= '0;
      sa_raw     <= '0;
      words      <= '0;
    end else if (clear) begin
      sa_data    <= '0;
      sa_extra   <= '0;
      sa_raw     <= '0;
      words      <= '0;
    end else if (sample) begin
      prev_data  <= bus_data;
      prev_extra <= bus_extra;
      prev_raw   <= raw_data;
      sa_data    <= sa_data  + CNT_W'(hd_data);
      sa_extra   <= sa_extra + CNT_W'(hd_extra);
      sa_raw     <= sa_raw   + CNT_W'(hd_raw);
      words      <= words + 1'b1;
    end
  end

endmodule
