// Power-aware data bus codec between a processor and its external memory/I/O.
//
// Two codec ends sit on either side of an off-chip data bus: the host end
// (between the processor's I/O/external memory interface and the bus) and
// the memory end (between the bus and the external memory or I/O). The bus is
// DATA_W data lines plus two extra lines per bit group. A write word goes from
// the host end to the memory end, a read word the other way; each end encodes
// what it sends and decodes what it receives, so both sides see plain data
// while the lines carry the coded words with fewer transitions. A switch
// activity monitor counts transitions on the coded lines and of the uncoded
// data for comparison. The arrangement (encoder/decoder at both ends, bus and
// extra bits between them) follows the system diagram of the codec; the
// processor, memory interface and memory are outside this module.
//
// Interface and timing
//   xfer_valid/xfer_dir start one transfer per cycle: dir 0 writes host_wdata
//   towards memory, dir 1 sends mem_rdata towards the host. The word is on
//   the bus in the next cycle, and in that same cycle the receiving end
//   presents it decoded on mem_wdata/mem_wvalid or host_rdata/host_rvalid.
//   Back-to-back transfers and direction changes need no idle cycle. Between
//   transfers the lines keep the last word driven (bus keeper), so idle
//   cycles cause no transitions. bus_data/bus_extra show the lines;
//   sa_* count transitions (see switch_activity_monitor), clear restarts them.
module pa_bus_codec_top
  import pa_codec_pkg::*;
#(
  parameter int unsigned DATA_W     = 8,
  parameter int unsigned NUM_GROUPS = 2,
  parameter int unsigned CNT_W      = 32,
  parameter int unsigned EXTRA_W    = MODE_W * NUM_GROUPS
) (
  input  logic               clk,
  input  logic               rst_n,
  // transfer request
  input  logic               xfer_valid,
  input  logic               xfer_dir,     // 0: host -> memory, 1: memory -> host
  input  logic [DATA_W-1:0]  host_wdata,
  input  logic [DATA_W-1:0]  mem_rdata,
  // decoded words at the two ends
  output logic [DATA_W-1:0]  mem_wdata,
  output logic               mem_wvalid,
  output logic [DATA_W-1:0]  host_rdata,
  output logic               host_rvalid,
  // the coded lines
  output logic [DATA_W-1:0]  bus_data,
  output logic [EXTRA_W-1:0] bus_extra,
  // switch activity
  input  logic               clear,
  output logic [CNT_W-1:0]   sa_data,
  output logic [CNT_W-1:0]   sa_extra,
  output logic [CNT_W-1:0]   sa_raw,
  output logic [CNT_W-1:0]   words
);

  logic [DATA_W-1:0]  h_bus, m_bus;
  logic [EXTRA_W-1:0] h_extra, m_extra;
  logic               h_oe, m_oe;
  logic               mem_drove_last;

  codec_port #(.DATA_W(DATA_W), .NUM_GROUPS(NUM_GROUPS)) u_host_end (
    .clk          (clk),
    .rst_n        (rst_n),
    .tx_valid     (xfer_valid && !xfer_dir),
    .tx_data      (host_wdata),
    .bus_out      (h_bus),
    .extra_out    (h_extra),
    .bus_oe       (h_oe),
    .bus_in       (bus_data),
    .extra_in     (bus_extra),
    .bus_in_valid (m_oe),
    .rx_data      (host_rdata),
    .rx_valid     (host_rvalid)
  );

  codec_port #(.DATA_W(DATA_W), .NUM_GROUPS(NUM_GROUPS)) u_mem_end (
    .clk          (clk),
    .rst_n        (rst_n),
    .tx_valid     (xfer_valid && xfer_dir),
    .tx_data      (mem_rdata),
    .bus_out      (m_bus),
    .extra_out    (m_extra),
    .bus_oe       (m_oe),
    .bus_in       (bus_data),
    .extra_in     (bus_extra),
    .bus_in_valid (h_oe),
    .rx_data      (mem_wdata),
    .rx_valid     (mem_wvalid)
  );

  // Bus lines: the end that drives now, else the last one that drove.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     mem_drove_last <= 1'b0;
    else if (m_oe)  mem_drove_last <= 1'b1;
    else if (h_oe)  mem_drove_last <= 1'b0;
  end

  always_comb begin
    if (m_oe || (!h_oe && mem_drove_last)) begin
      bus_data  = m_bus;
      bus_extra = m_extra;
    end else begin
      bus_data  = h_bus;
      bus_extra = h_extra;
    end
  end

  switch_activity_monitor #(
    .DATA_W  (DATA_W),
    .EXTRA_W (EXTRA_W),
    .CNT_W   (CNT_W)
  ) u_monitor (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (clear),
    .sample    (h_oe || m_oe),
    .bus_data  (bus_data),
    .bus_extra (bus_extra),
    .raw_data  (m_oe ? host_rdata : mem_wdata),
    .sa_data   (sa_data),
    .sa_extra  (sa_extra),
    .sa_raw    (sa_raw),
    .words     (words)
  );

  // Only one end may drive the bus at a time.
  a_one_driver: assert property (@(posedge clk) disable iff (!rst_n) !(h_oe && m_oe));

endmodule
