// Test harness: one pa_bus_codec_top of a given width and group count,
// sending a stream of words from the host end to the memory end, with a
// reference model that checks every decoded word, the coded lines and the
// switch activity counters. Inputs are sampled on the rising edge; the
// checks run on the falling edge. The harness keeps its own transition
// counts; clear restarts both them and the design's counters.
module sar_harness #(
  parameter int W  = 8,
  parameter int NG = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         valid,
  input  logic [W-1:0] data,
  output int           checks,
  output int           failures,
  output logic [31:0]  sa_data,
  output logic [31:0]  sa_extra,
  output logic [31:0]  sa_raw,
  output logic [31:0]  words
);
  import codec_ref_pkg::*;

  logic [W-1:0]    mem_wdata, host_rdata, bus_data;
  logic [2*NG-1:0] bus_extra;
  logic            mem_wvalid, host_rvalid;

  pa_bus_codec_top #(.DATA_W(W), .NUM_GROUPS(NG)) dut (
    .clk(clk), .rst_n(rst_n),
    .xfer_valid(valid), .xfer_dir(1'b0),
    .host_wdata(data), .mem_rdata('0),
    .mem_wdata(mem_wdata), .mem_wvalid(mem_wvalid),
    .host_rdata(host_rdata), .host_rvalid(host_rvalid),
    .bus_data(bus_data), .bus_extra(bus_extra),
    .clear(clear), .sa_data(sa_data), .sa_extra(sa_extra), .sa_raw(sa_raw), .words(words)
  );

  logic         pend_valid = 0, pend_clear = 0;
  logic [W-1:0] pend_data = '0;
  logic [31:0]  lines = 0, xlines = 0, prev_raw = 0;
  int           e_data = 0, e_extra = 0, e_raw = 0, e_words = 0;

  initial begin
    checks = 0;
    failures = 0;
  end

  always @(posedge clk) begin
    pend_valid <= valid;
    pend_data  <= data;
    pend_clear <= clear;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL W=%0d NG=%0d %0t %s: got %0h expected %0h",
                                  W, NG, $time, what, got, exp);
    end
  endtask

  always @(negedge clk) begin
    if (rst_n) begin
      if (pend_clear) begin
        e_data = 0; e_extra = 0; e_raw = 0; e_words = 0;
      end
      check("counter sa_data", int'(sa_data), e_data);
      check("counter sa_extra", int'(sa_extra), e_extra);
      check("counter sa_raw", int'(sa_raw), e_raw);
      check("counter words", int'(words), e_words);
      check("mem_wvalid", int'(mem_wvalid), int'(pend_valid));
      if (pend_valid) begin
        logic [31:0] y, x;
        encode_word(32'(pend_data), lines, W, NG, y, x);
        check("mem_wdata", int'(mem_wdata), int'(pend_data));
        check("bus_data", int'(bus_data), int'(y));
        check("bus_extra", int'(bus_extra), int'(x));
        e_data += hd(y, lines, W);
        e_extra += hd(x, xlines, 2 * NG);
        e_raw += hd(32'(pend_data), prev_raw, W);
        e_words++;
        lines = y;
        xlines = x;
        prev_raw = 32'(pend_data);
      end
    end
  end

endmodule
