// Low-power phased data cache of the host processor.
//
// A set-associative cache whose access is split over two pipeline stages:
//   ALU stage:    the tags of all ways of the set are read and compared with
//                 the address (the request is accepted in this cycle);
//   WB/MEM stage: only the data way that hit is read (or written), so one
//                 data array is active per access instead of all of them.
// On a miss the word is fetched from main memory and the access stalls
// (req_ready low) until main memory acknowledges.
//
// Organisation (defaults): 2 ways x 512 sets of one 32-bit word with an 8-bit
// tag, so a 17-bit word address. Replacement is FIFO: each set keeps a
// pointer to the way filled least recently, advanced on every fill.
// Stores are write-through with no allocation on a store miss: every store
// goes to main memory, and a store that hits also updates the cached word.
// Valid bits and FIFO pointers are flip-flops cleared by reset; tags and
// data are RAM-like arrays without reset.
//
// Timing: a request accepted in cycle n (req_valid && req_ready) has its
// tags compared in cycle n; in cycle n+1 a load hit returns resp_rdata with
// resp_valid, and a store hit writes the data way. A load miss returns its
// word in the cycle main memory raises mem_ack (mem_rdata is then written
// into the victim way). Main memory holds mem_req, mem_we, mem_addr and
// mem_wdata steady until mem_ack.
//
// The counters give the activity of the arrays: tag_reads counts tag-way
// reads (WAYS per access), data_reads counts data-way reads and writes
// (one per hit, one per fill), accesses and misses count requests.
module phased_dcache #(
  parameter int unsigned WAYS  = 2,
  parameter int unsigned SETS  = 512,
  parameter int unsigned TAG_W = 8,
  parameter int unsigned XW    = 32,
  parameter int unsigned CNT_W = 32,
  parameter int unsigned IDX_W = $clog2(SETS),
  parameter int unsigned AW    = TAG_W + IDX_W,
  parameter int unsigned PTR_W = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor side
  input  logic              req_valid,
  input  logic              req_we,
  input  logic [AW-1:0]     req_addr,    // word address
  input  logic [XW-1:0]     req_wdata,
  output logic              req_ready,
  output logic              resp_valid,  // load data returned
  output logic [XW-1:0]     resp_rdata,
  output logic              resp_hit,    // the returned load hit
  // main memory side
  output logic              mem_req,
  output logic              mem_we,
  output logic [AW-1:0]     mem_addr,
  output logic [XW-1:0]     mem_wdata,
  input  logic              mem_ack,
  input  logic [XW-1:0]     mem_rdata,
  // array activity
  output logic [CNT_W-1:0]  tag_reads,
  output logic [CNT_W-1:0]  data_reads,
  output logic [CNT_W-1:0]  accesses,
  output logic [CNT_W-1:0]  misses
);

  logic [TAG_W-1:0] tags  [WAYS][SETS];
  logic [XW-1:0]    data  [WAYS][SETS];
  logic [PTR_W-1:0] fifo  [SETS];
  logic [SETS-1:0]  valid [WAYS];

  // ---------------------------------------------------------- ALU stage
  logic [IDX_W-1:0] a_idx;
  logic [TAG_W-1:0] a_tag;
  logic             a_hit;
  logic [PTR_W-1:0] a_way;
  logic             accept;

  assign a_idx = req_addr[IDX_W-1:0];
  assign a_tag = req_addr[AW-1:IDX_W];

  always_comb begin
    a_hit = 1'b0;
    a_way = '0;
    for (int unsigned w = 0; w < WAYS; w++) begin
      if (valid[w][a_idx] && tags[w][a_idx] == a_tag && !a_hit) begin
        a_hit = 1'b1;
        a_way = PTR_W'(w);
      end
    end
  end

  // ---------------------------------------------------------- WB/MEM stage
  logic             s_valid, s_we, s_hit;
  logic [PTR_W-1:0] s_way;
  logic [AW-1:0]    s_addr;
  logic [XW-1:0]    s_wdata;
  logic             busy;          // waiting for main memory
  logic [IDX_W-1:0] s_idx;
  logic [TAG_W-1:0] s_tag;
  logic             s_needs_mem;
  logic             fill;

  assign s_idx       = s_addr[IDX_W-1:0];
  assign s_tag       = s_addr[AW-1:IDX_W];
  assign s_needs_mem = s_valid && (s_we || !s_hit);
  assign req_ready   = !busy && !s_needs_mem;
  assign accept      = req_valid && req_ready;
  assign fill        = busy && mem_ack && !s_we;

  assign mem_req   = busy;
  assign mem_we    = s_we;
  assign mem_addr  = s_addr;
  assign mem_wdata = s_wdata;

  assign resp_valid = (s_valid && !busy && !s_we && s_hit) || fill;
  assign resp_hit   = !busy;
  assign resp_rdata = busy ? mem_rdata : data[s_way][s_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_valid <= 1'b0;
      s_we    <= 1'b0;
      s_hit   <= 1'b0;
      s_way   <= '0;
      s_addr  <= '0;
      s_wdata <= '0;
      busy    <= 1'b0;
    end else if (busy) begin
      if (mem_ack) begin
        busy    <= 1'b0;
        s_valid <= 1'b0;
      end
    end else if (s_needs_mem) begin
      busy <= 1'b1;
    end else begin
      s_valid <= accept;
      if (accept) begin
        s_we    <= req_we;
        s_hit   <= a_hit;
        s_way   <= a_way;
        s_addr  <= req_addr;
        s_wdata <= req_wdata;
      end
    end
  end

  // store hit: update the way that hit (in the cycle after the compare)
  always_ff @(posedge clk) begin
    if (s_valid && !busy && s_we && s_hit) data[s_way][s_idx] <= s_wdata;
    if (fill) begin
      data[fifo[s_idx]][s_idx] <= mem_rdata;
      tags[fifo[s_idx]][s_idx] <= s_tag;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned w = 0; w < WAYS; w++) valid[w] <= '0;
      for (int unsigned i = 0; i < SETS; i++) fifo[i] <= '0;
    end else if (fill) begin
      valid[fifo[s_idx]][s_idx] <= 1'b1;
      fifo[s_idx] <= (int'(fifo[s_idx]) == int'(WAYS) - 1) ? '0 : fifo[s_idx] + 1'b1;
    end
  end

  // ---------------------------------------------------------- counters
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag_reads  <= '0;
      data_reads <= '0;
      accesses   <= '0;
      misses     <= '0;
    end else begin
      if (accept) begin
        tag_reads <= tag_reads + CNT_W'(WAYS);
        accesses  <= accesses + 1'b1;
        if (!a_hit) misses <= misses + 1'b1;
      end
      if ((s_valid && !busy && s_hit) || fill)
        data_reads <= data_reads + 1'b1;
    end
  end

endmodule
