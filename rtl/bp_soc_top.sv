// Chip-level top: the power-aware data bus codec, the host processor's DSP
// datapath and its phased data cache.
//
// The chip pairs a 32-bit RISC/DSP processor with the coded external data
// bus. Of the processor, the parts whose function is specified are built:
// the register file, the SIMD ALU, the single-cycle MAC with its dual 16-bit
// mode and the bit-reverse address generator (dsp_datapath), and the
// low-power phased data cache (phased_dcache). The instruction fetch/decode
// pipeline, the master-slave instruction cache and the load/store path that
// would join the datapath, the cache and the bus are not part of this RTL,
// so the three parts stand side by side and all their ports are brought out:
// the datapath's controls and results (dp_*), the cache's load/store and
// main-memory sides (dc_*), and the codec's host side (host_* ports, where
// the memory interface would connect) and memory side (mem_* ports, where
// the external memory would connect). See pa_bus_codec_top, dsp_datapath
// and phased_dcache for the timing of each part; all run on the same clock
// and reset.
module bp_soc_top
  import pa_codec_pkg::*;
  import dsp_pkg::*;
#(
  parameter int unsigned DATA_W     = 8,
  parameter int unsigned NUM_GROUPS = 2,
  parameter int unsigned CNT_W      = 32,
  parameter int unsigned NREG       = 32,
  parameter int unsigned DC_WAYS    = 2,
  parameter int unsigned DC_SETS    = 512,
  parameter int unsigned DC_TAG_W   = 8,
  parameter int unsigned EXTRA_W    = MODE_W * NUM_GROUPS,
  parameter int unsigned AW         = $clog2(NREG),
  parameter int unsigned DC_AW      = DC_TAG_W + $clog2(DC_SETS)
) (
  input  logic               clk,
  input  logic               rst_n,
  // coded external bus: host side, memory side, lines, counters
  input  logic               xfer_valid,
  input  logic               xfer_dir,
  input  logic [DATA_W-1:0]  host_wdata,
  input  logic [DATA_W-1:0]  mem_rdata,
  output logic [DATA_W-1:0]  mem_wdata,
  output logic               mem_wvalid,
  output logic [DATA_W-1:0]  host_rdata,
  output logic               host_rvalid,
  output logic [DATA_W-1:0]  bus_data,
  output logic [EXTRA_W-1:0] bus_extra,
  input  logic               sa_clear,
  output logic [CNT_W-1:0]   sa_data,
  output logic [CNT_W-1:0]   sa_extra,
  output logic [CNT_W-1:0]   sa_raw,
  output logic [CNT_W-1:0]   sa_words,
  // DSP datapath controls (from an instruction decoder) and results
  input  logic               dp_valid,
  input  logic [1:0]         dp_unit,
  input  alu_op_e            dp_alu_op,
  input  lane_e              dp_lane,
  input  mac_op_e            dp_mac_op,
  input  logic [AW-1:0]      dp_rs1,
  input  logic [AW-1:0]      dp_rs2,
  input  logic [AW-1:0]      dp_rd,
  input  logic [XLEN-1:0]    dp_imm,
  input  logic               dp_use_imm,
  input  logic [5:0]         dp_rev_span,
  output logic [XLEN-1:0]    dp_result,
  output logic [XLEN-1:0]    dp_rev_addr,
  output logic [XLEN-1:0]    dp_acc,
  // phased data cache: load/store side
  input  logic               dc_req_valid,
  input  logic               dc_req_we,
  input  logic [DC_AW-1:0]   dc_req_addr,
  input  logic [XLEN-1:0]    dc_req_wdata,
  output logic               dc_req_ready,
  output logic               dc_resp_valid,
  output logic [XLEN-1:0]    dc_resp_rdata,
  output logic               dc_resp_hit,
  // phased data cache: main-memory side
  output logic               dc_mem_req,
  output logic               dc_mem_we,
  output logic [DC_AW-1:0]   dc_mem_addr,
  output logic [XLEN-1:0]    dc_mem_wdata,
  input  logic               dc_mem_ack,
  input  logic [XLEN-1:0]    dc_mem_rdata,
  output logic [CNT_W-1:0]   dc_tag_reads,
  output logic [CNT_W-1:0]   dc_data_reads,
  output logic [CNT_W-1:0]   dc_accesses,
  output logic [CNT_W-1:0]   dc_misses
);

  pa_bus_codec_top #(
    .DATA_W     (DATA_W),
    .NUM_GROUPS (NUM_GROUPS),
    .CNT_W      (CNT_W)
  ) u_codec (
    .clk         (clk),
    .rst_n       (rst_n),
    .xfer_valid  (xfer_valid),
    .xfer_dir    (xfer_dir),
    .host_wdata  (host_wdata),
    .mem_rdata   (mem_rdata),
    .mem_wdata   (mem_wdata),
    .mem_wvalid  (mem_wvalid),
    .host_rdata  (host_rdata),
    .host_rvalid (host_rvalid),
    .bus_data    (bus_data),
    .bus_extra   (bus_extra),
    .clear       (sa_clear),
    .sa_data     (sa_data),
    .sa_extra    (sa_extra),
    .sa_raw      (sa_raw),
    .words       (sa_words)
  );

  dsp_datapath #(.NREG(NREG)) u_dsp (
    .clk      (clk),
    .rst_n    (rst_n),
    .valid    (dp_valid),
    .unit     (dp_unit),
    .alu_op   (dp_alu_op),
    .lane     (dp_lane),
    .mac_op   (dp_mac_op),
    .rs1      (dp_rs1),
    .rs2      (dp_rs2),
    .rd       (dp_rd),
    .imm      (dp_imm),
    .use_imm  (dp_use_imm),
    .rev_span (dp_rev_span),
    .result   (dp_result),
    .rev_addr (dp_rev_addr),
    .acc      (dp_acc)
  );

  phased_dcache #(
    .WAYS  (DC_WAYS),
    .SETS  (DC_SETS),
    .TAG_W (DC_TAG_W),
    .XW    (XLEN),
    .CNT_W (CNT_W)
  ) u_dcache (
    .clk        (clk),
    .rst_n      (rst_n),
    .req_valid  (dc_req_valid),
    .req_we     (dc_req_we),
    .req_addr   (dc_req_addr),
    .req_wdata  (dc_req_wdata),
    .req_ready  (dc_req_ready),
    .resp_valid (dc_resp_valid),
    .resp_rdata (dc_resp_rdata),
    .resp_hit   (dc_resp_hit),
    .mem_req    (dc_mem_req),
    .mem_we     (dc_mem_we),
    .mem_addr   (dc_mem_addr),
    .mem_wdata  (dc_mem_wdata),
    .mem_ack    (dc_mem_ack),
    .mem_rdata  (dc_mem_rdata),
    .tag_reads  (dc_tag_reads),
    .data_reads (dc_data_reads),
    .accesses   (dc_accesses),
    .misses     (dc_misses)
  );

endmodule
