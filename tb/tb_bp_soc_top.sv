// End-to-end testbench of bp_soc_top at its default parameters: the DSP
// datapath with 32 registers and the 8-bit coded bus in two 4-bit groups.
//
// The testbench plays the parts the top leaves out: it decodes a small
// program into datapath controls, acts as the load/store path between the
// datapath and the bus, and models the external memory (256 bytes) at the
// far end of the bus. The program
//   1. computes bit-reversed addresses with the address unit and writes 64
//      audio-like 8-bit samples over the bus to memory in bit-reversed order;
//   2. reads them back over the bus in natural order (so each arrives from
//      the bit-reversed address it was written to), then loads the buffer as
//      32-bit words through the phased data cache, whose misses and
//      write-through stores the testbench serves with byte transfers over
//      the bus: misses, hits, FIFO eviction, store hit and store miss;
//   3. packs sample pairs into registers (MOVL/MOVU), removes the 128 offset
//      with 16-bit SIMD subtraction, and computes 16-tap FIR outputs with dual
//      16-bit MACs, plus a signal energy with word MACs;
//   4. writes each 32-bit FIR output as 4 bytes to memory and reads it back,
//      turning the bus around with no idle cycle;
//   5. ends with random transfers in both directions.
// Checked: every word arrives decoded one cycle after it is sent; the lines
// carry the reference coding and hold their value between transfers; the
// switch activity counters equal the reference transition counts; every
// datapath result, address and the accumulator equal the reference.
// Mechanisms counted, each of which must occur: write, read, back-to-back
// turnaround, idle bus cycle, each coding function in each group, ALU in each
// lane width, word MAC, dual-halfword MAC, accumulator clear, bit-reversed
// address, cache hit, cache miss, cache store.
module tb_bp_soc_top;
  import dsp_pkg::*;
  import codec_ref_pkg::*;
  import dsp_ref_pkg::*;

  localparam int W = 8, NG = 2, NS = 64, NT = 16;

  int checks = 0, failures = 0;
  int n_wr = 0, n_rd = 0, n_turn = 0, n_idle = 0;
  int n_lane [3] = '{0, 0, 0};
  int n_mac [4] = '{0, 0, 0, 0};
  int n_rev = 0;
  int mode_seen [NG][4];

  logic clk = 0, rst_n = 0;
  // bus side
  logic xfer_valid = 0, xfer_dir = 0, sa_clear = 0;
  logic [W-1:0] host_wdata = '0, mem_rdata = '0;
  logic [W-1:0] mem_wdata, host_rdata, bus_data;
  logic [2*NG-1:0] bus_extra;
  logic mem_wvalid, host_rvalid;
  logic [31:0] sa_data, sa_extra, sa_raw, sa_words;
  // datapath side
  logic dp_valid = 0, dp_use_imm = 0;
  logic [1:0] dp_unit = '0;
  alu_op_e dp_alu_op = ALU_ADD;
  lane_e   dp_lane = LANE_W32;
  mac_op_e dp_mac_op = MAC_NONE;
  logic [4:0] dp_rs1 = '0, dp_rs2 = '0, dp_rd = '0;
  logic [31:0] dp_imm = '0;
  logic [5:0] dp_rev_span = '0;
  logic [31:0] dp_result, dp_rev_addr, dp_acc;
  // data cache side
  localparam int DC_AW = 17;
  logic dc_req_valid = 0, dc_req_we = 0, dc_mem_ack = 0;
  logic [DC_AW-1:0] dc_req_addr = '0;
  logic [31:0] dc_req_wdata = '0, dc_mem_rdata = '0;
  logic dc_req_ready, dc_resp_valid, dc_resp_hit, dc_mem_req, dc_mem_we;
  logic [31:0] dc_resp_rdata, dc_mem_wdata;
  logic [DC_AW-1:0] dc_mem_addr;
  logic [31:0] dc_tag_reads, dc_data_reads, dc_accesses, dc_misses;

  bp_soc_top dut (
    .clk(clk), .rst_n(rst_n),
    .xfer_valid(xfer_valid), .xfer_dir(xfer_dir),
    .host_wdata(host_wdata), .mem_rdata(mem_rdata),
    .mem_wdata(mem_wdata), .mem_wvalid(mem_wvalid),
    .host_rdata(host_rdata), .host_rvalid(host_rvalid),
    .bus_data(bus_data), .bus_extra(bus_extra),
    .sa_clear(sa_clear), .sa_data(sa_data), .sa_extra(sa_extra), .sa_raw(sa_raw),
    .sa_words(sa_words),
    .dp_valid(dp_valid), .dp_unit(dp_unit), .dp_alu_op(dp_alu_op), .dp_lane(dp_lane),
    .dp_mac_op(dp_mac_op), .dp_rs1(dp_rs1), .dp_rs2(dp_rs2), .dp_rd(dp_rd),
    .dp_imm(dp_imm), .dp_use_imm(dp_use_imm), .dp_rev_span(dp_rev_span),
    .dp_result(dp_result), .dp_rev_addr(dp_rev_addr), .dp_acc(dp_acc),
    .dc_req_valid(dc_req_valid), .dc_req_we(dc_req_we), .dc_req_addr(dc_req_addr),
    .dc_req_wdata(dc_req_wdata), .dc_req_ready(dc_req_ready), .dc_resp_valid(dc_resp_valid),
    .dc_resp_rdata(dc_resp_rdata), .dc_resp_hit(dc_resp_hit), .dc_mem_req(dc_mem_req),
    .dc_mem_we(dc_mem_we), .dc_mem_addr(dc_mem_addr), .dc_mem_wdata(dc_mem_wdata),
    .dc_mem_ack(dc_mem_ack), .dc_mem_rdata(dc_mem_rdata), .dc_tag_reads(dc_tag_reads),
    .dc_data_reads(dc_data_reads), .dc_accesses(dc_accesses), .dc_misses(dc_misses)
  );

  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %0t %s: got %h expected %h", $time, what, got, exp);
    end
  endtask

  // ---------------------------------------------------------------- models
  logic [7:0]  mem [256];
  logic [31:0] m_rf [32];
  logic [31:0] m_acc = '0;
  logic [31:0] lines = '0, xlines = '0, prev_raw = '0;
  int e_data = 0, e_extra = 0, e_raw = 0, e_words = 0;
  logic last_dir = 0, last_busy = 0;

  // one bus cycle: optionally start a transfer, then check at the next
  // negedge what that edge put on the lines; the counters by then hold every
  // earlier word
  task automatic bus_cycle(logic go, logic dir, logic [7:0] word, logic [7:0] addr,
                           output logic [7:0] got);
    logic [31:0] y, x;
    int p_data = 0, p_extra = 0, p_raw = 0;
    xfer_valid = go; xfer_dir = dir;
    host_wdata = dir ? 8'($urandom) : word;
    mem_rdata  = dir ? word : 8'($urandom);
    if (go) begin
      encode_word(32'(word), lines, W, NG, y, x);
      p_data = hd(lines, y, W);
      p_extra = hd(xlines, x, 2 * NG);
      p_raw = hd(32'(word), prev_raw, W);
      prev_raw = 32'(word);
      lines = y; xlines = x;
      for (int g = 0; g < NG; g++) mode_seen[g][(x >> (2 * g)) & 3]++;
      if (dir) n_rd++; else n_wr++;
      if (last_busy && last_dir != dir) n_turn++;
      last_dir = dir;
    end else n_idle++;
    last_busy = go;
    @(negedge clk);
    xfer_valid = 0;
    check("mem_wvalid", 32'(mem_wvalid), 32'(go && !dir));
    check("host_rvalid", 32'(host_rvalid), 32'(go && dir));
    check("bus_data", 32'(bus_data), lines);
    check("bus_extra", 32'(bus_extra), xlines);
    check("sa_data", sa_data, 32'(e_data));
    check("sa_extra", sa_extra, 32'(e_extra));
    check("sa_raw", sa_raw, 32'(e_raw));
    check("sa_words", sa_words, 32'(e_words));
    // the monitor counts a word at the end of the cycle it is on the lines
    e_data += p_data; e_extra += p_extra; e_raw += p_raw; e_words += int'(go);
    got = 'x;
    if (go && !dir) begin
      check("mem_wdata", 32'(mem_wdata), 32'(word));
      mem[addr] = mem_wdata;
    end
    if (go && dir) begin
      check("host_rdata", 32'(host_rdata), 32'(word));
      got = host_rdata;
    end
  endtask

  task automatic bus_write(logic [7:0] addr, logic [7:0] word);
    logic [7:0] unused;
    bus_cycle(1'b1, 1'b0, word, addr, unused);
  endtask

  task automatic bus_read(logic [7:0] addr, output logic [7:0] got);
    bus_cycle(1'b1, 1'b1, mem[addr], addr, got);
  endtask

  // one datapath instruction; the bus is idle meanwhile
  task automatic dp(logic [1:0] u, alu_op_e ao, lane_e ln, mac_op_e mo,
                    int s1, int s2, int d, logic ui, logic [31:0] im, int span,
                    output logic [31:0] res);
    logic [31:0] a, b, e;
    logic [7:0] unused;
    dp_valid = 1; dp_unit = u; dp_alu_op = ao; dp_lane = ln; dp_mac_op = mo;
    dp_rs1 = 5'(s1); dp_rs2 = 5'(s2); dp_rd = 5'(d); dp_use_imm = ui; dp_imm = im;
    dp_rev_span = 6'(span);
    a = m_rf[s1];
    b = ui ? im : m_rf[s2];
    #1;
    case (u)
      2'd0: begin e = alu(ao, ln, a, b); check("alu result", dp_result, e); n_lane[ln]++; end
      2'd1: begin e = mac(mo, m_acc, a, b); check("mac result", dp_result, e); n_mac[mo]++; end
      default: begin e = bitrev(ui ? im : a, span); check("rev_addr", dp_rev_addr, e); n_rev++; end
    endcase
    res = e;
    bus_cycle(1'b0, 1'b0, '0, '0, unused);
    dp_valid = 0;
    if (u == 2'd1) m_acc = e;
    if (u != 2'd2) m_rf[d] = e;
    check("acc", dp_acc, m_acc);
  endtask

  // one load or store through the data cache. A hit answers in the cycle
  // after acceptance; a miss or a (write-through) store makes the cache
  // request main memory, which the testbench serves with four byte
  // transfers over the coded bus (byte address 4*word + k, little endian).
  int n_dc_hit = 0, n_dc_miss = 0, n_dc_store = 0, n_dc_way = 0;

  task automatic dc_access(logic we, int waddr, logic [31:0] wd, output logic [31:0] rdat,
                           output logic hit);
    logic [7:0] b;
    logic [31:0] word;
    dc_req_valid = 1; dc_req_we = we; dc_req_addr = DC_AW'(waddr); dc_req_wdata = wd;
    #1;
    check("dc ready", 32'(dc_req_ready), 1);
    bus_cycle(1'b0, 1'b0, '0, '0, b);
    dc_req_valid = 0;
    #1;
    rdat = 'x;
    hit = 0;
    if (!we && dc_resp_valid) begin
      rdat = dc_resp_rdata;
      hit = dc_resp_hit;
      check("dc hit flag", 32'(hit), 1);
      n_dc_hit++;
      n_dc_way++;
      return;
    end
    bus_cycle(1'b0, 1'b0, '0, '0, b);   // the cache raises its memory request
    #1;
    check("dc mem_req", 32'(dc_mem_req), 1);
    check("dc mem_we", 32'(dc_mem_we), 32'(we));
    check("dc mem_addr", 32'(dc_mem_addr), 32'(waddr));
    for (int k = 0; k < 4; k++) begin
      if (we) bus_write(8'(4 * waddr + k), dc_mem_wdata[8*k +: 8]);
      else begin
        bus_read(8'(4 * waddr + k), b);
        word[8*k +: 8] = b;
      end
    end
    dc_mem_ack = 1;
    dc_mem_rdata = we ? 32'h0 : word;
    #1;
    if (!we) begin
      check("dc fill response", 32'(dc_resp_valid), 1);
      check("dc fill hit flag", 32'(dc_resp_hit), 0);
      rdat = dc_resp_rdata;
      n_dc_miss++;
      n_dc_way++;
    end else begin
      n_dc_store++;
    end
    bus_cycle(1'b0, 1'b0, '0, '0, b);
    dc_mem_ack = 0;
  endtask

  function automatic logic [31:0] mem_word(int waddr);
    return {mem[8'(4 * waddr + 3)], mem[8'(4 * waddr + 2)], mem[8'(4 * waddr + 1)], mem[8'(4 * waddr)]};
  endfunction

  // ---------------------------------------------------------------- program
  initial begin
    int coef [NT] = '{-2, -4, 1, 9, 18, 27, 33, 36, 36, 33, 27, 18, 9, 1, -4, -2};
    int samp [NS];
    logic [7:0] got [NS];
    logic [31:0] r, addr;
    int nout = 0;
    longint energy = 0;
    int fir_skip_raw, fir_skip_data, fir_skip_extra, fir_skip_words;
    foreach (mode_seen[g, m]) mode_seen[g][m] = 0;
    foreach (m_rf[i]) m_rf[i] = '0;
    foreach (mem[i]) mem[i] = '0;
    for (int i = 0; i < NS; i++)
      samp[i] = 128 + int'($rtoi(90.0 * $sin(6.283185307 * i / 16.0))) + int'($urandom % 9) - 4;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // coefficient pairs in r1..r8 (low half = even tap)
    for (int i = 0; i < NT / 2; i++) begin
      dp(2'd0, ALU_MOVL, LANE_W32, MAC_NONE, 1 + i, 0, 1 + i, 1'b1, 32'(coef[2*i]), 0, r);
      dp(2'd0, ALU_MOVU, LANE_W32, MAC_NONE, 1 + i, 0, 1 + i, 1'b1, 32'(coef[2*i+1]), 0, r);
    end

    // 1. store samples at bit-reversed addresses (6-bit span)
    for (int i = 0; i < NS; i++) begin
      dp(2'd2, ALU_ADD, LANE_W32, MAC_NONE, 0, 0, 0, 1'b1, 32'(i), 6, addr);
      bus_write(addr[7:0], 8'(samp[i]));
    end
    // 2. load them back in natural order: address of sample j is rev(j);
    //    the reads run back to back
    for (int j = 0; j < NS; j++) bus_read(8'(bitrev(32'(j), 6)), got[j]);
    for (int j = 0; j < NS; j++) check("sample round trip", 32'(got[j]), 32'(samp[j]));

    fir_skip_raw = e_raw; fir_skip_data = e_data; fir_skip_extra = e_extra; fir_skip_words = e_words;
    // 2b. the same buffer as 32-bit words through the data cache: a first
    //     pass misses and fills, a second pass hits; words 512 and 1024 sets
    //     apart share a set and evict by FIFO; a store writes through
    begin
      logic [31:0] w;
      logic h, hit_store;
      for (int pass = 0; pass < 2; pass++)
        for (int i = 0; i < NS / 4; i++) begin
          dc_access(1'b0, i, '0, w, h);
          check("cached load", w, mem_word(i));
          check("cached load hit", 32'(h), 32'(pass == 1));
        end
      dc_access(1'b0, 512, '0, w, h);     // set 0: fills its second way
      check("alias load", w, mem_word(512));
      check("alias load missed", 32'(h), 0);
      dc_access(1'b0, 1024, '0, w, h);    // evicts word 0, the oldest fill
      dc_access(1'b0, 0, '0, w, h);       // misses, evicts word 512
      check("evicted word reloaded", w, mem_word(0));
      check("evicted word missed", 32'(h), 0);
      dc_access(1'b0, 1024, '0, w, h);
      check("FIFO kept the newer fill", 32'(h), 1);
      dc_access(1'b0, 512, '0, w, h);
      check("FIFO evicted the older fill", 32'(h), 0);
      dc_access(1'b0, 40, '0, w, h);      // words 40.. hold FIR outputs later
      dc_access(1'b1, 40, 32'hCAFE_F00D, w, hit_store);
      check("written through", mem_word(40), 32'hCAFE_F00D);
      dc_access(1'b0, 40, '0, w, h);
      check("store hit updated the cache", w, 32'hCAFE_F00D);
      check("load after store hit", 32'(h), 1);
      dc_access(1'b1, 41, 32'h1234_5678, w, hit_store);   // store miss: no fill
      dc_access(1'b0, 41, '0, w, h);
      check("store miss not allocated", 32'(h), 0);
      check("store miss written through", w, 32'h1234_5678);
      check("dc accesses", dc_accesses, 32'(n_dc_hit + n_dc_miss + n_dc_store));
      check("dc tag reads", dc_tag_reads, 32'(2 * (n_dc_hit + n_dc_miss + n_dc_store)));
      check("dc data-way accesses", dc_data_reads, 32'(n_dc_way + 1));   // + the store hit
      check("dc misses", dc_misses, 32'(n_dc_miss + 1));                  // + the store miss
    end

    fir_skip_raw = e_raw - fir_skip_raw; fir_skip_data = e_data - fir_skip_data;
    fir_skip_extra = e_extra - fir_skip_extra; fir_skip_words = e_words - fir_skip_words;
    // 3./4. FIR outputs y[n] = sum_k coef[k] * (x[n+k] - 128)
    for (int n = 0; n + NT <= NS; n += 7) begin
      longint fir;
      logic [7:0] b;
      fir = 0;
      for (int i = 0; i < NT / 2; i++) begin
        dp(2'd0, ALU_MOVL, LANE_W32, MAC_NONE, 16 + i, 0, 16 + i, 1'b1, 32'(got[n + 2*i]), 0, r);
        dp(2'd0, ALU_MOVU, LANE_W32, MAC_NONE, 16 + i, 0, 16 + i, 1'b1, 32'(got[n + 2*i + 1]), 0, r);
        dp(2'd0, ALU_SUB, LANE_H16, MAC_NONE, 16 + i, 0, 16 + i, 1'b1, 32'h0080_0080, 0, r);
      end
      dp(2'd1, ALU_ADD, LANE_W32, MAC_CLEAR, 0, 0, 9, 1'b0, '0, 0, r);
      for (int i = 0; i < NT / 2; i++)
        dp(2'd1, ALU_ADD, LANE_W32, MAC_HALF, 1 + i, 16 + i, 9, 1'b0, '0, 0, r);
      for (int k = 0; k < NT; k++) fir += longint'(coef[k]) * longint'(samp[n + k] - 128);
      check("fir output", r, 32'(fir));
      // store the 4 bytes, then read them straight back
      for (int k = 0; k < 4; k++) bus_write(8'(128 + 4 * nout + k), r[8*k +: 8]);
      for (int k = 0; k < 4; k++) begin
        bus_read(8'(128 + 4 * nout + k), b);
        check("fir byte read back", 32'(b), 32'(r[8*k +: 8]));
      end
      nout++;
    end

    // signal energy with word MACs and byte-lane averaging of sample quads
    dp(2'd1, ALU_ADD, LANE_W32, MAC_CLEAR, 0, 0, 10, 1'b0, '0, 0, r);
    for (int i = 0; i < 16; i++) begin
      dp(2'd0, ALU_SUB, LANE_W32, MAC_NONE, 0, 0, 11, 1'b1, 32'(got[i]) - 32'd128, 0, r);
      dp(2'd1, ALU_ADD, LANE_W32, MAC_WORD, 11, 11, 10, 1'b0, '0, 0, r);
      energy += longint'(samp[i] - 128) * longint'(samp[i] - 128);
    end
    check("energy", r, 32'(energy));
    dp(2'd0, ALU_MOVB, LANE_W32, MAC_NONE, 0, 0, 12, 1'b1, {got[3], got[2], got[1], got[0]}, 0, r);
    dp(2'd0, ALU_SHR, LANE_W32, MAC_NONE, 12, 0, 12, 1'b0, '0, 0, r);
    dp(2'd0, ALU_AND, LANE_B8, MAC_NONE, 12, 0, 12, 1'b1, 32'h7F7F_7F7F, 0, r);
    dp(2'd0, ALU_ADD, LANE_B8, MAC_NONE, 12, 12, 13, 1'b0, '0, 0, r);

    begin
      // the FIR program's own traffic, without the cache step 2b
      int r, d, x;
      r = e_raw - fir_skip_raw; d = e_data - fir_skip_data; x = e_extra - fir_skip_extra;
      $display("FIR program bus: words=%0d uncoded=%0d coded data=%0d extra=%0d reduction=%0.1f%% (data lines only %0.1f%%)",
               e_words - fir_skip_words, r, d, x, 100.0 * real'(r - d - x) / real'(r),
               100.0 * real'(r - d) / real'(r));
    end
    // 5. random traffic, some of it back to back
    for (int k = 0; k < 3000; k++) begin
      logic [7:0] a8, b8;
      a8 = 8'($urandom);
      if ($urandom % 4 == 0) bus_cycle(1'b0, 1'b0, '0, '0, b8);
      else if ($urandom % 2 == 0) bus_write(a8, 8'($urandom));
      else bus_read(a8, b8);
    end

    $display("fir outputs=%0d energy=%0d", nout, energy);
    $display("bus: writes=%0d reads=%0d turnarounds=%0d idle=%0d", n_wr, n_rd, n_turn, n_idle);
    $display("bus: uncoded=%0d coded data=%0d extra=%0d reduction=%0.1f%% (data lines only %0.1f%%)",
             e_raw, e_data, e_extra, 100.0 * real'(e_raw - e_data - e_extra) / real'(e_raw),
             100.0 * real'(e_raw - e_data) / real'(e_raw));
    $display("alu: w32=%0d h16=%0d b8=%0d  mac: word=%0d half=%0d clear=%0d  rev=%0d",
             n_lane[0], n_lane[1], n_lane[2], n_mac[MAC_WORD], n_mac[MAC_HALF],
             n_mac[MAC_CLEAR], n_rev);
    check("writes happened", 32'(n_wr > 0), 1);
    check("reads happened", 32'(n_rd > 0), 1);
    check("turnaround happened", 32'(n_turn > 0), 1);
    check("idle bus cycle happened", 32'(n_idle > 0), 1);
    for (int g = 0; g < NG; g++)
      for (int m = 0; m < 4; m++)
        check($sformatf("group %0d function %0d used", g, m), 32'(mode_seen[g][m] > 0), 1);
    for (int l = 0; l < 3; l++) check($sformatf("alu lane %0d used", l), 32'(n_lane[l] > 0), 1);
    check("word mac used", 32'(n_mac[MAC_WORD] > 0), 1);
    check("dual halfword mac used", 32'(n_mac[MAC_HALF] > 0), 1);
    check("acc clear used", 32'(n_mac[MAC_CLEAR] > 0), 1);
    check("bit reverse used", 32'(n_rev > 0), 1);
    check("cache hit used", 32'(n_dc_hit > 0), 1);
    check("cache miss used", 32'(n_dc_miss > 0), 1);
    check("cache store used", 32'(n_dc_store > 0), 1);
    $display("data cache: hits=%0d misses=%0d stores=%0d data-way accesses=%0d tag reads=%0d",
             n_dc_hit, n_dc_miss, n_dc_store, dc_data_reads, dc_tag_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
