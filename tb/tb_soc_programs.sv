// Runs the two image programs used to verify the chip, an 8x8 2-D DCT and
// Sobel edge detection on a 64x64 image, on bp_soc_top at its default
// parameters (32 registers, 8-bit coded bus in two 4-bit groups).
//
// As in tb_bp_soc_top, the testbench plays the instruction decoder, the
// load/store path and the external memory (16 KiB). The source image is in
// external memory; every pixel the programs use is read over the coded bus,
// and every result is written back over it.
//
// DCT: one 8x8 block of the image, offset by -128 with 16-bit SIMD
// subtraction. The row pass uses dual 16-bit MACs (two pixels per
// instruction); its 32-bit outputs feed the column pass, which uses word MACs
// with the coefficient as a constant. Coefficients are the orthonormal DCT-II
// basis scaled by 128 and rounded, so the result is 16384 times the DCT.
// Each 32-bit coefficient is written to memory as 4 bytes.
//
// Sobel: Gx and Gy of Eq. (3-1) with dual 16-bit MACs (pixel pairs against
// coefficient pairs), then Gx*Gx + Gy*Gy with word MACs. There is no square
// root instruction, so the testbench, standing in for the program's
// iterative loop, takes the integer square root and clips it to 255; the
// 8-bit edge pixel is written to memory. Border pixels are not computed.
//
// Checked: every datapath result against the integer model; the DCT against
// a floating-point DCT (within the coefficient rounding error); every word on
// the bus arriving decoded one cycle later and matching the reference coding;
// the switch activity counters. The switch activity reduction of each
// program's bus traffic is printed.
module tb_soc_programs;
  import dsp_pkg::*;
  import codec_ref_pkg::*;
  import dsp_ref_pkg::*;

  localparam int W = 8, NG = 2, IMG = 64;
  localparam int OUT_BASE = 8192;

  int checks = 0, failures = 0;
  int n_instr = 0;

  logic clk = 0, rst_n = 0;
  logic xfer_valid = 0, xfer_dir = 0, sa_clear = 0;
  logic [W-1:0] host_wdata = '0, mem_rdata = '0;
  logic [W-1:0] mem_wdata, host_rdata, bus_data;
  logic [2*NG-1:0] bus_extra;
  logic mem_wvalid, host_rvalid;
  logic [31:0] sa_data, sa_extra, sa_raw, sa_words;
  logic dp_valid = 0, dp_use_imm = 0;
  logic [1:0] dp_unit = '0;
  alu_op_e dp_alu_op = ALU_ADD;
  lane_e   dp_lane = LANE_W32;
  mac_op_e dp_mac_op = MAC_NONE;
  logic [4:0] dp_rs1 = '0, dp_rs2 = '0, dp_rd = '0;
  logic [31:0] dp_imm = '0;
  logic [5:0] dp_rev_span = '0;
  logic [31:0] dp_result, dp_rev_addr, dp_acc;
  // the data cache is not used by these programs (see tb_bp_soc_top)
  logic dc_req_ready, dc_resp_valid, dc_resp_hit, dc_mem_req, dc_mem_we;
  logic [31:0] dc_resp_rdata, dc_mem_wdata, dc_tag_reads, dc_data_reads, dc_accesses, dc_misses;
  logic [16:0] dc_mem_addr;

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
    .dc_req_valid(1'b0), .dc_req_we(1'b0), .dc_req_addr('0), .dc_req_wdata('0),
    .dc_req_ready(dc_req_ready), .dc_resp_valid(dc_resp_valid), .dc_resp_rdata(dc_resp_rdata),
    .dc_resp_hit(dc_resp_hit), .dc_mem_req(dc_mem_req), .dc_mem_we(dc_mem_we),
    .dc_mem_addr(dc_mem_addr), .dc_mem_wdata(dc_mem_wdata), .dc_mem_ack(1'b0), .dc_mem_rdata('0),
    .dc_tag_reads(dc_tag_reads), .dc_data_reads(dc_data_reads), .dc_accesses(dc_accesses),
    .dc_misses(dc_misses)
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
  logic [7:0]  mem [16384];
  logic [31:0] m_rf [32];
  logic [31:0] m_acc = '0;
  logic [31:0] lines = '0, xlines = '0, prev_raw = '0;
  int e_data = 0, e_extra = 0, e_raw = 0, e_words = 0;
  int ph_data = 0, ph_extra = 0, ph_raw = 0, ph_words = 0;

  task automatic report(string name);
    int d = e_data - ph_data, x = e_extra - ph_extra, r = e_raw - ph_raw;
    $display("%-6s bus words=%0d uncoded=%0d coded data=%0d extra=%0d reduction=%0.1f%% (data lines only %0.1f%%)",
             name, e_words - ph_words, r, d, x, 100.0 * real'(r - d - x) / real'(r),
             100.0 * real'(r - d) / real'(r));
    ph_data = e_data; ph_extra = e_extra; ph_raw = e_raw; ph_words = e_words;
  endtask

  // one bus transfer, checked at the next negedge (see tb_bp_soc_top)
  task automatic bus_xfer(logic dir, logic [7:0] word, int addr, output logic [7:0] got);
    logic [31:0] y, x;
    int p_data, p_extra, p_raw;
    xfer_valid = 1; xfer_dir = dir;
    host_wdata = dir ? 8'($urandom) : word;
    mem_rdata  = dir ? word : 8'($urandom);
    encode_word(32'(word), lines, W, NG, y, x);
    p_data = hd(lines, y, W);
    p_extra = hd(xlines, x, 2 * NG);
    p_raw = hd(32'(word), prev_raw, W);
    prev_raw = 32'(word);
    lines = y; xlines = x;
    @(negedge clk);
    xfer_valid = 0;
    check("mem_wvalid", 32'(mem_wvalid), 32'(!dir));
    check("host_rvalid", 32'(host_rvalid), 32'(dir));
    check("bus_data", 32'(bus_data), lines);
    check("bus_extra", 32'(bus_extra), xlines);
    check("sa_data", sa_data, 32'(e_data));
    check("sa_extra", sa_extra, 32'(e_extra));
    check("sa_raw", sa_raw, 32'(e_raw));
    check("sa_words", sa_words, 32'(e_words));
    e_data += p_data; e_extra += p_extra; e_raw += p_raw; e_words++;
    got = 'x;
    if (!dir) begin
      check("mem_wdata", 32'(mem_wdata), 32'(word));
      mem[addr] = mem_wdata;
    end else begin
      check("host_rdata", 32'(host_rdata), 32'(word));
      got = host_rdata;
    end
  endtask

  task automatic load_byte(int addr, output logic [7:0] got);
    bus_xfer(1'b1, mem[addr], addr, got);
  endtask

  task automatic store_byte(int addr, logic [7:0] v);
    logic [7:0] unused;
    bus_xfer(1'b0, v, addr, unused);
  endtask

  // one datapath instruction (the bus is idle; the lines must hold)
  task automatic dp(logic [1:0] u, alu_op_e ao, lane_e ln, mac_op_e mo,
                    int s1, int s2, int d, logic ui, logic [31:0] im,
                    output logic [31:0] res);
    logic [31:0] a, b, e;
    dp_valid = 1; dp_unit = u; dp_alu_op = ao; dp_lane = ln; dp_mac_op = mo;
    dp_rs1 = 5'(s1); dp_rs2 = 5'(s2); dp_rd = 5'(d); dp_use_imm = ui; dp_imm = im;
    a = m_rf[s1];
    b = ui ? im : m_rf[s2];
    #1;
    e = (u == 2'd1) ? mac(mo, m_acc, a, b) : alu(ao, ln, a, b);
    check("result", dp_result, e);
    res = e;
    @(negedge clk);
    dp_valid = 0;
    n_instr++;
    if (u == 2'd1) m_acc = e;
    m_rf[d] = e;
    check("bus held", 32'(bus_data), lines);
  endtask

  // shorthands
  task automatic movb(int d, logic [31:0] v);
    logic [31:0] r;
    dp(2'd0, ALU_MOVB, LANE_W32, MAC_NONE, 0, 0, d, 1'b1, v, r);
  endtask

  task automatic pair(int d, logic [15:0] lo, logic [15:0] hi);
    logic [31:0] r;
    dp(2'd0, ALU_MOVL, LANE_W32, MAC_NONE, d, 0, d, 1'b1, 32'(lo), r);
    dp(2'd0, ALU_MOVU, LANE_W32, MAC_NONE, d, 0, d, 1'b1, 32'(hi), r);
  endtask

  task automatic mac_clear(int d);
    logic [31:0] r;
    dp(2'd1, ALU_ADD, LANE_W32, MAC_CLEAR, 0, 0, d, 1'b0, '0, r);
  endtask

  function automatic int isqrt(longint v);
    longint r = 0;
    while ((r + 1) * (r + 1) <= v) r++;
    return int'(r);
  endfunction

  // ---------------------------------------------------------------- programs
  int coef [8][8];
  int px [IMG][IMG];

  initial begin
    logic [7:0] b;
    logic [31:0] r;
    logic [7:0] blk [8][8];
    longint rowres [8][8];
    int n_sobel = 0;
    real maxerr = 0.0;
    logic [31:0] dct_dc;
    foreach (m_rf[i]) m_rf[i] = '0;
    foreach (mem[i]) mem[i] = '0;
    // orthonormal DCT-II basis scaled by 128
    for (int u = 0; u < 8; u++)
      for (int x = 0; x < 8; x++) begin
        real cu;
        cu = (u == 0) ? $sqrt(1.0 / 8.0) : $sqrt(2.0 / 8.0);
        coef[u][x] = int'($floor(128.0 * cu * $cos((2 * x + 1) * u * 3.14159265358979 / 16.0) + 0.5));
      end
    // 64x64 test image: shaded background, a bright disc and a dark bar
    for (int y = 0; y < IMG; y++)
      for (int x = 0; x < IMG; x++) begin
        int v;
        v = 40 + x + y;
        if ((x - 24) * (x - 24) + (y - 30) * (y - 30) < 200) v = 220;
        if (x >= 44 && x < 52 && y >= 8 && y < 56) v = 15;
        v += int'($urandom % 7) - 3;
        px[y][x] = (v < 0) ? 0 : (v > 255) ? 255 : v;
        mem[y * IMG + x] = 8'(px[y][x]);
      end
    repeat (2) @(negedge clk);
    rst_n = 1;

    // ---------------- 8x8 2-D DCT of the block at (16, 16)
    for (int y = 0; y < 8; y++)
      for (int x = 0; x < 8; x++) load_byte((16 + y) * IMG + 16 + x, blk[y][x]);
    for (int y = 0; y < 8; y++) begin
      // pixel pairs of row y in r16..r19, offset removed in both halves
      for (int k = 0; k < 4; k++) begin
        pair(16 + k, 16'(blk[y][2*k]), 16'(blk[y][2*k+1]));
        dp(2'd0, ALU_SUB, LANE_H16, MAC_NONE, 16 + k, 0, 16 + k, 1'b1, 32'h0080_0080, r);
      end
      for (int u = 0; u < 8; u++) begin
        longint m;
        m = 0;
        for (int k = 0; k < 4; k++) pair(1 + k, 16'(coef[u][2*k]), 16'(coef[u][2*k+1]));
        mac_clear(9);
        for (int k = 0; k < 4; k++) dp(2'd1, ALU_ADD, LANE_W32, MAC_HALF, 1 + k, 16 + k, 9, 1'b0, '0, r);
        for (int x = 0; x < 8; x++) m += longint'(coef[u][x]) * longint'(int'(blk[y][x]) - 128);
        check("dct row", r, 32'(m));
        rowres[y][u] = longint'($signed(r));
      end
    end
    for (int u = 0; u < 8; u++)          // column pass: frequency u along x
      for (int v = 0; v < 8; v++) begin  // frequency v along y
        longint m;
        real ref_v;
        m = 0;
        ref_v = 0.0;
        mac_clear(10);
        for (int y = 0; y < 8; y++) begin
          movb(20, 32'(rowres[y][u]));
          dp(2'd1, ALU_ADD, LANE_W32, MAC_WORD, 20, 0, 10, 1'b1, 32'(coef[v][y]), r);
          m += longint'(coef[v][y]) * rowres[y][u];
        end
        check("dct column", r, 32'(m));
        for (int y = 0; y < 8; y++)
          for (int x = 0; x < 8; x++) begin
            real cu, cv;
            cu = (u == 0) ? $sqrt(1.0 / 8.0) : $sqrt(2.0 / 8.0);
            cv = (v == 0) ? $sqrt(1.0 / 8.0) : $sqrt(2.0 / 8.0);
            ref_v += cu * cv * real'(int'(blk[y][x]) - 128)
                     * $cos((2 * x + 1) * u * 3.14159265358979 / 16.0)
                     * $cos((2 * y + 1) * v * 3.14159265358979 / 16.0);
          end
        begin
          real err;
          err = real'($signed(r)) / 16384.0 - ref_v;
          if (err < 0) err = -err;
          if (err > maxerr) maxerr = err;
          checks++;
          // each rounded coefficient is within 0.5/45 of its true value
          // (45 is the smallest nonzero scaled coefficient used at DC), and
          // two are multiplied: allow 3 % plus a small absolute margin
          if (err > 3.0 + 0.03 * (ref_v < 0 ? -ref_v : ref_v)) begin
            failures++;
            $display("FAIL dct (%0d,%0d): %0f vs %0f", u, v, real'($signed(r)) / 16384.0, ref_v);
          end
        end
        if (u == 0 && v == 0) dct_dc = r;
        for (int k = 0; k < 4; k++) store_byte(OUT_BASE + 4 * (8 * v + u) + k, r[8*k +: 8]);
      end
    $display("dct: largest difference from the floating-point DCT = %0.3f (DC term %0.1f)",
             maxerr, real'($signed(dct_dc)) / 16384.0);
    report("DCT");

    // ---------------- Sobel on the whole 64x64 image
    // coefficient pairs: r1 (-1,+1), r2 (-2,+2), r3 (+1,+1), r4 (+2,-2), r5 (-1,-1)
    pair(1, 16'hFFFF, 16'd1);
    pair(2, 16'hFFFE, 16'd2);
    pair(3, 16'd1, 16'd1);
    pair(4, 16'd2, 16'hFFFE);
    pair(5, 16'hFFFF, 16'hFFFF);
    begin
      logic [7:0] img [IMG][IMG];
      for (int y = 0; y < IMG; y++)
        for (int x = 0; x < IMG; x++) load_byte(y * IMG + x, img[y][x]);
      for (int y = 0; y < IMG; y++)
        for (int x = 0; x < IMG; x++) check("image read", 32'(img[y][x]), 32'(px[y][x]));
      for (int y = 1; y < IMG - 1; y++)
        for (int x = 1; x < IMG - 1; x++) begin
          int gx, gy, g;
          logic [31:0] rx, ry, rg;
          // Gx: row pairs (left, right) of rows y-1, y, y+1
          pair(16, 16'(img[y-1][x-1]), 16'(img[y-1][x+1]));
          pair(17, 16'(img[y][x-1]),   16'(img[y][x+1]));
          pair(18, 16'(img[y+1][x-1]), 16'(img[y+1][x+1]));
          mac_clear(9);
          dp(2'd1, ALU_ADD, LANE_W32, MAC_HALF, 1, 16, 9, 1'b0, '0, rx);
          dp(2'd1, ALU_ADD, LANE_W32, MAC_HALF, 2, 17, 9, 1'b0, '0, rx);
          dp(2'd1, ALU_ADD, LANE_W32, MAC_HALF, 1, 18, 9, 1'b0, '0, rx);
          // Gy: (top-left, top-right), (top, bottom), (bottom-left, bottom-right)
          pair(17, 16'(img[y-1][x]), 16'(img[y+1][x]));
          mac_clear(10);
          dp(2'd1, ALU_ADD, LANE_W32, MAC_HALF, 3, 16, 10, 1'b0, '0, ry);
          dp(2'd1, ALU_ADD, LANE_W32, MAC_HALF, 4, 17, 10, 1'b0, '0, ry);
          dp(2'd1, ALU_ADD, LANE_W32, MAC_HALF, 5, 18, 10, 1'b0, '0, ry);
          mac_clear(11);
          dp(2'd1, ALU_ADD, LANE_W32, MAC_WORD, 9, 9, 11, 1'b0, '0, rg);
          dp(2'd1, ALU_ADD, LANE_W32, MAC_WORD, 10, 10, 11, 1'b0, '0, rg);
          gx = -px[y-1][x-1] + px[y-1][x+1] - 2 * px[y][x-1] + 2 * px[y][x+1]
               - px[y+1][x-1] + px[y+1][x+1];
          gy = px[y-1][x-1] + 2 * px[y-1][x] + px[y-1][x+1]
               - px[y+1][x-1] - 2 * px[y+1][x] - px[y+1][x+1];
          check("sobel gx", rx, 32'(gx));
          check("sobel gy", ry, 32'(gy));
          check("sobel g^2", rg, 32'(gx * gx + gy * gy));
          g = isqrt(longint'(rg));
          if (g > 255) g = 255;
          store_byte(OUT_BASE + 4096 + y * IMG + x, 8'(g));
          n_sobel++;
        end
      // edge map sanity: strong response on the bar's edge, weak on the background
      check("edge on bar border", 32'(mem[OUT_BASE + 4096 + 30 * IMG + 44] > 8'd100), 1);
      check("flat background", 32'(mem[OUT_BASE + 4096 + 5 * IMG + 5] < 8'd80), 1);
    end
    report("Sobel");
    $display("instructions=%0d sobel pixels=%0d cycles=%0t", n_instr, n_sobel, $time / 10);
    check("data cache idle", dc_accesses, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
