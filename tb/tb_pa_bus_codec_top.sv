// End-to-end testbench of pa_bus_codec_top at its default parameters
// (8-bit bus in two 4-bit groups).
//
// Writes (host to memory) and reads (memory to host) are issued with random
// gaps and direction changes. The first 10 writes are the opening samples of
// an 8-bit audio recording (140 131 146 151 136 125 115 130 145 139); then
// come words of random data, words whose upper group changes slowly, and runs
// of constant words. A reference model of the lines checks
//   - each word arrives decoded at the other end exactly one cycle after the
//     request, and only then;
//   - the data and extra lines carry exactly the reference coding, and keep
//     their value in cycles without a transfer;
//   - the switch activity counters equal a bit-by-bit transition count.
// Mechanisms counted, each of which must occur: write, read, a direction
// change with no idle cycle, an idle cycle, and each of the four functions in
// each group. The switch activity reduction is printed for each phase.
module tb_pa_bus_codec_top;
  import codec_ref_pkg::*;

  localparam int W = 8, NG = 2;

  int checks = 0, failures = 0;
  int n_wr = 0, n_rd = 0, n_turn = 0, n_idle = 0;
  int mode_seen [NG][4];

  logic clk = 0, rst_n = 0;
  logic xfer_valid = 0, xfer_dir = 0, clear = 0;
  logic [W-1:0] host_wdata = '0, mem_rdata = '0;
  logic [W-1:0] mem_wdata, host_rdata, bus_data;
  logic [2*NG-1:0] bus_extra;
  logic mem_wvalid, host_rvalid;
  logic [31:0] sa_data, sa_extra, sa_raw, words;

  pa_bus_codec_top dut (
    .clk(clk), .rst_n(rst_n),
    .xfer_valid(xfer_valid), .xfer_dir(xfer_dir),
    .host_wdata(host_wdata), .mem_rdata(mem_rdata),
    .mem_wdata(mem_wdata), .mem_wvalid(mem_wvalid),
    .host_rdata(host_rdata), .host_rvalid(host_rvalid),
    .bus_data(bus_data), .bus_extra(bus_extra),
    .clear(clear), .sa_data(sa_data), .sa_extra(sa_extra), .sa_raw(sa_raw), .words(words)
  );

  always #5 clk = ~clk;

  localparam int MUSIC [10] = '{140, 131, 146, 151, 136, 125, 115, 130, 145, 139};

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %0t %s: got %0h expected %0h", $time, what, got, exp);
    end
  endtask

  // reference state
  logic [31:0] lines = 0, xlines = 0, prev_raw = 0;
  int e_data = 0, e_extra = 0, e_raw = 0, e_words = 0;
  int ph_data = 0, ph_extra = 0, ph_raw = 0;

  task automatic report_phase(string name);
    int d = e_data - ph_data, x = e_extra - ph_extra, r = e_raw - ph_raw;
    if (r > 0)
      $display("%-12s uncoded=%0d coded data=%0d extra=%0d  reduction=%0.1f%%",
               name, r, d, x, 100.0 * real'(r - d - x) / real'(r));
    ph_data = e_data; ph_extra = e_extra; ph_raw = e_raw;
  endtask

  initial begin
    logic exp_arrive = 0, exp_dir = 0, last_dir = 0, last_valid = 0;
    logic [31:0] exp_data = 0, exp_y = 0, exp_x = 0;
    int phase;
    logic [7:0] slow = 8'h80;
    foreach (mode_seen[g, m]) mode_seen[g][m] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      logic go, dir;
      logic [7:0] word;
      @(negedge clk);
      // what the last edge put on the lines
      check("mem_wvalid", int'(mem_wvalid), int'(exp_arrive && !exp_dir));
      check("host_rvalid", int'(host_rvalid), int'(exp_arrive && exp_dir));
      check("bus_data", int'(bus_data), int'(lines));
      check("bus_extra", int'(bus_extra), int'(xlines));
      // counters hold every word that was on the lines before this one
      check("sa_data", int'(sa_data), e_data);
      check("sa_extra", int'(sa_extra), e_extra);
      check("sa_raw", int'(sa_raw), e_raw);
      check("words", int'(words), e_words);
      if (exp_arrive) begin
        if (!exp_dir) check("mem_wdata", int'(mem_wdata), int'(exp_data));
        else          check("host_rdata", int'(host_rdata), int'(exp_data));
        for (int g = 0; g < NG; g++) mode_seen[g][(xlines >> (2*g)) & 3]++;
        e_data += hd(lines, exp_y, W);   // exp_y holds the lines before
        e_extra += hd(xlines, exp_x, 2*NG);
        e_raw += hd(exp_data, prev_raw, W);
        e_words++;
        prev_raw = exp_data;
      end
      if (cyc < 10)        phase = 0;    // audio samples, writes
      else if (cyc < 2000) phase = 1;    // random words
      else if (cyc < 4000) phase = 2;    // slowly changing upper group
      else                 phase = 3;    // constant runs
      if (cyc == 10)   report_phase("audio");
      if (cyc == 2000) report_phase("random");
      if (cyc == 4000) report_phase("slow-upper");
      go = (phase == 0) ? 1'b1 : ($urandom % 5 != 0);
      dir = (phase == 0) ? 1'b0 : 1'($urandom);
      case (phase)
        0: word = 8'(MUSIC[cyc]);
        1: word = 8'($urandom);
        2: begin
             if ($urandom % 8 == 0) slow = slow + 8'h10;
             word = {slow[7:4], 4'($urandom)};
           end
        default: word = ((cyc / 16) % 2 == 0) ? 8'h5A : 8'hC3;
      endcase
      xfer_valid = go;
      xfer_dir = dir;
      host_wdata = dir ? 8'($urandom) : word;   // the idle side's value is don't-care
      mem_rdata = dir ? word : 8'($urandom);
      // reference: the word reaches the lines at the next edge
      exp_y = lines;
      exp_x = xlines;
      if (go) begin
        logic [31:0] y, x;
        encode_word(32'(word), lines, W, NG, y, x);
        lines = y;
        xlines = x;
        if (dir) n_rd++; else n_wr++;
        if (last_valid && last_dir != dir) n_turn++;
        last_dir = dir;
      end else begin
        n_idle++;
      end
      last_valid = go;
      exp_arrive = go;
      exp_dir = dir;
      exp_data = 32'(word);
    end
    @(negedge clk);
    xfer_valid = 0;
    report_phase("constant");
    $display("whole run: uncoded=%0d coded data=%0d extra=%0d reduction=%0.1f%%",
             e_raw, e_data, e_extra, 100.0 * real'(e_raw - e_data - e_extra) / real'(e_raw));
    $display("writes=%0d reads=%0d turnarounds=%0d idle=%0d", n_wr, n_rd, n_turn, n_idle);
    check("writes happened", int'(n_wr > 0), 1);
    check("reads happened", int'(n_rd > 0), 1);
    check("back-to-back direction change happened", int'(n_turn > 0), 1);
    check("idle cycle happened", int'(n_idle > 0), 1);
    for (int g = 0; g < NG; g++)
      for (int m = 0; m < 4; m++)
        check($sformatf("group %0d function %0d used", g, m), int'(mode_seen[g][m] > 0), 1);
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
