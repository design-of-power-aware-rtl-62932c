// Switch activity reduction over synthetic data streams.
//
// Streams of words are generated in which each bit of the upper half toggles
// from one word to the next with probability P_hi percent and each bit of the
// lower half with probability P_lo percent ("MSBG/LSBG variability" pairs
// 25..100 / 25..100), plus uniformly random words and, for 8 bits, words
// clustered around mid-scale. Every 8-bit stream goes through the codec with
// one 8-bit group and with two 4-bit groups (the default); every 16-bit stream
// with one 16-bit group, two 8-bit groups and four 4-bit groups. The harnesses
// check each decoded word, each coded word and the transition counters; the
// reduction (uncoded - coded - extra lines) / uncoded is printed per run,
// and below it the reduction on the data lines alone.
// Every run must have decoded all its words and counted them.
module tb_sar_workloads;

  localparam int N = 100000;  // words per stream, as in the evaluation

  logic clk = 0, rst_n = 0, clear = 0, valid = 0;
  logic [7:0]  d8 = '0;
  logic [15:0] d16 = '0;

  int checks = 0, failures = 0;

  int c81, f81, c82, f82, c161, f161, c162, f162, c164, f164;
  logic [31:0] sd [5], sx [5], sr [5], nw [5];

  sar_harness #(.W(8),  .NG(1)) h81  (.clk(clk), .rst_n(rst_n), .clear(clear), .valid(valid), .data(d8),
    .checks(c81), .failures(f81), .sa_data(sd[0]), .sa_extra(sx[0]), .sa_raw(sr[0]), .words(nw[0]));
  sar_harness #(.W(8),  .NG(2)) h82  (.clk(clk), .rst_n(rst_n), .clear(clear), .valid(valid), .data(d8),
    .checks(c82), .failures(f82), .sa_data(sd[1]), .sa_extra(sx[1]), .sa_raw(sr[1]), .words(nw[1]));
  sar_harness #(.W(16), .NG(1)) h161 (.clk(clk), .rst_n(rst_n), .clear(clear), .valid(valid), .data(d16),
    .checks(c161), .failures(f161), .sa_data(sd[2]), .sa_extra(sx[2]), .sa_raw(sr[2]), .words(nw[2]));
  sar_harness #(.W(16), .NG(2)) h162 (.clk(clk), .rst_n(rst_n), .clear(clear), .valid(valid), .data(d16),
    .checks(c162), .failures(f162), .sa_data(sd[3]), .sa_extra(sx[3]), .sa_raw(sr[3]), .words(nw[3]));
  sar_harness #(.W(16), .NG(4)) h164 (.clk(clk), .rst_n(rst_n), .clear(clear), .valid(valid), .data(d16),
    .checks(c164), .failures(f164), .sa_data(sd[4]), .sa_extra(sx[4]), .sa_raw(sr[4]), .words(nw[4]));

  always #5 clk = ~clk;

  function automatic real sar(int i);
    if (sr[i] == 0) return 0.0;
    return 100.0 * (real'(sr[i]) - real'(sd[i]) - real'(sx[i])) / real'(sr[i]);
  endfunction

  // the same, counting the data lines only (extra lines left out)
  function automatic real sar_data_only(int i);
    if (sr[i] == 0) return 0.0;
    return 100.0 * (real'(sr[i]) - real'(sd[i])) / real'(sr[i]);
  endfunction

  // kind 0: variability pair, 1: uniform random, 2: clustered ("specific")
  task automatic run(string name, int kind, int p_hi, int p_lo);
    @(negedge clk);
    valid = 0;
    clear = 1;
    @(negedge clk);
    clear = 0;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      valid = 1;
      case (kind)
        0: begin
             for (int b = 0; b < 16; b++) begin
               int p = (b % 8 >= 4) ? p_hi : p_lo;     // 8-bit halves
               int p16 = (b >= 8) ? p_hi : p_lo;       // 16-bit halves
               if (b < 8 && int'($urandom % 100) < p) d8[b] = ~d8[b];
               if (int'($urandom % 100) < p16) d16[b] = ~d16[b];
             end
           end
        1: begin
             d8 = 8'($urandom);
             d16 = 16'($urandom);
           end
        default: begin
             int s = 0;
             for (int k = 0; k < 4; k++) s += int'($urandom % 33);
             d8 = 8'(64 + s);                          // 64..196, peak at 130
             d16 = {d8, 8'($urandom)};
           end
      endcase
    end
    @(negedge clk);
    valid = 0;
    repeat (3) @(negedge clk);
    $display("%-10s 8b/1g %6.1f%%  8b/2g %6.1f%%  16b/1g %6.1f%%  16b/2g %6.1f%%  16b/4g %6.1f%%",
             name, sar(0), sar(1), sar(2), sar(3), sar(4));
    $display("%-10s   data lines only: %6.1f%%  %6.1f%%  %6.1f%%  %6.1f%%  %6.1f%%",
             "", sar_data_only(0), sar_data_only(1), sar_data_only(2), sar_data_only(3),
             sar_data_only(4));
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (nw[i] != N) begin
        failures++;
        $display("FAIL %s harness %0d counted %0d words", name, i, nw[i]);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    $display("switch activity reduction, %0d words per stream", N);
    run("specific", 2, 0, 0);
    run("random", 1, 0, 0);
    for (int hi = 25; hi <= 100; hi += 25)
      for (int lo = 25; lo <= 100; lo += 25)
        run($sformatf("%0d/%0d", hi, lo), 0, hi, lo);
    checks += c81 + c82 + c161 + c162 + c164;
    failures += f81 + f82 + f161 + f162 + f164;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * (N + 10)) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + c81 + c82 + c161 + c162 + c164,
             failures + 1 + f81 + f82 + f161 + f162 + f164);
    $finish;
  end
endmodule
