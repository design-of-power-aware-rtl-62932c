// Testbench of switch_activity_monitor: random samples with gaps, a clear in
// the middle, and counters compared with a bit-by-bit count of transitions
// between consecutive samples (starting from zero after reset).
module tb_switch_activity_monitor;
  import codec_ref_pkg::*;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, clear = 0, sample = 0;
  logic [7:0] bus_data = '0, raw_data = '0;
  logic [3:0] bus_extra = '0;
  logic [31:0] sa_data, sa_extra, sa_raw, words;

  switch_activity_monitor dut (
    .clk(clk), .rst_n(rst_n), .clear(clear), .sample(sample),
    .bus_data(bus_data), .bus_extra(bus_extra), .raw_data(raw_data),
    .sa_data(sa_data), .sa_extra(sa_extra), .sa_raw(sa_raw), .words(words)
  );

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %0t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  initial begin
    int e_data = 0, e_extra = 0, e_raw = 0, e_words = 0;
    logic [31:0] p_data = 0, p_extra = 0, p_raw = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      check("sa_data", int'(sa_data), e_data);
      check("sa_extra", int'(sa_extra), e_extra);
      check("sa_raw", int'(sa_raw), e_raw);
      check("words", int'(words), e_words);
      clear = (cyc == 1500);
      sample = ($urandom % 4 != 0);
      bus_data = 8'($urandom); bus_extra = 4'($urandom); raw_data = 8'($urandom);
      if (clear) begin
        e_data = 0; e_extra = 0; e_raw = 0; e_words = 0;
      end else if (sample) begin
        e_data += hd(32'(bus_data), p_data, 8);
        e_extra += hd(32'(bus_extra), p_extra, 4);
        e_raw += hd(32'(raw_data), p_raw, 8);
        e_words++;
        p_data = 32'(bus_data); p_extra = 32'(bus_extra); p_raw = 32'(raw_data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
