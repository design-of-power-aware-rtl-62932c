// Testbench of codec_port (one bus end, 8-bit word in two 4-bit groups).
//
// The testbench plays the far end of the bus and keeps its own record of the
// value the lines hold. Each cycle it may send the end a coded word (formed
// with the reference encoder against that record) and may ask the end to send
// a word. Checks:
//   - a received word is decoded in the cycle it is on the lines;
//   - a word to send appears on bus_out/extra_out exactly one cycle later,
//     with bus_oe high for that single cycle, coded against the value the
//     lines held (including a word received in the same cycle);
//   - bus_out holds its value while the end does not send.
// Receiving and sending in one cycle, idle cycles and all four functions in
// both groups must each occur.
module tb_codec_port;
  import codec_ref_pkg::*;

  localparam int W = 8, NG = 2;

  int checks = 0, failures = 0;
  int n_tx = 0, n_rx = 0, n_both = 0, n_idle = 0;
  int mode_seen [NG][4];

  logic clk = 0, rst_n = 0;
  logic tx_valid = 0, bus_in_valid = 0;
  logic [W-1:0] tx_data = '0, bus_in = '0, bus_out, rx_data;
  logic [2*NG-1:0] extra_in = '0, extra_out;
  logic bus_oe, rx_valid;

  codec_port dut (
    .clk(clk), .rst_n(rst_n),
    .tx_valid(tx_valid), .tx_data(tx_data),
    .bus_out(bus_out), .extra_out(extra_out), .bus_oe(bus_oe),
    .bus_in(bus_in), .extra_in(extra_in), .bus_in_valid(bus_in_valid),
    .rx_data(rx_data), .rx_valid(rx_valid)
  );

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %0t %s: got %0h expected %0h", $time, what, got, exp);
    end
  endtask

  initial begin
    logic [31:0] lines = '0;          // value on the data lines
    logic [31:0] exp_word = '0, exp_extra = '0, held = '0;
    logic exp_oe = 0;
    foreach (mode_seen[g, m]) mode_seen[g][m] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      logic rx_now, tx_now;
      logic [31:0] rx_word, e_y, e_x;
      @(negedge clk);
      // outputs registered at the last edge
      check("bus_oe", int'(bus_oe), int'(exp_oe));
      if (exp_oe) begin
        check("bus_out", int'(bus_out), int'(exp_word));
        check("extra_out", int'(extra_out), int'(exp_extra));
        held = exp_word;
        for (int g = 0; g < NG; g++) mode_seen[g][(exp_extra >> (2*g)) & 3]++;
      end else begin
        check("bus_out held", int'(bus_out), int'(held));
      end
      // this cycle's traffic; the far end may not drive while we do
      rx_now = !exp_oe && ($urandom % 3 != 0);
      tx_now = ($urandom % 2 == 0);
      if (cyc < 20) tx_now = 1'b0;              // first receive only
      rx_word = 32'($urandom % 256);
      if (cyc % 7 == 0) rx_word = (cyc % 14 == 0) ? 32'h00 : 32'hFF;
      bus_in_valid = rx_now;
      if (rx_now) begin
        encode_word(rx_word, lines, W, NG, e_y, e_x);
        bus_in = W'(e_y);
        extra_in = (2*NG)'(e_x);
      end
      tx_valid = tx_now;
      tx_data = W'($urandom);
      if (cyc % 5 == 0) tx_data = lines[W-1:0] ^ 8'h01;  // close to the lines
      #1;
      check("rx_valid", int'(rx_valid), int'(rx_now));
      if (rx_now) begin
        check("rx_data", int'(rx_data), int'(rx_word));
        lines = e_y;
        n_rx++;
      end
      if (tx_now) begin
        encode_word(32'(tx_data), lines, W, NG, exp_word, exp_extra);
        lines = exp_word;
        n_tx++;
      end
      if (rx_now && tx_now) n_both++;
      if (!rx_now && !tx_now) n_idle++;
      exp_oe = tx_now;
    end
    @(negedge clk);
    tx_valid = 0; bus_in_valid = 0;
    check("sent and received together", int'(n_both > 0), 1);
    check("idle cycles", int'(n_idle > 0), 1);
    for (int g = 0; g < NG; g++)
      for (int m = 0; m < 4; m++)
        check($sformatf("group %0d function %0d used", g, m), int'(mode_seen[g][m] > 0), 1);
    $display("tx=%0d rx=%0d both=%0d idle=%0d", n_tx, n_rx, n_both, n_idle);
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
