// Testbench of register_file: random writes and two random reads per cycle
// against an array model; a write is visible from the next cycle on, and a
// read of the register being written returns the old value. All registers
// read zero after reset.
module tb_register_file;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, we = 0;
  logic [4:0] ra1 = '0, ra2 = '0, wa = '0;
  logic [31:0] wd = '0, rd1, rd2;
  logic [31:0] model [32];

  register_file dut (.clk(clk), .rst_n(rst_n), .ra1(ra1), .rd1(rd1), .ra2(ra2), .rd2(rd2),
                     .we(we), .wa(wa), .wd(wd));

  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %0t %s: got %h expected %h", $time, what, got, exp);
    end
  endtask

  initial begin
    foreach (model[i]) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      ra1 = 5'(i); #1; check("after reset", rd1, 32'd0);
    end
    for (int k = 0; k < 10000; k++) begin
      @(negedge clk);
      we = ($urandom % 2 == 0);
      wa = 5'($urandom); wd = $urandom;
      ra1 = 5'($urandom); ra2 = (k % 4 == 0) ? wa : 5'($urandom);
      #1;
      check("rd1", rd1, model[ra1]);
      check("rd2", rd2, model[ra2]);
      if (we) model[wa] = wd;
    end
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
