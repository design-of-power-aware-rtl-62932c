// Testbench of hamming_dist: every pair of 8-bit words (the drawn width) and
// random pairs at 4 and 13 bits, against a bit-by-bit count.
module tb_hamming_dist;
  import codec_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [7:0]  a8, b8;   logic [3:0] d8;
  logic [3:0]  a4, b4;   logic [2:0] d4;
  logic [12:0] a13, b13; logic [3:0] d13;

  hamming_dist #(.W(8))  u8  (.a(a8),  .b(b8),  .hd(d8));
  hamming_dist #(.W(4))  u4  (.a(a4),  .b(b4),  .hd(d4));
  hamming_dist #(.W(13)) u13 (.a(a13), .b(b13), .hd(d13));

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j);
        #1;
        checks++;
        if (int'(d8) != hd(32'(i), 32'(j), 8)) begin
          failures++;
          if (failures < 10) $display("FAIL W=8 a=%h b=%h got %0d", a8, b8, d8);
        end
      end
    end
    for (int k = 0; k < 2000; k++) begin
      a4 = 4'($urandom); b4 = 4'($urandom);
      a13 = 13'($urandom); b13 = 13'($urandom);
      #1;
      checks += 2;
      if (int'(d4) != hd(32'(a4), 32'(b4), 4)) failures++;
      if (int'(d13) != hd(32'(a13), 32'(b13), 13)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
