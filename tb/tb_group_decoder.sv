// Testbench of group_decoder: for every 4-bit data value, previous bus value
// and function code, the word the sender would put on the bus is formed here
// and the decoder must return the data. Random 8-bit cases follow.
module tb_group_decoder;
  import codec_ref_pkg::*;
  import pa_codec_pkg::codec_mode_e;

  int checks = 0, failures = 0;

  logic [3:0] y4, p4, x4; codec_mode_e m4;
  logic [7:0] y8, p8, x8; codec_mode_e m8;

  group_decoder #(.W(4)) dut4 (.y(y4), .mode(m4), .prev(p4), .x(x4));
  group_decoder #(.W(8)) dut8 (.y(y8), .mode(m8), .prev(p8), .x(x8));

  initial begin
    for (int d = 0; d < 16; d++) begin
      for (int p = 0; p < 16; p++) begin
        for (int m = 0; m < 4; m++) begin
          p4 = 4'(p);
          m4 = codec_mode_e'(m);
          y4 = 4'(apply(m, 32'(d), 32'(p), 4));
          #1;
          checks++;
          if (int'(x4) != d) begin
            failures++;
            if (failures < 20) $display("FAIL d=%h p=%h m=%0d got %h", d, p, m, x4);
          end
        end
      end
    end
    for (int k = 0; k < 4000; k++) begin
      int d, m;
      d = int'($urandom % 256);
      m = int'($urandom % 4);
      p8 = 8'($urandom);
      m8 = codec_mode_e'(m);
      y8 = 8'(apply(m, 32'(d), 32'(p8), 8));
      #1;
      checks++;
      if (int'(x8) != d) failures++;
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
