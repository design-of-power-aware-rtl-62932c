// Testbench of dsp_datapath. First a short program computes an 8-tap FIR
// output with dual 16-bit MACs (two taps per instruction), then a long
// random instruction stream is run against a model of the register file and
// accumulator. Results, bit-reversed addresses, register contents and the
// accumulator are all checked.
module tb_dsp_datapath;
  import dsp_pkg::*;
  import dsp_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_unit [4] = '{0, 0, 0, 0};

  logic clk = 0, rst_n = 0;
  logic valid = 0, use_imm = 0;
  logic [1:0] unit = '0;
  alu_op_e alu_op = ALU_ADD;
  lane_e   lane = LANE_W32;
  mac_op_e mac_op = MAC_NONE;
  logic [4:0] rs1 = '0, rs2 = '0, rd = '0;
  logic [31:0] imm = '0;
  logic [5:0] rev_span = '0;
  logic [31:0] result, rev_addr, acc;

  logic [31:0] m_rf [32];
  logic [31:0] m_acc;

  dsp_datapath dut (
    .clk(clk), .rst_n(rst_n), .valid(valid), .unit(unit), .alu_op(alu_op), .lane(lane),
    .mac_op(mac_op), .rs1(rs1), .rs2(rs2), .rd(rd), .imm(imm), .use_imm(use_imm),
    .rev_span(rev_span), .result(result), .rev_addr(rev_addr), .acc(acc)
  );

  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %0t %s: got %h expected %h", $time, what, got, exp);
    end
  endtask

  // apply one instruction at the negedge, check its combinational outputs,
  // then update the model as the clock edge will
  task automatic issue(logic [1:0] u, alu_op_e ao, lane_e ln, mac_op_e mo,
                       int s1, int s2, int d, logic ui, logic [31:0] im, int span);
    logic [31:0] a, b, exp_res;
    valid = 1; unit = u; alu_op = ao; lane = ln; mac_op = mo;
    rs1 = 5'(s1); rs2 = 5'(s2); rd = 5'(d); use_imm = ui; imm = im; rev_span = 6'(span);
    a = m_rf[s1];
    b = ui ? im : m_rf[s2];
    #1;
    n_unit[u]++;
    if (u == 2'd1) exp_res = mac(mo, m_acc, a, b);
    else           exp_res = alu(ao, ln, a, b);
    if (u != 2'd2) check("result", result, exp_res);
    if (u == 2'd2) check("rev_addr", rev_addr, bitrev(ui ? im : a, span));
    @(negedge clk);
    if (u == 2'd1) m_acc = exp_res;
    if (u == 2'd0 || u == 2'd1) m_rf[d] = exp_res;
    check("acc", acc, m_acc);
  endtask

  task automatic load(int d, logic [31:0] v);
    issue(2'd0, ALU_MOVB, LANE_W32, MAC_NONE, 0, 0, d, 1'b1, v, 0);
  endtask

  initial begin
    int coef [8] = '{3, -1, 4, -1, 5, -9, 2, -6};
    int samp [8] = '{100, -200, 300, 50, -75, 1000, -32768, 32767};
    int fir = 0;
    foreach (m_rf[i]) m_rf[i] = '0;
    m_acc = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // FIR program: r1..r4 hold coefficient pairs, r5..r8 sample pairs,
    // built with MOVL then MOVU; r9 receives the running sum.
    for (int i = 0; i < 4; i++) begin
      load(1 + i, 32'(coef[2*i]) & 32'hFFFF);
      issue(2'd0, ALU_MOVU, LANE_W32, MAC_NONE, 1 + i, 0, 1 + i, 1'b1, 32'(coef[2*i+1]) & 32'hFFFF, 0);
      load(5 + i, 32'(samp[2*i]) & 32'hFFFF);
      issue(2'd0, ALU_MOVU, LANE_W32, MAC_NONE, 5 + i, 0, 5 + i, 1'b1, 32'(samp[2*i+1]) & 32'hFFFF, 0);
    end
    issue(2'd1, ALU_ADD, LANE_W32, MAC_CLEAR, 0, 0, 9, 1'b0, '0, 0);
    for (int i = 0; i < 4; i++)
      issue(2'd1, ALU_ADD, LANE_W32, MAC_HALF, 1 + i, 5 + i, 9, 1'b0, '0, 0);
    foreach (coef[i]) fir += coef[i] * samp[i];
    check("fir acc", acc, 32'(fir));
    rs1 = 5'd9; #1; check("fir in r9", dut.u_rf.rd1, 32'(fir));
    // bit-reversed address of the example 01101 over a 5-bit span
    issue(2'd2, ALU_ADD, LANE_W32, MAC_NONE, 0, 0, 0, 1'b1, 32'b01101, 5);
    check("example reverse", rev_addr, 32'b10110);

    for (int k = 0; k < 20000; k++) begin
      logic [1:0] u;
      u = 2'($urandom % 4);
      if ($urandom % 6 == 0) begin
        // idle cycle: nothing may change
        valid = 0; unit = u; mac_op = mac_op_e'($urandom % 4); rd = 5'($urandom);
        @(negedge clk);
        check("idle acc", acc, m_acc);
      end else
        issue(u, alu_op_e'($urandom % 12), lane_e'($urandom % 3),
              (($urandom % 10) == 0) ? MAC_CLEAR : mac_op_e'($urandom % 3),
              $urandom % 32, $urandom % 32, $urandom % 32, 1'($urandom % 3 == 0),
              $urandom, $urandom % 33);
    end
    valid = 0;
    for (int i = 0; i < 32; i++) begin
      rs1 = 5'(i); #1; check("final register", dut.u_rf.rd1, m_rf[i]);
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (n_unit[i] == 0) failures++;
    end
    $display("fir=%0d alu=%0d mac=%0d addr=%0d none=%0d", fir, n_unit[0], n_unit[1], n_unit[2], n_unit[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
