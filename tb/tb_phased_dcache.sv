// Testbench of phased_dcache at its default size (2 ways x 512 sets x 32 bits,
// 8-bit tags). Random loads and stores over a small working set (few sets,
// four tags per set) force hits, misses and FIFO evictions; main memory
// answers after 0 to 3 extra cycles. A reference model of the tags, valid
// bits and FIFO pointers predicts every hit and miss; every load must return
// the last value stored to its address, one cycle after acceptance on a hit.
// The array-activity counters are checked at the end: two tag reads per
// access, one data-way access per hit or fill.
module tb_phased_dcache;

  localparam int WAYS = 2, SETS = 512, AW = 17;

  int checks = 0, failures = 0;
  int n_load_hit = 0, n_load_miss = 0, n_store_hit = 0, n_store_miss = 0, n_evict = 0;

  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_we = 0;
  logic [AW-1:0] req_addr = '0;
  logic [31:0] req_wdata = '0;
  logic req_ready, resp_valid, resp_hit;
  logic [31:0] resp_rdata;
  logic mem_req, mem_we, mem_ack = 0;
  logic [AW-1:0] mem_addr;
  logic [31:0] mem_wdata, mem_rdata = '0;
  logic [31:0] tag_reads, data_reads, accesses, misses;

  phased_dcache dut (
    .clk(clk), .rst_n(rst_n),
    .req_valid(req_valid), .req_we(req_we), .req_addr(req_addr), .req_wdata(req_wdata),
    .req_ready(req_ready), .resp_valid(resp_valid), .resp_rdata(resp_rdata), .resp_hit(resp_hit),
    .mem_req(mem_req), .mem_we(mem_we), .mem_addr(mem_addr), .mem_wdata(mem_wdata),
    .mem_ack(mem_ack), .mem_rdata(mem_rdata),
    .tag_reads(tag_reads), .data_reads(data_reads), .accesses(accesses), .misses(misses)
  );

  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %0t %s: got %h expected %h", $time, what, got, exp);
    end
  endtask

  // main memory and the value each address should hold
  logic [31:0] mainmem [int];
  logic [31:0] golden  [int];
  // reference cache state
  int  r_tag   [SETS][WAYS];
  bit  r_valid [SETS][WAYS];
  int  r_fifo  [SETS];
  // loads waiting for their response: expected data and hit flag
  logic [32:0] expq [$];

  // words never written hold a pattern derived from their address
  function automatic logic [31:0] initial_word(int a);
    return 32'(a) * 32'h9E37_79B9;
  endfunction

  function automatic logic [31:0] rd_main(int a);
    return mainmem.exists(a) ? mainmem[a] : initial_word(a);
  endfunction

  function automatic logic [31:0] rd_gold(int a);
    return golden.exists(a) ? golden[a] : initial_word(a);
  endfunction

  initial begin
    int wait_cnt = 0, hits = 0, fills = 0, acc = 0, miss = 0;
    bit pending = 0;
    foreach (r_valid[s, w]) r_valid[s][w] = 0;
    foreach (r_fifo[s]) r_fifo[s] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 30000; cyc++) begin
      @(negedge clk);
      // main memory
      mem_ack = 0;
      if (mem_req) begin
        if (wait_cnt == 0) begin
          mem_ack = 1;
          if (mem_we) mainmem[int'(mem_addr)] = mem_wdata;
          else mem_rdata = rd_main(int'(mem_addr));
          wait_cnt = $urandom % 4;
        end else wait_cnt--;
      end
      #1;
      // responses
      if (resp_valid) begin
        logic [32:0] e;
        checks++;
        if (expq.size() == 0) begin
          failures++;
          $display("FAIL %0t unexpected response", $time);
        end else begin
          e = expq.pop_front();
          check("load data", resp_rdata, e[31:0]);
          check("load hit flag", 32'(resp_hit), 32'(e[32]));
        end
      end
      // next request
      if (!pending && cyc < 29000 && $urandom % 4 != 0) begin
        int set, tg;
        set = ($urandom % 8 == 0) ? int'($urandom % SETS) : int'($urandom % 6);
        tg = int'($urandom % 4);
        req_valid = 1;
        req_we = ($urandom % 3 == 0);
        req_addr = AW'((tg << 9) | set);
        req_wdata = $urandom;
        pending = 1;
      end else if (!pending) req_valid = 0;
      #1;
      if (req_valid && req_ready) begin
        int a, set, tg, way;
        a = int'(req_addr); set = a % SETS; tg = a / SETS; way = -1;
        for (int w = 0; w < WAYS; w++) if (r_valid[set][w] && r_tag[set][w] == tg) way = w;
        acc++;
        if (way < 0) miss++;
        if (req_we) begin
          golden[a] = req_wdata;
          if (way >= 0) begin hits++; n_store_hit++; end else n_store_miss++;
        end else begin
          expq.push_back({way >= 0, rd_gold(a)});
          if (way >= 0) begin
            hits++; n_load_hit++;
          end else begin
            fills++; n_load_miss++;
            if (r_valid[set][r_fifo[set]]) n_evict++;
            r_valid[set][r_fifo[set]] = 1;
            r_tag[set][r_fifo[set]] = tg;
            r_fifo[set] = (r_fifo[set] + 1) % WAYS;
          end
        end
        pending = 0;
      end
    end
    req_valid = 0;
    repeat (10) @(negedge clk);
    check("all loads answered", 32'(expq.size()), 0);
    check("accesses", accesses, 32'(acc));
    check("misses", misses, 32'(miss));
    check("tag reads", tag_reads, 32'(WAYS * acc));
    check("data-way accesses", data_reads, 32'(hits + fills));
    foreach (golden[a]) check("main memory after write-through", rd_main(a), golden[a]);
    check("load hits seen", 32'(n_load_hit > 0), 1);
    check("load misses seen", 32'(n_load_miss > 0), 1);
    check("store hits seen", 32'(n_store_hit > 0), 1);
    check("store misses seen", 32'(n_store_miss > 0), 1);
    check("evictions seen", 32'(n_evict > 0), 1);
    $display("load hit=%0d miss=%0d store hit=%0d miss=%0d evictions=%0d",
             n_load_hit, n_load_miss, n_store_hit, n_store_miss, n_evict);
    $display("data-way accesses=%0d, a parallel %0d-way cache would read %0d",
             data_reads, WAYS, WAYS * (n_load_hit + n_load_miss) + n_store_hit + n_load_miss);
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
