// tb_dcache: the L1 D-cache against a stand-in L2 (a word array that answers
// a line read 5 cycles after accepting it and takes writes at once). Checks
// load misses completing through the fill port with their register tag and
// in order, hits afterwards, write-through of stores (hit and miss), the
// no-fill rule for a load overtaken by a store to its line, LRU eviction in
// one set, the queue refusing requests when full, and the cycles from a
// miss to its fill.
`timescale 1ns/1ps
module tb_dcache;
  import mt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req_valid, req_we, req_ready, ld_hit, ld_miss, fl_valid;
  logic [19:0] req_addr, l2_req_addr;
  logic [31:0] req_wdata, ld_data, fl_data, l2_req_wdata;
  logic [7:0] req_dest, fl_dest;
  logic l2_req_valid, l2_req_we, l2_req_ready, l2_resp_valid;
  logic [255:0] l2_resp_line;
  int checks = 0, failures = 0;

  dcache dut (.*);

  // stand-in L2
  logic [31:0] bm [65536];
  int busy_cnt; logic [19:0] raddr;
  assign l2_req_ready = (busy_cnt == 0);
  always @(posedge clk) begin
    l2_resp_valid <= 0;
    if (busy_cnt > 1) busy_cnt <= busy_cnt - 1;
    else if (busy_cnt == 1) begin
      busy_cnt <= 0; l2_resp_valid <= 1;
      for (int k = 0; k < 8; k++) l2_resp_line[k*32 +: 32] <= bm[(int'({raddr[19:3], 3'b0}) + k) % 65536];
    end else if (l2_req_valid) begin
      if (l2_req_we) bm[int'(l2_req_addr) % 65536] <= l2_req_wdata;
      else begin busy_cnt <= 5; raddr <= l2_req_addr; end
    end
  end

  task automatic check(string w, longint g, longint e);
    checks++; if (g != e) begin failures++; $display("FAIL %s: %0h vs %0h", w, g, e); end
  endtask

  // expected fills
  int exp_dest[$]; int exp_data[$]; int fills; int last_fill_t;
  always @(posedge clk) if (rst_n && fl_valid) begin
    fills++; last_fill_t = $time;
    if (exp_dest.size() == 0) begin checks++; failures++; $display("FAIL unexpected fill"); end
    else begin
      check("fill dest", fl_dest, exp_dest.pop_front());
      check("fill data", fl_data, exp_data.pop_front());
    end
  end

  bit was_hit, was_miss; int got;
  int full_seen;
  task automatic access(bit we, int addr, int data, int dest);
    @(negedge clk);
    req_valid = 1; req_we = we; req_addr = 20'(addr); req_wdata = 32'(data); req_dest = 8'(dest);
    #1;
    while (!req_ready) begin full_seen++; @(negedge clk); #1; end
    was_hit = ld_hit; was_miss = ld_miss; got = int'(ld_data);
    @(negedge clk); req_valid = 0;
  endtask
  task automatic load_expect_hit(int addr, int v);
    access(0, addr, 0, 1);
    check($sformatf("hit %0h", addr), was_hit, 1);
    check($sformatf("hit data %0h", addr), got, v);
  endtask
  task automatic load_expect_miss(int addr, int dest, int v);
    access(0, addr, 0, dest);
    check($sformatf("miss %0h", addr), was_miss, 1);
    exp_dest.push_back(dest); exp_data.push_back(v);
  endtask
  task automatic drain();
    while (exp_dest.size() != 0) @(negedge clk);
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  int t0;
  initial begin
    req_valid = 0; req_we = 0; req_addr = 0; req_wdata = 0; req_dest = 0;
    busy_cnt = 0; fills = 0; full_seen = 0;
    for (int i = 0; i < 65536; i++) bm[i] = 32'(i * 3 + 1);
    repeat (2) @(posedge clk); rst_n = 1;
    // miss, latency, then hits in the line
    @(negedge clk); t0 = $time;
    load_expect_miss('h100, 8'h12, 'h100 * 3 + 1);
    drain();
    $display("L1 miss to fill: %0d cycles", (last_fill_t - t0) / 10);
    check("L1 miss to fill: request + 6-cycle stand-in L2 + 1", (last_fill_t - t0) / 10, 8);
    for (int k = 0; k < 8; k++) load_expect_hit('h100 + k, ('h100 + k) * 3 + 1);
    // store hit: write-through and local update
    access(1, 'h103, 'h5555, 0);
    load_expect_hit('h103, 'h5555);
    repeat (3) @(negedge clk);
    check("written through", bm['h103], 'h5555);
    // store miss: no allocation
    access(1, 'h2000, 'h7777, 0);
    load_expect_miss('h2000, 8'h21, 'h7777);
    drain();
    load_expect_hit('h2001, 'h2001 * 3 + 1);
    // load overtaken by a store to its line: register gets the old value,
    // the stale line is not kept
    load_expect_miss('h3000, 8'h30, 'h3000 * 3 + 1);
    access(1, 'h3001, 'h9999, 0);
    drain();
    load_expect_miss('h3001, 8'h31, 'h9999);
    drain();
    // LRU: five lines in one set (stride = sets * line words = 512)
    for (int j = 0; j < 5; j++) begin load_expect_miss('h8000 + j * 512, j, ('h8000 + j * 512) * 3 + 1); drain(); end
    load_expect_hit('h8000 + 4 * 512, ('h8000 + 4 * 512) * 3 + 1);
    load_expect_hit('h8000 + 1 * 512, ('h8000 + 1 * 512) * 3 + 1);
    load_expect_miss('h8000, 9, 'h8000 * 3 + 1);          // least recently used, evicted
    drain();
    // a burst of misses fills the queue
    for (int j = 0; j < 12; j++) load_expect_miss('hc000 + j * 8, 40 + j, ('hc000 + j * 8) * 3 + 1);
    drain();
    check("queue became full", full_seen > 0, 1);
    check("every miss filled", exp_dest.size(), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
