// tb_l2cache: the L2 against the behavioural main memory (20-cycle latency),
// built small (512 bytes: 4 sets of 4 ways) so that evictions happen. A
// reference word array here follows every write. Checks the line returned
// by every read, the 5-cycle hit time, the miss time (hit time plus memory
// latency plus the request cycles), allocation on a write miss, copy-back of
// dirty lines on eviction (memory holds the written words afterwards, not
// before), and LRU victim choice.
`timescale 1ns/1ps
module tb_l2cache;
  import mt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req_valid, req_we, req_ready, resp_valid, busy, miss;
  logic [19:0] req_addr; logic [31:0] req_wdata; logic [255:0] resp_line;
  logic mem_req_valid, mem_req_we, mem_req_ready, mem_resp_valid;
  logic [16:0] mem_req_addr; logic [255:0] mem_req_wline, mem_resp_line;
  int checks = 0, failures = 0;

  l2cache #(.SIZE_BYTES(512)) dut (.*);
  mem_model #(.LAT(20)) u_mem (.clk, .rst_n, .req_valid(mem_req_valid), .req_we(mem_req_we),
    .req_addr(mem_req_addr), .req_wline(mem_req_wline), .req_ready(mem_req_ready),
    .resp_valid(mem_resp_valid), .resp_line(mem_resp_line));

  int ref_m [65536];

  task automatic check(string w, longint g, longint e);
    checks++; if (g != e) begin failures++; $display("FAIL %s: %0h vs %0h", w, g, e); end
  endtask

  int lat; bit was_miss;
  task automatic read(int addr);
    int t0;
    @(negedge clk); while (!req_ready) @(negedge clk);
    req_valid = 1; req_we = 0; req_addr = 20'(addr);
    @(posedge clk); t0 = $time; was_miss = 0;
    @(negedge clk); req_valid = 0;
    while (!resp_valid) begin @(negedge clk); if (miss) was_miss = 1; end
    lat = ($time - t0 + 5) / 10;
    for (int k = 0; k < 8; k++)
      check($sformatf("line %0h word %0d", addr, k), resp_line[k*32 +: 32], ref_m[((addr & ~7) + k) % 65536]);
  endtask
  task automatic write(int addr, int v);
    @(negedge clk); while (!req_ready) @(negedge clk);
    req_valid = 1; req_we = 1; req_addr = 20'(addr); req_wdata = 32'(v);
    @(negedge clk); req_valid = 0;
    ref_m[addr % 65536] = v;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  initial begin
    req_valid = 0; req_we = 0; req_addr = 0; req_wdata = 0;
    for (int i = 0; i < 65536; i++) ref_m[i] = 32'h1000 + i;
    repeat (2) @(posedge clk); rst_n = 1;
    read('h40);
    check("first read misses", was_miss, 1);
    $display("miss: %0d cycles", lat);
    check("miss time = 5 + 20 + 2 request cycles", lat, 27);
    read('h43);
    check("hit time", lat, 5);
    check("hit", was_miss, 0);
    // write hit makes the line dirty; memory not yet written
    write('h41, 'hAAAA);
    read('h40);
    check("memory not written yet (copy-back)", u_mem.m['h41], 'h1041);
    // write miss allocates
    write('h45 + 32, 'hBBBB);
    read('h45 + 32);
    check("write-allocated line hit", was_miss, 0);
    // set of 'h40: line addresses 8, 8+4, 8+8 ... (4 sets): fill the set
    for (int j = 1; j <= 4; j++) read('h40 + j * 32);
    // 'h40 was least recently used and dirty: written back
    repeat (3) @(negedge clk);
    check("dirty line copied back", u_mem.m['h41], 'hAAAA);
    read('h40);
    check("evicted line misses", was_miss, 1);
    check("data after round trip", resp_line[32 +: 32], 'hAAAA);
    // a line touched recently survives
    read('h40 + 4 * 32);
    check("recent line hits", was_miss, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
