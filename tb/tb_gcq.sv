// tb_gcq: families pushed by create requests are expanded into thread
// instances. The header words come from a small table here. Checks every
// instance (index, code pointer, dependency distance, register counts),
// that the order follows the create order, that a family of n threads
// takes n cycles plus one header cycle when the RAU never holds it back,
// that back-pressure loses nothing, that an empty iteration issues nothing
// and that a full queue refuses creates.
`timescale 1ns/1ps
module tb_gcq;
  import mt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cre_valid, cre_ready, th_valid, th_ready, idle;
  logic [9:0] cre_ptr, hdr_addr, th_pc;
  logic [IW-1:0] hdr_w0, hdr_w1;
  logic [15:0] th_index; logic [7:0] th_dep; logic [3:0] th_nl, th_ng;
  int checks = 0, failures = 0;

  gcq dut (.*);

  logic [IW-1:0] hmem [1024];
  assign hdr_w0 = hmem[hdr_addr];
  assign hdr_w1 = hmem[10'(hdr_addr + 1)];

  task automatic check(string w, longint g, longint e);
    checks++; if (g != e) begin failures++; $display("FAIL %s: %0d vs %0d", w, g, e); end
  endtask

  // expected stream
  int exp_idx[$], exp_pc[$], exp_dep[$], exp_nl[$];
  task automatic family(int ptr, int start, int limit, int step, int dep, int nl, int ng);
    hmem[ptr]   = {2'b0, 16'(start), 16'(limit)};
    hmem[ptr+1] = {2'b0, 16'(step), 8'(dep), 4'(nl), 4'(ng)};
    for (int i = start; i <= limit; i += step) begin
      exp_idx.push_back(i); exp_pc.push_back(ptr + 2); exp_dep.push_back(dep); exp_nl.push_back(nl);
    end
  endtask

  bit random_ready;
  int issued;
  always @(posedge clk) if (rst_n && th_valid && th_ready) begin
    issued++;
    if (exp_idx.size() == 0) begin failures++; checks++; $display("FAIL extra thread"); end
    else begin
      check("index", th_index, exp_idx.pop_front());
      check("pc", th_pc, exp_pc.pop_front());
      check("dep", th_dep, exp_dep.pop_front());
      check("nl", th_nl, exp_nl.pop_front());
    end
  end
  always @(negedge clk) th_ready = random_ready ? ($urandom_range(0, 2) != 0) : 1'b1;

  task automatic push(int ptr);
    @(negedge clk); cre_valid = 1; cre_ptr = 10'(ptr);
    @(negedge clk); cre_valid = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  int t0;
  initial begin
    cre_valid = 0; cre_ptr = 0; random_ready = 0; issued = 0;
    for (int i = 0; i < 1024; i++) hmem[i] = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    check("idle after reset", idle, 1);
    // rate: 10 threads in 11 cycles
    family(100, 1, 10, 1, 1, 2, 2);
    push(100);
    t0 = $time;
    wait (idle); @(posedge clk);
    check("all issued", issued, 10);
    check("cycles for 10 threads", ($time - t0) / 10, 11);
    // several families, stride and back-pressure
    random_ready = 1;
    family(200, 3, 30, 4, 0, 3, 1);
    family(300, 5, 4, 1, 0, 1, 1);      // empty iteration
    family(400, 0, 0, 1, 2, 0, 0);
    push(200); push(300); push(400);
    wait (idle); repeat (3) @(posedge clk);
    check("stream complete", exp_idx.size(), 0);
    // a full queue refuses creates
    th_ready = 0; random_ready = 0;
    force th_ready = 0;
    for (int i = 0; i < 8; i++) begin family(500, 1, 1, 1, 0, 1, 0); push(500); end
    #1 check("full queue", cre_ready, 0);
    release th_ready;
    wait (idle); repeat (3) @(posedge clk);
    check("drained", exp_idx.size(), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
