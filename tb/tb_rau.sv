// tb_rau: register allocation. A stand-in LCQ hands out the lowest free slot.
// A reference model here tracks free register blocks and the allocation
// history and predicts every allocation: L-base, S-base, D-base (the S-base
// of the thread dep_dist allocations back, the main thread's for the first
// one, as in the dependency-distance-3 example), the producer slot, the
// register initialisation and the index written to $L0. It runs the blocks
// out to check that allocation stops, then releases slots and checks that
// their blocks are reused.
`timescale 1ns/1ps
module tb_rau;
  import mt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic th_valid, th_ready, lcq_ready, new_valid, new_prod_valid, rel_valid;
  logic linit_valid, ginit_valid, idle;
  logic [9:0] th_pc, new_pc;
  logic [15:0] th_index; logic [7:0] th_dep; logic [3:0] th_nl, th_ng;
  logic [4:0] lcq_slot, new_prod_slot, rel_slot;
  logic [6:0] new_lbase, new_sbase, new_dbase, linit_base, ginit_base;
  logic [31:0] linit_index;
  int checks = 0, failures = 0;

  rau dut (.*);

  task automatic check(string w, longint g, longint e);
    checks++; if (g != e) begin failures++; $display("FAIL %s: %0d vs %0d", w, g, e); end
  endtask

  // stand-in LCQ
  bit slot_used [32];
  always_comb begin
    lcq_ready = 0; lcq_slot = 0;
    for (int i = 31; i >= 0; i--) if (!slot_used[i]) begin lcq_ready = 1; lcq_slot = 5'(i); end
  end

  // reference model
  bit lfree [32], sfree [30];
  int hist_s[$], hist_slot[$]; bit hist_prod[$];
  int slot_l [32], slot_s [32];
  function automatic int first(bit f [], int n);
    for (int i = 0; i < n; i++) if (f[i]) return i;
    return -1;
  endfunction

  int allocated;
  always @(posedge clk) if (rst_n && new_valid) begin
    int lb, sb, eb, ps; bit pv;
    int lfirst = -1, sfirst = -1;
    for (int i = 31; i >= 0; i--) if (lfree[i]) lfirst = i;
    for (int i = 29; i >= 0; i--) if (sfree[i]) sfirst = i;
    lb = (th_nl != 0) ? lfirst * 4 : 0;
    sb = (th_ng != 0) ? 8 + sfirst * 4 : 8;
    if (th_dep != 0 && th_dep <= hist_s.size()) begin
      eb = hist_s[hist_s.size() - th_dep];
      pv = hist_prod[hist_s.size() - th_dep];
      ps = hist_slot[hist_s.size() - th_dep];
    end else begin eb = 8; pv = 0; ps = 0; end
    check("lbase", new_lbase, lb);
    check("sbase", new_sbase, sb);
    check("dbase", new_dbase, eb);
    check("producer valid", new_prod_valid, pv);
    if (pv) check("producer slot", new_prod_slot, ps);
    check("linit", linit_valid, th_nl != 0);
    check("ginit", ginit_valid, th_ng != 0);
    if (th_nl != 0) check("L0 index", linit_index, th_index);
    check("pc", new_pc, th_pc);
    if (th_nl != 0) lfree[lfirst] = 0;
    if (th_ng != 0) sfree[sfirst] = 0;
    slot_l[lcq_slot] = (th_nl != 0) ? lfirst : -1;
    slot_s[lcq_slot] = (th_ng != 0) ? sfirst : -1;
    hist_s.push_back(sb); hist_slot.push_back(lcq_slot); hist_prod.push_back(th_ng != 0);
    slot_used[lcq_slot] = 1;
    allocated++;
  end

  task automatic thread(int idx, int dep, int nl, int ng);
    @(negedge clk);
    th_valid = 1; th_pc = 10'(idx + 100); th_index = 16'(idx); th_dep = 8'(dep);
    th_nl = 4'(nl); th_ng = 4'(ng);
    @(posedge clk); while (!th_ready) @(posedge clk);
    @(negedge clk); th_valid = 0;
  endtask

  task automatic release_slot(int s);
    @(negedge clk); rel_valid = 1; rel_slot = 5'(s);
    @(negedge clk); rel_valid = 0;
    if (slot_l[s] >= 0) lfree[slot_l[s]] = 1;
    if (slot_s[s] >= 0) sfree[slot_s[s]] = 1;
    slot_used[s] = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  initial begin
    th_valid = 0; th_pc = 0; th_index = 0; th_dep = 0; th_nl = 0; th_ng = 0;
    rel_valid = 0; rel_slot = 0; allocated = 0;
    for (int i = 0; i < 32; i++) begin slot_used[i] = (i == 0); lfree[i] = (i != 0); end
    for (int i = 0; i < 30; i++) sfree[i] = (i != 0);
    hist_s.push_back(8); hist_slot.push_back(0); hist_prod.push_back(0);   // main thread
    repeat (2) @(posedge clk); rst_n = 1;
    // a dependent family (distance 1), then one with distance 3
    for (int i = 1; i <= 5; i++) thread(i, 1, 2, 2);
    for (int i = 1; i <= 6; i++) thread(i, 3, 1, 1);
    thread(1, 1, 0, 0);                      // sync-like thread, no registers
    thread(2, 1, 1, 1);                      // depends on a thread without shared registers
    // run out of shared blocks: 30 blocks, main holds one
    fork
      begin for (int i = 0; i < 40; i++) thread(i, 1, 1, 1); end
      begin
        repeat (100) @(posedge clk);
        check("allocation held when blocks are out", th_ready, 0);
        check("threads allocated before holding", allocated, 13 + 17);
        for (int s = 1; s <= 31; s++) release_slot(s);
      end
    join
    check("all allocated", allocated, 13 + 40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
