// tb_lcq: the thread state table and its handshakes. A stand-in I-cache
// acknowledges each request one cycle later. Walks threads through
// new -> I-cache request/ack -> ready -> running -> context switch ->
// wake (plain, with decrement, branch taken and not taken) and checks the
// pc and bases each time the thread is offered to fetch, the cycles from a
// wake to ready, kills, the release order imposed by a dependent thread,
// release of a thread without shared registers, release once creation is
// idle, and killall.
`timescale 1ns/1ps
module tb_lcq;
  import mt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic new_valid, new_has_s, new_prod_valid, new_ready, rel_valid, create_idle;
  logic [9:0] new_pc, ic_req_pc, ts_pc, ctx_pc, br_target;
  logic [6:0] new_lbase, new_sbase, new_dbase, ts_lbase, ts_sbase, ts_dbase;
  logic [4:0] new_prod_slot, new_slot, rel_slot, ic_req_slot, ic_ack_slot, ic_rel_slot;
  logic [4:0] ts_slot, ctx_slot, br_slot;
  logic ic_req_valid, ic_ack_valid, ic_rel_valid, ts_valid, ts_take, ctx_valid, ctx_yield;
  logic [2:0] wk_valid, wk_decr, wk_kill;
  logic [2:0][4:0] wk_slot;
  logic br_valid, br_taken, killall, only_main;
  logic [31:0] occupied;
  int checks = 0, failures = 0;

  lcq #(.NWAKE(3)) dut (.*);

  // stand-in I-cache
  always_ff @(posedge clk) begin
    ic_ack_valid <= ic_req_valid;
    ic_ack_slot  <= ic_req_slot;
  end

  int released[$];
  always @(posedge clk) if (rst_n && rel_valid) released.push_back(rel_slot);

  task automatic check(string w, longint g, longint e);
    checks++; if (g != e) begin failures++; $display("FAIL %s: %0d vs %0d", w, g, e); end
  endtask

  task automatic quiet();
    new_valid = 0; ts_take = 0; ctx_valid = 0; ctx_yield = 0; wk_valid = 0; wk_decr = 0;
    wk_kill = 0; br_valid = 0; killall = 0; new_prod_valid = 0;
  endtask

  task automatic add(int pc, int lb, int sb, int db, bit has_s, bit pv, int ps, output int slot);
    @(negedge clk); quiet();
    new_valid = 1; new_pc = 10'(pc); new_lbase = 7'(lb); new_sbase = 7'(sb); new_dbase = 7'(db);
    new_has_s = has_s; new_prod_valid = pv; new_prod_slot = 5'(ps);
    #1 slot = new_slot;
    @(negedge clk); quiet();
  endtask

  // wait until slot s is offered to fetch (at most n cycles), return cycles
  task automatic wait_ready(int s, output int cyc);
    cyc = 0;
    while (!(ts_valid && ts_slot == 5'(s)) && cyc < 50) begin @(negedge clk); cyc++; end
  endtask

  task automatic take(int s);
    @(negedge clk); quiet(); #1;
    check("offered slot", ts_slot, s);
    ts_take = 1;
    @(negedge clk); quiet();
  endtask

  task automatic ctx(int s, int pc);
    @(negedge clk); quiet(); ctx_valid = 1; ctx_slot = 5'(s); ctx_pc = 10'(pc); #1;
    check("I-cache release", ic_rel_valid && ic_rel_slot == 5'(s), 1);
    @(negedge clk); quiet();
  endtask

  task automatic wake(int s, bit decr, bit kill);
    @(negedge clk); quiet(); wk_valid[1] = 1; wk_slot[1] = 5'(s); wk_decr[1] = decr; wk_kill[1] = kill;
    @(negedge clk); quiet();
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  int s1, s2, s3, s4, cyc;
  initial begin
    quiet(); create_idle = 0; new_pc = 0; new_lbase = 0; new_sbase = 0; new_dbase = 0;
    new_has_s = 0; new_prod_slot = 0; ctx_slot = 0; ctx_pc = 0; br_slot = 0; br_taken = 0;
    br_target = 0; wk_slot = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    check("main offered", ts_valid && ts_slot == 0, 1);
    check("main pc", ts_pc, 0);
    check("only main", only_main, 1);
    take(0);
    // a new thread: waiting until the I-cache acknowledges
    add(100, 4, 12, 8, 1, 0, 0, s1);
    check("first free slot", s1, 1);
    wait_ready(s1, cyc);
    check("ready within two cycles of creation", cyc <= 2, 1);
    check("pc", ts_pc, 100); check("lbase", ts_lbase, 4); check("sbase", ts_sbase, 12); check("dbase", ts_dbase, 8);
    // main switches out on a vertical instruction, thread 1 runs
    ctx(0, 5);
    take(s1);
    check("not only main", only_main, 0);
    // main woken from register read
    wake(0, 0, 0);
    wait_ready(0, cyc);
    check("ready within two cycles of the wake", cyc <= 2, 1);
    check("main pc after wake", ts_pc, 5);
    take(0);
    // thread 1 suspends, woken with decrement: reissues its instruction
    ctx(s1, 101);
    wake(s1, 1, 0);
    wait_ready(s1, cyc);
    check("decremented pc", ts_pc, 100);
    // main: branch taken, then not taken
    ctx(0, 6);
    @(negedge clk); quiet(); br_valid = 1; br_slot = 0; br_taken = 1; br_target = 10'd40;
    @(negedge clk); quiet();
    wait_ready(0, cyc); check("branch target", ts_pc, 40);
    take(0);
    ctx(0, 41);
    @(negedge clk); quiet(); br_valid = 1; br_slot = 0; br_taken = 0; br_target = 10'd7;
    @(negedge clk); quiet();
    wait_ready(0, cyc); check("branch fall through", ts_pc, 41);
    take(0);
    // producer s2 (shared regs) and its dependent s3
    add(200, 8, 16, 12, 1, 0, 0, s2);
    add(300, 12, 20, 16, 0, 1, s2, s3);
    repeat (3) @(negedge clk);
    take(s1); ctx(s1, 102); wake(s1, 0, 1);           // thread 1 killed, no dependent yet
    repeat (3) @(negedge clk);
    check("killed thread with shared regs kept", released.size(), 0);
    take(s2); ctx(s2, 201); wake(s2, 0, 1);           // producer killed first
    repeat (3) @(negedge clk);
    check("producer kept while dependent lives", released.size(), 0);
    take(s3); ctx(s3, 301); wake(s3, 0, 1);           // dependent killed
    repeat (3) @(negedge clk);
    check("two released", released.size(), 2);
    if (released.size() == 2) begin
      check("dependent and producer released",
            (released[0] == s2 && released[1] == s3) || (released[0] == s3 && released[1] == s2), 1);
    end
    // creation idle: thread 1 (shared regs, no dependent) goes
    create_idle = 1;
    repeat (2) @(negedge clk);
    check("released when creation idle", released.size(), 3);
    // killall
    add(400, 0, 0, 0, 1, 0, 0, s1);
    add(500, 0, 0, 0, 1, 0, 0, s2);
    add(600, 0, 0, 0, 0, 0, 0, s3);
    add(700, 0, 0, 0, 1, 0, 0, s4);
    repeat (4) @(negedge clk);
    @(negedge clk); quiet(); killall = 1;
    @(negedge clk); quiet();
    repeat (6) @(negedge clk);
    check("killall releases all", released.size(), 7);
    check("only main after killall", only_main, 1);
    check("occupied", occupied, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
