// tb_mt_cmp: end-to-end test of the microthreaded processor at its default
// size, with a 100-cycle main memory (the 5/100 configuration).
//
// The program, run by the main thread:
//   1. the relaxation loop a[i] = a[i-1] - 2*a[i] + a[i+1], i = 1..N, as a
//      family of N dependent threads (dependency distance 1) plus a sync
//      thread that signals the main thread through $G1;
//   2. a count-down loop with a vertical conditional branch;
//   3. creq (taken) of a 4-thread independent family storing 3*i to C[i],
//      crne (not taken), then last;
//   4. cre of a family that suspends forever, a delay loop whose count is
//      loaded and used at once by a horizontal instruction (RR holds), killall, last,
//      end.
// The results in memory (through the L2) and in registers are compared
// with a model computed here, and each mechanism of the design is counted:
// a mechanism that never happened is a failure. The IPC of the whole run is
// printed.
`timescale 1ns/1ps
module tb_mt_cmp;
  import mt_pkg::*;

  localparam int N     = 100;
  localparam int A     = 'h100;
  localparam int C     = 'h400;
  localparam int CNT   = 'h500;
  localparam int VECT  = 32, SYNC = 48, K2 = 56, SPIN = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        load_en;
  logic [9:0]  load_addr;
  logic [IW-1:0] load_data;
  logic        mem_req_valid, mem_req_we, mem_req_ready, mem_resp_valid;
  logic [16:0] mem_req_addr;
  logic [255:0] mem_req_wline, mem_resp_line;
  logic halted, quiet, issued, suspended, rr_holding, bypassed, l2_miss;
  logic [31:0] occupied;

  mt_cmp dut (.*);

  mem_model #(.LAT(100), .LW(8), .LADDR_W(17)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_we(mem_req_we), .req_addr(mem_req_addr),
    .req_wline(mem_req_wline), .req_ready(mem_req_ready), .resp_valid(mem_resp_valid),
    .resp_line(mem_resp_line));

  int checks = 0, failures = 0;
  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // -------- program --------
  logic [IW-1:0] prog [1024];
  function automatic logic [IW-1:0] hdr0(int start, int limit);
    return {2'b00, 16'(start), 16'(limit)};
  endfunction
  function automatic logic [IW-1:0] hdr1(int step, int dep, int nl, int ng);
    return {2'b00, 16'(step), 8'(dep), 4'(nl), 4'(ng)};
  endfunction

  initial begin
    for (int i = 0; i < 1024; i++) prog[i] = '0;
    // main thread
    prog[0]  = i_j(XF_H, OP_CRE, VECT);
    prog[1]  = i_j(XF_H, OP_CRE, SYNC);
    prog[2]  = i_i(XF_H, OP_ADDI, rg(RC_S,0), rg(RC_G,0), 0);     // $S0 <- 0
    prog[3]  = i_i(XF_H, OP_LW,   rg(RC_S,1), rg(RC_G,0), A+1);   // $S1 <- a[1]
    prog[4]  = i_r(XF_V, FN_ADD,  rg(RC_G,1), rg(RC_G,1), rg(RC_G,0)); // wait $G1
    prog[5]  = i_i(XF_H, OP_ADDI, rg(RC_G,2), rg(RC_G,0), 3);
    prog[6]  = i_i(XF_H, OP_ADDI, rg(RC_G,2), rg(RC_G,2), -1);
    prog[7]  = i_i(XF_V, OP_BNE,  rg(RC_G,0), rg(RC_G,2), -2);
    prog[8]  = i_i(XF_H, OP_CREQ, rg(RC_G,0), rg(RC_G,0), K2 - 9);
    prog[9]  = i_i(XF_H, OP_CRNE, rg(RC_G,0), rg(RC_G,0), SPIN - 10);
    prog[10] = i_r(XF_H, FN_LAST, 5'd0, 5'd0, 5'd0);
    prog[11] = i_j(XF_H, OP_CRE, SPIN);
    prog[12] = i_i(XF_H, OP_LW,   rg(RC_G,3), rg(RC_G,0), CNT);   // 20, read at once
    prog[13] = i_i(XF_H, OP_ADDI, rg(RC_G,3), rg(RC_G,3), -1);
    prog[14] = i_i(XF_V, OP_BNE,  rg(RC_G,0), rg(RC_G,3), -2);
    prog[15] = i_r(XF_H, FN_KILLALL, 5'd0, 5'd0, 5'd0);
    prog[16] = i_r(XF_H, FN_LAST, 5'd0, 5'd0, 5'd0);
    prog[17] = i_r(XF_H, FN_END, 5'd0, 5'd0, 5'd0);
    // relaxation family {1,N,1; 1; 2,2}
    prog[VECT]   = hdr0(1, N);
    prog[VECT+1] = hdr1(1, 1, 2, 2);
    prog[VECT+2] = i_i(XF_H, OP_LW,   rg(RC_L,1), rg(RC_L,0), A+1);            // a[i+1]
    prog[VECT+3] = i_r(XF_V, FN_ADD,  rg(RC_S,1), rg(RC_L,1), rg(RC_G,0));     // $S1 <- a[i+1]
    prog[VECT+4] = i_i(XF_V, OP_MULI, rg(RC_L,1), rg(RC_D,1), 2);              // 2*a[i]
    prog[VECT+5] = i_r(XF_H, FN_SUB,  rg(RC_L,1), rg(RC_S,1), rg(RC_L,1));
    prog[VECT+6] = i_r(XF_V, FN_ADD,  rg(RC_S,0), rg(RC_L,1), rg(RC_D,0));     // + a[i-1]
    prog[VECT+7] = i_i(XF_K, OP_SW,   rg(RC_S,0), rg(RC_L,0), A);              // a[i] <-
    // sync thread {1,1,1; 1; 0,0}
    prog[SYNC]   = hdr0(1, 1);
    prog[SYNC+1] = hdr1(1, 1, 0, 0);
    prog[SYNC+2] = i_r(XF_K, FN_ADD,  rg(RC_G,1), rg(RC_D,0), rg(RC_G,0));
    // independent family {1,4,1; 0; 2,0}: C[i] <- 3*i
    prog[K2]     = hdr0(1, 4);
    prog[K2+1]   = hdr1(1, 0, 2, 0);
    prog[K2+2]   = i_i(XF_H, OP_MULI, rg(RC_L,1), rg(RC_L,0), 3);
    prog[K2+3]   = i_i(XF_K, OP_SW,   rg(RC_L,1), rg(RC_L,0), C);
    // family that never finishes {1,3,1; 0; 2,0}
    prog[SPIN]   = hdr0(1, 3);
    prog[SPIN+1] = hdr1(1, 0, 2, 0);
    prog[SPIN+2] = i_r(XF_V, FN_ADD,  rg(RC_L,2), rg(RC_L,1), rg(RC_G,0));
    prog[SPIN+3] = i_r(XF_K, FN_ADD,  rg(RC_L,2), rg(RC_L,2), rg(RC_G,0));
  end

  // -------- reading memory through the L2 --------
  function automatic int peek(int addr);
    int ix, tg;
    ix = (addr >> 3) % 2048;
    tg = addr >> 14;
    for (int w = 0; w < 4; w++)
      if (dut.u_l2.vld[ix*4+w] && int'(dut.u_l2.tag[ix*4+w]) == tg)
        return int'(dut.u_l2.dat[(ix*4+w)*8 + (addr % 8)]);
    return int'(u_mem.m[addr % 65536]);
  endfunction

  // -------- mechanism counters --------
  int n_ctx, n_kill, n_susp, n_wake_decr, n_byp, n_br, n_br_taken, n_cre, n_hold,
      n_rau_stall, n_ld_hit, n_ld_miss, n_l2_miss, n_mem_stall, n_rel, n_killall,
      n_last_hold, n_ic_ack, n_issued, n_cycles;
  always @(posedge clk) if (rst_n && !halted) begin
    n_cycles++;
    if (dut.ctx_valid) n_ctx++;
    if (dut.rr_wake && dut.rr_wake_kill) n_kill++;
    if (suspended) n_susp++;
    if (dut.g_wbw || dut.g_flw || dut.l_wbw || dut.l_flw) n_wake_decr++;
    if (bypassed) n_byp++;
    if (dut.br_valid) n_br++;
    if (dut.br_valid && dut.br_taken) n_br_taken++;
    if (dut.cre_valid) n_cre++;
    if (rr_holding) n_hold++;
    if (dut.th_valid && !dut.th_ready) n_rau_stall++;
    if (dut.dc_hit) n_ld_hit++;
    if (dut.dc_miss) n_ld_miss++;
    if (l2_miss) n_l2_miss++;
    if (dut.u_pipe.stall_mem) n_mem_stall++;
    if (dut.rel_valid) n_rel++;
    if (dut.killall) n_killall++;
    if (dut.ctx_yield) n_last_hold++;
    if (dut.ic_ack_valid) n_ic_ack++;
    if (issued) n_issued++;
  end

  task automatic mech(string name, int n);
    checks++;
    $display("  %-28s %0d", name, n);
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", name); end
  endtask

  // optional trace of issue: +trace
  bit trace;
  initial trace = $test$plusargs("trace");
  always @(posedge clk) if (trace && rst_n && !halted)
    $display("%0t IF v%0d s%0d pc%0d | RR v%0d s%0d pc%0d ok%0d hold%0d susp%0d | occ %h gcq_idle %0d th_v %0d th_r %0d",
      $time, dut.u_pipe.if_go, dut.u_pipe.e_slot, dut.u_pipe.e_pc, dut.u_pipe.d_valid,
      dut.u_pipe.d_slot, dut.u_pipe.d_pc, dut.u_pipe.all_ok, rr_holding, suspended,
      occupied, dut.gcq_idle, dut.th_valid, dut.th_ready);

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int a_ref [N+2];
  initial begin
    load_en = 0; load_addr = '0; load_data = '0;
    @(posedge clk);
    for (int i = 0; i < 1024; i++) begin
      load_en <= 1; load_addr <= 10'(i); load_data <= prog[i];
      @(posedge clk);
    end
    load_en <= 0;
    // data: a[0..N+1]
    for (int i = 0; i <= N+1; i++) begin
      u_mem.m[A+i] = 32'((i * 37) % 101 - 50);
      a_ref[i] = (i * 37) % 101 - 50;
    end
    for (int i = 1; i <= 4; i++) u_mem.m[C+i] = 32'hdead;
    u_mem.m[CNT] = 20;
    // sequential model: a[i-1] starts from the 0 the main thread supplies
    begin
      int prev = 0;
      for (int i = 1; i <= N; i++) begin
        a_ref[i] = prev - 2*a_ref[i] + a_ref[i+1];
        prev = a_ref[i];
      end
    end
    @(posedge clk);
    rst_n <= 1;
    wait (halted);
    repeat (20) @(posedge clk);
    wait (quiet);
    repeat (5) @(posedge clk);

    for (int i = 1; i <= N; i++) check($sformatf("a[%0d]", i), peek(A+i), a_ref[i]);
    check("a[N+1] untouched", peek(A+N+1), (((N+1)*37) % 101) - 50);
    for (int i = 1; i <= 4; i++) check($sformatf("C[%0d]", i), peek(C+i), 3*i);
    check("C[5] untouched", peek(C+5), 32'h1000 + C + 5);
    check("$G1 = a[N] via sync thread", int'(dut.u_grf.data[1]), a_ref[N]);
    check("$G2 count-down", int'(dut.u_grf.data[2]), 0);
    check("$G3 delay loop", int'(dut.u_grf.data[3]), 0);
    check("only main thread left", int'(occupied), 1);
    check("families created (vect, sync, creq, spin)", n_cre, 4);
    check("conditional branches resolved", n_br, 3 + 20);
    check("taken branches", n_br_taken, 2 + 19);
    check("killall pulses", n_killall, 1);
    check("threads released", n_rel, N + 1 + 4 + 3);

    $display("mechanisms:");
    mech("context switch (v/k)", n_ctx);
    mech("thread kill", n_kill);
    mech("failed sync (suspend)", n_susp);
    mech("wake with decrement", n_wake_decr);
    mech("bypass", n_byp);
    mech("branch wake", n_br);
    mech("thread creation", n_cre);
    mech("RR hold", n_hold);
    mech("RAU out of resources", n_rau_stall);
    mech("L1 load hit", n_ld_hit);
    mech("L1 load miss", n_ld_miss);
    mech("L2 miss", n_l2_miss);
    mech("L1 queue full stall", n_mem_stall);
    mech("slot release", n_rel);
    mech("killall", n_killall);
    mech("last waiting", n_last_hold);
    mech("I-cache prefetch ack", n_ic_ack);
    $display("cycles %0d, instructions %0d, IPC %0.3f", n_cycles, n_issued,
             real'(n_issued) / real'(n_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
