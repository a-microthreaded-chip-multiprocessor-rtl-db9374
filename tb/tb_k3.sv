// tb_k3: the inner-product loop q += z[k]*x[k], k = 0..N-1, run as one
// microthread per k on the full-size processor with a slow main memory
// (1000 cycles, the worst latency the architecture is meant to tolerate).
//
// Each thread loads x[k] and z[k] (h-tagged, they may miss), multiplies them
// (v: waits for both loads) and adds the product to the running sum it gets
// from the previous thread in $D0, publishing the new sum in its own $S0 and
// ending (k). The main thread supplies q = 0 in its $S0 for the first thread;
// a one-thread sync family reads the last sum through $D0 into $G1, which the
// main thread waits on. The registers in use (one local and one shared block
// per thread) are the default 128 + 128: the run is register-limited, and
// threads must be released and reused many times over.
//
// Checked: q against a sum computed here, every thread released, only the
// main thread left, no stores issued. Printed: cycles and IPC.
`timescale 1ns/1ps
module tb_k3;
  import mt_pkg::*;

  localparam int N    = 200;
  localparam int X    = 'h2000;
  localparam int Z    = 'h3000;
  localparam int VECT = 32, SYNC = 48;

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

  mem_model #(.LAT(1000), .LW(8), .LADDR_W(17)) u_mem (
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

  logic [IW-1:0] prog [1024];
  initial begin
    for (int i = 0; i < 1024; i++) prog[i] = '0;
    prog[0] = i_i(XF_H, OP_ADDI, rg(RC_S,0), rg(RC_G,0), 0);          // q = 0
    prog[1] = i_j(XF_H, OP_CRE, VECT);
    prog[2] = i_j(XF_H, OP_CRE, SYNC);
    prog[3] = i_r(XF_V, FN_ADD, rg(RC_G,1), rg(RC_G,1), rg(RC_G,0));  // wait $G1
    prog[4] = i_r(XF_H, FN_END, 5'd0, 5'd0, 5'd0);
    // {0, N-1, 1; 1; 3,1}
    prog[VECT]   = {2'b00, 16'd0, 16'(N-1)};
    prog[VECT+1] = {2'b00, 16'd1, 8'd1, 4'd3, 4'd1};
    prog[VECT+2] = i_i(XF_H, OP_LW, rg(RC_L,1), rg(RC_L,0), X);       // x[k]
    prog[VECT+3] = i_i(XF_H, OP_LW, rg(RC_L,2), rg(RC_L,0), Z);       // z[k]
    prog[VECT+4] = i_r(XF_V, FN_MUL, rg(RC_L,2), rg(RC_L,2), rg(RC_L,1));
    prog[VECT+5] = i_r(XF_K, FN_ADD, rg(RC_S,0), rg(RC_D,0), rg(RC_L,2));
    // {1,1,1; 1; 0,0}
    prog[SYNC]   = {2'b00, 16'd1, 16'd1};
    prog[SYNC+1] = {2'b00, 16'd1, 8'd1, 4'd0, 4'd0};
    prog[SYNC+2] = i_r(XF_K, FN_ADD, rg(RC_G,1), rg(RC_D,0), rg(RC_G,0));
  end

  int n_cycles, n_issued, n_rel, n_st, n_susp;
  always @(posedge clk) if (rst_n && !halted) begin
    n_cycles++;
    if (issued) n_issued++;
    if (dut.rel_valid) n_rel++;
    if (suspended) n_susp++;
    if (dut.dc_valid && dut.dc_we) n_st++;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int q;
  initial begin
    load_en = 0; load_addr = '0; load_data = '0;
    @(posedge clk);
    for (int i = 0; i < 1024; i++) begin
      load_en <= 1; load_addr <= 10'(i); load_data <= prog[i];
      @(posedge clk);
    end
    load_en <= 0;
    q = 0;
    for (int k = 0; k < N; k++) begin
      u_mem.m[X+k] = 32'((k * 13) % 29 - 14);
      u_mem.m[Z+k] = 32'((k * 7) % 23 - 11);
      q += ((k * 13) % 29 - 14) * ((k * 7) % 23 - 11);
    end
    @(posedge clk);
    rst_n <= 1;
    wait (halted);
    repeat (20) @(posedge clk);
    check("q = sum z[k]*x[k]", int'(dut.u_grf.data[1]), q);
    check("threads released", n_rel, N + 1);
    check("only main thread left", int'(occupied), 1);
    check("no stores", n_st, 0);
    checks++;
    if (n_susp == 0) begin failures++; $display("FAIL no failed synchronisation"); end
    $display("K3 N=%0d: cycles %0d, instructions %0d, IPC %0.3f, suspensions %0d",
             N, n_cycles, n_issued, real'(n_issued) / real'(n_cycles), n_susp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
