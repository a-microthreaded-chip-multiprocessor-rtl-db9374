// tb_sync_regfile: register states full/empty/waiting. Checks the reset
// state, block initialisation (first register set to an index), suspension
// of a thread on an empty register and its wake when writeback or the fill
// port writes it, load-destination emptying (full registers only), and the
// hard-wired zero register. A reference array of states and values is kept
// here.
`timescale 1ns/1ps
module tb_sync_regfile;
  import mt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [6:0] ra_addr, rb_addr, rr_addr, wb_addr, fl_addr, init_base;
  rstate_t ra_state, rb_state;
  logic [31:0] ra_data, rb_data, wb_data, fl_data, init_value;
  logic rr_wait, rr_empty, wb_valid, fl_valid, init_valid, init_first;
  logic [0:0] rr_proc, wb_wake_proc, fl_wake_proc;
  logic [4:0] rr_slot, wb_wake_slot, fl_wake_slot;
  logic wb_wake, fl_wake;
  int checks = 0, failures = 0;

  sync_regfile #(.HARD_ZERO(1'b1)) dut (.*);

  rstate_t     ms [128];
  logic [31:0] mv [128];

  task automatic check(string w, longint g, longint e);
    checks++; if (g != e) begin failures++; $display("FAIL %s: %0h vs %0h", w, g, e); end
  endtask

  task automatic idle();
    rr_wait = 0; rr_empty = 0; wb_valid = 0; fl_valid = 0; init_valid = 0;
  endtask

  task automatic compare_all();
    for (int i = 0; i < 128; i++) begin
      ra_addr = 7'(i); rb_addr = 7'(127 - i); #1;
      check($sformatf("state %0d", i), ra_state, ms[i]);
      if (ms[i] != RS_EMPTY) check($sformatf("data %0d", i), ra_data, mv[i]);
      check($sformatf("b state %0d", 127-i), rb_state, ms[127-i]);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  initial begin
    idle(); ra_addr = 0; rb_addr = 0; rr_addr = 0; wb_addr = 0; fl_addr = 0; init_base = 0;
    wb_data = 0; fl_data = 0; init_value = 0; init_first = 0; rr_proc = 0; rr_slot = 0;
    for (int i = 0; i < 128; i++) begin ms[i] = (i == 0) ? RS_FULL : RS_EMPTY; mv[i] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); compare_all();
    // write a few registers
    for (int i = 1; i < 128; i += 5) begin
      @(negedge clk); idle(); wb_valid = 1; wb_addr = 7'(i); wb_data = 32'(i * 11);
      #1 check("no wake on empty", wb_wake, 0);
      ms[i] = RS_FULL; mv[i] = 32'(i * 11);
    end
    // $G0 ignores writes
    @(negedge clk); idle(); wb_valid = 1; wb_addr = 0; wb_data = 32'h55;
    // block init with first register = index
    @(negedge clk); idle(); init_valid = 1; init_base = 7'd16; init_first = 1; init_value = 32'd77;
    ms[16] = RS_FULL; mv[16] = 77; for (int i = 17; i < 20; i++) ms[i] = RS_EMPTY;
    @(negedge clk); idle(); init_valid = 1; init_base = 7'd40; init_first = 0;
    for (int i = 40; i < 44; i++) ms[i] = RS_EMPTY;
    @(negedge clk); idle(); compare_all();
    // suspend slot 13 on register 50 (empty) and wake it with a writeback
    @(negedge clk); idle(); rr_wait = 1; rr_addr = 7'd50; rr_slot = 5'd13; rr_proc = 1'b1;
    @(negedge clk); idle(); ra_addr = 7'd50; #1 check("waiting", ra_state, RS_WAIT);
    wb_valid = 1; wb_addr = 7'd50; wb_data = 32'd999; #1;
    check("wb wake", wb_wake, 1); check("wb wake slot", wb_wake_slot, 13); check("wb wake proc", wb_wake_proc, 1);
    ms[50] = RS_FULL; mv[50] = 999;
    // suspend slot 7 on register 60, wake through the fill port
    @(negedge clk); idle(); rr_wait = 1; rr_addr = 7'd60; rr_slot = 5'd7; rr_proc = 1'b0;
    @(negedge clk); idle(); fl_valid = 1; fl_addr = 7'd60; fl_data = 32'd4242; #1;
    check("fill wake", fl_wake, 1); check("fill wake slot", fl_wake_slot, 7);
    ms[60] = RS_FULL; mv[60] = 4242;
    // load destination: full -> empty, waiting stays waiting
    @(negedge clk); idle(); rr_empty = 1; rr_addr = 7'd50; ms[50] = RS_EMPTY;
    @(negedge clk); idle(); rr_wait = 1; rr_addr = 7'd70; rr_slot = 5'd3;
    @(negedge clk); idle(); rr_empty = 1; rr_addr = 7'd70; ms[70] = RS_WAIT; mv[70] = 3;
    @(negedge clk); idle(); rr_empty = 1; rr_addr = 7'd0;    // $G0 stays full
    @(negedge clk); idle(); compare_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
