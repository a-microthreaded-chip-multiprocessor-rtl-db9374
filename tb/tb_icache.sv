// tb_icache: program load and read-back on the fetch and header ports, the
// pre-fetch acknowledge one cycle after each request, and the per-slot
// pinned flags set by requests and cleared by releases.
`timescale 1ns/1ps
module tb_icache;
  import mt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic load_en; logic [9:0] load_addr, if_addr, hdr_addr, req_pc;
  logic [IW-1:0] load_data, if_instr, hdr_w0, hdr_w1;
  logic req_valid, ack_valid, rel_valid;
  logic [4:0] req_slot, ack_slot, rel_slot;
  logic [31:0] pinned;
  int checks = 0, failures = 0;
  icache dut (.*);

  task automatic check(string w, longint g, longint e);
    checks++; if (g != e) begin failures++; $display("FAIL %s: %h vs %h", w, g, e); end
  endtask
  function automatic logic [IW-1:0] word(int i);
    return {2'(i % 3), 32'(i * 32'h9e37_79b9)};
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  initial begin
    load_en = 0; load_addr = 0; load_data = 0; if_addr = 0; hdr_addr = 0;
    req_valid = 0; req_slot = 0; req_pc = 0; rel_valid = 0; rel_slot = 0;
    repeat (2) @(posedge clk); rst_n <= 1;
    for (int i = 0; i < 1024; i++) begin
      load_en <= 1; load_addr <= 10'(i); load_data <= word(i); @(posedge clk);
    end
    load_en <= 0; @(posedge clk);
    for (int k = 0; k < 50; k++) begin
      int i = $urandom_range(0, 1022);
      if_addr = 10'(i); hdr_addr = 10'(i); #1;
      check("fetch", if_instr, word(i));
      check("hdr0", hdr_w0, word(i));
      check("hdr1", hdr_w1, word(i + 1));
    end
    check("no pins", pinned, 0);
    // request/ack latency
    for (int s = 0; s < 8; s++) begin
      @(negedge clk); req_valid = 1; req_slot = 5'(s * 3); req_pc = 10'(s * 7);
      @(negedge clk); req_valid = 0;
      check("ack next cycle", ack_valid, 1);
      check("ack slot", ack_slot, s * 3);
      @(negedge clk);
      check("single ack", ack_valid, 0);
    end
    check("pinned", pinned, 32'h0024_9249);
    @(negedge clk); rel_valid = 1; rel_slot = 5'd9;
    @(negedge clk); rel_valid = 0;
    check("released", pinned, 32'h0024_9049);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
