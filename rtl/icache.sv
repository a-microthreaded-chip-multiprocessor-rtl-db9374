// icache: instruction store with the per-thread pre-fetch handshake.
//
// The LCQ asks for a thread's code with req(slot, pc) whenever a thread is
// created or woken; the cache answers with ack(slot) once the code is present,
// and the LCQ then makes the thread ready. The architecture is evaluated with
// an I-cache that always hits, so this block holds the whole program in one
// array and acknowledges every request on the next clock edge. It still keeps,
// per LCQ slot, whether that thread has asked for code and not yet released it
// (pinned): that is the information the architecture gives the cache for line
// replacement, and it is brought out for a larger cache to use.
//
// Ports: a write port loads the program; a combinational read port serves
// instruction fetch and a second one returns the two header words of a thread
// family to the GCQ. Timing: ack is registered, one cycle after req.
// The array size is this design's choice; the architecture gives none.
module icache
  import mt_pkg::*;
#(
  parameter int unsigned WORDS  = 1024,
  parameter int unsigned NSLOT  = 32,
  localparam int unsigned AW    = $clog2(WORDS),
  localparam int unsigned SW    = $clog2(NSLOT)
) (
  input  logic          clk,
  input  logic          rst_n,
  // program load
  input  logic          load_en,
  input  logic [AW-1:0] load_addr,
  input  logic [IW-1:0] load_data,
  // instruction fetch
  input  logic [AW-1:0] if_addr,
  output logic [IW-1:0] if_instr,
  // header fetch for the GCQ
  input  logic [AW-1:0] hdr_addr,
  output logic [IW-1:0] hdr_w0,
  output logic [IW-1:0] hdr_w1,
  // pre-fetch handshake with the LCQ
  input  logic          req_valid,
  input  logic [SW-1:0] req_slot,
  input  logic [AW-1:0] req_pc,
  output logic          ack_valid,
  output logic [SW-1:0] ack_slot,
  input  logic          rel_valid,
  input  logic [SW-1:0] rel_slot,
  output logic [NSLOT-1:0] pinned
);

  logic [IW-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (load_en) mem[load_addr] <= load_data;
  end

  assign if_instr = mem[if_addr];
  assign hdr_w0   = mem[hdr_addr];
  assign hdr_w1   = mem[AW'(hdr_addr + 1'b1)];

  // every pc lies in the resident array, so the request is satisfied at once
  logic pc_ok;
  assign pc_ok = (32'(req_pc) < WORDS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack_valid <= 1'b0;
      ack_slot  <= '0;
      pinned    <= '0;
    end else begin
      ack_valid <= req_valid && pc_ok;
      ack_slot  <= req_slot;
      if (rel_valid) pinned[rel_slot] <= 1'b0;
      if (req_valid) pinned[req_slot] <= 1'b1;
    end
  end

endmodule
