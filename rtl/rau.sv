// rau: register allocation unit.
//
// Takes thread instances from the GCQ and, when the processor has an LCQ slot
// free and enough registers, allocates them and passes the new thread to the
// LCQ with its code pointer and three register bases:
//   L-base  a block of the local register file, if the thread uses locals;
//           the block is initialised to empty except $L0, which is set to
//           the thread's index;
//   S-base  a block of the shared part of the global register file, set empty;
//   D-base  not allocated: it is the S-base of the thread allocated
//           dep_dist allocations earlier (threads are allocated strictly in
//           create/index order), looked up in a short allocation history.
// The producer's LCQ slot is sent with the new thread so the LCQ can note the
// dependent slot. When the LCQ releases a slot, its blocks are freed.
//
// This design's choices (the architecture gives the function only): registers are
// handed out in fixed blocks of BLK registers, so a thread may use up to BLK
// locals and BLK shared registers; the main thread owns local block 0 and the
// first shared block from reset and is the first entry of the history, so
// the first thread of a family with dep_dist 1 reads the main thread's $S
// registers through its $D registers; a thread with no shared registers is
// recorded in the history with the main thread's S-base.
// Timing: one allocation per cycle, combinational handshake with the GCQ.
// new_pc and linit_index are the GCQ's pc and index passed on in the
// allocation cycle; linit_index is zero above bit 15 (16-bit indices).
module rau
  import mt_pkg::*;
#(
  parameter int unsigned LREGS  = 128,
  parameter int unsigned GREGS  = 128,
  parameter int unsigned NGFIX  = 8,
  parameter int unsigned BLK    = 4,
  parameter int unsigned NSLOT  = 32,
  parameter int unsigned HIST   = 16,
  parameter int unsigned AW     = 10,
  localparam int unsigned SW    = $clog2(NSLOT),
  localparam int unsigned LAW   = $clog2(LREGS),
  localparam int unsigned GAW   = $clog2(GREGS)
) (
  input  logic           clk,
  input  logic           rst_n,
  // from the GCQ
  input  logic           th_valid,
  input  logic [AW-1:0]  th_pc,
  input  logic [15:0]    th_index,
  input  logic [7:0]     th_dep,
  input  logic [3:0]     th_nl,
  input  logic [3:0]     th_ng,
  output logic           th_ready,
  // new thread to the LCQ
  input  logic           lcq_ready,
  input  logic [SW-1:0]  lcq_slot,
  output logic           new_valid,
  output logic [AW-1:0]  new_pc,
  output logic [LAW-1:0] new_lbase,
  output logic [GAW-1:0] new_sbase,
  output logic [GAW-1:0] new_dbase,
  output logic           new_prod_valid,
  output logic [SW-1:0]  new_prod_slot,
  // slot release from the LCQ
  input  logic           rel_valid,
  input  logic [SW-1:0]  rel_slot,
  // register initialisation
  output logic           linit_valid,
  output logic [LAW-1:0] linit_base,
  output logic [XLEN-1:0] linit_index,
  output logic           ginit_valid,
  output logic [GAW-1:0] ginit_base,
  output logic           idle
);

  localparam int unsigned NLB = LREGS / BLK;
  localparam int unsigned NSB = (GREGS - NGFIX) / BLK;
  localparam int unsigned LBW = $clog2(NLB);
  localparam int unsigned SBW = $clog2(NSB);
  localparam int unsigned HW  = $clog2(HIST);

  logic [NLB-1:0] lfree;
  logic [NSB-1:0] sfree;

  // per-slot allocation table
  logic [LBW-1:0] slot_lblk [NSLOT];
  logic [SBW-1:0] slot_sblk [NSLOT];
  logic [NSLOT-1:0] slot_hasl, slot_hass;

  // allocation history, in allocation order
  logic [GAW-1:0] h_sbase [HIST];
  logic [SW-1:0]  h_slot  [HIST];
  logic [HIST-1:0] h_prod;          // entry owns shared registers
  logic [HW-1:0]  h_ptr;            // most recent entry
  logic [HW:0]    h_cnt;            // entries written

  // first free blocks
  logic           lany, sany;
  logic [LBW-1:0] lsel;
  logic [SBW-1:0] ssel;
  always_comb begin
    lany = 1'b0; lsel = '0;
    for (int i = NLB-1; i >= 0; i--) if (lfree[i]) begin lany = 1'b1; lsel = LBW'(i); end
    sany = 1'b0; ssel = '0;
    for (int i = NSB-1; i >= 0; i--) if (sfree[i]) begin sany = 1'b1; ssel = SBW'(i); end
  end

  logic need_l, need_s, fire;
  assign need_l   = (th_nl != 0);
  assign need_s   = (th_ng != 0);
  assign th_ready = lcq_ready && (!need_l || lany) && (!need_s || sany);
  assign fire     = th_valid && th_ready;

  localparam logic [GAW-1:0] MAIN_SBASE = GAW'(NGFIX);

  function automatic logic [GAW-1:0] sblk_base(logic [SBW-1:0] b);
    return GAW'(NGFIX + 32'(b) * BLK);
  endfunction

  // producer lookup
  logic [HW-1:0] pidx;
  logic          pok;
  assign pidx = HW'(h_ptr - HW'(th_dep - 8'd1));
  assign pok  = (th_dep != 0) && (32'(th_dep) <= HIST) && ({1'b0, th_dep} <= 9'(h_cnt));

  assign new_valid      = fire;
  assign new_pc         = th_pc;
  assign new_lbase      = need_l ? LAW'(32'(lsel) * BLK) : '0;
  assign new_sbase      = need_s ? sblk_base(ssel) : MAIN_SBASE;
  assign new_dbase      = pok ? h_sbase[pidx] : MAIN_SBASE;
  assign new_prod_valid = fire && pok && h_prod[pidx];
  assign new_prod_slot  = h_slot[pidx];

  assign linit_valid = fire && need_l;
  assign linit_base  = new_lbase;
  assign linit_index = XLEN'(th_index);
  assign ginit_valid = fire && need_s;
  assign ginit_base  = new_sbase;

  assign idle = !th_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfree     <= {{(NLB-1){1'b1}}, 1'b0};   // block 0: main thread
      sfree     <= {{(NSB-1){1'b1}}, 1'b0};
      slot_hasl <= '0;
      slot_hass <= '0;
      h_ptr     <= '0;
      h_cnt     <= (HW+1)'(1);
      h_prod    <= '0;
      h_sbase[0] <= MAIN_SBASE;
      h_slot[0]  <= '0;
      for (int i = 0; i < NSLOT; i++) begin
        slot_lblk[i] <= '0;
        slot_sblk[i] <= '0;
      end
    end else begin
      if (rel_valid) begin
        if (slot_hasl[rel_slot]) lfree[slot_lblk[rel_slot]] <= 1'b1;
        if (slot_hass[rel_slot]) sfree[slot_sblk[rel_slot]] <= 1'b1;
        slot_hasl[rel_slot] <= 1'b0;
        slot_hass[rel_slot] <= 1'b0;
      end
      if (fire) begin
        if (need_l) lfree[lsel] <= 1'b0;
        if (need_s) sfree[ssel] <= 1'b0;
        slot_hasl[lcq_slot] <= need_l;
        slot_hass[lcq_slot] <= need_s;
        slot_lblk[lcq_slot] <= lsel;
        slot_sblk[lcq_slot] <= ssel;
        h_ptr <= HW'(h_ptr + 1'b1);
        h_sbase[HW'(h_ptr + 1'b1)] <= new_sbase;
        h_slot [HW'(h_ptr + 1'b1)] <= lcq_slot;
        h_prod [HW'(h_ptr + 1'b1)] <= need_s;
        if (h_cnt != (HW+1)'(HIST)) h_cnt <= h_cnt + 1'b1;
      end
    end
  end

endmodule
