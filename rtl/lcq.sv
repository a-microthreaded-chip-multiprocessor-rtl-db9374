// lcq: local continuation queue with its thread state table.
//
// One entry (slot) per thread allocated to this processor. Each entry holds,
// as in the architecture's state table: a full/empty flag, the program
// counter, the L-, S- and D-base of the thread's registers, the slot of the
// thread that depends on it, and a two-bit state {waiting, ready, running,
// killed}. Slot 0 holds the main thread from reset (ready, pc 0).
//
// Life of a thread:
//   new     the RAU writes a thread into a free slot (state waiting) and the
//           LCQ asks the I-cache for its code; the I-cache ack makes it ready.
//   switch  the fetch stage takes a ready thread (running). When it meets an
//           instruction tagged vertical or kill, it hands the thread back with
//           the next pc (context): the thread waits and the I-cache is told
//           the slot is released. A yield (the main thread meeting last
//           while other threads live) hands it back already woken.
//   wake    register read returns the slot when the instruction's operands
//           were full (or a register write wakes a suspended thread, with
//           decrement so that the instruction is reissued); the ALU returns it
//           with a branch target. Each wake repeats the I-cache request/ack
//           before the thread is ready again. A wake with kill set ends a
//           thread whose kill-tagged instruction has completed register read.
//   release a killed thread keeps its slot and registers until the thread
//           that depends on it has been killed too (it may still read the
//           killed thread's shared registers); then the slot is emptied and
//           the RAU is sent release(slot).
// This design's choices: a thread with no shared registers is released as
// soon as it is killed; one with shared registers but no dependent yet is
// released once the GCQ and RAU have no more threads to create (create_idle);
// the kill of a kill-tagged instruction is applied after its register read so
// that a failed synchronisation can still reissue it; the lowest-numbered
// ready slot is chosen first; one I-cache request and one release per cycle.
// killall marks every thread but the main one killed and releasable.
// The I-cache release (ic_rel) is the context signal itself, passed on in
// the same cycle.
module lcq
  import mt_pkg::*;
#(
  parameter int unsigned NSLOT = 32,
  parameter int unsigned AW    = 10,
  parameter int unsigned LAW   = 7,
  parameter int unsigned GAW   = 7,
  parameter int unsigned NWAKE = 3,
  parameter int unsigned MAIN_SBASE = 8,
  localparam int unsigned SW   = $clog2(NSLOT)
) (
  input  logic           clk,
  input  logic           rst_n,
  // new thread from the RAU
  input  logic           new_valid,
  input  logic [AW-1:0]  new_pc,
  input  logic [LAW-1:0] new_lbase,
  input  logic [GAW-1:0] new_sbase,
  input  logic [GAW-1:0] new_dbase,
  input  logic           new_has_s,
  input  logic           new_prod_valid,
  input  logic [SW-1:0]  new_prod_slot,
  output logic           new_ready,
  output logic [SW-1:0]  new_slot,
  output logic           rel_valid,
  output logic [SW-1:0]  rel_slot,
  input  logic           create_idle,
  // I-cache
  output logic           ic_req_valid,
  output logic [SW-1:0]  ic_req_slot,
  output logic [AW-1:0]  ic_req_pc,
  input  logic           ic_ack_valid,
  input  logic [SW-1:0]  ic_ack_slot,
  output logic           ic_rel_valid,
  output logic [SW-1:0]  ic_rel_slot,
  // thread state to instruction fetch
  output logic           ts_valid,
  output logic [SW-1:0]  ts_slot,
  output logic [AW-1:0]  ts_pc,
  output logic [LAW-1:0] ts_lbase,
  output logic [GAW-1:0] ts_sbase,
  output logic [GAW-1:0] ts_dbase,
  input  logic           ts_take,
  // context switch from instruction fetch
  input  logic           ctx_valid,
  input  logic [SW-1:0]  ctx_slot,
  input  logic [AW-1:0]  ctx_pc,
  input  logic           ctx_yield,
  // wake from register read and register writes
  input  logic [NWAKE-1:0]          wk_valid,
  input  logic [NWAKE-1:0][SW-1:0]  wk_slot,
  input  logic [NWAKE-1:0]          wk_decr,
  input  logic [NWAKE-1:0]          wk_kill,
  // wake from the ALU (branch)
  input  logic           br_valid,
  input  logic [SW-1:0]  br_slot,
  input  logic           br_taken,
  input  logic [AW-1:0]  br_target,
  // main-thread controls
  input  logic           killall,
  output logic           only_main,
  output logic [NSLOT-1:0] occupied
);

  logic [NSLOT-1:0]  occ, fetch, has_s, has_dep, dep_done, force_rel;
  tstate_t           st      [NSLOT];
  logic [AW-1:0]     pc      [NSLOT];
  logic [LAW-1:0]    lbase   [NSLOT];
  logic [GAW-1:0]    sbase   [NSLOT];
  logic [GAW-1:0]    dbase   [NSLOT];
  logic [SW-1:0]     dep_slot[NSLOT];

  assign occupied = occ;

  // free slot for the RAU
  always_comb begin
    new_ready = 1'b0; new_slot = '0;
    for (int i = NSLOT-1; i >= 0; i--)
      if (!occ[i]) begin new_ready = 1'b1; new_slot = SW'(i); end
  end

  // ready thread for fetch
  always_comb begin
    ts_valid = 1'b0; ts_slot = '0;
    for (int i = NSLOT-1; i >= 0; i--)
      if (occ[i] && st[i] == TS_READY) begin ts_valid = 1'b1; ts_slot = SW'(i); end
  end
  assign ts_pc    = pc[ts_slot];
  assign ts_lbase = lbase[ts_slot];
  assign ts_sbase = sbase[ts_slot];
  assign ts_dbase = dbase[ts_slot];

  // I-cache request
  always_comb begin
    ic_req_valid = 1'b0; ic_req_slot = '0;
    for (int i = NSLOT-1; i >= 0; i--)
      if (occ[i] && fetch[i]) begin ic_req_valid = 1'b1; ic_req_slot = SW'(i); end
  end
  assign ic_req_pc    = pc[ic_req_slot];
  assign ic_rel_valid = ctx_valid;
  assign ic_rel_slot  = ctx_slot;

  // kills happening this cycle
  logic [NSLOT-1:0] kill_now;
  always_comb begin
    kill_now = '0;
    for (int w = 0; w < NWAKE; w++)
      if (wk_valid[w] && wk_kill[w] && occ[wk_slot[w]] && st[wk_slot[w]] == TS_WAITING)
        kill_now[wk_slot[w]] = 1'b1;
  end

  // release selection
  logic [NSLOT-1:0] can_rel;
  always_comb begin
    for (int i = 0; i < NSLOT; i++)
      can_rel[i] = (i != 0) && occ[i] && st[i] == TS_KILLED &&
                   (force_rel[i] || !has_s[i] || (has_dep[i] && dep_done[i]) ||
                    (!has_dep[i] && create_idle && !new_valid));
    rel_valid = 1'b0; rel_slot = '0;
    for (int i = NSLOT-1; i >= 0; i--)
      if (can_rel[i]) begin rel_valid = 1'b1; rel_slot = SW'(i); end
  end

  always_comb begin
    only_main = 1'b1;
    for (int i = 1; i < NSLOT; i++) if (occ[i]) only_main = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      occ <= NSLOT'(1); fetch <= '0; has_s <= '0; has_dep <= '0;
      dep_done <= '0; force_rel <= '0;
      for (int i = 0; i < NSLOT; i++) begin
        st[i] <= TS_WAITING; pc[i] <= '0; lbase[i] <= '0;
        sbase[i] <= GAW'(MAIN_SBASE); dbase[i] <= GAW'(MAIN_SBASE); dep_slot[i] <= '0;
      end
      st[0] <= TS_READY;
    end else begin
      // I-cache acknowledge: code present, thread ready
      if (ic_req_valid) fetch[ic_req_slot] <= 1'b0;
      if (ic_ack_valid && occ[ic_ack_slot] && st[ic_ack_slot] == TS_WAITING)
        st[ic_ack_slot] <= TS_READY;
      // fetch takes the selected thread
      if (ts_take && ts_valid) st[ts_slot] <= TS_RUNNING;
      // context switch: thread waits with the pc of its next instruction
      if (ctx_valid) begin
        st[ctx_slot] <= TS_WAITING;
        pc[ctx_slot] <= ctx_pc;
        if (ctx_yield) fetch[ctx_slot] <= 1'b1;
      end
      // wakes from register read / register writes
      for (int w = 0; w < NWAKE; w++) begin
        if (wk_valid[w] && occ[wk_slot[w]] && st[wk_slot[w]] == TS_WAITING) begin
          if (wk_kill[w]) st[wk_slot[w]] <= TS_KILLED;
          else begin
            fetch[wk_slot[w]] <= 1'b1;
            if (wk_decr[w]) pc[wk_slot[w]] <= AW'(pc[wk_slot[w]] - 1'b1);
          end
        end
      end
      // wake from a resolved branch
      if (br_valid && occ[br_slot] && st[br_slot] == TS_WAITING) begin
        fetch[br_slot] <= 1'b1;
        if (br_taken) pc[br_slot] <= br_target;
      end
      // consumers killed: their producers may go
      for (int i = 0; i < NSLOT; i++)
        if (has_dep[i] && kill_now[dep_slot[i]]) dep_done[i] <= 1'b1;
      // release
      if (rel_valid) begin
        occ[rel_slot]       <= 1'b0;
        fetch[rel_slot]     <= 1'b0;
        has_dep[rel_slot]   <= 1'b0;
        dep_done[rel_slot]  <= 1'b0;
        force_rel[rel_slot] <= 1'b0;
      end
      // killall: every thread but the main one
      if (killall) begin
        for (int i = 1; i < NSLOT; i++)
          if (occ[i]) begin
            st[i] <= TS_KILLED; force_rel[i] <= 1'b1; fetch[i] <= 1'b0;
          end
      end
      // new thread
      if (new_valid && new_ready) begin
        occ[new_slot]      <= 1'b1;
        st[new_slot]       <= TS_WAITING;
        fetch[new_slot]    <= 1'b1;
        pc[new_slot]       <= new_pc;
        lbase[new_slot]    <= new_lbase;
        sbase[new_slot]    <= new_sbase;
        dbase[new_slot]    <= new_dbase;
        has_s[new_slot]    <= new_has_s;
        has_dep[new_slot]  <= 1'b0;
        dep_done[new_slot] <= 1'b0;
        force_rel[new_slot]<= 1'b0;
        if (new_prod_valid) begin
          has_dep[new_prod_slot]  <= 1'b1;
          dep_slot[new_prod_slot] <= new_slot;
        end
      end
    end
  end

  // a thread is handed back only by the fetch stage that runs it
  a_ctx_running: assert property (@(posedge clk) disable iff (!rst_n)
    ctx_valid |-> (st[ctx_slot] == TS_RUNNING || (ts_take && ts_slot == ctx_slot)));

endmodule
