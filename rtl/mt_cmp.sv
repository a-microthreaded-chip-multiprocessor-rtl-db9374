// mt_cmp: a microthreaded processor with its chip-level units.
//
// One microthreaded pipeline (the evaluated single-processor configuration)
// together with the units a chip multiprocessor shares between its
// pipelines: the global continuation queue (GCQ), the register allocation
// unit (RAU), the global register file and the L2 cache. Per processor: the
// local continuation queue (LCQ) with its thread state table, the I-cache,
// the local register file and the L1 D-cache.
//
// Flow: a create instruction in the pipeline pushes a thread family to the
// GCQ; the GCQ fetches its header from the I-cache and iterates it; the RAU
// allocates registers and an LCQ slot for each thread and initialises the
// registers; the LCQ gets the thread's code ready in the I-cache and offers
// ready threads to instruction fetch. Wakes come back to the LCQ from the
// register-read stage, from register writes (writeback and memory fill,
// through the waiting register) and from the ALU (branches).
//
// Ports: a program-load port into the I-cache (the program runs from
// address 0 after reset, as the main thread in LCQ slot 0); a line-wide
// port to main memory, which lies outside the chip; status outputs.
module mt_cmp
  import mt_pkg::*;
#(
  parameter int unsigned NSLOT      = 32,
  parameter int unsigned IWORDS     = 1024,
  parameter int unsigned LREGS      = 128,
  parameter int unsigned GREGS      = 128,
  parameter int unsigned NGFIX      = 8,
  parameter int unsigned BLK        = 4,
  parameter int unsigned GCQ_DEPTH  = 8,
  parameter int unsigned L1_BYTES   = 8192,
  parameter int unsigned L2_BYTES   = 262144,
  parameter int unsigned WAYS       = 4,
  parameter int unsigned LINE_BYTES = 32,
  parameter int unsigned L2_HIT     = 5,
  parameter int unsigned DADDR_W    = 20,
  localparam int unsigned AW        = $clog2(IWORDS),
  localparam int unsigned LAW       = $clog2(LREGS),
  localparam int unsigned GAW       = $clog2(GREGS),
  localparam int unsigned SW        = $clog2(NSLOT),
  localparam int unsigned LW        = LINE_BYTES / 4,
  localparam int unsigned OW        = $clog2(LW),
  localparam int unsigned PW        = (LAW > GAW) ? LAW : GAW,
  localparam int unsigned DW        = PW + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // program load
  input  logic                 load_en,
  input  logic [AW-1:0]        load_addr,
  input  logic [IW-1:0]        load_data,
  // main memory
  output logic                 mem_req_valid,
  output logic                 mem_req_we,
  output logic [DADDR_W-OW-1:0] mem_req_addr,
  output logic [LW*XLEN-1:0]   mem_req_wline,
  input  logic                 mem_req_ready,
  input  logic                 mem_resp_valid,
  input  logic [LW*XLEN-1:0]   mem_resp_line,
  // status
  output logic                 halted,
  output logic                 quiet,        // no memory traffic outstanding
  output logic                 issued,
  output logic                 suspended,
  output logic                 rr_holding,
  output logic                 bypassed,
  output logic                 l2_miss,
  output logic [NSLOT-1:0]     occupied
);

  localparam int unsigned NWAKE = 5;

  // ---------------- wires ----------------
  logic ts_valid, ts_take, ctx_valid, ctx_yield, rr_wake, rr_wake_kill, br_valid, br_taken, killall;
  logic [SW-1:0]  ts_slot, ctx_slot, rr_wake_slot, br_slot;
  logic [AW-1:0]  ts_pc, ctx_pc, br_target, if_addr, cre_ptr;
  logic [LAW-1:0] ts_lbase;
  logic [GAW-1:0] ts_sbase, ts_dbase;
  logic only_main, create_idle, gcq_idle, rau_idle;
  logic [IW-1:0]  if_instr, hdr_w0, hdr_w1;
  logic [AW-1:0]  hdr_addr;
  logic cre_valid, cre_ready;

  logic          th_valid, th_ready;
  logic [AW-1:0] th_pc;
  logic [15:0]   th_index;
  logic [7:0]    th_dep;
  logic [3:0]    th_nl, th_ng;

  logic           new_valid, new_ready, new_prod_valid;
  logic [SW-1:0]  new_slot, new_prod_slot, rel_slot;
  logic [AW-1:0]  new_pc;
  logic [LAW-1:0] new_lbase, linit_base;
  logic [GAW-1:0] new_sbase, new_dbase, ginit_base;
  logic           rel_valid, linit_valid, ginit_valid;
  logic [XLEN-1:0] linit_index;

  logic           ic_req_valid, ic_ack_valid, ic_rel_valid;
  logic [SW-1:0]  ic_req_slot, ic_ack_slot, ic_rel_slot;
  logic [AW-1:0]  ic_req_pc;
  logic [NSLOT-1:0] pinned;

  logic [GAW-1:0] g_ra, g_rb, g_rr_addr, g_wb_addr;
  logic [LAW-1:0] l_ra, l_rb, l_rr_addr, l_wb_addr;
  rstate_t        g_sa, g_sb, l_sa, l_sb;
  logic [XLEN-1:0] g_da, g_db, l_da, l_db, wb_data;
  logic g_rr_wait, g_rr_empty, g_wb_valid, l_rr_wait, l_rr_empty, l_wb_valid;
  logic [0:0]     rr_proc;
  logic [SW-1:0]  rr_slot;

  logic            fl_valid;
  logic [DW-1:0]   fl_dest;
  logic [XLEN-1:0] fl_data;

  logic dc_valid, dc_we, dc_ready, dc_hit, dc_miss;
  logic [DADDR_W-1:0] dc_addr;
  logic [XLEN-1:0] dc_wdata, dc_data;
  logic [DW-1:0] dc_dest;

  logic l2_req_valid, l2_req_we, l2_req_ready, l2_resp_valid, l2_busy;
  logic [DADDR_W-1:0] l2_req_addr;
  logic [XLEN-1:0] l2_req_wdata;
  logic [LW*XLEN-1:0] l2_resp_line;

  logic g_wbw, g_flw, l_wbw, l_flw;
  logic [0:0] g_wbp, g_flp, l_wbp, l_flp;
  logic [SW-1:0] g_wbs, g_fls, l_wbs, l_fls;

  assign create_idle = gcq_idle && rau_idle;

  // ---------------- chip-level units ----------------
  gcq #(.DEPTH(GCQ_DEPTH), .AW(AW)) u_gcq (
    .clk, .rst_n, .cre_valid, .cre_ptr, .cre_ready,
    .hdr_addr, .hdr_w0, .hdr_w1,
    .th_valid, .th_pc, .th_index, .th_dep, .th_nl, .th_ng, .th_ready,
    .idle(gcq_idle));

  rau #(.LREGS(LREGS), .GREGS(GREGS), .NGFIX(NGFIX), .BLK(BLK), .NSLOT(NSLOT), .AW(AW)) u_rau (
    .clk, .rst_n,
    .th_valid, .th_pc, .th_index, .th_dep, .th_nl, .th_ng, .th_ready,
    .lcq_ready(new_ready), .lcq_slot(new_slot),
    .new_valid, .new_pc, .new_lbase, .new_sbase, .new_dbase, .new_prod_valid, .new_prod_slot,
    .rel_valid, .rel_slot,
    .linit_valid, .linit_base, .linit_index, .ginit_valid, .ginit_base,
    .idle(rau_idle));

  sync_regfile #(.NREGS(GREGS), .BLK(BLK), .NSLOT(NSLOT), .PROC_W(1), .HARD_ZERO(1'b1)) u_grf (
    .clk, .rst_n,
    .ra_addr(g_ra), .ra_state(g_sa), .ra_data(g_da),
    .rb_addr(g_rb), .rb_state(g_sb), .rb_data(g_db),
    .rr_wait(g_rr_wait), .rr_empty(g_rr_empty), .rr_addr(g_rr_addr), .rr_proc, .rr_slot,
    .wb_valid(g_wb_valid), .wb_addr(g_wb_addr), .wb_data,
    .wb_wake(g_wbw), .wb_wake_proc(g_wbp), .wb_wake_slot(g_wbs),
    .fl_valid(fl_valid && fl_dest[PW]), .fl_addr(GAW'(fl_dest[PW-1:0])), .fl_data,
    .fl_wake(g_flw), .fl_wake_proc(g_flp), .fl_wake_slot(g_fls),
    .init_valid(ginit_valid), .init_base(ginit_base), .init_first(1'b0), .init_value('0));

  l2cache #(.SIZE_BYTES(L2_BYTES), .WAYS(WAYS), .LINE_BYTES(LINE_BYTES), .HIT_LAT(L2_HIT),
            .ADDR_W(DADDR_W)) u_l2 (
    .clk, .rst_n,
    .req_valid(l2_req_valid), .req_we(l2_req_we), .req_addr(l2_req_addr), .req_wdata(l2_req_wdata),
    .req_ready(l2_req_ready), .resp_valid(l2_resp_valid), .resp_line(l2_resp_line),
    .mem_req_valid, .mem_req_we, .mem_req_addr, .mem_req_wline, .mem_req_ready,
    .mem_resp_valid, .mem_resp_line, .busy(l2_busy), .miss(l2_miss));

  // ---------------- processor ----------------
  icache #(.WORDS(IWORDS), .NSLOT(NSLOT)) u_icache (
    .clk, .rst_n, .load_en, .load_addr, .load_data,
    .if_addr, .if_instr, .hdr_addr, .hdr_w0, .hdr_w1,
    .req_valid(ic_req_valid), .req_slot(ic_req_slot), .req_pc(ic_req_pc),
    .ack_valid(ic_ack_valid), .ack_slot(ic_ack_slot),
    .rel_valid(ic_rel_valid), .rel_slot(ic_rel_slot), .pinned);

  lcq #(.NSLOT(NSLOT), .AW(AW), .LAW(LAW), .GAW(GAW), .NWAKE(NWAKE), .MAIN_SBASE(NGFIX)) u_lcq (
    .clk, .rst_n,
    .new_valid, .new_pc, .new_lbase, .new_sbase, .new_dbase, .new_has_s(ginit_valid),
    .new_prod_valid, .new_prod_slot, .new_ready, .new_slot,
    .rel_valid, .rel_slot, .create_idle,
    .ic_req_valid, .ic_req_slot, .ic_req_pc, .ic_ack_valid, .ic_ack_slot,
    .ic_rel_valid, .ic_rel_slot,
    .ts_valid, .ts_slot, .ts_pc, .ts_lbase, .ts_sbase, .ts_dbase, .ts_take,
    .ctx_valid, .ctx_slot, .ctx_pc, .ctx_yield,
    .wk_valid({g_flw, g_wbw, l_flw, l_wbw, rr_wake}),
    .wk_slot ({g_fls, g_wbs, l_fls, l_wbs, rr_wake_slot}),
    .wk_decr ({1'b1, 1'b1, 1'b1, 1'b1, 1'b0}),
    .wk_kill ({1'b0, 1'b0, 1'b0, 1'b0, rr_wake_kill}),
    .br_valid, .br_slot, .br_taken, .br_target,
    .killall, .only_main, .occupied);

  sync_regfile #(.NREGS(LREGS), .BLK(BLK), .NSLOT(NSLOT), .PROC_W(1), .HARD_ZERO(1'b0)) u_lrf (
    .clk, .rst_n,
    .ra_addr(l_ra), .ra_state(l_sa), .ra_data(l_da),
    .rb_addr(l_rb), .rb_state(l_sb), .rb_data(l_db),
    .rr_wait(l_rr_wait), .rr_empty(l_rr_empty), .rr_addr(l_rr_addr), .rr_proc, .rr_slot,
    .wb_valid(l_wb_valid), .wb_addr(l_wb_addr), .wb_data,
    .wb_wake(l_wbw), .wb_wake_proc(l_wbp), .wb_wake_slot(l_wbs),
    .fl_valid(fl_valid && !fl_dest[PW]), .fl_addr(LAW'(fl_dest[PW-1:0])), .fl_data,
    .fl_wake(l_flw), .fl_wake_proc(l_flp), .fl_wake_slot(l_fls),
    .init_valid(linit_valid), .init_base(linit_base), .init_first(1'b1), .init_value(linit_index));

  mt_pipeline #(.NSLOT(NSLOT), .AW(AW), .LAW(LAW), .GAW(GAW), .PROC_W(1), .PROC_ID(0),
                .DADDR_W(DADDR_W)) u_pipe (
    .clk, .rst_n,
    .ts_valid, .ts_slot, .ts_pc, .ts_lbase, .ts_sbase, .ts_dbase, .ts_take,
    .ctx_valid, .ctx_slot, .ctx_pc, .ctx_yield,
    .rr_wake, .rr_wake_slot, .rr_wake_kill,
    .br_valid, .br_slot, .br_taken, .br_target,
    .killall, .only_main, .create_idle,
    .if_addr, .if_instr, .cre_valid, .cre_ptr, .cre_ready,
    .g_ra, .g_rb, .g_sa, .g_sb, .g_da, .g_db, .g_rr_wait, .g_rr_empty, .g_rr_addr,
    .g_wb_valid, .g_wb_addr,
    .l_ra, .l_rb, .l_sa, .l_sb, .l_da, .l_db, .l_rr_wait, .l_rr_empty, .l_rr_addr,
    .l_wb_valid, .l_wb_addr, .wb_data, .rr_proc, .rr_slot,
    .fl_valid, .fl_dest, .fl_data,
    .dc_valid, .dc_we, .dc_addr, .dc_wdata, .dc_dest, .dc_ready, .dc_hit, .dc_data,
    .halted, .issued, .suspended, .rr_holding, .bypassed);

  dcache #(.SIZE_BYTES(L1_BYTES), .WAYS(WAYS), .LINE_BYTES(LINE_BYTES), .ADDR_W(DADDR_W),
           .DEST_W(DW)) u_dc (
    .clk, .rst_n,
    .req_valid(dc_valid), .req_we(dc_we), .req_addr(dc_addr), .req_wdata(dc_wdata),
    .req_dest(dc_dest), .req_ready(dc_ready), .ld_hit(dc_hit), .ld_miss(dc_miss), .ld_data(dc_data),
    .fl_valid, .fl_dest, .fl_data,
    .l2_req_valid, .l2_req_we, .l2_req_addr, .l2_req_wdata, .l2_req_ready,
    .l2_resp_valid, .l2_resp_line);

  assign quiet = !l2_busy && !l2_req_valid;

endmodule
