// mt_pipeline: the five-stage microthreaded pipeline of one processor.
//
// Stages: IF (instruction fetch and thread switch), RR (decode, register read
// and synchronisation), EX (ALU and branch resolution), MEM (L1 D-cache) and
// WB (register write). It is a single-issue MIPS-like pipeline without
// speculation; what makes it microthreaded is the following.
//
// IF  holds the running thread (LCQ slot, pc, L/S/D register bases). An
//     instruction tagged horizontal continues the thread (pc+1, or the
//     target of an unconditional jump). One tagged vertical or kill hands the
//     thread back to the LCQ (context, with pc+1) and in the next cycle IF
//     fetches from a ready thread offered by the LCQ, so a switch costs no
//     cycle. With no ready thread IF issues nothing.
// RR  maps the 5-bit register specifiers to the global or local register
//     file (G: fixed, L/S/D: base + offset) and reads them, with bypasses
//     from EX, MEM, WB and the memory fill port. If an operand is not full,
//     a vertical or kill instruction is turned into a write that stores the
//     thread's {processor, slot} in that register (state waiting) and goes
//     no further; the register's later write wakes the thread with
//     decrement, which reissues the instruction. If all operands are full,
//     the slot is returned to the LCQ at once (wake; with kill for a
//     kill-tagged instruction), except for branches, which return it from
//     EX with the target. A load marks its destination empty here, so a
//     reader that comes later synchronises on the outstanding load.
//     cre/creq/crne push a family header pointer to the GCQ, last waits
//     until only the main thread is left (while others live, IF does not
//     issue it: the thread yields its turn and fetches it again), killall clears the other threads,
//     end stops fetching.
// EX  ALU; conditional branches compare their operands and wake the thread
//     with the taken or fall-through pc (they never redirect IF).
// MEM L1 access. A load hit is written back normally; a miss leaves the
//     register empty and is completed later through the fill port.
// WB  writes the result; a write to a waiting register wakes the thread.
//
// This design's choices: an operand that is not full in a horizontal
// instruction holds RR (and IF) until it becomes full, since such a thread
// cannot be suspended; RR also holds when the register already has a
// waiting thread, while the GCQ is full, and during last. A full L1
// request queue holds IF, RR, EX and MEM. Register specifiers encode class
// and offset (see mt_pkg). Addresses count 32-bit words.
// rr_proc is the constant PROC_ID: the number this pipeline stores in a
// waiting register, so that a shared register file can route the wake.
module mt_pipeline
  import mt_pkg::*;
#(
  parameter int unsigned NSLOT  = 32,
  parameter int unsigned AW     = 10,
  parameter int unsigned LAW    = 7,
  parameter int unsigned GAW    = 7,
  parameter int unsigned PROC_W = 1,
  parameter int unsigned PROC_ID = 0,
  parameter int unsigned DADDR_W = 20,
  localparam int unsigned SW    = $clog2(NSLOT),
  localparam int unsigned PW    = (LAW > GAW) ? LAW : GAW,
  localparam int unsigned DW    = PW + 1        // {global, index}
) (
  input  logic            clk,
  input  logic            rst_n,
  // LCQ: thread state / context
  input  logic            ts_valid,
  input  logic [SW-1:0]   ts_slot,
  input  logic [AW-1:0]   ts_pc,
  input  logic [LAW-1:0]  ts_lbase,
  input  logic [GAW-1:0]  ts_sbase,
  input  logic [GAW-1:0]  ts_dbase,
  output logic            ts_take,
  output logic            ctx_valid,
  output logic [SW-1:0]   ctx_slot,
  output logic [AW-1:0]   ctx_pc,
  output logic            ctx_yield,
  output logic            rr_wake,
  output logic [SW-1:0]   rr_wake_slot,
  output logic            rr_wake_kill,
  output logic            br_valid,
  output logic [SW-1:0]   br_slot,
  output logic            br_taken,
  output logic [AW-1:0]   br_target,
  output logic            killall,
  input  logic            only_main,
  input  logic            create_idle,
  // I-cache
  output logic [AW-1:0]   if_addr,
  input  logic [IW-1:0]   if_instr,
  // GCQ
  output logic            cre_valid,
  output logic [AW-1:0]   cre_ptr,
  input  logic            cre_ready,
  // global register file
  output logic [GAW-1:0]  g_ra, g_rb,
  input  rstate_t         g_sa, g_sb,
  input  logic [XLEN-1:0] g_da, g_db,
  output logic            g_rr_wait, g_rr_empty,
  output logic [GAW-1:0]  g_rr_addr,
  output logic            g_wb_valid,
  output logic [GAW-1:0]  g_wb_addr,
  // local register file
  output logic [LAW-1:0]  l_ra, l_rb,
  input  rstate_t         l_sa, l_sb,
  input  logic [XLEN-1:0] l_da, l_db,
  output logic            l_rr_wait, l_rr_empty,
  output logic [LAW-1:0]  l_rr_addr,
  output logic            l_wb_valid,
  output logic [LAW-1:0]  l_wb_addr,
  output logic [XLEN-1:0] wb_data,
  output logic [PROC_W-1:0] rr_proc,
  output logic [SW-1:0]   rr_slot,
  // fill from the D-cache (for the bypass)
  input  logic            fl_valid,
  input  logic [DW-1:0]   fl_dest,
  input  logic [XLEN-1:0] fl_data,
  // D-cache
  output logic            dc_valid,
  output logic            dc_we,
  output logic [DADDR_W-1:0] dc_addr,
  output logic [XLEN-1:0] dc_wdata,
  output logic [DW-1:0]   dc_dest,
  input  logic            dc_ready,
  input  logic            dc_hit,
  input  logic [XLEN-1:0] dc_data,
  // status
  output logic            halted,
  output logic            issued,      // an instruction completed RR
  output logic            suspended,   // an instruction was turned into a wait
  output logic            rr_holding,  // RR held this cycle
  output logic            bypassed     // an operand came from a bypass
);

  // ======================= IF =======================
  logic            cur_valid;
  logic [SW-1:0]   cur_slot;
  logic [AW-1:0]   cur_pc;
  logic [LAW-1:0]  cur_lb;
  logic [GAW-1:0]  cur_sb, cur_db;
  logic            fetch_stop;

  logic            stall_mem, rr_hold, stall_if;

  logic            e_valid;
  logic [SW-1:0]   e_slot;
  logic [AW-1:0]   e_pc;
  logic [LAW-1:0]  e_lb;
  logic [GAW-1:0]  e_sb, e_db;
  always_comb begin
    if (cur_valid) begin
      e_valid = 1'b1; e_slot = cur_slot; e_pc = cur_pc;
      e_lb = cur_lb; e_sb = cur_sb; e_db = cur_db;
    end else begin
      e_valid = ts_valid; e_slot = ts_slot; e_pc = ts_pc;
      e_lb = ts_lbase; e_sb = ts_sbase; e_db = ts_dbase;
    end
  end

  assign stall_if = stall_mem || rr_hold;
  logic if_go;
  assign if_go   = e_valid && !fetch_stop && !stall_if;
  assign if_addr = e_pc;
  assign ts_take = if_go && !cur_valid;

  xfer_t       f_tag;
  logic [5:0]  f_op, f_fn;
  assign f_tag = xfer_t'(if_instr[33:32]);
  assign f_op  = if_instr[31:26];
  assign f_fn  = if_instr[5:0];
  logic f_end, f_jump, f_wait;
  assign f_end  = (f_op == OP_RTYPE) && (f_fn == FN_END);
  assign f_jump = (f_op == OP_J);
  // last while other threads live: the thread yields and refetches it later
  assign f_wait = (f_op == OP_RTYPE) && (f_fn == FN_LAST) && !(only_main && create_idle);

  assign ctx_valid = if_go && (f_tag != XF_H || f_wait);
  assign ctx_slot  = e_slot;
  assign ctx_pc    = f_wait ? e_pc : AW'(e_pc + 1'b1);
  assign ctx_yield = f_wait;

  // IF/RR register
  logic            d_valid;
  logic [IW-1:0]   d_ins;
  logic [SW-1:0]   d_slot;
  logic [AW-1:0]   d_pc;
  logic [LAW-1:0]  d_lb;
  logic [GAW-1:0]  d_sb, d_db;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_valid <= 1'b0; cur_slot <= '0; cur_pc <= '0;
      cur_lb <= '0; cur_sb <= '0; cur_db <= '0; fetch_stop <= 1'b0;
      d_valid <= 1'b0; d_ins <= '0; d_slot <= '0; d_pc <= '0;
      d_lb <= '0; d_sb <= '0; d_db <= '0;
    end else if (!stall_if) begin
      d_valid <= if_go && !f_wait;
      d_ins   <= if_instr;
      d_slot  <= e_slot; d_pc <= e_pc; d_lb <= e_lb; d_sb <= e_sb; d_db <= e_db;
      if (if_go) begin
        if (f_tag == XF_H && !f_wait) begin
          cur_valid <= 1'b1;
          cur_slot  <= e_slot; cur_lb <= e_lb; cur_sb <= e_sb; cur_db <= e_db;
          cur_pc    <= f_jump ? AW'(if_instr[25:0]) : AW'(e_pc + 1'b1);
          if (f_end) fetch_stop <= 1'b1;
        end else begin
          cur_valid <= 1'b0;
        end
      end
    end
  end

  // ======================= RR =======================
  xfer_t      r_tag;
  logic [5:0] r_op, r_fn;
  logic [4:0] r_rs, r_rt, r_rd;
  logic [15:0] r_imm;
  assign r_tag = xfer_t'(d_ins[33:32]);
  assign r_op  = d_ins[31:26];
  assign r_rs  = d_ins[25:21];
  assign r_rt  = d_ins[20:16];
  assign r_rd  = d_ins[15:11];
  assign r_fn  = d_ins[5:0];
  assign r_imm = d_ins[15:0];

  // decode
  logic use_a, use_b, wr, is_ld, is_st, is_br, br_ne, is_cre, is_crc, crc_ne;
  logic is_last, is_kall, is_end, imm_b;
  aluop_t aop;
  logic [4:0] dspec;
  always_comb begin
    use_a = 1'b0; use_b = 1'b0; wr = 1'b0; is_ld = 1'b0; is_st = 1'b0;
    is_br = 1'b0; br_ne = 1'b0; is_cre = 1'b0; is_crc = 1'b0; crc_ne = 1'b0;
    is_last = 1'b0; is_kall = 1'b0; is_end = 1'b0; imm_b = 1'b0;
    aop = ALU_ADD; dspec = r_rd;
    unique case (r_op)
      OP_RTYPE: begin
        unique case (r_fn)
          FN_ADD: begin aop = ALU_ADD; use_a = 1; use_b = 1; wr = 1; end
          FN_SUB: begin aop = ALU_SUB; use_a = 1; use_b = 1; wr = 1; end
          FN_MUL: begin aop = ALU_MUL; use_a = 1; use_b = 1; wr = 1; end
          FN_AND: begin aop = ALU_AND; use_a = 1; use_b = 1; wr = 1; end
          FN_OR:  begin aop = ALU_OR;  use_a = 1; use_b = 1; wr = 1; end
          FN_SLT: begin aop = ALU_SLT; use_a = 1; use_b = 1; wr = 1; end
          FN_KILLALL: is_kall = 1;
          FN_LAST:    is_last = 1;
          FN_END:     is_end  = 1;
          default: ;
        endcase
      end
      OP_ADDI: begin aop = ALU_ADD; use_a = 1; imm_b = 1; wr = 1; dspec = r_rt; end
      OP_MULI: begin aop = ALU_MUL; use_a = 1; imm_b = 1; wr = 1; dspec = r_rt; end
      OP_LW:   begin use_a = 1; imm_b = 1; wr = 1; is_ld = 1; dspec = r_rt; end
      OP_SW:   begin use_a = 1; use_b = 1; imm_b = 1; is_st = 1; end
      OP_BEQ:  begin use_a = 1; use_b = 1; is_br = 1; end
      OP_BNE:  begin use_a = 1; use_b = 1; is_br = 1; br_ne = 1; end
      OP_CRE:  is_cre = 1;
      OP_CREQ: begin use_a = 1; use_b = 1; is_crc = 1; end
      OP_CRNE: begin use_a = 1; use_b = 1; is_crc = 1; crc_ne = 1; end
      default: ;
    endcase
    if (dspec == 5'd0) wr = 1'b0;      // $G0
  end

  // physical register of a specifier: {global, index}
  function automatic logic [DW-1:0] phys(logic [4:0] s);
    logic [2:0] off;
    off = s[2:0];
    unique case (rclass_t'(s[4:3]))
      RC_G: return {1'b1, PW'(off)};
      RC_L: return {1'b0, PW'(LAW'(d_lb + LAW'(off)))};
      RC_S: return {1'b1, PW'(GAW'(d_sb + GAW'(off)))};
      default: return {1'b1, PW'(GAW'(d_db + GAW'(off)))};
    endcase
  endfunction

  logic [DW-1:0] pa, pb, pd;
  assign pa = phys(r_rs);
  assign pb = phys(r_rt);
  assign pd = phys(dspec);

  assign g_ra = GAW'(pa[PW-1:0]);
  assign g_rb = GAW'(pb[PW-1:0]);
  assign l_ra = LAW'(pa[PW-1:0]);
  assign l_rb = LAW'(pb[PW-1:0]);

  // later-stage registers (declared here for the bypass)
  logic            x_valid, x_wr, x_ld, x_st, x_br, x_brne;
  logic [DW-1:0]   x_dest;
  logic [XLEN-1:0] x_a, x_b, x_sd;
  aluop_t          x_op;
  logic [SW-1:0]   x_slot;
  logic [AW-1:0]   x_tgt;
  logic [XLEN-1:0] x_y;
  logic            x_eq;

  logic            m_valid, m_wr, m_ld, m_st;
  logic [DW-1:0]   m_dest;
  logic [XLEN-1:0] m_y, m_sd;

  logic            w_valid;
  logic [DW-1:0]   w_dest;
  logic [XLEN-1:0] w_data;

  // operand value with bypass; ok = value is valid
  typedef struct packed {
    logic            ok;
    logic            byp;
    rstate_t         st;
    logic [XLEN-1:0] v;
  } opnd_t;

  function automatic opnd_t operand(logic [DW-1:0] p, rstate_t rs_g, logic [XLEN-1:0] d_g,
                                    rstate_t rs_l, logic [XLEN-1:0] d_l);
    opnd_t o;
    o.st  = p[PW] ? rs_g : rs_l;
    o.v   = p[PW] ? d_g  : d_l;
    o.ok  = (o.st == RS_FULL);
    o.byp = 1'b0;
    if (p == {1'b1, PW'(0)}) begin
      o.ok = 1'b1; o.v = '0;
    end else if (x_valid && x_wr && x_dest == p) begin
      o.ok = !x_ld; o.v = x_y; o.byp = 1'b1;
    end else if (m_valid && m_wr && m_dest == p) begin
      o.ok = !m_ld || dc_hit; o.v = m_ld ? dc_data : m_y; o.byp = 1'b1;
    end else if (w_valid && w_dest == p) begin
      o.ok = 1'b1; o.v = w_data; o.byp = 1'b1;
    end else if (fl_valid && fl_dest == p) begin
      o.ok = 1'b1; o.v = fl_data; o.byp = 1'b1;
    end
    return o;
  endfunction

  opnd_t oa, ob;
  assign oa = operand(pa, g_sa, g_da, l_sa, l_da);
  assign ob = operand(pb, g_sb, g_db, l_sb, l_db);

  logic a_ok, b_ok, all_ok;
  assign a_ok   = !use_a || oa.ok;
  assign b_ok   = !use_b || ob.ok;
  assign all_ok = a_ok && b_ok;

  // the operand to wait on, and whether it can take a waiting thread
  logic [DW-1:0] wp;
  rstate_t       wst;
  assign wp  = !a_ok ? pa : pb;
  assign wst = !a_ok ? oa.st : ob.st;

  logic can_suspend;
  assign can_suspend = (r_tag != XF_H) && (wst == RS_EMPTY);

  logic crc_take;
  assign crc_take = is_crc && ((oa.v == ob.v) != crc_ne);

  // RR holds: operand missing and the thread cannot be suspended now,
  // GCQ full for a create, or last with other threads alive
  assign rr_hold = d_valid && !stall_mem && (
                     (!all_ok && !can_suspend) ||
                     (all_ok && (is_cre || crc_take) && !cre_ready) ||
                     (all_ok && is_last && !(only_main && create_idle)));

  logic rr_fire, rr_exec, rr_susp;
  assign rr_fire = d_valid && !stall_mem && !rr_hold;
  assign rr_exec = rr_fire && all_ok;
  assign rr_susp = rr_fire && !all_ok;

  assign rr_proc = PROC_W'(PROC_ID);
  assign rr_slot = d_slot;
  assign g_rr_wait  = rr_susp && wp[PW];
  assign l_rr_wait  = rr_susp && !wp[PW];
  assign g_rr_empty = rr_exec && is_ld && pd[PW];
  assign l_rr_empty = rr_exec && is_ld && !pd[PW];
  assign g_rr_addr  = GAW'(rr_susp ? wp[PW-1:0] : pd[PW-1:0]);
  assign l_rr_addr  = LAW'(rr_susp ? wp[PW-1:0] : pd[PW-1:0]);

  assign rr_wake      = rr_exec && (r_tag != XF_H) && !is_br;
  assign rr_wake_slot = d_slot;
  assign rr_wake_kill = (r_tag == XF_K);

  assign cre_valid = rr_exec && (is_cre || crc_take);
  assign cre_ptr   = is_cre ? AW'(d_ins[25:0]) : AW'(d_pc + 1'b1 + AW'(r_imm));
  assign killall   = rr_exec && is_kall;

  assign issued     = rr_exec;
  assign suspended  = rr_susp;
  assign rr_holding = rr_hold;
  assign bypassed   = rr_exec && ((use_a && oa.byp) || (use_b && ob.byp));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) halted <= 1'b0;
    else if (rr_exec && is_end) halted <= 1'b1;
  end

  // ======================= EX =======================
  alu u_alu (.op(x_op), .a(x_a), .b(x_b), .y(x_y), .eq(x_eq));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_valid <= 1'b0; x_wr <= 1'b0; x_ld <= 1'b0; x_st <= 1'b0; x_br <= 1'b0;
      x_brne <= 1'b0; x_dest <= '0; x_a <= '0; x_b <= '0; x_sd <= '0;
      x_op <= ALU_ADD; x_slot <= '0; x_tgt <= '0;
    end else if (!stall_mem) begin
      x_valid <= rr_exec && (wr || is_st || is_br);
      x_wr    <= wr;
      x_ld    <= is_ld;
      x_st    <= is_st;
      x_br    <= is_br;
      x_brne  <= br_ne;
      x_dest  <= pd;
      x_op    <= aop;
      x_a     <= oa.v;
      x_b     <= imm_b ? XLEN'($signed(r_imm)) : ob.v;
      x_sd    <= ob.v;
      x_slot  <= d_slot;
      x_tgt   <= AW'(d_pc + 1'b1 + AW'(r_imm));
    end
  end

  assign br_valid  = x_valid && x_br && !stall_mem;
  assign br_slot   = x_slot;
  assign br_taken  = x_eq != x_brne;
  assign br_target = x_tgt;

  // ======================= MEM =======================
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_valid <= 1'b0; m_wr <= 1'b0; m_ld <= 1'b0; m_st <= 1'b0;
      m_dest <= '0; m_y <= '0; m_sd <= '0;
    end else if (!stall_mem) begin
      m_valid <= x_valid && !x_br;
      m_wr    <= x_wr;
      m_ld    <= x_ld;
      m_st    <= x_st;
      m_dest  <= x_dest;
      m_y     <= x_y;
      m_sd    <= x_sd;
    end
  end

  assign dc_valid = m_valid && (m_ld || m_st);
  assign dc_we    = m_st;
  assign dc_addr  = DADDR_W'(m_y);
  assign dc_wdata = m_sd;
  assign dc_dest  = m_dest;
  assign stall_mem = dc_valid && !dc_ready;

  // ======================= WB =======================
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_valid <= 1'b0; w_dest <= '0; w_data <= '0;
    end else begin
      w_valid <= m_valid && m_wr && !stall_mem && (!m_ld || dc_hit);
      w_dest  <= m_dest;
      w_data  <= m_ld ? dc_data : m_y;
    end
  end

  assign g_wb_valid = w_valid && w_dest[PW];
  assign l_wb_valid = w_valid && !w_dest[PW];
  assign g_wb_addr  = GAW'(w_dest[PW-1:0]);
  assign l_wb_addr  = LAW'(w_dest[PW-1:0]);
  assign wb_data    = w_data;

endmodule
