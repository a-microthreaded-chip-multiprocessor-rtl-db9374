// mt_pkg: types and constants shared by the microthreaded processor.
//
// The processor runs a MIPS-like instruction set in which every instruction
// carries a static transfer tag: horizontal (h, the next instruction of the
// same thread follows), vertical (v, the next instruction comes from another
// ready thread) or kill (k, the thread ends after this instruction). The tag
// and the new thread-control instructions (cre, creq, crne, last, killall)
// follow the architecture; the binary encodings below are this design's own,
// since the architecture fixes only their formats (cre as a jump, creq/crne as
// a beq).
//
// Instruction word (34 bits): [33:32] transfer tag, [31:0] MIPS-format word.
// Register specifier (5 bits): [4:3] class (G, L, S, D), [2:0] offset added
// to the thread's base for that class. $G registers sit at fixed addresses at
// the bottom of the global register file; $G0 always reads zero.
package mt_pkg;

  localparam int XLEN   = 32;
  localparam int IW     = 34;      // tagged instruction width
  localparam int RSPEC  = 5;

  // transfer tag
  typedef enum logic [1:0] {XF_H = 2'd0, XF_V = 2'd1, XF_K = 2'd2} xfer_t;

  // register class in a specifier
  typedef enum logic [1:0] {RC_G = 2'd0, RC_L = 2'd1, RC_S = 2'd2, RC_D = 2'd3} rclass_t;

  // synchronisation state of a register
  typedef enum logic [1:0] {RS_FULL = 2'd0, RS_EMPTY = 2'd1, RS_WAIT = 2'd2} rstate_t;

  // thread state in the LCQ (two bits, as in the thread state table)
  typedef enum logic [1:0] {TS_WAITING = 2'd0, TS_READY = 2'd1,
                            TS_RUNNING = 2'd2, TS_KILLED = 2'd3} tstate_t;

  // primary opcodes
  localparam logic [5:0] OP_RTYPE = 6'h00;
  localparam logic [5:0] OP_J     = 6'h02;
  localparam logic [5:0] OP_BEQ   = 6'h04;
  localparam logic [5:0] OP_BNE   = 6'h05;
  localparam logic [5:0] OP_ADDI  = 6'h08;
  localparam logic [5:0] OP_CREQ  = 6'h14;
  localparam logic [5:0] OP_CRNE  = 6'h15;
  localparam logic [5:0] OP_MULI  = 6'h1c;
  localparam logic [5:0] OP_CRE   = 6'h1e;
  localparam logic [5:0] OP_LW    = 6'h23;
  localparam logic [5:0] OP_SW    = 6'h2b;
  // R-type function codes
  localparam logic [5:0] FN_MUL     = 6'h18;
  localparam logic [5:0] FN_ADD     = 6'h20;
  localparam logic [5:0] FN_SUB     = 6'h22;
  localparam logic [5:0] FN_AND     = 6'h24;
  localparam logic [5:0] FN_OR      = 6'h25;
  localparam logic [5:0] FN_SLT     = 6'h2a;
  localparam logic [5:0] FN_KILLALL = 6'h38;
  localparam logic [5:0] FN_LAST    = 6'h39;
  localparam logic [5:0] FN_END     = 6'h3f;

  typedef enum logic [2:0] {ALU_ADD, ALU_SUB, ALU_MUL, ALU_AND, ALU_OR, ALU_SLT} aluop_t;

  // -------- instruction builders (used by testbenches to assemble code) ----
  function automatic logic [4:0] rg(rclass_t c, int unsigned off);
    return {c, 3'(off)};
  endfunction
  function automatic logic [IW-1:0] i_r(xfer_t t, logic [5:0] fn, logic [4:0] rd,
                                        logic [4:0] rs, logic [4:0] rt);
    return {t, OP_RTYPE, rs, rt, rd, 5'd0, fn};
  endfunction
  function automatic logic [IW-1:0] i_i(xfer_t t, logic [5:0] op, logic [4:0] rt,
                                        logic [4:0] rs, int imm);
    return {t, op, rs, rt, 16'(imm)};
  endfunction
  function automatic logic [IW-1:0] i_j(xfer_t t, logic [5:0] op, int unsigned target);
    return {t, op, 26'(target)};
  endfunction

endpackage
