// sync_regfile: register file whose registers are also synchronisers.
//
// Every register carries a state: full (holds data), empty (not yet written)
// or waiting (a thread is suspended on it; the data field then holds that
// thread's processor number and LCQ slot). Used twice: as the global register
// file (fixed $G registers plus shared registers allocated to threads) and as
// a processor's local register file.
//
//   read      two combinational ports return state and data.
//   rr        the register-read stage either suspends a thread on an empty
//             register (set waiting, storing {proc, slot}) or marks the
//             destination of a load empty (only if it is full).
//   wb, fill  writes from the pipeline's writeback and from returning memory
//             data. The register becomes full; if it was waiting, the stored
//             {proc, slot} is sent out as a wake with decrement, so that the
//             suspended instruction is reissued.
//   init      the RAU initialises a block of BLK registers: all empty, or with
//             the first set full to the thread's index (local $L0).
// Register 0 is full and reads zero from reset; with HARD_ZERO it ignores
// writes ($G0). Every other register is empty after reset.
// Port priority on one register in one cycle (this design's choice): init,
// then rr, then fill, then wb. Timing: writes take effect at the clock edge.
module sync_regfile
  import mt_pkg::*;
#(
  parameter int unsigned NREGS     = 128,
  parameter int unsigned BLK       = 4,
  parameter int unsigned NSLOT     = 32,
  parameter int unsigned PROC_W    = 1,
  parameter bit          HARD_ZERO = 1'b0,
  localparam int unsigned RAW      = $clog2(NREGS),
  localparam int unsigned SW       = $clog2(NSLOT)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [RAW-1:0]  ra_addr,
  output rstate_t         ra_state,
  output logic [XLEN-1:0] ra_data,
  input  logic [RAW-1:0]  rb_addr,
  output rstate_t         rb_state,
  output logic [XLEN-1:0] rb_data,
  // register-read stage
  input  logic            rr_wait,
  input  logic            rr_empty,
  input  logic [RAW-1:0]  rr_addr,
  input  logic [PROC_W-1:0] rr_proc,
  input  logic [SW-1:0]   rr_slot,
  // writeback
  input  logic            wb_valid,
  input  logic [RAW-1:0]  wb_addr,
  input  logic [XLEN-1:0] wb_data,
  output logic            wb_wake,
  output logic [PROC_W-1:0] wb_wake_proc,
  output logic [SW-1:0]   wb_wake_slot,
  // memory fill
  input  logic            fl_valid,
  input  logic [RAW-1:0]  fl_addr,
  input  logic [XLEN-1:0] fl_data,
  output logic            fl_wake,
  output logic [PROC_W-1:0] fl_wake_proc,
  output logic [SW-1:0]   fl_wake_slot,
  // block initialisation
  input  logic            init_valid,
  input  logic [RAW-1:0]  init_base,
  input  logic            init_first,
  input  logic [XLEN-1:0] init_value
);

  rstate_t         rs   [NREGS];
  logic [XLEN-1:0] data [NREGS];

  assign ra_state = rs[ra_addr];
  assign ra_data  = data[ra_addr];
  assign rb_state = rs[rb_addr];
  assign rb_data  = data[rb_addr];

  logic wb_ok, fl_ok;
  assign wb_ok = wb_valid && !(HARD_ZERO && wb_addr == '0);
  assign fl_ok = fl_valid && !(HARD_ZERO && fl_addr == '0);

  assign wb_wake      = wb_ok && rs[wb_addr] == RS_WAIT;
  assign wb_wake_slot = data[wb_addr][SW-1:0];
  assign wb_wake_proc = data[wb_addr][SW +: PROC_W];
  assign fl_wake      = fl_ok && rs[fl_addr] == RS_WAIT;
  assign fl_wake_slot = data[fl_addr][SW-1:0];
  assign fl_wake_proc = data[fl_addr][SW +: PROC_W];

  function automatic logic in_block(logic [RAW-1:0] a, logic [RAW-1:0] base);
    return (a >= base) && (32'(a) < 32'(base) + BLK);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) begin
        rs[i]   <= (i == 0) ? RS_FULL : RS_EMPTY;
        data[i] <= '0;
      end
    end else begin
      for (int i = 0; i < NREGS; i++) begin
        if (init_valid && in_block(RAW'(i), init_base)) begin
          if (init_first && RAW'(i) == init_base) begin
            rs[i] <= RS_FULL; data[i] <= init_value;
          end else begin
            rs[i] <= RS_EMPTY;
          end
        end else if (rr_wait && rr_addr == RAW'(i)) begin
          rs[i]   <= RS_WAIT;
          data[i] <= XLEN'({rr_proc, rr_slot});
        end else if (rr_empty && rr_addr == RAW'(i) && rs[i] == RS_FULL &&
                     !(HARD_ZERO && i == 0)) begin
          rs[i] <= RS_EMPTY;
        end else if (fl_ok && fl_addr == RAW'(i)) begin
          rs[i] <= RS_FULL; data[i] <= fl_data;
        end else if (wb_ok && wb_addr == RAW'(i)) begin
          rs[i] <= RS_FULL; data[i] <= wb_data;
        end
      end
    end
  end

endmodule
