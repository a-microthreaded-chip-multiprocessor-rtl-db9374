// gcq: global continuation queue.
//
// A create instruction pushes a pointer to a thread family's header. The GCQ
// reads the header through the I-cache's header port, then walks the family's
// iterator {start, limit, step}, handing the register allocation unit one
// thread instance per clock (index, code pointer, dependency distance and the
// numbers of local and shared registers) until the iteration is complete or
// the RAU holds it back. The next descriptor is started in the following cycle.
// One GCQ serves the whole chip multiprocessor.
//
// Header layout (this design's encoding; the architecture lists only the fields):
//   word 0 = {start[15:0], limit[15:0]}
//   word 1 = {step[15:0], dep_dist[7:0], n_locals[3:0], n_shared[3:0]}
//   the thread code starts at header + 2.
// Timing: a pushed descriptor spends one cycle loading its header, then
// issues one thread per cycle while th_ready is high. Indices run from start
// while index <= limit, step >= 1 (unsigned).
module gcq
  import mt_pkg::*;
#(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned AW    = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  // create request from the pipeline
  input  logic          cre_valid,
  input  logic [AW-1:0] cre_ptr,
  output logic          cre_ready,
  // header read
  output logic [AW-1:0] hdr_addr,
  input  logic [IW-1:0] hdr_w0,
  input  logic [IW-1:0] hdr_w1,
  // thread instances to the RAU
  output logic          th_valid,
  output logic [AW-1:0] th_pc,
  output logic [15:0]   th_index,
  output logic [7:0]    th_dep,
  output logic [3:0]    th_nl,
  output logic [3:0]    th_ng,
  input  logic          th_ready,
  output logic          idle
);

  localparam int unsigned PW = $clog2(DEPTH);

  logic [AW-1:0] q [DEPTH];
  logic [PW-1:0] rd_p, wr_p;
  logic [PW:0]   cnt;

  logic          active;
  logic [15:0]   cur, lim, stp;

  assign cre_ready = (cnt != (PW+1)'(DEPTH));
  assign hdr_addr  = q[rd_p];

  assign th_valid = active;
  assign th_index = cur;

  logic load, pop, push, last;
  assign load = !active && (cnt != 0);
  assign push = cre_valid && cre_ready;
  assign last = (17'(cur) + 17'(stp)) > 17'(lim);
  assign pop  = active && th_ready && last;

  assign idle = !active && (cnt == 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_p <= '0; wr_p <= '0; cnt <= '0;
      active <= 1'b0;
      cur <= '0; lim <= '0; stp <= 16'd1;
      th_pc <= '0; th_dep <= '0; th_nl <= '0; th_ng <= '0;
    end else begin
      if (push) begin
        q[wr_p] <= cre_ptr;
        wr_p    <= PW'(wr_p + 1'b1);
      end
      cnt <= cnt + (PW+1)'(push) - (PW+1)'(pop);
      if (load) begin
        cur    <= hdr_w0[31:16];
        lim    <= hdr_w0[15:0];
        stp    <= (hdr_w1[31:16] == 16'd0) ? 16'd1 : hdr_w1[31:16];
        th_dep <= hdr_w1[15:8];
        th_nl  <= hdr_w1[7:4];
        th_ng  <= hdr_w1[3:0];
        th_pc  <= AW'(hdr_addr + AW'(2));
        // an empty iteration space issues nothing
        active <= (hdr_w0[31:16] <= hdr_w0[15:0]);
        if (hdr_w0[31:16] > hdr_w0[15:0]) begin
          rd_p <= PW'(rd_p + 1'b1);
          cnt  <= cnt + (PW+1)'(push) - 1'b1;
        end
      end else if (active && th_ready) begin
        cur <= cur + stp;
        if (last) begin
          active <= 1'b0;
          rd_p   <= PW'(rd_p + 1'b1);
        end
      end
    end
  end

endmodule
