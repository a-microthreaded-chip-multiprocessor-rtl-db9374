// dcache: level-1 data cache of one processor.
//
// Set-associative, LRU replacement, write-through, with decoupled
// (non-blocking) loads: a load that misses does not stall the pipeline. Its
// destination register stays empty, the request travels to the L2 tagged
// with that register, and when the line comes back it is written into the
// cache and the word into the register file (fill port), which wakes any
// thread that has suspended on the register.
//
//   request  one access per cycle from the memory stage (word address).
//            load hit : data returned in the same cycle (ld_hit, ld_data).
//            load miss: queued (ld_miss); req_ready is low while the queue
//                       is full.
//            store    : updates the line if present (no allocation on a
//                       write miss) and is queued for the L2.
//   L2 port  the queue is sent in order, one request at a time; a read waits
//            for its line before the next request is sent.
// A store queued behind a load miss to the same line marks that load
// "no fill": its word still goes to the register (it precedes the store) but
// the stale line is not installed.
// Geometry: 4 ways and 32-byte lines follow the evaluated configuration; the
// size (8 KiB) is this design's choice within the range the architecture allows.
// Addresses count 32-bit words.
module dcache
  import mt_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 8192,
  parameter int unsigned WAYS       = 4,
  parameter int unsigned LINE_BYTES = 32,
  parameter int unsigned QDEPTH     = 8,
  parameter int unsigned ADDR_W     = 20,
  parameter int unsigned DEST_W     = 8,
  localparam int unsigned LW        = LINE_BYTES / 4,
  localparam int unsigned SETS      = SIZE_BYTES / (LINE_BYTES * WAYS),
  localparam int unsigned OW        = $clog2(LW),
  localparam int unsigned IXW       = $clog2(SETS),
  localparam int unsigned TW        = ADDR_W - OW - IXW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 req_valid,
  input  logic                 req_we,
  input  logic [ADDR_W-1:0]    req_addr,
  input  logic [XLEN-1:0]      req_wdata,
  input  logic [DEST_W-1:0]    req_dest,
  output logic                 req_ready,
  output logic                 ld_hit,
  output logic                 ld_miss,
  output logic [XLEN-1:0]      ld_data,
  // register fill for returned misses
  output logic                 fl_valid,
  output logic [DEST_W-1:0]    fl_dest,
  output logic [XLEN-1:0]      fl_data,
  // to the L2
  output logic                 l2_req_valid,
  output logic                 l2_req_we,
  output logic [ADDR_W-1:0]    l2_req_addr,
  output logic [XLEN-1:0]      l2_req_wdata,
  input  logic                 l2_req_ready,
  input  logic                 l2_resp_valid,
  input  logic [LW*XLEN-1:0]   l2_resp_line
);

  localparam int unsigned QW = $clog2(QDEPTH);
  localparam int unsigned WW = (WAYS > 1) ? $clog2(WAYS) : 1;

  // ---------------- arrays ----------------
  logic [TW-1:0]   tag   [SETS*WAYS];
  logic            vld   [SETS*WAYS];
  logic [WW-1:0]   age   [SETS*WAYS];
  logic [XLEN-1:0] dat   [SETS*WAYS*LW];

  function automatic logic [IXW-1:0] ix_of(logic [ADDR_W-1:0] a);
    return a[OW +: IXW];
  endfunction
  function automatic logic [TW-1:0] tg_of(logic [ADDR_W-1:0] a);
    return a[ADDR_W-1 -: TW];
  endfunction

  // ---------------- lookup ----------------
  logic          hit;
  logic [WW-1:0] hway;
  always_comb begin
    hit = 1'b0; hway = '0;
    for (int w = 0; w < WAYS; w++)
      if (vld[32'(ix_of(req_addr))*WAYS + w] && tag[32'(ix_of(req_addr))*WAYS + w] == tg_of(req_addr)) begin
        hit = 1'b1; hway = WW'(w);
      end
  end
  assign ld_data = dat[(32'(ix_of(req_addr))*WAYS + 32'(hway))*LW + 32'(req_addr[OW-1:0])];

  // ---------------- queue to L2 ----------------
  logic                q_we    [QDEPTH];
  logic [ADDR_W-1:0]   q_addr  [QDEPTH];
  logic [XLEN-1:0]     q_wdata [QDEPTH];
  logic [DEST_W-1:0]   q_dest  [QDEPTH];
  logic                q_nofill[QDEPTH];
  logic [QW-1:0]       q_rd, q_wr;
  logic [QW:0]         q_cnt;
  logic                busy;           // head read sent, waiting for its line

  logic enq, deq, acc;
  assign req_ready = (q_cnt != (QW+1)'(QDEPTH));
  assign acc     = req_valid && req_ready;
  assign ld_hit  = acc && !req_we && hit;
  assign ld_miss = acc && !req_we && !hit;
  assign enq     = acc && (req_we || !hit);

  assign l2_req_valid = (q_cnt != 0) && !busy;
  assign l2_req_we    = q_we[q_rd];
  assign l2_req_addr  = q_addr[q_rd];
  assign l2_req_wdata = q_wdata[q_rd];

  assign deq = (l2_req_valid && l2_req_ready && q_we[q_rd]) || (busy && l2_resp_valid);

  // returned line
  logic [ADDR_W-1:0] f_addr;
  assign f_addr   = q_addr[q_rd];
  assign fl_valid = busy && l2_resp_valid;
  assign fl_dest  = q_dest[q_rd];
  assign fl_data  = l2_resp_line[32'(f_addr[OW-1:0])*XLEN +: XLEN];

  logic          f_hit;
  logic [WW-1:0] f_hway, f_vict;
  always_comb begin
    f_hit = 1'b0; f_hway = '0; f_vict = '0;
    for (int w = 0; w < WAYS; w++)
      if (vld[32'(ix_of(f_addr))*WAYS + w] && tag[32'(ix_of(f_addr))*WAYS + w] == tg_of(f_addr)) begin
        f_hit = 1'b1; f_hway = WW'(w);
      end
    for (int w = WAYS-1; w >= 0; w--)
      if (age[32'(ix_of(f_addr))*WAYS + w] == WW'(WAYS-1)) f_vict = WW'(w);
    for (int w = WAYS-1; w >= 0; w--)
      if (!vld[32'(ix_of(f_addr))*WAYS + w]) f_vict = WW'(w);
  end

  logic          do_fill;
  logic [WW-1:0] fway;
  assign do_fill = fl_valid && !q_nofill[q_rd];
  assign fway    = f_hit ? f_hway : f_vict;

  // LRU touch: the way made most recent in a set
  logic          t_en;
  logic [IXW-1:0] t_ix;
  logic [WW-1:0] t_way;
  always_comb begin
    t_en = 1'b0; t_ix = ix_of(req_addr); t_way = hway;
    if (acc && hit) t_en = 1'b1;
    else if (do_fill) begin t_en = 1'b1; t_ix = ix_of(f_addr); t_way = fway; end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_rd <= '0; q_wr <= '0; q_cnt <= '0; busy <= 1'b0;
      for (int i = 0; i < SETS*WAYS; i++) begin
        vld[i] <= 1'b0;
        age[i] <= WW'(i % WAYS);
        tag[i] <= '0;
      end
      for (int i = 0; i < QDEPTH; i++) q_nofill[i] <= 1'b0;
    end else begin
      // queue
      if (enq) begin
        q_we[q_wr]     <= req_we;
        q_addr[q_wr]   <= req_addr;
        q_wdata[q_wr]  <= req_wdata;
        q_dest[q_wr]   <= req_dest;
        q_nofill[q_wr] <= 1'b0;
        q_wr <= QW'(q_wr + 1'b1);
      end
      // a store makes every older queued load of its line skip the fill
      if (acc && req_we)
        for (int i = 0; i < QDEPTH; i++)
          if (!q_we[i] && q_addr[i][ADDR_W-1:OW] == req_addr[ADDR_W-1:OW])
            q_nofill[i] <= 1'b1;
      if (deq) q_rd <= QW'(q_rd + 1'b1);
      q_cnt <= q_cnt + (QW+1)'(enq) - (QW+1)'(deq);
      if (l2_req_valid && l2_req_ready && !q_we[q_rd]) busy <= 1'b1;
      if (busy && l2_resp_valid) busy <= 1'b0;

      // store hit: write through, update the cached word
      if (acc && req_we && hit)
        dat[(32'(ix_of(req_addr))*WAYS + 32'(hway))*LW + 32'(req_addr[OW-1:0])] <= req_wdata;
      // line fill
      if (do_fill) begin
        vld[32'(ix_of(f_addr))*WAYS + 32'(fway)] <= 1'b1;
        tag[32'(ix_of(f_addr))*WAYS + 32'(fway)] <= tg_of(f_addr);
        for (int k = 0; k < LW; k++)
          dat[(32'(ix_of(f_addr))*WAYS + 32'(fway))*LW + k] <= l2_resp_line[k*XLEN +: XLEN];
      end
      // LRU ages
      if (t_en)
        for (int w = 0; w < WAYS; w++) begin
          if (WW'(w) == t_way) age[32'(t_ix)*WAYS + w] <= '0;
          else if (age[32'(t_ix)*WAYS + w] < age[32'(t_ix)*WAYS + 32'(t_way)])
            age[32'(t_ix)*WAYS + w] <= age[32'(t_ix)*WAYS + w] + 1'b1;
        end
    end
  end

endmodule
