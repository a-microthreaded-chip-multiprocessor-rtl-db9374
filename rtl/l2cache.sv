// l2cache: level-2 cache shared by the processors of the chip.
//
// Set-associative, LRU replacement, copy-back with allocation on both reads
// and writes. It serves one request at a time from the L1 side: a line read
// (answered with the whole line) or a one-word write (no answer). A hit is
// answered HIT_LAT cycles after the request is accepted. A miss first writes
// back a dirty victim, then reads the line from main memory, installs it and
// answers; the miss therefore costs HIT_LAT plus the memory latency.
//
// Ports: req/ready from the L1 queue, resp_valid with the line; towards
// memory a line-wide request (read or write, line address) and a response
// carrying the line. Geometry: 4 ways, 32-byte lines and a 5-cycle hit time
// follow the evaluated configuration; the size (256 KiB) is this design's
// choice within the range the architecture allows. Addresses count 32-bit words.
module l2cache
  import mt_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 262144,
  parameter int unsigned WAYS       = 4,
  parameter int unsigned LINE_BYTES = 32,
  parameter int unsigned HIT_LAT    = 5,
  parameter int unsigned ADDR_W     = 20,
  localparam int unsigned LW        = LINE_BYTES / 4,
  localparam int unsigned SETS      = SIZE_BYTES / (LINE_BYTES * WAYS),
  localparam int unsigned OW        = $clog2(LW),
  localparam int unsigned IXW       = $clog2(SETS),
  localparam int unsigned TW        = ADDR_W - OW - IXW
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   req_valid,
  input  logic                   req_we,
  input  logic [ADDR_W-1:0]      req_addr,
  input  logic [XLEN-1:0]        req_wdata,
  output logic                   req_ready,
  output logic                   resp_valid,
  output logic [LW*XLEN-1:0]     resp_line,
  // main memory
  output logic                   mem_req_valid,
  output logic                   mem_req_we,
  output logic [ADDR_W-OW-1:0]   mem_req_addr,
  output logic [LW*XLEN-1:0]     mem_req_wline,
  input  logic                   mem_req_ready,
  input  logic                   mem_resp_valid,
  input  logic [LW*XLEN-1:0]     mem_resp_line,
  output logic                   busy,
  output logic                   miss
);

  localparam int unsigned WW = (WAYS > 1) ? $clog2(WAYS) : 1;

  typedef enum logic [2:0] {S_IDLE, S_LOOK, S_WB, S_FETCH, S_WAITM, S_DONE} state_t;
  state_t st;

  logic [TW-1:0]   tag [SETS*WAYS];
  logic            vld [SETS*WAYS];
  logic            dty [SETS*WAYS];
  logic [WW-1:0]   age [SETS*WAYS];
  logic [XLEN-1:0] dat [SETS*WAYS*LW];

  logic              r_we;
  logic [ADDR_W-1:0] r_addr;
  logic [XLEN-1:0]   r_wdata;
  logic [7:0]        cnt;
  logic [WW-1:0]     way;

  logic [IXW-1:0] ix;
  logic [TW-1:0]  tg;
  assign ix = r_addr[OW +: IXW];
  assign tg = r_addr[ADDR_W-1 -: TW];

  logic          hit;
  logic [WW-1:0] hway, vict;
  always_comb begin
    hit = 1'b0; hway = '0; vict = '0;
    for (int w = 0; w < WAYS; w++)
      if (vld[32'(ix)*WAYS + w] && tag[32'(ix)*WAYS + w] == tg) begin hit = 1'b1; hway = WW'(w); end
    for (int w = WAYS-1; w >= 0; w--)
      if (age[32'(ix)*WAYS + w] == WW'(WAYS-1)) vict = WW'(w);
    for (int w = WAYS-1; w >= 0; w--)
      if (!vld[32'(ix)*WAYS + w]) vict = WW'(w);
  end

  function automatic int unsigned lbase(logic [IXW-1:0] s, logic [WW-1:0] w);
    return (32'(s)*WAYS + 32'(w))*LW;
  endfunction

  assign req_ready = (st == S_IDLE);
  assign busy      = (st != S_IDLE);

  always_comb begin
    for (int k = 0; k < LW; k++) resp_line[k*XLEN +: XLEN] = dat[lbase(ix, way) + k];
  end
  assign resp_valid = (st == S_DONE) && !r_we;

  assign mem_req_valid = (st == S_WB) || (st == S_FETCH);
  assign mem_req_we    = (st == S_WB);
  assign mem_req_addr  = (st == S_WB) ? {tag[32'(ix)*WAYS + 32'(way)], ix} : r_addr[ADDR_W-1:OW];
  always_comb begin
    for (int k = 0; k < LW; k++) mem_req_wline[k*XLEN +: XLEN] = dat[lbase(ix, way) + k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; cnt <= '0; way <= '0; miss <= 1'b0;
      r_we <= 1'b0; r_addr <= '0; r_wdata <= '0;
      for (int i = 0; i < SETS*WAYS; i++) begin
        vld[i] <= 1'b0; dty[i] <= 1'b0; tag[i] <= '0; age[i] <= WW'(i % WAYS);
      end
    end else begin
      miss <= 1'b0;
      unique case (st)
        S_IDLE: if (req_valid) begin
          r_we <= req_we; r_addr <= req_addr; r_wdata <= req_wdata;
          cnt  <= 8'(HIT_LAT - 1);
          st   <= S_LOOK;
        end
        S_LOOK: begin
          if (cnt > 1) cnt <= cnt - 1'b1;
          else if (hit) begin
            way <= hway; st <= S_DONE;
          end else begin
            way  <= vict;
            miss <= 1'b1;
            st   <= (vld[32'(ix)*WAYS + 32'(vict)] && dty[32'(ix)*WAYS + 32'(vict)]) ? S_WB : S_FETCH;
          end
        end
        S_WB:    if (mem_req_ready) st <= S_FETCH;
        S_FETCH: if (mem_req_ready) st <= S_WAITM;
        S_WAITM: if (mem_resp_valid) begin
          for (int k = 0; k < LW; k++) dat[lbase(ix, way) + k] <= mem_resp_line[k*XLEN +: XLEN];
          vld[32'(ix)*WAYS + 32'(way)] <= 1'b1;
          dty[32'(ix)*WAYS + 32'(way)] <= 1'b0;
          tag[32'(ix)*WAYS + 32'(way)] <= tg;
          st <= S_DONE;
        end
        S_DONE: begin
          if (r_we) begin
            dat[lbase(ix, way) + 32'(r_addr[OW-1:0])] <= r_wdata;
            dty[32'(ix)*WAYS + 32'(way)] <= 1'b1;
          end
          for (int w = 0; w < WAYS; w++) begin
            if (WW'(w) == way) age[32'(ix)*WAYS + w] <= '0;
            else if (age[32'(ix)*WAYS + w] < age[32'(ix)*WAYS + 32'(way)])
              age[32'(ix)*WAYS + w] <= age[32'(ix)*WAYS + w] + 1'b1;
          end
          st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
