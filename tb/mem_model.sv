// mem_model: behavioural main memory for simulation.
//
// Memory is taken to be unlimited and always to hit. It accepts one
// line-wide request at a time: a write is stored at once, a read is
// answered LAT cycles after it is accepted. Words not written read as a
// fixed function of their address. Not synthesizable; for testbenches only.
module mem_model #(
  parameter int unsigned LAT    = 100,
  parameter int unsigned LW     = 8,
  parameter int unsigned LADDR_W = 17,
  parameter int unsigned WORDS  = 65536
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 req_valid,
  input  logic                 req_we,
  input  logic [LADDR_W-1:0]   req_addr,
  input  logic [LW*32-1:0]     req_wline,
  output logic                 req_ready,
  output logic                 resp_valid,
  output logic [LW*32-1:0]     resp_line
);
  logic [31:0] m [WORDS];
  int unsigned cnt;
  logic        busy;
  logic [LADDR_W-1:0] a;

  int unsigned reads, writes;

  initial for (int i = 0; i < WORDS; i++) m[i] = 32'h1000 + 32'(i);

  assign req_ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; cnt <= 0; resp_valid <= 1'b0; reads <= 0; writes <= 0; a <= '0;
    end else begin
      resp_valid <= 1'b0;
      if (!busy && req_valid) begin
        if (req_we) begin
          for (int k = 0; k < LW; k++) m[(32'(req_addr)*LW + k) % WORDS] <= req_wline[k*32 +: 32];
          writes <= writes + 1;
        end else begin
          busy <= 1'b1; cnt <= (LAT > 1) ? LAT - 1 : 0; a <= req_addr; reads <= reads + 1;
        end
      end else if (busy) begin
        if (cnt == 0) begin
          busy <= 1'b0; resp_valid <= 1'b1;
          for (int k = 0; k < LW; k++) resp_line[k*32 +: 32] <= m[(32'(a)*LW + k) % WORDS];
        end else cnt <= cnt - 1;
      end
    end
  end
endmodule
