// host_mem_model: behavioural model of host memory behind the PCIe DMA, for
// testbenches only (not synthesizable intent). Read port: accepts a request
// when rd_req_ready (randomly withheld STALL_PCT percent of cycles) and
// returns the 32-bit word LATENCY cycles later, in order. Write port: stores
// 64-bit words, wr_ready randomly withheld STALL_PCT percent of cycles.
// Counters report how often each port stalled.
module host_mem_model #(
  parameter int unsigned RD_WORDS  = 65536,
  parameter int unsigned WR_WORDS  = 16384,
  parameter int unsigned LATENCY   = 4,
  parameter int unsigned STALL_PCT = 20
) (
  input  logic        clk,
  input  logic        rd_req_valid,
  output logic        rd_req_ready,
  input  logic [31:0] rd_addr,
  output logic        rd_resp_valid,
  output logic [31:0] rd_resp_data,
  input  logic        wr_valid,
  output logic        wr_ready,
  input  logic [31:0] wr_addr,
  input  logic [63:0] wr_data
);
  logic [31:0] rd_mem [RD_WORDS];
  logic [63:0] wr_mem [WR_WORDS];
  int unsigned n_writes = 0;
  int unsigned rd_stalls = 0;
  int unsigned wr_stalls = 0;
  longint unsigned cycle = 0;

  typedef struct { longint unsigned due; logic [31:0] data; } resp_t;
  resp_t q [$];

  initial begin
    rd_req_ready  = 1'b0;
    wr_ready      = 1'b0;
    rd_resp_valid = 1'b0;
    rd_resp_data  = '0;
    foreach (rd_mem[i]) rd_mem[i] = '0;
    foreach (wr_mem[i]) wr_mem[i] = '0;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rd_req_valid && rd_req_ready)
      q.push_back('{due: cycle + LATENCY, data: rd_mem[rd_addr % RD_WORDS]});
    if (rd_req_valid && !rd_req_ready) rd_stalls++;
    if (wr_valid && wr_ready) begin
      wr_mem[wr_addr % WR_WORDS] <= wr_data;
      n_writes++;
    end
    if (wr_valid && !wr_ready) wr_stalls++;
    if (q.size() > 0 && q[0].due <= cycle) begin
      rd_resp_valid <= 1'b1;
      rd_resp_data  <= q[0].data;
      void'(q.pop_front());
    end else begin
      rd_resp_valid <= 1'b0;
    end
    rd_req_ready <= ($urandom_range(99) >= STALL_PCT);
    wr_ready     <= ($urandom_range(99) >= STALL_PCT);
  end
endmodule
