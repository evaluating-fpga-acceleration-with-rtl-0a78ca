// scaling_lane: one accelerator with NW workers and its own host-memory
// model, for the worker-scaling testbench. It measures the cycles from
// `start` until the accelerator is no longer busy. `discard` selects the
// accelerator's result-dropping mode for the batch; `n_writes` counts the
// host writes.
module scaling_lane #(
  parameter int unsigned NW       = 16,
  parameter int unsigned N_EV     = 10,
  parameter int unsigned RD_WORDS = 2097152,
  parameter int unsigned WR_WORDS = 524288
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        discard,
  output logic        busy,
  output logic [31:0] events_done,
  output longint      cycles,
  output longint      n_writes
);
  logic        rd_req_valid, rd_req_ready, rd_resp_valid, wr_valid, wr_ready;
  logic [31:0] rd_addr, rd_resp_data, wr_addr;
  logic [63:0] wr_data;

  velo_cluster_accel #(.N_WORKERS(NW)) dut (
    .clk, .rst_n, .start, .src_base(32'd0), .dst_base(32'd0), .n_events(N_EV), .discard_results(discard),
    .busy, .events_done,
    .rd_req_valid, .rd_req_ready, .rd_addr, .rd_resp_valid, .rd_resp_data,
    .wr_valid, .wr_ready, .wr_addr, .wr_data
  );

  host_mem_model #(.RD_WORDS(RD_WORDS), .WR_WORDS(WR_WORDS), .LATENCY(8), .STALL_PCT(0)) u_host (
    .clk, .rd_req_valid, .rd_req_ready, .rd_addr, .rd_resp_valid, .rd_resp_data,
    .wr_valid, .wr_ready, .wr_addr, .wr_data
  );

  assign n_writes = u_host.n_writes;

  logic running = 1'b0;
  always @(posedge clk) begin
    if (start) begin
      running <= 1'b1;
      cycles  <= 0;
    end else if (running) begin
      if (busy) cycles <= cycles + 1;
      else      running <= 1'b0;
    end
  end
endmodule
