// sync_arbiter: the synchronization arbiter, a central barrier.
//
// The producer, every worker and the consumer each send one completion pulse
// per event (producer_done, worker_done[i], consumer_done). The arbiter keeps
// one pending flag per participant; once all N_WORKERS+2 flags are set it
// raises `rel` (release) for one cycle, clears the flags and counts the
// event. A completion arriving in the release cycle belongs to the next
// event. A participant must not complete twice before a release (asserted).
// The barrier itself is the design's; one-cycle pulses in place of pipes are
// this design's choice.
module sync_arbiter #(
  parameter int unsigned N_WORKERS = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 producer_done,
  input  logic [N_WORKERS-1:0] worker_done,
  input  logic                 consumer_done,
  output logic                 rel,
  output logic [31:0]          events_released
);
  localparam int unsigned NP = N_WORKERS + 2;

  logic [NP-1:0] pending, arrive;
  assign arrive = {consumer_done, producer_done, worker_done};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending         <= '0;
      rel             <= 1'b0;
      events_released <= '0;
    end else if (!rel && &(pending | arrive)) begin
      pending         <= '0;
      rel             <= 1'b1;
      events_released <= events_released + 1'b1;
    end else begin
      pending <= (rel ? '0 : pending) | arrive;
      rel     <= 1'b0;
    end
  end

  a_single_done: assert property (@(posedge clk) disable iff (!rst_n)
    !rel |-> (pending & arrive) == '0);
endmodule
