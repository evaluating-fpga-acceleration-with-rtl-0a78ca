// candidates_distributor: sends each bank's candidates to the worker that
// holds that bank.
//
// It counts banks exactly as the banks distributor does: every candidate
// header (one per raw bank, possibly with zero candidates) selects the next
// worker in round-robin order and the candidate words that follow go to that
// worker. The end-of-event item is consumed here (the workers learn of the
// event end from their bank pipe) and restarts the round-robin at worker 0.
// The distribution scheme is the design's; the end-of-event handling is this
// design's choice. Valid/ready on both sides, zero latency: every output
// carries the input item unchanged, only its valid is steered.
module candidates_distributor
  import velo_pkg::*;
#(
  parameter int unsigned N_WORKERS = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  pipe_item_t           in_item,
  output logic [N_WORKERS-1:0] out_valid,
  input  logic [N_WORKERS-1:0] out_ready,
  output pipe_item_t           out_item
);
  localparam int unsigned WW = (N_WORKERS > 1) ? $clog2(N_WORKERS) : 1;

  logic [WW-1:0] rr, cur, sel;

  always_comb begin
    sel       = (in_item.kind == ITEM_HDR) ? rr : cur;
    out_item  = in_item;
    out_valid = '0;
    if (in_item.kind != ITEM_EOE) out_valid[sel] = in_valid;
    in_ready  = (in_item.kind == ITEM_EOE) ? 1'b1 : out_ready[sel];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr  <= '0;
      cur <= '0;
    end else if (in_valid && in_ready) begin
      if (in_item.kind == ITEM_HDR) begin
        cur <= rr;
        rr  <= (rr == WW'(N_WORKERS - 1)) ? '0 : rr + 1'b1;
      end else if (in_item.kind == ITEM_EOE) begin
        rr <= '0;
      end
    end
  end
endmodule
