// clusters_collector: merges the result pipes of all workers into the one
// pipe of the result writer.
//
// Each cycle it forwards at most one record, taking the workers in
// round-robin order starting after the last one served. An end-of-event
// record from a worker is absorbed and that worker is not served again until
// every worker has sent its end-of-event record; then one end-of-event record
// goes out and the next event begins. Records therefore never cross an event
// boundary. Collecting from all workers is the design's; the arbitration
// order and the event merging are this design's choice. Valid/ready, zero
// latency.
module clusters_collector
  import velo_pkg::*;
#(
  parameter int unsigned N_WORKERS = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N_WORKERS-1:0] in_valid,
  output logic [N_WORKERS-1:0] in_ready,
  input  cluster_t             in_data [N_WORKERS],
  output logic                 out_valid,
  input  logic                 out_ready,
  output cluster_t             out_data
);
  localparam int unsigned WW = (N_WORKERS > 1) ? $clog2(N_WORKERS) : 1;

  logic [N_WORKERS-1:0] eoe_seen;
  logic [WW-1:0]        last;      // worker served last
  logic [WW-1:0]        pick;
  logic                 found;
  logic                 all_eoe;

  assign all_eoe = &eoe_seen;

  // first requesting worker after `last`, round-robin
  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int unsigned k = 1; k <= N_WORKERS; k++) begin
      automatic int unsigned w = (32'(last) + k) % N_WORKERS;
      if (!found && in_valid[w] && !eoe_seen[w]) begin
        found = 1'b1;
        pick  = WW'(w);
      end
    end
  end

  always_comb begin
    in_ready  = '0;
    out_valid = 1'b0;
    out_data  = in_data[pick];
    if (all_eoe) begin
      out_valid = 1'b1;
      out_data  = '0;
      out_data.is_eoe = 1'b1;
    end else if (found) begin
      if (in_data[pick].is_eoe) begin
        in_ready[pick] = 1'b1;
      end else begin
        out_valid      = 1'b1;
        in_ready[pick] = out_ready;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      eoe_seen <= '0;
      last     <= WW'(N_WORKERS - 1);
    end else if (all_eoe) begin
      if (out_ready) eoe_seen <= '0;
    end else if (found && in_ready[pick]) begin
      last <= pick;
      if (in_data[pick].is_eoe) eoe_seen[pick] <= 1'b1;
    end
  end
endmodule
