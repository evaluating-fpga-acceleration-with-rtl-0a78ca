// banks_distributor: spreads the raw banks of an event over the workers in
// round-robin order, a whole bank at a time.
//
// A bank header selects the next worker (bank 0 of an event goes to worker 0,
// bank 1 to worker 1, ... wrapping after N_WORKERS); the SP words that follow
// go to the same worker until the next header. An end-of-event item is
// broadcast to every worker, one worker per cycle, and restarts the
// round-robin at worker 0, so the candidates distributor, which counts banks
// the same way, sends each bank's candidates to the worker holding that bank.
// Round-robin distribution at raw-bank level is the scheme of the design;
// the broadcast and the restart at each event are this design's choice.
// Input and outputs are valid/ready; an item is forwarded combinationally
// (zero latency) to the selected output; the item bus is shared by all
// outputs, only the valid is steered.
module banks_distributor
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

  logic [WW-1:0] rr;     // worker that receives the next bank
  logic [WW-1:0] cur;    // worker receiving the current bank
  logic [WW-1:0] bc;     // broadcast position for end of event
  logic [WW-1:0] sel;

  function automatic logic [WW-1:0] next_w(input logic [WW-1:0] w);
    return (w == WW'(N_WORKERS - 1)) ? '0 : w + 1'b1;
  endfunction

  always_comb begin
    unique case (in_item.kind)
      ITEM_HDR: sel = rr;
      ITEM_EOE: sel = bc;
      default:  sel = cur;
    endcase
    out_item  = in_item;
    out_valid = '0;
    out_valid[sel] = in_valid;
    in_ready  = out_ready[sel] && (in_item.kind != ITEM_EOE || bc == WW'(N_WORKERS - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr  <= '0;
      cur <= '0;
      bc  <= '0;
    end else if (in_valid && out_ready[sel]) begin
      unique case (in_item.kind)
        ITEM_HDR: begin
          cur <= rr;
          rr  <= next_w(rr);
        end
        ITEM_EOE: begin
          if (bc == WW'(N_WORKERS - 1)) begin
            bc <= '0;
            rr <= '0;
          end else begin
            bc <= bc + 1'b1;
          end
        end
        default: ;
      endcase
    end
  end
endmodule
