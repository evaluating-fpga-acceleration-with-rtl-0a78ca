// result_writer: the consumer kernel ("Result Writer"). It writes each
// cluster record it receives as one 64-bit word to host memory, at
// consecutive word addresses from dst_base, and after an event's clusters a
// trailer word (trailer_t: event index and number of clusters). It then
// pulses `done` to the synchronization arbiter and waits for `rel` before
// taking the next event's records.
//
// start loads dst_base and clears the event index. The write port is
// valid/ready (wr_valid, wr_ready, wr_addr, wr_data); one word per cycle
// when the port accepts. With `discard` high the writer behaves the same
// (counts records, pulses done per event, waits for release) but takes one
// record per cycle without touching the write port: the benchmarking variant
// of the consumer that avoids host writes. `discard` should only change
// between batches. Writing results back to host memory and the discarding
// variant are the design's; the record and trailer formats are this
// design's own.
module result_writer
  import velo_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] dst_base,
  input  logic        discard,
  // cluster pipe
  input  logic        in_valid,
  output logic        in_ready,
  input  cluster_t    in_data,
  // host memory write port
  output logic        wr_valid,
  input  logic        wr_ready,
  output logic [31:0] wr_addr,
  output logic [63:0] wr_data,
  // synchronization
  output logic        done,
  input  logic        rel,
  output logic [31:0] events_written
);
  typedef enum logic [0:0] {R_RUN, R_WAIT} rstate_e;

  rstate_e     state;
  logic [31:0] n_clusters;
  trailer_t    trl;

  always_comb begin
    trl            = '0;
    trl.is_eoe     = 1'b1;
    trl.event_idx  = events_written[30:0];
    trl.n_clusters = n_clusters;
  end

  logic take;
  assign wr_valid = (state == R_RUN) && in_valid && !discard;
  assign wr_data  = in_data.is_eoe ? 64'(trl) : 64'(in_data);
  assign in_ready = (state == R_RUN) && (wr_ready || discard);
  assign take     = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= R_RUN;
      n_clusters     <= '0;
      events_written <= '0;
      wr_addr        <= '0;
      done           <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        wr_addr        <= dst_base;
        events_written <= '0;
        n_clusters     <= '0;
      end else begin
        unique case (state)
          R_RUN: if (take) begin
            if (!discard) wr_addr <= wr_addr + 1'b1;
            if (in_data.is_eoe) begin
              n_clusters     <= '0;
              events_written <= events_written + 1'b1;
              done           <= 1'b1;
              state          <= R_WAIT;
            end else begin
              n_clusters <= n_clusters + 1'b1;
            end
          end
          R_WAIT: if (rel) state <= R_RUN;
          default: state <= R_RUN;
        endcase
      end
    end
  end
endmodule
