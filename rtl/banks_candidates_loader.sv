// banks_candidates_loader: the producer kernel ("Banks and Candidates
// Loader"). It reads events from one contiguous host-memory region,
// sequentially, through a single pipelined read port, and splits each event
// into the bank pipe (SP headers and SP words) and the candidate pipe
// (candidate headers and candidate words).
//
// Memory layout of an event (32-bit words, word addresses), this design's
// own encoding:
//   event header : number of words N in the event body
//   body         : per raw bank, an SP header (bank_hdr_t, count = n_sp),
//                  n_sp SP words, a candidate header (count = n_cand) and
//                  n_cand candidate words
// Events follow each other without gaps, starting at src_base.
//
// After the body it sends an end-of-event item on both pipes, pulses `done`
// to the synchronization arbiter and halts until `rel`, then starts the next
// event, n_events in all. Reads: rd_req_valid/rd_req_ready/rd_addr issue a
// read; rd_resp_valid/rd_resp_data return the data in order, any number of
// cycles later, and cannot be refused: the loader keeps at most RD_DEPTH
// reads outstanding or buffered, which its response FIFO can always hold.
// One word is parsed per cycle.
module banks_candidates_loader
  import velo_pkg::*;
#(
  parameter int unsigned RD_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // control
  input  logic        start,
  input  logic [31:0] src_base,
  input  logic [31:0] n_events,
  output logic        busy,
  // host memory read port
  output logic        rd_req_valid,
  input  logic        rd_req_ready,
  output logic [31:0] rd_addr,
  input  logic        rd_resp_valid,
  input  logic [31:0] rd_resp_data,
  // pipes
  output logic        bank_valid,
  input  logic        bank_ready,
  output pipe_item_t  bank_item,
  output logic        cand_valid,
  input  logic        cand_ready,
  output pipe_item_t  cand_item,
  // synchronization
  output logic        done,
  input  logic        rel
);
  localparam int unsigned CW = $clog2(RD_DEPTH + 1);

  typedef enum logic [3:0] {
    P_IDLE, P_EVHDR, P_SPHDR, P_SP, P_CHDR, P_CAND, P_EOE_B, P_EOE_C, P_WAIT
  } pstate_e;

  pstate_e      state;
  logic [31:0]  ev_left, body_left, req_left;
  logic [15:0]  sp_left, cand_left;
  logic [CW-1:0] inflight;

  // response FIFO
  logic         rf_valid, rf_ready;
  logic [31:0]  rf_data;
  logic [CW-1:0] rf_count;

  pipe_fifo #(.T(logic [31:0]), .DEPTH(RD_DEPTH)) u_resp_fifo (
    .clk, .rst_n,
    .wr_valid(rd_resp_valid), .wr_ready(), .wr_data(rd_resp_data),
    .rd_valid(rf_valid), .rd_ready(rf_ready), .rd_data(rf_data),
    .count(rf_count)
  );

  // request side: a read is issued only if its response has a FIFO slot
  logic issue;
  assign rd_req_valid = (req_left != 0) && ((inflight + rf_count) < CW'(RD_DEPTH));
  assign issue        = rd_req_valid && rd_req_ready;

  bank_hdr_t hdr;
  assign hdr = bank_hdr_t'(rf_data);

  // parse side
  always_comb begin
    bank_valid = 1'b0;
    cand_valid = 1'b0;
    bank_item  = '{kind: ITEM_WORD, word: rf_data};
    cand_item  = '{kind: ITEM_WORD, word: rf_data};
    rf_ready   = 1'b0;
    unique case (state)
      P_EVHDR: rf_ready = 1'b1;
      P_SPHDR: begin
        bank_valid     = rf_valid;
        bank_item.kind = ITEM_HDR;
        rf_ready       = bank_ready;
      end
      P_SP: begin
        bank_valid = rf_valid;
        rf_ready   = bank_ready;
      end
      P_CHDR: begin
        cand_valid     = rf_valid;
        cand_item.kind = ITEM_HDR;
        rf_ready       = cand_ready;
      end
      P_CAND: begin
        cand_valid = rf_valid;
        rf_ready   = cand_ready;
      end
      P_EOE_B: begin
        bank_valid = 1'b1;
        bank_item  = '{kind: ITEM_EOE, word: '0};
      end
      P_EOE_C: begin
        cand_valid = 1'b1;
        cand_item  = '{kind: ITEM_EOE, word: '0};
      end
      default: ;
    endcase
  end

  logic pop;
  assign pop  = rf_valid && rf_ready;
  assign busy = (state != P_IDLE);

  // what follows once a bank record has been parsed
  function automatic pstate_e after_bank(input logic [31:0] left);
    return (left == 32'd0) ? P_EOE_B : P_SPHDR;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= P_IDLE;
      ev_left   <= '0;
      body_left <= '0;
      req_left  <= '0;
      sp_left   <= '0;
      cand_left <= '0;
      rd_addr   <= '0;
      inflight  <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      inflight <= inflight + (issue ? 1'b1 : 1'b0) - (rd_resp_valid ? 1'b1 : 1'b0);
      if (issue) rd_addr <= rd_addr + 1'b1;

      // req_left: decremented by issued reads, loaded by the parser
      if (state == P_EVHDR && pop) req_left <= rf_data;
      else if (state == P_IDLE && start && n_events != 0) req_left <= 32'd1;
      else if (state == P_WAIT && rel && ev_left != 32'd1) req_left <= 32'd1;
      else if (issue) req_left <= req_left - 1'b1;

      unique case (state)
        P_IDLE: if (start && n_events != 0) begin
          ev_left <= n_events;
          rd_addr <= src_base;
          state   <= P_EVHDR;
        end

        P_EVHDR: if (pop) begin
          body_left <= rf_data;
          state     <= after_bank(rf_data);
        end

        P_SPHDR: if (pop) begin
          body_left <= body_left - 1'b1;
          sp_left   <= hdr.count;
          state     <= (hdr.count == 16'd0) ? P_CHDR : P_SP;
        end

        P_SP: if (pop) begin
          body_left <= body_left - 1'b1;
          sp_left   <= sp_left - 1'b1;
          if (sp_left == 16'd1) state <= P_CHDR;
        end

        P_CHDR: if (pop) begin
          body_left <= body_left - 1'b1;
          cand_left <= hdr.count;
          state     <= (hdr.count == 16'd0) ? after_bank(body_left - 1'b1) : P_CAND;
        end

        P_CAND: if (pop) begin
          body_left <= body_left - 1'b1;
          cand_left <= cand_left - 1'b1;
          if (cand_left == 16'd1) state <= after_bank(body_left - 1'b1);
        end

        P_EOE_B: if (bank_ready) state <= P_EOE_C;

        P_EOE_C: if (cand_ready) begin
          done  <= 1'b1;
          state <= P_WAIT;
        end

        P_WAIT: if (rel) begin
          ev_left <= ev_left - 1'b1;
          state   <= (ev_left == 32'd1) ? P_IDLE : P_EVHDR;
        end

        default: state <= P_IDLE;
      endcase
    end
  end

  // the response FIFO never overflows
  a_resp_room: assert property (@(posedge clk) disable iff (!rst_n)
    rd_resp_valid |-> rf_count < CW'(RD_DEPTH));
endmodule
