// velo_cluster_accel: VeLo mask-clustering accelerator, top level.
//
// A chain of kernels joined by pipes (FIFOs), kept in step per event by a
// central barrier:
//
//   host read port -> banks_candidates_loader -+-> bank pipe -> banks_distributor ------+
//                                              +-> cand pipe -> candidates_distributor -+
//        per worker: bank pipe + cand pipe -> mask_cluster_worker -> result pipe
//   result pipes -> clusters_collector -> pipe -> result_writer -> host write port
//   sync_arbiter <- done from loader, every worker and the writer; -> rel to all
//
// Raw banks go to the workers round-robin, one bank at a time; each worker
// clusters the candidates of the banks it holds. Per event the loader, each
// worker and the writer pulse `done` when their part of the event is over and
// wait; when all have done so the arbiter releases them for the next event.
//
// Control: pulse `start` for one cycle with src_base (32-bit word address of
// the first event header), dst_base (64-bit word address for the results)
// and n_events. `busy` stays high until the last event has been released.
// `events_done` counts released events. With discard_results high the
// writer drops the results instead of writing them (for measuring the
// pipeline without host writes). Host memory ports: see
// banks_candidates_loader (reads) and result_writer (writes). After reset
// each worker spends SP_COLS*SP_ROWS cycles clearing its SP memory; start
// may be given at once, data waits in the pipes meanwhile.
// The kernel set and their connections follow the design; N_WORKERS = 16 is
// its fastest reported configuration. Pipe depths are this design's choice.
module velo_cluster_accel
  import velo_pkg::*;
#(
  parameter int unsigned N_WORKERS       = 16,
  parameter int unsigned RD_DEPTH        = 16,
  parameter int unsigned SRC_PIPE_DEPTH  = 16,
  parameter int unsigned BANK_PIPE_DEPTH = 64,
  parameter int unsigned CAND_PIPE_DEPTH = 32,
  parameter int unsigned RES_PIPE_DEPTH  = 16,
  parameter int unsigned OUT_PIPE_DEPTH  = 16,
  parameter int unsigned MAX_SP_PER_BANK = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  // control
  input  logic        start,
  input  logic [31:0] src_base,
  input  logic [31:0] dst_base,
  input  logic [31:0] n_events,
  input  logic        discard_results,
  output logic        busy,
  output logic [31:0] events_done,
  // host memory read port (banks and candidates)
  output logic        rd_req_valid,
  input  logic        rd_req_ready,
  output logic [31:0] rd_addr,
  input  logic        rd_resp_valid,
  input  logic [31:0] rd_resp_data,
  // host memory write port (clusters)
  output logic        wr_valid,
  input  logic        wr_ready,
  output logic [31:0] wr_addr,
  output logic [63:0] wr_data
);
  logic rel;
  logic producer_done, consumer_done;
  logic [N_WORKERS-1:0] worker_done;

  // ---------------------------------------------------------------- loader
  logic       ld_b_valid, ld_b_ready, ld_c_valid, ld_c_ready;
  pipe_item_t ld_b_item, ld_c_item;

  banks_candidates_loader #(.RD_DEPTH(RD_DEPTH)) u_loader (
    .clk, .rst_n, .start, .src_base, .n_events, .busy,
    .rd_req_valid, .rd_req_ready, .rd_addr, .rd_resp_valid, .rd_resp_data,
    .bank_valid(ld_b_valid), .bank_ready(ld_b_ready), .bank_item(ld_b_item),
    .cand_valid(ld_c_valid), .cand_ready(ld_c_ready), .cand_item(ld_c_item),
    .done(producer_done), .rel
  );

  logic       bd_in_valid, bd_in_ready, cd_in_valid, cd_in_ready;
  pipe_item_t bd_in_item, cd_in_item;

  pipe_fifo #(.T(pipe_item_t), .DEPTH(SRC_PIPE_DEPTH)) u_bank_pipe (
    .clk, .rst_n,
    .wr_valid(ld_b_valid), .wr_ready(ld_b_ready), .wr_data(ld_b_item),
    .rd_valid(bd_in_valid), .rd_ready(bd_in_ready), .rd_data(bd_in_item), .count()
  );
  pipe_fifo #(.T(pipe_item_t), .DEPTH(SRC_PIPE_DEPTH)) u_cand_pipe (
    .clk, .rst_n,
    .wr_valid(ld_c_valid), .wr_ready(ld_c_ready), .wr_data(ld_c_item),
    .rd_valid(cd_in_valid), .rd_ready(cd_in_ready), .rd_data(cd_in_item), .count()
  );

  // ----------------------------------------------------------- distributors
  logic [N_WORKERS-1:0] bd_valid, bd_ready, cd_valid, cd_ready;
  pipe_item_t           bd_item, cd_item;

  banks_distributor #(.N_WORKERS(N_WORKERS)) u_banks_dist (
    .clk, .rst_n,
    .in_valid(bd_in_valid), .in_ready(bd_in_ready), .in_item(bd_in_item),
    .out_valid(bd_valid), .out_ready(bd_ready), .out_item(bd_item)
  );
  candidates_distributor #(.N_WORKERS(N_WORKERS)) u_cand_dist (
    .clk, .rst_n,
    .in_valid(cd_in_valid), .in_ready(cd_in_ready), .in_item(cd_in_item),
    .out_valid(cd_valid), .out_ready(cd_ready), .out_item(cd_item)
  );

  // ---------------------------------------------------------------- workers
  logic [N_WORKERS-1:0] cl_valid, cl_ready;
  cluster_t             cl_data [N_WORKERS];

  for (genvar w = 0; w < N_WORKERS; w++) begin : g_worker
    logic       wb_valid, wb_ready, wc_valid, wc_ready, wr_v, wr_r;
    pipe_item_t wb_item, wc_item;
    cluster_t   wr_d;

    pipe_fifo #(.T(pipe_item_t), .DEPTH(BANK_PIPE_DEPTH)) u_bank_in (
      .clk, .rst_n,
      .wr_valid(bd_valid[w]), .wr_ready(bd_ready[w]), .wr_data(bd_item),
      .rd_valid(wb_valid), .rd_ready(wb_ready), .rd_data(wb_item), .count()
    );
    pipe_fifo #(.T(pipe_item_t), .DEPTH(CAND_PIPE_DEPTH)) u_cand_in (
      .clk, .rst_n,
      .wr_valid(cd_valid[w]), .wr_ready(cd_ready[w]), .wr_data(cd_item),
      .rd_valid(wc_valid), .rd_ready(wc_ready), .rd_data(wc_item), .count()
    );

    mask_cluster_worker #(.MAX_SP_PER_BANK(MAX_SP_PER_BANK)) u_worker (
      .clk, .rst_n,
      .bank_valid(wb_valid), .bank_ready(wb_ready), .bank_item(wb_item),
      .cand_valid(wc_valid), .cand_ready(wc_ready), .cand_item(wc_item),
      .res_valid(wr_v), .res_ready(wr_r), .res_data(wr_d),
      .done(worker_done[w]), .rel, .idle()
    );

    pipe_fifo #(.T(cluster_t), .DEPTH(RES_PIPE_DEPTH)) u_res_out (
      .clk, .rst_n,
      .wr_valid(wr_v), .wr_ready(wr_r), .wr_data(wr_d),
      .rd_valid(cl_valid[w]), .rd_ready(cl_ready[w]), .rd_data(cl_data[w]), .count()
    );
  end

  // -------------------------------------------------- collector and writer
  logic     co_valid, co_ready, rw_valid, rw_ready;
  cluster_t co_data, rw_data;

  clusters_collector #(.N_WORKERS(N_WORKERS)) u_collector (
    .clk, .rst_n,
    .in_valid(cl_valid), .in_ready(cl_ready), .in_data(cl_data),
    .out_valid(co_valid), .out_ready(co_ready), .out_data(co_data)
  );

  pipe_fifo #(.T(cluster_t), .DEPTH(OUT_PIPE_DEPTH)) u_out_pipe (
    .clk, .rst_n,
    .wr_valid(co_valid), .wr_ready(co_ready), .wr_data(co_data),
    .rd_valid(rw_valid), .rd_ready(rw_ready), .rd_data(rw_data), .count()
  );

  result_writer u_writer (
    .clk, .rst_n, .start, .dst_base, .discard(discard_results),
    .in_valid(rw_valid), .in_ready(rw_ready), .in_data(rw_data),
    .wr_valid, .wr_ready, .wr_addr, .wr_data,
    .done(consumer_done), .rel, .events_written()
  );

  // ---------------------------------------------------------------- barrier
  sync_arbiter #(.N_WORKERS(N_WORKERS)) u_arbiter (
    .clk, .rst_n,
    .producer_done, .worker_done, .consumer_done,
    .rel, .events_released(events_done)
  );
endmodule
