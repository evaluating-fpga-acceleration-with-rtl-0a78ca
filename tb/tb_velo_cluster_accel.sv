// tb_velo_cluster_accel: end-to-end test of the whole accelerator with every
// parameter at its default (16 workers). It builds N_EVENTS events of 208
// random raw banks in a host-memory model, runs them with one start pulse,
// and checks every written cluster record against the flood-fill reference
// (per event as a multiset, since the collector interleaves workers), every
// end-of-event trailer, and the number of barrier releases.
// It also counts how often each mechanism of the design happened and fails
// if one never did: round-robin wrap past the last worker, back-pressure on
// the loader's pipes, read and write port stalls, the barrier holding the
// loader while workers are still busy, a clear-list overflow sweep, map
// fetches outside the sensor, collector contention, empty banks and banks
// without candidates, and the discard mode (a second run of event 0 with
// results dropped: no writes, the event still completes).
module tb_velo_cluster_accel;
  import velo_pkg::*;
  import velo_ref_pkg::*;

  localparam int N_EVENTS = 3;
  localparam int NW       = 16;          // default worker count of the top
  localparam int SRC      = 32'h100;
  localparam int DST      = 32'h40;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start = 0, busy, discard = 0;
  logic [31:0] n_ev = N_EVENTS;
  logic [31:0] events_done;
  logic        rd_req_valid, rd_req_ready, rd_resp_valid, wr_valid, wr_ready;
  logic [31:0] rd_addr, rd_resp_data, wr_addr;
  logic [63:0] wr_data;

  velo_cluster_accel dut (
    .clk, .rst_n, .start, .src_base(SRC), .dst_base(DST), .n_events(n_ev),
    .discard_results(discard), .busy, .events_done,
    .rd_req_valid, .rd_req_ready, .rd_addr, .rd_resp_valid, .rd_resp_data,
    .wr_valid, .wr_ready, .wr_addr, .wr_data
  );

  host_mem_model #(.RD_WORDS(65536), .WR_WORDS(16384), .LATENCY(6), .STALL_PCT(15)) u_host (
    .clk, .rd_req_valid, .rd_req_ready, .rd_addr, .rd_resp_valid, .rd_resp_data,
    .wr_valid, .wr_ready, .wr_addr, .wr_data
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------- mechanism counters
  int n_rr_wrap = 0, n_src_stall = 0, n_barrier_hold = 0, n_ovf = 0;
  int n_oob = 0, n_contention = 0, n_rel = 0, n_empty_bank = 0, n_nocand_bank = 0;
  int n_worker_done = 0, n_discarded = 0;
  longint cyc = 0;
  logic [NW-1:0] w_ovf, w_oob, w_done, w_busy;

  for (genvar w = 0; w < NW; w++) begin : g_mon
    logic ovf_q;
    always @(posedge clk) ovf_q <= dut.g_worker[w].u_worker.clr_ovf;
    assign w_ovf[w]  = dut.g_worker[w].u_worker.clr_ovf && !ovf_q;   // list overflowed
    assign w_oob[w]  = dut.g_worker[w].u_worker.rd_v && dut.g_worker[w].u_worker.rd_oob;
    assign w_done[w] = dut.g_worker[w].u_worker.done;
    assign w_busy[w] = !dut.g_worker[w].u_worker.idle;
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (dut.bd_in_valid && dut.bd_in_ready && dut.bd_in_item.kind == ITEM_HDR &&
        dut.u_banks_dist.rr == 4'(NW - 1)) n_rr_wrap++;
    if ((dut.ld_b_valid && !dut.ld_b_ready) || (dut.ld_c_valid && !dut.ld_c_ready)) n_src_stall++;
    if (dut.u_loader.state == 4'd8 /* P_WAIT */ && w_busy != '0) n_barrier_hold++;   // loader waiting
    if (cyc > 2) n_ovf += $countones(w_ovf);
    n_oob += $countones(w_oob);
    n_worker_done += $countones(w_done);
    if ($countones(dut.cl_valid) > 1) n_contention++;
    if (dut.rel) n_rel++;
    if (discard && dut.rw_valid && dut.rw_ready) n_discarded++;
    if (dut.bd_in_valid && dut.bd_in_ready && dut.bd_in_item.kind == ITEM_HDR &&
        dut.bd_in_item.word[15:0] == 16'd0) n_empty_bank++;
    if (dut.cd_in_valid && dut.cd_in_ready && dut.cd_in_item.kind == ITEM_HDR &&
        dut.cd_in_item.word[15:0] == 16'd0) n_nocand_bank++;
  end

  initial begin
    #20000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ stimulus
  int unsigned exp_cnt [N_EVENTS][logic [63:0]];
  int          exp_n   [N_EVENTS];

  initial begin
    int unsigned a;
    bank_model b;
    bank_hdr_t h;
    longint t_start;
    a = SRC;
    for (int e = 0; e < N_EVENTS; e++) begin
      automatic int unsigned hdr_addr = a;
      exp_n[e] = 0;
      a++;
      for (int k = 0; k < N_RAW_BANKS; k++) begin
        if (e == 0 && k == 5) begin
          b = new(k);                                       // empty bank
        end else if (e == 1 && k == 20) begin
          b = new(k);                                       // > 1024 SPs
          for (int i = 0; i < 384; i++)
            for (int j = 0; j < 3; j++) b.set_pix(2 * i, 16 * j);
          b.cand_col.push_back(100); b.cand_row.push_back(16);
          b.cand_col.push_back(0);   b.cand_row.push_back(0);
        end else if (e == 2 && k == 20) begin
          b = new(k);                                       // same place, after it
          b.set_pix(101, 17); b.cand_col.push_back(101); b.cand_row.push_back(17);
          b.set_pix(3, 1);    b.cand_col.push_back(3);   b.cand_row.push_back(1);
        end else if (k == 9) begin
          b = new(k);                                       // no candidates
          b.add_blob(200, 100, 1'b0);
        end else begin
          b = random_bank(k, int'($urandom_range(1, 4)), (k % 13 == 0));
        end
        h = '0; h.bank_id = 8'(k); h.count = 16'(b.sp_order.size());
        u_host.rd_mem[a++] = h;
        for (int i = 0; i < b.sp_order.size(); i++) u_host.rd_mem[a++] = b.sp_word(i);
        h.count = 16'(b.cand_col.size());
        u_host.rd_mem[a++] = h;
        for (int i = 0; i < b.cand_col.size(); i++) begin
          automatic cluster_t c = b.expected(i);
          u_host.rd_mem[a++] = b.cand_word(i);
          exp_cnt[e][64'(c)]++;
          exp_n[e]++;
        end
      end
      u_host.rd_mem[hdr_addr] = a - hdr_addr - 1;
    end
    $display("input: %0d words, expected clusters %0d %0d %0d", a - SRC, exp_n[0], exp_n[1], exp_n[2]);

    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    t_start = cyc;
    wait (!busy);
    repeat (20) @(negedge clk);
    $display("all events done after %0d cycles", cyc - t_start);

    // ---------------------------------------------------------- results
    check(events_done == N_EVENTS, $sformatf("events released %0d", events_done));
    check(n_rel == N_EVENTS, "one release per event");
    check(n_worker_done == NW * N_EVENTS, "every worker completed every event");
    a = DST;
    for (int e = 0; e < N_EVENTS; e++) begin
      automatic int got = 0;
      trailer_t t;
      while (!u_host.wr_mem[a][63] && got <= exp_n[e]) begin
        automatic logic [63:0] r = u_host.wr_mem[a++];
        got++;
        if (exp_cnt[e].exists(r) && exp_cnt[e][r] > 0) begin
          exp_cnt[e][r]--;
          checks++;
        end else begin
          check(0, $sformatf("event %0d: unexpected cluster %h", e, r));
        end
      end
      t = trailer_t'(u_host.wr_mem[a++]);
      check(t.is_eoe && t.event_idx == 31'(e), $sformatf("trailer of event %0d", e));
      check(t.n_clusters == 32'(exp_n[e]) && got == exp_n[e],
            $sformatf("event %0d: %0d clusters, trailer %0d, expected %0d", e, got, t.n_clusters, exp_n[e]));
    end
    check(u_host.n_writes == a - DST, "no extra writes");

    // ----------------------------------- discard mode: event 0 once more
    a = u_host.n_writes;
    discard = 1; n_ev = 1;
    @(negedge clk);
    start = 1; @(negedge clk); start = 0;
    @(negedge clk);
    wait (!busy);
    repeat (20) @(negedge clk);
    check(u_host.n_writes == a, "discard mode writes nothing");
    check(events_done == N_EVENTS + 1, "discard mode completes the event");
    check(n_discarded == exp_n[0] + 1, $sformatf("discard mode consumed %0d records", n_discarded));

    // ------------------------------------------------------- mechanisms
    $display("round-robin wraps %0d, source pipe stalls %0d, read stalls %0d, write stalls %0d",
             n_rr_wrap, n_src_stall, u_host.rd_stalls, u_host.wr_stalls);
    $display("barrier holds %0d, overflow sweeps %0d, out-of-sensor fetches %0d, collector contention %0d",
             n_barrier_hold, n_ovf, n_oob, n_contention);
    $display("empty banks %0d, banks without candidates %0d", n_empty_bank, n_nocand_bank);
    check(n_rr_wrap > 0,        "round-robin wrap happened");
    check(n_src_stall > 0,      "pipe back-pressure happened");
    check(u_host.rd_stalls > 0, "read stall happened");
    check(u_host.wr_stalls > 0, "write stall happened");
    check(n_barrier_hold > 0,   "barrier held the loader");
    check(n_ovf > 0,            "clear-list overflow happened");
    check(n_oob > 0,            "out-of-sensor fetch happened");
    check(n_contention > 0,     "collector contention happened");
    check(n_empty_bank > 0,     "empty bank happened");
    check(n_nocand_bank > 0,    "bank without candidates happened");
    check(n_discarded > 0,      "discard mode happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
