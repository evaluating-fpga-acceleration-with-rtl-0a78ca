// tb_worker_scaling: the worker-scaling measurement of the original design,
// run on this RTL. The same batch of events goes through three accelerators
// with 4, 8 and 16 workers. The read port never stalls, so the worker count
// and the port width set the pace. Every event is 208 raw banks of 15 random
// clusters each. That is about 12,500 input words, close to the ~420 kbit
// (~13,000 words) per event implied by the original's 45.3 Gbit/s at
// 107.9 kHz. The batch is 100 events, the original's batch size. Each
// configuration's output is checked record by record against the
// flood-fill reference. Cycles per event and speedup over 4 workers are
// printed, and more workers must never be slower. The batch is then run a
// second time with results dropped instead of written, as the original's
// benchmarks were: that run must write nothing, release every event and take
// within 2% of the cycles of the writing run.
module tb_worker_scaling;
  import velo_pkg::*;
  import velo_ref_pkg::*;

  localparam int N_EV = 100;
  localparam int NC   = 3;

  logic clk = 0, rst_n = 0, start = 0, discard = 0;
  always #5 clk = ~clk;

  logic        busy [NC];
  logic [31:0] ev_done [NC];
  longint      cyc [NC], cyc_w [NC], nwr [NC], nwr_w [NC];

  scaling_lane #(.NW(4),  .N_EV(N_EV)) l4  (.clk, .rst_n, .start, .discard, .busy(busy[0]), .events_done(ev_done[0]), .cycles(cyc[0]), .n_writes(nwr[0]));
  scaling_lane #(.NW(8),  .N_EV(N_EV)) l8  (.clk, .rst_n, .start, .discard, .busy(busy[1]), .events_done(ev_done[1]), .cycles(cyc[1]), .n_writes(nwr[1]));
  scaling_lane #(.NW(16), .N_EV(N_EV)) l16 (.clk, .rst_n, .start, .discard, .busy(busy[2]), .events_done(ev_done[2]), .cycles(cyc[2]), .n_writes(nwr[2]));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #400000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned exp_cnt [N_EV][logic [63:0]];
  int          exp_n   [N_EV];
  logic [63:0] res [];

  task automatic check_lane(int lane, int nw);
    int unsigned cnt [N_EV][logic [63:0]];
    int unsigned a = 0;
    cnt = exp_cnt;
    for (int e = 0; e < N_EV; e++) begin
      int got = 0;
      trailer_t t;
      while (!res[a][63] && got <= exp_n[e]) begin
        logic [63:0] r = res[a++];
        got++;
        if (cnt[e].exists(r) && cnt[e][r] > 0) begin
          cnt[e][r]--;
          checks++;
        end
        else check(0, $sformatf("%0d workers, event %0d: unexpected record %h", nw, e, r));
      end
      t = trailer_t'(res[a++]);
      check(t.is_eoe && t.event_idx == 31'(e) && t.n_clusters == 32'(exp_n[e]) && got == exp_n[e],
            $sformatf("%0d workers, event %0d: %0d records, expected %0d", nw, e, got, exp_n[e]));
    end
  endtask

  initial begin
    int unsigned a = 0;
    int nw [NC] = '{4, 8, 16};
    bank_model b;
    bank_hdr_t h;
    for (int e = 0; e < N_EV; e++) begin
      automatic int unsigned hdr_addr = a;
      automatic logic [31:0] w;
      exp_n[e] = 0;
      a++;
      for (int k = 0; k < N_RAW_BANKS; k++) begin
        b = random_bank(k, 15, (k % 17 == 0));
        h = '0; h.bank_id = 8'(k); h.count = 16'(b.sp_order.size());
        w = h;
        l4.u_host.rd_mem[a] = w; l8.u_host.rd_mem[a] = w; l16.u_host.rd_mem[a] = w; a++;
        for (int i = 0; i < b.sp_order.size(); i++) begin
          w = b.sp_word(i);
          l4.u_host.rd_mem[a] = w; l8.u_host.rd_mem[a] = w; l16.u_host.rd_mem[a] = w; a++;
        end
        h.count = 16'(b.cand_col.size());
        w = h;
        l4.u_host.rd_mem[a] = w; l8.u_host.rd_mem[a] = w; l16.u_host.rd_mem[a] = w; a++;
        for (int i = 0; i < b.cand_col.size(); i++) begin
          automatic cluster_t c = b.expected(i);
          w = b.cand_word(i);
          l4.u_host.rd_mem[a] = w; l8.u_host.rd_mem[a] = w; l16.u_host.rd_mem[a] = w; a++;
          exp_cnt[e][64'(c)]++;
          exp_n[e]++;
        end
      end
      w = a - hdr_addr - 1;
      l4.u_host.rd_mem[hdr_addr] = w; l8.u_host.rd_mem[hdr_addr] = w; l16.u_host.rd_mem[hdr_addr] = w;
    end
    $display("batch of %0d events: %0d input words (%0d per event), %0d candidates in event 0",
             N_EV, a, a / N_EV, exp_n[0]);

    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (25000) @(negedge clk);      // workers clear their SP memories
    start = 1; @(negedge clk); start = 0;
    @(negedge clk);
    wait (!busy[0] && !busy[1] && !busy[2]);
    repeat (20) @(negedge clk);

    res = new[N_EV * 4000];
    foreach (res[i]) res[i] = l4.u_host.wr_mem[i];  check_lane(0, 4);
    foreach (res[i]) res[i] = l8.u_host.wr_mem[i];  check_lane(1, 8);
    foreach (res[i]) res[i] = l16.u_host.wr_mem[i]; check_lane(2, 16);
    for (int i = 0; i < NC; i++) begin
      check(ev_done[i] == N_EV, $sformatf("%0d workers: all events released", nw[i]));
      $display("%2d workers: %0d cycles, %0d cycles/event, speedup %0.2f",
               nw[i], cyc[i], cyc[i] / N_EV, real'(cyc[0]) / real'(cyc[i]));
    end
    check(cyc[1] < cyc[0], "8 workers faster than 4");
    check(cyc[2] <= cyc[1], "16 workers not slower than 8");

    // same batch again, results dropped
    cyc_w = cyc; nwr_w = nwr;
    discard = 1;
    @(negedge clk);
    start = 1; @(negedge clk); start = 0;
    @(negedge clk);
    wait (!busy[0] && !busy[1] && !busy[2]);
    repeat (20) @(negedge clk);
    for (int i = 0; i < NC; i++) begin
      automatic real ratio = real'(cyc[i]) / real'(cyc_w[i]);
      check(nwr[i] == nwr_w[i], $sformatf("%0d workers: nothing written when discarding", nw[i]));
      check(ev_done[i] == 2 * N_EV, $sformatf("%0d workers: all events released when discarding", nw[i]));
      check(ratio > 0.98 && ratio < 1.02,
            $sformatf("%0d workers: discarding run %0d cycles against %0d writing", nw[i], cyc[i], cyc_w[i]));
      $display("%2d workers, results dropped: %0d cycles/event (%0.3f of the writing run)",
               nw[i], cyc[i] / N_EV, ratio);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
