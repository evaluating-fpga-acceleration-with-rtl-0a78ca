// tb_clusters_collector: 4 workers each send a random number of cluster
// records followed by an end-of-event record, for 4 events, with random
// source gaps and random back-pressure from the output. Checks: every record
// of an event comes out exactly once and before that event's single
// end-of-event record; no record of the next event passes it; with all
// workers ready, service rotates (no worker is served twice in a row while
// another waits).
module tb_clusters_collector;
  import velo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NW = 4;
  localparam int NE = 4;
  logic [NW-1:0] in_valid = '0, in_ready;
  cluster_t      in_data [NW];
  logic          out_valid, out_ready = 0;
  cluster_t      out_data;

  clusters_collector #(.N_WORKERS(NW)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data
  );

  int checks = 0, failures = 0, ev = 0, n_fair = 0;
  cluster_t src [NW][$];
  int unsigned exp_cnt [NE][logic [63:0]];
  int          exp_n [NE], got_n [NE];
  int          last_w = -1;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) if (rst_n) begin
    for (int w = 0; w < NW; w++) begin
      in_valid[w] = (src[w].size() > 0) && ($urandom_range(3) != 0);
      if (src[w].size() > 0) in_data[w] = src[w][0];
    end
    out_ready = ($urandom_range(3) != 0);
  end

  always @(posedge clk) if (rst_n) begin
    for (int w = 0; w < NW; w++)
      if (in_valid[w] && in_ready[w]) begin
        if (!in_data[w].is_eoe) begin
          if (w == last_w && $countones(in_valid & ~dut.eoe_seen) > 1) check(0, "round-robin order");
          else n_fair++;
        end
        last_w = w;
        void'(src[w].pop_front());
      end
    if (out_valid && out_ready) begin
      if (out_data.is_eoe) begin
        check(got_n[ev] == exp_n[ev], $sformatf("event %0d: %0d of %0d records before its end", ev, got_n[ev], exp_n[ev]));
        ev++;
      end else if (ev < NE && exp_cnt[ev].exists(64'(out_data)) && exp_cnt[ev][64'(out_data)] > 0) begin
        exp_cnt[ev][64'(out_data)]--;
        got_n[ev]++;
        checks++;
      end else begin
        check(0, $sformatf("record %h not expected in event %0d", out_data, ev));
      end
    end
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < NW; w++) in_data[w] = '0;
    for (int e = 0; e < NE; e++) begin
      exp_n[e] = 0; got_n[e] = 0;
      for (int w = 0; w < NW; w++) begin
        automatic int n = int'($urandom_range(6));
        for (int i = 0; i < n; i++) begin
          automatic cluster_t c = '0;
          c.bank_id = 8'(w);
          c.size    = 7'(e + 1);
          c.col_fx  = 14'(i);
          c.row_fx  = 12'($urandom);
          src[w].push_back(c);
          exp_cnt[e][64'(c)]++;
          exp_n[e]++;
        end
        src[w].push_back(cluster_t'({1'b1, 63'd0}));
      end
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (ev == NE);
    repeat (20) @(negedge clk);
    check(!out_valid, "nothing after the last event");
    check(n_fair > 0, "records forwarded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
