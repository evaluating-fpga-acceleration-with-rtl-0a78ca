// tb_result_writer: three events of random cluster records, each closed by
// an end-of-event record, written through a port with random back-pressure.
// Checks every write address and word (records verbatim, then a trailer with
// the event index and record count), the done pulse per event, that nothing
// is taken while the writer waits for the release, that a new start
// reloads the base address, and that in discard mode records are consumed
// and events completed without any write.
module tb_result_writer;
  import velo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start = 0, discard = 0, in_valid = 0, in_ready, wr_valid, wr_ready = 0, done, rel = 0;
  logic [31:0] dst_base = 32'h200, wr_addr, events_written;
  logic [63:0] wr_data;
  cluster_t    in_data = '0;

  result_writer dut (
    .clk, .rst_n, .start, .dst_base, .discard, .in_valid, .in_ready, .in_data,
    .wr_valid, .wr_ready, .wr_addr, .wr_data, .done, .rel, .events_written
  );

  int checks = 0, failures = 0, n_done = 0, n_held = 0;
  cluster_t src [$];
  logic [63:0] exp_w [$];
  logic [31:0] exp_a;
  bit waiting = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) if (rst_n) begin
    in_valid = (src.size() > 0) && ($urandom_range(3) != 0);
    if (src.size() > 0) in_data = src[0];
    wr_ready = ($urandom_range(3) != 0);
  end

  int n_disc_taken = 0;
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) void'(src.pop_front());
    if (discard && in_valid && in_ready) n_disc_taken++;
    if (discard) check(!wr_valid, "no write in discard mode");
    if (waiting && in_valid) begin
      check(!in_ready, "holds while waiting for release");
      n_held++;
    end
    if (wr_valid && wr_ready) begin
      check(exp_w.size() > 0 && wr_data == exp_w[0] && wr_addr == exp_a,
            $sformatf("write %h @%h exp %h @%h", wr_data, wr_addr, exp_w[0], exp_a));
      void'(exp_w.pop_front());
      exp_a++;
    end
    if (done) begin
      n_done++;
      waiting = 1;
    end
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_events(int ne);
    for (int e = 0; e < ne; e++) begin
      automatic int n = int'($urandom_range(5));
      trailer_t t = '0;
      for (int i = 0; i < n; i++) begin
        automatic cluster_t c = cluster_t'({1'b0, 63'($urandom) << 20 | 63'(i)});
        src.push_back(c);
        exp_w.push_back(64'(c));
      end
      src.push_back(cluster_t'({1'b1, 63'd0}));
      t.is_eoe = 1'b1; t.event_idx = 31'(e); t.n_clusters = 32'(n);
      exp_w.push_back(64'(t));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1; @(negedge clk); start = 0;
    exp_a = dst_base;
    load_events(3);
    for (int e = 0; e < 3; e++) begin
      wait (waiting);
      repeat (4) @(negedge clk);
      rel = 1; waiting = 0; @(negedge clk); rel = 0;
    end
    check(exp_w.size() == 0, "all words written");
    check(n_done == 3 && events_written == 3, "one done per event");
    check(n_held > 0, "release wait was exercised");
    // restart at a new base
    dst_base = 32'h900;
    start = 1; @(negedge clk); start = 0;
    exp_a = dst_base;
    load_events(1);
    wait (waiting);
    @(negedge clk);
    check(exp_w.size() == 0, "restart written");
    rel = 1; waiting = 0; @(negedge clk); rel = 0;
    // discarding variant: records consumed, events completed, nothing written
    discard = 1;
    start = 1; @(negedge clk); start = 0;
    load_events(2);
    exp_w.delete();
    for (int e = 0; e < 2; e++) begin
      wait (waiting);
      @(negedge clk);
      rel = 1; waiting = 0; @(negedge clk); rel = 0;
    end
    wait (src.size() == 0);
    check(n_done == 6 && events_written == 2, "discard mode completes events");
    check(n_disc_taken >= 2, "discard mode consumed records");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
