// tb_banks_candidates_loader: three events (random banks, an empty event
// body is not used; an empty bank and a bank without candidates are) laid
// out in a host-memory model with random read stalls and 5 cycles of read
// latency. The bank and candidate pipes see random back-pressure. Checks the
// exact item sequence on each pipe (headers, words, end of event), that no
// address is read twice or out of order, the done pulse after each event,
// that nothing moves while the loader waits for release, and that the
// loader is idle after the last event.
module tb_banks_candidates_loader;
  import velo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int SRC = 32'h40;
  logic        start = 0, busy, done, rel = 0;
  logic        rd_req_valid, rd_req_ready, rd_resp_valid, bank_valid, bank_ready = 0, cand_valid, cand_ready = 0;
  logic [31:0] rd_addr, rd_resp_data;
  pipe_item_t  bank_item, cand_item;

  banks_candidates_loader #(.RD_DEPTH(8)) dut (
    .clk, .rst_n, .start, .src_base(SRC), .n_events(32'd3), .busy,
    .rd_req_valid, .rd_req_ready, .rd_addr, .rd_resp_valid, .rd_resp_data,
    .bank_valid, .bank_ready, .bank_item, .cand_valid, .cand_ready, .cand_item,
    .done, .rel
  );

  logic        wr_ready_unused;
  host_mem_model #(.RD_WORDS(4096), .WR_WORDS(16), .LATENCY(5), .STALL_PCT(30)) u_host (
    .clk, .rd_req_valid, .rd_req_ready, .rd_addr, .rd_resp_valid, .rd_resp_data,
    .wr_valid(1'b0), .wr_ready(wr_ready_unused), .wr_addr(32'd0), .wr_data(64'd0)
  );

  int checks = 0, failures = 0, n_done = 0, n_held = 0;
  pipe_item_t exp_b [$], exp_c [$];
  logic [31:0] next_addr = SRC;
  bit waiting = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) begin
    bank_ready = ($urandom_range(3) != 0);
    cand_ready = ($urandom_range(3) != 0);
  end

  always @(posedge clk) if (rst_n) begin
    if (rd_req_valid && rd_req_ready) begin
      check(rd_addr == next_addr, $sformatf("read address %h exp %h", rd_addr, next_addr));
      next_addr++;
    end
    if (bank_valid && bank_ready) begin
      check(!waiting, "no bank item while waiting");
      check(exp_b.size() > 0 && bank_item == exp_b[0], $sformatf("bank item %h", bank_item));
      void'(exp_b.pop_front());
    end
    if (cand_valid && cand_ready) begin
      check(!waiting, "no candidate item while waiting");
      check(exp_c.size() > 0 && cand_item == exp_c[0], $sformatf("cand item %h", cand_item));
      void'(exp_c.pop_front());
    end
    if (waiting) n_held++;
    if (done) begin
      n_done++;
      waiting = 1;
      check(exp_b.size() == 0 || exp_b[0].kind == ITEM_HDR, "done after the event's last item");
    end
  end

  initial begin
    #500000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned a = SRC;
    for (int e = 0; e < 3; e++) begin
      automatic int unsigned hdr_addr = a;
      a++;
      for (int k = 0; k < 10; k++) begin
        automatic int ns = (k == 3) ? 0 : int'($urandom_range(1, 6));
        automatic int nc = (k == 4) ? 0 : int'($urandom_range(0, 3));
        automatic logic [31:0] w;
        w = {8'(k), 8'(e), 16'(ns)};
        u_host.rd_mem[a++] = w; exp_b.push_back('{kind: ITEM_HDR, word: w});
        for (int i = 0; i < ns; i++) begin
          w = $urandom; u_host.rd_mem[a++] = w; exp_b.push_back('{kind: ITEM_WORD, word: w});
        end
        w = {8'(k), 8'(e), 16'(nc)};
        u_host.rd_mem[a++] = w; exp_c.push_back('{kind: ITEM_HDR, word: w});
        for (int i = 0; i < nc; i++) begin
          w = $urandom; u_host.rd_mem[a++] = w; exp_c.push_back('{kind: ITEM_WORD, word: w});
        end
      end
      exp_b.push_back('{kind: ITEM_EOE, word: '0});
      exp_c.push_back('{kind: ITEM_EOE, word: '0});
      u_host.rd_mem[hdr_addr] = a - hdr_addr - 1;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1; @(negedge clk); start = 0;
    check(busy, "busy after start");
    for (int e = 0; e < 3; e++) begin
      wait (waiting);
      repeat (10) @(negedge clk);
      rel = 1; waiting = 0; @(negedge clk); rel = 0;
    end
    @(negedge clk);
    check(!busy, "idle after the last event");
    check(n_done == 3, "one done per event");
    check(exp_b.size() == 0 && exp_c.size() == 0, "all items delivered");
    check(next_addr == a, "whole region read exactly once");
    check(u_host.rd_stalls > 0 && n_held > 0, "read stalls and release wait exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
