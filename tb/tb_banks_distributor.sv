// tb_banks_distributor: 4 workers, three events of random bank counts
// (including more banks than workers) with random SP word counts, random
// source gaps and random per-worker back-pressure. Expected per-worker
// streams are built independently: bank k of an event goes to worker k mod 4
// and the end-of-event item goes to all workers. Every output item is
// compared in order.
module tb_banks_distributor;
  import velo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NW = 4;
  logic          in_valid = 0, in_ready;
  pipe_item_t    in_item = '0, out_item;
  logic [NW-1:0] out_valid, out_ready = '0;

  banks_distributor #(.N_WORKERS(NW)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_item, .out_valid, .out_ready, .out_item
  );

  int checks = 0, failures = 0, n_bcast = 0;
  pipe_item_t src [$];
  pipe_item_t exp_q [NW][$];
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // source driver: item changes only after it was taken
  always @(negedge clk) if (rst_n) begin
    in_valid = (src.size() > 0) && ($urandom_range(4) != 0);
    if (src.size() > 0) in_item = src[0];
    out_ready = NW'($urandom);
  end

  always @(posedge clk) if (rst_n) begin
    check($countones(out_valid) <= 1, "one output at a time");
    if (in_valid && in_ready) void'(src.pop_front());
    for (int w = 0; w < NW; w++)
      if (out_valid[w] && out_ready[w]) begin
        if (exp_q[w].size() == 0) check(0, $sformatf("worker %0d: unexpected item", w));
        else begin
          check(out_item == exp_q[w][0], $sformatf("worker %0d: item %h exp %h", w, out_item, exp_q[w][0]));
          if (out_item.kind == ITEM_EOE) n_bcast++;
          void'(exp_q[w].pop_front());
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
    int nb [3] = '{7, 2, 9};
    for (int e = 0; e < 3; e++) begin
      for (int k = 0; k < nb[e]; k++) begin
        pipe_item_t it;
        automatic int n = int'($urandom_range(3));
        it = '{kind: ITEM_HDR, word: {8'(k), 8'(e), 16'(n)}};
        src.push_back(it); exp_q[k % NW].push_back(it);
        for (int i = 0; i < n; i++) begin
          it = '{kind: ITEM_WORD, word: $urandom};
          src.push_back(it); exp_q[k % NW].push_back(it);
        end
      end
      src.push_back('{kind: ITEM_EOE, word: '0});
      for (int w = 0; w < NW; w++) exp_q[w].push_back('{kind: ITEM_EOE, word: '0});
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (src.size() == 0);
    repeat (50) @(negedge clk);
    for (int w = 0; w < NW; w++) check(exp_q[w].size() == 0, $sformatf("worker %0d got all items", w));
    check(n_bcast == 3 * NW, "end of event reached every worker");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
