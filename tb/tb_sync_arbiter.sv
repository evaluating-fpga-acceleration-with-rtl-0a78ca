// tb_sync_arbiter: a barrier with 3 workers (5 participants). For 200
// events, the participants complete in random order and at random times;
// the release must come exactly one cycle after the last completion, never
// earlier, once per event, and the event counter must follow.
module tb_sync_arbiter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NW = 3;
  logic          producer_done = 0, consumer_done = 0, rel;
  logic [NW-1:0] worker_done = '0;
  logic [31:0]   events_released;

  sync_arbiter #(.N_WORKERS(NW)) dut (
    .clk, .rst_n, .producer_done, .worker_done, .consumer_done, .rel, .events_released
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NW+1:0] pend;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int e = 0; e < 200; e++) begin
      pend = '0;
      while (pend != '1) begin
        automatic logic [NW+1:0] d = (NW+2)'($urandom) & ~pend;
        {consumer_done, producer_done, worker_done} = d;
        pend |= d;
        @(negedge clk);
        {consumer_done, producer_done, worker_done} = '0;
        if (pend == '1) break;
        check(!rel, $sformatf("event %0d: no early release", e));
        repeat ($urandom_range(2)) begin
          @(negedge clk);
          check(!rel, "no release while waiting");
        end
      end
      check(rel, $sformatf("event %0d: release after the last completion", e));
      @(negedge clk);
      check(!rel, "release lasts one cycle");
      check(events_released == 32'(e + 1), "event count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
