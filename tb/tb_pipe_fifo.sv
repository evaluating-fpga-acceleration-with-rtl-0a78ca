// tb_pipe_fifo: random pushes and pops on a 5-deep pipe (a depth that is not
// a power of two) compared with a queue model: data order, count, full
// (wr_ready low exactly when 5 items are held) and empty (rd_valid low
// exactly when none is held). Inputs change at falling edges, checks at
// rising edges.
module tb_pipe_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int D = 5;
  logic        wr_valid = 0, wr_ready, rd_valid, rd_ready = 0;
  logic [15:0] wr_data = '0, rd_data;
  logic [2:0]  count;

  pipe_fifo #(.T(logic [15:0]), .DEPTH(D)) dut (
    .clk, .rst_n, .wr_valid, .wr_ready, .wr_data, .rd_valid, .rd_ready, .rd_data, .count
  );

  int checks = 0, failures = 0, n_full = 0, n_empty_rd = 0;
  logic [15:0] model [$];
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    check(count == 3'(model.size()), "count");
    check(wr_ready == (model.size() < D), "full flag");
    check(rd_valid == (model.size() > 0), "empty flag");
    if (model.size() == D) n_full++;
    if (rd_valid && rd_ready) begin
      check(rd_data == model[0], $sformatf("data %h exp %h", rd_data, model[0]));
      void'(model.pop_front());
    end
    if (wr_valid && wr_ready) model.push_back(wr_data);
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      // phases: fill, drain, mixed
      wr_valid = (i % 600 < 200) ? ($urandom_range(9) < 8) : (i % 600 < 400) ? ($urandom_range(9) < 2) : $urandom_range(1);
      rd_ready = (i % 600 < 200) ? ($urandom_range(9) < 2) : (i % 600 < 400) ? ($urandom_range(9) < 8) : $urandom_range(1);
      wr_data  = 16'($urandom);
    end
    @(negedge clk);
    check(n_full > 0, "pipe became full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
