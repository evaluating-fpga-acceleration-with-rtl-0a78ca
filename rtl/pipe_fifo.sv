// pipe_fifo: a pipe between two kernels, i.e. a synchronous first-in
// first-out buffer with blocking valid/ready handshakes on both sides.
//
// A write is accepted when wr_valid && wr_ready (wr_ready = not full); a read
// happens when rd_valid && rd_ready (rd_valid = not empty). rd_data shows the
// oldest entry combinationally, so a word written in cycle t can be read in
// cycle t+1. Simultaneous read and write are allowed when full or empty as
// usual (full: the read frees a slot only in the next cycle). DEPTH may be any
// value >= 1. The payload type T is a parameter so one FIFO serves every pipe.
// Pipes map to FIFOs as described for the oneAPI pipe feature; the depth of
// each pipe is this design's choice.
module pipe_fifo #(
  parameter type         T     = logic [31:0],
  parameter int unsigned DEPTH = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_valid,
  output logic                       wr_ready,
  input  T                           wr_data,
  output logic                       rd_valid,
  input  logic                       rd_ready,
  output T                           rd_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T                mem [DEPTH];
  logic [PW-1:0]   wr_ptr, rd_ptr;
  logic            do_wr, do_rd;

  assign wr_ready = (count != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign rd_valid = (count != '0);
  assign rd_data  = mem[rd_ptr];
  assign do_wr    = wr_valid && wr_ready;
  assign do_rd    = rd_valid && rd_ready;

  function automatic logic [PW-1:0] incr(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= incr(wr_ptr);
      if (do_rd) rd_ptr <= incr(rd_ptr);
      count <= count + (do_wr ? 1'b1 : 1'b0) - (do_rd ? 1'b1 : 1'b0);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  // The pipe never holds more than DEPTH items
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) count <= DEPTH);
endmodule
