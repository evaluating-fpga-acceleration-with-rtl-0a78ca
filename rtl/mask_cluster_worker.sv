// mask_cluster_worker: one Mask Clustering Worker of the pipeline.
//
// The worker receives whole raw banks on its bank pipe and the candidates of
// each bank on its candidate pipe. For every bank it
//   1. writes the bank's SP hitmaps into a local SP memory indexed by
//      {sp_col, sp_row} (one byte per SP, a whole sensor of 384x64 SPs) and
//      remembers the written addresses in a clear list;
//   2. for each candidate pixel, reads the 3x4 SPs around the candidate's SP
//      (the candidate SP sits at map position (1,1)) into a 96-bit pixel map,
//      one SP per cycle, SPs outside the sensor reading as empty;
//   3. grows the cluster: starting from the candidate pixel, the 8-connected
//      bit-mask of the cluster is formed with eight shifts ORed together and
//      ANDed with the map, once per cycle, until no new pixel joins;
//   4. counts the cluster's pixels and divides the sums of their columns and
//      rows by that count (restoring divider, one quotient bit per cycle),
//      giving averages with FRAC_BITS fraction bits in sensor coordinates;
//   5. emits a cluster record, and after the last candidate clears the SPs
//      it wrote (a full sweep if the clear list overflowed).
// An end-of-event item on the bank pipe makes it push an end-of-event record
// to its result pipe, pulse `done` to the synchronization arbiter and wait for
// `rel` (release) before taking the next event. After reset the SP memory is
// swept to zero (SP_COLS*SP_ROWS cycles).
//
// Map layout: bit index = pixel_col*16 + pixel_row, pixel_col 0..5 and
// pixel_row 0..15 inside the map. The map size, the candidate position, the
// mask-grow-AND loop and the shift/OR mask come from the algorithm's
// description; the SP memory, clear list, fixed-point averages and the cycle
// timing are this design's own choices. The 22 reserved bits of each result
// record are driven to zero, so they synthesize to constants.
//
// Timing per candidate: the record is offered 30+g cycles after the clock
// edge that accepts the candidate, g being the number of mask steps that
// added pixels (12 SP reads, 1 to place the last SP, g+1 mask steps,
// 15 divide steps, then the result handshake). The next candidate can be
// accepted the cycle after the record is taken.
module mask_cluster_worker
  import velo_pkg::*;
#(
  parameter int unsigned MAX_SP_PER_BANK = 1024
) (
  input  logic       clk,
  input  logic       rst_n,
  // bank pipe (headers, SP words, end of event)
  input  logic       bank_valid,
  output logic       bank_ready,
  input  pipe_item_t bank_item,
  // candidate pipe (headers, candidate words)
  input  logic       cand_valid,
  output logic       cand_ready,
  input  pipe_item_t cand_item,
  // result pipe (cluster records, end of event)
  output logic       res_valid,
  input  logic       res_ready,
  output cluster_t   res_data,
  // synchronization
  output logic       done,
  input  logic       rel,
  output logic       idle
);
  localparam int unsigned MEM_WORDS = SP_COLS * SP_ROWS;
  localparam int unsigned SUM_W     = 11;                  // 96*15 < 2048
  localparam int unsigned NUM_W     = SUM_W + FRAC_BITS;
  localparam int unsigned DEN_W     = 7;                   // size <= 96
  localparam int unsigned CL_W      = $clog2(MAX_SP_PER_BANK + 1);
  localparam int unsigned LI_W      = (MAX_SP_PER_BANK > 1) ? $clog2(MAX_SP_PER_BANK) : 1;

  typedef enum logic [3:0] {
    W_IDLE, W_LOAD, W_CHDR, W_CAND, W_FETCH, W_GROW, W_DIV, W_EMIT,
    W_CLEAR, W_EOE, W_WAIT
  } wstate_e;

  wstate_e state;

  // ---------------------------------------------------------------- masks
  function automatic logic [MAP_BITS-1:0] row_mask(input int unsigned r);
    logic [MAP_BITS-1:0] m = '0;
    for (int unsigned c = 0; c < MAP_COLS; c++) m[c*MAP_ROWS + r] = 1'b1;
    return m;
  endfunction

  localparam logic [MAP_BITS-1:0] ROW_FIRST = row_mask(0);
  localparam logic [MAP_BITS-1:0] ROW_LAST  = row_mask(MAP_ROWS - 1);

  // The cluster and its eight neighbours: eight shifts ORed together.
  // +1 = next row, +MAP_ROWS = next column.
  function automatic logic [MAP_BITS-1:0] grow_mask(input logic [MAP_BITS-1:0] c);
    logic [MAP_BITS-1:0] up, dn, m;
    up = c & ~ROW_LAST;    // pixels that have a row above them
    dn = c & ~ROW_FIRST;   // pixels that have a row below them
    m  = c;
    m |= up << 1;
    m |= dn >> 1;
    m |= c  << MAP_ROWS;
    m |= c  >> MAP_ROWS;
    m |= up << (MAP_ROWS + 1);
    m |= dn << (MAP_ROWS - 1);
    m |= up >> (MAP_ROWS - 1);
    m |= dn >> (MAP_ROWS + 1);
    return m;
  endfunction

  // ------------------------------------------------------------ SP memory
  logic [7:0]           spmem [MEM_WORDS];
  logic                 mem_we;
  logic [SP_ADDR_W-1:0] mem_waddr, mem_raddr;
  logic [7:0]           mem_wdata, mem_rdata;

  always_ff @(posedge clk) begin
    if (mem_we) spmem[mem_waddr] <= mem_wdata;
    mem_rdata <= spmem[mem_raddr];
  end

  // Clear list: SP addresses written for the current bank
  logic [SP_ADDR_W-1:0] clr_list [MAX_SP_PER_BANK];
  logic [CL_W-1:0]      clr_cnt;
  logic                 clr_ovf;
  logic [SP_ADDR_W:0]   clr_idx;

  // ------------------------------------------------------------ registers
  logic [7:0]            bank_id;
  logic [15:0]           sp_left, cand_left;
  logic [PIX_COL_W-1:0]  cand_col;
  logic [PIX_ROW_W-1:0]  cand_row;
  logic [3:0]            fetch_idx;
  logic                  rd_v, rd_oob;
  logic [3:0]            rd_idx;
  logic [MAP_BITS-1:0]   map, cluster, seed;
  logic [NUM_W-1:0]      num_c, num_r;
  logic [DEN_W:0]        rem_c, rem_r;
  logic [DEN_W-1:0]      den;
  logic [4:0]            div_cnt;

  sp_word_t  sp_w;
  bank_hdr_t b_hdr, c_hdr;
  cand_word_t c_w;
  assign sp_w  = sp_word_t'(bank_item.word);
  assign b_hdr = bank_hdr_t'(bank_item.word);
  assign c_hdr = bank_hdr_t'(cand_item.word);
  assign c_w   = cand_word_t'(cand_item.word);

  // SP of the candidate and the SP being fetched
  logic [SP_COL_W-1:0]  cand_spc;
  logic [SP_ROW_W-1:0]  cand_spr;
  logic signed [SP_COL_W+1:0] f_col;
  logic signed [SP_ROW_W+1:0] f_row;
  logic                 f_oob;
  assign cand_spc = cand_col[PIX_COL_W-1:1];
  assign cand_spr = cand_row[PIX_ROW_W-1:2];
  always_comb begin
    f_col = $signed({2'b00, cand_spc}) + $signed({9'd0, fetch_idx[3:2]}) - 11'sd1;
    f_row = $signed({2'b00, cand_spr}) + $signed({6'd0, fetch_idx[1:0]}) - 8'sd1;
    f_oob = (f_col < 0) || (f_col >= $signed(11'(SP_COLS))) ||
            (f_row < 0) || (f_row >= $signed(8'(SP_ROWS)));
  end

  // Cluster growth and statistics
  logic [MAP_BITS-1:0] next_cluster;
  logic [DEN_W-1:0]    size;
  logic [SUM_W-1:0]    sum_col, sum_row;
  assign next_cluster = grow_mask(cluster) & (map | seed);
  always_comb begin
    size    = '0;
    sum_col = '0;
    sum_row = '0;
    for (int unsigned i = 0; i < MAP_BITS; i++) begin
      if (cluster[i]) begin
        size    = size + 1'b1;
        sum_col = sum_col + SUM_W'(i / MAP_ROWS);
        sum_row = sum_row + SUM_W'(i % MAP_ROWS);
      end
    end
  end

  // One restoring-division step for the column and row sums
  logic [DEN_W:0] tc, tr;
  assign tc = {rem_c[DEN_W-1:0], num_c[NUM_W-1]};
  assign tr = {rem_r[DEN_W-1:0], num_r[NUM_W-1]};

  // Result record: map origin is 2 pixel columns / 4 pixel rows before the
  // candidate SP's first pixel.
  logic signed [15:0] col_base, row_base;
  always_comb begin
    col_base = $signed({5'd0, cand_spc, 1'b0}) - 16'sd2;
    row_base = $signed({8'd0, cand_spr, 2'b00}) - 16'sd4;
    res_data = '0;
    if (state == W_EOE) begin
      res_data.is_eoe = 1'b1;
    end else begin
      res_data.bank_id = bank_id;
      res_data.size    = size;
      res_data.col_fx  = (PIX_COL_W+FRAC_BITS)'((col_base <<< FRAC_BITS) + $signed({1'b0, num_c}));
      res_data.row_fx  = (PIX_ROW_W+FRAC_BITS)'((row_base <<< FRAC_BITS) + $signed({1'b0, num_r}));
    end
  end

  // ------------------------------------------------------------ handshakes
  assign bank_ready = (state == W_IDLE) || (state == W_LOAD);
  assign cand_ready = (state == W_CHDR) || (state == W_CAND);
  assign res_valid  = (state == W_EMIT) || (state == W_EOE);
  assign idle       = (state == W_IDLE);

  logic bank_fire, cand_fire, res_fire;
  assign bank_fire = bank_valid && bank_ready;
  assign cand_fire = cand_valid && cand_ready;
  assign res_fire  = res_valid && res_ready;

  always_comb begin
    mem_we    = 1'b0;
    mem_waddr = '0;
    mem_wdata = '0;
    mem_raddr = {f_col[SP_COL_W-1:0], f_row[SP_ROW_W-1:0]};
    if (state == W_LOAD && bank_fire && bank_item.kind == ITEM_WORD) begin
      mem_we    = 1'b1;
      mem_waddr = {sp_w.sp_col, sp_w.sp_row};
      mem_wdata = sp_w.hitmap;
    end else if (state == W_CLEAR) begin
      if (clr_ovf) begin
        mem_we    = (clr_idx < (SP_ADDR_W+1)'(MEM_WORDS));
        mem_waddr = clr_idx[SP_ADDR_W-1:0];
      end else begin
        mem_we    = (clr_idx < (SP_ADDR_W+1)'(clr_cnt));
        mem_waddr = clr_list[clr_idx[LI_W-1:0]];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (state == W_LOAD && bank_fire && bank_item.kind == ITEM_WORD &&
        clr_cnt < CL_W'(MAX_SP_PER_BANK))
      clr_list[clr_cnt[LI_W-1:0]] <= {sp_w.sp_col, sp_w.sp_row};
  end

  // ------------------------------------------------------------ control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= W_CLEAR;       // sweep the SP memory after reset
      clr_ovf   <= 1'b1;
      clr_cnt   <= '0;
      clr_idx   <= '0;
      bank_id   <= '0;
      sp_left   <= '0;
      cand_left <= '0;
      cand_col  <= '0;
      cand_row  <= '0;
      fetch_idx <= '0;
      rd_v      <= 1'b0;
      rd_oob    <= 1'b0;
      rd_idx    <= '0;
      map       <= '0;
      cluster   <= '0;
      seed      <= '0;
      num_c     <= '0;
      num_r     <= '0;
      rem_c     <= '0;
      rem_r     <= '0;
      den       <= '0;
      div_cnt   <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      rd_v <= 1'b0;
      unique case (state)
        W_IDLE: if (bank_fire) begin
          if (bank_item.kind == ITEM_HDR) begin
            bank_id <= b_hdr.bank_id;
            sp_left <= b_hdr.count;
            state   <= (b_hdr.count == 16'd0) ? W_CHDR : W_LOAD;
          end else if (bank_item.kind == ITEM_EOE) begin
            state <= W_EOE;
          end
        end

        W_LOAD: if (bank_fire) begin
          if (clr_cnt == CL_W'(MAX_SP_PER_BANK)) clr_ovf <= 1'b1;
          else                                   clr_cnt <= clr_cnt + 1'b1;
          sp_left <= sp_left - 1'b1;
          if (sp_left == 16'd1) state <= W_CHDR;
        end

        W_CHDR: if (cand_fire) begin
          cand_left <= c_hdr.count;
          clr_idx   <= '0;
          state     <= (c_hdr.count == 16'd0) ? W_CLEAR : W_CAND;
        end

        W_CAND: if (cand_fire) begin
          cand_col  <= c_w.col;
          cand_row  <= c_w.row;
          fetch_idx <= '0;
          state     <= W_FETCH;
        end

        W_FETCH: begin
          // issue one SP read per cycle, place it into the map one cycle later
          if (fetch_idx < 4'(MAP_FETCHES)) begin
            rd_v      <= 1'b1;
            rd_oob    <= f_oob;
            rd_idx    <= fetch_idx;
            fetch_idx <= fetch_idx + 1'b1;
          end
          if (rd_v) begin
            for (int unsigned k = 0; k < 8; k++)
              map[(32'(rd_idx[3:2]) * 2 + k / 4) * MAP_ROWS + 32'(rd_idx[1:0]) * 4 + k % 4]
                <= rd_oob ? 1'b0 : mem_rdata[k];
            if (rd_idx == 4'(MAP_FETCHES - 1)) begin
              seed    <= '0;
              cluster <= '0;
              seed   [(2 + 32'(cand_col[0])) * MAP_ROWS + 4 + 32'(cand_row[1:0])] <= 1'b1;
              cluster[(2 + 32'(cand_col[0])) * MAP_ROWS + 4 + 32'(cand_row[1:0])] <= 1'b1;
              state <= W_GROW;
            end
          end
        end

        W_GROW: begin
          if (next_cluster == cluster) begin
            num_c   <= NUM_W'(sum_col) << FRAC_BITS;
            num_r   <= NUM_W'(sum_row) << FRAC_BITS;
            rem_c   <= '0;
            rem_r   <= '0;
            den     <= size;
            div_cnt <= 5'(NUM_W);
            state   <= W_DIV;
          end else begin
            cluster <= next_cluster;
          end
        end

        W_DIV: begin
          if (tc >= {1'b0, den}) begin
            rem_c <= tc - {1'b0, den};
            num_c <= {num_c[NUM_W-2:0], 1'b1};
          end else begin
            rem_c <= tc;
            num_c <= {num_c[NUM_W-2:0], 1'b0};
          end
          if (tr >= {1'b0, den}) begin
            rem_r <= tr - {1'b0, den};
            num_r <= {num_r[NUM_W-2:0], 1'b1};
          end else begin
            rem_r <= tr;
            num_r <= {num_r[NUM_W-2:0], 1'b0};
          end
          div_cnt <= div_cnt - 1'b1;
          if (div_cnt == 5'd1) state <= W_EMIT;
        end

        W_EMIT: if (res_fire) begin
          cand_left <= cand_left - 1'b1;
          if (cand_left == 16'd1) begin
            clr_idx <= '0;
            state   <= W_CLEAR;
          end else begin
            state <= W_CAND;
          end
        end

        W_CLEAR: begin
          if (!mem_we) begin
            clr_cnt <= '0;
            clr_ovf <= 1'b0;
            clr_idx <= '0;
            state   <= W_IDLE;
          end else begin
            clr_idx <= clr_idx + 1'b1;
          end
        end

        W_EOE: if (res_fire) begin
          done  <= 1'b1;
          state <= W_WAIT;
        end

        W_WAIT: if (rel) state <= W_IDLE;

        default: state <= W_IDLE;
      endcase
    end
  end

  // Candidates only arrive as header then words; the bank pipe sends SP words
  // only after a header.
  a_cand_protocol: assert property (@(posedge clk) disable iff (!rst_n)
    (state == W_CAND && cand_fire) |-> cand_item.kind == ITEM_WORD);
  a_bank_protocol: assert property (@(posedge clk) disable iff (!rst_n)
    (state == W_LOAD && bank_fire) |-> bank_item.kind == ITEM_WORD);
endmodule
