// tb_mask_cluster_worker: drives one worker with random raw banks and their
// candidates and compares every cluster record with the flood-fill reference
// of velo_ref_pkg. MAX_SP_PER_BANK is lowered to 24 so that some banks
// overflow the clear list and force the full-memory sweep; a following bank
// in the same area then shows whether stale SPs survived. Also checks the
// end-of-event record, the done pulse and the wait for release, and that one
// candidate of a lone pixel takes the expected 33 cycles from acceptance to
// its record offered 30 cycles after the candidate was accepted (12 SP reads,
// placement of the last one, one mask step that adds nothing, 15 divide steps).
module tb_mask_cluster_worker;
  import velo_pkg::*;
  import velo_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       bank_valid, bank_ready, cand_valid, cand_ready, res_valid, res_ready;
  pipe_item_t bank_item, cand_item;
  cluster_t   res_data;
  logic       done, rel, idle;

  mask_cluster_worker #(.MAX_SP_PER_BANK(24)) dut (
    .clk, .rst_n, .bank_valid, .bank_ready, .bank_item,
    .cand_valid, .cand_ready, .cand_item,
    .res_valid, .res_ready, .res_data, .done, .rel, .idle
  );

  int checks = 0, failures = 0;
  int n_sweeps = 0, n_done = 0;
  cluster_t exp_q [$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Called at a falling edge; returns at the falling edge after the item
  // was taken. Inputs change only at falling edges.
  task automatic send_bank(input pipe_item_t it);
    bank_item  = it;
    bank_valid = 1'b1;
    while (!bank_ready) @(negedge clk);  // ready is settled mid-cycle
    @(negedge clk);                     // taken at the rising edge between
    bank_valid = 1'b0;
  endtask

  // Called at a falling edge; returns at the falling edge after the item
  // was taken. Inputs change only at falling edges.
  task automatic send_cand(input pipe_item_t it);
    cand_item  = it;
    cand_valid = 1'b1;
    while (!cand_ready) @(negedge clk);  // ready is settled mid-cycle
    @(negedge clk);                     // taken at the rising edge between
    cand_valid = 1'b0;
  endtask

  task automatic send_whole_bank(bank_model b);
    bank_hdr_t h;
    h = '0; h.bank_id = 8'(b.bank_id); h.count = 16'(b.sp_order.size());
    send_bank('{kind: ITEM_HDR, word: h});
    for (int i = 0; i < b.sp_order.size(); i++)
      send_bank('{kind: ITEM_WORD, word: b.sp_word(i)});
    h.count = 16'(b.cand_col.size());
    send_cand('{kind: ITEM_HDR, word: h});
    for (int i = 0; i < b.cand_col.size(); i++) begin
      exp_q.push_back(b.expected(i));
      send_cand('{kind: ITEM_WORD, word: b.cand_word(i)});
    end
  endtask

  // result checker with random back-pressure
  bit saw_eoe = 0;
  bit bp_off  = 1;
  int cyc = 0, t_acc = 0, t_res = 0, n_res = 0;
  always @(posedge clk) begin
    res_ready <= bp_off || ($urandom_range(3) != 0);
    if (res_valid && res_ready) begin
      if (res_data.is_eoe) begin
        saw_eoe = 1;
        check(exp_q.size() == 0, "end-of-event after all clusters");
      end else if (exp_q.size() == 0) begin
        check(0, "unexpected cluster record");
      end else begin
        cluster_t e;
        e = exp_q.pop_front();
        check(res_data == e, $sformatf("cluster bank %0d exp size %0d col %0h row %0h got size %0d col %0h row %0h",
              e.bank_id, e.size, e.col_fx, e.row_fx, res_data.size, res_data.col_fx, res_data.row_fx));
      end
    end
    if (done) n_done++;
    cyc++;
    if (cand_valid && cand_ready && cand_item.kind == ITEM_WORD) t_acc = cyc;
    if (res_valid && res_ready && !res_data.is_eoe) begin
      t_res = cyc;
      n_res++;
    end
    if (dut.clr_ovf && dut.mem_we && dut.clr_idx == 0 && rst_n) n_sweeps++;
  end

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog sp_left=%0d clr_cnt=%0d ovf=%0d", dut.sp_left, dut.clr_cnt, dut.clr_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bank_model b;
    int t0, t1;
    bank_valid = 0; cand_valid = 0; rel = 0; res_ready = 1;
    bank_item = '0; cand_item = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (idle);                       // initial memory sweep done
    @(negedge clk);
    check(n_sweeps == 1, "initial sweep");

    // latency of a lone single-pixel candidate
    b = new(7);
    b.set_pix(100, 100);
    b.cand_col.push_back(100); b.cand_row.push_back(100);
    fork send_whole_bank(b); join_none
    wait (n_res == 1);
    t0 = t_acc; t1 = t_res;
    check(t1 - t0 == 30, $sformatf("candidate latency %0d cycles", t1 - t0));
    wait (idle);
    @(negedge clk);
    bp_off = 0;

    // random banks, with edges, small and overflowing SP counts
    for (int k = 0; k < 40; k++) begin
      b = random_bank(k, (k % 10 == 0) ? 12 : 2, (k % 7 == 0));
      send_whole_bank(b);
    end
    // empty bank and bank without candidates
    b = new(200); send_whole_bank(b);
    b = new(201); b.add_blob(300, 40, 1'b0); send_whole_bank(b);
    // overflow followed by a bank in the same spot with different content
    b = new(202);
    for (int k = 0; k < 20; k++) b.add_blob(50 + 4 * k, 60, 1'b1);
    send_whole_bank(b);
    b = new(203);
    b.set_pix(51, 61); b.cand_col.push_back(51); b.cand_row.push_back(61);
    b.set_pix(90, 62); b.cand_col.push_back(90); b.cand_row.push_back(62);
    send_whole_bank(b);

    send_bank('{kind: ITEM_EOE, word: '0});
    wait (n_done == 1);
    @(negedge clk);
    repeat (5) @(negedge clk);
    check(!bank_ready, "waits for release");
    check(saw_eoe, "end-of-event record");
    rel = 1'b1; @(negedge clk); rel = 1'b0;
    @(negedge clk);
    check(idle, "idle after release");

    // a second event after the release
    b = random_bank(77, 6, 1'b1);
    send_whole_bank(b);
    send_bank('{kind: ITEM_EOE, word: '0});
    wait (n_done == 2);
    repeat (5) @(negedge clk);
    check(exp_q.size() == 0, "all clusters of event 2");
    check(n_sweeps >= 3, $sformatf("overflow sweeps seen: %0d", n_sweeps - 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
