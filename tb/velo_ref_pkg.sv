// velo_ref_pkg: reference model for the testbenches.
//
// bank_model holds the SPs of one raw bank and its candidates and computes
// the expected cluster of a candidate by a plain flood fill over the pixels
// of the 6x16 window (3x4 SPs, candidate SP in the middle column, second
// row), repeating "add every active pixel that touches the cluster" until
// nothing changes. Averages are sum*16/size with truncation, computed from
// sensor coordinates directly. It shares only the data formats with the RTL.
package velo_ref_pkg;
  import velo_pkg::*;

  class bank_model;
    int unsigned bank_id;
    logic [7:0]  sp [int];        // key: sp_col*64 + sp_row
    int          sp_order [$];    // keys in the order they are sent
    int          cand_col [$];
    int          cand_row [$];

    function new(int unsigned id);
      bank_id = id;
    endfunction

    function automatic bit pix(int c, int r);
      int key;
      if (c < 0 || c >= 768 || r < 0 || r >= 256) return 1'b0;
      key = (c / 2) * 64 + (r / 4);
      if (!sp.exists(key)) return 1'b0;
      return sp[key][(c % 2) * 4 + (r % 4)];
    endfunction

    function automatic void set_pix(int c, int r);
      int key;
      if (c < 0 || c >= 768 || r < 0 || r >= 256) return;
      key = (c / 2) * 64 + (r / 4);
      if (!sp.exists(key)) begin
        sp[key] = 8'h00;
        sp_order.push_back(key);
      end
      sp[key][(c % 2) * 4 + (r % 4)] = 1'b1;
    endfunction

    // random blob around (c, r); the centre pixel is always active
    function automatic void add_blob(int c, int r, bit as_candidate);
      set_pix(c, r);
      for (int dc = -1; dc <= 1; dc++)
        for (int dr = -2; dr <= 2; dr++)
          if ($urandom_range(2) == 0) set_pix(c + dc, r + dr);
      if (as_candidate) begin
        cand_col.push_back(c);
        cand_row.push_back(r);
      end
    endfunction

    function automatic sp_word_t sp_word(int idx);
      sp_word_t w;
      int key = sp_order[idx];
      w = '0;
      w.sp_col = SP_COL_W'(key / 64);
      w.sp_row = SP_ROW_W'(key % 64);
      w.hitmap = sp[key];
      return w;
    endfunction

    function automatic cand_word_t cand_word(int idx);
      cand_word_t w = '0;
      w.col = PIX_COL_W'(cand_col[idx]);
      w.row = PIX_ROW_W'(cand_row[idx]);
      return w;
    endfunction

    function automatic cluster_t expected(int idx);
      int c0, r0, n, sc, sr;
      bit in_cl [6][16];
      bit changed;
      cluster_t res;
      c0 = (cand_col[idx] / 2 - 1) * 2;
      r0 = (cand_row[idx] / 4 - 1) * 4;
      foreach (in_cl[i, j]) in_cl[i][j] = 1'b0;
      in_cl[cand_col[idx] - c0][cand_row[idx] - r0] = 1'b1;
      do begin
        changed = 1'b0;
        for (int i = 0; i < 6; i++)
          for (int j = 0; j < 16; j++)
            if (!in_cl[i][j] && pix(c0 + i, r0 + j))
              for (int di = -1; di <= 1; di++)
                for (int dj = -1; dj <= 1; dj++)
                  if (i + di >= 0 && i + di < 6 && j + dj >= 0 && j + dj < 16 &&
                      in_cl[i + di][j + dj] && !in_cl[i][j]) begin
                    in_cl[i][j] = 1'b1;
                    changed = 1'b1;
                  end
      end while (changed);
      n = 0; sc = 0; sr = 0;
      for (int i = 0; i < 6; i++)
        for (int j = 0; j < 16; j++)
          if (in_cl[i][j]) begin
            n++;
            sc += c0 + i;
            sr += r0 + j;
          end
      res = '0;
      res.bank_id = 8'(bank_id);
      res.size    = 7'(n);
      res.col_fx  = (PIX_COL_W+FRAC_BITS)'((sc * 16) / n);
      res.row_fx  = (PIX_ROW_W+FRAC_BITS)'((sr * 16) / n);
      return res;
    endfunction
  endclass

  // A random bank: n_blobs clusters, each with its centre as candidate,
  // plus a few at the sensor edges when edges is set.
  function automatic bank_model random_bank(int unsigned id, int n_blobs, bit edges);
    bank_model b = new(id);
    for (int k = 0; k < n_blobs; k++)
      b.add_blob(int'($urandom_range(767)), int'($urandom_range(255)), 1'b1);
    if (edges) begin
      b.add_blob(0, 0, 1'b1);
      b.add_blob(767, 255, 1'b1);
      b.add_blob(0, 130, 1'b1);
      b.add_blob(400, 255, 1'b1);
    end
    return b;
  endfunction
endpackage
