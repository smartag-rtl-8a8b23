// tb_smartag_correct: self-checking test of the error-correction step.
//
// Rows come from the reference model with random tags, valid and dirty bits.
// Single faults: one stored or parity bit of a valid way is flipped. Expected:
// a way in an ECC pair is restored exactly (ST_CORRECTED); an unpaired clean
// way is invalidated (ST_INVALIDATED); an unpaired dirty way is reported and
// left alone (ST_UNCORRECTABLE). Double faults: one stored bit in the keeper
// and one in its holder; the decoder sees two errors, so all ways sharing the
// keeper's upper part are invalidated when clean, else reported. Every
// outcome must occur.
module tb_smartag_correct;
  import smartag_pkg::*;
  import smartag_ref_pkg::*;

  row_t       row, new_row;
  logic [3:0] parity_err;
  status_e    status;
  way_t       err_way;
  logic       any_err;
  int         checks = 0, failures = 0;
  int         seen [4];

  smartag_correct dut (
    .row(row), .parity_err(parity_err), .new_row(new_row), .status(status),
    .err_way(err_way), .any_err(any_err)
  );

  function automatic logic [3:0] perr_of(row_t r);
    logic [3:0] p;
    for (int i = 0; i < 4; i++) p[i] = r[i].valid & ((^r[i].stored) != r[i].parity);
    return p;
  endfunction

  task automatic expect_outcome(row_t good, status_e st, row_t exp);
    parity_err = perr_of(row);
    #1;
    checks++;
    seen[int'(status)]++;
    if (status !== st || new_row !== exp) begin
      failures++;
      $display("FAIL status=%s expected %s\n  row %h\n  got %h\n  exp %h", status.name(), st.name(), row, new_row, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen[i]) seen[i] = 0;
    // clean row: nothing to do
    begin
      tag_vec_t t;
      for (int i = 0; i < 4; i++) t[i] = rand_tag(2);
      row = ref_row(t, 4'hf, 4'h0);
      expect_outcome(row, ST_OK, row);
    end
    for (int n = 0; n < 6000; n++) begin
      tag_vec_t   t;
      logic [3:0] v, d, prot;
      row_t       good, exp;
      int         w, b;
      for (int i = 0; i < 4; i++) t[i] = rand_tag(1 + n % 5);
      v    = (n % 4 == 0) ? 4'($urandom) | 4'b0001 : 4'hf;
      d    = 4'($urandom) & v;
      good = ref_row(t, v, d);
      prot = ref_prot(t, v);
      if (n % 3 != 2) begin
        // single fault in a valid way
        do w = $urandom_range(3, 0); while (!v[w]);
        b   = $urandom_range(19, 0);
        row = good;
        row[w] = row[w] ^ (24'd1 << b);
        if (prot[w]) begin
          expect_outcome(good, ST_CORRECTED, good);
        end else if (!d[w]) begin
          exp = row;
          exp[w].valid  = 1'b0;
          exp[w].dirty  = 1'b0;
          exp[w].parity = ^row[w].stored;
          expect_outcome(good, ST_INVALIDATED, exp);
        end else begin
          expect_outcome(good, ST_UNCORRECTABLE, row);
        end
      end else begin
        // double fault inside one pair: keeper and holder stored bits
        int h, k, bk, bh;
        h = -1;
        for (int i = 3; i >= 0; i--) if (v[i] && good[i].upl != 2'(i)) h = i;
        if (h >= 0) begin
          logic lost_dirty;
          k   = int'(good[h].upl);
          row = good;
          bk  = $urandom_range(18, 0);
          bh  = $urandom_range(18, 0);
          row[k].stored[bk] = ~row[k].stored[bk];
          row[h].stored[bh] = ~row[h].stored[bh];
          lost_dirty = 1'b0;
          exp = row;
          for (int i = 0; i < 4; i++) begin
            if (v[i] && good[i].upl == 2'(k)) begin
              lost_dirty |= d[i];
              exp[i].valid  = 1'b0;
              exp[i].dirty  = 1'b0;
              exp[i].upl    = 2'(i);
              exp[i].parity = ^row[i].stored;
            end
          end
          if (lost_dirty) expect_outcome(good, ST_UNCORRECTABLE, row);
          else            expect_outcome(good, ST_INVALIDATED, exp);
        end
      end
    end
    foreach (seen[i]) begin
      checks++;
      if (seen[i] == 0) begin
        failures++;
        $display("FAIL outcome %0d never produced", i);
      end
    end
    $display("ok/corrected/invalidated/uncorrectable: %0d %0d %0d %0d", seen[0], seen[1], seen[2], seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
