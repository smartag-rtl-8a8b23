// smartag_correct: SMARTag error-correction step for one set row.
//
// Runs only after a parity check has failed. It takes the lowest-numbered way
// e whose parity fails and looks for an ECC that covers it: if e holds a code
// (its UPL names another way k) the pair is (keeper k, holder e); if e keeps
// its own upper part, the pair is (e, the lowest valid way whose UPL names e).
// The pair's 38-bit codeword is {keeper's stored 19 bits, holder's lower 12
// bits} plus the 7 check bits in the holder's upper part; a single error in
// it is corrected and both entries are written back with fresh parity
// (ST_CORRECTED). Without such a pair, a clean line is dropped, since it can be
// fetched again (ST_INVALIDATED), and a dirty line is reported
// (ST_UNCORRECTABLE, row unchanged). The document gives these three outcomes.
// This design adds the double-error case: when the decoder finds two errors,
// every tag that takes its upper part from the keeper is lost, so these tags
// are invalidated if all are clean and reported otherwise. One way is handled
// per call; the controller repeats until the row is clean. Combinational.
module smartag_correct
  import smartag_pkg::*;
(
  input  row_t       row,
  input  logic [3:0] parity_err,
  output row_t       new_row,
  output status_e    status,
  output way_t       err_way,
  output logic       any_err
);

  way_t       k, h;
  logic       found;
  ecc_data_t  data_corr;
  check_t     check_corr;
  logic       single_err, double_err;

  always_comb begin
    err_way = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (parity_err[w]) err_way = way_t'(w);
    end
    any_err = |parity_err;

    k     = err_way;
    h     = err_way;
    found = 1'b0;
    if (row[err_way].upl != err_way) begin
      k     = row[err_way].upl;
      found = row[row[err_way].upl].valid;
    end else begin
      for (int v = WAYS - 1; v >= 0; v--) begin
        if (way_t'(v) != err_way && row[v].valid && row[v].upl == err_way) begin
          h     = way_t'(v);
          found = 1'b1;
        end
      end
    end
  end

  secded_dec u_dec (
    .data       ({row[k].stored, lower_of(row[h].stored)}),
    .check      (upper_of(row[h].stored)),
    .data_corr  (data_corr),
    .check_corr (check_corr),
    .single_err (single_err),
    .double_err (double_err)
  );

  always_comb begin
    logic [3:0] lost;
    logic       lost_dirty;
    new_row = row;
    status  = ST_OK;
    lost    = '0;
    lost_dirty = 1'b0;
    if (any_err) begin
      if (found && !double_err) begin
        new_row[k].stored = data_corr[DATA_W-1:LOWER_W];
        new_row[k].parity = parity_of(data_corr[DATA_W-1:LOWER_W]);
        new_row[h].stored = {check_corr, data_corr[LOWER_W-1:0]};
        new_row[h].parity = parity_of({check_corr, data_corr[LOWER_W-1:0]});
        status            = ST_CORRECTED;
      end else begin
        if (found) begin
          for (int v = 0; v < WAYS; v++) begin
            lost[v] = row[v].valid && row[v].upl == k;
          end
        end else begin
          lost[err_way] = 1'b1;
        end
        for (int v = 0; v < WAYS; v++) begin
          if (lost[v] && row[v].dirty) lost_dirty = 1'b1;
        end
        if (lost_dirty) begin
          status = ST_UNCORRECTABLE;
        end else begin
          status = ST_INVALIDATED;
          for (int v = 0; v < WAYS; v++) begin
            if (lost[v]) begin
              new_row[v].valid  = 1'b0;
              new_row[v].dirty  = 1'b0;
              new_row[v].upl    = way_t'(v);
              new_row[v].parity = parity_of(row[v].stored);
            end
          end
        end
      end
    end
  end

  logic unused;
  assign unused = single_err;

endmodule
