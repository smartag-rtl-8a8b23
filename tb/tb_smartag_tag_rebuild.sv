// tb_smartag_tag_rebuild: self-checking test of the UPL multiplexer and
// parity check.
//
// Rows are built by the reference model from random logical tags (upper
// parts from small pools so that codes are present). Without faults the four
// rebuilt tags must equal the logical tags of the valid ways, no parity error
// may be flagged, and ecc_prot must mark the paired ways. Then one stored or
// parity bit of a random way is flipped: that way must show parity_err, and
// tag_err must also mark every valid way that takes its upper part from it.
module tb_smartag_tag_rebuild;
  import smartag_pkg::*;
  import smartag_ref_pkg::*;

  row_t       row;
  tag_vec_t   tag;
  logic [3:0] parity_err, tag_err, ecc_prot;
  int         checks = 0, failures = 0;
  int         n_holder_tags = 0;

  smartag_tag_rebuild dut (
    .row(row), .tag(tag), .parity_err(parity_err), .tag_err(tag_err), .ecc_prot(ecc_prot)
  );

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      tag_vec_t   t;
      logic [3:0] v, d, exp_terr;
      int         w, b;
      for (int i = 0; i < 4; i++) t[i] = rand_tag(1 + n % 4);
      v   = (n % 4 == 0) ? 4'($urandom) : 4'hf;
      d   = 4'($urandom);
      row = ref_row(t, v, d);
      #1;
      for (int i = 0; i < 4; i++) begin
        if (v[i]) begin
          checks++;
          if (tag[i] !== t[i]) begin
            failures++;
            $display("FAIL tag way %0d = %h expected %h", i, tag[i], t[i]);
          end
          if (row[i].upl != 2'(i)) n_holder_tags++;
        end
      end
      checks++;
      if (parity_err !== 4'b0 || tag_err !== 4'b0 || ecc_prot !== ref_prot(t, v)) begin
        failures++;
        $display("FAIL clean row perr=%b terr=%b prot=%b expected prot %b", parity_err, tag_err, ecc_prot, ref_prot(t, v));
      end
      // one flipped bit among stored[18:0] and parity (bit 19)
      w = $urandom_range(3, 0);
      b = $urandom_range(19, 0);
      row[w] = row[w] ^ (24'd1 << b);
      exp_terr = '0;
      for (int i = 0; i < 4; i++) if (v[i] && (i == w || row[i].upl == 2'(w))) exp_terr[i] = 1'b1;
      #1;
      checks++;
      if (parity_err !== (v & (4'b1 << w)) || tag_err !== exp_terr) begin
        failures++;
        $display("FAIL flip way %0d bit %0d: perr=%b terr=%b expected terr %b", w, b, parity_err, tag_err, exp_terr);
      end
    end
    checks++;
    if (n_holder_tags == 0) begin
      failures++;
      $display("FAIL no tag rebuilt from another way's upper part");
    end
    $display("tags rebuilt through UPL: %0d", n_holder_tags);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
