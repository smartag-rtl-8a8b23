// smartag_tag_rebuild: UPL multiplexer and parity check of one SMARTag set.
//
// This is the normal-access path of the tag array. Each way takes its upper
// 7 bits from the stored entry of the way named by its UPL and its lower 12
// bits from its own entry, so a tag whose upper part was given over to an ECC
// is rebuilt from the tag it shares that upper part with; the ECC itself is
// not decoded (bypassed). Each entry's parity is checked over its stored
// 19 bits. parity_err flags a valid way whose own entry fails; tag_err also
// flags a valid way whose upper-part source fails, since its rebuilt tag is
// then suspect too. ecc_prot flags valid ways that belong to an ECC pair: a
// holder (UPL differs from its own number) or a keeper named by another valid
// way's UPL. The UPL multiplexing follows the document; the parity coverage
// (stored bits only) is this design's choice. Purely combinational.
module smartag_tag_rebuild
  import smartag_pkg::*;
(
  input  row_t       row,
  output tag_vec_t   tag,
  output logic [3:0] parity_err,
  output logic [3:0] tag_err,
  output logic [3:0] ecc_prot
);

  logic [3:0] bad;

  always_comb begin
    for (int w = 0; w < WAYS; w++) begin
      bad[w] = parity_of(row[w].stored) != row[w].parity;
    end
    for (int w = 0; w < WAYS; w++) begin
      tag[w]        = {upper_of(row[row[w].upl].stored), lower_of(row[w].stored)};
      parity_err[w] = row[w].valid & bad[w];
      tag_err[w]    = row[w].valid & (bad[w] | bad[row[w].upl]);
      ecc_prot[w]   = row[w].valid & (row[w].upl != way_t'(w));
      for (int v = 0; v < WAYS; v++) begin
        if (v != w && row[v].valid && row[w].valid && row[v].upl == way_t'(w)) ecc_prot[w] = 1'b1;
      end
    end
  end

endmodule
