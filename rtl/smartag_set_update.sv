// smartag_set_update: rebuilds a SMARTag set row when a line is replaced.
//
// Tag contents change only on a miss, so this is where the ECCs are made. The
// old row is turned into four logical tags through the UPL multiplexer, the
// victim's tag is replaced by the incoming one (or the victim is dropped, for
// an invalidation), and the similarity detector picks the new set state and
// UPLs. Every way whose UPL names another way (an ECC holder) stores the 7
// SEC-DED check bits computed over {keeper's full tag, own lower 12 bits} in
// place of its upper part; every other way stores its tag. Parity is
// recomputed for all four entries. The old state and the transition condition
// (a..g) are reported, and upl_update tells whether any UPL changed, which is
// false whenever evicting and incoming upper parts are equal. The whole row is
// rewritten on every miss because the codes cover the lower parts, which
// always change; this follows the document's "the ECC(s) of a set is updated
// for each change in the tag content". The old row must be free of parity
// errors (the controller corrects first). Combinational.
module smartag_set_update
  import smartag_pkg::*;
(
  input  row_t       old_row,
  input  way_t       victim,
  input  tag_t       new_tag,
  input  logic       new_valid,
  input  logic       new_dirty,
  output row_t       new_row,
  output set_state_e old_state,
  output set_state_e new_state,
  output event_e     ev,
  output logic       upl_update,
  output logic       evict_valid,
  output logic       evict_dirty,
  output tag_t       evict_tag
);

  tag_vec_t   old_tag, tag;
  logic [3:0] old_valid, valid;
  logic [3:0] unused_perr, unused_terr, unused_prot;
  upper_vec_t old_upper, upper;
  upl_vec_t   upl;
  check_t     chk [WAYS];

  smartag_tag_rebuild u_rebuild (
    .row        (old_row),
    .tag        (old_tag),
    .parity_err (unused_perr),
    .tag_err    (unused_terr),
    .ecc_prot   (unused_prot)
  );

  always_comb begin
    for (int w = 0; w < WAYS; w++) begin
      old_valid[w] = old_row[w].valid;
      old_upper[w] = upper_of(old_tag[w]);
      tag[w]       = (way_t'(w) == victim) ? new_tag : old_tag[w];
      valid[w]     = (way_t'(w) == victim) ? new_valid : old_row[w].valid;
      upper[w]     = upper_of(tag[w]);
    end
  end

  smartag_classify u_old_class (
    .upper (old_upper),
    .valid (old_valid),
    .state (old_state),
    .upl   ()
  );

  smartag_classify u_new_class (
    .upper (upper),
    .valid (valid),
    .state (new_state),
    .upl   (upl)
  );

  smartag_transition u_trans (
    .upper     (old_upper),
    .valid     (old_valid),
    .victim    (victim),
    .new_upper (upper_of(new_tag)),
    .old_state (old_state),
    .ev        (ev)
  );

  // Way 0 always keeps its own upper part, so only ways 1..3 can hold a code.
  assign chk[0] = '0;
  for (genvar w = 1; w < WAYS; w++) begin : g_enc
    secded_enc u_enc (
      .data  ({tag[upl[w]], lower_of(tag[w])}),
      .check (chk[w])
    );
  end

  always_comb begin
    upl_update = 1'b0;
    for (int w = 0; w < WAYS; w++) begin
      new_row[w].valid  = valid[w];
      new_row[w].dirty  = (way_t'(w) == victim) ? (new_dirty & new_valid) : old_row[w].dirty;
      new_row[w].upl    = upl[w];
      new_row[w].stored = (upl[w] != way_t'(w)) ? {chk[w], lower_of(tag[w])} : tag[w];
      new_row[w].parity = parity_of(new_row[w].stored);
      if (upl[w] != old_row[w].upl) upl_update = 1'b1;
    end
    evict_valid = old_row[victim].valid;
    evict_dirty = old_row[victim].valid & old_row[victim].dirty;
    evict_tag   = old_tag[victim];
  end

  // The error flags of the rebuild are not needed here.
  logic unused;
  assign unused = ^{unused_perr, unused_terr, unused_prot};

endmodule
