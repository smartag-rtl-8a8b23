// smartag_transition: names the set-state-machine condition of a miss.
//
// On a miss the victim's tag (the evicting tag) is replaced by the incoming
// one. The condition is found by comparing the incoming upper part with the
// evicting one and with the upper parts of the three remaining valid tags:
//   a  incoming equals evicting (state unchanged, no UPL change needed)
//   b  incoming and evicting both differ from every remaining upper part
//   d  incoming differs from every remaining upper part (evicting did not)
//   c/e incoming equals exactly one remaining upper part (c when the set was
//      in S00, e otherwise)
//   f  incoming equals two remaining upper parts
//   g  incoming equals all three remaining upper parts
// The conditions and their meaning are the document's; resolving c against e
// by the old state, the priority order and treating an invalid victim as
// differing from everything are this design's choices. The next state itself
// is computed from the new set contents by smartag_classify. Combinational.
module smartag_transition
  import smartag_pkg::*;
(
  input  upper_vec_t upper,
  input  logic [3:0] valid,
  input  way_t       victim,
  input  upper_t     new_upper,
  input  set_state_e old_state,
  output event_e     ev
);

  always_comb begin
    int  cnt;
    logic ev_shared;
    cnt       = 0;
    ev_shared = 1'b0;
    for (int w = 0; w < WAYS; w++) begin
      if (way_t'(w) != victim && valid[w]) begin
        if (upper[w] == new_upper) cnt++;
        if (valid[victim] && upper[w] == upper[victim]) ev_shared = 1'b1;
      end
    end
    if (valid[victim] && upper[victim] == new_upper) ev = EV_A;
    else if (cnt == 0 && !ev_shared)                 ev = EV_B;
    else if (cnt == 0)                               ev = EV_D;
    else if (cnt == 1)                               ev = (old_state == S00) ? EV_C : EV_E;
    else if (cnt == 2)                               ev = EV_F;
    else                                             ev = EV_G;
  end

endmodule
