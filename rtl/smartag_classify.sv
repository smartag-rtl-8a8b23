// smartag_classify: upper-part similarity detector of one SMARTag set.
//
// Compares the 7-bit upper parts of the valid tags of a set pairwise and
// groups equal ones. From the group sizes it names the set state (S40: all
// four equal, S30: three, S22: two pairs, S20: one pair, S00: none) and assigns
// each way its UPL. Inside a group the lowest-numbered way keeps its upper
// part; in a group of two or three every other member points at it (one or two
// ECC holders sharing one keeper); a group of four forms the two pairs (0,1)
// and (2,3), giving UPL = 0,0,2,2. These are the document's placements in its
// four example sets, extended to any set by this design's lowest-way rule.
// Invalid ways take no part and keep UPL = their own number. Combinational.
module smartag_classify
  import smartag_pkg::*;
(
  input  upper_vec_t upper,
  input  logic [3:0] valid,
  output set_state_e state,
  output upl_vec_t   upl
);

  logic [3:0][3:0] eq;        // eq[i][j]: ways i and j valid with equal upper parts
  way_t [3:0]      leader;    // lowest way of each way's group
  logic [3:0][2:0] gsize;     // size of the group led by way i (0 if i is no leader)

  always_comb begin
    int n2, n3, n4;
    for (int i = 0; i < WAYS; i++) begin
      for (int j = 0; j < WAYS; j++) begin
        eq[i][j] = valid[i] & valid[j] & (upper[i] == upper[j]);
      end
    end
    for (int j = 0; j < WAYS; j++) begin
      leader[j] = way_t'(j);
      for (int i = WAYS - 1; i >= 0; i--) begin
        if (i < j && eq[i][j]) leader[j] = way_t'(i);
      end
    end
    for (int i = 0; i < WAYS; i++) begin
      gsize[i] = '0;
      for (int j = 0; j < WAYS; j++) begin
        if (valid[i] && valid[j] && leader[j] == way_t'(i)) gsize[i] = gsize[i] + 3'd1;
      end
    end
    n2 = 0;
    n3 = 0;
    n4 = 0;
    for (int i = 0; i < WAYS; i++) begin
      if (gsize[i] == 3'd2) n2++;
      if (gsize[i] == 3'd3) n3++;
      if (gsize[i] == 3'd4) n4++;
    end
    if (n4 != 0)      state = S40;
    else if (n3 != 0) state = S30;
    else if (n2 == 2) state = S22;
    else if (n2 == 1) state = S20;
    else              state = S00;

    for (int j = 0; j < WAYS; j++) begin
      upl[j] = valid[j] ? leader[j] : way_t'(j);
    end
    if (state == S40) begin
      upl = {way_t'(2), way_t'(2), way_t'(0), way_t'(0)};
    end
  end

endmodule
