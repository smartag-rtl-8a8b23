// smartag_ref_pkg: reference model of the SMARTag rules for the testbenches.
//
// Written separately from the RTL, in a different style: the Hamming check
// bits are the XOR of the positions of all set data bits, the set state is
// found by counting how many valid ways share each upper part, and a whole
// row is built from logical tags the way the scheme prescribes. The
// testbenches compare the RTL with these functions.
package smartag_ref_pkg;
  import smartag_pkg::*;

  // Position (1..37) of data bit i in the Hamming codeword.
  function automatic int ref_pos(int i);
    int n;
    n = -1;
    for (int q = 1; q <= 37; q++) begin
      if (q != 1 && q != 2 && q != 4 && q != 8 && q != 16 && q != 32) begin
        n++;
        if (n == i) return q;
      end
    end
    return 0;
  endfunction

  function automatic check_t ref_check(ecc_data_t d);
    int     syn;
    logic   ov;
    check_t c;
    syn = 0;
    ov  = 1'b0;
    for (int i = 0; i < 31; i++) begin
      if (d[i]) begin
        syn = syn ^ ref_pos(i);
        ov  = ~ov;
      end
    end
    c[5:0] = syn[5:0];
    for (int k = 0; k < 6; k++) if (c[k]) ov = ~ov;
    c[6] = ov;
    return c;
  endfunction

  function automatic set_state_e ref_state(upper_vec_t up, logic [3:0] v);
    int cnt[4];
    int maxc, twos;
    maxc = 0;
    twos = 0;
    for (int i = 0; i < 4; i++) begin
      cnt[i] = 0;
      if (v[i]) for (int j = 0; j < 4; j++) if (v[j] && up[j] == up[i]) cnt[i]++;
      if (cnt[i] > maxc) maxc = cnt[i];
      if (cnt[i] == 2) twos++;
    end
    if (maxc == 4) return S40;
    if (maxc == 3) return S30;
    if (twos == 4) return S22;
    if (twos == 2) return S20;
    return S00;
  endfunction

  function automatic upl_vec_t ref_upl(upper_vec_t up, logic [3:0] v);
    upl_vec_t u;
    if (ref_state(up, v) == S40) return {2'd2, 2'd2, 2'd0, 2'd0};
    for (int j = 0; j < 4; j++) begin
      u[j] = 2'(j);
      if (v[j]) begin
        for (int i = j - 1; i >= 0; i--) if (v[i] && up[i] == up[j]) u[j] = 2'(i);
      end
    end
    return u;
  endfunction

  function automatic upper_vec_t uppers(tag_vec_t t);
    upper_vec_t u;
    for (int i = 0; i < 4; i++) u[i] = t[i][18:12];
    return u;
  endfunction

  // Build the stored row for logical tags t, valid v, dirty d.
  function automatic row_t ref_row(tag_vec_t t, logic [3:0] v, logic [3:0] d);
    row_t     r;
    upl_vec_t u;
    u = ref_upl(uppers(t), v);
    for (int w = 0; w < 4; w++) begin
      r[w].valid = v[w];
      r[w].dirty = d[w] & v[w];
      r[w].upl   = u[w];
      if (u[w] != 2'(w)) r[w].stored = {ref_check({t[u[w]], t[w][11:0]}), t[w][11:0]};
      else               r[w].stored = t[w];
      r[w].parity = ^r[w].stored;
    end
    return r;
  endfunction

  // Ways that belong to an ECC pair.
  function automatic logic [3:0] ref_prot(tag_vec_t t, logic [3:0] v);
    upl_vec_t   u;
    logic [3:0] p;
    u = ref_upl(uppers(t), v);
    p = '0;
    for (int w = 0; w < 4; w++) begin
      if (v[w] && u[w] != 2'(w)) begin
        p[w]    = 1'b1;
        p[u[w]] = 1'b1;
      end
    end
    return p;
  endfunction

  // Random tag whose upper part comes from a small pool, so sets share uppers.
  function automatic tag_t rand_tag(int pool);
    tag_t t;
    t[18:12] = 7'($urandom_range(pool - 1, 0) * 37 + 5);
    t[11:0]  = 12'($urandom);
    return t;
  endfunction

  // Condition a..g of replacing way vic (valid ways v, upper parts u) by an
  // incoming upper part nu.
  function automatic event_e ref_event(upper_vec_t u, logic [3:0] v, way_t vic, upper_t nu, set_state_e os);
    int same_new, same_old;
    same_new = 0;
    same_old = 0;
    for (int w = 0; w < 4; w++) begin
      if (2'(w) != vic && v[w]) begin
        same_new += (u[w] == nu) ? 1 : 0;
        same_old += (v[vic] && u[w] == u[vic]) ? 1 : 0;
      end
    end
    if (v[vic] && u[vic] == nu) return EV_A;
    case (same_new)
      0: return (same_old == 0) ? EV_B : EV_D;
      1: return (os == S00) ? EV_C : EV_E;
      2: return EV_F;
      default: return EV_G;
    endcase
  endfunction

endpackage
