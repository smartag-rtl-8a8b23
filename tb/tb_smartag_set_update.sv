// tb_smartag_set_update: self-checking test of the miss-time set rebuild.
//
// Starts from a reference row of random logical tags, replaces a random
// victim by a random incoming tag (or invalidates it) and compares the
// rebuilt row bit for bit with the reference row of the new contents: UPLs,
// codes in the holders' upper parts, parity, valid and dirty. Also checks
// the old and new states, the evicted line, and that upl_update is low
// whenever the evicting and incoming upper parts are equal. Every new state
// must occur.
module tb_smartag_set_update;
  import smartag_pkg::*;
  import smartag_ref_pkg::*;

  row_t       old_row, new_row;
  way_t       victim;
  tag_t       new_tag;
  logic       new_valid, new_dirty;
  set_state_e old_state, new_state;
  event_e     ev;
  logic       upl_update, evict_valid, evict_dirty;
  tag_t       evict_tag;
  int         checks = 0, failures = 0;
  int         seen [5];
  int         n_same_upper = 0;

  smartag_set_update dut (
    .old_row(old_row), .victim(victim), .new_tag(new_tag), .new_valid(new_valid),
    .new_dirty(new_dirty), .new_row(new_row), .old_state(old_state), .new_state(new_state),
    .ev(ev), .upl_update(upl_update), .evict_valid(evict_valid), .evict_dirty(evict_dirty),
    .evict_tag(evict_tag)
  );

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen[i]) seen[i] = 0;
    for (int n = 0; n < 6000; n++) begin
      tag_vec_t   t, t2;
      logic [3:0] v, d, v2, d2;
      row_t       exp_row;
      int         pool;
      pool = 1 + (n % 4);
      for (int i = 0; i < 4; i++) t[i] = rand_tag(pool);
      v = (n % 5 == 0) ? 4'($urandom) : 4'hf;
      d = 4'($urandom) & v;
      old_row   = ref_row(t, v, d);
      victim    = 2'($urandom);
      new_tag   = rand_tag(pool + 1);
      new_valid = (n % 7 != 0);
      new_dirty = 1'($urandom);
      t2 = t;
      v2 = v;
      d2 = d;
      t2[victim] = new_tag;
      v2[victim] = new_valid;
      d2[victim] = new_dirty & new_valid;
      exp_row = ref_row(t2, v2, d2);
      // invalid ways keep whatever tag the reference put there
      #1;
      checks++;
      seen[int'(new_state)]++;
      if (new_row !== exp_row) begin
        failures++;
        $display("FAIL row n=%0d got %h expected %h", n, new_row, exp_row);
      end
      checks++;
      if (old_state !== ref_state(uppers(t), v) || new_state !== ref_state(uppers(t2), v2)) begin
        failures++;
        $display("FAIL states %s %s", old_state.name(), new_state.name());
      end
      checks++;
      if (evict_valid !== v[victim] || evict_dirty !== d[victim] || (v[victim] && evict_tag !== t[victim])) begin
        failures++;
        $display("FAIL evict");
      end
      if (v[victim] && new_valid && t[victim][18:12] == new_tag[18:12]) begin
        n_same_upper++;
        checks++;
        if (upl_update || ev != EV_A) begin
          failures++;
          $display("FAIL equal upper parts but upl_update=%b ev=%s", upl_update, ev.name());
        end
      end
    end
    foreach (seen[i]) begin
      checks++;
      if (seen[i] == 0) begin
        failures++;
        $display("FAIL new state %0d never produced", i);
      end
    end
    $display("new states S00..S40: %0d %0d %0d %0d %0d; fills with equal upper parts: %0d",
             seen[0], seen[1], seen[2], seen[3], seen[4], n_same_upper);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
