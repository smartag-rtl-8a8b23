// tb_smartag_transition: self-checking test of the miss-condition detector.
//
// Random full sets (upper parts from small pools), random victim and incoming
// upper part. The condition is checked against an independent computation,
// and the triple (old state, condition, new state), with both states from the
// reference model, is checked against the transitions of the set state
// machine: a and b keep the state; S40-d->S30, S30-g->S40, S30-d->S20,
// S30-e->S22, S22-f->S30, S22-d->S20, S20-f->S30, S20-e->S22, S20-d->S00,
// S00-c->S20. The one further move the scheme allows, S20-e->S20 (a paired
// tag replaced by a copy of an unpaired upper part), is accepted and counted.
// Every condition a..g must occur.
module tb_smartag_transition;
  import smartag_pkg::*;
  import smartag_ref_pkg::*;

  upper_vec_t upper;
  logic [3:0] valid;
  way_t       victim;
  upper_t     new_upper;
  set_state_e old_state;
  event_e     ev;
  int         checks = 0, failures = 0;
  int         seen [7];

  smartag_transition dut (
    .upper(upper), .valid(valid), .victim(victim), .new_upper(new_upper),
    .old_state(old_state), .ev(ev)
  );

  function automatic bit allowed(set_state_e a, event_e e, set_state_e b);
    if (e == EV_A || e == EV_B) return a == b;
    case ({a, e, b})
      {S40, EV_D, S30}, {S30, EV_G, S40}, {S30, EV_D, S20}, {S30, EV_E, S22},
      {S22, EV_F, S30}, {S22, EV_D, S20}, {S20, EV_F, S30}, {S20, EV_E, S22},
      {S20, EV_D, S00}, {S00, EV_C, S20}, {S20, EV_E, S20}: return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int extra;
    extra = 0;
    foreach (seen[i]) seen[i] = 0;
    valid = 4'hf;
    for (int n = 0; n < 20000; n++) begin
      upper_vec_t nu_vec;
      set_state_e ns;
      int pool;
      pool = 1 + (n % 4);
      for (int w = 0; w < 4; w++) upper[w] = 7'($urandom_range(pool - 1, 0) * 23 + 1);
      victim    = 2'($urandom);
      new_upper = 7'($urandom_range(pool, 0) * 23 + 1);
      old_state = ref_state(upper, valid);
      #1;
      checks++;
      seen[int'(ev)]++;
      if (ev !== ref_event(upper, valid, victim, new_upper, old_state)) begin
        failures++;
        $display("FAIL up=%h victim=%0d new=%h ev=%s", upper, victim, new_upper, ev.name());
      end
      nu_vec = upper;
      nu_vec[victim] = new_upper;
      ns = ref_state(nu_vec, valid);
      checks++;
      if (!allowed(old_state, ev, ns)) begin
        failures++;
        $display("FAIL transition %s -%s-> %s", old_state.name(), ev.name(), ns.name());
      end
      if (old_state == S20 && ev == EV_E && ns == S20) extra++;
    end
    // an invalid victim differs from everything
    upper = {7'h5, 7'h5, 7'h5, 7'h5};
    valid = 4'b0111;
    victim = 2'd3;
    new_upper = 7'h9;
    old_state = S30;
    #1;
    checks++;
    if (ev !== EV_B) begin
      failures++;
      $display("FAIL invalid victim ev=%s", ev.name());
    end
    foreach (seen[i]) begin
      checks++;
      if (seen[i] == 0) begin
        failures++;
        $display("FAIL condition %0d never produced", i);
      end
    end
    $display("conditions a..g: %0d %0d %0d %0d %0d %0d %0d; S20-e->S20: %0d",
             seen[0], seen[1], seen[2], seen[3], seen[4], seen[5], seen[6], extra);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
