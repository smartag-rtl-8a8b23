// tb_smartag_tag_array: end-to-end test of the SMARTag tag array at its
// default size (32-bit addresses, 128 sets, 64-byte lines).
//
// A reference model keeps the logical tag, valid and dirty bit of every way.
// The test drives a stream of fills (victims picked at random, upper parts
// from small pools so that every set state and every miss condition a..g
// occurs), lookups (hits and misses), write hits (set dirty) and
// invalidations. After every write the valid entries of the stored row are
// compared with the row the reference model builds (UPLs, codes, parity).
// Soft errors are injected through the fault port: single flips in paired
// ways (corrected), in unpaired clean ways (invalidated), in unpaired dirty
// ways (reported, then undone by the test), parity-bit flips, double errors
// inside one pair, and a flip found by a fill before it rebuilds the set.
// Latencies are checked: 1 cycle for a lookup or write hit, 2 for a fill or
// invalidation, plus 2 per corrected way. Each mechanism is counted and
// must occur at least once.
module tb_smartag_tag_array;
  import smartag_pkg::*;
  import smartag_ref_pkg::*;

  localparam int unsigned ADDR_W = 32;
  localparam int unsigned SETS   = 128;
  localparam int unsigned IDX_W  = 7;
  localparam int unsigned NSETS_USED = 12;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              req_valid = 1'b0;
  logic              req_ready;
  op_e               req_op = OP_LOOKUP;
  logic [ADDR_W-1:0] req_addr = '0;
  way_t              req_way = '0;
  logic              req_dirty = 1'b0;
  logic              resp_valid, resp_hit, resp_dirty, resp_upl_update;
  logic              resp_evict_valid, resp_evict_dirty;
  way_t              resp_way;
  status_e           resp_status;
  set_state_e        resp_state;
  event_e            resp_event;
  tag_t              resp_evict_tag;
  logic              inj_valid = 1'b0;
  logic [IDX_W-1:0]  inj_set = '0;
  logic [ROW_W-1:0]  inj_mask = '0;

  smartag_tag_array dut (
    .clk(clk), .rst_n(rst_n),
    .req_valid(req_valid), .req_ready(req_ready), .req_op(req_op), .req_addr(req_addr),
    .req_way(req_way), .req_dirty(req_dirty),
    .resp_valid(resp_valid), .resp_hit(resp_hit), .resp_way(resp_way), .resp_dirty(resp_dirty),
    .resp_status(resp_status), .resp_state(resp_state), .resp_event(resp_event),
    .resp_upl_update(resp_upl_update), .resp_evict_valid(resp_evict_valid),
    .resp_evict_dirty(resp_evict_dirty), .resp_evict_tag(resp_evict_tag),
    .inj_valid(inj_valid), .inj_set(inj_set), .inj_mask(inj_mask)
  );

  always #5 clk = ~clk;

  // reference model
  tag_vec_t   m_tag [SETS];
  logic [3:0] m_v   [SETS];
  logic [3:0] m_d   [SETS];

  int checks = 0, failures = 0;

  // mechanism counters
  int n_state [5];
  int n_event [7];
  int n_hit = 0, n_miss = 0, n_fill = 0, n_upl_kept = 0, n_set_dirty = 0, n_inval = 0;
  int n_dirty_evict = 0, n_corrected = 0, n_invalidated = 0, n_uncorrectable = 0;
  int n_double = 0, n_parity_bit = 0, n_fill_after_fix = 0, n_holder_fix = 0, n_keeper_fix = 0;

  // response capture
  logic       r_hit, r_dirty, r_upl_update, r_ev_valid, r_ev_dirty;
  way_t       r_way;
  status_e    r_status;
  set_state_e r_state;
  event_e     r_event;
  tag_t       r_ev_tag;
  int         r_lat;

  function automatic logic [ADDR_W-1:0] addr_of(int s, tag_t t);
    return {t, IDX_W'(s), 6'($urandom)};
  endfunction

  task automatic fail(string msg);
    failures++;
    $display("FAIL t=%0t %s", $time, msg);
  endtask

  task automatic request(op_e op, logic [ADDR_W-1:0] a, way_t w, logic d);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1'b1;
    req_op    = op;
    req_addr  = a;
    req_way   = w;
    req_dirty = d;
    @(negedge clk);
    req_valid = 1'b0;
    r_lat = 1;
    while (!resp_valid) begin
      @(negedge clk);
      r_lat++;
      if (r_lat > 50) break;
    end
    r_hit        = resp_hit;
    r_way        = resp_way;
    r_dirty      = resp_dirty;
    r_status     = resp_status;
    r_state      = resp_state;
    r_event      = resp_event;
    r_upl_update = resp_upl_update;
    r_ev_valid   = resp_evict_valid;
    r_ev_dirty   = resp_evict_dirty;
    r_ev_tag     = resp_evict_tag;
    case (r_status)
      ST_CORRECTED:     n_corrected++;
      ST_INVALIDATED:   n_invalidated++;
      ST_UNCORRECTABLE: n_uncorrectable++;
      default: ;
    endcase
  endtask

  task automatic inject(int s, logic [ROW_W-1:0] mask);
    @(negedge clk);
    inj_valid = 1'b1;
    inj_set   = IDX_W'(s);
    inj_mask  = mask;
    @(negedge clk);
    inj_valid = 1'b0;
  endtask

  // compare the valid entries of the stored row with the reference row
  task automatic check_row(int s);
    row_t got, exp;
    @(posedge clk);   // the row is written at the edge that ends the response
    #1;
    got = dut.u_mem.mem[s];
    exp = ref_row(m_tag[s], m_v[s], m_d[s]);
    checks++;
    for (int w = 0; w < 4; w++) begin
      if (got[w].valid !== m_v[s][w] || (m_v[s][w] && got[w] !== exp[w])) begin
        fail($sformatf("row of set %0d way %0d: %h expected %h", s, w, got[w], exp[w]));
        break;
      end
    end
  endtask

  task automatic do_lookup(int s, tag_t t, int extra_lat);
    int hw;
    hw = -1;
    for (int w = 0; w < 4; w++) if (m_v[s][w] && m_tag[s][w] == t) hw = w;
    request(OP_LOOKUP, addr_of(s, t), 2'd0, 1'b0);
    checks++;
    if (r_lat != 1 + extra_lat) fail($sformatf("lookup latency %0d expected %0d", r_lat, 1 + extra_lat));
    checks++;
    if (r_status == ST_UNCORRECTABLE) begin
      if (r_hit) fail("hit reported with an uncorrectable error");
    end else if (hw < 0) begin
      n_miss++;
      if (r_hit) fail($sformatf("unexpected hit set %0d tag %h", s, t));
    end else begin
      n_hit++;
      if (!r_hit || r_way != 2'(hw) || r_dirty != m_d[s][hw])
        fail($sformatf("lookup set %0d tag %h: hit=%b way=%0d dirty=%b expected way %0d dirty %b",
                       s, t, r_hit, r_way, r_dirty, hw, m_d[s][hw]));
    end
    checks++;
    if (r_status != ST_UNCORRECTABLE && r_state != ref_state(uppers(m_tag[s]), m_v[s]))
      fail($sformatf("lookup state %s", r_state.name()));
  endtask

  // fill way w of set s with tag t
  task automatic do_fill(int s, way_t w, tag_t t, logic d, int extra_lat);
    set_state_e os;
    event_e     ev;
    tag_vec_t   nt;
    logic [3:0] nv;
    os = ref_state(uppers(m_tag[s]), m_v[s]);
    ev = ref_event(uppers(m_tag[s]), m_v[s], w, t[18:12], os);
    nt = m_tag[s];
    nv = m_v[s];
    nt[w] = t;
    nv[w] = 1'b1;
    request(OP_FILL, addr_of(s, t), w, d);
    n_fill++;
    checks++;
    if (r_lat != 2 + extra_lat) fail($sformatf("fill latency %0d expected %0d", r_lat, 2 + extra_lat));
    checks++;
    if (r_state != ref_state(uppers(nt), nv) || r_event != ev)
      fail($sformatf("fill set %0d: state %s event %s expected %s %s", s, r_state.name(), r_event.name(),
                     ref_state(uppers(nt), nv).name(), ev.name()));
    checks++;
    if (r_ev_valid != m_v[s][w] || r_ev_dirty != (m_v[s][w] & m_d[s][w]) || (m_v[s][w] && r_ev_tag != m_tag[s][w]))
      fail("evicted line");
    if (ev == EV_A) begin
      checks++;
      if (r_upl_update) fail("UPLs changed although upper parts are equal");
      else n_upl_kept++;
    end
    if (r_ev_dirty) n_dirty_evict++;
    n_state[int'(r_state)]++;
    n_event[int'(r_event)]++;
    m_tag[s][w] = t;
    m_v[s][w]   = 1'b1;
    m_d[s][w]   = d;
    check_row(s);
  endtask

  function automatic tag_t fresh_tag(int s, int pool);
    tag_t t;
    bit   dup;
    do begin
      t   = rand_tag(pool);
      dup = 0;
      for (int w = 0; w < 4; w++) if (m_v[s][w] && m_tag[s][w] == t) dup = 1;
    end while (dup);
    return t;
  endfunction

  function automatic int any_valid_way(int s);
    int c [$];
    for (int w = 0; w < 4; w++) if (m_v[s][w]) c.push_back(w);
    if (c.size() == 0) return -1;
    return c[$urandom_range(c.size() - 1, 0)];
  endfunction

  function automatic tag_t probe_tag(int s);
    int w;
    w = any_valid_way(s);
    if (w >= 0 && $urandom_range(3, 0) != 0) return m_tag[s][w];
    return rand_tag(4);
  endfunction

  // single flip in entry w of set s, bit b (0..18 stored, 19 parity), then a lookup
  task automatic single_fault(int s, int w, int b);
    logic [3:0] prot;
    prot = ref_prot(m_tag[s], m_v[s]);
    inject(s, ROW_W'(1) << (w * ENTRY_W + b));
    if (b == 19) n_parity_bit++;
    if (prot[w]) begin
      if (dut.u_mem.mem[s][w * ENTRY_W + 20 +: 2] != 2'(w)) n_holder_fix++;
      else n_keeper_fix++;
      do_lookup(s, probe_tag(s), 2);
      checks++;
      if (r_status != ST_CORRECTED) fail($sformatf("paired way %0d of set %0d not corrected: %s", w, s, r_status.name()));
    end else if (!m_d[s][w]) begin
      m_v[s][w] = 1'b0;
      m_d[s][w] = 1'b0;
      do_lookup(s, probe_tag(s), 2);
      checks++;
      if (r_status != ST_INVALIDATED) fail($sformatf("clean way %0d of set %0d not invalidated: %s", w, s, r_status.name()));
    end else begin
      do_lookup(s, probe_tag(s), 0);
      checks++;
      if (r_status != ST_UNCORRECTABLE) fail($sformatf("dirty unpaired way %0d of set %0d: %s", w, s, r_status.name()));
      inject(s, ROW_W'(1) << (w * ENTRY_W + b));   // undo
    end
    check_row(s);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (n_state[i]) n_state[i] = 0;
    foreach (n_event[i]) n_event[i] = 0;
    for (int s = 0; s < SETS; s++) begin
      m_tag[s] = '0;
      m_v[s]   = '0;
      m_d[s]   = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // clearing sweep: ready after SETS cycles
    begin
      int c;
      c = 0;
      while (!req_ready) begin
        @(negedge clk);
        c++;
      end
      checks++;
      if (c < SETS - 1 || c > SETS + 1) fail($sformatf("clearing took %0d cycles", c));
    end
    // the last and first sets are empty
    do_lookup(SETS - 1, 19'h1234, 0);
    do_lookup(0, 19'h0, 0);

    // main random stream over a few sets
    for (int n = 0; n < 6000; n++) begin
      int s, pool, r;
      s    = (n * 7 + $urandom_range(2, 0)) % NSETS_USED;
      pool = 1 + (s % 4);
      r    = $urandom_range(99, 0);
      if (r < 45) begin
        do_fill(s, 2'($urandom), fresh_tag(s, pool + (r < 5 ? 1 : 0)), 1'($urandom), 0);
      end else if (r < 80) begin
        do_lookup(s, probe_tag(s), 0);
      end else if (r < 88) begin
        int w;
        w = any_valid_way(s);
        if (w >= 0) begin
          request(OP_SET_DIRTY, addr_of(s, m_tag[s][w]), 2'(w), 1'b0);
          n_set_dirty++;
          checks++;
          if (r_lat != 1) fail("set-dirty latency");
          m_d[s][w] = 1'b1;
          check_row(s);
        end
      end else if (r < 91) begin
        int w;
        w = any_valid_way(s);
        if (w >= 0) begin
          request(OP_INVALIDATE, addr_of(s, m_tag[s][w]), 2'(w), 1'b0);
          n_inval++;
          checks++;
          if (r_lat != 2 || !r_ev_valid || r_ev_tag != m_tag[s][w]) fail("invalidate");
          m_v[s][w] = 1'b0;
          m_d[s][w] = 1'b0;
          checks++;
          if (r_state != ref_state(uppers(m_tag[s]), m_v[s])) fail("state after invalidate");
          check_row(s);
        end
      end else begin
        int w;
        w = any_valid_way(s);
        if (w >= 0) single_fault(s, w, $urandom_range(19, 0));
      end
    end

    // double error inside one pair of a full S40 set with clean lines
    begin
      int s;
      s = 20;
      for (int w = 0; w < 4; w++) do_fill(s, 2'(w), {7'h2a, 12'(w * 5 + 1)}, 1'b0, 0);
      inject(s, (ROW_W'(1) << 3) | (ROW_W'(1) << (ENTRY_W + 15)));   // keeper way 0, holder way 1
      m_v[s][0] = 1'b0;
      m_v[s][1] = 1'b0;
      do_lookup(s, {7'h2a, 12'd11}, 2);
      n_double++;
      checks++;
      if (r_status != ST_INVALIDATED || !r_hit || r_way != 2'd2) fail($sformatf("double error: %s", r_status.name()));
      check_row(s);
    end
    // same with a dirty line in the pair: uncorrectable
    begin
      int s;
      s = 21;
      for (int w = 0; w < 4; w++) do_fill(s, 2'(w), {7'h2b, 12'(w * 9 + 2)}, w == 1, 0);
      inject(s, (ROW_W'(1) << 7) | (ROW_W'(1) << (ENTRY_W + 2)));
      do_lookup(s, {7'h2b, 12'd2}, 0);
      n_double++;
      checks++;
      if (r_status != ST_UNCORRECTABLE) fail($sformatf("double error with dirty line: %s", r_status.name()));
      inject(s, (ROW_W'(1) << 7) | (ROW_W'(1) << (ENTRY_W + 2)));
      check_row(s);
    end
    // an error found by a fill is corrected before the set is rebuilt
    begin
      int s;
      s = 22;
      for (int w = 0; w < 4; w++) do_fill(s, 2'(w), {7'h11, 12'(w * 3 + 7)}, 1'b1, 0);
      inject(s, ROW_W'(1) << (2 * ENTRY_W + 14));   // keeper way 2, upper bits
      do_fill(s, 2'd3, {7'h11, 12'hABC}, 1'b1, 2);
      n_fill_after_fix++;
      checks++;
      if (r_status != ST_CORRECTED) fail("fill after error not corrected");
    end
    // a parity-bit flip in a holder and in a keeper
    single_fault(22, 3, 19);
    single_fault(22, 0, 19);

    // every mechanism must have happened
    foreach (n_state[i]) begin
      checks++;
      if (n_state[i] == 0) fail($sformatf("set state %0d never reached", i));
    end
    foreach (n_event[i]) begin
      checks++;
      if (n_event[i] == 0) fail($sformatf("miss condition %0d never seen", i));
    end
    checks++;
    if (n_hit == 0 || n_miss == 0 || n_fill == 0 || n_upl_kept == 0 || n_set_dirty == 0 || n_inval == 0 ||
        n_dirty_evict == 0 || n_corrected == 0 || n_invalidated == 0 || n_uncorrectable == 0 ||
        n_double == 0 || n_parity_bit == 0 || n_fill_after_fix == 0 || n_holder_fix == 0 || n_keeper_fix == 0)
      fail("some mechanism never happened");
    $display("states S00..S40: %0d %0d %0d %0d %0d", n_state[0], n_state[1], n_state[2], n_state[3], n_state[4]);
    $display("conditions a..g: %0d %0d %0d %0d %0d %0d %0d", n_event[0], n_event[1], n_event[2], n_event[3],
             n_event[4], n_event[5], n_event[6]);
    $display("hits %0d misses %0d fills %0d (UPLs kept %0d, dirty evictions %0d) set-dirty %0d invalidate %0d",
             n_hit, n_miss, n_fill, n_upl_kept, n_dirty_evict, n_set_dirty, n_inval);
    $display("errors: corrected %0d (holder %0d keeper %0d parity bit %0d) invalidated %0d uncorrectable %0d double %0d fill-after-fix %0d",
             n_corrected, n_holder_fix, n_keeper_fix, n_parity_bit, n_invalidated, n_uncorrectable, n_double, n_fill_after_fix);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
