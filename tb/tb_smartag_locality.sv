// tb_smartag_locality: the tag array under a cache-like access stream.
//
// A small LRU, write-back, write-allocate cache controller in the testbench
// drives the default-size tag array (128 sets x 4 ways) with a synthetic
// trace that has address locality: 88% of the accesses walk through four
// hot 12-KB regions of a code/heap area inside one 32-MB window (so their
// tags share the upper 7 bits), 10% hit a stack area far above it, and 2% go
// anywhere in the 4-GB space. Every access is a lookup; a write hit
// marks the line dirty; a miss fills the LRU (or an invalid) way.
// Periodically a single bit of a random valid tag entry is flipped, and the
// next lookup to that set must report what the reference model predicts:
// corrected for a tag in an ECC pair, invalidated for an unpaired clean
// tag, uncorrectable for an unpaired dirty tag (which the test then undoes).
// At the end every set's stored row is compared with the reference row.
// Reported: distribution of set states over time, fraction of injected
// errors that were correctable, the same for a parity-only array (only
// clean lines), and the share of cycles spent in the extra fill cycle.
// This trace is this test's own; it is not one of the benchmark programs.
module tb_smartag_locality;
  import smartag_pkg::*;
  import smartag_ref_pkg::*;

  localparam int unsigned ADDR_W   = 32;
  localparam int unsigned SETS     = 128;
  localparam int unsigned IDX_W    = 7;
  localparam int          ACCESSES = 20000;

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

  tag_vec_t   m_tag [SETS];
  logic [3:0] m_v   [SETS];
  logic [3:0] m_d   [SETS];
  int         lru   [SETS][4];   // larger = more recently used

  int checks = 0, failures = 0;
  int n_hits = 0, n_misses = 0, n_fills = 0, n_writebacks = 0;
  int n_inj = 0, n_corr = 0, n_inval = 0, n_unc = 0, n_base_ok = 0;
  int state_hist [5];
  longint unsigned cycles = 0;

  always @(posedge clk) cycles <= cycles + 1;

  status_e r_status;
  logic    r_hit;
  way_t    r_way;
  int      stamp = 0;

  task automatic fail(string msg);
    failures++;
    $display("FAIL t=%0t %s", $time, msg);
  endtask

  task automatic request(op_e op, logic [ADDR_W-1:0] a, way_t w, logic d);
    int lat;
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1'b1;
    req_op    = op;
    req_addr  = a;
    req_way   = w;
    req_dirty = d;
    @(negedge clk);
    req_valid = 1'b0;
    lat = 1;
    while (!resp_valid && lat < 50) begin
      @(negedge clk);
      lat++;
    end
    r_status = resp_status;
    r_hit    = resp_hit;
    r_way    = resp_way;
  endtask

  task automatic inject(int s, logic [ROW_W-1:0] mask);
    @(negedge clk);
    inj_valid = 1'b1;
    inj_set   = IDX_W'(s);
    inj_mask  = mask;
    @(negedge clk);
    inj_valid = 1'b0;
  endtask

  // synthetic trace with locality
  logic [31:0] hot_base [4];
  logic [31:0] ptr [4];

  function automatic logic [31:0] next_addr();
    int r, h;
    r = $urandom_range(99, 0);
    h = $urandom_range(3, 0);
    if (r < 88) begin
      ptr[h] = hot_base[h] + ((ptr[h] - hot_base[h] + 32'($urandom_range(3, 0) * 8)) % 32'h3000);
      return ptr[h];
    end else if (r < 98) begin
      return 32'hBFFF_0000 - 32'($urandom_range(8191, 0));    // stack area
    end
    return $urandom;                                         // anywhere
  endfunction

  task automatic access(logic [31:0] a, logic wr);
    int   s, hw, victim;
    tag_t t;
    s  = int'(a[6 +: IDX_W]);
    t  = a[31 -: TAG_W];
    hw = -1;
    for (int w = 0; w < 4; w++) if (m_v[s][w] && m_tag[s][w] == t) hw = w;
    request(OP_LOOKUP, a, 2'd0, 1'b0);
    checks++;
    if (r_hit != (hw >= 0) || (hw >= 0 && r_way != 2'(hw))) fail($sformatf("lookup of %h", a));
    stamp++;
    if (hw >= 0) begin
      n_hits++;
      lru[s][hw] = stamp;
      if (wr && !m_d[s][hw]) begin
        request(OP_SET_DIRTY, a, 2'(hw), 1'b0);
        m_d[s][hw] = 1'b1;
      end
    end else begin
      n_misses++;
      victim = 0;
      for (int w = 3; w >= 0; w--) if (lru[s][w] <= lru[s][victim]) victim = w;
      for (int w = 3; w >= 0; w--) if (!m_v[s][w]) victim = w;
      if (m_v[s][victim] && m_d[s][victim]) n_writebacks++;
      request(OP_FILL, a, 2'(victim), wr);
      n_fills++;
      m_tag[s][victim] = t;
      m_v[s][victim]   = 1'b1;
      m_d[s][victim]   = wr;
      lru[s][victim]   = stamp;
    end
  endtask

  task automatic fault(int s);
    int         w, b;
    logic [3:0] prot;
    int c [$];
    for (int i = 0; i < 4; i++) if (m_v[s][i]) c.push_back(i);
    if (c.size() == 0) return;
    w    = c[$urandom_range(c.size() - 1, 0)];
    b    = $urandom_range(19, 0);
    prot = ref_prot(m_tag[s], m_v[s]);
    n_inj++;
    if (!m_d[s][w]) n_base_ok++;
    inject(s, ROW_W'(1) << (w * ENTRY_W + b));
    request(OP_LOOKUP, {m_tag[s][w], IDX_W'(s), 6'd0}, 2'd0, 1'b0);
    checks++;
    if (prot[w]) begin
      n_corr++;
      if (r_status != ST_CORRECTED) fail("paired tag not corrected");
    end else if (!m_d[s][w]) begin
      n_inval++;
      m_v[s][w] = 1'b0;
      if (r_status != ST_INVALIDATED) fail("clean tag not invalidated");
    end else begin
      n_unc++;
      if (r_status != ST_UNCORRECTABLE) fail("dirty unpaired tag not reported");
      inject(s, ROW_W'(1) << (w * ENTRY_W + b));
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (state_hist[i]) state_hist[i] = 0;
    for (int s = 0; s < SETS; s++) begin
      m_tag[s] = '0;
      m_v[s]   = '0;
      m_d[s]   = '0;
      for (int w = 0; w < 4; w++) lru[s][w] = 0;
    end
    hot_base[0] = 32'h0040_0000;
    hot_base[1] = 32'h0060_8000;
    hot_base[2] = 32'h0100_4000;
    hot_base[3] = 32'h0183_0000;
    foreach (ptr[i]) ptr[i] = hot_base[i];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (!req_ready) @(negedge clk);

    for (int n = 0; n < ACCESSES; n++) begin
      access(next_addr(), ($urandom_range(99, 0) < 30));
      if (n % 50 == 49) fault($urandom_range(SETS - 1, 0));
      if (n % 1000 == 999) begin
        for (int s = 0; s < SETS; s++) if (m_v[s] == 4'hf) state_hist[int'(ref_state(uppers(m_tag[s]), m_v[s]))]++;
      end
    end
    // the whole array against the reference model
    @(negedge clk);
    for (int s = 0; s < SETS; s++) begin
      row_t got, exp;
      got = dut.u_mem.mem[s];
      exp = ref_row(m_tag[s], m_v[s], m_d[s]);
      checks++;
      for (int w = 0; w < 4; w++) begin
        if (got[w].valid !== m_v[s][w] || (m_v[s][w] && got[w] !== exp[w])) begin
          fail($sformatf("final row of set %0d", s));
          break;
        end
      end
    end
    checks++;
    if (n_corr == 0 || n_inval + n_unc == 0 || n_fills == 0 || n_hits == 0) fail("trace exercised too little");
    begin
      int tot;
      tot = state_hist[0] + state_hist[1] + state_hist[2] + state_hist[3] + state_hist[4];
      $display("full sets sampled %0d: S40 %0.1f%% S30 %0.1f%% S22 %0.1f%% S20 %0.1f%% S00 %0.1f%%", tot,
               100.0 * state_hist[4] / tot, 100.0 * state_hist[3] / tot, 100.0 * state_hist[2] / tot,
               100.0 * state_hist[1] / tot, 100.0 * state_hist[0] / tot);
    end
    $display("accesses %0d hits %0d misses %0d write-backs %0d", ACCESSES, n_hits, n_misses, n_writebacks);
    $display("injected %0d: corrected by ECC %0d, invalidated %0d, uncorrectable %0d",
             n_inj, n_corr, n_inval, n_unc);
    $display("correctable: with codes %0.2f%%, parity only %0.2f%%",
             100.0 * (n_inj - n_unc) / n_inj, 100.0 * n_base_ok / n_inj);
    $display("cycles %0d, extra fill cycles %0d (%0.2f%%)", cycles, n_fills, 100.0 * n_fills / cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
