// tb_smartag_classify: self-checking test of the similarity detector.
//
// First the four example sets of the scheme (one per state S20, S22, S30,
// S40, with the UPLs 00,00,10,11 / 00,00,10,10 / 00,00,00,11 / 00,00,10,10)
// and an S00 set, then random sets whose upper parts come from small pools
// with random valid bits, compared with the reference model. Every state
// must be seen.
module tb_smartag_classify;
  import smartag_pkg::*;
  import smartag_ref_pkg::*;

  upper_vec_t upper;
  logic [3:0] valid;
  set_state_e state;
  upl_vec_t   upl;
  int         checks = 0, failures = 0;
  int         seen [5];

  smartag_classify dut (.upper(upper), .valid(valid), .state(state), .upl(upl));

  task automatic expect_set(upper_vec_t u, logic [3:0] v, set_state_e s, upl_vec_t e);
    upper = u;
    valid = v;
    #1;
    checks++;
    seen[int'(state)]++;
    if (state !== s || upl !== e) begin
      failures++;
      $display("FAIL up=%h v=%b state=%s upl=%h expected %s %h", u, v, state.name(), upl, s.name(), e);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen[i]) seen[i] = 0;
    // upper parts listed way 3 .. way 0
    expect_set({7'h30, 7'h20, 7'h11, 7'h11}, 4'hf, S20, {2'd3, 2'd2, 2'd0, 2'd0});
    expect_set({7'h20, 7'h20, 7'h11, 7'h11}, 4'hf, S22, {2'd2, 2'd2, 2'd0, 2'd0});
    expect_set({7'h20, 7'h11, 7'h11, 7'h11}, 4'hf, S30, {2'd3, 2'd0, 2'd0, 2'd0});
    expect_set({7'h11, 7'h11, 7'h11, 7'h11}, 4'hf, S40, {2'd2, 2'd2, 2'd0, 2'd0});
    expect_set({7'h01, 7'h02, 7'h03, 7'h04}, 4'hf, S00, {2'd3, 2'd2, 2'd1, 2'd0});
    // invalid ways do not count
    expect_set({7'h11, 7'h11, 7'h11, 7'h11}, 4'b0111, S30, {2'd3, 2'd0, 2'd0, 2'd0});
    expect_set({7'h11, 7'h22, 7'h22, 7'h11}, 4'b1010, S00, {2'd3, 2'd2, 2'd1, 2'd0});
    for (int n = 0; n < 5000; n++) begin
      upper_vec_t u;
      logic [3:0] v;
      int pool;
      pool = 1 + (n % 4);
      for (int w = 0; w < 4; w++) u[w] = 7'($urandom_range(pool - 1, 0) * 19 + 3);
      v = (n % 3 == 0) ? 4'($urandom) : 4'hf;
      expect_set(u, v, ref_state(u, v), ref_upl(u, v));
    end
    foreach (seen[i]) begin
      checks++;
      if (seen[i] == 0) begin
        failures++;
        $display("FAIL state %0d never produced", i);
      end
    end
    $display("states seen: S00=%0d S20=%0d S22=%0d S30=%0d S40=%0d", seen[0], seen[1], seen[2], seen[3], seen[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
