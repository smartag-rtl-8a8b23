// tb_smartag_tag_mem: self-checking test of the tag row storage.
//
// Writes random rows to every set (small SETS), reads them back with the
// one-cycle read latency, checks that read data holds when rd_en is low,
// that a same-cycle read and write of one row returns the old row, and that
// the injection port flips exactly the masked bits.
module tb_smartag_tag_mem;
  localparam int unsigned SETS  = 16;
  localparam int unsigned ROW_W = 96;
  localparam int unsigned IDX_W = $clog2(SETS);

  logic             clk = 1'b0;
  logic             rd_en = 1'b0, wr_en = 1'b0, inj_en = 1'b0;
  logic [IDX_W-1:0] rd_addr = '0, wr_addr = '0, inj_addr = '0;
  logic [ROW_W-1:0] rd_data, wr_data = '0, inj_mask = '0;
  logic [ROW_W-1:0] model [SETS];
  int               checks = 0, failures = 0;

  smartag_tag_mem #(.SETS(SETS), .ROW_W(ROW_W)) dut (
    .clk(clk), .rd_en(rd_en), .rd_addr(rd_addr), .rd_data(rd_data),
    .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
    .inj_en(inj_en), .inj_addr(inj_addr), .inj_mask(inj_mask)
  );

  always #5 clk = ~clk;

  function automatic logic [ROW_W-1:0] rnd_row();
    return {$urandom, $urandom, $urandom};
  endfunction

  task automatic check_read(int a);
    @(negedge clk);
    rd_en   = 1'b1;
    rd_addr = IDX_W'(a);
    @(negedge clk);
    rd_en = 1'b0;
    checks++;
    if (rd_data !== model[a]) begin
      failures++;
      $display("FAIL read %0d: %h expected %h", a, rd_data, model[a]);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < SETS; a++) begin
      @(negedge clk);
      wr_en   = 1'b1;
      wr_addr = IDX_W'(a);
      wr_data = rnd_row();
      model[a] = wr_data;
    end
    @(negedge clk);
    wr_en = 1'b0;
    for (int a = 0; a < SETS; a++) check_read(a);
    // data holds while rd_en is low
    repeat (3) @(negedge clk);
    checks++;
    if (rd_data !== model[SETS-1]) begin
      failures++;
      $display("FAIL read data did not hold");
    end
    // read and write of the same row in one cycle return the old row
    @(negedge clk);
    rd_en = 1'b1; rd_addr = 4'd3;
    wr_en = 1'b1; wr_addr = 4'd3; wr_data = rnd_row();
    @(negedge clk);
    rd_en = 1'b0; wr_en = 1'b0;
    checks++;
    if (rd_data !== model[3]) begin
      failures++;
      $display("FAIL read-during-write");
    end
    model[3] = wr_data;
    check_read(3);
    // fault injection
    for (int n = 0; n < 40; n++) begin
      int a;
      a = $urandom_range(SETS - 1, 0);
      @(negedge clk);
      inj_en   = 1'b1;
      inj_addr = IDX_W'(a);
      inj_mask = ROW_W'(1) << $urandom_range(ROW_W - 1, 0);
      model[a] = model[a] ^ inj_mask;
      @(negedge clk);
      inj_en = 1'b0;
      check_read(a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
