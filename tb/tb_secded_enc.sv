// tb_secded_enc: self-checking test of the SEC-DED(38,31) encoder.
//
// Drives single-bit, all-zero, all-one and random data words and compares the
// check bits with the reference model (Hamming bits = XOR of the positions of
// the set data bits, bit 6 = overall parity). Also checks that the 38-bit
// codeword has zero syndrome and even weight, and that codewords of data
// words one bit apart are at least four bits apart (SEC-DED distance).
module tb_secded_enc;
  import smartag_pkg::*;
  import smartag_ref_pkg::*;

  ecc_data_t data;
  check_t    check;
  int        checks = 0, failures = 0;

  secded_enc dut (.data(data), .check(check));

  task automatic expect_word(ecc_data_t d);
    check_t c0, c1;
    data = d;
    #1;
    checks++;
    if (check !== ref_check(d)) begin
      failures++;
      $display("FAIL data=%h check=%h expected %h", d, check, ref_check(d));
    end
    c0 = check;
    // flip one data bit: the codewords must differ in at least 4 bits
    data = d ^ (31'd1 << $urandom_range(30, 0));
    #1;
    c1 = check;
    checks++;
    if ($countones(c0 ^ c1) + 1 < 4) begin
      failures++;
      $display("FAIL distance data=%h", d);
    end
    // even weight of the full codeword
    checks++;
    if ((^d) ^ (^c0)) begin
      failures++;
      $display("FAIL odd codeword weight data=%h", d);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expect_word('0);
    expect_word('1);
    for (int i = 0; i < 31; i++) expect_word(ecc_data_t'(1) << i);
    for (int n = 0; n < 2000; n++) expect_word(ecc_data_t'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
