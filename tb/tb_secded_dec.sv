// tb_secded_dec: self-checking test of the SEC-DED(38,31) decoder.
//
// Encodes random words with the reference model, then flips no bit, every
// single bit position (0..37, data and check bits) and random pairs of bits.
// Expects: no flag and unchanged output for a clean word; single_err and the
// original word restored for one flip; double_err for two flips.
module tb_secded_dec;
  import smartag_pkg::*;
  import smartag_ref_pkg::*;

  ecc_data_t data, data_corr;
  check_t    check, check_corr;
  logic      single_err, double_err;
  int        checks = 0, failures = 0;

  secded_dec dut (
    .data(data), .check(check), .data_corr(data_corr), .check_corr(check_corr),
    .single_err(single_err), .double_err(double_err)
  );

  task automatic run(ecc_data_t d, int nflip);
    logic [37:0] cw, rx;
    int a, b;
    cw = {ref_check(d), d};
    rx = cw;
    a  = $urandom_range(37, 0);
    b  = (a + 1 + $urandom_range(36, 0)) % 38;
    if (nflip >= 1) rx[a] = ~rx[a];
    if (nflip >= 2) rx[b] = ~rx[b];
    {check, data} = rx;
    #1;
    checks++;
    case (nflip)
      0: if (single_err || double_err || {check_corr, data_corr} !== cw) begin
           failures++; $display("FAIL clean d=%h", d);
         end
      1: if (!single_err || double_err || {check_corr, data_corr} !== cw) begin
           failures++; $display("FAIL single d=%h bit=%0d", d, a);
         end
      default: if (!double_err || single_err) begin
           failures++; $display("FAIL double d=%h bits=%0d,%0d", d, a, b);
         end
    endcase
  endtask

  task automatic every_single(ecc_data_t d);
    logic [37:0] cw;
    cw = {ref_check(d), d};
    for (int a = 0; a < 38; a++) begin
      logic [37:0] rx;
      rx = cw;
      rx[a] = ~rx[a];
      {check, data} = rx;
      #1;
      checks++;
      if (!single_err || double_err || {check_corr, data_corr} !== cw) begin
        failures++;
        $display("FAIL single d=%h bit=%0d", d, a);
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 50; n++) every_single(ecc_data_t'($urandom));
    every_single('0);
    every_single('1);
    for (int n = 0; n < 3000; n++) run(ecc_data_t'($urandom), n % 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
