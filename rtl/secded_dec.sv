// secded_dec: SEC-DED(38,31) decoder used by the SMARTag correction procedure.
//
// Recomputes the six Hamming bits (same code as secded_enc) and XORs them with
// the received ones to form the syndrome, which is the Hamming position of a
// single flipped bit. The overall parity over all 38 bits separates single
// errors (odd) from double errors (even, syndrome non-zero). A single error in
// a data bit, a Hamming bit or the overall parity bit is corrected in the
// outputs; a syndrome that points past position 37 with odd overall parity can
// only come from three or more flips and is reported as a double error.
// Purely combinational; it sits off the lookup path and is used only after a
// parity check has failed.
module secded_dec
  import smartag_pkg::*;
(
  input  ecc_data_t data,
  input  check_t    check,
  output ecc_data_t data_corr,
  output check_t    check_corr,
  output logic      single_err,
  output logic      double_err
);

  always_comb begin
    logic [5:0] h;
    logic [5:0] syn;
    logic       overall;
    h = hamming_of(data);
    syn     = h ^ check[5:0];
    overall = (^data) ^ (^check);

    data_corr  = data;
    check_corr = check;
    single_err = 1'b0;
    double_err = 1'b0;
    if (overall) begin
      if (syn == 6'd0) begin
        check_corr[6] = ~check[6];
        single_err    = 1'b1;
      end else if ((syn & (syn - 6'd1)) == 6'd0) begin
        for (int unsigned k = 0; k < 6; k++) begin
          if (syn == 6'(1 << k)) check_corr[k] = ~check[k];
        end
        single_err = 1'b1;
      end else if (syn <= 6'd37) begin
        for (int unsigned i = 0; i < DATA_W; i++) begin
          if (syn == DATA_POS[i]) data_corr[i] = ~data[i];
        end
        single_err = 1'b1;
      end else begin
        double_err = 1'b1;
      end
    end else if (syn != 6'd0) begin
      double_err = 1'b1;
    end
  end

endmodule
