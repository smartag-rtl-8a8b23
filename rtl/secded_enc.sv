// secded_enc: SEC-DED(38,31) encoder for one SMARTag tag pair.
//
// The 31 data bits are the full 19-bit tag of the unchanged (keeper) tag in
// data[30:12] and the 12-bit lower part of the tag that holds the code in
// data[11:0]. The 7 check bits replace that holder's upper part. The code is an
// extended Hamming code: data bit i sits at the i-th position in 3..37 that is
// not a power of two, check[k] (k = 0..5) is the XOR of the data bits whose
// position has bit k set, and check[6] is the XOR of all 37 other bits, which
// makes double errors detectable. The document fixes only the code's size
// (38,31) and its equivalence with a (39,32) code; the matrix and bit order
// are this design's choice. Purely combinational.
module secded_enc
  import smartag_pkg::*;
(
  input  ecc_data_t data,
  output check_t    check
);

  logic [5:0] h;

  assign h     = hamming_of(data);
  assign check = {(^data) ^ (^h), h};

endmodule
