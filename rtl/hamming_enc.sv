// Extended Hamming (SECDED) encoder for 32-bit data words.
//
// check[5:0] are the Hamming bits P0..P5; check[6] (P6) is the overall even parity of the
// data and of P0..P5. The data bits travel unchanged beside them, so the codeword is 39
// bits: 32 data, 7 check. Even parity and the data-to-check-bit mapping follow the
// design's parity table and its P0 equation. The mapping is the usual positional one,
// laid out in hamming_pkg. Purely combinational.
module hamming_enc
  import hamming_pkg::*;
(
  input  logic [HDATA_W-1:0]  data,
  output logic [HCODE_W-1:0]  check
);
  logic [HCHECK_W-1:0] p;
  always_comb begin
    p     = hamming_bits(data);
    check = {(^data) ^ (^p), p};
  end
endmodule
