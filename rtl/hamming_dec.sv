// Extended Hamming (SECDED) decoder for 32-bit data words.
//
// The syndrome is the XOR of the received check bits P0..P5 with those recomputed from
// the received data. Its value is the codeword position of a single flipped bit. The
// overall parity (all 39 bits) tells one error from two:
//   syndrome 0,  overall 0: no error
//   syndrome !0, overall 1: single error, corrected when it hit a data bit
//   syndrome !0, overall 0: double error, detected, not corrected
//   syndrome 0,  overall 1: only the overall parity bit P6 is wrong
// This classification follows the design's syndrome table. Purely combinational.
module hamming_dec
  import hamming_pkg::*;
(
  input  logic [HDATA_W-1:0]  data_in,
  input  logic [HCODE_W-1:0]  check_in,
  output logic [HDATA_W-1:0]  data_out,
  output logic [HCHECK_W-1:0] syndrome,
  output logic                single_err,
  output logic                double_err,
  output logic                parity_err
);
  logic overall;

  always_comb begin
    syndrome   = check_in[HCHECK_W-1:0] ^ hamming_bits(data_in);
    overall    = (^data_in) ^ (^check_in);
    single_err = (syndrome != '0) &  overall;
    double_err = (syndrome != '0) & ~overall;
    parity_err = (syndrome == '0) &  overall;
    data_out   = data_in;
    for (int unsigned i = 0; i < HDATA_W; i++)
      if (single_err && (syndrome == DPOS[i])) data_out[i] = ~data_in[i];
  end
endmodule
