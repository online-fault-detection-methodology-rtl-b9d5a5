// Even single-parity checker.
//
// Recomputes the parity of a whole W-bit codeword, data and parity bit together. err is 1
// when it holds an odd number of ones, which catches every odd number of flipped bits.
// With the default W = 32 it checks a complete flit. The routers use it on every incoming
// flit, link by link. Even parity follows the design. Purely combinational.
module parity_chk #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] codeword,
  output logic         err
);
  assign err = ^codeword;
endmodule
