// Even single-parity generator.
//
// The parity bit is the XOR of all W data bits: 1 when they hold an odd number of ones,
// so data plus parity always holds an even number. With the default W = 31 it produces
// the P bit (bit 31) of a flit from bits 30..0. Even parity and the XOR tree follow the
// design. Purely combinational.
module parity_gen #(
  parameter int unsigned W = 31
) (
  input  logic [W-1:0] data,
  output logic         parity
);
  assign parity = ^data;
endmodule
