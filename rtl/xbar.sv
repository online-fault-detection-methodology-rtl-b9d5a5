// One output of the router's crossbar: a 5-to-1 multiplexer with a one-hot select.
//
// Each bit of sel, from this port's arbiter, gates one input FIFO's head flit (L, N, E, W,
// S), and the gated flits are ORed. A one-hot select (rather than an encoded one) follows
// the design, chosen there because single stuck-at faults on it are easier to detect.
// With an all-zero select the output is zero. Purely combinational.
module xbar
  import noc_pkg::*;
#(
  parameter int unsigned W = FLIT_W
) (
  input  logic [NPORTS-1:0][W-1:0] din,
  input  logic [NPORTS-1:0]        sel,
  output logic [W-1:0]             dout
);

  always_comb begin
    dout = '0;
    for (int i = 0; i < NPORTS; i++)
      dout = dout | (din[i] & {W{sel[i]}});
  end

endmodule
