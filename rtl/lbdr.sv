// Routing logic (LBDR) of one router input port, XY dimension-ordered routing.
//
// When the FIFO is not empty and its head is a header flit, the destination field selects
// the output: first along x (E or W) until the column matches, then along y (N or S), and
// L once the packet is at its node. That direction is stored in req_ff, so the body and
// tail flits of the packet, which carry no address, request the same output. Requests are
// combinational from the FIFO head and are all zero while the FIFO is empty, so exactly
// one request is high whenever a flit waits. The arbiter, not the LBDR, holds the path
// for the whole packet (wormhole).
//
// Node addresses are 4 bits and count along a row first (x = addr % NOC_X). The router's
// own address is CUR_ADDR. XY routing, the one-hot flit type, the 4-bit address and the
// request outputs follow the design. The register that keeps the direction between flits,
// and zero requests on an empty FIFO, are this implementation's reading of the LBDR
// checkers.
module lbdr
  import noc_pkg::*;
#(
  parameter int unsigned       NOC_X    = 2,
  parameter int unsigned       NOC_Y    = 2,
  parameter logic [ADDR_W-1:0] CUR_ADDR = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              empty,
  input  logic [2:0]        flit_type,
  input  logic [ADDR_W-1:0] dst_addr,
  output logic [NPORTS-1:0] req,
  output lbdr_obs_t         obs
);

  logic [NPORTS-1:0] req_ff, route;
  logic              is_header;

  initial assert (NOC_X * NOC_Y <= (1 << ADDR_W)) else $error("mesh larger than address space");

  always_comb begin
    route     = route_xy(CUR_ADDR, dst_addr, NOC_X);
    is_header = ~empty & (flit_type == FT_HEADER);
    if (empty)          req = '0;
    else if (is_header) req = route;
    else                req = req_ff;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         req_ff <= '0;
    else if (is_header) req_ff <= route;
  end

  always_comb begin
    obs.empty     = empty;
    obs.flit_type = flit_type;
    obs.dst_addr  = dst_addr;
    obs.req_ff    = req_ff;
    obs.req_in    = req;
  end

endmodule
