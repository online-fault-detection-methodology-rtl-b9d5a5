// Concurrent online checkers for the routing logic (LBDR) of one input port.
//
// Four combinational assertions, each 1 when violated, in the same cycle as the faulty
// requests. While the FIFO holds a flit, exactly one request is high. While it is empty,
// none is. For a header flit bound elsewhere, no request that XY routing would not take
// may be high. For a header flit at its destination, only L may be high. The checker set
// follows the design. Checking the destination against the same XY rule the LBDR uses is
// this implementation's reading of "wrong requests depending on the location".
module lbdr_checkers
  import noc_pkg::*;
#(
  parameter int unsigned       NOC_X    = 2,
  parameter int unsigned       NOC_Y    = 2,
  parameter logic [ADDR_W-1:0] CUR_ADDR = '0
) (
  input  lbdr_obs_t obs,
  output lbdr_err_t err
);

  logic              header;
  logic [NPORTS-1:0] allowed;

  initial assert (NOC_X * NOC_Y <= (1 << ADDR_W)) else $error("mesh larger than address space");

  always_comb begin
    header  = ~obs.empty & (obs.flit_type == FT_HEADER);
    allowed = route_xy(CUR_ADDR, obs.dst_addr, NOC_X);
    err.req_onehot       = ~obs.empty & ~is_onehot(8'(obs.req_in));
    err.req_allzero      = obs.empty & (|obs.req_in);
    err.dst_addr_checker = header & (obs.dst_addr != CUR_ADDR) & (|(obs.req_in & ~allowed));
    err.req_local        = header & (obs.dst_addr == CUR_ADDR) &
                           (obs.req_in != NPORTS'(1 << P_L));
  end

endmodule
