// Concurrent online checkers for one output arbiter.
//
// Four combinational assertions, each 1 when violated, in the same cycle as the faulty
// values. At most one grant may be high. The crossbar select must be one-hot while an
// input owns the output, and all zero in IDLE. The next state must be one-hot. With no
// request and no CTS from downstream, no grant may be high. The checker set follows the
// design. Allowing grants to be all zero, and a zero select in IDLE, is this
// implementation's reading of "one-hot", since a grant is only given when a flit moves.
module arbiter_checkers
  import noc_pkg::*;
(
  input  arb_obs_t obs,
  output arb_err_t err
);

  always_comb begin
    err.grants_onehot   = ~is_onehot0(8'(obs.grant));
    err.xbar_sel_onehot = obs.state[0] ? (|obs.xbar_sel) : ~is_onehot(8'(obs.xbar_sel));
    err.state_onehot    = ~is_onehot(8'(obs.state_in));
    err.no_req_grant    = ~(|obs.req) & ~obs.dcts & (|obs.grant);
  end

endmodule
