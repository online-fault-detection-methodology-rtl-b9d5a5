// Round-robin arbiter of one router output port, written as a finite state machine.
//
// The state is one-hot over IDLE and the five inputs L, N, E, W, S. It names the input
// whose packet currently owns the output; xbar_sel is that same one-hot input (all zero in
// IDLE) and drives this port's crossbar. From IDLE the first requesting input in the order
// L, N, E, W, S wins. After a packet's tail flit has gone, the search starts at the input
// after the one just served and goes round, with that input last, so no input starves.
// An output stays owned from header to tail even when the owner's FIFO runs dry in between.
// This is what keeps wormhole packets whole.
//
// Handshake towards the next router or network interface: while the owner has a flit
// waiting (its request is high) and rts is low, rts rises (a register). When rts and
// dcts are both high, the flit on the crossbar output is taken. In that cycle the grant
// to the owner's FIFO pops it, and rts drops. One flit thus moves every three cycles at
// best. tx_is_tail tells the arbiter that the flit on its output is a tail.
//
// The FSM, the one-hot state, the priority order, the grants, xbar_sel and the RTS
// register follow the design. The tail-based release and the exact handshake timing are
// this implementation's choices.
module arbiter_rr
  import noc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NPORTS-1:0] req,
  input  logic              dcts,
  input  logic              tx_is_tail,
  output logic [NPORTS-1:0] grant,
  output logic [NPORTS-1:0] xbar_sel,
  output logic              rts,
  output arb_obs_t          obs
);

  arb_state_t        state, state_d;
  logic              rts_ff, rts_d, done;
  logic [NPORTS-1:0] owner;

  // First requester at or after index start, going round.
  function automatic arb_state_t pick(logic [NPORTS-1:0] r, int unsigned start);
    arb_state_t s;
    s = ARB_IDLE;
    for (int k = NPORTS - 1; k >= 0; k--) begin
      int unsigned idx;
      idx = (start + k) % NPORTS;
      if (r[idx]) s = arb_state_t'(1 << (idx + 1));
    end
    return s;
  endfunction

  always_comb begin
    owner    = state[NPORTS:1];
    xbar_sel = owner;
    done     = rts_ff & dcts;
    grant    = (done ? owner : '0) & req;

    if (done)                rts_d = 1'b0;
    else if (rts_ff)         rts_d = 1'b1;
    else                     rts_d = |(owner & req);

    state_d = state;
    if (state[0]) begin
      state_d = pick(req, P_L);
    end else if (done && tx_is_tail) begin
      state_d = ARB_IDLE;
      for (int p = 0; p < NPORTS; p++)
        if (owner[p]) state_d = pick(req & ~owner, (p + 1) % NPORTS);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= ARB_IDLE;
      rts_ff <= 1'b0;
    end else begin
      state  <= state_d;
      rts_ff <= rts_d;
    end
  end

  assign rts = rts_ff;

  always_comb begin
    obs.req       = req;
    obs.dcts      = dcts;
    obs.rts_ff    = rts_ff;
    obs.state     = state;
    obs.grant     = grant;
    obs.xbar_sel  = xbar_sel;
    obs.rts_ff_in = rts_d;
    obs.state_in  = state_d;
  end

endmodule
