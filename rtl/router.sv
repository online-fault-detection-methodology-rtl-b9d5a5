// Five-port wormhole mesh router with concurrent online checkers on its control part.
//
// Ports are L (local network interface), N, E, W and S. There are no virtual channels.
// Each input port has a one-hot FIFO and an XY routing unit (LBDR). Each output port has
// a round-robin arbiter and a one-hot crossbar multiplexer. A flit moves as follows. It
// enters an input FIFO through the RTS/CTS handshake. When it reaches the head, the
// port's LBDR raises a request to one output. That output's arbiter, once the input owns
// the output, raises RTS downstream. When the next FIFO answers with CTS, the arbiter's
// grant pops the flit from the input FIFO, while the crossbar had it on the output.
// Grants from all five arbiters to one input are ORed into that FIFO's read enables. An
// output stays owned by one input from a packet's header to its tail (wormhole).
// Requests that would turn a packet back out of the port it came in are masked.
//
// Beside each functional unit sits its checker set: FIFO control checkers, LBDR checkers
// and arbiter checkers. Together they form the err output, with one flag per checker and
// port. err.parity[p] flags a flit with odd parity being written into input FIFO p. That is
// the link-level single-parity check over the flit's P bit. All flags are combinational
// and valid in the cycle of the event.
//
// The partition into FIFO, LBDR, arbiter and crossbar, their wiring, the RTS/CTS names
// and the checkers follow the design. Masking the turn-back requests is this
// implementation's own safeguard; XY routing never makes such requests anyway.
module router
  import noc_pkg::*;
#(
  parameter int unsigned       NOC_X    = 2,
  parameter int unsigned       NOC_Y    = 2,
  parameter logic [ADDR_W-1:0] CUR_ADDR = '0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  flit_t       [NPORTS-1:0] rx,
  input  logic        [NPORTS-1:0] drts,
  output logic        [NPORTS-1:0] cts,
  output flit_t       [NPORTS-1:0] tx,
  output logic        [NPORTS-1:0] rts,
  input  logic        [NPORTS-1:0] dcts,
  output router_err_t              err
);

  flit_t     [NPORTS-1:0]             head;
  logic      [NPORTS-1:0]             empty, wr_en;
  logic      [NPORTS-1:0][NPORTS-1:0] req;      // [input][output]
  logic      [NPORTS-1:0][NPORTS-1:0] req_t;    // [output][input]
  logic      [NPORTS-1:0][NPORTS-1:0] grant;    // [output][input]
  logic      [NPORTS-1:0][NPORTS-1:0] rd_en;    // [input][output]
  logic      [NPORTS-1:0][NPORTS-1:0] sel;      // [output][input]
  fifo_obs_t [NPORTS-1:0]             fobs;
  lbdr_obs_t [NPORTS-1:0]             lobs;
  arb_obs_t  [NPORTS-1:0]             aobs;

  always_comb begin
    for (int o = 0; o < NPORTS; o++)
      for (int i = 0; i < NPORTS; i++) begin
        req_t[o][i] = (i != o) & req[i][o];
        rd_en[i][o] = grant[o][i];
      end
  end

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    logic pe;
    hdr_t hh, th;
    assign hh = head[p];
    assign th = tx[p];

    fifo_onehot u_fifo (
      .clk, .rst_n,
      .rx       (rx[p]),
      .drts     (drts[p]),
      .cts      (cts[p]),
      .read_en  (rd_en[p]),
      .data_out (head[p]),
      .empty    (empty[p]),
      .write_en (wr_en[p]),
      .obs      (fobs[p])
    );

    fifo_checkers u_fifo_chk (.obs(fobs[p]), .err(err.fifo[p]));

    lbdr #(.NOC_X(NOC_X), .NOC_Y(NOC_Y), .CUR_ADDR(CUR_ADDR)) u_lbdr (
      .clk, .rst_n,
      .empty     (empty[p]),
      .flit_type (hh.ftype),
      .dst_addr  (hh.dst),
      .req       (req[p]),
      .obs       (lobs[p])
    );

    lbdr_checkers #(.NOC_X(NOC_X), .NOC_Y(NOC_Y), .CUR_ADDR(CUR_ADDR)) u_lbdr_chk (
      .obs(lobs[p]), .err(err.lbdr[p])
    );

    arbiter_rr u_arb (
      .clk, .rst_n,
      .req        (req_t[p]),
      .dcts       (dcts[p]),
      .tx_is_tail (th.ftype == FT_TAIL),
      .grant      (grant[p]),
      .xbar_sel   (sel[p]),
      .rts        (rts[p]),
      .obs        (aobs[p])
    );

    arbiter_checkers u_arb_chk (.obs(aobs[p]), .err(err.arb[p]));

    xbar u_xbar (.din(head), .sel(sel[p]), .dout(tx[p]));

    parity_chk #(.W(FLIT_W)) u_par (.codeword(rx[p]), .err(pe));
    assign err.parity[p] = pe & wr_en[p];
  end

endmodule
