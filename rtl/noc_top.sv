// Fault-monitored 2x2 mesh network-on-chip: control path guarded by concurrent online
// checkers, data path by error control codes.
//
// NOC_X x NOC_Y routers form a mesh. Router (x, y) has address y*NOC_X + x. Its E port
// links to the W port of (x+1, y), and its N port to the S port of (x, y-1). Each link is
// a 32-bit flit bus, one way each direction, with RTS/CTS flow control. Ports at the
// edge of the mesh are unconnected: they never receive a flit and never send one, because
// XY routing to an address inside the mesh never leaves it. Every router's L port is
// brought out for the network interface (NI) of its node. The P bit of each injected flit
// is regenerated as even parity over bits 30..0 on the way in, and every router checks it
// on every input (hop-to-hop single parity).
//
// The end-to-end codes belong to the NIs. Since the NIs are outside this RTL, the codecs
// stand beside the mesh with their own ports: a 32-bit Hamming SECDED encoder and decoder,
// and a serial CRC-8 encoder and decoder for 20-bit words.
//
// The checkers' flags come out unreduced, per router (chk_err), and ORed per router
// (any_err), all combinational. The mesh size, XY routing, wormhole switching, the flit
// format and the choice of codes follow the design. Regenerating the P bit at injection
// stands in for the NI that would compute it.
module noc_top
  import noc_pkg::*;
  import hamming_pkg::*;
#(
  parameter int unsigned NOC_X  = 2,
  parameter int unsigned NOC_Y  = 2,
  parameter int unsigned CRC_DW = 20
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // network interface side of each node's L port
  input  flit_t       [NOC_X*NOC_Y-1:0] local_rx,
  input  logic        [NOC_X*NOC_Y-1:0] local_drts,
  output logic        [NOC_X*NOC_Y-1:0] local_cts,
  output flit_t       [NOC_X*NOC_Y-1:0] local_tx,
  output logic        [NOC_X*NOC_Y-1:0] local_rts,
  input  logic        [NOC_X*NOC_Y-1:0] local_dcts,
  // checker outputs
  output router_err_t [NOC_X*NOC_Y-1:0] chk_err,
  output logic        [NOC_X*NOC_Y-1:0] any_err,
  // end-to-end Hamming SECDED codec
  input  logic [HDATA_W-1:0]        ham_enc_data,
  output logic [HCODE_W-1:0]        ham_enc_check,
  input  logic [HDATA_W-1:0]        ham_dec_data_in,
  input  logic [HCODE_W-1:0]        ham_dec_check_in,
  output logic [HDATA_W-1:0]        ham_dec_data_out,
  output logic [HCHECK_W-1:0]       ham_dec_syndrome,
  output logic                      ham_dec_single_err,
  output logic                      ham_dec_double_err,
  output logic                      ham_dec_parity_err,
  // end-to-end CRC-8 codec
  input  logic                      crc_enc_start,
  input  logic [CRC_DW-1:0]         crc_enc_data,
  output logic                      crc_enc_busy,
  output logic                      crc_enc_done,
  output logic [CRC_DW+7:0]         crc_enc_codeword,
  input  logic                      crc_dec_start,
  input  logic [CRC_DW+7:0]         crc_dec_codeword,
  output logic                      crc_dec_busy,
  output logic                      crc_dec_done,
  output logic                      crc_dec_err,
  output logic [CRC_DW-1:0]         crc_dec_data
);

  localparam int unsigned NN = NOC_X * NOC_Y;

  flit_t [NN-1:0][NPORTS-1:0] rx, tx;
  logic  [NN-1:0][NPORTS-1:0] drts, cts, rts, dcts;

  initial assert (NN <= (1 << ADDR_W)) else $error("mesh larger than address space");

  for (genvar n = 0; n < NN; n++) begin : g_node
    localparam int unsigned X = n % NOC_X;
    localparam int unsigned Y = n / NOC_X;
    logic par;

    parity_gen #(.W(FLIT_W-1)) u_pgen (.data(local_rx[n][FLIT_W-2:0]), .parity(par));

    // L port
    assign rx[n][P_L]    = {par, local_rx[n][FLIT_W-2:0]};
    assign drts[n][P_L]  = local_drts[n];
    assign dcts[n][P_L]  = local_dcts[n];
    assign local_cts[n]  = cts[n][P_L];
    assign local_tx[n]   = tx[n][P_L];
    assign local_rts[n]  = rts[n][P_L];

    // E input comes from the W output of the east neighbour
    if (X + 1 < NOC_X) begin : g_e
      assign rx[n][P_E]   = tx[n+1][P_W];
      assign drts[n][P_E] = rts[n+1][P_W];
      assign dcts[n][P_E] = cts[n+1][P_W];
    end else begin : g_e_edge
      assign rx[n][P_E]   = '0;
      assign drts[n][P_E] = 1'b0;
      assign dcts[n][P_E] = 1'b0;
    end
    if (X > 0) begin : g_w
      assign rx[n][P_W]   = tx[n-1][P_E];
      assign drts[n][P_W] = rts[n-1][P_E];
      assign dcts[n][P_W] = cts[n-1][P_E];
    end else begin : g_w_edge
      assign rx[n][P_W]   = '0;
      assign drts[n][P_W] = 1'b0;
      assign dcts[n][P_W] = 1'b0;
    end
    if (Y > 0) begin : g_n
      assign rx[n][P_N]   = tx[n-NOC_X][P_S];
      assign drts[n][P_N] = rts[n-NOC_X][P_S];
      assign dcts[n][P_N] = cts[n-NOC_X][P_S];
    end else begin : g_n_edge
      assign rx[n][P_N]   = '0;
      assign drts[n][P_N] = 1'b0;
      assign dcts[n][P_N] = 1'b0;
    end
    if (Y + 1 < NOC_Y) begin : g_s
      assign rx[n][P_S]   = tx[n+NOC_X][P_N];
      assign drts[n][P_S] = rts[n+NOC_X][P_N];
      assign dcts[n][P_S] = cts[n+NOC_X][P_N];
    end else begin : g_s_edge
      assign rx[n][P_S]   = '0;
      assign drts[n][P_S] = 1'b0;
      assign dcts[n][P_S] = 1'b0;
    end

    router #(.NOC_X(NOC_X), .NOC_Y(NOC_Y), .CUR_ADDR(ADDR_W'(n))) u_router (
      .clk, .rst_n,
      .rx   (rx[n]),
      .drts (drts[n]),
      .cts  (cts[n]),
      .tx   (tx[n]),
      .rts  (rts[n]),
      .dcts (dcts[n]),
      .err  (chk_err[n])
    );

    assign any_err[n] = |chk_err[n];
  end

  hamming_enc u_ham_enc (.data(ham_enc_data), .check(ham_enc_check));

  hamming_dec u_ham_dec (
    .data_in    (ham_dec_data_in),
    .check_in   (ham_dec_check_in),
    .data_out   (ham_dec_data_out),
    .syndrome   (ham_dec_syndrome),
    .single_err (ham_dec_single_err),
    .double_err (ham_dec_double_err),
    .parity_err (ham_dec_parity_err)
  );

  crc8_enc #(.DATA_W(CRC_DW)) u_crc_enc (
    .clk, .rst_n,
    .start    (crc_enc_start),
    .data     (crc_enc_data),
    .busy     (crc_enc_busy),
    .done     (crc_enc_done),
    .codeword (crc_enc_codeword)
  );

  crc8_dec #(.DATA_W(CRC_DW)) u_crc_dec (
    .clk, .rst_n,
    .start    (crc_dec_start),
    .codeword (crc_dec_codeword),
    .busy     (crc_dec_busy),
    .done     (crc_dec_done),
    .err      (crc_dec_err),
    .data     (crc_dec_data)
  );

endmodule
