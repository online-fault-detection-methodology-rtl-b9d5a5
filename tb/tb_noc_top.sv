// End-to-end testbench for noc_top at its default size (2x2 mesh).
//
// Four network-interface models inject packets through the L ports with the RTS/CTS rule
// and take delivered flits, answering RTS with CTS after a random delay. Each packet goes
// to another node. Its body and tail payloads are CRC-8 codewords (20 data bits + 8 check
// bits = 28 bits, one flit payload), made by the top's CRC encoder. At the receiver they
// are checked by the top's CRC decoder. A few codewords are corrupted before they are sent and
// must be flagged on arrival. Scoreboard: every packet arrives at its destination, whole, in
// order per source, with its data intact, and no checker or parity flag rises. The
// Hamming SECDED codec is exercised with 0, 1 and 2 flipped bits.
//
// Mechanisms counted, each must occur: two-hop (diagonal) packets, back-pressure (RTS
// without CTS), a full input FIFO, two inputs contending for one output, CRC error
// detected, Hamming single error corrected, Hamming double error detected.
module tb_noc_top;
  import noc_pkg::*;
  import hamming_pkg::*;
  localparam int NN = 4;
  int checks = 0, failures = 0;
  int n_diag = 0, n_stall = 0, n_full = 0, n_contend = 0, n_crc_err = 0, n_ham1 = 0, n_ham2 = 0;
  logic clk = 0, rst_n = 0;

  flit_t       [NN-1:0] local_rx, local_tx;
  logic        [NN-1:0] local_drts, local_cts, local_rts, local_dcts;
  router_err_t [NN-1:0] chk_err;
  logic        [NN-1:0] any_err;
  logic [31:0] ham_enc_data, ham_dec_data_in, ham_dec_data_out;
  logic [6:0]  ham_enc_check, ham_dec_check_in;
  logic [5:0]  ham_dec_syndrome;
  logic        ham_dec_single_err, ham_dec_double_err, ham_dec_parity_err;
  logic        crc_enc_start = 0, crc_enc_busy, crc_enc_done;
  logic [19:0] crc_enc_data;
  logic [27:0] crc_enc_codeword, crc_dec_codeword;
  logic        crc_dec_start = 0, crc_dec_busy, crc_dec_done, crc_dec_err;
  logic [19:0] crc_dec_data;

  noc_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- codec helpers (the top's own codecs) ----------------
  task automatic crc_encode(input logic [19:0] d, output logic [27:0] cw);
    @(negedge clk);
    crc_enc_data = d; crc_enc_start = 1;
    @(negedge clk);
    crc_enc_start = 0;
    while (!crc_enc_done) @(negedge clk);
    cw = crc_enc_codeword;
  endtask

  // Decoder requests are served one at a time by a single process.
  task automatic crc_check(input logic [27:0] cw, output logic e, output logic [19:0] d);
    @(negedge clk);
    crc_dec_codeword = cw; crc_dec_start = 1;
    @(negedge clk);
    crc_dec_start = 0;
    while (!crc_dec_done) @(negedge clk);
    e = crc_dec_err; d = crc_dec_data;
  endtask

  // ---------------- traffic ----------------
  typedef struct { int src; int dst; int len; logic [19:0] data[$]; logic bad[$]; } pkt_t;
  flit_t src_q[NN][$];
  pkt_t  exp_q[NN][NN][$];     // [src][dst]
  int total_pkts = 0, rcvd_pkts = 0;

  task automatic make_packet(int s, int d, int id, int len, logic corrupt);
    pkt_t p;
    p.src = s; p.dst = d; p.len = len;
    src_q[s].push_back(make_header(8'(id), 4'(s), 4'(d), 12'(len)));
    for (int k = 1; k < len; k++) begin
      logic [19:0] w;
      logic [27:0] cw;
      logic b;
      w = 20'($urandom);
      crc_encode(w, cw);
      b = corrupt && (k == 1);
      if (b) cw[$urandom_range(27, 0)] ^= 1'b1;
      p.data.push_back(w);
      p.bad.push_back(b);
      src_q[s].push_back(make_data(cw, (k == len - 1) ? FT_TAIL : FT_BODY));
    end
    exp_q[s][d].push_back(p);
    total_pkts++;
    if ((s ^ d) == 3) n_diag++;
  endtask

  // Senders: hold the flit and RTS until CTS has been seen at an edge.
  logic [NN-1:0] xfer_in = '0;
  logic go = 0;
  always @(posedge clk) for (int n = 0; n < NN; n++) xfer_in[n] <= local_drts[n] & local_cts[n];
  always @(negedge clk) begin
    for (int n = 0; n < NN; n++) begin
      if (xfer_in[n]) begin local_drts[n] = 0; void'(src_q[n].pop_front()); end
      if (go && !local_drts[n] && src_q[n].size() > 0 && $urandom_range(3, 0) != 0) begin
        local_rx[n] = src_q[n][0]; local_drts[n] = 1;
      end
    end
  end

  // Receivers: CTS after a random delay; collected flits go to a mailbox per node.
  int slow = 0;
  flit_t rx_q[NN][$];
  always @(posedge clk) begin
    for (int n = 0; n < NN; n++) begin
      if (!rst_n) local_dcts[n] <= 0;
      else if (local_dcts[n]) local_dcts[n] <= 0;
      else if (local_rts[n] && ($urandom_range(slow, 0) == 0)) local_dcts[n] <= 1;
      if (rst_n && local_rts[n] && local_dcts[n]) rx_q[n].push_back(local_tx[n]);
      if (rst_n && local_rts[n] && !local_dcts[n]) n_stall++;
    end
  end

  // Watch the control path: checkers silent, plus mechanism counters.
  always @(posedge clk) if (rst_n) begin
    checks++;
    if (any_err != '0) begin failures++; $display("FAIL checker/parity flag %b", any_err); end
  end
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NPORTS; p++) begin
      if (dut.g_node[0].u_router.fobs[p].full_out) n_full++;
      if (dut.g_node[1].u_router.fobs[p].full_out) n_full++;
      if (dut.g_node[2].u_router.fobs[p].full_out) n_full++;
      if (dut.g_node[3].u_router.fobs[p].full_out) n_full++;
      if ($countones(dut.g_node[0].u_router.req_t[p]) > 1) n_contend++;
      if ($countones(dut.g_node[1].u_router.req_t[p]) > 1) n_contend++;
      if ($countones(dut.g_node[2].u_router.req_t[p]) > 1) n_contend++;
      if ($countones(dut.g_node[3].u_router.req_t[p]) > 1) n_contend++;
    end
  end

  // Checker process: unpacks arrived flits into packets and verifies them.
  task automatic check_arrivals(int n);
    while (rx_q[n].size() > 0) begin
      hdr_t h;
      pkt_t p;
      int s;
      h = rx_q[n][0];
      checks++;
      if (h.ftype != FT_HEADER) begin
        failures++; $display("FAIL node %0d: packet does not start with a header", n);
        void'(rx_q[n].pop_front()); continue;
      end
      if (rx_q[n].size() < int'(h.len)) return;          // wait for the rest
      void'(rx_q[n].pop_front());
      s = int'(h.src);
      checks++;
      if (int'(h.dst) != n || exp_q[s][n].size() == 0) begin
        failures++; $display("FAIL node %0d got packet for %0d from %0d", n, h.dst, s); continue;
      end
      p = exp_q[s][n].pop_front();
      checks++;
      if (int'(h.len) != p.len) begin failures++; $display("FAIL length"); end
      for (int k = 1; k < p.len; k++) begin
        body_t b;
        logic e;
        logic [19:0] d;
        b = rx_q[n].pop_front();
        checks++;
        if (b.ftype != ((k == p.len - 1) ? FT_TAIL : FT_BODY)) begin failures++; $display("FAIL flit type"); end
        crc_check(b.data, e, d);
        checks++;
        if (e !== p.bad[k-1]) begin failures++; $display("FAIL crc flag %b expected %b", e, p.bad[k-1]); end
        if (e) n_crc_err++;
        if (!p.bad[k-1]) begin
          checks++;
          if (d !== p.data[k-1]) begin failures++; $display("FAIL payload %h exp %h", d, p.data[k-1]); end
        end
      end
      rcvd_pkts++;
    end
  endtask

  initial begin
    local_drts = '0; local_rx = '0;
    ham_enc_data = '0; ham_dec_data_in = '0; ham_dec_check_in = '0;
    crc_enc_data = '0; crc_dec_codeword = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);

    // Hamming SECDED through the top's codec.
    for (int t = 0; t < 300; t++) begin
      logic [38:0] cw;
      int nf, a, b;
      ham_enc_data = 32'($urandom);
      #1;
      cw = {ham_enc_check, ham_enc_data};
      nf = t % 3;
      a = $urandom_range(37, 0);              // data or P0..P5
      b = (a + 1 + $urandom_range(36, 0)) % 38;
      if (nf >= 1) cw[a] ^= 1'b1;
      if (nf == 2) cw[b] ^= 1'b1;
      {ham_dec_check_in, ham_dec_data_in} = cw;
      #1;
      checks++;
      if ({ham_dec_single_err, ham_dec_double_err} !== {nf == 1, nf == 2}) begin failures++; $display("FAIL hamming flags"); end
      if (nf < 2) begin
        checks++;
        if (ham_dec_data_out !== ham_enc_data) begin failures++; $display("FAIL hamming correction"); end
      end
      if (nf == 1 && ham_dec_single_err) n_ham1++;
      if (nf == 2 && ham_dec_double_err) n_ham2++;
    end

    // Network traffic: packets between all pairs, diagonal ones take two hops.
    for (int r = 0; r < 12; r++)
      for (int s = 0; s < NN; s++) begin
        int d;
        d = (s + 1 + $urandom_range(2, 0)) % NN;
        make_packet(s, d, r * NN + s, $urandom_range(5, 2), (r % 5) == 4);
      end
    // Force diagonal traffic in both directions through the same routers.
    for (int r = 0; r < 4; r++) begin
      make_packet(0, 3, 200 + r, 4, 0);
      make_packet(3, 0, 210 + r, 4, 0);
      make_packet(1, 2, 220 + r, 3, 0);
      make_packet(2, 1, 230 + r, 3, 0);
    end
    // Release everything against slow receivers first, so the FIFOs fill up.
    slow = 8;
    go = 1;
    repeat (1500) @(posedge clk);
    slow = 0;
    fork
      begin
        while (rcvd_pkts < total_pkts) begin
          for (int n = 0; n < NN; n++) check_arrivals(n);
          @(negedge clk);
        end
      end
      begin repeat (100000) @(posedge clk); end
    join_any
    checks++;
    if (rcvd_pkts != total_pkts) begin failures++; $display("FAIL received %0d of %0d packets", rcvd_pkts, total_pkts); end
    for (int s = 0; s < NN; s++) for (int d = 0; d < NN; d++) begin
      checks++;
      if (exp_q[s][d].size() != 0) begin failures++; $display("FAIL %0d packets %0d->%0d missing", exp_q[s][d].size(), s, d); end
    end
    checks++;
    if (n_diag == 0 || n_stall == 0 || n_full == 0 || n_contend == 0 || n_crc_err == 0 || n_ham1 == 0 || n_ham2 == 0) begin
      failures++;
      $display("FAIL mechanism missing");
    end
    $display("packets=%0d diagonal=%0d stalls=%0d full=%0d contention=%0d crc_err=%0d ham_single=%0d ham_double=%0d",
             rcvd_pkts, n_diag, n_stall, n_full, n_contend, n_crc_err, n_ham1, n_ham2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
