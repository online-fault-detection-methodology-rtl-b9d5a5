// Self-checking testbench for router, as the node at (1,1) of a 4x4 mesh (address 5), so
// that all five outputs are reachable.
//
// Five upstream senders follow the RTS/CTS rule: a flit and RTS are held until CTS is
// seen. They inject packets of 2 to 6 flits with destinations that XY routing can reach
// from their port. Five downstream receivers answer RTS with CTS after a random delay and
// take the flit. The scoreboard, written from the XY rule here, checks that every packet
// leaves by the right output, whole and in order, and that no checker fires. Counted
// mechanisms: back-pressure (RTS held without CTS), full input FIFOs, two inputs
// contending for one output, use of every output, and a flit with a bad P bit flagged
// by the link parity check.
module tb_router;
  import noc_pkg::*;
  localparam int NX = 4, NY = 4, CUR = 5;
  int checks = 0, failures = 0;
  int n_stall = 0, n_full = 0, n_contend = 0, n_parity = 0;
  int out_used[5];
  logic clk = 0, rst_n = 0;
  flit_t [4:0] rx, tx;
  logic  [4:0] drts, cts, rts, dcts;
  router_err_t err;
  flit_t src_q[5][$];       // flits each sender still has to send
  int sent = 0, received = 0, total = 0;
  logic bad_parity_sent = 0;

  router #(.NOC_X(NX), .NOC_Y(NY), .CUR_ADDR(4'(CUR))) dut (.clk, .rst_n, .rx, .drts, .cts, .tx, .rts, .dcts, .err);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int xy_out(int d);
    int cx, cy, dx, dy;
    cx = CUR % NX; cy = CUR / NX; dx = d % NX; dy = d / NX;
    if (dx > cx) return 2;
    if (dx < cx) return 3;
    if (dy < cy) return 1;
    if (dy > cy) return 4;
    return 0;
  endfunction

  // A destination that an XY packet entering by port p may have.
  function automatic int pick_dst(int p);
    int d, dx, cx;
    cx = CUR % NX;
    forever begin
      d = $urandom_range(NX * NY - 1, 0);
      dx = d % NX;
      if (xy_out(d) == p) continue;
      if ((p == 1 || p == 4) && dx != cx) continue;   // from N or S: x already done
      if (p == 1 && xy_out(d) == 1) continue;
      if (p == 4 && xy_out(d) == 4) continue;
      return d;
    end
  endfunction

  // Packets are queued at the senders; the expected order at each output is fixed by
  // the scoreboard when a header leaves (wormhole keeps the rest of the packet behind it).
  task automatic add_packet(int p, int id);
    int d, len;
    d = pick_dst(p);
    len = $urandom_range(6, 2);
    src_q[p].push_back(make_header(8'(id), 4'(p), 4'(d), 12'(len)));
    for (int k = 1; k < len - 1; k++) src_q[p].push_back(make_data(28'(id * 64 + k), FT_BODY));
    src_q[p].push_back(make_data(28'(id * 64 + len - 1), FT_TAIL));
    total += len;
  endtask

  // Senders.
  logic [4:0] xfer_in = '0;
  always @(posedge clk) for (int p = 0; p < 5; p++) xfer_in[p] <= drts[p] & cts[p];
  always @(negedge clk) begin
    for (int p = 0; p < 5; p++) begin
      if (xfer_in[p]) begin drts[p] = 0; void'(src_q[p].pop_front()); sent++; end
      if (!drts[p] && src_q[p].size() > 0 && $urandom_range(3, 0) != 0) begin
        rx[p] = src_q[p][0]; drts[p] = 1;
      end
    end
  end

  // Receivers and scoreboard.
  int  owner_pkt[5];   // input currently streaming a packet out of each output (-1 none)
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < 5; o++) begin
      if (rts[o] && !dcts[o]) n_stall++;
      if (rts[o] && dcts[o]) begin
        flit_t f;
        hdr_t h;
        f = tx[o];
        h = f;
        received++;
        out_used[o]++;
        checks++;
        if (^f !== 1'b0) begin failures++; $display("FAIL parity at output %0d", o); end
        if (h.ftype == FT_HEADER) begin
          checks++;
          if (xy_out(int'(h.dst)) != o) begin failures++; $display("FAIL header dst %0d left by %0d", h.dst, o); end
          checks++;
          if (owner_pkt[o] != -1) begin failures++; $display("FAIL header inside packet at %0d", o); end
          owner_pkt[o] = int'(h.src);
        end else begin
          checks++;
          if (owner_pkt[o] == -1) begin failures++; $display("FAIL body without header at %0d", o); end
          if (h.ftype == FT_TAIL) owner_pkt[o] = -1;
        end
      end
    end
    for (int p = 0; p < 5; p++) if (dut.fobs[p].full_out) n_full++;
    for (int o = 0; o < 5; o++) if ($countones(dut.req_t[o]) > 1) n_contend++;
    checks++;
    if ((err.fifo != '0) || (err.lbdr != '0) || (err.arb != '0)) begin
      failures++; $display("FAIL checker fired %h", err);
    end
    if (err.parity != '0) n_parity++;
  end

  // Receivers answer RTS with CTS after a random delay, slower in some phases.
  int slow = 0;
  always @(posedge clk) begin
    for (int o = 0; o < 5; o++)
      if (!rst_n) dcts[o] <= 0;
      else if (dcts[o]) dcts[o] <= 0;
      else if (rts[o] && ($urandom_range(slow, 0) == 0)) dcts[o] <= 1;
  end

  // Packet order per input/output pair: the data field of body and tail flits carries
  // the packet id, so check that each packet's flits leave consecutively and in order.
  int last_id[5];
  int next_k[5];
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < 5; o++) if (rts[o] && dcts[o]) begin
      hdr_t h;
      body_t b;
      h = tx[o];
      b = tx[o];
      if (h.ftype == FT_HEADER) begin last_id[o] = int'(h.id); next_k[o] = 1; end
      else begin
        checks++;
        if (int'(b.data) % 64 != next_k[o]) begin
          failures++; $display("FAIL flit order at %0d: data %0d id %0d k %0d", o, b.data, last_id[o], next_k[o]);
        end
        next_k[o]++;
      end
    end
  end

  initial begin
    drts = '0; rx = '0;
    for (int o = 0; o < 5; o++) owner_pkt[o] = -1;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int r = 0; r < 40; r++) for (int p = 0; p < 5; p++) add_packet(p, 1 + r * 5 + p);
    slow = 6;                  // back-pressure fills the FIFOs
    repeat (3000) @(posedge clk);
    slow = 0;
    fork
      wait (received == total);
      repeat (60000) @(posedge clk);
    join_any
    checks++;
    if (received != total) begin failures++; $display("FAIL received %0d of %0d", received, total); end
    // Parity: one flit with its P bit flipped on the L input must be flagged.
    @(negedge clk);
    begin
      flit_t f;
      f = make_header(8'd200, 4'd0, 4'(CUR), 12'd2);
      f[31] = ~f[31];
      src_q[0].push_back(f);
      src_q[0].push_back(make_data(28'd1, FT_TAIL));
      total += 2;
    end
    fork
      wait (received == total);
      repeat (2000) @(posedge clk);
    join_any
    repeat (5) @(posedge clk);
    checks++;
    if (n_parity != 1) begin failures++; $display("FAIL parity flagged %0d times", n_parity); end
    for (int o = 0; o < 5; o++) begin
      checks++;
      if (out_used[o] == 0) begin failures++; $display("FAIL output %0d never used", o); end
    end
    checks++;
    if (n_stall == 0 || n_full == 0 || n_contend == 0) begin
      failures++; $display("FAIL mechanism missing: stall=%0d full=%0d contend=%0d", n_stall, n_full, n_contend);
    end
    $display("stalls=%0d full=%0d contention=%0d parity=%0d outputs=%p", n_stall, n_full, n_contend, n_parity, out_used);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
