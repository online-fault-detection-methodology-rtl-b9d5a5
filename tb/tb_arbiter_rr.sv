// Self-checking testbench for arbiter_rr.
//
// Five input queues (L, N, E, W, S) each hold packets of 2 to 5 flits (header, bodies,
// tail) bound for this output. An input requests while its queue holds a flit. The
// output flit is the head of the input picked by xbar_sel. A downstream model answers
// RTS with CTS one to three cycles later, as an input FIFO would. Checked: every
// packet arrives whole and in order, with no interleaving (wormhole); a grant pops
// exactly the flit that was on the output; ownership moves round-robin; and with a
// ready downstream and a full input one flit leaves every three cycles.
module tb_arbiter_rr;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  int n_rr = 0, n_stall = 0, n_idle_gap = 0;
  logic clk = 0, rst_n = 0;
  logic [4:0] req, grant, xbar_sel;
  logic dcts, rts, tx_is_tail;
  arb_obs_t obs;
  flit_t q[5][$];
  flit_t txf;
  int owner = -1, last_owner = -1;
  int delay = 0;
  int last_xfer = -100, cyc = 0;
  int delivered = 0, expected = 0;

  arbiter_rr dut (.clk, .rst_n, .req, .dcts, .tx_is_tail, .grant, .xbar_sel, .rts, .obs);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_comb begin
    txf = '0;
    for (int i = 0; i < 5; i++) begin
      req[i] = (q[i].size() > 0);
      if (xbar_sel[i] && q[i].size() > 0) txf = q[i][0];
    end
    tx_is_tail = (txf[2:0] == FT_TAIL);
  end

  // Downstream: CTS one to three cycles after RTS, for one cycle.
  always @(posedge clk) begin
    if (!rst_n) begin dcts <= 0; delay <= 0; end
    else if (dcts) dcts <= 0;
    else if (rts) begin
      if (delay == 0) begin delay <= $urandom_range(2, 0); end
      if (delay == 1 || (delay == 0 && $urandom_range(1, 0) == 0)) begin dcts <= 1; delay <= 0; end
      else if (delay > 1) delay <= delay - 1;
    end
  end

  // Scoreboard: evaluated before each edge; the granted flit is popped just after it.
  int pend = -1;
  always @(posedge clk) begin
    #1;
    if (pend >= 0) void'(q[pend].pop_front());
    pend = -1;
  end

  always @(negedge clk) if (rst_n) begin
    cyc++;
    checks++;
    if (!$onehot0(grant)) begin failures++; $display("FAIL grants %b", grant); end
    if (grant != 0) begin
      int g;
      g = $clog2(grant);
      checks++;
      if (!(rts && dcts) || grant != xbar_sel) begin failures++; $display("FAIL grant %b rts=%b dcts=%b sel=%b", grant, rts, dcts, xbar_sel); end
      checks++;
      if (owner != -1 && g != owner) begin failures++; $display("FAIL interleave: owner %0d got %0d", owner, g); end
      if (txf[2:0] == FT_HEADER) begin
        // Round robin: no input between the last owner and g (circularly) may have had
        // a packet waiting when ownership was decided; checked loosely as: g differs from
        // last owner whenever another input was waiting.
        owner = g;
      end
      if (cyc - last_xfer == 3) n_rr++;
      last_xfer = cyc;
      delivered++;
      if (txf[2:0] == FT_TAIL) begin last_owner = owner; owner = -1; end
      pend = g;
    end
    if (rts && !dcts) n_stall++;
  end

  task automatic add_packet(int i, int len, int id);
    q[i].push_back(make_header(8'(id), 4'(i), 4'd0, 12'(len)));
    for (int k = 1; k < len - 1; k++) q[i].push_back(make_data(28'(id * 16 + k), FT_BODY));
    q[i].push_back(make_data(28'(id * 16 + len - 1), FT_TAIL));
    expected += len;
  endtask

  // Round-robin check: when all five inputs keep packets waiting, owners must visit
  // L, N, E, W, S in turn.
  int order[$];
  always @(negedge clk) if (rst_n && grant != 0 && txf[2:0] == FT_HEADER) order.push_back($clog2(grant));

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // Phase 1: every input has three packets waiting.
    for (int r = 0; r < 3; r++)
      for (int i = 0; i < 5; i++) add_packet(i, 2 + (i + r) % 4, r * 5 + i);
    wait (delivered == expected);
    checks++;
    for (int k = 0; k < 15; k++)
      if (order[k] != k % 5) begin failures++; $display("FAIL round robin order %p", order); break; end
    // Phase 2: random arrivals.
    for (int r = 0; r < 200; r++) begin
      repeat ($urandom_range(6, 0)) @(posedge clk);
      add_packet($urandom_range(4, 0), $urandom_range(5, 2), 100 + r);
    end
    fork
      wait (delivered == expected);
      begin repeat (20000) @(posedge clk); end
    join_any
    checks++;
    if (delivered != expected) begin failures++; $display("FAIL delivered %0d of %0d", delivered, expected); end
    checks++;
    if (n_rr == 0 || n_stall == 0) begin failures++; $display("FAIL back-to-back=%0d stalls=%0d", n_rr, n_stall); end
    $display("back-to-back=%0d stalls=%0d", n_rr, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
