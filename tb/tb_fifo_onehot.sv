// Self-checking testbench for fifo_onehot.
//
// An upstream model follows the RTS/CTS rule: it holds drts with a flit until it sees
// cts, then moves to its next flit. A downstream model pulses one of the five read
// enables at random. A queue in the testbench is the reference: every popped head must
// equal the oldest written flit. Checked besides: empty, the capacity of DEPTH-1 flits
// (full reached and no CTS while full), CTS never without DRTS, and that a flit goes in
// exactly two cycles after drts rises on an empty FIFO.
module tb_fifo_onehot;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  int n_full = 0, n_simul = 0;
  logic clk = 0, rst_n = 0;
  flit_t rx, data_out;
  logic drts, cts, empty, write_en;
  logic [NPORTS-1:0] read_en;
  fifo_obs_t obs;
  flit_t q[$];
  int sent = 0;
  logic xfer = 0;

  fifo_onehot dut (.clk, .rst_n, .rx, .drts, .cts, .read_en, .data_out, .empty, .write_en, .obs);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model and checks, sampled just before each edge.
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (empty !== (q.size() == 0)) begin failures++; $display("FAIL empty=%b size=%0d", empty, q.size()); end
    if (!drts && cts) begin failures++; $display("FAIL cts without drts"); end
    if (q.size() == DEPTH - 1) begin
      n_full++;
      if (obs.full_out !== 1'b1) begin failures++; $display("FAIL full not set"); end
      if (obs.cts_in) begin failures++; $display("FAIL cts while full"); end
    end
    if (q.size() > 0) begin
      checks++;
      if (data_out !== q[0]) begin failures++; $display("FAIL head %h exp %h", data_out, q[0]); end
    end
  end

  always @(posedge clk) if (rst_n) begin
    logic pop, push;
    pop  = (|read_en) && q.size() > 0;
    push = drts && cts;
    xfer <= push;
    if (pop && push) n_simul++;
    if (pop) void'(q.pop_front());
    if (push) q.push_back(rx);
  end

  initial begin
    drts = 0; rx = '0; read_en = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // Latency: one flit into an empty FIFO.
    #1;
    rx = 32'hCAFE_0001; drts = 1;
    begin
      int cyc = 0;
      do begin @(posedge clk); #1; cyc++; end while (q.size() == 0 && cyc < 10);
      checks++;
      if (cyc != 2) begin failures++; $display("FAIL write latency %0d", cyc); end
    end
    drts = 0;
    // Random traffic: bursts of writes with slow reads fill the FIFO.
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      if (xfer) begin drts = 0; sent++; end
      if (!drts && ($urandom_range(3, 0) != 0)) begin drts = 1; rx = 32'($urandom); end
      read_en = '0;
      if ($urandom_range(((t / 500) % 2) ? 1 : 5, 0) == 0) read_en[$urandom_range(4, 0)] = 1'b1;
    end
    checks++;
    if (n_full == 0) begin failures++; $display("FAIL full never reached"); end
    checks++;
    if (n_simul == 0) begin failures++; $display("FAIL no simultaneous read and write"); end
    $display("full=%0d simultaneous=%0d", n_full, n_simul);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
