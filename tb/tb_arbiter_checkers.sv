// Self-checking testbench for arbiter_checkers.
//
// Part 1: a fault-free arbiter_rr with random requests and a downstream that answers RTS
// with CTS; no checker may fire. Part 2: random arbiter vectors (grants, select, next
// state) against the four properties, counted out bit by bit here. Every checker must
// fire at least once. Part 3: the 768 legal arbiter vectors, the size of the stimulus set
// the checkers were evaluated with (32 request patterns x DCTS x RTS_FF x 6 one-hot states),
// each applied with the tail input low and high. The register state is forced, so the
// fault-free arbiter answers every vector combinationally, and no checker may fire
// (no false positives).
module tb_arbiter_checkers;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  int fired[4];
  logic clk = 0, rst_n = 0;
  logic [4:0] req, grant, xbar_sel;
  logic dcts = 0, rts, tail;
  arb_obs_t obs_f, obs_r, obs;
  arb_err_t err;
  logic use_rand = 0;
  logic use_vec = 0, dcts_v = 0;

  arbiter_rr u_arb (.clk, .rst_n, .req, .dcts(use_vec ? dcts_v : dcts), .tx_is_tail(tail), .grant, .xbar_sel, .rts, .obs(obs_f));
  assign obs = use_rand ? obs_r : obs_f;
  arbiter_checkers dut (.obs(obs), .err(err));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) dcts <= rts & ~dcts & ($urandom_range(1, 0) == 0);

  function automatic int ones(logic [7:0] v);
    int n = 0;
    for (int i = 0; i < 8; i++) n += int'(v[i]);
    return n;
  endfunction

  function automatic logic [3:0] expect_flags(arb_obs_t o);
    return { (ones(8'(o.grant)) > 1),
             (o.state[0] ? (o.xbar_sel != 0) : (ones(8'(o.xbar_sel)) != 1)),
             (ones(8'(o.state_in)) != 1),
             (o.req == 0 && !o.dcts && o.grant != 0) };
  endfunction

  initial begin
    req = '0; tail = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      req  = 5'($urandom);
      tail = ($urandom_range(2, 0) == 0);
      #1;
      checks++;
      if (err != '0) begin failures++; $display("FAIL fault-free firing %b", err); end
    end
    use_rand = 1;
    for (int t = 0; t < 20000; t++) begin
      arb_obs_t o;
      o = arb_obs_t'({$urandom, $urandom});
      if (t % 2 == 0) begin
        o.state    = 6'(1 << $urandom_range(5, 0));
        o.state_in = 6'(1 << $urandom_range(5, 0));
        o.xbar_sel = o.state[5:1];
        o.grant    = (o.rts_ff && o.dcts) ? (o.xbar_sel & o.req) : 5'b0;
        case ($urandom_range(4, 0))
          0: o.grant    ^= 5'(1 << $urandom_range(4, 0));
          1: o.xbar_sel ^= 5'(1 << $urandom_range(4, 0));
          2: o.state_in ^= 6'(1 << $urandom_range(5, 0));
          3: begin o.req = '0; o.dcts = 0; o.grant = 5'(1 << $urandom_range(4, 0)); end
          default: ;
        endcase
      end
      obs_r = o;
      #1;
      checks++;
      if (err !== arb_err_t'(expect_flags(o))) begin
        failures++;
        if (failures < 10) $display("FAIL obs=%h err=%b exp=%b", o, err, expect_flags(o));
      end
      for (int b = 0; b < 4; b++) if (err[b]) fired[b]++;
    end
    for (int b = 0; b < 4; b++) begin
      checks++;
      if (fired[b] == 0) begin failures++; $display("FAIL checker %0d never fired", b); end
    end
    // Part 3: exhaustive legal vectors.
    begin
      int nvec = 0, fp = 0;
      use_rand = 0; use_vec = 1;
      for (int st = 0; st < 6; st++)
        for (int rf = 0; rf < 2; rf++)
          for (int r = 0; r < 32; r++)
            for (int d = 0; d < 2; d++) begin
              nvec++;
              for (int tl = 0; tl < 2; tl++) begin
                force u_arb.state  = arb_state_t'(1 << st);
                force u_arb.rts_ff = rf[0];
                req = 5'(r); dcts_v = d[0]; tail = tl[0];
                #1;
                checks++;
                if (err != '0) begin
                  fp++; failures++;
                  if (fp < 10) $display("FAIL false positive st=%0d rts=%0d req=%b dcts=%0d err=%b", st, rf, r, d, err);
                end
              end
            end
      release u_arb.state;
      release u_arb.rts_ff;
      checks++;
      if (nvec != 768) begin failures++; $display("FAIL %0d legal vectors, expected 768", nvec); end
      $display("legal vectors %0d, false positives %0d", nvec, fp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
