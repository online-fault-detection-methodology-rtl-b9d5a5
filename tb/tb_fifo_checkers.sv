// Self-checking testbench for fifo_checkers.
//
// Part 1: a fault-free fifo_onehot runs random RTS/CTS traffic; no checker may fire.
// Part 2: random control-part vectors, half of them legal snapshots with one field
// corrupted, are fed straight to the checkers. Every flag is compared with the property
// as stated, evaluated here with integer arithmetic on slot indices.
// Part 3: the 320 legal control-part vectors, the size of the stimulus set the checkers
// were evaluated with (DRTS x CTS_out x 4 read x 4 write one-hot pointers x 5 one-hot read
// enables). The registers are forced, so the fault-free FIFO answers each vector
// combinationally, and no checker may fire (no false positives).
module tb_fifo_checkers;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  int fired[10];
  logic clk = 0, rst_n = 0;
  flit_t rx, data_out;
  logic drts, cts, empty, write_en;
  logic [4:0] read_en;
  fifo_obs_t obs_f, obs_r, obs;
  fifo_err_t err_f, err_r;
  logic use_rand = 0;

  fifo_onehot   u_fifo (.clk, .rst_n, .rx, .drts, .cts, .read_en, .data_out, .empty, .write_en, .obs(obs_f));
  assign obs = use_rand ? obs_r : obs_f;
  fifo_checkers dut (.obs(obs), .err(err_f));
  assign err_r = err_f;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int idx(logic [3:0] p);   // slot of a one-hot pointer, -1 if not one-hot
    int n = 0, k = -1;
    for (int i = 0; i < 4; i++) if (p[i]) begin n++; k = i; end
    return (n == 1) ? k : -1;
  endfunction

  function automatic logic [9:0] expect_flags(fifo_obs_t o);
    logic wr_req, rd_req, ew, er;
    int r, w, ri, wi;
    r = idx(o.read_pointer); w = idx(o.write_pointer);
    ri = idx(o.read_pointer_in); wi = idx(o.write_pointer_in);
    wr_req = o.drts && o.cts_out;
    rd_req = (o.read_en != 0);
    // order: drts_cts, rd_upd, rd_not_upd, wr_upd, wr_not_upd, full_empty, empty, full, wr_onehot, rd_onehot
    return { (!o.drts && o.cts_in),
             (rd_req && !o.empty_out && (o.read_pointer_in != {o.read_pointer[2:0], o.read_pointer[3]})),
             ((!rd_req || o.empty_out) && o.read_pointer_in != o.read_pointer),
             (wr_req && !o.full_out && (o.write_pointer_in != {o.write_pointer[2:0], o.write_pointer[3]})),
             ((!wr_req || o.full_out) && o.write_pointer_in != o.write_pointer),
             (o.full_out && o.empty_out),
             (o.read_pointer == o.write_pointer && !o.empty_out),
             (o.read_pointer == {o.write_pointer[2:0], o.write_pointer[3]} && !o.full_out),
             (w < 0 || wi < 0),
             (r < 0 || ri < 0) };
  endfunction

  initial begin
    drts = 0; rx = '0; read_en = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (drts && cts) drts = 0; else if ($urandom_range(2, 0) != 0) drts = 1;
      rx = 32'($urandom);
      read_en = '0;
      if ($urandom_range(3, 0) == 0) read_en[$urandom_range(4, 0)] = 1'b1;
      #1;
      checks++;
      if (err_f != '0) begin failures++; $display("FAIL fault-free firing %b", err_f); end
    end
    // Part 2: direct vectors.
    use_rand = 1;
    for (int t = 0; t < 20000; t++) begin
      fifo_obs_t o;
      o = fifo_obs_t'({$urandom, $urandom});
      if (t % 2 == 0) begin
        // legal snapshot, then one corruption
        o.read_pointer  = 4'(1 << $urandom_range(3, 0));
        o.write_pointer = 4'(1 << $urandom_range(3, 0));
        o.empty_out     = (o.read_pointer == o.write_pointer);
        o.full_out      = (o.read_pointer == {o.write_pointer[2:0], o.write_pointer[3]});
        o.write_en_out  = o.drts & o.cts_out & ~o.full_out;
        o.read_en_out   = (|o.read_en) & ~o.empty_out;
        o.cts_in        = o.drts & ~o.cts_out & ~o.full_out;
        o.write_pointer_in = o.write_en_out ? {o.write_pointer[2:0], o.write_pointer[3]} : o.write_pointer;
        o.read_pointer_in  = o.read_en_out  ? {o.read_pointer[2:0],  o.read_pointer[3]}  : o.read_pointer;
        case ($urandom_range(7, 0))
          0: o.cts_in = ~o.cts_in;
          1: o.read_pointer_in = o.read_pointer_in ^ 4'(1 << $urandom_range(3, 0));
          2: o.write_pointer_in = o.write_pointer_in ^ 4'(1 << $urandom_range(3, 0));
          3: o.empty_out = ~o.empty_out;
          4: o.full_out = ~o.full_out;
          5: o.read_pointer = o.read_pointer ^ 4'(1 << $urandom_range(3, 0));
          6: o.write_pointer = o.write_pointer ^ 4'(1 << $urandom_range(3, 0));
          default: ;
        endcase
      end
      obs_r = o;
      #1;
      checks++;
      if (err_r !== fifo_err_t'(expect_flags(o))) begin
        failures++;
        if (failures < 10) $display("FAIL obs=%h err=%b exp=%b", o, err_r, expect_flags(o));
      end
      for (int b = 0; b < 10; b++) if (err_r[b]) fired[b]++;
    end
    for (int b = 0; b < 10; b++) begin
      checks++;
      if (fired[b] == 0) begin failures++; $display("FAIL checker %0d never fired", b); end
    end
    // Part 3: exhaustive legal vectors.
    begin
      int nvec = 0, fp = 0;
      use_rand = 0;
      for (int dr = 0; dr < 2; dr++)
        for (int cq = 0; cq < 2; cq++)
          for (int r = 0; r < 4; r++)
            for (int w = 0; w < 4; w++)
              for (int re = 0; re < 5; re++) begin
                force u_fifo.cts_q  = cq[0];
                force u_fifo.rd_ptr = 4'(1 << r);
                force u_fifo.wr_ptr = 4'(1 << w);
                drts = dr[0]; read_en = 5'(1 << re);
                #1;
                nvec++; checks++;
                if (err_f != '0) begin
                  fp++; failures++;
                  if (fp < 10) $display("FAIL false positive drts=%0d cts=%0d rd=%0d wr=%0d re=%0d err=%b", dr, cq, r, w, re, err_f);
                end
              end
      release u_fifo.cts_q;
      release u_fifo.rd_ptr;
      release u_fifo.wr_ptr;
      checks++;
      if (nvec != 320) begin failures++; $display("FAIL %0d legal vectors, expected 320", nvec); end
      $display("legal vectors %0d, false positives %0d", nvec, fp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
