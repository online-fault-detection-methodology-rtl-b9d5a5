// Self-checking testbench for lbdr_checkers, at node 3 (south-east corner) and node 0
// (north-west corner) of a 2x2 mesh.
//
// Part 1: fault-free lbdr instances under random FIFO-head sequences; no checker may fire.
// Part 2: random request vectors against the four properties, evaluated here from the
// node coordinates. Every checker must fire at least once.
module tb_lbdr_checkers;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  int fired[2][4];
  logic clk = 0, rst_n = 0;
  logic empty;
  logic [2:0] ftype;
  logic [3:0] dst;
  logic [1:0][4:0] req;
  lbdr_obs_t [1:0] obs_f, obs_r, obs;
  lbdr_err_t [1:0] err;
  logic use_rand = 0;
  localparam logic [3:0] CUR [2] = '{4'd3, 4'd0};

  for (genvar n = 0; n < 2; n++) begin : g
    lbdr #(.NOC_X(2), .NOC_Y(2), .CUR_ADDR(CUR[n])) u_lbdr (
      .clk, .rst_n, .empty, .flit_type(ftype), .dst_addr(dst), .req(req[n]), .obs(obs_f[n]));
    assign obs[n] = use_rand ? obs_r[n] : obs_f[n];
    lbdr_checkers #(.NOC_X(2), .NOC_Y(2), .CUR_ADDR(CUR[n])) dut (.obs(obs[n]), .err(err[n]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [3:0] expect_flags(int cur, lbdr_obs_t o);
    int cx, cy, dx, dy, ones;
    logic hdr;
    logic [4:0] ok;
    cx = cur % 2; cy = cur / 2; dx = int'(o.dst_addr) % 2; dy = int'(o.dst_addr) / 2;
    ones = $countones(o.req_in);
    hdr = !o.empty && o.flit_type == 3'b001;
    ok = '0;
    ok[2] = dx > cx;                    // E
    ok[3] = dx < cx;                    // W
    ok[1] = dx == cx && dy < cy;        // N
    ok[4] = dx == cx && dy > cy;        // S
    return { (!o.empty && ones != 1),
             (o.empty && ones != 0),
             (hdr && int'(o.dst_addr) != cur && (o.req_in & ~ok) != 0),
             (hdr && int'(o.dst_addr) == cur && o.req_in != 5'b00001) };
  endfunction

  initial begin
    empty = 1; ftype = 3'b001; dst = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      empty = ($urandom_range(3, 0) == 0);
      ftype = 3'(1 << $urandom_range(2, 0));
      if (t < 2) begin empty = 0; ftype = 3'b001; end
      dst = 4'($urandom_range(3, 0));
      #1;
      checks++;
      if (err != '0) begin failures++; $display("FAIL fault-free firing %b", err); end
    end
    use_rand = 1;
    for (int t = 0; t < 20000; t++) begin
      for (int n = 0; n < 2; n++) begin
        lbdr_obs_t o;
        o = lbdr_obs_t'(18'($urandom));
        o.dst_addr = 4'($urandom_range(3, 0));
        if (t % 2 == 0) begin
          o.flit_type = 3'b001;
          o.req_in = route_xy(CUR[n], o.dst_addr, 2);
          if ($urandom_range(1, 0) == 0) o.req_in ^= 5'(1 << $urandom_range(4, 0));
        end
        obs_r[n] = o;
      end
      #1;
      for (int n = 0; n < 2; n++) begin
        checks++;
        if (err[n] !== lbdr_err_t'(expect_flags(int'(CUR[n]), obs_r[n]))) begin
          failures++;
          if (failures < 10) $display("FAIL node %0d obs=%h err=%b exp=%b", CUR[n], obs_r[n], err[n], expect_flags(int'(CUR[n]), obs_r[n]));
        end
        for (int b = 0; b < 4; b++) if (err[n][b]) fired[n][b]++;
      end
    end
    for (int n = 0; n < 2; n++)
      for (int b = 0; b < 4; b++) begin
        checks++;
        if (fired[n][b] == 0) begin failures++; $display("FAIL checker %0d never fired at node %0d", b, n); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
