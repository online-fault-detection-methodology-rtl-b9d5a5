// Self-checking testbench for lbdr, one instance per node of a 2x2 mesh.
//
// Random sequences of FIFO-head states (empty, header with random destination inside the
// mesh, body, tail) drive all four instances. A reference written here from the XY rule
// (x first, then y; north is towards smaller y; address = y*2 + x) predicts the requests,
// remembering the last header's direction for body and tail flits.
module tb_lbdr;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic empty;
  logic [2:0] ftype;
  logic [3:0] dst;
  logic [3:0][4:0] req;
  lbdr_obs_t [3:0] obs;
  logic [3:0][4:0] ref_dir;
  int n_dir[5];

  for (genvar n = 0; n < 4; n++) begin : g
    lbdr #(.NOC_X(2), .NOC_Y(2), .CUR_ADDR(4'(n))) dut (
      .clk, .rst_n, .empty, .flit_type(ftype), .dst_addr(dst), .req(req[n]), .obs(obs[n]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [4:0] xy(int cur, int d);
    int cx, cy, dx, dy;
    cx = cur % 2; cy = cur / 2; dx = d % 2; dy = d / 2;
    if (dx > cx) return 5'b00100;      // E
    if (dx < cx) return 5'b01000;      // W
    if (dy < cy) return 5'b00010;      // N
    if (dy > cy) return 5'b10000;      // S
    return 5'b00001;                   // L
  endfunction

  initial begin
    empty = 1; ftype = FT_HEADER; dst = '0;
    ref_dir = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 5000; t++) begin
      int k;
      @(negedge clk);
      k     = $urandom_range(3, 0);
      empty = (k == 0);
      ftype = (k == 1) ? FT_HEADER : (k == 2) ? FT_BODY : (k == 3) ? FT_TAIL : 3'($urandom);
      if (t % 4 == 0) begin empty = 0; ftype = FT_HEADER; end
      dst   = 4'($urandom_range(3, 0));
      #1;
      for (int n = 0; n < 4; n++) begin
        logic [4:0] exp;
        if (empty)                  exp = '0;
        else if (ftype == FT_HEADER) begin
          exp = xy(n, int'(dst));
          ref_dir[n] = exp;
        end else                    exp = ref_dir[n];
        for (int b = 0; b < 5; b++) if (exp[b] && n == 3) n_dir[b]++;
        checks++;
        if (req[n] !== exp) begin
          failures++;
          $display("FAIL node %0d empty=%b type=%b dst=%0d req=%b exp=%b", n, empty, ftype, dst, req[n], exp);
        end
      end
    end
    // Node 3 sits at the south-east corner: it must have used W, N and L.
    checks++;
    if (n_dir[1] == 0 || n_dir[3] == 0 || n_dir[0] == 0) begin failures++; $display("FAIL directions not covered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
