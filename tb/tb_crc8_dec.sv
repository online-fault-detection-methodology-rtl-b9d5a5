// Self-checking testbench for crc8_dec.
//
// Codewords are built with a reference long division by x^8 + x^2 + x + 1. Clean
// codewords must pass, and ones with 1 to 3 flipped bits or a burst of up to 8 flipped bits
// must be flagged: the generator has a factor x + 1, so every odd error count is caught,
// and every burst no longer than 8 is caught. The returned data and the latency of
// DATA_W + 8 cycles are checked too.
module tb_crc8_dec;
  localparam int DW = 20;
  localparam int CW = DW + 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, busy, done, err;
  logic [CW-1:0] codeword;
  logic [DW-1:0] data;

  crc8_dec #(.DATA_W(DW)) dut (.clk, .rst_n, .start, .codeword, .busy, .done, .err, .data);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] ref_crc(logic [DW-1:0] d);
    logic [CW-1:0] r;
    r = {d, 8'h00};
    for (int i = CW - 1; i >= 8; i--)
      if (r[i]) r[i -: 9] = r[i -: 9] ^ 9'h107;
    return r[7:0];
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 400; n++) begin
      logic [DW-1:0] d;
      logic [CW-1:0] cw;
      int mode, cyc;
      d    = DW'($urandom);
      cw   = {d, ref_crc(d)};
      mode = n % 5;        // 0 clean, 1..3 flipped bits, 4 burst
      if (mode == 1) cw[$urandom_range(CW-1, 0)] ^= 1'b1;
      if (mode == 2) begin
        int a, b;
        a = $urandom_range(CW-1, 0);
        b = (a + 1 + $urandom_range(CW-2, 0)) % CW;
        cw[a] ^= 1'b1; cw[b] ^= 1'b1;
      end
      if (mode == 3) begin
        int a;
        a = $urandom_range(CW-3, 0);
        cw[a] ^= 1'b1; cw[a+1] ^= 1'b1; cw[a+2] ^= 1'b1;
      end
      if (mode == 4) begin
        int a, len;
        logic [7:0] pat;
        len = $urandom_range(8, 1);
        a   = $urandom_range(CW-len, 0);
        pat = 8'($urandom) | 8'h01;
        pat[len-1] = 1'b1;
        for (int k = 0; k < len; k++) cw[a+k] ^= pat[k];
      end
      codeword <= cw;
      start    <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      cyc = 0;
      do begin @(posedge clk); #1; cyc++; end while (!done && cyc < 100);
      #1;
      checks++;
      if (cyc != CW) begin failures++; $display("FAIL latency %0d", cyc); end
      // Two flipped bits can in principle cancel; the reference decides.
      checks++;
      if (err !== ({cw[CW-1:8], 8'h00} != {cw[CW-1:8], 8'h00}) ^ (ref_crc(cw[CW-1:8]) != cw[7:0])) begin
        failures++;
        $display("FAIL mode=%0d cw=%h err=%b", mode, cw, err);
      end
      if (mode != 0 && mode != 2) begin
        checks++;
        if (!err) begin failures++; $display("FAIL undetected mode=%0d cw=%h", mode, cw); end
      end
      checks++;
      if (data !== cw[CW-1:8]) begin failures++; $display("FAIL data"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
