// Self-checking testbench for xbar: every one-hot select passes its input through; an
// all-zero select gives zero.
module tb_xbar;
  int checks = 0, failures = 0;
  logic [4:0][31:0] din;
  logic [4:0]       sel;
  logic [31:0]      dout;

  xbar dut (.din, .sel, .dout);

  initial begin
    for (int n = 0; n < 600; n++) begin
      int k;
      logic [31:0] exp;
      for (int i = 0; i < 5; i++) din[i] = 32'($urandom);
      k   = n % 6;
      sel = (k < 5) ? 5'(1 << k) : 5'b0;
      exp = (k < 5) ? din[k] : 32'b0;
      #1;
      checks++;
      if (dout !== exp) begin failures++; $display("FAIL sel=%b dout=%h exp=%h", sel, dout, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
