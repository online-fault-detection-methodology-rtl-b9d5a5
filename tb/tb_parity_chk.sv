// Self-checking testbench for parity_chk: valid even-parity words must pass; words with
// 1, 2 or 3 flipped bits must fail exactly when the number of flips is odd.
module tb_parity_chk;
  int checks = 0, failures = 0;
  logic [31:0] cw;
  logic        err;

  parity_chk #(.W(32)) dut (.codeword(cw), .err);

  initial begin
    for (int n = 0; n < 1000; n++) begin
      logic [31:0] good;
      int nflip;
      int ones;
      good      = 32'($urandom);
      ones      = 0;
      for (int i = 0; i < 31; i++) ones += int'(good[i]);
      good[31]  = logic'(ones % 2);
      nflip     = n % 4;
      cw        = good;
      for (int k = 0; k < nflip; k++) cw[(n * 7 + k * 11) % 32] ^= 1'b1;
      #1;
      checks++;
      if (err !== logic'(nflip % 2)) begin
        failures++;
        $display("FAIL cw=%h flips=%0d err=%b", cw, nflip, err);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
