// Self-checking testbench for hamming_dec, driven by hamming_enc.
//
// Random words are encoded, then 0, 1 or 2 distinct bits of the 39-bit codeword (data or
// check bits) are flipped. Expected: no flags for 0 flips. For 1 flip in data or P0..P5:
// single_err with the original data restored. For 1 flip in P6: parity_err only. For 2
// flips: double_err only.
module tb_hamming_dec;
  int checks = 0, failures = 0;
  logic [31:0] data, data_in, data_out;
  logic [6:0]  check, check_in;
  logic [5:0]  syndrome;
  logic        single_err, double_err, parity_err;

  hamming_enc u_enc (.data, .check);
  hamming_dec dut (.data_in, .check_in, .data_out, .syndrome, .single_err, .double_err, .parity_err);

  initial begin
    for (int n = 0; n < 6000; n++) begin
      logic [38:0] cw;
      int nflip, a, b;
      logic exp_s, exp_d, exp_p;
      data = 32'($urandom);
      #1;
      cw    = {check, data};
      nflip = n % 3;
      a     = $urandom_range(38, 0);
      b     = (a + 1 + $urandom_range(37, 0)) % 39;
      if (nflip >= 1) cw[a] ^= 1'b1;
      if (nflip >= 2) cw[b] ^= 1'b1;
      {check_in, data_in} = cw;
      #1;
      exp_s = (nflip == 1) && (a != 38);
      exp_p = (nflip == 1) && (a == 38);
      exp_d = (nflip == 2);
      checks++;
      if ({single_err, double_err, parity_err} !== {exp_s, exp_d, exp_p}) begin
        failures++;
        $display("FAIL n=%0d flips=%0d a=%0d b=%0d flags s%b d%b p%b", n, nflip, a, b,
                 single_err, double_err, parity_err);
      end
      if (nflip < 2) begin
        checks++;
        if (data_out !== data) begin
          failures++;
          $display("FAIL correction n=%0d a=%0d out=%h exp=%h", n, a, data_out, data);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
