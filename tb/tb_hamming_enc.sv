// Self-checking testbench for hamming_enc.
//
// The reference builds the 38-bit positional Hamming codeword bit by bit (check bits at
// positions 1, 2, 4, 8, 16, 32, data in the others) and computes each check bit as the
// parity over all positions whose index has that bit set. The overall bit is the parity
// of the whole codeword. Also checks the printed P0 equation directly.
module tb_hamming_enc;
  int checks = 0, failures = 0;
  logic [31:0] data;
  logic [6:0]  check;

  hamming_enc dut (.data, .check);

  function automatic logic [6:0] ref_check(logic [31:0] d);
    logic [38:0] cw;   // positions 1..38 used
    logic [6:0]  c;
    int k;
    cw = '0;
    k  = 0;
    for (int pos = 1; pos <= 38; pos++)
      if ((pos & (pos - 1)) != 0) begin cw[pos] = d[k]; k++; end
    c = '0;
    for (int b = 0; b < 6; b++)
      for (int pos = 1; pos <= 38; pos++)
        if (((pos >> b) & 1) != 0 && (pos & (pos - 1)) != 0) c[b] ^= cw[pos];
    c[6] = ^d ^ ^c[5:0];
    return c;
  endfunction

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic p0;
      data = (n < 32) ? (32'(1) << n) : 32'($urandom);
      #1;
      checks++;
      if (check !== ref_check(data)) begin
        failures++;
        $display("FAIL data=%h check=%b ref=%b", data, check, ref_check(data));
      end
      p0 = data[0]^data[1]^data[3]^data[4]^data[6]^data[8]^data[10]^data[11]^data[13]^
           data[15]^data[17]^data[19]^data[21]^data[23]^data[25]^data[26]^data[28]^data[30];
      checks++;
      if (check[0] !== p0) begin failures++; $display("FAIL P0 data=%h", data); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
