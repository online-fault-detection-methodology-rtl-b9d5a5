// Self-checking testbench for crc8_enc.
//
// The reference remainder comes from bitwise long division of {data, 8'b0} by the
// 9-bit generator 1_0000_0111 (x^8 + x^2 + x + 1). Also checks that done comes exactly
// DATA_W cycles after the start edge (one bit per cycle, serial division).
module tb_crc8_enc;
  localparam int DW = 20;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [DW-1:0]   data;
  logic [DW+7:0]   codeword;

  crc8_enc #(.DATA_W(DW)) dut (.clk, .rst_n, .start, .data, .busy, .done, .codeword);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] ref_crc(logic [DW-1:0] d);
    logic [DW+7:0] r;
    r = {d, 8'h00};
    for (int i = DW + 7; i >= 8; i--)
      if (r[i]) r[i -: 9] = r[i -: 9] ^ 9'h107;
    return r[7:0];
  endfunction

  initial begin
    data = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 300; n++) begin
      int cyc;
      data  <= (n == 0) ? '0 : (n == 1) ? 20'hFFFFF : (n < 22) ? (DW'(1) << (n - 2)) : DW'($urandom);
      start <= 1'b1;
      @(posedge clk);          // start edge
      start <= 1'b0;
      cyc = 0;
      do begin @(posedge clk); #1; cyc++; end while (!done && cyc < 100);
      #1;
      checks++;
      if (cyc != DW) begin failures++; $display("FAIL latency %0d", cyc); end
      checks++;
      if (codeword !== {data, ref_crc(data)}) begin
        failures++;
        $display("FAIL data=%h cw=%h ref=%h", data, codeword, {data, ref_crc(data)});
      end
      repeat ($urandom_range(2, 0)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
