// Self-checking testbench for parity_gen: random 31-bit words; the reference counts ones.
module tb_parity_gen;
  int checks = 0, failures = 0;
  logic [30:0] data;
  logic        parity;

  parity_gen #(.W(31)) dut (.data, .parity);

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int ones;
      data = (n < 31) ? (31'(1) << n) : 31'($urandom);
      if (n == 31) data = '0;
      #1;
      ones = 0;
      for (int i = 0; i < 31; i++) ones += int'(data[i]);
      checks++;
      if (parity !== logic'(ones % 2)) begin
        failures++;
        $display("FAIL data=%h parity=%b ones=%0d", data, parity, ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
