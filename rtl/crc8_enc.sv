// Serial CRC-8 encoder, generator polynomial x^8 + x^2 + x + 1.
//
// An 8-stage linear feedback shift register (c1..c8) divides the information bits,
// taken MSB first, by the generator. Each cycle the incoming bit is XORed with c8. The
// result enters c1 and is also XORed into the inputs of c2 and c3 (the polynomial's
// x, x^2 terms). The other stages simply shift. After all DATA_W bits the register holds
// the remainder, and it is appended below the data: codeword = {data, c8..c1}.
//
// Interface: a one-cycle start pulse while idle loads data and clears the register. busy
// then stays high for DATA_W cycles, one bit per cycle. done pulses for one cycle, DATA_W
// cycles after the start edge, with codeword valid and held until the next start. The
// polynomial, the 20-bit information word, MSB-first serial division and the register
// and XOR layout follow the design. The start/busy/done handshake is this
// implementation's own.
module crc8_enc #(
  parameter int unsigned DATA_W = 20,
  parameter logic [7:0]  POLY   = 8'h07   // x^2 + x + 1, the x^8 term is implicit
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [DATA_W-1:0]   data,
  output logic                busy,
  output logic                done,
  output logic [DATA_W+7:0]   codeword
);

  logic [DATA_W-1:0]          sr, word;
  logic [7:0]                 c;
  logic [$clog2(DATA_W+1)-1:0] cnt;
  logic                       fb;

  assign fb = sr[DATA_W-1] ^ c[7];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr   <= '0;
      word <= '0;
      c    <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy && start) begin
        sr   <= data;
        word <= data;
        c    <= '0;
        cnt  <= ($clog2(DATA_W+1))'(DATA_W);
        busy <= 1'b1;
      end else if (busy) begin
        sr  <= sr << 1;
        c   <= {c[6:0], 1'b0} ^ (fb ? POLY : 8'h00);
        cnt <= cnt - 1'b1;
        if (cnt == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign codeword = {word, c};

endmodule
