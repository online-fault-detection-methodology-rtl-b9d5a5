// Serial CRC-8 decoder (checker), generator polynomial x^8 + x^2 + x + 1.
//
// The received codeword, DATA_W information bits followed by 8 check bits, is shifted MSB
// first through the same 8-stage divider as the encoder: incoming bit XOR c8, fed back
// into c1, c2 and c3. A codeword without error is a multiple of the generator, so the
// remainder left after all DATA_W+8 bits is zero. Any nonzero remainder sets err.
//
// Interface: a one-cycle start pulse while idle loads the codeword. busy stays high for
// DATA_W+8 cycles. done pulses once, DATA_W+8 cycles after the start edge, with err and
// data (the information bits) valid until the next start. The polynomial and the serial
// division follow the design. The handshake is this implementation's own.
module crc8_dec #(
  parameter int unsigned DATA_W = 20,
  parameter logic [7:0]  POLY   = 8'h07
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [DATA_W+7:0]   codeword,
  output logic                busy,
  output logic                done,
  output logic                err,
  output logic [DATA_W-1:0]   data
);

  localparam int unsigned CW = DATA_W + 8;

  logic [CW-1:0]             sr;
  logic [DATA_W-1:0]         word;
  logic [7:0]                c;
  logic [$clog2(CW+1)-1:0]   cnt;
  logic                      fb;

  assign fb = sr[CW-1] ^ c[7];

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
        sr   <= codeword;
        word <= codeword[CW-1:8];
        c    <= '0;
        cnt  <= ($clog2(CW+1))'(CW);
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

  assign err  = (c != 8'h00);
  assign data = word;

endmodule
