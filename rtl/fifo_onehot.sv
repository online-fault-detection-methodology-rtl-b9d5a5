// Input buffer of one router port, with one-hot read and write pointers.
//
// The buffer holds DEPTH flits in a register array. A one-hot read pointer and a one-hot
// write pointer select the slots. The FIFO is empty when the two pointers are equal. It is
// full when the read pointer sits one slot after the write pointer, going round, so at most
// DEPTH-1 flits are stored. The head flit is always shown on data_out.
//
// Flow control is RTS/CTS. The upstream side holds drts high, with its flit on rx, until it
// sees cts. cts is a register. It rises for one cycle when drts is high, cts was low and the
// FIFO is not full. In the cycle in which cts is high and drts is still high, the flit on rx
// is written. So a flit goes in two cycles after drts rises, and cts pulses once per flit. Any of
// the five read enables, one from each output arbiter, pops the head if the FIFO is not
// empty. Reads and writes may happen in the same cycle.
//
// obs brings out the control part's signals (present inputs, register values, next values)
// for the concurrent checkers. One-hot pointers, the CTS rule, the empty and full rules and
// the port list follow the design. The depth of 4 is this implementation's choice; it is
// the depth for which the FIFO checker's valid-stimulus count works out.
module fifo_onehot
  import noc_pkg::*;
#(
  parameter int unsigned W = FLIT_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [W-1:0]      rx,
  input  logic              drts,
  output logic              cts,
  input  logic [NPORTS-1:0] read_en,
  output logic [W-1:0]      data_out,
  output logic              empty,
  output logic              write_en,
  output fifo_obs_t         obs
);

  logic             cts_q, cts_d;
  logic [DEPTH-1:0] rd_ptr, rd_ptr_d, wr_ptr, wr_ptr_d;
  logic [W-1:0]     mem [DEPTH];
  logic             full, rd_en;

  always_comb begin
    empty    = (rd_ptr == wr_ptr);
    full     = (rd_ptr == rot1(wr_ptr));
    cts_d    = drts & ~cts_q & ~full;
    write_en = drts & cts_q & ~full;
    rd_en    = (|read_en) & ~empty;
    wr_ptr_d = write_en ? rot1(wr_ptr) : wr_ptr;
    rd_ptr_d = rd_en    ? rot1(rd_ptr) : rd_ptr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cts_q  <= 1'b0;
      rd_ptr <= DEPTH'(1);
      wr_ptr <= DEPTH'(1);
    end else begin
      cts_q  <= cts_d;
      rd_ptr <= rd_ptr_d;
      wr_ptr <= wr_ptr_d;
    end
  end

  // Data part: no reset needed, a slot is read only after it was written.
  always_ff @(posedge clk) begin
    for (int i = 0; i < DEPTH; i++)
      if (write_en && wr_ptr[i]) mem[i] <= rx;
  end

  always_comb begin
    data_out = '0;
    for (int i = 0; i < DEPTH; i++)
      if (rd_ptr[i]) data_out = data_out | mem[i];
  end

  assign cts = cts_q;

  always_comb begin
    obs.drts             = drts;
    obs.read_en          = read_en;
    obs.cts_out          = cts_q;
    obs.read_pointer     = rd_ptr;
    obs.write_pointer    = wr_ptr;
    obs.cts_in           = cts_d;
    obs.read_pointer_in  = rd_ptr_d;
    obs.write_pointer_in = wr_ptr_d;
    obs.empty_out        = empty;
    obs.full_out         = full;
    obs.read_en_out      = rd_en;
    obs.write_en_out     = write_en;
  end

endmodule
