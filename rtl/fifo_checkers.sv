// Concurrent online checkers for the control part of one input FIFO.
//
// Ten purely combinational assertions over the FIFO's pseudo-inputs and pseudo-outputs
// (present inputs, register values and next register values). Each flag is 0 while its
// property holds and 1 when it is violated, in the same cycle as the faulty values. The
// checker set and what each checks follow the design. The exact form of each property is
// this implementation's: a "write request" is drts with cts high, a "read request" is any
// read enable, and "updated" means moved by exactly one slot.
module fifo_checkers
  import noc_pkg::*;
(
  input  fifo_obs_t obs,
  output fifo_err_t err
);

  logic wr_req, rd_req;

  always_comb begin
    wr_req = obs.drts & obs.cts_out;
    rd_req = |obs.read_en;

    // No request from upstream, no CTS.
    err.drts_cts = ~obs.drts & obs.cts_in;
    // Read requested and data present: pointer moves one slot.
    err.read_pointer_update = rd_req & ~obs.empty_out &
                              (obs.read_pointer_in != rot1(obs.read_pointer));
    // No read request or empty: pointer holds.
    err.read_pointer_not_update = (~rd_req | obs.empty_out) &
                                  (obs.read_pointer_in != obs.read_pointer);
    // Write requested and room: pointer moves one slot.
    err.write_pointer_update = wr_req & ~obs.full_out &
                               (obs.write_pointer_in != rot1(obs.write_pointer));
    // No write request or full: pointer holds.
    err.write_pointer_not_update = (~wr_req | obs.full_out) &
                                   (obs.write_pointer_in != obs.write_pointer);
    err.full_empty = obs.full_out & obs.empty_out;
    err.empty = (obs.read_pointer == obs.write_pointer) & ~obs.empty_out;
    err.full  = (obs.read_pointer == rot1(obs.write_pointer)) & ~obs.full_out;
    err.write_pointer_onehot = ~is_onehot(8'(obs.write_pointer)) | ~is_onehot(8'(obs.write_pointer_in));
    err.read_pointer_onehot  = ~is_onehot(8'(obs.read_pointer))  | ~is_onehot(8'(obs.read_pointer_in));
  end

endmodule
