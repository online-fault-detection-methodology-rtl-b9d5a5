// Shared types and constants of the fault-monitored mesh router.
//
// A flit is 32 bits. Bit 31 is an even-parity bit over bits 30..0, and bits 2..0 hold a
// one-hot flit type (001 header, 010 body, 100 tail). A header flit also carries, from
// the top: an 8-bit packet ID (30..23), a 4-bit source address (22..19), a 4-bit
// destination address (18..15) and a 12-bit packet length in flits (14..3). Body and
// tail flits carry 28 data bits (30..3). The field widths and types follow the packet
// format of the design. The bit order (P at the top, type at the bottom) is read from the
// drawing of that format.
//
// Router ports are indexed L=0, N=1, E=2, W=3, S=4. This matches the arbiter's priority
// order L, N, E, W, S. The structs *_obs_t carry the pseudo-inputs and pseudo-outputs of each
// control unit: the present inputs, the register values, and the next-state values. The
// concurrent checkers evaluate these combinationally. The structs *_err_t hold one flag per
// checker; a flag is 1 when its property is violated.
package noc_pkg;

  localparam int unsigned FLIT_W  = 32;
  localparam int unsigned ADDR_W  = 4;
  localparam int unsigned NPORTS  = 5;
  localparam int unsigned DEPTH   = 4;    // one-hot FIFO slots

  typedef logic [FLIT_W-1:0] flit_t;

  typedef enum int unsigned { P_L = 0, P_N = 1, P_E = 2, P_W = 3, P_S = 4 } port_e;

  localparam logic [2:0] FT_HEADER = 3'b001;
  localparam logic [2:0] FT_BODY   = 3'b010;
  localparam logic [2:0] FT_TAIL   = 3'b100;

  // Field view of a header flit.
  typedef struct packed {
    logic              p;
    logic [7:0]        id;
    logic [ADDR_W-1:0] src;
    logic [ADDR_W-1:0] dst;
    logic [11:0]       len;
    logic [2:0]        ftype;
  } hdr_t;

  // Field view of a body or tail flit.
  typedef struct packed {
    logic        p;
    logic [27:0] data;
    logic [2:0]  ftype;
  } body_t;

  // One-hot tests on vectors of up to 8 bits (zero-extended).
  function automatic logic is_onehot(logic [7:0] v);
    return (v != 8'h00) && ((v & (v - 8'h01)) == 8'h00);
  endfunction

  function automatic logic is_onehot0(logic [7:0] v);
    return (v & (v - 8'h01)) == 8'h00;
  endfunction

  // Header flit with its parity bit filled in.
  function automatic flit_t make_header(logic [7:0] id, logic [ADDR_W-1:0] src,
                                        logic [ADDR_W-1:0] dst, logic [11:0] len);
    flit_t f;
    f        = {1'b0, id, src, dst, len, FT_HEADER};
    f[31]    = ^f[30:0];
    return f;
  endfunction

  // Body or tail flit with its parity bit filled in.
  function automatic flit_t make_data(logic [27:0] data, logic [2:0] ftype);
    flit_t f;
    f        = {1'b0, data, ftype};
    f[31]    = ^f[30:0];
    return f;
  endfunction

  // XY dimension-ordered routing: the one-hot output (L,N,E,W,S) a header flit at node
  // cur must take to reach node dst, in a mesh nx nodes wide. Node addresses count along
  // a row first: x = addr % nx, y = addr / nx. North is towards smaller y.
  function automatic logic [NPORTS-1:0] route_xy(logic [ADDR_W-1:0] cur, logic [ADDR_W-1:0] dst,
                                                 int unsigned nx);
    int unsigned cx, cy, dx, dy;
    logic [NPORTS-1:0] r;
    cx = int'(cur) % nx;  cy = int'(cur) / nx;
    dx = int'(dst) % nx;  dy = int'(dst) / nx;
    r  = '0;
    if      (dx > cx) r[P_E] = 1'b1;
    else if (dx < cx) r[P_W] = 1'b1;
    else if (dy < cy) r[P_N] = 1'b1;
    else if (dy > cy) r[P_S] = 1'b1;
    else              r[P_L] = 1'b1;
    return r;
  endfunction

  // Rotate a one-hot pointer by one slot.
  function automatic logic [DEPTH-1:0] rot1(logic [DEPTH-1:0] p);
    return {p[DEPTH-2:0], p[DEPTH-1]};
  endfunction

  // FIFO control part: pseudo-inputs and pseudo-outputs.
  typedef struct packed {
    logic              drts;
    logic [NPORTS-1:0] read_en;       // from the five arbiters
    logic              cts_out;       // CTS register (previous value)
    logic [DEPTH-1:0]  read_pointer;  // previous value
    logic [DEPTH-1:0]  write_pointer; // previous value
    logic              cts_in;        // next CTS
    logic [DEPTH-1:0]  read_pointer_in;
    logic [DEPTH-1:0]  write_pointer_in;
    logic              empty_out;
    logic              full_out;
    logic              read_en_out;
    logic              write_en_out;
  } fifo_obs_t;

  typedef struct packed {
    logic drts_cts;
    logic read_pointer_update;
    logic read_pointer_not_update;
    logic write_pointer_update;
    logic write_pointer_not_update;
    logic full_empty;
    logic empty;
    logic full;
    logic write_pointer_onehot;
    logic read_pointer_onehot;
  } fifo_err_t;

  // Routing logic (LBDR): inputs from the FIFO head and the requests it raises.
  typedef struct packed {
    logic              empty;
    logic [2:0]        flit_type;
    logic [ADDR_W-1:0] dst_addr;
    logic [NPORTS-1:0] req_ff;   // stored direction of the packet in progress
    logic [NPORTS-1:0] req_in;   // requests raised now (L,N,E,W,S)
  } lbdr_obs_t;

  typedef struct packed {
    logic req_onehot;
    logic req_allzero;
    logic dst_addr_checker;
    logic req_local;
  } lbdr_err_t;

  // Arbiter: state is one-hot {S, W, E, N, L, IDLE} (bit 0 = IDLE).
  typedef logic [NPORTS:0] arb_state_t;
  localparam arb_state_t ARB_IDLE = 6'b000001;

  typedef struct packed {
    logic [NPORTS-1:0] req;
    logic              dcts;
    logic              rts_ff;
    arb_state_t        state;
    logic [NPORTS-1:0] grant;
    logic [NPORTS-1:0] xbar_sel;
    logic              rts_ff_in;
    arb_state_t        state_in;
  } arb_obs_t;

  typedef struct packed {
    logic grants_onehot;
    logic xbar_sel_onehot;
    logic state_onehot;
    logic no_req_grant;
  } arb_err_t;

  // All error flags of one router.
  typedef struct packed {
    fifo_err_t [NPORTS-1:0] fifo;
    lbdr_err_t [NPORTS-1:0] lbdr;
    arb_err_t  [NPORTS-1:0] arb;
    logic      [NPORTS-1:0] parity;   // incoming flit with odd parity written to a FIFO
  } router_err_t;

endpackage
