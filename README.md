# Fault-monitored 2x2 mesh NoC: checkers for the control path, error codes for the data path

A router in a network-on-chip can fail in two ways. Its control logic can make a wrong
decision: a FIFO pointer that skips, a request to the wrong output, two grants at once.
Or the data it carries can be corrupted. This design guards each part with its own
mechanism. The control part of every router unit (input FIFO, routing logic, arbiter)
has a set of **concurrent online checkers**. These are small combinational circuits that
watch the unit's inputs, register values and next-state values every cycle, and raise a
flag when a property that must always hold is broken. The data path is covered by
**error control codes**. A single even-parity bit sits in every flit and is checked on
every link. A Hamming SECDED code and a serial CRC-8 code serve as end-to-end codes
between network interfaces.

The network is the case study of the master's thesis *Online Fault Detection Methodology
for Control and Data Path of IP Cores: Case Study on Bonfire Network-On-Chip* (Tallinn,
2016). It is a 2x2 mesh with XY routing and wormhole switching, 32-bit flits, no virtual
channels, and RTS/CTS flow control. The RTL here is an independent implementation. It
follows the thesis wherever the thesis gives a detail. Where the thesis is silent, the
choice made here is listed under "Choices made here" below.

## Network and flit format

`noc_top` holds `NOC_X` x `NOC_Y` routers (2 x 2 by default). Router (x, y) has address
`y*NOC_X + x`. North is towards smaller y. Each router has five ports, indexed
L=0, N=1, E=2, W=3, S=4. L is the node's local port. Its signals come out of the top as
`local_*` ports, where a network interface (packetizer, de-packetizer, buffer) would
connect; that interface is not part of this RTL. The links at the mesh edge are tied
off.

A packet is a header flit, any number of body flits, and a tail flit:

| bits   | 31 | 30..23 | 22..19 | 18..15      | 14..3          | 2..0 |
|--------|----|--------|--------|-------------|----------------|------|
| header | P  | ID     | source | destination | length (flits) | type |
| body / tail | P | data (28 bits) ||||  type |

The type is one-hot: `001` header, `010` body, `100` tail. P is even parity over
bits 30..0. `noc_pkg` defines the fields as the packed structs `hdr_t` and `body_t`, and
the helper functions `make_header` and `make_data`, which fill in P. The top regenerates
P on every injected flit.

Limits of the addressing: a destination must lie inside the mesh, and a node may not
send to itself. A packet to an address outside the mesh would wait forever at an edge
port. A request from L back to L is masked.

## How a flit moves through a router

```
 RX/DRTS/CTS ─► FIFO ─► head flit ─┬─► LBDR ─► Req[5] ─► ARBITER (one per output)
                  ▲                │                        │ Grant ─► FIFO read_en
                  └── read_en ◄────┘                        │ Xbar_sel
                                   └──────────► XBAR ◄──────┘ ─► TX/RTS/DCTS
```

1. **FIFO** (`fifo_onehot`). Four 32-bit slots, addressed by a one-hot read pointer and a
   one-hot write pointer. Equal pointers mean empty. Read pointer one slot after the write
   pointer means full, so three flits fit.
2. **LBDR** (`lbdr`). Combinational XY routing from the head flit. A header's destination
   selects E or W until the column matches, then N or S, then L. The chosen direction is
   stored, and body and tail flits request the same output. While the FIFO is empty, no
   request is raised.
3. **Arbiter** (`arbiter_rr`, one per output). An FSM with one-hot state
   {IDLE, L, N, E, W, S}. The state names the input that owns the output. From IDLE the
   first requester in the order L, N, E, W, S wins. When a packet's tail has gone, the
   search starts at the next input round the circle, and the input just served comes
   last. The output stays owned from header to tail, even if the owner's FIFO runs dry
   between flits. This is what keeps wormhole packets in one piece.
4. **Crossbar** (`xbar`). One 5-to-1 multiplexer per output, selected by the arbiter's
   one-hot `xbar_sel`.

### Handshake and timing

This is the part to understand before changing anything. Every link uses the same
RTS/CTS rule:

```
cycle      0      1      2      3      4
rts   ___/‾‾‾‾‾‾‾‾‾‾‾‾‾\_____/‾‾‾‾‾ ...   sender: register, holds flit on tx
cts   __________/‾‾‾‾‾‾\____________     receiver FIFO: one-cycle register pulse
             ^ flit taken at the end of cycle 2 (rts & cts): receiver writes it,
               sender's grant pops it from its own input FIFO, rts drops
```

- The sender raises `rts` (a register) when its owner input has a flit. It holds the flit
  on `tx` until it sees `cts`.
- The receiving FIFO raises `cts` for one cycle when `drts` is high, `cts` was low and the
  FIFO is not full.
- The flit moves in the cycle in which both are high. In that cycle the receiver writes it,
  the arbiter's grant pops it from the input FIFO, and `rts` falls.

So a link carries at most one flit every three cycles, and a flit enters an empty FIFO
two cycles after `drts` rises. Nothing is pipelined beyond that. The route from a FIFO head
to the output is combinational (LBDR, arbiter, crossbar). The registers are the FIFO
slots and pointers, the CTS bit, the stored LBDR direction, and the arbiter state and
RTS bit. Reset is asynchronous and active low.

## The checkers

Each checker set is a separate combinational module. It reads a `*_obs_t` struct that
its unit exports: the present inputs, the register values ("pseudo-inputs") and the
next register values ("pseudo-outputs"). Each flag is 1 in the cycle of a violation. A
fault-free unit under legal traffic never raises one, and the testbenches check this.

| unit | flag (`noc_pkg` field) | property |
|------|------------------------|----------|
| FIFO | `drts_cts` | no CTS while DRTS is low |
| | `read_pointer_update` / `_not_update` | a read of a non-empty FIFO moves the read pointer one slot; otherwise it holds |
| | `write_pointer_update` / `_not_update` | a write (DRTS with CTS) into a non-full FIFO moves the write pointer one slot; otherwise it holds |
| | `full_empty` | never full and empty together |
| | `empty`, `full` | equal pointers imply empty; read = write+1 implies full |
| | `read_pointer_onehot`, `write_pointer_onehot` | both old and new pointer one-hot |
| LBDR | `req_onehot` | exactly one request while the FIFO is not empty |
| | `req_allzero` | no request while it is empty |
| | `dst_addr_checker` | a header's requests lie in the XY direction of its destination |
| | `req_local` | a header at its destination requests L only |
| arbiter | `grants_onehot` | at most one grant |
| | `xbar_sel_onehot` | select one-hot while an input owns the output, zero in IDLE |
| | `state_onehot` | next state one-hot |
| | `no_req_grant` | no grant while nothing is requested and the next router is not ready (`dcts` low) |

`router` gathers every flag into `router_err_t`, for each unit and port, plus
`parity[5]`: a flit with odd parity was written into that input FIFO. `noc_top` brings
this out per router (`chk_err`) and ORed (`any_err`). The checkers detect faults; nothing
in this RTL reacts to them.

## Error control codes

- **Single parity** (`parity_gen`, `parity_chk`). Even parity, an XOR tree. It catches
  any odd number of flipped bits in a flit. It is checked hop by hop at every router
  input.
- **Hamming SECDED** (`hamming_enc`, `hamming_dec`, layout in `hamming_pkg`). 32 data
  bits plus 7 check bits. P0..P5 are positional Hamming bits: the data bits occupy the
  codeword positions that are not powers of two (d0 at 3, d1 at 5, d2 at 6, d3 at 7,
  d4 at 9, and so on), and Pi covers the positions with bit i set. P6 is the overall even
  parity of all 38 other bits. The decoder reports:

  | syndrome | overall parity | result |
  |----------|----------------|--------|
  | 0  | ok    | no error |
  | ≠0 | wrong | single error, corrected if in data |
  | ≠0 | ok    | double error, detected only |
  | 0  | wrong | error in P6 alone |

- **CRC-8** (`crc8_enc`, `crc8_dec`). Generator x^8 + x^2 + x + 1, serial, MSB first, one
  bit per cycle through stages c1..c8. The incoming bit XOR c8 feeds c1 and is XORed into
  c2 and c3. A 20-bit word gives a 28-bit codeword `{data, crc}`, exactly the payload of a
  body flit. Encoding takes 20 cycles from the `start` edge to `done`. Checking a
  codeword takes 28 cycles; `err` means the remainder is not zero.

The codecs are not inside the routers. End-to-end coding belongs to the network
interfaces, which are outside this RTL, so the codecs stand in `noc_top` with their own
ports. The end-to-end testbench uses them as a pair of NIs would: it CRC-encodes every
payload before injection and checks it after delivery.

## Choices made here

The thesis describes units, signals and properties, but not every detail. These are
this implementation's choices:

- **FIFO depth 4** (3 usable). The thesis never states the depth. 4 is the depth that
  matches its count of 320 legal FIFO test vectors (4 x 4 one-hot pointer pairs x DRTS x
  CTS x 5 read enables). `noc_pkg::DEPTH`.
- **Handshake timing** as drawn above, three cycles per flit. The thesis names only
  "CTS/RTS handshaking".
- **Not pipelined.** The original router is described as having four pipeline stages,
  with no description of them. This router has the same units, and its only registers are
  those listed above.
- **Packet ownership.** The arbiter has a `tx_is_tail` input and releases the output on
  the tail. The LBDR stores the packet's direction and gates its requests with `empty`.
  This combination satisfies both the wormhole rule and the LBDR checkers as stated.
- **Hamming width.** The thesis's prose and its parity table disagree on the number of
  check bits. The table lists seven, P0..P6, which is what a SECDED code for 32 data bits
  needs. Seven are used, giving a 39-bit codeword.
- **CRC polynomial** taken as x^8 + x^2 + x + 1 (`POLY = 8'h07`, bit string 100000111).
  The thesis also labels it "0x83".
- **One-hot checkers** read as "at most one" for grants, which are zero in most cycles.
- **Parity regeneration** at the L inputs of `noc_top` stands in for the network
  interface.
- Area figures and fault-coverage numbers from the thesis (gate-level fault simulation of
  the checkers) are not reproduced by this RTL.

## Simulating

Every testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=M`. Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/noc_pkg.sv rtl/hamming_pkg.sv tb/tb_noc_top.sv --top-module tb_noc_top
./obj_dir/Vtb_noc_top
```

Substitute any other `tb_<module>`. The testbenches:

| testbench | what it shows |
|-----------|---------------|
| `tb_noc_top` | 2x2 mesh at the default size. 64 packets between all node pairs, including two-hop diagonals, with slow receivers, so FIFOs fill, outputs are contended and links stall. CRC-coded payloads, some corrupted on purpose and flagged on arrival. Hamming single and double errors. No checker may fire. |
| `tb_router` | one router at the centre of a 4x4 mesh: every output used; back-pressure, full FIFOs and contention; whole packets in order; a bad P bit flagged once |
| `tb_fifo_onehot` | queue reference, capacity 3, CTS rules, 2-cycle write latency, simultaneous read and write |
| `tb_lbdr` | XY decisions at all four nodes of a 2x2 mesh, direction kept for body and tail flits |
| `tb_arbiter_rr` | round-robin order L,N,E,W,S; no interleaving; grant pops the flit shown; 3-cycle flit rate |
| `tb_*_checkers` | silent on a fault-free unit; each flag compared with the property on random and corrupted vectors; every flag fires. The FIFO and arbiter benches also apply every legal control-part vector (320 and 768) with the registers forced, and count false positives: there are none |
| `tb_hamming_*`, `tb_crc8_*`, `tb_parity_*` | codecs against independent references; CRC latency 20 and 28 cycles |

The simulator used has two-state logic, so every register that is read is reset.

## Files

`rtl/`: `noc_pkg` (flit format, port indices, checker structs), `hamming_pkg` (code
layout), `noc_top`, `router`, `fifo_onehot`, `lbdr`, `arbiter_rr`, `xbar`,
`fifo_checkers`, `lbdr_checkers`, `arbiter_checkers`, `parity_gen`, `parity_chk`,
`hamming_enc`, `hamming_dec`, `crc8_enc`, `crc8_dec`. `tb/`: one `tb_<module>.sv` per
module.
