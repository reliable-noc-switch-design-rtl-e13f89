# RKT switch: a fault-tolerant four-port NoC switch with loopback

When a mesh network-on-chip is being reconfigured, or one of its routers has
failed for good, a router must not keep packets that are headed for that
neighbour. If it does, they sit in the router's output buffers until the
neighbour comes back, or they are lost. The RKT switch handles this with a
**loopback module** on every port. If the neighbour on a port is unavailable
or has been found to be permanently faulty, the packets in that port's output
buffer are turned around. They go back into the switch through the same
port's input, as new packets, and the routing logic sends them out through
another port. Each turnaround adds one to that port's entry in a
**centralized error journal**. The routing uses **adaptive XY** with a
**URPI** (Unique Routing Path Indication) mark. URPI shows whether a packet
has only one usable way out. Next to the switch sits a rate-1/2
**convolutional encoder and Viterbi decoder** for 16-bit packets. It
corrects any two bit errors in a packet.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017) in `rtl/`, with
self-checking testbenches in `tb/`.

## Packet

A packet is a single 16-bit word. The switch stores and forwards it whole:

| bits   | 15:14 | 13:11  | 10:8   | 7:5    | 4:2    | 1:0  |
|--------|-------|--------|--------|--------|--------|------|
| field  | URPI  | Y prev | X prev | Y dest | X dest | data |

The field order and the URPI position (bits 16-15, counting from 1) come
from the design. The 3-bit coordinates are a choice made here, and they
leave 2 payload bits. The `flit_t` struct in `rtl/rkt_pkg.sv` defines the
layout. The switch never rewrites the previous coordinates. The design does
not say who updates them, so a mesh built from these switches must handle
that at the network interface or in a wrapper.

## Block structure

```
             link N                                  link E
               |                                       |
          [loopback]--[FSM]                      [loopback]--[FSM]
            |     ^                                 |     ^
  input FIFO      output buffer (3 FIFOs + RR mux)  ...
            |     ^
  routing error detection (URPI)
            |
  route register -> routing logic --request--> output buffer of E, S or W
                                   (crosspoint in rkt_switch)
  ... same for the E, S and W ports ...
  loop_event x4 --> error journal (one 8-bit counter per port)
  conv_encoder / viterbi_decoder (own ports)
```

| file | block |
|---|---|
| `rkt_pkg.sv` | packet struct, direction and state enums, URPI and rw codes |
| `rkt_fifo.sv` | FIFO with `r`, `w`, `d`, `q`, `full`, `empty` (show-ahead) |
| `port_fsm.sv` | per-port controller: transmit / receive / loopback |
| `loopback.sv` | logic control, input mux, semi crossbar, two one-packet buffers, `occ_or_out` |
| `route_err_detect.sv` | usable-port mask and URPI marking |
| `routing_logic.sv` | adaptive XY port choice |
| `output_buffer.sv` | one FIFO per other port and a round-robin mux |
| `error_journal.sv` | per-port saturating loopback counters |
| `rkt_port.sv` | one port (North/East/South/West module) |
| `conv_encoder.sv`, `viterbi_decoder.sv` | packet codec |
| `rkt_switch.sv` | top: four ports, crosspoint, journal, codec |

Ports are numbered North=0, East=1, South=2, West=3. Every 4-bit mask uses
this order.

## Link handshake and the port FSM

Each direction of a link carries `data`, a `data_request` line from the
sender and an `occ_or_out` (occupied) line from the receiver. A sender raises
`data_request_out` only while the receiver's occupied line is low, so every
cycle with a request is a transfer. There are no retries and no
acknowledges.

A link is half duplex. The external 2-bit control code `rw` of each port
selects it: `10` is transmit and `01` is receive. Any other code keeps the
current state. The port FSM registers the state, so the state changes one
clock after `rw` does.

- **receive**: the port accepts a packet when its input path has room. It
  shows occupied when the path is full.
- **transmit**: the port sends a waiting packet when the neighbour is not
  occupied. It always shows occupied to that neighbour.
- **loopback**: entered when `unavailable_in` or `id_in` (neighbour
  permanently faulty) is high, whatever `rw` says. The port shows occupied and
  sends nothing on the link.

Because of this half-duplex scheme, whatever drives `rw` has to give each
port receive and transmit phases that match its neighbours. The design draws
a central control logic block for this, but does not say what it does. Here
`rw` is a top-level input instead.

## Loopback: how packets escape a dead neighbour

The loopback module keeps two one-packet registers: `data_buf_out`, which
feeds the link, and `data_buf_in`, which feeds the input FIFO. Its logic
control treats loopback as needed whenever `unavailable_in | id_in` is high.
Then:

1. The semi crossbar sends the packet in `data_buf_out` onto the loopback bus
   instead of the link. `data_request_out` stays low.
2. The input mux takes the loopback bus instead of the link data and loads
   `data_buf_in`. The packet enters the input FIFO like any arriving packet.
3. `occ_or_out` (the OR of the FSM's occupied signal and the loopback
   condition) stays high, so the neighbour sends nothing in the meantime.
4. `loop_event` pulses for one clock. The journal adds 1 to this port's
   counter, which saturates at 255. `journal_clear` resets all four counters.

The packet's route is then worked out again. The switch-wide `stop` mask
(`unavailable_in | id_in` of every port) marks the failed port as unusable,
so the packet leaves through one of the other ports. A packet can therefore
leave through the port it came in on, if the routing sends it that way.

In this design `data_buf_out` sits *before* the semi crossbar. The design's
drawing puts the buffer after it, but the order used here means that a packet
already waiting for the link when the neighbour fails is still looped back
and cannot get stuck.

If every port except a packet's own is stopped, the packet waits in its
input until a port comes back. Suppose two neighbours are down at the same
time, and each one's looped packets are routed to the other's output
buffer. Traffic between those two ports can then stall until one of them
recovers. No packet is lost.

## Routing: URPI and adaptive XY

The **routing error detection** block of each input computes the usable-port
mask `dr_sel = ~stop & ~(own port)`. It writes URPI = `11` into bits 15:14
when exactly one port is usable, and `00` otherwise. The own port is
excluded, because an output buffer has FIFOs only for the *other* three
ports.

The **routing logic** sees the marked packet in the route register and picks
one port:

1. URPI = `11` and exactly one port usable: that port.
2. The XY rule, comparing the destination with the previous coordinates in
   the packet:
   - Y dest > Y prev: **East**
   - Y dest < Y prev: **West**
   - Y equal, X dest > X prev: **South**
   - any other case: **North**
3. If that port is not usable and Y differed, the port that reduces the X
   distance (South or North), if usable.
4. Otherwise the first usable port in the order W, S, E, N.

The design gives steps 1 and 2. Steps 3 and 4 are this design's reading of
"adaptive", which the design names but does not spell out. Note how the axes
are used: Y decides East/West and X decides South/North. This follows the
design's wording, but is the reverse of the usual convention. The design's
routing table and its prose disagree for equal Y. The prose is followed.

## Timing

| path | clocks |
|---|---|
| input link to output link, nothing waiting | 5 (data_buf_in, input FIFO, route register, output FIFO, data_buf_out) |
| input link to routing request | 3 |
| output-buffer head to link | 1 (data_buf_out), then sent in the first cycle the neighbour is free and the port transmits |
| loopback: data_buf_out to input FIFO | 2 |
| Viterbi decode | 38 from `cc_dec_start` to `cc_dec_done` |

The encoder is combinational. The decoder is busy for the whole 38 clocks
and ignores `start` until it finishes.

## Packet codec

`conv_encoder` passes the 16 packet bits, most significant first, and then
two zero tail bits, through a constraint-length-3 shift register. Each input
bit yields two code bits, g0 = u^s1^s2 (generator 7) and g1 = u^s2
(generator 5), so a packet becomes a 36-bit code word. `viterbi_decoder`
runs the 4-state trellis one step per clock (hard-decision add-compare-select
with stored decisions). It then traces back from state 0, which is where the
termination leaves the encoder, and reports the decoded packet and the
number of corrected code bits. The code's free distance is 5, so any two
errors are corrected.

Only the general method of the codec comes from the design: a shift register
with modulo-two adders, and Viterbi decoding on the trellis. The rate, the
generators, the termination and the schedule are choices made here. The
design also does not say where the codec sits, switch-to-switch or
end-to-end. It is therefore placed next to the switch on its own ports
(`cc_enc_*`, `cc_dec_*`), not wired into the links.

## Parameters

| module | parameter | default | note |
|---|---|---|---|
| `rkt_pkg` | `FLIT_W` | 16 | from the design |
| `rkt_pkg` | `COORD_W` | 3 | choice |
| `rkt_switch` / `rkt_port` | `IN_DEPTH`, `OB_DEPTH` | 4 | choice; FIFO depth of the input buffer and of each output-buffer FIFO |
| `rkt_switch` | `JNL_W` | 8 | choice; journal counter width |
| `conv_encoder` / `viterbi_decoder` | `DATA_W` | 16 | packet width |

## Where this departs from, or adds to, the design

- **Added here:** the link handshake, the FIFO depths, the coordinate widths,
  the `rw` codes `00`/`11` (keep the current state), the adaptive fallback
  (steps 3 and 4), round-robin arbitration in the output buffers, the
  journal's width, saturation and clear, and every codec parameter.
- **Not built:**
  - the central control logic, because its function is not described; `rw`
    and `journal_clear` are brought out instead;
  - the five-port variant with a local port;
  - any use of the journal to tell permanent errors from tolerable ones,
    which is named but not described;
  - the `ack_sel` signal seen in simulations of the design, whose role is not
    given;
  - the turn-model part of the routing, which the design names but does not
    describe. The routing here is XY with the fallback above.
- The FSM sends a packet as soon as one is waiting. The design's wording
  suggests reading starts when the FIFO is full.
- The switch does not rewrite the previous coordinates.
- The URPI bits are rewritten at every switch. A packet that could leave
  through several ports therefore goes out with URPI = `00`, even if it came
  in with `11`.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | covers |
|---|---|
| `tb_rkt_fifo` | random traffic against a queue model, full/empty |
| `tb_port_fsm` | random inputs against a reference state machine |
| `tb_route_err_detect` | every stop pattern at every port |
| `tb_routing_logic` | directed XY cases and 5000 random cases against a reference |
| `tb_loopback` | scoreboard of link and loopback paths, 1-clock timing |
| `tb_output_buffer` | per-source order, back-pressure, round-robin fairness |
| `tb_error_journal` | counts, saturation, clear |
| `tb_rkt_port` | one port between a modelled neighbour and modelled switch, in phases |
| `tb_conv_codec` | encoder against a serial reference; 0/1/2-error correction; latency |
| `tb_rkt_switch` | the whole switch at default sizes (see below) |
| `tb_rkt_switch_cases` | the whole switch at default sizes, replaying the design's own simulated cases (below) |

`tb_rkt_switch` runs the top with all defaults:

- a directed West-to-East packet, which must arrive in 5 clocks;
- a directed loopback that the journal must record;
- 80 random phases with random `rw`, unavailable and faulty neighbours, and
  back-pressure, followed by a drain;
- 40 codec round trips.

It checks that every packet leaves exactly once and never towards an unusable
neighbour, and that the journal matches the loopbacks it counted. It also
counts how often each mechanism happened and fails if any of them never did:
loopback for an unavailable neighbour, loopback for a faulty one, URPI = 11,
an adaptive detour, input back-pressure, every FSM state at every port, a
journal clear and codec correction.

`tb_rkt_switch_cases` replays the cases that the design's own simulations
show, at default sizes:

- `1111111111111101` entering at West leaves at North;
- `0000000000000001` entering at North leaves at West;
- x_prev = 4 (everything else 0) goes North;
- y_dest = 4 goes East;
- `1111000010101101`, held for a West neighbour that goes away, is looped
  back, leaves through another port and leaves exactly one journal entry at
  West;
- the FSM's transmit, receive and loopback states follow `rw` and
  `unavailable_in`.

The URPI bits leaving the switch can differ from those simulations, because
every switch recomputes them.

To run one test with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/rkt_pkg.sv tb/tb_rkt_switch.sv \
          --top-module tb_rkt_switch -Mdir obj -o sim
./obj/sim
```

Testbenches that do not use the package (`tb_rkt_fifo`, `tb_error_journal`,
`tb_conv_codec`) build the same way. The package is read first so that every
file sees `rkt_pkg`.
