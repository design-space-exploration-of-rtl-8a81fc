# Lightweight credit-based NoC routers for a 3x3 mesh

This is a small, five-port packet-switched router for a 2D-mesh network on chip, built in
three variants. The design aims at a very small router that still moves one flit per clock
cycle per hop. It gets there with four ideas:

* **No control fields in body flits, no tail flit.** Only the head flit carries routing
  information (destination, and in the wormhole variants the packet length). The router
  finds the end of a packet by counting flits. Buffers therefore hold pure payload and need
  no flit-type bits.
* **One-wire credit flow control.** Each link has a flit bus and a valid strobe going
  forward and a single credit wire coming back. A flit crosses a link in one cycle, with no
  request/acknowledge round trip.
* **One-cycle routing.** The head flit is routed, arbitrated and sent during the cycle after
  it reaches the front of its input buffer. The zero-load latency is therefore
  `T = Rc + (Ps - 1)` cycles for a packet of `Ps` flits crossing `Rc` routers.
* **A single central arbiter.** The router serves one packet at a time. It picks input ports
  in round-robin order and streams the packet through a 5x5 multiplexer crossbar. This trades
  concurrency for area.

The RTL follows the architecture of the thesis *Design Space Exploration of FPGA-Based NoC
Routers* (A. Imbewa, University of Windsor, 2012). It is an independent SystemVerilog
implementation. Where that description is silent or this implementation differs, the README
says so (see [Where this RTL departs from the original description](#where-this-rtl-departs-from-the-original-description)).

## The three router variants

| `VERSION`  | switching           | packet length                        | credit means                   |
|------------|---------------------|--------------------------------------|--------------------------------|
| `VCTR`     | virtual cut-through | fixed, `PACKET_SIZE` (8) flits       | room for a whole packet        |
| `WHR_1CLK` | wormhole            | 1..15 flits, carried in the head     | room for one more flit         |
| `WHR_2CLK` | wormhole, dual clock| as `WHR_1CLK`                        | as `WHR_1CLK`                  |

**VCTR** starts a packet only when the downstream buffer can hold all of it. Body flits then
follow without further credit checks, and forwarding begins before the tail has arrived
(cut-through). Every packet has the same length, so the head needs no length field.

**WHR_1CLK** reads the packet length from the head. It checks the credit before every flit,
so a packet can be spread over several routers' buffers.

**WHR_2CLK** is the dual-clock variant. Routing a head is the slow part of a router, while
forwarding a body flit is only a multiplexer. So heads are routed on a slow *head clock* and
body flits move on a fast *body clock*. In this RTL the router runs on the body clock, and
the head clock is a one-cycle enable, `head_ce`. A head can be granted only in a cycle where
`head_ce` is high, and body flits move every cycle. `noc_top` raises `head_ce` every
`HEAD_CLK_DIV` (default 2) cycles.

## Flit and packet format

Flits are `FLIT_SIZE` = 8 bits wide.

```
head flit, wormhole:  [7:4] destination node (1..9)   [3:0] packet length in flits, head included (1..15)
head flit, VCTR:      [7:4] destination node (1..9)   [3:1] unused   [0] 1 = "packet arrived"
body flits:           [7:0] payload
```

Nodes are numbered R1..R9 row by row, with R1 at the top-left, so R5 is the centre. A length
of 0 (or, in VCTR, bit 0 = 0) at the front of a buffer means "no packet here". That is why
the input buffers read as zero when empty. Destination addresses that name no node (0,
10..15) are delivered to the local port of the first router they reach.

## Inside the router

```
 flit_in[p], req_in[p] ──► fifo_buffer[p] ──front[p]──┬──────────────► switch ──► channel[o], req_out[o]
 credit_out[p] ◄──────────      (x5)                  │                   ▲  ▲
                                                      ▼                   │  │ en[o], sel
                                        direction_decoder ◄─lut_sel─ arbiter ◄── credit_in[o]
                                                      └──direction──►   │
                                                                        └─► pop[p] to the buffers
```

Ports are indexed N=0, E=1, S=2, W=3, L=4 everywhere.

**`fifo_buffer`** has one instance per input port. It is a row of `BUFFER_SIZE` shift
registers. Location 0 is the front and drives the decoder, the arbiter and the switch
directly. A read shifts everything one place towards the front and clears the last
location. A write goes to the first free location, picked by a decoder from the occupancy
counter. Reading and writing in the same cycle is allowed. `credit_out` is high while at
least `CREDIT_SPACE` locations are free: 1 for the wormhole variants, `PACKET_SIZE` for
VCTR.

**`direction_decoder`** has two parts. A 5-to-1 multiplexer picks the destination field of
the port named by `lut_sel`. A table for this node then turns it into a direction code
(001 N, 010 E, 011 S, 100 W, 101 L). The table is filled at elaboration from `NODE_ID` using
X-then-Y routing: first east or west to the destination column, then north or south.
There is only one decoder, so the arbiter can look up one port per cycle.

**`arbiter`** is the heart of the router and the part most worth understanding. It is a
small state machine with the states `IDLE`, `N`, `E`, `S`, `W` and `L`. The state names the
input port whose packet is being forwarded.

* *In `IDLE`*, a port is *waiting* if its front flit is a head (length field non-zero, or
  the arrived bit set). The arbiter takes the first waiting port after the one it served
  last, in the order N, E, S, W, L; after reset North comes first. It points the decoder at
  that port and checks the credit of the resulting output. All of this is combinational. If
  there is credit (and, in `WHR_2CLK`, `head_ce`), the head flit is popped and sent through
  the switch in the same cycle. The arbiter then enters the port's state with a down-counter
  loaded with the packet length minus one. If there is no credit, nothing is sent, and the
  port counts as served so that the next waiting port gets the next turn.
* *In a port state*, one body flit is sent per cycle while that port's buffer holds a flit
  (and, in the wormhole variants, while the output has credit). When the counter runs out,
  the arbiter returns to `IDLE`. The next head can be granted in the following cycle,
  so back-to-back packets leave with no gap.

**`switch`** has five 5-to-1 multiplexers, one per output. They share the select `sel` (the
port being served) and have one enable each. Disabled outputs drive zero. `req_out` equals
the enables.

### Timing

A head written into an input buffer at clock edge *k* leaves on an output channel during the
next cycle and is written into the next router's buffer at edge *k+1*. Body flits follow one
per cycle. Measured in simulation, with the latency counted from the cycle the head enters
the source router to the cycle the last flit leaves the destination router:

| path                              | VCTR | WHR_1CLK | WHR_2CLK (`HEAD_CLK_DIV`=2) |
|-----------------------------------|------|----------|-----------------------------|
| R2 -> R3 -> R6, 8 flits           | 10   | 10       | 13                          |
| worst pair in the mesh, 8 flits   | 12   | 12       | 17                          |

10 = 3 routers x 1 cycle + 7 body flits, which matches `T = Rc + (Ps - 1)`. All counts are in
`clk` cycles. For `WHR_2CLK`, `clk` is the fast clock. Each head may wait up to
`HEAD_CLK_DIV - 1` cycles at every router for the next `head_ce`. In cycles, `WHR_2CLK` is therefore never
faster than `WHR_1CLK`. It pays off only in time: the single-clock router must run at the
speed of its slowest path, the head's routing decision, while the dual-clock router can run
its body clock faster. Here both variants have the same combinational head path, so that
speed-up is not modelled. It would need the head path to be made multicycle for timing
analysis.

## Link protocol

Every output port drives `channel` (the flit) and `req_out` (the flit is valid this cycle).
The receiving buffer stores the flit at the next rising edge. The receiver's `credit_out`
wire returns as the sender's `credit_in`. `credit_in` is decoded from registers, so a sender
may look at it and send in the same cycle.

* Wormhole: send a flit only while `credit_in` is high.
* VCTR: look at `credit_in` before the head only. It promises room for the whole packet, so
  the remaining `PACKET_SIZE - 1` flits may be sent on the following cycles without
  checking.

Local IP cores attach to the local port under the same rules. A VCTR source may leave gaps
between the flits of a packet; the router waits for them. The packet then leaves at full
speed only if its flits arrive one per cycle.

## Mesh and top level

`noc_mesh3x3` instantiates nine routers with `NODE_ID` 1..9. It wires every pair of
neighbours in both directions. Ports on the mesh border are left unused: their inputs are
tied to zero and their `credit_in` to 0. Each router's local port is brought out as element
`n` of the `local_*` arrays (node R(n+1)).

`noc_top` holds one mesh of each variant: index 0 is VCTR, 1 is WHR_1CLK, 2 is WHR_2CLK.
They share `clk` and `rst_n` and nothing else, so the three variants can run side by side
under the same traffic. It also generates `head_ce`. All ports are arrays indexed
`[mesh][node]`.

Reset is active-low and synchronous (`rst_n`). It empties every buffer and returns every
arbiter to `IDLE` with North as the first to be served.

## Parameters

| parameter      | default | where                             | meaning |
|----------------|---------|-----------------------------------|---------|
| `FLIT_SIZE`    | 8       | all                               | flit and link width; the top 4 bits of a head are the destination |
| `BUFFER_SIZE`  | 8       | router, mesh, top                 | depth of each input buffer |
| `PACKET_SIZE`  | 8       | router, mesh, top                 | VCTR packet length; must not exceed `BUFFER_SIZE` |
| `VERSION`      | `WHR_1CLK` | router, mesh                   | `VCTR`, `WHR_1CLK` or `WHR_2CLK` |
| `NODE_ID`      | 5       | router, direction_decoder         | position of the router in the mesh (1..9) |
| `HEAD_CLK_DIV` | 2       | top                               | body-clock cycles per head-clock tick |
| `CREDIT_SPACE` | 1       | fifo_buffer                       | free locations required for credit (set by the router) |

The mesh size (3x3) is a package constant. The destination field is 4 bits, so the router
cannot address more than 15 nodes without widening the head format.

## Known limitation: wormhole deadlock through the central arbiter

Because a router forwards only one packet at a time and stays with it to its last flit, the
wormhole variants can deadlock even though X-then-Y routing is used. Here is how. Router A is
in the middle of a packet bound for its neighbour B and waits for B's input buffer. B is in
the middle of a packet bound for A and waits for A's input buffer. Neither buffer can drain,
because each router would have to serve that port first. This happens readily under random
traffic in all directions with packets longer than a buffer. It cannot happen while all
traffic moves towards non-decreasing column and row (or all towards non-increasing ones),
because then no chain of waiting routers can close into a loop.

VCTR is much less exposed. A started packet is guaranteed room downstream, and a router that
cannot start its chosen packet passes the turn on instead of waiting. It ran the uniform
random test below without stalling.

Removing the hazard would need a change to the architecture, such as independent output
allocation or virtual channels. That is outside this design.

## Where this RTL departs from the original description

* **Rising edge only.** The original design also uses the falling clock edge inside the
  buffer state machine and the arbiter to fit dependent steps into one cycle. Here the same
  one-cycle hop comes from combinational routing and arbitration within a single
  rising-edge cycle.
* **Two clocks become a clock enable.** In the original, `WHR_2CLK` switches the router clock
  between a slow head clock and a fast body clock. Here the router always runs on the fast
  clock, and the head clock is an enable. The ratio between the clocks (2) is this design's
  choice.
* **Credit threshold.** The original withdraws credit "when the buffer becomes nearly full".
  Here credit is withdrawn when fewer than `CREDIT_SPACE` locations are free: one free slot
  for wormhole, a whole packet for VCTR.
* **No credit for the chosen port.** The original checks credit before opening a channel but
  does not say what happens when there is none. Here the port loses its turn.
* **Routing tables** are computed from `NODE_ID` rather than written per node. Addresses
  outside the mesh go to the local port.
* **Packet length.** The original states an upper bound of 2^(FLIT_SIZE-4) = 16 flits. With
  a 4-bit length field, where 0 marks "no packet", the limit here is 15.
* **Buffer state machine.** The buffer's empty / partly full / full states live in its
  occupancy counter rather than in a separate state register.
* The local IP cores and the packetizing unit that forms packets are not part of this RTL.
  The testbenches model them.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs.

* `tb_fifo_buffer`: random reads and writes against a queue model, with both credit
  thresholds. It checks the front flit (zero when empty), `not_empty` and `credit_out` every
  cycle.
* `tb_direction_decoder`: all nine nodes x five selects x sixteen addresses, against X-then-Y
  routing worked out from coordinates.
* `tb_switch`: every select/enable combination, then random inputs.
* `tb_arbiter`: a wormhole and a VCTR arbiter with modelled buffers, random credits and a
  random `head_ce`. A cycle-by-cycle reference model of the rules predicts pops, enables and
  selects. The test requires contended grants, credit stalls, `head_ce` waits and
  mid-packet empty buffers to occur.
* `tb_router`: five simultaneous packets at R5 for all three variants. Each output's flits
  are checked, along with the N, E, S, W, L service order, the one-cycle routing delay,
  back-to-back packets, and `WHR_2CLK` heads only on `head_ce`. A long random run with
  back-pressure follows.
* `tb_noc_mesh3x3`: zero-load latency for every source/destination pair in each variant's
  mesh, against `Rc + 7` cycles.
* `tb_noc_top`: the whole design at default parameters. It runs random traffic in all three
  meshes for 20,000 cycles with flit-by-flit scoreboards. The wormhole meshes alternate
  south-east and north-west phases (see the limitation above). The test counts and requires
  contention, wormhole credit stalls, VCTR whole-packet waits, `head_ce` waits, VCTR
  cut-through and full buffers. It also checks the `head_ce` rate every cycle.

To run one with Verilator 5 (the `tb_noc_top` run takes well under a minute):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_noc_top \
  rtl/noc_pkg.sv rtl/fifo_buffer.sv rtl/direction_decoder.sv rtl/switch.sv \
  rtl/arbiter.sv rtl/router.sv rtl/noc_mesh3x3.sv rtl/noc_top.sv tb/tb_noc_top.sv
./obj_dir/Vtb_noc_top
```

Replace the top module and the last file to run another testbench.

## Files

| file | contents |
|------|----------|
| `rtl/noc_pkg.sv` | version enum, port indices, direction codes, arbiter states, default sizes, X-then-Y routing function |
| `rtl/fifo_buffer.sv` | shift-register input buffer with credit |
| `rtl/direction_decoder.sv` | address multiplexer and per-node routing table |
| `rtl/arbiter.sv` | central round-robin routing and arbitration unit |
| `rtl/switch.sv` | 5x5 multiplexer crossbar |
| `rtl/router.sv` | the five-port router |
| `rtl/noc_mesh3x3.sv` | nine routers as a 3x3 mesh |
| `rtl/noc_top.sv` | one mesh per variant, plus the head-clock enable |
| `tb/tb_*.sv` | the testbenches listed above |
