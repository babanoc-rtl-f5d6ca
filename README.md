# BaBaRouter: a five-port wormhole router for a mesh network-on-chip

This is the router of a mesh network-on-chip in the style of the Hermes NoC.
It has five ports: East (0), West (1), North (2) and South (3) connect to
neighbouring routers, and Local (4) connects the IP core at this node. Each
packet reserves a path through the router from its first flit to its last
(wormhole switching). Paths between different input/output pairs are
independent, so up to five packets can cross the router at the same time.

The router was designed as a clockless, quasi-delay-insensitive circuit. It
was written in the Balsa handshake language and mapped to dual-rail,
four-phase logic. In that form every block is a handshake component, and
blocks talk over request/acknowledge channels. The SystemVerilog here keeps
that structure block for block: the same blocks, channels and channel
widths. Each channel becomes a **valid/ready channel on one clock**. A
transfer happens on a rising edge when `valid` and `ready` are both high.
The order of events on each channel is the same as in the clockless
circuit. Timing is of course different, and the dual-rail gate-level
template is not reproduced.

## Packets

A packet is a sequence of flits of `FLIT_W` bits (default 16):

| flit | content |
|------|---------|
| 1 (header) | destination address in bits `FLIT_W/2-1:0`. The upper half is free; the router forwards it untouched |
| 2 (size) | number of payload flits that follow, 0 allowed |
| 3 ... | payload |

An address is `FLIT_W/2` bits. Its upper half is the X coordinate and its
lower half the Y coordinate. With 16-bit flits, address `8'h21` is X = 2, Y = 1.
The size flit counts only the payload, so a packet has size + 2 flits.

## How a packet crosses the router

```
 in[p] ──> input FIFO ──> IN CTRL ──DATA+EOP (n+1)──────────────> CROSSBAR ──> out[q]
                            │                                        ^
                            └─ADDRESS (n/2)─> SWITCH CONTROL ─CTRL (3)┘
                                              arbitration -> XY routing -> one FIFO per output
```

1. **Input FIFO** (`hs_fifo`). The flits enter a chain of `FIFO_DEPTH`
   one-place registers (`hs_register`). Each register takes a word, then
   hands it on, and takes no new word while it holds one. As a result a word
   moves one stage per cycle, and a full-speed stream passes **one flit every
   two cycles**. This is the throughput of every path through the router.
2. **IN CTRL** (`in_ctrl`) frames the packets. When a header reaches the
   head of the FIFO, IN CTRL first sends its destination address to the
   switch control. Only after that transfer does it offer the header to the
   crossbar. It then forwards the size flit, loads the size, and counts the
   payload flits. Every flit goes to the crossbar with one extra bit, EOP. EOP
   is 1 on the last payload flit, or on the size flit when the size is 0.
   IN CTRL stores no flits: the FIFO's head flit leaves in the cycle the
   crossbar takes it.
3. **Switch control** (`switch_control`) is shared by all five inputs:
   * the **arbiter** (`sc_arbiter`) takes one pending address request at a
     time into its CHOICE register (3-bit input port + address);
   * **XY routing** (`xy_routing`) turns the chosen address into an output
     port. X is resolved first (East if the destination X is larger, West if
     smaller), then Y (North if larger, South if smaller), then Local;
   * the input port number is written into that output's **port-select
     FIFO**: 3 bits wide, 4 places, one per output.
4. **Crossbar** (`crossbar`). The head of each port-select FIFO is the CTRL
   channel of that output. It names the input the output is bound to. The
   crossbar's control logic decodes the five bindings into a DEMUX select for
   each input and a MERGE select for each output. Flits then flow straight
   from the bound input to the output, with EOP removed. When the EOP flit is
   accepted, the crossbar acknowledges the CTRL channel. That pops the
   binding and frees the output for the next input queued behind it.

### Why a binding lasts exactly one packet

The key to the design is that the CTRL channel stays *pending* for the whole
packet. The switch control's request is not answered when the path is set
up; it is answered when the packet's last flit has gone through. The head of
each port-select FIFO is therefore the current owner of that output. The
entries behind it are the inputs waiting for it, in the order their requests
were arbitrated.

Two properties follow:

* An input has at most one request in the whole switch control. IN CTRL
  cannot present the next header's address until the crossbar has taken the
  current packet's EOP flit, and that same transfer pops the binding. So one
  input never waits twice in the same queue, and it is never bound to two
  outputs. The crossbar asserts the second property, and the end-to-end
  testbench checks the first every cycle.
* Requests for a busy output are served in arrival order. Each queue holds at
  most one entry per input. In a mesh with XY routing only the other four
  ports ask for a given output, so a 4-place queue is always enough.
  That is why the queues are 4 deep.

If a queue is full anyway, the CHOICE register waits and the arbiter stops
granting. This happens when a packet from Local is addressed to this router
itself, which makes Local a fifth requester of the Local output.

### Latency

With an empty router and default sizes, a header accepted on the input at
clock edge 0 leaves on edge `FIFO_DEPTH + 5` = 21. That is `FIFO_DEPTH-1`
edges through the input FIFO, 1 to be granted, 1 to be routed into the
port-select FIFO, 3 to reach its head, and 1 to cross. Later flits follow
every two cycles. The end-to-end testbench checks this number.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `babarouter` | `FLIT_W` | 16 | flit width n; addresses are n/2 bits, the crossbar channel n+1 |
| | `FIFO_DEPTH` | 16 | input buffer depth per port, in flits |
| | `CTRL_FIFO_DEPTH` | 4 | places in each port-select FIFO |
| | `ROUTER_ADDR` | X = 1, Y = 1 (`8'h11` at 16-bit flits) | this router's address; set it per node |
| | `PORTS` | `5'b11111` | which ports exist (bit p = port p); border routers drop the ports facing outside the mesh |
| `hs_fifo` | `WIDTH`, `DEPTH` | 16, 16 | |
| `in_ctrl` | `FLIT_W` | 16 | |
| `sc_arbiter`, `xy_routing` | `ADDR_W` | 8 | |
| `switch_control` | `ADDR_W`, `CTRL_FIFO_DEPTH`, `ROUTER_ADDR` | 8, 4, X = 1, Y = 1 | |
| `crossbar` | `FLIT_W` | 16 | |

The defaults are the configuration the router was evaluated in: 16-bit
flits and 16-flit buffers. A smaller configuration, 8-bit flits with 8-flit
buffers (4-bit addresses, X and Y of 2 bits each), is also tested.
`ROUTER_ADDR` has no natural default. X = 1, Y = 1 puts the router in the
middle of a 3x3 block, so that every output can be reached.

## Interface and reset

`babarouter` ports, all on `clk`:

* `in_valid[4:0]`, `in_ready[4:0]`, `in_data[4:0][FLIT_W-1:0]`: one input channel per port;
* `out_valid[4:0]`, `out_ready[4:0]`, `out_data[4:0][FLIT_W-1:0]`: one output channel per port.

The port numbering follows `babanoc_pkg::port_e`. A sender must hold `valid`
and the data steady until `ready`. The router does the same on its outputs,
and an assertion checks it. Routers connect port to port:
East out to the neighbour's West in, and so on. `rst_n` is a synchronous,
active-low reset that empties every buffer and queue.

A router on the edge of the mesh has fewer than five ports. Clear the
matching bits of `PORTS`. A missing input then has no buffer and never
accepts a flit (`in_ready` stays low). A missing output never offers one.
A packet addressed beyond the edge of the mesh would wait forever for a
missing output, and an assertion reports it.

## Departures from the original router and choices made here

* **Clocked channels.** The original circuit has no clock. Here every
  channel is a valid/ready channel on one clock, and the one-place registers
  keep their accept-then-emit behaviour. That is what halves the streaming
  rate.
* **Tie-breaking in the arbiter.** The original arbiter serves whichever
  request arrives first, and resolves truly simultaneous requests in
  analogue fashion. In a clocked circuit requests do arrive in the same
  cycle, so `sc_arbiter` breaks ties with a rotating priority, starting at
  the port after the one granted last. Fairness between inputs competing for
  one output still comes from the per-output FIFOs, as in the original.
  There is no separate round-robin arbiter.
* **Self paths in the crossbar.** The original crossbar offers four paths
  per input (every output but its own). This one offers all five, so that a
  Local-to-Local packet is delivered rather than lost. A U-turn between
  neighbours does not arise with XY routing.
* **Empty payloads.** A size of 0 puts EOP on the size flit itself.
* **Address layout and directions.** X is the upper half of the address.
  East means larger X and North larger Y, as in Hermes.
* **Crossbar timing.** The crossbar stores nothing. A flit passes from IN CTRL
  to the output in the cycle the output accepts it, so `out_ready` reaches
  the input FIFO combinationally through the crossbar and IN CTRL, which
  store nothing. The register chain breaks the path there, since its
  `ready` depends only on its own state.
* **Not built:** the dual-rail, four-phase, delay-insensitive gate-level
  implementation, and the network of routers itself. The network's size and
  address plan are left to the user: instantiate one `babarouter` per node
  with its own `ROUTER_ADDR`.

## Files

| file | contents |
|------|----------|
| `rtl/babanoc_pkg.sv` | port count, port-id width, port enum |
| `rtl/hs_register.sv` | one-place handshake register |
| `rtl/hs_fifo.sv` | register-chain FIFO (input buffers, port-select FIFOs) |
| `rtl/in_ctrl.sv` | packet framing, address and DATA+EOP channels |
| `rtl/sc_arbiter.sv` | arbitration and CHOICE register |
| `rtl/xy_routing.sv` | XY routing function |
| `rtl/switch_control.sv` | arbiter + routing + five port-select FIFOs |
| `rtl/crossbar.sv` | crossbar CTRL, DEMUXes and MERGEs |
| `rtl/babarouter.sv` | the router (top) |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/babarouter_e2e.sv` | end-to-end traffic generator and reference model, for any flit width |
| `tb/tb_babarouter.sv` | end-to-end test at the default parameters |
| `tb/tb_babarouter_8b.sv` | end-to-end test with 8-bit flits and 8-flit buffers |
| `tb/tb_babarouter_border.sv` | end-to-end test of a corner router (X = 0, Y = 0) with only East, North and Local |

## Verification

Every testbench checks its block against values it works out on its own,
stops itself with a watchdog, and prints
`TB_RESULT checks=<n> failures=<n>`.

* `tb_hs_register`, `tb_hs_fifo`: order and integrity under random
  handshakes. The FIFO test also checks latency (`DEPTH-1` edges), capacity
  (`DEPTH` words) and rate (one word per two cycles).
* `tb_in_ctrl`: 300 random packets, including empty ones. It checks the
  address sequence, every crossbar word and its EOP bit, and that the address
  goes out before the header.
* `tb_sc_arbiter`: grants only for pending requests, one at a time, with the
  right port and address. With all five ports requesting, grants rotate
  0-1-2-3-4.
* `tb_xy_routing`: all 65,536 pairs of router and destination address.
* `tb_switch_control`: random requests against a model of the five queues.
  It also checks the grant-to-CTRL delay (4 edges) and a Local queue holding
  four requesters.
* `tb_crossbar`: 2000 random packets with random bindings and backpressure.
  It checks every flit, and that a CTRL acknowledge comes only with the EOP
  flit. It also requires all five paths to be active at once at least once.
* `tb_babarouter` / `tb_babarouter_8b` / `tb_babarouter_border`: the
  latency check above; then about 1000 random packets on all inputs at
  once, with random backpressure; then a permutation in which all five inputs stream to five different
  outputs. Every packet is checked whole, in order, on the output the
  test's own XY model predicts. The test counts arbitration between
  simultaneous requests, queued output requests, packets waiting for a busy
  output, full input buffers, output backpressure, empty payloads,
  concurrent paths, five simultaneous paths and traffic on every output. It
  fails if any of these never happened. The border variant drives only the
  three ports its router has, and skips the five-path permutation.

To run a testbench with Verilator (5.x) from the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/babanoc_pkg.sv tb/tb_babarouter.sv --top-module tb_babarouter -o sim
./obj_dir/sim
```

Replace `tb_babarouter` with any other testbench name. Each run finishes in
seconds.
