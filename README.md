# Artemis: a network-on-chip that lets cores be swapped at run time

A system-on-chip on a partially reconfigurable FPGA can reload part of the
fabric while the rest keeps running. That helps only if the rest of the chip
survives the reload. While a region is rewritten, its outputs carry garbage,
and packets sent to the vanished core block the paths they hold. Artemis
handles this inside the interconnect. It is a mesh NoC derived from the
Hermes router. Its routers can be told, by a packet sent over the network
itself, to cut off the core on their local port and to reconnect it later.
The same network carries both the control and the data traffic.

This repository holds synthesizable SystemVerilog for the NoC, the
interface macros around a reconfigurable core, three loadable cores (mult,
div, sqrt), the RS-232 bridge to the host, and the 2x2 system that ties them
together. It also has a self-checking testbench for each part.

## The system

```
   Y
   1   [01] serial_core  <-> host (configuration controller)    [11] region 1
   0   [00] processor port (top-level ports)                    [10] region 2
           X = 0                                                X = 1
```

| router | local port                                   |
|--------|----------------------------------------------|
| 00     | processor (not included: `proc_*` ports)      |
| 01     | `serial_core`, the link to the host           |
| 11     | `core_interface` + `reconf_region` (region 1) |
| 10     | `core_interface` + `reconf_region` (region 2) |

`artemis_system` is the top. The regions start out with whichever core the
`region1_sel` / `region2_sel` inputs select (0 mult, 1 div, 2 sqrt, 3 empty).
These inputs stand in for loading a partial bitstream. On the FPGA the
configuration port does that job, so it is not part of this RTL.

## Packets and the control sideband

Flits are 8 bits. Each link carries `tx`, `ctrl` and an 8-bit flit forward,
and `ack` back. A flit moves on a rising clock edge where both `tx` and `ack`
are high.

* **Header flit:** the target router, with X in bits 7:4 and Y in bits 3:0.
* **Data packet:** header, size N, then N payload flits. `ctrl` is 0.
* **Control packet:** exactly two flits, the header and an opcode. `ctrl` is 1
  on both flits. Opcode `01` isolates the target router's local core, and `00`
  reconnects it. A control packet with any other opcode is consumed and does
  nothing.

The `ctrl` bit is stored next to each flit in every input buffer, so it
travels hop by hop with the packet. Routing is XY: a header first moves along
X, then along Y. At its target router, a control packet goes to the router's
own decoder and never to the local port. Reconfigurable cores therefore
neither send nor receive control packets. Their interface does not carry
`ctrl` at all.

## Reconfiguring a region

This is the mechanism the whole design exists for. Swapping the core in the
region at router 11 goes like this:

1. The host sends `01 11 01` over the serial line. The first byte is the
   kind (control); the next two are the header and the opcode. `serial_core`
   sends these two flits into router 01 with `ctrl` set.
2. Router 11 decodes the packet and raises `reconf`. This has three effects
   at once:
   * The R2F macros in `core_interface` force every core-to-router signal
     low (`tx`, the data flit, and the core's `ack`). Whatever the region does
     while it is being rewritten cannot reach the network.
   * The core's reset is `reset | reconf`, so the region is held in reset.
   * From now on, any data packet the router routes to its local port goes
     to a discard sink. The sink accepts one flit per cycle and drops it, so
     traffic sent to the missing core drains and blocks no path.
3. The host loads the new bitstream (here: it changes `region1_sel`).
   `reconf_region` asserts that the selection changes only while it is held
   in reset.
4. The host sends `01 11 00`. The router clears `reconf`, the new core leaves
   reset in a clean state, and packets reach it again.

Points to know:

* Isolation acts at packet boundaries, on the side of the router. A packet
  that already holds the local output when the disable packet is decoded is
  delivered in full.
* A packet the core was sending when isolation began is cut short by the R2F
  macros. Its remaining flits never come. Its header is already in the
  router, so that input buffer waits for the missing flits. The host should
  isolate a core only when it knows the core is idle. The configuration
  controller has this knowledge, because it hands out and takes back the
  cores.
* Any router can be isolated, including ones whose local core is fixed.

## Router

`artemis_router` has five ports: East 0, West 1, North 2, South 3, Local 4.

* **Input buffers** (`artemis_buffer`): a 16-deep FIFO of 9-bit positions
  (the flit plus `ctrl`). `ack` is "not full". On its read side, the buffer
  follows the packet format. This gives the switch two flags:
  * `is_header`: the head flit starts a packet.
  * `is_last`: the head flit is the packet's last (the opcode of a control
    packet, the size flit of an empty data packet, or the last payload flit).
* **Switch control.** There are seven destinations: the five ports, the
  control decoder and the discard sink. Each destination has its own
  round-robin arbiter. A waiting header computes its XY destination. A free
  destination grants one requester and stays owned until that packet's last
  flit leaves (wormhole switching). Packets heading for different outputs
  move in parallel.
* **Timing.** A header written into an empty buffer on edge *t* is granted
  on edge *t+1* and leaves on edge *t+2*. The flits behind it follow at one
  per cycle while the receiver acks. After a packet's last flit leaves, the
  output is free again one cycle later.
* **Reset** is synchronous and active high. It clears the buffers, the
  connections and the isolation state.

`artemis_noc` tiles the routers into an NX x NY mesh (2x2 by default). Edge
ports are tied off.

## Core interface (the macros)

On the FPGA, fixed *macros* pin down where the region's signals cross its
border, so every core loaded there connects the same way. Two kinds exist:

* **R2F** (reconfigurable to fixed): `r2f_macro`, an AND of each signal with
  the inverse of `control`, 8 bits wide.
* **F2R** (fixed to reconfigurable): a plain feedthrough. In RTL it is a
  wire. Nothing needs blocking in that direction, because the router stops
  sending to an isolated core.

`core_interface` places R2F on the core's `tx`, `data_out` and `ack_rx`. It
wires the router's signals through to the core and builds the core's reset.

## Loadable cores

Every core uses the same packet wrapper, `core_shell`, and so shows the same
interface to the region:

```
request : [core address][5][source address][A hi][A lo][B hi][B lo]
reply   : [source address][4][R0 hi][R0 lo][R1 hi][R1 lo]   -> sent to the source
```

| core        | R0              | R1           | edges from last request flit to first reply flit |
|-------------|-----------------|--------------|-----|
| `mult_core` | (A*B)[31:16]    | (A*B)[15:0]  | 3   |
| `div_core`  | A / B           | A % B        | 19 (restoring divider, 16 steps) |
| `sqrt_core` | floor(sqrt(A))  | A - R0*R0    | 11 (8 steps; B ignored) |

Division by zero gives R0 = FFFF and R1 = A. A core accepts a new request
only after it has sent its reply, so further requests wait in the network.

## Serial core

`serial_core` is an 8N1 UART (LSB first, `CLKS_PER_BIT` = 434, which is
115200 baud at 50 MHz) joined to a packet framer:

* **Host to network:** a kind byte (`00` data, `01` control), then the
  packet's flits. The kind byte is not forwarded. The core holds one flit.
  The host must not send faster than the network accepts. At serial speed
  this holds unless the network is blocked for a whole byte time.
* **Network to host:** each flit that reaches router 01's local port is sent
  as one byte. The router is held off while a byte is on the line.

## What is not included

* **The processor.** This is a 16-bit, 40-instruction, load/store,
  non-pipelined CPU with 16 registers and a 2K-word memory. Its instruction
  set is not available, so the top brings out router 00's local port
  instead (`proc_out`, `proc_out_ack`, `proc_in`, `proc_in_ack`). Anything
  attached there can send data and control packets.
* **The configuration controller.** It is software on the host. The system
  testbench plays its part.
* **The physical flow.** This covers floorplanning of the regions (five CLB
  columns each on the original Virtex-II), routing checks, partial bitstream
  generation and core relocation. The RTL only marks where the macros sit.

## Choices made in this implementation

These are not fixed by the architecture. Change them freely:

* the handshake timing (same-cycle `tx`/`ack`);
* the buffer depth of 16;
* the per-output round-robin arbitration, instead of a single central
  arbiter;
* the data-packet size flit and the header nibble layout;
* the core reset (`reset | reconf`) and the use of a single active-high
  `reconf`. One could use an active-low `reconf_n` and a reset pulse
  instead;
* the cores' packet protocol, operand width and algorithms;
* the serial framing, baud rate and single-flit holding register;
* the handling of unknown opcodes (ignored).

## Files

| file | contents |
|------|----------|
| `rtl/artemis_pkg.sv` | flit/link types, port numbers, opcodes |
| `rtl/artemis_buffer.sv` | input FIFO with ctrl bit and packet tracking |
| `rtl/artemis_router.sv` | five-port router with control decoder and discard |
| `rtl/artemis_noc.sv` | NX x NY mesh |
| `rtl/r2f_macro.sv`, `rtl/core_interface.sv` | macros between router and region |
| `rtl/core_shell.sv`, `rtl/{mult,div,sqrt}_core.sv` | loadable cores |
| `rtl/reconf_region.sv` | a region holding whichever core is loaded |
| `rtl/serial_core.sv` | UART bridge to the host |
| `rtl/artemis_system.sv` | the 2x2 case-study system (top) |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Run these from the repository root. The core testbenches include
`tb/tb_core_common.svh` by that path.

```
verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
    rtl/artemis_pkg.sv tb/tb_artemis_system.sv --top-module tb_artemis_system
./obj_dir/Vtb_artemis_system
```

Replace `tb_artemis_system` with any other testbench name to run that one.

Every testbench ends with `TB_RESULT checks=N failures=M` and has a
watchdog. Coverage:

| testbench | what it runs |
|-----------|--------------|
| `tb_artemis_system` | whole system at default sizes; covers all three cores, both serial directions, two full isolate / drop / reload / reconnect cycles, and processor-side back-pressure |
| `tb_artemis_router` | random traffic on all five ports against a scoreboard; checks the two-edge header latency, contention, stalls, full buffers, forwarded control packets, ignored opcodes, and isolation with discarding |
| `tb_artemis_noc` | a 3x3 mesh with the same checks; includes the ten-edge latency over the longest path |
| others | the buffer, the macros, each core (results and latency), the region, and the serial core (framing, back-pressure, bit time) |
