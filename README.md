# Octopus: a cell switch that connects the parts of a low-power handheld

A handheld multimedia computer spends much of its energy moving data: a video
stream that arrives from the radio is copied by the CPU over a shared bus into
memory and out again to the display. The Octopus architecture removes the CPU
from that path. Every part of the machine (processor, network interface,
display, camera, audio) is an autonomous module on one port of a small
switch. Modules exchange fixed-size ATM cells (5-byte header, 48-byte payload)
over connections set up between two ports, so data goes straight from the
module that produces it to the module that consumes it. Parts that carry no
traffic, including the switch-side controllers, go to sleep.

This repository holds synthesizable SystemVerilog for the switch: the
switching fabric and the Module Interface Controllers (MICs) that sit
between the fabric and the modules, for eight ports. The functional modules
themselves, and the connection-manager software on the CPU, are outside it;
their interfaces are the top level's ports.

```
 functional      +------------------------- octopus_switch -------------------------+
 module 0 (CPU) <-> mic[0] <-> | input_section[0]  output_section[0]  control_unit[0] |
 module 1       <-> mic[1] <-> | input_section[1]  output_section[1]  control_unit[1] |
   ...                ...      |        ...        xbar_network (8x8)       ...       |
 module 7       <-> mic[7] <-> | input_section[7]  output_section[7]  control_unit[7] |
                                +------------------- octopus_fabric -------------------+
```

## Division of work: a dumb fabric and smart controllers

The fabric knows nothing about cells or VCIs. It only connects port *s* to
port *d* when *s* asks for *d* and *d* agrees, and then copies bytes from *s*
to *d*. Everything else happens in the MICs:

* the **VCI mapping table** turns a cell's virtual channel identifier into a
  destination port;
* the **transmission queue** and **reception queue** each hold two whole cells;
* the **arbiter** of the receiving MIC decides which of several requesting
  senders is served next.

Each fabric port has three parts:

| part | holds | does |
|---|---|---|
| input section | address register (destination port), control register `{sleep, req}`, status register `{ack, done}` | passes the sender's data through; presents the request to the network |
| output section | control register `{ack, ack_src, done}`, status register (request vector, current connection, busy) | stores all pending requests for this port; re-times incoming data in a one-stage synchroniser |
| control unit | - | raises *attention* when the MIC has work; gives the MIC its clock (enable) |

The **interconnection network** (`xbar_network`) is a full 8x8 crossbar. It
keeps one connection entry per output (valid, source).

## Life of a cell

A cell goes through four phases, which overlap between the sending and the
receiving MIC. The cycle numbers below are what the RTL does at one byte per
clock.

1. **Module I/O.** The module writes 53 bytes into its MIC (valid/ready, one
   byte per clock, no framing signal: every 53 bytes are one cell). The cell
   becomes visible to the next phase only when it is complete, unless the
   module uses the transmit bypass described below.
2. **Arbitration.** The sender MIC looks up the VCI of its oldest cell. In one
   cycle it writes the destination port into its input section's address
   register and sets `req` in the control register. The request appears in
   the destination output section's request vector two clocks later, and
   attention wakes the destination MIC if it sleeps. The destination's arbiter
   picks one requester and writes an acknowledge naming it. One clock later
   the network sees the command. It sets up the connection if the requester
   still asks for this port and both ports are free. The sender sees `ack` in
   its status, and the receiver sees the connection in its status two clocks
   after its write. If the connection was not set up, the receiver simply
   arbitrates again.
3. **Data transfer.** The sender streams the 53 bytes on consecutive clocks
   (with the transmit bypass below, as fast as the module delivers them).
   Each byte reaches the receiving MIC one clock later through the output
   section's synchroniser and goes into the reception queue.
4. **Release.** After the 53rd byte the receiver writes `done`. The network
   drops the connection and sets `done` in the sender's status. The sender
   clears `req`, which clears its status, and removes the cell from its queue.

In steady state a connection delivers one cell every 62 clocks: 53 data
clocks plus 9 clocks of arbitration and release. That is 0.854 byte per clock.
The receiving module then reads the cell from the reception queue while the
next one is transferred.

### Buffer bypass

A module that can take bytes as fast as the switch delivers them does not need
to wait for a whole cell. It sets its `mod_out_bypass` input, and the reception
queue then works cut-through: once the first four bytes of an arriving cell
(which hold the VCI) are in, each byte can be read one clock after it was
written. The slot for the whole cell is still reserved before the
acknowledge, so a module that falls behind, or stalls, loses nothing; it just
reads from the buffer. A management cell for the MIC is recognised from those
first four bytes and is never passed on.

The transmit side works the same way with `mod_in_bypass`. The MIC looks up
the VCI and requests the connection as soon as the first four bytes of a cell
are in the transmission queue. It then sends bytes as the module delivers
them. If the module pauses, the transfer over the fabric pauses too, and the
connection stays held meanwhile, keeping both ports busy. The bypass is
therefore meant only for modules that keep up with the switch. The receiver
counts valid bytes, so it does not depend on the bytes being back to back.

## Half duplex and why an acknowledge can be refused

A MIC's link to its input and output section is shared, so a port takes part
in at most one connection at a time, as sender or as receiver. Eight ports
therefore carry at most four connections at once. The network enforces this:

* a request from a port that is already in a connection is hidden from every
  output;
* an acknowledge is carried out only if both ports are free;
* when several acknowledges arrive in the same clock they are taken in port
  order, lowest output first.

The last rule matters when two MICs send to each other at the same moment.
Each sees the other's request and each acknowledges it. Carrying out both
would put both ports into two connections. The network takes the one from the
lower output and ignores the other. The MIC whose acknowledge was ignored
sees no connection in its status, drops back to arbitration and serves its
partner's request once the port is free. A concurrent assertion in
`xbar_network` checks that no port is ever in two connections.

## Scheduling: guaranteed slots and round robin

Two kinds of connection share a destination:

* A **guaranteed** connection has bandwidth reserved for it.
* An **ad-hoc** connection gets what is left.

Each MIC's arbiter keeps a slot table (8 slots by default). Each slot may name
a source port that owns it. One slot is used per connection that is set up.
If the current slot's owner is requesting, it is served. Otherwise the slot
goes to the other requesters in round-robin order, starting after the last
source served. A source owning *k* of the 8 slots therefore gets at least
*k*/8 of the destination's cells while it has traffic, and unused reservations
are not wasted.

A sender does not hold a connection open between cells. Each cell is
announced with a fresh request, so the receiver always knows whether the
reserved bandwidth is actually being used.

## Management cells and the default route

The VCI tables and slot tables are written by **management cells**, normally
sent by the connection manager on the CPU module (port 0):

| cell field | meaning |
|---|---|
| VCI = 24 + *k* | management cell for the MIC of port *k*; routed to port *k* without a table lookup, executed there, never passed on to the module |
| payload byte 0 = `0x01` | set VCI entry: bytes 1-2 = VCI, byte 3 = `{valid, 0000, dest[2:0]}` |
| payload byte 0 = `0x02` | set arbiter slot: byte 1 = slot, byte 2 = `{valid, 0000, src[2:0]}` |

The VCI sits in header bytes 1-3 in the standard ATM UNI layout. The table is
indexed by the low 6 bits of the VCI (64 entries). A cell whose VCI is not in
the table goes to port 0, the CPU, where the connection manager can handle
it. A MIC cannot connect to its own port. A management cell that a module
addresses to its own MIC (the CPU configuring its own table) is therefore
executed directly from the transmission queue. Any other cell that maps to the
sender's own port is discarded.

## Energy management

Each MIC runs on a clock enable from its port's control unit. The MIC sets the
`sleep` bit in its control register when it has nothing to do, that is when:

* both of its queues are empty;
* both of its phase machines are idle;
* no attention is pending.

Its clock then stops. The control unit raises attention, and so restores the
clock in the same cycle, when:

* a request waits in the port's request vector and the port is free;
* the input section reports `ack` or `done`;
* the module offers data.

With no traffic all eight MICs are stopped. Each active data flow keeps
exactly its two MICs clocked. In synthesis the enable would drive a clock
gate; the RTL keeps one clock domain.

## Parameters

Package `octopus_pkg` fixes the things the architecture fixes:

* 8 ports;
* 53-byte cells;
* port 0 as the default (CPU) port;
* the management VCI base 24 and the opcodes.

The top level `octopus_switch` has these parameters:

| parameter | default | meaning |
|---|---|---|
| `QUEUE_CELLS` | 2 | cells per transmission and per reception queue |
| `VCI_IDX_BITS` | 6 | VCI table has 2^6 entries |
| `SLOTS` | 8 | slots in each arbiter's schedule |

## How far it follows the published architecture

These parts follow the architecture:

* the eight-port ATM-cell switch with an 8-bit datapath;
* the split into input section, output section, control unit and crossbar;
* the register set of each section;
* the MIC's units (two queues, VCI table, arbiter) and its four phases;
* unknown VCIs going to the CPU module;
* half-duplex ports and at most four parallel connections;
* static scheduling for guaranteed traffic and dynamic scheduling for ad-hoc
  traffic;
* sleep and wake-up by attention.

These are this design's own choices, because the architecture does not give
them:

* register field layouts and the handshake timing;
* the rule for conflicting acknowledges;
* queue depth (2 cells), table size (64), slot count (8) and one slot per cell;
* round robin as the dynamic scheduler;
* the management-cell format and VCI numbering;
* byte-stream module interfaces without framing;
* the clock given as an enable;
* cut-through as the form of the buffer bypass;
* executing self-addressed management cells locally and discarding other
  self-addressed cells;
* an asynchronous active-low reset.

Differences to be aware of:

* The published prototype was an FPGA with six micro-controllers acting as
  MICs. It quotes a per-connection rate of 1 Mb/s per MHz of clock. This RTL
  moves one byte per clock, the rate its 8-bit datapath allows.
* The architecture lets modules that keep up with the switch skip the
  buffering. Here the bypass is cut-through: the queue slot is still
  reserved and written, and only the waiting for the whole cell is skipped.
* The admission control of the connection manager (checking bandwidth and
  asking the destination before a guaranteed connection is granted) is
  software and not part of this RTL. Reserving bandwidth means writing slot
  tables with management cells.
* The HEC byte of the cell header is carried but neither generated nor
  checked.

## Files

| file | content |
|---|---|
| `rtl/octopus_pkg.sv` | constants, register structs, VCI extraction |
| `rtl/octopus_switch.sv` | top level: fabric plus eight MICs |
| `rtl/octopus_fabric.sv` | switching fabric: sections, control units, crossbar |
| `rtl/input_section.sv`, `rtl/output_section.sv`, `rtl/control_unit.sv`, `rtl/xbar_network.sv` | fabric parts |
| `rtl/mic.sv` | Module Interface Controller with the phase machines |
| `rtl/cell_queue.sv`, `rtl/vci_table.sv`, `rtl/mic_arbiter.sv` | MIC parts |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_dataflows.sv` | 0 to 3 disjoint streaming flows: throughput and awake MICs |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, the end-to-end test at default parameters:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_octopus_switch \
  -Irtl -y rtl +libext+.sv rtl/octopus_pkg.sv tb/tb_octopus_switch.sv
./obj_dir/Vtb_octopus_switch
```

Replace the top module and file name for any other testbench.
`tb_octopus_switch` runs the whole switch for about 50,000 clocks in under a
second. It does the following:

* configures all MICs with management cells, the CPU port's own MIC
  included, and sends cells from the CPU port;
* runs four parallel connections;
* makes three senders compete for one receiver, one of them holding
  guaranteed slots;
* makes two ports send to each other at once, which forces a refused
  acknowledge;
* stalls a receiver until its queue fills;
* sends a cell with an unknown VCI and one to the sender's own port;
* runs ports 0 and 6 with the reception bypass on, and ports 1 and 5 with
  the transmit bypass on.

Each of these mechanisms, and sleep and wake-up, is counted and must occur.
Every cell is checked for content, destination and order.

`tb_dataflows` repeats the measurement set-up of the prototype with 0, 1, 2
and 3 disjoint flows. It shows 0.854 byte per clock per flow whatever the
number of flows, and 0, 2, 4 and 6 MICs clocked.
