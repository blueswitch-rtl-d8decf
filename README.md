# Blueswitch: a switch whose configuration changes are packet-consistent

A switch with several flow tables in a row has a hard time with updates.
Suppose a new forwarding policy touches entries in more than one table, or
more than one entry in a single table. Software can only write these entries
one at a time. Meanwhile, packets keep flowing. A packet that passes through
partway through the update can meet the new entry in one table and the old
entry in the next. It is then forwarded by a policy that neither the old nor
the new configuration contains: it is sent to the wrong port, dropped, or
flooded because it found no match.

This switch removes that window. Each flow table holds two copies of its
memories: an **active** bank, which is used for lookups, and a **shadow**
bank, which software writes into. Each packet carries a configuration
**version number**, stamped when it enters the lookup pipeline. A table swaps
its banks at the exact moment the first packet with the new version reaches
it. Because the swap happens before that packet is looked up, the switch
guarantees this for every packet: it is processed either entirely by the old
configuration or entirely by the new one, in every table. The same holds for
all packets after it.

The RTL is SystemVerilog-2017. It is synthesizable except for the
testbenches, and it is written for a 160 MHz clock with 64-bit streams.

```
 port 0..4  ──► packet FIFO ─────────────────────────────────┐
 (AXI-Stream)   └► header parser ─► header FIFO ─┐            │
                                                 ▼            ▼
                      input arbiter (round robin, credits)   packet
                                                 │            marshaller ─► output FIFO ─► crossbar ─► port 0..4
                                                 ▼            ▲
   version controller (V_p, inactivity timer)    │            │
   flow table 0 ─► flow table 1 ─► flow table 2  │            │
                                                 ▼            │
                      action arbiter ─► per-port result FIFO ─┘

   AXI4-Lite ─► register interface ─► configuration commands to all tables,
                                      V_p increment, counters, cycle counter
```

## Datapath

There are five stream ports. Ports 0–3 connect to the four 10 Gb Ethernet
MACs, and port 4 connects to a host DMA engine. The MACs and the DMA engine
are not part of this RTL. Every port has a 64-bit AXI-Stream input and output
(`tdata`, `tkeep`, `tlast`, `tvalid`, `tready`). Byte 0 of a frame is
`tdata[7:0]` of its first beat.

- **Packet FIFO** (`bs_pkt_fifo`): one per input port, 512 beats deep, which
  is 4 KiB and holds the largest frame with room to spare. Besides the normal
  write and read pointers it has a *frame base* pointer. The reader can
  *rewind* to the frame start to send the frame again. It can also *release*
  the frame, which frees its space. Frames are stored whole before they are
  forwarded.
- **Header parser** (`bs_header_parser`): reads the same beats as its FIFO
  and keeps the first 40 bytes. One cycle after the last beat it emits a
  header. The header holds the lookup key plus metadata, which starts out as
  the input port with everything else cleared.
- **Input arbiter** (`bs_in_arbiter`): takes headers from the five header
  FIFOs, one per cycle, in round-robin order, and feeds them into the single
  lookup pipeline. Sharing one pipeline among all ports keeps the logic
  small. The pipeline cannot stall, so the arbiter holds 8 credits per port.
  Each credit stands for a free slot in that port's result FIFO. A header is
  sent only when its port has a credit, and the credit comes back when the
  marshaller takes the result.
- **Lookup pipeline** (`bs_multi_table`): the version controller followed by
  three flow tables, described below. It has a fixed latency of 12 cycles and
  takes one header per cycle.
- **Action arbiter** (`bs_act_arbiter`): sends each result to the result
  FIFO of the packet's input port.
- **Packet marshaller** (`bs_marshaller`): results and frames of a port
  arrive in the same order, so the marshaller pairs the next result with the
  next frame in its FIFO.
  - A dropped frame is read out and discarded.
  - Otherwise, one copy is sent to each port in the output mask, lowest port
    first. The FIFO is rewound between copies.
- **Crossbar** (`bs_xbar`): every output has a round-robin arbiter over the
  marshallers that currently have a beat for it. Once the arbiter picks a
  marshaller, it stays locked to it until that frame's last beat, so frames
  never interleave. A small output FIFO (4 beats) per marshaller sits in
  front of the crossbar.

All handshakes follow valid/ready, and back-pressure from an output port
propagates back to the input ports.

## The double-buffered flow table

`bs_flow_table` is the core of the design. It contains two banks, and each
bank is a TCAM (`bs_tcam`) paired with an action RAM (`bs_action_ram`). Both
are 32 entries deep. A bank bit says which bank is active. Each table also
keeps two pieces of state:

- **S_i**, the transaction state:
  - **Open**: configuration commands for this table are written into the
    shadow bank.
  - **Primed**: the table has received *EndTxn*, the command that closes its
    part of an update. It now refuses every further command, which is counted
    as a rejected command.
- **V_i**, the version of the configuration in the active bank.

**Commit rule.** Suppose a header reaches table *i* while the table is
Primed, and the header's version V_p differs from V_i. In that same cycle,
before the header is looked up, the table does three things:

1. It flips the bank bit.
2. It sets V_i to V_p.
3. It returns to Open.

Every header at or after this one therefore uses the new bank. Every header
before it has already used the old bank. A header with a new version that
meets a table that is still Open does not commit it. This cannot happen when
the driver follows its rules (see below).

**Pipeline timing inside one table** (4 cycles):

| cycle | what happens |
|-------|--------------|
| t     | commit decision; key presented to the TCAM of the now-active bank |
| t+2   | TCAM result (hit, lowest matching index) available; the result is chosen by the bank bit as it was at t (delay line D_T, 2 cycles); the action RAMs are read |
| t+3   | action word available; chosen by the bank bit as it was at t (delay line D_T + D_A); action applied to the metadata |
| t+4   | header leaves for the next table |

The delay lines are what make the swap clean. The bank bit changes at time
t, but the lookups of older headers are still in the pipeline. If each stage
used the current bank bit, an older header could take its TCAM index from
one bank and its action from the other. Delaying the bank bit to each stage
by that stage's latency keeps each header tied to one bank throughout.

Configuration writes to the action RAMs pass through a matching delay, D_i,
of 2 cycles. Without it, a write into the bank that has just become the
shadow could overwrite an action that an older header is about to read.

In the same way, the `primed` status that a table reports to the version
controller is only asserted once this write delay has drained.

**Match semantics.** A table looks up a header only when both of these hold:

- the header is not marked Drop;
- its `next_table` field names this table.

On a hit, the table applies the entry's action word:

- **Output** sets the output port mask.
- **Drop** marks the packet for dropping.
- **GotoTable** sets `next_table` to a later table.
- A hit without GotoTable ends matching: `next_table` is set to "done".

On a miss, the header moves on to the next table and is looked up there.

Headers that a table does not look up still pass through it. This includes
dropped headers and those bound for a later table. Every header therefore
visits every table, and so it commits every table. This is what guarantees
that a dropped packet with a new version still commits all later tables.

At the end of the pipeline (`make_result`), Drop takes precedence. Otherwise
the Output mask is used. If nothing matched at all, the packet is flooded to
every port except its input port.

A GotoTable that points backwards is not checked in hardware. It is the
driver's job never to write one. If one is written, the packet passes the
remaining tables without being looked up.

## Pipeline version and the increment

`bs_version_ctrl` sits at the head of the pipeline. It holds **V_p**, an
8-bit counter, and stamps it into every header that enters. V_p and every
V_i start at 0 after reset, and every table starts Open.

Software asks for an increment by writing CTRL bit 0. The increment is
granted only under two conditions:

- Every table is Primed.
- Every table is at the current V_p. This condition is this design's own
  addition. It makes a second increment impossible until the previous
  update has committed everywhere.

If either condition fails, the request is refused and counted. V_p
therefore never runs more than one step ahead of any table.

**Inactivity timer.** If no packet arrives after an increment, nothing
carries the new version through the tables. They would stay Primed, and no
further update could start. To prevent this, the controller starts a timer
when it grants an increment. The default length is 1024 cycles, and it can
be set with the TIMEOUT register. A header that enters before the timer
expires disarms it, because that header carries the commit itself.

If the timer expires first, the controller injects a **commit token** into
the next idle pipeline slot. The token is a header with a flush flag and the
new V_p. It commits each table in order, exactly as a packet would, and is
never matched. It is discarded at the pipeline exit and produces no result.

## Why a packet never sees a mixed configuration

The switch hardware maintains the following properties:

1. Tables are visited in a fixed linear order by every header, including
   dropped and skipped ones.
2. V_p can only be incremented when all tables are Primed.
3. A Primed table accepts nothing into its shadow bank.
4. The bank choice in every stage of a table is delayed to match that
   stage's latency.
5. A table swaps its banks only when it is Primed and the arriving header's
   version is newer, and it swaps *before* looking that header up.

The driver must follow two rules:

- **Rule D1.** For every update, send every table an EndTxn, including
  tables whose entries do not change.
- **Rule D2.** Only increment V_p after all tables are Primed. Do not start
  the next update until the increment has been granted.

Now let P be the first packet stamped with the new V_p. These properties
combine as follows:

- By properties 1 and 2, P finds every table Primed.
- By property 3, no table's shadow changes between the increment and P's
  arrival.
- By property 5, each table swaps just before P, so P and every later
  packet see only the new banks.
- By property 4, every packet before P sees only the old banks, even though
  it may still be inside a table when the swap happens.

The commit token gives the same result when no packet follows the increment.

## Lookup key and action word

The key is 224 bits (`key_t` in `bs_pkg`), from most significant field to
least:

| field    | bits    | source |
|----------|---------|--------|
| in_port  | 223:216 | input port number |
| eth_dst  | 215:168 | frame bytes 0–5 |
| eth_src  | 167:120 | bytes 6–11 |
| eth_type | 119:104 | bytes 12–13 |
| ip_proto | 103:96  | byte 23 (IPv4 only) |
| ip_src   | 95:64   | bytes 26–29 (IPv4 only) |
| ip_dst   | 63:32   | bytes 30–33 (IPv4 only) |
| l4_src   | 31:16   | bytes 34–35 (TCP/UDP only) |
| l4_dst   | 15:0    | bytes 36–37 (TCP/UDP only) |

The IP fields are filled only for IPv4 without options, that is, EtherType
0x0800 with first IP byte 0x45. The port fields are filled only for TCP and
UDP. Fields that are absent are zero. Multi-byte fields are in network byte
order.

A TCAM entry matches when `(key & mask) == (value & mask)` and the entry is
valid. When several entries match, the lowest index wins.

The action word is written through CMD_ACTION:

| bits  | meaning |
|-------|---------|
| 7:0   | output port mask (bits 0–4 used) |
| 8     | Output |
| 9     | Drop |
| 12    | GotoTable |
| 19:16 | target table of GotoTable (0–2) |

## Register map (32-bit AXI4-Lite, `bs_reg_if`)

| addr | access | contents |
|------|--------|----------|
| 0x00 | W | CTRL: bit 0 = request V_p increment |
| 0x00 | R | [7:0] V_p, [8] increment would be granted now |
| 0x04 | R | [2:0] Primed per table, [15:8] active bank per table |
| 0x08 / 0x0C | R | free-running 64-bit cycle counter, low / high; reading low latches high |
| 0x10 | RW | inactivity timer length in cycles (reset 1024) |
| 0x14 | RW | CMD_TABLE: table the next command is for |
| 0x18 | RW | CMD_ADDR: entry index |
| 0x1C | RW | CMD_ACTION: action word |
| 0x20 | W | CMD_OP: writing issues the command: 0 = write entry, 1 = clear entry, 2 = EndTxn |
| 0x24 / 0x28 | R | commands accepted / refused (refused = sent to a Primed table) |
| 0x2C | R | increment requests refused |
| 0x30 | R | inactivity timer expiries |
| 0x34 | R | commits seen by the last table |
| 0x38 | RW | STATS_SEL: [11:8] table, [7:0] entry |
| 0x3C | R | number of hits of the selected entry index since reset, both banks summed |
| 0x40 + 4w | RW | key value word w (w = 0..6; word w = key bits 32w+31 : 32w) |
| 0x60 + 4w | RW | key mask word w |
| 0x80 + 4i | R | V_i of table i |

Writes are complete once both AW and W are valid. The response is always
OKAY. Read data returns one cycle after the address. Unmapped addresses read
as 0.

**Driver sequence for one update:**

1. For each table whose entries change, fill the KEY/MASK/CMD_ADDR/CMD_ACTION
   registers and write 0 (write) or 1 (clear) to CMD_OP. Do this for every
   entry that changes.
2. For every table, write its number to CMD_TABLE and write 2 (EndTxn) to
   CMD_OP.
3. Poll CTRL until bit 8 is set.
4. Write 1 to CTRL.
5. Optionally, wait until COMMITS increments before starting the next update.

The shadow bank still holds the configuration from *two* updates ago. The
driver must therefore write every entry that differs from the configuration
it wants, not only the entries that differ from the configuration currently
active. The simplest way is to rewrite the whole table.

## Parameters and sizes

| name | value | where |
|------|-------|-------|
| NUM_PORTS | 5 (4 × 10GbE + DMA) | `bs_pkg` |
| NUM_TABLES | 3, so 6 TCAMs in all | `bs_pkg` |
| ENTRIES | 32 per TCAM | `bs_pkg` |
| AXIS_W | 64; at 160 MHz that is 10.24 Gb/s per port | `bs_pkg` |
| VER_W | 8-bit versions | `bs_pkg` |
| PKT_DEPTH | 512 beats per input port | `blueswitch_top` |
| HDR_DEPTH, ACT_DEPTH, OUT_DEPTH | 8, 8, 4 | `blueswitch_top` |
| TIMEOUT_DEFAULT | 1024 cycles | `blueswitch_top` |

Performance of the switch without contention:

- **Latency:** 17 cycles from the last beat of a frame to the first beat of
  its output, plus the frame's length, since frames are stored and forwarded
  whole. From first beat in to first beat out, that is *beats* + 16 cycles.
  Examples: 24 cycles for a 64-byte frame and 204 cycles (1.28 µs) for a
  1500-byte frame.
- **Throughput:** the datapath accepts one beat per cycle on every port.

## Where this design makes its own choices

The following follow the original Blueswitch architecture:

- the ports, the shared single lookup pipeline, and the per-port FIFOs,
  parsers, marshallers and crossbar;
- three double-buffered tables with 32-entry TCAMs;
- the Open/Primed states, EndTxn, and the commit rule;
- the gating of the increment on all tables being Primed;
- the inactivity timer, the D_T/D_i/D_A delay lines, flooding on a miss,
  the Output/Drop/GotoTable actions, and the cycle counter.

These are this design's own choices:

- The key fields, the action-word layout, the register map and all buffer
  depths.
- The TCAM and RAM latencies (2 and 1 cycles).
- The commit test is *V_p ≠ V_i* rather than *V_p > V_i*. The two are the
  same while V_p is never more than one ahead, and the inequality form
  survives the 8-bit counter wrapping.
- The extra increment condition: every table must be at the current V_p.
- The commit token injected by the timer.
- Multicast is sent as sequential copies. Unmatched packets are flooded the
  same way.
- Credit flow control between the input arbiter and the result FIFOs.
- Round-robin arbitration with per-frame locking in the crossbar.

The marshaller applies only forwarding actions. Header rewriting is not
implemented.

The TCAM is built from registers with a parallel compare, which is fine at
32 entries. A larger table would want a dedicated TCAM structure.

Not included: the 10GbE MACs and PHYs, the DMA/PCIe engine (port 4 and the
AXI4-Lite port are where they attach) and the host driver software.

## Files

| file | contents |
|------|----------|
| `rtl/bs_pkg.sv` | sizes, key/metadata/action/command types, `make_result` |
| `rtl/bs_tcam.sv`, `rtl/bs_action_ram.sv` | one bank's TCAM and action RAM |
| `rtl/bs_flow_table.sv` | double-buffered table with commit logic and statistics |
| `rtl/bs_version_ctrl.sv` | V_p, increment gating, inactivity timer |
| `rtl/bs_multi_table.sv` | version controller + three tables + result extraction |
| `rtl/bs_header_parser.sv`, `rtl/bs_pkt_fifo.sv`, `rtl/bs_fifo.sv` | input side |
| `rtl/bs_in_arbiter.sv`, `rtl/bs_act_arbiter.sv` | into and out of the pipeline |
| `rtl/bs_marshaller.sv`, `rtl/bs_xbar.sv` | output side |
| `rtl/bs_reg_if.sv`, `rtl/bs_cycle_counter.sv` | control |
| `rtl/blueswitch_top.sv` | the switch |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_workloads.sv` | flow insertion, reconfiguration time vs. policy size, latency vs. frame size |

## Simulation

Every testbench is self-checking. Each one prints
`TB_RESULT checks=N failures=M` and stops. To run one with Verilator 5,
from the project root:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    -y rtl -y tb +libext+.sv rtl/bs_pkg.sv tb/tb_blueswitch_top.sv \
    --top-module tb_blueswitch_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another. All of them finish in well under
a second.

**What the tests cover:**

- **`tb_blueswitch_top`** runs the whole switch at its default sizes with a
  160 MHz clock. It reproduces a flow-modification update:
  - Twelve UDP flows (150-byte frames to 192.168.0.2–.13) arrive on port 0.
    Config A sends them to ports 1 and 2 via three tables. Config B moves
    .2–.7 to port 2.
  - Any mixing of A and B would drop or flood packets.
  - Each frame must arrive exactly once and unchanged. Per flow, the output
    port sequence must never go back to the old policy.
  - The test also exercises refused increments and commands, a timer
    commit, output contention and back-pressure, multicast, flooding and
    dropping, the statistics and counters.
  - It checks line rate: back-to-back frames are accepted at one beat per
    cycle.
- **`tb_workloads`** runs three workloads:
  - **Flow insertion:** 12 flows balanced over ports 1–3. One update removes
    8 rules and inserts 8 new ones at other entries, so all traffic goes to
    port 1. Nothing may be misrouted.
  - **Reconfiguration time:** updates of 2, 4, 8 and 16 rules, measured with
    the cycle counter: 56, 78, 102 and 170 cycles. Most of this is the
    register writes.
  - **Latency against frame size:** frames of 64 to 1500 bytes.
- **The flow-table test** compares the table against a reference model for
  thousands of random commands, increments and lookups.

Currently all 15 testbenches pass.
