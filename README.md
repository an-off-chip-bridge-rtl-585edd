# Off-chip bridge for network-on-chip connections over Gigabit Ethernet

When a system-on-chip built around a network-on-chip (NoC) is too large for one
FPGA, or has to talk to a PC, its connections must leave the chip. This bridge
carries up to 12 NoC streaming connections between two chips over one Gigabit
Ethernet link. It keeps each connection's guaranteed bandwidth, and the network
on either side never notices that the far end is on another chip.

The bridge works at the transport level. Each connection enters the bridge as a
plain stream of 37-bit words (*phits*) with a valid/accept handshake. The bridge
buffers the stream and gives the connection a share of the link through a
table of time slots. It does its own credit-based flow control per connection,
so a phit is never dropped and a stalled receiver never blocks the other
connections. The two networks keep their own clocks, their own slot tables and
their own scheduling. Only the connection numbers must agree.

## How a frame is built

The bridge sends fixed-length Ethernet frames back to back for as long as it
is enabled, even when there is no data. This costs link bandwidth, but a phit
that arrives at any moment finds a slot going out soon. It never waits for a
frame to fill up.

```
| dst MAC (6) | src MAC (6) | length (2) | frame no. (1) | slot 0 | slot 1 | ... | slot NS-1 |
```

Each slot is `SLOT_BYTES` long and belongs to one connection. Every byte in a
slot carries a 2-bit tag in its top bits:

| byte            | meaning                                                             |
|-----------------|---------------------------------------------------------------------|
| `01cccccc`      | connection byte, always the first byte of a slot: connection `c`    |
| `10nnnnnn`      | credit byte: `n` (0..63) free places in this connection's Rx FIFO   |
| `111ppppp` + 4  | a phit: bits 36..32 in the first byte, 31..0 in the next four bytes |
| `00000000`      | garbage, nothing to send                                            |

The second byte of every slot is a credit byte, even when its value is zero.
After it, the serializer picks a byte at each position in this order:

1. an extra credit byte, if the connection's phit counter has reached its
   trigger;
2. the next phit, if one is ready and all five of its bytes fit in the slot;
3. a credit byte, if some credits are still unreported;
4. a garbage byte.

So phits can start at any byte. Back-to-back phits fill the slot densely, and a
phit that arrives late still catches the same slot. A slot holds at most
`floor((SLOT_BYTES-2)/5)` phits: 19 for the default 100-byte slots, and 29 for
150-byte slots. Phits never straddle two slots. This is a choice of this
design: the receiver reads the connection number from the slot, so a split phit
would have its tail credited to the wrong connection.

The receiver needs neither the slot size nor the sender's table. It reads bytes
one by one:

- a connection byte sets the current connection;
- a credit byte adds credits to that connection;
- a byte starting with `11` starts a 5-byte phit;
- anything else is skipped.

Only the top two bits of a phit's first byte are checked.

With the defaults, a frame is 14 slots of 100 bytes, so the payload is 1401
bytes (the 1400 slot bytes plus the frame-number byte). Each frame carries at
most 266 phits. At 125 MHz, with 24 bytes of preamble, FCS and inter-frame gap,
one slot carries about 1.65 million phits/s.

## Flow control across the link

Each connection has four parts in `bridge_port`:

- **Tx FIFO** (network clock in, Ethernet clock out, 64 phits): phits waiting
  for a slot.
- **Credit counter**: free places left in the *far* bridge's Rx FIFO for this
  connection. It starts at 64 after reset. Each phit sent costs one credit, and
  received credit bytes add back. `phit_valid` goes to the serializer only if
  the Tx FIFO has a phit *and* at least one credit is left. So the far Rx FIFO
  cannot overflow, and received phits are written without back-pressure (an
  assertion watches this).
- **Rx FIFO** (Ethernet clock in, network clock out, 64 phits): phits
  received for the network.
- **Phit counter**: places freed in the Rx FIFO and not yet reported to the far
  side. When it reaches `TRIGGER` (16 by default), `credit_tx_request` makes
  the serializer send a credit byte at the next free position of one of this
  connection's slots. Below the trigger, the count still goes out in the
  credit byte at the start of each of its slots, and whenever the slot has
  nothing else to carry. One credit byte carries at most 63. The amount sent is
  subtracted from the counter, so nothing freed meanwhile is lost.

Credits for direction A→B travel in B→A slots of the *same* connection. A
connection therefore needs slots in both bridges, even if data flows only one
way. The trigger must stay below the FIFO depth, or the two sides can deadlock.

The throughput of one connection is limited by two things: the number of slots
it owns, and 64 credits per round trip. The round trip is the link latency
twice plus the wait for a reverse slot. With a 220-cycle link and a connection
that owns all 14 slots, the round trip, not the slots, sets the limit. The
full-size test shows this: about 64 phits per frame.

## Who gets a slot: the scheduler

`tdm_scheduler` holds a slot table with one entry per slot. Each entry holds
the connection number that owns that slot. A counter steps through the table,
one entry per slot, and restarts at every frame. The entry is latched at the
start of a slot and steers the multiplexer for the whole slot. An entry of
`NUM_PORTS` or more leaves the slot unused: it then carries only a connection
byte, a zero credit byte and garbage.

The table is a small RAM behind a register port, `cfg_*`, on the Ethernet
clock, so bandwidth can be moved between connections at run time:

| word address      | read / write                                          |
|-------------------|-------------------------------------------------------|
| `0 .. NUM_SLOTS-1` | connection number of that slot                       |
| `0xFF`            | policy: 0 = TDM table, 1 = round robin, 2 = priority  |

Read data appears one cycle after the request. After reset the table holds
the `INIT_TABLE` parameter, so a system with a fixed allocation needs no
configuration at all. By default slot `i` belongs to connection
`i mod NUM_PORTS`.

The two dynamic policies ignore the table:

- **Round robin** gives the next slot to the next connection, counting on from
  the one that had the previous slot, that has a phit ready.
- **Priority** gives it to the lowest-numbered connection with a phit ready.

If no connection has data, the slot goes to one with credits to return, so
credits still flow. Otherwise it goes to the next connection in turn. With TDM,
a connection's bandwidth and its worst-case wait are fixed by the table alone,
which keeps the guarantees of the on-chip network. The dynamic policies trade
that away for better use of the link.

## Blocks and signal flow

```
 network side (noc_clk)              |                  Ethernet side (eth_clk)
                                     |
 tx_*[p] --> Tx FIFO ------+-- credit counter --> mux --> serializer --> frame_sender --> mac_tx_*
                           |                      ^                         |
                           |                tdm_scheduler <-- frame/slot ---+
                           |                      ^
                           |                    cfg_*
 rx_*[p] <-- Rx FIFO <-----+-- phit counter  <-- demux <-- deserializer <-- frame_receiver <-- mac_rx_*
```

| file | what it is |
|------|------------|
| `rtl/bridge_pkg.sv` | widths, byte tags, policy codes |
| `rtl/async_fifo.sv` | dual-clock FIFO: Gray-coded pointers, two-flop synchronisers, first word fall through |
| `rtl/credit_counter.sv` | per-connection credits |
| `rtl/phit_counter.sv` | per-connection freed places, trigger |
| `rtl/bridge_port.sv` | one connection: the two FIFOs and two counters |
| `rtl/tdm_scheduler.sv` | slot table, selector, round robin, priority, register port |
| `rtl/serializer.sv` | slot bytes from the selected connection |
| `rtl/frame_sender.sv` | header, frame number, MAC transmit handshake, frame/slot timing |
| `rtl/frame_receiver.sv` | header and length check, payload to the deserializer |
| `rtl/deserializer.sv` | byte tags back into connection, credits and phits |
| `rtl/offchip_bridge.sv` | top: 12 `bridge_port`s, scheduler, multiplexer/demultiplexer, frame logic |

The two FIFOs of each connection are the only clock-domain crossings. All
counters, the scheduler and the frame logic run on the 125 MHz Ethernet clock.
The network clock can be anything.

### Top-level parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `NUM_PORTS` | 12 | connections; connection numbers are 6 bits, so at most 64 |
| `FIFO_DEPTH` | 64 | depth of each Tx and Rx FIFO, power of two; must match the far bridge |
| `NUM_SLOTS` | 14 | slots per frame |
| `SLOT_BYTES` | 100 | bytes per slot, at least 7; `NUM_SLOTS*SLOT_BYTES+1 <= 1500` |
| `TRIGGER` | 16 | phit-counter value that forces a credit byte; below `FIFO_DEPTH` |
| `INIT_TABLE` | slot i → connection i mod `NUM_PORTS` | slot table after reset (`bridge_pkg::slot_table_t`, entry i for slot i) |
| `DST_MAC`, `SRC_MAC` | locally administered | addresses in the header |

### MAC interface

The bridge drives the client side of an Ethernet MAC. The MAC adds the
preamble and FCS, and does not appear in the RTL.

- **Transmit:** `mac_tx_valid` rises with the first byte on `mac_tx_data`. The
  bridge holds that byte until `mac_tx_ack`. From the next cycle on, one byte
  is taken per cycle. `mac_tx_valid` falls for at least one cycle after the
  last byte.
- **Receive:** `mac_rx_valid` is high over a whole frame, one byte per cycle.

The receiver drops frames whose length field differs from the expected
payload length. It also drops any bytes after the payload, such as a forwarded
FCS. Addresses are not filtered.

## Where this design departs from, or fills in, the description it follows

- **Chosen here:**
  - the trigger value (16);
  - the MAC addresses;
  - the register map of the slot table;
  - the reset contents of the table;
  - the MAC handshake timing;
  - the FIFO construction;
  - the rule that phits do not cross slots;
  - priority order (connection 0 highest);
  - what a dynamic policy does when no connection has data.
- **Trigger test:** the credit request fires when the count *reaches* the
  trigger (`>=`). The alternative reading, "above the trigger", would fire one
  phit later.
- **Credit byte tag:** credit bytes use tag `10`, and connection bytes use
  `01`.
- **Frame size:** the frame-number byte is counted in the payload. A frame of
  10 slots of 150 bytes is therefore one byte over the Ethernet maximum, and
  the bridge rejects it (an assertion in `frame_sender`). 10 slots of 149
  bytes give the same 29 phits per slot.
- **Not included:**
  - the Ethernet MAC, serial transceiver and PHY chip (vendor and board
    parts);
  - the NoC itself (network interfaces, routers, shells);
  - the PC-side software implementation of the same protocol.

  The testbenches use a behavioural link model (`tb/eth_link_model.sv`) in
  place of MAC, PHY and cable.

Open lint warnings that stand:

- unused debug/status signals: slot number, sent frame number, `frame_done`,
  the internal phit count;
- Verilator's note that reset nets also feed the assertion `disable iff`
  clauses.

## Verification

Each block has a self-checking testbench in `tb/` that compares it against an
independent model and prints `TB_RESULT checks=N failures=M`:

- **`tb_async_fifo`:** fill to exactly 64, drain, random traffic across two
  unrelated clocks, freed-count bookkeeping.
- **`tb_credit_counter`, `tb_phit_counter`:** random event streams against a
  reference count, trigger and 63-clipping.
- **`tb_bridge_port`:** loopback of two ports through their counters, with
  stalled receivers, trigger credits and idle-time credits.
- **`tb_tdm_scheduler`:** the table (including a 1,1,2,2,3 example
  allocation), run-time rewrites, read-back, round robin and priority against
  reference models.
- **`tb_serializer`:** decodes the produced slot bytes. With 150-byte slots,
  checks 29 phits per saturated slot.
- **`tb_frame_sender`, `tb_frame_receiver`, `tb_deserializer`:** header
  layout, frame numbers, handshake, length filter, random byte streams.
- **`tb_offchip_bridge`:** two small bridges (4 connections, 4 slots of 30
  bytes) joined by the link model. They run on three unrelated clocks, with
  traffic both ways on every connection. It checks order, completeness and a
  latency bound. It counts every mechanism and fails if one never happens:
  - back-pressure stalls;
  - trigger and idle credit returns;
  - garbage bytes;
  - unused slots;
  - table rewrites;
  - round robin;
  - priority.
- **`tb_offchip_bridge_full`:** two bridges with *all defaults*, 120 phits
  each way on all 12 connections. It checks in-order delivery, all credits
  restored to 64, 1415-byte frames, 19 phits in a full slot, and credit reuse
  on a busy connection.
- **`tb_streaming_latency`:** full-size bridges, one connection owning 1, 2,
  4, 7 or 14 slots, uniform traffic from 83 thousand to 31.25 million
  phits/s. Latency is measured from the cycle the bridge accepts a phit to the
  cycle the far side delivers it, with a 220-cycle link. Mean latency in
  cycles:

  ```
  slots     83    156    312    625   1250   2500   5000  12500  25000  31250   (thousand phits/s)
      1   1143    843    868    893    894   5077   5077   5077   5077   5077
      2    502    473    496    516    521    530   2651   2651   2651   2651
      4    350    324    329    341    343    344    359   1439   1439   1439
      7    277    264    266    273    265    264    268    919    919    919
     14    233    233    233    233    233    233    233    233    691    691
  ```

  Below a connection's share, the latency is flat and falls with more slots.
  Once the injection rate passes n × 1.65 M phits/s, both FIFOs fill and the
  latency jumps to roughly 128 phits' worth of that connection's slots. The
  testbench checks the bound below saturation, the jump above it, and the
  ordering by slot count.
- **`tb_mm_write_latency`:** full-size bridges carrying single-word
  memory-mapped writes. Each write is 3 phits, issued one at a time at random
  moments. It is timed from the first phit accepted to the third phit
  delivered. Mean latency in cycles:

  | slots owned | 1 | 2 | 4 | 6 | 8 | 10 | 14 |
  |---|---|---|---|---|---|---|---|
  | mean latency | 906 | 536 | 374 | 294 | 266 | 259 | 244 |

  The floor of about 240 cycles is the 220-cycle link plus the frame header
  and the bytes of the write itself.

### Running a testbench with Verilator

From the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -Irtl -y rtl -y tb +libext+.sv rtl/bridge_pkg.sv tb/tb_offchip_bridge.sv \
    --top-module tb_offchip_bridge -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. The simulator has no X state,
so all state that is read is reset. The full-size and latency testbenches
finish in well under a minute.
