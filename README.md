# A one-in, four-out packet switch

This is a small store-and-forward packet switch. Packets come in on one
byte-wide input port. Each packet is delivered to one of four byte-wide
output ports, chosen by the packet's first byte (its destination address).
Every output port has an 8-bit address. The addresses live in a small table,
and a separate memory port writes and reads that table. Each output port
buffers whole packets and hands them out under a two-wire ready/read
handshake. The receiver on the far side sets its own pace and may pause at
any time.

The switch's ports, signal names, packet layout and the default address
table come from a published specification of a simple packet switch. That
specification treats the switch as a black box. It describes only the
behaviour at the pins, so everything inside is this design's own: the split
into blocks, the buffering, the discard rules and the exact cycle timing.
The last section lists every point where the specification was silent and a
choice had to be made.

## Packet format

A packet is a sequence of bytes:

| byte        | field                                    |
|-------------|------------------------------------------|
| 0           | destination address                      |
| 1           | source address                           |
| 2           | length: number of data bytes, 0 to 255   |
| 3 ... 2+n   | data                                     |
| last        | FCS (frame check sequence)               |

The largest packet is therefore 3 + 255 + 1 = 259 bytes.

The switch reads only byte 0. It does not use the length field to find the
end of a packet. Instead, the packet ends where `data_status` falls. A
packet whose length field disagrees with its real size is still forwarded
whole. The FCS byte is copied through untouched. The specification calls the
FCS a checksum, but it does not define how it is computed, so the switch
does not check it.

## Structure

```
             mem_en/mem_rd_wr/mem_add/mem_data     mem_rdata
                          |                            ^
                   +---------------+                   |
                   | port_addr_mem |-------------------+
                   +---------------+
                          | port_addr[0..3]
                          v
 data_status  +------------+  q_wr[p], q_byte   +-------------+  ready[p]
 data ------->| input_port |------------------->| output_port |<-> read[p]
              +------------+        x4          |  (p = 0..3) |--> port_data[p]
                    |                           +-------------+
                    v drop_unmatched                   | drop_overflow[p]
```

| file                 | role |
|----------------------|------|
| `rtl/switch_pkg.sv`  | shared constants (port count, byte width, buffer depth) and the `pkt_byte_t` struct that carries a byte with its first/last flags |
| `rtl/port_addr_mem.sv` | the address table behind the memory port |
| `rtl/input_port.sv`  | finds where packets start and end, looks up the destination and steers the bytes |
| `rtl/output_port.sv` | per-port packet buffer and the ready/read handshake |
| `rtl/switch_top.sv`  | wires one table, one input port and `NUM_PORTS` output ports together |

All logic runs on one clock, `clk`. Reset is synchronous and active high
(`reset` at the top, `rst` inside).

## The memory port: setting port addresses

The table has one 8-bit entry per output port. `mem_add` selects the port
number.

* `mem_en = 1`, `mem_rd_wr = 1`: `mem_data` is written into the entry at the
  rising edge. It takes effect for any packet whose first byte is sampled
  after that edge.
* `mem_en = 1`, `mem_rd_wr = 0`: the entry appears on `mem_rdata` after the
  rising edge and stays there until the next read.
* `mem_en = 0`: nothing happens.

After reset, port *n* has address *n* (00h, 01h, 02h, 03h). This is the
standard configuration, so the switch routes packets without being
configured first. Addresses may be changed at any time, including while
traffic flows. If two ports share an address, the lower-numbered port gets
the packets.

## The input port: framing and routing

The sender raises `data_status` and puts one byte per clock on `data`. It
lowers `data_status` after the last byte (the FCS). There must be at least
one clock with `data_status` low between packets, because that low clock is
the only thing that separates one packet from the next.

When the first byte of a packet is sampled, it is compared with all four
table entries at once. The lowest matching port is latched for the rest of
the packet. If no entry matches, the whole packet is discarded and
`drop_unmatched` pulses for one clock.

A byte cannot be flagged as the packet's last until the next clock shows
whether `data_status` is still high. So every byte is held in a one-byte
stage for one clock. It then leaves on `q_byte` with its `first`/`last`
flags, together with a one-hot write strobe `q_wr[p]`. A byte sampled at
rising edge *k* is written into its output buffer at edge *k*+2.

## The output ports: buffering and the ready/read handshake

This is the part whose timing matters most to anyone connecting to the
switch.

**Buffering.** Each output port has a circular buffer of `QUEUE_DEPTH` bytes
(default 1024). Each entry is a 9-bit word: the byte plus a last-byte flag.
Two write pointers are kept:

* a *working* pointer, which advances with every byte written;
* a *committed* pointer, which moves up to the working pointer only when a
  packet's final byte has been stored.

The reader only ever sees committed packets, so the port works in
store-and-forward mode. If the buffer becomes full partway through a packet:

* the working pointer falls back to the committed one;
* the rest of that packet is ignored;
* `drop_overflow` pulses once.

Packets that were already stored are never harmed. The next packet is
accepted if it fits, even if it is smaller than the one that was dropped.
With 1024 bytes, three largest-size packets (777 bytes) fit at once, and a
fourth is dropped unless the port is read in the meantime.

**Handshake.** Per port:

* `ready` is high while a complete packet is on offer.
* At every rising edge where both `ready` and `read` are high, the next byte
  of the packet is placed on `port_data`. It stays there until the next
  such edge.
* `read` may be lowered at any time to pause. A read while `ready` is low is
  ignored.
* The edge that places the packet's final byte on `port_data` also lowers
  `ready`. So a reader knows that the byte it is about to take is the last
  one, because `ready` is low next to it.
* `ready` stays low for at least one clock before the next packet is
  offered. Each high period of `ready` therefore carries exactly one packet.

```
edge            1   2   3   4   5   6
clk        _/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_
ready      _____/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\___/‾‾‾‾‾   (high again: next packet)
read       _________/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾
port_data  -------------X B0X B1X B2 (last byte: ready falls at edge 5)
```

A reader that keeps `read` high gets one byte per clock. With the port idle,
`ready` rises at the third rising edge after the edge that sampled the
packet's last input byte. (That is two edges through the input stage and
buffer write, plus one for the read-side state machine.)

## Parameters

| parameter | where | default | meaning |
|-----------|-------|---------|---------|
| `NUM_PORTS` | `switch_top`, `port_addr_mem`, `input_port` | 4 | output ports (from the specification) |
| `QUEUE_DEPTH` / `DEPTH` | `switch_top` / `output_port` | 1024 | bytes buffered per output port (this design's choice; must be a power of two) |
| `ADDR_W` | `port_addr_mem` | 8 | port address width (from the specification) |

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.

* `tb_port_addr_mem`: reset contents, then 2000 random writes, reads and idle
  cycles, checked against a reference copy of the table.
* `tb_input_port`: 400 random packets. The traffic includes unmatched
  destinations, 255-byte payloads, wrong length fields, a change of
  addresses with a duplicated entry, and a single-byte frame. It checks
  routing, byte content, first/last flags, drop pulses and the two-clock
  latency.
* `tb_output_port`, with a 64-byte buffer:
  * concurrent writes and randomly paced reads;
  * a deliberate overflow, in which exactly the packets that do not fit
    must vanish;
  * the write-to-ready latency.
* `tb_switch_top`: the whole switch at its default size. It is organised as
  a layered environment in `tb/switch_vip_pkg.sv`:
  * a `switch_packet` class with good/bad FCS and good/bad length kinds;
  * a memory-port driver and an input driver;
  * one receiver per output port, with a random read pattern;
  * a scoreboard that predicts the destination of each packet, or that it
    will be dropped.

  The signal bundles are the interfaces `switch_mem_if`, `switch_in_if` and
  `switch_out_if`, each with an assertion on its protocol. The run:
  1. reads back the reset table and writes the standard addresses;
  2. sends about 300 random packets;
  3. changes the addresses while traffic flows;
  4. sends a 235-data-byte packet whose length field claims 237 bytes, to
     address 33h;
  5. stops one reader until its buffer overflows.

  It also checks the input-to-ready latency and the one-byte-per-clock read
  rate. It counts each of these events and fails if any of them never
  happened. The FCS in the testbench is an XOR of the header and data bytes
  (inverted for a bad-FCS packet). The switch does not look at the FCS, so
  this choice does not affect the result.

The RTL also carries assertions:

* at most one buffer is written per clock;
* `ready` is never offered without a complete packet;
* the read pointer never passes the committed data.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/switch_pkg.sv tb/switch_vip_pkg.sv tb/tb_switch_top.sv \
    --top-module tb_switch_top
./obj_dir/Vtb_switch_top
```

For a block testbench, list `rtl/switch_pkg.sv`, the block's file and its
testbench, for example
`verilator --binary --timing --assert rtl/switch_pkg.sv rtl/output_port.sv tb/tb_output_port.sv --top-module tb_output_port`.

## Choices made where the specification is silent

* **Read direction of the memory port.** `mem_rd_wr` high means write. Read
  data comes out on a separate output, `mem_rdata`, rather than on a
  bidirectional `mem_data`.
* **Reset.** Reset is synchronous and active high. It loads the standard
  address table (port *n* = *n*).
* **Packet boundaries.** Packets are framed by `data_status` alone, and at
  least one idle clock is required between packets.
* **Unmatched destinations.** Such packets are discarded and reported on
  `drop_unmatched`.
* **Duplicate addresses.** The lowest-numbered port wins.
* **FCS.** It is neither computed nor checked, and is forwarded as received.
* **Buffering.** Store and forward, with 1024 bytes per port. A packet that
  does not fit is dropped whole and reported on `drop_overflow`.
  `drop_unmatched` and `drop_overflow` are status outputs that the
  specification does not list.
* **End of a packet on the output side.** The specification has `ready`
  fall after the last byte but fixes no cycle for it. Here `ready` falls at
  the edge that delivers the last byte. This lets a
  reader find the end of a packet without parsing its length field.
* **Pausing.** A reader may pause mid-packet by lowering `read`.
* **Latency.** Input to buffer takes two clocks. The read-side state machine
  adds one more.

How far to trust it: every block passes its own testbench. The full switch
passes an end-to-end random test at its default size, and each testbench has
been shown to fail on a deliberately broken copy of its block. The cycle
timing is this design's own, since the specification fixes none. A system
that needs a different handshake timing has to change `output_port`.
