# NaNet network interface datapath

NaNet is a PCIe network interface card (NIC) for physics experiments. Its job is to take data from
the detector's links and put it into CPU or GPU memory with low latency, and above all with latency
that stays the same from one packet to the next. A GPU-based trigger can only keep its time budget
if the transport in front of it is predictable. The card has three main pieces:

- the **I/O interface**, one channel per link technology;
- a **router**, a crossbar between the channels and the host;
- the **network interface**, which turns packets into DMA writes at the right memory addresses.

Inside the card there is a single packet format. Every channel translates between that format and its
own line protocol, so adding a link type means writing one more channel.

This RTL builds the datapath of two members of the family on one router:

- a **GbE channel with UDP offload**. This is the configuration used for the NA62 trigger, which
  receives UDP datagrams from detector readout boards.
- **four KM3link channels**. These are synchronous 8b/10b optical links with deterministic latency
  and a time-division-multiplexed frame. This is the configuration used on the KM3NeT-IT underwater
  telescope, which talks to its floor control modules.

Parts not included here:

- The Ethernet MAC and PHY.
- The transceivers, which do serialisation and clock recovery.
- The PCIe core with its DMA engines.
- The configuration microcontroller.

Each of these appears as a group of ports on `nanet_top`.

```
            +--------------------------- nanet_top ----------------------------+
 MAC rx --> | udp_rx -> apenet_encoder ----------+                              |
 MAC tx <-- | udp_tx <- apenet_decoder <-----+   |                              |
            |                               p1|   |p1                         |
 SerDes k ->| comma_aligner -> dec8b10b -> tdmp_rx -> apenet_encoder --+ p2+k   |
 SerDes k <-| enc8b10b <- tdmp_tx <- apenet_decoder <------------------+ p2+k   |
            |                         router (2+N_KM3 ports, crossbar)          |
            |                               p0|   |p0                         |
 host tx -->|        apenet_encoder ---------+   +---> nanet_ctrl <-> tlb ------|--> DMA writes,
            +-------------------------------------------------------------------+    completion events
```

All logic runs on one clock (`clk`) and uses an asynchronous active-low reset (`rst_n`). Every stream
interface uses valid/ready handshakes. A word moves on a rising edge where both valid and ready are
high.

## The internal packet

A packet is one 32-bit header word followed by the payload words. The header is `apl_hdr_t` in
`nanet_pkg`:

| bits  | field  | meaning                                                                     |
|-------|--------|-----------------------------------------------------------------------------|
| 31:28 | `dest` | router output port                                                          |
| 27:24 | `src`  | router port the packet entered by                                           |
| 23:16 | `chan` | channel inside the link: UDP port offset, TDM slot, or a host-chosen number |
| 15:0  | `len`  | payload length in 32-bit words                                              |

Payload bytes are packed big-endian: the first byte on the wire is bits 31:24. `last` flags the final
payload word.

Router ports are numbered as follows:

- port 0 is the network interface (the host);
- port 1 is GbE;
- ports 2 to 1+`N_KM3` are the KM3link channels.

Channels address every inbound packet to port 0. The host chooses the port for outbound packets
(`host_tx_dest`).

**apenet_encoder** turns a payload stream into a packet.
- It works store-and-forward: it buffers the whole payload, so that the header can carry the true
  length.
- At the payload's first word it records `dest` and `chan` in a small header queue.
- It emits the header, then the payload.
- A payload longer than `MAX_LEN` words is cut there. The rest goes out as a further packet with the
  same `dest` and `chan`.
- The data FIFO (`DEPTH` words) is the channel's buffer. A KM3link channel cannot stall its link, so
  this FIFO decides how long a router output can stay busy before words are lost.

**apenet_decoder** does the reverse. It strips the header and presents the payload together with its
`chan`, `src` and length. If the length field does not match the number of payload words, it counts
`len_err`.

## Router

`router` is a full crossbar of `NPORTS` ports.

- **Arbitration.** Each output has its own round-robin arbiter (`rr_arbiter`). The arbiter looks at
  the header words waiting at the inputs. An input whose `dest` names this output takes part.
- **Locking.** The winner keeps the output until its `last` word has passed, so packets are never
  interleaved.
- **Parallel flows.** Separate outputs work at the same time, so up to `NPORTS` packets can move in
  one cycle.
- **Timing.** A grant takes one clock, because the lock is registered. After that, data, valid and
  ready pass through a multiplexer with no extra latency.
- **Bad destination.** A packet whose `dest` is not a port is read in and thrown away. It is counted
  in `drops`.
- **Contention counter.** `contention` counts cycles in which a packet head waited for an output that
  was busy.

The routing decision lives in the function `route_of`. To use a different routing rule, change that
function.

Throughput per flow is one 32-bit word per cycle, so a flow carries 4 bytes × f_clk. The original
card quotes 2.8 GB/s flows. Reaching that rate with 32-bit ports needs a 700 MHz clock, so at
practical FPGA clocks the ports must be made wider. The port width is fixed by `word_t` in
`nanet_pkg`.

## GbE channel: UDP offload

**Receive (`udp_rx`).** The MAC delivers frames as 32-bit words. `in_sop` and `in_eop` mark the first
and last word of a frame.

*Input format.* A 2-byte alignment pad comes before the destination MAC address. This is the common
"shift 16" MAC option. With it, the Ethernet, IPv4 and UDP headers fill exactly 11 words, and the
payload starts word-aligned in word 11.

*Acceptance checks.* A frame is accepted only when all of these hold:
- the EtherType is IPv4 (0x0800);
- the IPv4 header has no options (first byte 0x45);
- the protocol is UDP (17);
- the destination port is in `[cfg_port_base, cfg_port_base + NCHAN)`.

*Output.* Only the payload leaves the block:
- `out_chan` is the port offset;
- `out_bytes` is the length taken from the UDP header;
- any Ethernet minimum-size padding is dropped.

*Drops and flow control.* Other frames are consumed and counted in `rx_drop`. Header words are always
accepted. Payload words pass straight through, so backpressure from the encoder reaches the MAC.

*Not done.* Checksums are not verified, and fragments are not reassembled. A datagram therefore has to
fit in one frame, which means at most 1472 payload bytes.

**Transmit (`udp_tx`).** This block takes a payload with its length and channel. It writes the same
11-word header from configuration registers:
- the MAC and IP addresses;
- source port `cfg_port_base + chan` and a fixed destination port;
- TTL 64, Don't Fragment set, and UDP checksum 0.

It computes the IPv4 header checksum in hardware. `frames_sent` counts the frames sent.

## KM3link channel

A KM3link carries a floor module's data to shore over fiber. It uses 8b/10b code and has a
deterministic latency: after every reset the link must come back with exactly the same delay, so that
hits can be time-stamped against a common clock. In the transmit direction, from shore to the floor,
the link carries only slow-control traffic.

### Line code

`linecode_pkg` holds the 8b/10b code as functions: the 5b/6b and 3b/4b sub-codes, the disparity rules
and the A7 exception.

- **`enc8b10b`** is the encoder. It is registered, with one cycle of latency, and tracks the running
  disparity. It raises `k_err` when asked for a control character that does not exist.
- **`dec8b10b`** is the decoder. It works by matching against the code tables, checks disparity, and
  has one cycle of latency. `code_err` flags an invalid code group or a disparity error. After an
  error the running disparity follows the received group's own balance, so the decoder
  resynchronises.

A code group is `{a b c d e i, f g h j}` with bit 9 = `a`, which is the first bit on the line.

### Word alignment and fixed latency

The deserialiser hands over 10-bit words that can start at any bit of the code stream.
`comma_aligner` keeps the last two words (a 20-bit window) and searches every shift from 0 to 9 for the
K28.5 comma in either disparity. When it finds one, it locks:

- `shift` holds the bit offset;
- every later word is cut at that offset;
- the output follows the input with one cycle of delay.

Raising `realign` drops the lock and starts the search again.

This is how the fixed-latency property shows up in the logic. For a given physical link, every
reset-and-align must produce the same `shift`. Software can read `km3_shift` after each
re-initialisation and compare it with the previous value. On the original board the transceiver does
this alignment itself in its fixed-latency mode. Here it is a logic block on the parallel side, so
that its result can be seen.

### TDM frame

Both directions use the same frame:
- a K28.5 comma;
- then `SLOTS` slots of `SLOT_WORDS × 4` data bytes each.

Slot *s* always carries stream *s*. The default is 4 slots of 16 bytes, so a frame is 65 byte times.
The link stays on K28.5 commas between frames.

**Receive (`tdmp_rx`).** The receiver hunts for K28.5. For each slot it packs the bytes into words
and sends the slot as one packet with `chan` set to the slot number.

- A control character or a code error inside a frame aborts that frame. It is counted in `frame_err`.
- A new K28.5 always restarts framing.
- The link cannot be stopped. A word that arrives while the output is not ready is lost and counted in
  `overflow`.

Sizing this matters. The channel's encoder FIFO (`KM3_DEPTH` words) must cover the longest time the
router output to the host can be busy with other traffic.

**Transmit (`tdmp_tx`).**
- **Constant rate.** It sends frames back to back, one byte per cycle, so the line runs at a constant
  rate.
- **Slot use.** Each frame carries at most one outbound packet. The packet is placed in its `chan`
  slot and the other slots are zero.
- **Loading.** Packets are staged while the previous frame goes out. A new packet is loaded at each
  frame boundary.
- **Truncation.** A packet longer than one slot is cut to fit, and `truncated` counts the cuts.

At 800 Mbps the byte clock is 80 MHz. A frame's payload is 64/65 of the 640 Mbps that remain after
8b/10b coding, about 630 Mbps. One floor's data stream needs about 300 Mbps.

## Network interface: receive into CPU or GPU memory

This path runs from router port 0 into memory. The design's main aim is low, stable latency, so the
address work is done in logic rather than in firmware.

**Receive-buffer ring.** Using `buf_wr_*`, the host registers `NBUF` receive buffers by their
*virtual* base addresses. All buffers are `cfg_buf_bytes` long.

**Virtual Address Generator (`nanet_ctrl`).** It fills the current buffer: each payload word gets the
address `base[cur] + offset`. The header word is used up here and is not written to memory.

**TLB (`tlb`).**
- **Organisation.** It is fully associative, with `ENTRIES` entries and pages of 2^`PAGE_BITS` bytes.
  The default is 32 entries of 64 KB.
- **Lookup.** It translates the virtual address to a physical one in the same cycle.
- **Misses.** A miss holds the stream: `in_ready` stays low and `misses` counts the stalled cycles.
  The word continues once the configuration side writes the mapping with `tlb_wr_*`.
- **Who refills it.** The TLB does not choose a slot for the new mapping; the writer does. The TLB
  never issues a refill itself. On the card, the microcontroller or the driver does this.

**DMA write port.** Translated words leave one per cycle on the DMA write port:
- `dma_addr` and `dma_data` carry the physical address and the data;
- `dma_last` marks a packet's last word;
- `dma_ready` comes from the PCIe core.

**Closing a buffer.** A buffer is closed in three cases:

1. it is exactly full;
2. the next packet would not fit, because packets are never split between buffers;
3. the **timeout** expires: `cfg_timeout` cycles have passed since the buffer's first word, and no
   packet is half written.

Case 3 is what makes latency bounded when traffic is slow. Without it, a partly filled buffer would
wait for the next packets. With it, data reach the application within a fixed deadline. Setting
`cfg_timeout = 0` turns the timeout off.

**Completion events.** Each closed buffer raises `evt_valid` for one cycle with:
- `evt_buf`, the buffer index;
- `evt_bytes`, the bytes written;
- `evt_timeout`, set when the timeout closed the buffer.

After that, the ring moves on to the next buffer. Events cannot be back-pressured, so the host must
take them.

**Dropped packets.** A packet bigger than a whole buffer is dropped and counted (`oversize_drops`).

**Timing.** Data pass combinationally from the router to the DMA port. Events are registered and
appear one cycle after the closing word.

The ring does not wait for the host to hand buffers back. Software must re-register a buffer, or size
the ring, so that it is never overwritten while still in use.

## Network interface: transmit

The host side of the PCIe core offers outbound payload on `host_tx_*`, together with a destination
port and a channel. An `apenet_encoder` turns the payload into a packet with `src` = 0 and sends it
into router port 0.

- On the GbE port it leaves as a UDP datagram. `chan` selects the source port.
- On a KM3link port it leaves in TDM slot `chan` of the next frame.

## Top-level parameters

| parameter     | default | meaning                                                        |
|---------------|--------:|----------------------------------------------------------------|
| `N_KM3`       | 4       | KM3link channels (router ports 2..5)                           |
| `NBUF`        | 16      | receive buffers in the ring                                    |
| `TLB_ENTRIES` | 32      | TLB entries                                                    |
| `PAGE_BITS`   | 16      | log2 of the page size                                          |
| `UDP_NCHAN`   | 4       | UDP ports accepted, starting at `cfg_udp_port_base`            |
| `SLOTS`       | 4       | TDM slots per frame                                            |
| `SLOT_WORDS`  | 4       | 32-bit words per slot                                          |
| `ENC_DEPTH`   | 512     | GbE and host encoder FIFO in words (fits a 1472-byte datagram) |
| `KM3_DEPTH`   | 128     | KM3link encoder FIFO in words                                  |

The status counters are 16-bit (32-bit for `tlb_misses`) and wrap around.

## Where this differs from the original card

Differences in how things are built:

- **Single clock.** There is one clock. The original has separate transmit, recovered and PCIe clocks
  and crosses between them. None of those crossings is here.
- **Comma alignment in logic.** Alignment is done in logic, not by the transceiver's fixed-latency
  mode. The analog property, a fixed phase between the transmit and receive clocks, cannot be shown
  in RTL. What the RTL shows is a fixed alignment shift.
- **Own choices.** The following are choices of this design, not copies of the original:
  - the header layout;
  - the port numbering;
  - the TDM frame layout;
  - the buffer-ring and event format;
  - the round-robin arbitration;
  - the 32-bit datapath width.

Parts that are missing:

- **Missing channels.** There is no APElink channel, with its word stuffing and link control, and no
  10GbE channel.
- **Not designed.** No data-processing stage, such as the event decompressor used for NA62. Its
  format is not defined here.
- **Outside the RTL.** These appear only as ports on `nanet_top`:
  - the PCIe core;
  - the microcontroller;
  - the GPU peer-to-peer logic.

## Simulating

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. To build and run one with Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
    rtl/linecode_pkg.sv rtl/nanet_pkg.sv tb/tb_nanet_top.sv --top-module tb_nanet_top
./obj_dir/Vtb_nanet_top
```

Each unit testbench checks one block as follows:

| testbench           | what it checks                                                                          |
|---------------------|-----------------------------------------------------------------------------------------|
| `tb_enc8b10b`       | known code groups, then random bytes checked for balance, disparity and run length      |
| `tb_dec8b10b`       | known groups, an invalid group, and random data and control bytes through the encoder   |
| `tb_comma_aligner`  | every bit shift 0..9, and the same shift again after realign                            |
| `tb_tdmp_rx`        | slot packets, idle commas, an aborted frame, overflow                                   |
| `tb_tdmp_tx`        | frame timing, byte order, truncation                                                    |
| `tb_udp_rx`         | acceptance and drop rules, padding removal, backpressure                                |
| `tb_udp_tx`         | the header against a reference model, including the IPv4 checksum                       |
| `tb_rr_arbiter`     | fairness and one-hot grants against a model                                             |
| `tb_router`         | routing, no interleaving, order per source, contention, drops                           |
| `tb_tlb`            | hits, misses, offset pass-through, overwrite                                            |
| `tb_nanet_ctrl`     | addresses, closing on fill, lack of room and timeout, oversize drop                     |
| `tb_apenet_encoder` | packet format, cutting at `MAX_LEN`, header held until the payload is in                |
| `tb_apenet_decoder` | header removal, tags, `len_err` on a wrong length                                       |

### Receive latency

`tb_nanet_latency` measures how long a UDP datagram takes to cross the NIC. The clock starts when the
MAC hands over the frame's first word. It stops when the last payload word is accepted on the DMA
port. The DMA port never stalls and the TLB already holds the mapping. The result is exact:

    latency = 11 header words + 2 × payload words + 1 cycle

The payload appears twice because the GbE encoder stores the whole datagram before forwarding it,
which it must do to put the length into the header. Repeating a size gives the same number every
time.

| payload (bytes) | 16 | 64 | 128 | 256 | 512 | 1024 | 1472 |
|-----------------|---:|---:|----:|----:|----:|-----:|-----:|
| cycles          | 20 | 44 | 76  | 140 | 268 | 524  | 748  |

At 125 MHz a 128-byte datagram takes 608 ns, which is inside the 1 µs the original card achieves
for small datagrams.

The store-and-forward time is the largest part of the latency for long datagrams. Taking the length
from the UDP header instead (`udp_rx` already outputs it as `out_bytes`) would allow cut-through and
remove one payload time.

### The end-to-end testbench

`tb_nanet_top` runs the full-size top, with no parameter overrides. It drives these traffic sources:

- a GbE sender with UDP payloads of 16, 64, 128, 256, 1024 and 1472 bytes, plus one frame to a port
  that is not accepted;
- four floor modules, each sending TDM frames through 8b/10b with a different bit skew;
- the host, which sends slow-control packets out to the links and to GbE.

Its host model keeps memory and refills the TLB on a miss. The test checks:

- every payload byte that arrives in memory;
- every outbound frame.

It counts each of these mechanisms and fails if any of them never happens:

- a TLB-miss stall;
- a buffer closed on fill, or when the next packet has no room;
- a buffer closed on timeout;
- router contention;
- a router drop;
- a UDP drop;
- a TDM frame error;
- DMA backpressure;
- a realign that returns the same shift.
