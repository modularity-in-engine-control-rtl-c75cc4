# A serial AXI4-Lite bridge for a modular engine control unit

A modular engine control unit splits the controller into a main board and
up to four plug-in expansion cards. The main board carries the processor
and a main FPGA. Each card carries its I/O (analog inputs, digital I/O and
so on) and a small FPGA of its own. The software on the processor should
see a card's registers just as it would see registers inside the main FPGA,
so existing AXI4-Lite peripherals and their drivers work unchanged on a card.

This RTL does that bridging. A register access to a slot's address window
is packed into a small packet. The packet crosses a single full-duplex
serial lane, and an FPGA on the card replays it as an AXI4-Lite transaction
on the card's bus. The response travels back the same way. So does a change
of the card's interrupt lines.

Three layers make the lane reliable: a link layer that finds the bit and
byte alignment by itself, a CRC on every frame, and a stop-and-wait
retransmission protocol. The whole stack is written for one clock that
stands for the shared reference clock of the bus. One serial bit moves per
clock cycle, so every time quoted below is in bit times. At the intended
800 Mbit/s lane rate, one bit time is 1.25 ns.

## The bus: one lane per card

Physically the cards are daisy-chained: each card routes the lanes of the
cards behind it. Logically the bus is a star. Every card has its own
point-to-point lane to the main board, made of one transmit pair and one
receive pair. This removes arbitration, relaying and routing from the
protocol.

The main-board block (`axb_bridge_master`) has:

* one AXI4-Lite subordinate port per slot. The host interconnect decodes
  the slot windows; in the reference system these are 64 MiB each, starting
  at 0x4400_0000.
* one `axb_master` per slot, each with its own lane.
* a control port, `axb_ctrl`, for the signals that are not part of the
  lanes. These are the card reset, a reset of the master side of all lanes,
  PROGRAM_B per slot, INIT_B and DONE, the slave-serial bitstream output
  (CCLK/DIN) and per-lane status counters.
* the interrupt status of every card, on `irq[slot]`.

Each card runs an `axb_slave`, which is an AXI4-Lite manager on the card's
bus.

The top module `axb_system` holds the bridge master and four bridge slaves.
Everything between them is brought out as ports: the LVDS buffers, the
cable and the input delay elements that the receivers tune. Connect
`m_tx_bit` to `s_rx_bit` and `s_tx_bit` to `m_rx_bit` and the system works.
The testbenches put a channel model there instead, with skew, delay, bit
errors and cable cuts.

```
host AXI4-Lite ──► axb_master ─► txq ─► axb_arq ─► axb_link ─► lane ─┐
 (per slot)        ◄── rxq ◄────────────┘  ▲    ◄── axb_link ◄── lane ◄─┐ │
                                            └ axb_serdes, axb_crc16     │ │
card AXI4-Lite ◄── axb_slave ◄─ rxq ◄─ axb_arq ◄─ axb_link ◄────────────┼─┘
                          └──► txq ──►                 └──► lane ───────┘
```

Both ends of a lane use the same stack, `axb_endpoint`. It is a transmission
queue, the ARQ layer, the link layer with serializer and CRC, and a receive
queue. Only the front ends differ: `axb_master` on the main board and
`axb_slave` on the card.

## Packets

Every packet is a two-byte header, followed by 0 to 9 payload bytes.
`packet_t` in `axb_pkg` holds the largest packet.

| field | bits | meaning |
|-------|------|---------|
| len   | 4 | payload length, 0..9 |
| nlen  | 4 | bitwise complement of len (checked by the receiver) |
| ack   | 1 | this header carries an acknowledgement |
| ackn  | 1 | sequence number being acknowledged |
| seqn  | 1 | sequence number of this packet |
| pad   | 2 | zero |
| typ   | 3 | packet type |

The header is sent MSB first, len first.

| typ | packet | payload (little-endian) |
|-----|--------|-------------------------|
| 000 | READ_REQ   | address[4] |
| 001 | READ_RESP  | data[4], resp |
| 010 | WRITE_REQ  | address[4], data[4], wstrb |
| 011 | WRITE_RESP | resp |
| 100 | IRQ_UPDATE | interrupt status byte |
| 101 | ACK_ONLY   | none: carries only ack/ackn |
| 110 | SYN        | none: start-up, see below |

A write request is exactly nine bytes, which is what sets the payload
maximum. The payload layouts and byte order are this design's choice.

## Link layer: getting a lane into sync

`axb_link` turns packets into a byte stream, and `axb_serdes` turns that
stream into bits. Three comma bytes are used:

* 0xBC: pre-synchronisation.
* 0xDC: idle and "I am synchronised".
* 0x1C: start of frame.

A frame on the wire is one idle comma, SOF, the header, the payload, then
the CRC-16 (high byte first) over header and payload. Between frames the
transmitter sends idle commas.

The receiver brings itself into sync without help from software. Its states
(`link_state_e`) are:

1. **DESKEW.** The transmitter sends 0xBC. The receiver steps the tap of its
   input delay element whenever two successive received bytes differ. Once
   `STABLE_BYTES` (8) equal bytes arrive in a row, the sampling point is
   inside the data eye.
2. **SLIP.** Each received byte that is not a comma makes the deserializer
   slip by one bit, and the next byte is skipped while it settles. After
   `SLIP_LIMIT` (16) slips without success, DESKEW starts again.
3. **SYNC.** The byte boundary is found, so the transmitter switches from
   0xBC to 0xDC. This tells the far end "I receive you". The receiver stays
   in SYNC while the far end still sends 0xBC.
4. **IDLE / FRAME.** On seeing 0xDC, the far end is synchronised too:
   `locked` rises and the upper layers are enabled. In IDLE, SOF starts a
   frame.

Any byte that should not appear restarts the sequence at DESKEW and pulses
`sync_err`. The sequence also restarts on a soft reset from the ARQ layer.
Bytes that should not appear are:

* a non-comma in IDLE,
* a header whose nlen is not the complement of len,
* a length above 9.

While unlocked, the transmitter goes back to 0xBC, so the far end also
notices and resynchronises. A frame whose CRC does not match is only
dropped, and `crc_err` pulses. That is the ARQ layer's problem.

CRC-16 is the CCITT polynomial 0x1021 with initial value 0xFFFF
(`axb_crc16`, one byte per step). The CRC variant is this design's choice.

The real lane uses vendor DDR SERDES primitives and IDELAY elements.
`axb_serdes` replaces them with an 8-bit shift register each way. The
`delay_tap` output is where a delay element would be controlled. A quiet
lane locks about 250 to 400 bit times after reset.

## ARQ layer: stop-and-wait with one-bit sequence numbers

`axb_arq` is the hardest part to get right. Both ends run identical copies,
independently in each direction.

**Sending.** A packet taken from the transmission queue goes into a
retransmission buffer. It is stamped with the current sequence bit and
handed to the link. Nothing else is taken from the queue until an
acknowledgement with the same number arrives; then the sequence bit
toggles. If no acknowledgement arrives within `TIMEOUT` (512) bit times,
the buffered packet is sent again. The timer runs from the hand-over, and
also while the link is out of sync. After `MAX_RETRIES` (8) timeouts in a
row, the ARQ gives the link a one-cycle `soft_reset`, which forces a full
resynchronisation. The packet stays buffered and goes out again once the
link is locked. No packet is lost or reordered; a dead lane just stalls
that slot.

**Receiving.** A packet with the expected sequence bit is delivered to the
receive queue and acknowledged. A repeat is acknowledged again but not
delivered; this happens when the first acknowledgement was lost. A packet
that finds the receive queue full is neither delivered nor acknowledged, so
the sender's timeout brings it back later.

**Acknowledgements** ride in the header of any outgoing frame. If no data
packet leaves within `ACK_DELAY` (16) bit times, a header-only ACK_ONLY
packet carries the acknowledgement. The short wait matters in practice.
A card's response is ready a few cycles after its request, so it carries
the acknowledgement of that request, which saves a whole ACK_ONLY frame per
transaction. It cut the read latency from about 294 to about 203 bit times.

**Start-up and one-sided resets.** One-bit sequence numbers only work if
both ends agree on them. After reset, an end first sends a SYN packet,
which sets the receiver's expected number. After its own reset, an end also
accepts the first packet whatever its number. Together these rules keep the
ends in step when only one end was reset: a master reset, a card reset, or
a card that was reprogrammed. SYN is acknowledged like data but not
delivered. This start-up rule is this design's own.

## Front ends

**`axb_master`** accepts one AXI4-Lite transaction at a time; AXI4-Lite
allows no outstanding transactions. A write with AW and W both valid
becomes a WRITE_REQ, and a read becomes a READ_REQ. AWREADY/WREADY or
ARREADY rise in the cycle the packet enters the queue, and writes win a
tie. The address is cut to the slot window (`SLOT_AW` = 26 bits), so each
card decodes its own window from 0. The matching response packet drives
RVALID/RDATA/RRESP or BVALID/BRESP; a card's SLVERR passes through. An
IRQ_UPDATE can arrive at any time and sets `irq`. Packets that do not match
the transaction in flight are dropped; this can happen with a late response
after a reset.

**`axb_slave`** takes one request from its receive queue. It runs the AR/R
handshake, or the AW+W/B handshake with the write strobes, on the card bus,
and queues the response. It registers the card's interrupt lines. Whenever
they differ from the status last reported, and again each time the lane
regains lock, it queues an IRQ_UPDATE. The resend on lock matters because
the master side may have been reset and lost its copy. Interrupts are level
status: the host clears an interrupt at its source on the card with an
ordinary register write, and the cleared level is then reported.

## Control port and card configuration

`axb_ctrl` is a separate 4 KiB AXI4-Lite register window. Its register
addresses and bit positions are this design's choice.

| offset | reg | access | contents |
|--------|-----|--------|----------|
| 0x000 | CTRL | RW | bit 0 SLV_RESET (card reset line), bit 1 MSTR_RESET (master side of all lanes), bit 4+s PROG[s] (drives PROGRAM_B of slot s low) |
| 0x004 | STATUS | RO | bits 0..3 lane locked, bit 8 INIT_B, bit 9 DONE, bit 10 bitstream busy |
| 0x008 | BITSTR | WO | 32-bit word appended to the bitstream queue; the write waits while the queue is full |
| 0x010+16s | TX_COUNT[s] | RO | packets sent on lane s |
| 0x014+16s | RETX_COUNT[s] | RO | retransmissions |
| 0x018+16s | CRC_ERR[s] | RO | frames dropped for a bad CRC |
| 0x01C+16s | SYNC_ERR[s] | RO | resynchronisations |

Other addresses answer SLVERR. Writes take effect one cycle after the
handshake, and reads return one cycle after ARREADY.

A card FPGA is configured over the slave-serial interface:

1. Set PROG[s], then clear it.
2. Wait for INIT_B to return high.
3. Write the bitstream word by word to BITSTR. `axb_slave_serial` shifts
   each word out MSB first on DIN, changing DIN while CCLK is low. CCLK runs
   at clk/8, so CCLK_HALF = 4.
4. Wait for DONE.
5. Pulse SLV_RESET and then MSTR_RESET to bring the bus into a known state.

The 16-word queue back-pressures the register writes, so a bitstream of any
length streams through. The 2,192,012-byte bitstream of a Spartan-7 card
takes about 140 M bit times.

## Performance

These numbers were measured in simulation, with a few bit times of cable
delay:

* **Read latency** on a quiet lane: up to 203 bit times, from ARVALID to
  RVALID. That is about 254 ns at 800 Mbit/s, well under a microsecond.
* **Back-to-back reads** on one slot: 200 bit times each, so about 4 million
  transactions per second per lane at 800 Mbit/s. Lanes run in parallel.
* **Noisy lanes:** at 1 bit error per 1000, and in 4000-bit-time bursts of
  25 per 1000, every transaction still completes with correct data. Latency
  grows to a few thousand bit times, because each error costs a
  resynchronisation and usually a retransmission.

The synthesised size of the four-slot top, as coarse generic cells (yosys),
is about 4900 cells and 5600 flip-flops.

## Module map

| module | role |
|--------|------|
| `axb_pkg` | packet, header, AXI4-Lite request/response structs, commas, CRC function |
| `axb_system` | top: bridge master + one bridge slave per slot |
| `axb_bridge_master` | main-board bridge: control port + one `axb_master` per slot |
| `axb_master` / `axb_slave` | AXI4-Lite front ends of the two lane ends |
| `axb_endpoint` | queues + ARQ + link, shared by both ends |
| `axb_arq` | stop-and-wait retransmission |
| `axb_link` | sync sequence, framing, CRC |
| `axb_serdes` | byte/bit conversion with bit slip |
| `axb_crc16` | CRC-16 register |
| `axb_fifo` | first-word fall-through FIFO, element type as a parameter |
| `axb_ctrl` | bus control registers |
| `axb_slave_serial` | bitstream queue and CCLK/DIN shifter |

AXI4-Lite ports are the packed structs `axil_req_t` (manager to
subordinate) and `axil_rsp_t`. AWPROT/ARPROT are not carried.

## Simulating

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. `tb_axb_system` runs the four-slot top at
its default parameters. It covers programming, resets, locking, quiet and
parallel noisy traffic, a burst, a cable cut that ends in a soft reset,
interrupts and SLVERR. It fails if any of these mechanisms never occurred:

* tap stepping, bit slip, the SYNC state,
* CRC drops, resynchronisation, retransmission, soft reset,
* duplicates, ACK_ONLY, piggy-backed ACKs, SYN,
* IRQ update, SLVERR, resets and programming.

The testbench models are:

* `axb_tb_channel`: a lane with skew, a data eye, delay, bit errors and cut.
* `axb_tb_axil_mem`: a card memory with random stalls and an error region.

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb \
  rtl/axb_pkg.sv tb/tb_axb_system.sv --top-module tb_axb_system -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Replace `system` with `link`, `arq`, `master`, `slave`, `bridge_master`,
`ctrl`, `slave_serial`, `serdes`, `crc16` or `fifo` for the block
testbenches. The full system run takes about 15 seconds.

## What is this design's own, and what is left out

These follow the published design:

* the logical star over daisy-chained cards, with one lane per card and up
  to four cards;
* the AXI4-Lite bridging and the two-byte header with the seven packet
  types, up to 9 payload bytes and CRC-16;
* stop-and-wait ARQ with piggy-backed or standalone ACKs, retransmission
  on timeout and a soft link reset after repeated timeouts;
* the 0xBC / 0xDC / 0x1C comma scheme, with delay-element deskew followed
  by bit slipping, and `locked` once both ends are synchronised;
* a control port with the resets, the slave-serial signals, a bitstream
  queue and link statistics.

These are this design's own choices:

* the single bit-rate clock;
* the CRC variant;
* payload layouts and byte order;
* all timeouts and thresholds;
* the delayed acknowledgement (the published protocol sends an
  acknowledgement immediately; here a standalone ACK waits up to 16 bit
  times for a data packet to ride on, which is set by `ACK_DELAY`, and
  `ACK_DELAY = 0` restores the immediate behaviour);
* the SYN start-up rule;
* the re-sending of interrupt status on lock;
* the register map;
* queue depths.

Not included, because they are board parts or vendor blocks:

* the processor, the AXI interconnects and the interrupt controller;
* the LVDS buffers and delay primitives (modelled in `tb/`);
* the card EEPROMs and their SPI bus;
* the synchronisation signals;
* the card I/O cores.

To reach 800 Mbit/s on an FPGA, `axb_serdes` would be replaced by DDR
SERDES primitives and the logic run on the byte clock. That change has not
been made or timed here.
