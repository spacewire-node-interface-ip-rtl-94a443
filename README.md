# SpaceWire node interface

A SpaceWire node moves packets between a SpaceWire link and a processor's
memory. The processor should not have to touch every character. This
design does it with protocol engines that read and write system memory
themselves, over an AMBA AHB master, and are set up once through APB
registers.

Received packets are sorted by their protocol identifier:

- RMAP and NDCP packets go to an RMAP engine.
- Time distribution packets go to a time distribution engine.
- CCSDS packets (CPTP) and packets of any unknown protocol ("raw") go to the
  CPTP engine. The engine stores each one in memory: header and payload at
  addresses taken from a circular table of descriptors.

In the other direction, the engines' packets are merged onto the link. The
CPTP engine sends packets whose header and payload it fetches from memory.
It inserts a CRC or PEC on request.

An NDCP address translation table turns the structured NDCP addresses
(application, protocol, field set, field) into flat physical addresses. It
also enforces the access rules and device ownership.

Optionally, a SpaceWire switch sits in front of the node. The switch then
serves 2 to 31 external links, with the node on switch port 0.

The RTL here covers the following:

- the protocol multiplexer and demultiplexer
- the complete CPTP engine (descriptors, fetch, formatting, decoding, storing, CRC, PEC, FIFOs)
- the NDCP address translation, as RAM or ROM
- the AHB DMA master
- the switch, with its counters and its own NDCP translation ROM

Four parts are not in the RTL: the link codec, the RMAP engine, the time
distribution engine and the time-code and interrupt-code handler. They are
existing designs. The first three connect through ports of the top module
`spw_node`; time codes do not pass its 9-bit character interface.

## Characters and streams

Every SpaceWire character inside the design is 9 bits wide (`spw_pkg::spw_char_t`):

- bit 8 clear means a data byte;
- `9'h100` is EOP (end of packet);
- `9'h101` is EEP (error end of packet).

Streams use a valid/ready handshake, and a character moves on a clock edge
where both are high. This is the usual FIFO interface of SpaceWire codecs.

The first character of a packet seen by the node is the target logical
address. The second character is the protocol identifier:

| Identifier | Protocol | Goes to |
|---|---|---|
| 1 | RMAP | RMAP engine |
| `NDCP_PID` (default 250) | NDCP | RMAP engine, which implements NDCP as an extension of RMAP |
| `TDP_PID` (default 251) | time distribution | time distribution engine |
| 2, or anything else | CPTP, or raw | CPTP engine |

The NDCP and time distribution identifiers are parameters, because their
values are not fixed here.

## Packet path

```
 codec(s) ──► [spw_switch] ──► proto_demux ──► RMAP/NDCP port ─┐
                                    │     └──► TDP port        │ (external engines)
                                    ▼                          │
                                  cptp ◄──► ahb_dma_master ◄───┘ DMA port
                                    │            ▲
 codec(s) ◄── [spw_switch] ◄── proto_mux ◄── RMAP, TDP, CPTP transmit
                                                  │
                              APB ──► CPTP registers, NDCP table, switch table
```

### Demultiplexer (`proto_demux`)

The demultiplexer holds the logical address until the identifier arrives.
It then passes the whole packet to one engine, so the two characters are
never split.

- A packet longer than `MAX_LEN` characters is cut. It ends with an EEP and
  the rest of it is dropped.
- A packet that ends before its identifier goes to the CPTP engine.
- A lone end marker is dropped.

### Multiplexer (`proto_mux`)

The multiplexer chooses a source round-robin, and only between packets.

- Over-long packets are cut with an EEP, the same way as in the demultiplexer.
- When an engine is reset (`eng_rst`) in the middle of a packet, the
  multiplexer ends that packet on the link with an EEP. It then drops
  whatever the engine had still queued for that packet.

## CPTP engine (`cptp`)

### Memory structures

All structures the engine uses live in system memory. Words are big-endian:
byte 0 is bits 31:24.

A **descriptor** is two words:

| Word | Contents |
|---|---|
| 0 | address of the packet's header area |
| 1 | address of its payload area |

Software writes one table of descriptors for transmit and one for receive.
It then tells the engine where each table is (TX_BASE, RX_BASE) and how many
descriptors may be used (TX_COUNT, RX_COUNT). Writing a count *adds* to what
is left.

The engine walks each table circularly, at index modulo `NDESC`. So for
later packets, software only writes a new count and does not rewrite the
table.

**Transmit header area**:

- word 0 is the control word `tx_ctrl_t`;
- the header characters follow from byte 4.

The bits of the control word:

| Bits | Field | Meaning |
|---|---|---|
| 31 | `irq_en` | interrupt when the packet has been sent |
| 30:29 | `term` | 0 EOP, 1 EEP, 2 leave the packet open |
| 28 | `cptp` | CPTP packet (the check may be inserted) |
| 27:26 | `chk` | 0 none, 1 CRC, 2 PEC |
| 23:17 | `hdr_len` | header characters sent before the payload |
| 16:0 | `pay_len` | payload bytes, at most 65536 |

A check is appended only when `cptp` is set. It covers the payload only, not
the header.

**Receive header area**:

- word 0 is the status word `rx_stat_t`;
- word 1 holds the received header characters, left-aligned.

The bits of the status word:

| Bits | Field | Meaning |
|---|---|---|
| 31 | `eep` | packet ended with EEP |
| 30 | `cptp` | CPTP packet (identifier 2) |
| 29 | `no_pay` | packet had no payload |
| 28 | `len_err` | CCSDS packet data length + 7 differs from the payload bytes received |
| 27 | `sec_hdr` | CCSDS secondary header flag (payload byte 0, bit 3) |
| 26 | `trunc` | payload cut at RX_MAX |
| 25 | `chk_err` | CRC or PEC did not verify |
| 23:17 | `hdr_len` | header characters held: 4 for CPTP, 2 for raw |
| 16:0 | `pay_len` | payload bytes stored |

The payload, check bytes included, goes to the payload area.

### Transmit

The Commands Controller (`cptp_cmd_ctrl`) fetches packets into the Tx FIFO:

1. It reads the descriptor and hands it back.
2. It reads the control word.
3. It reads the header and payload bytes.

The Packet Formatter (`cptp_pkt_formatter`) then sends the header and the
payload. It runs the payload through `cptp_crc` or `cptp_pec` and appends
the two check bytes. It ends the packet as the control word asks and raises
the interrupt event.

### Receive

The Packet Decoder (`cptp_pkt_decoder`) keeps the header and streams the
payload into the Rx FIFO. While doing so it:

- verifies the CRC or PEC chosen in CTRL;
- counts the bytes against RX_MAX and truncates beyond it;
- reads the CCSDS length field.

The Packet Handler (`cptp_pkt_handler`) writes the payload into memory as it
arrives. At the end of the packet it writes the status word and header, then
hands the descriptor back.

A packet only starts when a receive descriptor is available. With none
available, the input waits, unless CTRL.discard is set. In that case the
packet is dropped and counted as an interrupt event.

### CRC and PEC

- **CRC** is the CCSDS CRC-16: polynomial x^16+x^12+x^5+1, register preset to
  all ones, message bits most significant first. The two check bytes are the
  final register, high byte first. Over data plus check bytes the register
  ends at zero.
- **PEC** is the ISO 8473 / CCSDS modulo-255 checksum:
  - `C0 = Σ b` and `C1 = Σ C0`, both mod 255;
  - the check bytes are `CK1 = 255 - ((C0 + C1) mod 255)` and `CK2 = C1`;
  - the sums over data plus check bytes are both zero.

### CPTP registers (APB 0x0000)

| Offset | Register | |
|---|---|---|
| 0x00 | TX_BASE | transmit descriptor table address; writing restarts at index 0 |
| 0x04 | TX_COUNT | write adds (saturating at `NDESC`); read gives what is left |
| 0x08 | RX_BASE | receive descriptor table address |
| 0x0C | RX_COUNT | as TX_COUNT |
| 0x10 | CTRL | [1:0] receive check (0 none, 1 CRC, 2 PEC); [2] discard when no descriptor |
| 0x14 | RX_MAX | largest payload stored (clamped to `MAX_PKT_LEN`) |
| 0x18 | INDEX | [15:0] transmit index, [31:16] receive index |
| 0x1C | IRQ_STAT | [0] packet sent with `irq_en`, [1] packet stored, [2] packet discarded, [3] packet stored with a check error, length mismatch or truncation, [4] every N-th packet sent, [5] every N-th packet stored; write 1 to clear |
| 0x20 | IRQ_MASK | `irq = \|(IRQ_STAT & IRQ_MASK)` |
| 0x24 | IRQ_NPKT | [15:0] N for transmit, [31:16] N for receive; 0 = off; writing restarts both counts |

## NDCP address translation (`ndcp_addr_xlate`)

An NDCP address is four bytes: {application, protocol, field set, field}.
Field numbers count 32-bit words.

A table entry describes one region:

- a field set;
- its lowest field and the number of fields;
- its flags: read-only, CAS-modifiable, reserved, and whether a CAS or a
  read-only region follows it;
- the physical address of its lowest field.

A lookup from the RMAP engine scans the table from entry 0, one entry per
clock. The first entry whose region contains the first field accessed
decides, so overlapping entries are resolved by their order. The answer
comes one to `NUM + 1` clocks after the request. It is
`phys + 4 × (field − lowest field)`, with a grant bit and a reserved bit.

The rules:

| Operation | Granted when |
|---|---|
| read | always |
| write | the region is neither read-only nor CAS-only, and the access does not run past the region into one marked as followed by CAS or read-only |
| compare-and-swap | the region is not read-only |

Writes and CAS are also refused when an owner is registered and the
requester's logical address is not the owner's. No matching entry means
refusal.

Registers (APB 0x1000):

| Offset | Contents |
|---|---|
| entry i at 16·i, word 0 | {app, proto, fset, lowest field} |
| entry i at 16·i, word 1 | {number of fields[31:24], ro_fl, cas_fl, rsv, cas, ro in [4:0]} |
| entry i at 16·i, word 2 | physical address |
| 0xF00 | NUM, the entries in use |
| 0xF04 | OWNER: [8] owner set, [7:0] owner's logical address |

The table is either a RAM written through these registers (`ROM = 0`, the
default) or a ROM (`ROM = 1`). In the ROM form the entries come from the
`ROM_TABLE` parameter, an array of `ndcp_entry_t`, and the entry count from
`ROM_NUM`. Table and NUM writes are then ignored, reads still work, and
OWNER stays writable.

The node and the switch each have their own translation block. The switch's
block is always a ROM (`SW_NDCP_*` parameters of the top). Its lookup ports
(`swn_lk_*`) serve the RMAP target that configures the switch.

## DMA master (`ahb_dma_master`)

Each engine has a DMA client port (`dma_req_t` / `dma_rsp_t`):

- a request names a byte, halfword or word transfer;
- `ack` pulses when the transfer is done.

The master serves one client at a time as single AHB transfers, with the
address and data phases in sequence rather than overlapped. HBUSREQ and
HGRANT arbitrate with other masters, and byte lanes are big-endian.

A client keeps the bus for at most `MAX_BEATS` transfers in a row (32 words,
that is 128 bytes) while others wait. Then the next client is served
round-robin. Requests with `lock` set become HMASTLOCK sequences of at most
`LOCK_BEATS` = 8 transfers. These are used for RMAP read-modify-write and
NDCP compare-and-swap, and no other client gets in between. An AHB ERROR
response sets `err` in the acknowledge.

Client order at the top: 0 RMAP (external port), 1 CPTP transmit, 2 CPTP
receive.

## Switch (`spw_switch`)

The switch uses wormhole routing: the first character of a packet selects an
output, and the rest of the packet follows through that connection.

- **Path addresses** 0..31 select port *n*. The address is deleted, and port 0
  is the node.
- **Logical addresses** 32..255 look up a table entry. The entry holds a
  *group* mask and a header-deletion flag:
  - Group adaptive routing takes the lowest-numbered free port of the group.
  - The deletion flag gives regional addressing: the address is stripped, and
    the next character routes the packet onward.
- Unroutable packets are discarded.

One allocator grants one waiting input per clock, round-robin. It never
grants an output that is in use, so there is no arbitration per output.

A per-input timer counts clocks with no character moved. At the time-out
value the switch:

1. offers an EEP to the output (it gives up after a second time-out);
2. frees the output;
3. spills the rest of the input packet.

Registers (APB 0x2000):

| Offset | Contents |
|---|---|
| 0x000 | time-out in clocks (0 = off) |
| 0x080 + 4·(a−32) | group mask of logical address *a* |
| 0x480 + 4·(a−32) | deletion flag of *a* |
| 0x800 + 8·p | packets that left port *p* (a write clears it) |
| 0x804 + 8·p | packets discarded or cut by a time-out at input *p* (a write clears it) |

The counters are 32 bits wide and wrap. The document asks for operation and
error counters but does not say which ones; these two per port are this
design's choice.

## Top module (`spw_node`)

Parameters, with their defaults:

| Parameter | Default | Meaning |
|---|---|---|
| `NDESC` | 16 | CPTP descriptors per direction |
| `MAX_PKT_LEN` | 65536 | CPTP payload limit |
| `NDCP_DEPTH` | 64 | translation entries (up to 240) |
| `MAX_DMA_BEATS` | 32 | words per DMA turn |
| `FIFO_DEPTH` | 512 | CPTP FIFOs |
| `MAX_SPW_LEN` | 65552 | mux/demux packet limit, in characters |
| `N_EXT_PORTS` | 0 | 0 = single link, no switch; 2..31 = switch with that many external links |
| `SW_TIMEOUT` | 4096 | switch time-out reset value |
| `NDCP_ROM`, `NDCP_ROM_TABLE`, `NDCP_ROM_NUM` | 0, zeros, 0 | node translation table as a ROM and its contents |
| `SW_NDCP_DEPTH`, `SW_NDCP_TABLE`, `SW_NDCP_NUM` | 16, zeros, 0 | the switch's translation ROM |

APB map (`paddr[13:0]`):

- 0x0000 CPTP
- 0x1000 NDCP
- 0x2000 switch
- 0x3000 the switch's NDCP translation table (read only, except OWNER)

`eng_rst[2:0]` resets the RMAP, time distribution and CPTP engines
respectively. The CPTP engine is reset by it directly. The codec ports are
arrays of `max(1, N_EXT_PORTS)` links.

## Simulating

Each block has a self-checking testbench `tb/tb_<block>.sv`. It prints
`TB_RESULT checks=N failures=M` at the end and has a watchdog. The
behavioural models `tb/ahb_mem_model.sv` and `tb/dma_mem_model.sv` stand in
for memory.

For example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_spw_node \
  -y rtl -y tb +libext+.sv -Irtl rtl/spw_pkg.sv tb/tb_spw_node.sv
./obj_dir/Vtb_spw_node
```

Two testbenches cover the whole node:

- **`tb_spw_node`** runs the node at its default parameters, end to end. It
  takes about 1 M clocks, a few seconds.
  - It covers dispatch to every engine; CPTP receive with CRC, truncation and
    discard; and CPTP transmit with CRC and interrupt.
  - It also covers transmit arbitration, cutting of over-long packets in both
    directions, EEP on engine reset, NDCP grant and refusal, and locked
    read-modify-write.
  - It sends a 64K-byte packet through memory and back.
- **`tb_spw_node_sw`** runs the node with a four-link switch. It covers path,
  logical and group routing, discard and time-out, and the switch's
  translation ROM.

The testbenches set every register before use, so they also pass when
flip-flops start at random values (`+verilator+rand+reset+2`).

## Where this design makes its own choices

The overall architecture follows a feature-level description: the block split
of the CPTP engine, the status and control bits, the descriptor circularity
and the NDCP rules. The following are this design's own:

- **Formats and maps**: every memory layout and register map, the position of
  every bit, and the interrupt set.
- **Header lengths**: the receive header length is 4 for CPTP and 2 for raw.
  A CPTP packet is recognised by identifier 2.
- **Byte-wide DMA**: the CPTP engine moves header and payload bytes one DMA
  transfer at a time. This is simple and needs no alignment, but it uses
  four times the bus transfers of word access.
- **NDCP details**:
  - All address fields are 8 bits wide.
  - A write running past a region is allowed unless the region is flagged as
    followed by a CAS or read-only region.
  - With no owner registered, anyone may write.
  - The ROM form is the same lookup logic with constant contents. Its
    contents and the switch table's depth (16) are left to the application.
- **Maximum CPTP packet**: 65536 bytes, because one figure for the maximum
  packet is 64K. Another mention of "65 K" is read as the same limit.
- **Switch port count**: the switch has one internal port, shared by the node
  and configuration, so `NPORTS = N_EXT_PORTS + 1`. Up to 31 external links
  fit in 32 ports.
- **Switch configuration**: it is done through APB. It would otherwise come
  from RMAP commands, which need the external RMAP engine.
- **Switch control**: group choice, arbitration and time-out behaviour are
  chosen here.

Not built:

- the codec, the RMAP engine (initiator, target, verify buffer, statistics)
  and the time distribution engine;
- the time-code and interrupt-code handler.

Time codes do not pass the 9-bit character interface used here.
