# ROT13 UDP echo inside layered protocol wrappers

This is a network module for a reconfigurable packet processor that sits on
an ATM link. The module exchanges 32-bit ATM cell words with the
surrounding hardware. Inside it, four *protocol wrappers* are stacked:

1. a **cell processor** for ATM cells,
2. a **frame processor** for AAL5 frames,
3. an **IP processor** for IPv4 packets,
4. a **UDP processor** for UDP datagrams.

Each wrapper removes one layer of protocol detail on the way in and adds it
back on the way out. Because of this, the application at the centre works
on UDP datagrams only. It never has to deal with cells, CRCs or header
checksums.

The application is a UDP echo. It sends every datagram back to where it
came from, with the payload ROT13-encrypted:

- every letter is moved 13 places round the alphabet, so `Hello World`
  becomes `Uryyb Jbeyq`;
- applying it twice gives the original text back.

Cells of other flows pass through the module unchanged. Control cells
read counters and write two configuration registers.

```
 d_mod_in/soc_mod_in ─▶ cell ─▶ frame ─▶ IP ─▶ UDP ─▶ ┐
                      processor processor proc.  proc. udp_echo (4 × rot13)
d_mod_out/soc_mod_out ◀─ cell ◀─ frame ◀─ IP ◀─ UDP ◀─ ┘
                          │
                          └── bypass queue / control cells
```

All logic runs on one clock. Every layer moves one 32-bit word per clock
in each direction.

## Words between the layers

Two word formats are used. Both are defined in `rtl/lpw_pkg.sv`.

**Cells (`cell_word_t`)** travel between the module pins, the cell
processor and the frame processor. A cell is 14 consecutive words, and
`soc` marks word 0.

| word | content |
|------|---------|
| 0 | ATM header: GFC[31:28], VPI[27:20], VCI[19:4], PTI[3:1], CLP[0] |
| 1 | HEC in [31:24]; the rest is zero |
| 2–13 | 48 payload bytes, most significant byte first |

Two PTI bits matter here:

- PTI bit 0 (word-0 bit 1) marks the last cell of an AAL5 frame;
- PTI bit 2 (word-0 bit 3) marks OAM cells, which the frame processor
  discards.

**Frame words (`lpw_word_t`)** travel between the frame processor, the IP
and UDP processors and the application. Each is a 32-bit data word plus
these flags:

| flag | meaning | set by |
|------|---------|--------|
| `dataen` | the word is valid | all layers |
| `sof`, `eof` | first and last word of the AAL5 frame | frame processor |
| `sop` | first word of the IP payload (word IHL) | IP processor |
| `udp` | the packet is UDP; valid from word 2 on | UDP processor |
| `sod` | first word of the UDP payload | UDP processor |
| `be[3:0]` | which bytes of this word are UDP payload; `be[k]` is bits [8k+7:8k] | UDP processor |

A frame carries the IP packet, then the AAL5 padding and the 8-byte AAL5
trailer. The upper layers pass the padding and trailer words along
untouched. This is why the UDP processor works out the payload bytes from
the UDP length and reports them in `be`, instead of assuming that every
word up to `eof` is payload.

## Flow control

The hardest part of the design to get right is flow control. Every
interface has a level signal called TCA, from the receiver to the sender,
meaning "you may start". The rules are:

- A sender checks TCA only before it starts a unit of work:
  - a cell, at the cell interfaces;
  - a word, at the frame interfaces.
- Once a cell has started, it is always finished.
- Each layer asserts its TCA only while it has enough free buffer space
  (its *slack*) to absorb:
  - everything already in flight, and
  - the rest of a cell the sender may already have begun.

The layers use TCA as follows.

| interface | TCA high when | slack |
|-----------|---------------|-------|
| module input `tca_mod_out` | the frame processor accepts, and the bypass queue has ≥ `BYP_SLACK` (32) free words | covers one started cell plus pipeline |
| cell → frame processor | the IP layer's TCA, registered | – |
| frame → IP → UDP (ingress) | upper layer's TCA, registered one clock per layer | ingress paths never hold data |
| application → UDP processor | packet buffer has ≥ `PKT_SLACK` (96) free words and the result queue has room | |
| UDP → IP processor | IP egress FIFO has ≥ `OUT_SLACK` (8) free words | |
| IP → frame processor | segmentation FIFO has ≥ `SEG_SLACK` (24) free words | |
| frame → cell processor | the application queue has room for a whole cell | |
| module output `tca_mod_in` | input: a new cell starts only while it is high | |

The ingress direction never stops words in the middle of a packet. A stop
from the application travels down one registered TCA per layer until it
reaches the module input. The slack values cover the words that are
already on their way.

## The layers

### Cell processor (`rtl/cell_processor.sv`)

**Ingress.** Cells pass through a three-stage pipeline, so that the header
is still held when the HEC word arrives. **HEC check** compares the
received HEC with a CRC-8 of the header (polynomial x⁸+x²+x+1, then XOR
0x55). A cell whose HEC does not match is dropped whole. **Dispatch** then
routes the cell by its VCI:

- `CTRL_VCI` (0x23): to the control unit;
- the application VCI (register 0, reset value 0x32): up to the frame
  processor;
- any other VCI: to the bypass queue.

**Control cells.** The command is in payload word 0, with the opcode in
[31:24] and the register address in [7:0]. Opcode 1 writes the data from
payload word 1:

- register 0 is the application VCI;
- register 1 holds the flags; bit 0 turns on the TTL decrement in the IP
  processor.

Every control cell is answered with a cell on the same VCI, laid out as
follows.

| answer word | content |
|-------------|---------|
| 2 | the command, with bit 31 set |
| 3 | register 0 |
| 4 | register 1 |
| 5 | cells in |
| 6 | HEC drops |
| 7 | application cells |
| 8 | bypassed cells |
| 9 | control cells |

If the control queue is full, the answer is dropped.

**Egress.** Three queues hold whole cells: application, bypass and control.
The output multiplexer serves them round robin, one whole cell at a time,
with no gaps inside a cell. **HEC set** writes a fresh HEC into every
outgoing cell. Cells of one flow stay in order; cells of different flows
may be interleaved.

### Frame processor (`rtl/frame_processor.sv`)

**Reassembly** removes the two header words of each cell and passes its 12
payload words up:

- `sof` is set on the first word of a frame;
- `eof` is set on the last word of the cell whose header has the
  end-of-frame bit.

An **AAL5 CRC** unit runs CRC-32 over the frame (polynomial 0x04C11DB7,
preset to all ones). At `eof` the CRC register must hold the residue
0xC704DD7B, and the unit pulses either `crc_ok` or `crc_bad`.

**Cell segmentation** takes words from above through a 64-word FIFO. It
starts a cell when:

- the cell processor allows it, and
- the FIFO holds either 12 words or the end of a frame.

Each outgoing cell is built like this:

- The header is the one kept from the first cell of the last frame
  received, with PTI cleared.
- The end-of-frame bit is set if the frame ends inside this cell.
- The HEC word is zero; the cell processor fills it in.
- The frame's last word is replaced by the complement of the CRC-32
  computed on the way out, so the trailer is always valid.

### IP processor (`rtl/ip_processor.sv`)

**Ingress.** Frames go into a 32-word FIFO. While each frame is written,
its header is checked:

- version is 4;
- IHL is at least 5;
- the ones' complement sum of the header is 0xFFFF.

The reader of the FIFO waits at the first word of each packet until that
packet's verdict is known. Packets that fail a check are read out and
discarded, and `ip_drop` pulses.

On the way out of the FIFO:

- If the TTL option is on, the TTL is decremented, except when it is
  already 0.
- The header checksum is then updated incrementally:
  HC' = ~(~HC + ~m + m′), where m and m′ are the old and new TTL/protocol
  halfwords.
- `sop` is set on word IHL.

**Egress.** Packets go into another 32-word FIFO. The header checksum is
computed as the header is written, with the checksum field counted as zero.
The reader waits at word 2 until that checksum is ready, then writes it
into bits [15:0] of word 2. The flags `sop`, `sod`, `udp` and `be` are
cleared on the way down.

### UDP processor (`rtl/udp_processor.sv`, `rtl/udp_cksum.sv`)

**Ingress.** Words pass up one clock later. The processor adds:

- `udp` for packets with protocol 17;
- `sod` on the first payload word;
- `be` on the payload bytes.

Words going up to the application, and coming back from it, have their
bytes reversed (first byte in bits [7:0]); see Byte order below.

At `eof` the checksum result is reported. It counts as good (`udp_ok`)
when the received checksum is zero (checksum not used) or equal to the
one computed over the pseudo header, UDP header and payload. Otherwise
`udp_bad` pulses. A datagram is passed up whatever its checksum; the
result is only reported. Packets of other protocols pass up unmarked and
pulse `non_udp`.

**Egress.** The UDP checksum sits in front of the data it covers, so the
whole outgoing packet must be seen before the checksum is known. Outgoing
packets are therefore stored whole in a 1024-word packet buffer while the
checksum is computed:

- When `eof` is written, the packet is committed, and its checksum goes
  into a small result queue.
- The reader starts only on committed packets. It writes the checksum into
  word IHL+1, and maps a result of 0 to 0xFFFF.
- A packet longer than `PKT_DEPTH − PKT_SLACK` words (928 words, 3712
  bytes) could never be completed. It is dropped by rolling the write
  pointer back, and `udp_ovf` pulses.

### Application (`rtl/udp_echo.sv`, `rtl/rot13.sv`)

Words pass through a one-word holding register, which lets neighbouring
words change places:

- the source and destination addresses (words 3 and 4) swap;
- in the UDP header word (`sop`), the source and destination ports swap;
- every payload byte (`be`) goes through one of four `rot13` instances,
  one per byte lane.

The application makes no checksum changes. The UDP and IP processors
recompute both checksums on the way out.

### Top (`rtl/rot13_module.sv`)

The top has these ports:

- `clk`, `reset_l`, `enable_l`, `ready_l`;
- the data interface `d_mod_in`, `soc_mod_in`, `tca_mod_out`, `d_mod_out`,
  `soc_mod_out`, `tca_mod_in`;
- an `events` output of one-clock strobes from every layer.

Reset and enable behave as follows:

- `reset_l` asserts reset asynchronously; its release is synchronised with
  two flops.
- `ready_l` goes low once the module is out of reset.
- Cells that start while `enable_l` is high are ignored.

## Timing

These latencies are measured by the testbenches at default parameters:

| path | clocks |
|------|--------|
| cell in → bypass cell out (idle, header word to header word) | 20 |
| cell header word in → first frame word out of the frame processor | 4 |
| first word in → first word out of the IP processor (5-word header) | 7 |
| UDP processor ingress | 2 (one register) |
| 40 one-cell datagrams sent back to back into the whole module | all accepted within 40 × 14 + 4 clocks (one word per clock, no refused cell), and all echoed |

The UDP egress is store-and-forward, so its delay grows with the packet
length. These are the round-trip delays through the idle module, from the
edge that drives the first cell's header word to the first echoed header
word:

| datagram | first word in → first word out | last word in → last word out |
|----------|--------------------------------|------------------------------|
| one cell (`Hello World`) | 67 clocks | 62 clocks |
| 512-byte payload (12 cells) | 213 clocks | 212 clocks |

At 109–125 MHz, 67 clocks is 0.54–0.61 µs.

## Departures from the reference design

The wrapper library this follows gives each layer's functions and its
block-level data flow. It does not give the internal structure, and this
implementation differs from it in the following ways.

**Latencies.** The published per-layer delays are:

| layer | short packet (in / out) | long packet (in / out) |
|-------|-------------------------|------------------------|
| cell processor | 4 / 6 | 4 / 6 |
| frame processor | 21 / 22 | 10 / 31 |
| IP processor | 36 / 39 | 24 / 197 |
| UDP processor | 39 / 44 | 27 / 202 |

This design does not reproduce those numbers. Its ingress paths are
mostly shorter, and its UDP egress is a whole-packet store-and-forward
buffer. The reference design quotes about 0.5 µs to process a UDP/IP
datagram; the 67-clock round trip for a one-cell datagram (see Timing) is
close to that.

**Clock rates.** The reference design reports 109–125 MHz on an XCV1000E-7
FPGA. No clock rate is claimed here.

**Frames that fail a check.**
- A frame with a bad AAL5 CRC is passed up and only reported.
- A datagram with a bad UDP checksum is passed up and only reported.
- Only a failed IP header check drops the packet.

**Choices of this design.** All of the following are this design's own:

- the control-cell format and the VCI values;
- the queue and FIFO sizes;
- the round-robin output policy;
- discarding OAM cells;
- reusing the last received header for outgoing cells.

With one application flow, reusing the header returns cells on the flow
they came from.

**Not handled.**
- IP fragments: each packet must hold a whole datagram.
- IP options are passed on, not interpreted.
- A TTL that reaches zero is left as it is; no ICMP message is sent.
- The echo swaps addresses and ports. The reference design only says that
  the payload is encrypted.

**Byte order.** Between the cell, frame, IP and UDP processors the first
byte of a word is in bits [31:24], which is network order. The reference
design does not say which order its inner interfaces use. At the
application interface the UDP processor reverses the bytes of every word,
so the first payload byte is in bits [7:0] and `Hell` appears as
`6C6C6548`. This matches the reference design's simulation of that
interface.

**Left out.** The network module's SRAM and SDRAM interfaces are not
brought out, because the application uses no external memory.

## Verification

Each block has a self-checking testbench in `tb/`. The reference models in
`tb/lpw_tb_pkg.sv` work one byte at a time and are written independently
of the RTL. They provide:

- HEC, CRC-32 and the Internet checksum;
- packet, AAL5 frame and cell builders;
- the expected echo of a packet.

Random traffic is generated with `$urandom`. Each testbench ends by
printing `TB_RESULT checks=N failures=M`.

| testbench | what it covers |
|-----------|----------------|
| `tb_rot13` | all 256 byte values; `Hello World` ↔ `Uryyb Jbeyq` |
| `tb_udp_echo` | random UDP and non-UDP packets with gaps: swapped addresses and ports, rotated payload |
| `tb_cell_processor` | application, bypass, bad-HEC and control cells; register writes and status answers; output stall; bypass queue back-pressure; bypass latency |
| `tb_frame_processor` | random-length frames looped back through the upper interface; CRC check and regeneration; OAM cells; random `cell_out_tca`; reassembly latency |
| `tb_ip_processor` | header checks and drops; TTL decrement with checksum update; `sop`; egress checksum; random TCA both ways; ingress latency |
| `tb_udp_processor` | `udp`/`sod`/`be` marking; checksum verdicts (good, bad, unused, non-UDP); egress checksum; oversize discard; random TCA |
| `tb_rot13_module` | the whole module at default parameters, listed below |

The `tb_rot13_module` run covers:

- `Hello World` and 512-byte datagrams;
- bypass, bad-HEC and control cells;
- the TTL option turned on by a control cell;
- moving the application VCI;
- IP options;
- bad IP checksums and versions, bad UDP checksums and bad AAL5 CRCs;
- a non-UDP packet;
- an oversize datagram;
- back-to-back throughput;
- long output stalls.

It counts each of these mechanisms and fails if any never happened.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
  -Irtl -Itb rtl/lpw_pkg.sv tb/lpw_tb_pkg.sv tb/tb_rot13_module.sv \
  --top-module tb_rot13_module -o sim && ./obj_dir/sim
```

To run another block, replace the testbench file and the top-module name.
Every parameter has a default, so every module in `rtl/` can also be
linted on its own as a top.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| cell_processor | `CTRL_VCI` | 16'h0023 | VCI of control cells |
| cell_processor | `APP_VCI_RST` | 16'h0032 | reset value of the application VCI |
| cell_processor | `QDEPTH` | 64 | words per application/bypass queue |
| cell_processor | `CTRL_QDEPTH` | 32 | words in the control answer queue |
| cell_processor | `BYP_SLACK` | 32 | free bypass words required for `in_tca` |
| frame_processor | `SEG_DEPTH` | 64 | segmentation FIFO words |
| frame_processor | `SEG_SLACK` | 24 | free words required for `up_in_tca` |
| ip_processor | `IN_DEPTH` | 32 | ingress FIFO words |
| ip_processor | `OUT_DEPTH` | 32 | egress FIFO words |
| ip_processor | `OUT_SLACK` | 8 | free words required for `hi_in_tca` |
| udp_processor | `PKT_DEPTH` | 1024 | egress packet buffer words |
| udp_processor | `PKT_SLACK` | 96 | free words required for `hi_in_tca`; also the oversize limit |
| udp_processor | `RES_DEPTH` | 16 | committed-packet result queue |

## Files

- `rtl/lpw_pkg.sv`: word formats, event strobes, HEC, CRC-32 and checksum
  functions.
- `rtl/sync_fifo.sv`: show-ahead FIFO used by the cell processor.
- `rtl/cell_processor.sv`, `rtl/frame_processor.sv`, `rtl/ip_processor.sv`,
  `rtl/udp_processor.sv` and `rtl/udp_cksum.sv`: the wrappers.
- `rtl/udp_echo.sv` and `rtl/rot13.sv`: the application.
- `rtl/rot13_module.sv`: the top.
- `tb/`: the testbenches and the reference-model package.
