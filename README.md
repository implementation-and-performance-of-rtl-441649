# ATM host interface for a workstation: Segmenter and Reassembler

This is synthesizable SystemVerilog for an ATM network adapter of the early
1990s. It connects a workstation's I/O bus to a 155 Mbit/s SONET OC-3c line.
The idea behind it is a split of work. Everything done once per 53-byte cell
is done in dedicated logic:

- header and payload CRCs;
- cutting host data into cells (segmentation);
- putting received cells back together, per circuit and per datagram
  (reassembly).

Everything per packet or per connection is left to host software: protocol
processing, buffer management and deciding which circuits are wanted.

The adapter is two boards that work independently:

- **Segmenter** (transmit). The host loads a virtual circuit identifier (VCI)
  and, for AAL 3/4 ("Class 4") traffic, a multiplexing identifier (MID). It
  then streams a buffer of data into a 512 × 32 FIFO. The board emits the
  cells to the SONET framer while the data is still arriving.
- **Reassembler** (receive). Four pipeline stages work in parallel on
  successive cells. They check each cell and sort it into a linked list, one
  list per virtual circuit and one per datagram being reassembled. The lists
  live in a 32K × 32 dual-ported buffer. The host reads any list it chooses,
  in arrival order.

The top level, `atm_host_if`, puts both boards side by side. The SONET
framer, the optics and the host bus are outside the design, so the top brings
out a byte stream towards the framer (`tx_*`), a byte stream from it (`rx_*`)
and one register bus per board.

## Cell format

Every cell is 53 bytes on a byte-wide stream, one byte per clock at 20 MHz:

| bytes | ordinary cell | Class 4 (AAL 3/4) cell |
|---|---|---|
| 0–3 | GFC=0, VPI=0, VCI(16), PT(3), CLP=0 | same |
| 4 | HEC: CRC-8 (x⁸+x²+x+1) of bytes 0–3, XOR 0x55 | same |
| 5–6 | payload | segment type (2), sequence number (4), MID (10) |
| 7–50 | payload | 44 payload bytes |
| 51–52 | payload | length indicator (6), CRC-10 (x¹⁰+x⁹+x⁵+x⁴+x+1) over bytes 5–52 |

Segment types are BOM `10`, COM `00`, EOM `01` and SSM `11` (single-segment
message). An ordinary (non-Class-4) transfer marks its last cell with
PT = `001`. Payload bytes come from each 32-bit host word most significant
byte first. The last cell is padded with zeros, and its length indicator gives
the number of real bytes.

## Transmit: the Segmenter (`segmenter`)

```
host bus ─ seg_mca_if ─┬─ atm_hdr_gen ──────┐
                       ├─ aal_hdr_gen ──────┤
                       └─ sync_fifo 512×32 ─┴─ seg_ctrl ─ tx byte stream
```

1. A write of the VCI starts `atm_hdr_gen`. It feeds the four header bytes
   through a byte-serial CRC-8, one byte per clock, then finishes the HEC.
   The header is ready on the 5th clock after the load, which is the
   five-cycle header time the original design quotes. It builds two headers
   at once: an ordinary one, and one with the last-cell PT bit.
2. A write of the MID loads `aal_hdr_gen` and restarts its 4-bit sequence
   number.
3. A write of the length (with the Class 4 bit) starts `seg_ctrl`. The host
   then writes data words to the FIFO register. While the FIFO is full the
   bus cycle gets no acknowledge. These are wait states, so the host cannot
   overrun the FIFO.
4. As soon as the FIFO holds every word of the next cell, `seg_ctrl` sends the
   cell in this order: header, segment header, payload, trailer. The CRC-10
   is accumulated as the bytes leave, then closed over the 6 length bits and
   put into the last two bytes. This repeats until the whole length is sent.
   Then `busy` falls; the driver polls this status flag before it starts the
   next buffer.

Throughput: one cell per 54 clocks when data is waiting (53 bytes plus one
idle clock). That is 44 payload bytes per 2.7 µs, about 130 Mbit/s of user
data at 20 MHz. The end-to-end testbench measures 124 Mbit/s for 1 KB writes
and 130.3 Mbit/s for 64 KB writes. These figures cover the hardware path only.
They leave out the host software overhead that limits a real system.

## Receive: the Reassembler pipeline (`reassembler`)

```
rx bytes ─ cell_mgr ─┬─ body FIFO (64×32) ──────────────────────────┐
                     └─ descriptor queue (8) ─ cam_lookup_ctrl ─ llm ─ rsm_buf_ctrl (32K×32 dual port)
                                              (VC CAM, datagram CAM)  (pointer memory)    │
host bus ─ rsm_mca_if ─── flushes ─┘ pops, frees, status ┘                 host read port ┘
```

**Cell manager (`cell_mgr`).** It checks each cell while the cell streams
in:

- CRC-8 over the header, compared with the HEC byte;
- for Class 4 cells, CRC-10 over the 48-byte payload field, which must leave
  a zero remainder.

It packs the body into words and pushes them into the body FIFO as they
complete. On the clock after the last byte it queues a descriptor: VCI,
segment type, MID, length, last-cell flag, good flag and word count. A cell
is therefore fully checked within its own 53-clock cell time.

A bad cell's body is already in the FIFO. Its descriptor is marked bad, and
later stages throw the body away in order. A cell that arrives while the body
FIFO lacks room for 12 words, or while the descriptor queue is full, is
ignored and counted as an overflow. The sequence number is not checked.
A global mode bit tells the cell manager whether all cells are Class 4.

**CAM lookup controller (`cam_lookup_ctrl`, `cam`).** It turns each
descriptor into a list reference. It uses two content-addressable memories
(CAMs) of 256 × 48, 512 × 48 in all:

- The **VC CAM** is keyed by the VCI. An unknown VCI takes the lowest free
  entry, so circuits are learnt on first use. The host removes unwanted
  circuits with a flush.
- The **datagram CAM** is keyed by {VC entry, MID}. A BOM or SSM cell opens
  an entry. COM and EOM cells must find one; if they do not (their BOM was
  lost), they are dropped. An EOM or SSM removes the key, so the MID can
  start a new datagram at once. The entry itself stays reserved, holding the
  finished datagram's list, until the host flushes it.

Class 4 cells go to list `{1, datagram entry}`. Other cells go to list
`{0, VC entry}`. Bad cells and cells that find no entry or a full CAM are
turned into DROP requests. A lookup takes at most 6 clocks from taking the
descriptor to offering the request. The original design allows 11.

**Linked list manager (`llm`).** This block is the core of reassembly. The
32K-word buffer is split into 2048 blocks of 16 words, and a cell body fills
one block. The LLM keeps two tables:

- a *pointer memory* with one entry per block: the next block, the valid byte
  count and a last-cell flag;
- a *list table* with one entry per list (512): head, tail, block count and
  the number of frame ends in the list.

The operations, one at a time, are:

| operation | from | what it does |
|---|---|---|
| APPEND | network | take a free block, record its length and last flag, link it after the tail, then tell the buffer controller to move the body there |
| DROP | network | tell the buffer controller to discard a body |
| FLUSH | host, via the CAM controller | put the whole list on the free list in one step: old tail → old free head |
| POP | host | unlink the head block and report block, length and last flag |
| FREE | host | return a block the host has finished reading |

Free blocks come first from a counter of never-used blocks, then from a
last-in first-out free list threaded through the pointer memory. So nothing
needs initialising after reset. When no block is left, an APPEND becomes a
discard (counted).

An APPEND takes 4 clocks from acceptance to its buffer command. The original
design budgets 12 clocks for its slowest list operation, and the LLM was
expected to be the pipeline's bottleneck.

Two ordering rules keep the pipeline correct:

- Network requests are served before host requests.
- A POP waits until the buffer controller is idle. A block is linked before
  its data is written, and this wait stops the host from being handed a
  block whose data is not written yet.

**Dual-port reassembly controller (`rsm_buf_ctrl`, `dp_ram`).** Port A writes
the body words of each APPEND into consecutive words of its block, one per
clock, or pops and discards them for a DROP. Its `cmd_ready` is high only when
it is idle, and the LLM uses this for the POP wait above. Port B serves host
reads with one clock of latency, so host reads never wait for network writes.

**Pipeline timing.** A cell's data is in the reassembly buffer and on its list
76 clocks (3.8 µs at 20 MHz) after the cell's first byte arrives, measured by
`tb_reassembler`. Of this, 53 clocks are the cell itself, and the rest are the
descriptor, lookup, list append and the 11-word body copy. The original design
quotes "about 4 µs". Each back-end stage is busy for at most about 13 clocks
per cell, well within the 53-clock cell time. The line rate therefore limits
throughput, not the pipeline.

## Host registers

Both boards use the same generic bus cycle. The host drives `bus_sel`, `bus_we`,
`bus_addr` and `bus_wdata` and holds them until `bus_ack` is high for one
clock. The board delays the acknowledge for as long as an operation needs;
these are its wait states. A new cycle may follow straight after the ack
clock.

Segmenter (`seg_mca_if`):

| addr | access | meaning |
|---|---|---|
| 0 | W | VCI (15:0); starts header generation |
| 1 | W | MID (9:0) |
| 2 | W | start: bit 31 Class 4, bits 16:0 length in bytes (waits while busy) |
| 3 | W | data word into the FIFO (waits while full) |
| 4 | R | bit 31 busy, bit 30 header ready, bits 9:0 FIFO words |

Reassembler (`rsm_mca_if`):

| addr | access | meaning |
|---|---|---|
| 0 | R/W | bit 0: received cells are Class 4 |
| 1 | W | flush VC entry (7:0) |
| 2 | W | flush datagram entry (7:0) |
| 3 | W | pop list (8:0) = {datagram, entry}; first frees the block held from the previous pop |
| 3 | R | held block: bit 31 valid, bit 30 last, bits 21:16 bytes, bits 10:0 block |
| 4 | R | next word of the held block |
| 5 | W / R | select list / bits 27:16 frame ends, bits 11:0 blocks in the list |
| 6 | R | wrapping 8-bit counters: header errors, CRC errors, overflows, drops (no entry or no block) |
| 7 | R | free blocks |

To read a datagram, the host polls register 5 until the frame count is
non-zero. Then it repeats two steps until register 3 reads back not valid:
pop the list (write register 3), then read ⌈bytes/4⌉ words from register 4.
Last, it flushes the datagram entry so it can be used again.

## How far this follows the original design

The following come from the original design:

- the two boards and their block diagrams;
- the 512 × 32 transmit FIFO, the 32K × 32 dual-ported reassembly buffer and
  the two CAMs (256 circuits and 256 datagrams, 512 × 48 in all);
- per-circuit and per-datagram linked lists with a pointer memory;
- tail insertion on arrival and head removal by the host;
- host flushes of circuits and datagrams;
- header and payload CRC checks done in one cell time;
- the 5-clock header generation, which fixes the 50 ns clock;
- the cycle budgets of 11 clocks (lookup) and 12 clocks (list operation).

The original description gives what each block does, but not its insides.
These are choices made here:

- **Formats.** Cell and AAL 3/4 field layouts, the CRC polynomials and the HEC
  coset are the ATM standard ones. The original names the fields only.
- **Line side.** The framer interface is one byte per clock with valid/ready
  and start-of-cell. At 20 MHz that gives 160 Mbit/s of capacity and a
  2.65 µs cell time.
- **Host bus.** The real bus protocol (Micro Channel streaming transfers) is
  not specified. A generic register bus with wait states stands in for it.
  Both register maps are this design's own.
- **Entries.** CAM entries are learnt on first use. The lowest free index
  wins. The drop rules for lost BOMs and full tables are this design's own.
- **A BOM for an open MID.** If a BOM or SSM arrives for a MID that already
  has an open datagram, the cell is appended to that datagram rather than
  starting a new one.
- **Blocks.** Blocks are 16 words (2048 blocks), and the free-block policy is
  this design's own.
- **Queue depths.** The body FIFO holds 64 words and the descriptor queue 8
  cells.
- **Class 4 selection.** One mode bit selects Class 4 checking for all
  received cells. The original does not say how the receiver tells Class 4
  cells from others.
- **Last-cell marking.** Ordinary transfers mark their last cell with PT=001,
  so the receiver can count frame ends.
- **Flushing a circuit** leaves any datagram entries opened on it alone. The
  host flushes those separately.
- **Reset.** `rst_n` is asynchronous and active low. It clears every queue and
  table. Memory contents are not cleared, and nothing reads them before they
  are written.

Not built:

- the SONET framer and the optical transceiver;
- the host I/O bus and its channel controller, including the address
  translation tables that map a contiguous device buffer onto scattered
  memory pages;
- the device driver.

These belong to the host or to separate parts. In the original prototype the
AAL header generator was still missing. Here it is included, as part of the
complete design.

## Simulation

Every testbench checks itself. It prints `TB_RESULT checks=N failures=M`, and
a watchdog ends it if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
    rtl/atm_pkg.sv tb/atm_tb_pkg.sv tb/tb_atm_host_if.sv --top-module tb_atm_host_if
./obj_dir/Vtb_atm_host_if
```

To run a different testbench, substitute its name. The simulator has two
states only, so the design resets or writes everything it reads.

| testbench | covers |
|---|---|
| `tb_atm_hdr_gen` | HEC against a long-division reference; ready exactly 5 clocks after load |
| `tb_aal_hdr_gen` | segment types, MID, modulo-16 sequence number |
| `tb_sync_fifo` | random traffic against a queue model, full/empty/count |
| `tb_seg_ctrl` | byte-exact cells for random lengths and back-pressure; 54-clock cell spacing |
| `tb_segmenter` | the board through its bus, including FIFO-full wait states |
| `tb_cell_mgr` | fields, body words, header/CRC errors, overflow, descriptor timing |
| `tb_cam` | random writes and searches, lowest-index priority |
| `tb_cam_lookup_ctrl` | a behavioural model of learning, datagrams, flushes, full CAM; the 11-clock limit |
| `tb_llm` | a model of lists and free-block policy, pop interlock, out-of-blocks; the 12-clock limit |
| `tb_rsm_buf_ctrl` | block writes, discards, host read-back |
| `tb_reassembler` | interleaved datagrams, error drops, flushes, plain cells, status; 76-clock cell latency |
| `tb_atm_host_if` | loop-back at full size: 1 KB … 64 KB writes, SSM, errors, mode switch, FIFO stall, block reuse (over 2048 cells) |

`tb_atm_host_if` runs the complete design with every parameter at its default
and takes under a second. `tb/atm_tb_pkg.sv` holds the reference models: CRCs
by polynomial long division, and a cell builder.

## Files

- `rtl/atm_pkg.sv`: shared types (cell descriptor, LLM request), constants
  and the CRC step functions.
- `rtl/atm_host_if.sv`: the top level.
- `rtl/segmenter.sv`: the transmit board. Its blocks are `seg_mca_if`,
  `atm_hdr_gen`, `aal_hdr_gen`, `sync_fifo` and `seg_ctrl`.
- `rtl/reassembler.sv`: the receive board. Its blocks are `cell_mgr`,
  `sync_fifo` (twice), `cam_lookup_ctrl` (with two `cam`), `llm`,
  `rsm_buf_ctrl` (with `dp_ram`) and `rsm_mca_if`.
