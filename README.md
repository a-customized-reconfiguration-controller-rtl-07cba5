# Reconfiguration controller with remote direct ICAP access

This is the static-region controller of a network-attached, partially
reconfigurable Xilinx FPGA. A remote client updates the accelerator in the
reconfigurable region over UDP. The controller does three things:

* It receives a **run-length-compressed partial bitstream** in acknowledged
  segments and keeps it in external SRAM. Nothing touches the configuration
  memory until the whole bitstream has arrived. An upload cut off half way
  therefore leaves the running module unharmed.
* It **loads the stored bitstream through the ICAP**, the FPGA's internal
  configuration port. The data is decompressed inline at one 32-bit word per
  ICAP clock. The controller then reads back the STAT register to check the
  result, and finally takes the reconfigurable module through reset and
  initialisation.
* It gives the remote user **direct access to the ICAP**. A packet can drive
  the ICAP's chip enable, read/write select and data word by word, for
  example to read back or write configuration registers.

The architecture follows the controller described in *A Customized
Reconfiguration Controller with Remote Direct ICAP Access for Dynamically
Reconfigurable Platform* (TELKOMNIKA 15(2), 2017), built there for a NetFPGA-10G
board (Virtex-5 XC5VTX240T). That publication gives the block structure, the
storage format and the sequencing. It does not give bit-level packet formats,
the SRAM protocol or handshakes, so those are this design's own. Each is listed
under "Own choices" below.

## Structure

```
             platform clock (clk)                               ICAP clock (icap_clk, 100 MHz)
 rx ──► packet_type_classifier ──► prm_* (to the reconfigurable module)
            │            │
            │ bitstream  │ direct ICAP
            ▼            ▼
 bitstream_packet_handler   direct_access_handler ──► FIFO A (512x36) ──┐
            │ ack     ▲                     ▲                           │
            ▼         │ bs_ready            └──── FIFO B (512x36) ◄───┐ │
      sram_interface ◄── bitstream_loader ──► FIFO C (512x72) ──────► icap_interface ◄──► ICAP
            │                 ▲                                       │
          SRAM                │ start                                 │ done/ok/STAT/cycles
                       dpr_flow_controller ◄──── toggle_sync ◄────────┘
                              │ dpr_mode, prm_reset, prm_init
 tx ◄── reply_mux ◄── acks, readback replies, status reports
```

| Module | Role |
|---|---|
| `reconfig_controller_top` | Wires the blocks together; its ports are the packet streams, SRAM pins, ICAP pins and PRM control. |
| `packet_type_classifier` | Steers packets by type. Drops PRM traffic in DPR mode and bitstream packets while a load runs. |
| `bitstream_packet_handler` | Parses segments, attaches run counts, writes SRAM, acknowledges, reports the last segment. |
| `sram_interface` | Shares the SRAM port between writer and loader (round robin) and marks read data valid. |
| `bitstream_loader` | Streams SRAM into FIFO C. Keeps the reads in flight within FIFO C's free space and stops at the last word. |
| `async_fifo` | Dual-clock first-word-fall-through FIFO with Gray pointers. Used as FIFOs A, B and C. |
| `icap_interface` | Inline RLE decoder, STAT readback and load timer; executes direct-access commands. |
| `direct_access_handler` | Packet words to FIFO A commands; FIFO B readback to reply words. |
| `dpr_flow_controller` | DPR mode, PRM reset and initialisation, result report, retry after failure. |
| `reply_mux`, `toggle_sync` | Reply arbitration; clock-domain crossing of the load-done event. |
| `rc_pkg` | Widths, packet type codes, STAT bit positions, the stored-word and command structs. |

## The compressed bitstream, from packet to ICAP

This is the part that takes the most care to follow.

**Symbol.** The compression symbol is a 64-bit word, the width of the packet
bus, not the 32-bit ICAP word. A run is a 64-bit value plus a count *c* of
extra repetitions (0..127). The value is written to the ICAP *c*+1 times, and
each time it goes out as two ICAP words, upper half first. The client splits
runs longer than 128.

**Segment packet** (UDP payload, 64-bit words, `bs_hdr_t` in `rc_pkg`):

| Word | Content |
|---|---|
| 0 | `[63:56]` type 0x01, `[48]` last segment, `[47:40]` H = compression-header words, `[39:32]` N = content words, `[31:16]` segment number, `[11:8]` log2 of the segment size |
| 1..H | compression header: four 16-bit pairs per word, pair *k* in bits `[63-16k -: 16]` = {location, length} |
| H+1..H+N | content: one 64-bit run value per word |

A pair {0x02, 0x0A} means that content word 2 of this segment is written
11 times. Content words with no pair are written once. Pairs come in rising
location order, and a pair with length 0 is padding. With the usual segment
sizes of 64 or 128 runs, at most 32 header words are needed
(`MAX_HDR_WORDS`).

**Stored word.** The packet handler keeps the header words in a 32-entry
buffer. It walks the pairs in step with the content stream and writes one
72-bit `bs_word_t` per content word:

```
 71    70..64   63..0
 last  run c    run value
```

The word goes to SRAM address `segment << log2(size) + index`. A retransmitted
segment therefore overwrites itself and cannot shift the rest. `last` is set on
the final content word of the segment flagged last. The same 72-bit word is the
entry of FIFO C. The 64+8 layout matches a BRAM FIFO's data and parity fields.

**Upload protocol.** Each complete segment is acknowledged with a one-word
reply: type 0x81, the last flag at bit 48 and the segment number in `[31:16]`.
The client sends every segment except the last, waits until all of them are
acknowledged, then sends the last one. Its arrival (`bs_ready`) starts the
reconfiguration. A packet shorter than its header promises is dropped without
an acknowledge, so the client resends it.

**Decoding.** `icap_interface` holds one stored word and a half/repetition
counter. In the cycle it writes the final half of the final repetition, it also
takes the next word from FIFO C. So a load of *W* ICAP words takes *W*+1 cycles
unless FIFO C runs dry. The loader can refill FIFO C at up to one 72-bit word
per platform clock, and every stored word yields at least two ICAP words. FIFO C
therefore stays full as long as the platform clock is faster than half the ICAP
clock. A timer counts the load's cycles.

## Checking the load and sequencing the module

After the word flagged `last`, the ICAP Interface runs a fixed 16-step
sequence: dummy word, bus-width detection, sync word, NOOPs, a type-1 read of
STAT, a switch to read mode for one read cycle and back, a write of DESYNC to
the CMD register, and NOOPs. The load counts as good when STAT has neither
CRC_ERROR (bit 0) nor ID_ERROR (bit 15) set. These are the Virtex-5 bit
positions, kept in `rc_pkg`. The result, STAT, the cycle count and the word
count are held in ICAP-domain registers. A toggle is synchronised into the
platform domain to announce them.

`dpr_flow_controller` states:

| State | dpr_mode | prm_reset | prm_init | bitstream packets |
|---|---|---|---|---|
| NORMAL | 0 | 0 | 0 | accepted |
| LOAD (loader started, waiting for the ICAP result) | 1 | 1 | 0 | dropped |
| INIT (success; until `prm_init_done`) | 1 | 0 | 1 | accepted |
| REPORT (two words to the client) | 1 | 0 on success, 1 on failure | 0 | accepted |
| FAILED (until a new last segment arrives: retry) | 1 | 1 | 0 | accepted |

The report is two words. Word 0 is type 0x83, ok at bit 48 and the cycle count
in `[31:0]`. Word 1 is STAT in `[63:32]` and the number of ICAP words written in
`[31:0]`. While `dpr_mode` is high, the classifier drops packets meant for the
reconfigurable module.

## Direct ICAP access

A direct-access packet has a header word (type 0x02) followed by one word per
ICAP cycle. The ICAP data word is in `[63:32]`, and `{L, RW, CE}` is in
`[26:24]`. CE is the active-low chip enable, RW=1 is a read, and L ends the
session. The controller forces L on the final word of a packet. Example session
reading STAT, as `{data, L RW CE}`:

```
FFFFFFFF 000   000000BB 000   11220044 000   FFFFFFFF 000
AA995566 000   20000000 000   2800E001 000   20000000 000
20000000 000   00000000 011   00000000 010   00000000 001
30008001 000   0000000D 000   20000000 000   20000000 100
```

Each command drives the ICAP pins for one cycle, exactly as given. After a
read cycle (CE=0, RW=1), the interface waits until BUSY is low, at the earliest
two cycles later, and pushes `icap_o` into FIFO B. Each readback word comes back
as a reply word: type 0x82 with the data in `[31:0]`. The session ends with a
reply word that has bit 32 set. A pending bitstream load is served before a new
session starts; a session already running finishes first.

## Timing and size

* The ICAP side takes one 32-bit word per cycle. The full-size testbench loads
  a 1,524,144-byte bitstream (190,518 64-bit words, compressed 2.6:1) in
  381,037 cycles for 381,036 words. At 100 MHz that is 3.19999 Gbit/s, against
  the 3.2 Gbit/s ceiling of a 32-bit, 100 MHz ICAP. The published controller
  measured 381,052 cycles.
* Reply latency and packet parsing run at one word per platform clock.
* Defaults: `SRAM_AW = 20` (2^20 x 72-bit words, 9 MiB, an assumed part size),
  `SRAM_RD_LAT = 2`, `FIFO_C_AW = 9` (512 x 72), `FIFO_AB_AW = 9` (512 x 36).

## Own choices and departures

* All packet formats: type codes, the header word layout, pair placement in
  header words, and the acknowledge, reply and report words.
* The SRAM is a generic synchronous single-port part with fixed read latency.
  The board's real memory (QDR-type SRAM on NetFPGA-10G) and its controller are
  not modelled.
* FIFOs are generic dual-clock FIFOs in RTL, not vendor FIFO primitives. Their
  head word is read combinationally, which maps to distributed RAM or needs an
  output register for block RAM.
* The Virtex-5 ICAP expects the bits of each byte swapped. No swap is applied
  here; the client must send words in the order the ICAP wants them.
* The success test uses only CRC_ERROR and ID_ERROR.
* PRM initialisation is a level/acknowledge handshake (`prm_init` /
  `prm_init_done`). Tie `prm_init_done` high for a module that needs none.
* After a failed load the module stays in reset until a retry succeeds.
* A duplicate of the last segment that arrives after a successful load starts
  another load of the same bitstream.
* The bitstream always starts at SRAM address 0. A store with no word flagged
  last would make the loader wrap around; the handler always flags one.

## Not included

The Ethernet MAC and UDP/IP stack, the platform manager and control-plane
packet handler of that stack, the ICAP primitive, the SRAM device, the
reconfigurable module and the remote client software. Their connections are
ports of `reconfig_controller_top`. `tb/` has behavioural models of the SRAM
(`sram_model`) and the ICAP (`icap_model`), and a client model (`tb_rle_pkg`:
compression and packetising).

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
Example with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_reconfig_controller_top -y rtl -y tb +libext+.sv \
  rtl/rc_pkg.sv tb/tb_rle_pkg.sv tb/tb_reconfig_controller_top.sv -o sim
./obj_dir/sim
```

| Testbench | What it covers |
|---|---|
| `tb_reconfig_controller_top` | End to end at `SRAM_AW=14` with a 24 KB bitstream. Covers PRM forwarding, direct STAT readback, segment upload with a retransmission, a failing load (CRC error) with drops during DPR mode, a retry that succeeds, PRM initialisation, and the return to normal mode. Every ICAP write is compared; each mechanism must occur. |
| `tb_reconfig_controller_top_full` | Default parameters, a 1.52 MB bitstream, one complete reconfiguration. Checks the ICAP stream and that the load takes at most 17 cycles more than the word count. Runs in seconds. |
| `tb_compression_sweep` | Five 12,000-word bitstreams in a row through the top, from incompressible (ratio 0.99) to mostly zero (ratio 14.2). Each must load with the exact ICAP stream and within 17 cycles of its word count; all take words + 1. |
| `tb_icap_interface` | Decoding (run counts up to 127), timer = words+1, starved FIFO, CRC-error result, direct session with readback. |
| `tb_bitstream_packet_handler` | 176 segments, SRAM layout and run counts, acknowledges, truncated and repeated packets. |
| `tb_bitstream_loader`, `tb_sram_interface`, `tb_async_fifo`, `tb_packet_type_classifier`, `tb_direct_access_handler`, `tb_dpr_flow_controller` | Unit checks of each block against reference models. |
