# Capture Block: event building for the HGCAL back-end DAQ

The CMS High-Granularity Calorimeter reads out its front-end through ECON-D
concentrator ASICs. Each ECON-D sends a packet per triggered event (Level-1
Accept, L1A) over one or more 32-bit e-links, and one fibre pair carries
up to 14 e-links with up to 12 ECON-Ds spread over them in any arrangement.
The back-end must turn these independent per-ECON-D packet streams into
events: for each L1A, one record that holds the packet of every ECON-D on
the fibre pair. It must also say which packets were missing, late or
inconsistent.

The **Capture Block** is the unit that does this for one fibre pair. The same
gateware has to serve every front-end region. For that reason everything that
depends on the region can be changed by software registers:

- which e-link belongs to which ECON-D;
- which ECON-Ds are in use;
- how the shared packet memory is split between them.

This repository holds synthesizable SystemVerilog for the Capture Block and
for a small system around it: two Capture Blocks, each behind an e-link
serialiser, merged by a readout controller. Each unit has its own
self-checking testbench, and a full-system testbench runs the whole chain at
a trigger rate of about 970 kHz.

## Data flow

```
14 e-links x 32 bit @ 40 MHz
   │ elink_serialiser         7 pair words of 64 bit per bunch crossing, 320 MHz
   ▼
elink_tagger                  ECON-D id + valid per 32-bit half (config registers)
   │ (broadcast)
   ├─► word_assembler[k]      keep words of ECON-D k, pack to low end (0-2 words/cycle)
   │      ▼
   │   packet_assembler[k]    idle/header detection, CRC-8, padding, space reservation
   │      ▼ staging FIFO
   └─► main_buffer            one shared memory, one circular region per ECON-D,
                              round-robin single write port
                                   ▼
fast commands ─► timestamp_counters ─► L1A FIFO ─► event_builder
                                                        ▼
                                         event_buffer + size FIFO ─► readout_controller
```

All logic runs on one 320 MHz clock. A strobe `bx_strobe`, one cycle long
and sent every 8 cycles, marks each 40 MHz bunch crossing (BX). The fast
commands (`l1a`, `bc0`, `ocr`, `ecr`) are sampled on that strobe.

## Packet detection (`packet_assembler`)

This is the part of the design with the most subtle behaviour. Each ECON-D
stream is scanned one 32-bit word at a time. Up to two words are handled per
cycle, by applying the same step function twice in one combinational pass.

| state   | on each word |
|---------|--------------|
| SEARCH  | An idle word (bits 31:8 equal to the idle pattern) arms detection. A word whose bits 31:23 equal the header marker is taken as header word 0, but only if the word just before it was an idle. Any other word is dropped. |
| HDR1    | This word is header word 1. The CRC-8 of the header (56 bits: all of w0 and w1[31:8]) is recomputed and compared with w1[7:0]. If they differ, the candidate is spurious and scanning resumes. If they match, the packet's size is checked against the free space of its main-buffer region. |
| PAYLOAD | Header and payload words go to the output. The payload length comes from w0[22:14], counted in 32-bit words. |
| DROP    | The payload of a packet that did not fit is dropped. |

Words that are kept are packed into 64-bit words, with the first word in the
low half. If a packet has an odd number of 32-bit words, a zero padding word
ends it, so every packet fills whole 64-bit words. This gives
`(len + 3) / 2` 64-bit words per packet.

One cycle can end a packet, add the padding word, and hold a word left over
from the cycle before. Up to two 64-bit words can therefore come out in one
cycle. They go into a 16-entry staging FIFO, which the main buffer drains.

**Overflow policy.** Space is reserved for the whole packet at the moment its
header is accepted. If the region lacks room, the packet is dropped whole and
the `overflow` line pulses. A packet is therefore never stored half-written.

## Shared main buffer (`main_buffer`)

The main buffer is one memory of `MEM_DEPTH` x 64 bits (UltraRAM on the target
FPGA). It is divided into 12 circular regions by the registers
`region_base[k]` and `region_size[k]`. Software can size each region to the
data rate of its ECON-D, and can give an unused ECON-D no memory at all.

- **Free space** is `free_words[k] = size - (reserved words not yet read)`.
- **Writing.** There is one write port. A round-robin arbiter serves the 12
  staging FIFOs. A fibre pair delivers at most 14 x 32 bits per 8 cycles,
  which is 0.875 64-bit words per cycle. Padding adds at most one word per
  packet. One write per cycle is therefore enough.
- **Packet count.** When a packet's last word is written, `pkt_count[k]` goes
  up by one.
- **Reading.** The event builder reads a region in order. Data comes back
  one cycle after `rd_en`. `pkt_done` retires one packet.

Regions must be set up while the block is held in reset. The hardware does
not check them for overlap.

## Event building (`event_builder`)

An event starts when three things are true: an L1A timestamp is waiting, at
least one enabled ECON-D has a packet stored, and the event buffer has room
for a header. The event builder then handles the enabled ECON-Ds in order,
from 0 to 11:

1. **Wait.** It waits up to `timeout` cycles for a packet from this ECON-D.
   If none arrives, the ECON-D is flagged *timeout*.
2. **Check the header.** It reads the packet's first 64-bit word, which is
   the ECON-D header. It compares three fields with the local L1A timestamp:
   - BX (12 bits);
   - event counter (6 low bits);
   - orbit (3 low bits).
3. **Match.** The packet is streamed into the event buffer at one word per
   cycle. Reads are pipelined, and the stream holds back when the event
   buffer is nearly full.
4. **Mismatch.** The ECON-D is flagged *mismatch*. The packet is read out of
   the main buffer and discarded.
5. **Overflow.** Overflow pulses from the packet assemblers set a sticky
   flag per ECON-D. That flag is reported, then cleared, in the next event
   that handles that ECON-D.

Finally the builder writes the two-word Capture Block header in front of the
packets, commits the event, and pops the L1A FIFO. The event buffer reserves
the header slot when the event starts, because the flags are only known at
the end. Nothing of an event is visible to the reader until it is committed.

An event in which no ECON-D sends any data does not start until some data
arrives. This follows the start condition described above, which requires
stored data. Keep every enabled ECON-D sending.

## Formats

**ECON-D header** (two 32-bit words, as the packet assembler and event builder
expect them; the constants live in `cb_pkg`):

| word | bits  | field |
|------|-------|-------|
| w0   | 31:23 | header marker (register, reset `0x154`) |
| w0   | 22:14 | payload length in 32-bit words, header words not counted |
| w1   | 31:20 | BX |
| w1   | 19:14 | event counter, 6 LSBs |
| w1   | 13:11 | orbit, 3 LSBs |
| w1   | 7:0   | CRC-8, polynomial 0xA7, initial value 0, MSB first, over w0 and w1[31:8] |

An idle word is any word whose bits 31:8 equal the idle pattern (register,
reset `0x555555`).

**Capture Block event** in the event buffer, in 64-bit words:

| word | content |
|------|---------|
| 0 | `{event counter[31:0], orbit counter[31:0]}` |
| 1 | `{BX[11:0], 4'hC, flags[11], …, flags[0]}`, each flag field being 4 bits `{overflow, timeout, mismatch, present}` |
| 2… | the padded packets of the present ECON-Ds, ECON-D 0 first; each starts with its ECON-D header word `{w1, w0}` |

The size FIFO receives one entry per event: its length in 64-bit words,
including the header. A reader pops a size, then reads that many words.

**Timestamps.** The BX counter restarts at 0 on `bc0`. If no `bc0` comes, it
wraps after 3564 crossings. The orbit counter advances at each BX restart,
and `ocr` clears it. The event counter advances on each `l1a`, so the first
event is number 1; `ecr` clears it. After reset the first strobe starts
orbit 1 at BX 0.

## Configuration registers (`config_regs`)

The register bus is plain: `we`, `addr`, `wdata`, and a combinational
`rdata`. An IPbus endpoint or similar would drive it.

| address | content |
|---------|---------|
| 0x00+i  | e-link i (i < 14): [4] enable, [3:0] ECON-D id |
| 0x10+k  | ECON-D k (k < 12): [0] enable |
| 0x20+k  | region base (64-bit words) |
| 0x30+k  | region size (64-bit words) |
| 0x40    | timeout, in 320 MHz cycles (reset 4096) |
| 0x41    | header marker [8:0] |
| 0x42    | idle pattern [23:0] |

## Top level (`backend_daq_top`)

`NUM_CB` Capture Blocks (default 2) share the fast commands, so their
timestamps stay equal. Each has its own `elink_data` input of 14 x 32 bits
per bunch crossing. `cfg_cb` selects the block that the register bus talks
to. The `readout_controller` takes whole events from the blocks in round-robin
order. It outputs a valid/ready 64-bit stream, marked by `out_sop` and
`out_eop`, with `out_src` naming the source block. The monitoring outputs are:

- the per-ECON-D pulses (CRC error, overflow, timeout, mismatch, accepted
  packet), ORed over the blocks;
- a per-block count of L1As lost to a full L1A FIFO.

## Parameters and sizes

| parameter | default | meaning |
|-----------|---------|---------|
| `N_ELINK`, `N_ECOND` (`cb_pkg`) | 14, 12 | e-links and ECON-Ds per fibre pair |
| `NUM_CB` | 2 | Capture Blocks in the top (the two-layer test system; a full board would need 54) |
| `MEM_DEPTH` | 4096 | main buffer, 64-bit words |
| `EB_DEPTH` | 4096 | event buffer, 64-bit words |
| `L1A_DEPTH`, `SIZE_DEPTH` | 32, 256 | L1A FIFO and size FIFO entries |
| `STAGE_DEPTH` | 16 | staging FIFO per packet assembler |
| `TIMEOUT_RST` | 4096 | reset value of the timeout register |

The channel counts (14 e-links, 12 ECON-Ds, a 64-bit bus at 320 MHz) and the
two-block system are taken from the system this design is built for. The
following are this implementation's own choices:

- all memory and FIFO depths;
- the ECON-D header bit layout and the CRC polynomial;
- the Capture Block header layout;
- the register map;
- the arbitration scheme;
- the overflow and mismatch policies.

Check them against the real ECON-D specification and your DAQ format before
use.

## Not included

- **SLink framing.** The readout controller merges events, but it does not
  wrap them in the SLink protocol. It also does not drive the 24 Gb/s output
  link.
- **External systems.** IPbus, the optical transceivers, lpGBT decoding,
  fast-command distribution and slow control are not part of this code.
- **The full board.** 54 Capture Blocks spread over 12 output links is not
  built. `NUM_CB` can be raised, but no rule for assigning blocks to outputs
  is implemented.

## Simulation

Every `rtl/` and `tb/` file holds one module or package of the same name.
Each testbench prints `TB_RESULT checks=N failures=M`. For example, with
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/cb_pkg.sv tb/tb_daq_pkg.sv tb/tb_backend_daq_top.sv \
    --top-module tb_backend_daq_top -o sim
./obj_dir/sim
```

`tb/tb_daq_pkg.sv` holds a behavioural model of the front-end. It builds
ECON-D packets with a reference CRC, written as polynomial long division,
which is independent of the RTL function. It also spreads each ECON-D's words
over its e-links.

| testbench | what it establishes |
|-----------|---------------------|
| `tb_backend_daq_top` | Every top-level parameter is at its default. Two blocks, three ECON-Ds each on two e-links apiece. Eight slow events plant one of each error (bad CRC, mismatch, timeout, overflow). Then 60 events per block run at about 220 kHz on average, followed by 400 events per block with random spacing of 3 to 79 bunch crossings (about 970 kHz on average), all under random output back-pressure. Every word is checked against a reference, no L1A may be lost, and each error mechanism must occur. Runs in about a second. |
| `tb_capture_block_full_load` | One block at its defaults in its largest configuration: 12 ECON-Ds on 14 e-links, 300 events at about 970 kHz, with the e-links about 70 % busy. The shared write port, the staging FIFOs and the event builder must keep up, with no L1A lost and no error flag raised. |
| `tb_capture_block` | One block. Five ECON-Ds on 2, 1, 4, 1 and 6 e-links, one of them always silent (timeout), and the same planted errors. Exact event contents and counts are checked. |
| `tb_packet_assembler` | Random packet lengths, 0–2 words per cycle, bad CRCs, headers not preceded by an idle, overflow drops, padding and `last` flags. |
| `tb_main_buffer` | Three sources write into adjacent regions at the same time. Checks data, packet counts, free space and round-robin fairness. |
| `tb_event_builder` | Models of the memory, L1A FIFO and event buffer. Random match, mismatch, timeout and overflow cases, with event-buffer hold-back. |
| the rest | Unit tests of the serialiser, tagger, word assembler, FIFOs, timestamp counters, event buffer, registers and readout controller. |

The testbenches rely on two-state simulation and initialise everything they
read.
