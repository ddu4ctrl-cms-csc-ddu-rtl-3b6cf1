# DDU central control FPGA (version 28), in SystemVerilog

The Detector-Dependent Unit (DDU) of the CMS cathode-strip-chamber readout gathers data for each
Level-1 Accept (L1A) trigger. The data arrives on up to 15 optical fibers, one per DMB (DAQ
motherboard). The DDU turns it into a single event in the CMS common data format.

This FPGA is the DDU's central controller. It:

- numbers triggers and bunch crossings;
- reads each live fiber's block out of an external input FIFO;
- wraps the blocks in a DDU header and a trailer that carries a word count and a CRC-16;
- sends the event to the S-Link/DCC output;
- sends a copy, through an external FIFO, to a Gigabit-Ethernet spy link.

It also reports the board's throttling state to the trigger system (FMM/TTS). It holds a small
JTAG register bank for control and monitoring, and drives the front-panel LEDs and a debug
header.

The code is written for simulation with plain Verilator and for synthesis. There are no vendor
primitives. The external parts are reached through ports of the top module `ddu_ctrl_top`:

- the input FIFOs and the input FPGAs that fill them;
- the dual-clock GbE FIFO;
- the gigabit transceiver;
- the S-Link card.

## Block map

```
 l1a ──► l1a_counter ─┐                                    ┌─► S-Link / DCC (slink_*)
 bxn_counter ◄─ bx_orbit_reg (JTAG)                        │
              └─► sync_fifo (L1A FIFO: {L1A#, BXN}) ──► readout_ctrl ──► GbE FIFO write (gfifo_w*)
 input FIFOs (fifo_data/empty/ren) ───────────────────────►  │  ▲ kill_register (JTAG)
                                                             │  └ special_word_check, ddu_crc16
                                      fmm_ctrl ◄─────────────┘
 GbE FIFO read (rclk) ──► gbe_tx (one_hot_sr, eth_crc32) ──► transceiver tx
 transceiver rx ──► gbe_rx (bus_match)
 jtag_decode ──► jtag_status_sr / kill_register / bx_orbit_reg ──► jtag_tdo
 iddr40 (40-bit DDR input) · fiber_led ×15 · led_debug_mux
```

`ddu_pkg` holds the shared constants:

- the FMM bit positions;
- the JTAG opcode enum;
- the 16-bit control-bit struct;
- the fixed DDU header/trailer words;
- the 8b/10b K/D characters;
- the orbit lengths.

## The event builder (`readout_ctrl`)

This is the heart of the design and the part to read first.

### Event layout

Each entry of the L1A FIFO holds `{L1A number[23:0], BXN[11:0]}`. For each entry the builder
writes one event of 64-bit words:

| word | contents |
|------|----------|
| H1   | `{4'h5, 4'h0, L1A[23:0], BXN[11:0], 4'h1, board_id[7:0], 8'h00}` |
| H2   | `0x8000_0001_8000_8000` |
| H3   | `{status[31:0], live-fiber mask[15:0], 12'h0, number of live fibers[3:0]}` |
| ...  | the DMB block of every live fiber, fiber 0 first, copied unchanged |
| T-1  | `{status[31:0], fibers that sent data[15:0], 12'h0, number of complete blocks[3:0]}` |
| T-2  | `0x8000_FFFF_8000_8000` |
| TR   | `{4'hA, 4'h0, word count[23:0], CRC-16[15:0], error summary[7:0], FMM[3:0], 4'h0}` |

The word count includes the six DDU words, so an event with no DMB data is 6 words long. For
CFEB data the count is `6 + 25·Nts·nCFEB + 4·nDMB`, where Nts is the number of time samples. The
CRC-16 uses the polynomial x¹⁶+x¹⁵+x²+1 (0x8005). It starts at 0xFFFF, takes one 64-bit word per
clock MSB first, and covers every word before TR.

`status[31:0]` is `{control bits[15:0], OR of the per-fiber error flags}`. The control bits, in
the order of the `ctrl_bits_t` struct, are:

- gold data;
- first-word mode;
- the voted special bits 12–15;
- header mode;
- word-count enable;
- end of event;
- almost full;
- DDU error;
- critical error;
- link status changed;
- FIFO full;
- L1A mismatch;
- WC/CRC mismatch.

### Per-fiber sequence

A fiber is *live* when its kill-mask bit is 1 and its link-OK input is high. For each live fiber
in turn, the builder does the following:

1. **Waits for data.** If the fiber's FIFO stays empty for `START_TMO` (128) cycles, the fiber
   gets a sticky start-timeout flag and is skipped. In calibration mode the limit is
   `CAL_START_TMO` (256).
2. **Checks the first word.** Its voted special code must be 9. The L1A number it carries is
   `{bits 43:32, bits 27:16}`, and must equal the DDU's. A failure sets the first-word-error or
   L1A-mismatch flag. The block is still copied.
3. **Copies words** while the FIFO is non-empty, until the word whose voted code is 0xE, which is
   the block's last word. If the FIFO stays empty inside a block for `END_TMO` (18945) cycles, the
   fiber gets an end timeout. That is a critical error, and the fiber is abandoned for this event.

**Special-bit vote.** Bits 15..12 of each of the four 16-bit lanes are four copies of the
special-word code. `special_word_check` votes each bit (set when 2 or more of the 4 copies are
set). It also flags words whose copies disagree, computed as ANY xor ALL.

**Output stop.** When the S-Link is not ready, the DCC is almost full, or the GbE FIFO is almost
full, no word moves and no new event starts. An assertion checks that no word is written while
stopped.

**Dump mode.** The builder ignores the L1A FIFO. It starts an event whenever a live FIFO holds
data, and numbers the event from its own counter, with BXN 0.

### Input FIFO handshake

The input FIFOs are first-word-fall-through: `fifo_data[i]` is valid while `fifo_empty[i]` is
low, and `fifo_ren[i]` consumes the word.

## Trigger and bunch-crossing numbering

- **`l1a_counter`** counts L1A pulses plus L1As requested over JTAG (opcode 33). The count is 24
  bits and can be read over JTAG.
- **FIFO entry.** With each trigger the top pushes the count *including* that trigger, so the
  first trigger is number 1.
- **`bxn_counter`** steps once per clock. It returns to 0 on the cycle after it reaches the limit
  held in `bx_orbit_reg`. The default limit is 923, the SPS orbit of 924 crossings. JTAG opcode 29
  loads a new limit (3563 for the LHC) and opcode 30 reads it back.
- **L1A FIFO.** `sync_fifo` is 16 deep and almost full at 14. A write while full is dropped and
  raises FMM BUSY.

## Gigabit-Ethernet framer (`gbe_tx`)

The framer runs on the transceiver clock `rclk`: 16 bits per cycle, with the upper byte first on
the wire. It reads `{end-of-event, word}` entries from the external GbE FIFO.

**Stream sequence:**

1. **Reset:** `{K28.5,D21.5}` / `{K28.5,D2.2}` sync words, alternating.
2. **Idle:** `{K28.5,D16.2}`.
3. **Header:** `/S/` (K27.7), six 0x55 bytes, then 0xD5.
4. **Destination:** four 0xFF bytes.
5. **Data:** each 64-bit word as 8 bytes, bits 7:0 first.
6. **Filler:** only if fewer than 56 data bytes were sent. A 2-byte count of the real data bytes,
   then 0xFF bytes up to 64 bytes.
7. **Packet number:** 2 bytes.
8. **CRC-32:** IEEE 802.3, over the destination bytes through the packet number, lowest byte
   first.
9. **Trailer:** `/T/ /R/` (K29.7, K23.7).

**When a packet ends:**

- after the word carrying end-of-event, so an event end always ends a packet;
- after 8960 data bytes;
- when the FIFO is empty at a word boundary.

The last case means a slow event is sent as several packets.

**Gap between packets.** At least two idle words separate packets. A new packet waits 1280 cycles
(20.48 µs at 62.5 MHz), unless the FIFO's programmable-almost-empty output `pae_n` is high, which
means more than about 1k words are waiting.

**Byte-pair sequencing.** A four-stage one-hot shift register (`one_hot_sr`) steps through the
byte pairs of a word. The FIFO is read on the last pair.

**Receive side.** `gbe_rx` only registers the receive-valid flag and data, and assembles four
16-bit words into a 64-bit word (`bus_match`). It does not strip the preamble or the CRC.

## JTAG register bank

`jtag_decode` turns the 6-bit user instruction into one select line per opcode (0–33).

**Toggled functions** fire once and are re-armed only by a NOOP (opcode 0):

- 1: soft reset;
- 31: calibration auto-L1A enable;
- 33: L1A.

After power-up reset a NOOP is needed before the first one.

**Status words.** One capture-and-shift register, `jtag_status_sr`, is shared by all the status
opcodes. It captures while the shift strobe is low, then shifts right: TDO is bit 0 and TDI goes
into the MSB. Each opcode selects its status word:

| opcode | status word |
|--------|-------------|
| 2  | L1A number |
| 3–5 | DDU status (32, 16 and 16 bits) |
| 6  | first-word errors |
| 7  | fiber OK |
| 8, 9 | start and end timeouts |
| 10 | count of words whose special-bit copies disagree |
| 11 | L1A mismatch per fiber |
| 16 | fibers that sent a word with disagreeing special-bit copies (DMB errors) |
| 20, 21 | almost-full and full flags |
| 22–24 | control bits, FMM state, event count |
| 25 | FIFO empty |
| 27 | output-path status |
| 32 | board ID |

**Kill mask.** `kill_register` holds a 20-bit mask: bits 14:0 are the fibers, 16 is ALCT, 17 is
TMB, and 1 means alive. Opcode 14 loads it and 13 reads it. It is all ones after reset.

**Soft reset** clears the counters, the L1A FIFO, the event builder and the FMM state. It keeps
the kill mask and the BX limit.

## FMM / TTS state (`fmm_ctrl`)

The 4-bit state goes to the trigger throttling system:

| bit | meaning | raised by |
|-----|---------|-----------|
| 0 | BUSY | an L1A FIFO overflow; also held during reset |
| 1 | Warning | any almost-full flag: read controllers, L1A FIFO, GbE FIFO |
| 2 | Lost Sync | any full flag |
| 3 | Error | a critical event-builder error; stays set until reset |

The FMM state received from outside passes through two register stages to `tts_stat`.

## Other parts

- **`iddr40`** captures a 40-bit double-data-rate bus and presents `{rising half, falling half}`
  as 80 bits on the rising edge.
- **`fiber_led`** drives one pair of LEDs per fiber. The OK LED is on when the link is up,
  blinks when a signal is present but the link is not up, and is off when there is no signal. The
  data LED is on while the fiber has data.
- **`led_debug_mux`** drives the 8 LEDs and the 16-bit logic-analyser header according to the
  mode switches:
  - mode 10 shows the L1A FIFO signals;
  - mode 11 shows the kill mask, bit-reversed;
  - mode 15 shows the first-word and header signals;
  - the version switch shows firmware version 28.

## Clocks and reset

- **`clk`** runs everything except the Ethernet side, including the JTAG user-register strobes,
  which are taken as synchronous to it.
- **`rclk`** runs `gbe_tx` and `gbe_rx`. Their reset is `rst` passed through a two-flop
  synchroniser. The dual-clock GbE FIFO between the clock domains is external.
- **`rst`** is asynchronous. `gbe_tx` and `eth_crc32` use the synchronised reset synchronously.

## Simulation

Every module has a self-checking testbench in `tb/`, and `tb/ddu_tb_pkg.sv` holds the reference
models: bitwise CRC-16 and CRC-32, and a DMB block generator. Build and run one like this:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb rtl/ddu_pkg.sv tb/ddu_tb_pkg.sv \
          tb/tb_readout_ctrl.sv --top-module tb_readout_ctrl
./obj_dir/Vtb_readout_ctrl
```

Each testbench prints `TB_RESULT checks=N failures=M`.

**`tb_ddu_workloads`** runs the event sizes of the word-count rule (WC = 6 + 25·Nts·nCFEB +
4·nDMB) through the design at its default size: an empty event (6 words), one DMB with one or two
CFEBs (210, 410), two DMBs with one or two CFEBs each (414, 814), 3, 4, 7, 8, 11, 12 and 15 DMBs
with one CFEB each (618 to 3066 words), all with 8 samples, and the largest event, 15 DMBs with
5 CFEBs and 16 samples (30066 words). Each must come out with the right word count and CRC and
unchanged on both outputs. Events above 8960 bytes are split into several Ethernet packets: the
largest leaves as 26 packets of 8960 bytes and one of 7568.

**`tb_ddu_ctrl_top`** runs the whole design with 4 fibers, short timeouts, a 4-entry L1A FIFO and
64-byte packets. It rebuilds every expected event, compares it with the S-Link output, and
requires the Ethernet data to equal the S-Link stream. It also requires each of these to happen at
least once:

- S-Link stalls;
- start and end timeouts;
- L1A mismatch;
- a word whose special-bit copies disagree (its count and the DMB error flags are read back over
  JTAG);
- a fiber killed over JTAG;
- dump mode;
- a JTAG L1A;
- L1A FIFO full and overflow (FMM Lost Sync, Warning and BUSY);
- FMM Error;
- BX wrap at a JTAG-loaded limit;
- soft reset;
- calibration toggle;
- packet split at the byte limit;
- packet filler.

**`tb_ddu_ctrl_top_full`** runs the top at its default size (15 fibers, 8960-byte packets) for
one event. Two fibers are silent and two are dead, and the test checks the start-timeout latency
and the orbit length of 924.

## Where this design departs from, or goes beyond, its source

The source is a schematic-level firmware description. These points are this design's own reading:

- **Fields without defined contents.** The DDU status fields (SSSS.SSSS), the fiber masks
  (ZZZZ), the trailer error summary, and the source-ID field (board ID low byte after a fixed 1)
  are given only as letters in the format description. Their contents here are chosen.
- **DMB block boundaries.** The first word is recognised by special code 9 and the last by code
  0xE, and the L1A number is taken from the low 12 bits of the second and third lanes. This is
  inferred, not stated.
- **CRC-16 details.** The initial value and the bit order are not given.
- **Ethernet framing details.** These are not given:
  - the sync, start and end K characters;
  - the preamble bytes;
  - the byte order inside a 64-bit word.
- **Ethernet filler threshold.** The source states 56 bytes in one place and 48 in another. This
  design pads when fewer than 56 data bytes were sent, to a 64-byte payload.
- **Idles after large packets.** The extra idles the source mentions after 8960-byte packets are
  covered only by the 1280-cycle wait.
- **Status opcodes.** The source names several opcodes only by a title. The assignment of status
  words to them is this design's.
- **FMM causes.** Which conditions raise which FMM bit is chosen here. The bit meanings and the
  reset state (BUSY) follow the source.
- **Single control clock.** One clock runs the control logic. The original uses several board
  clocks, and the JTAG strobes come from the JTAG clock.

## Not built

- **CFEB CRC-15 check.** Its polynomial is not given.
- **ALCT/TMB trigger CRC-22 check.** Only 4 of its 22 equations are given.
- **Ethernet receive framing.** Preamble and CRC removal are left unfinished in the source.
- **External parts.** The input FIFOs and input FPGAs, the GbE FIFO, the gigabit transceiver and
  the S-Link card are outside this FPGA. They appear as ports, and the testbenches model them.
- **Schematic glue gates.** Their function is folded into the blocks above.
- **Status opcodes 12, 15, 17, 18, 19, 26 and 28.** Transmit errors, the end-active timeout, TMB
  and ALCT errors, lost events and data, and stuck data are named in the source without saying how
  they are detected. These opcodes select no status word.
