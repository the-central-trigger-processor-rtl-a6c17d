# CTP_MON — bunch-by-bunch monitor for the ATLAS Central Trigger Processor

The LHC fills a turn of the machine with up to 3564 bunch positions, 25 ns apart.
The Central Trigger Processor receives 160 trigger bits at every bunch crossing.
This module counts, for every one of those bits and every bunch position, how
often the bit was set. That gives one histogram per trigger input over the 3564
positions of the turn. From these histograms a physicist can see trigger rates
per bunch, find misbehaving bunches and estimate per-bunch luminosity.

The counting runs at the full 40 MHz bunch-clock rate with no dead time. The
histograms can be read out over VMEbus while counting goes on.

The RTL is written in SystemVerilog (IEEE 1800-2017) and targets synthesis. It is
split into the same parts as the hardware module:

- an input-decoding FPGA;
- four Core Processing FPGAs, each taking 40 of the 160 channels;
- a Control FPGA with the registers and the VME interface;
- four external 131,072 × 40 FIFO chips.

The FIFO chips are commercial parts, so they are not part of the RTL. The top
module `ctp_mon_top` brings out their ports.

```
 PIT[159:0] ──► input_decoding ──► PTC[159:0] ──┬─► core_processing #0 (ch   0..39) ──► ext FIFO 0 ─┐
 (trigger bits)  route + 4-bit LUTs  4 BC later  ├─► core_processing #1 (ch  40..79) ──► ext FIFO 1 ─┤
                                                 ├─► core_processing #2 (ch  80..119) ─► ext FIFO 2 ─┤
                                                 └─► core_processing #3 (ch 120..159) ─► ext FIFO 3 ─┤
 ORBIT ─► every core's BCID generator, and control's                                                │
 VMEbus ◄──────────────── control (ctrl_regs, vmedec, bcid_gen, integration_ctrl) ◄─────────────────┘
```

Everything runs on the one bunch clock, `clk` (BCK, 40 MHz). `rst_n` is a
synchronous power-up reset.

## Input decoding (`input_decoding`)

The trigger bits carry multiplicities or energy thresholds. Before they are
counted they are regrouped and decoded. The decoder has two parts:

- **Routing.** A full crossbar lets any PIT bit feed any LUT input. The `ROUTE`
  parameter gives, for each of the 160 LUT inputs, the index of the PIT bit it
  takes. An index of 160 or more means a constant 0.
- **Look-up tables.** Forty ROMs follow the crossbar. Each has 4 inputs and 4
  outputs (16 × 4 bits) and comes from the `LUT` parameter. A group of 2 or 3 bits
  uses one ROM, with the unused inputs routed to 0.

A typical table turns a 3-bit multiplicity count into thermometer flags such as
"=1, =2, >2" or "=1, >1, >2". The testbench loads both of those tables.

There are two register layers before the ROMs and two after them, so the latency
is exactly 4 bunch clocks. By default the routing is the identity and the tables
pass the bits straight through.

## The histogramming loop (`hist_cell`, `pipe_incrementer`, `dp_ram`)

Each channel keeps one word per bunch position in a dual-port memory. A word is
31 bits: a 30-bit counter `P` plus a sticky overflow bit. The loop works like this:

- Every bunch clock, the word of the current bunch is read on one port.
- A three-input multiplexer picks the increment. It is the PTC bit in normal use,
  or constant 0 or constant 1 for tests and calibration.
- The word passes a 4-stage pipelined incrementer: segments of 8, 8, 8 and 6 bits,
  with the carry registered between them.
- The result is written back through the other port, 5 cycles after the read.

Reading and writing use different addresses in the same cycle. So every bunch of
every turn is counted, with no dead time. The word of a bunch comes round again
only one turn later, so it has always been written back by then. This needs turns
of at least 6 bunches (`bcid_max` ≥ 5).

When `P` wraps, the overflow bit is set and stays set until the memory is cleared.
A clear writes zero instead of the sum, for one whole turn.

A counter gains at most 1 per turn. So 30 bits last for 2^30 turns of 89.1 µs,
about 26.6 hours of continuous counting.

**Almost overflow (`almost_overflow`).** Every value written back is checked by
comparing its top 4 bits, `P[29:26]`, with a 4-bit threshold `TH` (is `P[29:26] > TH`?).

- The 40 comparator results are registered, which costs one cycle.
- They are then ORed into a sticky flag per core.
- The Control FPGA ORs the four flags. If interrupts are enabled, this raises a
  VME interrupt.
- The flag stays set until a "clear AO" command.

## Turns, offsets and the integration window

Each core has its own 12-bit BCID counter (`bcid_gen`), and so does the Control
FPGA. The counter wraps at the `BCID_MAX` register value, normally 3563.

ORBIT arrives once per turn. In the cycle after ORBIT, the counter is loaded with
`(bcid_max + 1 − offset) mod (bcid_max + 1)`. So BCID 0 comes `offset` cycles after
the cycle that follows ORBIT. The core offset (default 4) covers the 4-cycle input
decoding latency. With it, the PTC bit a core receives belongs to the bunch its
BCID names.

Counting happens only inside an **integration window**, and always in whole turns:

- **NORMAL mode.** A start command opens the window at the next BCID 0. A stop
  command closes it at the next BCID 0 after the stop.
- **WINDOW mode.** A start opens the window for `NUM_TURNS` turns (1 to 2^30 − 1).
  A stop ends it early.

The window is generated in the Control FPGA (`integration_ctrl`), which also counts
the turns. The Control BCID and the core BCIDs may differ by their offsets. So each
core samples the window level, and the clear-memory command, at its **own** BCID 0
and holds it for that turn. A core therefore never integrates or clears part of a
turn, whatever the offsets. Outside the window the multiplexer selects 0.

## Readout: headers, the read-stream tap and the FIFOs

A readout copies every histogram to the VME master. Per channel it sends three
header words and then one P word per bunch. All words are 32 bits:

| word      | bits 31..29 | contents                                                             |
|-----------|-------------|----------------------------------------------------------------------|
| Header 1  | `100`       | [28:21] 0, [20:13] PIT code (channel number 0..159), [12] 0, [11:0] BCID of the first P word |
| Header 2  | `101`       | [28:16] 0, [15:0] turn count, low half                              |
| Header 3  | `110`       | [28:16] 0, [15:0] turn count, high half                             |
| P word    | `0`, ov     | [31] 0, [30] overflow, [29:0] P                                     |

Each core sends 40 × (3 + 3564) = 142,680 words.

**Reading without stopping the counting.** `readout_ctrl` has no memory port of
its own. Each memory is already read once per cycle for the increment, so
`readout_ctrl` taps those reads: a `{ov, P}` word per channel, for the current
bunch. For each channel it does the following:

1. Write the three headers. The turn count is latched at readout start.
2. Take the next `bcid_max + 1` words of that channel from the stream, as the
   bunches pass.

So one channel takes `bcid_max + 4` cycles. A channel's first P word is whatever
bunch the turn has reached, and Header 1 records that bunch. The reader must
rotate each channel's P words by that BCID.

If the readout runs during integration, each word is the value before that bunch's
update in the current turn. The channel is selected by a 31-bit 40:1 multiplexer
of three registered stages (5:1, 4:1, 2:1). The headers travel through the same
pipeline, so the word order is kept. A word selected in cycle t is written in
cycle t + 3.

**Two FIFOs per core.** The words go first into a 12,288 × 32 FIFO inside the core
(`sync_fifo`). `idt_wr_ctrl` then moves them into the external 131,072-word FIFO.

- **"state = 1".** While the external FIFO has room, one word moves per bunch clock
  (40 MHz). The whole readout of a core (142,680 words in about 40 × 3568 cycles)
  runs at that speed.
- **"handshake".** Once the external FIFO is almost full, the small FIFO keeps the
  remaining 11,608 words. They trickle out as VME block transfers make room.

The external FIFO's flags arrive up to four words late. So near full the write
machine pops only when its last two cycles popped nothing and the full flag is
clear. That way no word is written into a full FIFO. It requires the external
FIFO's programmable almost-full offset to be at least 4.

The two FIFOs hold 143,360 words, more than the 142,680 a core produces. A complete
readout therefore never loses a word, even if VME reads nothing until it ends.

## Control FPGA: registers, VME and interrupts

`ctrl_regs` holds 20 32-bit registers. They are reached with single D32 cycles at
byte offset `4 × index` in the register window.

| idx | name         | access | contents |
|-----|--------------|--------|----------|
| 0   | GLOBAL_RESET | W      | bit0: reset the cores and the integration controller (registers keep their values) |
| 1   | GEN_CTRL     | RW     | bit0: mode, 0 NORMAL / 1 WINDOW |
| 2   | COMMAND      | W      | bit0 start, bit1 stop, bit2 clear memory (one turn), bit3 clear almost-overflow flags |
| 3   | START_RO     | W      | bit0: start the readout in all cores |
| 4   | INPUT_SEL    | RW     | [1:0]: 0 PTC, 1 constant 0, 2 constant 1 |
| 5   | BC_OFS_CORE  | RW     | [11:0]: core BCID offset (power-up 4) |
| 6   | BC_OFS_CTRL  | RW     | [11:0]: control BCID offset (power-up 0) |
| 7   | BCID_MAX     | RW     | [11:0]: last BCID of a turn (power-up 3563) |
| 8   | AO_TH        | RW     | [3:0]: almost-overflow threshold (power-up 14) |
| 9   | NUM_TURNS    | RW     | [29:0]: turns in WINDOW mode (power-up 1) |
| 10  | IRQ_CFG      | RW     | [2:0] level (power-up 1), [15:8] vector, [16] enable (power-up 0) |
| 11  | RO_STATUS    | R      | per core: [3:0] busy, [7:4] done, [11:8] small-FIFO overflow |
| 12  | FIFO_STATUS  | R      | per core: external FIFO [3:0] empty, [7:4] full, [11:8] almost full; small FIFO [15:12] empty, [19:16] full |
| 13  | TURN_COUNT   | R      | turns integrated |
| 14  | INTEG_STATUS | R      | bit0 integrating, bit1 start armed, bit2 done |
| 15  | POWER_GOOD   | R      | [2:0]: 1.5 V, 1.8 V, 2.5 V supplies good |
| 16  | BCID         | R      | control BCID |
| 17  | AO_STATUS    | R      | [3:0] almost-overflow flag per core, bit4 interrupt pending |
| 18  | SCRATCH      | RW     | free |
| 19  | MODULE_ID    | R      | 0xC7B00001 |

**VME (`vmedec`).** The module is an A32/D32/BLT slave with an interrupter. The
base address sits in A[31:24], set by the `VME_BASE` parameter (default 0x10).

- A[23:20] = 0 selects the registers, by index A[6:2], with AM 0x09 or 0x0D.
- A[23:20] = 1 selects external FIFO A[17:16]. It is read by block transfer (AM
  0x0B or 0x0F), one word per data strobe. An empty FIFO reads as 0.
- Only D32 transfers are answered.

The strobes pass two-flop synchronisers. DTACK* falls 4–6 bunch clocks after the
data strobes, or 6–8 for a FIFO word.

Interrupts work as follows:

- A rising almost-overflow request makes an interrupt pending on `IRQ*[level]`.
- An acknowledge cycle at that level returns the vector from IRQ_CFG and releases
  the request (release on acknowledge).
- Any other acknowledge is passed on down IACKOUT*.

**A typical run:**

1. Write COMMAND.clear_memory and wait one turn.
2. Write COMMAND.clear_AO.
3. Set the mode and NUM_TURNS, then write COMMAND.start.
4. Wait for INTEG_STATUS.done.
5. Write START_RO.
6. Block-read the four FIFOs until RO_STATUS shows every core done and the FIFOs
   are empty.

## Where this design departs from, or adds to, the original module

- The original decoding tables are not known. The ROM contents and routing are
  parameters and default to a straight pass-through.
- Several things are this design's own choices:
  - the register indices, bit fields, power-up values and MODULE_ID;
  - the VME address map and AM codes;
  - the release-on-acknowledge interrupt.

  The original module names only some of its registers (global reset, mode, start
  readout, input selection, BC offset, threshold, number of turns; readout, FIFO,
  turn-count and power-good status). The rest were added here.
- The original module plans geographical addressing as an option. It is not built
  here: the base address is a parameter.
- The readout reads the histograms through the increment loop's read port. It
  starts each channel at whatever bunch the turn has reached. The original module
  states only what the headers contain, not how the memory is reached.
- The counter word has a sticky overflow bit and wraps rather than saturating. The
  comparison for almost overflow is "greater than".
- The VME slave is synchronous to the 40 MHz bunch clock. A block-transfer beat
  takes at least about 9 clocks (≈ 225 ns). So the full 2.28 MB (570,720 words)
  needs roughly 130 ms, not the ≈ 72 ms the original module achieves.
- Not part of the RTL:
  - the external FIFO chips (a behavioural model is in `tb/idt_fifo_model.sv`);
  - the analog supply monitors and their LEDs (only their power-good bits enter);
  - the JTAG / test-bus-controller programming path;
  - the clock distribution.
- Per core, the design stores 40 × 3564 × 31 bits of counters and 12,288 × 32 bits
  of FIFO. That is about 4.8 Mbit, which fits a large FPGA of the kind the original
  module uses (about 7.4 Mbit of block RAM).

## Verification

Every block has a self-checking testbench in `tb/`. Each compares the block's
outputs with an independent model and finishes with a line
`TB_RESULT checks=<n> failures=<n>`. Each also has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_input_decoding` | scrambled routing, the two multiplicity decodings and other tables, random inputs; 4-cycle latency |
| `tb_bcid_gen` | wrap, ORBIT reload for many offsets and `bcid_max` values |
| `tb_hist_cell` | read-modify-write against a model memory, all three selections, clear, overflow wrap |
| `tb_almost_overflow` | threshold compare, one-cycle latency, stickiness, clear |
| `tb_readout_ctrl` | word order, headers, BCID rotation, 3-cycle multiplexer latency |
| `tb_sync_fifo` | random traffic against a queue model, full/empty, overflow |
| `tb_idt_wr_ctrl` | 40 MHz streaming, throttling near full, no write into a full FIFO |
| `tb_core_processing` | window raised mid-turn integrates only whole turns; PTC pattern 0xAA…/0x55… gives 4/0; constant-1 input; readout while integrating gives a consistent snapshot; almost overflow |
| `tb_integration_ctrl` | NORMAL and WINDOW modes, turn alignment and turn count |
| `tb_ctrl_regs`, `tb_vmedec`, `tb_control` | register access, VME cycles, BLT, IACK and daisy chain, command pulses, global reset |
| `tb_ctp_mon_top` | end to end over VME, with 8-bunch turns and 256-word external FIFOs |
| `tb_ctp_mon_full` | the clear, 5-turn window and complete readout at full size: 3564 bunches, 131,072-word external FIFOs, no parameter overrides |

The end-to-end test (`tb_ctp_mon_top`) drives the design only through its VME port, ORBIT and PIT. It
runs these steps:

1. Clear the memories.
2. Integrate a 5-turn WINDOW with the PTC pattern alternating between
   0xAAAAAAAAAA and 0x5555555555 from bunch to bunch.
3. Read every word back by block transfer and check it: 5 and 0 alternately, plus
   the headers.
4. Run a NORMAL-mode window with the constant-1 input.
5. Provoke an almost overflow, take the interrupt and acknowledge it.
6. Do a global reset.

It counts each mechanism and fails if one never happened:

- the modes and the clear;
- the readouts;
- the external FIFO filling up;
- the small FIFO holding words (handshake phase);
- write throttling;
- the interrupt and its acknowledge;
- the global reset.

The full-size run takes about 6 million bunch clocks (about half a minute of
simulation).

To run a testbench with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ctp_mon_pkg.sv \
    $(ls rtl/*.sv | grep -v ctp_mon_pkg) \
    tb/idt_fifo_model.sv tb/vme_master.sv tb/ctp_mon_harness.sv tb/tb_ctp_mon_top.sv \
    --top-module tb_ctp_mon_top -Mdir obj_top
obj_top/Vtb_ctp_mon_top +verilator+rand+reset+2
```

For another testbench, substitute its name. The helper files are only needed by
the testbenches that use them. The simulator has two states, so every register
that is read is reset explicitly. Memories start random and are cleared by the
clear command, as on the real module.
