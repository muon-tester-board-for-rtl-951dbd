# MT'2004 muon tester: FPGA logic

The CMS endcap muon trigger has two custom backplanes. On one, up to nine
Trigger Motherboards (TMB) send 32-bit words at 80 MHz to a Muon Port Card
(MPC). On the other, up to twelve Sector Processors (SP) send 32-bit words at
80 MHz to a Muon Sorter (MS). The MPC and MS answer each word with "winner"
bits, which say whether they kept the candidates they were sent. To test an
MPC or MS without a crate full of real TMBs or SPs, the MT'2004 tester plugs
into a TMB or SP slot and plays back patterns that software has loaded. It
also records the winner bits that come back.

This repository is the SystemVerilog for the tester's FPGA, the part that
makes it work:

* **load:** software writes 32-bit backplane words over VME into FIFO_A (TMB
  format, 511 words) or FIFO_B (SP format, 511 words);
* **play:** a CCB command (`0x24` for FIFO_A, `0x2F` for FIFO_B) or a VME
  write starts a transmitter. It sends the FIFO out at 80 MHz, one word per
  frame and two frames per 40 MHz bunch crossing;
* **record:** from the same moment the winner lines are written into FIFO_C
  (1 bit from the MPC) or FIFO_D (2 bits from the MS), one entry per frame,
  until the FIFO is full;
* **read back:** software reads FIFO_C/FIFO_D, the FIFO flags, the CCB line
  status and an L1A counter over VME.

Two DCM phase shifts, set over VME, move the clock that samples the winner
bits and the clock of the output registers. This puts the sampling and
launch edges in the middle of the backplane's data eye.

## Block structure

```
 VME bus ──► mt_vme_slave ──► mt_regs ──┬── CSR0..CSR3, L1A counter read
                                        ├── FIFO_A/B load and read-back ─┐
                                        ├── start A/B, FIFO reset        │
                                        └── phase-shift writes ─► mt_dcm_ps x2 ─► DCM PS port
 CCB lines ─► mt_ccb_if ─► start A/B, L1A ─► mt_l1a_counter              │
                       └─► bx_start (bunch-crossing phase)               │
                                                                         ▼
   FIFO_A (mt_fifo 32x511) ─► mt_pattern_tx ─► tmb_data[31:0]  (to MPC)
   FIFO_C (mt_fifo  1x511) ◄─ mt_winner_capture ◄─ tmb_winner   (from MPC)
   FIFO_B (mt_fifo 32x511) ─► mt_pattern_tx ─► sp_data[31:0]   (to MS)
   FIFO_D (mt_fifo  2x511) ◄─ mt_winner_capture ◄─ sp_win[1:0]  (from MS)
 mt_front_panel: LOCK, DACK, FULA-D, EMPA-D, ST_TMB, ST_SP, CLKC, CLKV
```

| file | role |
|---|---|
| `rtl/mt_pkg.sv` | CCB codes, VME AM codes, register offsets, CSR structs, TMB and SP word formats |
| `rtl/mt2004_top.sv` | top level: wires everything above |
| `rtl/mt_fifo.sv` | first-word-fall-through FIFO with flags and clear (FIFO_A..D) |
| `rtl/mt_ccb_if.sv` | CCB line registers, command decoder, clock-domain crossing, bunch-crossing phase |
| `rtl/mt_l1a_counter.sv` | 16-bit L1A counter |
| `rtl/mt_vme_slave.sv` | A24/D16 VME slave with geographical addressing |
| `rtl/mt_regs.sv` | register map and command decoder |
| `rtl/mt_pattern_tx.sv` | FIFO-to-backplane transmitter |
| `rtl/mt_winner_capture.sv` | winner-bit latch and FIFO writer |
| `rtl/mt_dcm_ps.sv` | DCM fine phase-shift stepper |
| `rtl/mt_front_panel.sv`, `mt_one_shot.sv`, `mt_heartbeat.sv` | LED logic |

## Clocks and frame alignment

This is the part that is easiest to get wrong when changing the design.

The board clock is the 40.08 MHz CCB clock, one period per bunch crossing.
A DCM doubles it to 80 MHz. The top level takes four clocks from that DCM,
all of the same origin:

* `clk40`: the CCB clock. It is used only for the CCB input registers and the
  CLKC blinker.
* `clk80`: the core clock of all other logic. Its rising edges coincide
  with those of `clk40`.
* `clk80_out`: an 80 MHz copy whose phase software trims. It clocks the
  final output register of each transmitter.
* `clk80_win`: a second trimmed copy. It clocks the first register on each
  winner input.

Since `clk80` is exactly twice `clk40` and edge aligned, events cross from
the CCB domain by **toggles**. Each strobed command or L1A flips a flip-flop
on `clk40`. The `clk80` side registers the toggles and emits a one-cycle
pulse on every change, so L1As or commands in consecutive crossings are all
delivered. A free-running `clk40` toggle gives `bx_start`: it is high in the
`clk80` cycle whose closing edge begins a bunch crossing.

The TMB and SP formats are defined per frame: frame 1 and frame 2 of a
crossing carry different fields (see `tmb_frame1_t`/`tmb_frame2_t` and
`sp_frame1_t`/`sp_frame2_t` in `mt_pkg`). The transmitter therefore waits for
the right phase before it starts. It takes word 0 from the FIFO at the edge
in the middle of a crossing. The `clk80_out` register passes it on at the
next edge, so word 0 is on the pins during the first half of a crossing.
Words 2k and 2k+1 are then frames 1 and 2 of crossing k. Load the FIFO in
pairs (frame 1 word, then frame 2 word).

Timing from the start request to the first word on the pins:

* After a VME start write, the first word appears 3 or 4 `clk80` cycles after
  the write strobe.
* After a CCB command, add about two `clk40` periods for the CCB registers and
  the toggle crossing.

After the last word, the outputs return to 0. In the TMB format that means
"no valid pattern".

The winner capture uses the transmitter's launch pulse, delayed by three
cycles. FIFO entry k therefore holds the winner bits present in the cycle
when word k is on the output, with both phase shifts at zero. If the board
under test answers d frames later, its answer to word k is in entry k + d.
The MS winner format (line 0 = muon 1 in frame 1 and muon 3 in frame 2,
line 1 = muon 2 in frame 1 and 0 in frame 2) is stored as received, with
line 0 in bit 0.

## VME interface and register map

The board answers A24 data cycles (AM `39`, `3A`, `3D`, `3E`) whose
A[23:19] equals the slot number on `ga`. Slot 6 therefore sits at
`0x300000`. Only 16-bit word cycles are answered: both data strobes must be
low and LWORD* high. In this implementation the board also requires
A[18:5] = 0 and IACK* high. An offset/direction pair that is not in the
table below gets no DTACK*, and the master's bus timer ends the cycle.

| offset | access | function |
|---|---|---|
| 00 | R/W | CSR0, general-purpose register (also on the `csr0` port) |
| 02 | R | CSR1: CCB lines — 0 bcntres, 1 eventres, 7:2 cmd, 8 L1A, 9 BC0, 10 ready, 11 clken, 15:12 reserved 4..1 |
| 04 | R | CSR2: 3:0 full flags of FIFO D,C,B,A; 7:4 empty flags; 15:8 zero |
| 06 | R | CSR3: firmware date — 4:0 day, 8:5 month, 11:9 year − 2000 (default 17 Mar 2004, `0x0871`) |
| 08 / 0A | R/W | FIFO_A data[15:0] / data[31:16] |
| 0C / 0E | R/W | FIFO_B data[15:0] / data[31:16] |
| 10 | R | FIFO_C entry on data[0] |
| 12 | R | FIFO_D entry on data[1:0] |
| 14 | R | L1A counter |
| 16 / 18 | W | start transmission from FIFO_A / FIFO_B |
| 1A | W | phase shift of the winner input clock |
| 1C | W | empty all four FIFOs and clear the L1A counter |
| 1E | W | phase shift of the output data clock |

**32-bit words over a 16-bit bus.** Write the low half (offset 08) first and
then the high half (offset 0A). The high-half write pushes the whole word.
To read, offset 08 shows the low half of the oldest word without removing
it, and offset 0A returns the high half and removes the word. A read of an
empty FIFO returns 0. A write to a full FIFO is dropped.

**Phase shifts.** The value written is a two's-complement step count in
data[8:0] (−255..+255). `mt_dcm_ps` walks the DCM to it one step at a time:
PSEN with PSINCDEC, then it waits for PSDONE. It can be rewritten at any
time. With a DCM that answers in 5 cycles, one step takes 8 `clk80` cycles.

**Access timing.** AS*, DS0*, DS1* and WRITE* are synchronised by two
flip-flops. DTACK* goes low at the fifth `clk80` edge after the data strobes
fall (50-62 ns) and is released when both strobes are high again. `vme_d_oe` enables the
board's data transceivers during read acknowledges only.

## CCB

The lines are registered on `clk40`. A command counts in a crossing where
`ccb_cmd_strobe` is high. Only `0x24` (play FIFO_A to the MPC) and `0x2F`
(play FIFO_B to the MS) act; a start while a transmission is pending or
running is ignored. Each `ccb_l1a` crossing increments the L1A counter.
It is a 16-bit counter that wraps and is cleared by the reset command.

## Front panel

* FULA–FULD and EMPA–EMPD show the FIFO flags directly; LOCK shows the DCM
  lock input.
* DACK, ST_TMB and ST_SP are one-shots: an access or a launch lights them
  for `ONESHOT_CYCLES` (4,000,000 cycles, about 50 ms).
* CLKC and CLKV toggle every `CCB_HALF` cycles of the CCB clock and every
  `VME_HALF` cycles of the 16 MHz VME clock. With the defaults that is a
  ~10 Hz blink, and the LED freezes if its clock stops.

## Parameters

`mt2004_top` defaults are the board's own numbers:

| parameter | default | meaning |
|---|---|---|
| `FIFO_DEPTH` | 511 | depth of all four FIFOs |
| `FW_DAY`, `FW_MONTH`, `FW_YEAR` | 17, 3, 4 | CSR3 firmware date |
| `ONESHOT_CYCLES` | 4,000,000 | LED one-shot length in `clk80` cycles |
| `CCB_HALF`, `VME_HALF` | 2,004,000, 800,000 | blinker half periods |

The widths (32-bit pattern words, 1- and 2-bit winners, 16-bit VME data)
are fixed by the backplanes.

## Simulation

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. `tb/dcm_ps_model.sv` is a behavioural model
of a DCM's phase-shift port used by two of them. Build and run one with:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb rtl/mt_pkg.sv tb/tb_mt2004_top.sv --top-module tb_mt2004_top
./obj_dir/Vtb_mt2004_top
```

Replace `tb_mt2004_top` by any other `tb_*` name to run another testbench.

`tb_mt2004_top` runs the whole design at its default parameters through
its pins only. It contains:

* a VME master;
* an MPC model that answers 6 frames later;
* an MS model that answers 9 frames later, taking a muon when its rank
  (frame 2) is 64 or more;
* two DCM models.

It fills FIFO_A to all 511 words and checks the full flag and that an
overfill is dropped. It plays FIFO_A by CCB command, checks every word and
its frame position, and reads back and checks all 511 FIFO_C entries. It
fills FIFO_B to 511 words, plays it by VME command, and checks every word
on `sp_data` and all 511 FIFO_D entries. A short FIFO_B run is started by
CCB command. It also covers
a start on an empty FIFO, FIFO_A read-back, L1A counting (including
consecutive crossings), the reset command, both phase shifts, unanswered
accesses and CSR0–CSR3. It counts each of these mechanisms and fails if one
never happened. The run takes well under a second.

The block testbenches cover further cases:

* the FIFO under 20,000 random push/pop cycles;
* the CCB command latency and bunch-crossing phase;
* every VME refusal rule;
* the full register map;
* the transmitter at random start phases and with a start while busy;
* winner alignment and the clear;
* phase-shift walks, including retargeting during a walk;
* one-shot and blink timing.

## Choices made where the board description is silent

The board description gives the register map, widths, depths, command codes,
word formats, LED list and the existence of the phase-adjustable clocks. The
following are this implementation's own:

* the FIFO read scheme (first-word-fall-through), how FIFO words are split
  into 16-bit halves, and reading 0 from an empty FIFO;
* playing a FIFO until it is empty. Each transmission consumes the pattern,
  so reload it before the next run;
* starting on the bunch-crossing phase, and 0 on the outputs when idle;
* the winner capture window: it opens at the launch and closes when the FIFO
  is full. Issue the reset command before a new run if the FIFO is still
  full;
* the CCB-to-core crossing by toggles. Bit 0 of CSR1 is taken to be the
  bunch-counter reset line;
* the DCM phase-shift protocol and value format (Virtex-II variable phase
  shift);
* no DTACK* for offsets or directions outside the map, and full decoding of
  A[18:5];
* the one-shot length, LED polarity and active-high CCB lines.

CSR0 has no defined bits. Here it is a plain 16-bit register, brought out
as a port.

## Not in the RTL

These are outside the FPGA logic; the top level's ports are their FPGA-side
signals:

* the DCM itself;
* the GTLP drivers and receivers, and the transparent/clocked mode switches
  of the drivers;
* the VME transceivers;
* the LVDS clock receiver, the on-board oscillator and clock-source
  selection;
* the JTAG/EPROM configuration chain and its switches;
* fuses and power;
* the power and DONE LEDs.

Reset is a plain asynchronous active-low input. Release it synchronously to
`clk80` on the board.
