# EAS time-analysis recorder

An extensive air shower (EAS) crosses a detector array as a thin, curved disk of
particles. To learn the shape and thickness of that disk, its angle of incidence, and
which particles run ahead of or lag behind the front, one needs to know *when* each
detector was hit, relative to the shower trigger, over a window that reaches both before
and after the trigger.

The usual approach starts a time counter with one detector and stops it with another.
This design instead records every detector **continuously** into a circular memory, one
bit per time cell, and simply stops recording a fixed time after the trigger. The memory
then holds the full time history of every detector around the trigger:

* a **fast memory**: 128 cells of 5 ns, i.e. the 640 ns around the trigger (±320 ns),
  resolving the moment of a hit to ±2.5 ns;
* a **slow memory**: 128 cells of 1 µs, i.e. ±64 µs around the trigger at ±0.5 µs.

A computer then reads every cell with a fixed number of pulses (64), starting from the
oldest cell, so the pulse number alone says how far before or after the trigger a cell
lies; no memory addresses need to be transferred.

The RTL models the reference set-up: four detectors, one control unit.

## Structure

```
                     +----------------------- eas_time_system -----------------------+
 fast_master  ------>|  eas_control_unit (one per crate)                             |
 main_master  ------>|   generator phase, C100 (1 MHz), control trigger CT,          |
 record_permit ----->|   C64 / C64S post-trigger counters, main-master window,       |
 rd_pulse     ------>|   keys K (fast) and KS (slow)                                 |
                     |     | fast_run  | slow_tick, slow_run  | rd_step   ^ frame_pos  |
                     |     v           v                      v           |            |
 hit[0..3]    ------>|  eas_memory_block x 4  (one per detector)                     |---> fast_data[i]
                     |    eas_fast_channel : PI, Rg1, Rg2, C4, AC, M1, M2            |---> slow_data[i]
                     |    eas_slow_channel : hit latch, AC, MS (two banks)           |---> locked, trig_phase
                     +---------------------------------------------------------------+
```

Every memory block gets the same keyed pulses, so all channels record and stop together
and are read in step by the same read pulses.

## The fast memory: a 5 ns ring from 100 MHz parts

This is the heart of the design and the part that needs the most care to understand
(`rtl/eas_fast_channel.sv`).

A 5 ns cell means 200 million samples per second. The memory parts cannot be written
that fast, so the rate is split twice:

1. **Two phases.** The 100 MHz generator pulses are split by the phase inverter (PI)
   into two trains half a period apart. Shift register Rg1 takes a sample on one, Rg2 on
   the other. Together they sample every 5 ns; each alone runs at 100 MHz.
2. **Four samples per write.** Each shift register is 4 bits long. The counter C4 counts
   the Rg2 shifts; after every fourth one both registers are full, and one write pulse
   (25 MHz) stores Rg1 into RAM M1 and Rg2 into RAM M2 at the same address, taken from
   the address counter AC, which then advances.

So 8 successive samples, a **frame**, end up in one 4-bit word of M1 (the even samples)
and the same word of M2 (the odd samples). With 16 words per RAM (64 bits, as in the
original RAM chips) the ring is 16 frames = 128 cells = 640 ns long. AC wraps around, so
recording never stops by itself: the RAMs always hold the last 16 complete frames.

Bit order: the sample taken first sits in the MSB of a word. Sample slot `s` (0..7) of a
frame is in M1 bit `3 - s/2` if `s` is even, in M2 bit `3 - s/2` if odd.

**Write timing.** The write pulse is registered: it comes one clock after the eighth
sample of the frame. It therefore writes the complete registers even if the key closes
right on that last sample; the RAM takes the old register value while Rg1 may already
be shifting in the first sample of the next frame.

**Partial frames.** When the key closes in the middle of a frame, the samples taken so
far stay in Rg1/Rg2 and are *not* in the RAMs. They are not lost: the phase and C4 stand
still while the key is closed, and when recording resumes the frame is completed and
written. For the held event it means that the last 0 to 7 samples are not read out; the
`trig_phase` output (below) tells exactly how many.

**Reading.** The computer's read pulses go to the same address counter. A 2-bit bit
counter sits below AC: each pulse moves to the next bit of the word, and every fourth
pulse advances AC. Each pulse position shows one bit of M1 and the bit of M2 next to it,
i.e. two successive samples, M1 first. Because AC stops on the word that would be
overwritten next, the first position is the oldest frame; 64 pulses read all 128 cells
in time order and leave AC exactly where it was.

## The slow memory

`rtl/eas_slow_channel.sv` records one bit per microsecond without shift registers. A
detector pulse is far shorter than 1 µs, so a hit latch remembers any hit since the last
1 MHz pulse; each 1 MHz pulse (from the control unit, through key KS) writes the latch
into the cell at the address counter, clears it, and advances the counter. While KS is
closed the latch is held clear.

The 128 cells are kept in two one-bit RAM banks, even and odd cells, in the same way the
fast memory pairs M1 and M2, so the same 64 read pulses read two cells each, oldest
first. Because the slow memory may stop on an odd cell, the pair at a read position can
straddle two words; the read address of the even bank is corrected for that.

## Control: trigger, hold and resume

`rtl/eas_control_unit.sv` holds the control trigger CT with three states:

| state  | keys K, KS | leaves on |
|--------|-----------|-----------|
| RECORD ("start") | open: every clock is a fast sample, every 1 MHz pulse a slow cell | fast master |
| POST   | K open while C64 runs (64 more fast cells = 320 ns); KS open while C64S runs (64 more slow cells = 64 µs) | window expired without main master → RECORD; main master seen and both counters done → HOLD |
| HOLD ("stop") | closed; read pulses passed to the memories | record permit from the computer → RECORD |

The fast master (the shower trigger) loads C64, C64S and a window timer of
`MAIN_WINDOW` clocks (400 = 2 µs by default). A main master inside the window marks the
event as wanted; CT then stays in POST until the slow memory has finished its 64 µs and
goes to HOLD. Without a main master in the window, the counters are dropped and both
memories resume recording at the end of the window. A main master after the window, or
without a fast master, does nothing; so does a fast master during POST or HOLD.

Exact timing, with the fast master sampled at clock edge *t*: the sample of edge *t*
is recorded, `fast_run` stays high for edges *t*+1 … *t*+64 and is low from *t*+65.
`locked` rises the clock after both counters are done; `rd_step = rd_pulse & locked`.
The 1 MHz pulse is one clock wide, every 200 clocks (C100 divides the 100 MHz generator
pulses by 100).

## Reading an event and timing its cells

When `locked` is high, give 64 pulses on `rd_pulse`, one clock each, with at least one
clock between pulses. Before pulse *p* (0..63) the outputs show, for each channel *i*:

* `fast_data[i] = {cell 2p, cell 2p+1}` of the fast memory,
* `slow_data[i] = {cell 2p, cell 2p+1}` of the slow memory,

cell 0 being the oldest. Then pulse `record_permit` to resume recording.

Times relative to the master (defaults; `P` = 64 post-trigger cells):

* **fast cell c** was sampled `c − 63 − ((trig_phase + 1) mod 8)` samples (×5 ns) after
  the master sample. `trig_phase` is the slot of the master sample within its 8-sample
  frame; `(trig_phase + 1) mod 8` is the number of samples left unwritten in the shift
  registers at the stop. The window therefore runs from −63…−70 to +64…+57 samples.
* **slow cell c** closes with the (c − 63)-th 1 MHz pulse after the master: the master
  lies in cell 64, or in cell 63 if it coincided with a 1 MHz pulse.

Both are checked cell by cell in the end-to-end testbench.

## Clocking in this RTL

The original hardware runs a 100 MHz generator and clocks Rg1 and Rg2 on its two
half-periods. This RTL is single-clock and synchronous: `clk` runs at 200 MHz and each
clock is one half-period of the generator. The phase inverter becomes a toggle flip-flop
giving alternate-cycle enables to Rg1 and Rg2; the generator's 100 MHz pulse train for
C100 is a toggle in the control unit; the keys K and KS are clock enables, not gated
clocks. `hit` is the shaped detector pulse as a bit synchronous to `clk` (any pulse
lasting at least one clock is caught). Reset is asynchronous and active low; it clears all
counters and registers but not the RAM contents.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `eas_time_system` | `NCH` | 4 | detectors / memory blocks |
| | `FAST_WORDS` | 16 | words of M1 and M2; fast cells = 8 × `FAST_WORDS` |
| | `SLOW_CELLS` | 128 | slow cells |
| | `MAIN_WINDOW` | 400 | clocks after the fast master during which a main master holds the event |
| `eas_control_unit` | `POST_FAST`, `POST_SLOW` | 64, 64 | cells recorded after the master (the top sets them to half of each ring) |
| | `SLOW_DIV` | 100 | generator pulses per slow cell |
| `eas_fast_channel` | `RG_BITS` | 4 | shift-register length (write rate = 100 MHz / `RG_BITS`) |

The time window grows with the memory: `FAST_WORDS = 32` and `SLOW_CELLS = 256` give
±640 ns and ±128 µs with 128 read pulses (the readout always takes half as many pulses
as a ring has cells, so keep both rings the same length). `trig_phase` and `frame_pos`
are 3 bits, which assumes `RG_BITS = 4`.

Shared constants and the CT state type are in `rtl/eas_pkg.sv`.

## Where this design departs from the original system, and what it adds

* **Post-trigger count.** The original text gives both "64 pulses" for C64 and "another
  320 ns" of recording; 64 generator periods would be 640 ns. This design counts 64
  *cells* of 5 ns, which gives 320 ns and puts the trigger in the middle of the 128-cell
  ring, as the ±320 ns window requires.
* **Resume without a main master.** The original only says that recording starts again
  when no main master comes; the window length and the rule that a main master must fall
  inside it are this design's.
* **`trig_phase`.** Because the fast RAMs are written in whole frames, the exact time of
  a fast cell depends on where in its frame the master fell. The original hardware has
  the same property but does not mention it; this design latches the frame slot and
  brings it out, so every cell can be timed to the sample.
* **Readout organisation.** "64 address pulses" for 128 cells in two RAMs is read as two
  cells per pulse, bit-serial within each RAM word, and the slow memory is split into two
  banks so it reads the same way. The original gives the pulse count but not this detail.
* **Slow hit latch.** How the slow memory catches a short pulse is not described; a
  latch per cell is used.
* **Single clock** instead of two clock phases (see above).

Not part of the RTL: the photomultiplier, the amplifier-limiter next to it, the cable,
the peaker and shaper that turn the cable signal into a logic pulse (the `hit` input is
their output), the quartz generator itself, the signal splitters, and the computer (its
pulses are top-level ports).

## Verification

Each module has a self-checking testbench in `tb/` that compares it with an independent
reference model and prints `TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|-----------|----------------|
| `tb_eas_ram`, `tb_eas_shift_reg`, `tb_eas_addr_counter` | random operation against a model; wrap-around |
| `tb_eas_phase_inverter` | strict alternation of the two phases over the enabled cycles |
| `tb_eas_write_counter` | write pulse exactly one clock after every fourth Rg2 shift |
| `tb_eas_post_counter` | active for exactly 64 steps after a load, however spread; clear |
| `tb_eas_clock_divider` | 1 MHz pulse every 200 clocks; one per 100 enables |
| `tb_eas_fast_channel` | last 128 whole-frame samples read oldest first, at every stop position; second readout identical; resumption continues the stream; 100 writes per 800 samples |
| `tb_eas_slow_channel` | last 128 cells (hit OR per interval), even and odd stop positions |
| `tb_eas_memory_block` | both memories of one detector read by the same pulses |
| `tb_eas_control_unit` | 64 fast cells and 64 slow pulses after the master, hold, read gating, record permit, resumption at the end of the window, late main master ignored |
| `tb_eas_time_system` | end to end at the default sizes: four random detectors, six held events and two dropped ones, every readout compared cell by cell and every cell's time checked against the formulas above; counts that every mechanism (both ring wrap-arounds, both freezes, hold, resume, late main master, partial frame, readout, ignored read pulses, record permit) happened |
| `tb_eas_time_system_ext` | the same with the memories doubled (±640 ns, ±128 µs) |

To run one with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
    rtl/eas_pkg.sv tb/tb_eas_time_system.sv --top-module tb_eas_time_system -o sim
./obj_dir/sim
```

The end-to-end run at full size simulates about 240 000 clocks (1.2 ms) and finishes in
well under a second.

What is verified is behaviour in simulation against models written from the description
above; the design has not been run on hardware, and no timing closure at 200 MHz has been
attempted. The concurrent assertions in the two channels check that a RAM is never
written and read-stepped in the same clock.
