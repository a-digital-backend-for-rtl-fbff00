# Digital backend for a phase-switched continuum radiometer

This is the FPGA logic of a digital backend for a dual-beam, dual-polarisation
continuum radiometer of the kind built for the 1 cm and 3 mm receivers of a
large single-dish telescope. The receiver front end pairs its signals in magic
tees. Two 180-degree phase switches sit between the tees, so the two detected
outputs of every pair swap identities from one switch state to the next. Gain
drifts after the tees (detectors, amplifiers, ADCs) then act on both signals
alike, and they cancel when the swap is undone. This only works if the swap is
undone *after* digitisation. The backend does that:

* It runs the phase switches through a fixed 4-state cycle.
* It times the integrating ADCs so that each one integrates for exactly the
  same time in every state, and never while the switches settle.
* It undoes the swap on the serial ADC lines.
* It co-adds the samples into 32-bit sums.
* It hands complete frames to a host computer over an EPP parallel port.

The unit serves 16 signals: two feeds × two polarisations × four bands, i.e. 8
signal pairs. Each signal has its own 20-bit DDC101-style integrating ADC on a
separate A/D board.

```
            A/D board                                   FPGA (gbt_backend)
 +----------------------------+      +-----------------------------------------------------+
 | 16 x ADC  --serial data--->|----->| serial_rx --> ps_demod x8 --> shift_reg x16          |
 | 8 MHz osc --serial clock-->|----->|   (sync,        (swap            (20-bit words)      |
 | AND of ready lines ------->|----->|    20 bits)      a/b)                 |              |
 |   <---- acquire -----------|<-----| ps_fsm (oneshot x2)                integ_unit         |
 +----------------------------+      |   phase-switch cycle          (coadd_counter +       |
   front end <- ps_upper, ps_lower --|   blank/integrate/acquire      coadd_channel x16)    |
   front end <- cal_on, gain_sel ----|                                     | frame           |
   site 1PPS ----------------------->| pps_interrupter --> irq_mask    out_queue (64 bytes) |
                                     |                        |            |                 |
   host EPP port  <----------------->| epp_if <-> arg_lifo -> cmd_exec -> registers          |
 +-----------------------------------+-----------------------------------------------------+
```

## The phase-switch cycle

`ps_fsm` keeps a 2-bit state counter. The two switch controls follow this
sequence:

| state | upper arm | lower arm | master clock = `phase[0]` | outputs of a pair |
|------:|:---------:|:---------:|:-----:|:-----------------|
| 0 | 0°   | 180° | 0 | straight |
| 1 | 180° | 180° | 1 | crossed  |
| 2 | 180° | 0°   | 0 | straight |
| 3 | 0°   | 0°   | 1 | crossed  |

`ps_upper = phase[1] ^ phase[0]` and `ps_lower = ~phase[1]`. Each switch
changes state only every other step, half as often as the plain binary order
would need. The two outputs of a pair still swap every step, at the master
clock rate. When the two switches differ the pair is "straight"; when they are
equal it is "crossed". The demodulator select is therefore the master clock.

Each state is one pass of this loop:

1. When the ADC ready line shows the previous sample is acquired, step the
   state counter. This changes the switches.
2. Blank for `(blank_len + 1) × 0.1 µs` (an 8-bit one-shot, 0.1–25.6 µs).
   The next integration also waits until the readout of the previous sample
   has finished: reading a DDC101 while it integrates adds noise. The 20-bit
   readout at 8 MHz takes 2.5 µs, so a shorter blanking interval is
   stretched to that.
3. Integrate: `adc_acquire` is low for exactly `(integ_len + 1) µs` (an
   8-bit one-shot, 1–256 µs).
4. Raise `adc_acquire` and wait for ready.
5. On the ready edge, the serial readout of the sample starts. At the same
   moment the loop returns to step 1, so the readout overlaps the next
   blanking interval.

The interval from the switch change to the start of integration is the
blanking time plus one system clock (25 ns). A state lasts blanking +
integration + the ADC's conversion time.

A stop request (`run` low) takes effect only after state 3 has been acquired,
so every started cycle is complete. After a stop the counter rests at 3, and
the next start begins at state 0.

When phase switching is disabled, the switches freeze in state 0 (0°, 180°),
which needs no swap. The state count keeps running, so a stop still lands at
a cycle boundary. A change of the enable bit takes effect at the next state
boundary, so no sample is integrated across a change of the switches.

## Readout and demodulation

All FPGA logic runs on one system clock, `CLK_MHZ`, 40 MHz by default. It
must be a multiple of 10 MHz so the one-shot units come out whole. The 8 MHz
serial clock, the 16 data lines and the ready line are sampled through
identical two-flip-flop synchronisers. This keeps their relative timing.
`serial_rx` starts a readout on a ready rising edge, but only while the
sequencer waits for an acquisition. A ready edge at any other time, for
example just after power-up, is ignored. It then takes one bit per
serial-clock rising edge, 20 bits, MSB first.

The ADC interface assumes this handshake: the ADC drives its MSB when it
raises ready and changes its data on falling serial-clock edges. That is how
`tb/ddc101_model.sv` behaves. Check it against the converter you actually use.

`ps_demod` swaps lines `2p` and `2p+1` of each pair before the shift
registers, whenever the sample was integrated in a crossed state. After this:

* channel `2p` always carries the signal seen on line `2p` in states 0 and 2;
* channel `2p+1` carries the other signal of the pair.

## Co-addition and frames

`integ_unit` adds every 20-bit sample into a 32-bit unsigned accumulator per
channel. The co-addition register holds *samples per integration − 1*, so all
16-bit values are usable (1–65536 samples).

On the last sample of an integration:

* every sum is latched;
* the accumulators restart from zero;
* `frame_valid` pulses.

The restart command discards a running integration and reloads the count.
Use it, for example, to align integrations with a 1PPS-synchronised scan
start. The cal (noise-diode) output changes only at an integration boundary
or a restart, whenever the on/off command was sent.

`out_queue` holds one frame as eight 64-bit shift registers, one per bit of a
byte. Frame byte `4c + k` is byte `k` (least significant first) of the sum of
channel `c`. A finished frame is loaded only if the queue is empty, that is,
fully read or cancelled. Otherwise the new frame is **dropped** and the host
keeps reading the old one. Each data read returns the current byte and
advances the queue when the read cycle ends.

The sums wrap modulo 2³². With full-scale 20-bit words that happens after
4096 samples. The 819.2 ms ceiling of the instrument (8192 samples of
100 µs) assumes only about 19 bits of each word carry signal.

## Host interface

The four EPP cycle types map onto the backend's transactions:

| EPP cycle     | action |
|---------------|--------|
| data write    | push the byte onto the argument LIFO |
| address write | execute the byte as a command, using the newest arguments |
| data read     | next byte of the output frame |
| address read  | interrupt mask; the bits returned are then cleared |

`epp_if` uses the standard wait handshake:

1. The strobe is seen (after synchronisation).
2. The byte is captured, or driven with `epp_doe` high.
3. `epp_wait` rises.
4. When the strobe is released, the action is done and `epp_wait` falls.

Commands are postfix: the arguments go first, then the command byte. The
LIFO (`arg_lifo`, eight `NMAX`-bit shift registers) keeps only the newest
`NMAX = 2` bytes. A half-sent command is therefore simply forgotten, and the
host can resynchronise at any time without clearing anything.

| id | command | arguments (a0 = last byte sent) |
|---:|---------|-----------|
| 1  | reload the FPGA configuration (`reconfig_n` low for 16 clocks) | – |
| 2  | stop (at the end of the current cycle) | – |
| 3  | start | – |
| 4  | samples per integration − 1 | a1 = high byte, a0 = low byte |
| 5  | phase switching on/off | a0[0] |
| 6  | blanking time − 1, in 0.1 µs | a0 |
| 7  | integration time − 1, in 1 µs (sets the switching period) | a0 |
| 8  | cal on from the next integration | – |
| 9  | cal off from the next integration | – |
| 10 | common buffer-amplifier gain | a0[1:0] |
| 11 | cancel the frame being read out | – |
| 12 | discard the running integration and start a new one | – |

Reset values:

* stopped;
* phase switching on;
* blanking 2.5 µs;
* integration 100 µs;
* 10 samples per integration (about 1 ms);
* gain 0;
* cal off.

The interrupt line `epp_intr` is high while any mask bit is set:

* bit 0: a frame was loaded into the output queue;
* bit 1: a 1PPS tick.

An address read snapshots the mask and, when it ends, clears only the bits it
returned. A source that fires during the read is therefore kept. The single
parallel-port interrupt can be shared between the data and the 1PPS tick, and
with other hardware.

A typical host sequence:

1. Write the arguments and commands 6, 7 and 4.
2. Send 12 (restart), then 3 (start).
3. On each interrupt, read the mask with an address read.
4. If bit 0 is set, read 64 data bytes.

## What follows the instrument proposal and what is this design's own

The following come from the proposal this design implements:

* the state sequence and switch pattern;
* the step list of the sequencer;
* the stop-at-cycle-end rule;
* readout before the next integration;
* demodulation on the serial lines;
* the 20-bit shift registers;
* 32-bit co-addition with a 16-bit down counter;
* the 64-byte queue built from 8 rows of shift registers, with its drop rule;
* the 8-bit timers and their ranges;
* postfix commands with a bit-sliced LIFO;
* the command list 1–10;
* the self-clearing interrupt mask;
* the shared 1PPS interrupt.

The following are this design's own choices:

* one synchronous 40 MHz clock in place of the separate 10 MHz, 1 MHz and
  gated serial clocks;
* one-shot prescalers restarted on trigger, which makes every interval exact;
* the "value + 1" encoding of all timers and of the co-addition count;
* the ADC serial handshake;
* the byte order of the frame;
* the argument order of command 4;
* command numbers 11 and 12;
* interrupt bit positions;
* the frozen switch state when switching is off;
* latching the enable bit per state;
* ignoring unsolicited ready edges;
* reset values;
* the EPP wait timing;
* the 2-bit gain select.

Not in the RTL, because it is not logic:

* the ADCs themselves;
* the 8 MHz oscillator;
* the buffer/gain amplifiers;
* the opto-isolators on the cables;
* the configuration EPROM;
* the host computer and its driver.

A second receiver uses a second instance of the whole backend.

## Files

* `rtl/bk_pkg.sv`: command identifiers, interrupt bits, reset values.
* `rtl/gbt_backend.sv`: the top level. Its parameters are `CLK_MHZ`,
  `NPAIRS`, `SAMPLE_W`, `ACC_W` and `COADD_W`.
* `rtl/ps_fsm.sv`: phase-switch sequencer.
* `rtl/oneshot.sv`: retriggerable counter one-shot.
* `rtl/serial_rx.sv`: synchronisers and readout control.
* `rtl/ps_demod.sv`: pair swap.
* `rtl/shift_reg.sv`: serial to parallel.
* `rtl/integ_unit.sv`, `rtl/coadd_counter.sv`, `rtl/coadd_channel.sv`:
  co-addition.
* `rtl/out_queue.sv`: 64-byte output frame.
* `rtl/epp_if.sv`, `rtl/arg_lifo.sv`, `rtl/cmd_exec.sv`, `rtl/irq_mask.sv`,
  `rtl/pps_interrupter.sv`: host side.
* `tb/tb_<module>.sv`: a self-checking testbench per module. Each ends with a
  line `TB_RESULT checks=N failures=M`.
* `tb/ddc101_model.sv`: behavioural model of the A/D board, used by the
  readout and top-level tests.

`tb_gbt_backend` runs the whole design at its default parameters, in these
phases:

1. One frame with the reset register values (10 × 100 µs).
2. Faster settings, with a short blanking interval so the readout stretches
   it.
3. A late host, so a frame is dropped.
4. A cancelled half-read frame.
5. A restart in the middle of an integration.
6. Phase switching off, and a gain change.
7. A stop and a reload.

Its front-end model makes fresh random R/L levels for every state and crosses
them onto the ADC lines exactly as the switches would. Every frame byte is
compared with sums of those levels. It also counts each mechanism (all four
switch states, both demodulator settings, stretched blanking, dropped frames,
cal edges, 1PPS interrupts) and fails if one never happened. It takes about
3 ms of simulated time, well under a second of wall time.

`tb_gbt_workloads` also runs at the default parameters. It drives the whole
design through the instrument's operating points:

* Twenty 1 ms integrations are read back to back, with no frame dropped.
  A frame arrives every 1036 µs, about 62 kB/s. The host model reads a frame
  in 16 µs.
* The longest timer settings are run: 25.6 µs blanking, 256 µs integration.
* The shortest timer settings are run: 0.1 µs blanking, 1 µs integration.
  Here the readout stretches every blanking interval.
* One full 819.2 ms integration is run: 8192 samples near the top of a 19-bit
  range. The sums come to about 4.29 × 10⁹ and match a 64-bit reference.

Every integration in this test is timed to the exact setting. So is every
gap from a switch change to the next integration. It simulates 0.875 s of
instrument time in roughly half a minute.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps --top-module tb_gbt_backend \
  -y rtl -y tb +libext+.sv -Irtl rtl/bk_pkg.sv tb/tb_gbt_backend.sv
obj_dir/Vtb_gbt_backend
```

Swap the top module for any other `tb_*` to run a single unit. The
testbenches assume a 1 ns time unit (the system clock is `#12.5` per half
period). Lint a module with
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/bk_pkg.sv rtl/<module>.sv`.
