# Acoustic processor for a mine-countermeasure sonar

This design turns the echoes received by a 36-element hydrophone array into
61 receive beams over a 60-degree sector. For every beam it produces an
amplitude versus range. It stores one complete measurement in a 512K x 36
dual-port buffer. It then raises a VMEbus interrupt so that display
computers can fetch the block with block transfers.

It covers the digital part of the processor, written as synthesizable
SystemVerilog in one 100 MHz clock domain:

- control of the converter card (a shared converter clock, a shared
  start-of-conversion strobe, and a serial-to-parallel register);
- a sample FIFO;
- a weighted spatial-DFT beamformer;
- per-beam Butterworth band-limiting and anti-reverberation filters;
- an amplitude (magnitude) unit;
- a measurement controller with general registers;
- the dual-port result buffer;
- a VME slave and a VME interrupter.

The source document runs the signal processing as software on a DSP
processor. Here that processing is done in hardware instead.

## Signal chain at a glance

```
 36 x (S&H + 14-bit ADC) --serial--> madc_controller --12 words/conversion--> sample_fifo
        ^  CLK, STC (shared)           (madc_timing + sample_shift_reg)           |
                                                                                  v
 VMEbus <-> vme_slave <-> dp_ram <-- meas_ctrl <-- beam_magnitude <-- beam_filter <-- beamformer
        <-  vme_interrupter <-------- irq_req         (61 beams, I and Q per beam)
```

| Quantity | Value | Origin |
|---|---|---|
| Channels used | 36 (the card has 40) | document |
| Sample width | 14 bits | document |
| Sampling rate fs | 173.6 kHz, which is 4 × the carrier (5.76 µs per conversion) | document |
| Carrier | 43.4 kHz | follows from fs |
| One "cell" (one I/Q pair from every channel) | 6 conversions = 34.56 µs | follows from the sampling scheme |
| Beam sample rate | fs/6 = 28.93 kHz | follows from the sampling scheme |
| Beams | 61, from a 128-point zero-padded spatial DFT | document |
| Result buffer | 512K × 36 bits | document |
| System clock | 100 MHz | this design |

## Sampling: how quadrature comes out of one common converter clock

This is the least obvious part of the design.

**One rate, three channels per group.** Every converter samples at the same
instant, at four times the carrier. Two samples taken one conversion apart
are a quarter carrier period apart, so they form a cosine/sine (I/Q) pair.
Nothing needs to be demodulated.

The card cannot forward all 36 samples of every conversion. Instead the
channels are split into twelve groups of three consecutive channels, and the
groups take turns:

| Conversion phase | Channel kept in each group |
|---|---|
| 0, 1 | first |
| 2, 3 | second |
| 4, 5 | third |

So each conversion forwards 12 samples, and after six conversions every
channel has given one I/Q pair. That set of pairs is a *cell*.

**Marking and shifting.** The selection is made by the serial-to-parallel
register (`sample_shift_reg`). It has one 14-bit stage per channel, plus an
ID bit that marks the samples to keep.

1. All 36 stages load their converter's serial word in parallel.
2. The chain then shifts towards channel 1, one stage per clock, for 36
   clocks.
3. Each marked word that reaches channel 1 is written to the FIFO as a
   sign-extended 16-bit value.

A transfer takes 36 clocks out of the 576 clocks between conversions.

**Two sign corrections in the beamformer.**

- *Middle channel of a group.* The second channel is sampled two conversions
  (half a carrier period) after the first, so its pair carries an extra
  180°. It is negated.
- *Odd cells.* Consecutive cells are 1.5 carrier periods apart, so the
  carrier phase advances by 3π from cell to cell. Every second cell is
  negated, which brings the echo to baseband.

The third channel is one full carrier period after the first and needs no
correction. The document only gives the sampling rule; both corrections are
this design's reading of it.

## Beamformer

For each cell, the beamformer computes, for every beam:

B[m] = Σₙ w[n] · s[n] · e^(−j2πmn/128),  with m = −30 … +30 (beam index b = m + 30)

where s[n] is the corrected I + jQ sample of channel n.

- This is a 128-point DFT of the 36 samples padded with zeros, evaluated
  only at the 61 lines that are kept.
- A plane wave whose phase advances by 2π·m₀/128 per element peaks at beam
  30 − m₀.
- Beams are equally spaced in spatial frequency, not in angle. The beam
  angles depend on the element spacing, which is not given here. With a
  spacing of about 0.47 wavelengths, the outer beams sit at ±30°, so the 61
  beams cover 60° about 1° apart.

**Weights.** The weights are a cosine taper on a 0.45 pedestal. Its first
sidelobe is about −18 dB, which matches the level the document quotes. The
document does not give the weights.

**Arithmetic.** Twiddles and weights are Q1.15 values computed at
elaboration; there are no table files. The datapath does one complex
multiply-accumulate per clock, with a 48-bit accumulator. That makes
36 clocks per beam and 2196 clocks per cell, against the 3456 clocks
available.

**Banks and overrun.** Cells are collected in a double bank. If a new cell
completes while the previous one is still being transformed, the new cell
is dropped and the sticky `overrun` flag is set. Outputs are 32-bit I and Q
values, scaled by 2⁻¹⁵.

## Beam filters

Each beam's I and Q streams pass two filters:

- an 8th-order Butterworth low-pass that band-limits the echo to the
  sounding pulse;
- a 4th-order Butterworth high-pass that acts as an anti-reverberation
  filter.

The cut-off frequencies are set by the pulse-length register:

| Pulse | Low-pass | High-pass |
|---|---|---|
| 4 ms | 5 kHz | 100 Hz |
| 10 ms | 2 kHz | 40 Hz |
| 20 ms | 1 kHz | 20 Hz |

**Coefficients.** All three sets are computed at elaboration from the
parameters. The method is the bilinear transform with pre-warping at the
beam rate, with section damping 2·cos(π(2i+1)/2N), in Q2.30 format.

**Structure.** There are six biquads (4 low-pass, then 2 high-pass) in
transposed direct form II. They are shared over the 122 streams and take
12 clocks per input sample.

**Word widths.** The high-pass poles sit very close to z = 1. For that
reason the internal words are 96 bits wide, and 16 fraction bits are kept
between sections. With narrower words, the truncation error is amplified
into visible offsets.

**Clearing.** A per-stream "fresh" flag zeroes the filter state at the
start of each measurement.

`beam_magnitude` then forms √(I² + Q²) with a bit-serial integer square
root. Its result is ready 32 clocks after the input.

## Measurement cycle

`meas_ctrl` runs one measurement as follows:

1. Clears the chain.
2. Pulses `tx_trigger` (the transmitter start).
3. Enables sampling.
4. Counts cells until the echo time t_p of the selected range has passed.
5. Stops sampling, sets `done`, and requests an interrupt.

In auto mode it repeats at the period T of the range.

Amplitudes are stored beam by beam, cell after cell, from buffer word 0,
with the layout `{4'b0, amplitude[31:0]}`. Long ranges are decimated so
that the largest block fits the 512K-word buffer:

| Range code | Range | T | t_p | Cells | Stored | Words |
|---|---|---|---|---|---|---|
| 0 | 100 m | 0.6 s | 0.135 s | 3906 | all | 238 266 |
| 1 | 200 m | 0.8 s | 0.270 s | 7812 | all | 476 532 |
| 2 | 400 m | 1.3 s | 0.540 s | 15624 | every 2nd | 476 532 |
| 3 | 800 m | 2 s | 1.081 s | 31277 | every 4th | 477 020 |
| 4 | 1600 m | 4 s | 2.162 s | 62554 | every 8th | 477 020 |

Range, T and t_p come from the document. The cell counts follow from them
at 34.56 µs per cell. The decimation is this design's choice.

## VME interface

**A16/D32 general registers.** Address modifiers 0x29/0x2D, base 0xC000,
register n at byte offset 4n:

| n | Register | Meaning |
|---|---|---|
| 0 | CTRL | write: bit 0 start, bit 1 auto repeat, bit 2 stop |
| 1 | RANGE | range code 0–4 |
| 2 | PULSE | pulse code 0–2 (4 / 10 / 20 ms) |
| 3 | STATUS | bit 0 busy, bit 1 done, bit 2 FIFO overflow, bit 3 beamformer overrun |
| 4 | CELLS | cells stored in the last measurement |
| 5 | IRQVEC | bits 7:0 status/ID (reset value 0x40); bits 10:8 IRQ level (reset value 3) |
| 6 | PINGS | completed measurements |
| 7 | ID | 0x4D473839 |

RANGE and PULSE can only be changed while no measurement is running.

**A32/D32 result buffer.**

- Single cycles use modifiers 0x09/0x0D; block transfers (BLT) use
  0x0B/0x0F.
- Base 0x08000000, 2 MB window. Buffer word n is at byte offset 4n.
- During a BLT the address advances 4 bytes per data strobe.
- Only D32 cycles are answered.

**Interrupter.** It drives the IRQ line of the programmed level and takes
part in the IACKIN/IACKOUT daisy chain. It returns the 8-bit status/ID and
releases the request on acknowledge (ROAK). A request arriving while another
is pending is merged with it.

**Bus signals.** The strobes (AS, DS0/DS1) and IACKIN pass through
two-flop synchronizers. Address, modifier and data are sampled once the
synchronized strobe is seen, since the bus keeps them stable by then. The
data bus is split into `vme_d_in`, `vme_d_out` and `vme_d_oe`. The
open-collector lines are active-low outputs.

## What follows the document and what does not

**Taken from the document:**

- 36 channels and 14-bit samples;
- the common converter clock and start strobe;
- sampling at four times the carrier, with the three-channel group rule;
- the marked serial-to-parallel register that shifts towards channel 1 into
  a FIFO;
- 128-point zero padding and 61 beams;
- the filter types, orders and cut-off frequencies;
- the root of the sum of squares;
- the 512K × 36 dual-port buffer;
- A16/D32 registers, A32/D32 buffer access and BLT;
- the VME slave and interrupter;
- the range table.

**Choices of this design:**

- the 100 MHz clock and the serial clock timing;
- the FIFO depth (1024) and its word format;
- the weights, the DFT line selection and the sign corrections;
- fixed-point formats;
- the order of filtering and magnitude;
- decimation of long ranges;
- the register map, the base addresses and the interrupt level and vector.

**Departures from the document:**

- The DSP software is replaced by hardware. The beams are evaluated directly
  rather than with an FFT.
- One register transfer takes 360 ns at 100 MHz, compared with the quoted
  216 ns. It still leaves over 5 µs of slack per conversion.

**Not included:**

- the analogue front end: impedance matching, sample-and-hold, the
  converters themselves, optocouplers, LVDS and bus drivers;
- the commands for receiver gain and array position, because their
  interface is not defined;
- the display computers.

The converters are modelled behaviourally in `tb/adc_model.sv`.

## Files

| Module | Role |
|---|---|
| `rtl/acp_pkg.sv` | constants, pulse enum, `beam_sample_t`, register addresses |
| `rtl/madc_timing.sv` | converter clock, STC, bit strobes, conversion phase |
| `rtl/sample_shift_reg.sv` | marked serial-to-parallel chain |
| `rtl/madc_controller.sv` | converter-card controller (timing + chain + marking) |
| `rtl/sample_fifo.sv` | first-word-fall-through FIFO with sticky overflow |
| `rtl/beamformer.sv` | weighted spatial DFT, 61 beams |
| `rtl/beam_filter.sv` | time-shared Butterworth biquad cascade |
| `rtl/beam_magnitude.sv` | bit-serial √(I² + Q²) |
| `rtl/meas_ctrl.sv` | measurement cycle, registers, storage, IRQ request |
| `rtl/dp_ram.sv` | 512K × 36 two-port RAM |
| `rtl/vme_slave.sv` | A16/A32 D32 slave with BLT |
| `rtl/vme_interrupter.sv` | D08(O) ROAK interrupter |
| `rtl/acoustic_processor.sv` | top level |

Every file starts with a comment on its interface and timing.

## Simulation

Each block has a self-checking testbench, `tb/tb_<module>.sv`. Each one:

- prints `TB_RESULT checks=N failures=M`;
- has a watchdog;
- ends with `$finish`.

Build and run any of them with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb rtl/acp_pkg.sv tb/tb_beamformer.sv --top-module tb_beamformer
./obj_dir/Vtb_beamformer
```

**End-to-end testbenches.**

`tb_acoustic_processor` runs the top with shortened ranges, periods and
FIFO. Its ADC models are driven by a plane-wave echo. It counts and checks
each of these mechanisms:

- conversions, FIFO writes and skipped channels;
- beams, magnitudes and buffer writes;
- decimation and transmit triggers;
- A16 register access, BLT reads, interrupts and acknowledge cycles;
- auto repetition and a change of pulse length.

`tb_acoustic_processor_full` runs the top at its default parameters. It
checks one complete 100 m measurement:

- 3906 cells and a 0.135 s sampling window;
- the interrupt;
- a BLT read-back of the whole 238 266-word block;
- the beam peak at the expected direction.

It takes well under a minute in Verilator.

`tb_meas_ranges` runs the measurement controller and the result buffer at
their default sizes through all five ranges of the table above. For each
range it checks:

- the cell count against t_p;
- the stored block size and its read-back contents.

It also checks, once, that auto mode repeats the 100 m range exactly every
0.6 s.

`tb_beam_pattern` sweeps a plane wave across the array in quarter-line steps
and records the broadside beam's response. It checks:

- the response against the weighted array factor;
- the highest side lobe (−18.25 dB in simulation);
- the crossover between adjacent beams (−0.23 dB);
- that each of the 61 beams peaks for its own direction.
