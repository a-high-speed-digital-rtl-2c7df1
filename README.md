# Digital Fourier analyzer: shift-register FFT with floating point spectrum averaging

This is a real-time spectrum analyzer for sonar, radar and vibration signals.
It samples one complex signal (or one real one) with two 8-bit converters,
transforms blocks of 4096 samples with a fast Fourier transform, turns the
coefficients into power, and keeps a running average of each frequency bin in
memory. The core idea is how the FFT is organised. There is no addressed
data memory in the transform. The data set circulates in two shift registers
that never stop. The FFT reorders its data between passes with a two-way
switch. Short distances use two variable delays. Long distances use register
B itself as the delay, through a switched point inside it. One pipelined arithmetic unit therefore
does one two-point transform per clock, and the control is little more than
one counter.

The RTL follows the analyzer described in the paper "A High-Speed Digital
Fourier Analyzer". The list in *Departures from the original machine* says
where it differs. All of it is synthesizable SystemVerilog (IEEE 1800-2017),
and every module has a self-checking testbench.

## Data path at a glance

```
 ADC I/Q ──► input_capture ──► core input region (2 × 4096 complex words)
                                      │  block of 4096, read in order
                                      ▼
                               hanning_weight (optional)
                                      │
                                      ▼
                 ┌────────────── fft_unit ───────────────┐
                 │  shift reg A ─┐                        │
                 │               ├─► fft_butterfly ──► reorder ──┐
                 │  shift reg B ─┘        ▲                      │
                 │       ▲            sincos_gen                 │
                 │       └──────── (next pass) ◄────────────────┘
                 │  output pass: re², im², bin = bit-reversed location
                 └──────────────────────┬─────────────────┘
                                        ▼
                         postproc_unit ◄─► core filter region (8192 bins)
                                        │
                          host / display read port
```

`dfa_control` holds the 40-bit control register and runs the fixed program
(capture, transform, postprocess). `dfa_top` wires everything together.

## Number formats

| quantity | format |
|---|---|
| FFT data word | complex, 13 + 13 bits two's complement (26 bits), full scale ±4096 |
| input sample | 8-bit I and Q, put into the 13-bit word shifted left by 4 |
| twiddle factor | 13-bit cos/sin, 1.0 = 4096 (saturated to 4095) |
| block exponent | 5 bits, common to the whole 4096-word array |
| FFT power output | two unsigned 24-bit squares, power = (re² + im²)·4^exp |
| raw power (float) | 6-bit characteristic E, 5 fraction bits, hidden leading one |
| filter word in core | 6-bit E + 12 fraction bits (18 bits); value = 1.f·2^(E−1), E = 0 is zero |

## The shift-register FFT (`fft_unit`, `fft_control`, `var_delay`, `seg_shift_reg`)

The transform is the radix-2 Cooley–Tukey form with natural-order input and
in-place passes. Pass *p* (1 … 12) combines words whose locations differ by
N/2^p:

    A' = A + B·W,   B' = A − B·W,   W = exp(−j·2π·Z/N)

Inside a group of pairs, Z is the group number with its bits reversed, times
N/2^p. The results come out in bit-reversed order, so the frequency bin of a
location is its bit-reversed address.

**Storage.** Register A holds the N/2 words whose locations have the
pass's distance bit clear, in increasing order. Register B holds the words
that have it set. At the start these are simply the first and the second
half of the block. Both registers are N/2-word delays: A is a `var_delay`
with a constant length, and B is a `seg_shift_reg`, which adds one switched
point described below. They shift on every clock and recirculate when
nothing new is written.

**A pass.** For N/2 clocks the registers present pairs (A, B). The pairs
are held three clocks to meet the twiddle factor from `sincos_gen`. They
then spend three clocks in `fft_butterfly`. That makes LAT = 6 clocks from
a register's output to the A', B' results.

**Reordering without addresses.** The next pass wants pairs at half the
distance, D = N/2^(p+1) words apart in the result stream. Call the result
stream A'(c), B'(c) for c = 0 … N/2−1, and split it into blocks of D
results. Then the next pass needs:
* register A to receive A' from the even blocks, and then B' from those
  same even blocks, shifted D later;
* register B to receive A' from the odd blocks, shifted D earlier, and B'
  from the odd blocks.

Every pair of the next pass therefore has one member that appears D clocks
before the other. Some storage has to bridge that gap. There are two ways
to provide it, chosen per pass by the size of D. In both, a switch changes
position every D clocks and no register is ever stopped.

*Short distances, D ≤ 64 (`VD_MAX`): variable delays.*

1. B' goes through a variable delay of D clocks.
2. In switch position 0, A' heads for register A and the delayed B' goes
   to register B. In position 1 they swap.
3. The path into register A is delayed by D clocks once more. This removes
   the stagger, so both registers start receiving the next pass's data in
   the same clock.

The pass takes N/2 + LAT + D clocks.

*Long distances, D > 64: register B as the delay.* B' always enters
register B.
* In switch position 0 (the even blocks), A' enters register A.
* In position 1 (the odd blocks), the word that entered B exactly D clocks
  ago is B'(c−D). `seg_shift_reg` takes that word out at the point D
  stages behind B's input and sends it into A. In the same clock, A'(c)
  takes its place in B. A'(c) therefore leaves B D clocks earlier than a
  word entering at the input would. That puts it beside its partner A'(c−D)
  in the next pass.

Nothing waits outside the two registers, and the pass takes N/2 + LAT
clocks. In a real shift register the D-behind point is a switch between
segments of N/4, N/8, … stages. Here B is a memory with a moving pointer,
so the point is simply address pointer − D.

The last pass writes A' to register A and B' to register B directly. After
it, A holds the even locations and B the odd ones.

**Output pass.** Register A and then register B are read out, one word per
clock, N clocks in all. Each word is squared part by part, and its bin
(bit-reversed location) and the block exponent go with it. A new set is
loaded during this same phase: the first half into A while A is read out,
then the second half into B. The next transform starts as soon as the
output ends.

**Interlaced channels.** With fewer passes (control field `log2n` < 12),
the array holds M = 2^(12−log2n) interleaved sets of N = 2^log2n points. A
sample of channel c at position q sits at location q·M + c. Stopping after
log2n passes leaves M independent N-point transforms. Channel c's bin k
then appears at bin address {bitrev(c), k}.

**Block scaling.** While a pass's results are formed, any component
with |x| ≥ 1024 raises a flag. In that case the next pass halves all its
results and the block exponent goes up by one. Without the halving, a
result stays below 2·√2·1024 < 4096. With it, the complex magnitude never
grows past 4095. So no word can overflow.

**Timing for N = 4096.** Load takes 4096 clocks. The passes take
12·(2048 + 6) + (64 + 32 + … + 1) = 24,775 clocks, which is 9.9 ms at the
original 2.5 MHz shift clock. Output takes 4096 clocks and overlaps the next load. The
`fft_control` header lists the exact phase boundaries. From `start_ack` to
the first output word takes N + IN_LAT + 2 + Σ_p (N/2 + 6 + D'_p) clocks.
Here D'_p is D_p for a variable-delay pass and 0 for the others.

**Load interface.** The unit asks for word `ld_idx` with `ld_req`. It
expects the word on `ld_data` exactly `IN_LAT` clocks later; in the top
that is one clock of core read plus four of Hanning weighting. A start is
taken when the unit is idle, or at the one clock in the last pass that
makes the new words arrive just as the output phase begins.

## Trigonometric generator (`sincos_gen`)

The 12-bit binary angle is folded into one octant. Bits 11:9 choose the
swap of sine and cosine and their signs. In odd octants the angle is
counted back from the octant's end. The remaining angle (0 … 512 steps)
splits into a 5-bit coarse part *a*, which indexes a 32-entry sin/cos table,
and a 4-bit fine part *b*. Sixteen values each of sin b and 1 − cos b (32
interpolation constants) complete the angle-sum rotation. The result
appears 3 clocks after the angle, one per clock, within 1 LSB. The table
entries are round(32768·sin(iπ/128)) and round(32768·cos(iπ/128)). The
constants are round(2^20·sin(2πr/4096)) and round(2^20·(1 − cos(2πr/4096))).

## Postprocessing (`postproc_unit`)

For each bin, one per clock:

1. p = re² + im² is converted to floating point, with the block exponent
   added as 2·exp. The 5 fraction bits are truncated, which keeps the error
   below 1/32, about 0.13 dB.
2. The bin's filter word is read from core.
3. The unit forms P = p + K·P_old. In filter mode K = 1 − 2^−k (k = 0 … 7),
   computed as P − (P >> k). In integrate mode K = 1. In bypass mode, or for
   the first set after the control register is loaded, K = 0. Before the
   add, the smaller term is shifted into line with the larger one. If it is
   more than 15 octaves smaller, it is dropped (output `drop`).
4. The result is normalised to 12 fraction bits and written back the next
   clock. A result beyond E = 63 saturates (output `clip`).

With k ≥ 3 the filter behaves like an RC low-pass with a gain of 2^k and a
time constant of 2^k sets.

## Input capture, core, control

* `input_capture` writes every converter strobe to the next word of an
  8192-word circular input region. Each block of 4096 words that completes
  is offered to the controller. If a block completes before the previous
  one was taken, `overrun` pulses and the newest block is offered instead.
  For real input the Q byte is stored as zero.
* `core_memory` is a plain RAM: one read per clock (data the next clock)
  and one write per clock. Two instances serve as the input region
  (8192 × 16) and the filter region (8192 × 18).
* `dfa_control` holds the control register. The computer load wins over
  the front panel when both load in the same clock. While `run` is set, the
  controller hands each completed block to the FFT. The block's half of the
  input region is latched at the acknowledge. Each register load marks the
  next transformed set as a restart for the filters.

Control register (`dfa_pkg::ctrl_t`):

| bits | field | meaning |
|---|---|---|
| 3:0 | log2n | points per set, 2^log2n; 0 or > 12 means 4096 |
| 4 | hanning | weight samples by ½ − ½cos(2πq/N) on load |
| 7:5 | k | filter constant K = 1 − 2^−k |
| 9:8 | pp_mode | 0 bypass, 1 integrate, 2 recursive filter |
| 10 | cplx_in | complex input (else Q is ignored) |
| 11 | run | process blocks as they complete |
| 12 | bank | which half of the filter region is updated |
| 39:13 | spare | |

Host reads (`host_rd_en`, `host_rd_addr` = {bank, bin}) return data the
next clock. While the postprocessing unit is updating bins, a read is
refused: `host_rd_valid` stays low and the host retries.

## Departures from the original machine

* **Reordering through register B.** The original states only that
  register B, with extra switching, takes the place of the long delays,
  switching every D clocks. The take-out-and-replace scheme above is this
  design's reading of that. It gives the original's clock count:
  24,775 clocks, against the quoted 128 + (N/2)·log2 N = 24,704, which
  leaves out the 6-clock pipeline fill of each pass. Register B is a
  memory with a moving tap, not a chain of switched segments.
* **Core memory.** The original has one core memory shared by the input
  buffer and the filter bins. That sharing limits the update rate, and this
  design does not reproduce the limit: the two regions have separate ports.
* **Clocks.** The original derives its timing from a 20 MHz crystal and
  clocks the shift registers at 2.5 MHz. This design has a single clock.
* **Arithmetic.** The original has 12 × 12 magnitude multipliers with the
  signs handled separately. This design uses 13 × 13 two's complement
  multipliers, which give the same products.
* **Load and read-out rate.** Here a set is loaded, and its spectrum read
  out, one word per clock: N clocks each. That matches the single read port
  of the input memory and the one-bin-per-clock filter update. The
  original quotes a minimum time between sets of (N/2)·(1 + log2 N) clocks.
  That implies both registers filled at once in N/2 clocks while the last
  results leave. Here the minimum is the passes plus N clocks, 28,871
  instead of 26,624 for 4096 points.
* **Power pass.** The squares are formed by dedicated squarers on the
  read-out path, not by a further pass through the arithmetic unit.
* **Own choices.** The original leaves these open; this design fixes them:
  the scaling threshold, the twiddle precision, the rounding (half up in
  the FFT, truncation in the floating point), the zero code, the 15-octave
  ratio bound and the control register layout.
* **Not built.** The converters, oscilloscope, computer, crystal, the
  checkout lamps and the card packaging have no logic here. The converter
  and host signals are ports of `dfa_top`.

## Files

| file | contents |
|---|---|
| `rtl/dfa_pkg.sv` | widths, word and float types, control register layout |
| `rtl/dfa_top.sv` | the analyzer |
| `rtl/fft_unit.sv`, `rtl/fft_control.sv`, `rtl/var_delay.sv`, `rtl/seg_shift_reg.sv` | shift-register FFT, its control, variable delays / register A, switched register B |
| `rtl/fft_butterfly.sv`, `rtl/sincos_gen.sv` | arithmetic unit, trigonometric generator |
| `rtl/hanning_weight.sv` | input weighting |
| `rtl/postproc_unit.sv`, `rtl/core_memory.sv` | floating point filter, core regions |
| `rtl/input_capture.sv`, `rtl/dfa_control.sv` | sample capture, control register and program |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=… failures=…` and stops itself.
With Verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_dfa_top \
    -Irtl -Itb -y rtl -y tb +libext+.sv rtl/dfa_pkg.sv tb/tb_dfa_top.sv
./obj_dir/Vtb_dfa_top
```

Replace `tb_dfa_top` with any other testbench name. The testbenches:

* `tb_dfa_top` runs the whole analyzer at full size (4096 points) in a few
  seconds. It drives the converter ports and feeds six sets:
  * bypass;
  * Hanning-weighted integration over three sets, with overlapped loads and
    a ratio drop;
  * real input as four 1024-point channels with the recursive filter.

  It reads every bin back through the host port and compares it with a
  direct DFT computed in floating point. It checks the transform and
  update times. It counts each mechanism (scaled passes, passes reordered
  each way, overlapped loads,
  Hanning, the three modes, restarts, drops, interlaced channels, real
  input, overrun) and fails if any of them never happened.
* `tb_fft_unit` runs a 256-point FFT on random, single-tone and four-channel
  data, back to back, and checks each set against a DFT and against the
  cycle formula. The variable delays are limited to 16 there, so both
  reordering formats run.
* `tb_fft_dynamic_range` runs a 4096-point FFT on a full-scale tone plus
  one 50 dB weaker, with a little input noise. It prints the two-signal
  range, which is the largest other bin relative to the strong tone. That
  is about -63 dB, close to the 69 dB the original word size allows. The
  test requires at least 60 dB.
* `tb_leakage` passes a tone midway between two bins through the Hanning
  weighting and the 4096-point FFT, once without and once with weighting.
  Unweighted, the two centre bins come out 3.9 dB down and the next two
  13.5 dB down. Weighted, the largest bin outside the main lobe is 32.2 dB
  down. The bins sample the sidelobe 2.5 bins out, just past its -31.4 dB
  peak. Bins are also compared with a direct evaluation.
* The other testbenches check their module alone: every trig angle, random
  butterflies, every delay length, random taps of the switched register,
  the 16-point sequencing example (using both reordering formats), weights,
  float filtering, RAM behaviour, capture and overrun, and the control
  handshakes.

To change the size, set `LOG2N` on `dfa_top` or `fft_unit`. The delays and
registers scale with it. The block size of `input_capture` follows.
`VD_MAX` on `fft_unit` (default 64, a power of two) sets the longest
distance handled by the variable delays. Longer ones go through register B.
