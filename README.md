# SPAlink: an RF bitstream generator for a class-S power amplifier

A class-S power amplifier is a switching amplifier. It is driven by a
single-bit stream, and a band-pass filter after the switches recovers the
RF signal. The hard part is making that bitstream at the carrier frequency.
A band-pass sigma-delta modulator clocked at four times the carrier would
need a feedback loop that closes at several GHz.

This design avoids that by splitting the job in two:

1. A **lowpass** 1-bit sigma-delta modulator runs at a moderate clock,
   CLKFM (150 MHz in the measured set-up). It turns the baseband signal
   into a bitstream. Its feedback loop only has to close at CLKFM.
2. A **frequency shifter** then mixes that bitstream digitally with a
   square carrier. Every modulator bit becomes ten output bits that
   alternate with the carrier. This puts the signal at 5 x CLKFM
   (750 MHz for CLKFM = 150 MHz).

A link stage called SPAlink carries the resulting stream off the chip,
either:

- through a multi-gigabit transceiver used as a 20-bit serializer, or
- as a 10-bit parallel word per CLKFM cycle that an external serializer
  finishes.

The test signal is four fixed tones made by direct digital synthesizers
(DDS): 1.0, 1.2, 1.4 and 1.6 MHz. Around the carrier they appear as
sidebands at 750 MHz ± 1.0 ... 1.6 MHz.

All of this RTL is configured at elaboration time by a small set of
parameters: word widths, modulator order, link type and clock ratio.

## Signal chain

```
              CLKFM domain                                                    link clocks
 +------+
 | DDS1 |--+                                                                  +---------------+
 | DDS2 |--+-> (+)reg -+                                                      | transceiver   |
 | DDS3 |--+           +-> (+)reg -> >>2 -> sigma-delta -> adaptor -> shifter |  20b -> 1b    |-> mgt_txserial
 | DDS4 |--+-> (+)reg -+              N bits   1 bit     2 FFs     20/10 b -->| or parallel   |-> par_data_p/n
 +------+     N+1 bits     N+2 bits                                           |  output regs  |
                                                                              +---------------+
```

| Stage | Module | What it does | Latency |
|---|---|---|---|
| Tone generation | `dds` (x4) | 33-bit phase accumulator; the top 11 bits pick one of 2048 points of a sine period, read from a quarter-wave table of 512 N-bit words | 1 clock |
| Sum | `tone_adder_tree` | Pairwise adders, each followed by a register (N+1, then N+2 bits). The result is shifted right by 2 back to N bits | 2 clocks |
| Modulation | `sigma_delta_modulator` | 1-bit lowpass modulator, 1st or 2nd order | 1 clock |
| Adaptation | `frequency_adaptor` | Chain of `DACOUT_PIPES_V2PMGT` (= 2) flip-flops holding modulator bits, plus a word strobe | 1-2 clocks |
| Mixing | `frequency_shifter` | Expands each bit into 10 carrier-modulated bits and packs them into link words | 1 clock |
| Link | `spalink` -> `mgt_serializer` or `parallel_io` | Serializes (20 bits per CLKFM/2 word) or drives parallel pins | see below |
| Top | `spalink_top` | Wires the chain and computes the tuning words | |

`spalink_pkg` holds one function, which gives the DDS tuning word:
`round(f * 2^33 / CLKFM_HZ)`. For example, 1 MHz at 150 MHz gives 57266231.

## The frequency shifter: how a 150 MHz modulator makes a 750 MHz signal

Take a modulator bit `y`, where 1 stands for +1 and 0 for -1.

- The shifter repeats `y` for `BITS_PER_SAMPLE = FS_MULTIPLICATION_FACTOR /
  SAMPLES_PER_WORD` output bits. That is 10 for both link types.
- It multiplies each copy by a carrier that is +1 on even output bits and
  -1 on odd ones.
- For single bits, multiplying by -1 is an inversion, so the product is an
  XOR:

```
output bit n = y(n / 10) XOR (n mod 2)
y = 1  ->  1010101010
y = 0  ->  0101010101
```

The output bit rate is 10 x CLKFM, and the carrier alternates every bit, so
the carrier frequency is 5 x CLKFM.

Multiplying by a square wave moves the modulator's baseband spectrum to
±5·CLKFM and to the odd harmonics of the carrier. The modulator's shaped
noise, which grows towards CLKFM/2, moves with it. It stays away from the
carrier by as much as it stayed away from DC, and the amplifier's output
filter removes it.

A one-bit register (`carrier_phase`) keeps the alternation continuous
across word boundaries. This only matters when a parallel link uses an odd
word width; with 10- and 20-bit words the carrier restarts in phase every
word anyway.

The shifter's word layout:

- `word[0]` is sent first.
- The older of the two samples of a transceiver word fills bits 0-9.
- The newer sample fills bits 10-19.

## Words, clocks and the two link types

| | Transceiver link (`VIRTEXIIPRO_MGT=1`) | Parallel link (`VIRTEXIIPRO_MGT=0`) |
|---|---|---|
| Word width (`FS_MULTIPLICATION_FACTOR`) | 20, fixed by the transceiver | 10 in the reported build; any width |
| Word rate | CLKFM/2: a strobe every 2nd CLKFM cycle | CLKFM: every cycle |
| Modulator bits per word | 2 (both adaptor flip-flops) | 1 (the adaptor is a 2-stage delay) |
| Pins | one serial output, at 10 x CLKFM | `FS_MULTIPLICATION_FACTOR` pins, or pairs if `OUTPUT_LVDS=1`, plus the forwarded clock `par_clk_p/n` |
| Output clock | `clk_ser` = 10 x CLKFM | `clk_fm`, or `clk_link` if `EXTERNAL_CLOCK_FEEDBACK=1` |

Reported operating points, with carrier = 5 x CLKFM and link data rate =
10 x CLKFM:

| Configuration | CLKFM | Carrier | Link rate |
|---|---|---|---|
| Transceiver, 1st order | 216.4 MHz | ≈ 1.08 GHz | 2.164 Gb/s |
| Transceiver, 2nd order | 207.5 MHz | 1.0375 GHz | 2.075 Gb/s |
| Parallel with clock feedback, 1st order | 190 MHz | 950 MHz | 1.9 Gb/s |
| Parallel with clock feedback, 2nd order | 160 MHz | 800 MHz | 1.6 Gb/s |
| Measured set-up (transceiver, 1st order, 14 bits) | 150 MHz | 750 MHz | 1.5 Gb/s |

### Clocks and reset

**Generated clocks.** The RTL does not generate clocks. On an FPGA a clock
manager makes them: CLKFM = 4 x the board clock (or CLKFM and CLKFM/2 for
the transceiver), and, in feedback mode, the deskewed link clock. They
enter `spalink_top` as `clk_fm`, `clk_ser` and `clk_link`. Each clock has
its own synchronous, active-high reset.

**The CLKFM/2 word clock.** It is written as a clock enable in the CLKFM
domain: the adaptor's `word_valid`.

**The serial side.** `mgt_serializer` loads `txdata` every 20 `clk_ser`
cycles. The frame register holds each word for 20 `clk_ser` cycles (two
CLKFM periods), so a load never sees a half-written word, as long as
`clk_ser` is derived from the same reference as `clk_fm`. Which serial bit
is the first of a word depends on when `rst_ser` is released. The
testbench finds the alignment from the data.

**Parallel link with clock feedback.** Here the output register runs on
`clk_link`. This is the link clock after the clock manager has locked it to
the clock returned from the board. `clk_link` must have CLKFM's frequency,
and its phase must allow a safe capture of CLKFM data. The clock manager
guarantees that on the FPGA; this RTL assumes it.

### End-to-end latency

With the top testbench's clocks, the link output follows `dacout` by about
4 CLKFM cycles. That is 2 adaptor flip-flops, the shifter register, and the
serializer load or the parallel output register. The modulator input lags
the tone accumulators by 3 cycles.

## The sigma-delta modulator

`sigma_delta_modulator` is written in error-feedback form, with full scale
FS = 2^(N-1):

```
ORDER 1:  w[n] = x[n] - q[n-1]
ORDER 2:  w[n] = x[n] - 2 q[n-1] + q[n-2]      (w clamped to [-4FS, 4FS-1])
y[n] = (w[n] >= 0)            value +FS for 1, -FS for 0
q[n] = value(y[n]) - w[n]
```

The output is therefore the input plus quantisation error shaped by
(1 - z^-1)^ORDER. The first-order form is exactly the familiar
accumulate-and-compare loop.

**Second order near full scale.** In the second-order loop, the input sum
of four full-scale tones (÷4) can reach full scale. A 1-bit second-order
loop cannot follow such an input, so the quantiser input is clamped. In the
four-tone run the clamp acts on about 0.5 % of samples (84 of 15300), and
the tones still come out within 1.5 % of their amplitude. The `overload`
output (`sd_overload` at the top) shows when the clamp acts.

**Internal width.** The internal width is N+5 bits in both orders.

## Parameters of `spalink_top`

| Parameter | Default | Meaning |
|---|---|---|
| `DAC_NUM_BITS` | 10 | DDS output and modulator input width (14 in the measured set-up) |
| `FS_MULTIPLICATION_FACTOR` | 20 | Link word width: 20 for the transceiver, 10 for the reported parallel link |
| `VIRTEXIIPRO_MGT` | 1 | 1: transceiver serial link; 0: parallel link |
| `EXTERNAL_CLOCK_FEEDBACK` | 0 | Parallel link only: register the outputs on the deskewed `clk_link` |
| `OUTPUT_LVDS` | 1 | Parallel link only: drive true/complement pairs |
| `DACOUT_PIPES_V2PMGT` | 2 | Flip-flops between the modulator and the shifter |
| `SD_ORDER` | 1 | Modulator order, 1 or 2 |
| `NUM_DDS` | 4 | Number of tones; a power of two |
| `DDS_ACC_WIDTH` / `DDS_PHASE_WIDTH` | 33 / 11 | Accumulator width / phase-angle width |
| `CLKFM_HZ` | 150 000 000 | CLKFM, used only to compute the tuning words |
| `TONE_HZ` | 1.0, 1.2, 1.4, 1.6 MHz | Tone frequencies |

The reported low-cost FPGA build is:

```
VIRTEXIIPRO_MGT=0, FS_MULTIPLICATION_FACTOR=10, EXTERNAL_CLOCK_FEEDBACK=1,
OUTPUT_LVDS=1, SD_ORDER=1 or 2
```

## What is this design's own

Several parts are this design's choices rather than given by the design
description:

- **DDS.** The original tone generators are vendor-generated cores, so
  `dds` is a plain accumulator and table with the same widths.
  - The table holds a quarter period: 512 words, computed at elaboration
    with `$sin`, amplitude 2^(N-1)-1, rounded to nearest. Mirroring and
    negating by quadrant rebuilds exactly the full-period values.
  - At 512 x 10 bits, each tone fits one block RAM, which matches the
    four block RAMs reported for the four-tone build.
  - With the phase truncated to 11 bits, the spurs sit roughly 66 dB below
    a tone. A vendor core set for 80 dB spurious-free range would do better.
- **Sum reduction.** The reduction from N+2 back to N bits is an arithmetic
  shift right by log2(NUM_DDS).
- **Modulator.** The modulator structure, the clamp and the bit polarity
  (1 = +FS) are choices of this design.
- **Link word format.** The link word bit order, the carrier start phase
  and the LSB-first serialization are choices of this design.
- **Transceiver.** `mgt_serializer` models only the transceiver's role, a
  20-bit parallel-in/serial-out register. It has no PLL, no
  reference-clock selection, no FIFO and no analog driver.
- **Forwarded clock.** The parallel link's clock pin (`par_clk_p/n`) is
  made like an FPGA clock-forwarding output: a double-data-rate pair of
  registers holding 1 on the rising edge and 0 on the falling edge. It is
  low during reset and then copies the output clock. The clock fed back
  from the board goes only to the clock manager.
- **Not represented.** The following have no logic function here:
  - the pad standard (e.g. LVDS at 2.5 V);
  - the clock managers themselves.

## Verification

Every block has a self-checking testbench. Each ends by printing
`TB_RESULT checks=N failures=M`.

| Testbench | Checks |
|---|---|
| `tb_dds` | Every sample against a $sin reference model; full ±511 amplitude; three tuning words |
| `tb_tone_adder_tree` | Random and extreme inputs: floor(sum/4) exactly 2 clocks later |
| `tb_sigma_delta_modulator` | Both orders bit-exact against reference models; mean of the bitstream follows DC inputs within 1/256 FS; the clamp is exercised |
| `tb_frequency_adaptor` | Flip-flop contents each clock, word strobe period for both link types |
| `tb_frequency_shifter` | 20-bit (2x10) and odd 9-bit words against a running-bit-index carrier model; hold when idle |
| `tb_mgt_serializer` | LSB-first, gap-free serialization of 2000 words |
| `tb_parallel_io` | Differential and single-ended output, latency, reset values, forwarded clock |
| `tb_spalink` | All three link types side by side, including capture on the feedback clock |
| `tb_spalink_top` | The whole chain at its defaults (details below) |
| `tb_spalink_top_mgt_order2`, `tb_spalink_top_parallel`, `tb_spalink_top_parallel_fb`, `tb_spalink_top_parallel_fb_order1`, `tb_spalink_top_14bit` | The same end-to-end checks for the other reported configurations and the 14-bit measured set-up |

`tb_spalink_top` runs the whole chain at its default parameters over
150,000 modulator samples: 1 ms of signal, a whole number of periods of
every tone. The configuration variants run 15,000 samples. Each run checks
five things:

- **Modulator output.** A cycle-level reference model predicts `dacout`
  bit for bit.
- **Spectrum.** A DFT of the bitstream finds each tone within 10 % of its
  expected amplitude. Measured: within 0.1 % for order 1 and 1.5 % for
  order 2. The bins between the tones must be at least 26 dB lower;
  measured: 55-68 dB lower.
- **Noise shaping.** The quantisation noise at 68-74 MHz, near CLKFM/2,
  must be at least 10 dB above the noise at 3-9 MHz. Measured: about
  15 dB for order 1 and 22 dB for order 2. The probe bins sit between the
  tones' intermodulation products.
- **Link output.** After demodulation with the carrier, the serial or
  parallel output must equal the modulator stream with each bit repeated
  10 times.
- **Mechanisms.** Each of the following must be seen at least once:
  - link words;
  - serialized words;
  - carrier inversions;
  - noise shaping;
  - capture on the feedback clock;
  - forwarded clock edges, on the parallel link;
  - quantiser clamps, in second-order runs.

## Simulating

`tb_spalink_top` and its variants share the checker module
`tb/spalink_top_bench.sv`. A top-level run with Verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_spalink_top \
    rtl/spalink_pkg.sv rtl/*.sv tb/spalink_top_bench.sv tb/tb_spalink_top.sv
obj_dir/Vtb_spalink_top
```

A block testbench needs only its module, for example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_dds rtl/dds.sv tb/tb_dds.sv
```

`tb_spalink` needs `spalink.sv`, `mgt_serializer.sv` and `parallel_io.sv`.
The full-length top run takes a few seconds; the others take well under a
second.

To try another configuration, copy one of the short `tb_spalink_top_*`
wrappers and change the parameters passed to `spalink_top_bench`.
