# 5 Gb/s ADC-based transceiver core with feed-forward CDR and CMA equalizer

This is the digital part of a 5 Gb/s serial link whose receiver does not have
a phase-adjustable sampling clock. A flash ADC samples the line twice per unit
interval (UI) with a free-running clock. Everything after that is arithmetic
on the samples: equalization, finding where the data edges are, picking the
bit values, and absorbing the frequency difference between transmitter and
receiver. Because the sampling clock never moves, there is no phase
interpolator or clock-steering loop. The only analog timing part is a PLL.
Frequency offsets up to several thousand ppm, including spread-spectrum
clocking (SSC), are handled by letting the number of bits per cycle vary.

The RTL covers:

* the transmit FIFO and 16:1 serializer with de-emphasis tap outputs;
* the ADC encoders and the 4:16 demultiplexer;
* a two-tap FFE (feed-forward equalizer) with blind sign-sign CMA
  (constant-modulus algorithm) tap adaptation;
* the feed-forward CDR (clock and data recovery) with its variable-width
  output;
* a PHY-side gearbox that turns that output back into 16-bit words.

The analog parts are not in the RTL: PLL, output driver, continuous-time
equalizer, and the comparator arrays with their reference ladder. Their
digital signals are ports of the top module. The testbench models them
behaviourally.

## Rates and data flow

| Domain | Clock | Width per clock |
|---|---|---|
| TX parallel input | TXCKI, 312.5 MHz | 16 bits |
| TX serial | bit clock, 5 GHz (the real circuit uses 4-phase 2.5 GHz) | 1 bit, main plus post-cursor |
| ADC slice | 2.5 GHz, 4 slices | 5-bit code each, 10 GS/s together |
| RX back-end | 625 MHz (ADC clock / 4) | 16 samples = 8 UI |
| RX output | RXCKO, 312.5 MHz | 15, 16 or 17 bits plus RXVALID |

```
TXDIN -> tx_fifo -> tx_serializer -> tx_main / tx_post -> (driver)
(comparators) -> adc_encoder x4 -> rx_dmx -> ffe -> ff_cdr -> RXDO/RXVALID/RXCKO -> rx_gearbox
                                               \-> cma_adapt -> C0, C1 -> ffe
ff_cdr = zc_phase_det -> cdr_loop -> data_pick -> width_dmx
```

`xcvr_top` wires all of these together. Its clock inputs are:

* `txcki`, the TX FIFO write clock;
* `tx_bitclk`, one edge per transmitted bit;
* `rx_clk_adc`, the 2.5 GHz ADC clock.

The 625 MHz back-end clock and RXCKO are divided from `rx_clk_adc` inside.
`rst_n` is one asynchronous reset for every domain. Give it a falling edge:
a reset held low from time zero never triggers the asynchronous flops.

## Transmitter

`tx_fifo` is an asynchronous FIFO between TXCKI and the serializer's clock.
It uses Gray-coded pointers and two-flop synchronizers, and has 8 words.

`tx_serializer` loads a word every 16 bit clocks and shifts it out LSB first.
A second shift register carries the same bits one position later. Its first
bit is the previous word's last bit, held in a flop. So the driver gets both
d[n] and d[n-1], and can subtract a scaled d[n-1]. A 3.5 dB de-emphasis
corresponds to levels 0.834·d[n] − 0.166·d[n−1]. When the FIFO is empty at a
word boundary, an all-zero word is sent and `underrun` pulses.

## ADC encoding and demultiplexing

Each flash slice has 17 amplifiers. Resistor interpolation doubles them to
the comparator outputs <0>..<32>. `adc_encoder` uses <1>..<31> as the 31
thresholds of the 32 levels; <0> and <32> mark the range ends.

* Gray bit k is the XOR of the thermometer bits T[i] with i ≡ 2^k (mod 2^(k+1)).
* Binary follows from the Gray code by the usual prefix XOR.

The output is registered on the slice clock.

`rx_dmx` collects four slice codes per ADC clock over four clocks, giving 16
consecutive samples. Sample 4c+k is slice k in clock c of the group, so index
0 is the oldest. The words are handed over on a divide-by-4 clock whose rising
edge comes two ADC clocks after the word changes.

## FFE and CMA adaptation

`ffe` first makes the codes signed, x = code − 16. It then computes 16
outputs per cycle:

    y[n] = C0·x[n] + C1·x[n−1]

Here x[n−1] is the sample half a UI earlier. It crosses cycle boundaries
through a register. The result is saturated to 10 bits. The tap inputs are
passed on, aligned with y, for the adaptation logic.

`cma_adapt` minimises E{(y² − d²)²} without knowing the data. It keeps only
the signs of y and of (y² − d²):

    e = sgn(y) · sgn(y² − d²)
    C_k ← C_k − µ · e · S_k        (S_0 = x[n], S_1 = x[n−1])

* Each coefficient is a 5-bit integer part above 10 fraction bits, so
  µ = 2⁻¹⁰. It saturates at the ends of its range.
* One of the 16 outputs is used per cycle, stepping through all 16 sample
  phases. The adaptation is therefore fractionally spaced and independent of
  the CDR.
* Reset loads (C0, C1) = (4, 0).
* `cma_d` sets the target modulus. `cma_en` freezes the taps.

On a lossy test channel the taps move from (4, 0) towards a large positive C0
and a negative C1, for example (8, −3).

## Feed-forward CDR (`ff_cdr`)

This is the least conventional part of the design.

### Coordinates

Within a 625 MHz cycle, sample n sits at n half-UIs from the cycle start.
Phases are fractions of a UI, modulo 1, kept with 11 bits. The top three bits
are eighths of a UI.

### Instantaneous phase (`zc_phase_det`)

For each pair of consecutive samples (m−1, m) whose signs differ, the
crossing is placed by linear interpolation at t = |a|/(|a|+|b|) of the
half-UI. t is rounded to quarters using comparisons only:
q = #{k ∈ 0..3 : 8|a| ≥ (2k+1)(|a|+|b|)}. The 3-bit phase is
(4(m−1) + q) mod 8. Pair 0 uses the last sample of the previous cycle.

### Averaged phase (`cdr_loop`)

The loop works in four steps:

1. For every crossing of the cycle, compute the error ph_i − ph_av modulo one
   UI, as a signed value in [−½, ½).
2. Average the errors: their sum divided by their number.
3. Feed the average through two integrators:
   `F ← F + g1·avg`, `P ← P + g2·F`.
4. Output `ph_av = P + F` (mod 1 UI).

In effect g1 = 1/4 is the proportional gain and g1·g2 = 1/64 the integral
gain. F settles at 16× the phase drift per cycle. A constant frequency offset
is therefore followed without a steady-state phase error. F spans ±8 UI,
which is far more than the 0.64 UI needed at 5000 ppm.

ph_av passing the UI boundary is a phase slip:

* Going below 0 means the data runs faster than the sampler, so one more bit
  falls into this cycle (`SLIP_FASTER`).
* Going above 1 means the data is slower, so one bit fewer (`SLIP_SLOWER`).

A cycle without crossings holds F and keeps advancing P.

### Data decision (`data_pick`)

The eye centre is half a UI from ph_av. The candidate centres of a cycle are
placed at x_j = 2·ph_av − 1 + 2j half-UIs, for j = −1..7. This is the centre
phase shifted one UI early, so that both samples around every centre exist in
the current cycle or in three samples kept from the previous one.

For each centre, take the two samples around it:

* If they have the same sign, that sign is the bit.
* If not, the crossing between them is placed with the same interpolation
  code. The sample on the centre's side of the crossing is sliced.

Which centres are output depends on the slip:

| Slip | Centres output | Bits |
|---|---|---|
| none | j = 0..7 | 8 |
| after `SLIP_FASTER` | j = −1..7 (the extra early bit) | 9 |
| after `SLIP_SLOWER` | j = 1..7 (j = 0 repeats the previous cycle's last bit) | 7 |

Why this is exactly right: when ph_av wraps from near 0 to near 1, every
centre moves almost one UI later. The slot that would otherwise be skipped is
j = −1. The opposite wrap makes j = 0 coincide with last cycle's j = 7.

### Width controller (`width_dmx`)

Two groups of 7, 8 or 9 bits are packed, first group in the low bits, into a
word on RXCKO (625 MHz / 2). The valid width is given by RXVALID:

| RXVALID | Valid bits |
|---|---|
| 00 | RXDO[14:0] |
| 01 | RXDO[15:0] |
| 10 | RXDO[16:0] |
| 11 | no data |

ph_av moves much less than a UI per cycle, so two slips of the same direction
can never fall into one pair. Sums of 14 or 18 bits are impossible; an
assertion guards this.

Latency from FFE output to RXDO is 2–4 back-end clocks.

## PHY gearbox (`rx_gearbox`)

The gearbox is a 64-bit buffer clocked by RXCKO. It appends each word's valid
bits and lets the consumer pop 16 at a time (`dvalid`/`rd_en`).

Over time it receives as many bits as the far-end transmitter sends. When
that transmitter is faster, the level rises. `almost_full` (48 bits) is the
flow-control signal: the layer above must delete filler data in response. A
word that does not fit is dropped whole and sets the sticky `overflow` flag.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| xcvr_top | FIFO_AW | 3 | TX FIFO depth 2^AW |
| xcvr_top, cma_adapt | MU_SH | 10 | CMA step µ = 2^-MU_SH |
| xcvr_top, cdr_loop, data_pick | PF | 8 | extra phase fraction bits |
| xcvr_top, cdr_loop | G1_SH, G2_SH | 2, 4 | loop gains g1 = 2^-G1_SH, g2 = 2^-G2_SH |
| cma_adapt | C0_INIT, C1_INIT | 4, 0 | taps after reset |

The structural sizes come from the link's rates and are fixed in `xcvr_pkg`:

* 16-bit TX word;
* 5-bit ADC, 4 slices;
* 16 samples per cycle;
* 10-bit FFE output and 5-bit taps;
* 3-bit phase code;
* 17-bit RXDO.

## Where this RTL makes its own choices

The architecture, rates, widths, the sign-sign CMA rule, the loop structure,
the slip rule and the RXVALID code follow the published design. These details
are this implementation's own:

* the sample offset of 16;
* which FFE tap sees the earlier sample;
* saturation of the FFE output and the coefficients;
* µ, g1, g2 and the phase resolution;
* averaging by division;
* the rotating CMA sample select;
* the one-UI-early centre coordinates;
* bit order (LSB first everywhere);
* FIFO and gearbox depths;
* the gearbox's drop-on-overflow;
* the clock-edge placement of the dividers.

The CMA update uses (y² − d²), the gradient of the cost, not its square.

Other simplifications:

* The serializer runs on a single-rate bit clock instead of the 4-phase
  2.5 GHz clock.
* The four ADC slices share one clock in the RTL. Their sampling phases exist
  only in the sample order.
* Jitter tolerance at 1e-12 BER cannot be shown by simulation. The loop
  gains are chosen here, so the tolerance curve of this RTL is unknown.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
Build one with Verilator 5, for example the end-to-end test:

    verilator --binary --timing --assert -y rtl +libext+.sv \
        rtl/xcvr_pkg.sv tb/tb_xcvr_top.sv --top-module tb_xcvr_top
    obj_dir/Vtb_xcvr_top

The unit testbenches are named `tb/tb_<module>.sv`. Each compares its block
with an independent reference model.

`tb_xcvr_top` runs the top at its default parameters:

* random words are sent through the transmitter;
* de-emphasis is applied;
* the signal passes a channel with inter-symbol interference
  x(t) = v(t) + 0.8·v(t−UI/2) + 0.4·v(t−UI);
* it is quantized by ideal 25 mV comparators;
* the ADC clock is 0.4 % fast, then 0.4 % slow.

About 48 000 received bits after settling must match the transmitted stream
exactly. The test also counts FIFO underrun, de-emphasis, both slip
directions, all three RXVALID widths and the gearbox's almost-full flag. It
runs in a few seconds.

`tb_ff_cdr` does the same for the CDR alone at ±5000 ppm.

Two workload testbenches drive the CDR at its default parameters:

* `tb_ssc_cdr` modulates transmitter and receiver independently with
  30 kHz triangular 0 to −5000 ppm spread-spectrum profiles, in anti-phase
  (the worst case). The relative offset therefore sweeps ±5000 ppm. One full
  modulation period is run, about 135 000 bits, and must be error-free.
* `tb_jitter_cdr` applies sinusoidal jitter to the data edges at four points:
  1 MHz/2 UIpp, 3 MHz/0.6 UIpp, 10 MHz/0.3 UIpp and 50 MHz/0.2 UIpp. These
  amplitudes are a moderate stress chosen for this test, not a measured
  tolerance limit.

One workload testbench drives the equalizer:

* `tb_cma_channel` feeds 2^7−1 PRBS through a model channel into `ffe` and
  `cma_adapt`. The channel is a single pole with 15 dB loss at 2.5 GHz,
  followed by 6 dB of analog high-frequency boost and a 5-bit ADC at two
  samples per UI. The taps start at (4, 0) and end at (11, −5), close to the
  published adaptation example. The test checks three things: C1 becomes
  negative, C0 grows, and the inner eye opens. To measure the eye it takes
  the smallest |y| at the better sample phase; this rises from 16 to 40
  codes.

## Remaining lint messages

Verilator reports three kinds of warning. None of them is a circuit problem.

* SYNCASYNCNET: every flop uses its reset asynchronously. The synchronous
  use that Verilator sees is the `disable iff (!rst_n)` clause of the
  assertions.
* UNUSEDPARAM on `xcvr_pkg` constants: the linter reports these when it
  checks a module that imports only some of them.
* UNUSEDSIGNAL in `xcvr_top`: four sub-block status signals are not brought
  out to top-level ports. These are the serializer's word tick, the CMA
  sample select, the CDR's zero-crossing count and the gearbox fill level.
  The same warning covers the unused top bit of `width_dmx`'s 18-bit packing
  word.
