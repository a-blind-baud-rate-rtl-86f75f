# Blind baud-rate ADC-based CDR: digital back end in SystemVerilog

This receiver recovers a 10Gb/s NRZ stream. It samples the stream **once per
bit** with a free-running clock that is never adjusted. The clock is *blind*:
it does not track the data phase. The ADC samples therefore drift across the
data eye whenever the transmitter and receiver frequencies differ. All timing
recovery happens in the digital domain. An interpolator builds the samples
that the right phase would have produced, and a Mueller-Muller loop steers the
interpolation phase.

Baud-rate blind sampling only works if the eye stays open wherever a blind
sample lands. The front end shapes the pulse on purpose to get this. Each ADC
sample is a 1UI integrate-and-dump (I&D) of the input. The digital side then
adds two adjacent samples, which gives a 2UI integrate-and-dump. A single bit
then produces a trapezoid:

```
      h0   h1
       ____            rises over 1UI, flat for 1UI, falls over 1UI
      /    \           h(-1) = 0, h0 = h1 = B, h2 = 0 at the wanted phase
  ___/      \___
    0  T  2T  3T
```

At the wanted phase the main cursor and the first post-cursor are equal (B),
and the pre-cursor is zero. A DFE removes the post-cursor, so the eye stays open
over a 2UI-wide range of sampling phases. That range is wider than the 1UI
range the blind samples sweep, which leaves jitter margin at the edges.
Adding the two samples digitally keeps the sixth bit of resolution that a 5-bit
ADC would lose if the 2UI integration were done in analog.

## What is in RTL and what is not

| Part | Here |
|---|---|
| 1UI I&D front end, 4 interleaved taps | not in RTL (analog). Modelled in the testbenches |
| 5-bit ADCs, 4 x 2.5GS/s | not in RTL (analog). Modelled in the testbenches |
| 4-phase clock generator, CML-to-CMOS converters with variable delay | not in RTL (analog) |
| divide-by-4 clock for the CDR | `clk_div4` |
| 4:16 demultiplexer | `demux_4to16` |
| digital CDR | `digital_cdr` and the blocks below it |
| top of the digital back end | `bbcdr_top` |

The top `bbcdr_top` takes the four ADC codes and the 2.5GHz ADC clock as
ports. It puts out the recovered bits, the 625MHz clock it derives, and the
loop state.

## Data path and widths

One 625MHz cycle carries one word of 16 blind samples (lane 0 oldest):

| Stage | Module | Per word | Operation | Latency |
|---|---|---|---|---|
| ADC codes | `demux_4to16` | 16 x 5b | ADC j holds samples 4m+j | held 4 fast cycles |
| signed conversion | `signed_conv` | 16 x 6b | s = 2*code - 31 (-31..+31) | combinational |
| 2UI I&D | `iad2ui` | 16 x 7b | y[i] = s[i] + s[i-1] | 1 cycle |
| interpolator | `data_interp` | 17 x 13b | x = (32-phi)*y[i-1] + phi*y[i] | 1 cycle |
| DFE input | `digital_cdr` | 17 x 9b | x >>> 4 | - |
| detector input | `digital_cdr` | 17 x 10b | x >>> 3 | - |
| speculative 2-tap DFE | `spec_dfe` | 17 x 1b | bits A(k) | 1 cycle |
| speculative MM detector | `mmpd` | 16 x 11b | (x(k-1) - x(k)) * A(k-1) | same cycle as the DFE output |
| loop filter | `loop_filter` | 5b phi + wrap | PI filter and phase accumulator | 1 cycle |

Recovered bits appear three CDR cycles after their word enters `digital_cdr`.
The timing loop runs from the interpolator output through the DFE, the
detector and the loop filter back to the interpolator. A phase decision
reaches the interpolator output three cycles after the samples it was measured
on: one cycle in the DFE, one in the loop filter and one in the interpolator.
The difference x(k-1) - x(k) is registered while the DFE works, so the
detector adds no cycle of its own.

`cdr_pkg` holds the lane counts, the widths and the `wrap_e` type that the
blocks share.

## The interpolator and phase wraps

This is the part that makes blind sampling work. Read it before changing
anything.

The loop filter keeps a phase accumulator that spans exactly one UI. Its top
5 bits are `phi`, the interpolation phase in 1/32-UI steps. Within a word,
lane i interpolates between blind samples y[i-1] and y[i] with weights
(32-phi) and phi. The wanted sampling instant is therefore (i-1) + phi/32. The
two blind samples before the word, y[-2] and y[-1], are kept from the previous
word.

A frequency offset makes the phase ramp steadily, so sooner or later it leaves
[0, 1UI). The accumulator wraps modulo 1UI. The loop filter reports the
direction of each wrap (`wrap_e`) in the same cycle as the new phase:

* **`WRAP_FWD`**: the phase passed 1UI going up. The data is slower than the
  sampling clock. Lane 0 of this word would land on almost the same instant
  as the last sample of the previous word, so it is dropped. The word yields
  **15** samples.
* **`WRAP_BWD`**: the phase passed 0 going down. The data is faster than the
  sampling clock. Two wanted instants now fall between the same pair of blind
  samples, y[-2] and y[-1]. One extra sample is interpolated between them,
  ahead of lane 0. The word yields **17** samples.

Samples are packed from slot 0 upward, and a count (`x_cnt`, then `a_cnt`) says
how many are valid. Every later stage works on "the first *count* slots". Every
piece of history crosses word boundaries as "the last *valid* entry of the
previous word": the DFE's two past decisions, and the detector's previous
sample and decision. Over a long run, the number of recovered bits equals the
number of transmitted bits exactly. The testbenches check this.

One phase serves the whole word. At 1000ppm the phase moves 0.016UI per word,
so the error within a word stays far below one phase step.

### What linear interpolation does to the pulse

Interpolating linearly between blind samples that are a fraction α of a UI
away from the wanted instant changes the trapezoid seen by the DFE:

```
h(-1) = h2 = α(1-α)·B        (at most B/4, at α = 1/2)
h0    = h1 = (1 - α + α²)·B  (between 0.75B and B)
```

Because h0 = h1 for every α, the detector's zero crossing does not move with
α. The DFE taps, however, see a response that depends on where the blind
samples happen to fall. Fixed taps of **h1 = 0.875B, h2 = 0.125B** keep the eye
open for every α: the worst-case residual ISI is 0.5B against a main cursor of
0.75B. That is why the second tap is useful even on an ideal channel. B is the
flat-top level in DFE-input units. A full-scale 2UI sample is
2·31·32/16 = 124 = 2B, so B = 62 times the ADC gain. The testbenches use
B = 62·0.95, which gives h1 = 52 and h2 = 7.

## Speculative DFE (`spec_dfe`)

The DFE has two taps and no adaptation. `h1` and `h2` are static inputs:
8-bit signed values in units of x/16. For every slot it computes all four
values of x - a1·h1 - a2·h2 (with a1, a2 = ±1) in parallel, and takes their
signs as four candidate decisions. A chain of 4:1 multiplexers then resolves
the slots in order. Each slot's select is the two decisions before it. Slot 0
uses the last two valid decisions of the previous word. Only the mux chain
lies on the decision feedback path. Bit value 1 means +1, and a zero value is
decided as +1.

## Speculative Mueller-Muller detector (`mmpd`)

The detector drives F = h0 - h1 to zero, which is the flat-top phase shown
above. It estimates h0 as E[x(k-1)A(k-1)] rather than E[x(k)A(k)], and h1 as
E[x(k)A(k-1)]. Per sample this gives (x(k-1) - x(k))·A(k-1). The
difference does not depend on any decision. It is computed and registered in
the same cycle in which the DFE resolves the bits. One cycle later the decision
only picks +diff or -diff. A positive output means the sampling is late.

There are 16 outputs per word. When a word carries 17 samples, the 17th gets
no detector output of its own. It still serves as x(k-1) for slot 0 of the
next word.

## Loop filter (`loop_filter`)

The loop filter is a second-order loop built from shifts:

```
sum   = Σ valid pd
freq  <= sat(freq - sum, ±(2^(INT_W-1) - 1))
step  = -(sum >>> KP_SHIFT) + (freq >>> KI_SHIFT)     limited to < 1/2 UI
phase <= (phase + step) mod 2^(5+FRAC_W), with wrap direction
```

| Parameter | Default | Meaning |
|---|---|---|
| `FRAC_W` | 10 | phase bits below `phi`, giving 1/32768 UI resolution |
| `KP_SHIFT` | 0 | proportional gain 1 |
| `KI_SHIFT` | 7 | integral gain 1/128 |
| `INT_W` | 18 | frequency register width |

The detector gain is about 58 per 1/32-UI phase step for a 16-sample word.
With that gain, these settings give a damping factor of about 1.3. The
proportional path alone can move the phase by up to about 0.055UI per word.
A 1000ppm offset needs 0.016UI per word, so there is room left for jitter on
top of the offset.

The proportional path must be able to keep the phase held on its own. While
the loop is slipping cycles, the detector output averages to zero, so the
integral path only pulls in after the proportional path has the phase held.

A smaller proportional gain (`KP_SHIFT` = 1, `KI_SHIFT` = 8) also locks from
-1000ppm to +1000ppm. At +1000ppm it tolerates less high-frequency jitter,
about 0.1UIpp at 10MHz against 0.4UIpp.

The frequency register saturates at ±2^17, which is ±1024 phase LSBs per word
or about ±1950ppm. That sets the loop's frequency range. The original chip
reports +1000ppm as close to its loop limit. Its gains and widths are not
published, so all four values above belong to this implementation.

## Clocks, reset and the demultiplexer

`clk_div4` counts the 2.5GHz clock. Its counter MSB is the 625MHz `clk_cdr`,
and it raises `load` once every four fast cycles. `demux_4to16` shifts in
four samples per fast cycle and, at `load`, copies the full group into its
output word. The word changes two fast cycles before each rising edge of
`clk_cdr` and then holds for four fast cycles, so the CDR samples it with two
fast cycles of margin on either side. All state uses an asynchronous,
active-low reset `rst_n` that clears everything to zero.

## Departures from the original design and open points

* The analog front end and clock generator are not described as RTL. That
  includes the 20ps variable-delay skew correction (`Del[3:0]`).
* The DFE taps are fixed inputs. The original has no adaptation either, but
  its tap values are not published. The values above come from the
  interpolation analysis.
* The loop filter gains, widths and saturation, the pipeline register
  placement, the tap width, and the packing of 15/16/17 samples with a count
  are choices of this implementation.
* The original text describes the 1UI samples as 5b and the 2UI sums as 6b.
  This RTL follows the block diagram instead: 6b signed after conversion and
  7b after the sum.
* Recovered bits leave as a 17-bit word plus a count. No output gearbox is
  included.
* The loop has been simulated, not measured. The original chip's jitter
  tolerance (0.19UIpp at high frequency with ±300ppm, measured at BER 1e-12)
  cannot be confirmed by simulating a few hundred thousand bits.
* Through a 10dB stand-in channel (`tb_channel`) the margin with fixed taps
  is small. There are rare bit errors at ±300ppm, and +1000ppm can lose
  lock. The original reports error-free operation through its cable, whose
  response is not published, so this difference is not resolved.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_signed_conv` | all 32 codes on all lanes |
| `tb_iad2ui` | adjacent sums across word boundaries, 1-cycle latency |
| `tb_data_interp` | reference interpolation for random phases and all three wrap cases |
| `tb_spec_dfe` | bit-exact against a serial DFE, and recovery of data with known ISI |
| `tb_mmpd` | bit-exact against a reference with full sample and decision history |
| `tb_loop_filter` | bit-exact against an integer model, including wraps both ways and saturation |
| `tb_clk_div4`, `tb_demux_4to16` | clock period, duty cycle, strobe timing, sample order |
| `tb_digital_cdr` | 3-cycle latency, PRBS-7 tracking at ±500ppm |
| `tb_bbcdr_top` | whole back end at default parameters |
| `tb_jtol` | jitter tolerance sweep, 0.1-100MHz, -300/0/+300/+1000ppm |
| `tb_channel` | whole back end behind a 10dB lossy channel, error-rate bound at 0 and ±300ppm |

`tb_bbcdr_top` models what sits in front of the back end:

* a PRBS-7 source with a frequency offset;
* sinusoidal jitter;
* an ideal channel, or one with a 0.2 post-cursor;
* exact 1UI integration;
* four 5-bit quantisers with gains between 0.93 and 0.975, plus noise.

It runs six scenarios: 0ppm with 0.2UIpp jitter; ±300ppm with 0.1 and 0.19UIpp
jitter; ±1000ppm; and 200ppm with the post-cursor channel. After settling it
checks two things. Every recovered bit must satisfy the PRBS-7 recurrence
b(k) = b(k-6) xor b(k-7), which is independent of alignment. The number of
recovered bits must match the number transmitted. It also counts how often
each of these occurred, and fails if any never did:

* 15-bit words;
* 17-bit words;
* detector outputs of both signs;
* decisions where the second tap changed the outcome.

`tb_jtol` uses the same front-end model. It raises a sinusoidal jitter
amplitude at 0.1, 1, 4, 10, 40 and 100MHz until a bit error appears, and prints
the largest error-free amplitude. With an ideal channel and no random jitter
the simulated tolerance is 8UIpp (the largest amplitude tried) at 100kHz, 4UIpp
at 1MHz, and 0.4 to 1UIpp from 4MHz to 100MHz. This holds at -300, 0, +300 and
+1000ppm. These figures come from about 3·10^4 bits per point. They are not a
BER-10^-12 measurement, and without channel loss they are optimistic against
the 0.19UIpp high-frequency floor reported for the silicon.

`tb_channel` replaces the ideal channel with a first-order low-pass. Its time
constant is 1.116UI, which gives 6.1dB of loss at 2.5GHz. Together with the
3.9dB of the 2UI integration, that makes the 10dB the original chip was
measured with. A real cable has a longer tail, so this is only a stand-in
for it. The testbench works out the DFE taps from the channel.
For each blind offset f it finds where the Mueller-Muller loop settles, which
is where the interpolated pulse has equal main cursor and first post-cursor.
It then picks the fixed tap pair that keeps the worst-case eye widest over all
f. The result is h1=36 and h2=19, a main cursor of about 36, and a worst-case
eye of about 7 (DFE input units), against about 2 units of quantisation
error per 1UI sample. Each run sends 320,000 bits with 0.1UIpp jitter at
10MHz. Over 16 random seeds, 0 and ±300ppm never lost lock. They showed 0
to 3 words with bit errors per run, a bit error rate of roughly 10^-6 to
10^-5, and the testbench allows at most 10. The +1000ppm run is printed but
not checked. Through this channel it sometimes slips a bit and loses lock,
because it is close to the loop's frequency limit and the eye is small. With h2
forced to 0 the link fails at once. So through a lossy channel the second
tap is needed, the fixed taps must suit the channel, and tap adaptation would
be the first thing to add.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/cdr_pkg.sv tb/tb_bbcdr_top.sv \
          --top-module tb_bbcdr_top -o sim && ./obj_dir/sim
```

Replace the testbench name to run any other. Each run takes a few seconds
at most.

The RTL also has a few immediate assertions, which `--assert` enables.
They check that the wrap code is legal and that no sample or decision count
goes above 17.
