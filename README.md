# Oversampled digital leapfrog filters in SystemVerilog

An analog leapfrog (LF) filter builds an LC ladder out of integrators: each capacitor voltage and
each inductor current is one integrator, and the integrators feed each other forward and
backward. This design does the same in digital logic, with a trick that removes every
multiplier. The filter runs at a sampling rate about a thousand times its bandwidth. Because of
that, every signal between the integrators can be a single bit: a value in [0, 1] is carried as a
*pulse rate*, the fraction of clock cycles in which the wire is 1.

Two small operators do all the work:

* an **up-down counter (UDC)** is the integrator. Its up input adds one LSB per pulse and its down
  input removes one LSB per pulse.
* a **rate multiplier (RM)** turns the counter's value back into a pulse rate and scales it by a
  coefficient, which is itself a pulse rate.

The main design is a fifth-order elliptic low-pass for the CCITT G.712 PCM voice-band mask
(pass band to 3 kHz, stop band from 4 kHz). It is built as a *lattice* of two LF branches, of
order 3 and 2, and gives a low-pass output and its complementary high-pass output together.
Beside it are two smaller designs from the same family: a fifth-order doubly terminated
*ladder* filter and a third-order *allpass* filter made from one lattice branch.

With 10-bit counters and a 39 MHz clock, the lattice filter's simulated response is:

| frequency | simulated | analytic |
|---|---|---|
| 2 kHz | -0.03 dB | -0.04 dB |
| 3.5 kHz | -2.86 dB | -2.95 dB |
| 4 kHz | -15.93 dB | -15.91 dB |

The analytic column is the response of the quantised-coefficient filter.

## Pulse-rate arithmetic

A pulse-rate signal x has the value P(bit = 1), averaged over many clocks. Amplitudes are
therefore always in [0, 1]. A signed signal is carried with an offset: the lattice filter's input
sits at 3/4 and swings by at most ±1/4.

**UDC as an integrator.** Per clock, the counter changes by (up − down) LSBs. With an n-bit
counter and clock fs, this is an integrator with gain fs/2^n per second. Its outputs are the
counter bits. The counter saturates: at all-ones it ignores an increment, and at all-zeros it
ignores a decrement. This mirrors the clipping of an analog integrator, and it keeps an overflow
from wrapping the value to the other end of the range. A `sat` flag shows each inhibited command.

**RM as a one-bit quantiser with a multiplier.** The RM has a free-running counter that steps once
per pulse of the coefficient c. That counter, read with its bits in reverse order, is a dither
sequence that spreads the values 0 … 2^n−1 evenly in time. The RM adds the dither to the binary
input x and keeps only the carry out of the MSB. It then ANDs that bit with c. The output rate is
therefore c·x/2^n. Over any 2^n pulses of c, exactly x of them pass, so there is no
low-frequency error. The testbench `tb_rm` checks this exactly.

**Bit-stream adder.** Two pulse rates cannot simply be ORed. The adder outputs (x1 + x2)/2, the
only sum that always fits in [0, 1], using a one-bit remainder:

* when the inputs agree, the output is that bit;
* when they differ, the output is the stored remainder, and the remainder flips.

This is a first-order sigma-delta modulator. With x2 inverted, the same slice is a subtracter
with output 1/2 + (x1 − x2)/2.

## The leapfrog chain (`odlf_branch`)

A branch is a chain of UDC-RM pairs. Stage k integrates the difference between the output of
stage k−1 and the output of stage k+1, each scaled by its coefficient c_k:

    s·w1 = c1 (E − w1 − w2)
    s·wk = ck (w(k−1) − w(k+1))
    s·wN = cN (w(N−1) − RI0)       lattice branch: the bias RI0 closes the chain
    s·wN = cN (w(N−1) − wN)        ladder: the load resistor closes the chain

The first stage has one input and two negative feedback terms. The two negative terms are
merged by a bit-stream adder into a single down input. Because the adder halves its sum, the
first counter's down input is given a weight of two LSBs: it carries into bit 1 instead of bit 0.
This restores the exact equation. The `DN2` variant of the counter does this:

* it checks underflow on the bits above the LSB;
* when up and down come together, it nets −1 LSB.

This compensation is this design's own choice. The structure it serves — a two-input first
counter plus an adder — comes from the original circuit.

**Scaling by extra LSBs.** A coefficient below 1/2 would waste RM range. Instead, the counter
gets extra LSBs below the bits that feed the RM. Each extra LSB divides the integrator gain by 2,
and the RM coefficient becomes 2^extra times larger. The benchmark coefficients are
9/16, 1/4, 1 (branch a) and 1/2, 9/16 (branch b). They are realised as:

| stage | a1 | a2 | a3 | b1 | b2 |
|---|---|---|---|---|---|
| extra LSBs | 0 | 2 | 0 | 1 | 0 |
| RM coefficient rate | 9/16 | 1 | 1 | 1 | 9/16 |

The parameters `EXTRA_A` and `EXTRA_B` (arrays in `odlf_pkg`) hold the extra LSBs.

## The lattice filter (`lattice_odlf`)

Both branches see the same input E. Each simulates a reactance Z_a or Z_b terminated by the
generator resistance, and its first state is the voltage on that reactance. The filter output is
half the difference of the two first states, and the complementary output is what is left:

    H  = (w_b1 − w_a1) / E
    Hc = (E − w_a1 − w_b1) / E

|H|² + |Hc|² = 1 holds, so the pair is doubly complementary. Two adder slices form the outputs:

* `y_lp`, a subtracter, gives 1/2 + (w_b1 − w_a1)/2.
* `y_sum`, an adder, gives (w_a1 + w_b1)/2. The complementary signal is then E − 2·y_sum.

**Working point.** All rates must stay inside [0, 1], so the branches run around a DC working
point. The bias is RI0 = 1/2 and the input offset is U0 = (1 + RI0)/2 = 3/4, which leaves an input
range of ±1/4. At rest, the five RM outputs are 1/4, 1/2, 1/4, 1/2, 1/4. The RM inputs are then
455, 512, 256, 512 and 455 out of 1024, and `y_lp` rests at 5/8. The ±1/4 input range is a DC
figure only. Inside the filter, some counters swing by up to 2.5 times the input amplitude: the
third of branch a near the band edge, and the second of branch b. Measured against the distance
of each working point to 0 or 1, the largest clean input amplitude is:

| frequency | 1 kHz | 2 kHz | 3 kHz | 3.5 kHz |
|---|---|---|---|---|
| largest clean amplitude | 0.24 | 0.21 | 0.13 | 0.10 |

A larger tone saturates a counter, and the response then drops by several dB. The testbenches
use 0.1.

**Sign convention of the a3 term.** In the state equations, the last stage of branch a
integrates +c_a3·w_a2. A minus sign there is sometimes written in the state matrix. That sign would not form a leapfrog loop, and the intended elliptic response comes out
only with the plus sign, so the RTL uses the plus sign.

## Allpass filter (`allpass_odlf`)

A single lattice branch is a reactance seen through a resistor, so E − 2·U1 is an allpass
function of E, whatever the coefficients are. The output needs 2·U1, which a pulse rate cannot
hold directly. Two adder slices form 1/2 + (E − 2·U1)/4 instead:

1. the first adds E to a constant 0, giving E/2;
2. the second subtracts w_1 from that.

The testbench checks gain 1 (±3 %) and the phase computed from the state equations (±3°) at
0.5, 2 and 3.5 kHz. The measured errors are under 0.6 % and 0.1°.

## Ladder filter (`ladder_odlf`)

This is the same chain with the last stage closed on its own state (the load resistor), so the
output is the load voltage w_N. At DC every state settles to E/2. No numeric ladder coefficients
are built in, because they are inputs. The testbenches use a Butterworth-like set of rates of
their own: 16, 6, 5, 6 and 16 sixteenths. With that set, and 2|y|/E taken as the response,
`tb_ladder_odlf` measures:

| frequency | measured | computed from the state equations |
|---|---|---|
| 2 kHz | +0.03 dB | 0.00 dB |
| 4 kHz | -4.69 dB | -4.84 dB |
| 6 kHz | -20.98 dB | -20.80 dB |

## Timing: one clock edge per sample

The original circuit uses two non-overlapping clock phases:

* UDCs and RM counters update on phase 1;
* the RM adders produce their outputs on phase 2, from stable counter values.

Here, both phases are folded into one rising edge:

* every UDC and every RM counter is a flip-flop updated on the same edge;
* RM outputs and adder outputs are combinational functions of those registers and the inputs,
  and they settle before the next edge.

The recurrence is the same: counter(n+1) = counter(n) + RM outputs computed from counter(n). So
every integrator has exactly one sample of delay, which is the forward-Euler mapping
s ≈ (z − 1)·fs that the filter is designed for. The longest combinational path is one RM adder
ripple, then a bit-stream adder, then the counter's carry ripple.

The filter input and the coefficient rates of each filter pass through a two-flop synchronizer
per signal (`input_sync`, six slices for the lattice, as in the original). That adds two clocks
of latency. The bias inputs are taken as already synchronous. All filter outputs are registered
one clock after the states they come from. Reset is synchronous and active low, and it clears
every counter and remainder.

## Modules

| file | role |
|---|---|
| `odlf_pkg` | sizes, extra-LSB arrays, chain termination type |
| `odlf_top` | lattice with its 6-slice synchronizer; ladder, allpass and coefficient generator on their own ports |
| `lattice_odlf` | two branches plus two output adder slices |
| `allpass_odlf` | one branch plus two adder slices |
| `ladder_odlf` | doubly terminated chain |
| `odlf_branch` | the leapfrog chain of UDC-RM pairs |
| `udc`, `udc_bit_slice`, `udc_control_slice` | saturating up-down counter: bit slices with ripple carry and zero/ones chains |
| `rm`, `rm_bit_slice`, `rm_control_slice` | rate multiplier: down-counter bit and carry function per slice |
| `bitstream_adder` | one-bit-remainder adder / subtracter |
| `div2` | toggle flip-flop used by every counter bit |
| `input_sync`, `sync_slice` | two-flop synchronizers |
| `coefficient_generator` | reference rate and coefficient rates from the clock, by rate multipliers |

**Default parameters.** The defaults are the 10-bit benchmark (`NBITS = 10`, the extra LSBs
above). The fabricated variant used 11-bit operators without scaling. It is
`odlf_top #(.NBITS(11), .EXTRA_A(odlf_pkg::EXTRA_NONE), .EXTRA_B(odlf_pkg::EXTRA_NONE))`, driven
with the unscaled coefficient rates. Without scaling, the a2 pair's RM coefficient is 1/4, so its state
cannot exceed 1/4. The bias RI0 sits on that state, so the working point RI0 = 1/2 cannot be
held. With RI0 = 1/8 and an input offset of 9/16 it works:

* the states rest at 7/16, 1/8, 7/16, 1/8 and 7/16;
* `tb_chip_config` measures -0.03 dB at 2 kHz and -2.90 dB at 3.5 kHz, at 78 MHz, with a tone
  amplitude of 0.05.

**Choosing the clock.** The characteristic frequency is f0 = fs / (2π·2^NBITS). For the
benchmark, f0 ≈ 6 kHz gives fs ≈ 39 MHz at 10 bits and about 78 MHz at 11 bits.

**Dither.** Each RM keeps its own dither counter. So its dither pattern repeats at
c·fs/2^NBITS, which is 21.4 kHz for the 9/16 pairs and 38.1 kHz for the pairs with rate 1. These
lines lie far above the band of interest. Sharing one dither counter between the RMs of equal
coefficient would save area, but it is not done here.

**Coefficient rates.** The filters take their coefficients as input ports, so that other filter
types can be set without changing the logic. `coefficient_generator` makes the benchmark set from
the system clock, in two levels:

1. With a 40 MHz clock, a rate multiplier with a constant input of 998 (out of 1024) makes the
   reference rate of 38.98 MHz. That rate stands for a coefficient of 1.
2. One rate multiplier per coefficient, stepped by the reference, then gives 9/16 of it or
   passes it unchanged.

All outputs are exact over their periods. In `odlf_top` the generator is on its own output
ports (`cg_ref`, `cg_coef`), which can be wired to `coef_in` outside.

**Left out.** The analog converters at the filter's boundary are not part of the RTL. The
two-phase clock is replaced by the single-edge timing described above.

## Simulating

Every testbench is self-checking and ends with a `TB_RESULT checks=… failures=…` line. With
Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/odlf_pkg.sv tb/tb_odlf_top.sv \
              --top-module tb_odlf_top -Mdir obj_top -o sim
    obj_top/sim

Replace the testbench name for the others:

* `tb_udc`, `tb_rm`, `tb_div2`, `tb_bitstream_adder` and `tb_input_sync`: unit tests against
  reference models (the up-down counter at 4 bits and at its default 10 bits);
* `tb_odlf_branch`: DC working point and the branch response to three tones;
* `tb_lattice_odlf`: DC working point;
* `tb_ladder_odlf`: DC working point and three tones;
* `tb_allpass_odlf`: allpass gain and phase;
* `tb_coefficient_generator`: exact pulse counts of the generated rates;
* `tb_chip_config`: the 11-bit unscaled configuration;
* `tb_freq_response`: a sweep of the lattice filter over 12 frequencies from 2 to 20 kHz. It
  compares the response with the analytic one and checks the G.712 mask. It runs in about 10 s.

In that sweep, the measured response stays within 0.2 dB of the analytic one up to 4.25 kHz. In
the stop band it stays within 1.2 dB. Examples: -0.48 against -0.51 dB at 3.25 kHz, -8.53
against -8.56 dB at 3.75 kHz, and -41.2 against -40.0 dB at 5 kHz.

The helpers `tb_rate_gen` (a constant pulse-rate source) and `tb_sine_gen` (a sigma-delta sine
source) are found through `-Itb`.

`tb_odlf_top` runs the top at its default parameters in about 5 s and covers:

* the DC working point of all three filters and the generator's rates;
* three tones through the lattice, with the complementary output at 4 kHz and the allpass gain;
* driving counters into overflow (bias removed) and underflow (zero input).

It counts each mechanism and fails if one never happened. A tone is measured by correlating the
output bit stream with sine and cosine over a whole number of periods, after 400 000 cycles of
settling. That is about 20 time constants of the sharpest pole.

## Known limits

* The compensation of the first adder's factor 1/2, the form of the sum output and the allpass
  output scaling are this design's choices. They are not taken from the original circuit.
* Input amplitudes must stay below the limits in the working-point table. Near the band edge,
  that is 0.1 instead of the 1/4 allowed at DC.
* The 11-bit configuration is simulated only at the lattice level (`tb_chip_config`), not
  through `odlf_top`.
