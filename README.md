# CPFSK modem for HF data links, with a multiplierless square-wave receiver

This is a small binary FSK modem of the kind used on HF radio data links,
written for one FPGA that holds both the transmitter and the receiver. A bit
'1' is sent as a 1400 Hz tone and a bit '0' as an 1800 Hz tone, at 100 bit/s,
with samples at 8000 per second (80 samples per bit). Two ideas keep it small:

* **Transmitter:** two sine-cosine recurrences that need one multiplication
  per step each. One multiplier is shared by the whole transmitter. The two
  tones are the sum and the difference of a 1600 Hz carrier and a 200 Hz
  deviation tone. Both oscillators run all the time, so a change of bit
  changes the frequency without a phase jump (continuous-phase FSK).
* **Receiver:** it correlates the received samples with complex *square waves*
  at the two tone frequencies. Each square-wave value is +1 or -1, so every
  product is only a sign check and a two's complement. The receiver has no
  multiplier at all. It is noncoherent: it needs the bit boundaries, but no
  carrier phase.

The RTL follows a published design of this modem: the two-oscillator
transmitter, the one-multiplier recurrence, the square-wave detector and the
operating point. The published description leaves many details open or
prints them inconsistently. Where the RTL had to choose, the choice is
listed in "Departures and choices" below.

## Signal plan

| quantity | value | where it is set |
|---|---|---|
| sample rate FS | 8000 Hz | `cpfsk_pkg::FS_HZ`, parameter `FS` |
| bit rate RATE | 100 bit/s, so SPB = FS/RATE = 80 samples per bit | `BIT_RATE`, `RATE` |
| tone for '1' (F1) / '0' (F0) | 1400 Hz / 1800 Hz | `F1_HZ`, `F0_HZ`, `F1`, `F0` |
| carrier FC = (F0+F1)/2 | 1600 Hz | derived in `cpfsk_tx` |
| deviation FDEV = \|F0-F1\|/2 | 200 Hz; modulation index h = 2·FDEV/RATE = 4 | derived |
| sample width | 16-bit two's complement | `SAMPLE_W` |

With these numbers a bit period holds exactly 16 carrier cycles and 2
deviation cycles. At every bit boundary the deviation phase is therefore a
multiple of 2π, and cos(A−B) and cos(A+B) take the same value there. This is
why switching between them costs no phase jump.

## Transmitter (`cpfsk_tx`, `sincos_gen`)

### The one-multiplier oscillator

`sincos_gen` keeps two states, s1 = a·sin(nθ) and s2 = b·cos(nθ), and steps
them with

    m       = cos θ · (s1 + s2)
    s1[n+1] = m + s2
    s2[n+1] = m − s1

This needs one multiplication, two adders and two add/subtract units per
step. The update matrix [[c, c+1], [c−1, c]] has determinant c² − (c²−1) = 1
for *any* quantised c. So rounding the coefficient moves the frequency a
little but never makes the amplitude grow or decay. Runs of 200 000 steps
stay on their ellipse.

The price of the single multiplier is that the two outputs have different
peaks: b/a = tan(θ/2). With a sine peak of AMP = 26000:

| oscillator | θ | coefficient (Q1.15) | sine peak | cosine peak |
|---|---|---|---|---|
| A, carrier 1600 Hz | 72° | 10126 | 26000 | 18890 |
| B, deviation 200 Hz | 9° | 32365 | 26000 | 2046 |

AMP is chosen so that s1+s2 of oscillator A (peak 1.236·AMP) still fits in 16
bits. The sum is still carried on 17 bits.

The multiplier is not inside `sincos_gen`. The generator shows `sum_o = s1+s2`
and its constant `coef_o`, and on `load` it takes the rounded, scaled product
`m_i = (coef·sum + 2^14) >>> 15`. The coefficient and the initial cosine peak
are computed from `FREQ_HZ` and `SAMPLE_HZ` while the design is elaborated
(`$cos`/`$tan` in constant functions of `cpfsk_pkg`).

### Mixing the two oscillators

    x[n] = ½ · (cosA·cosB ± sinA·sinB) = ½ · cos(A ∓ B)

'+' gives the lower tone FC−FDEV = 1400 Hz (bit '1'). '−' gives the upper
tone 1800 Hz (bit '0'). Because the cosine outputs are smaller than the sine
outputs, the raw cosA·cosB product is 17.5 times smaller than sinA·sinB. If it
were used as it is, each bit would carry both tones. The transmitter
therefore multiplies cosA·cosB by the constant

    K = cot(θA/2) · cot(θB/2) = 17.49   (Q6.10: 17908)

before it adds or subtracts. This correction is this design's own addition.
The output peak is about 10300.

### One multiplier, six cycles per sample

A 17×17 signed multiplier serves every product. On each `sample_en` a
sequencer runs these steps:

| cycle | multiplier operands | result |
|---|---|---|
| 1 | sinA · sinB | ss = product >>> 15 |
| 2 | cosA · cosB | cc = product >>> 15 |
| 3 | cc · K | cck = product >>> 10 |
| 4 | cos θA · (sA1+sA2) | oscillator A steps |
| 5 | cos θB · (sB1+sB2) | oscillator B steps; sample counter advances |
| 6 | — | x = (cck ± ss) >>> 1 is registered, `x_valid_o` |

The products are formed from the states of sample n before the oscillators
step, so the first sample after reset is x[0] = ½·peak (phase zero). A new
`sample_en` is accepted in cycle 6, so strobes may be as close as 6 clocks.
An assertion flags a strobe that comes too early. `x_valid_o` is high in the
7th clock after the strobe's clock.

On the strobe that opens a bit period (every 80th), the transmitter samples
`tx_bit` and pulses `bit_taken_o`. The sample it then produces carries
`first_o`. A data source only has to present the next bit before that strobe
and move on when it sees `bit_taken_o`.

## Receiver (`cpfsk_rx`, `basis_rom`, `sq_correlator`)

### Square-wave basis

For a tone f the receiver's basis function is a complex square wave. Its real
part is +1 where cos(2πft) ≥ 0 and −1 elsewhere. Its imaginary part is +1
where sin(2πft) > 0 and −1 elsewhere. `basis_rom` stores one bit per value
(1 = +1) for both tones:

    bits_o = { im(F1), re(F1), im(F0), re(F0) }

It has 80 entries, one per sample of a bit. The table is computed at
elaboration from the exact integer phase p = (n·f) mod FS:

* the real part is +1 for p ≤ FS/4 or p ≥ 3FS/4;
* the imaginary part is +1 for p < FS/2.

The table therefore has no rounding error, and it follows any change of the
frequency parameters. Both tones have a whole number of cycles in a bit (14
and 18), so restarting the table every bit does not disturb its phase.

### Correlation without multipliers

Four `sq_correlator` instances run in parallel: the real and imaginary parts
for each of the two tones. Each one adds `x` or `−x`, picked by its basis bit:

    acc <= (start ? 0 : acc) + (basis ? x : −x)

`start` is high on sample 0 of a bit, so no separate clear cycle is needed.
Each accumulator is 23 bits wide: 16 bits plus log2(80), so 80 full-scale
samples cannot overflow.

### Decision

On the last sample of a bit the receiver registers two magnitude estimates
without squaring anything:

    mag0 = |re0| + |im0|      mag1 = |re1| + |im1|

One clock later it registers `bit_o = (mag1 > mag0)` and pulses
`bit_valid_o`, two clocks after the last sample of the bit. The two estimates
stay on `mag0_o`/`mag1_o` (`rx_mag0_o`/`rx_mag1_o` at the top) as a soft
output. |re|+|im| overstates the true magnitude by at most √2, depending on
phase. This matters little here, because the wrong tone's correlation is
much smaller than the right one's.

### Bit timing

The receiver counts samples 0..79 from reset. `sync_i`, given together with a
valid sample, declares that sample the first of a bit and restarts the count.
A shortened period before a sync gives no decision. In a loopback the
transmitter's `first_o` can drive `sync_i` directly. Over a real channel
something outside the modem must provide the bit boundaries: the modem has no
timing recovery.

## Top level (`cpfsk_modem`)

`cpfsk_modem` places the transmitter and the receiver side by side. They share
the clock, the synchronous active-low reset `rst_n`, the sample strobe
`sample_en` (transmitter only) and the frequency parameters. They share no
data path. The D/A and A/D converters and the radio belong between `tx_x_o`
and `rx_x_i`, outside this RTL. The receiver takes one sample per clock in
which `rx_x_valid_i` is high. It does not need `sample_en`.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `sample_en` | in | 1 | transmit sample strobe, ≥ 6 clocks apart |
| `tx_bit` / `tx_bit_taken_o` | in / out | 1 | serial data in, and its take strobe |
| `tx_x_o`, `tx_x_valid_o`, `tx_first_o` | out | 16,1,1 | CPFSK sample, its valid, first-of-bit marker |
| `rx_x_i`, `rx_x_valid_i`, `rx_sync_i` | in | 16,1,1 | received sample, valid, first-of-bit marker |
| `rx_bit_o`, `rx_bit_valid_o` | out | 1 | decided bit and its valid |
| `rx_mag0_o`, `rx_mag1_o` | out | 24 | tone-energy estimates of the last bit |

The parameters `FS`, `F1`, `F0`, `RATE` and `AMP` pass down to both halves.
The derived quantities (carrier, deviation, coefficients, K, table, counter
and accumulator widths) follow from them. If you change the frequencies, keep
the same conditions for continuous phase and a clean table: FS/RATE must be
an integer, and both tones must have a whole number of cycles per bit.

## Departures and choices

* **Carrier frequency.** The published derivation prints a carrier of
  1200 Hz. It also prints h = 4, that is, a deviation of 200 Hz, and tones of
  1400 and 1800 Hz. Only a 1600 Hz carrier fits those tones, so the RTL
  uses FC = (F0+F1)/2.
* **Second oscillator update.** One printed form of the recurrence subtracts
  the cosine state in the s2 update. The other subtracts the sine state. Only
  `s2' = m − s1` is a rotation, and the RTL uses it.
* **Amplitude correction K** of the cosA·cosB product is not in the published
  design. Without it the two products do not cancel, and each bit would carry
  both tones.
* **Multiplier width.** The published resource list has one 16×16 multiplier.
  Here it is 17×17, because s1+s2 needs 17 bits.
* **Receiver arithmetic.** The published pseudo code can be read as
  accumulating |x| where the basis is +1. The RTL follows the stated
  principle instead: it replaces the multiplication by the basis with a sign
  check and complement, which is a true correlation. The power |X|² is
  replaced by the multiplierless estimate |re|+|im|.
* **Widths.** The published resource list shows 16-bit adders and registers.
  The accumulators here are 23 bits, so a full-scale 16-bit input cannot
  overflow.
* **Basis storage.** The published design lists four 16-entry one-bit shift
  registers and a basis ROM without details. Here it is a single 80×4-bit
  table indexed by the sample number.
* **Interfaces.** The sample strobe, the serial bit handshake, `sync_i`, the
  latencies and the reset style are this design's own. The source does not
  specify the system clock or how the 8 kHz rate is derived from it.
* **Not included.** The conventional noncoherent (Fourier) receiver, which
  the published work builds only for comparison, is not part of this RTL.

## Fixed-point summary

| signal | format |
|---|---|
| samples, oscillator states | signed 16-bit integers |
| oscillator coefficients | Q1.15 |
| s1+s2 | signed 17-bit |
| mixer gain K | Q6.10 (17908) |
| sin·sin, cos·cos | product >>> 15 |
| correlators | signed 23-bit |
| magnitude estimates | unsigned 24-bit |

## Verification

Every module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it
hangs.

| testbench | what it checks |
|---|---|
| `tb_sincos_gen` | 1600 Hz and 200 Hz generators against a·sin(nθ), b·cos(nθ) for 400 samples, then amplitude stability for 4000; `init` restarts the phase |
| `tb_cpfsk_tx` | every output sample against ½·peak·cos(nθA ∓ nθB) (within 100 LSB of 10300) for 19 bits starting 1110010; 7-clock latency; bit taken every 80 samples; `first_o`; no jump at tone changes; strobes 6–9 clocks apart |
| `tb_basis_rom` | all 320 table bits against the signs of cos/sin |
| `tb_sq_correlator` | random samples, signs and lengths against an integer model; full-scale worst case |
| `tb_cpfsk_rx` | a real-valued CPFSK signal made by the testbench, with noise; magnitude estimates against the testbench's own correlation; every decided bit; 2-clock latency; realignment by `sync_i` |
| `tb_cpfsk_modem` | end to end at the default parameters: transmitter looped into the receiver through a noisy channel model, 70 bits starting 1110010, 40 of them with ±6000 noise on a peak of about 10300; every bit must come back. It also counts that each mechanism occurred: both bit values, tone changes both ways, noisy bits, receiver realignment, minimum strobe spacing |

To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
        rtl/cpfsk_pkg.sv tb/tb_cpfsk_modem.sv --top-module tb_cpfsk_modem
    ./obj_dir/Vtb_cpfsk_modem

Replace the testbench name to run another one. All of them finish in well
under a second.

## Files

| file | content |
|---|---|
| `rtl/cpfsk_pkg.sv` | operating point, sample type, elaboration-time functions for coefficients, cosine peak, mixer gain and basis signs |
| `rtl/sincos_gen.sv` | one-multiplier sine-cosine recurrence (multiplier outside) |
| `rtl/cpfsk_tx.sv` | transmitter: two generators, shared multiplier, sequencer, add/subtract mixer, bit input |
| `rtl/basis_rom.sv` | square-wave basis table for both tones |
| `rtl/sq_correlator.sv` | sign-check-and-complement accumulator |
| `rtl/cpfsk_rx.sv` | receiver: sample counter, four correlators, magnitude estimates, decision |
| `rtl/cpfsk_modem.sv` | top level |
| `tb/tb_*.sv` | testbenches as above |
