# Sinc³ decimation filters for a sigma-delta ADC: three architectures

A sigma-delta modulator samples an analog signal at many times the Nyquist
rate and emits one bit per sample. The bit stream carries the signal plus
quantisation noise that the modulator pushes up to high frequencies. A
decimation filter turns the stream back into multi-bit words at the Nyquist
rate. It low-pass filters the stream, which removes the shaped noise, and then
keeps one result in N, where N is the oversampling ratio (OSR).

This RTL builds one filter, the third-order comb (sinc³) decimator

    H(z) = ( (1 - z^-N) / (1 - z^-1) )^k,   k = 3,

in three hardware architectures. All three compute exactly the same output
words. They differ in how much logic they need and in how much of it switches
at the fast input rate:

| architecture     | module              | idea                                                  | cost profile                                    |
|------------------|---------------------|-------------------------------------------------------|-------------------------------------------------|
| IIR-FIR (CIC)    | `iir_fir_decimator` | k integrators at fs, keep 1 in N, k differentiators   | least logic; its widest registers run at fs     |
| non-recursive    | `nonrec_decimator`  | log2 N stages of (1 + z^-1)^k, each followed by keep 1 in 2 | more logic; the rate halves at every stage |
| polyphase        | `poly_decimator`    | the same stages, with the keep-1-in-2 moved in front  | most logic; every stage computes at half its input rate |

`decimation_filter_top` puts the three side by side on one modulator input, so
they can be compared and checked against each other. Defaults: N = 256,
k = 3 and a 1-bit input, which gives 25-bit outputs. The design is also meant
to be built with N = 64 (19 bits) and N = 128 (22 bits).

## The filter all three compute

The input bit is read as an unsigned 0 or 1. The impulse response h of H(z)
has 3(N−1)+1 taps. Its coefficients are all positive and sum to N³. The output
for block m (m = 0, 1, 2, ...) is therefore

    y[m] = sum_j h[j] · x[m·N + N − 1 − j]        (x[n] = 0 for n < 0)

This value lies between 0 and N³ = 2^(k·log2 N). So it fits exactly in

    W = b + k·log2 N  bits      (b = 1 input bit; 25 bits for N = 256).

The output is unsigned. An all-ones input gives exactly 2^(W−1), and an
all-zeros input gives 0. To get a bipolar value, compute
`2·y/N³ − 1`.

Two choices make the three architectures agree bit for bit:

* **Decimation phase.** Each output is taken at the *last* input sample of
  its block of N. Every keep-1-in-2 keeps the *second* sample of each pair,
  and the keep-1-in-N of the IIR-FIR filter keeps sample N−1 of each block.
* **Zero start.** Reset clears every register, so each filter starts in the
  zero state, as if the input had been 0 forever.

## IIR-FIR: integrators, then down-sampling, then combs

`cic_integrator` holds k accumulators. On every input sample, the first adds
the input bit, and each later one adds the *updated* value of the one before
it. The adds ripple through the chain within one clock. Because no register
sits between the accumulators, the section is exactly (1/(1−z^-1))^k with no
extra delay. A log2(N)-bit counter marks the last sample of each block, and
that sample's value of the last accumulator goes to `cic_comb`. There, k
differentiators (`x − previous x`) run once per block, and the result is
registered.

**Register overflow is expected.** The accumulators are only W bits wide. The
last one wraps around every few hundred samples, and the integrator section
is unstable on its own. This is correct: all arithmetic is modulo 2^W, and the
combs undo the wrap. The true output fits in W bits (see above), so the
modulo result equals the true result. The one rule is that every integrator
and comb register must be the full W bits wide. Do not narrow them, and do
not add saturation.

## Non-recursive: a cascade of (1 + z^-1)^k half-band stages

The sinc³ response factors as

    ((1 − z^-N)/(1 − z^-1))^k = prod_{i=0}^{log2 N − 1} (1 + z^-(2^i))^k.

With the noble identity, each factor becomes one identical stage:
(1 + z^-1)^k at the stage's input rate, followed by keep 1 in 2.
`nonrec_stage` builds the FIR as k first-order sections, each with one
register and one adder, and each section widens the word by one bit. Stage i
(counted from 1) runs at fs/2^(i−1) and widens the word from b + k(i−1) to
b + k·i bits:

| stage i | input rate | input bits | output bits (k = 3) |
|---------|-----------|------------|---------------------|
| 1       | fs        | 1          | 4                   |
| 2       | fs/2      | 4          | 7                   |
| i       | fs/2^(i−1)| 1 + 3(i−1) | 1 + 3i              |
| 8       | fs/128    | 22         | 25                  |

The structure has no feedback, so nothing can overflow. However, each stage
computes a result on every input sample and then discards half of them.

## Polyphase: down-sample first, then filter

For k = 3, (1+z^-1)³ = 1 + 3z^-1 + 3z^-2 + z^-3 = H0(z²) + z^-1·H1(z²), with

    H0(z) = 1 + 3z^-1,   H1(z) = 3 + z^-1.

`poly_stage` splits the input into its two phases before any arithmetic
happens. The first sample of each pair goes into a hold register (the z^-1
branch). On the second sample:

    a = current sample  (upper branch, H0)
    b = held sample     (lower branch, H1)
    y = (a + 3·a_prev) + (3·b + b_prev)
      = x[2m+1] + 3x[2m] + 3x[2m−1] + x[2m−2]

This is exactly the non-recursive stage's output, but the adders and the two
×3 multipliers do their work only once per pair. A stage has five registers:
the hold register, one delay per branch, the phase bit and the output. The
×3 is written as a constant multiply, and synthesis reduces it to a shift and
an add. This stage exists only for k = 3, so `poly_decimator` has no K
parameter.

## Interface and timing

All blocks use one clock. The slower rates are clock enables, not separate
clocks: a `*_valid` strobe marks the cycles on which a stage takes a sample,
and registers of slower stages only load on their own strobes.

`decimation_filter_top` ports:

| port                                 | dir | width | meaning                                        |
|--------------------------------------|-----|-------|------------------------------------------------|
| `clk`                                | in  | 1     | clock                                          |
| `rst_n`                              | in  | 1     | synchronous, active-low reset; clears all state |
| `x_valid`                            | in  | 1     | a modulator bit is present (may be low on idle cycles) |
| `x`                                  | in  | 1     | modulator bit, 1 = positive                    |
| `y_iirfir`, `y_nonrec`, `y_poly`     | out | W     | decimated output word of each architecture      |
| `y_iirfir_valid`, `y_nonrec_valid`, `y_poly_valid` | out | 1 | one-cycle strobe per output word   |

Timing, counted from the clock edge that takes the last input sample of a
block:

* **IIR-FIR:** output and strobe 1 clock later.
* **Non-recursive and polyphase:** log2 N clocks later (8 for N = 256), one
  registered stage output per stage.
* Every output word holds until the next strobe of its architecture. With
  `x_valid` high on every cycle, each architecture gives one word every N
  clocks.

Each decimator module (`iir_fir_decimator`, `nonrec_decimator`,
`poly_decimator`) has the same ports: `clk`, `rst_n`, `in_valid`, `x[B-1:0]`,
`y[W-1:0]` and `y_valid`.

Parameters:

| module                                     | parameter | default | notes |
|--------------------------------------------|-----------|---------|-------|
| top, `iir_fir_decimator`, `nonrec_decimator`, `poly_decimator` | `OSR` | 256 | power of two, at least 2; elaboration fails otherwise |
| top, `iir_fir_decimator`, `nonrec_decimator` | `K`     | 3       | filter order; the polyphase filter is fixed at 3 |
| decimators                                 | `B`       | 1       | input word length |
| `cic_integrator`, `cic_comb`               | `K`, `W`  | 3, 25   | |
| `nonrec_stage`, `poly_stage`               | `WIN`     | 1       | input width; output width is WIN + 3 |

Shared constants and the word-length function `out_width(b, k, osr)` are in
`rtl/decim_pkg.sv`.

## Files

    rtl/decim_pkg.sv              constants, out_width()
    rtl/decimation_filter_top.sv  the three decimators side by side
    rtl/iir_fir_decimator.sv      cic_integrator + down-by-N counter + cic_comb
    rtl/cic_integrator.sv
    rtl/cic_comb.sv
    rtl/nonrec_decimator.sv       log2 N × nonrec_stage
    rtl/nonrec_stage.sv
    rtl/poly_decimator.sv         log2 N × poly_stage
    rtl/poly_stage.sv
    tb/sinc_ref_pkg.sv            reference: sinc³ impulse response and direct convolution
    tb/sdm2_model.sv              behavioural second-order sigma-delta modulator (real arithmetic)
    tb/tb_*.sv                    self-checking testbenches

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
The reference model in `tb/sinc_ref_pkg.sv` does not mirror any of the
architectures. It builds h by convolving a length-N box with itself k times
and evaluates the convolution sum directly.

| testbench                  | what it checks |
|----------------------------|----------------|
| `tb_cic_integrator`        | accumulator chain against running sums, with a 10-bit word so it wraps often |
| `tb_cic_comb`              | k-th differences modulo 2^W, 1-clock latency |
| `tb_nonrec_stage`, `tb_poly_stage` | `x[n]+3x[n−1]+3x[n−2]+x[n−3]` on every second sample, 1-clock latency, idle cycles, never two strobes in a row |
| `tb_iir_fir_decimator`, `tb_nonrec_decimator`, `tb_poly_decimator` | N = 256: every output against the reference, latency (1 or 8 clocks), full-scale output, idle input cycles |
| `tb_decimation_filter_top` | end to end at the defaults with the modulator model: sine inputs, full-scale ones and zeros, idle cycles; all three outputs equal each other and the reference; output tracks the analog input to 1 % of full scale; counts integrator wrap-arounds, full-scale and zero outputs |
| `tb_osr_sweep`             | the top built with N = 64 and N = 128, against the reference |

All of these pass, and each runs in well under a second. To run one with
Verilator 5:

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
        rtl/decim_pkg.sv tb/sinc_ref_pkg.sv tb/tb_decimation_filter_top.sv \
        --top-module tb_decimation_filter_top -Mdir obj
    ./obj/Vtb_decimation_filter_top

## What follows the method and what is this design's own

These parts follow the published architecture comparison this RTL implements:

* the sinc³ transfer function and order k = 3
* the 1-bit input and the ratios N = 64, 128, 256
* the word length b + k·log2 N
* the three block structures
* the per-stage rates and word lengths of the cascades
* the (1+z^-1)^k stage made from k register/adder sections
* the polyphase branch filters H0 and H1, with the z^-1 on the lower branch

These are choices made here, where the method says nothing:

* **Clocking:** a single clock with sample strobes, instead of separately
  divided clocks. The activity savings of the slower stages show up as
  register enables. Clock gating, or real divided clocks, are left to
  implementation.
* **Reset:** synchronous and active-low. It clears everything.
* **Number format:** unsigned 0/1 input.
* **Decimation phase:** the last sample of each block (see above).
* **Integrator chain:** the integrators add combinationally, with no
  pipeline registers between them. At N = 256 this is three 25-bit adds in
  series at fs. If timing is tight, pipelining them adds a fixed delay of a
  few samples and shifts the decimation phase by the same amount.
* **Default ratio:** N = 256. The method builds each ratio as a separate
  design, not as a run-time mode, so this RTL does the same: choose the ratio
  with `OSR` when you build.
* **×3 multiplier:** written as a constant multiply. The method recommends a
  Wallace-tree multiplier for an efficient polyphase stage, and that choice is
  left to synthesis.

Not included:

* The sigma-delta modulator itself, which is an analog circuit. Its bit
  stream enters on `x`. `tb/sdm2_model.sv` is a behavioural stand-in for
  simulation only.
* The direct, non-decimating form of the comb filter (the whole filter at fs,
  then down-sampling). It serves only as the starting point that the three
  architectures improve on.
* Area and power figures, which depend on a cell library. Expect the same
  ordering as the cost profiles in the first table: IIR-FIR smallest,
  polyphase largest. Switching activity is highest in IIR-FIR, because its
  full-width integrators toggle at fs, and lowest in polyphase.
