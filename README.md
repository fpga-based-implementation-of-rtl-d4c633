# Binaural comb filters with sequential multiply-accumulate

People with sensorineural hearing loss suffer from increased spectral masking:
a strong spectral component hides its neighbours. When both ears have a
hearing aid, this can be reduced by **spectral splitting**. One ear hears
alternate auditory critical bands (0–100 Hz, 200–300 Hz, 400–510 Hz, ...). The
other ear hears the bands in between. Components that would mask each other
then reach different ears and are only combined in the brain. The two filters
must be linear-phase and must have complementary magnitude responses, so that
together they pass the whole band.

This RTL implements that pair of comb filters as 513-tap linear-phase FIR
filters at a 10 kHz sampling rate, with 16-bit samples, 15-bit signed tap
weights and 32-bit accumulation. It follows the architecture of Kambalimath,
Kulkarni, Pandey, Mahant-Shetti and Hiremath, *FPGA-Based Implementation of Comb
Filters Using Sequential Multiply-Accumulate Operations for Use in Binaural
Hearing Aids*. The central idea is a cost trade: one multiplier and one adder per
ear, used 513 times per sample. This replaces 513 multipliers and 512 adders.

## The sequential multiply-accumulate filter (`comb_filter_seq`)

A direct-form FIR filter computes `y(n) = sum_k h_k x(n-k)`. A fully parallel
implementation needs one multiplier per tap, and all of them are idle for
almost the whole sampling interval. This design instead keeps N partial sums
in registers `Reg 0 .. Reg N-1`. It updates them one at a time, using one
multiplier-adder pair:

```
processing cycle m = 0 .. N-1 of sample n:
    Reg B <= h_m                       (MUX-H, from the weight table)
    Reg C <= Reg m+1   (zero if m = N-1)  (MUX-R)
    Reg m <= x(n) * Reg B + Reg C
```

Think of `Reg m` as the partial sum that will become `y` after `m` more
samples. After the cycles of sample `n` have run, the following holds:

```
Reg m = h_m x(n) + h_{m+1} x(n-1) + ... + h_{N-1} x(n-N+1+m)
```

So `Reg 0` is exactly `y(n)`. The order of the cycles matters: cycle `m` reads
`Reg m+1` while that register still holds its value from the previous sample,
because `Reg m+1` is overwritten only in the next cycle. This is the
transposed direct form, evaluated one tap at a time. The output is ready after
the first processing cycle. The other N-1 cycles prepare the partial sums for
the following samples.

Datapath, per ear:

```
           mux_sel                        mux_sel
              |                              |
 weights -> MUX-H -> Reg B --+        Reg 1..N-1, 0 -> MUX-R -> Reg C
                             v                                   |
 x_in -> x_reg ------------> (*) ------------------------------> (+) --+--> Reg 0 -> y
                                                                       +--> Reg 1
                                                                       ...
                                                                       +--> Reg N-1
```

The registers are `B_W = 32` bits wide. The product of two 16-bit values is
sign-extended to 32 bits, and the adder wraps modulo 2^32 (see *Numeric range*
below).

## Sequencing a sampling interval (`seq_controller`)

Everything runs on one system clock. The processing clock and the per-register
load clocks of the published design are realised here as clock enables:

* `clk_s`, the 10 kHz sampling clock, is synchronised with two flip-flops. Its
  rising edge starts an interval and captures `x(n)` (`sample_start`).
* Each processing cycle takes two system clocks:
  * Phase P: `clk_p` is high, and Reg B and Reg C load the two multiplexer
    outputs for tap `mux_sel = m`.
  * Phase R: the one-hot strobe `clk_r[m]` is high, and Reg m loads the
    adder output.

  So the register strobes come half a processing cycle after the processing
  strobe, and `mux_sel` changes together with phase P.
* An interval is 2N system clocks. Counted in rising clock edges after `clk_s`
  rises:
  * `sample_start` is high after edge 2.
  * The first `clk_p` is high after edge 3.
  * `Reg 0` and `y_valid` are updated at edge 5.
  * The top-level outputs change at edge 6.
  * `busy` falls at edge 3 + 2N.
* The system clock must therefore exceed `(2N + 3) * fs`, which is 10.29 MHz for
  N = 513. A 12.25 MHz system clock gives 1225 clocks per sample and a
  6.125 MHz processing rate, the rate of the published 513-tap design. For
  257 taps, 6.125 MHz gives 612 clocks per sample and a 3.0625 MHz processing
  rate.
* If `clk_s` rises while an interval is still running, the edge is ignored and
  `overrun` pulses for one cycle. Nothing is corrupted: the sample is dropped.
  This flag is an addition of this design.

Assertions in the controller check that exactly one register is loaded in
each phase R, and none in phase P.

## Tap weights (`coeff_rom`, `comb_pkg`)

The tap weights are constants. In hardware, this makes `coeff_rom` a 513-way
constant multiplexer (MUX-H), not a memory.

**This is the main departure from the published design.** The published filters
use weights designed iteratively elsewhere, and those weights are not
available. Here the weights are computed during elaboration by a
single-pass frequency-sampling design. With `M = (N-1)/2`:

```
hL[i] = (1/N) * ( A(0) + 2 * sum_{k=1..M} A(k) cos(2 pi k (i-M) / N) )
hL_q[i] = round(hL[i] * 2^14)
hR_q[i] = (i == M ? 2^14 : 0) - hL_q[i]
```

* `A(k)` is the desired left response at `f_k = k * 10 kHz / N`.
  * It is 1 in even-numbered critical bands and 0 in odd-numbered ones.
  * It is 0.5 at the frequency sample nearest to each band edge. So the filters
    cross over at -6 dB within `fs/2N` (9.7 Hz for 513 taps) of the edge.
* The band edges are the classic critical-band edges: 0, 100, 200, 300, 400,
  510, 630, 770, 920, 1080, 1270, 1480, 1720, 2000, 2320, 2700, 3150, 3700 and
  4400 Hz (`comb_pkg::BAND_EDGE_HZ`).
* Deriving the right filter from the *rounded* left filter makes the pair
  exactly complementary. `hL + hR` is a delay of 256 samples with gain 2^14,
  so the left and right outputs add up to the input, delayed by 256 samples.
* All weights fit 15-bit signed integers.

Measured through the hardware with test tones at the band centres, the
response is as follows:

| Taps | Pass band at every centre | Stop band at every centre |
|------|---------------------------|---------------------------|
| 513  | within 0.2 dB | at least 33 dB down |
| 257  | within 0.5 dB | at least 25 dB down |

To use other weights, such as the iteratively designed published set, replace
`build_table()` in `coeff_rom.sv`. The rest of the design does not depend on
the values.

## Top level (`binaural_comb_top`)

The top level has two independent `comb_filter_seq` instances, one per ear.
Each has its own controller, weight table, multiplier and register file.

A 16-bit sample comes out of each ear as follows:

* In the pass band, the 32-bit result holds 2^14 times the filtered sample.
* The output stage shifts the result right by `OUT_SHIFT = 14` and saturates
  it to 16 bits.
* `left_clip` and `right_clip` report a saturated sample.
* `out_valid` strobes when the outputs change.

The output scaling and saturation are choices of this design.

The stereo codec is not part of this RTL. Neither are its serial audio
interface, its I2C configuration and clock generation, or the analog
preamplifier/AGC and output amplifiers around it. The top level has parallel
signed 16-bit inputs `left_in`/`right_in`, parallel outputs
`left_out`/`right_out`, and the `clk_s` input where such an interface would
connect.

| Parameter   | Default | Meaning |
|-------------|---------|---------|
| `N`         | 513     | taps per filter (257 is the other published size) |
| `A_W`       | 16      | sample and weight width |
| `B_W`       | 32      | product, adder and register width |
| `FS_HZ`     | 10000   | sampling rate assumed by the weight design |
| `COEF_FRAC` | 14      | weight scaling, 2^14 = unity |
| `OUT_SHIFT` | 14      | right shift from the 32-bit result to the 16-bit output |

Reset (`rst`) is synchronous, active high, and clears every register.

## Numeric range

The comb filters have many large side lobes in their impulse responses. For
the weights generated here, the sum of `|h|` is about 103,600, or 6.3 × 2^14,
for 513 taps. A full-scale input whose signs match the weights (the worst
case) produces a sum of about 3.4 × 10^9. That exceeds the 32-bit range, and
the adder then wraps.

Real audio is nowhere near this case, but the 32-bit width leaves only about
4× headroom over 16-bit full scale (1× = 16-bit full scale). Against a
worst-case input this is less than the 6.3× the weights can produce. To rule
out wrapping, make `B_W` 34 or more. The end-to-end test drives a worst-case
pattern that is scaled so that the 16-bit output saturates while the 32-bit
sum does not wrap.

## Resources

Per ear, the design holds the following:

* N × 32 flip-flops for the partial sums (16,416 for N = 513).
* One 16×16 multiplier and one 32-bit adder.
* A 32-bit 513-way multiplexer (MUX-R) and a 16-bit constant 513-way
  multiplexer (MUX-H).
* A handful of control flip-flops.

The multiplexers replace the 512 multipliers that a parallel implementation
would need. They are now the main cost in logic.

## Files

| File | Contents |
|------|----------|
| `rtl/comb_pkg.sv` | widths, sizes, band edges, desired-response function |
| `rtl/coeff_rom.sv` | tap-weight table and MUX-H |
| `rtl/seq_controller.sv` | sequence controller |
| `rtl/comb_filter_seq.sv` | one sequential-MAC comb filter |
| `rtl/binaural_comb_top.sv` | left/right pair and 16-bit output stage |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus a magnitude-response test |

## Simulating

All testbenches are self-checking. Each ends with a line
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5:

```
RTL="rtl/comb_pkg.sv rtl/coeff_rom.sv rtl/seq_controller.sv rtl/comb_filter_seq.sv rtl/binaural_comb_top.sv"
verilator --binary --timing --assert $RTL tb/tb_binaural_comb_top.sv --top-module tb_binaural_comb_top
./obj_dir/Vtb_binaural_comb_top
```

| Testbench | What it checks |
|-----------|----------------|
| `tb_seq_controller` | 7-tap controller against a cycle-by-cycle schedule: N processing cycles, the order of `mux_sel` and `clk_r`, the P/R phase relation, idle time between intervals, and a dropped mid-interval `clk_s` edge |
| `tb_coeff_rom` | the 513-tap tables: 15-bit range, symmetry, exact complementarity, pass/stop at all 19 band centres |
| `tb_comb_filter_seq` | 17-tap left and right filters against a directly computed convolution (impulse, full-scale alternating, random input); the whole register file after every sample against the partial-sum formula above; latency and interval length |
| `tb_binaural_comb_top` | the full-size pair (default parameters, 1117 samples at 1225 clocks per sample, about 2 s of simulation): every output sample, left + right = delayed input, saturation on both ears, overrun, latency |
| `tb_comb_response` | magnitude response of the default 513-tap pair and a 257-tap pair, with sine tones at the 19 band centres and at every cross-over point: pass band within 2 dB; stop band at least 25 dB down for 513 taps and 18 dB down for 257 taps; both ears between -8 and -4 dB at cross-over (about 2 minutes of simulation) |

Each module's testbench has been shown to fail against a deliberately broken
copy of the module. The broken copies were:

* an interval one processing cycle short;
* a right table that is negated instead of complemented;
* MUX-R selecting the wrong register;
* an output that wraps instead of saturating.

## Relation to the published design

These parts follow the publication:

* the architecture: registers, multiplexers, one multiplier and one adder,
  and the operation order of the processing cycles;
* the sizes: N = 513 (and 257), a = 16, b = 32, fs = 10 kHz;
* the processing rates;
* constant weights held in logic.

These parts are choices of this design:

* single-clock enables instead of separate generated clocks;
* the `clk_s` synchroniser and the overrun flag;
* the input sample register;
* zero reset;
* the weight values and the band plan;
* the output shift and saturation.

The publication also compares two fully parallel architectures: a direct-form
one and a transposed linear-phase one. They are only points of comparison and
are not included here.
