# Probabilistic arithmetic with biased voltage scaling (BIVOS)

An adder does not need every output bit to be equally reliable. An error in
bit 0 of a 32-bit sum costs 1. An error in bit 31 costs 2^31. If the supply
voltage of a CMOS circuit is lowered until noise flips its nodes now and then,
the energy falls steeply while the error rate rises only a little. Biased
voltage scaling spends that trade unevenly: the full adders of the most
significant bits keep a high supply and stay (almost) exact. The least
significant bits run at a low supply and are wrong now and then. For the same
energy, the expected error of the result is several orders of magnitude
smaller than with one low voltage for all bits.

This RTL has the arithmetic of such a design and a small signal-processing
co-processor built from it:

* a full adder with noise coupling points, and a ripple-carry adder of them;
* a 6-bit two's complement array multiplier;
* a 4-point FFT primitive made only of these adders;
* a pipelined 4-point matched filter (FFT, multiply by a filter spectrum,
  inverse FFT), the kernel of synthetic-aperture-radar image formation;
* a behavioural noise model that makes every bit of every block wrong with
  the probability its supply voltage would give.

## How a probability becomes logic

A supply voltage has no meaning in RTL. It matters only through one
number per output bit: the probability p_i that bit i comes out right.
The design therefore separates the two:

* **The arithmetic is ordinary logic with injection points.** `pcmos_fa`
  computes `s = a^b^ci` and `co = maj(a,b,ci)`, then XORs a noise event onto
  each output (`flip_s`, `flip_c`). `bivos_rca`, `array_mult` and `fft4`
  bring these injection points out as ports, one bit per output bit of every
  adder or multiplier. With all flips low, every block is exact. The tests
  check this bit for bit.
* **The noise is a model.** `noise_source` stands in for the thermal noise on
  the low-voltage nodes. It is not part of the circuit that would be built.
  For every (lane, bit) it runs a 32-bit xorshift generator. Each clock, bit i
  flips when the generator's low 16 bits fall below
  `T_i = floor((1 - p_i) * 2^16)`. So each bit fails with probability 1 - p_i,
  independently of other bits and other cycles. With `en` low it produces no
  flips: the hardware is then deterministic.

The real noise is a Gaussian voltage whose effect also depends on the data
and the circuit. This model keeps only its result at the logic level: a
Bernoulli bit error with a given p_i. The published design characterised its
adder by coupling noise at the sum and carry nodes. It then simulated its FFT
by injecting bit errors with those per-bit rates at block outputs. Both are
possible here: `pcmos_fa` and `bivos_rca` take flips on sum and carry nodes.
The co-processor uses output-bit injection only (`flip_c` tied low), because
its p_i already describe a block's output bits.

### Error profiles (`pcmos_pkg::profile_e`)

A profile maps a bit position of a W-bit word to p_i:

| profile          | p_i                                                                    |
|------------------|------------------------------------------------------------------------|
| `PROF_BIVOS`     | supply bins. At W = 32: bits 31..20 p=1, 19..16 0.95, 15..8 0.90, 7..0 0.80. Other W keep the same fractions of the word from the MSB: 12/32, 4/32, 8/32, 8/32. |
| `PROF_UNIFORM`   | p = 0.95 on every bit: conventional voltage scaling, for comparison     |
| `PROF_GEOMETRIC` | one supply per bit: p_0 = `P0`, p_i = p_(i-1) + `A`·`R`^(i-1), capped at 1 |
| `PROF_EXACT`     | p = 1 everywhere                                                        |

The 32-bit BIVOS bins and the uniform 0.95 spend the same energy in the
original energy model. Their expected error magnitudes, sum_i 2^i (1-p_i),
are 55,731 and 214,748,364.75. Their worst cases are 2^20-1 and 2^32-1.
The bins for other widths are this design's own scaling: no bins were
published for the 6-, 8-, 12- or 13-bit words used here. They are a
starting point, not tuned values. A bit with p = 1 has threshold 0 and never
flips, so in a BIVOS source those flip outputs are constant 0.

## Building blocks

**`bivos_rca` (WIDTH = 12).** A ripple-carry adder of `pcmos_fa` cells. In
silicon, each cell or bin of cells sits on its own supply rail, and inverter
pairs on the carries between rails limit static current. Logically those
inverter pairs are wires, so they have no RTL. `{cout,sum} = a+b+cin` when
no flip is set. A flip on the carry out of bit j changes the result by
±2^(j+1). The test checks this.

**`array_mult` (N = 6).** Signed N×N → 2N multiplier. The partial-product
bits form a Baugh-Wooley array: the bits where exactly one operand bit is a
sign bit are inverted, and the constants 2^N and 2^(2N-1) are added. Each row
is added by a row of full adders (`bivos_rca`, 2N bits wide). Noise is
injected on the 2N product bits. The multiplier characterised originally was
a three-section array whose internal organisation is not given. This simpler
array has the same function.

**`fft4`.** 4-point radix-2 decimation-in-time FFT on complex 6-bit samples.
All 16 adders are 8 bits wide, with two bits of growth, so nothing overflows.
The only twiddle besides 1 is -j, which swaps real and imaginary parts and
changes a sign. So the primitive needs adders only, and a subtraction is an
addition of the inverted operand with carry-in 1. The adder numbering on the
`flip_s`/`flip_c` buses is listed in the file header. Errors made in stage 1
reach two outputs of stage 2.

## The matched-filter co-processor (`pcmos_matched_filter`, top)

A host processor keeps the control flow and hands signal-processing kernels
to this co-processor. The kernel here is a matched filter, a convolution
computed in the frequency domain:

```
 x (4 × complex 6b) ─► FFT4 ─►reg─► >>>2 ─► ×h[k] (4 array_mult + 2 adders per point)
                                              ─► >>>5, saturate to 6b ─►reg─►
                       swap re/im ─► FFT4 ─► swap re/im ─►reg─► y (4 × complex 8b)
```

* `h_i` is the filter spectrum, four complex Q1.5 values (value/32). The host
  holds it steady while blocks are in flight.
* The inverse FFT reuses the forward datapath: IFFT(v) = swap(FFT(swap(v)))/4,
  where swap exchanges real and imaginary parts. The /4 is left out, so `y_o`
  is 4× the exact inverse transform.
* `sat_o` comes with a result and says that some product of that block was
  clipped to the 6-bit range.
* Timing: a block presented with `in_valid` at rising edge t appears with
  `out_valid` right after edge t+3. One block can enter every cycle; gaps are
  allowed.
* `noise_en` switches between exact and probabilistic arithmetic at run time.
  Each block type has its own noise source (FFT adders, multipliers, product
  adders, inverse-FFT adders), all following the `PROFILE` parameter.
* Reset `rst_n` is asynchronous and active low. It clears the pipeline and
  restarts the noise generators from fixed seeds, so runs are repeatable.

The structure (FFT, spectrum multiply, inverse FFT, probabilistic adders and
multipliers everywhere) follows the original design. The block size of 4,
the scaling between stages, the saturation, the swap trick and the valid
handshake are this implementation's own choices.

## What the simulations show

| test | what it does | result |
|------|--------------|--------|
| `tb_pcmos_fa` | all 32 input/noise combinations | exact |
| `tb_bivos_rca` | 3000 random additions, single sum and carry flips | exact, flips act as predicted |
| `tb_noise_source` | flip rates per bit over 40000 cycles, BIVOS and geometric profiles | within ±1 % of 1-p_i; p=1 bits never flip |
| `tb_array_mult` | all 4096 products, then random product flips | exact |
| `tb_fft4` | 3000 random blocks against a direct DFT; stage-1 and stage-2 flips | exact, errors land where predicted |
| `tb_pcmos_matched_filter` | end to end at default parameters: gaps, back-to-back blocks, saturation, exact/noisy mode switch | exact mode matches an integer model bit for bit, latency 3 |
| `tb_bivos_table1` | 32-bit adder, BIVOS bins vs uniform 0.95, 50000 additions | mean error 54,935 vs 55,731 expected; 214.8e6 vs 214.7e6; worst BIVOS error < 2^20 |
| `tb_pdelta` | fraction of results within δ of the exact value, 1000 random inputs | adder 1.00 vs 0.80, multiplier 1.00 vs 0.82, FFT 1.00 vs 0.71 (BIVOS vs uniform) |
| `tb_filter_snr` | output SNR of the co-processor over 3000 blocks | about 2 dB with the default BIVOS bins, about -14 dB with uniform 0.95 |

The δ values (128 for the adder and multiplier, 64 for the FFT) are chosen
for these tests. The δ-based measure counts an output as correct when it is
within δ of the exact value. It is the one the original work uses, but that
work gives no δ for these block sizes.

The filter's absolute SNR is low. In 8- to 13-bit words, the default bins
leave the middle bits at p = 0.90-0.95, and the errors of 16 FFT adders and
the product stage add up. The original work reports 28 dB for BIVOS and
0 dB for uniform scaling. That was a much larger software experiment with
its own tuned voltages. Only the ordering (BIVOS far better than uniform at
equal energy) carries over. To get a cleaner output, give the narrow words
fewer noisy bits: change the bin fractions in `pcmos_pkg::bit_probability`,
or use `PROF_GEOMETRIC`.

## Not in the RTL

* **Supply rails, voltage bins and their generation, inverter-pair level
  shifters.** These are analog and physical. Their only logical effect, p_i,
  is in the noise model.
* **Energy.** Energy per operation depends on voltage and circuit. None of
  the energy figures (for example 5.3 pJ for the adder, or the 5.6× saving
  of the radar application) can be checked in RTL.
* **Errors from voltage over-scaling.** A clock faster than the carry chain
  also makes an adder probabilistic. That is a timing effect, and RTL
  simulation has no gate delays.
* **The host processor** and a full-size 2-D radar transform. The
  co-processor works on 4-point blocks. A 256×256 image would need a much
  larger transform built from the same parts.

## Simulating and changing it

All files are SystemVerilog 2017. Each module is in `rtl/<name>.sv` and each
test in `tb/<name>.sv`. The package `pcmos_pkg` must come first:

```
verilator --binary --timing --assert -Irtl -Itb rtl/pcmos_pkg.sv tb/tb_pcmos_matched_filter.sv \
          --top-module tb_pcmos_matched_filter
./obj_dir/Vtb_pcmos_matched_filter
```

Every test ends by printing `TB_RESULT checks=N failures=M`. Each has a
watchdog that ends the run with a failure if it stalls.

Parameters:

* `bivos_rca.WIDTH` sets the adder width (12).
* `array_mult.N` sets the operand width (6).
* `noise_source` has `WIDTH`, `LANES`, `PROFILE`, `SEED`, and the
  geometric-profile constants `P0`, `A` and `R`.
* `pcmos_matched_filter.PROFILE` selects the error profile of the whole
  co-processor.
* `pcmos_pkg::DATA_W` (6) is the sample width. The FFT and filter widths
  follow from it.

The noise model uses `real` parameters only at elaboration, to compute its
constant thresholds. The rest is synthesizable, so the whole co-processor,
noise included, can also be placed on an FPGA to emulate the probabilistic
hardware.
