# Digital calibration engines for delta-sigma ADCs

Delta-sigma converters built from cheap analog parts lose accuracy in two
places. In a multibit loop, the unit elements of the feedback DAC never match
exactly, and their errors reach the output unshaped. In a MASH (cascaded)
converter, the analog loop filter of the first stage never matches its digital
replica exactly, so part of the first-stage quantization error leaks to the
output. This repository has synthesizable SystemVerilog for two digital engines
that measure such errors in the background, while the converter runs, and
remove them:

* **`dac_cal_top`**: estimation and correction of DAC element errors in a
  multibit MASH ADC with a 33-level (32-element) DAC. The element selects are
  randomly scrambled. The output is then correlated with each element's own
  activity sequence, which gives that element's error, and the product is
  subtracted from the output.
* **`aqnc_top`**: adaptive compensation of first-stage noise leakage in a 2-0
  MASH ADC. A pseudo-random test signal is injected at the first-stage
  quantizer. A six-tap correction filter L_C(z) is tuned, using a sign-sign
  block LMS (SS-BLMS) rule, until no test signal is left in the output.

`dsm_dual_top` places both side by side. They serve different converters and
share only the clock and reset. The analog parts are outside the RTL: the
modulator stages, quantizers, DAC and second-stage ADCs. For simulation they
are replaced by behavioural models in `tb/`.

---

## 1. DAC element-error calibration (`dac_cal_top`)

### The idea

The DAC has M = 32 unit elements. In each sample, the first-stage quantizer
asks for v of them (a thermometer word `d` with v ones). The scrambler picks
*which* v elements are used, at random, and produces `b`. Element i has the
error e_i relative to the average element, with sum(e_i) = 0. So the DAC adds
`sum_i b_i(k) e_i` to the ideal feedback.

Write b_i = mean(b) + n_i. The mean part multiplies sum(e_i) = 0 and drops out.
What remains, `sum_i n_i(k) e_i`, reaches the output y through the converter's
DAC error transfer function (ETF). The sequences n_i are random and broadband,
and the input signal and quantization noise are not correlated with them.
Correlating the output with a filtered copy of n_i therefore picks out e_i.
Two refinements make this exact:

* **Equal status of elements.** The n_i always sum to zero, so they are
  correlated with one another. If every pair of elements is equally
  correlated, each other element's sequence holds -1/(M-1) of n_i. The
  correlation with n_i then returns e_i * M/(M-1) instead of e_i, which the
  estimator scales back by (M-1)/M. This holds only if the scrambler treats
  all elements alike. That is why `scrambler` ranks random keys, a true random
  permutation, instead of using a cheaper butterfly of random swaps. With a
  thermometer input, a butterfly always makes elements i and i+M/2
  complementary. In simulation that bias made the estimates useless.
* **Same filtering on both sides.** The n_i are filtered by `etf_filter` (the
  digital copy of the ETF) into n'_i. Both n'_i and y then pass through
  identical high-pass filters (`hpf`). The filters remove the DAC offset and
  most of the low-frequency input, and they keep both correlator inputs
  aligned.

The estimate and the correction are

```
e_hat_i = (M-1)/M * sum_k y'(k) n''_i(k) / sum_k n''_i(k)^2        (correlator)
z(k)    = y(k) - sum_i n'_i(k) * e_hat_i                            (correction)
```

### Signal path, one sample per clock

```
 d ──► scrambler ──► b ──► (to DAC)
                     │
                     └► mean_sub: n_i = M*b_i - ones(b)
                           └► etf_filter ──► n'_i ───────────┬─► hpf ─► n''_i ─┐
 ones(d), v2 ──► mash_ncl ──► y ─────────────────────────────┼─► hpf ─► y' ────┤
                                   │                         │                 ▼
                                   │                         │       corr (sums + divider)
                                   │                         │                 │ one entry per clock
                                   ▼                         ▼                 ▼
                              dac_correct: z = y - sum n'_i e_hat_i / M ◄── err_ram
                                   │
                                   └► register ─► z
```

| stage | module | timing |
|---|---|---|
| scrambler | `scrambler` | combinational; `b` is valid in the cycle of `d` |
| mean subtraction | `mean_sub` | combinational |
| ETF emulation | `etf_filter` | FIR on n_i(k)..n_i(k-3), default taps {0, 0, -2, 1} |
| noise cancellation | `mash_ncl` | y(k) = v1(k-1) + (1/16)(1 - z^-1)^2 v2(k) |
| high-pass | `hpf` | (1 - z^-1)^2, combinational output |
| correlator | `corr` | sums updated at each clock edge; the estimate of element `k mod M` enters a pipelined divider and is written E_W+1 = 25 clocks later |
| error store | `err_ram` | register file, one write port, all 32 entries read every clock |
| correction | `dac_correct` | combinational; `z` is registered, one clock after its `y` |

One RAM entry is rewritten every clock, so each element's estimate is
refreshed every 32 clocks. The sums are never reset except by `clear`, so the
estimates keep improving while the converter runs.

### Number formats

| quantity | format |
|---|---|
| y, z | signed 24 bits, 16 fractional bits, unit = one DAC element |
| n_i | M * (b_i - mean), integer in [-31, 31] |
| n'_i, n''_i | integers, 10 and 12 bits |
| e_hat_i | signed 24 bits, 24 fractional bits (range +-0.5 element) |
| correlator sums | 56-bit numerator, 44-bit denominator, saturating |

Because n carries the factor M, the estimate simplifies to
`e_hat_i = (M-1) * num_i / den_i`. The correction divides its sum of products
by M * 2^8 (that is, 2^13).

### The converter this is set up for

The ETF taps, the `mash_ncl` combination and the test model all assume the
following first stage:
* a second-order feed-forward first stage with NTF = (1 - z^-1)^2 and unity
  STF, so that a DAC error reaches the first-stage output through
  -(2z^-1 - z^-2);
* a second-stage ADC that digitises 16x the negated first-stage quantization
  error, with a +-8-element full scale and 12-bit codes;
* second-stage codes that arrive one clock late. The z^-1 on the first-stage
  path absorbs this delay.

For a different modulator, change `ETF_C` (and `ETF_NT`). An overall sign or
gain error in the taps does no harm: it scales the estimates by the inverse
factor, and the correction product stays the same. A wrong *delay* in the taps
does matter.

### Parameters of `dac_cal_top`

| parameter | default | meaning |
|---|---|---|
| `M` | 32 | unit elements (33 DAC levels) |
| `N2` | 12 | second-stage ADC code width |
| `HPF_ORD` | 2 | order of both high-pass filters |
| `ETF_NT`, `ETF_C` | 4, {0,0,-2,1} | ETF emulation taps, applied to n(k-j) |
| `WARMUP` | 8 | samples ignored after reset while filters fill |

`M` must be a power of two.

---

## 2. Adaptive noise-leakage compensation (`aqnc_top`)

### The loop

The analog errors of a 2-0 MASH first stage (finite op-amp gain, capacitor
mismatch) leave a residue of the first-stage quantization error in the output.
The residue's transfer function is close to a short polynomial in (1 - z^-1).
A short FIR on the error estimate can therefore cancel it, if its
coefficients are right. Those coefficients depend on the die, the temperature
and the age of the part, so they are learned during operation:

```
ts ──► (analog injection at the first-stage quantizer)
v_c ─► lc_filter: v_l = sum_{i=0..5} l_i v_c(k-i)
v_r = v_m + v_l
v_r, ts ─► ssblms_corr: acc_i = sum over K samples of v_r(k) * (-ts(k-i))
        every K samples: l_i += gamma * sgn(acc_i)
```

The test signal `ts` is a +-1 pseudo-random sequence. It is uncorrelated with
the input and with the quantization errors, so only its own leakage builds up
in the accumulators. Because ts is +-1, each "multiplication" is an add or a
subtract selected by the delayed ts bit. Because only the sign of each block
sum is used, with a step gamma of one coefficient LSB, the coefficients are
plain up/down counters. The design has no multipliers in the update path.

Sign convention: the loop converges when `v_c` carries +ts, that is, when `v_c`
is the first-stage error estimate with the injected test signal in it. Then
l_i goes to minus the leakage tap H_i.

### Parameters of `aqnc_top`

| parameter | default | meaning |
|---|---|---|
| `VC_W` | 12 | width of v_c (second-stage ADC codes) |
| `VM_W` | 16 | width of v_m |
| `L_W`, `L_FRAC` | 16, 14 | coefficient width and fractional bits (range +-2) |
| `K` | 256 | samples per coefficient update |
| `TS_LAT` | 0 | delay of the ts bit used by the correlator, to match injection-to-v_c latency |

Six taps and gamma = 1 LSB follow the original hardware. The block length K
and the word widths are this design's own choices.

`ts_gen` is a 23-bit maximal-length LFSR (period 8,388,607). An earlier 15-bit
version failed in simulation. Its period was shorter than the adaptation time,
so the input sine's correlation with ts no longer averaged out, and the
coefficients settled up to 0.005 away from their ideal values.

---

## 3. Top level (`dsm_dual_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | sample clock; asynchronous active-low reset |
| `dc_cal_en`, `dc_clear` | in | 1 | enable / restart the DAC error estimation |
| `dc_d` | in | 32 | ADC1 thermometer word |
| `dc_v2` | in | 12 | ADC2 code (one clock late) |
| `dc_b` | out | 32 | scrambled element selects to the DAC, same cycle as `dc_d` |
| `dc_y`, `dc_z` | out | 24 | uncorrected / corrected output (16 fractional bits) |
| `dc_e_hat` | out | 32 x 24 | stored element error estimates |
| `lc_en` | in | 1 | sample valid for the leakage compensator |
| `lc_v_m`, `lc_v_c` | in | 16, 12 | uncorrected MASH output; correction input |
| `lc_ts` | out | 1 | test signal (1 = +1) to the analog injection |
| `lc_v_r` | out | 34 | compensated output (14 extra fractional bits) |
| `lc_l` | out | 6 x 16 | coefficients l_0..l_5 |
| `lc_upd` | out | 1 | pulses after each coefficient update |

All registers reset to zero, apart from the fixed LFSR seeds. After reset the
DAC calibration passes y through unchanged until the first estimates arrive.
The leakage compensator starts from all-zero coefficients.

## 4. Verification

Every module has a self-checking testbench, `tb/tb_<module>.sv`, that compares
against values computed independently in the testbench. Each testbench ends
with a `TB_RESULT checks=N failures=F` line. Two behavioural models close the
loops:

* `tb/mash_model.sv`: the analog MASH of section 1, with real-valued
  integrators. It has random DAC element errors (near-Gaussian, rms set by a
  parameter, forced to sum to zero), a DAC offset and a 12-bit second stage.
* `tb/leak_model.sv`: the digital view of a 2-0 MASH that leaks v_c through
  six taps H into v_m, plus a sine and noise.
* `tb/mash20_model.sv`: a 2-0 MASH with a second-order first stage
  (single-bit or tri-level quantizer), the test signal added at its
  quantizer, and a 10- or 12-bit second stage. The
  analog errors enter as the leakage A0 + A1(1 - z^-1) + ... + A4(1 - z^-1)^4
  acting on the first-stage quantization error.

Closed-loop results at the default sizes:

| test | conditions | result |
|---|---|---|
| `tb_dac_cal_top` | 32 elements, 0.1 % rms errors, sine at -0.92 dBFS and 0.0156 x f_clk, 131,072 clocks | estimation error about 2.5 % rms of the true errors; DAC error power in z about 31 dB below y |
| `tb_aqnc_top` | H = {-0.05, 0.035, 0.012, -0.004, 0.002, 0}, 16,384 updates of 256 samples | all l_i within 0.001 of -H_i; residual leakage about 36 dB down |
| `tb_sndr_workload` | ideal DAC, and a mismatched (0.1 % rms) DAC with and without the scrambler, side by side; sine at exactly 128/8192 of the clock, 131,072 calibration clocks, 8192-point DFT over bins 1..1024 (OSR 4) | SNDR 120.0 dB with the ideal DAC. Mismatched DAC: 76.4 dB without element matching, 77.8 dB with scrambling only, 109.3 dB corrected |
| `tb_aqnc_sndr` | two 2-0 MASH designs, tri-level first stage at OSR 8 and single-bit first stage at OSR 4; leakage A0 = 1e-6, A1..A4 = {1e-2, 1e-2, -8e-3, 5e-3}; test signal +-0.1 of the DAC level; 40 million clocks of adaptation at a small input (0.02 of the DAC level), then SNDR of a 0.5-level sine at 67/8192 of the clock; K = 4096, 12 coefficient fractional bits | tri-level: 82.9 dB ideal, 61.1 dB with leakage, 75.5 dB corrected (81.6 dB when stopped at 24 million clocks). Single-bit: 73.6 dB ideal, 39.9 dB with leakage, 63.6 dB corrected |
| `tb_dsm_dual_top` | both of the above at once, top at defaults | same; also counts that scrambling, estimate writes, correction, clear, ts toggling, updates and up/down steps all occur |

The unit testbenches also cover the edge cases: divider saturation and zero
denominators (`tb_corr`), saturation of the coefficient counters
(`tb_lc_filter`), the exact K-sample update cadence (`tb_ssblms_corr`), the
LFSR period (`tb_ts_gen`), and equal pair statistics of the scrambler
(`tb_scrambler`).

For comparison, the original system-level study of this technique reports
102.6 dB with an ideal DAC, 76.2 dB without element matching, 3.1 dB more
with scrambling only, and 101.5 dB corrected. The
model here has a quieter second stage, which explains the higher ideal and
corrected figures. The loss caused by mismatch and the gain from correction
are of the same size.

For the leakage compensator, the original reports a measured gain of 16 to
18 dB on the first (single-bit) prototype, and an almost complete recovery of
a loss of more than 25 dB in simulation of the tri-level design.
`tb_aqnc_sndr` shows gains of the same size (24 dB and 14 to 21 dB), with one
caveat. A sign-sign update sees only the sign of
each block correlation. When a large input sine sits in v_r, that sign is
noisy, and the coefficients wander by tens of LSBs around their targets. The
in-band leakage depends mostly on the *sum* of the six taps, so this wander
costs 5 to 20 dB of the recovery. Hence the long blocks (K = 4096) and the
small input during adaptation in that test. With K = 256 and a full-scale
input, expect the coefficients to need far more updates to settle.

### Running with Verilator

From the repository root, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dac_cal_pkg.sv rtl/aqnc_pkg.sv \
    tb/tb_dsm_dual_top.sv --top-module tb_dsm_dual_top -o sim
./obj_dir/sim
```

Swap in any other `tb/tb_*.sv` and its module name to run that testbench.
`tb_dsm_dual_top` simulates 4.2 million clocks and takes about half a minute.
`tb_aqnc_sndr` simulates 40 million clocks and takes about 35 seconds. The
others take a few seconds at most.

## 5. What is this design's own, and what to watch

The following come from the technique as originally described:
* the structure of both engines;
* the estimator formula with its (M-1)/M factor;
* the correction formula;
* the six-tap L_C(z) with its correlator;
* the once-per-block sign update with a one-LSB step;
* the 32-element DAC;
* the gains 1/16, (1 - z^-1)^2 and z^-1 of the noise-cancellation logic.

The following are choices made here, where the original gives no detail:
* the scrambler algorithm;
* the ETF taps (they depend on the modulator);
* the high-pass filter type and order;
* all word widths and fixed-point formats;
* how the per-clock division is organised (one shared pipelined divider,
  round-robin);
* the block length K = 256 (long blocks settle more precisely, see section 4);
* the test-signal generator;
* the sum v_r = v_m + v_l;
* reset behaviour.

Not covered by the RTL:
* the analog circuits;
* the noise-cancellation logic of the 2-0 MASH that feeds `aqnc_top`: its
  coefficients depend on interstage gains that are not given, so `v_m` and
  `v_c` enter as ports;
* clock-rate targets, such as 100 MHz. Nothing here has been timed; the
  combinational path from `d` through the scrambler's ranking to `b` is long.
