# Energy-efficient link receiver and error-tolerant CNN datapaths

This repository holds synthesizable SystemVerilog for three independent designs. All three
save energy by the same idea: spend precision only where the final decision needs it.

* **BOA receiver.** A serial-link receiver whose flash ADC does not place its comparator
  thresholds on a uniform grid. The thresholds go where they minimise the bit error rate
  (BER) of the link. A 3-bit ADC with *BER-optimal* (BOA) thresholds then does the work of
  a 4-bit ADC with conventional uniform (CUA) thresholds.
* **PredictiveNet unit.** A convolution output unit that first evaluates the dot product
  with only the most significant bits (MSBs) of weights and activations. If that rough
  result is negative, the ReLU output would almost surely be zero, so the unit outputs zero
  and skips the remaining low-order work.
* **RD-SEC CNN stage.** A convolution-plus-pooling stage whose matrix-vector multiplier
  (MVM) is protected by *rank-decomposed statistical error compensation*. The MVM has more
  outputs than inputs, so some outputs are linear combinations of the others. Cheap
  shift-and-add estimators recompute those outputs, and any output that disagrees strongly
  with its estimate is replaced. This lets the multiplier run at a voltage where it
  occasionally makes large timing errors.

`rtl/eesys_top.sv` places the three designs side by side. They share only clock and reset,
and each brings out its own ports (prefixes `boa_`, `pn_`, `rd_`).

---

## 1. The BOA receiver

### 1.1 Signal path

```
vin ─► flash_adc_model ─► gray_encoder ─► lane_deserializer ─► level_encoder ─► lms_equalizer ─► dec
        (15 comparators)   (therm→bin,     (1:40, word_valid)    (code → level)   (3 taps, block LMS)
            ▲               3 stages)                                   ▲              │  e, err
            │ vth[15]                                                   │ lvl[8]       ▼
   threshold_dac_model ◄── dac_sequencer ◄── thresholds ◄── ql_ud (8 × rl_ud) ◄── data_sync (PRBS-23)
```

The ADC samples once per clock. Its input is an 8-bit signed number in DAC LSB units, which
stands for the analog channel output. The comparators are pipelined and so is the
thermometer-to-binary encoder: `comparator_model` has 3 latch stages and `gray_encoder` has
3 register stages. A code therefore appears 6 clocks after its sample. The deserializer
gathers 40 codes into a word, so the digital back end does one step every 40 clocks. This
models a 4 GS/s front end feeding a 100 MHz back end that is 40 lanes wide. Everything runs
on one clock, and `word_valid` serves as the back end's clock enable.

### 1.2 Two ADC modes

`mode` selects how the 15 comparators are used:

| mode        | comparators used | thresholds                                  | level of code c               |
|-------------|------------------|---------------------------------------------|-------------------------------|
| `MODE_CUA4` | all 15           | uniform, `(k-7)·16` LSB                     | `(2c-15)·8` LSB               |
| `MODE_BOA3` | 0 … 6            | mid-points of adjacent adaptive levels      | adaptive level `lvl[c]`       |

In BOA mode comparators 7…14 are parked at +127, so they never fire and the code stays in
0…7. Uniform mode is the starting point. The equalizer converges there, the PRBS checker
locks, and then the receiver switches to 3-bit BOA mode. Loading `lvl_init` (`lvl_load`)
seeds the eight levels at that moment.

### 1.3 Equalizer and error signals

`lms_equalizer` forms `y[j] = Σ_k w[k]·x_r[j-k]` for each of the 40 lanes. The two samples
before lane 0 come from the previous word. The decision is `y ≥ 0`. With the reference bit
`b` from the PRBS checker it computes:

* the error `e = ±TARGET − y`, with TARGET = 32 LSB;
* the bit-error indicator `err = dec ⊕ b`.

Adaptation is block LMS: one update per word with the gradient summed over the lanes,
`w[k] += (Σ_j e[j]·x_r[j-k]) >>> MU_SHIFT`. It runs only while the PRBS checker is locked.
The taps reset to `[0, 1, 0]`, which gives a decision delay of one sample.

### 1.4 Finding the BER-optimal levels (QL-UD / RL-UD)

This is the heart of the receiver. Each of the eight representation levels `r_i` has its own
update unit (`rl_ud`). For every lane and every tap, the unit notes whether that tap's input
sample was quantized to level `i`. If so, the equalizer error flows back to `r_i` through
the tap weight:

* **LMS** (`alg = UPD_LMS`) minimises mean-square error:
  `r_i += (Σ_j e[j]·s_ij) >>> LMS_SHIFT`, where `s_ij = Σ_{k: code[j-k]=i} w[k]`.
* **AMBER** (`alg = UPD_AMBER`) moves levels only on bit errors, which targets the BER
  itself: `r_i += (Σ_{j: err[j]} sign(e[j])·s_ij) >>> AMBER_SHIFT`.

`ql_ud` turns the levels into ADC thresholds, `t_i = (r_i + r_{i+1}) / 2`, rounded and
saturated to the 8-bit DAC grid. The thresholds go to the DAC, and the DAC sets the
comparators. The loop is therefore closed through the analog front end, and a threshold
change reaches the ADC only at the next DAC refresh of that capacitor.

### 1.5 The threshold DAC

One 8-bit DAC core serves 30 storage capacitors. Each pair holds one differential threshold,
`vth[k] = C[2k] − C[2k+1]`. `dac_sequencer` visits 32 slots (30 capacitors plus 2 idle
slots), and each slot has four phases of `DIV` clocks:

1. φ1: charge the unit capacitor to the code;
2. gap;
3. φ2: share the charge with the addressed storage capacitor;
4. gap.

Each φ2 moves the stored value 1/4 of the way to the code (`SHARE_SHIFT = 2`). A changed
threshold therefore settles over roughly 20 sweeps. One sweep lasts 32·4·83 = 10,624 clocks.
At a 4 GHz sample clock that is 2.66 µs, a refresh rate of about 375 kHz per capacitor. The
comparator, flash ADC and DAC are **behavioural models** of analog parts: they are
cycle-accurate but ideal (no offset, noise, leakage or metastability).

### 1.6 PRBS synchronisation

`data_sync` recovers the transmitted bits needed for training. The link carries a
PRBS 2^23−1 sequence with polynomial x^23 + x^18 + 1:

* **Seeding.** While unlocked, the checker loads its 23-bit state from the latest decisions.
  It then predicts each following word with `b[n] = b[n−18] ⊕ b[n−23]`.
* **Lock.** Lock needs `LOCK_WORDS = 4` consecutive words with at most `LOCK_ERRS = 4`
  mismatches. A seed with a single wrong bit predicts almost correctly for a word or two and
  then diverges, so one good word is not enough.
* **While locked.** The generator free-runs.
* **Losing lock.** Lock is dropped after two consecutive words with more than
  `LOSE_ERRS = 8` mismatches.

The receiver counts bits and bit errors while it is locked (`bit_count`, `err_count`).

## 2. The PredictiveNet unit

Write each signed operand as MSB and LSB parts:

* `w = w_m·2^WL + w_l`
* `x = x_m·2^XL + x_l`

Here `w_m` and `x_m` are the top `BW_MSB = 5` and `BX_MSB = 4` bits (arithmetic shift), and
`w_l` and `x_l` are the unsigned low bits. The full dot product splits exactly into

```
y     = y_msb·2^(WL+XL) + y_lsb
y_msb = Σ w_m·x_m + δ_m·2^(…)                      (pn_cmsb: narrow multipliers)
y_lsb = Σ (w_m·x_l·2^WL + w_l·x) + δ_l·2^(…)        (pn_clsb)
```

`y_msb` alone is a coarse, slightly low estimate of `y`. `predictivenet_unit` latches the
operands on `start` and evaluates `y_msb` in the next cycle:

* If `y_msb < 0`, `done` pulses one cycle after start, with `skipped = 1` and `z = 0`.
* Otherwise the unit adds `y_lsb` in one more cycle and outputs the exact `max(y, 0)`, so
  `done` comes two cycles after start.

`n_skip` and `n_full` count the two outcomes. Widths: 7-bit activations, 8-bit weights, a
7-bit bias and 25 inputs (one 5×5 kernel). `z` is 22 bits, in units of 2^-13 when the
operands are read as fractions.

A positive output whose MSB estimate is negative is zeroed. This is the accuracy the scheme
trades away. In the testbenches about 1 output in 10 is affected. With post-ReLU
(non-negative) activations and the flooring MSB split, a non-negative `y_msb` was never seen
together with a negative exact result.

## 3. The RD-SEC CNN stage

### 3.1 Why the estimate exists

A C-layer computes `y = Wᵀx` for each receptive field, with N = 25 inputs and M = 32 outputs.
Since M > N, W has rank R ≤ N and factors as `W = B·[I_R  C_e]`:

* the first R outputs `y_o` are a basis;
* the other M−R outputs are `y_a = C_eᵀ·y_o`.

`rdsec_mvm` computes all M outputs in the main block (`mvm_dpe`, M `dot_product` units). For
each non-basis output, an estimator (`rdsec_eblock`) recomputes `y_e = round(C_e)ᵀ·y_o`.
Every coefficient is rounded to a signed power of two, so the estimator is a set of shifters
and one adder. A coefficient is stored as `{zero, neg, exp}` with exp in −8…7. The decision
per output is

```
y_hat = y_a   if |y_a − y_e| ≤ T_h
        y_e   otherwise          (corrected = 1)
```

Small deviations, such as rounding of `C_e` or small errors, pass through. Large timing
errors, which hit the MSBs, are replaced by the estimate.

### 3.2 Error injection

The `eta` port adds an error to each non-basis output of the main block. It stands in for
near-threshold timing errors and is tied to zero in normal use. The basis outputs are
treated as error-free.

### 3.3 The stage

`rdsec_cnn_stage` wraps the MVM with:

* weight, coefficient and bias buffers, written one entry per clock through `w_*`, `c_*`
  and `b_*`;
* a registered bias-plus-ReLU stage: `z` arrives one clock after `x_valid`, saturating at
  the largest positive value;
* `s_layer`, which pools every 4 consecutive `z` vectors by max or by average (rounding
  down), selected by `pool_mode`. The pooled vector `p` arrives one clock after the fourth
  `z`.

Input vectors should arrive window by window, so that four consecutive vectors form one 2×2
pooling window. `n_corrected` counts replaced outputs.

## 4. Where the RTL departs from or goes beyond the description

* **Clocking.** The receiver back end is a clock-enabled part of the sample-clock domain,
  not a separate 100 MHz clock. The deserializer stands in for FPGA transceivers.
* **Closed threshold loop.** The full closed loop from level update through the DAC to the
  comparators is built and simulated.
* **Choices where no values are given.** The following are this design's own choices: the
  step sizes (`MU_SHIFT = 20`, `LMS_SHIFT = 24`, `AMBER_SHIFT = 16`), the uniform
  threshold spacing, the DAC charge-sharing ratio, the DAC slot timing (`DIV = 83`), the
  PRBS lock rules, the power-of-two coefficient format and the 2×2 pooling window.
* **BOA mode on the 4-bit ADC.** BOA mode reuses the 4-bit ADC by parking half of its
  comparators.
* **Channel drive in the tests.** The receiver tests drive the 20-inch backplane pulse
  response at ±300 LSB with clipping to the ADC range. At lower drive the eye is closed and
  a 3-tap linear equalizer cannot open it.
* **Sizes of the two CNN designs.** Each is a single unit or stage at the first-layer size
  (N = 25, M = 32). Larger layers need the parameters raised: `PN_N = 400` for a 16-map
  5×5 layer, and `RD_N = 800` with `RD_M = 64` for the second RD-SEC layer. The default
  top was not simulated at those sizes.
* **Clock buffers.** The analog clock buffers of the receiver front end have no model.

## 5. Files

| file | role |
|------|------|
| `rtl/boa_pkg.sv`, `rtl/rdsec_pkg.sv` | shared widths, types, enums |
| `rtl/comparator_model.sv`, `rtl/flash_adc_model.sv`, `rtl/threshold_dac_model.sv` | behavioural analog front end |
| `rtl/dac_sequencer.sv`, `rtl/gray_encoder.sv`, `rtl/lane_deserializer.sv`, `rtl/level_encoder.sv` | receiver front end logic |
| `rtl/lms_equalizer.sv`, `rtl/data_sync.sv`, `rtl/rl_ud.sv`, `rtl/ql_ud.sv`, `rtl/boa_receiver.sv` | receiver back end and its top |
| `rtl/pn_cmsb.sv`, `rtl/pn_clsb.sv`, `rtl/predictivenet_unit.sv` | PredictiveNet |
| `rtl/dot_product.sv`, `rtl/mvm_dpe.sv`, `rtl/rdsec_eblock.sv`, `rtl/rdsec_mvm.sv`, `rtl/s_layer.sv`, `rtl/rdsec_cnn_stage.sv` | RD-SEC |
| `rtl/eesys_top.sv` | top level |
| `tb/tb_<module>.sv`, `tb/tb_common.svh` | one self-checking testbench per module |

## 6. Simulating

Each testbench prints `TB_RESULT checks=N failures=M`. Build one with plain Verilator, for
example:

```
verilator --binary --timing -Irtl -Itb rtl/boa_pkg.sv rtl/rdsec_pkg.sv \
    tb/tb_boa_receiver.sv -y rtl -y tb +libext+.sv --top-module tb_boa_receiver
./obj_dir/Vtb_boa_receiver
```

* `tb_eesys_top` runs the whole design at its default parameters, with no overrides. It
  exercises the following and counts a failure for any of them that never happens:
  * PRBS lock, equalizer adaptation and DAC sweeps;
  * the CUA→BOA switch and level movement under LMS and under AMBER;
  * thresholds reaching the comparators;
  * PredictiveNet skips and full computations;
  * RD-SEC corrections and pass-throughs;
  * max and average pooling.

  It simulates about 300,000 clocks and takes well under a minute.
* `tb_mnist_c1_layer` runs the first convolution layer of a small MNIST network through
  the default top on a generated 28×28 image. PredictiveNet computes 16 maps of 24×24. In
  the last run, 56% of the outputs were skipped, and 22,445 clocks were needed against
  27,648 without prediction. RD-SEC computes 32 maps and 2×2 max pooling, with timing
  errors injected on a third of the estimated outputs; every one was corrected and the
  pooled 12×12×32 result was exact.
* `tb_boa_receiver` is the faster receiver test. It overrides `DAC_DIV = 2` and measures
  the BER. In the last run it saw 22 errors in 12,000 bits after AMBER adaptation.
* The block testbenches compare against integer reference models written independently in
  the testbench. They also check the latencies given above: 3 cycles per comparator and per
  encoder, 1 or 2 cycles for PredictiveNet, and 1 cycle for `z` and for pooled `p`.
