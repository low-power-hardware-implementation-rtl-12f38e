# Seizure detector with on-chip SVM training

This RTL detects epileptic seizures in a single EEG channel. It is built for low power and low area. Every epoch of 256 samples is reduced to three cheap features:

- a Higuchi-style fractal dimension;
- a simplified Hurst exponent;
- the coastline (line length).

A linear support vector machine (SVM) then labels the three-feature vector as *seizure* or *no seizure*. The same chip can also **train** the SVM. Labelled epochs are stored in an on-chip training memory. A hardware implementation of Platt's Sequential Minimal Optimisation (SMO) solves for the Lagrange multipliers. The support vectors are then copied into the classifier's model tables. A new decision is ready 16 clock cycles after a feature vector arrives.

Every feature formula is simplified so that it needs no divider and no logarithm:

- constant divisions are removed, or done by shifting;
- each `ln` is replaced by an integer square root;
- the Hurst exponent loses its division by the standard deviation.

The SVM datapath uses truncated multipliers throughout. Multiplying by a ±1 label is only a sign flip.

## Signal flow

```
 sample[7:0] ──► feature_extractor ──► fd, hurst, cl ──► scale to 16-bit words ──► x[0..2]
                 (fractal_dimension,                                                  │
                  hurst_exponent,              train_mode=1                           │ train_mode=0
                  coastline, isqrt)        ┌────────────────────────────┐             ▼
                                           ▼                            │      svm_classifier
                              store sequencer (x, y, alpha=0)           │      (3 model tables,
                                           │ host port                  │       classifier block,
                                           ▼                            │       inner_product)
                  smo_trainer: smo_controller ─► smo_processing_unit    │             │
                               smo_memory_interface ─► smo_main_memory  │             ▼
                                           │ host port                  │      seizure, score
                                           ▼                            │
                               model_loader ──► classifier load ports ──┘
```

`seizure_detector` is the top module. It contains everything above, plus a small sequencer that writes each training epoch into the trainer memory.

## Number format

- SVM datapath words (`svm_pkg::word_t`) are 16-bit two's complement with 8 fraction bits.
- C = 1.0 is `256`.
- Labels are stored as one bit: `0` means y = +1 (seizure) and `1` means y = −1.
- Multiplying by y therefore negates the value, with saturation at −32768.
- All additions saturate.

`truncated_multiplier` is the only multiplier type used:

- It multiplies the operand magnitudes (sign-magnitude style) and drops the partial-product bits whose weight is below 2^6.
- It adds 2^5 to make up for the dropped bits on average.
- It shifts right by 8, saturates to 2^15−1 and applies the XOR of the operand signs.
- The result therefore differs slightly from an exact product. The testbenches use a bit-exact model of this rule (`tb/tb_ref_pkg.sv`).

## Feature extraction

All three units see the same sample stream, and each epoch is D = 256 samples. The extractor joins their three results into one `feat_valid` pulse.

| feature | hardware formula | width |
|---|---|---|
| fractal dimension | L_m = sat8((Σ over the epoch of \|x(n) − x(n−5)\| for phase m) >> 8), for m = 0..4; fd = Σ_m isqrt(L_m) | 8 bits |
| Hurst | MAV = (Σ\|x\|) >> 8. Y_t = Σ_{i≤t}(x_i − MAV). R = \|\|max Y\| − \|min Y\|\|. hurst = isqrt(R) | 15 bits (R is 30 bits) |
| coastline | Σ\|x(n) − x(n−1)\| over the epoch, saturating | 20 bits |

The fractal dimension uses five accumulators, one per phase of the lag k = 5. At the end of the epoch the five lengths are divided by 256 (a shift) and limited to 8 bits. One shared sequential square root processes them in turn. The division by ln(1/k) and the 1/(N−1) factor are constants, so they are dropped.

The Hurst unit needs the mean before it can form the cumulative deviation, so it keeps the epoch in a 256 × 8-bit buffer. After the last sample it makes a second pass over the buffer to find max Y and min Y. During this pass (D + 1 cycles) it drops `sample_ready`, which is the only back-pressure in the design. At 256 samples/s and any practical clock the stall is never visible. The testbenches drive samples back to back, so they do hit it.

`isqrt` is a digit-by-digit square root. It produces one result bit per cycle, so `done` comes IW/2 + 1 cycles after `start`.

Before classification, `seizure_detector` shifts each feature and saturates it to a 16-bit word. A positive shift amount shifts right and a negative one shifts left. The defaults are `FD_SH = -4`, `HU_SH = -2` and `CL_SH = 3`, which put typical features between about 0.5 and 5 in the 8.8 format. A fixed positive scale per feature does not change which side of a linear boundary a point lies on. It does change precision, though. With the fraction bits left empty (for example an unscaled fractal dimension), the training arithmetic loses most of its resolution. With features that are too large, the kernel saturates. The real-time workload test found this: an earlier choice of smaller features trained a model that misclassified seizure epochs.

## SMO trainer

This is the most involved part of the design.

### Memory and its interface

`smo_main_memory` has three banks. Each has registered reads, so data arrives one cycle after the address.

- **X**: M × N words (M = 64 points, N = 3 features), at word address `point*N + feature`. It has two read ports, so both points of a kernel are read in the same cycle.
- **alpha**: M words.
- **Y**: M one-bit labels.

`smo_memory_interface` shares the banks among four clients. Each client drives a `mem_req_t` (`req`, `we`, `bank`, `addr`, `addr2`, `wdata`):

- A client must hold its request until `gnt`. An assertion in the interface checks this rule.
- Writes complete at the grant.
- Read data returns with `rvalid` in the next cycle. `rdata2` carries the second X port.
- Arbitration is per bank with fixed priority (lowest client index wins). Clients that use different banks are therefore served in the same cycle.

The clients are:

| index | client |
|---|---|
| 0 | host port: the store sequencer, then the model loader |
| 1 | processing-unit controller (cache loads, alpha write-back) |
| 2 | kernel unit |
| 3 | learned-function unit |

### One SMO step (`smo_processing_unit`)

For a pair (i, j):

1. **Cache.** Read α_i, α_j, y_i, y_j into `smo_register_file`. This file also holds b, the two new alphas and E_i, E_j. `b` survives between steps and is cleared when training starts.
2. **Kernels.** `kernel_function` computes k_ii, k_jj and k_ij together with three multiply-add units. It reads one feature of both points per dual X read. Without contention this takes N + 2 cycles.
3. **Errors.** `learned_function` computes E_t = Σ_k α_k y_k (x_k·x_t) − b − y_t, first for i and then for j. It reads α_k first and skips the point completely when α_k = 0 (most points). Otherwise it forms the dot product feature by feature, reads y_k and accumulates. The kernel products and the α·K product share one multiplier. A zero alpha costs about 4 cycles; a non-zero one about 2N + 6.
4. **Check.** `limits_calculator` forms the box [L, H] with two adders and some muxes:
   - different labels: L = max(0, α_j − α_i), H = min(C, C + α_j − α_i);
   - equal labels: L = max(0, α_i + α_j − C), H = min(C, α_i + α_j).

   η = 2k_ij − k_ii − k_jj. If η ≥ 0 or L ≥ H, the pair is rejected (`skipped_eta` pulse) and nothing is written.
5. **New α_j.** α_j' = clip(α_j − y_j (E_i − E_j)/η, L, H). `fx_divider` is a restoring divider giving one quotient bit per cycle, 25 cycles in all, and it saturates.
6. **New α_i.** α_i' = clip(α_i + y_i y_j (α_j − α_j'), 0, C). If |α_j' − α_j| ≤ EPS (EPS = 0), the step counts as unchanged.
7. **Bias** (`bias_calculator`):
   - b1 = E_i + y_i Δα_i k_ii + y_j Δα_j k_ij + b;
   - b2 = E_j + y_i Δα_i k_ij + y_j Δα_j k_jj + b.

   The new b is b1 if 0 < α_i' < C, else b2 if 0 < α_j' < C, else (b1 + b2)/2. Two multipliers (registers A and B) compute one equation in two cycles. The averaging case needs both equations and one more cycle, 6 cycles in all.
8. **Write-back.** Both alphas are written to the alpha bank, and `changed` is reported with `done`.

A step costs about 2·(4M + 12·SV) + 60 cycles, where SV is the number of non-zero alphas. The error computations dominate.

### Pair selection and stopping (`smo_controller`)

The controller pairs i = 0..n−1 with j = (i + s) mod n. The stride s starts at 1 and advances by one per pass, wrapping within 1..n−1, so every pair is eventually visited.

- A pass with no changed pair ends training as **converged**.
- Otherwise training stops after `max_passes` passes. This is a run-time input; 0 behaves as 1.
- With fewer than two points, training finishes at once as converged.

The heuristic is deliberately kept outside the processing unit. A different selection rule only replaces this module.

## Classifier

`svm_classifier` computes f(x) = Σ α_k y_k (x·sv_k) − b over the stored support vectors only, and reports class = (f ≥ 0) as *seizure*. The model sits in three `classifier_rom` tables, each with a registered read and a load port:

| table | size | contents |
|---|---|---|
| support vectors | NSV·N words | the stored points |
| alphas | NSV words | their alphas |
| labels | NSV bits | their labels |

An address FSM reads one support-vector word per cycle. The classifier block:

- forms α·y from the alpha and label tables by a sign flip;
- multiplies each test feature by the table word;
- adds the last feature's product on the fly.

This makes each dot product cost exactly N cycles. `inner_product` (one multiplier, one adder) then adds α·y·(x·sv) to an accumulator that starts at −b.

`valid_out` comes nsv·N + 1 cycles after `start`. With the defaults (NSV = 5, N = 3) that is **16 cycles**. If fewer support vectors are loaded, the result comes earlier. With none loaded, f = −b is ready after 1 cycle.

## Model loader and top-level use

After SMO ends, `model_loader` walks the training points through the host port. Each point with α ≠ 0 goes into the next free classifier slot: its alpha, its label and its N features. The loader then writes b and the vector count. If training produced more than NSV support vectors, only the first NSV in point order are kept and `sv_overflow` is set. The model is then only an approximation, and the host should retrain with a smaller set, a different C, or accept it.

How to drive `seizure_detector`:

1. Reset with `rst_n` low. Stream samples with `sample_valid`, holding each until `sample_ready`.
2. **Collect training data.** With `train_mode = 1`, give `epoch_label` (1 = seizure) together with the last sample of each epoch. Each finished feature vector is stored as the next training point. `n_points` counts the stored points, and `points_full` reports a refused vector when M points are already stored. `clear_points` empties the set.
3. **Train.** Pulse `train_start` with `max_passes` set. `training` stays high until the model is loaded; then `train_done` pulses and `model_ready` is set. These outputs report the run: `converged`, `passes`, `bias`, `n_sv`, `sv_overflow`, `pairs_changed` and `pairs_skipped`.
4. **Detect.** With `train_mode = 0` and `model_ready` set, every epoch produces `seizure` and `score` with a `seizure_valid` pulse, 16 cycles after `feat_valid`.

The three raw features (`fd`, `hurst`, `cl`, `feat_valid`) are also brought out.

## Where this design makes its own choices

The feature formulas, the SMO step and its sub-units, the classifier structure and the 16-cycle classification latency follow the original architecture. These points were not specified there and are choices of this RTL:

- **Epoch and channels.** D = 256 (one second at 256 samples/s). There is one channel; a 23-electrode recording would need one extractor per channel or time sharing.
- **Hurst range.** R is taken as the difference of the absolute extremes of the cumulative deviation. The epoch buffer for the second pass is this design's own.
- **Word format.** 8 fraction bits, and the feature scaling shifts.
- **Truncated multiplier.** The number of dropped columns (6) and the rounding constant.
- **Memory.** The bank organisation, the request/grant protocol and fixed-priority arbitration.
- **Update rule.** Platt's form α_j − y_j(E_i − E_j)/η. The rejection rules (η ≥ 0, L ≥ H, no change in α_j) are standard SMO practice.
- **Pair selection.** The sweep heuristic and the run-time pass limit.
- **Classifier model size.** NSV = 5 (which yields the 16-cycle latency) and sequential per-feature dot products.
  - The original describes a dot-product unit as wide as the feature count.
  - It also gives the model tables a width of one data word.
  - This RTL follows the table width, with one feature per cycle.
- **Model transfer.** The load ports on the model tables and the whole model-loader path. The original treats the tables as ROMs filled after offline or on-chip training.
- **Preprocessing.** None: the classifier works on raw feature vectors.

## Verification

Each block has a self-checking testbench `tb/tb_<module>.sv` that compares it against an independent model. Each testbench prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog. Some highlights:

- `tb_truncated_multiplier`, `tb_fx_divider`, `tb_isqrt` and `tb_limits_calculator`: corner cases plus many random operands against the arithmetic definitions.
- `tb_smo_processing_unit`: 480 consecutive SMO steps on random data sets through the real memory interface. Alphas, b and the changed/rejected flags must match a software SMO step bit for bit. All three outcomes occur.
- `tb_smo_trainer`: whole training runs (12 to 64 points) against a software model of the same sweep. All alphas, b, the pass count and the pair counts must match exactly, and separable sets must classify their own points correctly. One run stops on the pass limit.
- `tb_svm_classifier`: random models with 0 to 5 support vectors. The score must be exact and the latency nsv·N + 1.
- `tb_seizure_detector`: the whole chip at default parameters, in two phases.
  - Phase A: synthetic normal and seizure epochs are collected, trained on, and then classified correctly.
  - Phase B: a full, noisy 64-point set forces the pass limit and support-vector overflow.
  - It counts every mechanism: input stall, set full, update, rejection, convergence, pass-limit stop, zero-alpha skipping, overflow, both decisions and the 16-cycle latency.
- `tb_workload_realtime`: the intended use. Samples arrive paced (one every 400 cycles), a set of 16 labelled triangle-wave epochs is trained on chip, and then a normal epoch, a seizure epoch and 8 random epochs are classified. No sample may stall, every feature vector must be ready before the next sample, and every decision must be correct.

Shared test code lives in `tb/tb_ref_pkg.sv` (reference arithmetic and the SMO step model) and `tb/tb_mem_model.sv` (a memory that grants after a random delay).

To simulate with Verilator 5 from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/svm_pkg.sv tb/tb_ref_pkg.sv tb/tb_seizure_detector.sv \
  -y rtl -y tb --top-module tb_seizure_detector -o sim
./obj_dir/sim
```

Replace the testbench name to run any other block. The end-to-end test finishes in a few seconds.

## Sizes and parameters

| parameter | default | where |
|---|---|---|
| D (epoch length) | 256 | top, feature units |
| M (training points) | 64 | top, trainer, memory |
| N (features) | 3 | SMO units, classifier |
| NSV (classifier support vectors) | 5 | top, classifier, loader |
| W / F (word / fraction bits) | 16 / 8 | `svm_pkg` |
| C | 256 (1.0) | top `C_PARAM` |
| FD_SH / HU_SH / CL_SH | −4 / −2 / 3 (negative = left shift) | top |

The index widths follow from M. `svm_pkg::MAXIDX` (12 bits) limits M·N to 4096 words.
