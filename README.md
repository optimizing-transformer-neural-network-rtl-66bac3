# Transformer outlier detector: RTL for vanilla and linear-attention encoders

This design flags outliers in a time series, such as a spike in a price feed, with a small
transformer encoder. It does so with a fixed, known latency. A window of 8 consecutive time
steps goes in. For every step in the window, one score (a logit) and one decision
(outlier / normal) come out. Two models are built, and they run independently of each other:

| model | attention | encoder layers | heads | feed-forward width | cycles per window |
|---|---|---|---|---|---|
| vanilla | scaled dot-product + softmax | 2 | 2 | 16 | 1112 |
| linear  | kernelised, phi(x) = elu(x)+1 | 1 | 1 | 16 | 562 |

The model sizes (window 8, 2 heads, feed-forward 16, 2 layers or 1 layer) and the main
structure come from a published FPGA study of transformers for real-time outlier detection.
That study built floating-point designs with high-level synthesis. Everything is computed
from data the hardware already holds, and nothing waits on memory or on the data, so the
latency is the same for every window.

This RTL is a hand-written, fixed-point implementation of that structure. It is not a copy of
the synthesized HLS output. The section [Departures and own choices](#departures-and-own-choices)
lists what differs.

## One inference, end to end

```
x_in[8][2] --capture--> embedding (linear 2->8) --> encoder layer x N --> classifier (linear 8->1) --> logit[8], anomaly[8]
                                                      |
                               R = X + Attention(X);  Y = R + FFN(R)
```

* **Input.** 8 time steps with 2 features each: the min-max scaled price, and its first
  difference x[i-1] - x[i]. The window is captured on the `start` edge, so the source may
  change afterwards.
* **Embedding.** A linear layer lifts each step from 2 features to the model width D = 8.
* **Encoder layer.** The attention sub-layer is followed by a residual add. The feed-forward
  sub-layer, `ReLU(x W1^T + b1) W2^T + b2`, is followed by a second residual add. Layer
  normalisation is the identity and there is no positional encoding. This matches the
  evaluated models, which were trained with both switched off.
* **Classifier.** A linear layer gives one logit per step. A step is flagged when logit > 0,
  which is the same as sigmoid(logit) > 0.5.

Every stage starts on the `done` pulse of the stage before it. Each hand-over costs one
cycle. Latency at the default sizes:

| step | vanilla | linear |
|---|---|---|
| input capture | 1 | 1 |
| embedding (8x2 · 2x8) | 65 | 65 |
| per encoder layer: attention | 320 | 288 |
| per encoder layer: residual, FFN, residual | 1 + 195 + 1 | 1 + 195 + 1 |
| hand-overs between stages | 3 | 2 |
| classifier | 9 | 9 |
| **total** | **1 + 65 + 2·517 + 3 + 9 = 1112** | **1 + 65 + 485 + 2 + 9 = 562** |

At 100 MHz these are 11.1 µs and 5.6 µs per window.

## The matrix engine (`matmul_engine`)

Every linear layer and every matrix product in the model runs on one kind of engine. The
engine computes `C = A · B + bias` and writes one element of C per clock:

* The loop over output elements is pipelined with an initiation interval of 1.
* The K multiplies of one dot product are fully unrolled. A and B arrive as whole arrays, so
  all K operand pairs are available in the same cycle.
* B arrives transposed (`bt[n][k]`). Weight matrices are stored `[out][in]`, so they wire in
  directly, and `Q · K^T` needs no reordering.
* Pipeline: issue (i, j) → register the K full-width products → add them with the bias,
  rescale, saturate and write `C[i][j]`.
* Latency is `M·N + 1` cycles. This is `II·(trips − 1) + body latency` with II = 1 and a
  body latency of 2.
* Operands must stay stable until `done`. Every engine in the design reads the registered
  output of an earlier engine, or the captured input, so this holds by construction.

Each product in the model has its own engine instance: 3 projections, 2 score engines,
2 P·V engines, an output projection and 2 FFN engines per vanilla layer. This mirrors how
HLS gives each loop its own hardware. Nothing is time-shared.

## Softmax attention (`mh_attention`, `softmax_unit`)

Q, K and V are projected to the full width D = 8, and then split into 2 heads of 4 columns
each. Per head:

1. Scores: `S = Q_h K_h^T` (8×8). One engine per head, with both heads in parallel.
2. `softmax_unit` works on one row at a time:
   * it scales the row by 1/√d_k (0.5 here);
   * it subtracts the row maximum, so every exponent is ≤ 0 and the largest term is
     exactly 1;
   * it evaluates `exp` one element per cycle and keeps a running sum;
   * it forms 1/sum with one divider;
   * it multiplies all 8 elements by 1/sum in one cycle.

   A row takes N + 3 cycles, and the whole 8×8 matrix takes 88 cycles.
3. `P · V_h`, then the heads are concatenated and go through the output projection.

Because of the max subtraction, large scores cannot overflow the exponential. The softmax
testbench feeds rows near +65, where a plain e^x would saturate.

`exp_unit` computes e^x as 2^(x·log2 e). The integer part becomes a shift. The fractional
part comes from the cubic `1 + f(0.6955569 + f(0.2261736 + f·0.0781456))`, with a relative
error of about 1e-4.

## Linear attention (`linear_attention`, `elu_feature_map`)

Linear attention replaces softmax(q·k) by the similarity φ(q)·φ(k), where φ(x) = elu(x) + 1
(x + 1 above zero, e^x otherwise). Because the similarity factorises, the sums over keys can
be formed once and shared by all queries:

```
a_i = Σ_j (φ(q_i)·φ(k_j)) v_j / Σ_j φ(q_i)·φ(k_j)
    = φ(q_i)^T S / (φ(q_i)·z),   with S = Σ_j φ(k_j) v_j^T (D×D) and z = Σ_j φ(k_j)
```

The hardware reaches this without a separate reduction for z:

1. Three projection engines run in parallel. Two `elu_feature_map` blocks, fully unrolled
   with one `exp_unit` per element, produce φ(Q) and φ(K) combinationally from the
   projection registers.
2. One engine computes `φ(K)^T · [V | 1]`, a D × (D+1) result. The appended column of ones
   makes its last column exactly z.
3. A second engine computes `φ(Q) · [S | z]`, a window × (D+1) result. Its last column is
   each query's denominator φ(q_i)·z.
4. A normalisation stage handles one row per cycle. It divides the D numerators of the row
   by the row's denominator, using D dividers.
5. The output projection follows.

φ is always positive, so the denominator is never zero for real data. A zero denominator
would saturate rather than trap. No window × window matrix and no softmax exist in this path.
At the default sizes the linear attention takes 288 cycles, against 320 for two-head softmax
attention.

## Number format and accuracy

All values are 32-bit two's complement with 16 fraction bits (Q16.16). The range is ±32768
and the step is 1.5e-5.

* Products are formed at full 64-bit width. A dot product is summed at full width and
  rescaled once.
* Every store to 32 bits saturates. Residual adds saturate too.
* Division, used for the softmax reciprocal and the linear-attention normalisation, is
  `(num << 16) / den` truncated toward zero. A zero divisor gives ±max.

The testbenches compare the logits with a double-precision model of the same network, for
inputs in [0, 1] and weights in ±0.4. They accept an error of up to 0.01 + 1%, and the
logits stay within it. Inputs are expected to be min-max scaled to [0, 1], as in training.

## Parameters and how they are loaded

Each detector keeps all its parameters in `param_regfile`, a register array whose words are
all visible at once. A host writes one 32-bit word per cycle through `wr_en / wr_addr /
wr_data`. `rd_addr / rd_data` reads a word back. Do not write while `busy` is high; an
assertion checks this. Word map of one detector (D = model width, F = features, DFF = 16):

| words | content |
|---|---|
| 0 … D·F−1 | embedding weights `[D][F]` |
| next D | embedding bias |
| per layer, `layer_words(D,DFF)` = 568 words | Wq, bq, Wk, bk, Wv, bv, Wo, bo (D×D and D each), W1 `[DFF][D]`, b1, W2 `[D][DFF]`, b2 |
| last D+1 | classifier weights `[D]`, classifier bias |

Matrices are stored row-major as `[out][in]`, as exported from a framework's linear layers.
The vanilla model has 1169 words and the linear model 601. Convert each trained float to
Q16.16 with `round(w · 65536)`.

## Top-level interface (`outlier_detector_top`)

`clk` and an asynchronous active-low `rst_n` are shared by both detectors. Each detector has
its own group of ports:

* `van_*` for the vanilla model, `lin_*` for the linear model;
* `wr_en, wr_addr, wr_data, rd_addr, rd_data` for parameter load and read-back;
* `start` (one-cycle pulse while `busy` is low) and `x[8][2]` for the input window;
* `busy`, `done` (one-cycle pulse) and `logit[8]`, `anomaly[8]` for the results.

Results hold at least until the next `start`. A `start` while busy is ignored. All data are `fx_t`
(Q16.16) from `tfm_pkg`, which also holds the default sizes.

The sizes are parameters (`ROWS`, `N_FEAT`, `D`, `DFF` on the top, and `H`, `N_LAYERS`,
`LINEAR` on `transformer_detector`). The `layer_words`/`model_words` functions in `tfm_pkg`
give the matching word counts. `D` must be a multiple of the head count.

## Departures and own choices

Taken from the source design:

* the model sizes and layer counts;
* encoder-only structure, with positional encoding and layer norm disabled;
* ReLU feed-forward;
* multi-head attention with projections to the full width split into heads;
* max-subtracted softmax;
* linear attention with φ = elu + 1, computed in the reordered (linear-time) form;
* a linear output layer giving the per-step decision;
* the matrix-multiply scheme (middle loop pipelined at II = 1, inner loop unrolled) for every
  product;
* fully unrolled ReLU.

Different from, or not given by, the source design:

* **Arithmetic.** The source uses 32-bit float. Here it is Q16.16 fixed point with
  saturation.
* **Latency.** The source reports 3714 cycles for the vanilla design and 2986 for the
  linear one, with floating-point operators several cycles deep. Here it is 1112 and 562
  cycles, with single-cycle fixed-point multiply-adds. Both are deterministic. Note that the
  linear model is relatively faster here than in the source.
* **Own choices, not given by the source:**
  * model width D = 8;
  * 2 input features (price and difference);
  * the embedding as a linear layer;
  * elu's α = 1;
  * a single head for the linear model (the source lists no head count for it);
  * the e^x approximation;
  * division-based normalisation;
  * the ones-column trick for z;
  * the start/busy/done handshake;
  * the reset;
  * the parameter register file and its word map;
  * the decision on the logit's sign.
* **Not built:**
  * the board-level host that moves windows and results;
  * positional encoding and layer normalisation, which are disabled in the evaluated models;
  * the linear-regression baseline the study compares against.
* **Resources.** The source fits each model into a PYNQ-Z2 device. This RTL spends one
  engine per product, many 32×32 multipliers, and combinational 64-bit dividers. It has not
  been fitted to a particular device.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference values come from
`tb/tb_ref_pkg.sv`, a double-precision model of the whole network. It uses exact `$exp` and
division. It computes linear attention the slow, quadratic way, so it does not share the
hardware's reordering.

| testbench | what it covers |
|---|---|
| `tb_matmul_engine` | 3×4 · 4×3 products, integer and fractional, exact latency M·N+1 |
| `tb_exp_unit` | e^x over [−24, 0], positive arguments, saturation |
| `tb_softmax_unit` | rows needing the max shift, row sums, latency ROWS·(N+3) |
| `tb_relu_array`, `tb_elu_feature_map` | element-wise operators, both branches |
| `tb_feed_forward`, `tb_mh_attention`, `tb_linear_attention` | sub-layers against the reference, exact latency |
| `tb_encoder_layer` | softmax and linear layers side by side, residual paths |
| `tb_param_regfile`, `tb_classifier_head` | parameter storage and read-back; logits, both decisions |
| `tb_transformer_detector` | reduced-size full models (window 4, D = 4), parameter load, exact latency |
| `tb_outlier_detector_top` | both models at full default size (see below) |

`tb_outlier_detector_top` builds a synthetic price series with injected spikes and runs six
windows through both models concurrently. It checks the exact latencies (1112 / 562) and
counts that each mechanism occurred:

* parameter read-back;
* overlap of the two models;
* an ignored start;
* ReLU clipping;
* a shifted softmax maximum;
* both φ branches;
* both decisions from each model.

Its weights are random and untrained. The classifier bias is set to centre the reference
logits, so both decisions occur. It runs in well under a minute.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/tfm_pkg.sv tb/tb_ref_pkg.sv tb/tb_outlier_detector_top.sv \
    --top-module tb_outlier_detector_top -o sim
./obj_dir/sim
```

Replace the testbench name to run any other. Randomised stimulus uses `$urandom`.

## Files

* `rtl/tfm_pkg.sv`: number format, default sizes, fixed-point helpers, weight-layout
  functions.
* `rtl/matmul_engine.sv`, `exp_unit.sv`, `softmax_unit.sv`, `relu_array.sv`,
  `elu_feature_map.sv`: arithmetic building blocks.
* `rtl/mh_attention.sv`, `linear_attention.sv`, `feed_forward.sv`, `encoder_layer.sv`: the
  encoder.
* `rtl/param_regfile.sv`, `classifier_head.sv`, `transformer_detector.sv`,
  `outlier_detector_top.sv`: the models and the top.
* `tb/`: the testbenches and the shared reference model `tb_ref_pkg.sv`.
