# Duty-cycled cardiac sensor SoC: digital core in SystemVerilog

A wearable cardiac monitor spends almost all of its time waiting for the
next sample. At 250 samples per second there is nothing to compute most of
the time. Yet a processor that stays powered leaks more energy than it
spends on work. This design splits the chip in two:

- **Always on, but tiny.** A small front end runs at the sampling rate. It
  filters each ECG/VCG sample, compresses the stream and queues it in a FIFO.
- **Mostly asleep, fast when awake.** The processors are power-gated while
  the FIFO fills. When the FIFO holds enough data, they wake on a MHz clock
  and empty it in a short burst. During the burst they remove baseline
  wander, extract features from each heartbeat, and classify the heartbeat
  as normal or abnormal with a trained model (maximum-likelihood or linear
  SVM). Then they go back to sleep.

The RTL covers the digital part of that chip:

- the configuration FSM that duty-cycles it;
- one data management processor per channel (FIR, adaptive compressor,
  FIFO, multi-rate morphological filter, recovery). There are three channels
  by default (`NCH`), for a three-lead vectorcardiogram;
- the machine-learning processor: wavelet delineator, shape analyzer,
  CORDIC, feature-vector buffer, learned-model memory and the switchable
  classification engine;
- the instruction and data memories of the general-purpose processor.

The analog front end and ADC sit outside this RTL, as do the oscillators,
the power switch and its controller, the RISC core and its bus. They meet
the top module (`cs_soc_top`) at plain ports.

## Clock domains and the burst cycle

| Domain | Clock | What runs there |
|---|---|---|
| system | `clk_sys`, 8–32 kHz | `config_fsm`: sample-rate and chopper dividers, sleep/burst sequencing |
| pre-processing | `clk_pp` | FIR, compressor, FIFO write side |
| burst | `clk_dsp`, 25/40 MHz | FIFO read side, baseline filter, recovery, ML processor, IM/DM |

The pre-processing domain stands in for a self-timed pipeline. The intended
silicon runs the filter and compressor from latches with a four-phase
handshake, not from a clock. Here they are ordinary flip-flops on their own
clock with valid/ready handshakes. Any `clk_pp` that is fast enough to take
one sample per `fs_tick` gives the same results.

One burst proceeds as follows.

1. **Collect.** `config_fsm` is in COLLECT, with `en_sleep=1` and
   `cpro_en=0`. Samples arrive on `smp_*`, once per `fs_tick`. They pass
   through the FIR and the compressor into the FIFO. The burst side does not
   read the FIFO, because its `drain` input is low.
2. **Request.** When any channel's FIFO level reaches `burst_th`,
   `burst_req` rises.
   The FSM synchronises it, powers up (`en_sleep=0`, `cpro_en=1`) and waits
   `wake_cycles`.
3. **Burst.** The FSM raises `run`. The burst domain synchronises it into
   `run_dsp` and starts draining the FIFO. The baseline filter and recovery
   turn the drained data into one uniform stream per channel on
   `sig_valid[c]/sig_data[c]`. `ch_sel` picks the stream that the ML
   processor watches. The
   processor then drives the ML processor: it starts the shape analyzer on
   segments of that stream, runs the CORDIC, writes its own features and the
   model, and starts the classifier.
4. **Finish.** When the processor raises `gpp_done`, every FIFO is empty, the
   ML processor is idle and no sample is in flight, `dsp_done` rises. The FSM
   drops `run`, waits for `dsp_done` to fall, and goes back to sleep. This
   is a four-phase exchange, so each side only ever samples a level that has
   settled.

## Compression and the multi-rate baseline filter

These two blocks are the least conventional part of the design, and they
only work together.

**Adaptive compressor** (`adaptive_compressor`):

- It cuts the filtered signal into blocks of 16 samples.
- For each block it measures `max - min` and compares it with four
  descending thresholds `th[0..3]`. The result is a decimation factor
  N ∈ {1, 2, 4, 8, 16}:
  - at least `th[0]` gives N=1;
  - at least `th[1]` gives 2;
  - and so on down the list;
  - a block below all four thresholds gives 16.
- A QRS complex keeps every sample. A flat stretch keeps one sample in 16.
- Each kept sample leaves as a 19-bit `csample_t`: the value plus
  `rate = log2(N)`. The rate is also the distance, in raw samples, to the
  next kept sample.

**Multi-rate morphological filter** (`morph_filter`):

- It estimates the baseline directly on these compressed samples, so a
  window of W entries covers up to 16·W raw samples. A window of a few
  seconds therefore needs far fewer registers than a filter at the raw rate.
- The baseline is an opening (erode, then dilate, window `W_OPEN`) followed
  by a closing (dilate, then erode, window `W_CLOSE`). The opening removes
  positive peaks and the closing removes negative ones.
- Each of the four stages is a shift register with a min or max tree.
- The filter subtracts the baseline from the compressed sample, delayed by
  `LAG = W_OPEN + W_CLOSE + 2`. The rate tag travels with the sample.
- At start-up, the first sample is copied into every register.

**Data recovery** (`data_recovery`):

- It interpolates linearly between consecutive compressed samples p and s:
  `y[j] = p + ((s-p)·j >>> r)`, for j = 0 … 2^r − 1.
- Every factor is a power of two, so this needs a shift, not a divide.

With `mf_bypass=1`, compressed samples go straight to recovery. This is the
output multiplexer of the data management processor.

Limits to be aware of:

- The filter works on compressed samples, so its window in seconds depends
  on how busy the signal is. The defaults of 31 and 47 compressed samples
  span roughly 0.5 s and 0.75 s at an average factor of 4 and 250 S/s. A
  window of 2–3 s needs larger parameters.
- The compressor's lossless entropy coder is **not** implemented. The FIFO
  stores the decimated samples uncoded.

## Machine-learning processor (`mlp`)

### Wavelet delineator

`wavelet_delineator` watches the recovered stream and marks the fiducial
points of each heartbeat. It reports them as sample indices (modulo 2^16)
in one `beat` pulse.

It uses one Haar wavelet scale, 2^K with K=2 (H=4 samples), built from
two running sums over the last 2H samples:

    A = Σ x(n−i), i<H        B = Σ x(n−i), H≤i<2H
    d = A − B   (slope of the smoothed signal)
    s = A + B   (smoothed signal)

Both are centred on sample n−H. The search rules are ports, so the
processor can retune them at run time:

| Point | Rule |
|---|---|
| QRS start | `d > th_r` |
| R | first `d ≤ 0` after the QRS start |
| QRS onset (Q) | last quiet sample (`|d| < th_on`) before the QRS start |
| S | first `d > −th_on` after `d` went below `−th_r` |
| T | largest `s` in R+`t_lo` … R+`t_hi`; the beat is reported at R+`t_hi` |
| P | largest `s` among quiet samples since the previous beat |

The delineator gives up on a rise or fall that lasts longer than `win_qrs`.
This rejects baseline steps. It also reports `rr`, the distance from the
previous R.

The processor uses these points to choose shape-analyzer windows
(`sa_start`, `sa_len`) and interval features. This is a simple,
single-scale delineator. Its rules were tuned on synthetic beats, not on
clinical recordings.

### Shape analyzer

`shape_analyzer` computes skewness (M=3) or kurtosis (M=4) of the next
`len` samples (1–128) of the signal stream:

    SA = (1/L Σ(x−m)^M) / (1/L Σ(x−m)²)^(M/2)

It evaluates an equivalent form that needs one square root at most:

- kurtosis: `L·S4 / S2²`;
- skewness: `L·S3 / (S2·√(S2·L))`.

Here S2 = Σ(x−m)² and SM = Σ(x−m)^M. The sequence is:

1. Store and sum the window.
2. Take the integer mean m with the shared divider.
3. Make one pass over the window to accumulate S2 and SM.
4. For skewness only, take a square root.
5. Do one divide.

The divider is a restoring shift-and-subtract divider (`udiv_seq`, 16
quotient bits). The square root is computed digit by digit (`usqrt_seq`).
Neither uses a multiplier. The result is signed Q7.8, saturated to ±128. A
flat window gives 0. For L=128, `done` comes about 165–191 clocks after the
last sample, inside a budget of 300 cycles.

### CORDIC

`cordic_vec3` returns three values for a vector (x, y, z):

- the magnitude;
- the azimuth atan2(y, x);
- the elevation atan2(z, |xy|).

It makes two vectoring passes of 16 iterations each. The gain is corrected
after each pass. Angles are 16-bit binary angles (0x8000 = 180°). The
latency is 2·ITER+4 = 36 clocks.

### Feature vector

`fv_buffer` holds 128 registers of 16 bits. Each register has its own write
enable, so only the register that is written is clocked. It has two
combinational read ports. `mlp` arbitrates the writes, one per clock:

1. a processor write (`host_fv_*`) comes first;
2. then a finished shape-analyzer result, at `sa_fv_addr`;
3. then the three CORDIC results, at `cd_fv_addr` +0, +1 and +2.

A result waits in its unit until it is written.

### Classification engine

`class_engine` reads the feature vector and the 4 KB learned model
(`model_mem`: 2048×16, two read ports). It has one datapath with an adder,
two multipliers and two accumulators, and two modes.

**MLC (maximum a posteriori)**, for classes c = 0 … ncls−1:

    S_c = (K_c <<< 16) + Σ_j d_j · Σ_i d_i · W_c[j][i],   d = FV − μ_c

- K_c is −2 ln P(c) + ½ ln|Σ_c|, precomputed offline.
- W_c is ½ Σ_c⁻¹.
- The engine picks the smallest score. On a tie, the lower class wins.
- Each class takes about N²+N+5 clocks.
- Model layout, class c at base c·(2+N+N²):
  `K lo, K hi, μ[0..N−1], W[0][0..N−1], W[1][0..N−1], …`

**Linear SVM**:

    decision = Σ_i FV_i · SV_i − (b <<< 8)

- SV is the trained weight vector, the sum of α·y·(support vector).
- The two multipliers take features 2k and 2k+1 together, so a decision
  takes about N/2+5 clocks.
- The class is 1 (abnormal) when the decision is greater than 0.
- Layout: `b lo, b hi, SV[0..N−1]`.

`alarm` is `cls != 0`, with class 0 meaning normal. `score` holds the
winning MLC score or the SVM decision value.

**Capacity.** The full inverse-covariance matrix costs N² words per class,
so a two-class MLC fits in 4 KB only up to N = 30 features. The SVM fits up
to the buffer's 128 features, since it needs N+2 words.

## Files

| File | Module | Role |
|---|---|---|
| `rtl/cs_pkg.sv` | package | sample, compressed-sample, mode and order types |
| `rtl/cs_soc_top.sv` | `cs_soc_top` | top: FSM, three DMPs, MLP, IM, DM, burst handshake |
| `rtl/config_fsm.sv` | `config_fsm` | Fs/Fchop dividers, COLLECT→WAKE→BURST→RETIRE |
| `rtl/dmp.sv` | `dmp` | one channel: FIR → compressor → FIFO → MF/bypass → recovery |
| `rtl/fir_filter.sv` | `fir_filter` | 32-tap FIR, one MAC, programmable Q1.15 coefficients |
| `rtl/adaptive_compressor.sv` | `adaptive_compressor` | max-min driven decimation |
| `rtl/async_fifo.sv` | `async_fifo` | 1024×19 dual-clock FIFO, Gray pointers |
| `rtl/morph_filter.sv` | `morph_filter` | opening/closing baseline removal on compressed data |
| `rtl/data_recovery.sv` | `data_recovery` | linear interpolation back to uniform rate |
| `rtl/mlp.sv` | `mlp` | ML processor: delineator, SA, CORDIC, FV buffer, model, CE |
| `rtl/wavelet_delineator.sv` | `wavelet_delineator` | Haar-wavelet P/Q/R/S/T search |
| `rtl/shape_analyzer.sv` | `shape_analyzer` | skewness/kurtosis |
| `rtl/udiv_seq.sv`, `rtl/usqrt_seq.sv` | helpers | shift-subtract divider, digit-by-digit square root |
| `rtl/cordic_vec3.sv` | `cordic_vec3` | 3-D vector magnitude and angles |
| `rtl/fv_buffer.sv` | `fv_buffer` | 128×16 feature registers |
| `rtl/model_mem.sv` | `model_mem` | 2048×16 learned-model memory |
| `rtl/class_engine.sv` | `class_engine` | MLC / linear SVM |
| `rtl/sram_1rw.sv` | `sram_1rw` | 2048×32 byte-enabled memory, used for IM and DM |

Every module has a testbench `tb/tb_<module>.sv` that checks itself against
values computed independently. Each one ends with a line
`TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert --top-module tb_cs_soc_top \
        rtl/cs_pkg.sv $(ls rtl/*.sv | grep -v cs_pkg) tb/tb_cs_soc_top.sv
    ./obj_dir/Vtb_cs_soc_top

To run another test, change the top module and the testbench file.

`tb_cs_soc_top` runs the whole chip at its default parameters. It feeds a
synthetic ECG on three leads, with gains 1, 0.6 and −0.5. The ECG has
baseline wander, a QRS spike every 100 samples, a T hump and noise. Over six sleep/wake bursts it checks the following:

- the shape analyzer against a floating-point skewness/kurtosis on exactly
  the samples it consumed;
- MLC and SVM scores recomputed from the feature-vector contents;
- the alarm, whose sign is set by a processor-written feature;
- delineated beats spaced 100 samples apart, as in the synthetic signal;
- IM/DM read-back;
- that the baseline filter pulls the output much closer to zero than the
  bypass path does.

It also counts that each mechanism happened at least once:

- bursts;
- at least three decimation factors;
- the filter both on and bypassed;
- skewness and kurtosis;
- CORDIC;
- MLC and SVM;
- the alarm both raised and clear;
- beats found by the delineator;
- the ML processor switching from channel 0 to channel 2.

It simulates about 4 ms of chip time in a few seconds.

The block testbenches include the following checks:

- `tb_fir_filter`: random coefficients against a bit-exact model.
- `tb_adaptive_compressor`: each threshold band.
- `tb_async_fifo`: unrelated clocks, with random stalls on both sides.
- `tb_morph_filter`: a reference computed with explicit windows, at two
  sizes.
- `tb_data_recovery`: exact interpolation.
- `tb_dmp`: the `burst_req` level and bypass versus filtered output.
- `tb_shape_analyzer`: floating-point reference and the cycle budget.
- `tb_cordic_vec3`: angle and magnitude against `$atan2`/`$sqrt`.
- `tb_class_engine`: MLC and SVM, checked exactly, including cycle counts.
- `tb_config_fsm`: divider periods and the sleep/wake sequence.
- `tb_wavelet_delineator`: synthetic beats with known P/Q/R/S/T points,
  plus a baseline-step artifact that must be rejected.
- `tb_sram_1rw`: byte enables.

## Where this design departs from the chip it models

- **Clocked, not self-timed, pre-processing.** The latch-based four-phase
  handshake pipeline is replaced by flip-flops on `clk_pp`. The run-time
  power gating inside that pipeline is not modelled.
- **Five decimation factors from four thresholds.** The compressor is
  sometimes described as having "four sampling rates". Here the four are the
  thresholds, and the factors are 1, 2, 4, 8 and 16.
- **No lossless coder** after the compressor (see above). The FIFO is one
  memory array, not a register/memory hybrid.
- **FIFO word is 19 bits** (value + rate tag) × 1024. That is about 2.4 KB,
  against a 1–2 KB FIFO.
- **Baseline filter windows** are parameters, counted in compressed samples.
- **Memories** are behavioural arrays, inferred as memories by synthesis.
  The learned model is one dual-read-port array, not separate banks.
- **Channel sharing.** There are three channels, each with its own FIR,
  compressor, FIFO, filter and recovery. They share coefficients and
  thresholds. The ML processor watches one recovered stream at a time, chosen
  by `ch_sel`. The processor reads the other streams from `sig_*`, for
  example to feed the CORDIC with an (x, y, z) sample.
- **Delineator.** It uses one Haar scale and the simple rules above, not a
  multi-scale quadratic-spline search. Its points go to the processor, which
  starts the shape analyzer. The delineator does not start it directly.
- **One burst clock.** The chip runs its processors from two replica
  oscillators, 25 and 40 MHz. Here the FIFO read side, the filter, the ML
  processor and IM/DM all share `clk_dsp`. The testbench runs it at 40 MHz.
- **Burst control.** Waking at a FIFO level, `wake_cycles`, and ending a
  burst on `gpp_done` plus an empty pipeline are choices made here.

## Not implemented

- **Iterative multichannel autoregressive (Burg) estimator.** It would
  produce 36 coefficients for 3 channels at order 4. It is not implemented.
- **Not modelled:**
  - the AES-128 engine and the random-number generator;
  - the 32-bit RISC core and the DMA/AHB bus;
  - the analog parts: AFE, ADC/TDC, oscillators, standby controller and
    power switch.

  Their interfaces are the ports of `cs_soc_top`.
- **Classification modes.** Polynomial-kernel SVM and k-NN are not
  implemented. They would be run by the processor.

## Sizes

At the defaults, the top synthesises (coarse, generic cells) to:

- about 5.8 k cells;
- 25 k flip-flop bits, mostly the three FIR delay lines, the three
  morphological filters' shift registers and the shape-analyzer window;
- 222 k memory bits: three FIFOs, the learned model, IM and DM.
