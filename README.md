# Noise-aware multi-target speech enhancement processor

This is synthesizable SystemVerilog for a speech enhancement (denoising) processor. It runs a
deep neural network once per 10 ms of 16 kHz audio. The network has two output heads:

- a **mapping head** that predicts the clean 64-channel gammatone cochleagram directly;
- a **masking head** that predicts a ratio mask for the noisy cochleagram.

Mapping works better in heavy noise and masking in light noise. A small noise-sensing unit
therefore measures how noisy each frame is and how fast the noise changes, and picks one of
three modes:

| mode | name  | enhanced cochleagram          | chosen when                        |
|------|-------|-------------------------------|------------------------------------|
| 1    | MAP   | mapped cochleagram            | gamma > thr_up (0.85)              |
| 2    | MASK  | noisy cochleagram × mask      | gamma < thr_low (0.15)             |
| 3    | JOINT | mapped cochleagram × mask     | in between                         |
| –    | NONE  | zero                          | the frame holds no speech (VAD)    |

The network is large: four hidden layers of 1024 neurons. It fits on chip because its weights
are **ternary** (+1, 0, −1, with one scale factor per layer) and **pruned**. Only the non-zero
weights are stored, as 5-bit entries in a compressed sparse column format. Sixteen processing
elements walk those columns in parallel. A FIFO in front of each one absorbs the uneven amount
of work per PE.

The architecture follows the paper "Hardware Efficient Speech Enhancement With Noise Aware
Multi-Target Deep Learning". Where that paper leaves details open, the choices made here are
listed under [Design choices](#design-choices-and-departures).

## Signal flow

```
 sample ─┬─> frame_buffer ─┬─> hann_window ─> dnls ──────────────┐ N'_k, gamma, mode, speech
 (16 kHz)│   400 / hop 160 │                                     │
         │                 └─> ams (rectify, /4, FFT 256, 15 bands)
         │                                                       │
         └─> gammatone_fb (64 ch × 4 SOS) ─> gfcc (hop energy,   │
                                     cube root, DCT, 31 coeffs) ─┤
                                     │ noisy cochleagram         │
                                     │                 feat_delta: 46 static + Δ + ΔΔ + N'_k = 139
                                     │                           │
                                     │                 dnn_engine: 139 → 4×1024 → 64 map + 64 mask
                                     │                           │
                                     └──────────────> enhance_mix (mode switch, VAD gate)
                                                                 │
                                                         enh_* : 64 values per frame
```

`se_top` ties the blocks together. A small frame controller waits until DNLS, AMS and GFCC have
all finished a frame. It then:

1. streams the 139-value feature vector into the DNN input buffer;
2. runs the DNN, but only for speech frames;
3. lets `enhance_mix` emit the 64 enhanced values.

`frame_done` then reports the frame's mode, VAD decision, N_k, N'_k and gamma. If the next
frame's features are complete while the current frame is still in the DNN or the mixer, the new
frame is dropped and `overrun` pulses once. At the intended operating point this never happens
(see [Throughput](#throughput)).

## Noise level sensing and the mode switch (`dnls`)

For every windowed frame k, `dnls` accumulates two sums over the 400 samples:

- the cross-correlation with the previous frame, R(j, j−1) = Σ x_k[n]·x_{k−1}[n];
- the previous frame's energy, R(j−1, j−1).

It keeps the previous frame in a local 400-word memory for this. At the end of the frame it
computes:

```
N_k   = 1 − R(j,j−1) / R(j−1,j−1)           division by a 16-step linear CORDIC, clamped to [0,1]
φ     = phi_fast if |N_k − N'_{k−1}| > stat_thr, else phi_slow
N'_k  = φ·N_k + (1 − φ)·N'_{k−1}
gamma = min(1, gain · N'_k · |N'_k − N'_{k−1}|)
mode  = MAP if gamma > thr_up, MASK if gamma < thr_low, else JOINT
speech = N'_k < vad_thr                        (high N' = noise only)
```

The intuition: a noisy frame decorrelates from its predecessor, so N_k rises. A large change in
N' marks non-stationary noise, and heavy, changing noise pushes the choice towards mapping.

All levels are unsigned Q1.15. Every threshold and smoothing factor comes in at run time through
`dnls_cfg` (type `dnls_cfg_t` in `se_pkg`). `DNLS_CFG_DEFAULT` holds thr_up = 0.85 and
thr_low = 0.15, which are the published values. It also holds phi_slow = 0.1, phi_fast = 0.8,
gain = 8 and vad_thr = 0.95. These last four are placeholders: in the original design they come
out of training.

## Features

- **AMS (`ams`, `fft_r22sdf`)**. The steps are:
  1. Full-wave rectify the 400-sample frame and average groups of 4 (400 → 100 values at 4 kHz).
  2. Window the envelope with a Hann window and zero-pad it to 256.
  3. Run the FFT.
  4. Approximate each bin's magnitude as max(|re|,|im|) + min(|re|,|im|)/2.
  5. Integrate the bins under 15 triangular windows centred from 15.6 Hz to 400 Hz. 15.6 Hz is
     one bin, 4000/256 Hz.

  The FFT is a radix-2² single-path delay-feedback pipeline with log4(256) = 4 stages. Each stage
  is a BF I butterfly, then a BF II butterfly whose −j multiply is a swap of real and imaginary
  parts with one sign flip. Twiddles come from a Q2.14 cosine table. The FFT does not scale:
  words grow to 26 bits. It takes one sample per beat, and its outputs appear 266 beats later in
  bit-reversed order.
- **GFCC (`gammatone_fb`, `gammatone_sos`, `gfcc`)**.
  - Each of the 64 channels is a cascade of 4 second-order IIR sections. A section is
    w[n] = x − A_N·w[n−1] − B_N·w[n−2], y = B·w[n] + C·w[n−1]. That is four 16×16 multipliers,
    two adders and two state registers, in `gammatone_sos`.
  - One section datapath is shared by all 256 sections. Coefficients and states live in
    memories, and a section is loaded into the datapath by `load_ff`. A sample takes 257 cycles.
  - `gfcc` sums each channel's squared output over a hop, which decimates to 100 Hz.
  - It then compresses each energy with a bit-serial cube root. These 64 compressed values are
    the noisy cochleagram, and a 31-point DCT-II over them gives the GFCCs.
- **Deltas (`feat_delta`)**. The 46 static features are followed by their one-frame difference,
  the difference of that, and N'_k converted to Q6.10. That is 139 values, streamed one per cycle.

## The sparse ternary network (`dnn_engine`, `sparse_pe`, `sync_fifo`, `sigmoid_lut`)

This is the largest and least obvious part of the design.

**Storage format.** Neuron rows are interleaved over P PEs: PE p owns rows r with r mod P = p,
and holds them as local rows r / P. For every column of every layer, a PE stores the non-zero
weights of its rows as 5-bit entries `{sign, rel[3:0]}`:

- `rel` is the distance in local rows from the previous non-zero weight of the column. The
  first entry counts from row −1, so local row 0 has rel = 1.
- `rel = 0` is a padding entry. It moves the row position 15 rows down and adds nothing. Gaps
  longer than 15 need one padding entry per 15 rows.
- A column pointer table (one per PE) gives each column's first entry. The column ends where
  the next column's entries start. Columns of all layers are numbered consecutively: the 139
  input columns first, then 1024 per hidden layer.

For example, non-zero weights +1 at local row 2 and −1 at local row 20 are stored as
`{0, 3}`, `{1, 0}`, `{1, 3}`.

**Execution of one layer.**

- `CLEAR` empties all accumulators.
- `BCAST` pushes the layer's inputs in column order into all P FIFOs at once. Each FIFO is
  16 bits wide and 16 deep. The broadcast waits, and `dnn_stall` is high, while any FIFO is full.
- Each PE pops an activation and walks that column's entries, one entry per cycle. It adds or
  subtracts the activation into the addressed row. Taking the next column overlaps the column's
  last entry, so a column costs max(1, entries) cycles.
- A PE with little work drains its FIFO quickly and waits at the FIFO, not at a barrier. The
  broadcast only stops when the busiest PE falls 16 columns behind.
- `DRAIN` waits until all FIFOs are empty and all PEs are idle.
- `POST` goes through the neurons one per cycle: y = (acc·ζ_l + 2¹³) >> 14 + bias, saturated to
  16 bits. It then applies the sigmoid, or for the first 64 outputs of the last layer passes y
  through linearly. The result goes into the other half of a ping-pong activation buffer.

The sigmoid is a 65-entry table of 1024/(1+e^−x) for x = −8…8 in steps of 0.25, with linear
interpolation on the 8 fraction bits.

**Layer outputs.** The last layer has 128 neurons. Outputs 0–63 are the mapped cochleagram
(linear) and outputs 64–127 are the mask (sigmoid, 1.0 = 1024). They appear on `out_*` as they
are computed.

**Cost.** A layer costs about

  max over PEs of Σ_columns max(1, entries) + the time for P FIFO-fulls of slack + N_out cycles.

With random 36 %-dense weights (64 % sparsity), one full-size frame measured 82,069 cycles:
139 → 4×1024 → 128 with 16 PEs, about 77k entries per PE.

**Loading.** Weights, pointers and biases are written through `ld_*`:

- `ld_sel` = 0: weight entry `ld_addr` of PE `ld_pe`.
- `ld_sel` = 1: column pointer `ld_addr` of PE `ld_pe`. Write one more pointer than there are
  columns; it marks the end of the last column.
- `ld_sel` = 2: bias of neuron `layer·1024 + row`.

The per-layer scale factors ζ come in on the `zeta` port array. `tb/tb_sparse_pkg.sv` has an
encoder (`encode_column`) that turns a column's row list into entries.

## Output switch (`enhance_mix`)

While the DNN runs, the mixer collects the 64 noisy cochleagram values of the frame and the 128
DNN outputs. It then emits, per channel:

- `map` in MAP mode;
- `noisy·mask >> 10` in MASK mode;
- `map·mask >> 10` in JOINT mode;
- zero for noise-only frames.

The noisy values are staged and copied on a latch pulse. This lets the next frame's cochleagram
arrive while the current frame is still in the DNN.

## Number formats

| quantity                           | format            |
|------------------------------------|-------------------|
| samples                            | Q1.15             |
| noise levels, gamma, thresholds    | unsigned Q1.15    |
| filter coefficients, ζ, cosines    | Q2.14             |
| features, activations, biases, DNN outputs, enhanced values | Q6.10 |
| accumulators                       | 32 bit            |

Every narrowing step saturates. The filter sections and the DNN scaling round to nearest; the
mixer products, the DCT and the AMS band sums truncate.

## Throughput

At a 10 MHz clock a 16 kHz stream gives 625 cycles per sample. The filterbank needs 257 of
them. A hop (10 ms) is 100,000 cycles. Feature extraction finishes within about 1,500 cycles of
the hop, while the filterbank keeps running beside it.

The DNN dominates. For the full network at 64 % sparsity (1.23M non-zero weights), PE work is
about 77k cycles per frame when the non-zeros are spread evenly over 16 PEs. A simulated
full-size frame took 82,069 cycles from DNN start to the last output. That fits in a hop at
10 MHz with 18 % to spare, but only if the pruned weights stay roughly balanced across the PEs. The weight memory
(16 × 131072 entries × 5 bits) has room for 2.1M entries.

## Design choices and departures

These points go beyond what the published architecture specifies, or read it in one particular
way:

- **Sizes.**
  - PE count (16), SOS sections per channel (4) and FFT size (256, implied by the 15.6 Hz band
    edge) are choices here.
  - The input width is 139, counted as 46 static features + Δ + ΔΔ + noise level.
  - The output width is 64 mapping + 64 mask.
  - There is no multi-frame context window on the network input.
- **DNLS.**
  - φ switches between two run-time values on a stationarity test.
  - gamma's constant of proportionality is a run-time gain.
  - R(j,j−1) is taken as an un-normalised sum over the windowed frames.
  - The first frame after reset gives N_k = 0.
- **GFCC.**
  - Decimation to 100 Hz is taken as summing squared outputs over each hop.
  - Loudness compression is a cube root.
  - The DCT is unnormalised, with a fixed output scaling.
- **AMS.** The magnitude is the max + min/2 approximation. The triangle spacing (27.5 Hz) is
  the even spacing from 15.6 to 400 Hz.
- **DNN.**
  - Biases and a linear mapping head are added.
  - ζ multiplies the ternary sum before the bias.
  - The systolic array is built as a broadcast to row-interleaved PEs.
- **Mixer.** JOINT mode is read as mapped cochleagram × mask. Noise-only frames output zeros
  and skip the DNN.
- **Frame control.** Overrun dropping and the `frame_*` report are additions. Weights and
  coefficients are loaded through plain write ports. The frame is kept in an on-chip 512-word
  buffer rather than external DRAM.
- **CORDIC.** Only the division mode of CORDIC is built, for N_k. The GFCC cube root uses a
  bit-serial digit-by-digit method instead of a CORDIC exponential and logarithm.

Not included:

- resynthesis of a waveform from the enhanced cochleagram, which is an inversion method the
  architecture borrows from elsewhere;
- training-target generation, which is used only in training;
- the evaluation board's DRAM and UART.

The output of this design is the enhanced cochleagram, one 64-value frame per hop.

## Verification

Every block has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=N failures=M` line and has a cycle watchdog. Each compares against a model
computed inside the testbench:

- a DFT for the FFT;
- direct-form IIR arithmetic for the filterbank;
- exact integer replicas of the DCT, cube root, delta and mixer rules;
- a dense matrix reference for the sparse network.

Testbenches that need it also check latency: the FFT's 266 beats, the CORDIC's ITER+1 cycles,
and the PE's one entry per cycle.

- `tb_se_top` runs the whole chain end to end at a reduced network size (2 hidden layers of
  256, 2 PEs). It uses a random stable filterbank and a random network whose PE 0 is dense and
  PE 1 sparse. The DNLS thresholds are rewritten per frame so that noise-only, MAP, MASK and
  JOINT frames all occur. It checks every DNN output against a reference network fed with the
  DUT's own feature vector, and every enhanced value against the mode rule. It also requires at
  least one broadcast stall and one overrun; the dense PE makes inference outlast a hop.
- `tb_se_top_full` runs two frames through `se_top` with every parameter at its default and a
  36 %-dense random network. Samples arrive at the real-time pace of one per 625 cycles. It
  checks all outputs, that no frame is dropped, and that inference fits in 100,000 cycles.

To run any testbench with Verilator 5 from the repository root (the tables are read by relative
path, `rtl/*.hex`):

```
verilator --binary --timing -y rtl +libext+.sv rtl/se_pkg.sv tb/tb_sparse_pkg.sv \
          tb/tb_se_top.sv --top-module tb_se_top -Mdir obj
./obj/Vtb_se_top
```

Replace `tb_se_top` with any other testbench name. `tb_sparse_pkg.sv` is only needed by the
PE, DNN and top-level tests. `tb_se_top_full` builds a 1.3 MB weight memory and still finishes in
under a minute.

The three tables in `rtl/` are generated from these formulas:

- `hann400.hex`: round(32768·(0.5 − 0.5·cos(2πn/399))), capped at 32767, for n = 0…399.
- `cos256.hex`: round(16384·cos(2πm/256)).
- `sigmoid65.hex`: round(1024/(1 + e^−(−8 + i/4))), for i = 0…64.
