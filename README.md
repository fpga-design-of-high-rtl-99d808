# STBC-OFDM downlink receiver (2 Tx / 1 Rx) in SystemVerilog

This is synthesizable RTL for an Alamouti STBC-OFDM receiver for the IEEE 802.16e downlink. It
follows the design in "FPGA Design Of High Throughput STBC-OFDM System For Low Power
Applications". The same source also describes a small "orthogonal error detector": leading-bit
check, bit-follow check and register files. That unit is here too, as a separate block that
shares the top level.

Main numbers, which are also the parameter defaults:
- 1024-point FFT and a 128-sample cyclic prefix.
- A sub-frame is one preamble plus 40 data symbols.
- QPSK and 16QAM.
- A 256-tap sign-bit match filter.
- The path search keeps Np = 8 paths out of Nsub = 128 taps.
- The core clock runs at 7x the sample rate (78.4 MHz vs 11.2 MHz).

## Data flow (`rtl/stbc_ofdm_top.sv`)

```
rx --> sign bits --> 7 x sign_match_filter --> symbol_boundary_detector --> boundary, ICFO
 |                                                                             |
 +--> sample delay (2048) --> nco_derotator <-- NCO frequency (ICFO + FCFO) <--+
                                 |                     ^
                                 |              fcfo_estimator (CP correlation)
                                 v
                      guard_interval_removal --> fft_radix2 --+--> preamble_match --> CFR out
                                                              |
                                                              +--> symbol_pair_buffer --> stbc_decoder
                                                                    (CSI memories) --> 2 x dichotomy_demapper
```

- **Synchronization.**
  - Each ICFO candidate (-3..+3 subcarriers) gets its own match filter. Its coefficients are the
    preamble signs, already rotated by that candidate's offset.
  - Each filter counts sign agreements with a 1-bit XOR per tap and an adder tree.
  - A monitor keeps the largest |re|+|im| over one symbol window. The winner gives the symbol
    boundary and the integer CFO together.
  - The 7-candidate range comes from the 14 ppm target: 35 kHz at 2.5 GHz is 3.2 subcarrier
    spacings.
- **Delay buffer and NCO.**
  - Samples wait in a 2048-entry buffer while the search runs.
  - When the boundary is known, the NCO is loaded with the integer offset. Its phase is cleared
    as the preamble leaves the buffer.
  - During the preamble, the FCFO estimator correlates the cyclic prefix with its copy N samples
    later. A CORDIC vectoring unit takes the angle, and the fractional part is added to the NCO
    frequency.
  - The derotator is a 16-iteration CORDIC with a 24-bit phase word.
- **FFT.**
  - In-place radix-2 decimation-in-time with one butterfly per clock. Twiddles come from a CORDIC.
  - Two banks alternate, so one symbol loads while the other computes.
  - Each stage scales by 1/2, so the output is X/N.
  - A symbol takes 5120 + 1024 clocks, against 8064 clocks of sample time.
- **Preamble match.** This is the preliminary channel estimate. Each preamble subcarrier is
  multiplied by the stored sign bit and a constant 1/(4√2). The constant is written in CSD form
  (2^-2 - 2^-4 - 2^-6 + 2^-8 + 2^-10), so only shifts and adders are used.
- **Alamouti decoding without division.**
  - The decoder outputs g·s1, g·s2 and g = |h1|² + |h2|².
  - The demapper decides in two stages. First the sign of I and Q. Then, for 16QAM, the
    magnitude is compared with (2/√10)·g instead of dividing by g.
  - There are two demappers, one per symbol of the pair, so a pair is decided at one subcarrier
    per clock.
- **Path search.** `partial_sort_topk` is the partial sorting network of the path decorrelator.
  It takes 128 time-domain taps and keeps the 8 with the largest power, with their indices.
- **Orthogonal error detector** (`orthogonal_error_detector`). In one clock it:
  - finds the common leading bits of `low` and `high` (XOR + LZD16);
  - checks all 16 possible follow runs in parallel;
  - selects the right one with a 16:1 mux driven by `pos_cs`;
  - writes `bit_count`, `bit_value`, the pending follow count and the shifted `low_update` /
    `high_update`.

## Where this design departs from the source

- **Derotator position.** In the original block diagram the derotator comes before boundary
  detection. Here the match filters use the raw signs, and the derotator sits after a delay
  buffer. This lets the NCO be set before the preamble arrives. ICFO is removed in the time
  domain, not by re-indexing subcarriers.
- **Memory banks.** The five symbol memory banks and their six-slot access schedule are not
  built. One bank pairs the two symbols of an STBC block, and the FFT keeps its own ping-pong
  banks.
- **Missing tracking stage.** The tracking stage of the two-stage channel estimator is not
  built: the SMPIC decorrelator, the LS estimator, the Hessian calculator and the path
  decorrelator datapath. Their equations are not given. The CSI for the STBC decoder is
  written through the `csi_*` port, and the preliminary CFR is an output.
- **Missing ICFO/FCFO steps.** The ping-pong ICFO refinement and the "FCFO decision" step are
  not built. The FCFO estimate is applied once per acquisition.
- **Subcarrier selection.** All 1024 bins are decoded. The PUSC subcarrier allocation is left
  to the consumer of `dem_k`.
- **Update word format.** The detector's update words are plain 16-bit values. The
  8-bit address / 8-bit data split is not applied.
- **Own choices.** Word widths, CORDIC depth, the FFT architecture, the CFO estimator method
  and the Gray labelling are this design's own.

## Simulation

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. For example, with Verilator 5:

```
verilator --binary --timing -Irtl -y rtl rtl/stbc_pkg.sv tb/tb_fft_radix2.sv --top-module tb_fft_radix2
./obj_dir/Vtb_fft_radix2
```

`tb_stbc_ofdm_top` runs the full-size receiver at its default parameters. Its input is one
sub-frame:
- 300 samples of noise;
- a preamble on every third subcarrier from antenna 1;
- 20 Alamouti pairs, 10 in QPSK and 10 in 16QAM;
- a flat two-antenna channel;
- a 1.06-subcarrier CFO and small noise.

It checks:
- the detected ICFO and the NCO frequency;
- the preamble CFR;
- every decoded bit;
- that each mechanism was used;
- a directed vector for the orthogonal error detector;
- a path-search case.

The run takes a few minutes.
