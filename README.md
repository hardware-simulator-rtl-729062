# Digital block of an LTE 2x2 MIMO channel emulator

This is the digital block of a real-time hardware channel emulator. Two
14-bit ADC streams at 50 MS/s go in, one per transmit antenna. Each stream
is filtered by the time-varying impulse responses h11, h12, h21 and h22.
The filtered streams are summed per receive antenna and cut back to
14 bits for two DACs. A host computer streams new channel profiles into the
block, and the block swaps to each one on a 0.3 kHz refresh tick. The
default profile is the LTE EVA model: 9 paths with delays of
0, 2, 8, 16, 19, 36, 55, 87 and 126 samples.

The block contains two complete implementations side by side in
`hw_sim_top`:

* a **time-domain** path (`td_mimo`) on `clk_td` = 50 MHz, built from
  sparse FIR filters;
* a **frequency-domain** path (`fd_mimo`) on `clk_fd` = 100 MHz, built from
  block-wise FFT, multiplication by H(f), IFFT and overlap-add.

Each path has its own ports, refresh timer and host write port. They share
only the reset and `refresh_en`.

## Frequency-domain path (the hard part)

`fd_siso` emulates one channel:

```
x --> fd_block_in --> fft_sdf (fwd) --> x H[k] --> bitrev_buf --> fft_sdf (inv) --> fd_overlap_add --> y
     128 + 128 zeros   bit-reversed     freq_coef_ram  natural order   bit-reversed   add previous tail
```

* **Blocks and zero padding.** `fd_block_in` collects 128 input samples in
  one half of a ping-pong buffer. It then streams them, followed by 128
  zeros, as a 256-sample frame. The input is real, so the imaginary part is
  zero. Input samples arrive at 50 MS/s and the FFT consumes one sample per
  100 MHz clock. A frame therefore takes exactly as long as one block takes
  to arrive, and frames follow each other with no gap. If a block completes
  while both halves are still full, `overrun_o` flags it.
* **FFT.** `fft_sdf` is a radix-2 decimation-in-frequency pipeline with a
  single delay-feedback path per stage. It has 8 stages with delay lines of
  128, 64, ..., 1 words, and takes one complex sample per clock. Twiddles
  are 16-bit, with 14 fractional bits. They are computed at elaboration by
  a constant function in `fft_twiddle_pkg`. The forward transform halves
  the data at every stage (a total of 1/256), so it cannot overflow. The
  inverse transform does not scale, so the round trip is unity. The data
  path is 40 bits wide, and the input is shifted up by 12 guard bits so
  that the forward scaling loses no precision. Output bins come out in
  bit-reversed order.
* **Multiplication by H.** `freq_coef_ram` is read at the bit-reversed bin
  index, which avoids reordering before the multiply. H is stored as
  16-bit real plus 16-bit imaginary parts in Q4.12. The product is shifted
  back by 12 bits.
* **Reordering.** `bitrev_buf` writes each product at the bit-reversed
  position and reads in natural order, with ping-pong halves. The inverse
  FFT therefore receives natural order, and its output is again
  bit-reversed.
* **Overlap-add.** `fd_overlap_add` writes IFFT frames into a ring of four
  256-word banks at bit-reversed addresses. For each 128-sample block it
  outputs the first half of the current frame plus the second half (the
  "tail") of the previous frame. It then removes the guard bits and clamps
  the result to the output width. A three-bank ring was not enough: the
  bank holding the tail could be overwritten while it was still being read.
* **Timing.** One output sample leaves for each input sample, with a fixed
  latency of 1300 `clk_fd` cycles (13 µs). The output uses the same
  `x_valid` strobe as the input.

`fd_mimo` uses four `fd_siso` instances. Each receive sum is clamped to
17 bits and then goes to the truncation stage.

### Profile swap in the frequency domain

Each channel has two banks of 256 H values. The host writes words 0 to 255
into the idle bank, then writes word 256, which is the *commit* word. On a
refresh tick, if all four channels have committed, a swap request is
armed. The swap itself happens at the next FFT frame boundary, so a frame
is never multiplied by a mix of two profiles. During the interval
between the request and the actual swap, the armed bank must not be
written. **The host must wait for `fd_swap` before writing the next
profile**, and an assertion in `freq_coef_ram` checks this rule. If a tick
comes before all channels have committed, the old profile stays and
`fd_held` pulses.

## Time-domain path

`sparse_fir` is a 126-deep delay line with only 9 taps (the EVA delays are
a parameter), so there are 9 multipliers. It is pipelined in four register
stages:

1. delay line;
2. products;
3. three partial sums of three products;
4. sum.

The full-precision output is 16 + 14 + 4 = 34 bits. `td_mimo` uses four
filters and sums them per receive antenna into 35 bits:

* y1 = h11·x1 + h21·x2
* y2 = h12·x1 + h22·x2

The sum goes through the truncation stage. The latency from ADC sample to
DAC sample is 5 clocks, or 100 ns.

`tap_coef_bank` holds two banks of 4 × 9 coefficients. The host address is
`{channel, word}`. Words 0 to 8 are tap gains, and word 9 commits the
channel. At a refresh tick, the banks swap only if all four channels have
committed; otherwise the old profile is kept and `td_held` pulses. Each
profile is 40 words at 0.3 kHz.

## Truncation to 14 bits (`sliding_trunc`)

* **Brutal** mode keeps the top 14 bits of the wide word (17 to 14 bits
  in the frequency path).
* **Sliding** mode tracks the highest bit in use over the frame between
  refresh ticks. At the tick it moves the 14-bit window so that the
  largest sample of that frame just fits. `shift_o` is the window position,
  and the analog amplifier after the DAC must apply a gain of 2^shift.
  Samples that overflow the window set by the previous frame are clamped,
  and `sat_o` flags them.

## Fixed-point summary

| signal | format |
|---|---|
| ADC / DAC | 14-bit two's complement |
| tap gain h | 16-bit signed fraction (Q1.15), set by a parameter |
| H(f) | 16+16 bits in Q4.12 |
| FFT data path | 40 bits, with 12 guard bits |
| time-domain sum | 35 bits |
| frequency-domain sum | 17 bits |

## Departures and choices

* **Coefficient width.** 16 bits are used for h, which matches the
  reported FPGA utilisation. The host-traffic estimate instead counts 8-bit
  words. `H_BITS` is a parameter.
* **FIR length.** It is 126, following the filter structure and the EVA
  delays. The utilisation report instead lists a 250-long filter, which ETU
  would need. `MAX_DELAY` is a parameter.
* **Channel pairing** follows the output equations y1 = h11·x1 + h21·x2
  and y2 = h12·x1 + h22·x2. It does not follow the index convention given
  for the correlation matrix.
* **Frequency-domain clock and latency.** That path runs at twice the
  sample rate, and its latency (13 µs) is longer than the 8.8 µs the
  reference reports.
* **Fixed-point details** (Q formats, guard bits, clamping), the commit
  word, the frame-boundary swap and the sliding-window rule are this
  design's own choices.
* **Outside this design.** The host link, the channel-profile generator,
  the converters, the RF units and the analog amplifier are not part of
  the digital block.

## Simulation

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Wno-fatal -Wno-lint -Wno-style \
  -Irtl -yrtl rtl/sim_pkg.sv rtl/fft_twiddle_pkg.sv \
  tb/tb_hw_sim_top.sv --top-module tb_hw_sim_top
./obj_dir/Vtb_hw_sim_top
```

`tb_hw_sim_top` runs the top at its default parameters for three refresh
periods on each path. It uses Gaussian-pulse inputs, three profiles (the
third is deliberately left incomplete so that it is held), and both
truncation modes. It compares every output sample against a reference
model. It also counts each mechanism and fails if any of them never
happened: swaps, held profiles, window moves, clamps, and brutal mode.
