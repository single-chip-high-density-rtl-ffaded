# AzPF: an on-board azimuth pre-filter for SAR raw data

A spaceborne synthetic aperture radar produces raw echo data faster than most
downlinks can carry it (around 100 Mbit/s for a typical mission). Many
observations do not need the full azimuth (along-track) resolution. The
azimuth pre-filter (AzPF) trades that resolution for data volume. It
low-pass filters the raw data from pulse to pulse and keeps one range line out
of every M. Range resolution is not touched. Azimuth resolution drops by M,
and so does the data rate. M can be 1, 2, 4, 8, 16 or 32.

This repository is a SystemVerilog implementation of that filter, for a
single FPGA. The input is an 8-bit offset-video ADC stream at 100 MHz, with
8192 samples per range line and a 2 kHz pulse repetition frequency (PRF). The
output is 12-bit complex (I/Q) samples, one range line of 4096 bins for every
M input lines. The architecture follows the published AzPF: a quarter-rate
I/Q demodulator with a half-band filter, then a 4-phase poly-phase azimuth
filter of length 4M, all on one clock with clock enables. Several details
below are this implementation's own choices: widths, half-band taps, scaling,
sequencing and interfaces. They are listed under "Departures and own
choices".

## Data path

```
adc_* --> azpf_line_buffer --> azpf_iq_demod --> azpf_halfband --> azpf_prefilter --> out_*
          (100 MHz write)      (12.5 MHz processing rate, one step per clock enable)
                                                                    |  azpf_acc_mem
          azpf_controller: sequencing, line/block counters   azpf_coef_ram: 4M taps
          azpf_ce_gen: clock enable, 1 clock in 8
```

Everything runs on one 100 MHz clock (`clk`). An 8192-sample line arrives in
82 us. After that the receiver is idle until the next pulse, 500 us after the
previous one. The design uses that gap. The line is captured at full rate
into `azpf_line_buffer`. It is then processed at one step per clock enable,
which is 12.5 MHz with `CE_DIV = 8`. Each step turns one pair of real samples
into one complex range bin. A full line therefore takes 4096 + 11 steps,
which is 32,847 clocks. Capture plus processing is 41,039 clocks, inside the
50,000-clock pulse interval. A new line is accepted only after the previous
one has been processed. A line that starts earlier is dropped whole, and
`line_dropped` pulses.

## Quarter-rate I/Q demodulation (`azpf_iq_demod`, `azpf_halfband`)

The echo's intermediate frequency is a quarter of the sampling rate. Mixing
down by exp(-j·pi·n/2) is then multiplication by 1, -j, -1, +j in turn, and
needs no multiplier.

- The ADC code is offset binary, with 128 meaning zero. Its MSB is inverted
  to give a signed sample s(n).
- For sample pair p (samples 2p and 2p+1): I(p) = s(2p)·(-1)^p and
  Q(p) = -s(2p+1)·(-1)^p.

Every odd I sample and every even Q sample is zero. A half-band low-pass has
zero even taps except its centre tap of 1/2, which makes the filter cheap.

- On I, only the centre tap meets nonzero samples, so the I filter is a plain
  delay.
- On Q, only the odd taps meet nonzero samples.

The filter therefore runs at the pair rate, which is also the decimation by
2. Each step shifts one (I, Q) pair in and produces one complex sample:

```
Q_out(p) = sat10( sum_{k=0..7} c(k) * Q(p+3-k)  >>> 8 )      c = -3 12 -39 157 157 -39 12 -3   (/512)
I_out(p) = I(p)
```

Both outputs have a gain of 2 against the textbook filter, so full scale
stays full scale. The result is 10 bits. The 8 odd taps are a
Hamming-windowed half-band sinc; they are set in `azpf_pkg::hb_coef`. The
delay lines are cleared at the start of each line. The line end is flushed
with 3 zero steps, so a line of NS samples gives exactly NS/2 bins, aligned
with the input.

## Poly-phase azimuth filter (`azpf_prefilter`, `azpf_acc_mem`, `azpf_coef_ram`)

This is the hardest part to follow. The filter has L = 4M taps h(0..4M-1)
and is decimated by M. Each output value for range bin r is

```
y(r) = sum_{t=0}^{4M-1} h(t) * x_{n-4M+1+t}(r)        for n = M-1 + kM, n >= 4M-1
```

Here x_n is baseband line n, and the oldest line of the window takes h(0).
The filter is built as four overlapping weighted integrate-and-dump
accumulators, called slots, per range bin and per channel.

- Input lines are grouped into blocks of M. A slot starts at the first line
  of a block and collects four blocks (4M lines).
- At any time, four slots are open. They started 0, 1, 2 and 3 blocks ago.
- Line j of the current block (j = 0..M-1) adds x·h(i·M + j) to the slot that
  started i blocks ago.
- On the last line of a block (j = M-1), the slot with i = 3 is complete. It
  is output (`dump`) and then reused by the next block (`first`: the new
  value replaces the old one instead of adding to it).

Slot s is kept in bank s of `azpf_acc_mem`, with s = block index mod 4, so a
slot never moves between banks. A line passes each bin once. Each step reads
the four slots of one bin, adds four products per channel, and writes all
four back (read-modify-write). Consecutive steps work on different bins, so
there is no hazard. The controller reads the four coefficients h(i·M + j)
from `azpf_coef_ram` and latches them at the start of each line. Output
starts once four blocks have been seen (`emit`). Earlier dumps would contain
lines from before the start, so they are suppressed.

Arithmetic per product:

- The 10-bit sample times the 8-bit signed tap is shifted right arithmetically
  by `cfg_shift` (0..7).
- The result is saturated to 16 bits and added with saturation.
- The output sample is the upper 12 bits of the dumped 16-bit accumulator.

`cfg_shift` is there so that 8-bit taps scaled to full range work for
every M. Choose it so that max|x|·sum|h| >> shift stays below 2^15. For
example, 16 Hamming taps with a peak of 127 sum to about 1100. With |x| up to
211, that gives a shift of 3, or 4 with headroom.

Memory at default size:

| memory | size |
|---|---|
| accumulators | 4 × 4096 × 2 × 16 = 512 kbit |
| line buffer | 8192 × 8 = 64 kbit |
| taps | 128 × 8 bit = 1 kbit |

## Sequencing (`azpf_controller`)

States: IDLE → START → RUN → DRAIN → DONE.

- **IDLE**: waits for `line_full` from the line buffer. It then samples
  `cfg_log2m` (values above 5 clamp to 5) and `cfg_shift`. If M has changed,
  it restarts the line/block counters and pulses `mode_switch`. The first
  output then comes four new blocks later.
- **START**: one step. Clears the half-band filter and the bin counter, and
  latches the four taps.
- **RUN**: NS/2 read steps, then 3 zero-padding steps.
- **DRAIN**: 6 steps, so the pipeline empties.
- **DONE**: releases the buffer and advances j and the block count.

Counting the ce alignment, a line takes between NS/2 + 9 and NS/2 + 10
clock-enable periods.

## Interface of `azpf_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | 100 MHz clock; synchronous active-low reset |
| `adc_valid`, `adc_sol`, `adc_data` | in | 1, 1, 8 | sample stream; `adc_sol` is high with the first sample of a line |
| `cfg_ns` | in | log2(NS)+1 | samples per line (even, 2..NS), sampled at `adc_sol` |
| `cfg_log2m` | in | 3 | log2 M (0..5), sampled when a line starts processing; M = 4 after reset |
| `cfg_shift` | in | 3 | product right shift, sampled likewise |
| `coef_we`, `coef_addr`, `coef_data` | in | 1, 7, 8 | write tap h(k) at address k (k < 4M); write only while `busy` is low |
| `out_valid`, `out_bin`, `out_i`, `out_q` | out | 1, log2(NS/2), 12, 12 | one-clock pulse per output bin, bins in order |
| `out_line` | out | 16 | number of output lines completed |
| `busy`, `mode_switch`, `line_dropped` | out | 1 | status pulses and levels |

Parameters: `NS` (default 8192) and `CE_DIV` (default 8). Shared widths are in
`rtl/azpf_pkg.sv`.

## Departures and own choices

The published design gives the algorithm, the block order, the clock-enable
scheme, the 12.5 MHz processing rate and the sizes. The sizes are 8-bit
input, 8k samples per line, 12-bit output, M in {1..32}, length 4M and 8-bit
taps. The following are this implementation's own choices:

- **Half-band filter.** The length (8 odd taps), the coefficients, the gain
  of 2 and the 10-bit output width.
- **Accumulator word.** 16 bits. This matches the published memory budget of
  more than 500 kbit. Also the programmable product shift, saturation, and
  truncation to 12 bits.
- **Coefficient store.** A register array with four read ports. The original
  was assembled from vendor memory cores. All blocks here are written from
  scratch.
- **Capture buffer.** One buffer, not two. A line that arrives while the
  previous one is still held is dropped, not queued.
- **Line length.** The line length is programmable (`cfg_ns`). This allows
  the short test lines the original was verified with.
- **Configuration.** The configuration ports and the sequencing, including
  the restart on a change of M.
- **Out of scope.** The ADC and the original board-level debug and test
  equipment are outside the design. The host that computes the taps (the
  published filters have a bandwidth of 80% of PRF/M, from a Hamming window,
  Remez or Lagrange design) is not included. Centering the data on zero
  Doppler, listed as future work, is not implemented.

## Verification

Each testbench in `tb/` checks itself and ends with a `TB_RESULT checks=N
failures=M` line. The reference model `tb/azpf_ref_pkg.sv` is written
straight from the equations above, and every output is compared bit for bit.

| testbench | what it covers |
|---|---|
| `tb_azpf_top` | NS = 64, all six values of M, 52-sample lines, M switches, a dropped line, warm-up suppression, processing time |
| `tb_azpf_full` | default size, real-time pacing at 2 kHz PRF, 24 lines, M = 4 |
| `tb_azpf_workload` | default size: 30 lines × 52 samples; then the same data zero-padded to 2000 lines × 8192 samples in real time. About a minute of simulation |
| `tb_azpf_<block>` | one per block: line buffer (overrun, restart), demodulator, half-band, coefficient store, accumulator memory, pre-filter (including saturation), controller (addresses, flags, timing) and ce generator |

To simulate with Verilator, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/azpf_pkg.sv tb/azpf_ref_pkg.sv \
    rtl/*.sv tb/tb_azpf_top.sv --top-module tb_azpf_top -o sim && ./obj_dir/sim
```

Replace `tb_azpf_top` with any other testbench name. The block testbenches
need only `azpf_pkg.sv`, `azpf_ref_pkg.sv` and their own module (the
pre-filter also needs `azpf_acc_mem.sv`).

Not verified:

- timing closure and resource use on any real FPGA;
- the image-quality figures of the original (PSLR, ISLR, resolution), which
  depend on the taps the host loads.
