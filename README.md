# Parallel lag correlators for FPGA

Cross-correlation measures how alike two sampled signals are as a function of
the time shift (lag) between them:

    R(k) = sum over t of x(t) * y(t - k)

A software correlator evaluates this one multiply-accumulate at a time. This
design evaluates every lag at once: each lag gets its own multiplier and
accumulator, and a new pair of samples enters every clock. Two correlators are
built on that idea:

* a **multi-channel cross-correlator**. It correlates every pair of 8 input
  channels (28 pairs) over 32 lags: 896 multiply-accumulates per clock. It
  works as a coprocessor for a soft processor, fed and read over FSL
  (Fast Simplex Link) FIFO channels.
* a **multiple-tau correlator**. It covers lag times from one sample to about
  8·10^12 samples with only 328 channels, because its sampling time doubles
  from one block of channels to the next.

Both are built from the same piece, a linear lag correlator.

## The linear correlator (`linear_correlator`, `corr_channel`)

```
 del_in ──[d]──┬──[d]──┬──[d]──┬── ... ──► del_out
               │       │       │
 und_in ─[d]─┬─┼─────┬─┼─────┬─┼── ...
             ▼ ▼     ▼ ▼     ▼ ▼
             (×)     (×)     (×)
              Σ       Σ       Σ
           lag 0   lag 1   lag 2
```

The undelayed stream passes one register and is then shared by every
channel. The delayed stream walks down a chain of registers, one per channel.
A channel (`corr_channel`) is one register of that chain, a multiplier and an
accumulator. Channel k multiplies the current undelayed sample by the delayed
sample from k samples earlier, so after N samples it holds

    acc[k] = sum_{t} und(t) * del(t - LAG0 - k)

Samples from before the last clear count as zero, so a frame is a finite sum
that starts at the clear.

Timing: a sample pair is taken on each cycle with `en` high, and `en` may stay
high on every cycle. The products of that pair reach the accumulators one
cycle later, so the results are final two cycles after the last `en`. `clr`
zeroes every register. `LAG0` puts plain delay registers ahead of the first
channel, so that only lags `LAG0 .. LAG0+LAGS-1` are computed. The
multiple-tau correlator needs this.

Defaults are 32 lags of 8-bit samples with 32-bit accumulators. `SIGNED`
selects two's-complement (signal samples) or unsigned (counts) arithmetic.
Accumulators wrap around on overflow. 32 bits are enough for 2^17 products of
two 8-bit signed samples.

## The multiple-tau correlator (`multi_tau_correlator`, `stb_rate_halver`)

A linear correlator needs one channel per sampling interval of lag, so
reaching long lags at fine resolution gets expensive. The multiple-tau scheme
instead groups channels into **sampling time blocks** (STBs):

| block | sampling time | channels | lags computed (own units) | lag time covered (input samples) |
|-------|---------------|----------|---------------------------|----------------------------------|
| 0     | 1             | 16       | 0 .. 15                   | 0 .. 15                          |
| 1     | 2             | 8        | 8 .. 15                   | 16 .. 30                         |
| 2     | 4             | 8        | 8 .. 15                   | 32 .. 60                         |
| l ≥ 1 | 2^l           | 8        | 8 .. 15                   | 8·2^l .. 15·2^l                  |

Between two blocks, a `stb_rate_halver` adds up two consecutive samples of
**both** streams and passes the sums on as one sample. So the input of block
l is the raw stream summed in groups of 2^l samples, and block l gets a sample
pulse on every 2^l-th input sample. Lags 0..7 of a later block fall in the
range that the block before it already covered, at twice the resolution, so
they are not computed. Their delay registers still exist: they are the
`LAG0 = 8` pre-delay of that block's linear correlator.

The default has 40 blocks, so 16 + 39·8 = 328 channels. The longest lag is
15·2^39 input intervals. At a 5 ns input interval, the last block's sampling
time is about 46 minutes.

Points to keep in mind:

* **Widths grow with the block index.** Block l works on `W+l` bit samples
  and `2(W+l)+ACC_GUARD` bit accumulators. Summing is therefore exact: with
  8-bit inputs the last block has 47-bit samples and 110-bit accumulators.
* **Inputs are unsigned counts.** The classic use is photon counts per
  sampling interval.
* **No divided clocks.** The "half clock rate" of each block is a one-cycle
  enable pulse (`stb_en[l]`) on the common clock. All 328 channels exist in
  hardware; they are not time-shared.
* **No normalisation.** Results are raw sums. To compare blocks, divide by
  the number of products each one accumulated: block l holds about T/2^l
  samples after T inputs.
* **Reading results.** Set `rd_stb = l` and `rd_lag = j` (0..15). `rd_data`
  is that accumulator, zero-extended to 110 bits. For blocks above 0, lags
  0..7 read as zero.
* **Latency.** A sample of block l reaches its accumulators l+2 cycles after
  the input sample that completes it.

## The multi-channel FSL coprocessor (`fsl_correlator`, `multichannel_correlator`)

`multichannel_correlator` holds one 32-lag signed linear correlator per
unordered channel pair (i, j), i < j. Channel i goes on the undelayed path
and channel j on the delayed path. The reverse ordering, R_ji(k) = R_ij(−k),
adds no information, so 8 channels need 28 pairs, not 56. Pairs are numbered
in row order (0,1), (0,2), …, (0,7), (1,2), … (`corr_pkg::pair_index`).
Result `p*32 + k` is lag k of pair p.

`fsl_correlator` connects it to a processor through two FSL channels (32-bit
FIFOs, first word fall-through):

* **Slave side (processor → correlator):** `s_data`, `s_control`,
  `s_exists`, `s_read`. A word is consumed on a cycle with `s_read` high.
* **Master side (correlator → processor):** `m_data`, `m_control`,
  `m_write`, `m_full`. `m_write` is only raised while `m_full` is low.

Word protocol:

| `s_control` | `s_data`            | meaning |
|-------------|---------------------|---------|
| 0           | sample data         | 8 channels × 8 bits, channel 0 in the low byte, are packed into 64 bits and sent as two words, low word first. The second word starts one correlation step. |
| 1           | 1 (`CMD_CLEAR`)     | zero all accumulators and delay lines, restart packing |
| 1           | 2 (`CMD_READ`)      | send all 896 results |
| 1           | 0, 3                | ignored |

A typical frame from the processor is CLEAR, then N sample vectors, then
READ, then 896 reads of results.

After READ, the block takes no input words. It waits three cycles for the
last step to land, then sends one result per cycle, sign-extended to 32 bits.
The last result word has `m_control = 1`. A full FIFO stalls the stream
without losing data. Assertions check the two FSL rules: no write while full,
no read while empty.

## Top level (`correlator_top`)

The two correlators sit side by side. They share `clk` and `rst_n` (active
low, asynchronous) and have separate ports: `fsl_*` for the coprocessor and
`mt_*` for the multiple-tau correlator. The processor system around the
coprocessor is not part of this RTL: soft CPU, memory controller, UART,
timer and clocking. Connect the processor's FSL links to the `fsl_*` ports.

Parameters: `NUM_CH=8`, `LAGS=32`, `W=8`, `NUM_STB=40`, `STB_CH=8`.

## How far to trust it, and where it departs

Each module has a self-checking testbench. It compares against sums
computed independently in the testbench from the stored input samples:

* `tb_corr_channel` checks cycle-by-cycle behaviour, signed and unsigned.
* `tb_linear_correlator` checks lags 0..31, and lags 8..15 through a pre-delay.
* `tb_stb_rate_halver` checks pairing, sums and pulse timing.
* `tb_multi_tau_correlator` uses 6 blocks. It checks every lag, the pulse
  counts and the exact 2^l pulse spacing.
* `tb_multichannel_correlator` uses 5 channels and checks every pair and lag.
* `tb_fsl_correlator` uses 5 channels, which means two-word packing. It adds
  command handling and a stalled result stream.
* `tb_sine_correlation` runs the 32-lag correlator at its default size on
  1024 samples of a quantised 1 Hz sine sampled at 200 Hz. It checks the
  autocorrelation and the cross-correlation with a copy buried in noise of ten
  times its amplitude.
* `tb_correlator_top` runs at full default size. It sends two FSL frames,
  with 896 results checked per frame. It runs 4096 samples through all 40
  blocks: blocks 0..12 get samples and are checked lag by lag, and blocks 13
  and above must stay zero.

Limits and choices of this design:

* The very slow blocks of the multiple-tau correlator are only checked to
  stay at zero. Filling block 39 would take 2^39 input samples, far beyond
  any simulation.
* The FSL word format, the command set and the readout order are this
  design's own.
* The multi-channel correlator computes the 28 cross-correlations but no
  autocorrelations. Lags are one-sided, 0..31.
* Throughput over FSL is one sample vector per two clocks, because a vector
  is two 32-bit words. The correlation core itself accepts one vector per
  clock.
* Results are raw sums. Biased or unbiased estimates (divide by N or N−|k|)
  are left to the processor.
* In the published block diagram of the multiple-tau scheme the delayed
  stream is drawn feeding every block directly, while the undelayed stream
  passes from block to block. Here both streams pass through the pairwise
  adders, which is what the accompanying description of the scheme says
  (both paths summed over two sampling periods for the next block).
* The exponential-lag correlator is not built. It spaces lags by a constant
  factor and is mentioned only as an alternative to the multiple-tau scheme.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. For example, the full-size system test:

```
verilator --binary --timing --assert --top-module tb_correlator_top \
  -Irtl rtl/corr_pkg.sv rtl/corr_channel.sv rtl/linear_correlator.sv \
  rtl/multichannel_correlator.sv rtl/fsl_correlator.sv rtl/stb_rate_halver.sv \
  rtl/multi_tau_correlator.sv rtl/correlator_top.sv tb/tb_correlator_top.sv
./obj_dir/Vtb_correlator_top
```

It builds and runs in well under a minute. For a block test, list
`rtl/corr_pkg.sv`, the block and the modules below it, then its testbench.

## Changing it

* **More channels or lags:** set `NUM_CH` and `LAGS`. `NUM_CH*W` may exceed
  64 bits; the number of words per vector follows (`WPS`). Keep the
  accumulator at 32 bits for the FSL path, or widen the result words.
* **Fewer multiple-tau blocks:** set `NUM_STB`. The read port width
  `2(W+NUM_STB−1)+16` follows. `STB_CH` sets the channels per block; block 0
  always has twice as many.
* **Accumulator headroom** of the multiple-tau blocks is `ACC_GUARD` bits
  above the product width: 2^16 products per channel before wrap-around.
