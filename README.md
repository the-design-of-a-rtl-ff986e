# Time-division-multiplexed matched filter for PN code acquisition

A direct-sequence spread-spectrum receiver has to find where the incoming
chip stream lines up with its local pseudo-noise (PN) code before it can
despread anything. The fastest way is a matched filter. It correlates the
last `L` received samples with the `L`-chip local code on every sample and
reports a peak when they line up:

    R(i) = sum_{m=1..L} C_m * d_{i+m}

Built directly, this needs an `L`-deep sample register and `L` multipliers:
for `L = 255` and 12-bit samples, that is 3060 register bits and 255
multipliers.

This design gets the same result from a fraction of that logic by
**time-division multiplexing**. The code is cut into `NSEG` segments of
`TAPS = ceil(L / NSEG)` chips. The filter keeps only `TAPS` samples and
`TAPS` multipliers, and runs at `NSEG` times the sample rate. In each of the
`NSEG` clocks of a sample period, the same multipliers correlate the stored
samples with a different code segment. Each partial result is delayed in a
FIFO until the samples it needs to be added to have arrived. The partial
results are then added into the full correlation.

Two configurations are provided. Both are for a 255-chip code and 12-bit
samples:

| scheme   | NSEG | taps / multipliers | clock        | FIFOs (words x bits)        | FIFO RAM   |
|----------|------|--------------------|--------------|-----------------------------|------------|
| basic    | 2    | 128                | 2 x sample   | 128 x 19                    | 2432 bits  |
| advanced | 4    | 64                 | 4 x sample   | 192 x 18, 128 x 18, 64 x 18 | 6912 bits  |

The cost is a faster clock: halving (or quartering) the logic doubles (or
quadruples) the clock frequency.

## How the segments add up

Take the basic scheme. The sample register holds `d_{i+1} .. d_{i+128}`.
Two partial correlations can be computed on it:

    R1(i) = sum_{m=1..128} C_m       * d_{i+m}      (first half of the code)
    R2(i) = sum_{m=1..127} C_{m+128} * d_{i+m}      (second half; tap 128 gets 0)

The full correlation is the first half applied to old samples plus the
second half applied to new ones:

    R(i) = R1(i) + R2(i + 128),   i.e.   R(i-128) = R1(i-128) + R2(i)

So in clock 0 of each sample period the filter computes `R1(i)`. It pushes
that value into a 128-word FIFO and pops `R1(i-128)`, which was pushed 128
samples earlier. In clock 1 it computes `R2(i)` and adds it to the popped
value.

With four segments the same idea gives

    R(i-192) = R'1(i-192) + R'2(i-128) + R'3(i-64) + R'4(i)

Segments 1, 2 and 3 are delayed by FIFOs of 192, 128 and 64 words. In
general, segment `s` (counting from 0) is delayed by `(NSEG-1-s) * TAPS`
samples, and the last segment is not delayed.

Each FIFO is pushed and popped on the same clock, once per sample. It is
therefore always full, and behaves as a fixed delay line. It is built as a
RAM with one circular pointer (read before write at the same address), so
no full/empty logic is needed. The register that catches the popped word is
the RAM's registered read port.

A tap whose chip index passes the end of the code gets coefficient 0. With
255 chips this is the newest tap in the last segment. Because of this, the
most recent sample is not yet part of the output.

## Timing and interface of `tdmmf`

- **Clock.** `clk` runs at `NSEG` times the sample rate. A free-running
  counter (`phase_counter`: a 1-bit counter for two segments, a 2-bit one
  for four) selects the segment.
- **Input.** `din` is taken on the clock edge where `din_ready` is high. That
  happens in the last phase, every `NSEG` clocks. There is no back-pressure:
  the source must present a new sample each time.
- **Coefficients.** `pn_code[m-1]` is chip `C_m`. A code bit of 0 means +1 and
  a bit of 1 means -1. The code is an input port, so any code can be loaded;
  it is not fixed in the logic.
- **Output.** `r_out` is loaded on the same edge that takes `din`. If `d_k` is
  the last sample taken before that edge, then

      r_out = sum_{m=1..255} C_m * d_{k-256+m}

  In general the index is `d_{k - NSEG*TAPS + m}`, summed over `m = 1..PN_LEN`.
  `r_out` holds for `NSEG` clocks. It is 20 bits wide (`DATA_W + clog2(PN_LEN+1)`).
- **Valid.** `r_valid` pulses for one clock with each update. It starts once
  `NSEG*TAPS` samples (256 here) have been taken since reset, because before
  that the FIFOs still hold words from before reset.
- **Reset.** `rst` is synchronous and active high. It clears the phase, the
  sample register, the FIFO pointers and registers, and the fill counter. The
  FIFO RAM itself is not cleared.

The multipliers and the adder tree (`correlator`) are combinational, so the
critical path runs from the sample register through `TAPS` additions into a
FIFO or the output register. Nothing is pipelined. A design that needs a
higher clock would add registers in the adder tree and delay `r_valid` to
match.

## Acquisition decision

`threshold_detect` compares `|r_out|` with a programmable threshold on every
valid output. It uses the magnitude so that a data-inverted code period
(negative peak) is also found. `hit` pulses one clock after a qualifying
output, and `acquired` stays set from the first hit until reset. With a
matched code, a peak appears at most one code period after the signal
starts.

## Top level

`tdmmf_top` puts the basic (`b_` ports) and advanced (`a_` ports) schemes
side by side. Each scheme is a `tdmmf` followed by a `threshold_detect`, with
its own clock, reset, code, samples and threshold. They are independent
because their clocks differ (2x and 4x the sample rate). Use either half on
its own, or instantiate `tdmmf` directly with the `NSEG` you need.

## Files

| file | contents |
|------|----------|
| `rtl/tdmmf_pkg.sv` | coefficient type (+1/-1/0), chip-to-coefficient mapping, width helpers |
| `rtl/phase_counter.sv` | segment-select counter |
| `rtl/input_shift_reg.sv` | `TAPS`-deep sample register |
| `rtl/coef_mux.sv` | per-tap coefficient multiplexers |
| `rtl/correlator.sv` | +1/-1/0 multipliers and the segment adder |
| `rtl/seg_fifo.sv` | RAM delay-line FIFO with its output register |
| `rtl/tdmmf.sv` | the filter, parameterised by `PN_LEN`, `DATA_W`, `NSEG` |
| `rtl/threshold_detect.sv` | acquisition threshold |
| `rtl/tdmmf_top.sv` | basic and advanced channels side by side |

Parameters and their defaults:

- `tdmmf`: `PN_LEN = 255`, `DATA_W = 12`, `NSEG = 2`. `TAPS`, the segment-sum
  width (`DATA_W + clog2(TAPS)`: 19 or 18 bits) and the output width are
  derived from them.
- `tdmmf_top`: `PN_LEN = 255`, `DATA_W = 12`.

## Where this design makes its own choices

- **Final sum.** In the basic scheme as usually drawn, the second-segment
  result goes into a register first, and the output is the combinational sum
  of that register and the FIFO register. That output is only correct for
  one clock per sample. Here the final sum (last segment plus all FIFO
  registers) is itself registered. The value is the same, and it is held for
  a whole sample period. The advanced scheme is drawn the same way, with the
  last segment added directly.
- **Sample handshake, valid flag, output width, reset.** The handshake
  (`din_ready`), the `r_valid` flag, the output width and the reset
  behaviour are this design's own.
- **Chip mapping.** The mapping of code bits to +1/-1, and the code as an
  input port, are choices of this design.
- **Detector details.** The detector's use of the magnitude and its sticky
  flag are choices of this design.
- **Segment-sum overflow.** The segment sum keeps the classic width of
  `DATA_W + log2(TAPS)` bits. It wraps in exactly one case: every stored
  sample is -2048 and every coefficient in the segment is -1 (sum +2^18 in
  19 bits). Widen `SUM_W` in `tdmmf` by one bit if that input can occur.
- **Code length.** `NSEG` need not be a power of two, and `PN_LEN` need not
  be 255: padding taps beyond the code get 0, and the counter wraps at
  `NSEG-1`. Only the two configurations above come from the original scheme.

Not included: the local PN code generator (the code is an input) and the
conventional fully parallel matched filter. The parallel filter serves only
as the reference in the testbenches.

## Resources

After technology-independent synthesis, the basic filter has:

- 1574 flip-flop bits, 1536 of them the sample register;
- 2432 RAM bits.

The two channels together have 9344 RAM bits (2432 + 6912), matching the
table above.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

- `tb_phase_counter`: counting and wrap for 2, 3 and 4 segments, and reset
  in mid-count.
- `tb_input_shift_reg`: random shifts against a queue model.
- `tb_coef_mux`: every tap in every phase, for random codes, in both
  configurations.
- `tb_correlator`: random and extreme dot products.
- `tb_seg_fifo`: 5- and 128-deep delay with irregular pushes.
- `tb_threshold_detect`: random magnitudes, the most negative input, the
  sticky flag and reset.
- `tb_tdmmf`: the filter against a direct 255-term correlation, using
  `tdmmf_check.sv`. It runs the two- and four-segment configurations at full
  size, plus a 31-chip three-segment one with two padding taps. It checks
  every output, the one-sample-per-`NSEG`-clock rate, the valid timing and a
  refill after a mid-run reset.
- `tb_tdmmf_top`: both channels at full size, using `acq_scenario.sv`. The
  input is a 255-chip m-sequence (LFSR `x^8+x^6+x^5+x^4+1`), first on noise
  only, then at a random offset with noise and a data sign that flips every
  two periods. It checks every output and every detector decision against
  the direct correlation. It requires positive peaks, negative peaks,
  below-threshold outputs and noise-only outputs to occur. It also checks
  that the first peak comes no later than one code period after the
  aligned code starts.

To run one with Verilator (5.x), from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        --top-module tb_tdmmf_top rtl/tdmmf_pkg.sv tb/tb_tdmmf_top.sv -o sim
    ./obj_dir/sim

All testbenches finish in well under a second.
