# Serial pipelined single precision FFT

This is a radix-2, decimation-in-frequency (DIF) FFT for complex numbers in
IEEE 754 single precision. Its main aim is small hardware rather than
throughput. Samples arrive one per sample period, and the transform is built
as a chain of stages of two kinds:

- **Butterfly ("MUX") stages.** Each pairs a sample with the one half a block
  earlier, using a feedback shift register.
- **Twiddle stages.** Each multiplies the stream by the twiddle factors.

For the default N = 8 there are five stages:

```
x(n) ──► MUX stage ──► twiddle ──► MUX stage ──► twiddle ──► MUX stage ──► X(k)
         feedback 4    W8^0..3     feedback 2    W8^0,W8^2   feedback 1   (bit-reversed order)
```

Each stage holds only **one** floating point add/sub unit. A twiddle stage
also holds one multiplier. The stage runs that unit four times per sample on
a clock four times faster than the sample rate. The whole 8-point FFT
therefore has five adders and two multipliers, and a register for each
complex value that must wait.

The architecture follows the master's thesis *Low Power Synchronous Design of
Hardware Architecture for IEEE 754 Single Precision Floating Point Fast
Fourier Transform*. The RTL here is a new SystemVerilog implementation of it.
It is parameterised in N, and the places where it departs from the thesis are
listed below.

## The delay-feedback butterfly stage

Stage s of an N-point FFT (s = 0 … log2N−1) has a feedback register of depth
D = N/2^(s+1), giving 4, 2 and 1 for N = 8. Every sample carries its position
p in the frame. The stage's `swap` signal is bit log2(D) of p.

- **swap = 0** (first half of a block of 2D samples). The input sample is
  pushed into the feedback register. The value leaving the register goes to
  the output. That value is a difference stored during the previous half
  block.
- **swap = 1** (second half). The input x(p) meets x(p−D), which is just
  leaving the feedback register. The sum x(p−D)+x(p) goes to the output. The
  difference x(p−D)−x(p) goes into the feedback register, to be sent out in
  the next half block.

So each block leaves the stage as D sums followed by D differences, D sample
periods late. The position of an output sample is the input position minus D
(mod N). That is exactly what the next twiddle stage and butterfly stage
need. After the last stage the results come out in bit-reversed order:
X(0), X(4), X(2), X(6), X(1), X(5), X(3), X(7) for N = 8.

`out_bin` gives k for every result. Putting the results back in natural order
is left to the consumer, as in the thesis.

## Four operations per sample: the phase schedule

This part is the least obvious. One sample period lasts four cycles of the
clock `clk`; a 2-bit phase counter (`fft_ctrl`) numbers them 0–3. All stages
share the same phase controls:

| phase | `s1` | `ctl` | MUX stage add/sub computes | twiddle stage multiplier | twiddle stage add/sub |
|---|---|---|---|---|---|
| 0 | 0 | 0 | re(fb) + re(in) | a_r·c_i | subtracts (a_r·c_r − a_i·c_i) |
| 1 | 1 | 0 | im(fb) + im(in) | a_i·c_r | – |
| 2 | 0 | 1 | re(fb) − re(in) | a_r·c_r of the next sample | adds (a_r·c_i + a_i·c_r) |
| 3 | 1 | 1 | im(fb) − im(in) | a_i·c_i of the next sample | – |

**MUX stage.**
- Multiplexers A and B select the real or the imaginary part (`s1`) of the
  input register and of the feedback output.
- One fast register keeps the previous result, so the adder output and that
  register together hold a complex result after phases 1 and 3.
- On the half-period edge at the end of phase 1 (`ctrl.mid`) the output
  register loads either the two sums or the feedback output.
- On the edge that ends the sample period (`ctrl.tick`):
  - the input register loads the next sample;
  - the feedback register shifts in either the input or the two differences.

**Twiddle stage.**
- Its input, the butterfly output register, changes at the end of phase 1,
  so the stage works from phase 2 to phase 1 of the next period.
- The multiplier sees one product per phase.
- Two registers m1, m2 hold the last two products. In phase 0 they hold
  (a_r·c_r, a_i·c_i), so the add/sub unit gives the real part. In phase 2
  they hold (a_r·c_i, a_i·c_r), so it gives the imaginary part.
- The real part is held in a register loaded in phase 0. The complex result
  (with its position and valid flag) loads into the output register in
  phase 2. It is then steady when the next butterfly stage samples it at the
  end of that period.
- Sums of the previous butterfly are multiplied by exactly 1, as in the
  thesis. The multiplication by 1 is exact: with the hidden 1, the product's
  bit 47 is 0, so the mantissa passes through unchanged.

The thesis uses three clocks with periods T, T/2 and T/4. This design uses
one clock of period T/4 and load enables on the right phases (the sample
edge for T, the half-period edge for T/2), so it is fully synchronous in a
single clock domain.

## Floating point units

`fp_addsub` and `fp_mult` follow the classic textbook structure and truncate
rather than round, like the thesis design.

- **Add/sub sign.** The operation actually carried out on the magnitudes is
  sign(a) XOR sign(b) XOR sub. A subtraction takes the sign of the operand
  with the larger magnitude.
- **Add/sub alignment.** The smaller significand is shifted right by the
  exponent difference. Bits shifted past 24 bits are lost.
- **Add/sub arithmetic and normalisation.** The significands are extended by
  three zero bits and added or subtracted. A leading-one search normalises
  the result, and the mantissa is truncated to 23 bits.
- **Multiplier.** It forms the 24×24-bit product. It takes bits [46:24] and
  raises the exponent when bit 47 is set, and takes bits [45:23] otherwise.
- **Special values.** These are this design's own choices:
  - an exponent field of 0 is treated as zero (denormals flushed);
  - underflow gives zero and overflow gives infinity;
  - NaN and infinity inputs are not handled specially.

Because the arithmetic matches the thesis, the 8-point test vector of the
thesis, (2+4j, 1−3j, 7+21j, 15+5j, 12+8j, 26−31j, −4−9j, −10−21j), gives the
same eight single precision results bit for bit. For example,
X(1) = 0x41B6A09F + j·0xC1595F64 (22.828428 − 13.585789j).

Accuracy on random data is within a few units in the last place times log2N,
relative to the largest output.

## Interface and timing (`fft_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | fast clock, period T/4 |
| `rst_n` | in | 1 | asynchronous active-low reset |
| `in_valid`, `in_re`, `in_im` | in | 1, 32, 32 | input sample, taken on the rising edge at the end of a cycle in which `sample_en` is high |
| `sample_en` | out | 1 | high in phase 3, the last fast cycle of each sample period |
| `frame_start` | out | 1 | the next sample taken is position 0; a frame may only start then |
| `out_valid`, `out_re`, `out_im` | out | 1, 32, 32 | result register, changes only at the end of phase 1 and is steady on the sample edge |
| `out_pos`, `out_bin` | out | log2N | output position, and frequency index k = bit-reverse(`out_pos`) |

**Frames.**
- A frame is N samples on N consecutive sample periods.
- Frames may follow each other without a gap.
- Stopping a frame part way through is not supported: the frame counter
  finishes the frame anyway, and the missing samples are marked invalid.
- When the last frame has left and nothing new is offered, the sample-rate
  registers stop loading. They restart with the next frame.
- The fast registers inside the arithmetic keep toggling.

**Latency.**
- The last result of a frame appears in the output register in sample period
  2·(N + log2N − 1). Period 1 is the one in which x(0) is offered.
- This gives 20 periods for N = 8, then 38, 72, 138, 268, 526, 1040 and
  2066 for N = 16 to 1024, the same as the thesis's count; all eight sizes
  are simulated.
- Each twiddle stage gets one and a half periods (from the half-period edge
  to the next sample edge) and adds one period, as the thesis counts it.

**Throughput.** One complex sample per sample period, continuously.

## Parameters and size

`fft_top` has one parameter, `LOG2N` (default 3, i.e. N = 8, the size the
thesis designs). It accepts 2 ≤ LOG2N ≤ 10; the upper limit comes from the
10-bit position field in `fft_pkg`.

**Twiddle factors.** They are not stored as a listed table. `twiddle_rom`
computes W_N^k = cos(2πk/N) − j·sin(2πk/N) at elaboration. It works in double
precision and rounds to nearest single. For N = 8 this reproduces the
constants 0x3F3504F3 etc. exactly.

**Rule for the twiddle factors.** After butterfly stage s the stream is made
of blocks of 2D samples. Position p takes the following factor:
- W_N^((p mod D)·2^s) when bit log2(D) of p is 1;
- 1 otherwise.

**Storage.** The feedback registers hold N−1 complex values in all. Pipeline,
input and output registers add a few more per stage. At N = 8 a generic
synthesis gives about 1300 flip-flop bits.

## Departures from the thesis

- **Clocking.** One clock at the fast rate with enables, instead of three
  clocks at T, T/2 and T/4.
- **Butterfly stage.** One fast result register instead of four. The output
  register loads on the half-period edge, when the two sums are ready. The
  feedback register loads on the sample edge, when the two differences are
  ready.
- **Swap control.** It is derived in each stage from the sample position,
  which travels with the data together with a valid flag. The thesis drives
  the swap lines from its testbench with a fixed schedule. The schedule that
  results here has the same pattern: stage 1 has swap 0 for four samples and
  then 1 for four, stage 2 has 0,0,1,1, and stage 3 has 0,1. All three
  stages follow the thesis schedule period for period.
- **Framing.** A frame counter (`frame_start`) handles frame alignment, and
  the pipeline stops when idle. The thesis gives no frame handshake.
- **Twiddle stage outputs.** The output registers are arranged as a
  real-part register plus an output register, not a two-register shift, so
  both parts are steady together on the sample edge.
- **Multiplier zero operand.** It gives a signed zero. The thesis returns a
  small non-zero constant.
- **Multiplier bias.** It is 127. The thesis text says 128 in one place next
  to the binary value for 127.
- **Special values.** Zero, underflow and overflow are handled as described
  above; the thesis does not define them.
- **Output order.** Not restored; `out_bin` labels each result.
- **Power saving.** Clock gating and power gating, which the thesis suggests
  as future work, are not implemented. Nor are the faster adder and
  multiplier designs it proposes.

The power and frequency figures of the thesis come from a 45 nm standard
cell flow and are not reproduced here.

## Files

`rtl/`:

| file | contents |
|---|---|
| `fft_pkg.sv` | types (`fp32_t`, `cplx_t`, `stage_bus_t`, `ctrl_t`), the real-to-single conversion and the twiddle function |
| `fp_addsub.sv` | single precision add/subtract (combinational) |
| `fp_mult.sv` | single precision multiply (combinational) |
| `fft_ctrl.sv` | phase counter, shared controls, frame counter, idle stop |
| `bfly_mux_stage.sv` | delay-feedback butterfly stage, parameter `FB_DEPTH` |
| `twiddle_rom.sv` | twiddle factor table per stage |
| `twiddle_mult_stage.sv` | complex multiply with one multiplier and one add/sub |
| `fft_top.sv` | the pipeline |

`tb/`:

| file | what it checks |
|---|---|
| `fft_tb_pkg.sv` | helpers: single-to-real conversion, random values, reference DFT |
| `fp_addsub_tb.sv`, `fp_mult_tb.sv` | exact integer cases, sign table, zeros, random values within ULP bounds |
| `fft_ctrl_tb.sv` | the phase schedule, frame counting and the idle stop |
| `bfly_mux_stage_tb.sv` | depths 4, 2 and 1: sums and differences bit for bit, positions, latency |
| `twiddle_rom_tb.sv` | N = 8 constants bit for bit; N = 64 against cos/sin |
| `twiddle_mult_stage_tb.sv` | complex products against double precision; unit factors exact; latency |
| `fft_top_tb.sv` | N = 8 end to end (see below) |
| `fft_size_check.sv`, `fft_sizes_tb.sv` | N = 16 to 1024 against a DFT, with their latencies |

`fft_top_tb` runs the thesis test vector (bit-exact against the thesis
results), then 62 random frames back to back, an idle gap and a restart.
That is 64 frames and 512 samples. It checks every result against a DFT and
checks the latency. It compares the swap setting of every butterfly stage
during the first frame with the thesis schedule, period for period. It also
counts that each mechanism happened: both swap
settings in every stage, non-unit twiddle factors, back-to-back frames, the
idle stop and the restart.

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and ends.

## Simulating

With Verilator 5:

```
RTL="rtl/fft_pkg.sv rtl/fp_addsub.sv rtl/fp_mult.sv rtl/fft_ctrl.sv \
     rtl/twiddle_rom.sv rtl/bfly_mux_stage.sv rtl/twiddle_mult_stage.sv rtl/fft_top.sv"
verilator --binary --timing --assert $RTL tb/fft_tb_pkg.sv tb/fft_top_tb.sv \
  --top-module fft_top_tb
./obj_dir/Vfft_top_tb
```

For another testbench, replace the last file and `--top-module`. The
multi-size test also needs `tb/fft_size_check.sv`; it takes under a minute
to build and run, the others seconds.

To build a different size, set `LOG2N` on `fft_top`.
