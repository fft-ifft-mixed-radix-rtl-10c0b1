# Mixed radix FFT/IFFT processors: a 128-point pipeline and a 32-point memory-based core

This is a streaming 128-point FFT/IFFT engine of the kind used in multi-band
OFDM ultra-wideband radios. It takes one complex 16-bit sample per clock and
delivers the transform in natural order. Both directions run in the same
hardware, and the direction can change from one frame to the next.

The main idea is to split the transform by **mixed radices, 2 × 8 × 8**. A
radix-8 butterfly needs far fewer non-trivial complex multiplications than
three radix-2 levels do. But 128 is not a power of 8, so one radix-2 stage
comes first, followed by two radix-8 stages. Each radix-8 butterfly is built
from three radix-2 steps, with fixed W8 rotations between them. Only two
general-purpose complex multipliers remain in the whole datapath: one between
each pair of stages.

A second, smaller processor sits next to it under the same top level
(`mixed_radix_fft`). It is a **32-point radix 4 × 4 × 2 transform** computed
the other way: a single radix-4 butterfly core, with three complex multipliers
and a radix-2 mode, works in place on a 32-word memory and is reused for every
butterfly of every stage. It shows the memory-based alternative: one core
instead of a pipeline of stages. The two processors share only the clock and
the reset.

## The decomposition

With the input index written as `n = 64·n1 + n2` and the output index as
`k = k1 + 2·k2` (n1, k1 ∈ {0,1}; n2, k2 ∈ 0..63):

```
X(k1 + 2k2) = Σ_n2 [ Σ_n1 x(64n1 + n2)·(−1)^(n1·k1) ] · W128^(n2·k1) · W64^(n2·k2)
```

- **Stage 1 (radix 2)** pairs samples 64 apart. Its outputs are then multiplied
  by `W128^(k1·n2)`. This leaves two independent 64-point DFTs.
- Each 64-point DFT is split again. Write `n2 = 8·m1 + m2` and
  `k2 = k21 + 8·k22`:
  - **stage 2 (radix 8)** works over m1, on samples 8 apart;
  - then comes the multiplication by `W64^(m2·k21)`;
  - **stage 3 (radix 8)** works over m2, on adjacent samples.

Inside a radix-8 butterfly, write `m = 4a + 2b + c` and `k = d + 2e + 4f`. The
butterfly then runs as three radix-2 steps:

| step | pairs over | delay | rotation after the step |
|------|-----------|-------|------------------------|
| 1 | a | 4D | `W8^(d·(2b+c))`: 1, (1−j)/√2, −j or −(1+j)/√2 |
| 2 | b | 2D | `W8^(2·c·e)`: 1 or −j |
| 3 | c | D  | none |

Here D = 8 in stage 2 and D = 1 in stage 3. All the bits of the index are
treated one at a time, so the result comes out in plain **bit-reversed order**:
X(k) leaves the pipeline at stream position `bitrev7(k)`. A small ping-pong
memory at the end puts it back in natural order.

## The pipeline

```
in ─ input_ctrl ─ r2 stage (64) ─ ×W128 ─ r8 unit (32,16,8) ─ ×W64 ─ r8 unit (4,2,1) ─ bitrev_buffer ─ out
```

Every butterfly is a **single-path delay-feedback (SDF)** radix-2 stage with a
delay line of D words (`r2_sdf_stage`). The first element of a pair arrives
first and goes into the delay line. When its partner arrives, D positions
later, the stage forms both results:

- the sum leaves at once;
- the difference goes back into the delay line, and leaves D positions later.

So each stage works on every other group of D samples. The delay lines hold
64 + 32 + 16 + 8 + 4 + 2 + 1 = 127 words in total.

### Position-driven control

This is the part that takes some care to follow. There is no central
sequencer. Every sample travels with its **stream position** (`pos`, 7 bits,
its place within the frame as seen at that point of the pipeline):

- A butterfly stage with delay D uses bit `log2(D)` of the position to tell
  the first element of a pair from the second. Its output position is
  `pos − D` (mod 128).
- The rotators and twiddle multipliers compute their exponents from the
  position bits. For example, after stage 2 the bits `pos[5:3]` hold k21
  bit-reversed, and `pos[2:0]` hold m2.
- Two flags also travel with each sample, through the delay lines too:
  - `vld`: the sample belongs to a real frame;
  - `inv`: the frame is an inverse transform.

Because of this, each block can be tested alone, and the stages can be
re-timed without touching any controller.

The whole pipeline moves together on a single enable (`en`): one *step* per
clock in which it is high. In a delay-feedback pipeline, a frame's last results
only leave when later samples push them out. `input_ctrl` handles this:

- **Stall:** if `in_valid` drops in the middle of a frame, the pipeline simply
  does not step.
- **Flush:** when no input waits at a frame boundary but valid samples are
  still inside, the controller runs a whole frame of empty positions
  (`vld = 0`), one per clock. During that frame `in_ready` is low and the
  `flushing` output is high. The controller knows that samples are still
  inside from a count: samples accepted minus valid samples that reached the
  end of the pipeline.
- **Frames always enter at position 0**, so the butterfly phases stay aligned.

## Arithmetic

- Data and twiddles are 16-bit two's complement, Q1.15. The twiddle table
  stores +1.0 as 32767.
- The complex multiplier keeps its full 32-bit products. They are rounded to
  16 bits only afterwards, by adding half an LSB and truncating, with
  saturation.
- Every radix-2 butterfly does the same: the 17-bit sum or difference is
  rounded back to 16 bits. So **each radix-2 step scales by 1/2**.
- The processor therefore returns:
  - `X(k)/128` for an FFT;
  - `(1/128)·Σ X(k)·W^(−nk)` for an IFFT, the usual inverse with its 1/N.

  It cannot overflow, except in one case: a rotation of a sample whose complex
  magnitude exceeds 32767 saturates. Such a sample has both parts near full
  scale.
- Accuracy against a floating-point DFT, measured on random frames with parts
  up to ±23000: at most 2 LSB of error in any output part.
- The twiddle table (`twiddle_rom`) is computed at elaboration time:
  `re = round(32767·cos(2πk/128))` and `im = round(−32767·sin(2πk/128))`.
  No data file is needed.

### FFT and IFFT

`in_inverse` is sampled with the first sample of a frame. For an IFFT frame,
real and imaginary parts are swapped on the way in and swapped back on the way
out. This uses `IFFT(x) = swap(FFT(swap(x)))/N`. The mode travels with the
frame, so FFT and IFFT frames can follow each other back to back.
`out_inverse` reports the mode of the frame being delivered.

## The 32-point memory-based processor (`fft32_mem`)

### The radix-4 core (`r4_butterfly`)

The core is a decimation-in-time radix-4 butterfly. The twiddles multiply
inputs B, C and D before the additions; A is never multiplied:

```
y0 = A +  B·Wb + C·Wc +  D·Wd        y2 = A −  B·Wb + C·Wc −  D·Wd
y1 = A − jB·Wb − C·Wc + jD·Wd        y3 = A + jB·Wb − C·Wc − jD·Wd
```

Bit widths through the core:

- The three products are kept at full precision, 32 bits per part.
- A is aligned to the same binary point (A·2^15).
- The four-term sums are 34 bits wide.
- Each sum is rounded to its 16 most significant bits: add half an LSB, then
  truncate.

This makes every pass of the core an exact **scale by 1/8**, and it can never
overflow. Tying B and D to zero (`radix2 = 1`) turns the same hardware into a
radix-2 butterfly on A and C: y0 = A + C·Wc and y1 = A − C·Wc. The datapath
and the rounding are unchanged, so the radix-2 stage also scales by 1/8. This
costs about two bits of precision against an exact 1/2 scaling, but keeps a
single core.

### Schedule

The input index is `n = 8·n1 + 2·n2 + n3` and the output index is
`k = K1 + 4·K2 + 16·K3`. The input is in natural order. One butterfly runs per
clock:

| phase | clocks | butterfly operands (addresses) | twiddles | results go to |
|-------|--------|-------------------------------|----------|---------------|
| load | 32 | `n` | — | `n` |
| stage 1, radix 4 | 8 | `b, b+8, b+16, b+24` (b = 2n2+n3) | none | K1 replaces n1 |
| stage 2, radix 4 | 8 | `8K1 + 2i + n3`, i = 0..3 | input i × W32^(2·i·K1) | K2 replaces n2 |
| stage 3, radix 2 | 16 | `8K1 + 2K2 + {0,1}` | second × W32^(K1+4K2) | K3 replaces n3 |
| unload | 32 | X(k) read from `8K1 + 2K2 + K3` | — | output, k = 0..31 |

The results end up in **digit-reversed** order, not plain bit-reversed order,
because the radices differ. The unload phase reads them back in natural
order. The memory is a register file that is read and written four words per
clock during the butterfly stages.

- A frame takes 96 clocks.
- The first result leaves 33 clocks after the last input sample is taken.
- `in_ready` is high only during the load phase.
- The output is X(k)/512 for an FFT and (1/512)·Σ X(k)·W32^(−nk) for an IFFT.
  The IFFT uses the same real/imaginary swap as the 128-point processor.
- `stage` (1, 2, 3) shows which butterfly stage is running.
- Accuracy against a floating-point DFT/512: within 1 LSB on random frames.

## Interface and timing (`fft128_mr`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid` / `in_ready` | in / out | 1 | input handshake. `in_ready` is low only during a flush frame |
| `in_inverse` | in | 1 | IFFT for the frame that starts with this sample |
| `in_re`, `in_im` | in | 16 | input sample, Q1.15, natural order n = 0..127 |
| `out_valid` | out | 1 | output word valid. High for 128 clocks in a row per frame; no backpressure |
| `out_re`, `out_im` | out | 16 | X(k)/128 |
| `out_index` | out | 7 | k, from 0 to 127 |
| `out_last` | out | 1 | high when k = 127 |
| `out_inverse` | out | 1 | the frame was an IFFT |
| `flushing` | out | 1 | a flush frame is running |

- **Throughput:** one sample per clock. A frame takes 128 clocks.
- **Latency:** with continuous input, the first output of a frame (k = 0)
  comes 269 clocks after its first input. That is:
  - 127 clocks to take in the frame;
  - 140 pipeline steps (seven butterflies of D + 1, plus six one-register
    rotators and multipliers);
  - one clock to write the reorder memory and one to read it.
- The last 12 results of a frame are pushed out by the first 12 positions of
  the next frame, or by a flush frame. A gap at the start of the next frame
  therefore delays the end of the previous one.
- A flush frame delays new input by up to 128 clocks.

## Files

| file | block |
|------|-------|
| `rtl/fft_pkg.sv` | types (`cplx_t`, `smp_t`), widths, `bitrev7`, `round_sat`, `swap_ri` |
| `rtl/twiddle_rom.sv` | W128^k table |
| `rtl/cmult.sv` | full-precision complex multiplier |
| `rtl/r2_sdf_stage.sv` | radix-2 delay-feedback butterfly, parameter `D` |
| `rtl/w8_rotator.sv` | multiplication by W8^e |
| `rtl/twiddle_stage.sv` | inter-stage twiddle multiplier, `STAGE` = 1 or 2 |
| `rtl/r8_sdf_unit.sv` | radix-8 unit: three radix-2 steps and two rotators, parameter `D` |
| `rtl/bitrev_buffer.sv` | ping-pong reorder memory |
| `rtl/input_ctrl.sv` | frame position, mode latch, stall and flush |
| `rtl/fft128_mr.sv` | the 128-point processor |
| `rtl/r4_butterfly.sv` | radix-4 butterfly core with radix-2 mode |
| `rtl/fft32_mem.sv` | the 32-point memory-based processor |
| `rtl/mixed_radix_fft.sv` | top level: both processors, ports prefixed `f128_` and `f32_` |

Each `rtl/X.sv` has a self-checking testbench, `tb/X_tb.sv`. Each one prints
`TB_RESULT checks=N failures=M`. The reference values are worked out
independently in the testbench, in floating point or 64-bit integers.
`tb/fft128_mr_tb.sv` runs the complete processor at its only size. It sends
seven random frames:

- FFT and IFFT frames back to back;
- one frame with random input gaps;
- an idle period that forces flushes;
- near-full-scale frames.

It compares every output with a direct DFT (tolerance 4 LSB) and checks the
269-clock latency and the 128-clock frame spacing. It also counts stalls,
flush cycles, mode switches and back-to-back frames, and fails if any of them
never happened.

`tb/fft32_mem_tb.sv` does the same for the 32-point processor. It also checks
the stage lengths and the 96-clock frame period.

`tb/mixed_radix_fft_tb.sv` runs both processors at once through the top
level.

To simulate with Verilator (the package has to come first):

```
verilator --binary --timing -Irtl rtl/fft_pkg.sv rtl/*.sv tb/mixed_radix_fft_tb.sv \
          --top-module mixed_radix_fft_tb -o sim && ./obj_dir/sim
```

Replace `mixed_radix_fft_tb` with any other testbench name to run that test.
Every testbench finishes in well under a second.

## How far this follows its source, and what is this design's own

The following come from the published description of the algorithm:

- transform length, 128;
- radix order: radix 2 first, then radix 8 and radix 8;
- the index map `n = 64n1 + n2`, `k = k1 + 2k2`;
- the twiddle definition `W_N^nk = exp(−j2πnk/N)`;
- 16-bit data, 32-bit multiplier products and half-LSB rounding back to
  16 bits;
- bit-reversed output reordering;
- the picture of a radix-8 butterfly drawn as three radix-2 steps;
- the 32-point radix 4-4-2 flow graph;
- the radix-4 butterfly equations, with twiddles on B, C and D;
- the 34-bit sums rounded to 16 MSBs;
- the radix-2 mode made by tying B and D to zero;
- the idea of a memory-based processor with one reused core.

That description names a *multipath delay-feedback* pipeline. It does not give
the number of parallel paths, the step-level W8 exponents, the 64-point split
of the radix-8 stages, the IFFT method or any interface. The choices made here
are:

- **a single path**: one sample per clock. A multipath version would run
  several such streams side by side to reach a higher sample rate;
- scaling by 1/2 in every radix-2 step;
- the Q1.15 twiddle coding with 32767 for 1.0;
- the real/imaginary swap for the IFFT;
- the handshake, the stall and flush rules, and the ping-pong output memory.

For the 32-point processor, the following are this design's: the
decimation-in-time reading of the flow graph, the register-file memory and
the non-overlapped load/compute/unload schedule.
No sample rate or clock frequency is stated,
so none is claimed here. For reference, MB-OFDM UWB needs one 128-point
transform every 312.5 ns. In this single-path form that means a 409.6 MHz
clock.
