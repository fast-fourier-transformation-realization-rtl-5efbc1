# 8-point FFT with distributed-arithmetic butterflies

This is an 8-point radix-2 decimation-in-time (DIT) FFT on 16-bit Q8.8 complex
samples. It has no hardware multiplier. Every twiddle multiplication W·b is
done by **distributed arithmetic (DA)**. The multiplicand is processed one bit
position per clock. Each bit pair {b.re bit, b.im bit} addresses a small ROM of
precomputed partial sums, and those sums are shift-accumulated into the
product. The FFT is therefore built from ROMs, adders and registers only.

The RTL implements the architecture described in R. Bala and S. Aktar, *Fast
Fourier Transformation Realization with Distributed Arithmetic*:

- the 8-point DIT flow graph;
- bit-reversed input ordering;
- Q8.8 fixed point with the twiddle words listed there;
- DA in place of the butterfly multipliers.

That description leaves the following unspecified, so they are this design's
own choices, listed in "Where this RTL departs from or fills in the source":

- the bit-serial schedule;
- the handshake and sequencing;
- truncation and overflow behaviour.

## The arithmetic: Q8.8 and the twiddle ROM

Each real or imaginary part is a 16-bit two's-complement number with 8
fraction bits, covering −128 … +127.996 in steps of 1/256 (`fft_pkg`).

`twiddle_rom` holds W8^k = cos(2πk/8) − j·sin(2πk/8) for k = 0…3. The words
are in **sign-magnitude** form: bit 15 is the sign, and bits 14:0 are the
magnitude in Q8.8. The ROM converts them to two's complement at its output.

| k | real | imag | stored re / im (hex) |
|---|------|------|----------------------|
| 0 | 1 | 0 | 0100 / 0000 |
| 1 | 0.703125 | −0.703125 | 00B4 / 80B4 |
| 2 | 0 | −1 | 0000 / 8100 |
| 3 | −0.703125 | −0.703125 | 80B4 / 80B4 |

0.707 is stored as binary 0.10110100 = 0.703125. That is truncated, not
rounded (0xB5). Products with W8^1 and W8^3 are therefore about 0.6 % small.
W8^4…W8^7 are never stored. The DIT butterfly computes a ± W·b, so the
symmetry W8^(k+4) = −W8^k costs nothing.

## The DA complex multiplier (`da_lut`, `da_cmul`)

This is the part that needs the most care to follow.

Write b = br + j·bi and W = wr + j·wi. The product is:

    Re = br·wr − bi·wi
    Im = br·wi + bi·wr

W is a constant for a given butterfly. So bit i of br and bit i of bi together
pick one of only four possible contributions to each sum:

| addr = {br[i], bi[i]} | real part | imaginary part |
|---|---|---|
| 00 | 0 | 0 |
| 01 | −wi | wr |
| 10 | wr | wi |
| 11 | wr − wi | wr + wi |

`da_lut` is that table for all four twiddles, addressed by {k, addr}: 16 words
per part, each 18 bits wide. Its contents are formed from the `twiddle_rom`
words by constant-address instances and adders. After synthesis the whole
table is constant, so the DA ROM always agrees with the twiddle ROM.

`da_cmul` evaluates the two's-complement weighted sum of the table outputs,
most-significant bit first, in Horner form:

    acc = −T(bit 15)                 // sign bit carries weight −2^15
    acc = 2·acc + T(bit i)           // i = 14 … 0

After 16 steps `acc` holds the exact Q16.16 product in 34 bits. The output is
`acc >>> 8`, wrapped to 16 bits. That is the floor of the product in Q8.8.
Hardware per multiplier:

- two 34-bit accumulators with their adders;
- two 16-bit shift registers for br and bi;
- a 4-bit counter;
- the 2-bit twiddle index.

`da_cmul` timing:

- `start`, while idle, latches `b` and `k`.
- `busy` is high for 16 cycles.
- `done` pulses with `p` valid exactly 16 clock edges after the edge that
  sampled `start`.
- `p` holds until the next product.
- A `start` while busy is ignored.

## Butterflies, stages and bit reversal

`butterfly` computes y0 = a + W·b and y1 = a − W·b. It latches `a` at start,
waits for its `da_cmul`, and registers the four real sums. Its latency is 17
clock edges from start to `done`.

`fft_stage #(STAGE)` holds four butterflies that run in lock step.

- In stage s, the butterflies pair elements that are span = 2^s apart.
- Butterfly m has position q = m mod span and group g = m / span.
- It works on elements i = 2·span·g + q and i + span.
- Its twiddle is W8^k with k = q·8/(2·span).

| stage | pairs | twiddles |
|---|---|---|
| 0 | (0,1) (2,3) (4,5) (6,7) | W^0 |
| 1 | (0,2) (1,3) (4,6) (5,7) | W^0 W^2 W^0 W^2 |
| 2 | (0,4) (1,5) (2,6) (3,7) | W^0 W^1 W^2 W^3 |

The DIT graph needs its input in bit-reversed order to give X(k) in natural
order. `bit_reverse_buffer` captures the eight samples on `load` and stores
x(n) at position bitrev(n). The resulting order is 0, 4, 2, 6, 1, 5, 3, 7.

## Top level and timing (`fft8_da`)

```
x_re/x_im[8] -> bit_reverse_buffer -> fft_stage 0 -> fft_stage 1 -> fft_stage 2 -> X_re/X_im[8], rg[8]
                      ^ load              ^ start[0]     ^ start[1]     ^ start[2]
                      +------------------ fft_ctrl ----------------------+--> busy, done
```

The top contains 12 butterflies, each with its own DA multiplier.

`fft_ctrl` is a four-state machine: IDLE → KICK(s) → WAIT(s) → … → FIN. It
starts each stage only after the previous stage's outputs are registered. One
transform is in flight at a time.

- **Start:** `start` is sampled while `busy` is low. The eight inputs are
  captured on that same edge and need not be held afterwards.
- **Latency:** `done` pulses 57 = 3·(16 + 3) clock edges after the edge that
  sampled `start`. Each stage takes 17 cycles, plus one cycle to be started and
  one for the controller to see its `done`.
- **Throughput:** one transform per 58 cycles.
- **Outputs:** `X_re`, `X_im` and `rg` remain valid until the next transform
  finishes.
- **`rg`:** `rg[k]` is `X_re[k][15:8]`, the 8-bit integer part of the real
  output.

Reset is asynchronous and active low (`rst_n`).

**Range:** sums are not scaled between stages and wrap at 16 bits. An 8-point
transform can grow by up to 8×. For a result that does not wrap, keep every
input part below about 2.0 in magnitude, or more generally keep
Σ|x| below 128.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `twiddle_rom_tb` | the four twiddles against 256/180 Q8.8 constants; \|W\| ≈ 1 |
| `da_lut_tb` | all 16 ROM entries against br·wr − bi·wi and br·wi + bi·wr |
| `da_cmul_tb` | 406 products (corner cases and random) against floor(exact/256); 16-cycle latency; starts ignored while busy |
| `butterfly_tb` | 400+ random butterflies for all k; 17-cycle latency |
| `bit_reverse_buffer_tb` | the 0,4,2,6,1,5,3,7 order and holding between loads |
| `fft_stage_tb` | all three stages against their pairings and twiddles |
| `fft_ctrl_tb` | stage order, load and done timing, and busy, using stage models with random delays |
| `fft8_da_tb` | the whole transform at its default size (below) |

`fft8_da_tb` runs three kinds of frames:

- **Reference frame:** x = {−1, 0, 2, 0, −4, 0, 2, 0} must give
  X = {−1, 3, −9, 3, −1, 3, −9, 3} with zero imaginary parts, so
  rg = FF 03 F7 03 FF 03 F7 03.
- **200 random in-range frames:** each is compared bit for bit with an
  independent fixed-point model, and with a floating-point DFT within
  1.2 % of Σ|x| plus 8 LSB. That tolerance covers the 0.703 twiddle and the
  truncation.
- **30 full-range frames:** these wrap, and must still match the
  fixed-point model.

It also checks the 57-cycle latency of every frame. It counts each mechanism
and fails if any count is zero:

- bit reversal;
- each of the four DA addresses;
- the subtracted sign-bit step;
- non-zero data on W8^1 and W8^3;
- starts ignored while busy;
- wrapped frames.

All testbenches pass.

Run one with plain Verilator from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/fft_pkg.sv tb/fft8_da_tb.sv \
          --top-module fft8_da_tb -y rtl -y tb
./obj_dir/Vfft8_da_tb
```

Substitute any other `*_tb` name. The simulator is two-state, and all state
that is read is reset.

## Where this RTL departs from or fills in the source

- **DIT, not DIF.** The source names both. It describes the even/odd input
  split and the DIT flow graph, but writes its single-butterfly equations in
  a DIF-like form. This RTL is DIT throughout: y = a ± W·b.
- **DA table contents.** The source's four-entry table cannot be right as
  given: its "11" entry is W_IMG − W_REAL while the "01" and "10" entries are
  W_IMG and W_REAL. Here the tables hold the exact partial sums of the complex
  product, one table for the real part and one for the imaginary part.
- **W8^0 word.** The source lists 1.0 as `0000001000000000`, which is 2.0 in
  Q8.8. 1.0 (`0x0100`) is used here.
- **Output byte.** The source's 8-bit results are read as two's complement:
  −1 = FF and −9 = F7.
- **Own choices where the source is silent:**
  - the bit-serial MSB-first DA schedule;
  - floor truncation of products;
  - no scaling, with wrap-around on overflow;
  - all 12 butterflies instantiated (rather than one reused butterfly);
  - parallel 8-sample input and output;
  - the start/busy/done handshake;
  - asynchronous reset;
  - stage-by-stage sequencing (no overlap of transforms).

## Changing it

- **Sizes and types:** `DATA_W`, `FRAC_W`, `N` and `LOG2N` live in
  `fft_pkg`, along with the `cplx_t`, `lut_t` and `acc_t` types.
  `da_cmul` takes one cycle per bit of `DATA_W`. Changing `N` also needs more
  twiddles in `twiddle_rom`, a wider `k` and a larger DA table, because the
  8-point twiddle set is hard-coded.
- **Throughput:** the stages could be overlapped into a three-frame pipeline
  by starting stage 0 of the next frame while stage 1 runs. The butterflies
  already latch their inputs at start.
- **Rounding:** to round instead of truncate, add 2^(FRAC_W−1) to the
  accumulator before the final shift in `da_cmul`.
