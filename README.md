# 8-point FFT engines that trade multipliers for time

An FPGA has only a few hard multiplier blocks, and an FFT is usually where they go. This
design computes an 8-point FFT of real samples while using as few hardware multipliers as
possible. The radix-2 flow graph for N = 8 is rearranged so that only two non-trivial
multiplications are left, both by the constant sin(pi/4). Everything else is additions,
subtractions and sign swaps. Those two multiplications can then be done in four ways. Each
way is a separate engine, and all four engines sit side by side in `fft8_top`:

| engine | module | multipliers | clocks to result | new result |
|---|---|---|---|---|
| a1 | `fft8_parallel` | 2 hardware `*` | 1 | every clock |
| a2 | `fft8_dsp_shared` | 1 hardware `*`, shared | 3 | every 3 clocks |
| a3 | `fft8_shift_add` | none: a shift-and-add unit built from logic | 2*16+5 = 37 | once per reset |
| a4 | `fft8_cordic` | 1 hardware `*` plus a CORDIC rotator | 2*32+5 = 69 | once per reset |

Pick a1 for speed and a3 when no multiplier block can be spared. a2 is in between. a4
computes sin(pi/4) exactly instead of using a rounded constant, and its accuracy is set by
its number of CORDIC steps.

## The flow graph with two multiplications

The inputs x[0..7] are real, and the outputs are the complex bins X[0..7]. Multiplying by j
only swaps the real and imaginary parts and negates one, so it costs no logic. Because the
inputs are real, every intermediate value is either purely real or purely imaginary, and each
one is stored in a single 16-bit word.

Group 1 runs before the multiplications:

```
t1 = x0 + x4    m3 = x0 - x4          t2 = x6 + x2    m6 = j(x6 - x2)
t3 = x1 + x5    t4 = x1 - x5          t5 = x3 + x7    t6 = x3 - x7
t7 = t1 + t2    m2 = t1 - t2          t8 = t5 + t3    m5 = j(t5 - t3)
m0 = t7 + t8    m1 = t7 - t8
```

These are the two multiplications:

```
m4 =      sin(pi/4) * (t4 - t6)        (real)
m7 = -j * sin(pi/4) * (t4 + t6)        (imaginary)
```

Group 2 runs after them:

```
s1 = m3 + m4   s2 = m3 - m4   s3 = m6 + m7   s4 = m6 - m7
X0 = m0        X4 = m1
X1 = s1 + s3   X7 = s1 - s3   (X7 = conj X1)
X2 = m2 + m5   X6 = m2 - m5
X5 = s2 + s4   X3 = s2 - s4
```

Both groups are functions in `fft8_pkg` (`fft8_pre` and `fft8_post`), and all four engines use
them. The engines differ only in how they produce m4 and m7, and in how they sequence the work
around that.

## Number format

All ports and intermediates are 16-bit two's complement Q8.8, with 8 fraction bits and a range
of [-128, 128).

- Sums wrap at 16 bits. Inputs in [-8, 8) cannot overflow, because |X[k]| <= 64.
- sin(pi/4) is the constant 181/256 (0.70703).
- A Q8.8 product keeps bits [23:8] of the 32-bit result. That truncates toward minus infinity.
- m7 is formed as (t4 + t6) * (-181/256), not as a negated product. The two can differ by one
  LSB.

The result: engines a1, a2 and a3 give bit-identical outputs. Each of them is within 3 LSB
(0.012) of an exact DFT of the same quantised inputs. For the ramp x[n] = n, they give
X1 = 0xFC00 + j 0x09A8 (-4 + 9.656j) and X3 = 0xFC00 + j 0x01A8. The exact value is
-4 + 9.657j.

Engine a4 rotates by the exact angle, so its last bits can differ from the other three. It is
also within 3 LSB of the exact DFT.

## Sharing one multiplier (a2)

`operand_mux` is a pair of 2:1 multiplexers on one select line. It places the operands of
either multiplication in front of a single `q_mult`. `fft8_dsp_shared` loops through three
stages:

| stage | select | work |
|---|---|---|
| `ST_G1` | - | sample `inp`, register the group-1 results |
| `ST_MA` | 0 | `(t4-t6) * 181/256` → register m4 |
| `ST_MB` | 1 | `(t4+t6) * -181/256` = Im(m7), form group 2, write outputs |

After `ST_MB` it goes back to `ST_G1` and samples the inputs again.

## Shift-and-add multiplier (a3)

`shift_add_mult` is the textbook sequential multiplier. It has three registers:

- A: the 2N-bit product, cleared at start.
- B: the 2N-bit multiplicand, loaded into its lower half and shifted left once per step.
- Q: the N-bit multiplier, shifted right once per step.

In each step, B is added to A when Q[0] = 1. After N steps, A holds the product.

It works on magnitudes. The product is negated when the operand signs differ, and because the
magnitude register is N bits wide, -32768 is handled too. A `start` pulse loads the operands.
N clock edges later, `done` pulses for one cycle. `product` (full width) and `q_out` (scaled
back to Q8.8) then stay valid until the next start.

The a3 controller works through the states `S_G1 → S_STA → S_WA → S_STB → S_WB → S_HOLD`:

1. Sample the inputs.
2. Start m4, then wait for `done`.
3. Start m7, then wait for `done`.
4. Write the outputs.

`out_stb` is high after 2N+5 edges. The engine then holds its result until the next reset.

## CORDIC multiplier (a4)

This is the least obvious of the four units. `cordic_mult` computes a*sin(theta) and
a*cos(theta) for a Q8.8 scalar a:

1. **Start.** One hardware multiplication forms x0 = K*a, where K = 0.6072529350 is the product
   of the CORDIC step gains 1/sqrt(1+2^-2i). It also sets y0 = 0 and z0 = theta. The scalar
   therefore enters through the start vector, and no separate multiplication is needed at the
   end.
2. **Micro-rotations.** Step i rotates the vector by s*atan(2^-i). Here s = +1 while the
   residual angle z is >= 0, and s = -1 otherwise:
   ```
   x' = x - s*(y >>> i)
   y' = y + s*(x >>> i)
   z' = z - s*atan(2^-i)
   ```
   These are shifts and adds only.
3. **Result.** After ITER steps, (x, y) = (a*cos(theta), a*sin(theta)).

| quantity | format |
|---|---|
| x, y | 32-bit Q8.24 |
| angle | Q2.30 radians; valid for \|theta\| <= 1.74 |
| `sin_out`, `cos_out` | the top 16 bits of y and x, i.e. Q8.8 |

The elementary angles atan(2^-i) are a small ROM. It is filled at elaboration: entry 0 is pi/4,
and the others are summed from the series x - x^3/3 + x^5/5 - ... in 62-bit integer
arithmetic. No table is stored in the sources.

`done` pulses ITER edges after the start edge. In `fft8_cordic`, m4 is (t4-t6) rotated by
+pi/4, and Im(m7) is (t4+t6) rotated by -pi/4. The operand mux selects both the 16-bit scalar
and the 32-bit angle. With ITER = 32, `out_stb` is high after 69 edges.

## Interface and timing of every engine

| port | width | meaning |
|---|---|---|
| `clk` | 1 | rising-edge clock |
| `rst` | 1 | synchronous, active high; clears the outputs and `out_stb` |
| `inp[0:7]` | 8 x 16 | x[0..7], Q8.8 |
| `out_real[0:7]`, `out_imag[0:7]` | 8 x 16 | X[k] = out_real[k] + j*out_imag[k], Q8.8 |
| `out_stb` | 1 | high once the outputs hold a result; stays high |

To use an engine:

1. Hold the inputs.
2. Pulse `rst` and release it.
3. Wait for `out_stb`.

Engines a1 and a2 then keep sampling their inputs and updating their outputs: every clock for
a1, every three clocks for a2. Engines a3 and a4 compute once per reset.

`fft8_top` gives each engine its own `aN_rst`, `aN_inp`, `aN_out_real`, `aN_out_imag` and
`aN_out_stb`, and only the clock is shared. Its parameters are:

- `SA_N` (default 16): the shift-add operand width.
- `CORDIC_ITER` (default 32): the number of CORDIC steps.

## Where this RTL is its own

These parts follow the original design:

- the two-multiplication flow graph and the Q8.8 16-bit format with the 181/256 constant
- the three multiplier schemes: hardware multiplier, shift-and-add, and a CORDIC whose start
  vector is scaled by the scalar
- the two-input operand multiplexer on one select line
- the port set: eight inputs, sixteen outputs, clock, reset and an output strobe

These parts are this design's own choices:

- the exact stage boundaries and controller states
- the synchronous reset
- the reset-triggered, one-transform-per-reset protocol of a3 and a4
- signed handling in the shift-add unit, by sign and magnitude, using N rather than N-1 steps
- truncation rather than rounding
- the CORDIC widths and the 32-step default
- the Q2.30 angle format and the ROM generation

Not included:

- transform lengths other than 8, which would need larger operand multiplexers and more
  multiplications
- memory-based constant multipliers, such as a product table per constant or its
  symmetry-reduced variants
- a Hartley-transform route to the FFT

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- **Engines** (`fft8_*_tb`): each engine runs 7 fixed vectors (ramp, zeros, all max, all min,
  impulse, alternating, step) and 100 random vectors in [-8, 8). For every vector the testbench
  checks:
  - the exact reset-to-`out_stb` latency;
  - every bin against a double-precision DFT (`tb/fft8_ref_pkg.sv`);
  - the ramp spectrum bit for bit.

  For a1 and a2 it also checks that new inputs are picked up without a reset.
- **Multipliers**: `q_mult_tb`, `shift_add_mult_tb` and `cordic_mult_tb` compare against
  integer or `$sin`/`$cos` references, and check the latency and the one-cycle `done` pulse.
  `operand_mux_tb` checks both selections.
- **Whole design**: `fft8_top_tb` runs all four engines together at the default parameters. It
  checks the latencies and the spectra, and that a1..a3 agree bit for bit when given the same
  vector. It also counts every mechanism it exercises (both mux selections, multiplications
  with each operand pair, negative operands, re-sampling) and fails if one never happens.

To simulate with Verilator 5:

```
verilator --binary --timing -y rtl -y tb rtl/fft8_pkg.sv tb/fft8_ref_pkg.sv \
          tb/fft8_top_tb.sv --top-module fft8_top_tb
./obj_dir/Vfft8_top_tb
```

For another testbench, replace `fft8_top_tb` with its name. Each simulation takes well under
a second.

## Files

| file | contents |
|---|---|
| `rtl/fft8_pkg.sv` | types, constants, group-1/group-2 functions |
| `rtl/q_mult.sv` | Q8.8 hardware multiplier |
| `rtl/operand_mux.sv` | operand selector for a shared multiplier |
| `rtl/shift_add_mult.sv` | sequential shift-and-add multiplier |
| `rtl/cordic_mult.sv` | CORDIC multiplier |
| `rtl/fft8_parallel.sv`, `fft8_dsp_shared.sv`, `fft8_shift_add.sv`, `fft8_cordic.sv` | the four engines |
| `rtl/fft8_top.sv` | the four engines side by side |
| `tb/*_tb.sv` | testbenches; `tb/fft8_ref_pkg.sv` holds the DFT reference and test vectors |
