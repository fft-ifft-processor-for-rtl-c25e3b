# 128-point FFT/IFFT with four parallel delay-feedback paths

This is a pipelined 128-point FFT/IFFT processor for OFDM ultra-wide-band
(UWB) systems. UWB needs 409.6 Msample/s. The core accepts **four complex
samples every clock** and returns four results every clock. Frames follow
each other with no gap. So a 102.4 MHz clock is enough for UWB, and
1 Gsample/s needs 250 MHz.

The architecture is a *mixed-radix multipath delay-feedback* (MRMDF)
pipeline. Two ideas are combined:

* **Multipath.** As in a multipath delay-commutator (MDC) FFT, there are
  four data paths, which gives the throughput.
* **Delay feedback.** As in a single-path delay-feedback (SDF) FFT, each
  butterfly parks its first operand in a feedback buffer. That buffer later
  carries the butterfly's difference output. No separate input buffer or
  reorder buffer is needed.

The 128-point transform is factored as **2 x 8 x 8**. Radix-8 steps need far
fewer non-trivial complex multiplications than radix-2. The leftover factor
of 2 becomes a radix-2 first stage.

The whole core holds 124 complex words of storage and 48 complex
adders/subtractors. It has two general complex multipliers and nine constant
multipliers shared by the four paths.

## Index mapping: where each sample is, and when

This mapping is the key to the whole design. Every module is a
consequence of it.

A frame is 32 *slots* (enabled clocks) of 4 *lanes*. Lane `p` in input slot
`t` carries `x(4t + p)`, so the input is in natural order.

The decomposition (decimation in frequency) is:

```
n = 64*n1 + n2          k = k1 + 2*k2            (radix 2, module 1)
n2 = 8*m1 + m2          k2 = l1 + 8*l2           (radix 8 twice, modules 2 and 3)
X(k1 + 2*l1 + 16*l2) = sum_m2 W8^(m2*l2) * W64^(m2*l1) *
                       sum_m1 W8^(m1*l1) * W128^(n2*k1) * (x(n2) + (-1)^k1 x(n2+64))
```

| point in the pipeline   | slot `s` (5 bits), lane `p` holds                                                                  |
|-------------------------|----------------------------------------------------------------------------------------------------|
| core input              | `x(4s + p)`                                                                                        |
| module 1 output         | 64-point sequence `k1 = s[4]`, element `n2 = 4*s[3:0] + p`                                         |
| BU8 output (module 2)   | radix-8 output `l1 = bitrev3(s[3:1])` for `m2 = 4*s[0] + p`, sequence `k1 = s[4]`                   |
| module 3 output = core output | bin `k = bitrev7(4s + p)`, i.e. `l2 = s[0] + 2*p[1] + 4*p[0]`, `l1 = bitrev3(s[3:1])`, `k1 = s[4]` |

Three facts follow from this table:

* **Module 1.** The two operands of a radix-2 butterfly, `x(n2)` and
  `x(n2+64)`, are in the same lane, 16 slots apart. A 16-word feedback buffer
  per lane is therefore enough.
* **Module 2.** In each lane, the eight operands of one radix-8 butterfly
  are 2 slots apart. Two butterflies are interleaved (`s[0]`). The three
  radix-2 steps of the butterfly pair slots 8, 4 and 2 apart, which gives
  feedback buffers of 8, 4 and 2 words.
* **Module 3.** The operands over `m2` are spread over all four lanes and two
  consecutive slots. The first radix-2 step pairs slots 1 apart in the same
  lane, using a 1-word buffer. The second and third steps pair *different
  lanes in the same slot*, so they need no storage at all.

The output is in bit-reversed order of the input. `out_k` tells the user
which bin each lane carries.

## Module 1: radix-2 stage with time-shared multipliers (`mrmdf_module1`)

Each lane has a 16-word shift register. Together these form the 64-word
register file. A frame passes through module 1 like this:

| input slots | what the four BU2 butterflies do                          | what leaves on the lanes                                   |
|-------------|-----------------------------------------------------------|------------------------------------------------------------|
| 0..15       | park `x(n2)`; the buffer returns last frame's differences | last frame's `(x(n2) - x(n2+64)) * W128^n2`                 |
| 16..31      | `a = x(n2)` from the buffer meets `b = x(n2+64)`          | `a + b` at once; `a - b` goes into the buffer              |

Only half of the leaving values need a twiddle. The scheme uses two
multipliers, each busy every clock:

* Multiplier 0 weights the lane-0 difference before it is parked. In the
  other half-frame it weights the parked lane-2 difference as it is read.
* Multiplier 1 does the same for lanes 1 and 3.

Without this rescheduling, four multipliers would be needed, each busy only
half the time.

Each multiplier has its own twiddle ROM (`twiddle_rom`). The ROM stores only
a quarter period of the cosine: 33 words, `round(4096*cos(2*pi*e/128))`,
e = 0..32. It rebuilds `W128^e` by reading the sine from the mirrored
address, then rotating by `(-j)^quadrant`.

## Module 2: four radix-8 butterflies and the modified multiplier (`mrmdf_module2`)

Each lane has a `bu8`. A `bu8` is three `sdf_bu2` steps with feedback buffers
of 8, 4 and 2 words:

* After step 1, differences are multiplied by `W8^m`, m = 0..3.
* After step 2, differences are multiplied by `W4^m`.

`W8^0` and `W8^2 = -j` are wiring. `W8^1` and `W8^3` need one add/subtract
and one multiplication by the constant 1/sqrt(2) (`w8_rot`).

Next, the four lanes need `W64^(m2*l1)` at the same time. `mod_cmul` does
this without general multipliers:

1. It works out each lane's exponent `E` from the slot and lane.
2. It maps `E` into the first octant ("region A", 0 to 45 degrees). That
   leaves the trivial 1, or one of eight constant pairs `(cos a, sin a)`,
   a = 1..8 sixty-fourths of a turn.
3. There is one constant multiplier (`const_cmul`) per constant. A crossbar
   routes each lane to the multiplier of its constant. The multiplier forms
   the four products `xr*C`, `xi*S`, `xr*S` and `xi*C`.
4. The lane builds its result by choosing signs and swapping real and
   imaginary parts:
   * `x*(C - jS)` if `E mod 16 <= 8`
   * `x*(S - jC)` otherwise
5. It rotates by `(-j)^(E div 16)`.

The sharing works because of the index mapping. In every slot the four lanes
need four different constants, except in slots 2 and 3 of each 16-slot
group. There, lanes 1 and 3 both need a = 4, so a ninth multiplier holds a
second copy of constant 4. An assertion in `mod_cmul` checks that no
multiplier is ever claimed twice.

| slot in group | 0-1 | 2-3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 | 13 | 14 | 15 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| region-A constant, lanes 0..3 | 0 0 0 0 | 0 4 8 4 | 0 2 4 6 | 8 6 4 2 | 0 6 4 2 | 8 2 4 6 | 0 1 2 3 | 4 5 6 7 | 0 5 6 1 | 4 7 2 3 | 0 3 6 7 | 4 1 2 5 | 0 7 2 5 | 4 3 6 1 |

## Module 3: the cross-lane radix-8 (`mrmdf_module3`)

Module 3 has three steps:

1. **Step 1** is a 1-word delay-feedback BU2 in every lane. Lane `p`
   multiplies its differences by `W8^p`.
2. **Step 2** is a plain butterfly between lanes 0 and 2, and between lanes 1
   and 3. The lane-3 difference is multiplied by `-j`.
3. **Step 3** is a plain butterfly between lanes 0 and 1, and between lanes 2
   and 3.

Each step is one register stage.

## Inverse transform, modes and stalls (`mrmdf_fft128`, `fft_ctrl`)

An IFFT reuses the forward datapath:

1. The input is conjugated (`conj_unit`).
2. The FFT is computed.
3. The result is conjugated again and divided by 128 (`ifft_scale`). The
   divide is a 7-bit arithmetic shift, which truncates toward minus
   infinity.

The `ifft` pin is sampled at slot 0 of each frame, so a frame is never
split between modes. The control unit queues each frame's mode until that
frame leaves the core, so FFT and IFFT frames can be mixed back to back.

All registers advance together on `in_valid`. A clock with `in_valid` low is
a stall: nothing moves, and no data is lost. Consequently the last frame
stays inside the core until more input beats push it out. The latency is
`LATENCY = 40` enabled clocks, from a frame's first input beat to its first
output beat: 31 slots of buffering plus 9 register stages.

## Number formats and accuracy

* **Inputs:** 12-bit two's-complement real and imaginary parts.
* **Growth inside the core:** one guard bit is added at the input. Each of
  the seven radix-2 steps grows the word by one bit. Nothing can overflow,
  not even at full scale or at a 45-degree corner.
* **Outputs:** 20-bit `out_re`/`out_im`.
  * FFT: the unscaled sum `X(k) = sum x(n) W128^(nk)`.
  * IFFT: `x(n) = (1/128) sum X(k) W128^(-nk)`, in the same 20-bit field.
* **Twiddles:** 14-bit with 12 fraction bits. Products are rounded to
  nearest.
* **Measured accuracy** against a double-precision DFT, random full-range
  input: the largest error was about 10 LSB of the 20-bit FFT output, and
  about 1 LSB of the IFFT output.
* **Mostly this design's choices:** the word lengths, the reset, the stall
  rule and the mode latch.

## Test chip wrapper (`mrmdf_chip`, `test_module`)

The top level is a test-chip arrangement. `test_module` is loaded serially
with one frame (`ser_valid`/`ser_re`/`ser_im`, 128 samples in natural order).
While `run` is high, it plays the frame into the core four samples per clock,
frame after frame. It stops only at a frame boundary. `clear` empties it for
a new frame. The core's result lanes are the chip outputs.

`mrmdf_fft128` is the core itself, for use without the wrapper.

## What follows the published architecture, and what is chosen here

**Taken from the published MRMDF design:**

* the 2 x 8 x 8 split and the four paths
* the 64-word register file of module 1, with two multipliers and two ROMs
  reused in alternate half-frames
* BU8s with 8/4/2-word feedback buffers and trivial twiddles
* the region-A constant multiplier with a duplicate constant 4
* the cross-path last two steps of module 3
* conjugate-and-shift IFFT and bit-reversed output order
* 124 storage words and 48 complex adders
* a serial-load test module in front of the core

**Chosen here, where the published description gives no detail:**

* all word lengths and the rounding
* the exact input lane order, deduced from the 16-cycle operand spacing
* the order of the trivial twiddles inside a BU8
* the crossbar of the constant multipliers
* reset, the stall rule, the per-frame mode latch and queue
* the `out_k` helper output
* the test module's replay and `run`/`clear` controls

## Files

| file | contents |
|------|----------|
| `rtl/fft_pkg.sv` | sizes, word lengths, quarter-wave cosine table, `w128()`, bit reversal |
| `rtl/mrmdf_chip.sv` | top: test module + core |
| `rtl/test_module.sv` | serial-in, four-parallel-out frame buffer |
| `rtl/mrmdf_fft128.sv` | the FFT/IFFT core |
| `rtl/fft_ctrl.sv` | enable, slot counter, per-frame mode latch and queue, output valid |
| `rtl/conj_unit.sv`, `rtl/ifft_scale.sv` | conjugate blocks, divide-by-128 block |
| `rtl/mrmdf_module1.sv`, `rtl/twiddle_rom.sv`, `rtl/cmul.sv` | radix-2 stage, its ROMs and multipliers |
| `rtl/mrmdf_module2.sv`, `rtl/bu8.sv`, `rtl/sdf_bu2.sv`, `rtl/w8_rot.sv`, `rtl/mod_cmul.sv`, `rtl/const_cmul.sv` | first radix-8 stage |
| `rtl/mrmdf_module3.sv` | second radix-8 stage |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each has a watchdog. With Verilator 5:

```
verilator --binary -Irtl -Itb rtl/fft_pkg.sv tb/tb_mrmdf_chip.sv \
          --top-module tb_mrmdf_chip -Mdir obj -o sim && obj/sim
```

Replace `tb_mrmdf_chip` with any other testbench.

* **`tb_mrmdf_chip`** runs the top at its default sizes. It loads two frames
  serially and pushes ten frames through the core. The FFT/IFFT pin toggles
  mid-frame. It checks every bin against a double-precision DFT. It also
  checks the 40-clock latency, the bit-reversed order, and that loads,
  back-to-back frames, stalls, both modes and mode switches all occurred.
* **`tb_mrmdf_fft128`** does the same for the bare core. It adds random
  stall beats inside frames, a full-scale frame, and a check that a frame
  leaves in 32 consecutive clocks.
* **Module testbenches** compare each module against independent
  floating-point models of its step of the transform. These are
  `tb_mrmdf_module1/2/3`, `tb_bu8` and `tb_mod_cmul`. The checks allow for
  the 12-bit twiddle quantisation.

## Limits and open points

* The general complex multiplier is the plain four-multiplier form.
* Only functional behaviour is verified. Nothing here checks clock rate,
  area or power. The published figures are 250 MHz and 175 mW for the peak
  rate, and 110 MHz and 77.6 mW at the UWB rate, in 0.18 um CMOS.
* Two bits of every `out_k` lane are constant by construction, because the
  lane number fixes the top two bits of the bin index. Synthesis reports them
  as constant outputs.
