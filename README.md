# 16-bit floating-point instructions for embedded vision

Image algorithms such as Harris corner detection and Horn & Schunck optical
flow need more accuracy and dynamic range than 8-bit integers give, but 32-bit
floats double the memory traffic and the operator area of a small processor.
This design adds **short floating-point instructions** to embedded processors
instead: numbers in the IEEE-like 16-bit "half" format (F16: 1 sign bit, 5
exponent bits, 10 fraction bits), always **truncated** (rounded toward zero)
and **without denormals**. Such operators are about half the size of their F32
counterparts, two or eight of them fit side by side in one instruction, and
F16 data halves the cache footprint.

The RTL provides the instruction hardware for two kinds of host:

* **a configurable RISC core with a 128-bit memory interface** (`xt_fp_cop`):
  a coprocessor with its own register file, 8-lane SIMD F16 operators, loads
  and stores, a configurable result latency and register interlocks;
* **a NIOS II-style soft core with a custom-instruction port**
  (`nios_f16_ci`): a SIMD2 instruction (two F16 values per 32-bit operand),
  where each operator is either combinational (1 cycle) or multicycle (2
  cycles, with `done`);

plus **F32 → F16 and F32 → F13 storage converters** (`fp_narrow`). The host
processors themselves are not part of the RTL; the top module
`f16_custom_top` brings out the port each of them would drive.

## Number formats

| format | sign | exponent | fraction | bias | stored as |
|---|---|---|---|---|---|
| F32 (IEEE single) | 1 | 8 | 23 | 127 | 32 bits |
| F16 ("half") | 1 | 5 | 10 | 15 | 16 bits |
| F13 | 1 | 5 | 7 | 15 | 16 bits: `s 000 eeeee fffffff` |

F16 covers about 6·10⁻⁵ to 65504. F13 keeps the F16 exponent and drops three
fraction bits, and is accurate enough for corner detection while making the
operators smaller and faster. Every operator module takes the exponent and
fraction widths as parameters `EW` and `MW` (defaults 5 and 10), so F13 is
`EW=5, MW=7`, and the other widths between 4 and 10 fraction bits are
available the same way.

Arithmetic rules, in every module:

* A zero exponent field means zero (there are no denormals). Any result below
  the smallest normal number becomes a zero of the result's sign.
* Results are the exact result rounded toward zero. The adder aligns with
  guard, round and sticky bits so that this holds for subtraction too.
* Overflow gives the largest finite number (±65504 for F16), as IEEE
  round-toward-zero does. An all-ones exponent is infinity or NaN. Infinities
  propagate, and invalid operations give the quiet NaN `0x7E00`.

In a 16-bit lane a short float is packed as "sign in bit 15, exponent and
fraction in the low `EW+MW` bits, zeros between". For F16 there are no padding
bits. For F13 the padding is the three zero bits shown above.

## The operators (one lane)

| operation | module | `fp_op_e` | notes |
|---|---|---|---|
| a + b, a − b | `fp_add` | `OP_ADD`, `OP_SUB` | subtraction flips the sign of b |
| a × b | `fp_mul` | `OP_MUL` | exact (MW+1)² product, truncated |
| a × 2ⁿ | `fp_mul_pow2` | `OP_MUL2N` | exponent + n, saturates |
| a / 2ⁿ | `fp_div_pow2` | `OP_DIV2N` | exponent − n, flushes to zero |
| byte → float, / 2ⁿ | `byte_to_fp` | `OP_B2F` | unsigned pixel; exact for MW ≥ 7 |
| float → byte | `fp_to_byte` | `OP_F2B` | truncates, saturates to 0..255, NaN → 0 |

All of these are combinational. The scale `n` of the pixel conversion is
there because 8-bit images overflow F16 in Harris' coarsity
K = Sxx·Syy − Sxy²: it can need 32 bits. Converting pixels as u/16 (or u/256)
keeps it in range. With /16: |Ix| ≤ 15.94, Ixx ≤ 254, S ≤ 254, and
K ≤ 254² = 64516 < 65504. The end-to-end test shows both cases. With the
scale, nothing saturates. Without it, the smoothing sums saturate at 65504
and K collapses.

`fp_simd_alu` places one copy of every operator in each of `LANES` lanes and
selects one operation for all lanes. Lane *i* is bits `[16i +: 16]`.
`OP_B2F` reads byte *i* of operand a (bits `[8i +: 8]`) for lane *i*;
`OP_F2B` writes byte *i* of the result and clears the upper half. So one
128-bit register holds 8 floats or, in its low half, 8 pixels.

## Register-file coprocessor (`xt_fp_cop`)

```
             in_valid/in_ready, op, rd, rs, rt, imm, ld_data
                              |
        +---------------------v----------------------+
        |  fp_regfile (16 x 128 b, 2R/1W)            |
        |     rs --> va ---+                         |
        |     rt --> vb ---+--> fp_simd_alu (8 lanes)|--> st_data (= va)
        |                        | (or ld_data)      |
        |   write-back  <-- [LAT-1 result stages] <--+
        |   interlock: hold issue while rs/rt is in a stage
        +--------------------------------------------+
```

* **Issue.** The host offers an instruction with `in_valid`. It is taken in a
  cycle where `in_ready` is high. `OP_LD` writes `ld_data` (one 128-bit
  memory word, supplied with the instruction by the host's load unit) to
  `rd`. `OP_ST` shows register `rs` on `st_data`, with `st_valid` in the
  issue cycle. The arithmetic operations write `rd` from `rs` and `rt`, and
  from `imm` for the operations that take a shift count.
* **Latency and interlocks.** Every instruction takes `LAT` cycles
  (default 2; the interesting values are 1, 2 and 4). Its result goes
  through `LAT-1` pipeline stages and is written at the end of the last one.
  There is no bypass. An instruction whose source register is still in a
  stage is held (`in_ready` low, `interlock` high) until the value is in the
  register file. A dependent instruction issued straight after its producer
  therefore waits `LAT-1` cycles. Independent instructions issue every
  cycle. All operations have the same latency, so results retire in order.
  Making the F16 operators short is what removes most of these stalls.
* **Reset.** `rst_n` is asynchronous and active low. It clears the register
  file and the pipeline.
* An assertion flags an undefined `op` offered with `in_valid`.

The default sizes are 8 lanes, which fill the 128-bit memory interface, and
16 registers. A scalar F16 unit is `LANES=1`.

## NIOS II custom instruction (`nios_f16_ci`)

The ports are those of a NIOS II custom instruction: `clk, reset, clk_en,
start, n, dataa, datab, result, done`. `dataa` and `datab` each carry two F16
values, lane 0 in bits 15:0 and lane 1 in bits 31:16. `n[3:0]` is the
`fp_op_e` code. The shift count of `MUL2N`, `DIV2N` and `B2F` is
`datab[4:0]`.

The timing of the add/subtract and of the multiply is set separately:

| version | `ADD_CYCLES` | `MUL_CYCLES` |
|---|---|---|
| F16-2 | 2 | 2 |
| F16-1.5 (default) | 2 | 1 |
| F16-1 | 1 | 1 |

A 1-cycle operator behaves as a combinational instruction: `result` is valid,
and `done` is high, in the cycle `start` is high. A 2-cycle operator behaves as
a multicycle instruction. The core stalls after `start`. The result is
registered on the next enabled clock, and `done` rises one enabled cycle after
`start`. The register sits at the output, and synthesis retiming is expected
to move it into the operator. The 2-cycle versions exist to run at a higher
clock rate. The scaling and conversion operators always take 1 cycle. An
assertion checks that the core does not raise `start` while a multicycle
result is due.

## Storage converters (`fp_narrow`)

They let F32 results be stored in half the space. The exponent is rebiased
(127 → 15) and the fraction is truncated to 10 bits (F16) or 7 bits (F13),
in the 16-bit layouts shown above. F32 denormals and values below the short
format's range become zero. Values above it saturate. Infinity stays
infinity, and NaN becomes the quiet NaN. The top has one converter of each
kind on a shared `narrow_f32` input.

## Files

| file | contents |
|---|---|
| `rtl/fp_pkg.sv` | operation encoding `fp_op_e`, lane width, format constants |
| `rtl/fp_add.sv`, `fp_mul.sv`, `fp_mul_pow2.sv`, `fp_div_pow2.sv`, `byte_to_fp.sv`, `fp_to_byte.sv` | the operators |
| `rtl/fp_simd_alu.sv` | LANES-wide operator array |
| `rtl/fp_regfile.sv` | coprocessor register file |
| `rtl/xt_fp_cop.sv` | register-file coprocessor |
| `rtl/nios_f16_ci.sv` | SIMD2 custom instruction |
| `rtl/fp_narrow.sv` | F32 → F16 / F13 storage converter |
| `rtl/f16_custom_top.sv` | top: coprocessor, custom instruction and converters side by side |
| `tb/tb_fp_ref.sv` | reference model of the formats, using `real` arithmetic |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/xt_cop_check.sv` | harness for one coprocessor configuration, used by `tb_xt_fp_cop` |
| `tb/tb_optical_flow.sv` | Horn & Schunck iterations on the coprocessor |
| `tb/tb_harris_width.sv` | Harris accuracy at mantissa widths 4 to 10 |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog. The expected values come from `tb_fp_ref`, which decodes words to
`real`, computes in double precision and re-encodes with truncation, flush and
saturation. That route is independent of the RTL's bit-level algorithms. For
F16, F13 and F10, double precision holds every sum and product exactly, so the
reference is exact.

* Operators: 40 000 random pairs each for add and multiply, in F16, F13 and
  F10 (5-bit exponent, 4-bit fraction, the narrowest width of the accuracy
  study), with near-equal exponents to provoke cancellation. Every byte × every scale
  for `byte_to_fp`. All 65 536 F16 words for `fp_to_byte`. Directed cases for
  overflow, flush, truncation, infinities and NaN.
* `xt_fp_cop`: random instruction streams in four configurations: 8 lanes
  with `LAT` = 1, 2 and 4, and one lane with `LAT=3`. A shadow register file
  checks every store. The testbench predicts each instruction's
  interlock cycles from the issue times of its sources' producers and checks
  the count exactly.
* `nios_f16_ci`: all three F16 versions and a 2-cycle F13 version
  (`MW=7`), with random operations, results checked
  and the number of cycles to `done` checked. Periods with `clk_en` low are
  included.
* `tb_f16_custom_top`, at the default parameters: the coprocessor computes
  Harris K on 8-pixel strips of a small image. Its steps are gradients,
  products, a 3×3 binomial Gauss filter built from ×2ⁿ, add and /2ⁿ, then
  the coarsity. K is compared bit for bit with the reference and within 2 %
  with a double-precision Harris. The NIOS instruction recomputes K for lane
  pairs and must agree bit for bit. K is narrowed to F16 and F13. The test
  counts interlocks, multicycle and combinational instructions, saturations,
  flushes and narrowings, and fails if any of them never happens.
* `tb_harris_width`: Harris on an 18×28 synthetic image with seven 8-lane
  SIMD units, one per mantissa width from 4 to 10 bits (F10 to F16). They run
  the same instruction stream, and every result of every width is checked bit
  for bit. K is compared with double precision by PSNR, taken here as the
  squared peak |K| over the mean squared error:

  | format | F10 | F11 | F12 | F13 | F14 | F15 | F16 |
  |---|---|---|---|---|---|---|---|
  | pixels × 2⁻⁴ (dB) | 32.4 | 38.2 | 45.2 | 54.3 | 60.4 | 64.4 | 70.6 |
  | pixels × 2⁻⁸ (dB) | 32.4 | 38.2 | 45.1 | 53.9 | 59.4 | 62.0 | 64.5 |

  Each mantissa bit buys about 6 dB. The test requires the PSNR to rise with
  every bit, and F16 to beat F13 by more than 9 dB. At the 2⁻⁸ scale the
  smallest gradient products and K values fall below the normal range (an
  Ix of 1/256 squares to 2⁻¹⁶) and flush to zero. That costs the wide
  formats a few dB.
* `tb_optical_flow`: 12 Horn & Schunck iterations on a 10×20 pattern moved by
  (0.5, 0.25) pixel. The coprocessor computes the derivatives, the neighbour
  averages and the numerator and denominator of the speed update. The host
  divides, since there is no divide instruction. Every stored vector is checked
  bit for bit. The F16 flow stays within about 0.001 of the same iterations in
  double precision. The mean flow reaches about (0.46, 0.28).

To run one testbench with plain Verilator, list the package files first:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb --top-module tb_f16_custom_top \
    rtl/fp_pkg.sv tb/tb_fp_ref.sv tb/tb_f16_custom_top.sv
./obj_dir/Vtb_f16_custom_top
```

`-Wno-fatal` keeps the build going past width warnings in the testbench
reference code, which mixes 64-bit integers with narrower fields. The RTL
itself raises no width warnings. Every testbench runs in seconds.

## Design choices and departures

* **Operator internals are this design's own.** Only each operator's function
  and rounding rule are fixed: magnitude swap, guard/round/sticky alignment,
  and leading-zero normalisation in the adder, and an exact product in the
  multiplier. Relative gate counts published for such operators (F16 adder
  ≈1.4 k, multiplier ≈1.7 k, register file ≈5.3 k gates; SIMD roughly 8×)
  are not reproduced and were not measured here.
* **F13 layout.** F13 could also be read as the top two bytes of an F32 word
  (8-bit exponent, bias 127). This design uses a 5-bit exponent with bias 15
  in the word `s 000 eeeee fffffff`, so one set of operators handles F16 and
  F13 by changing only `MW`.
* **Interfaces to the hosts are assumed.** The coprocessor's valid/ready
  issue port, its instruction fields, its operation encoding and its
  register-file depth (16) are not taken from a real core. Neither is the
  NIOS lane layout or the use of `datab` for the shift count.
* **Subtraction** is part of the adder. Harris' K needs it.
* **No divider.** The optical-flow speed update divides per pixel by
  α² + Ix² + Iy². No divide instruction is built. In `tb_optical_flow` the
  host performs that one division.
* **Byte conversions** are unsigned and saturating.
* **Not built:** the processors (pipeline, caches, native FPU, hardware loop
  counter), an F32 version of the SIMD coprocessor, and a positive-bias
  variant of F16 as the alternative fix for Harris' dynamic range. The scalar
  operators take `EW` and `MW` as parameters, but only F16, F13 and (for add and
  multiply) F10 are tested, and the SIMD lane is fixed at 16 bits by `fp_pkg::LANE_W`.
* **Lint notes.** Verilator warns that the reset is used both as an
  asynchronous reset and in the assertions' `disable iff`. The warning is
  harmless. Some wide intermediate vectors have unused low bits by
  construction. The three padding bits of the top's `narrow_f13` output are
  constant zero.
