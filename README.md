# A three-stage cascade floating point unit for a vertex shader

Vertex shaders spend much of their time on 4x4 matrix transforms, which are
dot products: DP4 needs four multiplications and three additions. A
conventional one-stage floating point unit (one multiply or add per lane per
instruction) has to split each dot product into several sub-instructions. Each
sub-instruction costs issue slots, program memory and dependency stalls. This FPU
instead cascades three arithmetic stages, so every shader arithmetic
instruction, DP4 included, is issued in a single slot:

```
 source A, B (4 components each)          source C        A.x
   |                                         |              |
   v                                         |              v
 stage 1   4 x { multiplier, adder, set/compare }    special function
           per-lane result mux  <------------------------ module (SF)
   |           (P type: ADD MUL MIN MAX SLT SGE MOV RCP RSQ EXP(P) LOG(P) done)
   v                                         |
 stage 2   4 adders, second operand = source C.i (MAD)
                     or neighbour product / B.w / 0 (dot products)
   |           (M type: MAD done)
   v
 stage 3   1 adder: lane 0 + lane 2, copied to x, y, z, w
               (DP type: DP3 DP4 DPH done)
```

The unit works on 4-component vectors of 24-bit floating point numbers. It has
nine adders (4 + 4 + 1), four multipliers, four set/compare units and a
special function module with reciprocal, reciprocal square root, base-2
exponential and base-2 logarithm units. Every special function unit is a small
look-up table followed by one refinement step, and each finishes within stage 1.

## Number format

`fp24_t` is `{sign, exponent[6:0], fraction[15:0]}` with a hidden leading one
and an exponent bias of 63. The range is about 2^-62 to 2^65, with 17
significant bits.

* An exponent field of 0 means zero. Denormals are not supported: any result
  below 2^-62 becomes +0.
* There is no infinity or NaN. Results that overflow saturate to
  `{sign, 7'h7f, 16'hffff}`. So do 1/0, 1/sqrt(0) (positive) and log2(0)
  (negative).
* Every operation rounds toward zero (truncation). The adder keeps guard,
  round and sticky bits, so its truncation is exact for any exponent gap.

The 24-bit width comes from the design target. The 1/7/16 split, the bias and
the special-value rules are choices made here. They are defined in one place,
`rtl/fp24_pkg.sv`.

## Instructions

| opcode | class | result (i = 0..3) | stages used |
|---|---|---|---|
| MOV | P | A.i | 1 |
| ADD, MUL | P | A.i + B.i, A.i * B.i | 1 |
| MIN, MAX | P | min/max(A.i, B.i) | 1 |
| SLT, SGE | P | 1.0 if A.i < B.i (>= for SGE), else 0.0 | 1 |
| RCP, RSQ | P (SF) | 1/A.x, 1/sqrt(abs(A.x)) in all components | 1 |
| EXP, EXPP | P (SF) | 2^A.x, full / partial precision | 1 |
| LOG, LOGP | P (SF) | log2(abs(A.x)), full / partial precision | 1 |
| MAD | M | A.i * B.i + C.i | 1, 2 |
| DP3 | DP | A.x*B.x + A.y*B.y + A.z*B.z, in all components | 1, 2, 3 |
| DP4 | DP | ... + A.w*B.w, in all components | 1, 2, 3 |
| DPH | DP | A.x*B.x + A.y*B.y + A.z*B.z + B.w, in all components | 1, 2, 3 |

The shader engine handles source swizzles, negation and write masks. For the
special functions, it must place the scalar operand in component x. The
shader-1.1 forms of EXP and LOG also write the integer and fractional parts to
other components. Those side results are not produced: the scalar function
value goes to all four components.

## The cascade in detail

**Stage 1** (`fpu_stage1`). Lane i receives A.i and B.i and computes the
product, the sum and the set/compare result in parallel. The special function
module runs on its own path from A.x. A per-lane multiplexer passes one of
these on: the product, the sum, the compare result, A.i itself, or the
special function result. The SF result is broadcast to all lanes. MAD and the
dot products take the product.

**Stage 2** (`fpu_stage2`). Each of the four adders takes its own lane's
stage-1 result. A multiplexer chooses its other operand:

| instruction | lane 0 | lane 1 | lane 2 | lane 3 |
|---|---|---|---|---|
| MAD | + C.x | + C.y | + C.z | + C.w |
| DP3 | + p1 | pass | + 0 | pass |
| DP4 | + p1 | pass | + p3 | pass |
| DPH | + p1 | pass | + B.w | pass |
| P type | pass | pass | pass | pass |

Here pk is the stage-1 product of lane k, and B.w is registered alongside
stage 1 for DPH. The partial sums of a dot product therefore end up in lanes 0
and 2.

**Stage 3** (`fpu_stage3`). One adder sums lanes 0 and 2 and writes the
result to all four components. Other instructions pass through unchanged.

A dot product is thus computed as `((p0 + p1) + (p2 + p3))`, with truncation
after each product and each sum. DP3 is `((p0 + p1) + p2)`, and DPH is
`((p0 + p1) + (p2 + B.w))`. A bit-exact software model must follow this order.

## Timing and interface (`fpu3_top`)

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst | in | 1 | clock; synchronous active-high reset, which clears the valid bits only |
| stall | in | 1 | freezes all three stage registers; the input is not taken while stall is high |
| in_valid, in_op | in | 1, 5 | instruction; `OP_NOP` and unused codes are bubbles |
| in_a, in_b, in_c | in | 4 x 24 | source vectors (`vec4_t`, index 0 = x) |
| in_tag | in | TAG_W (8) | carried with the instruction, e.g. a destination register number |
| out_valid, out_tag, out_res | out | 1, TAG_W, 4 x 24 | result |

Every stage ends in a register. One instruction can be issued on every clock,
and its result appears exactly 3 non-stalled clocks later, whatever its class.
P- and M-type results are carried through the remaining stages instead of
leaving early. The single result port therefore sees results in issue order,
and no two results ever compete for it.

The FPU has no dependency check. A consumer must wait 3 clocks for a result,
or fill the gap with independent work, such as other vertices.

The target is 100 MHz, with each arithmetic unit fitting a 10 ns stage. The
internal algorithms here are written for clarity, not for a particular
timing budget.

## Special function units

The tables are computed at elaboration time from closed-form expressions, so
no data files are needed. Their sizes are the target sizes.

| unit | table | entry i | refinement (full precision) | partial precision |
|---|---|---|---|---|
| `sf_rcp` | 256 x 23 bit (736 B), index = top 8 fraction bits | 1/(1 + (i+0.5)/256) | one Newton-Raphson step y1 = y0(2 - m*y0) | seed y0 |
| `sf_rsq` | 512 x 16 bit (1 KB), index = {exponent odd, top 8 fraction bits} | 1/sqrt(mm) at the interval middle; mm = 1.f, or 2*1.f for odd exponents | one Newton-Raphson step y1 = y0(3 - mm*y0^2)/2 | seed y0 |
| `sf_log` | 64 x 20 bit (160 B), index = top 6 fraction bits | log2(1 + i/64) | linear interpolation to entry i+1 with the next 10 bits | entry i |
| `sf_exp` | 64 x 20 bit (160 B), index = top 6 bits of the fraction of x | 2^(i/64) - 1 | linear interpolation to entry i+1 with the next 14 bits | entry i |

The testbenches enforce these error bounds:

* Reciprocal and reciprocal square root: relative error within 2^-15 (full)
  and 2^-8 (partial).
* Exponential: relative error within 2^-14 (full) and 2^-5 (partial).
* Logarithm: absolute error within 2^-13 plus one result ulp (full), and 2^-5
  (partial).

Exact powers of two bypass the reciprocal tables and give exact results.
Partial precision is meant for colour computations, where the difference
cannot be seen.

Newton-Raphson has no cheap form for log2 or 2^x. Those two units refine by
linear interpolation instead. This is a choice made here.

## Where this RTL departs from, or fills in, the original design

* **Pipeline registers** after each stage, a fixed 3-clock latency, and the
  tag and stall ports are this implementation's choices. The original target
  only states "one instruction per cycle at 100 MHz" and a 10 ns budget per
  unit.
* **Where the nine adders sit.** Four stage-1 adders (for ADD) plus 4 + 1 in
  the later stages makes nine, matching the unit count. The stage-1 placement
  of the adders and compare units is inferred.
* **Dot-product lane pairing** (0+1, 2+3, summed by the last adder) and DP3
  and DPH using lane 2's adder with 0 or B.w are inferred from the datapath
  drawing.
* **DP4** sums A.w*B.w as its fourth term: the standard definition of a
  four-component dot product.
* **The number format, rounding and special values**: see above.
* **Instruction list and encoding.** The shader-1.1 arithmetic instructions
  that fit one pass are built. FRC, LIT, DST and other "complex instructions"
  are meant to be done as macro sequences by the shader, and are not handled
  here.
* **Not included**: the vertex shader engine (register files, fetch,
  swizzle/negate/mask) and the macro-instruction sequencing needed by 1- and
  2-stage alternatives.

## Files

| file | content |
|---|---|
| `rtl/fp24_pkg.sv` | format constants, `fp24_t`, `vec4_t`, opcodes, control word `ctrl_t` |
| `rtl/fp24_add.sv`, `rtl/fp24_mul.sv`, `rtl/fp24_setcmp.sv` | arithmetic and compare units (combinational) |
| `rtl/sf_rcp.sv`, `rtl/sf_rsq.sv`, `rtl/sf_log.sv`, `rtl/sf_exp.sv`, `rtl/sf_unit.sv` | special function units and module |
| `rtl/fpu_stage1.sv`, `rtl/fpu_stage2.sv`, `rtl/fpu_stage3.sv` | the three stages (combinational) |
| `rtl/fpu_decode.sv` | opcode to control word |
| `rtl/fpu3_top.sv` | top: decoder, stages, stage registers |
| `tb/fp24_ref_pkg.sv` | reference arithmetic (double precision, then truncation) shared by the testbenches |
| `tb/<module>_tb.sv` | one self-checking testbench per module |
| `tb/fpu3_shader_tb.sv` | two vertex programs run through the FPU |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops with a
watchdog if it hangs.

* **Unit testbenches.** These check the adder, multiplier and stages bit for
  bit against a reference that computes in double precision and then
  truncates. Exponent gaps too large for an exact double sum are handled
  separately. The special functions are checked against the error bounds
  above.
* **`fpu3_top_tb`.** It runs 4000 random instructions covering all 17 opcodes,
  at the top's default parameters, with random bubbles and stalls. It checks
  each result's value, its tag and its exact 3-clock latency. It also counts
  three events and fails if any never occurs:
  * stalls while results are in flight;
  * bubbles;
  * a dot product directly followed by a P-type instruction.
* **`fpu3_shader_tb`.** A small in-order shader harness (register file,
  negation, write masks, read-after-write interlock) runs two programs and
  checks every output register against a sequential reference interpreter:
  * a cartoon-shading program (DP4, DP3, MAX, MIN, ADD) over 1197 vertices;
  * a sphere-mapping program (DP4, DP3, ADD, MAD with a negated source) over
    21458 vertices.

  With one vertex in flight at a time, the harness takes 35 and 51 clocks per
  vertex, mostly waiting on the 3-clock latency. A shader that interleaves
  vertices would hide this latency.

To simulate with Verilator, for example the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/fp24_pkg.sv tb/fp24_ref_pkg.sv tb/fpu3_top_tb.sv --top-module fpu3_top_tb
./obj_dir/Vfpu3_top_tb
```

Replace `fpu3_top_tb` with any other testbench name. The packages must come
first on the command line.
