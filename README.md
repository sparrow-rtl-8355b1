# SPARROW: a four-lane 8-bit SIMD unit that lives in the integer pipeline

SPARROW adds short-vector instructions for inference workloads to a small
SPARC v8 processor (LEON3) without adding a vector register file. A 32-bit
integer register holds four 8-bit values. The unit sits next to the integer
ALU, takes its two operands from the existing register-read path, and hands
its result back through the existing write-back and forwarding paths. So
the core keeps its clock period and its pipeline depth. The cost is a
handful of multiplexers, four narrow ALUs, a small reduction tree and one
21-bit control register.

Every instruction has two parts, executed in two consecutive pipeline
stages:

* **Stage 1 (execute stage).** This is the two-operand SIMD part. Both
  sources are swizzled (their bytes are reordered or replicated). Four lane
  ALUs then run one of 13 operations. A lane mask decides which lanes keep
  their result. Each lane result is 16 bits wide.
* **Stage 2 (memory stage).** This part optionally reduces the four 16-bit
  values to one (sum, max, min or xor) at wider precision. Without a
  reduction, the four results go out as a packed register of four bytes.

Either part can be a `nop`. An instruction without a reduction is complete
at the end of the execute stage. Its result can be forwarded to the very
next instruction without losing a cycle.

This RTL contains only the SPARROW unit. The LEON3 core, its register
file and caches are not included. The unit's ports are the signals that
core would provide and consume.

## How one instruction flows

```
 ex_op1 ──► swizzle A ──┐                         (%scr.swz_a)
 ex_op2 ──► swizzle B ──┤◄── immediate (5-bit code → 8-bit, replicated)
                        ▼
        4 × lane ALU (8-bit in, 16-bit out, optional 8-bit clamp)
                        ▼
        mask: lane i kept if %scr.mask[i], else 0 or original A byte
                        ▼
          C'[3:0] (4 × 16 bit) ──► ex_result (low bytes packed, bypass)
        ═════════ stage register (C' → A') ═════════
                        ▼
   (A'0 op A'1) , (A'2 op A'3) → op → optional 8-bit clamp ──┐
   A' low bytes packed ──────────────────────────────────────┴─► me_result
```

### Stage 1

1. **Swizzle.** Each source has its own 8 select bits in `%scr`. Output
   position *i* takes byte `sel[2i+1:2i]` of the source. The identity
   select is `8'b11_10_01_00`. A select such as `8'b00_00_00_00` broadcasts
   byte 0 to all lanes.
2. **Immediate.** If the instruction's `i` bit is set, the second operand is
   a constant, replicated into all four lanes. The instruction word has no
   room for a normal SPARC immediate, so a 5-bit code in the `rs2` field
   selects the constant:

   | code[4:3] | value for k = code[2:0] | values |
   |---|---|---|
   | `00` | 2^k | 1, 2, 4 … 128 |
   | `01` | −2^k | −1, −2 … −128 |
   | `10` | 2^k − 1 | 0, 1, 3, 7 … 127 |
   | `11` | k | 0 … 7 (e.g. shift amounts) |

3. **Lane ALU** (`sparrow_lane`). The operands are sign-extended for signed
   instructions and zero-extended for unsigned ones. The lane computes the
   exact result and keeps its low 16 bits. With stage-1 saturation it keeps
   the value clamped to −128…127 or 0…255 instead. The operations are
   `add sub mul max min shift movb and or xor nand nor xnor`. `movb` copies
   the second operand. `shift` treats the second operand as a signed
   amount: left for b ≥ 0, right by −b for b < 0. The right shift is
   arithmetic for signed instructions.
4. **Multiplier** (`sparrow_mul8`). One 8×8 multiply per lane must fit in a
   single cycle. So the product is written out as the sum of eight shifted
   copies of the multiplicand, gated by the multiplier bits, rather than
   as a general multiplier. For signed operands the bit-7 copy is
   subtracted (weight −128). The 16-bit sum is the exact product in both
   modes.
5. **Mask.** If `%scr.mask[i]` is 0, lane *i* does not keep its result. Its
   value is then 0 (`mask_sel = 0`) or the original, unswizzled byte *i* of
   the first source, extended to 16 bits (`mask_sel = 1`). Masked lanes
   still feed stage 2. This is how a three-element dot product uses a
   four-lane reduction.

With a stage-1 `nop`, the lanes carry the first source unswizzled, and the
mask is still applied.

### Stage 2

`sparrow_reduce` extends the four registered 16-bit components to 32 bits,
signed or unsigned according to the instruction. It combines them in a
two-level tree: (A'0, A'1) and (A'2, A'3) first, then the two partial
results. No partial result can overflow. With stage-2 saturation only the
final value is clamped to the 8-bit range, so the result does not depend on
the order of the components. The reduction value, extended to 32 bits, is
the whole result word. With a stage-2 `nop` the result is the low byte of
each component, packed: exactly what stage 1 produced.

### Typical uses

| Operation | Instruction |
|---|---|
| 4-element dot product | `mul` + `sum`; the core adds the 32-bit partial sums |
| ReLU | signed `max` with immediate 0 |
| 2×2 max pooling | stage-1 `nop` + `max` |
| saturating 8-bit arithmetic | any stage-1 op with stage-1 saturation, no reduction |

## Timing in the pipeline

| Instruction | Result available | Port | Dependent next instruction |
|---|---|---|---|
| stage-2 `nop` | end of execute stage | `ex_result` with `ex_bypass_valid` | forwarded, no stall |
| reduction | memory stage, one cycle later | `me_result` with `me_valid` | core must stall one cycle |

`ex_bypass_valid` is the core's cue to forward `ex_result` into the
operand of the next instruction. The core's forwarding and interlock logic
are outside this unit. The testbenches model them.

`hold` freezes the stage register and `%scr`, like the core's pipeline
hold. `ex_valid` must be low for bubbles and annulled instructions. Reset
(`rst_n`) is synchronous and active low.

## The control register `%scr`

The mask and the swizzles are not encoded in the vector instructions. They
are set beforehand in this special register. SPARC `wr %asr` writes it and
`rd %asr` reads it, with ASR number `SCR_ASR` (default 20). As for any SPARC
`wr`, the value written is `rs1 xor (rs2 or simm13)`. The top module forms
it as `ex_op1 ^ ex_op2`. A write takes effect for the next instruction.

| Bits | Field | Meaning |
|---|---|---|
| 3:0 | `mask` | lane *i* computes normally when bit *i* is 1 |
| 4 | `mask_sel` | masked lanes get 0 (0) or the original first-source byte (1) |
| 12:5 | `swz_a` | swizzle of the first source, 2 bits per position |
| 20:13 | `swz_b` | swizzle of the second source |
| 31:21 | reserved | ignored on write, read as 0 |

After reset the register is `0x001C9C8F`: all lanes on, `mask_sel` 0,
identity swizzles.

## Instruction encoding

Vector instructions use SPARC format 3 (`op = 2`). They take the four op3
values that SPARC v8 leaves unused, 0x2C–0x2F. The 13 bits that normally
hold an immediate carry the two opcodes instead.

| Bits | Field |
|---|---|
| 31:30 | `10` |
| 29:25 | rd |
| 24:19 | op3 = `1011 s t`: s = signed, t = stage-1 saturation |
| 18:14 | rs1 |
| 13 | i: second operand is the immediate code |
| 12:9 | stage-1 op: 0 nop, 1 add, 2 sub, 3 mul, 4 max, 5 min, 6 shift, 7 movb, 8 and, 9 or, 10 xor, 11 nand, 12 nor, 13 xnor |
| 8:6 | stage-2 op: 0 nop, 1 sum, 2 max, 3 min, 4 xor |
| 5 | stage-2 saturation |
| 4:0 | rs2, or the immediate code when i = 1 |

Unused operation codes decode as `nop`. The numeric codes, the op3 values,
the bit positions and the ASR number are this implementation's choices.
Any assembler for the unit must use the same ones. `sparrow_pkg` holds all
of them.

## Modules

| Module | Role |
|---|---|
| `sparrow` | top: decoder, `%scr`, stage 1, stage register, stage 2, bypass outputs |
| `sparrow_pkg` | operation enums, control bundle `ctrl_t`, `%scr` layout `scr_t`, encoding constants, clamp/extend helpers |
| `sparrow_decode` | instruction word → `ctrl_t`, plus `rd`/`wr %scr` detection |
| `sparrow_scr` | the control register |
| `sparrow_stage1` | swizzles, immediate insertion, four lanes, mask |
| `sparrow_swizzle` | one source's byte crossbar |
| `sparrow_imm` | 5-bit code → 8-bit constant |
| `sparrow_lane` | one lane's 13 operations, 16-bit result, optional clamp |
| `sparrow_mul8` | shift-and-add 8×8 multiplier |
| `sparrow_reduce` | reduction tree, final clamp, output selection |

`LANES` (default 4) is a parameter of the vector modules. It is fixed in
practice by the 32-bit register and the `%scr` field widths.

## Simulation

Every module has a self-checking testbench in `tb/`, named `tb_<module>`.
Each one prints `TB_RESULT checks=N failures=M`. They share
`tb/sparrow_ref_pkg.sv`, a behavioural model written with plain integer
arithmetic, together with an instruction encoder. To build and run one with
Verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_sparrow \
  -y rtl -y tb +libext+.sv -Irtl rtl/sparrow_pkg.sv tb/sparrow_ref_pkg.sv tb/tb_sparrow.sv
./obj_dir/Vtb_sparrow
```

* `tb_sparrow` tests the whole unit at its default parameters. The
  testbench acts as the core: it keeps a register file and issues 20,000
  random vector, `wr %scr` and `rd %scr` instructions, one per cycle. It
  forwards stage-1-only results to dependent instructions and inserts a
  bubble behind a reduction. It also raises `hold` at random. It checks
  every result against the model at the cycle it must appear. It counts
  each mechanism (swizzle, both mask selections, immediate, each
  saturation, every stage-1 and stage-2 operation, bypass forwarding,
  interlock, hold, `%scr` read and write) and fails if any never happened.
* `tb_sparrow_workloads` runs the inner loops of the programs used to
  judge the unit. Each is checked element by element against a plain
  integer implementation:

  | Program | Size | How it uses the unit |
  |---|---|---|
  | matrix multiplication | 120×120, signed 8-bit | `mul`+`sum` per 4 elements |
  | RGB → grayscale | 256×256 | `mul`+`sum` with weights 77, 150, 29 |
  | 3×3 edge-detection filter | 256×256 | one `mul`+`sum` per window row, lane 3 masked to 0 |
  | saturating polynomial 2x² − 4x + 7 | 2048 values | four saturating ops with immediates |
  | ReLU and 2×2 max pooling | 32×32 | the two kernels from the CIFAR-10 network |

  With one instruction issued at a time, the four main programs take
  864,000, 131,072, 387,098 and 4,096 unit cycles. These numbers count
  SPARROW instructions only. They are not whole-program cycle counts,
  because loads, stores and loop control of the core are not modelled.
* The unit tests cover the rest. They are exhaustive for the multiplier
  and the immediate table. The others use corner values and random
  operands.

## Choices made here, and limits

These parts follow the SPARROW description closely:

* the operation lists;
* the two-stage split with a register between the stages;
* the 16-bit intermediate;
* saturation in either stage, and final-only clamping of reductions;
* swizzle and mask semantics and the `%scr` field positions;
* the stage-1 `nop` behaviour;
* the shift-and-add multiplier;
* the same-cycle bypass of results that have no reduction.

These parts are this implementation's own:

* **Instruction encoding, ASR number and `%scr` reset value.** See above.
* **Immediate table.** The intended set of constants is "0, 1, powers of
  two, their negatives and powers of two minus one", and it may differ per
  operation. Here one table serves all operations. It adds a fourth family
  (0…7) for shift amounts.
* **Shift.** The direction comes from the sign of the amount.
* **Extension of a masked original byte.** Signed instructions
  sign-extend it and unsigned instructions zero-extend it. A literal
  reading would sign-extend it in both cases.
* **Range of a saturated reduction.** It is clamped to the 8-bit range of
  the instruction's signedness.
* **Upper half of a lane result.** A lane result's upper byte cannot be
  written back on its own. It reaches a register only through a reduction.
  Keeping the high half of a product means scaling the operands, or using
  `sum` on a single unmasked lane.
* **Core interface.** The port list, `hold`, and the split between
  `ex_result` and `me_result` fit a LEON3-like 7-stage pipeline. They
  would need adapting to the real core's signal names and forwarding
  network.

Not included: the LEON3 integer pipeline, its register file and caches,
and the compiler support (an inline-assembly intrinsics library). Area and
frequency results for the original FPGA implementation come from the core
as a whole. This RTL alone cannot reproduce them.
