# Dual-field Vedic MAC array for SIMD edge processing

This is a small SIMD (single instruction, multiple data) datapath for
multiply-accumulate work on low-power sensor nodes, such as the dot products
inside small machine-learning models. A row of identical lanes receives the
same instruction each cycle, and every lane multiplies and accumulates its own
pair of 32-bit operands.

The multiplier in each lane is a **Vedic multiplier**. It applies the
*Urdhva-Tiryagbhyam* ("vertically and crosswise") rule at every level of a
recursive tree: a 2×2 cell, then 4×4, 8×8, 16×16 and finally 32×32. Each level
is four copies of the level below plus three ripple-carry adders. The
multiplier is also **dual-field**. One select bit switches the whole datapath
between two kinds of arithmetic:

* **prime field**: ordinary integer multiply and add;
* **binary field**: carry-less multiply and XOR accumulate. This is the
  arithmetic of polynomials over GF(2), used in binary-field cryptography and
  CRC/coding work.

The switch is a single signal that forces every carry in the tree to zero.
Nothing else in the structure changes.

## Structure

```
simd_array            LANES lanes, one broadcast instruction
 └─ mac_unit          (per lane) multiplier + 64-bit accumulator
     ├─ vedic_32x32   4 × vedic_16x16, adders of 32, 48, 48 bits
     │   └─ vedic_16x16   4 × vedic_8x8, adders of 16, 24, 24 bits
     │       └─ vedic_8x8     4 × vedic_4x4, adders of 8, 12, 12 bits
     │           └─ vedic_4x4     4 × vedic_2x2, adders of 4, 6, 6 bits
     │               └─ vedic_2x2     4 AND gates + 2 half adders
     └─ bpa_adder     64-bit accumulator adder
bpa_adder             ripple-carry "binary parallel adder", used at every width
simd_pkg              field, opcode and instruction types
```

## The Vedic tree: how four half-size products become one

This is the core of the design, and every level from 4×4 up uses the same
pattern. Split each N-bit operand into halves of H = N/2 bits:
`a = {ah, al}` and `b = {bh, bl}`. Four H×H multipliers form

| product | operands | weight |
|---|---|---|
| m0 | al · bl | 1 |
| m1 | ah · bl | 2^H |
| m2 | al · bh | 2^H |
| m3 | ah · bh | 2^2H |

These are combined in three additions:

```
s_lo  (N bits)    = m1 + (m0 >> H)            "crosswise + carry-in of the low column"
s_hi  (3H bits)   = (m3 << H) + m2            "vertical high + other crosswise"
q[2N-1:H] (3H bits) = s_hi + s_lo
q[H-1:0]          = m0[H-1:0]                 low half passes straight through
```

The low H bits of m0 are final as soon as m0 exists. Everything above them is
formed as a 3H-bit sum that starts at bit H. The carry outputs of the three
adders are dropped. At these alignments they are always zero: for example,
m1 + (m0 >> H) ≤ (2^H−1)² + 2^H−1 < 2^N. So the product is exact. The widths
at each level are:

| level | adder for s_lo | adders for s_hi and q |
|---|---|---|
| 4×4 | 4 bits | 6 bits |
| 8×8 | 8 bits | 12 bits |
| 16×16 | 16 bits | 24 bits |
| 32×32 | 32 bits | 48 bits |

The 2×2 cell at the bottom is gate-level:

```
q0 = a0·b0
t1 = a1·b0, t2 = a0·b1      ->  half adder:  q1 = t1 ^ t2,  t3 = t1·t2
t4 = a1·b1                  ->  half adder:  q2 = t3 ^ t4,  q3 = t3·t4
```

### Binary-field mode

When `bin_field = 1`, two things happen:

* the carry `t3` of the 2×2 cell is gated off;
* every full-adder carry in every `bpa_adder` is gated off.

Each addition in the tree then becomes an XOR, and each 2×2 cell becomes a
carry-less 2-bit product. The tree computes Σ (shifted partial products) either
way, so the result is exactly the carry-less product `clmul(a, b)`. That is
the GF(2)[x] polynomial product, 63 bits wide for 32-bit operands.

No modular reduction is done in either field. The full 64-bit product comes
out, and reduction by a prime or by an irreducible polynomial is left to
whatever consumes it.

## Adders

`bpa_adder #(WIDTH)` is a plain ripple-carry chain. Bit 0 is a half adder and
bits 1 to WIDTH−1 are full adders, each taking the carry of the bit below. It
has no carry-in. The carry out of the top bit is the `cout` port. The same
module serves every width in the tree and the 64-bit accumulator adder. A
ripple chain is the slowest adder form. If you need higher clock rates, it is
the first thing to replace (with a carry-select or prefix adder, for example).
The only requirement is that the replacement keeps the carry-suppression input.

## MAC lane (`mac_unit`)

Each lane holds one `vedic_32x32`, one 64-bit `bpa_adder` and a 64-bit
accumulator register. The instruction opcode (`simd_pkg::opcode_e`) selects
what the register loads at the rising edge:

| opcode | code | effect |
|---|---|---|
| `OP_NOP` | 00 | accumulator holds |
| `OP_CLR` | 01 | accumulator ← 0 |
| `OP_MUL` | 10 | accumulator ← a·b (64-bit product) |
| `OP_MAC` | 11 | accumulator ← accumulator + a·b |

In the prime field, the accumulation wraps modulo 2^64 and the carry out is
discarded. In the binary field, it is an XOR. Reset (`rst_n`, asynchronous,
active low) clears the accumulator. A parameter check stops elaboration if
`ACC_W` is set below 64.

## SIMD array (`simd_array`, the top level)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous active-low reset |
| `instr` | in | `instr_t` (3) | `{op[1:0], field}`, broadcast to every lane |
| `op_a` | in | LANES × 32 | first operand of each lane (lane i = `op_a[i]`) |
| `op_b` | in | LANES × 32 | second operand of each lane |
| `acc` | out | LANES × ACC_W | accumulator of each lane |
| `result_valid` | out | 1 | high for the cycle after a MUL or MAC |

Parameters:

* `LANES` (default 4): the number of lanes;
* `ACC_W` (default 64): the accumulator width, which must be at least 64.

`field` is `FIELD_PRIME` (0) or `FIELD_BINARY` (1).

**Timing.** The array has no pipeline. The instruction and operands are
sampled at a rising edge, and the updated accumulators are visible right after
it. One instruction can be issued every cycle and there are no stalls.
Everything between the operand inputs and the accumulator registers is a
single combinational path: the 32×32 tree followed by a 64-bit ripple
addition. That path sets the clock rate. Pipeline registers between tree
levels would be the natural extension if more speed is needed.

A dot product of length K on every lane takes K + 1 instructions: one `OP_CLR`
(or an `OP_MUL` for the first element) and then `OP_MAC` for each element. The
results are in `acc` after the last edge.

## Where this design follows its source and where it fills gaps

Taken from the source description:

* the 2×2 cell: four AND gates and two half adders, with the signal names
  t1 to t4;
* the recursive 4×4 → 32×32 construction, including which operand halves
  feed which sub-multiplier and which products share an adder;
* the adder widths at the 8×8 (8/12/12), 16×16 (16/24/24) and 32×32
  (32/48/48) levels, and dropping the adder carries;
* ripple-carry adders with a half adder at bit 0;
* 32-bit lane operands;
* the idea of a SIMD array of MAC units built on a dual-field Vedic multiplier.

This design's own choices:

* **How the field is switched.** The source names the two fields (binary and
  prime) but does not say how the multiplier handles them. Carry suppression
  is the simplest mechanism that gives both products from one tree, and
  modular reduction is not included.
* **Adder widths at the 4×4 level** (4/6/6), by the same rule as the other
  levels.
* **The whole MAC lane and array organisation:**
  * the accumulator width (64) and wrap-around;
  * the XOR accumulation in the binary field;
  * the four opcodes and their encoding;
  * the lane count (4);
  * `result_valid`;
  * single-cycle, unpipelined timing;
  * asynchronous reset.
* **The accumulator adder** reuses the ripple-carry adder.

Not built:

* The reconfigurable ALU that the source mentions alongside the processor. Its
  operations are not described.
* The specific fast adder variant that the source's result tables name for
  the best configuration. Its structure is not described, so the adders are
  the ripple-carry chains above.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `tb_bpa_adder` | 4-bit exhaustive; 32- and 48-bit corner and random cases; both fields (sum = a+b with carry, or a^b with cout = 0) |
| `tb_vedic_2x2` | all 16 operand pairs × 2 fields |
| `tb_vedic_4x4` | all 256 pairs × 2 fields; the worked example 1011 × 1101 = 10001111 |
| `tb_vedic_8x8` | all 65 536 pairs × 2 fields |
| `tb_vedic_16x16`, `tb_vedic_32x32` | corner operands plus 20 000 random pairs, alternating fields |
| `tb_mac_unit` | reset, one-cycle latency, dot products in both fields, prime-field wrap, 3000 random operations, asynchronous reset |
| `tb_simd_array` | the full default configuration end to end (see below) |

All reference models are independent of the RTL. Prime-field results are
checked against the `*` operator. Binary-field results are checked against a
shift-and-XOR loop.

`tb_simd_array` runs the top level with no parameter overrides:

* a broadcast MUL with a latency check;
* a 16-element dot product in each lane, in each field;
* forced accumulator wrap-around;
* 4000 random instructions, with all lanes and `result_valid` compared after
  every edge.

It counts how often each mechanism occurred: each opcode, MAC in each field,
NOP holding while operands change, wrap-around and `result_valid` pulses. A
mechanism that never occurred counts as a failure. The run takes about a
second.

Run any testbench with Verilator 5 from the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    --top-module tb_simd_array rtl/simd_pkg.sv tb/tb_simd_array.sv
./obj_dir/Vtb_simd_array
```

Replace `tb_simd_array` with any other testbench name. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/simd_pkg.sv rtl/<module>.sv`.
The remaining lint warnings are about the adders' carry outputs, which the
multiplier tree does not use because they are always zero.

## Size

After generic synthesis (word-level cells, no technology mapping):

* one `vedic_32x32` is about 9 000 cells;
* the default four-lane array is about 37 000 cells and 257 flip-flops
  (4 × 64 accumulator bits plus `result_valid`).
