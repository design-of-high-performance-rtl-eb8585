# 64-bit fixed/floating point multiply-add unit

This is a multiply-accumulate (MAC) unit for 64-bit integers and IEEE-754
double precision (binary64) numbers. The main idea is that both number systems
share one 64 x 64 multiplier. It is a radix-4 Booth multiplier, and its
partial-product rows are summed with Kogge-Stone parallel-prefix adders, the
fastest of the adders the design was chosen from. Around the multiplier sit
the rest of the operations:

- integer add and subtract
- binary64 add, subtract, multiply and divide in four rounding modes
- the same operations on single precision (binary32) numbers, which pass
  through the binary64 datapath
- an accumulator that takes `acc + a*b` in one clock cycle

The floating point accumulate is fused: the exact 106-bit significand product
is added to the accumulator and the sum is rounded once.

The design follows the thesis *Design of High Performance Floating Point
Multiply and Add Unit*. That thesis describes a 64-bit Booth multiplier with
Kogge-Stone row addition, a double-precision multiplier built from sign,
exponent and mantissa steps, and add, subtract, divide, round and exception
stages. It also describes a multiplier-adder-register accumulate loop that
completes in a single cycle. Widths, encodings, the handshake and many
internals are not given there; the choices made for them are listed under
[Departures and choices](#departures-and-choices).

## Block structure

```
            a, b (64)
               |   binary32: fp_sp_widen -> binary64 (exact)
   +-----------+------------+-------------------------------+
   | fixed: a,b             | float: 53-bit significands     |
   v                        v                                |
 booth_multiplier (64x64 -> 128, 33 Booth rows, KSA chain)   |
   |  booth_encoder -> booth_ppgen x33 -> ks_adder x33       |
   |                                                          |
   +--> fixed product / fixed MAC (128-bit ks_adder + acc)    |
   |                                                          |
   +--> fp_mul_path (sign XOR, ea+eb-1023, 106-bit product)   |
            |                                                 |
            v                                                 v
        fp_add_path  <-- acc (MAC) | b (add/sub) | 0 (mul)   fp_divider
            |                                        (1 quotient bit/cycle)
            v                                                 |
        fp_normalize <----------------------------------------+
            v
        fp_round (4 modes)
            v
        fp_exception (special operands, flags)
            v
        fp_sp_round (binary32 results only)
            v
        result / acc registers
```

| Module | Role |
|---|---|
| `fpmac_pkg` | binary64 struct, operand class, flags, opcodes, rounding modes, NaN patterns |
| `ks_adder` | W-bit Kogge-Stone adder with carry-in |
| `booth_encoder` | radix-4 recoding into five one-hot controls per digit |
| `booth_ppgen` | one partial-product row, shifted, inverted for negative digits |
| `booth_multiplier` | 64 x 64 signed/unsigned multiplier, rows summed by a chain of 128-bit Kogge-Stone adders |
| `fp_mul_path` | sign, exponent and significand path of the binary64 multiply |
| `fp_add_path` | operand ordering, alignment with sticky bit, add/subtract, negation |
| `fp_normalize` | leading-zero count, normalizing shift, denormal right shift |
| `fp_round` | rounding to binary64, overflow/underflow/inexact |
| `fp_exception` | special cases (NaN, infinities, zeros, divide by zero) |
| `fp_divider` | sequential restoring divider for significands |
| `fp_sp_widen` | exact binary32 to binary64 conversion of operands |
| `fp_sp_round` | rounding of a binary64 result to binary32, with flags |
| `fpmac_top` | the unit: operand muxing, integer path, accumulator, handshake |

## Interface and timing (`fpmac_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset clears all registers |
| `start` | in | 1 | take an operation at this rising edge |
| `op` | in | 3 | `OP_ADD`, `OP_SUB`, `OP_MUL`, `OP_DIV`, `OP_MAC`, `OP_LDACC`, `OP_CLR` |
| `is_float` | in | 1 | 1: floating point; 0: integers |
| `is_double` | in | 1 | 1: binary64 in `a[63:0]`, `b[63:0]`; 0: binary32 in `a[31:0]`, `b[31:0]` |
| `is_signed` | in | 1 | integers are two's complement (ignored for floats) |
| `rmode` | in | 2 | 00 nearest-even, 01 toward zero, 10 toward +inf, 11 toward -inf |
| `a`, `b` | in | 64 | operands |
| `result` | out | 128 | registered result (binary64 in bits 63:0, binary32 in bits 31:0) |
| `acc` | out | 128 | accumulator (float values placed as in `result`) |
| `flags` | out | 5 | `{overflow, underflow, invalid, inexact, exception}` |
| `done` | out | 1 | one-cycle pulse: `result` and `flags` are valid |
| `busy` | out | 1 | the divider is working; `start` is ignored meanwhile |

Operations:

- **Add, subtract, multiply and accumulate** complete at the edge that takes
  `start`, and `done` is high in the following cycle.
- **Floating point divide** runs the divider for 56 cycles. `done` rises 57
  edges after the start edge.
- **`OP_MAC`** does `acc <= acc + a*b` and also returns the new value on
  `result`.
- **`OP_LDACC`** loads `a` into the accumulator, sign-extended for signed
  integers. **`OP_CLR`** clears it.

Integer results:

- Add and subtract give the exact 65-bit result, sign-extended (signed) or
  zero-extended (unsigned) to 128 bits.
- Multiply gives the exact 128-bit product.
- The 128-bit integer accumulator wraps around.
- An integer `OP_DIV` returns 0 with `invalid` set.

The whole non-divide datapath is combinational between the operand inputs and
the result registers. The logic depth is large: a chain of 33 128-bit adders
in the multiplier, then alignment, normalization and rounding. The unit is not
pipelined.

## The Booth multiplier

Both operands are extended by one bit: a copy of the sign bit when
`is_signed`, a zero otherwise. The multiplier is extended by one more bit to
an even width of 66. With a zero padded below the LSB, it is scanned in
overlapping three-bit groups `b[2i+1] b[2i] b[2i-1]`, which gives 33 digits:

| group | digit | one-hot control |
|---|---|---|
| 000, 111 | 0 | `ctrl[0]` |
| 001, 010 | +A | `ctrl[1]` |
| 011 | +2A | `ctrl[2]` |
| 101, 110 | -A | `ctrl[3]` |
| 100 | -2A | `ctrl[4]` |

Each row is the selected multiple, sign-extended to 128 bits and shifted left
by 2i. A negative digit needs its row negated, which is done in two parts:

- the generator inverts the whole shifted row, so `~(M << 2i)` has ones in
  its low 2i bits;
- the adder that takes the row adds a carry-in of 1, completing
  `-(M << 2i) = ~(M << 2i) + 1`.

Each row therefore needs no separate correction term. The rows are added one
after another by 33 Kogge-Stone adders. All arithmetic is modulo 2^128, which
holds the exact product of two 64-bit operands, signed or unsigned.

For floating point, the two 53-bit significands (hidden bit restored) are
zero-extended into the same multiplier. The low 106 bits of the product are
the exact significand product.

## The Kogge-Stone adder

The adder works in three stages:

1. **Pre-processing.** Each bit gets propagate `p = a ^ b` and generate
   `g = a & b`. The carry-in enters as the generate of an extra position
   below bit 0.
2. **Prefix network.** There are `ceil(log2(W+1))` levels. At each level
   every node at distance `span` or more combines with the node `span`
   positions below it, using `G = G_hi | (P_hi & G_lo)` and
   `P = P_hi & P_lo`. `span` doubles from one level to the next, so after
   the last level each position holds its incoming carry.
3. **Post-processing.** Each sum bit is `s = p ^ carry`.

## Floating point datapath

### Operand and internal formats

This is the part that takes the most care. Each stage passes a number as a
sign, a signed 14-bit biased exponent `E` and a significand `S` with a fixed
binary point:

    value = S * 2^(E - 1023 - FB),   FB = number of fraction bits of S

| stage output | width of S | integer bits | FB |
|---|---|---|---|
| operand (add/sub), widened | 106 | 2 | 104 |
| `fp_mul_path` product | 106 | 2 | 104 |
| `fp_add_path` sum (incl. sticky bit) | 108 | 3 | 105 |
| `fp_divider` quotient (incl. sticky bit) | 57 | 1 | 56 |

The product exponent is `ea + eb - 1023`. A denormal operand enters with
hidden bit 0 and exponent 1. The 14-bit signed exponent covers every
intermediate value, from products of two denormals (about -1100) to the
largest quotients (about 3070).

`fp_normalize` turns any of these into the rounding format: a 12-bit biased
exponent and a 56-bit mantissa.

    [55] overflow slot (0) | [54] hidden bit | [53:2] fraction | [1] round | [0] sticky

Bits in the mantissa:

- The 12th exponent bit lets the rounder see exponents of 2047 and more,
  which overflow.
- The overflow slot at bit 55 catches a carry from rounding.
- The round and sticky bits carry all that rounding needs of the discarded
  bits.

### Alignment and the sticky bit (`fp_add_path`)

The operand with the larger exponent is the "large" one, and the other is
shifted right by the exponent difference. A zero operand never decides the
order. This matters because a zero product can carry a huge exponent, as in
`0 * 2^1000`.

One extra bit sits below both significands. Every bit that the shift moves
into or below that position is ORed into it, so all bits above it stay exact.
With this sticky bit:

- an addition gives a value that rounds the same as the exact sum;
- a subtraction gives the floor of the exact difference with the sticky bit
  set, which also rounds correctly.

The adder is 106 bits wide and a binary64 result keeps only 55 of them, so no
guard bits beyond this one are needed.

When the larger-exponent operand has leading zeros, as a product of denormals
can, the subtraction may go negative. A second Kogge-Stone adder then negates
it and the sign is taken from the other operand.

An exact zero sum is +0, except in two cases:

- it is -0 when rounding toward -infinity;
- it keeps the sign when both operands had the same sign.

A floating point multiply is sent through this adder with a zero of the
product's own sign as the second operand. The accumulate sends the
accumulator instead. Both then share the normalizer, the rounder and the
exception stage.

### Normalization (`fp_normalize`)

A leading-zero count shifts the leading one into the hidden-bit position and
lowers the exponent by the same amount. If the exponent would fall below 1,
the significand is instead shifted right by the shortfall and the exponent is
set to 0, which gives a denormal. Everything shifted out lands in the sticky
bit.

### Rounding (`fp_round`)

The fraction is incremented according to the rounding mode:

| mode | increment when |
|---|---|
| nearest-even | `round & (sticky | lsb)` |
| toward zero | never |
| toward +inf | positive and `round | sticky` |
| toward -inf | negative and `round | sticky` |

After the increment:

- A carry out of the hidden bit raises the exponent by one.
- A denormal that rounds up into the hidden bit becomes the smallest normal
  number.
- An exponent of 2047 or more is an overflow. It returns infinity with the
  result's sign in every rounding mode, including toward zero.
- `underflow` is raised for a denormal result that is inexact.

### Special cases (`fp_exception`)

| case | result | flags |
|---|---|---|
| any NaN operand | quiet NaN `7FF8000000000000` | invalid if any NaN was signalling |
| inf - inf, 0 * inf, 0/0, inf/inf | signalling NaN pattern `7FF4000000000000` | invalid |
| x / 0 | infinity, sign = XOR of the operand signs | exception (divide by zero) |
| x / inf | zero, sign = XOR of the operand signs | underflow |
| inf op finite | infinity with the proper sign | none |
| otherwise | rounded result | overflow, underflow, inexact from the rounder |

`exception` is the OR of overflow, underflow, invalid and divide by zero. For
an accumulate, the product's class (zero, infinity, invalid) is formed first
and then combined with the accumulator as in an addition.

### Division (`fp_divider`)

On start, both significands are normalized so that their leading one sits at
bit 52, which makes denormal operands ordinary. The exponent `ea - eb + 1023`
is corrected for those shifts. Each cycle then produces one quotient bit:

- a Kogge-Stone subtractor compares the partial remainder with the divisor
  (its carry out means the remainder was at least the divisor);
- that bit enters the quotient;
- the remainder keeps the difference or its old value, and shifts left.

After 56 cycles the quotient has 56 bits, and a final bit records whether
the remainder is nonzero. Zero, infinite and NaN operands still run through
the divider; the exception stage replaces their result.

### Single precision (`fp_sp_widen`, `fp_sp_round`)

Binary32 has no datapath of its own. Every binary32 value, denormals included,
is exactly a binary64 value, so operands are widened at the input:

- the exponent is re-biased by +896;
- the fraction moves to the top of the 52-bit field;
- a denormal is normalized by its leading-zero count.

The binary64 datapath then computes and rounds in the requested mode, and
`fp_sp_round` rounds that binary64 result again, to 24 bits. It handles
binary32 denormals, overflow to infinity and the three flags of this step,
which are ORed into the flags of the first step.

Rounding twice is normally a source of error, but not here. A binary64
significand has 53 bits, at least 2*24+2. For add, subtract, multiply and
divide of binary32 operands, that makes the second rounding return the
correctly rounded binary32 result in every mode.

The fused accumulate is the exception: the exact product has up to 48 bits,
so it is not a binary32 operand. When the binary64 sum lands exactly halfway
between two binary32 values, round-to-nearest can then differ by one unit in
the last place from a single rounding.

## Departures and choices

These follow the source design:

- radix-4 Booth encoding into five control signals;
- Kogge-Stone addition of partial-product rows;
- the sign XOR and the exponent sum minus the bias;
- the 56-bit/12-bit rounding format;
- four rounding modes;
- one quotient bit per cycle;
- the special-case table, including the signalling-NaN result for invalid
  operations, infinity on overflow in every mode, and underflow on division
  by infinity;
- a single-cycle accumulate loop;
- one multiplier shared by the fixed and floating point paths.

These are this design's own choices:

- **Signs.** IEEE-754 sign convention (1 = negative).
- **Underflow.** Gradual underflow to denormals, rather than flushing to
  zero.
- **Fused accumulate.** The accumulate rounds once. The source's drawing
  shows a separate multiplier and adder, but its conclusion calls the unit
  fused.
- **Rows added in a chain.** The Booth rows are summed by a chain of adders,
  not a tree.
- **Encodings.** The opcode and rounding-mode codes, and the NaN bit
  patterns.
- **Handshake and extra operations.** The start/done/busy handshake, the
  asynchronous reset, the accumulator load and clear operations, and the
  exact 65-bit integer add/subtract.
- **Flags.** An invalid flag for signalling-NaN operands, and an exception
  flag defined as the OR of the other error conditions.
- **Sticky-bit and leading-zero logic.** Their structure is this design's;
  the source does not give it.
- **Single precision.** The source says the unit handles single and double
  precision but not how. Here binary32 goes through the binary64 datapath,
  followed by a second rounding step.

Not built:

- **Decimal branch.** The source's block diagram also shows a decimal
  floating point branch: a decimal Kogge-Stone adder, binary/decimal
  conversion and decimal fine shifting. It also mentions a leading-zero
  detector with base-3 output and a final redundant adder. None of these is
  described beyond its name, so none is implemented. Normalization uses a
  binary leading-zero count.
- **Baseline adders.** The ripple-carry, carry-lookahead and carry-save
  adders that the source compares against are not part of this design.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_ks_adder` | 64- and 13-bit sums against `a + b + cin`, long carry chains |
| `tb_booth_encoder` | recoding table; digits weighted by 4^i rebuild the multiplier |
| `tb_booth_ppgen` | each control value gives the right multiple, at shift 0 and 10 |
| `tb_booth_multiplier` | signed/unsigned products against `*`, corner values |
| `tb_fp_mul_path` | multiply path + normalizer + rounders against the simulator's double product |
| `tb_fp_add_path` | sums and differences incl. cancellation, ties and the -0 rule; inexact flag against an exact two-sum error term |
| `tb_fp_normalize` | against an independent shift-and-sticky formulation |
| `tb_fp_round` | hand-worked cases in all four modes |
| `tb_fp_exception` | one case per special-case row |
| `tb_fp_divider` | quotients against double division; exact 56-cycle latency |
| `tb_fp_sp_widen` | conversions against the binary32 value in real arithmetic, every denormal position |
| `tb_fp_sp_round` | nearest against a real-arithmetic reference; directed modes by bracketing; flags; ties, denormals, overflow |
| `tb_fpmac_top` | end to end at the default size (see below) |

Reference values for round-to-nearest come from the simulator's own IEEE
double arithmetic (`$realtobits`/`$bitstoreal`). The other three rounding
modes are checked by how they relate to each other and to that reference:

- if the result is exact, all four are equal;
- if not, toward +inf and toward -inf are one unit apart;
- toward zero equals the one of smaller magnitude;
- nearest is one of the two.

`tb_fpmac_top` runs the full-size unit through all of the following:

- integer add, subtract, multiply and accumulate;
- floating point add, subtract, multiply and divide in all four modes;
- the same four operations on binary32 operands, and a binary32 accumulate
  chain;
- 200 chained floating point accumulates;
- a case that only a fused accumulate gets right:
  `(1+2^-30)(1-2^-30) - 1 = -2^-60`;
- overflow, underflow, denormal results, invalid operations, NaN operands,
  divide by zero and cancellation;
- a start issued while the divider is busy;
- the latencies.

It counts each of these mechanisms and fails if one never occurred.

To simulate with Verilator, for example the full unit:

    verilator --binary --timing --assert -Irtl -Itb -y rtl \
        rtl/fpmac_pkg.sv tb/tb_fp_pkg.sv tb/tb_fpmac_top.sv \
        --top-module tb_fpmac_top -o sim
    ./obj_dir/sim

Any other testbench builds the same way with its own top module. Only
`tb_fp_pkg.sv` is needed besides the package; `-y rtl` finds the modules.
Testbenches that contain the Booth multiplier take a few minutes to compile,
because it expands into many bit-level prefix cells; `--build-jobs` helps.
