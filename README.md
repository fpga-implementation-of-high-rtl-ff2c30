# TS-RoBA: a truncated-shifter, rounding-based approximate multiplier

This is an 8-bit approximate multiplier that contains no partial-product
array. It relies on the identity behind rounding-based approximate (RoBA)
multiplication. Let `Ar` and `Br` be the powers of two nearest to `|A|` and
`|B|`. Then

    |A| * |B|  =  Ar*|B| + Br*|A| - Ar*Br  +  (|A|-Ar)*(|B|-Br)

The last term is dropped. It is small, because each factor is at most a
third of its operand, so it is at most `|A*B|/9`. Each remaining product has a
power of two as one factor, so it is a plain shift. What remains is two shifts
added together and a third shift subtracted.

This design goes one step further. It returns only the upper half of the
2N-bit product, so the shifters never form the lower columns. These are the
*truncated shifters*. A small constant is added to offset, on average, the
bits thrown away. All adders are chains of one cell, the XOR-MUX full adder.
The whole circuit is combinational: there is no clock, no register and no
latency in cycles.

## Data path

```
          +--------------+   |A|   +----------+  Ar, Br (one-hot)
 A ------>|              |-------->|          |--------------------+
 B ------>| sign_detector|   |B|   | rounding |                    |
          |      c1      |-------->|    c2    |                    |
          +--------------+         +----------+                    |
                 | sign                                             v
                 |        c3 truncated_shifter  |A| << log2(Br)  --+--> c6 carry_save_adder
                 |        c4 truncated_shifter  |B| << log2(Ar)  --+     (+ correction constant)
                 |        c5 truncated_shifter  Ar << log2(Br)   ------> c7 subtractor_xor_mux
                 |                                                          |
                 +--------------------------------------------------> c8 sign_set --> A x B (upper N bits)
```

| instance | module | what it produces |
|---|---|---|
| c1 | `sign_detector` | `|A|`, `|B|` (N-bit unsigned) and the product sign |
| c2 | `rounding` | `Ar`, `Br` as one-hot (N+1)-bit words |
| c3 | `truncated_shifter` | columns 2N..N-K of `Br*|A|` |
| c4 | `truncated_shifter` | columns 2N..N-K of `Ar*|B|` |
| c5 | `truncated_shifter` | columns 2N..N-K of `Ar*Br` |
| c6 | `carry_save_adder` | c3 + c4 + correction constant |
| c7 | `subtractor_xor_mux` | c6 − c5 |
| c8 | `sign_set` | drops the K guard columns, then applies the sign |

The top module is `roba_multiplier`. It has ports `datai_a`, `datai_b` and
`datao_ab`, each N bits wide.

## Rounding to a power of two

`rounding` turns each magnitude `M` into a one-hot word `Mr` with a fixed set
of gates. There is no priority encoder or comparator. For bit i ≥ 3:

    Mr[i] = (~M[i] & M[i-1] & M[i-2]  |  M[i] & ~M[i-1])  &  (all bits of M above i are 0)

In words: a value whose leading bits are `10` keeps its leading power of
two. A value whose leading bits are `011` rounds up to the next power. The
low three bits have special cases:

    Mr[2] = M[2] & ~M[1] & (bits above 2 are 0)
    Mr[1] = M[1]         & (bits above 1 are 0)
    Mr[0] = M[0]         & (bits above 0 are 0)

So a value exactly halfway between two powers, `3*2^(p-2)`, rounds up. The one
exception is 3, which rounds to 2. Some examples: 5→4, 6→8, 11→8, 12→16,
68→64, 104→128, 0→0.

The equations are applied to the magnitude zero-extended to N+1 bits, which
makes `Mr` N+1 bits wide. In signed mode the top bit is never set, because
magnitudes are at most 2^(N-1). In unsigned mode, values from `3*2^(N-2)`
upwards (192..255 for N = 8) round to 2^N, and the extra bit carries that
value.

## Truncated shifters: forming only the kept columns

Since `Br` is one-hot, `|A| * Br` is `|A|` shifted left by k, where
`Br = 2^k`. The product has 2N+1 columns, numbered 0..2N. Only columns 2N
down to N-K are needed. Each of these output bits is an OR, over the shifts
k, of `Br[k] & |A|[c-k]`. Bits that would land in lower columns are never
generated, so that part of a barrel shifter simply does not exist. The same
module serves all three products. For `Ar*Br` both inputs are one-hot.

The output is N+K+1 bits. The top bit is needed only for `2^N * 2^N` in
unsigned mode.

## Adding and subtracting with XOR-MUX full adders

`xor_mux_full_adder` forms `p = a ^ b` once. It then computes:

- `sum = p ^ cin`
- `cout = p ? cin : a`, from a 2:1 multiplexer

The carry path is one XOR followed by one multiplexer.

- **Carry-save row (c6).** Three words are added: c3, c4 and the constant.
  One full adder per column reduces them, with no rippling, to a sum word and
  a carry word. A ripple chain of the same cells (`xor_mux_ripple_adder`)
  then merges the two words. The output is N+K+2 bits, so no carry is lost.
- **Subtractor (c7).** XOR gates complement the subtrahend c5. A ripple chain
  then adds it with carry-in 1. For the built parameter sets the difference
  is never negative, so the borrow is discarded.
- **Sign set (c8).** The K guard columns are dropped and the low N bits are
  kept. When the sign is 1, the value is XORed with ones and incremented.

### The correction constant

Truncating `Br*|A|` and `Ar*|B|` each loses up to one unit of the lowest kept
column. On average the result would be about one unit low. The constant is
`CORR + (K > 0 ? 2^(K-1) : 0)`, in units of the lowest kept column:

- The `CORR` part (default 1) offsets the truncation loss.
- The `2^(K-1)` part turns the final dropping of K guard columns into
  round-half-up.

With the default K = 0, the constant is just 1 output LSB.

## Worked example: 68 × 104

| signal | value |
|---|---|
| `|A|`, `|B|` | 68, 104 |
| `Ar`, `Br` | 64, 128 |
| c3 `Br*|A|` = 8704 | upper byte 34 |
| c4 `Ar*|B|` = 6656 | upper byte 26 |
| c5 `Ar*Br` = 8192 | upper byte 32 |
| c6 | 34 + 26 + 1 = 61 |
| c7 | 61 − 32 = 29 |
| output | 29 |

The exact product is 7072, whose upper byte is 27.6. The untruncated RoBA
value is 7168, whose upper byte is 28.

## Accuracy

Errors are in output LSBs (units of 2^N), measured against the exact
`A*B / 2^N`, over all 65536 operand pairs for N = 8:

| build | mean error | mean abs error | max abs error |
|---|---|---|---|
| signed, K = 0, CORR = 1 (default) | 0 | 0.66 | 4.75 |
| unsigned, K = 0, CORR = 1 | +0.51 | 1.93 | 16.75 |
| signed, K = 2, CORR = 1 | 0 | 0.62 | 4.38 |

Unsigned operands reach larger products, so the `(|A|-Ar)(|B|-Br)` term
reaches more LSBs. The testbenches check every output against the bound
`|A*B|/9 / 2^N + 2` LSBs.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 8 | operand and result width |
| `K` | 0 | guard columns kept below the output LSB while adding |
| `CORR` | 1 | correction constant, in units of the lowest kept column |
| `SIGNED` | 1 | 1: two's-complement operands and result; 0: unsigned |

The result is the upper N bits of the approximate 2N-bit product, in the same
number format as the operands. For signed 8-bit operands it lies in −64..65.

## How this relates to the reference design, and what to trust

These parts follow the architecture this RTL implements:

- the block structure and instance names c1..c8
- the rounding equations
- the XOR-MUX full adder, including its carry multiplexer and truth table
- the use of XOR-MUX cells in the carry-save adder and the subtractor
- an 8-bit output, the upper half of the product, with no clock and no
  registers
- the idea of a correction constant

These are choices made for this implementation:

- The number of guard columns (K = 0) and the constant (CORR = 1). The
  architecture calls for a constant but does not give its value.
- Feeding the constant in as the third operand of the carry-save row.
- A ripple adder as the final merge adder.
- Widening internal buses by one or two bits so that no carry is lost. The
  reference schematic draws every bus 8 bits wide.
- The `SIGNED` parameter that selects signed or unsigned operation, and the
  rounding of large unsigned operands to 2^N.
- Building everything as plain combinational logic. The adder cell is
  described as "synchronous", but the reported implementation has no
  registers and no clock pin.

One result published for the reference design is not reproduced. It gives 38
as the truncated output for 68 × 104, and matching intermediate values. Those
numbers do not follow from the RoBA identity that the architecture is built
on. This design gives 29, which is within 2 LSBs of the exact 27.6.

The conventional RoBA built from barrel shifters and a Brent-Kung prefix adder
is a comparison baseline and is not included. Nor is any image-processing
application: the application level gives no kernels or image sizes.

## Files

`rtl/` (one module or package per file):

- `roba_pkg.sv`: default width and the correction-constant function
- `roba_multiplier.sv`: top level
- `sign_detector.sv`, `rounding.sv`, `truncated_shifter.sv`,
  `carry_save_adder.sv`, `subtractor_xor_mux.sv`, `sign_set.sv`: the stages
- `xor_mux_full_adder.sv`, `xor_mux_ripple_adder.sv`: adder cell and chain

`tb/` (each testbench is self-checking and prints
`TB_RESULT checks=N failures=M`):

- `tb_roba_ref_pkg.sv`: integer reference model. It finds the nearest power
  of two by search and forms the truncated products with ordinary
  arithmetic.
- `tb_roba_multiplier.sv`: default build, all 65536 signed pairs. It checks
  the model, the error bound and the 68 × 104 intermediates. It also counts
  each mechanism: negative products, rounding up and down, 3→2, exact
  power-of-two operands, discarded bits, and the subtracted term.
- `tb_roba_multiplier_unsigned.sv`: `SIGNED = 0`, all pairs, including
  operands rounded to 2^N.
- `tb_roba_multiplier_guard.sv`: `K = 2`, all signed pairs, with the rounding
  constant carrying into kept columns.
- One testbench per stage: `tb_xor_mux_full_adder`, `tb_sign_detector`,
  `tb_rounding`, `tb_truncated_shifter`, `tb_carry_save_adder`,
  `tb_subtractor_xor_mux`, `tb_sign_set`.

## Simulating

Each testbench runs in well under a second. For example:

```
verilator --binary --timing --assert -Wno-fatal \
    rtl/roba_pkg.sv rtl/xor_mux_full_adder.sv rtl/xor_mux_ripple_adder.sv \
    rtl/sign_detector.sv rtl/rounding.sv rtl/truncated_shifter.sv \
    rtl/carry_save_adder.sv rtl/subtractor_xor_mux.sv rtl/sign_set.sv \
    rtl/roba_multiplier.sv tb/tb_roba_ref_pkg.sv tb/tb_roba_multiplier.sv \
    --top-module tb_roba_multiplier -Mdir obj
./obj/Vtb_roba_multiplier
```

To lint the RTL alone:
`verilator --lint-only -Wall rtl/roba_pkg.sv rtl/*.sv --top-module roba_multiplier`.
It reports two expected warnings. The first is the unused default-width
constant in the package, when a module is linted on its own. The second is the
two carry-room bits that `sign_set` does not read.

To change the operand width, override `N` on `roba_multiplier`. The reference
model in `tb_roba_ref_pkg` takes `n`, `k` and `corr` as arguments, so the
end-to-end testbenches adapt once their `N` and `K` localparams are changed.
