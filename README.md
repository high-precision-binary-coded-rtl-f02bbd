# Double-mode BCD adder, 32 digits (128 bits)

Decimal arithmetic in packed BCD stores one decimal digit in each 4-bit group. A
binary adder gets a digit sum right only while it stays at or below 9. Above 9 the
digit has to be corrected by adding 6 (0110), which wraps 10..19 back to 0..9, and
a decimal carry goes to the next digit. The textbook BCD adder does this with two
4-bit binary adders in series: the first forms the sum and the second adds the
correction.

This design removes the second adder from the critical path. Each digit forms
**both candidates at once**: the binary sum and the sum plus 6. A 2:1 multiplexer
then picks one of them with the digit's decimal carry-out. Both candidates come
from one "double-mode" parallel-prefix adder. Such an adder shares a single
propagate/generate network between a sum and a sum-plus-constant. Thirty-two such
digits make a 128-bit BCD adder.

## Module hierarchy

```
bcd_adder_128            32-digit adder, NDIGITS = 32
 └─ g_digit[i]           one per digit, i = 0 (least significant) .. 31
     ├─ bcd_dm_digit     modified double-mode digit adder: sum, sum+6, decimal carry
     │   └─ dual_mode_adder   4-bit prefix adder: x+y and x+y+1
     └─ sum_mux          2:1 select of the final digit
bcd_pkg                  DIGIT_W = 4, bcd_digit_t, BCD_CORR = 4'b0110
```

The design is purely combinational. It has no clock and no reset.

## The double-mode adder (`dual_mode_adder`)

Each bit position forms three signals:

| signal | value | role |
|---|---|---|
| `pro[i]` | `x[i] ^ y[i]` | half-sum |
| `gen[i]` | `x[i] & y[i]` | the bit creates a carry |
| `n[i]`   | `x[i] \| y[i]` | the bit passes on a carry that reaches it |

A prefix over the bits gives two group signals:

- `GEN[i] = gen[i] | n[i] & GEN[i-1]`: a carry leaves bit i even with no carry into bit 0.
- `N[i] = n[0] & … & n[i]`: a carry into bit 0 would travel past bit i.

These give two carries into bit i. The carry is `GEN[i-1]` when the carry into
bit 0 is 0, and `GEN[i-1] | N[i-1]` when it is 1. So one network yields:

```
sum[i]    = GEN[i-1] ^ pro[i]                 -> x + y
sum_p1[i] = (GEN[i-1] | N[i-1]) ^ pro[i]      -> x + y + 1
```

It costs one extra OR and one extra XOR per bit. The carry-outs `cout`/`cout_p1`
come from the top bit in the same way. A real carry-in only has to pick between
the two results. That pick is the carry `GEN | (N & cin)`.

`WIDTH` defaults to 4. Other widths also work, and the testbench checks width 16.

## The digit adder and its +6 path (`bcd_dm_digit`)

Ports: `x`, `y` (digits 0..9), `cin`, and the outputs `sum`, `sum6` and `cout`.

1. The dual-mode adder forms `x+y` and `x+y+1`. `cin` picks one of them, which
   gives `s = x + y + cin` and its binary carry `cbin`.
2. **The +6 path.** `sum6` is `s + 0110`, formed with the same
   generate/transmit/propagate equations, using the constant in place of the
   second operand:
   - Bit 0 passes through unchanged: `sum6[0] = s[0]`.
   - A carry is forced into bits 1 and 2, the positions where 6 has a one.
   - The carry out of bit 3 is dropped. That drop is the wrap from 10..19 to 0..9.

   This path depends only on `s`, so it is a short fixed network. It does not
   need a second adder.
3. **Decimal carry.** `cout = cbin | s[3] & (s[2] | s[1])`. This is 1 exactly
   when `x + y + cin > 9`.

`sum_mux` then outputs `sum` when `cout` is 0 and `sum6` when it is 1.

The carry condition is the standard `c + S3·S2 + S3·S1`. A variant that reads
`S3·S2 + S2·S1` is wrong: it flags 6 and 7 as overflows and misses 10 and 11.
The digit testbench rejects it.

## The 32-digit chain (`bcd_adder_128`)

Digit i takes bits `[4i+3:4i]` of `x`, `y` and `sum`, so digit 0 is the least
significant. Its decimal carry-out `cb[i+1]` has two jobs:

- It selects digit i's own multiplexer.
- It is the carry-in of digit i+1.

`cb[0]` is the `cin` port and `cb[32]` is the `cout` port. For a plain 128-bit
addition, tie `cin` to 0. With `cin` and `cout`, adders can be chained into wider
numbers.

Every digit computes its prefix signals in parallel. Only the decimal carry
ripples, and it passes one short path per digit: a carry-in select, a carry term
and the correction test. The worst case is a number whose digit sums are all 9,
plus a carry-in. The carry then crosses all 32 digits.

Inputs with a digit above 9 are outside the adder's range. Their results mean
nothing, and nothing checks for them.

`NDIGITS` sets the size: 32 is the 128-bit adder and 1 is the single-digit
(4-bit) adder.

## Where this RTL departs from, or adds to, the design it implements

- **No pipeline registers.** The design is said to use pipelining, but where the
  stage boundaries fall and how many registers there are is not specified.
  Register the ports if a clocked version is needed.
- **No 4:2 carry-save tree.** A "modified 4:2 carry-save adder tree" is named as
  an optimisation, but its role is never defined. A two-operand adder has no
  natural place for one, so it is left out.
- **`cin`/`cout` on the 128-bit adder** are additions. The 128-bit adder itself
  has only `x`, `y` and `sum`.
- **Carry-in inside the digit.** The digit applies its carry-in by selecting
  between `x+y` and `x+y+1`. This is logically the same as the carry term
  `GEN | (N & cin)`.
- **Prefix shape.** The prefix is written as a linear recurrence, and synthesis
  chooses the tree.
- **Decimal-carry expression.** It is the standard one, as explained above.

Published figures for the design exist: a delay of 7.67 ns for 4 bits and
165.2 ns for 128 bits, and gate counts of 36 and 1024. These come from an
FPGA-vendor flow, and this RTL makes no claim to match them.

## Verification

Each testbench checks itself against integer or decimal arithmetic worked out
inside the testbench. Each ends with a `TB_RESULT checks=N failures=M` line.

| testbench | unit | what it checks |
|---|---|---|
| `tb_dual_mode_adder` | `dual_mode_adder` | all 256 pairs at width 4 for both sums and carries; 2000 random pairs at width 16 |
| `tb_bcd_dm_digit` | `bcd_dm_digit` | all 200 digit/carry combinations: `sum`, `sum6`, `cout` and the selected digit; the vector 1 + 9 = 0 with carry 1 |
| `tb_sum_mux` | `sum_mux` | all candidate pairs with both select values |
| `tb_bcd_adder_4bit` | `bcd_adder_128`, `NDIGITS=1` | all 200 single-digit additions |
| `tb_bcd_adder_128` | `bcd_adder_128` at default size | 6 directed and 20000 random 32-digit additions against a digit-by-digit decimal model |

The 32-digit testbench counts how often each mechanism occurs and fails if any
count is zero. The mechanisms are:

- a corrected digit
- a digit with no correction
- a digit with an incoming carry
- a carry that ripples across all 32 digits
- a carry out of the top digit
- an external carry-in

Each testbench was also run against a copy of its unit with one deliberate
error, and each reported failures:

- the `N` term dropped from the +1 carries
- the wrong decimal-carry expression
- the multiplexer select swapped
- the multiplexers selected by carry-in instead of carry-out

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/bcd_pkg.sv tb/tb_bcd_adder_128.sv --top-module tb_bcd_adder_128
./obj_dir/Vtb_bcd_adder_128
```

Swap in any other testbench name the same way. The package file must come first
on the command line. All testbenches finish in well under a second.

To change the size, override `NDIGITS` on `bcd_adder_128`. The operand width is
`4*NDIGITS`.
