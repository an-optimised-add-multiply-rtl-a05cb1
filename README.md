# Fused add-multiply with straight Modified Booth recoding of the sum

DSP kernels often compute `Z = X * (A + B)`. The obvious circuit adds `A + B`
with a carry-propagate adder, then Booth-encodes the sum and multiplies. This
design never forms `A + B`. A small recoder turns the two addends straight into
the radix-4 Modified Booth (MB) digits of their sum. That recoder (S-MB, for
"sum to Modified Booth") is built from full and half adders whose carries move
at most one digit. So its delay does not depend on the word length, and there is
no adder in front of the multiplier.

The whole operator is combinational:

```
 A, B ──► smb_recoder ──digits──► pp_generator ──rows──┐
                                   ▲      │ neg          ▼
 X ────────────────────────────────┘      ▼        csa_tree ──sum,carry──► cla_adder ──► Z
                                   correction_term ──CT──┘
```

| module            | role |
|-------------------|------|
| `fam_top`         | the operator; `a`, `b`, `x` are N-bit two's complement, `z` is 2N+1 bits |
| `smb_recoder`     | A, B → N/2+1 MB digits of A+B |
| `smb_even_part`   | even bit positions of every digit (full adders) |
| `smb_odd_part`    | odd bit positions of every digit (half adder + signed half adder) |
| `pp_generator`    | digit and X → one partial-product row per digit |
| `correction_term` | one row holding the negation +1s and the sign-extension constant |
| `csa_tree`        | carry-save array, reduces N/2+2 rows to two |
| `cla_adder`       | carry-lookahead adder for the last two rows |
| `fam_pkg`         | digit and selection types, digit → selection function |
| `fa_cell`, `ha_cell`, `ha_star_cell`, `fa_star_cell`, `csa_row` | adder cells |

The default size is `N = 16`. `N` must be even and at least 4. Z is exact for
every input, including the cases where `A + B` needs N+1 bits.

## The S-MB digit

An MB digit `y_j` is in {-2, -1, 0, +1, +2}, with `Y = Σ y_j · 4^j`. Here
each digit is carried as three bits:

```
y_j = -2·s_odd[j] + s_even[j] + c[j]
```

`s_odd` has negative weight, `s_even` positive weight, and `c` is a carry that
enters from the digit below. Every one of the 8 bit patterns is a legal digit.
Zero has two codes, (0,0,0) and (1,1,1).

### Why two carries per digit

A digit position receives the four operand bits `a[2j+1], b[2j+1], a[2j], b[2j]`.
Their weighted sum is 0…6. A single 0/1 carry into the next digit (worth 4)
together with a digit in -2…+2 cannot cover that range once an incoming carry
is added. So each digit sends two carries upward, and they enter the next digit
at different places:

1. **Odd half adder.** `a[2j+1] + b[2j+1] = 2·c_ha[j] + t`.
   `c_ha[j]` (worth `4^(j+1)`) goes to the *even full adder* of digit j+1.
   It depends only on the two operand bits, so it is ready after one gate.
2. **Even full adder.** `a[2j] + b[2j] + c_ha[j-1] = 2·c_mid[j] + s_even[j]`.
3. **Signed half adder (HA\*).** `t + c_mid[j] = 2·c_hs[j] - s_odd[j]`, which
   gives `c_hs = t | c_mid` and `s_odd = t ^ c_mid`. It writes a positive 0…2 as a
   positive carry minus a sum bit, and that is what makes the odd bit come out
   with the negative weight the MB digit needs. `c_hs[j]` enters digit j+1
   directly as its `c` term.

Summing the three equations shows that the digits telescope to the unsigned
value of A plus B. The longest path is HA → FA → HA\*, whatever the value of N.
Digit j depends only on operand bits 0 … 2j+1.

### The top digit and the sign bits

Steps 1–3 treat A and B as unsigned. Their sign bits really weigh `-2^N = -4^K`
(K = N/2). A signed full adder FA\*, with two negative inputs and one positive
input, adds them into an extra digit K:

```
-a[N-1] - b[N-1] + c_ha[K-1] = -2·n + s        (FA*)
y_K = -2·n + s + c_hs[K-1]
```

So digit K has the same three-bit form, and `Σ_{j=0..K} y_j 4^j = A + B`
holds exactly. Because of this extra digit the multiplier uses K+1 partial
products, not K.

## Partial products and the correction term

`fam_pkg::smb_to_sel` maps a digit to MB selection signals:

```
one = s_even ^ c
two = (s_odd & ~s_even & ~c) | (~s_odd & s_even & c)
neg = s_odd & ~(s_even & c)        -- the (1,1,1) zero is not negated
```

Each row starts as the (N+1)-bit multiple `M ∈ {0, X, 2X}`. A negative digit
takes `~M`. The row's sign bit is then inverted, and the row is placed at bit
2j of a `W = 2N+1` bit word. Two corrections are owed to the sum of the rows:

* +1 at bit 2j for each negative digit, to turn `~M` into `-M`;
* `-2^(N+2j)` for each row, because inverting the sign bit replaces sign extension.

`correction_term` adds both into one row:
`CT = (-Σ_{j=0..K} 2^(N+2j)) mod 2^W + Σ neg_j 4^j`. The constant occupies bits N
and up, and the +1s occupy even bits 0 … 2K. They overlap only at bit N = 2K, so
the adder in this block is in effect a short incrementer.

## Reduction and final addition

`csa_tree` is a linear array: its first row of 3:2 counters takes operands 0–2,
and every later row adds one more operand to the running sum and carry. For
N = 16 there are 10 operands (9 rows and the CT), so 8 CSA rows. All arithmetic
is modulo `2^W`. A carry leaving bit W-1 is dropped, because the product always
fits in W bits.

`cla_adder` splits the word into groups of 4 bits. Inside a group every carry is
a two-level sum of products of bit generate and propagate signals. Group
generate and propagate signals chain the groups. The width is padded
internally to a multiple of 4.

## Interface and timing

`fam_top #(N)`: inputs `a`, `b`, `x` (`[N-1:0]`), output `z` (`[2N:0]`), all
two's complement. There is no clock, reset or handshake. `z` is valid one
combinational delay after the inputs change. To pipeline the operator, put
registers around it, or between `csa_tree` and `cla_adder`.

## What is given and what is chosen

The overall structure is the published S-MB fused add-multiply architecture:
recoder, partial products, correction term, CSA and CLA. So are the split of
the recoder into even and odd parts and the use of plain and signed-bit full
and half adders. The following are this implementation's own choices:

* the default width N = 16 (the architecture is stated for any n = 2k);
* the exact cell arrangement of the even and odd parts (above);
* the extra top digit. The architecture describes Y = A + B as n bits wide,
  which would wrap when the sum overflows. Here Z is exact instead;
* no signed half adder of the form `-a + b`. The recoding above does not need it;
* the row format (inverted sign bit) and therefore the contents of the CT;
* the CT enters the CSA as one more row and is not added to the rows beforehand;
* the linear CSA array, and the 4-bit grouping of the CLA;
* a purely combinational datapath.

Published FPGA results exist for the even and odd recoder parts (14 four-input
LUTs each), but they do not state the operand width they used. No area or
timing figure is claimed for this RTL.

## Verification

Every module in `rtl/` except the cells has a self-checking testbench in `tb/`.
The expected values come from integer arithmetic in the testbench, not from the
module's equations:

| testbench | what it checks |
|-----------|----------------|
| `smb_even_part_tb`, `smb_odd_part_tb` | per-digit adder identities, all input combinations plus random vectors |
| `smb_recoder_tb` | `Σ y_j 4^j == A+B` for all 65 536 8-bit pairs and 20 000 random 16-bit pairs; digit range; digit j unaffected by bits above 2j+1 |
| `pp_generator_tb` | for every digit code: row, sign constant and +1 give `y_j·X·4^j` mod 2^W |
| `correction_term_tb` | all 512 neg patterns at N = 16 |
| `csa_tree_tb` | sum + carry equals the operand total, random and worst-case operands |
| `cla_adder_tb` | exhaustive at W = 5 (width not a multiple of 4), random and long carry chains at W = 33 |
| `fam_top_tb` | default N = 16: 216 corner triples and 100 000 random triples against `X*(A+B)`. It also counts every digit value, the (1,1,1) zero, a sum beyond N bits, a non-zero and a negative top digit, and fails if any of them never occurs |
| `fam_top_exhaustive_tb` | every (A, B, X) at N = 4 and at N = 6 (266 240 cases) |

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself with
a watchdog. To run one with Verilator 5:

```
verilator --binary --timing -Irtl -y rtl -y tb +libext+.sv \
          rtl/fam_pkg.sv tb/fam_top_tb.sv --top-module fam_top_tb -o sim
./obj_dir/sim
```

Change `N` on `fam_top` (or on the lower modules) to resize the design.
`csa_tree` and `cla_adder` take their sizes from their parents. The testbenches
use 64-bit integers for reference values, so they hold up to N = 30.
