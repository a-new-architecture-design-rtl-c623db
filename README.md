# Pre-encoded NR4SD multiplier

In filters, transforms and codecs, one input of most multiplications is a
fixed coefficient taken from memory. Because the coefficient is known ahead of
time, it can be recoded into a form the multiplier likes **once, off-line**.
It is then stored in that form. The multiplier then needs no recoding logic of
its own.

The usual radix-4 recoding, Modified Booth (MB), halves the number of partial
products. Each MB digit takes one of five values, {-2, -1, 0, +1, +2}, and is
stored as three bits (sign, one, two). This design instead stores coefficients
in **non-redundant radix-4 signed digit (NR4SD)** form:

* each of the low k-1 digits takes only **four** values, so **two bits** store
  it;
* the most significant digit stays an MB digit (three bits), so that the whole
  2's complement range is covered.

An n-bit coefficient (n = 2k) therefore needs n+1 bits in the ROM, against
3n/2 bits in MB form. The partial-product generator also gets simpler: a digit
can never be both -2 and +2, so each bit is a plain AND-OR with no sign XOR.

There are two digit sets, chosen by the `VARIANT` parameter:

| variant        | low digits         | stored bits `{n_hi, n_lo}` -> digit |
|----------------|--------------------|-------------------------------------|
| `NR4SD_MINUS`  | {-2, -1, 0, +1}    | digit = -2·n_hi + n_lo              |
| `NR4SD_PLUS`   | {-1, 0, +1, +2}    | digit = +2·n_hi - n_lo              |

The default is 8-bit operands (k = 4 digits) and a 16-bit product, with
`NR4SD_MINUS`.

## System

```
             +-------------------------------+
  addr ----->| coeff_rom                     |  b_enc (N+1 bits)
  cen_n ---->|  COEFFS -> nr4sd_encoder x    |------------------+
  clk ------>|  DEPTH (at elaboration) -> reg|                  |
             +-------------------------------+                  v
                                                    +----------------------+
  a (N bits) -------------------------------------->| nr4sd_mult           |--> p (2N bits)
                                                    +----------------------+
```

`nr4sd_premult_top` is the ROM plus the multiplier core:
`p = a * COEFFS[addr]`, with everything in 2's complement.

* **ROM timing.** The read is synchronous. On a rising `clk` with `cen_n` low,
  the ROM output takes the word at `addr`, one cycle after the address is
  presented. With `cen_n` high, the output holds. There is no reset, so the
  output is undefined until the first read.
* **Multiplier timing.** `a` is not registered. `p` follows `a`
  combinationally for the coefficient the ROM is holding.
* **ROM contents.** `COEFFS` holds the coefficients as plain 2's complement
  numbers, packed with word i in bits `[i*N +: N]`. Inside `coeff_rom`, one
  `nr4sd_encoder` per word converts each constant. Synthesis folds these into
  constants, so the memory holds only encoded words. This is how the
  "off-line" step is done here.
* **Default ROM.** Four words: -128, -102, +89, +127.

## Encoding: from 2's complement to NR4SD (`nr4sd_digit_enc`, `nr4sd_encoder`)

The encoder works through the number from the least significant bit pair up,
passing a carry c_2j from each digit to the next (c_0 = 0). Each digit cell
sees the bit pair b_2j+1, b_2j and the carry c_2j, and outputs two digit bits
and the next carry. In every case:

    2·b_2j+1 + b_2j + c_2j = 4·c_2j+2 + digit

Each cell is two half adders. One is an ordinary HA (`ha`): c = p & q,
s = p ^ q. The other is a signed HA* (`ha_star`). HA* has two positive inputs,
a positive carry and a **negatively weighted** sum, so 2c - s = p + q. That
gives c = p | q and s = p ^ q.

* **NR4SD-:** the HA takes (b_2j, c_2j) and gives n_2j (+). The HA* takes
  (b_2j+1, c_2j+1) and gives n_2j+1 (-) and c_2j+2.
* **NR4SD+:** the HA* takes (b_2j, c_2j) and gives n_2j (-). The HA takes
  (b_2j+1, c_2j+1) and gives n_2j+1 (+) and c_2j+2.

The top digit combines b_n-1 (weight -2), b_n-2 and the last carry c_n-2. It
is encoded by the MB encoder (`mb_encoder`):
one = y_lo ^ y_mid, two = (y_hi ^ y_mid) & !one, s = y_hi.

Digits of the four default coefficients, most significant first:

| value | NR4SD-         | NR4SD+         |
|-------|----------------|----------------|
| -128  | -2  0  0  0    | -2  0  0  0    |
| -102  | -1 -2 -1 -2    | -2 +1 +2 +2    |
|  +89  | +2 -2 -2 +1    | +1 +1 +2 +1    |
| +127  | +2  0  0 -1    | +2  0  0 -1    |

**Encoded word layout** (N+1 bits; defined in `nr4sd_pkg`):

* bits `[2j+1:2j]` hold `{n_2j+1, n_2j}` of low digit j, for j < k-1;
* bits `[N:N-2]` hold `{s, one, two}` of the MB top digit.

## Multiplier core (`nr4sd_mult`)

1. **Decode** (`nr4sd_sig_gen`). The two stored bits of each low digit become
   one-hot selects `one_p` (+1), `one_m` (-1) and `two` (-2 for NR4SD-, +2 for
   NR4SD+).
2. **Partial products** (`nr4sd_pp_gen`). Each bit i of the (N+1)-bit partial
   product is

       p_i = (a_i & one_p) | (!a_i & one_m) | (a'_i-1 & two)

   Here a'_i-1 is !a_i-1 for NR4SD- and a_i-1 for NR4SD+, with a_-1 = 0 and
   a_N = a_N-1. A negative digit gives the one's complement. The missing +1
   comes out as a carry-in bit `cin`, added at the digit's weight. The MB top
   digit goes through `mb_pp_gen`:
   p_i = ((a_i ^ s) & one) | ((a_i-1 ^ s) & two), with cin = s & (one | two).
   The cin is gated so that the MB zero digit with s = 1 (code 111) adds
   nothing.
3. **Sign extension by correction term.** Sign extension is the step most
   likely to confuse a reader. Partial product j is weighted 4^j. It enters
   the tree as N+1 bits with its sign bit **inverted**, and is not
   sign-extended to 2N bits. Inverting the sign bit s adds 2^N·(1 - s) instead
   of -2^N·s. Summed over all k digits, the error is the constant
   2^N·(4^k - 1)/3. Subtracting that constant modulo 2^2N is the same as
   adding

       CT_high = 2^N · (1 + Σ_{j<k} 2^(2j+1))   mod 2^2N

   For N = 8 this is 0xAB00, i.e. the byte 1010_1011 above an 8-bit zero. The
   carry-in bits sit at positions 2j, which are all below N, so they slot
   into the zero low half of the same operand. The tree therefore gets k + 1
   operands: k partial products plus one correction word. `nr4sd_pkg::ct_high`
   computes the constant for any N.
4. **Wallace CSA tree** (`csa_tree`). Each level passes every group of three
   operands through a row of full adders, giving a sum row and a carry row
   shifted left by one. Operands left over pass through unchanged. Levels
   repeat until two vectors, C and S, remain. For N = 8 there are 5 operands
   and 3 levels (5 -> 4 -> 3 -> 2).
5. **Carry-lookahead adder** (`cla_adder`). This is a two-level CLA with
   4-bit groups: group generate/propagate signals feed a lookahead over
   groups, and each group forms its internal carries from its group carry-in.
   The final carry out is dropped. The product of two N-bit 2's complement
   numbers always fits in 2N bits, so nothing overflows.

The whole core is combinational.

## Parameters

| parameter | default            | meaning                                                      |
|-----------|--------------------|--------------------------------------------------------------|
| `N`       | 8                  | operand width; must be even, 4..64                           |
| `VARIANT` | `NR4SD_MINUS`      | digit set of the low digits                                  |
| `DEPTH`   | 4                  | ROM words (at least 2)                                       |
| `COEFFS`  | -128, -102, 89, 127 | ROM contents, `DEPTH*N` bits; override with `N` or `DEPTH` |

`csa_tree` (`NUM_OPS`, `WIDTH`) and `cla_adder` (`WIDTH`, `GROUP`) are
generic.

## What follows the method and what is this design's own

These follow the method: the NR4SD digit sets, the HA/HA* digit cells, the MB
top digit, two stored bits per digit, the ROM-plus-multiplier structure, the
correction-term sign handling, and a Wallace CSA tree feeding a CLA.

These are this design's own choices, where the method gives no detail:

* the ROM size, contents, read latency and active-low enable, and the lack of
  a reset;
* doing the off-line encoding at elaboration inside the ROM;
* the exact bit equation of the NR4SD partial-product generator;
* gating the MB carry-in for the zero digit;
* the grouping in the CSA tree and the CLA group size;
* merging the carry-in bits and the constant into one tree operand;
* feeding `a` to the multiplier without a register.

Points where the source description is inconsistent, and which reading the
RTL uses:

* **HA\* carry.** It is OR (c = p | q). An AND would break 2c - s = p + q.
* **Digit decode, NR4SD-.** one_m = n_hi & n_lo and two = n_hi & !n_lo. For
  NR4SD+: one_p = n_hi & n_lo and one_m = !n_hi & n_lo. Both come straight
  from the digit definitions in the table above.
* **NR4SD+ carries.** The carry c_2j+2 is the HA carry b_2j+1 & c_2j+1. This
  satisfies the identity above, so, for example, digit +2 from bits 0,1,1
  leaves no carry.
* **Example product.** The product -5 · -3 is +15.

The reference simulation traces also show a one-bit signal named `ovf`. Its
function is not described, and nothing here corresponds to it.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog. The reference
values come from `tb/nr4sd_ref_pkg.sv`, an arithmetic (not gate-level) model
of the encoding.

* `tb_nr4sd_premult_top` runs three systems side by side: the default one,
  and NR4SD- and NR4SD+ with a 256-word ROM holding every 8-bit value. Every
  word is read through the ROM port and multiplied by all 256 values of `a`,
  so all 65,536 products are checked in both variants. It also checks read
  latency and `cen_n` hold. It counts how often each mechanism occurs: every
  low-digit value of both sets, every top-digit value, negated partial
  products and ROM holds. A mechanism that never occurs counts as a failure.
* `tb_nr4sd_premult_top_full` runs the top at its default parameters: every
  stored coefficient times every `a`.
* `tb_nr4sd_mult` multiplies exhaustively at N = 8 in both variants, runs
  random tests at N = 16, and checks the example products separately
  (-3·2 = -6, -5·-3 = 15, -127·77 = -9779, -117·-125 = 14625, and others).
* `tb_nr4sd_trace_vectors` chains the RTL encoder into the core, which is
  how a multiplier with on-line encoding would be built. It replays the
  products of the reference simulation traces in both variants.
* `tb_nr4sd_encoder` encodes all 256 inputs in both variants. It also checks
  the digit magnitudes in the table above.
* The testbenches of the small cells go through their truth tables
  exhaustively. `csa_tree` and `cla_adder` get random and corner-case
  operands.

Running one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/nr4sd_pkg.sv tb/nr4sd_ref_pkg.sv tb/tb_nr4sd_premult_top.sv \
    --top-module tb_nr4sd_premult_top -o sim
./obj_dir/sim
```

Other testbenches work the same way; leave out `tb/nr4sd_ref_pkg.sv` for
those that do not import it. Verilator finds the modules on the `-I` paths by
file name (one module per file, `rtl/<module>.sv`). Everything in `rtl/` is
synthesizable. The only clocked element is the ROM output register.
