# Pre-encoded NR4SD multiplier with Han-Carlson partial product addition

In a fixed-coefficient DSP datapath (FIR filters, transforms), one operand of
every multiplication is a constant taken from a coefficient memory. This design
moves the radix-4 recoding of that operand out of the multiplier. Each
coefficient is recoded once, off-line, into *non-redundant radix-4 signed
digits* (NR4SD). The recoded word is stored in the ROM, so the multiplier
needs no Booth encoder in its critical path.

The recoded word is only one bit wider than the coefficient: N+1 bits for an
N-bit coefficient. Plain Modified Booth pre-encoding needs 3N/2 bits. The
partial products and a correction term are added by a tree of Han-Carlson
parallel-prefix adders.

The default configuration is an 8 x 8 bit signed multiplier (16-bit product)
with the NR4SD⁻ digit set. It is fed by a 16-entry coefficient ROM. The design
is purely combinational: it has no clock, no registers and no latency.

```
 addr ──► coeff_rom ──(N+1 bit pre-encoded B)──► nr4sd_multiplier ──► z = x·B
           │                                       ├─ nr4sd_sig_gen ×(k-1)
           └─ nr4sd_encoder per entry              ├─ nr4sd_ppg     ×(k-1)
              (constant inputs, folded             ├─ mb_ppg        ×1
               into ROM contents)                  ├─ correction term
 x ──────────────────────────────────────────────► └─ pp_adder_tree (han_carlson_adder ×k)
```

## The NR4SD digits

An N-bit two's complement number B (N = 2k) is written as k radix-4 digits.
The lower k-1 digits each come from one set of four values. That makes them
*non-redundant*, so each needs only two bits:

| digit set | values         | stored pair per digit | digit value      |
|-----------|----------------|-----------------------|------------------|
| NR4SD⁻    | {-2,-1,0,+1}   | {n⁻₂ⱼ₊₁, n⁺₂ⱼ}        | -2·n⁻₂ⱼ₊₁ + n⁺₂ⱼ |
| NR4SD⁺    | {-1,0,+1,+2}   | {n⁺₂ⱼ₊₁, n⁻₂ⱼ}        | 2·n⁺₂ⱼ₊₁ - n⁻₂ⱼ  |

The most significant digit absorbs the sign and whatever carry remains. It
ranges over {-2..+2}, like a Modified Booth (MB) digit. It is stored in MB form
as three bits {s, two, one}. In total that is 2(k-1) + 3 = N+1 bits.

**Recoding (`nr4sd_encoder`).** A carry ripples from digit to digit, starting
at c₀ = 0. For NR4SD⁻, digit j passes through two cells:

* a half adder on b₂ⱼ and c₂ⱼ: c₂ⱼ₊₁ = b₂ⱼ·c₂ⱼ and n⁺₂ⱼ = b₂ⱼ ⊕ c₂ⱼ;
* a "negative-sum" half adder (HA*) on b₂ⱼ₊₁ and c₂ⱼ₊₁. It obeys
  2c₂ⱼ₊₂ - n⁻₂ⱼ₊₁ = b₂ⱼ₊₁ + c₂ⱼ₊₁, so c₂ⱼ₊₂ = b₂ⱼ₊₁ + c₂ⱼ₊₁ (OR) and
  n⁻₂ⱼ₊₁ = b₂ⱼ₊₁ ⊕ c₂ⱼ₊₁.

NR4SD⁺ swaps the two cells: the HA* takes the even bit and the half adder the
odd bit. The top digit is MB-encoded from b_N-1, b_N-2 and the incoming carry
c_N-2. Its value is -2·b_N-1 + b_N-2 + c_N-2.

Example, B = -45 = 1101_0011₂, in NR4SD⁻:
the digits are (-1, +1, +1, -1), since -1 + 4·1 + 16·1 - 64·1 = -45.
The stored word {s,two,one | d2 | d1 | d0} is `101 | 01 | 01 | 11`.

**Signal generation (`nr4sd_sig_gen`).** The multiplier rebuilds one-hot
selection signals from each stored pair:

* NR4SD⁻:
  * one⁺ = ¬n⁻·n⁺
  * one⁻ = n⁻·n⁺
  * two⁻ = n⁻·¬n⁺
  * carry = two⁻ + one⁻
* NR4SD⁺:
  * one⁺ = n⁺·n⁻
  * one⁻ = ¬n⁺·n⁻
  * two⁺ = n⁺·¬n⁻
  * carry = one⁻

## Partial products and the correction term

This is the part of the design that takes the most care to follow.

Each digit j produces a partial product PPⱼ = dⱼ·X. It has N+1 bits and comes
as a bit vector plus a carry:

* `nr4sd_ppg` (lower digits): bit i is one⁺·xᵢ + one⁻·¬xᵢ + two·x'ᵢ₋₁. Here
  x'ᵢ₋₁ is xᵢ₋₁ for +2 and ¬xᵢ₋₁ for -2. X is sign-extended (x_N = x_N-1) and
  x₋₁ = 0.
* `mb_ppg` (top digit): bit i is one·(xᵢ ⊕ s) + two·(xᵢ₋₁ ⊕ s). Its carry is s.

A negative digit gives the ones' complement of |dⱼ|·X. The carry supplies the
missing +1.

The rows are not sign-extended across the 2N-bit product. Instead, each row's
sign bit is inverted and the row is shifted left by 2j. Inverting the sign bit
of an (N+1)-bit number adds 2^N, so row j carries an extra 2^N·4^j. One extra
row, the correction term COR, cancels all of them and carries the partial
product carries:

```
COR = (-2^N · Σ_{j<k} 4^j  mod 2^(2N))  |  Σ_j carry_j · 4^j
    = 0xAB00 | {0, c3, 0, c2, 0, c1, 0, c0}         (N = 8)
```

The constant is a multiple of 2^N. The carries sit at bits 2j < N, so the two
parts never overlap and COR is formed by wiring alone. The k partial product
rows and COR make k+1 operands, 5 for N = 8.

**Top digit of value zero.** b_N-1 = b_N-2 = c_N-2 = 1 gives a top digit of
0. Taken literally, the MB rule would set s = 1 there. The result would be a
zero vector plus a stray carry of 1. The encoder therefore stores
s = b_N-1·¬(b_N-2·c_N-2), so the zero digit contributes nothing. B = -1 is an
example: it recodes to (-1, 0, 0, 0).

## Han-Carlson adder tree

`pp_adder_tree` adds the k+1 rows modulo 2^(2N) with a balanced binary tree
of `han_carlson_adder` instances. For N = 8 that is four 16-bit adders on
three levels. There is no carry-save stage: the Han-Carlson adders do the
whole partial product addition, and the root adder's output is the product.

`han_carlson_adder` is a W-bit parallel-prefix adder with log₂W + 1 prefix
levels. The prefix operator is (g,p)∘(g',p') = (g + p·g', p·p'):

1. Pre-processing: gᵢ = aᵢ·bᵢ and pᵢ = aᵢ ⊕ bᵢ. The carry-in is folded into
   bit 0 as g₀ + p₀·cin.
2. Level 1: each odd bit combines with the even bit below it.
3. Levels 2..log₂W: Kogge-Stone among the odd bits, at distance 2^(l-1).
4. Last level: each even bit i > 0 combines with the finished odd bit i-1.
5. Post-processing: sᵢ = pᵢ ⊕ cᵢ₋₁, with c₋₁ = cin. The carry-out is G[W-1:0].

The adder is correct for any W ≥ 4, including widths that are not powers of
two (the testbench uses 13).

## Coefficient ROM and top level

`coeff_rom` takes the coefficients in two's complement, as the array
parameter `COEFFS`. Each entry is recoded by its own `nr4sd_encoder`. Its
inputs are constants, so synthesis reduces the encoders to a table of
(N+1)-bit words. This is the "off-line" encoding: no recoding logic remains in
hardware. The read is asynchronous. Addresses at or beyond `DEPTH` read as 0,
which is the digit pattern of zero.

`nr4sd_hca_mult_top` connects the ROM to `nr4sd_multiplier`.

| port   | dir | width         | meaning                               |
|--------|-----|---------------|---------------------------------------|
| `addr` | in  | clog2(DEPTH)  | coefficient index                     |
| `x`    | in  | N             | sample X, two's complement            |
| `z`    | out | 2N            | X · COEFFS[addr], two's complement    |

`nr4sd_multiplier` can also be used on its own with any pre-encoded word
(`x`, `b_enc` → `z`).

## Parameters

| parameter | default          | where                     | meaning |
|-----------|------------------|---------------------------|---------|
| `N`       | 8                | all arithmetic modules    | operand width; even, ≥ 4 |
| `FORM`    | `NR4SD_MINUS`    | encoder, ROM, multiplier  | digit set, `NR4SD_MINUS` or `NR4SD_PLUS` (`nr4sd_pkg::nr4sd_form_e`) |
| `DEPTH`   | 16               | ROM, top                  | number of coefficients |
| `COEFFS`  | 0, 1, -1, 2, -2, 3, -3, 127, -128, 85, -86, 37, -45, 100, -99, 64 | ROM, top | coefficients, N-bit signed |
| `W`       | 16               | `han_carlson_adder`       | adder width (2N inside the multiplier) |
| `ROWS`    | 5                | `pp_adder_tree`           | operand rows (k+1 inside the multiplier) |

The ROM and the multiplier must use the same `FORM`. The top passes one value
to both. The default coefficient list is illustrative: it is chosen so that
every digit value of both sets occurs.

The word layout is `enc[2j+1:2j]` = stored pair of digit j (j < k-1), and
`enc[N:N-2]` = {s, two, one}.

## Where this implementation makes its own choices

The sources behind this design fix the NR4SD digit sets, the recoding cells,
the N+1-bit stored word, the signal equations, Han-Carlson addition of the
partial products, and the 8-bit size. The following are choices of this
implementation:

* **Digit set.** Both sets are built. NR4SD⁻ is the default.
* **Adder structure.** The partial products are added only by Han-Carlson
  adders in a binary tree. There is no carry-save tree and no separate final
  carry-lookahead adder. A variant that kept a carry-save tree and used a
  Han-Carlson adder only as the final adder would change only
  `pp_adder_tree`.
* **Correction term.** The sign-bit-inversion constant and the carries
  placed in COR are derived here. So is the sign-cleared top digit for value 0.
* **ROM.** The depth, the contents, the asynchronous read and the zero for
  out-of-range addresses are this design's own.
* **No pipeline.** The design has no registers. Registers around it are left
  to the surrounding datapath.

Area and delay have not been measured against any reference implementation.

## Verification

Each module has a self-checking testbench in `tb/`. Every testbench compares
against integer arithmetic, or against a decoder written only from the digit
definitions (`tb/nr4sd_tb_pkg.sv`). Each one prints
`TB_RESULT checks=<n> failures=<n>`.

| testbench | what it covers |
|-----------|----------------|
| `tb_nr4sd_encoder` | all 256 8-bit values in both sets and all 4096 12-bit values: the decoded word equals B, the digits are in range, the top code is legal, and every digit value occurs |
| `tb_coeff_rom` | every entry in both sets; a second ROM with other contents and depth; out-of-range read |
| `tb_nr4sd_sig_gen` | the four stored pairs against the encoding tables, both sets |
| `tb_nr4sd_ppg`, `tb_mb_ppg` | every X against every digit: pp + carry = d·X |
| `tb_han_carlson_adder` | W = 16 (directed carry chains and 50k random), W = 8 exhaustive, W = 13 random |
| `tb_pp_adder_tree` | 5×16 and 3×10 trees, random and all-ones |
| `tb_nr4sd_multiplier` | all 65,536 8×8 products in both sets, and 20k random 16×16 products |
| `tb_nr4sd_hca_mult_top` | default top: every ROM entry against every X (4096 products). Counts every digit value, carries into the top digit, sign-cleared zero top digits and negative partial products, and fails if any never occurs |
| `tb_nr4sd_hca_mult_top_plus` | the same with `FORM = NR4SD_PLUS` |

To run one with Verilator (from the repository root):

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/nr4sd_pkg.sv tb/nr4sd_tb_pkg.sv tb/tb_nr4sd_hca_mult_top.sv \
    --top-module tb_nr4sd_hca_mult_top -o sim
./obj_dir/sim
```

Modules are found through `-Irtl` and `-Itb`, by file name (one module per
file). Each testbench finishes in well under a second.
