# GF(2^113) multipliers and genus-2 HECC arithmetic units

Public-key schemes built on elliptic and hyperelliptic curves spend almost all
of their time multiplying elements of a binary field. This design collects
hardware for one such field, GF(2^113) in polynomial basis. It has two parts:

* **Four fast field multipliers.** Three are Karatsuba variants that trade
  area for clock cycles (OrderedKA, PaddedKA, PaddedKA\*). The fourth is a
  pipelined multiplier built on a 16-point number-theoretic transform (NTT).
* **The arithmetic of a genus-2 hyperelliptic-curve (HECC) coprocessor.**
  This covers the field level (bit-serial multiplier, squarer, inverter) and
  the polynomial-ring level (addition, multiplication, squaring, division
  and the extended Euclidean algorithm, on polynomials whose coefficients
  are field elements), plus the three-input gcd that starts a divisor
  addition.

All RTL is synthesizable SystemVerilog-2017. Each unit has a self-checking
testbench, and one top level (`ff_arith_top`) puts all units side by side.

## Field representation

An element is a 113-bit vector `a`, where bit `i` is the coefficient of x^i.
Addition is XOR. A product of two elements is a polynomial of degree up to
224. It is reduced modulo an irreducible polynomial f(x) of degree 113.

This design uses the trinomial **f(x) = x^113 + x^9 + 1**. It is defined once,
as `gf_pkg::F_POLY`. Every unit reads f from there, including the reducer, the
serial multiplier, the squarer and the inverter. To use another
pentanomial or trinomial, change that one constant. The testbench reference
models read it from the same place.

`gf_reducer` is the shared "modular reducer". It folds every bit at position
i ≥ 113 back down by XORing `f << (i-113)`, from the top bit downwards. It is
written as a loop and flattens into a pure XOR network.

## Karatsuba multipliers

Karatsuba splits each operand into halves, a = a1·x^h + a0. It then forms
the product from three half-size products instead of four:

    D0 = a0·b0,  D1 = a1·b1,  D01 = (a0+a1)(b0+b1)
    a·b = D1·x^2h + (D01 + D0 + D1)·x^h + D0

Over GF(2), "+" and "−" are both XOR. The three variants differ in how the
113 bits are padded and in how many sub-multipliers are reused over several
cycles.

| Module | Split | Hardware | Cycles, start → done |
|---|---|---|---|
| `ordered_ka_mul` | 113 → 120 = 2×60; 60 = 3×20 | three `ka60_seq`, each with three 20-bit schoolbook multipliers used twice | 6 |
| `padded_ka_mul` | 113 → 128 = 2×64, recursive down to 1 bit | one combinational KA64 used three times | 5 |
| `padded_ka_star_mul` | same as PaddedKA | three KA64 in parallel, output register | 1 |

* **OrderedKA.** The top level is two-way Karatsuba on 60-bit halves. The
  three 60-bit products come from three `ka60_seq` units, which run in
  parallel. `ka60_seq` uses the three-way (degree-2) Karatsuba formula. That
  formula needs six 20-bit products. The first cycle computes D0, D1 and D2.
  The second cycle computes D01, D02 and D12 on the same three `classic_mul`
  instances. The third cycle combines them.
  * The overall schedule is: operand register, three KA60 cycles, overlap
    (recombination) register, reducer register. That gives 6 cycles.
* **PaddedKA.** `ka_rec` is a recursive two-way Karatsuba module that
  instantiates itself, down to `LEAF` bits (default 1). At the leaves it is
  3^6 = 729 AND gates. One 64-bit instance is used for D0, D1 and D01 in
  three successive cycles. The following cycle recombines and reduces. That
  gives 5 cycles. The unit ignores `start` while `busy` is high.
* **PaddedKA\*.** This is the same datapath with three KA64 instances. It is
  combinational up to one output register, so it accepts an operand pair on
  every cycle and returns the product one cycle later.

All three take `start` with `a` and `b`. They pulse `done` for one cycle and
hold `p` until the next result.

## NTT multiplier (`fft_mul`)

This is the least obvious part of the design. Use it only after reading the
arithmetic caveat below.

### Number field

The transform works in the integers modulo the prime **Q = 16417**
(= 16·1026 + 1). In this ring **W = 7339** is a primitive 16th root of unity.
Other constants used:

* W⁻¹ = 1586
* 16⁻¹ = 15391
* j = W^12 = 3846, the fourth root of unity used by the radix-4 butterfly.
  The inverse transform uses W^4 = 12571.

Residues are carried in 15 bits. `ntt_pkg` holds these constants. It also
computes the powers W^i at elaboration with `pow_mod`, rather than storing a
table.

### Data flow

```
op1 ─ setup ─┐
             ├─ NTT ─┐
op2 ─ setup ─┘─ NTT ─┴─ point-wise × ─ inverse NTT ─ finalize ─ dout
       comb.   2 cyc.     1 cyc.          2 cyc.        comb.
```

* **Setup.** Each operand is zero-extended to 224 bits and cut into sixteen
  14-bit chunks. Chunk i holds bits 14i+13..14i. Each chunk is widened to 15
  bits and becomes one residue.
* **Forward 16-point NTT (`ntt_fft`).** This is a radix-4 decomposition,
  16 = 4×4. It runs in the order commutator, register, twiddle and
  commutator, register, then a rearrange in the wiring.
  * **Commutator (`ntt_commutator`).** Four radix-4 butterflies
    (`ntt_butterfly`). Butterfly n reads positions n, n+4, n+8 and n+12,
    and writes its outputs q = 0..3 to position 4n+q.
  * **Butterfly.** Each butterfly needs 8 modular additions or subtractions
    and one constant multiplication by j:

        t0 = x0+x2, t1 = x0−x2, t2 = x1+x3, t3 = j·(x1−x3)
        y0 = t0+t2, y1 = t1−t3, y2 = t0−t2, y3 = t1+t3

  * **Twiddle (`ntt_twiddle`).** Multiplies position 4a+b by W^(a·b). Nine
    of the sixteen factors are not 1.
  * **Rearrange.** Undoes the base-4 digit reversal: output k = internal
    position 4·(k mod 4) + ⌊k/4⌋. The result is X[k] = Σ x[n]·W^(nk) in
    natural order.
* **Point-wise multiplier (`ntt_pointwise`).** Computes C_k = A_k·B_k mod Q
  for all 16 points and registers the result.
* **Inverse NTT (`ntt_ifft`).** Runs the same two commutator stages with j
  replaced by W^4. In between is a twiddle stage that multiplies by
  W^(−a·b)·16⁻¹, which folds in the 1/N scaling. It has no rearrange, so its
  output is left digit-reversed.
* **Finalize.** Applies the digit reversal. It then keeps the low 14 bits of
  each of the 16 coefficients and concatenates them into a 224-bit vector.
  Finally it reduces that vector with `gf_reducer`.

The unit is fully pipelined. It accepts one operand pair per cycle (`en`).
Each result appears on `dout` with `done` high exactly 5 cycles later.

### Arithmetic caveat

The transform chain is exact. The inverse-NTT output is the length-16
**cyclic convolution modulo Q** of the two chunk vectors, and the testbenches
check this bit for bit against a direct O(N²) model. The finalize step,
however, treats that integer convolution as if it were the carry-less
GF(2)[x] product. That is not true in general, for three reasons:

1. Products of 14-bit chunks are integer products, so they carry, and they
   can exceed 14 bits.
2. Sums of up to 16 such products exceed both 14 bits and Q.
3. With 16 chunks of 14 bits, the full product needs 31 chunks, which wrap
   around in a 16-point cyclic convolution.

`dout` therefore equals a·b mod f only for special operands. Examples are
`op2 = 1`, or `op2 = x^(14k)` with op1 small enough that nothing wraps. The
end-to-end testbench checks exactly those cases.

The pipeline, its stages and its constants are built as described. A
correct GF(2) multiplier on this framework would need a different front and
back end, for example:

* one bit per coefficient, or a transform long enough to avoid wrap-around;
* a modulus larger than the largest coefficient sum;
* a final parity (mod 2) of each convolution coefficient.

None of this is added here.

## HECC field units

| Module | Method | Cycles |
|---|---|---|
| `gf_mul_serial` | MSB-first shift-and-add, reducing on every shift | 114 |
| `gf_sqr_serial` | squaring spreads bit i to 2i; bits 0..56 need no reduction, bits 57..112 add x^(2i) mod f serially | 58 |
| `gf_inv` | binary extended Euclid: u ← u + v·x^j, b ← b + c·x^j, swapping when deg u < deg v | about 116 on average |

* **Squarer.** Keeps `g = x^(2i) mod f` in a register, advancing it by x²
  each cycle.
* **Inverter.** Finds degrees with two priority encoders and does one
  iteration per cycle. It raises `err` (with `inv = 0`) if a = 0.

All three use a `start` / `busy` / one-cycle `done` interface. The result is
held until the next start.

## Polynomial-ring units

Genus-2 divisor arithmetic (Cantor's algorithm) works with polynomials in u
whose coefficients are field elements. Coefficient arrays are unpacked
arrays of 113-bit vectors, with index 0 holding the constant term.

| Module | Default size | Method | Cycles |
|---|---|---|---|
| `ring_add` | 6 coefficients | coefficient-wise XOR | 1 |
| `ring_mul` | 3 × 6 → 8 | Horner: c ← c·u + a_j·b, with 6 serial field multipliers in parallel | 345 |
| `ring_sqr` | 3 → 5 | c_2i = a_i², odd coefficients are 0 (characteristic 2); 3 squarers in parallel | 58 |
| `ring_div` | 6 by 4 → q (6), r (3) | long division: invert lead(b) once, then per quotient coefficient one multiplication for q_j and 4 parallel ones for q_j·b | see below |
| `ring_egcd` | 3, 3 → d, s, t (3 each) | extended Euclid: d = gcd(g, h) = s·g + t·h, using one `ring_div` and two `ring_mul` | see below |
| `ring_gcd3` | 3, 3, 3 → d, s1, s2, s3 | d = gcd(a1, a2, b) = s1·a1 + s2·a2 + s3·b, from two runs of one `ring_egcd` and two `ring_mul` | about 2700-4200 |

* **`ring_mul`.** Starts the next field multiplication in the same cycle in
  which it accumulates the previous one. Its latency is therefore 3·114 + 3.
* **`ring_div`.** Takes degrees from the highest non-zero coefficient.
  * If deg a < deg b, it returns q = 0 and r = a within 2 cycles.
  * If b = 0, it sets `err`.
  * Otherwise it takes one inversion (about 116 cycles) plus two field
    multiplications (about 230 cycles) per quotient coefficient. A degree-5
    by degree-2 division takes about 1040 cycles.
* **`ring_egcd`.** Answers the trivial inputs directly, 2 cycles after
  start. The rules are g = 0 → (h, 0, 1), h = 0 → (g, 1, 0), g = 1 → (1, 1, 0)
  and h = 1 → (1, 0, 1). Otherwise it loops while h ≠ 0:
  * it divides, (q, r) = g div h;
  * it forms s = q·s1 + s2 and t = q·t1 + t2, with the two products
    computed in parallel;
  * it shifts the pairs: g ← h, h ← r, s2 ← s1, s1 ← s, t2 ← t1, t1 ← t.

  It starts from s1 = 0, s2 = 1, t1 = 1, t2 = 0 and returns (g, s2, t2).
  The gcd is not made monic. For random degree-2 inputs it takes about 2550
  cycles.
* **`ring_gcd3`.** This is the first step of genus-2 divisor addition
  (Cantor's algorithm). Its inputs are a1 and a2, the first polynomials of
  the two divisors, and b = b1 + b2 + h. It works in three steps:
  1. It computes (d1, e1, e2) = EGCD(a1, a2).
  2. It computes (d, c1, c2) = EGCD(d1, b).
  3. It sets s1 = c1·e1, s2 = c1·e2 and s3 = c2.

  For genus-2 operands (deg a ≤ 2, deg b ≤ 1) every cofactor fits in 3
  coefficients. It is a generic implementation of this step, not a
  hand-specialized datapath.
* **Idle outputs.** `ring_sqr`'s odd output coefficients are constant zero
  by construction. Synthesis therefore reports them as idle outputs.

## Top level (`ff_arith_top`)

The top level has no parameters. Its ports are grouped by unit:

* **Multipliers.** All four take their operands from one port, `mul_start`,
  `mul_a`, `mul_b`.
  * Outputs: `oka_busy`/`oka_done`/`oka_p`, `pka_busy`/`pka_done`/`pka_p`,
    `pks_done`/`pks_p`, `fft_done`/`fft_p`.
  * A `start` pulse reaches all four. PaddedKA\* and the NTT pipeline accept
    one on every cycle. OrderedKA and PaddedKA ignore it while busy.
* **Field units.** `fmul_start`, `fsqr_start` and `finv_start` share the
  operands `fld_a` and `fld_b`. Each unit has its own `*_busy`, `*_done` and
  result output, plus `finv_err`.
* **Ring units.** `radd_start`, `rmul_start`, `rsqr_start` and `rdiv_start`
  share `ring_a[6]` and `ring_b[6]`.
  * Multiplication and squaring use `ring_a[0..2]`.
  * Division divides `ring_a` by `ring_b[0..3]`.
  * The extended GCD (`regcd_start`) works on g = `ring_a[0..2]` and
    h = `ring_b[0..2]`.
  * The three-input gcd (`gcd3_start`) takes a1 = `ring_a[0..2]`,
    a2 = `ring_b[0..2]` and b = `ring_c[3]`. It outputs `gcd3_busy`,
    `gcd3_done`, `gcd3_d`, `gcd3_s1`, `gcd3_s2` and `gcd3_s3`.
  * Outputs: `radd_c[6]`, `rmul_c[8]`, `rsqr_c[5]`, `rdiv_q[6]`,
    `rdiv_r[3]`, `rdiv_err`, plus `regcd_busy`, `regcd_done`,
    `regcd_d[3]`, `regcd_s[3]` and `regcd_t[3]`.

The reset `rst_n` is active-low and asynchronous. Every register has a reset
value.

## Departures from the reference timing

| Item | This RTL | Reference figure | Why |
|---|---|---|---|
| Karatsuba latencies | 6 / 5 / 1 | 6 / 5 / 1 | matches |
| NTT multiplier latency | 5, 1 pair per cycle | 5 | matches; per-stage split (2+1+2) chosen here |
| Field multiply / square | 114 / 58 | "1 or 114" / "1 or 58" | the 1-cycle case is not specified; not built |
| Field inversion | about 116 average | 395 average | one Euclid iteration per cycle; the reference per-iteration cost is unknown |
| Ring multiply | 345 | "2 or 347" | schedule differs by 2 cycles; the loop always covers all 3 coefficients of a, whatever its degree; 2-cycle case not built |
| Ring squaring | 58 | "2 or 58" | matches; 2-cycle case not built |
| Ring division | 2 (deg a < deg b) or about 1000 | "2 or 253" | the reference schedule is not known; this one is straightforward long division with serial multipliers |
| Extended GCD | 2 (trivial inputs) or about 2550 for degree 2 | 2540 average | close match |

Other choices made here where no detail was available:

* The reduction polynomial.
* The ring operand sizes: 3×6 for multiplication, 6 by 4 for division, and
  3 coefficients for the GCD units.
* The handshake: start / busy / done, with starts ignored while busy.
* Reset.

## What is not included

The following are not part of this RTL:

* the ring normalization unit. Its function is not specified, and the gcd
  returned by `ring_egcd` is left non-monic;
* a hand-specialized datapath for the three-input GCD. `ring_gcd3`
  computes the same outputs generically.
* the point-addition processor that sequences all ring units through
  Cantor's algorithm;
* scalar multiplication.

The ring units' ports are brought out on the top level so that such a
controller can be attached.

## Verification

Every module has a self-checking testbench in `tb/`:

* It compares the outputs against independent reference models in
  `tb/gf_ref_pkg.sv`, `tb/ntt_ref_pkg.sv` and `tb/poly_ref_pkg.sv`. GF(2^113) reference
  multiplication is a carry-less multiply and reduce. Inversion is
  exponentiation a^(2^113−2). The NTT model is a direct DFT and a direct
  cyclic convolution. The twiddle tables are checked against independently
  listed constants.
* Operands are random (`$urandom`) plus edge cases: zero, one, all-ones, and
  x^112.
* It checks the cycle count from start to done wherever a latency is
  specified.
* It has a watchdog.
* It ends with the line `TB_RESULT checks=N failures=M`.

`tb_ff_arith_top` runs the whole top level at its defaults. It counts how
often each mechanism occurred and fails if any never did. The mechanisms
are:

* Karatsuba products;
* overlapping operations in the NTT pipeline;
* starts ignored while busy;
* exact NTT cases;
* field operations, including inversion of zero;
* ring operations, including the division early exit;
* extended GCDs: coprime inputs, inputs with a common linear factor, and a
  trivial input;
* a three-input gcd.

To run one testbench with Verilator (5.x), from the project root:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb --top-module tb_ring_mul \
    rtl/gf_pkg.sv rtl/ntt_pkg.sv tb/gf_ref_pkg.sv tb/ntt_ref_pkg.sv tb/poly_ref_pkg.sv \
    tb/tb_ring_mul.sv -y rtl -y tb -Mdir obj_tb_ring_mul -o sim
./obj_tb_ring_mul/sim
```

The top-level test takes about a minute to build and seconds to run.

## File map

* `rtl/gf_pkg.sv`, `rtl/ntt_pkg.sv`: field and NTT constants and helper
  functions.
* `rtl/classic_mul.sv`, `rtl/ka_rec.sv`, `rtl/ka60_seq.sv`,
  `rtl/gf_reducer.sv`: Karatsuba building blocks.
* `rtl/ordered_ka_mul.sv`, `rtl/padded_ka_mul.sv`,
  `rtl/padded_ka_star_mul.sv`: the three Karatsuba multipliers.
* `rtl/ntt_butterfly.sv`, `rtl/ntt_commutator.sv`, `rtl/ntt_twiddle.sv`,
  `rtl/ntt_fft.sv`, `rtl/ntt_ifft.sv`, `rtl/ntt_pointwise.sv`,
  `rtl/fft_mul.sv`: the NTT multiplier.
* `rtl/gf_mul_serial.sv`, `rtl/gf_sqr_serial.sv`, `rtl/gf_inv.sv`: HECC
  field units.
* `rtl/ring_add.sv`, `rtl/ring_mul.sv`, `rtl/ring_sqr.sv`,
  `rtl/ring_div.sv`, `rtl/ring_egcd.sv`, `rtl/ring_gcd3.sv`: HECC ring
  units.
* `rtl/ff_arith_top.sv`: the top level.
* `tb/gf_ref_pkg.sv`, `tb/ntt_ref_pkg.sv`, `tb/poly_ref_pkg.sv`: reference
  models.
* `tb/tb_<module>.sv`: the testbenches. `tb_ntt_fft` covers both transform
  directions, and `tb_ordered_ka_mul` also covers `ka60_seq`.
