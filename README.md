# Radix-32 modulo exponentiation, M^E mod N, in carry-save arithmetic

This design computes the RSA-style exponential `M^E mod N` for long operands
(512 bits by default). It makes two choices that set it apart from a
textbook implementation:

* **Two multiplications per exponent bit, in parallel.** The exponent is
  read from its least significant bit. Each step needs `X*Y` (only kept when
  the bit is 1) and `Y*Y`. Neither depends on the other, so both are computed
  at once on one pipelined multiplier. An n-bit exponent then costs n
  multiplication times, whatever its bits are.
* **Radix-32 modulo multiplication without carry propagation.** The
  multiplier is scanned 5 bits at a time, most significant digit first. Each
  step subtracts an estimated multiple of the modulus, as in SRT division.
  Every long operand (the accumulator, the multiplicand and the multiplier)
  is kept as two words in carry-save form and is never added across its full
  length. The carry chains that remain are short: 12 bits in the quotient
  estimate and 5-6 bits in the digit logic.

For n = 512 one exponentiation takes 325,679 clock cycles. That is 3.26 ms at
a 10 ns clock, about 157 kbit/s.

## The modulo multiplication

With k = 5 (radix 2^k = 32), r = k and n' = ceil((n+1)/k) digits, the
product `A*B mod N` is computed by

    S := 0
    for i = n'-1 downto -2:                    (a_-1 = a_-2 = 0)
        q := Estimate(S div 2^r N)             q in 0..42
        S := 2^k S + a_i B - 2^(k+r) q N
    result := S div 2^(2k)                     lies in [0, 2N)

The estimate always leaves `0 <= S - q 2^r N < 2^r N + 3*2^n`. This bounds S
below `(42+1) 2^r N`, so S fits in `p + 1 = n + k + r + 2` bits (524 for
n = 512). The two trailing zero digits finish the reduction: the last
iterations only subtract multiples of N, and the result lands in [0, 2N).
It is not reduced below N. A result in [0, 2N) is a valid input to the next
multiplication, so the only full reduction happens once, at the end of the
exponentiation.

### Operand format

Every operand in [0, 2N) is a pair of words:

* `x_s`: m = n+1 bits, unsigned.
* `x_c`: m+1 bits. Its top bit has weight `-2^m`.

The value is `x_s + x_c[m-1:0] - x_c[m]*2^m`. The format is exact: the two
words add to the value itself, not to the value modulo some power of two.
So a multiple `a*B` can be built from `a*B_s` and `a*B_c` separately. A
multiplication result is read from the accumulator by dropping its 2k low
bits (they are zero by then). The result words are repacked as follows.
The value is known to be below `2^m`, so the carry into bit m of the two
words equals the XOR of their bit m. That XOR becomes the negative top bit.
No addition is needed.

### The six-cycle iteration

There is one multiple generator and one 4-2 adder. One iteration of one
product uses each of them three times, in three slots:

| slot | multiple generator    | 4-2 adder           | other                   |
|------|-----------------------|---------------------|-------------------------|
| A    | U := a*B_s            | S := V + U          |                         |
| B    | U := a*B_c            | V := 2^k S + U      | q := Estimate(S)        |
| C    | U := -2^(k+r) q N     | V := V + U          | a := NextDigit(A_s,A_c) |

Each 4-2 addition consumes the multiple made for the same product in its
previous slot. So the `-qN` of one iteration is added in slot A of the next,
together with the completion of S. The two products of an exponent step
(`X*Y` and `Y*Y`) alternate cycle by cycle: A0 A1 B0 B1 C0 C1. One iteration
of both therefore takes six cycles, and U passes through a two-stage
pipeline. S, V, q and the digit register exist once per product. The
multiplicand B (= Y) and the modulus are shared.

A multiplication of both products takes `6*(n'+2) + 4` cycles (634 for
n = 512). That is one cycle to load, one to form the first digits, the
iterations, and two cycles to finish the last slot A of both products.

### Multiples and negative digits

A digit d in [-21, 42] is recoded as `d = 16 d2 + 4 d1 + d0` with each
`d_i` in {-1, 0, 1, 2}. `d*X` is then the sum of three shifted copies of
`0`, `X`, `2X` or `-X`. A 3:2 carry-save adder reduces them to a pair. The
quotient multiple uses the same hardware with the digits negated, so its
digits are in {-2..1}.

Negative terms are made in one of two ways:

* **Multiplicand words.** A negative term is the bitwise complement, which
  is one too small. The first missing +1 goes into the free bit 0 of the
  generator's carry word. Any others are passed to the 4-2 adder, which
  has two more free carry bits.
* **The modulus.** The modulus is held both as `2^(k+r) N` and, in two's
  complement, as `-2^(k+r) N`. Both are formed once when N is loaded. The
  `-qN` multiple is therefore exact and has zero low bits. **This matters.**
  During the two trailing iterations (digit 0) nothing else is added, so the
  2k low bits of both accumulator words end at zero, and "drop the low 2k
  bits" gives the exact result. With complement-and-increment there, ones
  would fill the low bits and the result would come out wrong by a carry.

### Multiplier digits (`NextDigit`)

The multiplier is never converted to binary. Its two words sit in shift
registers. Each digit is formed from the top 5-bit slices of both words,
plus the carry out of the sum of the next slices:

    a = (Ts + Tc) mod 32 + carry(Ns + Nc)

So every digit after the first lies in [0, 32]. The first digit keeps the
whole top-slice sum and absorbs the `-2^m` bit, so it lies in [-1, 31]. The
digits add up to A exactly. A first digit of -1 makes the early partial
product negative (`-B`). The estimate then returns q = 0, and the
accumulator holds exactly `P*B` with P in {-1, 0}, until the digits make the
prefix positive. From that point the normal range argument applies.

### Quotient estimation

For each q = 1..42 one cell adds the top 12 bits (positions n..p) of `S_s`,
`S_c` and the constant `-q 2^r N`. A 3:2 adder and a 12-bit ripple adder do
the sum, and the cell reports its sign. The estimate is the largest q whose
truncated remainder is non-negative, or 0 if there is none. The truncated
remainder falls monotonically with q, so a priority pick is enough. The
dropped low parts are non-negative and below `3*2^n`, which gives the bound
above. Twelve bits is exactly enough for radix 32 with q up to 42.

The 42 cell constants depend only on N. After an `n_load` pulse they are
formed by repeated subtraction in one full-width adder, one per cycle, over
42 cycles.

### Final reduction

At the end X is in [0, 2N), as two words. A bit-serial pass, least
significant bit first, adds the two words and at the same time subtracts N
from the sum. After n+1 bits the borrow shows whether X >= N. The result is
then X - N or X, presented as a parallel n-bit word.

## Modules

| module | role |
|---|---|
| `mexp_pkg` | K = 5, R = 5, QMAX = 42, EST_BITS = 12, digit types, width functions |
| `modexp_top` | exponentiation control: X := 1, Y := M, n steps, final conversion |
| `modmul_unit` | the two-product pipelined multiplier and its six-cycle schedule |
| `mult_digit_gen` | multiplier digits from carry-save words, most significant first |
| `multiple_gen` | recoder, multiplexing network and 3:2 adder forming d*X |
| `digit_recoder` | d -> (d2, d1, d0) in {-1,0,1,2}, optionally negated |
| `adder_4_2` | two cascaded carry-save adders with two +1 injections |
| `csa` | W-bit 3:2 carry-save adder with a carry-in at bit 0 |
| `quotient_estimator` | 42 estimation cells, constant loader, q selection |
| `est_cell` | one cell: constant register, 3:2 adder, 12-bit ripple, sign |
| `result_converter` | serial conversion and final subtraction of N |

Only the operand length `NB` (n, at least 8) is a parameter. Its default is
512 throughout. K, R and QMAX are fixed in the package, because the digit
recoding (three radix-4 digits) and the 12-bit estimate are built for radix
32.

### Top-level interface and timing

`modexp_top` ports:

| port | direction | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `start` | in | 1 | pulse; `m_in`, `e_in` and `n_in` are sampled in this cycle |
| `m_in` | in | n | M, must be below N |
| `e_in` | in | n | E |
| `n_in` | in | n | N, with 2^(n-1) < N < 2^n |
| `busy` | out | 1 | high until `done` |
| `done` | out | 1 | one-cycle pulse when the result is ready |
| `result` | out | n | M^E mod N, held until the next start |

From `start` to `done` takes `(42+3) + n*(6*(n'+2)+5) + (n+2)` cycles. That
is the modulus load, n multiplication steps (each with one cycle of
handshake), and the serial conversion. For n = 512 it is 325,679 cycles.
For comparison, the iteration count of the algorithm alone is
512 * 105 * 6 = 322,560 cycles.

## Simulating

Each testbench in `tb/` checks its block against values computed
independently in the bench (wide-integer arithmetic). It ends by printing
`TB_RESULT checks=N failures=F`. The testbenches:

* `modexp_top_tb`: 44 exponentiations at n = 32. It checks results, cycle
  counts, and that each mechanism occurs: exponent bits 0 and 1, q = 0,
  q > 0, q >= 32, a negative top bit in a result word, and the final
  subtraction taken and not taken.
* `modexp_full_tb`: three 512-bit exponentiations at the default
  parameters. They cover a random case, the largest modulus with M = N-1
  and an all-ones exponent, and the smallest modulus. The run takes about
  10 s.
* One bench per block (`*_tb.sv`). Reduced widths are used where they
  speed things up.

Example with plain Verilator:

    verilator --binary --timing --assert -Irtl rtl/mexp_pkg.sv tb/modexp_full_tb.sv \
        --top-module modexp_full_tb -Mdir obj -o sim && obj/sim

Verilator finds the other modules in `rtl/` through `-Irtl`. The package
must be listed first.

## How far it follows the published algorithm, and where it departs

These parts follow the published design:

* the exponentiation loop, and running two multiplications together on one
  pipelined unit;
* the multiplication loop, with k = r = 5 and q in 0..42;
* all operands kept in carry-save form;
* the slot schedule of one iteration;
* a single multiple generator (recoder, multiplexing network, carry-save
  adder) and a single 4-2 adder made of two carry-save adders;
* the parallel exhaustive-search quotient estimate on 12 bits, with cells
  of register, carry-save adder and carry-ripple adder;
* the final reduction during a serial pass.

These are this design's own choices, because the published description
leaves them open:

* the exact operand format, with the negative top bit, and the XOR
  repacking of results;
* the multiplier digit rule. The published two-level radix-4 recoding
  could not be reconstructed exactly. This rule gives the same final digit
  set {-1, 0, 1, 2}.
* the +1 bookkeeping for complemented terms, and holding `-2^(k+r)N`
  exactly;
* the cycle-by-cycle interleaving of the two products, and the two-stage U
  pipeline;
* loading the estimation constants by repeated subtraction;
* choosing the *largest* q with a non-negative truncated remainder. This is
  what the range argument requires.
* leaving out the q = 0 estimation cell, which cannot change the choice;
* the parallel result port after the serial pass, and all handshakes.

Not modelled:

* the clockless (self-timed) alternative;
* the transistor-level timing of the estimation cell. The 20 ns cell delay,
  and from it the 10 ns clock, is only used above to turn cycle counts into
  time.

All blocks are verified in simulation. This includes three full 512-bit
exponentiations against an independent reference, with the cycle count
matching the formula above. Timing closure and area have not been examined.
The register count is about 17,700 flip-flops for n = 512, most of them the
per-product 524-bit S and V pairs and the U pipeline.
