# High-radix Montgomery modular exponentiation in borrow-save arithmetic

This design computes `x^e mod m` for moduli of several hundred bits, as RSA
encryption and decryption need. It never propagates a carry across the full
word. Every intermediate value is held in a redundant signed-digit form, and
the multiplier consumes 6 bits of its second operand per algorithm cycle.
Each modular reduction is Montgomery's: it divides by 2^6 rather than by `m`.
The quotient digit that makes the division exact therefore depends only on
the 6 lowest digits of the accumulator, and it can be found in a fraction of
a clock.

The method follows P. Kornerup, "High-Radix Modular Multiplication for
Cryptosystems" (the Montgomery variant in its radix-2^k form, organised as
the "S-Scheme" with three sequential multiply-adds per cycle). The RTL,
including every detail that method leaves open, is this design's own. The
places where it departs from the method are listed near the end.

At the default parameters (radix 2^6, 94 digits), operands have 564 digits.
The design accepts moduli below 2^562, that is up to 561 bits. A 561-bit
exponentiation with a full-length exponent takes 1124 modular
multiplications and 324,277 clocks.

## Numbers in borrow-save form

Every long operand is a pair of bit vectors `(P, N)` whose value is `P - N`.
Each bit position is then a signed digit in {-1, 0, 1}. Addition of two such
pairs is carry-free (`bs_add`). Two rows of full adders with some inputs
inverted turn four vectors into two. Each output digit depends only on
inputs at the same and the next lower positions.

Two consequences shape the RTL:

* **Results stay redundant.** The output `S` of one multiplication
  (`-m < S < m`, possibly negative) is the input of the next, directly as
  multiplicand `A = A1 - A2` and as multiplier `B`. Only the final result is
  converted to binary.
* **Width must be managed.** A carry-free sum has two more digits than its
  operands. The top digits can be non-zero even when the value is small
  (`2^W - 2^(W-1) = 2^(W-1)`). `bs_norm` therefore adds up only the top few
  digits with a short subtraction and writes them back as 4 plain binary
  digits. The value is unchanged as long as `|value| < 2^(W-1)`, and every
  user of the adder is sized to guarantee that. This short subtraction is the
  only carry chain in the datapath.

Multiplier and quotient digits of radix 2^6 are carried as three radix-4
digits `a_j` in {-2..2} (`mm_pkg::r4_t`, sign and magnitude). A partial
product is then a selection of 0, x or 2x, a shift, and a choice between the
positive and the negative vector. A radix-2^6 digit lies in [-42, 42].

## One Montgomery multiplication (`mont_mul`)

With `r = 2^(K*N)` and `m' = (-m)^-1 mod 2^K`, the loop is, for i = 0..N:

```
q_i = ((S mod 2^K) * m')  mods 2^K        -2^(K-1) <= q_i < 2^(K-1)
S   = (S + q_i*m) / 2^K  +  b_i*A
```

Here `b_i` are the radix-2^K digits of B. The choice of `q_i` makes
`S + q_i*m` a multiple of 2^K, so the division by 2^K discards K digits
whose value is exactly zero (an assertion checks this). After N+1 cycles,
`S == A*B*r^-1 (mod m)` and `-m < S < m`, given `-m < A, B < m` and
`m < 2^(K*N-2)`.

**Quotient digit (`qdigit_gen`).** A K-bit subtraction turns the K lowest
digits of S into `S mod 2^K`. A K-by-K multiplication by `m'` keeps the low
K bits, and reading those as two's complement gives the symmetric residue.
Booth recoding turns the result into radix-4 digits.

**Multiplier digits (`r4_recode`).** Each pair of signed binary digits of B
is a radix-4 digit in {-3..3}. Each is rewritten as `4*t + w` and summed with
the transfer `t` from below. The transfer out of position j is chosen from
digit j and its lower neighbour only. The result is {-2..2} everywhere with a
two-position carry. The digits are loaded into a shift register that
advances three radix-4 digits per cycle.

**Rectangular multiplier (`rect_mult`).** It forms one radix-2^6 digit
times a 564-bit binary operand: three selected, shifted partial products
summed by two `bs_add`s. This is the only multiplier in the design.

### The three-clock schedule

The three products of a cycle (`b_i*A1`, `-b_i*A2`, `q_i*m`) pass one after
the other through the rectangular multiplier into the register U. In
parallel, the accumulator adder adds the previous U into S:

| clock   | multiplier writes U          | accumulator                         | quotient            |
|---------|------------------------------|-------------------------------------|---------------------|
| phase 0 | `-2^K * b_i * A2`            | `S := S + 2^K*b_i*A1`               | `q_i` from S, latched |
| phase 1 | `q_i * m`                    | `S := S - 2^K*b_i*A2`               |                     |
| phase 2 | `2^K * b_(i+1) * A1`         | `S := (S + q_i*m) / 2^K`            |                     |

The division must come after `q_i*m` is added, so the `b_i*A` products are
formed pre-multiplied by 2^K. They are added before the division and come
out right after it. Adding a multiple of 2^K leaves `S mod 2^K` unchanged,
so `q_i` can be picked in phase 0, overlapped with a product, as in the
S-Scheme. One extra clock at the start forms the first U.

Timing: `start` is sampled while idle, and `done` pulses **3N+5 clocks**
later (3(N+1) for the algorithm cycles, one load clock, one first-product
clock). The accumulator is `(N+2)*K+4` digits wide, because a single product
`2^K*b_i*A1` can approach 2^(K*N+2K) when A1 alone is large. The result is
folded back to K*N digits at the output.

## Exponentiation (`modexp`, the top)

Operands are kept as Montgomery residues `[a] = a*r mod m`:

```
z := MM(x, r^2 mod m)                 [x]
y := MM(r^2 mod m, 1)                 [1]
for i = 0 .. ebits-1:
    y := MM(y, z)   written back only if e_i = 1
    z := MM(z, z)   (skipped after the last bit)
y := MM(y, 1)                         ordinary residue, -m < y < m
```

`y*z` is computed for every exponent bit and merely not written back when
`e_i = 0`. The running time therefore depends on `ebits`, not on the bits of
`e`. An operation costs `2*ebits + 2` multiplications of `3N+6` clocks each
(including one issue clock), plus the serial output. Together that is
`(2*ebits+2)*(3N+6) + K*N + 1` clocks from `start` to the last output bit.

**Output (`serial_conv`).** y is still in borrow-save form and may be
negative. Two serial adders handle it, least significant bit first: one
forms the bits of `y = P - N`, and the other adds m to that stream. Both
streams leave the design, each K*N+1 bits long with the sign position last.
Exactly one of `y` and `y + m` lies in `[0, m)`: if the last bit of the `y`
stream is 1, the receiver takes `y + m`. While the result leaves, the base for
the next operation can come in on `ser_in`, one bit per output bit, least
significant first, K*N bits (nothing is sampled with the final sign bit). A
later `start` with `x_sel = 1` uses this serially loaded base instead of the
parallel input `x`.

## Interface of `modexp`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | pulse while `busy` = 0; all operands sampled then |
| `x` | in | K*N | base, `0 <= x < m` |
| `e` | in | EW | exponent (EW = K*N by default) |
| `ebits` | in | clog2(EW+1) | exponent bits to scan, at least 1 |
| `m` | in | K*N | odd modulus, `2 < m < 2^(K*N-2)` |
| `mprime` | in | K | `(-m)^-1 mod 2^K` |
| `r2` | in | K*N | `2^(2*K*N) mod m` |
| `x_sel` | in | 1 | at `start`: 1 takes the base from the serial input register, 0 from `x` |
| `ser_in` | in | 1 | next base, LSB first, sampled while `ser_valid` and not `ser_last` |
| `busy` | out | 1 | operation in progress |
| `mm_count` | out | 16 | multiplications issued so far in this operation |
| `ser_valid`, `ser_s`, `ser_sm`, `ser_last` | out | 1 | serial result: bits of y and of y + m, LSB first; `ser_last` marks the sign bit |

`mprime` and `r2` depend only on the modulus and are computed by the host. A
search over 2^K values or a Newton iteration gives `mprime`.

## Parameters and sizes

| parameter | default | meaning |
|-----------|---------|---------|
| `K` | 6 | radix 2^K of the multiplier and quotient digits; must be even |
| `N` | 94 | digits of radix 2^K per operand; moduli up to K*N-2 bits |
| `EW` | K*N | exponent register width |

K = 6 is the radix the method uses for its S-Scheme comparison. N = 94 gives
564-digit operands, enough for 561-bit moduli. A 1024-bit modulus needs
N = 171. After synthesis the default build is about 16k word-level cells and
10k flip-flops.

## Files

| file | content |
|------|---------|
| `rtl/mm_pkg.sv` | radix-4 digit type and helpers |
| `rtl/bs_add.sv`, `rtl/bs_norm.sv` | borrow-save adder; top-digit folding |
| `rtl/r4_recode.sv` | borrow-save to radix-4 {-2..2} recoding |
| `rtl/rect_mult.sv` | digit-by-word rectangular multiplier |
| `rtl/qdigit_gen.sv` | Montgomery quotient digit |
| `rtl/mont_mul.sv` | S-Scheme Montgomery multiplier |
| `rtl/serial_conv.sv` | two serial adders for the final conversion |
| `rtl/modexp.sv` | exponentiation controller, top |
| `tb/tb_*.sv` | self-checking testbenches, one per block |
| `tb/mont_mul_check.sv` | reusable random test of one `mont_mul` instance |
| `tb/tb_modexp_full.sv` | the top at default size, two complete exponentiations |

## Simulation

Every testbench prints one line `TB_RESULT checks=<n> failures=<n>`.

```
verilator --binary --timing --assert -y rtl --top-module tb_modexp \
    rtl/mm_pkg.sv tb/tb_modexp.sv
./obj_dir/Vtb_modexp
```

Replace `tb_modexp` by any other testbench name. The checks are:

* `tb_bs_add`, `tb_r4_recode`, `tb_rect_mult`, `tb_qdigit_gen`,
  `tb_serial_conv`: random operands compared against integer arithmetic in
  the testbench, including top-heavy digit patterns and digit ranges.
* `tb_mont_mul`: 400 random and extreme operands of both signs at K=6,
  N=10, plus 200 each at K=4, N=12 and at K=8, N=6 (helper
  `tb/mont_mul_check.sv`). It checks `S*r == A*B (mod m)`, `-m < S < m` and
  the 3N+5 latency.
* `tb_modexp` (K=6, N=6): 60 random exponentiations against square-and-
  multiply in the testbench. It checks the multiplication count and the
  constant run time, and it requires inhibited and written products,
  negative and non-negative results, negative quotient and multiplier
  digits, and serially loaded bases all to occur. For every second run the
  base arrives on `ser_in` during the previous run's output, and the
  parallel `x` carries a wrong value.
* `tb_modexp_full` (defaults): a random 561-bit odd modulus with e = 65537
  and with a random 561-bit exponent, then a 500-bit modulus with e = 65537.
  It takes a few seconds once built.

## Choices and departures

* The division by 2^K happens on the third accumulation of a cycle, and
  `b_i*A` is pre-scaled by 2^K. A shift on the first accumulation only works
  for the MSB-first (non-Montgomery) form of the loop.
* The quotient digit comes from a small multiplier, not from a 2^K-entry
  table indexed by the low digits of S. Both give the same values, but a
  table would need a per-modulus fill.
* The residue `[1]` is computed on chip (one multiplication), and the last
  squaring is skipped. The count `2*ebits + 2` equals `2*floor(log2 e) + 4`
  when `ebits` is the exponent's length.
* `y*z` and `z*z` run one after the other. They are not overlapped, even
  though they share the factor z.
* Only the base can be loaded serially. The exponent, the modulus and the
  two modulus constants are loaded in parallel.
* The accumulator is `(N+2)K+4` digits wide, not `(N+1)K`, because the
  multiplicand is split into its two vectors. The top-digit folding and the
  exact radix-4 recoding rule are also this design's own.
* Not included: the MSB-first interleaved variant with quotient estimation
  from the leading digits (the method's alternative to Montgomery), and the
  "P-Scheme", which adds all three products in one larger adder tree per
  clock.
