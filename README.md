# Reversible-gate residue number system arithmetic

A residue number system (RNS) represents an integer by its remainders modulo a set of
pairwise co-prime moduli. Addition and multiplication then split into independent,
narrow channels with no carries between them. This RTL builds a complete RNS datapath for the
three-moduli set

    { 2^n - 1,  2^(n+k),  2^n + 1 },   dynamic range M = (2^n-1) * 2^(n+k) * (2^n+1)  (3n+k bits)

in which **every circuit is a network of reversible logic gates**. The gates are Feynman,
Peres, HNG, Fredkin and Toffoli, plus the RAM copy gate. Every gate has as many outputs as
inputs, and the outputs determine the inputs. Constants feed the spare inputs, and the
"garbage" outputs are left unconnected.
The SystemVerilog gives the logic function of those networks. It can be simulated and
synthesised like any combinational logic, and it maps one-to-one onto the reversible gate
netlist.

The top level, `rns_dot3`, is a three-term dot-product unit,

    y = | a0*b0 + a1*b1 + a2*b2 |_M,

built from the three RNS stages:

1. **Forward conversion.** Six forward converters turn the binary operands into residues.
2. **Channel arithmetic.** Each channel has three modular multipliers, one modular
   carry-save adder and one modular adder.
3. **Reverse conversion.** One reverse converter turns the three residue sums back into
   binary.

With the defaults `N = 4`, `K = 0`, the moduli are 15, 16 and 17. Operands and result are
12 bits, and M = 4080.

## The reversible gate set

| module    | gate     | function                                                    | used as |
|-----------|----------|-------------------------------------------------------------|---------|
| `rev_fg`  | Feynman  | p=a, q=a^b                                                  | NOT (b=1), copy (b=0) |
| `rev_pg`  | Peres    | p=a, q=a^b, r=ab^c                                          | half adder, AND; p passes a on |
| `rev_hng` | HNG      | p=a, q=b, r=a^b^c, s=(a^b)c^ab^d                            | full adder (d=0) |
| `rev_frg` | Fredkin  | p=a, q=~a·b ^ a·c, r=~a·c ^ a·b                             | OR (c=1 gives q=a\|b) |
| `rev_tg`  | Toffoli  | p=a, q=b, r=ab^c                                            | AND in the all-ones tree |
| `rev_ram` | RAM      | N lines of Feynman gates                                    | fan-out of one bit to N copies |

A reversible circuit allows a fan-out of one, so an operand bit that feeds many AND gates
is either copied by a RAM gate (`y` bits in the multipliers) or handed from gate to gate
through a Peres gate's pass-through output (`x` bits). `rev_ram` has two forms. `TREE=0` is
the classic chain of Feynman gates, with depth N-1. `TREE=1`, the default and the form used
everywhere, is a low-depth copy tree in which each level doubles the number of copies.

## The three channels

All numbers below are residues. `rev_csa` is the basic carry-save adder. It has one HNG per
bit and turns three words into a sum word and a carry word. What happens to the carry out of
the top bit depends on the channel.

### Modulo 2^(n+k): plain binary, carries dropped

The carry out of the top bit is discarded. The channel uses these blocks:

- `rev_rca_mod2n`: an HNG ripple-carry adder.
- `rev_csa_lc`: a carry-save adder whose top bit is built from two Feynman gates instead of
  an HNG. The top carry is thrown away, so that bit needs only a XOR. This saves one
  constant input.
- `rev_mul_mod2n`: a multiplier that forms only the partial products x_i·y_j with
  i+j < n+k. It sums them as a triangular array of Peres half adders and HNG full adders.

### Modulo 2^n − 1: end-around carry

Because 2^n ≡ 1, the top carry re-enters at bit 0 (`rev_csa` with `EAC=1`).
`rev_add_mod2nm1` is the two-operand adder, built in three gate levels:

1. A ripple-carry adder (a Peres gate, then HNGs) forms z = a + b.
2. A Toffoli tree detects z = 2^n − 1 (all ones). A Fredkin gate ORs that with the carry out.
3. A chain of Peres half adders adds the resulting bit back in.

The result therefore has a single code for zero. The variant with `SINGLE_ZERO=0` skips
level 2. Its output may then be 2^n − 1 as a second code for zero. The forward converter
uses this cheaper form, and every block downstream accepts both codes.

`rev_mul_mod2nm1` uses the fact that multiplying by 2^i modulo 2^n − 1 is a rotation.
Partial product i is therefore x_i AND (y rotated left by i). That gives n rows of n Peres
gates. The rows pass through n − 2 levels of end-around carry-save adders and then the
single-zero adder.

### Modulo 2^n + 1: complemented end-around carry and a correction constant

This channel is the hardest to follow, and the part most worth reading in the source.
Because 2^n ≡ −1, a carry c out of the top bit is worth −c. Now −c = (1 − c) − 1, so
`rev_csa_ceac` inverts the carry with a Feynman gate (constant input 1) and feeds it into
bit 0. Every such level is then off by exactly −1:

    a + b + c ≡ s + cv − 1   (mod 2^n+1)

A negative term v in a row is handled the same way. The row carries the n-bit complement ~v,
and ~v ≡ −v − 2. Each row of a sum is therefore off by a constant that is known at
elaboration time.

`rev_sum_mod2np1` collects these constants. It takes rows whose sum is known to be the
wanted value plus a constant `BIAS`. It appends one constant row, chosen in `rev_rns_pkg`,
and reduces all rows with a chain of CEAC carry-save adders. The result is exact:

    y = | Σ rows − BIAS |_(2^n+1)

The final stage, `rev_add_mod2np1`, is the diminished-one adder: an HNG ripple adder with a
carry input, a Feynman NOT on its carry out, and a Peres incrementer. Its output,
including the incrementer's carry, is

    {yz, y} = | a + b + cin + 1 |_(2^n+1)

For diminished-one operands (a = x − 1, b = y − 1), `y` is the diminished-one code of
x + y, and `yz` flags a zero sum. The rest of the design keeps modulo 2^n + 1 residues in
ordinary form, as n+1 bits covering 0 … 2^n. It reads {yz, y} directly as that form.

`rev_mul_mod2np1` takes (n+1)-bit operands. Split each operand into its low n bits and its
top bit: x = xl + xh·2^n, with xh = 1 only when x = 2^n. Then

    x·y ≡ xl·yl − xh·yl − yh·xl + xh·yh

The multiplier builds this from n + 2 rows:

- **Rows 0 … n−1 (the xl·yl product).** Row i holds x_i·y_j at bit i+j. Bits whose weight
  reaches 2^n wrap round to bit i+j−n and are inverted.
- **Rows n and n+1.** These hold ~(xh·yl) and ~(yh·xl).
- **The xh·yh term.** A Toffoli gate XORs it into bit 0 of row 0. Row 0 is all zero
  whenever both top bits are set.

The rows add up to x·y + 2^n − n − 5. `rev_sum_mod2np1` removes that constant using n + 1
CEAC levels.

### Forward converter (`rev_fwd_conv`)

The (3n+k)-bit input is cut into n-bit digits A, B and C, plus a k-bit top digit D. The
three residues are:

- x2 is simply the low n+k bits.
- x1 = |A + B + C + D|, computed with two end-around carry-save adders and the double-zero
  adder.
- x3 = |A − B + C − D|. B and D are inverted by Feynman gates. The four rows go through
  `rev_sum_mod2np1`: three CEAC levels (one of them adds the constant row, which is zero
  here) and the final adder.

### Reverse converter (`rev_rev_conv`)

X = x2 + 2^(n+k)·Y, so only Y, the top 2n bits, has to be computed. Modulo 2^(2n) − 1,
multiplying by a power of two is a rotation and negation is inversion. The Chinese remainder
theorem for the pair 2^n − 1, 2^n + 1 then turns Y into the modulo 2^(2n) − 1 sum of four
words. Each word is a rewired residue, in places inverted:

    U1 = rotl({x1, x1}, e1)              x1 · (2^n+1)
    U2 = rotl({x3l | x3h, ~x3l}, e1)     x3 · (2^n−1), apart from U4
    U3 = rotl(~{0, x2}, e3)              −x2
    U4 = rotl({1…1, 0…0}, e1)            constant
    e1 = (n−1) − (n+k),  e3 = −(n+k)   (mod 2n)

Here x3l = x3[n−1:0], and x3h is x3[n] repeated n times. Two 2n-bit end-around carry-save
adders and a 2n-bit single-zero modulo 2^(2n) − 1 adder produce Y, and the output is
X = {Y, x2}.

## Top level: `rns_dot3`

The first two channels sum their three products with one carry-save adder and one adder:

- modulo 2^n − 1: `rev_csa` with `EAC=1`, then `rev_add_mod2nm1`;
- modulo 2^(n+k): `rev_csa_lc`, then `rev_rca_mod2n`.

The modulo 2^n + 1 channel first counts the top bits of its three (n+1)-bit products with
one HNG gate. It then sums the rows pl0, pl1, pl2 and ~count in `rev_sum_mod2np1`, with
BIAS = −2.

The result is exact when the dot product is below M. Operands of q bits with
2q + 2 ≤ 3n + k are safe. Otherwise `y` is the dot product modulo M. The ports `r1`, `r2` and
`r3` bring out the three residue sums.

The unit is purely combinational, with no clock or registers. A result is valid one
propagation delay after the operands change. Longer dot products, or chains of
multiplications, are computed in several passes. For example, the previous result times 1
plus two new terms gives one more pass. The workload testbenches do this.

| parameter | default | meaning |
|-----------|---------|---------|
| `N`       | 4       | n of the moduli set (the published circuit drawings use n = 4); `rns_dot3` needs N ≥ 3 |
| `K`       | 0       | k of the moduli set, 0 ≤ K ≤ N (the published case studies use k = 0) |

## Files

All files are in `rtl/`. Each file holds one module or package.

- **Package:** `rev_rns_pkg` holds the default sizes and the elaboration-time correction
  constant.
- **Gates:** `rev_fg`, `rev_pg`, `rev_hng`, `rev_frg`, `rev_tg`, `rev_ram`.
- **Adders:** `rev_csa`, `rev_csa_ceac`, `rev_csa_lc`, `rev_rca_mod2n`, `rev_add_mod2nm1`,
  `rev_add_mod2np1`, `rev_sum_mod2np1`.
- **Multipliers:** `rev_mul_mod2nm1`, `rev_mul_mod2n`, `rev_mul_mod2np1`.
- **Converters:** `rev_fwd_conv`, `rev_rev_conv`.
- **Top:** `rns_dot3`.

## Simulation

Each block has a self-checking testbench `tb/tb_<module>.sv`. It compares the block with
arithmetic done by the `%` operator, prints `TB_RESULT checks=… failures=…`, and contains a
watchdog. For example:

    verilator --binary --timing -Irtl rtl/rev_rns_pkg.sv tb/tb_rns_dot3.sv --top-module tb_rns_dot3
    ./obj_dir/Vtb_rns_dot3

`tb_rns_dot3` runs the top at its default size. It checks 8,000 random dot products, exact
and wrapped modulo M, plus directed cases. It also counts how often each mechanism occurred:
the second zero code, the residue 2^n, end-around carry, the all-ones correction, several
2^n products in one sum, and wrap-around modulo M.

The testbenches for the converters and multipliers are exhaustive at n = 4 (the forward and
reverse converters over their whole input range). They also cover other n and k, and the
rest are exhaustive or random at several widths.

Two more testbenches run the published case studies on `rns_dot3`, at the n chosen for each
case in the source:

- `tb_rns_workload_mulchain`: chained multiplication of 2 to 12 operands of 4 bits, with
  n = 3 … 16.
- `tb_rns_workload_dot`: ten-term dot products of 3- to 15-bit operands, with n = 4 … 12.

Each takes two to three minutes to compile with Verilator. At the default n = 4, the
design holds the 2- and 3-operand multiplication chains and the dot products of 3- and 4-bit
operands.

## How this relates to the published design

The following parts follow the published design:

- the moduli set and the choice of channels;
- the gate set and the role of each gate;
- the structure of every adder (HNG carry-save rows, end-around and complemented
  end-around carry, ripple adder with Toffoli all-ones tree, Fredkin OR and Peres
  incrementer);
- the partial-product, carry-save and final-adder organisation of the three multipliers;
- the operand digits and adder structure of both converters;
- the three-term dot-product arrangement.

Choices made here where the published description stops short or does not fix a detail:

- **Correction constant.** The constant row that makes CEAC arithmetic exact, and the
  sign-and-wrap partial products of the modulo 2^n + 1 multiplier, are worked out here. The
  published circuit for that multiplier has the same shape: n+1 CEAC rows before the final
  adder.
- **Residue form.** Modulo 2^n + 1 residues are carried in ordinary (n+1)-bit form
  throughout. The diminished-one adder is used as the final adder, and its incrementer carry
  is the top bit.
- **Modulo 2^n + 1 adder.** The published adder also has a Fredkin gate performing an OR in
  its middle level. Its second operand could not be identified, so it is left out. The adder
  is exact without it.
- **Reverse converter.** The four operand words are derived here from the Chinese remainder
  theorem.
- **Low-constant carry-save adder.** `rev_csa_lc` keeps the published idea (no constant for
  the top bit, whose carry is dropped). The exact gate placement is this design's own.
- **Modulo 2^n multiplier.** It sums its triangle row by row. The gate counts match the
  published ones (n−1 Peres gates and (n−2)(n−1)/2 HNGs).
- **Copy tree.** The low-depth RAM copy gate doubles its copies at every level. The
  published gate reaches 2, 4, 7, 12, 20 … copies at depth 1, 2, 3, 4, 5 …, so the doubling
  tree is at least as shallow.
- **Dot-product length.** The dot-product unit sums three products. The published
  evaluation of dot products uses ten terms and keeps the intermediate values in residue
  form. Here, longer sums are made by repeated passes that go through binary in between.

## Limits

- **Quantum metrics.** Quantum cost, quantum depth, constant-input and garbage-output counts
  are properties of the reversible netlist. This RTL does not compute or report them.
  Garbage outputs are simply left open, so synthesis removes the logic behind them.
- **Zero codes.** A modulo 2^n − 1 result can be the second zero code 2^n − 1 in two cases:
  when it comes from the double-zero adder, and when both inputs of the single-zero adder
  are all ones. Every block downstream treats it as zero. Compare these residues modulo
  2^n − 1, not bit for bit.
- **Operand range.** The modulo 2^n + 1 multiplier expects operands in 0 … 2^n. The forward
  converter and every block in this design produce only such values.
