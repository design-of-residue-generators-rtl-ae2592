# Residue generators and multi-operand modular adders built from carry-save adders

A *residue generator mod A* turns an n-bit binary number X into its residue
[X]_A. A *multi-operand modular adder* (MOMA) adds k residues mod A and returns
the sum mod A. Both appear in residue-number-system arithmetic, where they convert
numbers into residues. They also appear in circuits protected by arithmetic codes,
which use them to encode and check data. The usual way to build them is a tree of
two-operand adders mod A. That is slow, and a modular adder costs much more than a
full adder.

This RTL builds both circuits for any odd modulus A. Most of the work is done by a
carry-save adder (CSA) network with end-around carry, in which each full adder
removes one bit. A short binary adder and a small lookup table finish the job.

## The key idea: the period of 2 modulo A

For odd A, the powers of two repeat modulo A. The period P(A) is the smallest
j > 0 with 2^j ≡ 1 (mod A). Some values:

| A    | 3 | 5 | 7 | 9 | 13 | 25 | 29 |
|------|---|---|---|---|----|----|----|
| P(A) | 2 | 4 | 3 | 6 | 12 | 20 | 28 |

Two facts follow:

* Bit x_q of X has weight [2^q]_A = [2^(q mod P)]_A. The n input bits can therefore
  be folded onto P *columns* G_0 … G_(P-1). Column j holds every bit whose weight is
  [2^j]_A.
* 2^P ≡ 1 (mod A), so a carry out of column P-1 weighs the same as a bit of
  column 0. The columns form a ring. Adding rows of P bits modulo 2^P - 1, with
  the top carry wrapped around, changes nothing mod A.

For A = 2^a - 1 this is the classic fact that a-bit bytes can be added with
end-around carry. Here it holds for every odd A, with P columns in place of a.

## Structure of a generator (`residue_gen`)

```
 x[N-1:0] ──► fold onto P columns ──► CSA tree with EAC ──► p-bit cyclic adder ──► final converter ──► r = [x]_A
              (ceil(N/P) rows)        (rows → 2 rows)       (2 rows → P+w bits)    (2^(P+w)-word table)
```

1. **Folding.** Row t holds x[tP … tP+P-1]. Bits missing from the last row are
   constant zeros.
2. **CSA tree with EAC** (`csa_tree`, `csa_eac`). Each stage is a row of P full
   adders that turns three rows into two. The carry of column j goes to column
   j+1, and the carry of the top column goes to column 0. The tree works level by
   level until two rows remain. The number of levels is the usual θ(k) of CSA
   trees: 3 rows need 1 level, 4 need 2, 5–6 need 3, 7–9 need 4, and 10–13 need 5.
   A stage with a constant-zero input reduces to half adders after synthesis.
3. **p-bit cyclic adder** (`cyclic_adder`). Two rows in a ring cannot be added by a
   true end-around-carry adder without a combinational loop. Instead, the adder
   starts at column START with carry-in 0 and ripples once around the ring. Its
   final carry is not fed back: it is kept as an extra output bit that stands in
   column START. The result is P+1 bits, with one column holding two bits. A long
   ring can be cut into `GROUPS` = w shorter adders that work in parallel. The
   carry of each group becomes an extra bit in the first column of the next group.
   This gives P+w bits and a carry path of only ceil(P/w) columns.
4. **Final converter** (`residue_rom`). This is a table of 2^(P+w) words that maps
   the remaining weighted bits to [X]_A. It is written as the formula for its
   words, sum of weights mod A, evaluated on the address. Synthesis can turn that
   into a ROM, a PLA or gates.

For A = 2^a - 1 the period is a and no table is needed. The two rows go to an
a-bit adder with end-around carry (`eac_adder`). That adder is written without a
loop: (a + b + carry_out) mod 2^a.

**Caution:** in the A = 2^a - 1 case, the residue 0 can come out as all ones
(for example 7 for A = 7). This is the usual one's-complement double zero. Every
other configuration returns the residue in 0 … A-1.

## Multi-operand adder mod A (`moma`)

The k operands are a-bit values. Let m be the number of bits in the largest
possible sum, k·OPMAX, and let q = min(P(A), m).

* **m ≤ P(A)**, so q = m (for example 8 operands mod 25: m = 8, P = 20). The sum never
  reaches 2^q, so no wrap-around is ever needed. A plain q-bit CSA tree and a
  q-bit adder produce the exact sum, and a 2^q-word table reduces it mod A.
* **m > P(A)**, so q = P(A); this is called cyclic mode (for example 4 operands
  mod 5: P = 4, m = 5). It starts at k ≥ ceil(2^P / (A-1)) residue operands:
  4 for A = 5 or 21, 6 for 51, 8 for 9, 16 for 17.
  The network works exactly as in the generator. It uses P-bit rows with
  end-around carries, then a cyclic adder, then a (P+1)-input table. Operands
  wider than P bits are folded onto extra rows.

`OPMAX` defaults to A-1. It can be raised when some operands are not reduced
residues; `gen25_moma` does this.

### Cost-effective sequential version (`moma_ce`)

The tree is replaced by a single q-bit CSA stage and a 2q-bit carry-save register
(S, C):

| cycle          | action                                                          |
|----------------|-----------------------------------------------------------------|
| start          | S ← operand 0, C ← operand 1                                    |
| next k-2       | (S, C) ← CSA(S, C, operand i)                                   |
| ripple         | (S, C) ← CSA(S, C, 0); each column is a half adder, carries move one column per cycle, until C = 0 |
| done           | r ← table(S), `done` high for one cycle                        |

Handshake: pulse `start` with `ops` valid. Keep `ops` stable while `busy` is high.
`r` holds its value until the next result. Reset is synchronous and active low.

For 8 operands mod 25, the time from start to done is at most 15 cycles. In
cyclic mode the ripple phase still ends: every cycle in which C ≠ 0 lowers the
total number of ones in S and C.

### Sequential generator (`residue_gen_ce`)

The same trick applies to the generator. The input is folded onto P-bit rows,
as in `residue_gen`. The rows are then fed as P-bit operands to the sequential
adder, which runs in cyclic mode because each row can hold any P-bit value. The
ripple phase takes the place of the cyclic adder, and a P-input table finishes.

For 32 inputs mod 9 (6 rows, P = 6) the time from start to done is at most
13 cycles. For 32 inputs mod 13 it is at most 16 cycles.

## Generator for n ≤ P(A) (`gen_small_n`)

When n ≤ P(A), every bit has its own weight and nothing can be reduced by
carry-save addition. The bits are split into two parts:

* The upper n-a bits go to a 2^(n-a)-word table.
* The lower a bits form an integer M < 2^a < 2A. A correction circuit adds the
  constant 2^a - A, which computes M - A. Its carry is 1 exactly when M ≥ A, and
  that carry drives a multiplexer choosing between M - A and M.
* A two-operand adder mod A (`mod_adder`) combines the two residues.

The scheme is meant for roughly 10 < n ≤ 10 + a. The default instance uses
A = 29 (a = 5, P = 28) and n = 15.

## Generator mod 25 through a MOMA (`gen25_moma`)

P(25) = 20 is too long for the `residue_gen` path, which would need a 21-input
table. This generator works differently:

* Columns G0–G4 hold {x0..x4} and {x20..x24}. These are used directly as two 5-bit
  operands.
* The 22 bits of G5–G19 go to four small tables: 32×5, 32×5, 64×5 and 64×5. The
  split is x5..x9, x10..x14, {x15..x19, x25} and x26..x31.
* The six values are added by `moma` with A = 25, K = 6 and OPMAX = 31. That gives
  an 8-bit network and a 256-word table.

## The instances in `residue_top`

| instance  | circuit                                   | key sizes |
|-----------|-------------------------------------------|-----------|
| `u_gen7`  | 12-input generator mod 7 (same network as a 4-operand adder mod 7) | P = 3, 4 rows, 2 CSA levels, 3-bit EAC adder |
| `u_gen13` | 32-input generator mod 13                 | P = 12, 1 CSA level (half adders in G8–G11), two 6-bit adders, 14-input table |
| `u_gen9`  | 32-input generator mod 9                  | P = 6, 6 rows, 3 levels, cyclic adder from G2, 128×4 table |
| `u_gen29` | 15-input generator mod 29 (n ≤ P scheme)  | 1K×5 table, correction, adder mod 29 |
| `u_gen25` | 32-input generator mod 25                 | four small tables + 6-operand adder mod 25 |
| `u_moma5` | 4-operand adder mod 5                     | cyclic mode, 5-input table |
| `u_moma25`| 8-operand adder mod 25, parallel          | 8-bit network, 256×5 table |
| `u_ce25`  | 8-operand adder mod 25, sequential        | 8 full adders, 16-bit CSR |
| `u_ce9`   | 32-input generator mod 9, sequential      | 6 full adders with EAC, 12-bit CSR, 64×4 table |

Every instance has its own ports. Only `u_ce25` and `u_ce9` use `clk` and
`rst_n`.

## Where this RTL departs from the hand-drawn networks

* **CSA network allocation.** The published networks place full and half adders
  column by column, for example a 6-bit and a 2-bit CSA in one level. This RTL
  instead reduces whole rows, three at a time. The bit counts per column agree at
  the input and at the output of the network. The number of adders and levels in
  between can differ slightly. Half adders appear where a row holds constant
  zeros.
* **Cyclic adder start.** The row tree always ends with exactly two rows, so the
  cyclic adder may start at any column. `u_gen9` starts at column 2, which puts
  the double bit in G2 as in the worked example.
* **Sequential MOMA.** The published version uses 7 full adders and a 14-bit
  register for 8 operands mod 25. This one keeps all q = 8 adders and a 16-bit
  register. Its ripple phase ends when the carry row is empty, not after a fixed
  count.
* **Sum width.** m is computed as the bit length of k·OPMAX. The formula
  ceil(log2 k(A-1)) is one short when k(A-1) is a power of two, such as
  4 operands mod 5.
* **Correction circuit.** The correction in the n ≤ P scheme triggers on M ≥ A,
  not only on M > A.
* **Tables.** All lookup tables are described by formula, not by stored contents.

## A note on the period table

A period function that is checked against a published list of periods should
agree everywhere except at A = 49. There the period is 21, not 42:
2^21 ≡ 1 (mod 49), while 2^3 and 2^7 are not. The testbenches use 21.

## Files

* `rtl/modres_pkg.sv` holds elaboration-time helpers: `pow2mod`, `period`,
  `csa_levels`, and the column of each cyclic-adder carry.
* `rtl/<module>.sv` holds one module per file. Every parameter has a default.
* `tb/tb_<module>.sv` holds one self-checking testbench per module. Each one
  prints `TB_RESULT checks=N failures=M`.
* `tb/tb_residue_top.sv` runs every instance of the top at its default size. It
  counts how often each mechanism fired: a CSA end-around carry, a cyclic-adder
  extra bit, a carry between split adder groups, the EAC adder wrap, the
  correction multiplexer, mod-5 cyclic mode, and the sequential ripple phase. It
  fails if any of them never fired. It also runs both sequential units through
  complete operations.

## Simulating

```
verilator --binary --timing --assert -y rtl rtl/modres_pkg.sv tb/tb_residue_top.sv \
          --top-module tb_residue_top -o sim
./obj_dir/sim
```

Swap the testbench name to run another one. Each one finishes in well under a
second.

## Changing the design

To make a new generator, instantiate `residue_gen` with a different `A` and `N`.
To make a new adder, instantiate `moma` or `moma_ce` with a different `A` and `K`.
The network, the adder and the table all size themselves from P(A).

Watch the table size. The final converter of `residue_gen` has P(A)+GROUPS
inputs. For a modulus with a long period, P(A) ≥ 20, that table is impractical.
Use the MOMA-based route shown in `gen25_moma` instead, or `gen_small_n` when
n ≤ P(A).

A must be odd and at least 3.
