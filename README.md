# Modulo 2^16 + 1 multiplier from GDI cells

Multiplication modulo 2^n + 1 is the most expensive operation of the IDEA block
cipher and a common operation in residue-number-system arithmetic. This design
computes

    r = x * y mod (2^16 + 1),   x, y in [0, 2^16]

in one combinational pass. It has three stages:

1. **Partial product generation** (`pp_gen`). Sixteen rows of 16 bits. No row
   reaches weight 2^16: every bit that would is folded back into the low
   columns, inverted.
2. **Reduction** (`pp_reduction`). The 16 rows plus one constant operand, 17
   operands in all, are compressed into a Sum and a Carry vector. Each column
   has five compressor rows: 7:2, 7:2, 5:2, 3:2, 3:2. A carry that leaves the
   top column comes back in at the bottom, inverted.
3. **Final addition** (`sparse_eac_adder`). A 16-bit sparse-tree adder with
   an *inverted end-around carry* (IEAC) returns (Sum + Carry + 1) mod
   (2^16 + 1). It needs only a plain 16-bit adder and no modular correction
   step.

Every AND, OR, NOT and multiplexer is a single Gate-Diffusion-Input (GDI)
cell. The XOR/XNOR and majority cells of the compressors are built from these
cells too. The GDI cell is modelled at logic level (see "GDI cells" below).

## Interface and timing

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `x`, `y`    | in  | 17    | operands in [0, 2^16]. Bit 16 is set only for the value 2^16. |
| `r`         | out | 17    | x*y mod 65537. `r[16]` is set only for the result 2^16. |
| `sum_vec`   | out | 16    | Sum vector out of the reduction tree, for observation. |
| `carry_vec` | out | 16    | Carry vector out of the reduction tree, for observation. |

There is no clock, register, reset or handshake. `r` is valid one
combinational settling time after `x` and `y` change. To pipeline the
multiplier, register the ports or the `sum_vec`/`carry_vec` boundary.

**IDEA operands.** IDEA works on 16-bit words, and the word 0 stands for
2^16. Drive `x = {a == 0, a}` and `y = {b == 0, b}`, then keep `r[15:0]`:
a result of 2^16 becomes 0, which is how IDEA writes it. If you only tie
bits 16 to zero, an IDEA operand 0 is treated as 0 rather than 2^16. That
simpler mapping is correct only when neither operand is 0.

## How the offsets cancel

This is the part of the design that is easiest to get wrong, so it is worked
out here in full. All equalities are modulo M = 2^n + 1, with n = 16.

**Merging the four groups of the full product.** Write x = x_n x_{n-1}..x_0
and y the same way, and let p_{i,j} = x_i y_j. The full (n+1) x (n+1) matrix
splits into four groups:

| group | terms | non-zero only when |
|-------|-------|--------------------|
| A | p_{i,j} with i, j < n | x < 2^n and y < 2^n |
| B | p_{n,j} | x = 2^n |
| D | p_{i,n} | y = 2^n |
| C | p_{n,n} | x = y = 2^n |

At most one group is non-zero, so terms that share a column can be ORed
rather than added. Define q_i = p_{n,i} | p_{i,n}. Two identities place the
terms of weight 2^(2n-1) and 2^(2n):

- 2^(2n-1) = 2^(n-1) + 1, so q_{n-1} goes into both column n-1 and column 0.
- 2^(2n) = 1, so p_{n,n} is ORed into column 0.

**Folding the high half.** A bit s of weight 2^(n+j) satisfies
s·2^(n+j) = ~s·2^j − 2^j. Every bit at or above 2^n therefore moves to column
j inverted, and each such move adds 2^j to the value of the matrix.

Row 0 has no folded bits. Its column 0 is p_{0,0} | q_{n-1} | p_{n,n}, and its
column n-1 is p_{n-1,0} | q_{n-1}. Row i ≥ 1 holds:

| column | bit |
|--------|-----|
| k ≥ i | p_{k-i,i} |
| k = i-1 | ~(p_{n-1,i} \| q_{i-1}) |
| k < i-1 | ~p_{n-i+k,i} |

Row i has i folded bits, in columns 0..i-1, so it adds 2^i − 1. Summed over
all rows:

    rows = x*y + (2^n − n − 1)

**The wrapped carries.** In the reduction tree, a carry of weight 2^(n+k)
re-enters column k inverted, which adds 2^k. The tree wraps these bits:

| tree row | wrapped bits | added |
|----------|--------------|-------|
| 7:2 row 1 | 3 into column 0, 1 into column 1 | 5 |
| 7:2 row 2 | 3 into column 0, 1 into column 1 | 5 |
| 5:2 row 3 | 3 into column 0 | 3 |
| 3:2 row 4 | 1 into column 0 | 1 |
| 3:2 row 5 | 1 into column 0 | 1 |

So Sum + Carry = rows + K + 15, where K is the constant operand.

**The final adder** adds 1. In total:

    r = x*y + (2^16 − 17) + K + 15 + 1 = x*y + 2^16 − 1 + K

This is x*y exactly when K = 2. `modmul_pkg::PP_CONST` is therefore 2, and it
enters the tree as operand 0.

The offset from wrapped carries, 15, equals n − 1. That is the same offset an
(n−1)-stage carry-save array would produce, so the constant is the same as
for the classic carry-save version of this algorithm. If you rewire the tree,
recount the wraps and change `PP_CONST` to match: `tb_pp_reduction` checks
the 15 and `tb_modmul_2n1` checks the whole chain.

## Compressors

A (p,2) compressor adds p bits of one column plus carry-in bits. It produces
Sum (weight 1), Carry and carry-outs. Its carry-outs never depend on its
carry-ins, so a row can pass carries between columns without a ripple.

**5:2** (`compressor_5_2`). Inputs x1..x5, cin1, cin2. All carry outputs
have weight 2:

    cout1 = maj(x1,x2,x3)        s1 = x1^x2^x3
    cout2 = maj(x4,x5,cin1)      s2 = x4^x5^cin1
    sum   = s1^s2^cin2           carry = maj(s1,s2,cin2)

It is built from one CGEN, two XOR-XNOR cells and a chain of GDI
multiplexers. Each multiplexer picks the true or complemented rail of a
parity.

**7:2** (`compressor_7_2`). Inputs x1..x7, cin1, cin2. Nine input bits
cannot be covered by one weight-1 and three weight-2 outputs, which reach at
most 7. So `cout2` has **weight 4**:

    x1+..+x7+cin1+cin2 = sum + 2*(carry + cout1) + 4*cout2

Two full-adder fronts handle x2..x4 and x5..x7. Their sums are added to x1.
The three weight-2 carries (ca, cb, k) give cout1 = ca^cb^k and
cout2 = maj(ca,cb,k). In the tree, a 7:2 `cout2` therefore goes two columns
up. From the top two columns it wraps to column 0 (from column 14) or to
column 1 (from column 15).

**3:2** (`compressor_3_2`). A full adder made of an XOR-XNOR cell, a
multiplexer and a CGEN.

**CGEN** (`cgen`). The majority function (x1+x2)x3 + x1x2: a GDI OR and a
GDI AND feed a GDI multiplexer selected by x3.

## Reduction tree

`pp_reduction` has one compressor per column in each row. The carries of one
row all enter the next row, never the same row:

| row | compressor | inputs per column i |
|-----|------------|---------------------|
| 1 | 7:2 | operands 0..6 on x1..x7, operands 7 and 8 on cin1, cin2 |
| 2 | 7:2 | row-1 sum; operands 9..13; row-1 carry and cout1 from column i-1; row-1 cout2 from column i-2 |
| 3 | 5:2 | row-2 sum; operands 14..16; row-2 carries, connected as in row 2 |
| 4 | 3:2 | row-3 sum; row-3 cout1 and cout2 from column i-1 |
| 5 | 3:2 | row-4 sum; row-3 carry and row-4 carry from column i-1 |

The result is `sum_vec` = row-5 sums. `carry_vec` = row-5 carries shifted up
one column, with the inverted carry out of column 15 in bit 0. The longest
path runs through five compressors, whatever order the operands come in.

## Final adder: sparse-tree inverted EAC

`sparse_eac_adder` (N = 16, K = 4, `INVERTED = 1`) computes
s = (a + b + ~cout) mod 2^16, where cout is the carry out of a + b. This
equals (a + b + 1) mod (2^16 + 1) with one exception: when a + b = 2^16 − 1,
the modular result is 2^16. That case is exactly "a ^ b is all ones". The
adder flags it on `all_prop`, which becomes `r[16]`, while `s` is 0.

Only every fourth carry is computed. Let G_{i:j} be the group generate and
P_{i:j} the group propagate, with p = a|b and g = a&b. Then:

    C*_{-1}  = ~G_{15:0}                            (carry into bit 0)
    C*_{4m-1} = G_{4m-1:0} | P_{4m-1:0} & ~G_{15:4m}  (m = 1, 2, 3)

The end-around carry is folded into each sparse carry through the suffix
term G_{15:4m}. That removes the combinational loop a literal carry
feedback would create. Each slice's (G, P) comes from a two-level tree of
merge cells. Two levels of recursive doubling give the prefixes G_{4m-1:0}
and suffixes G_{15:4m}, and one more merge forms each carry.

Each 4-bit slice is a conditional sum generator (`csg`). Two ripple rails
work out the slice for carry-in 0 and for carry-in 1, and four GDI
multiplexers pick one result with the sparse carry.

With `INVERTED = 0` the same module is the plain EAC adder. It computes
(a + b + cout) mod 2^N, which is addition modulo 2^N − 1, with all ones
standing for zero. The multiplier does not use this mode; it is tested on
its own.

## GDI cells

A GDI cell (`gdi_cell`) is a pMOS/nMOS pair with a common gate G. The
outer diffusions are P and N, and the shared diffusion is the output D. At
logic level, D = G ? N : P. Tying P and N to constants or signals gives all
the gates used here:

| N | P | G | D |
|---|---|---|---|
| 0 | B | A | ~A & B |
| B | 1 | A | ~A \| B |
| 1 | B | A | A \| B |
| B | 0 | A | A & B |
| B | A | S | S ? B : A |
| 0 | 1 | A | ~A |

The model is purely logical. The reduced swing of a real GDI cell, and any
buffering it needs, are not represented. Power, delay and area figures
therefore cannot be read from this RTL, and a synthesis tool maps the cells
to ordinary multiplexers.

## Files

All files are in `rtl/` and `tb/`, one module or package per file.

| module | role |
|--------|------|
| `modmul_pkg` | N_MOD = 16, NUM_OPS = 17, SPARSE_K = 4, PP_CONST = 2, (g,p) type and merge function |
| `modmul_2n1` | top: pp_gen → pp_reduction → sparse_eac_adder |
| `pp_gen` | partial product rows (parameter N) |
| `pp_reduction` | 17-operand compressor tree (parameter N = width) |
| `compressor_7_2`, `compressor_5_2`, `compressor_3_2` | compressors |
| `xor_xnor`, `cgen`, `gdi_cell` | cells |
| `sparse_eac_adder`, `csg` | final adder and its 4-bit slices |

`modmul_2n1` has no parameters. `pp_gen` and `sparse_eac_adder` work at
other widths, for example N = 8 as used in their testbenches. The compressor
tree, however, is laid out for exactly 17 operands. A modulus other than
2^16 + 1 needs a new tree arrangement and a recomputed `PP_CONST`.

## Simulation

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and stops on its own. To run one with
Verilator 5:

    verilator --binary --timing --top-module tb_modmul_2n1 -Irtl -y rtl \
        rtl/modmul_pkg.sv tb/tb_modmul_2n1.sv
    ./obj_dir/Vtb_modmul_2n1

What each testbench checks:

- **Cells and compressors.** Every input combination is driven. Each
  result is checked against its arithmetic identity. For the compressors,
  the testbench also checks that the carry-outs do not depend on the
  carry-ins. Several published 5:2 and 7:2 vectors are checked bit for bit.
- **`tb_pp_gen`.** rows ≡ x*y + 2^N − N − 1: every pair at N = 8, and
  special and random pairs at N = 16.
- **`tb_pp_reduction`.** Sum + Carry ≡ operands + 15 for random operand
  sets, including all-zero and all-one sets.
- **`tb_csg` and `tb_sparse_eac_adder`.** Both adder modes, exhaustively at
  N = 8, with random and corner cases at N = 16, and with random pairs at
  N = 32.
- **`tb_modmul_2n1`** (full size, under a second of simulation). Compares
  r with x*y mod 65537 and with (sum_vec + carry_vec + 1) mod 65537. The
  inputs are all pairs of special operands, 200,000 random pairs and 20,000
  IDEA-style pairs. It counts every operand group (A, B, C, D), both values
  of the adder's carry out, the r = 2^16 case and the wrap bit, and fails if
  any of them never happens.

## Where this RTL makes its own choices

- **Tree wiring.** The row order and the operand groups of the tree are as
  described above. The drawing it follows does not say which carry feeds
  which compressor input, so that assignment is this design's choice. The
  longest path is five compressors either way.
- **Weight of the 7:2 `cout2`.** The weight-4 `cout2` follows published
  simulation vectors of the 7:2 compressor. The generic (p,2) compressor
  equation, which gives every carry-out weight 2, cannot hold for nine
  inputs.
- **Rail order.** Which rail sits on which input of each compressor
  multiplexer was chosen to satisfy the compressor equations. The cell
  block diagrams only show which signals meet.
- **Prefix structure of the adder.** Slice terms come from a binary tree
  of merge cells. The prefixes and suffixes over slices use recursive
  doubling. This does not copy the cell placement of the published sparse
  tree, which uses fewer cells. The carries are the same, and each is
  log2 16 + 1 = 5 merges deep.
- **Published waveforms not reproduced.** The published simulation
  waveforms of the 16-bit adder and of the complete multiplier show values
  that are not consistent with the adder's and the multiplier's arithmetic.
  They are not used as test vectors. The 5:2 and 7:2 waveform values are
  consistent with the arithmetic, and they are used.
- **Not included.** No clock or pipeline registers, since none is
  described. The IDEA cipher around the multiplier is not part of this
  design.
