# Dual-quaternion multiplier with 24 real multipliers

A dual quaternion packs a rotation and a translation into eight real numbers.
Robotics, biomechanics and skeletal animation multiply them constantly. Done
directly, one product costs 64 real multiplications and 56 additions. On an
FPGA the multiplications are the scarce resource, because a device has only a
fixed number of embedded multiplier blocks. This design computes the full
product in one clock cycle of throughput using **24 multipliers and 64
adders/subtractors**. It is a fully parallel datapath that fits the 24 18x18
multipliers of a mid-size FPGA at 16-bit operands.

The algorithm is the factorisation published in *"An FPGA-oriented fully
parallel algorithm for multiplying dual quaternions"*. The RTL, the number
formats, the pipeline and the exact lane routing are this implementation's
own. Every choice was checked against a direct schoolbook product.

## The product as a matrix

Write the operands as 8-tuples, real part first and dual part second:

    Q1 = x0 + i x1 + j x2 + k x3 + e (x4 + i x5 + j x6 + k x7)
    Q2 = b0 + ... (same layout)
    Y  = Q1 * Q2 = y0 .. y7

Here i^2 = j^2 = k^2 = -1, ij = k = -ji, jk = i = -kj, ki = j = -ik and e^2 = 0.
For fixed Q2 the product is linear in Q1:

    [y_top]   [ A(b_top)      0      ] [x_top]
    [y_bot] = [ A(b_bot)   A(b_top)  ] [x_bot]

`x_top = (x0..x3)` and `x_bot = (x4..x7)`. `A(c)` is the 4x4 matrix of
right-multiplication by the quaternion c:

    A(c) = [ c0 -c1 -c2 -c3 ]
           [ c1  c0  c3 -c2 ]
           [ c2 -c3  c0  c1 ]
           [ c3  c2 -c1  c0 ]

Because of the zero block, a direct matrix-vector product needs 48
multiplications: three 4x4 blocks of 16.

## Why 24 multiplications suffice

The trick is to split each 4x4 block into a part that a Hadamard transform
diagonalises and a part that has only four non-zero entries.

Let H be the 4x4 Sylvester Hadamard matrix, with entry (i,k) = (-1)^popcount(i&k).
For any 4-vector c,

    H diag(H c / 4) H  =  S(c),    S(c)[i][j] = c[i xor j]

Applying `S(c)` therefore costs 4 multiplications: transform the operand by H,
multiply element-wise by `H c / 4`, and transform back. Compare `S(c)` with the
quaternion matrix after flipping the sign of its first row,
`D = diag(-1, 1, 1, 1)`:

    D A(c) = S(c) - 2 R(c)

`R(c)` has exactly one non-zero entry per row:

    (R(c) x)[0] = c0 x0     (R(c) x)[2] = c3 x1
    (R(c) x)[1] = c2 x3     (R(c) x)[3] = c1 x2

So one quaternion block costs 4 Hadamard-lane multiplications plus 4
correction multiplications, 8 in all, and `A(c) x = D (S(c) x - 2 R(c) x)`.
The dual part needs two blocks, `A(b_bot) x_top + A(b_top) x_bot`. Their
Hadamard parts share the output transform:
`H (diag(H b_bot/4) H x_top + diag(H b_top/4) H x_bot)`. The total is therefore
8 multiplications for the real part and 16 for the dual part, 24 in all. The
coefficients (`2c` and `H c / 4`) depend only on Q2, so they cost additions but
no multiplications. Multiplying by 2 and by 1/4 is wiring.

## Lane map

The 24 multipliers are called lanes. Lane i multiplies a coefficient `s_i`
(from Q2) by an operand `v_i` (from Q1). `P(c)` is the fixed reordering
`(c0, c3, c1, c2)`.

| lanes  | coefficient s        | operand v        | used for                   |
|--------|----------------------|------------------|----------------------------|
| 0..3   | 2 P(b0..b3)          | x0..x3           | real-part correction       |
| 4..7   | H(b0..b3) / 4        | H(x0..x3)        | real part, Hadamard        |
| 8..11  | H(b0..b3) / 4        | H(x4..x7)        | dual part, A(b_top) x_bot  |
| 12..15 | H(b4..b7) / 4        | H(x0..x3)        | dual part, A(b_bot) x_top  |
| 16..19 | 2 P(b4..b7)          | x0..x3           | dual-part correction       |
| 20..23 | 2 P(b0..b3)          | x4..x7           | dual-part correction       |

After the multipliers (m_i = s_i v_i):

    y_top = D ( H(m4..m7)              - Q(m0..m3) )
    y_bot = D ( H(m8..m11 + m12..m15)  - Q(m16..m19 + m20..m23) )

`Q` routes correction lane j to output row i with `P[i] = j`, i.e.
`Q(a) = (a0, a3, a1, a2)`. The sign matrix `D` costs nothing: row 0 simply
subtracts in the opposite order.

Additions per product: 16 for H on Q1, 16 for H on Q2, and 32 after the
multipliers (4 pairwise sums, two H transforms of 8 each, 4 correction sums
and 8 final subtractions), 64 in all.

The lane grouping, the factors 2 and 1/4 and the sign matrix `D` follow the
published algorithm. The published algorithm draws every junction as a sum,
with a factor of +2 on the correction lanes. With that factor and this `D`
the correction terms must be subtracted, so this design uses subtractors
there. A subtractor costs the same as an adder. The lane pairing in lanes
8..15 and the reordering `P` were derived here and verified numerically.

## Number formats and exactness

* Inputs `x`, `b`: W-bit two's-complement integers (W = 16 by default).
* Operands `v` and coefficients `s`: W+2 bits. That is 18 bits at W = 16,
  so every lane is one 18x18 multiplier.
* The factor 2 is a left shift. The factor 1/4 is only a binary point:
  lanes 4..15 carry `H b` unchanged, read with 2 fractional bits. Correction
  products are shifted left by 2 to align with them.
* After the output transform the two fractional bits are always zero. Each
  result is an integer component of the product, and the Hadamard sums come out as
  4 times that integer. Dropping them is exact, and no rounding happens
  anywhere.
* Output `y`: 2W+3 bits, enough for the largest possible product component
  (a sum of eight W x W products).

## Pipeline and interface (`dq_mult`)

| port        | dir | width        | meaning                                  |
|-------------|-----|--------------|------------------------------------------|
| `clk`       | in  | 1            | clock                                    |
| `rst_n`     | in  | 1            | synchronous, active-low; clears valids   |
| `in_valid`  | in  | 1            | `x`, `b` hold an operand pair            |
| `x[8]`      | in  | W            | Q1 (left operand)                        |
| `b[8]`      | in  | W            | Q2 (right operand)                       |
| `out_valid` | out | 1            | `y` holds a product                      |
| `y[8]`      | out | 2W+3         | Q1 * Q2                                  |

Three register stages: (1) operands `v` and coefficients `s`, (2) the 24
products, (3) the result. Latency is exactly 3 cycles from `in_valid` to
`out_valid`. A new pair can be accepted every cycle, and there is no
back-pressure. Data registers load only when their stage is valid and are
not reset. The published algorithm is a combinational data flow and gives
no registers, so the stage boundaries are this design's choice. The middle
stage sits right after the multipliers, so that they can use the output
register of an embedded multiplier block.

Q2 is treated as a full operand and may change every cycle. If Q2 were
constant, `coef_gen` could run once and its 16 adders could be dropped.

## Modules

| module      | role                                                                 |
|-------------|----------------------------------------------------------------------|
| `dq_pkg`    | lane count, default width, fractional bits, reordering table `P`     |
| `hadamard4` | 4-point Hadamard transform, two butterfly stages, 8 adders           |
| `delta8`    | H on elements 0..3 and on 4..7 of an 8-vector (16 adders)            |
| `x_preadd`  | H on Q1 and fan-out to the 24 operands                               |
| `coef_gen`  | H on Q2, scaling by 2 and 1/4, fan-out to the 24 coefficients        |
| `mult_bank` | 24 signed multipliers                                                |
| `post_add`  | pairwise sums, output H, correction subtraction, sign of rows 0 and 4|
| `dq_mult`   | top: the four blocks plus the three pipeline stages                  |

At W = 16, coarse synthesis of `dq_mult` (generic, no device mapping)
reports 32 multiply or multiply-add cells and 48 adder cells, because it
merges some of the 64 additions into the 24 products. It also reports 1643
flip-flop bits. Several outputs of `x_preadd` and `coef_gen`
are copies of the same wire: lanes share operands and coefficients by
design.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog. The golden model
(`tb/dq_ref_pkg.sv`) multiplies dual quaternions from the unit multiplication
table, 64 multiplications, and has no code in common with the RTL.

* `tb_hadamard4`, `tb_delta8`: the transforms against a matrix product.
* `tb_x_preadd`, `tb_coef_gen`: every lane word against the lane map. The
  coefficient test also checks the identity `H diag(s4..s7) H = 4 S(b_top)`.
* `tb_mult_bank`: every lane against a 64-bit product.
* `tb_post_add`: lane products built from random Q1, Q2 through the lane
  map must give the schoolbook product.
* `tb_dq_mult`: end to end at default parameters. It runs 4000 cycles of
  random operands, some all-minimum or all-maximum. Runs of back-to-back
  inputs alternate with idle gaps. A scoreboard checks every result and
  that it arrives exactly 3 cycles after its input. A reset in mid-stream
  must drop the products in flight. The test counts back-to-back inputs,
  bubbles, extreme operands, results that need the full output width and
  dropped products, and fails if any count is zero.

To run one with Verilator 5:

    verilator --binary --timing -Irtl -Itb rtl/dq_pkg.sv tb/dq_ref_pkg.sv \
        rtl/*.sv tb/tb_dq_mult.sv --top-module tb_dq_mult
    ./obj_dir/Vtb_dq_mult

Swap the testbench file and `--top-module` for the other tests.

## Limits and open points

* Integer operands only. Fixed-point data can use the same datapath with
  the binary point kept outside it. The result then has twice as many
  fractional bits as the operands.
* Device results were not reproduced. The published algorithm is reported
  to fit one Spartan-3 XC3S1000, where the direct method needs three. Here
  only the multiplier count (24 of 18x18) has been matched to such a device.
  Nothing has been placed or routed.
* The word length, the pipeline depth and the reset behaviour are not
  given by the published algorithm. They are the choices described above.
