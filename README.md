# 5 x 5 advanced array multiplier built from column counters

An array multiplier adds its partial products with a regular grid of full
and half adders: for 5-bit operands, 16 full adders and 4 half adders in
diagonal rows, finished by a ripple-carry row. The design here keeps the
array's column layout but replaces the grid: each column of the product is
summed in one step by a single *counter* (also called a compressor) that
outputs the binary count of the ones fed to it. Columns of different heights
get counters of matching size: a half adder, 4:3, 5:3, 6:3 and 7:3 counters,
and a full adder. The aim is a smaller circuit. On a 4-input-LUT FPGA the
published design reports 28 slices and 48 LUTs against 30 and 52 for the
conventional array. Those area figures are not reproduced here.

The multiplier is unsigned and purely combinational: `p = a * b` with 5-bit
`a` and `b` and a 10-bit `p`. It has no clock, reset or handshake.

## Column map

The partial product `aibj = a[i] & b[j]` has weight `2^(i+j)` and sits in
column `i+j`. The counter of a column adds that column's partial products
and the carries it receives from lower columns:

| column | counter     | inputs                                   | outputs (w1, w2, w4) |
|--------|-------------|------------------------------------------|----------------------|
| 0      | none        | a0b0                                     | p0                   |
| 1      | half adder  | a1b0, a0b1                               | p1, k0               |
| 2      | 4:3         | k0, a2b0, a1b1, a0b2                     | p2, k1, k2           |
| 3      | 6:3         | k1, a3b0, a2b1, a1b2, a0b3, 0            | p3, k3, k4           |
| 4      | 7:3         | k2, k3, a4b0, a3b1, a2b2, a1b3, a0b4     | p4, k5, k6           |
| 5      | 6:3         | k4, k5, a4b1, a3b2, a2b3, a1b4           | p5, k7, k8           |
| 6      | 5:3         | k6, k7, a4b2, a3b3, a2b4                 | p6, k9, k10          |
| 7      | 4:3         | k8, k9, a4b3, a3b4                       | p7, k11, k12         |
| 8      | full adder  | k10, k11, a4b4                           | p8, k13              |
| 9      | XOR         | k12, k13                                 | p9                   |

These rules make the routing work:

* A counter's weight-1 output is the product bit of its own column.
* Its weight-2 output (odd-numbered `k`) goes to the next column up.
* Its weight-4 output (even-numbered `k`, except k0) goes **two** columns up.

So a column receives at most two carries: one from the column below and one
from the column two below. The chain of carries through the columns does the
work of the final adder. No separate carry-propagate row exists.

The choice of counter per column and the names `k0..k13` follow the
published design. The names say which counter drives each signal. That
design's drawing puts both outputs of a counter into the next column. For
binary counters that cannot be right, since the weight-4 bit would be counted
at half its value. This RTL routes the weight-4 outputs two columns up. With
that routing, each column's input count fits its counter: 7 bits in column 4,
6 in column 5, 5 in column 6, 4 in column 7, 3 in column 8. Column 3 is the
exception. It receives only five bits, so one input of its 6:3 counter is
tied to 0.

Column 9 receives k12 and k13. The largest product is 31 * 31 = 961, which
is below 2^10, so the two are never 1 together. An exclusive-or (equally, an
OR) forms p9. The published design does not name this gate. The testbench
checks over all operand pairs that column 9 never holds two ones.

## The counters

Every counter has inputs `a, b, c, ...` of equal weight and outputs `z0`
(weight 1), `z1` (weight 2) and `z2` (weight 4), so `{z2, z1, z0}` is the
number of ones at the inputs.

* `comp7_3` follows the published cell structure. Two full adders take
  g,f,e and d,c,b. A third full adder adds their two sums and `a`, giving
  `z0`. A fourth full adder takes the three weight-2 carries: its sum is `z1`
  and its carry is `z2`.
* `comp6_3` has the same structure, with a half adder over f,e in place of
  the first full adder.
* `comp5_3` and `comp4_3` have no published cell structure. They are built
  here the same way, from the smallest set of cells:
  * 5:3: full adder over e,d,c, then full adder over that sum with a and b
    (`z0`), then half adder over the carries (`z1`, `z2`).
  * 4:3: full adder over d,c,b, then half adder over that sum with a (`z0`),
    then half adder over the carries (`z1`, `z2`).

The published counting tables head their columns "z0 z1 z2" with the most
significant bit first. This RTL follows the cell drawings instead, where Z0
is the weight-1 output. One table row gives "000" for four ones. That row is
read as 100, the count it stands for.

## Files

| file                   | content                                              |
|------------------------|------------------------------------------------------|
| `rtl/aam_pkg.sv`       | widths `N = 5`, `P = 10`, types `operand_t`, `product_t` |
| `rtl/adv_array_mult.sv`| top: AND array plus the column counters above        |
| `rtl/pp_gen.sv`        | AND array, `pp[j][i] = a[i] & b[j]` (width parameter `N`) |
| `rtl/comp4_3.sv` .. `rtl/comp7_3.sv` | the counters                           |
| `rtl/full_adder.sv`, `rtl/half_adder.sv` | the 1-bit adders                   |
| `tb/tb_*.sv`           | one self-checking testbench per module               |

The 5-bit width is a package constant, not a parameter. The column
structure above only fits 5 x 5. A different width needs a new column map,
not just a new number.

## Verification

Each testbench checks its module exhaustively against arithmetic computed in
the testbench:

* Adders and counters: every input pattern, compared with the number of
  ones. Each counter must also reach every count from 0 to its maximum.
* `tb_pp_gen`: all 1024 operand pairs. It checks every partial-product bit,
  and checks that their weighted sum equals `a * b`.
* `tb_adv_array_mult`:
  * The worked example 11001 x 01001 = 0011100001 (25 x 9 = 225).
  * All 1024 operand pairs against `a * b`.
  * A column model counts how often each column's counter must produce its
    weight-2 output (columns 1 to 8) and its weight-4 output (columns 2 to 7).
    Every one of them must occur at least once.

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
Running one with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/aam_pkg.sv tb/tb_adv_array_mult.sv --top-module tb_adv_array_mult
    ./obj_dir/Vtb_adv_array_mult

## Not included

* The conventional array multiplier is only a baseline for comparison, so
  it is not part of this RTL.
* No FPGA mapping or timing is given. The published comparison counts
  slices, LUTs and I/O pins on an FPGA it does not name. The I/O count of
  20 matches the 5 + 5 + 10 ports here.
