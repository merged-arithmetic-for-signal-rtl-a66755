# Merged-arithmetic complex multiplier

A complex product needs four real multiplications and two additions:

    P real = X real * Y real - X imag * Y imag
    P imag = X real * Y imag + X imag * Y real

The usual circuit builds four complete multipliers and two adders. Every complete
multiplier ends in a wide carry lookahead adder, so the usual circuit has six of
them. *Merged arithmetic* leaves the products unfinished. Each output is a sum of
two products, so both products' bit matrices are stacked into one matrix. One
network of full and half adders reduces that matrix to two rows, and a single
carry lookahead adder adds those rows. The whole complex multiplier then needs
only two lookahead adders instead of six. The price is a few more full adders and
two more adder delays in the tree, and a 15-bit lookahead adder delay is saved.

This repository holds synthesizable SystemVerilog for that multiplier, in the
reference design's configuration (8-bit unsigned operands, `N = 8`) and for any
other operand width. The adder network is generated at elaboration from Dadda's
reduction schedule. Self-checking testbenches cover every module.

## Structure

```
merged_complex_multiplier        input regs -> two units in parallel -> output regs
├── two_term_mult_adder u_real   xr*yr - xi*yi   (SUBTRACT = 1)
└── two_term_mult_adder u_imag   xr*yi + xi*yr   (SUBTRACT = 0)
    ├── bit_product_array x2     N*N AND gates (NAND for a subtracted product)
    ├── dadda_reducer            adder network: merged matrix -> two rows
    │   ├── full_adder           3-input counter
    │   └── half_adder           2-input counter
    └── cla_adder                two-level carry lookahead adder, 2N bits
dadda_pkg                        elaboration-time reduction schedule (no hardware)
```

## The merged bit matrix

For unsigned N-bit operands, the product `a*b` is the sum of the bits
`a[i] & b[j]`, each with weight `2^(i+j)`. Column `c` of the bit matrix holds every
bit with `i + j == c`. For N = 8 the column heights are 1, 2, ..., 8, ..., 2, 1.
A two-term unit puts both products' bits into the same columns. Its heights are
2, 4, ..., 16, ..., 4, 2, and the matrix is 2N+1 = 17 columns wide to hold the
carry of the sum.

### Subtraction

The real part needs `xa*ya - xb*yb`. The reference circuits handle only positive
operands and only show the adding form, so this design adds a subtracting form of
its own. It stays inside the merged matrix:

* The second array uses NAND gates, so it contributes `sum ~(a[i]&b[j]) 2^(i+j) = (2^N-1)^2 - xb*yb`.
* The constant `-(2^N-1)^2 mod 2^(2N+1)` joins the matrix as one extra bit in each
  column where that constant has a one. For N = 8 the constant is `0x101FF`: bits
  0 to 8 and bit 16.
* The matrix is summed modulo `2^(2N+1)`. The result is the exact two's complement
  difference, because `|xa*ya - xb*yb| <= (2^N-1)^2 < 2^(2N)`.

The real unit therefore has a slightly different adder count from the imaginary
unit. Its delay is the same: six stages at N = 8.

## The reduction network (`dadda_reducer`, `dadda_pkg`)

This is the core of the design and the least obvious part.

**Height limits.** Let `d_1 = 2` and `d_j = floor(3 * d_(j-1) / 2)`. That gives
2, 3, 4, 6, 9, 13, 19, 28, ... If the tallest column has `h` bits, the network has
one stage for each `d_j < h`. Taking the limits from the largest down, each stage
brings every column to at most its limit. The last stage leaves at most two rows.

| matrix | tallest column | stages (limits)       |
|--------|----------------|-----------------------|
| 8x8 multiplier | 8      | 4 (6, 4, 3, 2)        |
| two 8x8 terms  | 16     | 6 (13, 9, 6, 4, 3, 2) |
| two 12x12 terms| 24     | 7 (19, 13, ..., 2)    |

**One stage.** Columns are handled from least to most significant. Column `c`
starts the stage with `h` bits and also receives `cin` carries from the adders
of column `c-1` in the same stage. If `h + cin` exceeds the limit `d` by `e`,
the column needs adders:

* a full adder takes three bits and leaves one sum, removing two;
* a half adder takes two bits and leaves one sum, removing one.

Each adder sends its carry to column `c+1`. An adder only takes bits that were
present at the start of the stage, never a carry produced in the same stage. So
each stage costs exactly one adder delay. The elaboration checks that every
column has enough bits for its adders and that at most two rows remain. If not,
it stops with an error.

**Placement rule** (`FA_FIRST`):

* `FA_FIRST = 0`, Dadda's standard rule: `floor(e/2)` full adders, plus one half
  adder if `e` is odd. An 8x8 multiplier gets 35 full and 7 half adders (42
  modules), the classic count.
* `FA_FIRST = 1` (default in the two-term unit): `ceil(e/2)` full adders, which
  may overshoot the limit by one. If the column lacks the bits for that, it falls
  back to the standard split. For the 8-bit two-term unit this gives exactly the
  reference totals: 97 full and 7 half adders in six stages. At 12 bits it gives
  252 adder modules (241 full, 11 half), matching the reference 12-bit comparison.
  The empirical formula `2N^2 - 3N` gives 104 and 252.

The reference drawing splits the 8-bit network into stages of 6, 22, 22+4, 22+2,
13+1 and 12 adders (full+half). This rule gives 6, 22, 22+4, 21+2, 14 and 12+1:
the same totals and depth, with one adder placed one stage differently.

**How the hardware is generated.** `dadda_pkg::build_schedule(...)` is a constant
function that runs the whole reduction once. It returns a table with one entry per
matrix and column: the column height, and the full and half adders placed there.
`dadda_reducer` creates one generate scope `g_lvl[l]` per matrix, holding `col[c]`, a packed vector of
that column's bits. In each scope it places the adders that scope's column
counts call for. Rows in the next matrix's column are ordered:

1. full-adder sums
2. half-adder sums
3. bits passed down unchanged
4. carries arriving from column `c-1`

Unused rows are tied to 0. The result is a plain netlist of `full_adder` and
`half_adder` instances with no behavioural addition in it. `NUM_FA`, `NUM_HA`
and `NUM_STAGES` are exported as localparams, and the testbenches check them.

Counters larger than three inputs are not used. Building the tree directly from
full and half adders is the cheaper method the design is based on.

## Carry lookahead adder (`cla_adder`)

This adder sums the two rows. Each bit has a generate `a&b` and a propagate `a^b`.
The bits are cut into blocks of `BLK` bits (default 5). Each block has a group
generate and a group propagate, written as flat AND-OR terms. A second lookahead
level computes each block's carry-in from the lower blocks' group signals and
`cin`. Inside a block, each bit's carry is again a flat AND-OR of that block's
terms. No carry ripples from bit to bit.

In a two-term unit the adder is 2N bits wide (16 for N = 8). Its carry out forms
result bit 2N. In the adding unit, column 2N of the reduced matrix is empty. In the
subtracting unit it holds the constant's top bit and possibly carries. Those bits
are added to the carry out with an XOR, since the sum is taken modulo 2^(2N+1).

## Top level: `merged_complex_multiplier`

| port        | dir | width  | meaning |
|-------------|-----|--------|---------|
| `clk`       | in  | 1      | clock |
| `rst_n`     | in  | 1      | synchronous reset, active low |
| `in_valid`  | in  | 1      | operands valid this cycle |
| `x_re`, `x_im`, `y_re`, `y_im` | in | N | unsigned operands |
| `out_valid` | out | 1      | result valid |
| `p_re`      | out | 2N+1   | real part, two's complement |
| `p_im`      | out | 2N+1   | imaginary part, unsigned |

The registers are this design's own choice; the reference describes only the
combinational arithmetic. Operands are captured when `in_valid` is high. The
merged arithmetic then has one full clock cycle, and the results are registered.
A result therefore appears two cycles after its operands. A new operand set can
be accepted every clock, with no stalls. Reset clears both valid bits, so
operands in flight at reset are dropped. The critical path is one NAND/AND gate,
six adder delays and a 16-bit two-level lookahead adder (N = 8). The reference
design targets a 10 MHz multiplication rate.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `merged_complex_multiplier` | `N` | 8 | operand width |
| `two_term_mult_adder` | `N`, `SUBTRACT`, `FA_FIRST`, `CLA_BLK` | 8, 0, 1, 5 | width, difference instead of sum, placement rule, lookahead block size |
| `dadda_reducer` | `N`, `TERMS`, `W`, `CONST`, `FA_FIRST` | 8, 2, 2N+1, 0, 1 | width, number of stacked products, matrix width (sum is mod 2^W), constant-bit row, rule |
| `cla_adder` | `WIDTH`, `BLK` | 16, 5 | width, block size |
| `bit_product_array` | `N`, `INVERT` | 8, 0 | width, NAND instead of AND |

The schedule functions handle matrices up to 128 columns wide (`dadda_pkg::MAXW`).

## Verification

Each testbench checks its results against values computed in the testbench. It
prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_full_adder`, `tb_half_adder` | all input combinations |
| `tb_bit_product_array` | every bit of the AND and NAND arrays; the NAND array's weighted sum equals `(2^N-1)^2 - a*b` |
| `tb_cla_adder` | 16 bits/5-bit blocks, 15/5 and 24/4; corner cases and 5000 random sums |
| `tb_dadda_reducer` | 8x8 multiplier over all 65536 operand pairs; two-term 8- and 12-bit reductions with and without constant bits; adder and stage counts (35+7 in 4 stages; 97+7 in 6; 110; 252) |
| `tb_two_term_mult_adder` | sum and difference at N = 8 and N = 12, corners plus 20000 random operand sets; 97+7 adders in 6 stages |
| `tb_merged_complex_multiplier` | end to end at the default N = 8: 20000 cycles of random operands with idle cycles and a reset in flight. It checks every result and its two-cycle latency, and that no result appears that was not requested. It counts back-to-back issue, idle cycles, negative, zero and all-ones cases, and use of the top bit of `p_im`, and fails if any never occurs. |
| `tb_merged_complex_multiplier_12bit` | the same at N = 12 |

To run one with Verilator (from the repository root):

```
verilator --binary --timing --assert -Wall -Wno-fatal -Irtl \
  rtl/dadda_pkg.sv rtl/*.sv tb/tb_merged_complex_multiplier.sv \
  --top-module tb_merged_complex_multiplier
./obj_dir/Vtb_merged_complex_multiplier
```

Every testbench simulates in well under a second; most of the time goes to
Verilator's C++ build.

## Departures and limits

* **Unsigned operands only.** The reference notes that correction terms can be
  added to the bit matrix for two's complement operands, but does not give them.
  They are not implemented.
* **Subtraction** in the real part (NAND array plus constant row) is this design's
  own construction; see above.
* **Per-stage adder split** differs from the reference drawing by one adder in
  stages 4 to 6. Totals and depth match.
* **Lookahead adder gate counts** were not tuned to the reference's figures (for
  example 450 and 485 two-input gates for 23- and 24-bit adders). The 5-bit block
  size is kept at 16 bits, so the top block is one bit wide.
* **Clocking, valid handshake and reset** are additions; the arithmetic itself is
  purely combinational.
* The conventional four-multiplier structure is only a point of comparison and is
  not included. `dadda_reducer` with `TERMS = 1` and `FA_FIRST = 0` yields its
  component multiplier if one is wanted.
