# Parallel MSD array multiplier with digit-decomposition planes

This design multiplies two whole arrays of numbers element by element in one
pass, with no carry chain anywhere in the datapath. It does this by combining
two ideas:

* **Modified signed-digit (MSD) numbers.** These are radix-2 numbers whose
  digits are -1, 0 or 1. A value has many spellings. For example,
  19 = 10011 = 1010(-1) = 101(-1)(-1). This redundancy lets two numbers be
  added in a fixed, small number of steps, each of which looks at no more
  than two neighbouring digit positions.
* **Digit-decomposition planes (DDP).** An M x N array of W-digit numbers is
  stored as three M x N x W bit planes, one per digit value (1, 0, -1). At
  every pixel and digit position exactly one of the three planes is set. All
  the arithmetic is written as AND/OR/NOT between whole planes, so every
  number in the array is processed at once.

The architecture comes from an optical computer, where the planes are light
patterns on spatial light modulators and AND/OR are done by masking and
superimposing beams. This RTL keeps the same plane-level logic as a
synthesizable, fully parallel combinational datapath, followed by one output
register.

## Number format

`msd_pkg` defines one digit as

```systemverilog
typedef struct packed { logic p1; logic z0; logic m1; } ddp_digit_t;
```

`p1`, `z0` and `m1` are the three plane bits for the digit values 1, 0 and
-1, and exactly one of them is set. An operand array is
`ddp_digit_t [M-1:0][N-1:0][ND-1:0]`: index `[i][j][d]` is digit `d`
(weight 2^d) of the number at row `i`, column `j`. So `a[i][j][d].p1` is one
pixel of the "1" plane. All-zero or multi-hot digits are illegal. An
assertion on the top module flags them on the input.

Example: -5 as 4 digits is `0,-1,0,-1` (MSB first). Its LSB digit is `DDP_MONE`
(`m1`=1), digit 1 is `DDP_ZERO`, and so on. `msd_pkg` also contains
`ddp_encode`, `ddp_decode` and `ddp_valid` helpers, which the assertions and
testbenches use.

## Phase 1: partial products (DSS channels)

A product of two digits from {-1,0,1} is again such a digit, so partial
products need no carries. The single-digit table gives three groups:

| operand digit pair        | product |
|---------------------------|---------|
| (1,1), (-1,-1)            | 1       |
| any pair holding a 0      | 0       |
| (1,-1), (-1,1)            | -1      |

In plane form (`pp_gen`):

```
PP1  = A1 & B1 | A-1 & B-1
PP0  = A0 | B0
PP-1 = ~(PP1 | PP0)
```

The -1 plane is made as the complement of the other two. This is the cheap
form in the optical scheme, because any DDP plane is the complement of the
other two superimposed. An assertion checks it against the direct rule
`A1 & B-1 | A-1 & B1`.

The multiplier has one **duplication-shifting-superimposing (DSS) channel**
per multiplier digit, so ND channels in all (`dss_channel`). Channel k works
on a 2·ND-digit frame:

* It shifts the multiplicand planes k positions towards the MSB (`AA_k`).
* It copies multiplier digit k of every number across the ND positions the
  shifted multiplicand occupies (`BB_k`).
* It puts DDP zeros everywhere else.

`pp_gen` on `AA_k`, `BB_k` then gives PP_k = A · b_k · 2^k, already aligned.
All ND channels run in parallel.

## Phase 2: two-step carry-free addition

`msd_adder` adds two arrays of W-digit MSD numbers and returns W+1 digits.
This is the part of the design that needs the most explanation.

**Step 1** looks at each digit pair sum x_i + y_i, which lies in {-2,...,2}. It
rewrites the sum as 2·t_{i+1} + w_i, where t is a transfer to the next
position and w is an interim weight digit. For sums of ±1 there are two ways
to split, and the choice depends on the pair one position lower:

| x_i + y_i | lower pair holds no -1 | t_{i+1} | w_i |
|-----------|------------------------|---------|-----|
| 2         | –                      | 1       | 0   |
| 1         | yes                    | 1       | -1  |
| 1         | no                     | 0       | 1   |
| 0         | –                      | 0       | 0   |
| -1        | yes                    | 0       | -1  |
| -1        | no                     | -1      | 1   |
| -2        | –                      | -1      | 0   |

The lowest position always counts as "lower pair holds no -1".

**Step 2** forms s_i = w_i + t_i, and no carry can arise here:

* If pair i-1 holds no -1, its sum is in {0,1,2}, so t_i ∈ {0,1}. Position i
  then chose w_i ∈ {-1,0}.
* Otherwise pair i-1 holds a -1, its sum is in {-2,-1,0}, so t_i ∈ {-1,0}.
  Position i then chose w_i ∈ {0,1}.

Either way w_i + t_i ∈ {-1,0,1}. An assertion in `msd_adder` checks that
w_i and t_i never have the same non-zero sign.

Both steps are plain AND/OR formulas on the planes, written out in
`msd_adder.sv`. Because s_0 = w_0 and w_0 is never +1, the `p1` bit of
result digit 0 is a constant 0. Synthesis reports it as a constant output.

## Accumulation tree and result width

`msd_adder_tree` adds the ND partial-product arrays pairwise, using ND-1
adders in L = ceil(log2 ND) levels. If a level has an odd number of operands,
the last one skips that level. The tree is generic: all of its nodes are
W+L digits wide. The transfer out of an adder's top position is provably zero
there and is dropped, and an assertion checks this.

The top module narrows the result further. PP_k has non-zero digits only at
positions k..k+ND-1, and each adder level can raise the top non-zero position
by at most one. So no product digit can land above position 2·ND-2+L. The
product is therefore delivered in

    WZ = 2·ND - 1 + ceil(log2 ND) = 2·ND + beta,  beta = ceil(log2 ND) - 1  (ND >= 2)

digits. The digit(s) in between are checked to be zero.

For the default ND = 4 this gives 9 digits (beta = 1), and the top digit is
really needed: a product such as 225 can come out with a non-zero digit 8.
Exhaustive enumeration of all operand pairs shows the bound is exact for
ND = 2 and 4. For ND = 3, 5 and 6 it leaves one digit that is always zero.
The bound was kept because it is provable for every ND.

## Top module `msd_multiplier`

| port        | dir | width                        | meaning                                  |
|-------------|-----|------------------------------|------------------------------------------|
| `clk`       | in  | 1                            | clock                                    |
| `rst_n`     | in  | 1                            | synchronous reset, active low            |
| `in_valid`  | in  | 1                            | `a`, `b` hold an operand pair            |
| `a`, `b`    | in  | `ddp_digit_t [M][N][ND]`     | multiplicand and multiplier arrays       |
| `out_valid` | out | 1                            | `z` holds the product of the last pair   |
| `z`         | out | `ddp_digit_t [M][N][WZ]`     | product array                            |

Parameters are `M` = 10, `N` = 2 and `ND` = 4. This is the size of a worked
example of this architecture: 10 x 2 arrays of 4-digit numbers in
-15..15, giving 9-digit products.

Timing:

* The datapath from `a`/`b` to the result register is combinational. Its
  depth is one partial-product gate level plus L two-step adders.
* `z` and `out_valid` appear one clock after `in_valid`. A new pair can be
  accepted every clock.
* `z` holds its value while `in_valid` is low.
* Reset clears `out_valid` and sets `z` to all DDP zeros.

The clock, reset, valid flags and output register belong to this design. The
all-optical original has no clocking.

The default top synthesizes to about 9.7k single-bit gates plus 521
flip-flops.

## Where this RTL departs from or fills in the source architecture

* **Two-step adder rules.** The source architecture names a parallel
  two-step MSD adder but does not give its rules. The table above is the
  standard two-step MSD addition with a one-position lookahead.
* **Partial-product formulas.** They follow the single-digit table above,
  with the -1 plane built as a complement, as in the optical version.
* **Result width (beta).** The source gives only "2n + beta, beta growing with
  the number of channels" and beta = 1 for 4 channels. The formula above
  reproduces that case and stays safe for any ND.
* **Channel numbering.** Channels are numbered 0..ND-1 by the weight of their
  multiplier digit.
* **Multiplier digit copies.** Each channel copies its multiplier digit only
  over the span of the shifted multiplicand. Elsewhere the zero multiplicand
  already forces a zero product.
* **Optical parts.** The light source, spatial light modulators, detector
  arrays, mirrors and beam splitters/combiners have no counterpart here. Their
  logical roles are holding a plane, complementing it, and OR-ing planes by
  superimposing them. These are ordinary signals and gates in the RTL.

## Files

| file                         | contents                                          |
|------------------------------|---------------------------------------------------|
| `rtl/msd_pkg.sv`             | `ddp_digit_t`, constants, encode/decode helpers   |
| `rtl/pp_gen.sv`              | plane-level single-digit product                  |
| `rtl/dss_channel.sv`         | shift/duplicate + `pp_gen` for one multiplier digit |
| `rtl/msd_adder.sv`           | two-step carry-free MSD array adder               |
| `rtl/msd_adder_tree.sv`      | binary tree of `msd_adder`s                       |
| `rtl/msd_multiplier.sv`      | top: ND channels, tree, output register           |
| `tb/*_tb.sv`                 | one self-checking testbench per module, plus `msd_multiplier_sizes_tb` |
| `tb/msd_mult_checker.sv`     | per-configuration harness used by `msd_multiplier_sizes_tb` |

## Verification

Every testbench computes its expected values from integer arithmetic on the
digit values it drove, never from the DUT's logic. Each one ends by printing
`TB_RESULT checks=<n> failures=<n>`, and each has a watchdog.

* `pp_gen_tb` checks every digit of random arrays and confirms all nine digit
  pairs occurred.
* `dss_channel_tb` checks all four channels. Each PP_k must equal A·b_k·2^k,
  with zeros outside the channel's span.
* `msd_adder_tb` uses random and extreme operands (all 1, all -1,
  alternating). It checks the value and validity of every sum, and counts
  each row of the transfer/weight table, failing if any row is never used.
* `msd_adder_tree_tb` runs the default 4-operand tree plus 3- and 5-operand
  trees, which exercise the pass-through of an odd operand.
* `msd_multiplier_tb` runs the default configuration end to end, in three
  parts:
  * the worked example's two 10 x 2 arrays of values in -15..15;
  * 400 random pairs of redundant operands with random idle gaps, during
    which the inputs keep changing;
  * checks of reset, the one-clock latency and holding of the result.

  It counts the three digit-product groups, negative and zero products, idle
  cycles and use of the guard digit, and fails if any of these never
  happened.
* `msd_multiplier_sizes_tb` runs the multiplier with 3, 5 and 8 digits per
  operand.

To run one with Verilator (from the directory holding `rtl/` and `tb/`):

```sh
verilator --binary --timing --assert --top-module msd_multiplier_tb \
    -y rtl -y tb +libext+.sv rtl/msd_pkg.sv tb/msd_multiplier_tb.sv
./obj_dir/Vmsd_multiplier_tb
```

Each testbench builds in about a minute and runs in well under a second.

## Changing the size

`M`, `N` and `ND` are free parameters of `msd_multiplier`. `WZ` follows from
`ND`. The logic grows roughly as M·N·ND² for the partial products, plus
M·N·ND·(2·ND) for each of the ND-1 adders. Operands wider than about 15 digits
overflow the `int` arithmetic in `msd_multiplier_tb`. `msd_mult_checker` uses
`longint`, so it works up to about 31 digits.
