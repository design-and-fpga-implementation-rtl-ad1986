# KOM multiplier: an 8 x 8 bit Karatsuba-Ofman style combinational multiplier

This is a combinational unsigned multiplier, `finalprod = a1 * b1`, for 8-bit operands. It splits
each operand into a high and a low half and forms the four half-width products side by side. It
then joins them with a few narrow adders and a fixed shift, rather than summing eight shifted
partial products. The half-width products are built the same way, one level down:

```
kom8x8  (8 x 8)
 └─ kom_mult #(N=8)
     ├─ level 3: one kom_combine #(8)       joins four 4x4 products
     ├─ level 2: four kom_combine #(4)      each joins four 2x2 products
     └─ level 1: sixteen mult2x2            2 x 2 bit multipliers
```

With `a = aH·2^(N/2) + aL` and `b = bH·2^(N/2) + bL` the product is

```
P = aL·bL  +  (aH·bL + aL·bH)·2^(N/2)  +  aH·bH·2^N
```

All four products are computed. The well-known Karatsuba trick of getting the cross term from a
third product, (aH+aL)(bH+bL) − aH·bH − aL·bL, is **not** used here. The design is a
divide-and-conquer array multiplier in the KOM naming. Its speed comes from doing all sub-products
in parallel and from keeping every adder N bits wide rather than 2N.

There is no clock, no register and no reset. The product is valid one propagation delay after the
operands change. The top level has exactly 32 signal pins: `a1[7:0]`, `b1[7:0]` and
`finalprod[15:0]`.

## Joining four products in one stage (`kom_combine`)

This is the least obvious part of the design. One stage takes the four N-bit products and produces
the 2N-bit result with three N-bit ripple-carry adders, a shifter and a zero extension. No adder is
2N bits wide.

```
 p_hl ─┐
       ├─[N-bit adder, cin=0]── mid[N-1:0] ──[shift left by N/2]──┬─ {mid[N/2-1:0], 0..0}  (N bits)
 p_lh ─┘          │ c0                                            └─ mid[N-1:N/2]          (N/2 bits)
                  │
                  └──────────[zero extension]── {0..0, c0, mid[N-1:N/2]}  (N bits)

 p_ll + {mid[N/2-1:0], 0..0} + 0   ──► P[N-1:0],  carry c1
 p_hh + {0..0, c0, mid[N-1:N/2]} + c1 ──► P[2N-1:N]
```

- The middle sum `aH·bL + aL·bH` needs N+1 bits. The adder delivers N bits plus carry `c0`.
- Shifting by N/2 splits the middle sum. Its low half lands in the upper half of `P[N-1:0]`. Its
  high half, with `c0` above it, lands in the bottom of `P[2N-1:N]`.
- Zero extension pads `{c0, mid[N-1:N/2]}` (N/2+1 bits) to N bits, so that an N-bit adder can add
  it to `aH·bH`.
- The low adder's carry `c1` is the carry in of the high adder. That links the two halves.
- The high adder's own carry out is always 0, because the product fits in 2N bits. An assertion
  checks this. A second assertion checks that the shifter bits above N+N/2 are zero.

Worked 4-bit case: a = 0011 and b = 1001 give aH·bH = 0000, aH·bL = 0000, aL·bH = 0110 and
aL·bL = 0011. The middle sum is 0110 with c0 = 0. Shifting it by 2 gives 01|10_00. The low half
is 0011 + 1000 = 1011 with c1 = 0. The high half is 0000 + 0001 = 0001. So P = 0001_1011 = 27.
`tb_kom_combine` checks each of these values.

The shift amount is a constant, N/2. `barrel_shifter` is nevertheless a general logarithmic left
shifter, with $clog2(W) rows of 2:1 multiplexers and a 2W-bit output. Its `shamt` input is tied to
N/2, so synthesis reduces it to wiring. In the same way, the low N/2 product bits come straight
from `p_ll`, because the adder adds zeros there.

## The recursion (`kom_mult`)

`kom_mult #(N)` does not instantiate itself. It unrolls the recursion into levels, in a generate
loop:

- Level `l` works on digits of `W = 2^l` bits, and each operand has `D = N/W` such digits.
- Level `l` holds the array `prod[i][j] = a_digit(i) · b_digit(j)` for all i, j < D.
- Level 1 fills the array with `mult2x2` cells.
- Level `l > 1` fills `prod[i][j]` with a `kom_combine #(W)`. Its inputs are the four level `l-1`
  products of the digit halves: `aH·bH = [2i+1][2j+1]`, `aH·bL = [2i+1][2j]`,
  `aL·bH = [2i][2j+1]` and `aL·bL = [2i][2j]`.
- The top level has a single digit, and `prod[0][0]` is the product.

Every digit product at every level is needed. For N = 8 this builds exactly the tree above: 16
leaves, 4 four-bit stages and 1 eight-bit stage. In a simulator, the top stage of `kom8x8` is
`u_kom.g_lvl[3].g_i[0].g_j[0].g_stage.u_comb`. The stage that forms aH·bH is
`u_kom.g_lvl[2].g_i[1].g_j[1].g_stage.u_comb`.

`N` may be any power of two from 2 upwards. It has been simulated at 2, 4, 8, 16 and 32. The
logic grows as N² (4^(log2 N − 1) leaf cells), because no product is saved at any level.

## Modules

| module | parameters (default) | ports | role |
|---|---|---|---|
| `kom8x8` | none | `a1[7:0]`, `b1[7:0]` → `finalprod[15:0]` | top level, `kom_mult #(8)` |
| `kom_mult` | `N` (8) | `a`, `b[N-1:0]` → `p[2N-1:0]` | recursive KOM tree |
| `kom_combine` | `N` (8) | `p_hh`, `p_hl`, `p_lh`, `p_ll[N-1:0]` → `p[2N-1:0]` | one stage's adders, shift and zero extension |
| `full_adder_n` | `W` (8) | `a`, `b[W-1:0]`, `cin` → `sum[W-1:0]`, `cout` | ripple-carry adder |
| `barrel_shifter` | `W` (8) | `din[W-1:0]`, `shamt[$clog2(W)-1:0]` → `dout[2W-1:0]` | logarithmic left shifter |
| `mult2x2` | none | `a[1:0]`, `b[1:0]` → `p[3:0]` | 2 x 2 multiplier: AND terms and two half adders |

All modules are combinational and unsigned. There is no package, because the modules share no
types.

## What was chosen here rather than given

The architecture was given: four half-width products, three N-bit adders with carries c0 and c1, a
zero extension, the N/2 shift, 2 x 2 leaves and the 8-bit top with its port names. The following
are this implementation's own choices:

- **Adders** are ripple-carry chains of full-adder cells. Only an "n-bit full adder" with carry in
  and carry out was specified.
- **The 2 x 2 cell** is four AND terms and two half adders. Only its size was specified.
- **The shifter** is a general barrel shifter with a shift-amount input. It is used at a constant
  shift.
- **Unsigned operands.** Nothing in the architecture handles a sign.
- **Combinational, unregistered.** This matches a pin count of exactly 8 + 8 + 16 for the reference
  FPGA build, which has no clock pin.
- **Generic `N`** with level-by-level unrolling. Only N = 8 (and a 4-bit example) was defined.

There is one known departure. Internal signal traces from the reference build suggest it formed
the final result as a sum of three 16-bit terms: the shifted middle sum, `aH·bH << 8` and `aL·bL`.
That would use 16-bit adders at the top. This RTL follows the stage architecture with N-bit adders
and carries instead. The products, the four 8-bit sub-products and the 9-bit middle sum `{c0, mid}`
are the same, and the testbench compares them with the published trace values.

The reference VHDL build on a Xilinx Spartan-3 (xc3s50, speed grade −5) was reported at 21.3 ns
through 17 logic levels, 79 slices and 137 four-input LUTs. These figures describe that build. They
have not been reproduced for this RTL.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=<n> failures=<n>`, and each has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_mult2x2` | all 16 operand pairs |
| `tb_full_adder_n` | 8-bit adder, all 2^17 inputs; 3-bit copy, all inputs |
| `tb_barrel_shifter` | 8-bit, every value and shift; 16-bit, 20000 random cases |
| `tb_kom_combine` | the 4-bit worked example, step by step; every operand pair at N = 4 and 8; 20000 random at N = 16; c0 and c1 both exercised |
| `tb_kom_mult` | exhaustive at N = 2, 4, 8; random and corner cases at N = 16 and 32 |
| `tb_kom8x8` | the published operand pairs (73·195 = 14235, 73·10 = 730, 85·10 = 850, 85·20 = 1700, 12·12 = 144, 170·17 = 2890), with their published 4x4 sub-products and 9-bit middle sums; then all 65536 pairs; counts middle-sum and low-half carries in the top stage and in a 4x4 stage, and fails if either never occurs |

`tb_kom8x8` runs the top at its default size. The multiplier is combinational, so every testbench
reads results one time step after applying operands: the latency is zero cycles. The published
table lists one case as 850 × 20 = 1700. An 8-bit operand cannot hold 850, and 85 × 20 = 1700, so
that case is run as 85 × 20.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb tb/tb_kom8x8.sv --top tb_kom8x8 -Mdir obj_kom8x8
./obj_kom8x8/Vtb_kom8x8
```

Replace `kom8x8` with any other module name to run that module's testbench. To lint a module:
`verilator --lint-only -Wall -Irtl rtl/kom_mult.sv`.

To change the size, instantiate `kom_mult #(.N(16))` (or any other power of two) directly.
`kom8x8` is fixed at 8 bits, as its name says.
