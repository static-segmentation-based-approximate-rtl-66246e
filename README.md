# Static segmented approximate MAC

This is a multiply-accumulate unit, `y ≈ a × b + c`, that uses only a 4 × 4
multiplier to form the product of two 8-bit operands. Each operand is cut down
to one 4-bit *segment* before it is multiplied. The segment is the low nibble
when that nibble holds the whole value. Otherwise it is the high nibble, and
the four bits below it are dropped. Because both segments sit at a known
weight, the addend `c` can be split at the same boundary. Its upper part is
added to the short product in a single 8-bit carry-propagate adder. Its lower
part goes around the adder and is placed below the sum. The only error comes
from the dropped low bits of a large operand. The addition of `c` is always
exact, and the whole result is exact when both `a` and `b` are below 16.

The unit is purely combinational. It has no clock, reset or handshake. A new
result is ready one propagation delay after the inputs change.

## Datapath

```
 a[7:0] ──► ssm_operand_mux ──a_ssm[3:0]──┐
               │ a_hi                     ▼
 b[7:0] ──► ssm_operand_mux ──b_ssm[3:0]─► mult_mxm (4x4) ──prod[7:0]──┐
               │ b_hi                                                  ▼
               ▼                                                  cpa (8-bit, ripple)
        sel = {a_hi, b_hi} ──► c_segment ──c_ssm[7:0]─────────────────►│
               │                  ▲                                    │ {cout, sum} = Y_mac[8:0]
               │  c[7:0] ─────────┴──────────► ssmac_out_mux ◄─────────┘
               └──────────────────────────────►      │
                                                     ▼
                                                 y[16:0]
```

| module | role |
|---|---|
| `ssmac` | top level; wires the blocks below together |
| `ssm_operand_mux` | picks the low or high M-bit segment of one operand and sets its `hi` flag |
| `mult_mxm` | exact M × M array multiplier (4 × 4) |
| `c_segment` | shifts the addend right to the weight of the segmented product |
| `cpa` | W-bit ripple-carry adder built from `full_adder` cells |
| `full_adder` | one-bit full adder |
| `ssmac_out_mux` | puts the sum back at its true weight and fills in the low bits of `c` |
| `ssmac_pkg` | the select-code enum `seg_sel_e` and a helper |

## The select code and how the result is put back together

The two `hi` flags form a two-bit select code `sel = {a_hi, b_hi}`. The code
drives the addend multiplexer and the output multiplexer. Each flag that is set
means the product leaves the multiplier `N-M` bits (4 bits here) below its
true weight. The code therefore fixes a shift `s` of 0, 4 or 8 bits:

| `sel` | segments used | shift `s` | adder input from `c` | output `y` |
|---|---|---|---|---|
| 00 | low × low | 0 | `c[7:0]` | `Y_mac` |
| 01 | low × high | 4 | `c[7:4]` | `{Y_mac, c[3:0]}` |
| 10 | high × low | 4 | `c[7:4]` | `{Y_mac, c[3:0]}` |
| 11 | high × high | 8 | none (`c[7:8]` is empty, so 0) | `{Y_mac, c[7:0]}` |

Here `Y_mac = prod + (c >> s)`, which is 9 bits wide including the adder's
carry out. The output is `y = (Y_mac << s) | (c mod 2^s)`. It can also be
written without reference to the structure:

```
a' = (a < 2^M) ? a : a with its low N-M bits cleared      (same for b')
y  = a' × b' + c
```

The testbenches use this second form as their reference model. Some
consequences:

- `y` never exceeds the exact `a × b + c`. The error is an underestimate.
- The worst absolute error occurs with both operands large and their low
  nibbles at 15. It is `a·b − a'·b'`, below `2^(N-M) · (a + b)`.
- The relative error is largest when an operand only just reaches its high
  segment, for example `a = 31` becomes `a' = 16`. Over all 65,536 operand
  pairs, each with six addends, the default unit gives a mean relative error
  distance (MRED, the mean of |y − exact| / exact) of about 0.14. Its
  normalised mean error distance (NMED, the mean error divided by the largest
  exact result, 65,280) is about 0.027. `tb_ssmac` prints both numbers.

## Parameters and widths

| parameter | default | meaning |
|---|---|---|
| `N` | 8 | width of `a` and `b` |
| `M` | 4 | segment width; must satisfy `N/2 ≤ M < N` (checked by an assertion) |
| `NC` | 8 | width of `c` |

The derived widths are as follows. The adder is `WA = max(2M, NC)` bits wide.
`Y_mac` is `WA+1` bits. `y` is `WY = WA + 1 + 2(N−M)` bits, 17 at the defaults,
which holds every result without loss. A larger `M` gives a more accurate
result from a larger multiplier. `tb_ssmac_config` checks the unit at
8/5/12, 16/8/16 and 12/7/24.

## Where this RTL departs from, or goes beyond, the published design

- **Segment select rule.** The published block diagram shows each operand
  multiplexer with inputs 1 = `A[n-1:n-m]` and 0 = `A[m-1:0]`, but does not say
  what drives its select. This design uses the usual static-segmentation rule:
  the high segment is chosen when `x[N-1:M]` is non-zero.
- **Addend multiplexer codes.** The published diagram labels the addend
  multiplexer's code 11 with `C[2(n-m)-1:0]` and code 10 with
  `C[nC-1:2(n-m)]`. Its prose and its output multiplexer instead imply
  `C[nC-1:n-m]` for 01 and 10 and `C[nC-1:2(n-m)]` for 11. This design follows
  the prose and the output multiplexer. That is the only assignment for which
  `y` equals the segmented product plus `c`.
- **Separate addend segment width.** The description defines a second segment
  width `m_c` for `c`, with `NC/2 ≤ m_c < NC`, but gives it no value. Its
  diagram feeds all `NC` bits of `c` to the adder. `m_c` is not implemented.
- **Addend width.** `NC = 8` is inferred from the "same 8-bit adder" that the
  description uses. Its width is not stated directly.
- **Error compensation** is mentioned in the published design but never
  specified. It is not implemented, so the results are the uncompensated ones
  above.
- **Worked examples.** The published error table lists approximate outputs 21,
  18 and 16 for `5×4+2`, `3×6+1` and `2×7+3`. All of these operands fit in the
  low segment, so the datapath as described gives the exact values 22, 19 and
  17. No described mechanism produces the listed values. `tb_ssmac` expects
  22, 19 and 17.
- **Accumulation.** The design is described in general terms as adding each
  product to a running sum. The specified datapath, however, takes `c` as an
  external 8-bit input, narrower than `y`, and specifies no feedback register.
  No accumulator register is included. A user who wants one can register `y`
  and feed the chosen bits back into `c`.
- **Adder logic style.** The published adder uses pass-transistor full adders
  to save transistors. That choice only matters at transistor level. Here the
  full adder is written as ordinary logic, and the 8-bit adder is a ripple
  chain of those cells.
- **Signedness.** Operands are unsigned.
- **Extra output.** The select code is brought out as `sel` so that it can be
  observed. It is not part of the published interface.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=F`, and a time-based watchdog stops a run that
hangs.

| testbench | what it covers |
|---|---|
| `tb_full_adder` | all 8 input combinations |
| `tb_cpa` | all 131,072 operand/carry-in combinations of the 8-bit adder |
| `tb_ssm_operand_mux` | all 256 operand values |
| `tb_mult_mxm` | all 256 products |
| `tb_c_segment` | all addends × all select codes |
| `tb_ssmac_out_mux` | all addends × all codes × extreme and random `Y_mac` |
| `tb_ssmac` | default-size top. Checks the three worked examples. Checks every `(a, b)` pair with 0, 255, 0xA5 and three random addends. Checks that `y` never exceeds the exact result and that the select code is right. Fails if any select code, an adder carry out, or low-addend insertion never occurs. Reports MRED and NMED. |
| `tb_ssmac_config` | three non-default configurations, 100,000 random vectors each |

The whole set runs in a few seconds. To run one testbench with Verilator:

```
verilator --binary --timing --assert -y rtl rtl/ssmac_pkg.sv tb/tb_ssmac.sv \
          --top-module tb_ssmac -o sim
./obj_dir/sim
```

Use the same command with another `tb/tb_*.sv` file and its module name. The
package file must come first on the command line, and `-y rtl` lets Verilator
find the other modules.
