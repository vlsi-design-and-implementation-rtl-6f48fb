# Approximate LUT adders (LEADx, APEx) and an 8x8 approximate multiplier

Image and video processing can tolerate small arithmetic errors. This RTL
trades a little accuracy for shorter carry chains and smaller logic, using
two ideas:

1. **Split the adder.** An N-bit addition is cut at bit M. The upper
   N-M bits (the *MSP*) are added exactly. The lower M bits (the *LSP*) are
   approximate and have **no carry chain**. On an FPGA each LSP block is one
   6-input LUT, so the whole LSP costs one LUT delay.
2. **Predict the carry, then correct the sum.** Every 2-bit LSP block
   guesses its carry out from a few input bits. When the guess is wrong, the
   block saturates its two sum bits towards the guess. This keeps each error
   at 1 or 2 LSBs of the block instead of 4.

The same 2-bit approximate adder is also used inside the first reduction
layer of a Wallace-tree 8x8 multiplier.

All blocks are combinational. None has a clock or reset.

## The two 2-bit building blocks

Both blocks take `a[1:0]`, `b[1:0]` and a carry in, which is five inputs.
That fits one LUT6_2 configured as two 5-input functions.

### `aad2`: carry guessed from one input bit

The carry out is simply `cout = a[1]`, so there is no logic on the carry
path. The sum bits are chosen like this:

| carry guess vs. real carry (`a+b+cin >= 4`) | `s[1:0]` |
|---|---|
| guess is right | exact 2-bit sum |
| guess 0, real carry 1 | `11` (3 instead of 4..7) |
| guess 1, real carry 0 | `00` (4 instead of 2..3) |

Over the 32 input combinations, 8 results are wrong. Two of them are off by
2 and six are off by 1. The error probability is therefore 0.25.
`tb_aad2` checks this profile exhaustively.

### `aad1`: carry predicted from both bit pairs

`aad1` sits at bits M-1:M-2. It produces the carry into the MSP from its two
bit pairs only, ignoring its own carry in:

    cmsp = G[M-1] | (P[M-1] & G[M-2])      G = a & b, P = a ^ b

This prediction can only miss a carry, never invent one. A miss happens
when `P[M-1] & P[M-2] & cin`. In that case both sum bits are forced to 1, so
the error is exactly 1 at weight 2^(M-2). Otherwise the sum is exact.

## LEADx (`leadx`)

LEADx is the low-error adder:

    bits N-1..M   exact_adder(A_hi, B_hi, cin = cmsp)        -> S_hi, cout
    bits M-1..M-2 aad1(A, B, cin = A[M-3])                   -> S, cmsp
    bits M-3..0   (M-2)/2 x aad2, group k has cin = A[2k-1]  -> S
                  (the lowest group takes the adder's cin)

Each `aad2` passes its guessed carry to the next group. That carry is a
plain wire, the group's upper A bit, so no LSP block waits for another. The
critical path runs from A[M-2] through the carry prediction and up the MSP
carry chain to S[N-1].

Measured error at N=16, M=8 (printed by `tb_leadx`), with the eight low
bits and cin enumerated exhaustively; the upper bits do not affect the error:

- error rate 63 %
- mean |error| 12.6
- maximum |error| 72

## APEx (`apex`)

APEx is the smallest variant. It keeps `aad1` and the exact MSP. Below
them it has no logic at all:

- S[M-3:0] is the constant `1...1`.
- The carry into `aad1` is the constant 0.

Constant ones bound the error of the low bits to 2^(M-2)-1. With zeros
(truncation) the bound would be about four times larger. With a carry in of
0, `aad1` never mispredicts, so 2^(M-2)-1 (63 at M=8) is the error bound of
the whole adder. `tb_apex` checks that this maximum is reached and never
exceeded.

`apex` has no carry-in port. Its low input bits are unused by construction.

## The 8x8 approximate multiplier (`approx_mult8`)

    pp_gen          64 AND gates, pp[i][j] = b[i] & a[j]
    mult8_stage1    first reduction layer: HA, FA and six aad2 (8 -> 6 rows)
    csa_row x4      exact 3:2 carry-save layers: 6 -> 4 -> 3 -> 2 rows
    exact_adder     16-bit carry-propagate adder -> p[15:0]

### The first reduction layer

This layer is the heart of the multiplier. It is also the only place where
the approximation enters. Draw the partial products as 15 columns (weights
2^0..2^14) with heights 1,2,...,8,...,2,1. Push the dots of each column up.
Dot row k of column c then holds `pp[i][c-i]` with `i = max(0, c-7) + k - 1`.
The layer groups the dots as follows:

| columns | dot rows | element |
|---|---|---|
| 13 | 1-2 | half adder |
| 12..7 | 1-3 | full adder each |
| 10 | 4-5 | half adder |
| 9..7 | 4-6 | full adder each |
| 7 | 7-8 | half adder |
| 2-1 | 1-2 | aad2 (2x2 dots) |
| 4-3 | 1-2, 3-4 | aad2 each |
| 6-5 | 1-2, 3-4, 5-6 | aad2 each |
| 14/1, 11/4, 8/7, 6/7, 4/5, 2/3, 0/1 | (column/row) | passed through |

Each `aad2` adds two 2-bit numbers, the upper row pair as `a` and the lower
as `b`, with carry in 0. Its sum bits keep their columns. Its guessed carry
goes two columns up. Afterwards no column holds more than six bits. The
layer returns them as six 16-bit rows.

### Accuracy

The product equals `a*b` plus the errors of the six `aad2` groups. Each
group's error is -2..+2 times the weight of its low column.

Over all 65536 operand pairs (`tb_approx_mult8`):

- 41736 products are approximate.
- The mean |error| is 32.0.
- The error ranges from -74 to +228.

The largest result, 65025+228, still fits 16 bits. The result is exact
whenever an operand is 0.

Because `cout = a[1]`, a lone `1x` in the upper row of a group is treated as
a carry. Even `a*1` can therefore be approximate. This high error rate is a
property of using `aad2` with carry in 0 in the reduction tree. To change the
trade-off, replace `u_aad2` in `mult8_stage1.sv` with an exact 2-bit adder.

## Where this RTL makes its own choices

- **Sizes.** N=16 and M=8 for both adders are chosen defaults; any even M
  with 4 <= M < N works. The multiplier is fixed at 8x8 because its first
  layer is wired for that size.
- **Portable logic.** The adders are written as portable logic, not
  as instantiated LUT6_2 primitives with INIT values or vendor carry
  primitives. An FPGA tool maps them back to LUTs and the carry chain.
- **`aad1` saturation rule.** The saturate-to-ones correction of `aad1`
  is the same rule as `aad2`'s, applied to the only way its prediction can
  fail.
- **Carry into `aad1` in APEx.** It is tied to 0, which is what the error
  bound 2^(M-2)-1 requires. Tying it to 1 is a possible alternative reading.
- **Multiplier details.** The original design does not fix several points
  of the multiplier, so these are this RTL's own choices:
  - which partial-product bit sits in which dot row;
  - the carry in of the multiplier's `aad2` groups;
  - all reduction layers after the first;
  - the final adder (exact).
- **Product width.** The product is 16 bits wide.

## Files

| file | role |
|---|---|
| `rtl/aad1.sv`, `rtl/aad2.sv` | 2-bit approximate adders |
| `rtl/exact_adder.sv` | exact ripple adder (MSP, final adder) |
| `rtl/leadx.sv`, `rtl/apex.sv` | N-bit approximate adders |
| `rtl/full_adder.sv`, `rtl/half_adder.sv`, `rtl/csa_row.sv` | reduction cells |
| `rtl/pp_gen.sv`, `rtl/mult8_stage1.sv`, `rtl/approx_mult8.sv` | multiplier |
| `rtl/approx_arith_top.sv` | top: multiplier, LEADx and APEx side by side |
| `tb/approx_ref_pkg.sv` | integer reference models used by all testbenches |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

The reference models in `approx_ref_pkg` are written from the arithmetic
rules above, not from the gate structure. For example, the multiplier model
is `a*b` plus the modelled error of each 2x2 group.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
A watchdog ends a stuck run with a failure. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
        tb/approx_ref_pkg.sv tb/tb_approx_arith_top.sv --top-module tb_approx_arith_top
    ./obj_dir/Vtb_approx_arith_top

Swap in any other `tb_<module>` the same way. `-Wno-fatal` keeps the
width-extension warnings of the testbench code (and the by-design unused
low inputs of `apex`) from stopping the build.

`tb_approx_arith_top` runs the top at its default sizes with 50000 random
and corner operand sets. It counts every approximation mechanism and fails
if one never fires:

- a wrong `aad2` carry guess in LEADx;
- `aad1` saturation;
- a predicted MSP carry in LEADx and in APEx;
- a wrong APEx low part;
- a wrong multiplier group guess.

The testbenches cover the modules as follows:

- `tb_aad1`, `tb_aad2`, the full and half adder tests and `tb_approx_mult8`
  are exhaustive.
- `tb_leadx` is exhaustive at N=8/M=4, random at N=12/M=6, and at 16/8
  exhaustive over the approximate low bits with random upper bits.
- `tb_apex` is exhaustive at N=8/M=4 and random at 16/8.
