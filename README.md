# Series-expansion double precision divider

A fully pipelined IEEE-754 binary64 divider, `Q = X / Y`, that takes a new
operand pair on every clock. It needs no digit recurrence and no
Newton-Raphson iteration. The mantissa quotient comes from a short Taylor
series of the divisor's reciprocal, seeded by a small table. The series is
evaluated with *partial block multipliers*: 17x17 block multipliers that
leave out the few low-order block products that cannot reach the 53 bits
that matter.

Two datapaths are provided and selected by the parameter `M_BITS` of the
top module `fp_div`:

| `M_BITS` | table            | 17x17 multipliers | latency (clocks) |
|----------|------------------|-------------------|------------------|
| 9 (default) | 256 x 53 bit  | 28                | 29               |
| 13       | 4096 x 53 bit    | 25                | 26               |

Results are within 2 ulp of the correctly rounded quotient. They are not
correctly rounded. In 5 million random divisions the mean distance was
0.28 ulp (m = 9) and 0.32 ulp (m = 13).

## The idea

Write the divisor mantissa as `y = a1 + a2`. Here `a1` is its leading `m`
bits, hidden one included, and `a2` is the rest, so `a2 < 2^-(m-1)`. A
table holds `a1^-1`. With `t = a1^-1 * a2`, which is also below
`2^-(m-1)`:

    x / y = x * a1^-1 * (1 - t + t^2 - t^3 + ...)

Every extra power of `t` adds `m-1` leading zeros. So a few terms reach
double precision: seven terms for m = 9 and five for m = 13. The terms
are grouped so that only a few multiplications are needed:

    m = 9 :  q = x*a1^-1 - x*a1^-1 * beta,  beta = (t - t^2) * (1 + t^2 + t^4)
    m = 13:  q = x*a1^-1 - x*a1^-1 * beta,  beta = (t - t^2) * (1 + t^2)

Because of the leading zeros, most products are only 51 bits wide, and
`alpha = 1 + t^2 (+ t^4)` has a top 17-bit block that is almost exactly
a power of two. A bigger `m` means fewer terms and multipliers but a table
that grows as `2^(m-1)`. The two sizes here sit at either end of that
trade-off.

## Datapath stages

m = 9 (`mant_div_m9`). The number in brackets is the latency in clocks.

| stage | work | unit |
|-------|------|------|
| 1 | `a1^-1` from the 256-word table | `recip_rom` (1) |
| 2 | `x*a1^-1` and `t = a1^-1*a2` | `pbm53` (5), `pbm51` (5) |
| 3 | `t^2` | `pbm51_sq` (4) |
| 4 | `t^4`, and `d = t - t^2` | `sq34` (3), `add_sub_pipe` subtract (2) |
| 5 | `alpha = 1 + t^2 + t^4` | `add_sub_pipe` add (2) |
| 6 | `beta = alpha * d` | `pbm51_reduced` M=9 (5) |
| 7 | `x*a1^-1*beta` | `pbm51` (5) |
| 8 | `q = x*a1^-1 - x*a1^-1*beta` | `add_sub_pipe` subtract (2) |

m = 13 (`mant_div_m13`) works the same way with these changes:

- `t^4` is dropped.
- `alpha = 1 + t^2` is formed by placing `t^2` below a leading one. No adder
  is needed, because `t^2 < 2^-24`.
- The stages are: table (1), the two products (5), square (4),
  subtraction and append (2), reduced product (5), product (5),
  subtraction (2).

Operands that skip stages travel through `pipe_delay` registers. The
stages therefore line up, and the datapath latency is 27 (m = 9) or 24
(m = 13) clocks.

### Fixed-point formats

This is the part that needs care when changing the RTL. Every quantity is
an unsigned integer with an implied weight. The known leading zeros are
cut off before each 51-bit multiplier and added back through the weight.
For m = 9 (LZ = 8; for m = 13 read LZ = 12):

| quantity | bits | weight | note |
|----------|------|--------|------|
| `x` | 53 | 2^-52 | 1.52, hidden one |
| `a1^-1` | 53 | 2^-53 | 0.53; word 0 (a1 = 1) stored as all ones |
| `a2` into the multiplier | 51 | 2^-(51+LZ) | fraction bits below a1, zero padded |
| `t` for the subtraction | 60 | 2^-(60+LZ) | product bits [101:42] |
| `t` into the squarer | 51 | 2^-(51+LZ) | product bits [101:51] |
| `t^2` into `sq34` | 34 | 2^-50 | top 34 bits after 16 leading zeros (m = 9) |
| `alpha` | 60 / 51 | 2^-59 / 2^-50 | 1.59 / 1.50 |
| `d = t - t^2` | 60 / 51 | 2^-(60+LZ) / 2^-(51+LZ) | |
| `beta` | 51 | 2^-(51+LZ) | product bits [100:50] |
| `x*a1^-1` | 60 / 51 | 2^-59 / 2^-50 | 60 bits to the last subtraction, 51 to the multiplier |
| `q` | 60 | 2^-59 | 1.59, in (0.5, 2) |

Each module header repeats the table for its own case. An immediate
assertion in both datapaths checks that `alpha` has the form the reduced
multiplier relies on whenever it is valid. For m = 9 that form is
`1.<15 zeros>X...`, and for m = 13 it is `1.<24 zeros>...`.

## Partial block multipliers

All multipliers cut 51-bit operands into three 17-bit blocks, `{U, M, L}`.
Of the nine block products, `L*L`, `L*M` and `M*L` are left out. Together
they are worth less than `2^52` in a 102-bit product. The six that remain
are summed in three chains, `U*U`, `U*M + M*U` and `U*L + M*M + L*U`,
17 bits apart.

- `pbm53` adds a 2-bit top block to each 53-bit operand. Its products
  with the 2-bit blocks are small (2x17, 2x2) and need no hard
  multiplier. It uses six 17x17 products.
- `pbm51` uses six 17x17 products.
- `pbm51_sq` squares. It forms `U*M` and `U*L` once and doubles them, so
  four multipliers are enough.
- `sq34` is an exact two-block squarer with three multipliers.
- `pbm51_reduced` expects a first operand whose top block is `1.<15 zeros>X`
  (M = 9) or `1.<16 zeros>` (M = 13). The three products with that block
  become a shift plus an AND-gated add, which leaves three multipliers.

Every multiplier truncates, so the datapath error always has the same
sign, towards a smaller quotient. The three PBM sizes have latencies of
5, 4 and 3 clocks. The stage split inside each multiplier (operand
register, block products, chain sums, adder tree) is this design's own.
It is written as plain `*` on 17-bit slices, so a synthesis tool can map
each product to a DSP or multiplier block.

## Around the mantissa

- **Pre-processing** (`fp_preproc`, 1 clock) unpacks both operands and
  decides the special cases from the operands alone:
  - a NaN operand gives a quiet NaN;
  - 0/0 and inf/inf give NaN and raise `invalid`;
  - a signalling NaN operand also raises `invalid`;
  - inf/finite gives inf;
  - finite/inf gives 0;
  - non-zero/0 gives inf and raises `div_by_zero`;
  - 0/non-zero gives 0.

  An exponent field of zero counts as zero, so subnormal operands are
  flushed.
- **Sign and exponent** (`sign_exp`) computes `Sx ^ Sy` and `Ex - Ey`.
  The two biases cancel. Both are delayed to meet the mantissa quotient.
- **Rounding** (`fp_round`) finds the rounding position from the leading
  bit. For `q >= 1` it keeps bits [59:7], and otherwise [58:6] with the
  exponent lowered by one. It then rounds to nearest, ties to even, from
  the guard, round and sticky bits, with a 54-bit add.
- **Normalisation** (`fp_normalize`, output register):
  - a carry out of rounding shifts the mantissa right and raises the
    exponent;
  - the bias is added back;
  - `e >= 2047` gives inf and raises `overflow`;
  - `e <= 0` gives zero and raises `underflow` (no subnormal results);
  - the special class from pre-processing replaces the value.

## Interface and timing

```
fp_div #(.M_BITS(9)) (
  input  clk, rst, in_valid,
  input  fpdiv_pkg::fp64_t   x, y,      // {sign, exp[10:0], frac[51:0]}
  output out_valid,
  output fpdiv_pkg::fp64_t   q,
  output fpdiv_pkg::status_t status     // {invalid, div_by_zero, overflow, underflow}
);
```

- All registers clock on the rising edge.
- A pair taken with `in_valid` on an edge comes out with `out_valid` 29
  edges later (26 for `M_BITS = 13`): 1 pre-processing, 27/24 datapath,
  1 output.
- There is no back-pressure, and the throughput is one division per
  clock.
- `rst` is synchronous and clears only the valid bits.
- An assertion in `fp_div` checks that `out_valid` trails `in_valid` by
  exactly the latency.

## How far it can be trusted

Each unit has its own self-checking testbench in `tb/`. Each one compares
against values computed independently:

- multipliers against the exact product minus the dropped blocks;
- the table against `round(2^53 / a1)`;
- rounding against an integer comparison with the half-ulp;
- the mantissa datapaths against exact integer division, within 2 ulp of
  the quotient's binade before rounding;
- the whole divider against the simulator's own IEEE double division.

`tb_fp_div` and `tb_fp_div_m13` each run 5 million random operand pairs
plus directed cases. They cover every special class, overflow, underflow,
rounding carry, quotients below one, the saturated table word, the
largest `a2`, bubbles and back-to-back issue. They also check the latency
of every result.

Measured accuracy against the correctly rounded quotient:

| | m = 9 | m = 13 |
|-|-------|--------|
| exact | 72 % | 69 % |
| mean distance | 0.28 ulp | 0.32 ulp |
| max distance | 2 ulp | 2 ulp |

The original design reports an average error of 0.5 ulp and a maximum of
2 ulp for both sizes, so the measured error is within those bounds. The
error analysis behind the 2 ulp bound counts three parts before rounding:

- up to 0.5 ulp from truncating `x*a1^-1`;
- up to 1 ulp from the error in `beta`, multiplied by `x*a1^-1`;
- another 0.5 ulp from rounding.

The table's word 0 (below) adds to the first part.

## Where this RTL departs from, or adds to, the design it follows

- **Latency variants.** Only the 29-clock (m = 9) and 26-clock (m = 13)
  pipelines are built. The 31- and 36-clock m = 9 versions only add
  pipeline registers at places that are not specified.
- **Table word 0.** `a1 = 1` has a reciprocal of exactly 1, which a 0.53
  word cannot hold. It is stored as `1 - 2^-53`. This is the largest
  single error source, worth up to about 1 ulp before rounding.
- **Width of `x*a1^-1`.** It is carried with 60 bits into the final
  subtraction. Cutting it to 53 bits right after the multiplier would add
  up to a further ulp of error.
- **Width into rounding.** All 60 bits of the final subtraction go to
  rounding. In the original, the top-level diagram labels this path 60
  bits, while the datapath diagram labels it 54 bits. With 60 bits, the
  guard, round and sticky bits come from real quotient bits.
- **Bits kept between stages.** Which product bits pass between stages,
  the adder split inside the two-stage adders, and the stage split inside
  the multipliers are this design's own choices.
- **Status flags.** The flag set, ties-to-even, subnormal flushing and
  the overflow/underflow results are this design's own choices.
- **DSP mapping.** The FPGA-specific mapping is not written out: DSP48
  cascades, and the cheaper 24x17 partitioning for 25x18 DSP blocks. The
  RTL is generic and leaves that mapping to synthesis.

## Files and simulation

`rtl/` holds one module or package per file:

- `fpdiv_pkg` holds the shared types and constants.
- `fp_div` is the top.
- The units are `fp_preproc`, `sign_exp`, `mant_div_m9`, `mant_div_m13`,
  `recip_rom`, `pbm53`, `pbm51`, `pbm51_sq`, `sq34`, `pbm51_reduced`,
  `add_sub_pipe`, `fp_round`, `fp_normalize` and the helper `pipe_delay`.

The table is computed at elaboration, so no data files are needed.

`tb/` holds one testbench per unit (`tb_<unit>`), the full-divider tests
`tb_fp_div` (default parameters) and `tb_fp_div_m13`, and `tb_mant_div`
for both datapaths. Each testbench prints
`TB_RESULT checks=N failures=M`.

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/fpdiv_pkg.sv tb/tb_fp_div.sv --top-module tb_fp_div -o sim
./obj_dir/sim
```

The full-divider test takes a few seconds. To shorten it, lower `NRAND` at
the top of the testbench. To build the other datapath, set `M_BITS = 13`
on `fp_div`. The table then grows to 4096 words.
