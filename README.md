# Modified-lifting 9/7 DWT, one dimension, two samples per clock

This is a pipelined forward discrete wavelet transform (the CDF 9/7 wavelet of
JPEG 2000) for 8-bit samples. It takes one even/odd sample pair per clock and
delivers one low-pass coefficient `a` and one high-pass coefficient `d` per
clock.

The usual lifting implementation runs four lifting steps in a chain: predict,
update, predict, update. Each step needs results of the step before it, taken
at neighbouring positions. Here the four steps and the final scaling are
substituted into one another ahead of time. Each output then becomes a fixed
weighted sum of the input samples in a 9-sample window. No output waits for an
earlier output, so the datapath is a plain feed-forward pipeline of adders and
multipliers with no feedback. The adders are carry select adders. The
multipliers are Wallace tree multipliers.

## The equations

The lifting constants are α = −1.58613, β = −0.0529, γ = 0.882911,
δ = 0.44350 and ζ = 1.1496. With the window centred on an even sample,
`xk = x[2i+k]` for k = −4 … +4, the substitution gives:

```
a2 = x0 + αβγδ·P + βγδ·Q + (γδ + αδ + αβ)·E + (δ + β)·R
d2 = x1 + αβγ·S + βγ·T + (γ + α)·U
a  = ζ·a2

P = x-4 + 4x-2 + 6x0 + 4x2 + x4        Q = x-3 + 3x-1 + 3x1 + x3
E = x-2 + 2x0 + x2                     R = x-1 + x1
S = x-2 + 3x0 + 3x2 + x4               T = x-1 + 2x1 + x3
U = x0 + x2
```

Each product of lifting constants is multiplied by 256 and rounded. A grouped
weight is the sum of its terms, each rounded on its own. For example,
E's weight is 100 − 180 + 21. The result is eight integer coefficients:

| group | weight | stands for                |
|-------|--------|---------------------------|
| P     | 8      | 256·αβγδ                  |
| Q     | −5     | 256·βγδ                   |
| E     | −59    | 256·γδ + 256·αδ + 256·αβ  |
| R     | 100    | 256·δ + 256·β             |
| S     | 19     | 256·αβγ                   |
| T     | −12    | 256·βγ                    |
| U     | −180   | 256·γ + 256·α             |
| ζ     | 294    | 256·ζ                     |

The hardware computes

```
out_a = 294 · (256·x0 + 8P − 5Q − 59E + 100R)     ≈ 65536 · a
out_d =        256·x1 + 19S − 12T − 180U          ≈   256 · d2
```

Notes on these outputs:

- `out_d` is **not** divided by ζ. The textbook 9/7 scales the high band by
  1/ζ. To get it, divide `out_d` by 256·ζ ≈ 294.
- Both outputs are exact integers. The only error comes from rounding the
  weights to 1/256. With random and extreme 8-bit inputs, `out_a/65536` stays
  within 10.7 sample units of floating-point lifting. Most of that comes from
  the weight of P: 256·αβγδ is 8.41, rounded to 8. `out_d/256` stays within
  0.33 units of floating-point lifting. The end-to-end testbench measures and
  checks both bounds.
- Written out tap by tap, the same weights are:
  - inner sum of `a`: 186·x0 + 85·(x±1) − 27·(x±2) − 5·(x±3) + 8·(x±4)
  - `out_d`: 232·x1 − 123·(x0+x2) − 12·(x−1+x3) + 19·(x−2+x4)

  The high-pass taps sum to zero, as a high-pass filter's must. The
  testbenches compute their expected values from this per-tap form. The RTL
  uses the grouped form.

## Data flow

```
 in_even, in_odd ──► sipo_window ──► dwt_datapath ──► out_a, out_d
                     (X-4 … X+4)      8 pipeline stages
                                         ▲
 coef_rom ──► coefficient registers ─────┘
      ▲
 dwt_ctrl: loading, handshake, window fill, valid pipeline ──► in_ready, out_valid
```

**Window (`sipo_window`).** There are nine 8-bit registers, X-4 … X+4. When a
pair is taken, the window moves two places:

- The even sample `x[2k]` enters at X+4.
- The odd sample of the previous pair enters at X+3. It waited one clock in a
  holding register. The new odd sample `x[2k+1]` is not needed until the next
  pair.

After pair k the window holds `x[2k-8] … x[2k]`, centred on `x[2k-4]`. This
is exactly the data for one `a` and one `d`, both of index `i = k-2`. The
low-pass output uses all nine taps. The high-pass output uses the seven taps
X-2 … X+4.

**Datapath (`dwt_datapath`).** Every addition is a `csel_adder` and every
multiplication is a `wallace_mult`. A register follows every level of
operators:

| stage | work                                                                    |
|-------|-------------------------------------------------------------------------|
| S1    | 7 pairwise tap sums (x-4+x4, x-2+x2, x-3+x3, x-1+x1, x0+x2, x-1+x3, x-2+x4) |
| S2    | first group terms: E, T, and the parts of P, Q and S                    |
| S3    | complete P, Q and S                                                     |
| S4    | 7 group × weight products                                               |
| S5    | partial sums; `d` adds 256·x1                                           |
| S6    | one sum for `a` and one for `d`                                         |
| S7    | `a` adds 256·x0                                                         |
| S8    | `a` × 294; `d` is delayed                                               |

- Sums shared by the two outputs are formed once in S1 and reused: x-1+x1 is
  R and also part of Q, and x0+x2 is U and also part of S.
- The small constant factors inside the groups (2, 3, 4, 6) are shifts and
  additions.
- Intermediate values are 20-bit two's complement. This holds the worst cases
  860·255 for `a` and 816·255 for `d`.
- `out_a` is 30 bits wide and `out_d` is 20 bits wide.

**Coefficients (`coef_rom`, `dwt_ctrl`).** The eight weights live in a small
read-only memory and are read only once:

1. After reset the control unit presents the addresses 0 … 7 on successive
   clocks.
2. The memory answers one clock later.
3. A write strobe copies each word into the coefficient registers. The
   multipliers read their weights from these registers.

The loading takes 10 clocks after reset is released. Meanwhile `in_ready` is
low. After that `in_ready` stays high, and the memory is not touched again.

## Interface and timing (`dwt1d_top`)

| port        | dir | width | meaning                                        |
|-------------|-----|-------|------------------------------------------------|
| `clk`       | in  | 1     | clock                                          |
| `rst_n`     | in  | 1     | asynchronous reset, active low                 |
| `in_valid`  | in  | 1     | a pair is offered                              |
| `in_first`  | in  | 1     | the offered pair is the first of a row         |
| `in_even`   | in  | 8     | `x[2k]`, unsigned                              |
| `in_odd`    | in  | 8     | `x[2k+1]`, unsigned                            |
| `in_ready`  | out | 1     | the coefficients are loaded; pairs are taken   |
| `out_valid` | out | 1     | `out_a`/`out_d` hold a result                  |
| `out_a`     | out | 30    | ≈ 65536·a, two's complement                    |
| `out_d`     | out | 20    | ≈ 256·d2, two's complement                     |

- A pair is taken on a rising edge where `in_valid && in_ready`. Idle clocks
  between pairs are allowed. The pipeline keeps running and carries results
  that are marked invalid.
- `in_first` restarts the window fill for a new row. The first four pairs of
  a row only fill the window and produce no output.
- Pair k ≥ 4 of a row produces `a[k-2]` and `d[k-2]`. `out_valid` is high in
  the clock after the 8th rising edge that follows the edge that took pair k.
  That is 8 clocks of latency, with one result per clock when pairs arrive
  every clock.
- Row edges are not extended. A row of 2N samples gives N−4 coefficient pairs:
  `a[2] … a[N-3]` and `d[2] … d[N-3]`. To get a complete transform of a row,
  extend the row symmetrically by 4 samples at each end before streaming it.

## Where this design makes its own choices

The following are not fixed by the description this design was written from:

- the valid/ready handshake and the `in_first` row restart;
- the holding register for the odd sample;
- the eight-stage grouping of the arithmetic;
- all internal widths;
- the synchronous one-clock read of the coefficient memory and its address
  order;
- the reset behaviour (control, window and coefficient registers are reset;
  datapath registers are not);
- unsigned samples;
- the 4-bit blocks of the carry select adder;
- the signed handling in the Wallace tree multiplier.

Several details of the equations were settled as follows:

- The `256·x0` term of the low-pass sum is included, and the pipeline ends
  the low-pass path with that addition.
- `x[2i+1]` enters `d` with weight 256, like every other term.
- ζ multiplies `a` only.
- Weights that multiply the same group of samples are added into one
  coefficient. As a result, the datapath has seven weight multipliers and one
  scaling multiplier.

Not included:

- a two-dimensional version (a column pass over the row outputs);
- a parallel-in serial-out output register;
- any supply-voltage scaling of the multipliers. That is a physical
  implementation matter.

## Arithmetic blocks

- **`csel_adder`** is a carry select adder, 16 bits by default, with 4-bit
  blocks. The lowest block is ripple-carry. Every higher block is computed
  twice in parallel, once for carry-in 0 and once for carry-in 1, and the
  incoming carry selects the result. A width that is not a multiple of the
  block size gives a shorter top block.
- **`wallace_mult`** is a signed multiplier, 16×16 by default. The datapath
  uses it as 20×10.
  - Partial-product rows are sign-extended to the product width.
  - The row for the sign bit of `b` is inverted, and one extra row adds the
    +1 that completes the negation.
  - Rows are reduced three at a time by layers of full adders until two
    remain. A `csel_adder` adds those two.

## Files

| file                     | contents                                               |
|--------------------------|--------------------------------------------------------|
| `rtl/dwt_pkg.sv`         | widths, coefficient index enum, coefficient values     |
| `rtl/csel_adder.sv`      | carry select adder                                     |
| `rtl/wallace_mult.sv`    | Wallace tree multiplier                                |
| `rtl/coef_rom.sv`        | coefficient memory                                     |
| `rtl/sipo_window.sv`     | 9-tap sample window                                    |
| `rtl/dwt_ctrl.sv`        | control unit                                           |
| `rtl/dwt_datapath.sv`    | pipelined datapath                                     |
| `rtl/dwt1d_top.sv`       | top level                                              |
| `tb/tb_<module>.sv`      | self-checking testbench for each module                |

## Simulating

Every testbench checks itself and ends by printing
`TB_RESULT checks=<n> failures=<m>`. Each has a watchdog. To build and run one
with Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/dwt_pkg.sv tb/tb_dwt1d_top.sv --top-module tb_dwt1d_top -o sim
./obj_dir/sim
```

To run another testbench, replace `tb_dwt1d_top` with its name.

`tb_dwt1d_top` uses the top with its default parameters. It streams ten rows:
random rows, an all-255 row and two alternating 0/255 rows, with random idle
clocks. For every result it checks:

- the value against an independent per-tap model;
- the arrival clock;
- the distance from floating-point lifting.

It also checks that the following each occurred at least once: coefficient
loading, idle input, a row restart, a fill-only pair, and a valid output.

The unit testbenches cover the following:

- `tb_csel_adder` and `tb_wallace_mult` run each block at its default size
  and at one other size. They compare against the built-in operators.
- `tb_coef_rom` checks each stored weight. It also checks that each weight
  lies within 1 of 256 times its lifting-constant product.
- `tb_sipo_window` checks the window contents after random shifts.
- `tb_dwt_ctrl` checks the loading sequence and the fill and valid tracking.
- `tb_dwt_datapath` checks the datapath with the design's weights and with
  random weights.
