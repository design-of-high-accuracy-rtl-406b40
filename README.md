# Fixed-width multiplier with minor input correction

In DSP datapaths, an N x N product is usually cut back to N bits so that word
widths do not grow with every multiplication. Computing all 2N bits and then
throwing the low half away wastes about half of the multiplier. A *fixed-width*
multiplier never builds most of that low half. It adds a small correction term
in its place, so that the N-bit result stays close to the correctly rounded
product.

This RTL implements a signed 16 x 16 -> 16-bit fixed-width multiplier. The
correction is built from the *minor input correction* (MIC) vector, the top
column of the discarded half. Next to it are the arithmetic blocks the design
is described with:

- a radix-4 modified Booth multiplier with carry-save reduction;
- a carry-save multi-operand adder;
- a parallel carry-save array multiplier.

All of it is combinational SystemVerilog, parameterised by the operand width `N`
(default 16).

## The partial-product array and its four regions

Write the signed operands as x = x[N-1..0] and y = y[N-1..0]. The product is
formed with the modified Baugh-Wooley array:

- The bit x[i]·y[j] sits in column i+j.
- It is inverted when exactly one of i, j is N-1, i.e. when one factor is a
  sign bit.
- Two constant ones are added, at columns N and 2N-1.

The sum of all these bits, modulo 2^2N, is the two's-complement product. The
columns fall into regions:

```
 column:   2N-1 ............ N | N-1 | N-2 | N-3 ............ 0
           <------- MSP ------> <IC >  <MIC> <---- rest of LSP -->
                                       <------------ LSP -------->
```

| region | columns | bits | handling |
|---|---|---|---|
| MSP | N .. 2N-1 | the most significant part | kept exactly |
| IC  | N-1 | x[N-1-k]·y[k], k = 0..N-1 (N bits) | kept exactly. Its weight is half an output LSB, so its carries decide the rounding. |
| MIC | N-2 | x[N-2-k]·y[k], k = 0..N-2 (N-1 bits) | used for the compensation (next section) |
| rest of LSP | 0 .. N-3 | | not built; replaced by a constant |

The output is bits 2N-1 .. N of the kept sum.

All bits below column N-1 are plain ANDs: none of them involves a sign bit.
Under uniformly distributed inputs, each of them is 1 with probability 1/4.

## MIC compensation: what replaces the missing half

This is the part that decides accuracy, and most of it is this design's own
construction.

**Symmetric sharing of the MIC column.** The MIC bits pair up. Bit k,
x[N-2-k]·y[k], and bit N-2-k, x[k]·y[N-2-k], are mirror images and have the
same statistics. The upper half of the column ("up-MIC", k < (N-1)/2) is built
from real AND gates. Each of those gates also fills the slot of its mirror bit
in the lower half ("down-MIC"). When N-1 is odd, the middle bit has no mirror
and is used once. For N = 16 that is 7 AND gates, each used twice, plus 1 used
once: 8 gates instead of 15. The estimate of the MIC column is therefore

    MIC_est = 2 · Σ_{k<(N-1)/2} x[N-2-k]·y[k]  +  x[N/2-1]·y[N/2-1]   (N even)

Its expected value equals that of the true MIC column. It costs half the gates
and half the distinct inputs.

**Constant for the rest.** Columns 0..N-3 are replaced by their expected value.
Each bit is 1 with probability 1/4, so the expected value is
((N-3)·2^(N-2) + 1)/4. In units of 2^(N-2), the weight of the MIC column, this
is about (N-3)/4. Rounded to a whole unit, it is `(N-1)/4` in integer
division. Two more units (2^(N-1)) provide round-to-nearest for the N-bit
result. The total bias is

    BIAS = (N-1)/4 + 2       (= 5 for N = 16)

It is computed by `mult_pkg::fw_bias()`.

**Where everything goes.** Nothing below column N-2 exists in hardware. The
array is therefore built from column N-2 upwards: rows are N+2 bits wide, and
bit 0 has weight 2^(N-2). `bw_fw_pp_array` emits N+1 rows:

- Row j carries the kept bits of y[j]'s partial product and, in bit 0, one MIC
  slot.
- Row N holds the two Baugh-Wooley constants plus BIAS.

These rows are summed modulo 2^(N+2). The fixed-width product is bits N+1..2
of that sum.

**Accuracy.** Errors are measured in output LSBs against the exact x·y/2^N,
with uniformly distributed operands. The first row is random sampling, the
second and third are exhaustive:

| width | design | mean error | mean abs error | max abs error |
|---|---|---|---|---|
| N = 16 (50 000 random pairs) | MIC compensation | +0.002 | 0.46 | 2.38 |
| N = 8 (all pairs) | MIC compensation | -0.002 | 0.33 | 1.55 |
| N = 8 (all pairs) | direct truncation, no compensation | -1.00 | 1.00 | 3.50 |

At N = 16, direct truncation has a mean abs error of 2.00. For reference, an
ideal round-to-nearest of the exact product would have a mean abs error of
0.25 and a max of 0.5.

On cost: a generic gate-level synthesis of the 16-bit fixed-width multiplier
gives about 1 170 logic cells, against about 1 620 for the 16 x 16
full-width array multiplier or Booth multiplier. The saving comes from the
columns below N-2, which are never built.

## Radix-4 modified Booth multiplier

`booth_multiplier` is a full-width signed N x N -> 2N multiplier. The
multiplier b gets a 0 appended below its LSB. It is then cut into N/2
overlapping 3-bit groups {b[2k+1], b[2k], b[2k-1]}. Each group is a Booth digit
in {-2, -1, 0, +1, +2}:

| b[2k+1] b[2k] b[2k-1] | digit | NEG | ONE | TWO |
|---|---|---|---|---|
| 000 | 0 | 0 | 0 | 0 |
| 001, 010 | +A | 0 | 1 | 0 |
| 011 | +2A | 0 | 0 | 1 |
| 100 | -2A | 1 | 0 | 1 |
| 101, 110 | -A | 1 | 1 | 0 |
| 111 | 0 | 0 | 0 | 0 |

`mbe_encoder` produces NEG/ONE/TWO as a `booth_sel_t` struct. `mbe_decoder`
builds an (N+1)-bit row bit by bit:

    pp[j] = ((ONE & A[j]) | (TWO & A[j-1])) ^ NEG,    A[-1] = 0,  A[N] = A[N-1]

A negative row comes out as a one's complement. The missing +1 is its NEG bit,
which goes into one extra row at bit 2k. Rows are fully sign-extended to 2N
bits and shifted by 2k. The N/2 + 1 rows (9 for N = 16) go to the carry-save
adder.

## Carry-save reduction and the final adder

`multi_operand_adder` is the reduction used by all three multipliers:

1. The first three operands meet in one `csa_row`: a row of independent full
   adders. It returns a sum vector and a carry vector, with the carry already
   shifted to its weight.
2. Every further operand adds one more row. That row takes the running sum,
   the running carry and the new operand.
3. The final sum and carry vectors go to `ripple_cpa`, a ripple-carry adder.

The delay is (operands - 2) full-adder levels plus the ripple.

This is a linear chain of rows, not a Wallace or Dadda tree. The defaults
(four 4-bit operands, 6-bit result) are the small example the structure is
usually drawn with. The multipliers instantiate it with `OUT_W` equal to the
row width, so that it works modulo 2^OUT_W.

## Carry-save array multiplier

`array_multiplier` is unsigned N x N -> 2N:

- Partial product j is a & {N{b[j]}} shifted by j.
- The partial products pass through the same chain of carry-save rows.
- A final ripple adder, the only horizontal carry path, finishes the sum.

It is not pipelined.

## Top level

`mult_top` (parameter `N = 16`) places the three multipliers side by side. Each
has its own ports:

| port | dir | width | |
|---|---|---|---|
| `fw_x`, `fw_y` | in | N | fixed-width multiplier operands, signed |
| `fw_p` | out | N | ≈ round(fw_x·fw_y / 2^N), signed |
| `bm_a`, `bm_b` | in | N | Booth multiplier operands, signed |
| `bm_p` | out | 2N | bm_a·bm_b |
| `am_a`, `am_b` | in | N | array multiplier operands, unsigned |
| `am_p` | out | 2N | am_a·am_b |

There is no clock and no register anywhere. An output is valid once the inputs
have settled through the combinational logic. Add input and output registers
around `mult_top`, or around a single multiplier, to use it in a clocked
datapath.

## Files

| file | contents |
|---|---|
| `rtl/mult_pkg.sv` | `booth_sel_t`, `fw_bias()` |
| `rtl/full_adder.sv` | full-adder cell |
| `rtl/csa_row.sv` | one carry-save row |
| `rtl/ripple_cpa.sv` | ripple-carry adder |
| `rtl/multi_operand_adder.sv` | carry-save rows + final adder |
| `rtl/mbe_encoder.sv`, `rtl/mbe_decoder.sv` | Booth encoder, Booth row decoder |
| `rtl/booth_multiplier.sv` | radix-4 Booth multiplier |
| `rtl/array_multiplier.sv` | carry-save array multiplier |
| `rtl/bw_fw_pp_array.sv` | truncated Baugh-Wooley array + MIC compensation |
| `rtl/fixed_width_multiplier.sv` | fixed-width multiplier |
| `rtl/mult_top.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/fw_ref_pkg.sv` | arithmetic reference model of the fixed-width result |

## Simulation

Every testbench ends by printing `TB_RESULT checks=<n> failures=<n>`.

- Each checks its block against arithmetic computed independently in the
  testbench, not against a copy of the RTL.
- Each has a watchdog that fails the run if it hangs.
- The 8-bit versions of the multipliers, the Booth encoder and the 4 x 4-bit
  adder are tested exhaustively. The 16-bit versions get corner cases and
  random operands.

`tb_mult_top` runs all three multipliers at the default N = 16. It also checks
that these cases each occurred at least once:

- every Booth digit;
- negative products;
- a set up-MIC bit;
- a compensation that changed the result;
- a full-width array product.

To run it with Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/mult_pkg.sv tb/fw_ref_pkg.sv \
          tb/tb_mult_top.sv --top-module tb_mult_top -o sim
./obj_dir/sim
```

For another testbench, replace `tb_mult_top` with its name. Packages are listed
first; other modules are found through `-Irtl` / `-Itb`.

`tb_fixed_width_multiplier` also prints the error statistics in the table
above. It requires the compensated mean abs error to be below that of direct
truncation, and the mean error to be within ±0.25 LSB.

## How far to trust it, and where it departs from the source design

- **Bit-exact against its own specification.** The Booth, array and adder
  blocks match exact arithmetic. The fixed-width multiplier matches the
  reference formula in `tb/fw_ref_pkg.sv`, exhaustively at N = 8 and randomly
  at N = 16.
- **The compensation is this design's reading.** The up/down sharing of the
  MIC column and the constant bias are derived above. The original
  description names a dual-group MIC scheme with shared up-MIC and down-MIC
  hardware and halved fan-in, but does not give its equations or weights. The
  error figures above belong to this implementation, not to that scheme.
- **Booth array details.**
  - Negative rows are completed with a separate row of NEG bits.
  - Sign extension is done in full.
  - A scheme that merges the last row's LSB with its negation carry is not
    implemented.
  - An accumulator input to the final adder, mentioned in the source, is not
    implemented: its width and control were not specified.
- **Final adder.** It is a ripple-carry adder. An optimised final adder was
  mentioned but not specified.
- **No pipelining.** The array multiplier is drawn with pipeline stages in the
  source, but no register placement is given, so none is built.
- **Encoder for group 111.** Group 111 gives NEG = 0 (digit 0), as in the
  encoding table. An alternative encoder drawing with NEG wired straight from
  b[2k+1] was not followed.
