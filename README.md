# Approximate-adder DCT/IDCT datapath

Signal-processing datapaths for images and sound do not need exact
arithmetic. People cannot see or hear small errors in the least significant
bits. This design uses that slack. It replaces the full adders in the low bits of every adder with
*approximate* full adders. These are cut-down versions of the CMOS mirror adder, with fewer
transistors, less switched capacitance and shorter series stacks. They give
the wrong answer for a few of the eight input combinations.
The cells are then used in the adders of an 8-point integer DCT and
IDCT, the transform pair at the heart of a JPEG-style image coder.

The RTL models the cells at the logic level, so that a simulation produces
exactly the bits the transistor circuits would produce. That lets you measure
the quality cost of each approximation on real data. Power and delay are properties of the
transistor circuits. They are not modelled here.

## The five full-adder cells (`approx_fa`)

A mirror adder computes in two stages. The first stage forms the inverted
carry `cout_n`. The second stage forms the inverted sum `sum_n` from `cout_n`
and the inputs. Inverters then drive `cout` and `sum`. Each approximation
removes transistors from the pull-up and pull-down networks. The
approximations differ only in those two node functions. `approx_fa` writes
each node as the Boolean function of its pull-down network:

| `KIND`        | transistors | `cout_n` pulled low when | `sum_n` pulled low when            |
|---------------|-------------|--------------------------|------------------------------------|
| `FA_ACCURATE` | 24          | `a&b \| cin&(a\|b)`      | `cout_n&(a\|b\|cin) \| a&b&cin`    |
| `FA_APPROX1`  | 16          | `b \| a&cin`             | `cout_n&cin \| a&b&cin`            |
| `FA_APPROX2`  | 14          | as accurate              | sum is `cout_n` through two inverters |
| `FA_APPROX3`  | 11          | as approximation 1       | sum is `cout_n` through two inverters |
| `FA_APPROX4`  | 11          | `~a` (an inverter)       | as approximation 1                 |

The resulting truth tables (row = `a b cin`; wrong entries marked `*`):

| a b cin | sum / cout exact | approx 1 | approx 2 | approx 3 | approx 4 |
|---------|------------------|----------|----------|----------|----------|
| 0 0 0   | 0 0              | 0 0      | 1* 0     | 1* 0     | 0 0      |
| 0 0 1   | 1 0              | 1 0      | 1 0      | 1 0      | 1 0      |
| 0 1 0   | 1 0              | 0* 1*    | 1 0      | 0* 1*    | 0* 0     |
| 0 1 1   | 0 1              | 0 1      | 0 1      | 0 1      | 1* 0*    |
| 1 0 0   | 1 0              | 0* 0     | 1 0      | 1 0      | 0* 1*    |
| 1 0 1   | 0 1              | 0 1      | 0 1      | 0 1      | 0 1      |
| 1 1 0   | 0 1              | 0 1      | 0 1      | 0 1      | 0 1      |
| 1 1 1   | 1 1              | 1 1      | 0* 1     | 0* 1     | 1 1      |

Some observations help when reading results:

* Approximation 2 keeps the carry exact. Only the sum bit of that cell is
  wrong, so the error stays local and does not propagate up the adder.
* Approximations 1, 3 and 4 corrupt the carry. In an adder a carry error
  changes the bits above the approximate region by ±2^APPROX_LSB. This is why
  quality falls steeply as more bits are approximated.
* Approximation 4 ignores `b` and `cin` when forming the carry. The carry chain
  is therefore broken at every approximate cell. This is what makes the cell
  fast.

## Where the approximate cells go

Every adder-like block takes two parameters:

* `KIND` (`approx_pkg::fa_kind_e`) chooses the cell type.
* `APPROX_LSB` sets how many low bit positions use that cell. All higher
  positions use the accurate mirror adder.

The defaults are approximation 4 in the low 8 bits. Setting
`KIND = FA_ACCURATE` or `APPROX_LSB = 0` gives exact hardware, the "base
case". All adders inside the transforms work on words aligned to the same
weight. "The low 8 bits" is therefore the same set of weights in every adder
of a transform.

| module                | what it is |
|-----------------------|------------|
| `approx_rca`          | ripple-carry adder, `WIDTH` cells, carry in/out |
| `approx_csa32`        | one carry-save row: 3 words → sum word + carry word (helper) |
| `approx_compressor42` | two carry-save rows: 4 words → 2 |
| `approx_compressor82` | three 4:2 compressors in a tree: 8 words → 2 (4 full-adder delays) |

All of them work modulo 2^WIDTH on two's-complement words. The carry out of
the top bit of a carry-save row is dropped.

## The integer DCT and IDCT

`dct8_1d` computes `y(k) = (Σ_i a(k,i)·x(i)) >>> 7` for eight signed samples.
`idct8_1d` computes `x(i) = (Σ_k a(k,i)·y(k)) >>> 7` with the transposed
matrix. Multiplications are avoided. The coefficients are chosen so that each
product is a few shifted copies of the input added together:

* **Dc coefficient.** `a(0,i) = 45 = 32+8+4+1`, which is 64·cos(π/4) rounded.
  It is kept at full precision because the dc term matters most.
  `dc_coef_mult` adds the four shifted copies with a 4:2 compressor followed
  by an RCA.
* **All other coefficients.** `a(k,i)` for k ≥ 1 is 64·cos((2i+1)kπ/16)
  rounded to the nearest value of the form 2^p + 2^q. `shift_add_mult` forms
  the product with two shifts and one RCA. A negative coefficient negates the
  sample exactly before the shifts. The magnitudes are:

  | angle jπ/16 | 1  | 2  | 3  | 4  | 5  | 6  | 7  |
  |-------------|----|----|----|----|----|----|----|
  | 64·cos      | 62.8 | 59.1 | 53.2 | 45.3 | 35.6 | 24.5 | 12.5 |
  | used        | 64 | 64 | 48 | 48 | 36 | 24 | 12 |

  `dct_pkg::coef(k,i)` derives each coefficient's sign and angle from
  (2i+1)k mod 32. `coef_shift_hi/lo` give the two shift amounts. A single
  power of two such as 64 is built as 32 + 32.
* **Output sum.** Each output sums eight products. An `approx_compressor82`
  reduces the eight products to two words, and an `approx_rca` adds those.
* **Scaling.** The result is scaled by 128 relative to an orthonormal DCT
  (45/128 ≈ 1/√8, 64/128 = 1/2). The arithmetic shift right by 7 removes the
  scale. The shift rounds toward minus infinity.

Because the coefficients are rounded so coarsely, the transform is not
exactly invertible. The base case therefore already loses some quality.

Word widths follow from the sample width `DW` (default 8):

* The DCT works internally on `DW+10` = 18 bits and outputs `DW+3` = 11 bits.
* The IDCT takes those 11 bits, works on 21 bits and outputs 14 bits.

Both widths hold the largest possible sum with a bit to spare, so the exact
transform never overflows.

## Top level: `dct_idct_system`

```
x_in ──► dct8_1d ──► [reg] ──► y_out ──► idct8_1d ──► [reg] ──► x_rec
in_valid ─────────► [reg] ──► y_valid ────────────► [reg] ──► x_valid
```

* Ports: `clk`, `rst_n`, `in_valid`, `x_in[8]` (signed `DW`) in; `y_valid`,
  `y_out[8]` (signed `DW+3`), `x_valid`, `x_rec[8]` (signed `DW+6`) out.
* The inputs `x_in` are level-shifted samples: for 8-bit pixels, pixel − 128.
* A block presented with `in_valid` high appears on `y_out` after one clock
  edge and on `x_rec` after two. One block can be accepted every cycle.
* `rst_n` is synchronous and active low. It clears only the two valid flags.
  The data registers load only when their valid input is high.
* Both transforms are combinational between the registers. The critical path
  is one constant multiplier, the 8:2 tree and an 18- or 21-bit ripple-carry
  adder.

## Measured quality

`tb_dct_idct_quality` and `tb_dct_idct_quality_kinds` generate a 32×32 8-bit
image with smooth shading and fine texture. They send each image line through
the datapath as blocks of eight pixels, then clamp the reconstruction to
0..255 and measure PSNR against the original:

| configuration                       | PSNR     |
|-------------------------------------|----------|
| all cells accurate (base case)      | 40.18 dB |
| approximation 1 in the low 8 bits   | 33.38 dB |
| approximation 2 in the low 8 bits   | 35.83 dB |
| approximation 3 in the low 8 bits   | 26.01 dB |
| approximation 4 in the low 7 bits   | 37.20 dB |
| approximation 4 in the low 8 bits   | 32.13 dB |
| approximation 4 in the low 9 bits   | 25.33 dB |

Approximation 2 loses the least because its carries are exact. Approximation
3 loses the most at 8 bits: it combines a wrong carry with a sum taken from
the carry.

With approximation 4, a cell outputs a sum of 1 only when its carry in is 1.
As a result, a few low output bits of the multipliers and transforms are
always 0 in the default configuration. Synthesis reports these bits as
constant. This is expected behaviour, not a wiring fault.

These are 1-D (row-only) figures on a synthetic image. They cannot be compared
directly with 2-D results on photographs.

## What is this design's own choice

The approximate cells, their truth tables, and the overall structure come from
the published approximate mirror-adder technique. That structure is:

* RCAs for two-term products;
* a 4:2 compressor plus an RCA for the four-term dc product;
* an 8:2 compressor plus an RCA per output;
* approximate cells in the low 7–9 bits.

The following were chosen here because no source value was available:

* the integer coefficient values (45 and the 2^p+2^q table above) and the
  shift by 7;
* the handling of negative coefficients (exact negation of the sample);
* the IDCT as the transpose of the same altered matrix;
* all word widths;
* the internal form of the 4:2 and 8:2 compressors (carry-save rows in a tree);
* the register placement, latency and reset of the top level;
* approximation 4 and 8 bits as the default configuration.

## Not included

* **2-D transform.** There is no 8×8 transform with a transpose buffer, no
  quantisation and no entropy coding. The datapath is the 1-D transform pair
  only.
* **Further cell variants.** No cell more aggressive than approximation 4
  is provided.
* **FIR filter.** An FIR filter built from the same cells is a natural second
  application, but it is not included.
* **Power, delay and transistor counts.** These are not modelled.

## Files

`rtl/` holds one module or package per file:

* `approx_pkg.sv`: cell kinds;
* `dct_pkg.sv`: coefficients;
* `approx_fa.sv`, `approx_rca.sv`, `approx_csa32.sv`,
  `approx_compressor42.sv`, `approx_compressor82.sv`,
  `shift_add_mult.sv`, `dc_coef_mult.sv`, `dct8_1d.sv`, `idct8_1d.sv`;
* `dct_idct_system.sv`: the top level.

`tb/` holds one self-checking testbench per module and the two quality studies.
All testbenches share `tb_ref_pkg.sv`, a reference model built independently
of the RTL:

* The cells come from the truth tables as bit masks.
* Every adder is modelled bit by bit with the same cell placement as the RTL.
* The coefficients are derived from real cosines.

Each testbench prints `TB_RESULT checks=N failures=M` and stops.
`tb_dct_idct_system` runs the top at its default parameters. It streams 400
random blocks with idle cycles and a reset. It checks latency and compares every output bit
with the reference model.

To simulate with Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -j 4 -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/approx_pkg.sv rtl/dct_pkg.sv tb/tb_dct_idct_system.sv \
    --top-module tb_dct_idct_system -o sim
./obj_dir/sim
```

Replace `tb_dct_idct_system` with any other testbench name. To lint a module,
use `verilator --lint-only -Wall -y rtl +libext+.sv rtl/approx_pkg.sv
rtl/dct_pkg.sv rtl/<module>.sv`.

The top-level testbench builds in about half a minute. Each four-configuration
quality study builds in one to two minutes, because each configuration is a
separate copy of the roughly 20,000-gate datapath. All runs take well under a
second.
