# Bit-serial DA adaptive FIR filter with a power-of-two LMS update

This is an adaptive FIR filter that needs no multipliers. It follows the
architecture described in "Adaptive FIR Filter based on Distributed
Arithmetic and LMS Algorithm for Low-Area and Low-Power".

- **Filtering.** The inner product `y = sum_k w_k x(n-k)` is computed with
  distributed arithmetic (DA). A small table holds every possible sum of four
  input samples. The weights are read one bit position at a time, and each
  4-bit slice of weight bits addresses that table. The table outputs are
  shift-accumulated in carry-save form.
- **Adaptation.** The weights follow the delayed LMS rule. The scaled error
  `mu*e` is reduced to a sign and a power of two. Each weight increment is
  then just the input sample, shifted and added or subtracted. No multiplier
  is needed here either.

The default build is a 16-tap filter with 8-bit samples and weights
(`N = 16`, `L = 8`). It processes one sample every 8 clock cycles, whatever
the filter length. The same RTL builds a 4-tap filter with `N = 4`.

## Arithmetic in one period

A sample period lasts `L` clock cycles, one per weight bit.

**Number formats.** Samples are `L`-bit two's-complement integers. Weights
are `L`-bit two's complement, read as fractions `w / 2^(L-1)`.

**Bit-serial inner product.** Write each weight as
`w_k = -b_k0 + sum_{l>=1} b_kl 2^-l`, where `b_k0` is its sign bit. Then
`y = sum_l 2^-l y_l - y_0`, where `y_l = sum_k b_kl x(n-k)`. Each `y_l` is one
entry of the DA table, and the slice `{b_3l, b_2l, b_1l, b_0l}` is its address.

**DA table (`da_table`).** The table has 15 registers, one per non-empty
subset of `x(n)..x(n-3)`. Address bit `j` selects `x(n-j)`, and address 0
reads as a constant zero.

When a sample arrives, the table is not recomputed. The samples only move
one place:

- An entry without `x(n)` becomes the old entry that holds the same samples
  one step earlier.
- Each of the seven entries that combine `x(n)` with older samples is the new
  sample plus such an old entry. This takes seven adders.

Entries are `L`, `L+1` or `L+2` bits wide, depending on how many samples
they sum.

**Carry-save shift accumulation (`csa_accumulator`).** Slices arrive LSB
first. Each cycle, the accumulator computes

    A <- A/2 + y_l

with one row of full adders and no carry propagation. The value is held as a
sum word `S` and a carry word `C`, with `A = S + 2C`. Bit `i` of the row adds:

- bit `i` of the operand,
- bit `i+1` of `S` (the sum word shifted right, with sign extension),
- bit `i` of `C`.

Both words are `L+2` bits and are read as two's complement. The row keeps
`S' + 2C' = (S >>> 1) + C + operand` exactly. The only loss is the sum bit
that drops off at each shift.

The MSB slice comes last, and its sum is subtracted. The operand is inverted
in that cycle (the "sign control"). The `+1` that completes the negation is
the carry input of the final adder.

**Output.** At the closing edge of the last cycle, `S` and `C` go into the
block's output registers, and the accumulator restarts. The final adder
forms

    y = (S >>> 1) + C + 1

That result is `sum_k w_k x(n-k) / 2` in sample units (`w_k` as fractions).
Its error is about one LSB.

## Longer filters (`da_lms_filter`)

An `N`-tap filter uses `N/4` four-point blocks (`inner_product4`).

**Sample chain.** The DA tables form the filter's delay line. Block `j` holds
`x(n-4j)..x(n-4j-3)`. When a sample arrives, block `j+1` takes block `j`'s
oldest sample.

**Output.** Two adder trees (`adder_tree`) combine the blocks' results. One
adds the sum words and the other adds the carry words. Each level is one bit
wider (`L+2 -> L+3 -> L+4` for 16 taps). The final adder then works on the
two tree outputs.

**Bias.** There is a single `+1` carry input for all blocks, but each block
negated its MSB slice with a one's complement. Each block also truncates a
little. So `y` of the 16-tap filter sits between about 3.5 LSB below and 1 LSB
above the exact value. For 4 taps the range is 1.5 below to 0.5 above.

## Error path and weight update

**Error path (`error_unit`).** The desired value `d` is registered. The unit
forms `e = d - y` and shifts `e` right by `YW - L`:

- `YW = L + 2 + log2(N/4)` is the output width.
- The shift is 4 places for 16 taps and 2 places for 4 taps. This shift is
  the step size `mu`.
- The result is saturated to `L` bits and registered as `mu_e`.

**Sign and magnitude.** `sign_mag_separator` splits `mu_e` into its sign and
an `L-1`-bit magnitude.

**Control word (`control_word_gen`).** The control word `t` is the position
of the leading one of the magnitude:

| highest set bit of magnitude (L = 8) | r6 | r5 | r4 | r3 | r2 | r1 | r0 | none |
|---|---|---|---|---|---|---|---|---|
| t | 000 | 001 | 010 | 011 | 100 | 101 | 110 | 111 |

**Weight update (`weight_increment4`, one per four taps).**

- A barrel shifter forms `x >>> t`. Code `111` gives a zero increment.
- A carry-save add/subtract cell (`csa_addsub`) forms `w + inc` and
  `w - inc`.
- The error sign picks one of them: a negative error subtracts.
- The weights sit in registers. At each period boundary they take their new
  values, and the byte-parallel to bit-serial converter (`p2s_converter`)
  loads them. The converter then feeds their slices, LSB first, to the DA
  multiplexer.

The update is

    w_k(n+1) = w_k(n) + sign(mu*e(n-2)) * 2^-t * x(n-2-k)

**Adaptation delay of 2.** The error of a sample is known two periods after
that sample entered:

- one period to accumulate,
- one period to form and register `mu*e`.

The update therefore pairs `mu*e(n-2)` with the samples `x(n-2-k)`. Block
`j` gets these samples from two places:

- `x(n-2-4j)` and `x(n-3-4j)` come from its own DA table,
- the next two samples come from the next block's table.

The last block takes its two oldest samples from two extra sample-rate
registers.

## Timing of the top level

| signal | meaning |
|---|---|
| `sample_req` (out) | high in the last of the 8 cycles of a period; `x_in` and `d_in` are taken at its closing edge |
| `x_in` (in, `L`) | the new sample `x(n+1)` |
| `d_in` (in, `YW`) | `d(n)`: the desired output for the sample taken one period **earlier** |
| `y_out` (out, `YW`) | `y` of the sample whose period just ended; valid for a whole period |
| `mu_e` (out, `L`) | the registered, scaled error, two samples behind the input |
| `adapt_en` (in) | weights are updated at a period boundary only while this is high |
| `weights` (out, `N x L`) | the current weights, for observation |

All state resets to zero on a synchronous active-low `rst_n`. The filter
starts with all-zero weights. `bit_controller` numbers the cycles and raises
`last`. That one signal is the MSB-slice sign control, the load strobe of
the DA tables, the output registers and the weights, and `sample_req`.

## Modules

| module | role |
|---|---|
| `da_lms_pkg` | default `L`, `N`, control-word width and the zero-error code |
| `da_lms_filter` | top: `N/4` blocks, adder trees, error path, control word |
| `inner_product4` | DA table + 16:1 multiplexer + carry-save accumulator + output registers |
| `da_table` | 15 registers of partial sums, seven adders |
| `csa_accumulator`, `full_adder` | carry-save shift accumulator and its full-adder cell |
| `weight_increment4` | barrel shifters, add/subtract cells, sign multiplexers, weight registers, converter |
| `barrel_shifter`, `csa_addsub`, `p2s_converter` | parts of the weight-increment block |
| `sign_mag_separator`, `control_word_gen` | error to sign and power-of-two code |
| `adder_tree` | combines the blocks' sum or carry words |
| `error_unit` | final adder, error, scaling, `mu*e` register |
| `bit_controller` | counts the `L` bit cycles |

## What follows the source and what is chosen here

These parts follow the source:

- the block structure and bus widths
- the 15-entry DA table with seven adders
- the LSB-first bit slices and the carry-save accumulation with sign control
- the final adder with carry input 1
- the error shifts (2 places for 4 taps, 4 for 16)
- the adaptation delay of 2
- the control-word table
- the barrel-shifter, add/subtract and multiplexer weight update
- the default sizes

These are choices made here:

- **Cycle control and handshake.** The period-boundary schedule, the
  `sample_req`/`adapt_en` interface, and `d_in` arriving one sample after
  `x_in` (read from the drawn register on `d`).
- **Control word `111`.** It means "no increment" when the error magnitude is
  zero. That case is not given.
- **Shift direction.** The barrel shifter shifts right (arithmetic), so the
  increment is `x * 2^-t`.
- **Add/subtract cell.** The source describes it as a carry-save adder whose
  sum or carry output is picked by the error sign. That choice alone does not
  update a weight, so here the cell forms the sum and the difference, and the
  sign picks one.
- **Sign-magnitude separation.** It takes the absolute value, with the most
  negative code clamped.
- **Overflow.** `mu*e` saturates. Weights wrap modulo `2^L`.
- **Adder tree width.** It is written for any power-of-two number of blocks.
- **Full adder.** The source uses a 10-transistor full-adder cell. Here it is
  an ordinary logic full adder, so its area and power advantage is not
  modelled.
- **Observation ports.** The `weights` port is added for observation.

## Verification and simulation

Every module has a self-checking testbench in `tb/`, named `tb_<module>.sv`.
Each prints `TB_RESULT checks=<n> failures=<m>`.

**Small blocks.** The full adder, barrel shifter, add/subtract cell,
sign/magnitude and control word are tested exhaustively. The others use
random stimulus against values computed in the bench.

**End-to-end tests.** `tb_da_lms_filter` runs the default 16-tap filter as a
system identification. The desired signal is an unknown random 16-tap FIR,
driven by the same random input. Every period the bench checks:

- all weights, against its own model of the update (the model uses the
  `mu_e` that the filter reports),
- `y_out`, against the exact inner product within the bias range above,
- `mu_e`, against `d - y`,
- the 8-cycle period.

A few large disturbances of `d` make `mu*e` saturate and use every shift
value. A stretch with `adapt_en` low checks that the weights freeze. The test
fails if any of these mechanisms never happens, or if the weights do not end
within a quarter of their starting distance from the unknown system. In 3000
samples this distance falls from about 900 to about 85. The remaining error
is set by the 4-place error shift.

`tb_da_lms_filter_n4` runs the same test for the 4-tap configuration.

To run one test with Verilator 5:

    verilator --binary --timing -Irtl rtl/da_lms_pkg.sv tb/tb_da_lms_filter.sv \
        --top-module tb_da_lms_filter -o sim
    ./obj_dir/sim

Replace the testbench name to run another test. The full 16-tap run takes
well under a second.

**Not covered.** Area, power and transistor-level results are out of scope.
The source reports them for its 250 nm full-custom implementation, and this
RTL cannot reproduce them.
