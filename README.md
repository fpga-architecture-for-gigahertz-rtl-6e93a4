# Polyphase IF-to-baseband converter for a 1 GS/s sampler

A 400 MHz wide signal centred at 750 MHz is sampled directly at 1 GS/s and
turned into complex baseband, i(m) + j q(m) at 500 MS/s, without any analog
or digital quadrature mixer. The FPGA fabric runs at only 125 MHz, so every
stage handles a block of eight samples per clock. Multiplications by the fixed
filter taps are done with small lookup tables instead of multipliers.

The chain has three digital stages:

| stage | module | rate in, rate out | what it does |
|---|---|---|---|
| equalizer | `eq_fir` | 8 real, 8 real per clock | 14-tap real FIR that cancels the amplitude and delay ripple of the analog RF/IF filters |
| image suppression + decimation | `image_reject_decim` | 8 real, 4 complex per clock | 27-tap complex halfband filter. It keeps the band at +750 MHz and removes its mirror at -750 MHz. Only every second output is computed |
| frequency shift | `sign_alternator` | 4 complex, 4 complex per clock | multiplies sample m by (-1)^m, which moves the band to 0 Hz |

`ddc_top` connects the three stages. The analog filters and the converter sit
outside it, so the converter's samples arrive on `x_in`. Some multi-channel
systems would add a beamforming sum between the equalizer and the
image-suppression filter. The single-channel design here has none.

## Why no mixer is needed

At 1 GS/s the 550–950 MHz band aliases to 550–950 MHz, which is the same as
-450 to -50 MHz. Its mirror from negative frequencies lands at 50–450 MHz.
The image-suppression filter passes the first range and blocks the second.
What is left is an analytic signal centred at -250 MHz.

After that, only every second sample is needed. Decimating by two aliases
-250 MHz to +250 MHz, which is half the new 500 MS/s rate. Multiplying by
e^{jπm} = (-1)^m then moves the band to 0 Hz. No sine or cosine table is
needed, just a sign change on every other sample.

## Block (polyphase) indexing

This is the part that matters most for reading the RTL. On each clock, block
element `r` (0..7) holds x(n-r), where n = 8t+7 for block t. Element 0 is the
newest sample. Output element `j` holds y(n-j). An FIR term c_k x(n-j-k) has
delay d = j+k. Write d = 8m + r: the term then reads element r of the block
that arrived m clocks earlier. A delay of eight samples (z^-8) is therefore
one register per element. Every filter is written in this form:

* **Direct form** (`polyphase_fir`, `FORM_DIRECT`). The input blocks pass down
  a chain of block registers `col[m]`. Each output adds up its scaled taps
  taken from that chain. With symmetric taps, the two samples that share a
  coefficient are first added in a registered pre-adder, or subtracted for
  odd symmetry. One scaler then serves the pair.
* **Transposed form** (`polyphase_fir`, `FORM_TRANSPOSED`, and `eq_fir`).
  Each current input element is scaled, and the products go into one
  accumulator chain per output, `acc[m] <= acc[m+1] + (column-m terms)`.
  The column terms first pass an adder tree of the same depth for every
  column. Each accumulator register is both the register after an addition
  and one z^-8 delay. This is why the transposed form has one clock less
  latency (9 against 10 at the defaults).
* **Computing only the outputs that are kept.** `OUT_MASK` chooses which of
  the eight outputs are built. The decimating halfband builds only the odd
  elements j = 1, 3, 5, 7, which are the even sample indices.

An example with 19 taps and even symmetry (the `polyphase_fir` defaults)
shows the alignment. Output y(n-1) uses delays 1..19, so it reads element 1
of the current block up to element 3 of the block two clocks back.

## The halfband image-suppression filter

Take a 14-tap equiripple Hilbert transformer. Insert a zero after every tap,
put 1 at the centre tap and halve everything. The result has 27 taps:

* real part: 1/2 at delay 13, and nothing else;
* imaginary part: nonzero only at even delays 0, 2, ..., 26, with
  h(26-k) = -h(k).

The Hilbert transformer was designed with the band 0.1–0.5 of its own rate.
That puts the stopband at 50–450 MHz of the 1 GS/s filter, about 50 dB down.
The values are quantised to 12 bits over 2^12 (`ddc_pkg::HB_COEFS`):
16, 32, 64, 116, 206, 400, 1292 and their negated mirror.

At an even output index the centre tap reads an odd-index input. Every
imaginary tap reads an even-index input. So:

* **I** is just the input delayed by 13 samples, with no arithmetic;
* **Q** is a direct-form, odd-symmetric polyphase FIR. It uses 7 pre-subtracted
  pairs and 7 lookup-table scalers for each of the 4 kept outputs, 28 in all.

Both outputs carry one fractional bit, so the passband gain is 1: i_out equals
the delayed input exactly, and q_out = round(2·Σh·x).

## Lookup-table arithmetic

* `reg_lut`: 16 words of any width, addressed by four bits, with a register on
  the output. This is one FPGA logic cell per output bit, with the register
  that comes paired with it.
* `lut_scaler` multiplies by a constant. The two's-complement input is cut
  into 4-bit pieces, and the top piece is read as signed. Each piece addresses
  a table of piece × c, and the table outputs are shifted and added.
  * With `PREC_PRODUCT = 0` (exact integer coefficient), all tables are the
    same and the result is exactly x·c.
  * With `PREC_PRODUCT = 1` (coefficient with more precision than is kept),
    table k holds round(piece·c·2^{4k} / 2^DROP). Each table is different and
    only as wide as it needs to be. The tables are added without shifts.
  * Latency is 3 clocks for 12–16-bit data: one for the tables and two for
    the adder levels.
* `da_lincomb` computes Σ c_w x_w with tables addressed by data bits, which is
  distributed arithmetic. Each table is driven by `BPL` bit positions of each
  of `WPL` words, with WPL × BPL = 4. Table outputs are shifted by their bit
  position and added, and the table covering the sign bit subtracts.
  * WPL = 4, BPL = 1 with eight words: for each bit position, one table for
    words 0–3 and one for words 4–7.
  * WPL = 2, BPL = 2 with six 10-bit words: 15 tables.
  * `COEF_BASE` lets one coefficient array feed many instances.
  * Latency is one clock plus ceil(log2(tables)). That is 6 for eight 12-bit
    words with four words per table (24 tables).

The equalizer has no coefficient symmetry, so no scaler can be shared. It
uses `da_lincomb` (eight words, WPL = 4, BPL = 1) for each transposed-form
column sum. That is 8 outputs × 3 columns = 24 instances.

## Number formats and timing

| signal | format |
|---|---|
| `x_in` | 12-bit two's complement |
| equalizer output | 14 bits, taps over 2^11, rounded to nearest, saturating (cannot saturate with the shipped taps: max 4422) |
| `i_out`, `q_out` | 16 bits, one fractional bit, saturating |

| module | latency (clocks) |
|---|---|
| `eq_fir` | 9 |
| `image_reject_decim` | 10 |
| `sign_alternator` | 1 |
| `ddc_top` | 20 |

Output lane l of `ddc_top` is baseband sample 4t+3-l, and lane 0 is the
newest. `in_valid` is only a tag that travels with the data. The stream is
continuous and there is no back-pressure. A synchronous active-high `rst`
clears every register, so samples before the first block count as zero.
Every two-input addition is followed by a register, so that the fabric can
run at its highest clock rate. Multi-operand sums go through `pipe_add_tree`,
which has a register after every adder level. The latency formulas are in
`ddc_pkg`: `tree_latency`, `scaler_latency`, `da_latency`, `fir_latency` and
`eq_latency`.

## What to trust, and what is placeholder

* **Equalizer taps are placeholders.** The real taps come from fitting the
  measured analog filters, and those measurements are not available. The
  shipped set, `ddc_pkg::EQ_COEFS` (14 taps over 2^11, gain about 4 dB, main
  tap at delay 8), only exercises the structure. Replace it with the fitted
  taps for the hardware at hand. Check `EQ_COEF_W` and the 14-bit stage width
  against Σ|c|.
* **Halfband coefficients** follow the construction described above. The
  sign of the imaginary part is chosen so that +750 MHz is kept.
* **Widths** are this design's choices: 12-bit input, 14-bit equalizer
  output, 16-bit output. So are the rounding, the saturation, the reset and
  the valid tag.
* **Coefficient sharing.** The direct form shares a scaler only between the
  two taps of a symmetric pair within the same output. It does not share one
  pre-added pair between different outputs. The transposed form scales each
  input element once per distinct coefficient.
* **Not built:**
  * rounding a product together with the final sum to narrow a table;
  * complex-input or complex-output tables. They are not needed, because the
    input is real and the real part of the halfband is a single 1/2 tap.
* **Timing closure at 125 MHz is unverified.** Only simulation was done, no
  FPGA implementation.

The end-to-end test gives an image rejection of about 60 dB for tones 50 MHz
on either side of 750 MHz.

## Files

* `rtl/ddc_pkg.sv`: P = 8, the form and symmetry enums, coefficient sets,
  latencies, and `round_sat`.
* `rtl/ddc_top.sv`, `rtl/eq_fir.sv`, `rtl/image_reject_decim.sv`,
  `rtl/sign_alternator.sv`: the downconverter.
* `rtl/polyphase_fir.sv`, `rtl/lut_scaler.sv`, `rtl/da_lincomb.sv`,
  `rtl/reg_lut.sv`, `rtl/pipe_add_tree.sv`: reusable polyphase,
  lookup-table and adder-tree building blocks.
* `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.

`tb_ddc_top` runs the top at its default sizes. It does three things:

* a bit-exact comparison with a sample-by-sample model, covering random data
  and a 700 MHz and an 800 MHz tone;
* checks that each tone appears at ±50 MHz at baseband, with its mirror at
  least 40 dB weaker;
* a latency check.

## Simulating

With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb \
    rtl/ddc_pkg.sv tb/tb_ddc_top.sv --top-module tb_ddc_top -o sim
./obj_dir/sim
```

Replace `tb_ddc_top` with any other testbench name. Every testbench finishes
in seconds.

Filters are set through parameters:

* `polyphase_fir`: `L`, `COEFS` (a 32-entry `coef_array_t`, zero-padded),
  `SYM`, `FORM`, `OUT_MASK`, `FRAC`, `OUT_W`.
* `eq_fir`: `L`, `COEFS`, `COEF_W`, `FRAC`, `OUT_W`.

Latencies follow from the sizes through the functions in `ddc_pkg`. If you
change a module's pipeline structure, update the matching function. The
testbenches check the latencies against fixed numbers, so they will flag any
change.
