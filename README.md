# One FIR filter, five arithmetic structures

An FIR filter spends nearly all of its area and switching power in its
multipliers and adders. This RTL builds the same 8-tap filter,

    y[n] = sum_{k=0}^{7} h[k] * x[n-k]

five times over, each time with a different way of doing the arithmetic, so
that they can be compared side by side and used on their own:

| instance | module             | multiplication                                    | samples per clock |
|----------|--------------------|---------------------------------------------------|-------------------|
| `mac`    | `mac_fir_booth`    | one radix-4 Booth multiplier per tap              | 1                 |
| `lp`     | `linear_phase_fir` | symmetric taps pre-added, half as many Booth multipliers | 1          |
| `fold`   | `folded_lp_fir`    | the linear-phase filter folded onto one Booth multiplier | 1/4        |
| `ser`    | `serial_mac_fir`   | bit-serial multipliers and bit-serial adders      | 1/19              |
| `sa`     | `shift_add_fir`    | fixed coefficients, multipliers made of shifts and adds | 1           |

Samples are 8-bit two's complement. Coefficients are 8-bit **unsigned**
(the reason is in the Booth section). All outputs keep full precision; nothing
is rounded or truncated.

## Number formats

| signal           | format                                   | width |
|------------------|------------------------------------------|-------|
| `x`              | signed integer                           | 8     |
| `coef`, `lp_coef`| unsigned integer                         | 8     |
| `mac_y`, `lp_y`, `fold_y` | signed integer                  | 20    |
| `ser_y`          | signed integer                           | 19    |
| `sa_y`           | signed, 2 fractional bits (value = `sa_y`/4) | 19 |

The Booth-based outputs are one bit wider than needed because the Booth
product is kept at XW+YW+1 bits; the values are identical.

## The radix-4 Booth multiplier

This is the part that repays careful reading. `booth_multiplier` takes a
signed multiplicand `x` (a sample, or a pre-added pair of samples) and an
unsigned multiplier `y` (a coefficient).

**Recoding.** `y` gets a 0 appended below its LSB and zeros above its MSB
(two zeros for an even width, one for an odd width), and is cut into
overlapping 3-bit groups `{y[2i+1], y[2i], y[2i-1]}`. An 8-bit `y` gives 5
groups, so 5 partial product rows instead of 8. Because the top is padded with
zeros rather than the sign bit, `y` is read as unsigned: that is why the
coefficients of every filter here are unsigned. Each group selects a multiple
of `x`:

| y[2i+1] y[2i] y[2i-1] | multiple | D (direction) | S (shift) | A (addition) |
|-----------------------|----------|---|---|---|
| 000 | 0   | 0 | 0 | 0 |
| 001 | +1x | 0 | - | 1 |
| 010 | +1x | 0 | - | 1 |
| 011 | +2x | 0 | 1 | 0 |
| 100 | -2x | 1 | 1 | 0 |
| 101 | -1x | 1 | - | 1 |
| 110 | -1x | 1 | - | 1 |
| 111 | -0  | 1 | 0 | 0 |

`booth_encoder` produces the three control bits with no logic beyond two XOR
gates: `D = y[2i+1]`, `S = y[2i+1] ^ y[2i]`, `A = y[2i-1] ^ y[2i]`.
Where A is 1, S does not matter, because A takes priority below.

**Partial product row.** `booth_ppg` builds each row bit from three 2:1
multiplexers:

    d[n] = D ? ~x[n] : x[n]        direction: ones' complement for negative multiples
    s[n] = S ? d[n-1] : 0          shift: take the neighbour bit, i.e. 2x
    p[n] = A ? d[n]   : s[n]       addition: 1x, otherwise 2x or 0

The row is XW+1 bits so that 2x fits. A negative row is the ones' complement;
the missing +1 is returned as a separate `neg` bit. Two details make it exact:
`d[-1]` is taken as D (the ones' complement of `x<<1` has a 1 in its LSB), and
`neg` is suppressed for the `111` code, whose row is all zeros (otherwise
"-0" would come out as +1).

**Reduction.** Each row is sign-extended to the product width and shifted by
2i; the `neg` bits form one extra row (bit 2i for group i). A chain of 3:2
carry-save compressors (`csa32`) reduces the rows to a sum and a carry vector,
and a single carry-propagate adder produces `p`, XW+YW+1 bits wide. The whole
multiplier is combinational.

## Transversal filter (`mac_fir_booth`)

The direct form: a delay line of 7 registers, the live input as tap 0, a Booth
multiplier on every tap (sample as multiplicand, coefficient as the recoded
operand) and a chain of adders. When `x_valid` is high the delay line shifts
and `y` loads the new sum on the same edge; `y_valid` follows one cycle later.
Coefficients are ports and may change between samples.

## Linear-phase filters

A filter with a symmetric response, `h[k] = h[7-k]`, can add the two samples
that share a coefficient before multiplying:

    y[n] = sum_{k=0}^{3} f[k] * (x[n-k] + x[n-7+k])

`linear_phase_fir` lays the delay line out as a hairpin: a forward run
(`x[n]` .. `x[n-3]`), one corner register, and a return run
(`x[n-4]` .. `x[n-7]`). Each forward position is pre-added to the sample
opposite it on the return run, so 4 multipliers (9-bit multiplicand) serve 8
taps. `lp_coef[k]` is `f[k] = h[k]`. Only symmetric filters are supported;
an antisymmetric one would need subtracting pre-adders.

`folded_lp_fir` computes the same sum with one pre-adder, one Booth multiplier
and one accumulator, spending 4 clock cycles per sample. All 8 samples sit in
registers (`fwd[0..3]`, `bwd[0..3]`); two 4:1 multiplexers pick the pair for
the current step and the coefficient is chosen with them:

| step (`Sel1`) | `Sel2` | pair added            | coefficient | accumulator       |
|---------------|--------|-----------------------|-------------|-------------------|
| 0 | 3 | x[n]   + x[n-7] | f[0] | cleared, then + product |
| 1 | 2 | x[n-1] + x[n-6] | f[1] | + product |
| 2 | 1 | x[n-2] + x[n-5] | f[2] | + product |
| 3 | 0 | x[n-3] + x[n-4] | f[3] | + product, copied to `y` |

The sequence comes from `fold_ctrl`, a counter with a valid/ready handshake.
A sample is taken when `x_valid && x_ready`; `x_ready` is high when idle and
during step 3, so a continuous stream is taken every 4 cycles with no gap.
`y_valid` is high 5 cycles after the edge that took the sample.

## Bit-serial filter (`serial_mac_fir`)

**Serial multiplier cell chain** (`serial_multiplier`). The coefficient `a`
is applied in parallel; the sample `b` arrives one bit per clock, LSB first,
and runs down a chain of flip-flops so that cell i sees it i cycles late.
Cell i ANDs that bit with `a[i]` and adds it, in a full adder, to the sum
coming from cell i-1 and to its own carry from the previous cycle, kept in a
flip-flop. Sum bits pass from cell to cell without a register, so the last
cell emits bit t of the product at cycle t: zero latency, but W full adders
in series on the critical path, and the carry loops stop it being pipelined.
A serial addend `z` enters the first cell (tied to 0 in the filter).

**Framing.** A word occupies a frame of FW = 8 + 8 + 3 = 19 bit times, enough
for the exact 8-tap sum. `start` marks bit 0: on that cycle all carry and
delay flip-flops are read as zero, so frames run back to back. Each sample is
streamed sign-extended over the whole frame; with an unsigned coefficient the
modulo-2^19 result is then the exact signed product.

**The filter.** A word-wide delay line keeps the last 7 samples. When a sample
is taken, each tap's word is copied into a shift register that streams it
(arithmetic shift, so the sign repeats). Eight serial multipliers produce
product streams, a chain of seven `serial_adder`s (full adder plus carry
flip-flop) sums them, and the sum bits are shifted into `y`. `fold_ctrl`
(with 19 steps) runs the frame: one sample every 19 cycles, `y_valid` 20
cycles after the take.

## Shift-add filter (`shift_add_fir`)

When coefficients are constants, a multiplier reduces to adding shifted copies
of the sample, one per power of two in the coefficient.
`shift_add_multiplier` takes the coefficient as an unsigned fixed-point
number (`COEF`, with `FRAC` fractional bits) and, at elaboration, places one
adder for each 1 bit. Its default, 3.75 = 2^1 + 2^0 + 2^-1 + 2^-2 (`COEF=15`,
`FRAC=2`), becomes four shifted copies of `x` and three adders.
With `FRAC = 0` the coefficients are plain integers, for example a
decimal set scaled up by a power of ten.
`shift_add_fir` puts one such multiplier on each tap of a transversal filter.
Its coefficients are a parameter, by default the symmetric low-pass set
`{1, 3, 6, 15, 15, 6, 3, 1} / 4`; the output has two fractional bits.

## Top level (`fir_top`)

All five filters share `x`. A sample is taken when `x_valid && x_ready`, and
`x_ready` is low while the folded or the serial filter is still busy, so every
filter sees every sample; with the serial filter present the stream runs at
one sample per 19 cycles. `coef[0..7]` feeds `mac` and `ser`; `lp_coef[0..3]`
feeds `lp` and `fold`; `sa` uses its built-in set. Each filter has its own
`*_valid`/`*_y` pair:

| output | cycles after the taking edge |
|--------|------------------------------|
| `mac`, `lp`, `sa` | 1  |
| `fold`            | 5  |
| `ser`             | 20 |

Change coefficients only while the folded and serial filters are idle; the
parallel filters read them on the edge that takes a sample. Reset is
asynchronous and active low (`rst_n`) and clears every register.

## Origin of the details

The filter structures (transversal, hairpin linear-phase, the folded form with
two 4:1 multiplexers, a pre-adder, one multiplier and an accumulator
register), the Booth algorithm with its zero padding, the D/S/A equations,
the three-multiplexer row cell, the encoder/compressor/carry-propagate split,
the serial multiplier cell with its delayed carry feedback, the shift-add
decomposition with the 3.75 example, and the sizes (8 taps, 8-bit data and
arithmetic) follow the published description of this design.

Choices made in this RTL where that description is silent or unclear:

- Valid/ready handshakes, output registers, and all latencies.
- Asynchronous active-low reset.
- Full-precision output widths.
- How a negated Booth row gets its +1 (a separate correction row, suppressed
  for the "-0" code), and a carry-save chain rather than a tree.
- Which delay-line node drives which multiplexer input in the folded filter.
  The newest sample is also held in a register there, so it stays stable
  for all four steps.
- The serial framing: the `start` signal, the 19-bit frame, sign extension of
  the serial operand, and the word delay line around the serial taps.
- The default coefficients of the shift-add filter; only 3.75 was given.
- 8-bit coefficients, although 16-bit coefficients are also quoted for one
  evaluated configuration. Every filter takes a `CW` parameter, and the
  programmable ones are tested at `CW = 16` (`coef16_workload_tb`).

Not included: variants that suppress data transitions at the multiplier
inputs (used only as a point of comparison), antisymmetric linear-phase
filters, signed coefficients, and any power or timing figures.

## Parameters

The filters take `DW` (sample width), `CW` (coefficient width) and `NTAP`
(taps, even for the linear-phase ones), with defaults from `fir_pkg`.
`folded_lp_fir` always uses `NTAP/2` steps. `serial_mac_fir` always uses a
frame of `DW+CW+log2(NTAP)` bits. `shift_add_fir` also takes `FRAC` and the
`COEFS` array. If you change `NTAP`, give `COEFS` a matching length.
`fir_top` has no parameters of its own. Its port widths follow `fir_pkg`.

## Simulation

Every module except `csa32` has a self-checking testbench
`tb/<module>_tb.sv`; `csa32` is covered by the Booth multiplier's exhaustive
test. Two more benches cover other sizes: `tb/coef16_workload_tb.sv` runs the
programmable filters with 16-bit coefficients, and `tb/fir_sizes_tb.sv`
(with the helper `tb/fir_size_check.sv`) runs them at 4 and 16 taps. Each prints
`TB_RESULT checks=N failures=M` and stops with `$finish`. Booth encoder, row
generator and 8x8 multiplier are checked exhaustively. The filters are
compared, output by output and cycle by cycle, with a convolution model.
`fir_top_tb` runs the whole top at its default sizes. It also counts the
mechanisms it must exercise: stalls, back-to-back takes, every Booth code,
every folded step, and coefficient changes.

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/fir_pkg.sv tb/fir_top_tb.sv --top-module fir_top_tb -o sim
    ./obj_dir/sim

Replace `fir_top_tb` with any other testbench name. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/fir_pkg.sv rtl/<module>.sv`.
