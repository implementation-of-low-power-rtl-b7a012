# Low-power 8-tap FIR filters: Booth MAC, folded linear-phase, bit-serial and shift/add

An FIR filter computes

    y[n] = sum_{k=0}^{7} c[k] * x[n-k]

for 8-bit two's-complement samples `x` and 8-bit two's-complement coefficients
`c`. A fully parallel filter spends eight multipliers and seven adders on this
and switches all of them on every sample. The RTL here builds the same filter
five ways, each of which cuts the amount of switching logic differently:

| filter | module | idea | cycles per sample | latency (cycles) |
|---|---|---|---|---|
| MAC + Booth | `mac_fir_booth` | one radix-4 Booth multiplier and one accumulator, time-shared over the 8 taps | 10 | 9 |
| folded linear phase + Booth | `fold_fir_booth` | symmetric coefficients: add the mirrored sample pair first, then one multiply per pair, folded onto one multiplier | 6 | 5 |
| bit-serial MAC | `serial_fir` | bit-serial multiplier and bit-serial adder; only one-bit adders toggle | 169 | 168 |
| shift/add, form 1 | `shift_add_fir` | constant coefficients (159, -53) hard-wired as shifts and adders, transposed filter | 1 | 1 |
| shift/add, form 2 | `shift_add_fir` | fractional constant 3.75 = 2^1 + 2^0 + 2^-1 + 2^-2 | 1 | 1 |

`fir_top` places all five side by side. They share only `clk` and the
active-low asynchronous reset `rst_n`; each has its own sample, coefficient
and result ports (prefixes `mac_`, `fold_`, `ser_`, `sa1_`, `sa2_`). The
designs are alternatives to compare, not stages of one pipeline.

Latency is counted in clock edges from the edge that accepts a sample to the
edge that raises `out_valid`.

## The radix-4 Booth multiplier

`booth_multiplier` is the datapath of the first two filters and the part with
the most detail. Its structure, in signal order:

1. **Input buffers.** `x` (multiplicand, the sample) and `y` (multiplier, the
   coefficient) are registered when `load` is high. Everything after the
   buffers is combinational, so the product is valid one cycle after `load`
   and stays valid until the next load.
2. **Booth encoder** (`booth_encoder`). The multiplier is cut into
   overlapping groups `{y[2i+1], y[2i], y[2i-1]}` with `y[-1] = 0`. Group `i`
   stands for the multiple `m_i = -2*y[2i+1] + y[2i] + y[2i-1]`, which is one
   of 0, ±1, ±2, and `y = sum m_i 4^i`. An 8-bit multiplier thus needs 4
   partial products instead of 8. Each group is encoded as three bits:

   | group | multiple | dir | sht | add |
   |---|---|---|---|---|
   | 000 | 0 | 0 | 0 | 0 |
   | 001, 010 | +1x | 0 | x | 1 |
   | 011 | +2x | 0 | 1 | 0 |
   | 100 | -2x | 1 | 1 | 0 |
   | 101, 110 | -1x | 1 | x | 1 |
   | 111 | -0 | 1 | 0 | 0 |

   with `dir = y[2i+1]`, `sht = y[2i+1] ^ y[2i]`, `add = y[2i] ^ y[2i-1]`:
   two XOR gates per group.
3. **Partial product generator** (`booth_ppg`). Per bit, three 2:1 MUXes and
   an inverter: the direction MUX picks `x[m]` or `~x[m]`, the shift MUX picks
   the neighbouring bit `xd[m-1]` or a constant 0, and the addition MUX picks
   between the two. The row is one bit wider than `x` so that 2x fits. A
   negative multiple comes out as the one's complement; the missing `+1` is a
   separate output `neg = dir & (sht | add)`, which is 0 for the `-0` group.
4. **Compressors.** The four rows (sign-extended, weighted by 4^i) and one
   vector holding the four `neg` bits are reduced to two vectors by a chain
   of three carry-save rows (`csa_row`).
5. **Carry propagation adder.** One ordinary adder produces the
   `XW+YW`-bit product.

The folded filter uses a 9-bit multiplicand (the pre-added sample pair), which
the module supports through `XW`; `YW` must be even.

## The time-shared filters

`mac_fir_booth` and `fold_fir_booth` share one control scheme. A sample is
accepted when `in_valid & in_ready`; it enters an 8-entry delay line
(`taps[k] = x[n-k]`) and the filter becomes busy (`in_ready = 0`). A counter
then steps through the products: on each cycle it loads one operand pair into
the multiplier buffers, and one cycle later the product is added to the
accumulator. The last product is added directly into `out_data`, and
`out_valid` is high for one cycle. In that same cycle `in_ready` is high
again.

The **folded linear-phase filter** relies on symmetric coefficients,
`c[k] = c[7-k]`:

    y[n] = sum_{k=0}^{3} c[k] * (x[n-k] + x[n-7+k])

Only `c[0..3]` are stored. Two 4-input MUXes, both selected by the same
counter `k`, take `x[n-k]` and `x[n-7+k]` from the delay line. A pre-adder
forms their 9-bit sum, and one multiply-accumulate per pair follows. This
takes half the multiplications of the MAC filter. The
output is exact only for symmetric coefficient sets, which is the filter's
definition. Writing `c[k]` sets both `c[k]` and `c[7-k]`.

Coefficients of the three programmable filters are written through
`coef_we / coef_addr / coef_data` (addresses 0..7, or 0..3 for the folded
filter). They reset to zero. Results are full precision: 19 bits, which holds
the sum of eight worst-case products.

## Bit-serial arithmetic

**`serial_multiplier`** multiplies a parallel 8-bit coefficient `a` by an
operand arriving one bit per clock, LSB first. The serial bit runs down a
chain of flip-flops, so cell `i` sees it delayed by `i` cycles, which gives it
weight 2^i. Each cell ANDs that bit with `a[i]` and adds it in a full adder to the sum bit
coming from cell `i-1`. The adder's carry goes back to its own carry input
through a flip-flop. The last cell's sum is the product, LSB first. The sum
path is not registered, so the critical path is eight full adders.

Signed operands are handled in two ways. The caller sign-extends the serial
operand for the whole run. The most significant cell subtracts instead of
adds: it feeds the inverted AND bit and its carry flip-flop starts at 1. Over
N output bits that adds `-(a[7] * 2^7 * b) mod 2^N`. A one-cycle `clr` before each run clears the delay chain and the
carries. The bit of weight 2^j is presented, and the product bit of weight
2^j comes out, in the j-th cycle after `clr`.

**`serial_adder`** adds two LSB-first streams with one full adder and one
carry flip-flop. Each sum bit shifts into the top of a `W`-bit register, so
after `W` bits `sum` holds the result in normal order. `start` clears the
counter and the carry, and `ready` is high once `W` bits have been added.
`W` defaults to 16.

**`serial_fir`** chains them. Each tap takes one START cycle and then
SW + 1 cycles, with SW = 19. START clears the multiplier, starts the adder,
loads the sample into an arithmetic-shift register and loads the running sum
into a shift register. Then come SW bit cycles, in which the multiplier's
product bit and the running sum's LSB go into the adder. The last cycle waits
for `ready`. Eight taps make 168 cycles per output. All words are 19 bits, so
nothing can overflow. The arithmetic is slow, but at any moment only a few
one-bit cells are active.

## Shift/add constant multipliers

`shift_add_mult` multiplies by a constant that is fixed when the design is
built. The constant is split greedily into powers of two: take the largest power not
above the remaining magnitude and subtract it. The result is its binary
expansion. Each power becomes a wired shift of `x`, and the shifted copies are
summed in a chain of adders, or subtractors for a negative constant:

- 159 = 2^7 + 2^4 + 2^3 + 2^2 + 2^1 + 2^0 (five adders)
- -53 = -(2^5 + 2^4 + 2^2 + 2^0)
- 3.75 = 2^1 + 2^0 + 2^-1 + 2^-2, built as 15 with two fraction bits

`shift_add_fir` is a transposed-form filter built from these multipliers:
every coefficient multiplies the current sample, and a chain of registers
carries the partial sums to the output. It accepts one sample per clock when
`in_valid` is high. `out_valid` follows `in_valid` one cycle later. The
coefficients are the parameter `COEFS`, a packed array of 32-bit signed
integers with `c[0]` first.

- **Form 1** (the default) uses the coefficients 0.159 and -0.053 scaled by
  1000. Its output is therefore 1000 times the real-valued filter output.
- **Form 2** (`TAPS = 1`, `COEFS = 15`) represents 3.75 with two fraction
  bits, so its output has two fraction bits.

Only these three coefficient values are specified, so the shift/add filters
have two taps and one tap. For an 8-tap version, set `TAPS`, `COEFS` and the
widths `PW`/`YW`.

## Design choices and departures

These points are this implementation's own decisions rather than part of the
filter descriptions it follows:

- Handshakes (`valid/ready` input, one-cycle `out_valid` pulse), coefficient
  write ports, reset values and all accumulator/word widths.
- The MAC filters' schedule (one product per cycle, one cycle of multiplier
  latency) and the serial filter's START/RUN sequence.
- In the Booth generator, negation is done as one's complement plus a
  separate `+1` vector. The compressor stage is therefore a chain of three
  3:2 rows fed by five inputs, rather than three adders over four rows.
- Signed arithmetic in the bit-serial multiplier, using the subtracting sign
  cell. The cell array it extends is unsigned.
- The bit-serial multiplier's leftmost sum input is tied to 0.
- The folded filter's two symmetric delay lines are one 8-sample delay line,
  with MUX input `k` carrying `x[n-k]` and `x[n-7+k]`.
- The shift/add filters use the transposed structure.
- Form 1's coefficient 159 needs 9 signed bits, one more than the 8-bit
  coefficients of the other filters. Constants are wired in, so this costs
  nothing.
- Not built: a digit-serial (unfolded) variant of the serial multiplier,
  which is mentioned only as an alternative; and the plain direct-form
  8-multiplier filter that the others are measured against.

Nothing here reproduces power or FPGA timing figures. The RTL is functional
and synthesizable.

## Verification

Every module has a self-checking testbench in `tb/`. Each computes expected
values on its own, ends with a `TB_RESULT checks=N failures=M` line, and has a
watchdog.

- `tb_booth_encoder`, `tb_booth_ppg`: exhaustive over all 8-bit operands and
  all group codes.
- `tb_booth_multiplier`: all 65 536 signed 8×8 products, checked one cycle
  after load while the inputs change, plus random 9×8 products.
- `tb_serial_multiplier`: all 65 536 signed 8×8 products, bit-serially.
- `tb_serial_adder`: random 16-bit sums and the exact `ready` timing.
- `tb_shift_add_mult`: all inputs for constants 159, -53, 15, 1, -128 and 0.
- `tb_mac_fir_booth`, `tb_fold_fir_booth`, `tb_serial_fir`: random
  coefficients (including -128 and 127) and samples with random gaps and
  held-off `in_valid`. Every output is compared with a convolution, and the
  latency is checked exactly.
  The three time-shared filters also carry assertions: `out_valid` is a
  single-cycle pulse, and `in_ready` drops right after a sample is accepted.
- `tb_shift_add_fir`: form 1, form 2 and a 5-tap mixed-sign configuration.
- `tb_fir_top`: all five filters at default sizes, 40 samples each. It counts
  stalls, results of every filter, every Booth group code and pre-additions
  that leave 8 bits, and it fails if any of them never happens.

To run one testbench with Verilator (5.x):

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/fir_pkg.sv tb/tb_fir_top.sv --top-module tb_fir_top -Mdir obj -o sim
    ./obj/sim

`-Irtl` lets Verilator find each module in `rtl/<module>.sv`. `fir_pkg.sv`
holds the shared sizes: 8-bit data, 8-bit coefficients, 8 taps.

## Files

- `rtl/fir_pkg.sv`: shared constants.
- `rtl/booth_encoder.sv`, `rtl/booth_ppg.sv`, `rtl/csa_row.sv`,
  `rtl/booth_multiplier.sv`: the Booth multiplier.
- `rtl/mac_fir_booth.sv`, `rtl/fold_fir_booth.sv`: the time-shared filters.
- `rtl/serial_multiplier.sv`, `rtl/serial_adder.sv`, `rtl/serial_fir.sv`: the
  bit-serial filter.
- `rtl/shift_add_mult.sv`, `rtl/shift_add_fir.sv`: the shift/add filters.
- `rtl/fir_top.sv`: the five filters side by side.
- `tb/tb_<module>.sv`: one testbench per module.
