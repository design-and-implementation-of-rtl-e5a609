# Multiplier-free FIR filter: distributed arithmetic with a divided look-up table

This is a 32-tap (order 31) linear-phase low-pass FIR filter for 12-bit
two's-complement samples. It has no multipliers. Each output is built one
bit position at a time from look-up tables (LUTs) of precomputed coefficient
sums: this is *distributed arithmetic* (DA). Two things keep the tables small:

1. **Symmetric pre-addition.** A linear-phase filter has `h[k] = h[31-k]`,
   so the two samples that share a coefficient are added first. This leaves
   16 sums, each one bit wider than the input (13 bits).
2. **Divided LUT.** One table addressed by all 16 sums would need
   2^16 = 65 536 entries. Instead the 16 sums are split into four groups of
   four, and each group gets a 16-entry table. That is 64 entries in total,
   and a small adder tree combines the four table outputs.

Three pipeline registers sit between the tables and the accumulator. They
shorten the critical path, and they let the next sample enter while the
previous one is still draining.

## The arithmetic

Let `u[i] = x[n-i] + x[n-31+i]`, for `i = 0..15`, be the 13-bit pair sums,
with sign bit `u_12`. Then

    y[n] = sum_i h[i] * u[i]
         = -2^12 * T_12 + sum_{b=0}^{11} 2^b * T_b,
    T_b  = sum_i h[i] * u_b[i]          (u_b[i] = bit b of u[i], 0 or 1)

`T_b` depends only on the 16 bits `u_b[0..15]`, so it can be looked up
instead of multiplied. The 16 bits are split into four groups of four:

    T_b = L(u_b[0..3]) + L(u_b[4..7]) + L(u_b[8..11]) + L(u_b[12..15])

Table `g` (g = 0..3) holds all 16 subset sums of its four coefficients
`c_j = h[4g+j]`. The entry at address `a` is the sum of the `c_j` whose
address bit `a[j]` is set:

| address b3 b2 b1 b0 | entry |
|---|---|
| 0000 | 0 |
| 0001 | c0 |
| 0010 | c1 |
| 0011 | c0 + c1 |
| ... | ... |
| 1111 | c0 + c1 + c2 + c3 |

The tables are computed from the coefficient parameter when the design is
elaborated, so they are never typed in by hand. Changing the coefficients
rebuilds them.

## Data flow and timing

```
in_data --> pretreatment  --> shift register --> LUT0..LUT3 --> + --> + --> +/- accumulator --> out_data
 (12 b)    (delay line +      (16 x 13 b, one    [reg]        [reg] [reg]    (z^-1 feedback,
            16 pair sums)      bit per clock,                                 x 2^b, subtract
                               LSB first)                                     for the sign bit)
```

The filter processes one bit position per clock, so one sample takes 13
clocks.

| clock (relative to the accepting edge) | event |
|---|---|
| 0 | `in_valid && in_ready`. The sample enters the delay line, and the 16 pair sums are loaded into the shift register on the same edge. |
| 1 .. 13 | The shift register presents bit 0 .. 12 of every pair sum. These bits are the four 4-bit table addresses. |
| +1 | Table outputs are registered (pipeline stage 1). |
| +2 | LUT0+LUT1 and LUT2+LUT3 are registered (stage 2). |
| +3 | The sum of the two pairs is registered (stage 3). |
| +4 | The accumulator loads bit 0, adds `T_b << b` for bits 1..11 and subtracts `T_12 << 12` for the sign bit. |
| 17 | `out_valid` is high for one clock. `out_data` holds the result until the next one. |

- **Throughput:** one sample per 13 clocks. `in_ready` goes high again in
  the clock of the last bit, so samples can follow each other with no gap.
- **Pipeline overlap:** the pipeline runs freely. Bit index, first-bit and
  last-bit flags travel beside the data through the three stages, so the
  first bits of the next sample overlap the last bits of the current one.
- **Latency:** 17 clocks from acceptance to `out_valid`.
- **Waiting for input:** when no sample is offered, the controller idles and
  the filter keeps its state.

## Number formats

| signal | width (default) | format |
|---|---|---|
| input sample | 12 | signed integer |
| pair sum | 13 | signed; cannot overflow |
| coefficient | 12 | signed Q1.11 |
| LUT entry | 14 | sum of 4 coefficients, exact |
| adder-tree output | 16 | sum of 4 entries, exact |
| output | 29 | signed, exact: `y = sum h[k] x[n-k]` with `h` in integer units |

To read the output on the input's scale, divide it by 2^11. No rounding or
saturation is done anywhere.

## Coefficients

The default coefficients are a Hamming-windowed sinc with cutoff `0.2 fs`.
They are normalised to unity DC gain and rounded to Q1.11:

    m    = n - 15.5,                       n = 0..31
    s[n] = sin(2*pi*0.2*m) / (pi*m)
    w[n] = 0.54 - 0.46*cos(2*pi*n/31)
    h[n] = round(2048 * w[n]*s[n] / sum_k(w[k]*s[k]))

This gives `h[0..15] = 2, -2, -5, 0, 12, 11, -15, -34, 0, 63, 52, -70, -158, 0, 405, 765`.
Only this half is stored (`da_pkg::DEF_COEF`), because `h[31-n] = h[n]`.

To use another symmetric filter, pass `COEF` (16 values for 32 taps) to
`da_fir_top`. `TAPS` may be any multiple of 8. Each of the four tables then
has `TAPS/8` address bits. `IN_W` and `COEF_W` set the input and coefficient
widths, and every internal width follows from them.

## Interface of `da_fir_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock (rising edge) |
| `rst_n` | in | 1 | synchronous active-low reset. Clears the sample history and the control. |
| `in_valid` | in | 1 | a sample is offered |
| `in_ready` | out | 1 | the sample is taken on this edge when both are high |
| `in_data` | in | 12 | signed sample |
| `out_valid` | out | 1 | one-clock pulse per result |
| `out_data` | out | 29 | signed result |

## Modules

| file | role |
|---|---|
| `rtl/da_pkg.sv` | sizes, pipeline depth, default coefficients |
| `rtl/da_ctrl.sv` | bit counter (`div_count`, 0..12), valid/ready handshake, first/last/index flags delayed to the accumulator |
| `rtl/da_pretreat.sv` | 32-sample delay line and the 16 symmetric pair sums |
| `rtl/da_bit_shreg.sv` | parallel-in, bit-serial-out register (LSB first) |
| `rtl/da_lut.sv` | one divided table, with a registered output. Instantiated four times. |
| `rtl/da_adder_tree.sv` | two-level pipelined sum of the four table outputs |
| `rtl/da_accumulator.sv` | +/- shift-accumulator and output register |
| `rtl/da_fir_top.sv` | the complete filter |

## Simulating

Each testbench in `tb/` checks itself and prints
`TB_RESULT checks=N failures=M`. For example, the end-to-end test at the
default size:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_da_fir_top \
        rtl/da_pkg.sv rtl/da_*.sv tb/tb_da_fir_top.sv
    ./obj_dir/Vtb_da_fir_top

The same pattern works for the other tests. Each block test needs only
`rtl/da_pkg.sv` and the block's own file.

- `tb_da_fir_top` compares every output against a direct-form model (real
  multiplications). It also checks the 17-clock latency and the 13-clock
  spacing of back-to-back samples. It covers an impulse, full-scale positive
  and negative steps, random samples with idle gaps, back-to-back samples with
  extreme values (including pair sums of -4096) and a reset in mid-stream.
  Each of these mechanisms is counted, and the test fails if one never occurs.
- `tb_da_fir_lowpass` filters a 0.05 fs and a 0.40 fs sine wave and checks
  every output. Measured gains are about 0.99 in the pass band and 0.0007 in
  the stop band.
- `tb_da_pretreat`, `tb_da_bit_shreg`, `tb_da_lut`, `tb_da_adder_tree`,
  `tb_da_accumulator` and `tb_da_ctrl` test each block on its own.
  Expected values are computed independently of the RTL.

## Design choices that go beyond the filter's structure

The structure itself is given: pair pre-addition, bit-serial LSB-first
processing, four 16-entry subset-sum tables, a two-level adder tree, three
pipeline registers, and a +/- accumulator that subtracts for the sign bit.
The following choices are this implementation's own:

- **Coefficients:** values, the 12-bit width and the cutoff.
- **Input interface:** the valid/ready handshake, and the rule that a sample
  can be accepted in the clock of the previous sample's last bit.
- **Pre-adders:** the pair sums are combinational and are captured directly
  by the shift register. There is no separate register between them.
- **Accumulator:** it shifts the incoming value left by the bit index instead
  of shifting its own contents right. It loads on the first bit instead of
  being cleared.
- **Output:** a full-precision 29-bit output held in a register, with no
  rounding.
- **Reset:** synchronous, active-low. It clears the sample history, the
  control and the output. The shift-register, table and adder registers are
  not reset; their contents are ignored until valid data reaches them.
- **Filter form:** a symmetric (even) filter, so pairs are added. An
  antisymmetric filter would need the pairs subtracted, and this RTL does not
  offer that.

## Known limits

- The filter runs at one bit per clock. Processing several bits per clock
  (more tables) would raise throughput, but it is not implemented.
- `TAPS` must be a multiple of 8, because there are always four tables.
- Lint reports unused constants from `da_pkg` in modules that use only part
  of it. It also reports the controller's `div_count` output as unused at the
  top level: it is exposed for observation, and the accumulator takes its
  delayed copy instead.
