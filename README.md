# A small FIR filter built on a Vedic multiplier and a carry skip adder

This RTL implements a low-area FIR filter whose arithmetic is built from two
classic "fast" structures. Multiplication uses a **Vedic multiplier**: the
"vertical and crosswise" method, built recursively from 2x2 to 4x4 to 8x8
blocks. Addition uses a **carry skip adder**: ripple-carry blocks of four
bits that pass an incoming carry straight past the block when every bit of
the block propagates.

The filter comes in two forms. They share only the clock and reset.

1. **`mac_fir_filter`** is the main design. It is a sequential eight-tap
   multiply-accumulate filter. Eight 8-bit samples sit in a small RAM and
   eight 8-bit coefficients sit in a ROM. On each clock one sample is
   multiplied by one coefficient and the 16-bit product is added to an
   accumulator. After eight clocks the accumulator holds
   `sum_k x[k]*h[k]`.
2. **`ispa_frm_filter`** is a tunable structure. It has several interpolated
   sub-filters (delays of z^-M instead of z^-1) combined by a tuning value
   alpha, a complementary branch, and two masking filters whose outputs are
   summed. The arrangement is given as a block diagram only. All its sizes
   and coefficients are this design's own choices, so treat it as a
   configurable skeleton, not a finished filter (see below).

`ispa_top` places both side by side. The `mac_` ports belong to the first
filter and the `frm_` ports to the second.

## The multiply-accumulate filter

```
            +-----------------+   tap_addr
 start ---->| control_circuit |---------+-------------------+
            |  IDLE/RUN/DONE  |  clear  |                   |
            +-----------------+  mac_en v                   v
                    |           +-------------------+  +-----------+
                    |           | address_generator |  | coeff_rom |
                    |           +-------------------+  +-----------+
                    |                   | addr               | coef (8)
  ram_we/waddr/     |             +-----------+               |
  wdata ----------------------->  | data_ram  |  sample (8)   |
                    |             +-----------+------> vedic_8x8 (PE)
                    |                                        | product (16)
                    +--clear, mac_en------------> accumulator (csa_adder + reg) --> acc_out (16)
```

**Operation.** Fill the RAM through `ram_we/ram_waddr/ram_wdata`, one sample
per clock. Then pulse `start` while the filter is idle. In the clock that
takes `start`, the control circuit raises `clear`. This zeroes the
accumulator and returns the address to tap 0. During the next eight clocks
`mac_en` is high. Each of those clocks does the following:

- The address generator names tap k.
- The RAM and ROM return `x[k]` and `h[k]` without a clock.
- The Vedic multiplier forms `y = x[k]*h[k]`.
- The accumulator loads `acc + y` at the clock edge.

In the following cycle `done` is high for one clock, and `acc_out` holds the
result until the next `start`. So a result appears `TAPS + 1` clocks after
`start`. A new `start` can follow `done` directly. `start` is ignored while
`busy` is high.

**Worked example.** This is the sequence the testbenches check, with the
default coefficients:

| clock | tap | sample | coef | product | acc after clock |
|------:|----:|-------:|-----:|--------:|----------------:|
| 1 | 0 | 36  | 6  | 216  | 216   |
| 2 | 1 | 129 | 8  | 1032 | 1248  |
| 3 | 2 | 9   | 10 | 90   | 1338  |
| 4 | 3 | 99  | 13 | 1287 | 2625  |
| 5 | 4 | 13  | 18 | 234  | 2859  |
| 6 | 5 | 141 | 23 | 3243 | 6102  |
| 7 | 6 | 101 | 34 | 3434 | 9536  |
| 8 | 7 | 18  | 47 | 846  | 10382 |

**Coefficients.** The ROM holds 6, 8, 10, 13, 18, 23, 34, 47 at addresses
0 to 7. Each number came from an equiripple (Parks-McClellan) low-pass design
of order 30. The pass-band edge was 0.1 and the stop-band edge was stepped
from 0.15 down to 0.115. Each design's peak ripple was scaled as
`round(255*ripple)`.

These are therefore not the taps of one low-pass impulse response. Any
eight 8-bit unsigned values can be used instead by overriding the `COEFS`
parameter of `mac_fir_filter` or `coeff_rom`, or by editing
`fir_pkg::COEFS`.

**Widths and overflow.** Samples and coefficients are 8-bit unsigned and
products are 16 bits. The accumulator is 16 bits and wraps on overflow.
With the default coefficients the largest possible sum is
255 x 159 = 40545, so it never overflows. With larger coefficients it can
overflow, and there is no overflow flag.

**Sample source.** The original set-up filled the RAM from a random number
generator in simulation. No such hardware is part of this RTL. Whatever
produces the samples writes them through the RAM write port.

## The arithmetic units

### Vedic multiplier (`vedic_2x2`, `vedic_4x4`, `vedic_8x8`)

The 2x2 block forms three partial products, each one bit further left:

- `a0b0` gives bit 0.
- The crosswise pair `a0b1 + a1b0` gives bit 1 and a carry.
- `a1b1` plus that carry gives bits 2 and 3.

For example, 11 x 11 = 1001.

Each larger block splits both operands into halves and uses four blocks of
half the size. Writing `n` for half the width:

```
p3 = a_hi*b_hi   p2 = a_lo*b_hi   p1 = a_hi*b_lo   p0 = a_lo*b_lo

P[n/2-1:0]  = p0[n/2-1:0]                                (passes straight through)
s_hi        = {p3, n/2 zeros} + {n/2 zeros, p2}          (adder 1)
s_mid       = p1 + {n/2 zeros, p0[n-1:n/2]}              (adder 2)
P[top:n/2]  = s_hi + s_mid                               (adder 3)
```

For the 8x8 block, `n/2` is 4 and the adders are 12, 8 and 12 bits wide.
The 4x4 block has the same form with 2-bit halves.

This arrangement is exact: `s_hi + s_mid` equals `(a*b) >> n/2`. All
the adders are carry skip adders. Some adder carry-outs are provably always
zero; they are left unconnected, which accounts for the unused-signal lint
warnings.

`signed_vedic_mult` reuses the unsigned 8x8 block for two's-complement
operands. It multiplies the magnitudes (0 to 128 fit in eight unsigned bits)
and negates the product when the signs differ. The tunable structure uses
it.

### Carry skip adder (`full_adder`, `csa_block4`, `csa_adder`)

A 4-bit block (`csa_block4`) is a ripple chain of four full adders. Each
full adder also outputs its propagate bit, `p_i = a_i ^ b_i`. The AND of
the four propagate bits drives a 2:1 multiplexer:

- If all four are 1, the block's carry out is its carry in `c0`.
- Otherwise the carry out is the ripple carry `c4` from the last full adder.

The two paths give the same value. The skip path only shortens the longest
carry path through a chain of blocks.

`csa_adder #(WIDTH)` chains `ceil(WIDTH/4)` blocks. If `WIDTH` is not a
multiple of four, the operands are zero-padded, and the carry out is read
from the first padding bit.

## The tunable interpolated structure (`ispa_frm_filter`)

```
x --+--> sub-filter 1 ... sub-filter L+1   (all: same x, sel_m, sel_sub)
    |          S1            S(L+1)
    |   H_A = S1 + a*(S2 + a*(S3 + ... + a*S(L+1)))      a = alpha
    +--> complementary delay D = (NTAPS-1)/2 * M -->  H_C = x(n-D) - H_A
         mask 1 on H_C, mask 2 on H_A; the adder sums all mask tap products -> y (registered)
```

- **Sub-filter (`ispa_subfilter`)** is a transposed-form FIR. Each partial
  sum passes a z^-M delay before the next tap's product is combined with
  it. M is chosen at run time (`sel_m`, 1 to 4), and a z^-M delay is a
  4-stage register line read at stage M. The adders of odd taps add or
  subtract under `sel_sub`; the adders of even taps always add. The
  response is therefore

  `y(n) = sum_k s_k*h[k]*x(n-(NTAPS-1-k)*M)`, where `s_k = -1` for odd k
  when `sel_sub` is set, and `s_k = +1` otherwise.

- **Combination** uses a chain of alpha multipliers and adders in Horner
  form. Changing alpha moves the response without loading new
  coefficients.
- **Complementary delay** matches the sub-filters' group delay, so
  `H_C = z^-D - H_A` is the complement of `H_A`.
- **Masks (`mask_filter`)** are 3-tap delay lines with coefficients. The
  input is scaled down by 2^7 and saturated to 8 signed bits so that the
  8x8 Vedic multiplier can form the products. The final adder sums the
  tap products of both masks, and `y` is registered.

**Timing.** One sample is taken per clock with `en` high, and `en` low
stalls everything. `H_A` and `H_C` are combinational from the current
sample. `y` appears one enabled clock after its sample.

**Number formats.** Samples are signed 8-bit. Coefficients and alpha are
signed Q1.7, where 128 stands for 1.0, so the usable range is -1.0 to
+0.992. Internal values are 24-bit signed multiples of 2^-7 of the input.
Alpha products are truncated by an arithmetic shift, and sums wrap.

**What is this design's own here.** Everything numeric: L = 3 (four
sub-filters), five taps per sub-filter, M up to 4, three mask taps, the
24-bit word, the formats, and the coefficient sets in `ispa_pkg`. The
default coefficient sets are simple symmetric examples, not a designed
filter. The block diagram this structure follows also connects the input
to the final adder but gives no weight for it, so the input is not added.

## How far to trust it

- The MAC filter reproduces the expected sums for the example above.
  Every arithmetic block is checked exhaustively or against integer
  arithmetic: 2x2, 4x4 and 8x8 multipliers over all operand pairs, the
  4-bit skip block over all inputs, and wide adders over random and
  all-propagate operands.
- Not taken from the original design (all choices made here):
  - the start/done handshake, the `clear` pulse and the three-state control
    FSM
  - the asynchronous (combinational) RAM/ROM read
  - the RAM write port
  - asynchronous active-low reset
  - carry skip adders inside the Vedic multiplier
  - the adder widths
- The tunable structure is checked against a direct-form reference model
  (`tb/ispa_ref_pkg.sv`). That only shows that the RTL computes the
  formulas above. Whether those formulas and defaults give a useful
  frequency response is for the user to decide.

## Files

| file | contents |
|------|----------|
| `rtl/fir_pkg.sv` | MAC filter sizes, types, default coefficients |
| `rtl/ispa_pkg.sv` | tunable structure sizes, formats, default coefficients |
| `rtl/ispa_top.sv` | top: both filters side by side |
| `rtl/mac_fir_filter.sv` | the eight-tap MAC filter |
| `rtl/control_circuit.sv`, `rtl/address_generator.sv`, `rtl/data_ram.sv`, `rtl/coeff_rom.sv`, `rtl/accumulator.sv` | its parts |
| `rtl/vedic_8x8.sv`, `rtl/vedic_4x4.sv`, `rtl/vedic_2x2.sv`, `rtl/signed_vedic_mult.sv` | multipliers |
| `rtl/csa_adder.sv`, `rtl/csa_block4.sv`, `rtl/full_adder.sv` | carry skip adder |
| `rtl/ispa_frm_filter.sv`, `rtl/ispa_subfilter.sv`, `rtl/complementary_delay.sv`, `rtl/mask_filter.sv` | tunable structure |
| `tb/tb_<module>.sv` | one self-checking testbench per module; `tb_ispa_top` runs both filters end to end at default sizes |
| `tb/ispa_ref_pkg.sv` | reference model for the tunable structure |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For
example, from the folder holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/fir_pkg.sv rtl/ispa_pkg.sv tb/ispa_ref_pkg.sv tb/tb_ispa_top.sv \
  --top-module tb_ispa_top
./obj_dir/Vtb_ispa_top
```

Replace `tb_ispa_top` with any other `tb_<module>` to test one block. The
packages must be listed first. `-Wno-fatal` keeps width and unused-signal
lint warnings from stopping the build. All testbenches finish in well under
a second.
