# Multiplier-free LMS adaptive FIR filter with distributed arithmetic

This is an adaptive FIR filter that updates its weights with the delayed LMS
rule and uses no multipliers. It computes the filter output by distributed
arithmetic (DA). A small table holds every possible sum of the four newest
input samples. The weights are read one bit-plane at a time, and each
bit-plane picks one table entry. A carry-save accumulator adds up the picked
entries in L cycles of a bit clock. The weight update does not multiply
either: it keeps only the sign of the error and the position of its leading
one, so μ·e·x becomes a right shift of x.

The design is written for low power. Only the accumulator works at the bit
rate. The table, the weights, the error logic and the update work once per
sample. The carry-save accumulator needs no carry chain during accumulation:
one full carry-propagate add per sample resolves the result.

Default configuration: **N = 4 taps, L = 8-bit words**. `N` can be any
multiple of 4; 16 taps has been simulated.

## What the filter computes

All of x, d, e and the weights w are L-bit two's-complement fractions in
[-1, 1), with LSB = 2^-(L-1). In integer (LSB) units, with sample index n:

```
y(n)   = Σ_blocks floor( Σ_k w_k(n)·x(n-k) / 2^(L-1) )   (four taps per block)
e(n)   = d(n) - y(n)                                       (full width on e_out)
m      = min(|e(n)|, 2^(L-1)-1)                            (saturated magnitude)
t      = number of zeros above the leading one of m        (t = L-1 if m = 0)
w_k(n+2) = w_k(n+1) ± floor( x(n-k) / 2^(t + 1 + log2 N + MU_I) )
           (+ if e(n) ≥ 0, - if e(n) < 0, no change if m = 0, wraps mod 2^L)
```

A leading one at magnitude bit p means |e| ≈ 2^(p-L+1) in fraction units.
That makes the shift t + 1 + log2 N, the same as a multiplication by μ·e
with μ = 1/N. `MU_I = i` selects μ = 2^-i/N by shifting i places more.

The weight update uses the error and the input vector of the sample before
the current one, so the adaptation delay is one sample. This is delayed LMS,
w(n+1) = w(n) + μ·e(n-1)·x(n-1).

## Timing

One sample period is L cycles of `clk`. `da_controller` counts the bit cycles
0 … L-1. The last cycle raises `sample_en`, the clock enable of every
sample-rate register. The slow clock is therefore an enable on a single
clock, not a second clock.

| at the `sample_en` edge ending period P | what happens |
|---|---|
| DA tables | take `x_in` (the new sample x(n)); `d_in` is stored beside it |
| accumulators | capture the sum and carry words of the inner product formed during P |
| weights | take the update from the error that was visible during P |

During period P+1 the inner product y(n) is formed, with the weights that hold
during P+1. After the edge that ends P+1, `y_out` = y(n) and `e_out` = e(n)
for all of period P+2, and `y_valid` is high. At the edge that ends P+2 the
weights move by the update from e(n) and x(n).

So the output latency is one sample period after the sample is taken. The
throughput is one sample per L clock cycles.

## Inner product: the DA table

`da_table` stores the 2^4 − 1 = 15 nonzero subset sums of the four newest
samples. Entry k is Σ_j k_j·x(n−j), where k_j is bit j of k. The weight
bit-plane {w3,l w2,l w1,l w0,l} can then address the table directly. Address
0, the empty sum, is not stored; the 16:1 multiplexer (`da_mux`) supplies
zero for it.

The table is not recomputed from scratch when a sample arrives. When every
sample moves one tap older, a sum that does not contain the newest sample is
a sum the table already held, at half the address:

```
even k    :  T'[k] = T[k >> 1]          register move
k = 1     :  T'[1] = x(n)
odd k > 1 :  T'[k] = x(n) + T[k >> 1]   seven adders for four taps
```

So fifteen registers and seven adders keep the table current. Entries are
L+2 bits wide, so no sum of four samples overflows.

## Inner product: the carry-save accumulator

A weight is w = −w_{L−1}·2^{L−1} + Σ_{l<L−1} w_l·2^l in LSB units. The inner
product is therefore Σ_l ±2^l·T[slice_l], with a minus sign only for the MSB
slice. `csa_accumulator` takes the slices LSB first. Each cycle, one row of
L+2 full adders reduces three words to a new sum word s and carry word c:

- the previous sum word shifted right by one place (arithmetic shift);
- the previous carry word;
- the table entry picked by the slice.

Two details keep this exact with no carry propagation:

- **The carry word keeps weight 2.** The stored value is s + 2c. Halving it
  is (s >>> 1) + c, plus the bit that falls off s. That bit is a fraction
  bit of the result and is dropped. So shifting only the sum word halves the
  value exactly; the carry word needs no shift.
- **Sign bits go through the full adders like any other bit.** The row
  includes the carry produced at the sign position as the top bit of c, and
  s and c are read as signed words. Then s + 2c equals the signed sum of the
  three inputs exactly. No sign-extension correction is needed.

On the MSB slice, `sign_ctrl` XORs the table entry, which gives its one's
complement. The missing +1 is supplied by the final adder. In that cycle the
unshifted words are captured into `sum_word` / `carry_word` and held for a
whole period. The final adder (`final_adder`) then forms:

```
y = sum_word + 2·carry_word + 1  =  floor( Σ_k w_k·x_k / 2^(L-1) )
```

Both words are L+2 bits; y is L+3 bits.

## Weight update

- `error_unit` forms e = d − y at full width. It gives the sign and the
  magnitude, limited to L−1 bits.
- `shift_control` is a priority encoder. For L = 8 it maps r6 → t = 0,
  r5 → 1, …, r0 → 6, and zero → 7.
- `weight_increment` holds N barrel shifters (`barrel_shifter`, an
  arithmetic right shift by t + PRESHIFT) and N adder/subtractor cells
  (`addsub_cell`). It also holds the weight registers, which reset to zero.
  The error's sign selects add (0) or subtract (1). A zero error leaves the
  weights unchanged.

## Longer filters

`N` is a multiple of four. The design builds N/4 four-point blocks
(`da_inner_product`: table, multiplexer and accumulator). The tables are
chained, so the sample leaving block j becomes the new sample of block j+1.
One final adder sums all the blocks' sum words and doubled carry words, with
one input carry per block.

Each block drops its own fraction bits. For N > 4 the output is therefore the
sum of the truncated block results. It can be up to N/4 − 1 LSBs below the
truncated exact sum. μ = 1/N adds log2 N to the shift.

## Limits and design choices

- **16 taps with 8-bit words do not adapt well.** With μ = 1/16 the shift
  reaches 5 … 11 places, so most increments round to 0 or −1 LSB. The
  floor rounding of the shifter then biases negative inputs. In simulation,
  16 taps keeps a mean |e| of 10–30 LSB, while 4 taps converges to below 1
  LSB. Wider weights would be needed. This follows from the word length, not
  from the datapath.
- **Error saturation.** Errors beyond ±(2^(L−1)−1) are saturated before
  decoding. The encoder looks at L−1 magnitude bits only.
- **No weight saturation.** Weights wrap modulo 2^L, as plain
  adder/subtractors do.
- **The slow clock is a clock enable.** For the power saving of a real slow
  clock, replace the enable on the sample-rate registers with a gated or
  divided clock.
- **Own choices.** The fraction formats of x, d and e, the one-sample
  adaptation delay, the zero-error rule, the asynchronous active-low reset
  and the block chaining for N > 4 are this design's own choices.
- **Not covered.** The RTL says nothing about area, timing or power. No
  gate-level or power analysis is included.

## Files

| file | block |
|---|---|
| `rtl/da_lms_pkg.sv` | shared constants (block size 4, default N and L) |
| `rtl/da_controller.sv` | bit counter, `first` / `sign_ctrl` / `sample_en` |
| `rtl/da_table.sv` | 15-entry DA table with its 7-adder update |
| `rtl/da_mux.sv` | 16:1 multiplexer (address 0 → 0) |
| `rtl/csa_accumulator.sv` | carry-save shift accumulator with sign control |
| `rtl/da_inner_product.sv` | four-point inner-product block |
| `rtl/final_adder.sv` | sum + 2·carry + 1, over all blocks |
| `rtl/error_unit.sv` | e = d − y, sign, saturated magnitude |
| `rtl/shift_control.sv` | leading-one priority encoder → t |
| `rtl/barrel_shifter.sv` | x >>> (t + PRESHIFT) |
| `rtl/addsub_cell.sv` | w ± increment |
| `rtl/weight_increment.sv` | N shifters, N add/sub cells, weight registers |
| `rtl/da_lms_filter.sv` | top level |

Top-level ports: `clk`, `rst_n` (asynchronous, active low), and `x_in` and
`d_in` (L bits, sampled when `sample_en` is high). Outputs are `sample_en`,
`y_valid`, `y_out` (L+3+log2(N/4) bits), `e_out` (one bit wider) and
`w_out[N]`.

## Simulation

Every testbench checks itself and ends with a line
`TB_RESULT checks=… failures=…`. For example, the end-to-end test at the
default size:

```
verilator --binary --timing --assert -y rtl -Irtl rtl/da_lms_pkg.sv \
    tb/tb_da_lms_filter.sv --top-module tb_da_lms_filter
./obj_dir/Vtb_da_lms_filter
```

- **`tb_da_lms_filter` (N = 4, defaults).** It identifies an unknown FIR
  system. A bit-true integer model of the equations above runs alongside,
  and y, e and every weight are compared at every sample. The test also
  checks the L-cycle sample period. It forces error saturation by driving d
  against the output for 100 samples. It requires at least one each of:
  inverted MSB slice, add update, subtract update, zero-error sample,
  saturation, t = 0 and t = 6. It also requires the mean |e| to fall by more
  than 4× (about 7.7 → 0.9 LSB).
- **`tb_da_lms_filter_n16`.** The same test with 16 taps. It checks bit
  exactness but not convergence; see the limits above.
- **`tb_da_lms_filter_mu`.** The same test with `MU_I = 1`.
- **Unit testbenches (`tb_<module>.sv`).** They check each block against
  independent integer arithmetic. Most of them test exhaustively or with
  thousands of random and extreme vectors.
