# Bit-level systolic FIR and IIR filters

This design filters bit-serial samples with arrays of one-bit cells. Each cell
holds one coefficient bit and talks only to its neighbours. The core is an
inner product array: N rows of full-adder cells multiply N serial data words by
N stored coefficients and add the products. One chain of accumulator cells
under the rows then assembles the full-precision result. Every filter here is
that same array with a different way of feeding data into the rows:

* four FIR filters, `y_n = sum a_i x_{n-i}`. Data enter at the bottom row or at
  the top row. Two of the filters are half-rate; the other two use
  multiplexers to run one stream at full rate.
* one IIR filter, `R_n = sum a_i x_{n-i} + sum b_j yt_{n-j}`. A row of
  multiplexer cells turns each result back into a serial word and feeds it
  into the lower rows.
* an output converter that turns the parallel upper result bits into two
  serial streams.
* a two's complement version of the inner product array. Every filter can
  be built on it instead (parameter `TC`).

The arrays follow the paper "Efficient Bit-Level Systolic Array
Implementation of FIR and IIR Digital Filters". All timing, control phases
and interfaces were worked out for this RTL and checked in simulation. Where
the RTL had to choose something the paper leaves open, the choice is listed
under [Departures and open choices](#departures-and-open-choices).

Defaults everywhere are the paper's example sizes: word length B = 4, N = 4
taps, growth L = 2 bits, 2B+L = 10-bit results. The IIR filter uses B = 4,
N = M = 2, L = 2.

## Word format

All data words are unsigned B-bit integers. The exception is `tc_ip_array`,
which uses two's complement. A word travels on one wire with its least
significant bit first, **one bit every second clock**. The clock between two
bits is free. It carries a zero, or the bit of a second, independent
computation. Two computations interleaved this way share the whole array
without interfering, which is how the arrays reach full cell utilisation.

Time `t` counts clocks from the first clock after reset (`rst` is synchronous
and active high). Each filter has an output `frame` that is high on clock 0
of every word period. Bit 0 of a sample is presented in that clock.

## The inner product array (`ip_array`)

### Cells

* **Main cell** (`main_cell`). It stores one coefficient bit `a` and takes a
  data bit `x` from the right, a partial-sum bit `y` from above and a carry
  `c` from the right. It registers `x` to the left, `y xor (a&x) xor c` down,
  and the majority of `y`, `a&x`, `c` as the carry to the left.
* **Accumulator cell** (`acc_cell`). This is a full adder of three bits: a
  sum `s` from the cell on its left, the array bit `y` from above, and a carry
  from the right. It registers the sum downwards as a result pin. It also
  sends the sum, ANDed with a control bit PTRL, to the right, and the carry
  and PTRL to the left.

Every cell registers all its outputs. Every signal therefore moves one cell
per clock: data and carries to the left, partial sums down one row.

### How the sum forms

Row `r` holds coefficient `a_r` in its B right-hand cells and zeros in its L
left-hand cells. The zero cells catch the carries as the sum grows. Row r's
data word must enter one clock later than row r-1's, so that each row meets
the partial sums coming from the row above. The sums that leave the bottom row
are skewed: bits of equal weight leave different columns at different clocks,
along a diagonal.

The accumulator chain undoes that skew. A bit moving right through the chain
loses one column of position per clock. It is joined by array bits of the
same weight arriving later in the columns further right. Carries move left,
into higher weights. The result appears in two parts:

* the low B result bits leave the rightmost accumulator cell (`y_acc[0]`)
  serially, LSB first, one bit every second clock;
* the upper B+L bits leave the other accumulator cells one clock apart, in
  bit-parallel but time-skewed form. Bit `B+i` is on `y_acc[1+i]`.

**PTRL** recirculates with period 2B: 2B-2 ones followed by two zeros. A zero
stops the sum moving right at the clock when one result's upper bits are being
emitted. Without the zeros, one result would spill into the next. The two
zeros serve both interleaved computations.

### Timing (all inner product based arrays)

Suppose bit 0 of row 0's word is on `x_row[0]` at clock S. Then:

| result bit | pin | clock |
|---|---|---|
| w < B | `y_acc[0]` | S + N + 2w + 1 |
| w >= B | `y_acc[w-B+1]` | S + N + w + B |

PTRL, which enters at the rightmost accumulator cell, must be 0 at S+N-2 and
S+N-1 (mod 2B). A second interleaved computation produces its bits one clock
later on the same pins. `ip_array` takes PTRL as an input. All other arrays
generate it from internal rings (`ctrl_pattern`).

One result takes 2B clocks. A lone computation keeps the cells half busy; two
interleaved ones keep them fully busy.

## FIR filters: feeding the rows from one stream

An FIR filter output is the inner product of the coefficients with the last N
samples. These filters don't supply N words at once. The stream enters one
row. Once a bit has crossed that row, it is delayed and fed into the next
row. The delay is picked so that each row sees the right older sample, one
clock after the row above it. Coefficients are loaded in parallel from
`coef[i] = a_i` while `coef_ld` is high.

| module | input row | `a_i` in row | row-to-row delay | result base S' |
|---|---|---|---|---|
| `fir_nrow_half` | bottom | N-1-i | 2B-1 = (B+L) + (B-L-1) | 1 |
| `fir_top_half`  | top    | i     | 2B+1 = (B+L) + (B-L+1) | N |

Bit m of `x_n` enters at `2B*n + 2m`. Result bit w < B of `y_n` is on
`y_acc[0]` at `2B*n + S' + 2w + 1`. Bit w >= B is on `y_acc[w-B+1]` at
`2B*n + S' + w + B`. A second independent stream on the odd clocks is filtered
with the same coefficients, and its results are one clock later.

In the bottom-fed filter, data move up and results move down. In the top-fed
filter, everything moves down, which suits cascading chips. The top-fed
filter pays for this with N-1 clocks more latency.

The delay added after a row can be negative, for example `B-L-1` when L > B-1.
In that case the next row is fed from the data register of a cell inside the
row rather than from its end (`row_tap`).

## Full-rate FIR filters: multiplexed row inputs

The filters above use only half the cell slots for a single stream. The
full-rate filters (`fir_nrow_full`, `fir_top_full`) take a stream of sample
**pairs**. `x_{2q}` arrives on the even clocks of a 2B-clock frame and
`x_{2q+1}` on the odd clocks. The array computes `y_{2q}` and `y_{2q+1}`
interleaved, so it delivers one result per B clocks on average. That is the
most any bit-serial array can do at this clock rate.

The data vector for `y_{2q+1}` is the one for `y_{2q}` shifted by one sample.
So the even slots and the odd slots need different row-to-row paths. A
multiplexer in front of each row picks the right one, under a SEL pattern
1 0 1 0 ... that moves through the multiplexers one row per clock.

**Bottom-fed (`fir_nrow_full`, type-I multiplexer `mux_cell_i`).** The
multiplexer of row r chooses between two inputs:

* even-output slots (SEL = 0): the bit that entered row r+1 2B-2 clocks ago.
  This is the odd sample of the previous pair. The delay is B+L through the
  row, plus B-L-3 flip-flops, plus one clock counted for the multiplexer.
* odd-output slots (SEL = 1): the bit entering row r+1 in the same clock.

SEL is 1 in the even-sample clocks at the bottom multiplexer and climbs one
row per clock. Results: bit w < B of `y_{2q}` is on `y_acc[0]` at
`2B*q + 2w + 2`, and bit w >= B is on `y_acc[w-B+1]` at `2B*q + w + B + 1`.
`y_{2q+1}` comes one clock later.

**Top-fed (`fir_top_full`, type-II multiplexer `mux_cell_ii`).** The inputs
are the bit that entered the row above 2B clocks ago and the bit that entered
it 2 clocks ago. SEL enters the top multiplexer and moves down. Results are
N-1 clocks later than in the bottom-fed version: `2B*q + N + 2w + 1` and
`2B*q + N + w + B`.

In both cells, the selection is combinational and the multiplexer's register
is one of the flip-flops in the delay lines. This is equivalent to a cell
with a registered output, and it makes the same-clock path of the bottom-fed
filter explicit.

## IIR filter: the feedback loop (`iir_array`)

The IIR filter is the inner product array with N+M rows:

* The upper N rows hold `a_{N-1} .. a_0`. The sample stream enters row N-1
  and climbs, as in the bottom-fed FIR filter.
* The lower M rows hold `b_M .. b_1`, with `b_1` at the bottom. They carry
  past outputs, which enter the bottom row and climb the same way. They never
  climb into the sample rows.

Each row-to-row delay is one sample period minus one clock: B+L through the
row plus B+1 flip-flops.

The fed-back word is the result truncated to B bits:
`yt_n = R_n >> (B+L)`, the top B bits. Read as fractions, this is a unity-gain
filter whose feedback has the input's word length. Those bits leave
accumulator columns L+1..B+L one clock apart. Under them sits a row of B
type-III multiplexer cells (`mux_cell_iii`), each of which registers
`w <= SEL ? u : v`. A SEL pulse moving left through the row loads each bit as
it arrives. Between pulses, the row shifts right. The bits leave the
rightmost cell LSB first with a free clock between them, in exactly the
format the bottom row needs. This is a bit-parallel to bit-serial shift
register in the array's own format.

This loop sets the sample period: **P = 2B+L+2 clocks** (12 at the
defaults). A sample occupies 2B-1 clocks, followed by a guard band of L+3
zeros. Control patterns, both with period P:

* PTRL: 2B-2 ones followed by L+4 zeros. The zeros start at frame phase
  (M+2B-1) mod P.
* SEL: two ones followed by 2B+L zeros. The ones start at phase (M+P-1) mod P.

**Timing.** Bit m of `x_n` enters at `P*n + 2m`. Result bit w < B of `R_n` is
on `y_out[0]` at `P*n + M + 2w + 3`. Bit w >= B is on `y_out[w-B+1]` at
`P*n + M + w + B + 2`. The multiplexer row delays the upper bits by one clock,
so the low L+1 bits also get one flip-flop each. The output then has the
inner product array's shape, one clock later.

Each stream keeps B of every P cell slots busy. The odd clocks can carry a
second independent stream, filtered with the same coefficients, which doubles
that. This requires P to be even, that is L even.

Reference model:

```
R_n = sum_{i<N} a_i x_{n-i} + sum_{j=1..M} b_j * (R_{n-j} >> (B+L))
```

At the defaults `R_n` cannot overflow 2B+L bits, because L = log2(N+M).

## Serial output converter (`p2s_conv`)

This converter saves pins by turning the upper B+L result bits (`y_hi[i]` =
bit B+i) into two serial streams. It has two chains of type-III multiplexer
cells: B cells for bits B..2B-1 and L cells for bits 2B..2B+L-1. SEL enters
the right end and passes through both chains, one cell per clock. Each cell
loads its bit as it arrives, and the chains shift right in between. The B-bit
chain's output is delayed B clocks, so that bits B and 2B leave together.

With SEL = 1 at clock T0, when bit B is on `y_hi[0]`, bit `B+k` leaves
`ser_lo` and bit `2B+k` leaves `ser_hi` at `T0 + B + 1 + 2k`. The SEL pattern
is two ones followed by 2B-2 zeros. The second one serves the interleaved
second result, which comes out one clock later.

The parameter `LO` (default B) is the length of the right-hand chain. With
`LO = L` the chains swap places: `ser_lo` carries bits B..B+L-1 and `ser_hi`
carries the top B bits as one stream. The delay becomes L clocks, and bits
`B+k` and `B+L+k` leave at `T0 + L + 1 + 2k`.

In the top module the converter hangs off `fir_nrow_full`. Each result is
then available on three serial pins:

* `fc_y_lo` carries bit k at `2B*q + 2k + 2`;
* `fc_ser_lo` and `fc_ser_hi` carry bits B+k and 2B+k at `2B*q + 3B + 2 + 2k`;
* `y_{2q+1}` comes one clock after `y_{2q}` on each pin.

## Two's complement inner product (`tc_ip_array`)

This array computes the exact signed 2B+L-bit inner product of signed B-bit
words. It needs N = 2^L, which an elaboration-time assertion checks. The
method rests on one identity. If every partial product that pairs a sign bit
with a non-sign bit is complemented, the signed product equals a sum of
non-negative terms plus the constant `2^B - 2^(2B-1)`. Two additions to the
array implement it:

* **CTRL.** The main cells in the coefficient columns become `tc_main_cell`,
  which adds `CTRL xor a&x`. Each column's CTRL bit enters at the top and
  moves down with the partial sums, from a period-2B ring. It is 1 exactly
  when one, but not both, of "coefficient bit is the sign bit" and "data bit
  is the sign bit" is true. The L growth columns never complement.
* **ITRL.** The correction `N*(2^B - 2^(2B-1)) mod 2^(2B+L)` is added through
  an extra column of N one-clock delays. Its input, ITRL, carries the
  correction's upper bits into the leftmost accumulator cell, one bit per
  interleaved lane. For B = N = 4 the ring holds 1 1 0 0 0 1 1 0.

Data format and timing are the same as `ip_array`. Negative results come out
in two's complement.

**Signed FIR filters.** Each of the four FIR filters has a parameter `TC`.
With `TC = 1` the filter is built on `tc_ip_array` instead of `ip_array`.
Coefficients, samples and results are then two's complement, and formats and
timing do not change. Feeding a row from another row doesn't affect the
correction, because every row still receives its word one clock after the row
above. Only the phase of the control rings has to match the filter. The
parameter `S0` of `tc_ip_array` gives the clock (mod 2B) at which bit 0 reaches
row 0, and all three rings (CTRL, ITRL, PTRL) are rotated by it.

**Signed IIR filter.** `iir_array` also has `TC`. The signed array then runs
with the IIR period (`PER = 2B+L+2`) and the IIR's PTRL window
(`PZ_START`, `PZ_LEN`). Its CTRL and ITRL patterns are zero in the guard
clocks, where no data bits pass. The fed-back word is still the top B result
bits, which for a signed result is an arithmetic shift:

```
R_n = sum a_i x_{n-i} + sum b_j * (R_{n-j} >>> (B+L))     (all signed)
```

N+M must be 2^L. After reset the feedback row loads nothing for one period.
The words in flight at reset are incomplete, and in signed arithmetic their
"results" are the bare correction term, which would otherwise enter the
recursion.

## Top level (`bsa_filters_top`)

The top level places the following side by side:

* the four FIR filters (`fa`..`fd`);
* a signed copy of the bottom-fed full-rate filter (`fs`, `TC = 1`);
* the IIR filter (`ir`) and its signed copy (`is`);
* the two's complement array (`tc`).

They share only `clk`, `rst` and `coef_ld`. Each has its own coefficients, serial input,
`frame` strobe and outputs. The converter is attached to `fc`, as described
above, with its SEL ones at frame phases 1 and 2. The arrays are
alternatives; nothing in the paper combines them, so neither does the top
level.

## Departures and open choices

Taken from the paper: the cell functions, array structures, row-to-row
delays, control pattern lengths, the multiplexer scheme, the feedback loop,
the converter, and the complement-and-correct method.

This RTL's own choices:

* **Registers.** Each cell registers its outputs. The multiplexers of the
  full-rate FIR filters are combinational instead, with their register
  counted in the delay lines; the timing is the same.
* **Control phases.** The paper gives the lengths of PTRL and SEL but not
  their phases. The phases used are the ones that make the arithmetic come
  out right. They are stated in each module header and in the tables above.
* **Bottom-fed full-rate FIR direct path.** The same-clock path from the row
  below follows from the data format that filter needs. The paper's figure
  draws a one-clock delay near the bottom multiplexer, which has no
  counterpart here.
* **Coefficient loading.** All bits load in parallel while `coef_ld` is high.
  The paper points to a fast loading scheme from other work and does not
  describe it; it is not built.
* **Reset.** A synchronous reset clears all registers and presets the
  control rings, so `t = 0` is well defined.
* **IIR numbers.** With `TC = 0`, samples and coefficients are unsigned
  integers. The feedback word is the top B result bits.
* **IIR second stream.** It needs L even, which the paper does not state.
* **Two's complement.** The paper says the signed filters follow from the
  signed inner product array and gives no details. The `TC` option of the
  filters is this RTL's construction. It covers the ring phases, the
  guard-band zeros, the arithmetic-shift feedback and the start-up gate of
  the IIR feedback. `tc_ip_array`, and so every signed filter, requires
  N = 2^L (N+M = 2^L for the IIR filter).

Also not built:

* the fault-tolerance scheme the paper mentions for the top-fed arrays;
* other uses of the inner product array.

## Verification

Each module has a self-checking testbench in `tb/` (`<module>_tb.sv`). Each
prints `TB_RESULT checks=<n> failures=<m>` and has a watchdog. The
testbenches compare every output bit at its predicted clock with a reference
computed in SystemVerilog, using random coefficients and samples. They cover:

* both interleaved computations;
* zero and all-ones extremes;
* negative results in the two's complement array and in every filter run
  with `TC = 1`. Each filter testbench drives an unsigned and a signed
  instance with the same bits;
* several feedback generations in the IIR filter.

`bsa_filters_top_tb` runs all arrays of the top level at once, at the default
sizes. It counts how often each mechanism is exercised:

* second FIR channel;
* full-rate pairs;
* IIR feedback and second IIR stream;
* serial conversion;
* negative two's complement results, from the inner product array and from
  the signed FIR and IIR filters;
* PTRL cuts between results.

It fails if any count is zero. All testbenches pass with Verilator.

The testbenches in `tb/` run at the default sizes. Each one's sizes are in
the `localparam` line at its top, and changing that line runs the same checks
at other sizes. This was done with all results correct at these sizes:

| modules | sizes |
|---|---|
| FIR filters and `tc_ip_array` | (B, N, L) = (5, 4, 2), (3, 4, 2), (6, 2, 1), (4, 8, 3) |
| `iir_array` | (B, N, M, L) = (5, 2, 2, 2), (6, 2, 2, 2), (4, 3, 1, 2), (3, 2, 2, 2) |
| `p2s_conv` | (B, L) = (5, 2), (3, 2), (6, 1) |

At B = 3 the IIR testbench's random feedback coefficients are too small to
exercise the unsigned feedback, and its coverage check reports that. No
gate-level timing was done.

## Simulating

With Verilator 5 (timing support needed for the testbench clocks), run one
testbench like this:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb rtl/bsa_pkg.sv tb/fir_nrow_full_tb.sv --top-module fir_nrow_full_tb
./obj_dir/Vfir_nrow_full_tb
```

Replace the names for any other testbench. The package `rtl/bsa_pkg.sv`
holds helpers that build the control patterns (PTRL windows, alternating
SEL, CTRL and ITRL for the signed array). It must come first.

## Files

| file | contents |
|---|---|
| `rtl/bsa_pkg.sv` | control-pattern functions |
| `rtl/main_cell.sv`, `rtl/acc_cell.sv` | main and accumulator cells |
| `rtl/tc_main_cell.sv` | main cell with complement control |
| `rtl/mux_cell_i.sv`, `rtl/mux_cell_ii.sv`, `rtl/mux_cell_iii.sv` | multiplexer cells |
| `rtl/ctrl_pattern.sv`, `rtl/delay_line.sv`, `rtl/row_tap.sv` | control ring, delay, in-row tap |
| `rtl/ip_array.sv`, `rtl/tc_ip_array.sv` | inner product arrays |
| `rtl/fir_*.sv` | the four FIR filters |
| `rtl/iir_array.sv` | IIR filter |
| `rtl/p2s_conv.sv` | serial output converter |
| `rtl/bsa_filters_top.sv` | top level |
