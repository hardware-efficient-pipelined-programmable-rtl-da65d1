# Pipelined programmable FIR filter in multi-bit distributed arithmetic

This is an N-tap FIR filter, `y[n] = sum_i c[i] * x[n-i]`, whose coefficients can be
rewritten while it runs. It needs no multipliers, no Booth recoding and no lookup RAM.
The main idea is to regroup the products by input *digit* rather than by tap:

```
y[n] = sum_j ( sum_i c[i] * d[n-i, j] ) * 2^(P*(D-1-j))
```

Here `d[n, j]` is the j-th P-bit digit of sample `x[n]` (most significant first), and
`D = ceil(WX/P)` is the number of digits per sample. The inner sum has only one weight
in it. Every tap contributes `c[i]` times a small P-bit digit. That product is just P
rows of AND gates, and no tap needs its own accumulator. Each tap adds its P partial
products to a running carry-save pair. For P = 2 this takes one row of (4,2)
compressors and one register pair, so no carry ever ripples along a word inside the
tap chain. A single adder at the end merges the pair, and a single shift-and-add
accumulator combines the D digit sums into the result.

The default build processes 8-bit samples 2 bits at a time. It has 8 taps and 8-bit
coefficients, and gives one result every 4 clock cycles. Changing P trades area for
throughput. P = 1 is bit-serial DA. P = WX is a fully bit-parallel filter that gives
one result per cycle.

## Data flow

```
            x_in (WX bits, one sample per D cycles)
              |
      digit_serializer ---- digit, first/last/valid flags
              |
   digit --+--[D-1 regs]--+--[D-1 regs]--+-- ... --+     (digits move right)
           |              |              |         |
         tap 0          tap 1          tap 2 ... tap N-1
   <--[reg]--<--[reg]-------<--[reg]--------<------ 0,0  (carry-save pair moves left)
     |
 vector_merge_adder (registered)
     |
 da_accumulator: acc = first ? S : (acc << P) + S   -> y_out, y_valid
```

| module                | role                                                             |
|-----------------------|------------------------------------------------------------------|
| `da_fir_top`          | the filter; wires everything below                               |
| `digit_serializer`    | preprocessing: parallel sample to P-bit digits, MSB digit first  |
| `digit_delay_line`    | D-1 digit registers between neighbouring taps                    |
| `coef_bank`           | N programmable two's-complement coefficients, one write port     |
| `da_tap`              | AND-gate partial products, (P+2,2) compressor, register pair     |
| `pq_compressor`       | M operands to a carry-save pair, built from (4,2) rows            |
| `compressor_4_2`      | one row of (4,2) compressors, two full adders per bit             |
| `vector_merge_adder`  | merges the carry-save pair leaving tap 0                          |
| `da_accumulator`      | shift-and-add over the D digit sums of a sample                   |
| `da_fir_pkg`          | default sizes and the constant functions for the compressor tree  |

## Why the digit delay is D-1, not D

This is the part of the design that is easiest to misread. Each sample occupies D
cycles of the digit stream, so a plain tapped delay line would delay by D cycles per
tap. Here the partial sums run the other way, from tap N-1 towards tap 0, and they
pass one register per tap. Take a partial sum that leaves tap i+1 in some cycle. It
reaches tap i one cycle later. By then tap i must see the same digit position of the
sample that is one *newer*. Tap i's digit stream is therefore `D - 1` cycles younger
than tap i+1's. Written out, with `d(t)` the serializer output:

```
s0(t+1) = sum_i c[i] * d(t - i*D)
```

This is exactly the digit sum for the digit issued at cycle `t`. Two things follow:

* There are `(N-1)*(D-1)` digit registers in all, fewer than the `(N-1)*D` a direct
  delay line would need.
* The latency from the last digit to the merged digit sum is one cycle, whatever N
  is. A result appears D+2 clock edges after its sample was taken: D edges until
  its last digit has passed tap 0, then one edge each for the merging adder and the
  accumulator.

For P = WX (D = 1) the digit delay lines disappear. The structure becomes a
transposed-form filter with carry-save taps.

## Tap adder and compressors

A tap sees a coefficient `c` (WC bits, two's complement) and a digit `d` (P bits,
unsigned). It forms the partial products `(c & {W{d[k]}}) << k` for `k < P`. Together
with the incoming sum and carry vectors that makes `M = P + 2` operands, and
`pq_compressor` reduces them to two. The reduction goes level by level. Four operands
at a time go through a `compressor_4_2` row. A group of three left-over operands goes
through a full-adder row. One or two left-over operands pass on unchanged. For P = 2,
M = 4 and the tap is a single (4,2) row. P = 3, 4 and 10 give trees of two, two and
three levels.

In `compressor_4_2` the first full adder of each bit takes `a, b, c`. It sends its
carry sideways to the next bit. The second full adder takes the first one's sum, `d`
and the sideways carry from the bit below. The sideways carry goes exactly one
position, so the delay of a row does not depend on its width. Every output pair obeys
`sum + carry == a + b + c + d (mod 2^W)`.

## Word lengths and number format

* Samples are unsigned WX-bit integers. If WX is not a multiple of P, the sample is
  zero-extended at the top to `D*P` bits.
* Coefficients are two's complement. Each partial product is sign-extended to the
  full tap word `W = WC + P + clog2(N)` bits. All carry-save arithmetic is modulo
  `2^W`. This is exact, because `N * (2^P - 1) * 2^(WC-1)` fits in W signed bits.
* The commonly quoted tap word length for 2 bits at a time is `WC + 1 + log2 N`.
  This design uses one bit more so that the most negative coefficient times the
  largest digit cannot overflow. The tests reach both extremes.
* The output `y_out` has full precision: `WC + D*P + clog2(N)` bits, signed. Nothing
  is rounded or truncated.

## Interface and timing (`da_fir_top`)

| port         | dir | width                  | meaning                                             |
|--------------|-----|------------------------|-----------------------------------------------------|
| `clk`        | in  | 1                      | clock                                               |
| `rst_n`      | in  | 1                      | asynchronous active-low reset; clears all state     |
| `coef_we`    | in  | 1                      | write `coef_wdata` into coefficient `coef_addr`     |
| `coef_addr`  | in  | clog2(N_TAPS)          | tap index                                           |
| `coef_wdata` | in  | WC                     | two's-complement coefficient                        |
| `x_in`       | in  | WX                     | unsigned sample                                     |
| `x_ready`    | out | 1                      | `x_in` is taken at the end of this cycle            |
| `y_out`      | out | WC + D*P + clog2(N)    | signed result                                       |
| `y_valid`    | out | 1                      | one-cycle pulse per result                          |

* The filter runs at a fixed rate and has no back-pressure. `x_ready` is high one
  cycle in every D, starting with the first cycle after reset. Whatever is on `x_in`
  in that cycle becomes the next sample.
* `y_valid` pulses once per sample period. The result belongs to the sample taken
  D+2 edges earlier.
* A coefficient write takes effect at its tap on the next cycle. A result computed
  across a write mixes old and new coefficients. A result is clean once no write has
  happened during the N+2 cycles before its sample was taken, or since then.
* After reset all coefficients and delayed digits are zero, so the filter starts with
  an all-zero history.
* `da_fir_top` holds one assertion: `y_valid` never comes on two cycles in a row
  when D > 1.

Parameters: `N_TAPS` (8), `WX` (8), `WC` (8), `P` (2). Everything else is derived.

## Sizes the architecture is meant for

The filter is aimed at these configurations. All of them except the first need
parameter overrides. `tb_fir_workloads` simulates each of them:

| configuration                                      | N  | WX=WC | P  | cycles/result |
|----------------------------------------------------|----|-------|----|---------------|
| default                                            | 8  | 8     | 2  | 4             |
| 2 bits at a time, 12-bit words                     | 4  | 12    | 2  | 6             |
| 2 bits at a time, 24-bit words                     | 32 | 24    | 2  | 12            |
| 3 bits at a time                                   | 16 | 12    | 3  | 4             |
| 4 bits at a time, 24-bit words                     | 32 | 24    | 4  | 6             |
| bit-parallel input, 10-bit words                   | 8  | 10    | 10 | 1             |

## How far it can be trusted

Every module has a self-checking testbench in `tb/`. Each one compares against values
computed independently in the testbench:

* `tb_compressor_4_2` checks sums at random and at all-ones. It also checks that the
  sideways carry only reaches one bit position.
* `tb_pq_compressor` covers operand counts 3, 4, 5, 6, 7 and 12.
* `tb_da_tap` checks P = 2 and P = 4 with extreme coefficients.
* `tb_digit_serializer`, `tb_digit_delay_line`, `tb_coef_bank`,
  `tb_vector_merge_adder` and `tb_da_accumulator` check their blocks' sequencing and
  values.
* `tb_da_fir_top` runs the default filter end to end. `fir_scoreboard` drives it and
  compares every result with a 64-bit direct-form model. The test also checks the
  D+2 latency of every result, and hence one result per D cycles. It reprograms all
  coefficients three times while the filter runs. It reaches the most negative
  output (all coefficients at the minimum, all-ones samples) and the most positive
  output, and it counts failures if any of these never happen.
* `tb_fir_workloads` runs the same scoreboard on the five other configurations in
  parallel.

What is not covered:

* Timing closure, area and power. There is no gate-level or physical data.
* Signed input samples. The datapath takes unsigned samples, and a signed input
  would need the top digit's top bit to carry negative weight.

## Design choices beyond the architecture

The architecture fixes these parts:

* digit-serial input, P bits at a time
* AND-gate partial products
* compressor tap adders with one register pair per tap
* D-1 digit delays per tap
* a final merging adder and shift-and-add accumulator
* one result per D cycles

The following are choices of this implementation:

* 8 taps and 8-bit coefficients as defaults
* signed coefficients with full-width sign extension
* unsigned integer samples
* the tap word length, one bit more than the usual count
* a zero carry-save pair fed into the last tap, rather than a cheaper end tap
* the addressed coefficient write port
* asynchronous reset
* the flag pipeline that steers the accumulator
* the grouping of operands in compressors with more than four inputs
* a free-running fixed-rate input with no handshake

## Simulating

Each testbench is a top-level module with no ports. The package must come first on
the command line. Other files are found through `-y`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/da_fir_pkg.sv tb/tb_da_fir_top.sv --top-module tb_da_fir_top
./obj_dir/Vtb_da_fir_top
```

Each testbench prints `TB_RESULT checks=<n> failures=<m>` at the end. To try another
size, copy a line of `tb_fir_workloads.sv` with different `N`, `WX`, `WC` and `P`.
`fir_scoreboard` adapts to them. Keep `WC + WX + clog2(N)` at 62 or less, so the
64-bit reference model cannot overflow.
