# Pipelined exponential-sum engine for Gaussian orbitals

In Kohn–Sham density functional theory the exchange–correlation matrix is
obtained by numerical integration over a three-dimensional grid, and at every
grid point the value of every atomic orbital is needed. An orbital built from
Gaussian-type functions has the form

    chi(r) = x^k y^l z^m * sum_i C_i * exp(-alpha_i * r2)

and the costly part is the sum of exponentials. This RTL computes that
"exponential part" in hardware:

    s(r2) = sum_{i=0}^{n_prim-1} exp(-alpha_i * r2)

for a stream of squared distances `r2`, one IEEE-754 word in and one word out
per grid point. The exponents `alpha_i` of the orbital are loaded once and
reused for every grid point, so only `r2` and the result cross the host link.

The design follows an FPGA accelerator published for an SGI RASC RC100 blade
(two Virtex-4 LX200 FPGAs at 200 MHz attached to an Altix/Itanium host):
an *EP module* made of a pipelined floating-point multiplier, exponential
unit and accumulator, four such modules per FPGA in single precision.
The arithmetic units' internals were only outlined there, so most of the
detail below is this implementation's own; the section "Departures and
limits" lists where.

## The EP module: one exponential per clock

```
             alpha_i (coef store)
                   |
  r2 ──► sequencer ┴─► fp_mul ──(negate)──► fp_exp ──► fp_acc ──► FIFO ──► sum
           |  4 clk                21 clk           8 clk
           └── last-term flag ── delay 25 ───────────┘
```

`ep_module` takes an `r2`, then for `n_prim` consecutive clocks presents
`alpha_0 .. alpha_{n-1}` (read from the coefficient store, one clock after
the address) together with `r2` to the multiplier. The product's sign bit is
inverted on the way to `fp_exp`, which gives `exp(-alpha_i*r2)`, and `fp_acc`
adds the `n_prim` terms. A one-bit delay line of multiplier + exp depth
carries the "last term" flag beside the data so the accumulator knows where
each sum ends. The next `r2` is accepted on the last step of the previous
one, so a stream of grid points runs without bubbles: one exponential per
clock, one grid point every `n_prim` clocks.

Depths in clock cycles (they are the published figures):

| unit            | single | double |
|-----------------|--------|--------|
| `fp_mul`        | 4      | 5      |
| `fp_exp`        | 21     | 30     |
| `fp_acc`        | 8      | 10     |
| EP module total | 33     | 45     |

The total runs from the last term of a sum entering the multiplier to the
sum leaving the accumulator. Seen from the module's ports, an isolated grid
point comes out `n_prim + 2 + 33` clocks after it is accepted (two clocks for
the coefficient read and operand register, one for the output FIFO). Each
unit does its arithmetic in fewer stages (3, 8 and 6 in single precision)
and fills the remaining depth with plain registers (`delay_pipe`), which a
synthesis tool with retiming can move into the logic.

**Flow control.** The arithmetic never stalls. Finished sums go into a
64-word FIFO, and a credit counter (`outstanding`) admits a new `r2` only
while fewer than 64 grid points are accepted but not yet read out. A stalled
consumer therefore holds off the input instead of losing results. 64 covers
the pipeline even with `n_prim = 1`, so the credit limit never slows an
unstalled stream.

## The exponential unit (`fp_exp`)

The unit uses the identity `e^x = 2^xi * e^r` with `xi = floor(x*log2 e)` and
`r = x - xi*ln 2`, so `0 <= r < ln 2`:

1. **To fixed point.** `x` is converted to a two's-complement number with
   `EW-1` integer bits (enough for every `x` whose exponential is a normal
   number) and `FW+8` fraction bits. Larger `|x|` goes straight to +inf or +0.
2. **xi.** `x` times a constant `log2 e` carrying `LF = XF+IW+6` fraction
   bits, floored.
3. **Residue.** `r = x - xi*ln2`, with `ln 2` held to enough bits that the
   error of `xi*ln2` stays far below the residue's LSB. The constants are
   128-bit truncations of `ln 2` and `log2 e` in `fp_pkg`. Rounding of
   these constants can push `r` a hair below 0. It is then clamped, at an
   error of order 2^-40.
4. **Table.** The top 8 bits of `r` select `e^(k/256)` from a 256-entry
   table. The table has `FW+11` bits per entry and is computed at elaboration
   by `fp_pkg::exp_table_entry`, a 120-bit fixed-point Taylor series, so
   there is no data file. Only entries below `ln 2 * 256` are ever read.
5. **Polynomial.** The remaining bits `r_lo < 2^-8` go through a Taylor
   polynomial `sum r_lo^n/n!` by Horner's rule, one pipeline stage per step.
   Degree 2 suffices for single precision (truncation error < 2^-26) and
   degree 5 for double (< 2^-57).
6. **Assemble.** Table value times polynomial is the significand in [1, 2).
   If it reaches 2 it is normalised. `xi + bias` is the exponent. The result
   is rounded to nearest, and results outside the normal range become +inf
   or +0.

Measured against the simulator's `exp()`, the single-precision unit is
within one unit in the last place over the whole input range.

## The truncated multiplier (`fp_mul`)

Only the upper half of the `(FW+1) x (FW+1)` significand product survives
rounding. So the partial-product columns below weight
`DROP = FW+1-(clog2(FW+1)+4)` are never formed: each partial product is
masked before the summation, and the adder cells of those columns vanish.
`DROP` is 15 of 48 columns in single precision and 43 of 106 in double. The
carries lost from those columns are worth less than 1/10 unit in the last
place. After round-to-nearest-even on the kept bits, the result is within
one ulp of the exact product and correctly rounded in about 99 % of random
cases.

## The accumulator (`fp_acc`)

A floating-point adder whose output feeds back into its input cannot accept
a new datum every clock. The accumulator therefore keeps the running sum in
a wide two's-complement fixed-point register: `ACC_INT = FW+1` integer bits
and `ACC_FRAC = 2(FW+1)+16` fraction bits, which is 24 + 64 bits in single
precision. The pipeline:

- unpack;
- align the significand to the register with a barrel shift;
- add, the only loop, a single adder of about 90 bits;
- when the group's last datum has been added, find the leading one;
- shift to normalise;
- round to nearest even and pack.

A new group starts on the very next clock after a last datum.

Consequences:

- Sums are exact down to 2^-64: a term smaller than that is lost.
- Sums below about 2^-40 lose relative precision.
- A sum reaching 2^24 in magnitude returns infinity.
- An infinite input returns infinity, and a NaN input returns NaN.

For the sums of Gaussians this engine forms, the result is at most
`n_prim`, and terms below 2^-64 are far under any screening threshold used
in grid integration.

## Four modules on one FPGA (`gto_accel_top`)

```
 coef write ──► coef_store (16 x 32 bit, 4 read ports)
                   │   │   │   │
 r2 ──► stream_dist ─► EP0 EP1 EP2 EP3 ─► stream_collect ──► sums
        (round robin)                      (round robin)
```

All four EP modules share one coefficient store with a read port each.
`stream_dist` hands `r2` word k to module k mod 4, and `stream_collect` takes
the results back in the same rotation. This keeps the output in input order
without tags. With the output always ready, the array sustains one grid
point per clock when `n_prim = 4`, or generally four exponentials per clock.
On the published platform one exponential, including its data transfer,
took about 8 ns with one module. The speed-up grew in proportion to the
number of modules (2.5x, 5x and 10x against an Itanium 2 for 1, 2 and 4 modules; 20x
with both FPGAs). The second FPGA of the blade would hold a second,
independent copy of this top.

### Using it

1. Hold `rst_n` low for a clock or more (asynchronous, active low).
2. Write the orbital's exponents `alpha_0..alpha_{n-1}` with `coef_we`,
   `coef_waddr` and `coef_wdata`. Set `n_prim` (1..16; 0 counts as 1).
3. Stream `r2` words on `in_valid`/`in_ready`. Read sums on
   `out_valid`/`out_ready`. A word moves when valid and ready are both high
   at a rising edge.
4. Change coefficients or `n_prim` only after every sum of the previous
   orbital has been read.

| parameter   | default | meaning |
|-------------|---------|---------|
| `EW`, `FW`  | 8, 23   | IEEE exponent / fraction bits (11, 52 for double; any width in between works, taking the double-precision depths) |
| `N_EP`      | 4       | EP modules |
| `MAX_PRIM`  | 16      | coefficient store depth |
| `OUT_DEPTH` | 64      | result FIFO and credit limit per EP module |

## Number format and exceptions

All ports carry IEEE-754 words. Subnormal inputs are read as zero, results
below the normal range are flushed to zero, and overflow gives infinity.
`fp_mul` returns a quiet NaN for NaN operands or inf x 0, and `fp_exp`
returns a quiet NaN for a NaN argument. Rounding is to nearest even in
`fp_mul` and `fp_acc`, and to nearest on `fp_exp`'s internal result. The
units are parameterised by `EW`/`FW` so that intermediate precisions (for
example a 48-bit format) can be built when a stage of the calculation
needs less than double precision. The pipeline depths follow the format:
single-precision values for `FW <= 23`, double-precision values above.

## Departures and limits

- **Contraction coefficients `C_i` are not applied.** The EP module has one
  multiplier, one exponential unit and one accumulator. Its published
  resource and latency figures are exactly the sums of those three units, so
  there is no second multiplier for `C_i`. The caller applies `C_i`, or
  folds them in elsewhere, along with the polynomial factor `x^k y^l z^m`.
- The insides of all three arithmetic units are this implementation's
  own: the multiplier's truncation point, the exponential's table size and
  polynomial degree, the accumulator's fixed-point register. Only the
  methods (a truncated product, table plus polynomial after range
  reduction, a one-datum-per-clock mixed-precision accumulator) and the
  depths are from the published design. Resource use will differ from the
  published figures.
- Between the three units the words are plain IEEE-754 here. The published
  units passed non-standard intermediate formats to save logic; only their
  ports were IEEE.
- The sequencer, the result FIFO with credits, the round-robin
  distribution/collection and the 16-entry coefficient store are this
  design's choices. The published design leaves these unspecified.
- Not included: the vendor interface logic on the FPGA, the host link
  (TIO ASIC, NUMALink), the external QDR SRAMs and the host itself. The top
  exposes the streams and the coefficient write port where they would
  connect.
- The accumulator window (above) limits relative precision for sums below
  about 2^-40.

## Verification

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench              | what it checks |
|------------------------|----------------|
| `tb_fp_mul`            | 4000 random and special products against correctly rounded reals, ≤ 1 ulp, ≥ 90 % exact, 4-clock latency |
| `tb_fp_exp`            | 3000 random and special arguments against `exp()`, ≤ 1 ulp, 21-clock latency |
| `tb_fp_acc`            | 400 random groups, gaps, inf/NaN/overflow, 8-clock latency |
| `tb_ep_module`         | n_prim = 1, 3, 6, 11, 16: sums, 33-clock unit chain, `n_prim+35` port latency, one r2 per `n_prim` clocks, back-pressure |
| `tb_ep_module_double`  | the same in double precision (45-clock chain) |
| `tb_fp_exp_double`, `tb_fp_mul_double`, `tb_fp_acc_double` | the three units in double precision, ≤ 1 ulp, 30-, 5- and 10-clock latency |
| `tb_ep_scaling`        | the 400 000-exponential benchmark on tops with 1, 2 and 4 EP modules side by side: 400 000, 200 000 and 100 000 clocks |
| `tb_ep_module_48`      | the EP module in a 48-bit format (11-bit exponent, 36-bit fraction) |
| `tb_coef_store`, `tb_stream_dist`, `tb_stream_collect` | memory read-back on four ports; round-robin order under random ready/valid |
| `tb_gto_accel_top`     | the default top end to end: latency, random output stalls (input held by busy modules and by exhausted credits), coefficient reloads, and 400 000 exponentials (100 000 grid points x 4) in 100 000 clocks |

`tb_fp_util` (a package) converts between reals and IEEE bit patterns for the
reference models. To run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl rtl/fp_pkg.sv tb/tb_fp_util.sv \
          tb/tb_gto_accel_top.sv --top-module tb_gto_accel_top
./obj_dir/Vtb_gto_accel_top
```

Replace the testbench file and top module name for the others. The full
top-level run, at the default parameters, takes well under a second.

## Files

- `rtl/fp_pkg.sv`: constants, pipeline depths, elaboration-time table functions
- `rtl/fp_mul.sv`, `rtl/fp_exp.sv`, `rtl/fp_acc.sv`: the three arithmetic units
- `rtl/ep_module.sv`: one EP module
- `rtl/coef_store.sv`, `rtl/stream_dist.sv`, `rtl/stream_collect.sv`: sharing among EP modules
- `rtl/gto_accel_top.sv`: the four-module top
- `rtl/delay_pipe.sv`, `rtl/sync_fifo.sv`: helpers
