# Multiplier-free block FIR filter with CSD multiple constant multiplication

An FIR filter computes `y(n) = sum_{i=0}^{N-1} h(i) x(n-i)`. When the
coefficients are fixed, a general multiplier is wasted on them: each product
`h(i)·x` can be built from a few shifts and adds. This design goes two steps
further.

1. **Canonic signed digits (CSD).** Each coefficient is recoded into digits
   from {-1, 0, +1}, with no two neighbouring digits non-zero. That keeps the
   number of non-zero digits, and so the number of adders, as low as possible.
   A run of ones such as `0111` becomes `100-1`: one subtraction instead of two
   additions.
2. **Multiple constant multiplication (MCM) with shared sub-expressions.** In
   a block filter one input sample is multiplied by several coefficients at
   once. Digit patterns that appear in more than one of those coefficients
   are computed only once. For example, 19 = `1 0 1 0 -1` and
   43 = `1 0 -1 0 -1 0 -1` both contain `1 0 -1`, which is 4x − x = 3x.

The filter is a **block (L-parallel) filter**. Samples come in one per clock
and are grouped into blocks of L. Each block is multiplied and summed in
parallel, and the outputs leave one per clock again. The default build is a
3-way, 3-tap filter with 8-bit samples and coefficients {19, 43, 19}. L, N,
the widths and the coefficients are all parameters. A separate sequential CSD
multiplier is included for coefficients that are only known at run time.

## Data flow of the block filter (`block_fir_mcm`)

```
x(n) ─► sipo_reg ─► pipo_reg ─► mcm_cse × (L+N-1) ─► product regs ─► adder_tree × L ─► piso_reg ─► y(n)
        (L samples)  (window of     (one per window      (N×L)          (one per output)   (L → serial)
                      L+N-1 samples) sample)
```

* **`sipo_reg`** collects L serial samples. In the clock after the L-th sample
  it raises `blk_valid` for one cycle, with the whole block on its output.
* **`pipo_reg`** is the window register. It holds the new block and the N−1
  samples that came just before it: `win[q]` is the sample q places before
  the newest one (`win[0] = x(Lk+L-1)`). On each load the newest N−1 samples
  of the old window move down behind the new block. No input is read twice.
* **Which sample meets which coefficient.** This is the key to the
  structure. Output j of block k is
  `y(Lk+j) = sum_i h(i) · win[L-1-j+i]`. So window sample q is needed with the
  coefficients `h(i)` for `max(0, q-L+1) ≤ i ≤ min(q, N-1)`, and with no
  others. Each window sample therefore gets its own MCM block over a run of
  consecutive coefficients. For L = N = 3 there are five such blocks:

  | window sample | coefficients | kind |
  |---|---|---|
  | win[0] = x(3k+2) (newest) | h0 | single constant |
  | win[1] = x(3k+1) | h0, h1 | MCM |
  | win[2] = x(3k)   | h0, h1, h2 | MCM |
  | win[3] = x(3k−1) | h1, h2 | MCM |
  | win[4] = x(3k−2) (oldest) | h2 | single constant |

  Overall the window of L+N−1 samples feeds L·N products.
* **Product registers.** Product `h(i)·win[q]` is stored as `prod[i][j]`, where
  `j = L-1-q+i` is the output it belongs to.
* **`adder_tree`** (one per output) adds the N products of its output in a
  balanced binary tree. There is a register after every level.
* **`piso_reg`** takes the L results at once and sends them out in order,
  `y(Lk)` first. The same L results are also available in parallel on
  `blk_valid` / `blk_y`, one clock before the serial output starts.

### Timing

* Throughput: one output per clock when the input is one sample per clock.
  A new block reaches the PISO every L clocks, just as the previous block has
  left it. Gaps in the input only delay blocks. There is no back-pressure.
* Latency: `4 + max(1, clog2(N))` clocks. This counts from the clock that
  offers the last sample of a block to the clock in which that block's first
  output is on `y_out`: 6 clocks for N = 3, and 8, 9 or 10 for N = 16, 32 or 64.
  The registers are the SIPO, the window, the products, `clog2(N)` tree levels
  and the PISO.
* Reset is synchronous and active low (`rst_n`). It clears the sample history
  to zero, so the first outputs behave as if the input had been zero before
  it started.

### Widths

Samples and coefficients are signed two's complement (XW = CW = 8 by default).
Products are exact in XW+CW bits, and outputs are exact in
XW+CW+clog2(N) bits. There is no rounding or saturation, so the filter cannot
overflow.

## CSD recoding (`csd_pkg`, `bin2csd`)

The recoding looks at bit pairs `x(i+1) x(i)` from the LSB upwards and
carries one bit between steps. The bit above the sign bit is taken as a copy
of the sign bit.

| carry | x(i+1) x(i) | digit c(i) | next carry |
|---|---|---|---|
| 0 | 00, 10 | 0 | 0 |
| 0 | 01 | +1 | 0 |
| 0 | 11 | −1 | 1 |
| 1 | 00 | +1 | 0 |
| 1 | 10 | −1 | 1 |
| 1 | 01, 11 | 0 | 1 |

A W-bit number gives exactly W digits, and the last carry is dropped. The
value stays exact for every input, including the most negative one (−128 → a
single −1 in the sign position). `csd_pkg::csd_step` is this table.
`csd_pkg::csd_digit` applies it at elaboration time, and `bin2csd` unrolls it
into a ripple of W combinational steps. A digit is carried in hardware as
`{nz, neg}`.

## Sub-expression sharing (`mcm_cse`)

`mcm_cse` multiplies one input by the constants `COEFS[FIRST .. FIRST+NC-1]`.
All the decisions are made while the design is elaborated:

1. Every constant is recoded to CSD.
2. For every two-digit pattern `1 0…0 ±1` (distance D = 1 … CW−1, upper and
   lower digit with the same or opposite sign), count the non-overlapping
   occurrences across all the constants. Digits are scanned from the LSB, and
   each digit is used at most once.
3. If the best pattern occurs at least twice, `sub = (x << D) ± x` is built
   once. Each occurrence becomes one term `±(sub << b)`, with the sign of the
   upper digit.
4. Steps 2 and 3 repeat on the digits not used yet, until no pattern occurs
   twice or `MAXP` (default 4) sub-expressions exist.
5. All remaining non-zero digits stay plain terms `±(x << b)`. Each product
   is the sum of its terms.

This is a greedy form of common sub-expression elimination, most frequent
pattern first. It is exact for any constants; how much it saves depends on
them. With `NC = 1` the block is a single constant multiplier, and it still
shares a pattern that recurs inside that one constant. The localparams `NP`
(number of shared terms) and `PATS` (8 bits per pattern: `2·D + 1` for
`1 0…0 1`, `2·D` for `1 0…0 -1`) show what was chosen. For {19, 43} there is
one pattern, D = 2 with opposite signs: `sub = 3x`, `19x = 16x + 3x`,
`43x = 16·3x − 4x − x`. For {85, 19, 43, −93} a second one follows,
`1 0 1` = 5x.

## Run-time CSD multiplier (`csd_serial_mult`)

This part is for a coefficient that changes at run time. `start` loads `x`
and `coef`, and `bin2csd` recodes the coefficient into a digit register. Each
clock after that, the selection and skip logic does the following:

* It picks the lowest non-zero digit left (at position p) and clears it.
  Zero digits cost no clock.
* A 2:1 multiplexer feeds the adder either `x << p` or its one's complement.
* The digit's sign is the adder's carry-in, so a −1 digit subtracts.

`busy` lasts `max(1, k)` clocks, where k is the number of non-zero digits
(at most 4 for 8 bits). `done` pulses in the clock after that, and `product`
holds `x·coef` until the next start. This block is not part of the filter. In
`mcm_fir_top` it sits beside the filter with its own ports.

## Top level (`mcm_fir_top`)

The top level holds the filter (`fir_*` ports) and the run-time multiplier
(`mul_*` ports). They share only `clk` and `rst_n`. Its parameters `L`, `N`,
`XW`, `CW` and `H` pass straight through to the filter.

## What is this design's own choice

The overall structure is the published one: serial-in register,
parallel-in register, MCM/SCM blocks, adder trees, parallel-in serial-out
register, CSD coefficients with shared two-digit patterns, and a serial CSD
multiplier with skip logic and carry-in subtraction. The following points
are choices made here:

* **Coefficients.** The default coefficients {19, 43, 19} reuse the two
  constants of the sharing example. No filter coefficient set is given.
* **Widths.** The 8-bit sample width follows the 8-bit registers of the
  reference direct-form filter. The 8-bit coefficient width and the
  full-precision output are choices.
* **Window register.** All MCM blocks read one window register. In the
  published block diagram, the newest-sample multiplier is fed straight from the
  serial-in register. Here every product of a block is taken from the same
  stored window.
* **Pipelining.** The result tables call the filter pipelined, but where the
  registers go is not given. Here there is one register per stage and per
  adder-tree level.
* **Sharing.** Patterns are taken greedily, most frequent first, up to
  four per MCM block.
* **Canonic form of 43.** The published sharing example writes 43 as
  `1 0 1 1 0 -1` (32 + 8 + 4 − 1), which is not canonic and builds
  43x = 32x + 8x + 3x. The recoder here produces the canonic
  `1 0 -1 0 -1 0 -1` and builds 43x = 16·3x − 4x − x. The shared term is
  still 4x − x.
* **Serial multiplier.** It places x by the digit position instead of
  shifting the product register.
* **Interfaces.** The handshake (a valid strobe, no back-pressure) and the
  synchronous active-low reset.
* **Default size.** The comparison evaluates 16-, 32- and 64-tap filters with
  its own coefficients, which are not given. The default build is the 3-tap
  example. Longer filters are obtained by overriding `N` and `H`; the block
  size used in that comparison is not stated either.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=… failures=…` and has a watchdog.

| testbench | what it shows |
|---|---|
| `tb_bin2csd` | all 256 inputs: digit sum equals the value, no neighbouring non-zero digits, digit count equals the closed-form NAF count; 19, 43, −128 digit by digit |
| `tb_mcm_cse` | all 256 inputs for {19, 43} (3x must be the one shared term), a single constant, a 4-constant slice with extreme values, and {85, 19, 43, −93}, where 3x and 5x must both be shared |
| `tb_csd_serial_mult` | every coefficient × extreme and random x; product, `busy` length = non-zero digit count, single `done` pulse |
| `tb_sipo_reg`, `tb_pipo_reg`, `tb_piso_reg`, `tb_adder_tree` | the register and tree behaviour described above, with random gaps, resets and K = 1/5/16 trees |
| `tb_block_fir_mcm` | 3-tap/3-way and 5-tap/4-way filters vs. direct convolution, full rate and gaps, exact latency, no pause at full rate |
| `tb_mcm_fir_top` | the top at its default parameters end to end; it counts full-rate blocks, input gaps, a mid-stream reset, the shared term, back-to-back blocks, digit skipping, −1 digits and zero coefficients, and fails if any never happened |
| `tb_fir_lengths` | 16-, 32- and 64-tap, 3-way filters against direct convolution, with latencies 8/9/10; coefficients from `h(i) = ((37m+11)(N+5) mod 255) − 127`, m = min(i, N−1−i) (helper `fir_workload_check`) |

Run a testbench with Verilator 5:

```
verilator --binary --timing -Irtl -y rtl -y tb rtl/csd_pkg.sv tb/tb_mcm_fir_top.sv \
          --top-module tb_mcm_fir_top -o sim && ./obj_dir/sim
```

Swap in any other testbench name. `csd_pkg.sv` must be read first, because
the other files import it. The 64-tap testbench spends most of its build time
elaborating the MCM networks, about a minute.

## Changing the filter

Override `L`, `N` and `H` on `block_fir_mcm` or `mcm_fir_top`. `H` is an
unpacked array of N signed CW-bit values, `H[0]` applied to the newest
sample. Pass it as a named `localparam` rather than as a literal `'{…}` in
the instance: some Verilator versions mix up such literals between sibling
instances when they evaluate the coefficient functions.
