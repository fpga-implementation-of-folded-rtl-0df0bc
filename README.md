# Folded bit-plane FIR filter with a changeable folding factor

A k-tap FIR filter computes

    y_l = c_0*x_l + c_1*x_(l-1) + ... + c_(k-1)*x_(l-k+1)

A bit-plane array computes it with one row of simple cells for each bit of
each coefficient. Each cell is an AND gate and a full adder, so the array has
k*m rows for m-bit coefficients. The array is fast and regular, but its size
grows with k*m. This design folds the array. It keeps **one row per tap**, and
each row works through the m bit-planes of its coefficient one per clock. The
array shrinks by a factor of m. The cost is that one output word now takes m
clocks.

The number of steps per sample, m, is the *folding factor*. It is a run-time
setting, not a build parameter. The array is sized for coefficients of up to
M1 bits, but it can run with any coefficient length 1 <= m <= M1. With short
coefficients it takes one sample every m clocks, so throughput rises by M1/m.
Coefficients are not padded to M1 bits.

Default build: 16 taps, 8-bit unsigned input words, coefficients of up to 8
bits, and a 20-bit output.

## How one sample period works

This is the part that takes the most care, so here it is step by step.

**Rows and taps.** There are K rows. Row r serves coefficient c_(K-1-r): the
first row holds the *oldest* tap and the last row holds c_0. Each row is
W = M1 + NX + ceil(log2 K) cells wide. It keeps a running value in carry-save
form: a sum word `s` and a carry word `cy`, where bit b of `cy` has weight
2^(b+1).

**Folding steps.** A sample period is m clocks, called steps 0 .. m-1. On step i:

* the shared shift register presents x*2^i to every row (x is the word taken
  for this period);
* each tap's coefficient rotator presents bit c^i of its coefficient;
* each cell adds the partial product (x*2^i)[b] AND c^i to its carry-save pair.

So after m steps a row has added c*x to whatever it started from. Bit-planes
go LSB first, and because x is shifted rather than the sum, no right shift of
the accumulator is ever needed.

**Where a row starts from.** Each cell has two 2:1 multiplexers in front of
its full adder, both steered by `ck1`:

| step | sum input | carry input |
|------|-----------|-------------|
| 0 (`ck1` = 1) | previous row's sum bit of the same weight | previous row's carry from the weight below |
| 1 .. m-1 (`ck1` = 0) | the cell's own sum bit | own row's carry from the weight below |

Row 0's "previous row" is zero. On step 0 every row takes the value the row
above it finished with in the previous period. Here is what that gives, with
x_l the word of period l:

    end of period l:  row 0     = c_(K-1)*x_l
                      row 1     = c_(K-1)*x_(l-1) + c_(K-2)*x_l
                      ...
                      row K-1   = c_(K-1)*x_(l-K+1) + ... + c_1*x_(l-1) + c_0*x_l = y_l

This is a transposed-form FIR. Each row is one tap's multiply-add, and the
delay line is the row registers themselves. No separate sample history is
stored.

**Output.** On step 0 of the next period, the vector merging adder adds the
last row's `s + 2*cy` into a binary word and registers it. That register is
the output switch: `y` holds one result for the whole period, and `y_valid`
pulses once per period.

**Pipelining.** Every cell registers its sum and carry. The longest path is
AND gate, then multiplexer, then full adder, whatever K and W are. Carries
move one cell to the left per clock, and nothing ripples across a row. The
one full-width carry chain is the merging adder at the output, which runs once
per period.

**Why W bits are enough.** The largest result is
K*(2^NX - 1)*(2^M1 - 1) < 2^(NX + M1 + ceil(log2 K)). The carry out of the top
cell can therefore be dropped: `s + 2*cy` is exact modulo 2^W, and so is the
merging adder.

## Changing the coefficient length

Two things change with m, and both are driven by one length-control word
holding m-1 (3 bits for M1 = 8):

* **ck1 period.** `fbpa_ctrl` counts steps 0 .. m-1. `ck1` is high on step 0
  and `last` is high on step m-1. With m = 1 both are high on every clock.
* **Coefficient rotation.** Each `fbpa_coef_rot` holds M1 coefficient bits and
  shifts them toward bit 0 every clock. A 1-to-M1 demultiplexer, addressed by
  the length word, writes the bit leaving position 0 back into position m-1.
  The low m bits therefore rotate with period m, and c^0 is back in front on
  every step 0. Bits above m-1 are never presented, so they may hold anything.

Nothing else depends on m. The rows, the shift register and the output stage
are the same for every length.

## Interface and timing (`fbpa_fir`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | basic clock; asynchronous active-low reset |
| `cfg_load` | in | 1 | one-clock pulse: load length and coefficients, clear the array |
| `cfg_len` | in | LW | m-1 (values above M1-1 act as M1-1) |
| `cfg_coef` | in | K x M1 | `cfg_coef[j]` = c_j; only its low m bits are used |
| `x_in` | in | NX | input word |
| `x_take` | out | 1 | `x_in` is taken at this clock edge |
| `y` | out | W | output word |
| `y_valid` | out | 1 | one-clock pulse when `y` is new |

* A `cfg_load` pulse does four things: it clears every row and the shift
  register, loads the coefficients, latches m and restarts the step counter.
  The filter then behaves as if all earlier input words were zero.
* `x_take` goes high for the first time m clocks after `cfg_load`, and then
  every m clocks. Present the next word whenever it is high. The filter
  cannot be stalled.
* The output for a word taken at clock edge e is in `y` from edge e + m + 1.
* Outputs arrive exactly m clocks apart, so throughput is f_clk / m.
* After each `cfg_load` the first two outputs are zero: first the cleared
  array, then the zero word left in the shift register. The third output is
  for the first word taken.
* Changing m or the coefficients always goes through `cfg_load`. Results that
  were still in the array at that moment are lost.

Example with m = 2, c_0 = 1, c_1 = 2 and inputs 1, 10, 100, 100, ...: the
outputs are 0, 0, 1, 12, 120, 300, 300, ...

## Blocks

| module | role |
|--------|------|
| `fbpa_pkg` | width rules: row width M1+NX+ceil(log2 K), length-word width |
| `fbpa_cell` | basic cell: AND partial product, two ck1 multiplexers, full adder, sum/carry registers |
| `fbpa_row` | one tap: W cells with the carry of cell b fed to cell b+1 |
| `fbpa_shift_reg` | one shift register shared by all rows; parallel load, then x*2^i |
| `fbpa_coef_rot` | per-tap coefficient rotate register with the length-controlled demultiplexer |
| `fbpa_ctrl` | length register, step counter, `ck1` and `last` |
| `fbpa_vma` | vector merging adder and output register |
| `fbpa_fir` | top level: wires K rows, K rotators, the shift register, control and the merging adder |

At the defaults the array is 16 x 20 = 320 cells. Together with the other
registers that is about 800 flip-flops.

## How this relates to the published architecture

The following follow the architecture as published:

* the row-per-tap folding, with folding factor = coefficient length;
* the ordering c_(K-1) ... c_0 from the first row to the last;
* the AND-plus-full-adder cell with two multiplexers;
* one shared shift register in place of per-tap shift sections;
* the rotating coefficient registers with a length-controlled demultiplexer;
* a ck1 period of m basic clocks;
* the array width rule;
* the merging adder on the last row.

The following are choices made here:

* **Unsigned operands.** Words and coefficients are plain unsigned numbers.
  Signed data would need sign handling that this design does not have.
* **One clock.** ck1 is a phase enable inside the `clk` domain, not a second
  clock.
* **Configuration port.** There is a parallel coefficient load, clamping of
  out-of-range lengths, a clear on reconfiguration and an asynchronous reset.
* **Handshake.** The `x_take` strobe and the registered output with `y_valid`
  are added here.
* **Merging adder.** It is a plain word-level adder. Its carry chain is the
  one path that grows with W. Pipeline it if it limits the clock.
* **Carry-save meaning of the multiplexers.** Which multiplexer input is
  selected by which level of ck1 is chosen here.
* **No truncation.** The array keeps all W result bits. It does not drop
  low-order bits of intermediate results.

Not included: the unfolded bit-plane array, which serves only as a point of
comparison.

### Reported implementation results

Reported results for this architecture on a Xilinx Spartan-II XC2S200 (8-bit
words, m1 = 8) are listed below. They are quoted for reference and were not
reproduced here. Throughput equals f_ck / 8 because this design produces one
output per m = 8 clocks.

| taps | slices used | f_ck (MHz) | throughput at m = 8 (MHz) |
|------|-------------|-----------|---------------------------|
| 4  | 9.4 % | 204.1 | 25.5 |
| 8  | 18.0 % | 188.7 | 23.6 |
| 12 | 27.7 % | 178.6 | 22.3 |
| 16 | 36.6 % | 137.0 | 17.1 |

Shortening the coefficients of the 16-tap filter from 8 bits to m bits raises
throughput by 8/m.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=N failures=M`.

* `tb_fbpa_cell`: random inputs against a full-adder model, plus reset and
  clear.
* `tb_fbpa_row`: random m, x, c and starting carry-save value. It checks
  `s + 2*cy = start + c*x` after m steps, and that the previous-row inputs
  are ignored on steps 1..m-1.
* `tb_fbpa_coef_rot`: every m from 1 to 8. It checks that bit (j mod m) is
  presented on clock j.
* `tb_fbpa_shift_reg`, `tb_fbpa_ctrl`, `tb_fbpa_vma`: shifting, step and
  `ck1` pattern, and merging and holding, each for its own block.
* `tb_fbpa_fir`: the default 16-tap filter end to end. It checks every output
  against a reference FIR model across lengths m = 8..1 and random lengths.
  It checks the latency (e + m + 1), the spacing of outputs (exactly m
  clocks), the two zero start-up words and all-ones full-scale operands. It
  also counts how often each mechanism occurred.
* `tb_fbpa_workloads`: 4-, 8-, 12- and 16-tap filters at m = 8, and a 16-tap
  sweep of m = 8..1, checked through the helper `fbpa_fir_stream_check`.
  From the measured clocks per output it recomputes the throughput column
  above.

To run a testbench with Verilator 5 (from the directory that holds `rtl/`
and `tb/`):

    verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
        rtl/fbpa_pkg.sv tb/tb_fbpa_fir.sv --top-module tb_fbpa_fir
    ./obj_dir/Vtb_fbpa_fir

Use the same command for the other testbenches, with the file and top name
changed. All of them finish in well under a second.

Lint reports two kinds of warning, and both are expected:

* The top carry bit of a row is unused. This is by design, since the width
  rule makes it always zero.
* The reset is used both asynchronously and in the assertions' `disable iff`.

## Changing the design

* Size: set `K`, `NX` and `M1` on `fbpa_fir`. `W` and the length-word width
  follow from them.
* To support signed data, change the cell's partial product and the
  top-row/merging-adder sign handling. The rest of the structure is
  unaffected.
* `fbpa_ctrl` and `fbpa_fir` contain assertions that the step counter stays
  within m and that words are taken only on the last step.
