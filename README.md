# Programmable FIR filter with Bi-Recoder multipliers

This is a finite impulse response filter

    y(n) = sum_{p=0}^{TAPS-1} coef[p] * x(n - p)

with coefficients loaded at run time, built in two architectures that share
one arithmetic core:

* a **sequential** filter. It has one multiplier and one accumulator, and a
  small microprogram steps it through the taps.
* a **parallel** (direct-form) filter. It has one multiplier per tap and
  produces one output per clock.

Most of the design is in the 8 x 8 multiplier. The main multiplier is a
**Bi-Recoder** multiplier. It cuts the multiplier operand into 2-bit digits
and, for each digit, picks one of 0, a, 2a or 3a with a multiplexer. This
gives four partial products instead of the eight rows of an AND-array. The
partial products are added with a **reduced complexity square-root carry
select adder (SQRT CSLA)**. In that adder, each group of bits is a chain of
half adders whose outputs are corrected by multiplexers. The usual second
ripple adder and binary-to-excess-1 converter are not needed. A **reduced
complexity Wallace tree** multiplier, which uses the same final adder, can be
fitted in its place through a parameter.

Samples and coefficients are 8-bit unsigned, and products are 16 bits. Filter
outputs are `16 + clog2(TAPS)` bits wide, so they never overflow. The default
size is 8 taps.

## Arithmetic core

### Carry-select group cell (`csla_group`)

Each bit of a group has a half adder, `s = a ^ b` and `c = a & b`. Two 2:1
multiplexers are selected by the carry that comes into the bit:

| carry in | sum  | carry out |
|----------|------|-----------|
| 0        | `s`  | `c`       |
| 1        | `~s` | `s ^ c`   |

This is a full adder: with a carry in of 1, the carry out is `c | s`, and
`s` and `c` are never both 1, so that equals `s ^ c`. The carry out of each
bit selects the multiplexers of the next bit. The carry out of the last bit
leaves the group. The width `W` is a parameter. The same chain is used for the
2- to 5-bit adder groups and for the 10-bit `a + 2a` adder of the
partial-product stage.

### 16-bit SQRT CSLA (`sqrt_csla`)

The operands are split into the groups `[1:0] [3:2] [6:4] [10:7] [15:11]`
(2, 2, 3, 4 and 5 bits).

* The lowest group is a plain 2-bit ripple adder with the external carry in.
* The four upper groups are `csla_group` instances.
* The carry out of each group is the carry in of the next.

### Bi-Recoder multiplier (`birecoder_ppgen`, `birecoder_mult`)

`birecoder_ppgen` turns a 2-bit digit `b[2k+1:2k]` into a 10-bit partial
product:

| digit | partial product |
|-------|-----------------|
| 00    | 0               |
| 01    | a               |
| 10    | a << 1          |
| 11    | a + (a << 1)    |

`birecoder_mult` weights the four partial products P1..P4 by 1, 4, 16 and 64.
It adds them with three `sqrt_csla`s in a two-level tree:
`(P1 + 4·P2) + (16·P3 + 64·P4)`. No intermediate sum exceeds 16 bits.

### Reduced complexity Wallace multiplier (`wallace_mult`)

1. 64 AND gates form eight partial-product rows.
2. The rows are reduced to two. At each stage, rows are taken three at a time
   and each group of three goes through a row of full adders, which gives a sum
   row and a carry row shifted up one place. One or two rows left over pass to
   the next stage unchanged. The row count goes 8 → 6 → 4 → 3 → 2. Half adders
   are not used.
3. A `sqrt_csla` adds the last two rows.

The reduction works on whole rows, not on the individual dots of a column
diagram. The rule is the same (three bits into a full adder, one or two bits
passed on). Full adders whose inputs are constant zero are removed by
synthesis.

`fir_mult` picks one of the two multipliers through the parameter
`MULT` (`fir_pkg::MULT_BIRECODER` or `fir_pkg::MULT_WALLACE`).

## The sequential filter and its microprogram

`fir_seq` contains:

* a `TAPS`-deep sample delay line (`xs[0]` is the newest sample),
* a coefficient register bank,
* one `fir_mult`,
* an accumulator of `16 + clog2(TAPS)` bits.

`fir_useq` controls it. `fir_useq` holds a control store of `TAPS + 2`
microinstructions, of type `fir_pkg::uinstr_t`, and a micro-program counter.
Each microinstruction has these fields:

* the flags `take_sample`, `clr_acc`, `mac` and `emit`,
* an 8-bit `tap` index,
* a next-address control: `SEQ_NEXT`, `SEQ_WAIT` or `SEQ_JUMP`,
* an 8-bit jump target.

The program is generated at elaboration from `TAPS`:

| address   | word                                                                            |
|-----------|---------------------------------------------------------------------------------|
| 0         | WAIT: when a sample is offered, shift it in, clear the accumulator, go on         |
| 1 … TAPS  | MAC tap `k-1`: `acc += coef[k-1] * xs[k-1]`                                       |
| TAPS + 1  | EMIT: register the accumulator as `y_data`, pulse `y_valid`, jump to 0            |

`x_ready` is high while the controller is at WAIT. A sample is taken on a
clock edge where `x_valid && x_ready`. `y_valid` pulses `TAPS + 2` cycles after
that edge, and `x_ready` is high again in the same cycle. Throughput is one
sample per `TAPS + 2` clocks: 10 clocks at the default size.

To change the schedule, edit the `ucode` function in `fir_useq.sv`. For
example, you could add microinstructions or skip taps whose coefficient is
known to be zero.

## The parallel filter

`fir_par` multiplies the incoming sample and the `TAPS - 1` stored previous
samples by their coefficients, with `TAPS` multipliers in parallel. It sums
the products combinationally and registers the sum. It accepts a sample on
every clock with `x_valid` high, and `y_valid`/`y_data` follow one clock later.

## Top level (`fir_top`)

`fir_top` places both filters side by side. They use the same multiplier
kind and have one shared coefficient write port.

| parameter | default          | meaning                                    |
|-----------|------------------|--------------------------------------------|
| `TAPS`    | 8                | filter length, 1 … 256                     |
| `MULT`    | `MULT_BIRECODER` | multiplier in every tap (`MULT_WALLACE` is the alternative) |

| port                               | dir | width           | meaning                                   |
|------------------------------------|-----|-----------------|-------------------------------------------|
| `clk`, `rst_n`                     | in  | 1               | clock; synchronous active-low reset       |
| `coef_we`, `coef_addr`, `coef_data`| in  | 1, clog2(TAPS), 8 | write `coef[coef_addr]` in both filters |
| `x_valid`, `x_data`                | in  | 1, 8            | sample offered                            |
| `x_ready`                          | out | 1               | sample taken on a clock edge with `x_valid` |
| `yseq_valid`, `yseq_data`          | out | 1, 16+clog2(TAPS) | sequential result, `TAPS + 2` cycles after the sample |
| `ypar_valid`, `ypar_data`          | out | 1, 16+clog2(TAPS) | parallel result, 1 cycle after the sample |

`x_ready` comes from the sequential filter. The parallel filter takes a sample
only when the sequential one does, so both see the same stream and give the
same sequence of outputs. Coefficients written between samples take effect
from the next sample. Do not write a coefficient while the sequential filter
is in the middle of a sample: that sample would mix old and new coefficients.
Reset clears the coefficients, the delay lines and the outputs. The sample
input comes straight from a converter or a host. No converter is modelled.

## Where this design makes its own choices

The arithmetic structures follow the published design closely:

* the digit recoding and the 10-bit partial products,
* the cell of the carry-select groups and the group bit ranges,
* the three-row reduction rule of the Wallace multiplier.

The following were not specified, and were chosen here:

* The filter length. `TAPS = 8` is a default, not a published figure.
* Operand signedness. Everything is unsigned, which is what the
  0/a/2a/3a digit selection implies.
* How the Bi-Recoder partial products are added. This design uses a tree of
  three 16-bit SQRT CSLAs.
* The adder that forms 3a. This design uses a 10-bit `csla_group` chain.
* The whole microprogram: the word format, the program and the one-tap-per-cycle
  schedule.
* The structure of the parallel filter, the handshake, the coefficient port,
  the accumulator width and adder, and the reset.
* Putting both architectures in one top.

These are not included:

* The conventional SQRT CSLA, which uses a second ripple adder and a
  binary-to-excess-1 converter in each group.
* A compressor-based adder for the Bi-Recoder partial products.
* The 4 x 4 conventional Wallace example.

They are reference points that the design improves on, not parts of it.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends with a
`TB_RESULT checks=… failures=…` line.

| testbench             | what it checks |
|-----------------------|----------------|
| `tb_csla_group`       | exhaustive at W = 2 and W = 5, against `a + b + cin` |
| `tb_sqrt_csla`        | carry chains through every group boundary, plus 20 000 random additions |
| `tb_birecoder_ppgen`  | all 1 024 input combinations |
| `tb_birecoder_mult`, `tb_wallace_mult` | all 65 536 operand pairs |
| `tb_fir_useq`         | the word sequence, the holding at WAIT, the `TAPS + 2` period and reset in mid-program |
| `tb_fir_seq`, `tb_fir_par` | both multiplier kinds against a convolution reference, including latency, gaps, held samples and coefficient rewrites |
| `tb_fir_top`          | the default-size top end to end: 400 samples |

`tb_fir_top` checks both outputs and both latencies. It also counts each
mechanism and fails if any never happens:

* stalled sample offers,
* idle cycles,
* coefficient rewrites,
* MAC and EMIT micro-steps,
* all four recoder digits.

The testbenches compare against arithmetic done by the simulator, so they do
not check the per-gate structure. Timing, area and power have not been
evaluated here.

## Simulating

All files are SystemVerilog-2017. `fir_pkg.sv` must be read first. To run a
testbench with Verilator:

    verilator --binary --timing --assert -Irtl -Itb rtl/fir_pkg.sv tb/tb_fir_top.sv \
        --top-module tb_fir_top -Mdir obj_tb_fir_top -o sim
    ./obj_tb_fir_top/sim

Replace `tb_fir_top` with any other testbench name. To lint the design:

    verilator --lint-only -Wall -Irtl rtl/fir_pkg.sv rtl/fir_top.sv

Lint reports one warning, and it is expected: `fir_seq` does not use the
next-address fields of the microinstruction. Only the controller uses them.
When a lower module is linted on its own, lint can also report `fir_pkg`
constants that the module does not use.

## Files

| file | contents |
|------|----------|
| `rtl/fir_pkg.sv` | widths, multiplier kind, microinstruction type |
| `rtl/csla_group.sv` | carry-select group cell chain |
| `rtl/sqrt_csla.sv` | 16-bit SQRT CSLA |
| `rtl/birecoder_ppgen.sv`, `rtl/birecoder_mult.sv` | Bi-Recoder multiplier |
| `rtl/wallace_mult.sv` | reduced complexity Wallace multiplier |
| `rtl/fir_mult.sv` | multiplier selection |
| `rtl/fir_useq.sv` | microprogram controller |
| `rtl/fir_seq.sv`, `rtl/fir_par.sv` | sequential and parallel filters |
| `rtl/fir_top.sv` | top level |
