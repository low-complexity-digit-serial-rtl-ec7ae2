# Multiplierless digit-serial 4-tap FIR filter

This is a 4-tap FIR filter with fixed coefficients

    y(n) = 89·x(n) + 59·x(n-1) + 43·x(n-2) + 29·x(n-3)

It is built without multipliers and without full-width adders. Two ideas keep the area small:

* **Multiple constant multiplication (MCM).** All four products of the same input sample
  come from one network of shifts and adders/subtractors. The network reuses its own
  intermediate results, found with a graph-based search. It needs six adders/subtractors
  in total. Multiplying by each constant on its own would need more.
* **Digit-serial arithmetic.** Each word moves through the datapath as DIGIT_W bits per clock,
  least significant digit first. An adder is then DIGIT_W full adders plus one carry
  flip-flop, whatever the word length. The digit size sets the trade-off between area and
  throughput. This design supports digit sizes 2 (the default), 4 and 8.

## The multiplier graph

The four constants are produced in two pairs. Each pair shares one intermediate value:

    7x  = (x << 3) - x            15x = (x << 4) - x
    29x = (7x << 2) + x           59x = (15x << 2) - x
    43x = (7x << 1) + 29x         89x = (15x << 1) + 59x

The 29/43 pair costs one subtractor, two adders and three shifts. The 59/89 pair costs two
subtractors, one adder and three shifts. `rtl/mcm_gb.sv` is this graph written out as
instances: each `+`/`-` is a `ds_adder` and each `<<k` is a `ds_shift`.

## How digit-serial arithmetic works here

All streams are two's-complement words of WORD_W bits (default 16). A word takes
WORD_W/DIGIT_W clocks, least significant digit first. Every result is taken modulo 2^WORD_W.
With 16-bit words, every 8-bit signed input sample gives an exact output, because
|y| ≤ 220·128 < 2^15. Here 220 is the sum of the coefficients.

* **Adder/subtractor (`ds_adder`).** A ripple chain of DIGIT_W full adders. The carry out of
  the top bit is stored in a flip-flop and fed back as the carry into the next digit.
  Subtraction computes a + ~b + 1: b is inverted and the carry into the first digit is 1.
* **Constant shift (`ds_shift`).** In a least-significant-first stream, a left shift by k is
  a delay of the bit stream by k bits. The block keeps the last k bits in a register. Each
  output digit is the low DIGIT_W bits of {current digit, kept bits}. k may be larger than
  the digit.
* **Word framing.** Carries and kept shift bits must not cross from one sample into the
  next. Every adder and shift therefore takes a `first` flag, which is high on digit 0 of
  each word. On that digit:
  * the carry flip-flop is replaced by the word's starting carry: 0 for add, 1 for subtract;
  * the kept shift bits are replaced by zeros.

  A single counter in the top level generates `first` for the whole datapath.
* **One-sample delay (`word_delay`).** A shift register of WORD_W/DIGIT_W digit registers.
  The delay is exactly one word long, so its output stays aligned to the word boundaries.

Adders and shifts add no latency: within a clock, each output digit depends only on the
current input digit and stored state. All four products therefore come out in step with
the input digits.

## Filter structure (`fir_ds_gb`, the top level)

The filter is in transposed form. The products feed a chain of one-word delays and
digit-serial adders:

    x ─► mcm_gb ─► 29x ─► [z⁻¹] ─► (+ 43x) ─► [z⁻¹] ─► (+ 59x) ─► [z⁻¹] ─► (+ 89x) ─► output register ─► y

### Ports

| port      | dir | width   | meaning |
|-----------|-----|---------|---------|
| clk       | in  | 1       | clock |
| rst_n     | in  | 1       | asynchronous active-low reset. Clears all state, so the filter starts at rest |
| in_valid  | in  | 1       | `x_digit` is valid. While it is low, every register in the filter holds, so the stream may stall on any digit |
| x_digit   | in  | DIGIT_W | input sample digit. The first valid digit after reset is digit 0 of the first sample |
| y_valid   | out | 1       | `y_digit` is valid |
| y_first   | out | 1       | `y_digit` is digit 0 (least significant) of an output word |
| y_digit   | out | DIGIT_W | output sample digit |

### Timing

* Each output digit leaves one clock after the input digit in the same position.
* Output word n is y(n), computed from input word n and the three words before it.
* One sample takes WORD_W/DIGIT_W valid clocks: 8 at the defaults.
* The longest combinational path runs from the input digit to the output register. It
  passes through at most four adder chains in series: three in the multiplier graph and one
  in the delay line, each DIGIT_W bits long.

### Parameters

| parameter | default | notes |
|-----------|---------|-------|
| DIGIT_W   | 2       | digit size. The design supports 2, 4 and 8 |
| WORD_W    | 16      | word length. Must be a multiple of DIGIT_W. The default is this design's own choice |

The defaults live in `rtl/fir_ds_pkg.sv`. The package also holds the coefficient list that
the testbenches use.

## What follows the original design, and what is chosen here

Taken from the original design:
* the coefficients;
* the multiplier graph and its operation counts;
* the transposed 4-tap structure;
* the digit-serial adder, built as a full-adder chain with one carry flip-flop;
* the digit sizes 2, 4 and 8.

In a step test (input held at 1), the output climbs 89, 148, 191, 220. This matches the
reference behaviour.

Chosen here, because the original leaves them open:
* 16-bit two's-complement words, least significant digit first. The sender supplies whole
  sign-extended words.
* How a shift and a subtractor are built in digit-serial form.
* The `first` flag that restarts each word, and the digit counter that drives it.
* The `in_valid` stall input.
* The output register, which adds one clock of latency.
* Asynchronous active-low reset to zero.

Not included:
* The two reference multiplier blocks that the original compares against: a
  digit-recoding block without shared partial products, and a common-subexpression block.
  They are alternatives, not part of this design.
* Any board-level wrapper.
* Conversion between parallel and serial words. The filter's ports are digit streams.
  An output word is 16 bits at the default size, wider than an output needs for a
  small input (a step of 1 peaks at 220). Narrowing the output is left to the user.

The original's area and delay figures come from an FPGA flow and are not reproduced here.

## Files

| file | contents |
|------|----------|
| `rtl/fir_ds_pkg.sv` | default sizes, coefficient list |
| `rtl/ds_adder.sv` | digit-serial adder / subtractor |
| `rtl/ds_shift.sv` | digit-serial constant left shift |
| `rtl/mcm_gb.sv` | shift-and-add block producing 29x, 43x, 59x, 89x |
| `rtl/word_delay.sv` | one-sample delay of a digit stream |
| `rtl/fir_ds_gb.sv` | the filter (top level) |
| `tb/*_tb.sv` | one self-checking testbench per module, plus `fir_ds_gb_dsize_tb` |

Every testbench:
* drives random data with random stall cycles;
* compares the results against plain integer arithmetic;
* prints `TB_RESULT checks=N failures=M`.

The end-to-end tests also check:
* the step response and the impulse response;
* the extreme inputs +127 and -128;
* the one-clock latency;
* one output digit per input digit.

`fir_ds_gb_tb` uses the default parameters. `fir_ds_gb_dsize_tb` runs the 2-, 4- and 8-bit
digit versions side by side.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        rtl/fir_ds_pkg.sv tb/fir_ds_gb_tb.sv --top-module fir_ds_gb_tb -o sim
    ./obj_dir/sim

Replace `fir_ds_gb_tb` with any other testbench name to run that test instead. Each one
finishes in well under a second.

To change the digit size, override `DIGIT_W`. `WORD_W` must remain a multiple of it. To
change the coefficients, rewrite the graph in `mcm_gb.sv`, then update `COEF` in the package
so that the testbench reference follows.
