# Booth multipliers: radix-2 sequential, radix-2 array, radix-4 array

Booth's method multiplies two's-complement numbers without special sign
handling. It looks at each multiplier bit together with the bit to its right.
A run of equal bits costs nothing. Only the edges of a run cost an add or a
subtract of the multiplicand. Radix-4 ("modified") Booth looks at overlapping
groups of three bits. Each group stands for one digit in {-2, -1, 0, +1, +2},
so an N-bit multiplier needs only N/2 partial products instead of N.

This RTL holds three signed multipliers built on that idea, so they can be
compared:

| unit | module | size | kind |
|---|---|---|---|
| configurable sequential radix-2 | `booth_radix2_seq` | 16 x 16 -> 32, operand range 4/8/12/16 bits | clocked, one Booth step per multiplier bit |
| radix-2 array | `booth_r2_array` | 8 x 8 -> 16 | combinational, 8 partial products |
| radix-4 array | `booth_r4_array` | 8 x 8 -> 16 | combinational, 4 partial products |

`booth_compare_top` instantiates all three side by side. Each unit has its own
ports, prefixed `seq_`, `r2_` and `r4_`. The three units do not share any logic.

## Recoding rules

Radix-2. Take the pair (Q(i), Q(i-1)), with Q(-1) = 0:

| Q(i) Q(i-1) | digit | action |
|---|---|---|
| 00 | 0 | shift only |
| 01 | +1 | add M |
| 10 | -1 | subtract M |
| 11 | 0 | shift only |

Radix-4. Take the triplet (Q(2i+1), Q(2i), Q(2i-1)), with Q(-1) = 0:

| triplet | 000 | 001 | 010 | 011 | 100 | 101 | 110 | 111 |
|---|---|---|---|---|---|---|---|---|
| digit | 0 | +1 | +1 | +2 | -2 | -1 | -1 | 0 |

The radix-4 encoder (`booth_r4_encoder`) gives each digit as three select
lines, `dbl`, `neg` and `single`, packed in the struct `booth_pkg::r4_code_t`.
The radix-2 encoder (`booth_r2_encoder`) gives each digit as `neg` and
`single`.

## The sequential multiplier

`booth_radix2_seq` is the classic controller-plus-datapath form.

* **M** (`booth_m_reg`) holds the multiplicand.
* **Q** (`booth_q_reg`) holds the multiplier, plus the extra bit **Q-1** to
  the right of Q0.
* **A** (`booth_accumulator`) is the accumulator. It is cleared at the start.
* The **ALU** (`booth_alu`) gives A+M, A-M, A shifted right arithmetically
  by one, or 0.
* The **counter** (`booth_counter`) is a 4-bit down counter of the
  remaining steps.
* **Control block Y** (`booth_control`) is the controller.
* The **configuration register** (`booth_config_reg`) sets the operand range.

A and Q form one shift register. On a shift, A's sign bit stays in place,
A's LSB enters the top of Q, and Q0 moves into Q-1. After the last step A
holds the upper half of the product and Q the lower half.

### Control sequence and timing

The controller has three states:

```
IDLE  --go-->  TEST  (load M, Q, counter; A := 0)
TEST  pair 01: A := A+M  -> SHIFT
      pair 10: A := A-M  -> SHIFT
      pair 00/11: shift now; if count==0 -> IDLE (done) else count-1, stay in TEST
SHIFT shift;             if count==0 -> IDLE (done) else count-1 -> TEST
```

The controller's outputs `load`, `zero`, `add`, `sub`, `shift` and `dc`
(decrement the counter) drive the datapath directly. With R-bit operands a
multiplication takes **1 + R + k cycles** from the `go` cycle to the `done`
pulse. Here k is the number of 01 and 10 pairs among the R recoded bits. So
the time depends on the data, from 1 + R cycles (no add or subtract) to
1 + 2R cycles (alternating bits). The counter is preset to R - 1. The step
taken while it reads zero is the last one, so a 4-bit counter covers 16
steps.

### Operand range (configuration register)

Write `cfg_range` with `cfg_we`. The encoding is `booth_pkg::range_e`:
0 = 4 bits, 1 = 8, 2 = 12, 3 = 16. Writes are ignored while a
multiplication runs, and reset selects 16 bits. With range R:

* only the low R bits of each operand are used, as an R-bit signed number,
  sign-extended to 16 bits when it is loaded;
* only R Booth steps run, so a short operand costs fewer cycles and no add,
  subtract or shift activity for the unused upper bits;
* after R steps A:Q holds the product shifted left by 16 - R places. The
  unprocessed multiplier bits are still in the low end of Q. The output
  shifts A:Q right arithmetically by 16 - R, which gives the 32-bit
  sign-extended product.

`product` is valid from the `done` pulse for as long as `idle` stays high.
While a multiplication runs it shows intermediate values.

### Guard bit

A and the ALU are 17 bits wide, not 16. With exactly 16 bits, A - M
overflows when M = -32768 (for example on the first step, 0 - M = +32768).
The sign bit then shifted in is wrong and the product is wrong. The extra
bit removes that case. The 32-bit product is the low 32 bits of the 33-bit
A:Q.

## The array multipliers

`booth_r2_array` has one encoder and one partial product generator per
multiplier bit (`booth_r2_ppgen`: 0, +M or -M). `booth_r4_array` has one of
each per bit pair (`booth_r4_ppgen`: 0, +-M or +-2M). The radix-4 encoders see
multiplier bits (1:0) with an implied 0 below bit 0, then (3:1), (5:3) and
(7:5).

The generators negate completely: they invert and add one, so every partial
product is already a signed value. `booth_pp_adder` sign-extends partial
product i, weights it by 2^i (radix-2) or 4^i (radix-4), and adds everything
into the 16-bit product. It is a plain chain of word adders, which synthesis
maps as it sees fit. No particular adder structure (Wallace tree,
carry-select) is implied.

Partial product widths:

* radix-2: N + 1 = 9 bits. -M for M = -128 is +128, which fits.
* radix-4: N + 2 = 10 bits. -2M for M = -128 is +256, which needs the tenth
  bit once the negation is complete.

## How far it follows the reference design, and where it does not

The following are taken from the reference design:

* the Booth flow;
* the register set M, Q, Q-1, A, ALU, 4-bit down counter and controller;
* the control signals load, add, sub, shift, dc and the ALU's zero line;
* the 16-bit width of the sequential unit;
* the choice of 4/8/12/16-bit operand ranges through a configuration
  register written from input ports;
* both recoding tables;
* the 8-bit operand size of the array versions, with its 16-bit product;
* the encoder select lines (neg/single; double/neg/single);
* the arrays' structure: encoders, partial product generators, one summing
  block.

The following are this design's own choices:

* a synchronous active-low reset (`rst_n`) and a single clock;
* the cycle split in the controller (an add or subtract takes its own cycle;
  a shift-only step takes one cycle) and the one-cycle `done` pulse;
* the 17-bit A and ALU (one guard bit);
* 10-bit radix-4 partial products instead of 9;
* how the range is encoded, the rule that writes are refused while busy, and
  the output alignment for short ranges;
* how the partial products are added.

There is no mode that truncates the product, and no twin 8-bit parallel mode.
Power behaviour, which the reference design discusses, is not modelled. A
short range saves work only by running fewer steps. There is no clock gating.

## Files

* `rtl/booth_pkg.sv`: shared types (`alu_op_e`, `range_e`, `r4_code_t`) and
  `range_bits()`.
* `rtl/booth_*.sv`: one module per file, as listed above;
  `rtl/booth_compare_top.sv` is the top.
* `tb/tb_<module>.sv`: a self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M` and stops itself through a watchdog if it
  hangs.

What the testbenches cover:

* The two 8-bit arrays are checked exhaustively, all 65536 operand pairs.
* The encoders and partial product generators are checked exhaustively.
* The sequential unit gets corner cases (0, 1, -1, most negative and most
  positive values) and random operands in every range. It also checks the
  cycle count 1 + R + k.
* `tb_booth_compare_top` runs the whole design at its default sizes. It
  counts how often each mechanism occurs: add, subtract and shift-only steps,
  each range, refused configuration writes, and every radix-2 and radix-4
  digit. A mechanism that never occurs counts as a failure.
* `tb_booth_trace_cases` replays the small operand sequences of the
  reference simulations, for example 2 x 7 = 14 and 3 x 8 = 24, on all three
  units.

To simulate, for example the top-level test:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/booth_pkg.sv \
    tb/tb_booth_compare_top.sv --top-module tb_booth_compare_top
./obj_dir/Vtb_booth_compare_top
```

Replace the testbench name to run another test. Every test finishes in well
under a second.

## Changing sizes

* The arrays take any even `N` (radix-4) or any `N` (radix-2). The product is
  always 2N bits.
* The sequential unit's `N` and counter width `CW` can change, as long as
  2^CW >= N. Its range codes stay 4/8/12/16 bits, capped at N.
* In `booth_compare_top`, `SEQ_N`, `SEQ_CW` and `ARR_N` pass these sizes on.
