# Non-restoring floating-point square root, full-precision, DSP- and memory-free

This is synthesizable SystemVerilog for an IEEE-754 square-root unit built only from
shifts, comparators and adders. It uses no multipliers and no lookup tables. The mantissa
root comes from a digit-by-digit *non-restoring* integer square root, with two changes
to the textbook algorithm:

1. **An extra comparison in every iteration.** The classic formulation sometimes chooses a
   quotient bit of one when it should be zero, which makes the partial remainder go negative
   and spoils the result. A second comparison against the true trial value stops this.
2. **A padded radicand.** The true mantissa (n+1 bits with the hidden one) is padded with
   zeros to 2(n+1) bits before the root is taken. The integer root then has n+1 bits, a full
   mantissa rather than half of one, and the result is the truncated square root: its error
   is below one unit in the last place (ULP).

The unit comes in two forms that share the same iteration logic:

* **Resource optimised** (`fp_sqrt_resource`): one iteration datapath is reused in a loop.
  A result takes 2(n+1)+1 cycles, which is 49 for single precision.
* **Performance optimised** (`fp_sqrt_pipelined`): the loop is unrolled into a pipeline that
  takes a new operand on every clock. The latency is 2(n+1) + n·Np cycles (n+1 even) or
  2(n+1)+1 + (n+1)·Np cycles (n+1 odd). Np is the number of optional extra pipelining
  registers between iterations.

Both forms are parameterised by exponent and fraction width. Half (5/10), single (8/23,
the default) and double (11/52) precision are all tested.

## The iteration

The radicand D is read two bits at a time, most significant pair first. Each pair gives one
root bit. There are three state variables:

| name | meaning |
|------|---------|
| Q | root bits found so far |
| R | partial remainder, with the current bit pair already shifted in |
| F | partial factor, kept as F = 4·Q′ + q, where Q′ is Q before its last bit q was appended |

The form of F is what makes the update cheap. Adding F's own LSB gives F + F[0] = 2Q. The
next value of F, ((F + F[0]) << 1) | bit, is exactly the amount the remainder must lose when
the new bit is one, namely 4Q + 1. One iteration does this (`nr_sqrt_select` and
`nr_sqrt_remainder`):

```
first  = ((F << 1) | 1)          <= R      // the classic test
second = (((F + F[0]) << 1) | 1)  >  R      // the added test: true trial value 4Q+1
bit    = first && !second
F      = ((F + F[0]) << 1) | bit
Q      = (Q << 1) | bit
R      = ((R - (F[0] ? F : 0)) << 2) | next_pair
```

The classic test alone compares R with 2F+1. When F is odd, that is 2 less than the real
trial value 4Q+1. If R lies in the gap, the classic test sets the bit, the subtraction goes
negative and the root comes out wrong. The second comparator catches exactly those cases.
Once the first test is "less than or equal", the bit equals (4Q+1 <= R) and the result is
exactly floor(sqrt(D)) with remainder D − Q². The block testbench counts how often the
added comparison overrides the classic one, and it must happen.

Widths: for a QW-bit root, F and R need QW+2 bits. At the end, R holds the final remainder
D − Q² (output `rem_o` of the integer cores).

## From a floating-point number to a radicand

`sqrt_exp_unit` prepares every operand, combinationally:

* **Exponent.** The unbiased exponent u = E − bias must be even to halve it exactly. If it is
  odd, one is taken off u and the mantissa is doubled. The result exponent is u/2 + bias.
  That equals (E + bias) >> 1, so the parity test can be made on E + bias.
* **Radicand.** The true mantissa 1.f is placed in a 2(n+1)-bit word with zeros below it:
  `{0, 1.f, n zeros}` for an even exponent, or `{1.f, n+1 zeros}` for an odd one. Doubling
  the mantissa therefore shifts into the padding and never loses a bit. Either way the
  radicand lies in [2^2n, 2^(2n+2)), so its root lies in [2^n, 2^(n+1)). The root's top bit
  is the hidden one, and the result is `{0, exponent, root[n-1:0]}` with no normalisation step.
* **Subnormals** are normalised first with a leading-zero count. Their roots are normal numbers.
* **Special operands.** −0 and +0 return themselves and +∞ returns +∞. A NaN, or any negative
  non-zero operand including −∞, returns the quiet NaN `{0, all ones, 1, zeros}`. These
  operands still pass through the core and take the same fixed latency as any other.

The root is truncated (rounded toward zero). There is no round-to-nearest. The result is
therefore never above the true root and never more than 1 ULP below it.

## The two implementations

### Resource optimised: `nr_sqrt_iter`, `fp_sqrt_resource`

A small state machine (`iter_state_e` in `fsqrt_pkg`) steps one select/remainder datapath
through the pairs:

* **IDLE.** Accepting an operand loads the top pair into R, clears F and Q, and stores the
  rest of the radicand in a shift register. This is the one set-up cycle.
* **SELECT.** The bit is decided and F and Q are registered.
* **UPDATE.** R is registered, the next pair enters, and the loop returns to SELECT.

With n+1 pairs this gives 2(n+1) + 1 cycles from acceptance to `done`.

| precision | EXP_W/MAN_W | radicand | latency |
|-----------|-------------|----------|---------|
| half      | 5/10        | 22 bits  | 23      |
| single    | 8/23        | 48 bits  | 49      |
| double    | 11/52       | 106 bits | 107     |

Handshake: `in_valid_i`/`in_ready_o` on the input. `out_valid_o` is a one-cycle pulse and
`y_o` holds its value until the next operand is accepted. `in_ready_o` rises again in the
cycle of `out_valid_o`, so operands can follow each other every 2(n+1)+1 cycles.

### Performance optimised: `nr_sqrt_pipe`, `fp_sqrt_pipelined`

Every pair has its own select and remainder logic. The stages are cut so that the latency
follows the formulas above:

* two register stages per iteration, one after the bit decision and one after the remainder
  update;
* one extra input stage when the root width n+1 is odd;
* `NP` extra registers (`pipe_delay`) after each of the first n iterations (n+1 even) or
  after each of the n+1 iterations (n+1 odd).

The result exponent and the special-case result travel with the radicand on the pipeline's
tag bus. There is no stall and no back-pressure: an operand can enter on every cycle
(`in_valid_i`) and results leave in order (`out_valid_o`).

| precision | NP = 0 | NP = 1 |
|-----------|--------|--------|
| half      | 23     | 34     |
| single    | 48     | 71     |
| double    | 107    | 160    |

`fsqrt_pkg::resource_latency` and `fsqrt_pkg::pipe_latency` return these numbers.

### Top level

`fp_sqrt_top` holds both implementations side by side. They share the clock, the
active-low synchronous reset and the precision parameters, and each has its own ports
(`r_*` for the resource core, `p_*` for the pipelined one). In a real system one would
normally instantiate just `fp_sqrt_resource` or `fp_sqrt_pipelined`.

## Files

| file | contents |
|------|----------|
| `rtl/fsqrt_pkg.sv` | operand-class and loop-state enums, latency functions |
| `rtl/sqrt_exp_unit.sv` | operand unpacking, exponent halving, radicand padding, special cases |
| `rtl/nr_sqrt_select.sv` | bit decision with the two comparators, F and Q update |
| `rtl/nr_sqrt_remainder.sv` | conditional subtraction, shift, next pair |
| `rtl/nr_sqrt_iter.sv` | resource-optimised integer root (loop) |
| `rtl/nr_sqrt_pipe.sv` | performance-optimised integer root (unrolled pipeline) |
| `rtl/pipe_delay.sv` | register chain for the optional pipelining stages |
| `rtl/fp_sqrt_resource.sv`, `rtl/fp_sqrt_pipelined.sv` | the floating-point units |
| `rtl/fp_sqrt_top.sv` | both units side by side |
| `tb/fsqrt_ref_pkg.sv` | reference model (binary-search root, independent operand decoding) and a 32-bit LFSR |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_fp_sqrt_precisions` |
| `tb/fp_sqrt_harness.sv` | per-precision driver/checker used by `tb_fp_sqrt_precisions` |
| `tb/fp_sqrt_error_probe.sv` | per-precision error sweep used by `tb_fp_sqrt_error` |

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/fsqrt_pkg.sv tb/fsqrt_ref_pkg.sv tb/tb_fp_sqrt_top.sv --top-module tb_fp_sqrt_top
./obj_dir/Vtb_fp_sqrt_top
```

| testbench | what it covers |
|-----------|----------------|
| `tb_sqrt_exp_unit` | radicand and exponent for normal and subnormal operands with odd and even exponents; all special classes |
| `tb_nr_sqrt_select` | bit, F and Q for random legal states; the added comparison must fire |
| `tb_nr_sqrt_remainder` | remainder update with and without subtraction |
| `tb_nr_sqrt_iter` | exact root and remainder, latency 49, ready low while busy, start ignored while busy, back-to-back operands |
| `tb_nr_sqrt_pipe` | 48-bit/NP=0 (latency 48) and 22-bit/NP=2 (odd root width, latency 45) pipelines under streaming input |
| `tb_fp_sqrt_resource` | single precision against the reference model and against a real-valued `$sqrt` (y ≤ √x < y + 1 ULP), latency 49 |
| `tb_fp_sqrt_pipelined` | single precision, NP = 0 and NP = 1, streaming, latency 48 and 71 |
| `tb_fp_sqrt_top` | both cores at the default parameters; counts odd/even exponents, subnormals, zeros, infinities, NaNs, negatives, perfect squares, overrides by the added comparison, resource-core hold-off and back-to-back pipeline issue, and fails if any never happened |
| `tb_fp_sqrt_precisions` | half precision exhaustively (all 65,536 operands), 20,000 single and 20,000 double operands, both cores |
| `tb_fp_sqrt_error` | error analysis: operands swept geometrically over 1e-4 … 1e4 at all three precisions, compared with the double-precision `$sqrt` |

Measured error of the sweep, against the double-precision root:

| precision | operands | max normalised error (s − y)/s | max error |
|-----------|----------|--------------------------------|-----------|
| half      | 36,851   | 9.75e-4 (bound 2^-10)          | 0.9998 ULP |
| single    | 184,217  | 1.19e-7 (bound 2^-23)          | 0.999999 ULP |
| double    | 184,217  | 2.22e-16 (bound 2^-52)         | 1 ULP (the double reference is itself rounded) |

Build with `--assert`. The cores carry assertions that check, in every iteration, that a
one bit is chosen only when its trial value fits in the remainder. They also check that the
root of every finite operand comes out normalised.

The simulations take from under a second to about half a minute. The reference model finds
the root by binary search on q² and is written separately from the RTL.

## Design choices and limits

* **The added comparison.** The second comparison uses the true trial value
  ((F + F[0]) << 1) | 1. The first comparison is "less than or equal". With a strict
  comparison, perfect squares such as 4.0 come out one ULP low.
* **Rounding.** Results are truncated, not rounded to nearest. They never exceed the true
  root and are less than 1 ULP below it. Full IEEE-754 conformance would need
  round-to-nearest-even, which could use the final remainder (zero means exact), plus one
  more root bit.
* **Exceptions.** The core raises no status flags (invalid, inexact).
* **Subnormal inputs** are supported through a leading-zero count in front of the exponent
  logic.
* **Stage placement.** The placement in the pipelined core was chosen to give the latencies
  stated above. A different placement would give the same results.
* **Flow control.** Flow control is valid-only in the pipelined core and valid/ready in the
  resource core. Reset is active-low and synchronous and clears only control state. Data
  registers are not reset.
* **Pipeline width.** Each pipeline stage carries the whole radicand, for clarity. Dropping
  the pairs already consumed would save a large share of the pipeline's flip-flops.
* **Figures from an FPGA implementation.** An FPGA build of this architecture was reported
  to reach 717 MHz (717 MFLOPs) with the pipelined form on a Stratix V. The looped
  half-precision form used 127 ALMs and 232 registers on a Cyclone V. Neither needed DSP
  blocks or memories. Those numbers were not reproduced with this RTL.
