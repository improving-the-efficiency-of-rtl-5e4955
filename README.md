# On-line recursive low-pass filter with digit-serial I/O

A chain of dependent arithmetic operations normally runs one operation after
another: each one has to wait for the full result of the one before it. This
design computes the second-order recursive filter

    y_i = b (x_i - y_{i-2}) + c (x_{i-1} - y_{i-1}) + x_{i-2} + x_{i-1}

in **on-line mode**: every operation consumes its operands one digit at a
time, most significant digit first, and starts producing result digits
right away. The operation that depends on it can therefore begin one clock
later instead of one full operation later. Samples also enter and leave the
chip one digit per clock, so the filter needs six pins (clock, reset, two
input wires, two output wires) for any word length.

The method (the digit recurrence, its selection rule and the add/subtract and
multiply increments) and the block structure (seven identical-interface
computing blocks under one sequencer) follow the article "Improving the
Efficiency of Functions Computation in On-Line Mode on FPGA" by I. Verbovskiy
and V. Zhabin. Timing, number formats, widths, rounding and the exact
sequencing are this implementation's own; they are listed under
[Departures and own choices](#departures-and-own-choices).

## Number representation

Every value on a wire is a fraction in radix-2 signed digits,
`v = sum_j d_j 2^-j` with `d_j` in {-1, 0, +1}, sent `d_1` first. A digit
travels on two wires, coded as the two's complement of its value
(`olf_pkg`):

| code | digit |
|------|-------|
| `00` | 0     |
| `01` | +1    |
| `11` | -1    |
| `10` | unused, read as 0 (flagged by an assertion in `ml_sm_sb`) |

The representation is redundant (0.1(-1) and 0.01 are both 1/4). The
redundancy is what lets a block choose an output digit before it has seen
the rest of its operands and fix any overshoot with later digits of the
opposite sign.

A sample is an N-digit fraction, so |x| <= 1 - 2^-N. Coefficients are given
as integers `B_Q = b * 2^N`, `C_Q = c * 2^N`.

## The computing block (`ml_sm_sb`)

One module serves as adder, subtractor or multiplier (parameter `OP`). In
step i it receives digits `x_i`, `y_i` and keeps a residual `R`:

    N_i = 2 R_{i-1} + F_i
    z_i = +1 if N_i >= 1/2,  -1 if N_i < -1/2,  else 0
    R_i = N_i - z_i

    add/sub:  F_i = 2^-p (x_i +/- y_i)
    multiply: F_i = 2^-p (x_i Y_i + y_i X_{i-1})

`X_i`, `Y_i` are the operand prefixes received so far
(`X_i = X_{i-1} + x_i 2^-i`). The multiply increment is the telescoping
difference `X_i Y_i - X_{i-1} Y_{i-1}`, so in both cases the increments sum
to the exact operation. Unrolling the recurrence gives

    sum_{j<=k} z_j 2^-j = 2^-p op(X, Y) - 2^-k R_k,   |R_k| <= 1/2

**The output is the operation scaled by 2^-p**, where p is the on-line
delay. The scaling is how the block gets away without waiting: the first
result digits carry little weight, and the significant digits of `op(X, Y)`
come out p steps after the operand digits of the same weight. With p >= 2,
|F_i| <= 1/2 and the residual never leaves [-1/2, 1/2] (an assertion checks
this), so the result never overflows.

Hardware: a residual register, two prefix registers and a one-hot weight
register, all K + p fraction bits plus sign and two integer bits wide; one
adder per prefix, an add/subtract of the selected multiple, a doubling add and
a two-threshold comparison. The digits only select +value, -value or
nothing, so there is no multiplier array. The result digit is registered:
`z_i` leaves the block on the clock edge that takes `x_i`, `y_i`.

`rst` is a synchronous clear. While it is high the block holds R = X = Y = 0;
the first edge with `rst` low takes digit 1.

## The operation chain

The formula is split into five levels of blocks (names as in the original
structure):

| level | block | operation                  | result scale |
|-------|-------|----------------------------|--------------|
| 1     | SB_1  | x_i - y_{i-2}              | 2^-p         |
| 1     | SB_2  | x_{i-1} - y_{i-1}          | 2^-p         |
| 2     | ML_1  | SB_1 * b                   | 2^-2p        |
| 2     | ML_2  | SB_2 * c                   | 2^-2p        |
| 3     | SM_2  | ML_1 + ML_2                | 2^-3p        |
| 4     | SM_1  | SM_2 + x_{i-2}             | 2^-4p        |
| 5     | SM_3  | SM_1 + x_{i-1}  (= y_i)    | 2^-5p        |

Because every block scales by 2^-p, an operand that joins the chain at a
higher level must be scaled the same way before it can be added. For an MSD
first digit stream, scaling by 2^-d is simply starting d cycles later, so
the sequencer sends x_{i-2} to SM_1 3p digits late and x_{i-1} to SM_3 4p
digits late. No shifter is involved.

The final stream is y_i scaled by 2^-5p, and y_i itself can exceed 1 in
magnitude (the DC gain is (b+c+2)/(1+b+c)). Each block therefore runs
**K = N + 5p + 2 steps**: N digits of the result, 5p digits of the growth
through the chain, and two guard digits. The truncation errors of all seven
blocks together stay below 0.17 units of the last output digit, so after
rounding an output is always within one unit (strictly, under 0.67 units) of
the exact value of the formula.

## Frame timing (`sf_ctrl`)

One sample is processed per frame of **K + 6 clocks** (28 at the defaults
N = 10, p = 2). Cycle t of the frame, counted from 0:

| cycles                 | what happens |
|------------------------|--------------|
| 0 .. N-1               | digit t+1 of x_i arrives on `x_in` and goes straight to SB_1; y_{i-2}, x_{i-1}, y_{i-1} are replayed to SB_1/SB_2; digit t+1 of y_{i-1} goes out on `y_out` |
| l-1 .. l-1+K-1         | level l (1..5) is out of reset and computing |
| 1 .. N                 | b and c digits to ML_1, ML_2 |
| 3+3p .. 3+3p+N-1       | x_{i-2} to SM_1 |
| 4+4p .. 4+4p+N-1       | x_{i-1} to SM_3 |
| 5 .. K+4               | SM_3's result digits are accumulated into a two's complement word |
| K+5 (last)             | the word is rounded to N fraction digits (half up), saturated to +/-(1 - 2^-N), stored as y_i; x and y histories shift |

All five levels compute at the same time for most of the frame, so the
frame is K + 6 cycles where five blocks one after another would need 5K.
At the defaults that is 28 against 110 cycles per sample; at N = 40, p = 2 it
is 58 against 260.

The sequencer keeps x_i (as it arrives), x_{i-1}, x_{i-2}, y_{i-1}, y_{i-2}
as N-digit vectors in sign-magnitude form (a digit is the sign times one
magnitude bit), which is also how the output is sent. Output y_i appears on
`y_out` in cycles 0..N-1 of the frame after the one that took x_i, and the
same stored value is fed back as y_{i-1} and, a frame later, y_{i-2}.

## Using the filter (`olf_lpf_top`)

Ports: `clk`, `rst` (synchronous, active high), `x_in[1:0]`, `y_out[1:0]`.
There is no frame-sync pin: the first frame starts in the first cycle with
`rst` low, and frames follow back to back every K + 6 cycles. Outside cycles
0..N-1 of a frame, `x_in` is ignored and `y_out` is 0.

| parameter | default | meaning |
|-----------|---------|---------|
| `N`       | 10      | digits per sample (the article evaluates 10 to 50) |
| `P`       | 2       | on-line delay of every block (the article evaluates 2, 3, 4; must be >= 2) |
| `B_Q`     | 2^(N-2) | b * 2^N, b = 1/4; magnitude below 1 |
| `C_Q`     | 2^(N-1) | c * 2^N, c = 1/2; magnitude below 1 |

The coefficient parameters are 64-bit, which limits N to 62. The default
coefficients give a stable filter (poles at radius 0.5) with gain 1.57 at DC,
a peak of 1.87 near 0.28 of the sample rate and 0.33 at the Nyquist
frequency; inputs above about 0.5 in amplitude can saturate the output.

At the defaults the design synthesises (generic, technology-free) to about
465 word-level cells and 488 flip-flop bits.

## Files

| file | contents |
|------|----------|
| `rtl/olf_pkg.sv` | digit type and code, operation enum, `steps_per_block` (K) and `frame_cycles` |
| `rtl/ml_sm_sb.sv` | on-line adder / subtractor / multiplier |
| `rtl/sf_ctrl.sv` | sequencer: frame counter, level resets, sample storage, operand streams, output rounding and saturation |
| `rtl/olf_lpf_top.sv` | the filter: sequencer and seven blocks |
| `tb/tb_ml_sm_sb.sv` | block test: add, sub, multiply (p = 2 and 3), digit-exact against an integer model of the recurrence and value-checked against the error bound, 400 operand pairs including the extremes |
| `tb/tb_sf_ctrl.sv` | sequencer test: every output in every cycle of 40 frames against the frame table, including rounding and saturation |
| `tb/tb_olf_lpf_top.sv` | end-to-end at the defaults: sine, saturating and random redundant inputs, each output against the formula |
| `tb/tb_olf_lpf_afc.sv` | frequency response at six frequencies against the transfer function |
| `tb/tb_olf_lpf_sweep.sv`, `tb/lpf_sweep_lane.sv` | N = 10, 20, 30, 40, 50 by p = 2, 3, 4, fifteen filters checked against the formula |

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops on a
watchdog if the design hangs. To run one with Verilator:

    verilator --binary --timing --assert --top-module tb_olf_lpf_top \
        -y rtl -y tb +libext+.sv -Irtl rtl/olf_pkg.sv tb/tb_olf_lpf_top.sv
    ./obj_dir/Vtb_olf_lpf_top

The end-to-end test compares each output with the formula evaluated exactly
on the inputs and on the two previous outputs the filter actually returned,
so a rounding difference cannot accumulate through the feedback. It also
requires that saturation, negative output digits, non-zero feedback and
correct results within one frame (possible only if the five operations
overlap) each occur. All testbenches pass.

## Departures and own choices

Taken from the original design: the recurrence and selection rule, the add,
subtract and multiply increments, the on-line delay p, the operation tree of
the filter formula, one computing-block type for all seven operations, the
2-wire serial ports of the blocks and of the filter, a sequencer holding the
past samples and driving per-level resets, and growing the word length along
the chain.

Chosen here, because the article does not say:

- the digit code on the two wires;
- the coefficient values b = 1/4 and c = 1/2;
- fixed-point widths, the one-hot prefix weight, the registered block output
  and the one-cycle stagger between levels;
- the frame layout, the counting of frame cycles upwards from 0 and the
  absence of a frame-sync pin;
- the number of steps K = N + 5p + 2 (the article grows the word but does
  not give by how much);
- storing samples in sign-magnitude digits, rounding half up and saturating
  the output.

Differences from the published structure:

- The original block diagram drives the last adder (SM_3) from the same
  lines as the second subtractor and routes the outputs of SM_1 and SM_3
  back to the sequencer. Here SM_3 adds the SM_1 result to x_{i-1}, as the
  filter formula requires, and takes the SM_1 digits directly so that it
  runs on-line one cycle behind SM_1. This gives five levels and five level
  resets where the original diagram shows four.
- The output is not emitted on-line: the last block's digits are collected,
  rounded to N digits and sent during the next frame, so that the same
  N-digit value can be fed back as y_{i-1} and y_{i-2}.
- The cycle counts reported in the article for its own implementation were
  not reproduced; this design's counts are N + 5p + 8 clocks per sample as
  given above.
- The bit-parallel version the article compares against is not included.
