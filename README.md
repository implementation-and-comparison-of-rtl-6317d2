# 64-bit non-restoring division, two ways

Non-restoring division finds an unsigned quotient and remainder with nothing
more than shifts and one adder/subtractor. Unlike restoring (pencil-and-paper)
division it never undoes a subtraction that went negative: a negative partial
remainder is simply carried into the next step, where the divisor is *added*
instead of subtracted. Each quotient bit therefore costs exactly one decision
(the sign of the partial remainder) and one add or subtract.

This RTL implements the algorithm twice for 64-bit unsigned operands, so that
the two forms can be compared:

| Module        | Form                                               | Result timing                    |
|---------------|----------------------------------------------------|----------------------------------|
| `nrd_div_m1`  | Method 1: unrolled array, one add/sub row per bit  | combinational, 65 adders deep    |
| `nrd_div_m2`  | Method 2: A/Q/M registers, one bit per clock       | 65 clocks from `start` to `done` |
| `nrd_top`     | both side by side on shared operands               |                                  |

Supporting files: `nrd_addsub` (the controlled adder/subtractor both use) and
`nrd_pkg` (operand width and the Method 2 state type).

## The recurrence

Let `N` be the dividend, `D` the divisor, `W` the width (64). The partial
remainder `R` is `W+1` bits, the extra bit being its sign, and starts at 0.
For each dividend bit from the most significant down:

1. shift: `R' = 2R + next dividend bit` ("bring down" the bit);
2. if `R >= 0` (sign of `R` *before* the shift) then `R = R' - D`, else `R = R' + D`;
3. the quotient bit is 1 if the new `R >= 0`, 0 otherwise.

The first step always subtracts, since `R` starts at 0. After `W` steps the
quotient bits are the ordinary binary quotient. The remainder may be
negative, in which case `D` is added once more (the final correction), giving
`0 <= remainder < D`.

Why no restoring is needed: if a subtraction made `R` negative, restoring
would add `D` back and subtract `2D` after the next shift; non-restoring does
the net `+D` in one step. That is also the sense in which the quotient uses
digits {-1, +1} rather than {0, 1}: each step either subtracts (+1) or adds
(-1). Storing "new R not negative" as the quotient bit turns that signed-digit
quotient straight into plain binary, so no conversion logic is needed.

Why `W+1` bits suffice: after each step `-D <= R < D`, so `R` fits in `W+1`
signed bits. The shifted value `2R + b` may briefly overflow, but the
add/subtract that follows brings the result back into range, and
two's-complement arithmetic modulo `2^(W+1)` gives the right answer.

## Method 1: `nrd_div_m1`

This is the recurrence unrolled in space: 64 identical rows, each an
`nrd_addsub` whose `sub` input is the inverted sign of the previous row's
remainder. One more adder does the final correction. There is no clock and no
handshake. Outputs settle one chain of 65 adder delays after the operands
change. It costs a lot of logic and switching activity, which is consistent
with this form drawing much more power than Method 2 when compared.

## Method 2: `nrd_div_m2`

This is the same recurrence unrolled in time, over three registers:

* `A` (65 bits): partial remainder, cleared to 0 at start; its sign bit
  chooses the operation;
* `Q` (64 bits): loaded with the dividend. It shifts left together with `A`.
  The dividend bits leave its top into `A` and quotient bits enter at its
  bottom, so at the end it holds the quotient;
* `M` (64 bits): the divisor.

One `nrd_addsub` is shared. In a RUN cycle it computes `{A,Q}<<1 -/+ M`. In
the single FIX cycle it computes `A + (A<0 ? M : 0)`.

Handshake and timing:

* `start` is sampled on a rising edge while `busy` is low. `dividend` and
  `divisor` are captured on that edge.
* The 64 RUN steps use the next 64 edges and FIX uses one more. `done` pulses
  high for one cycle right after edge 65, counting the start edge as edge 0.
* `busy` is high from the start edge until `done`.
* A `start` raised while `busy` is high is ignored.
* `quotient` and `remainder` stay valid after `done` until the next start.
* `rst_n` is asynchronous and active low.

Two concurrent assertions check the controller. `done` must follow a FIX
cycle, and FIX must follow exactly 64 RUN steps.

## Choices made in this implementation

The algorithm steps, the A/Q/M register set, the sign-driven add/subtract, the
shared add/subtract unit and the 64-bit unsigned operands follow the
published design. These points are this implementation's own:

* Method 1 is a fully combinational array. The source describes it only as a
  step sequence, and the array is one reading of it.
* Both methods finish with an explicit remainder correction, so the remainder
  is always in `[0, D)`.
* The Method 2 interface (`start`/`busy`/`done`), its reset and the extra
  correction cycle are choices of this implementation.
* Division by zero is not trapped. The recurrence then returns an all-ones
  quotient and the dividend as the remainder, in both methods.
* Operands are unsigned only.
* Power is not modelled. The higher power of Method 1 against Method 2 comes
  from gate-level analysis and cannot be reproduced in RTL simulation.

## Verification

Each testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. Each also has a watchdog.

* `tb_nrd_addsub`: random and corner 65-bit operands for both modes, checked
  against `+` and `-`.
* `tb_nrd_div_m1` and `tb_nrd_div_m2`: the worked examples 87/5 = 17 r 2,
  305419896/1 = 305419896 r 0 and 59/20 = 2 r 19. Also corner cases (zero
  dividend, dividend below divisor, all-ones, divisor 2^63, divisor 0) and
  thousands of random pairs with random divisor length. Results are checked
  against `/` and `%`.
* `tb_nrd_div_m2` also checks:
  * the 65-cycle latency;
  * `busy` and the one-cycle `done` pulse;
  * that results are held after `done`;
  * that a `start` while busy is ignored.
* `tb_nrd_top`: the whole design at its default 64-bit size. It checks both
  methods against the reference and against each other, and checks the
  Method 2 latency. It counts subtract steps, add steps, divisions with and
  without the final correction, and division by zero, and fails if any of
  them never happened.

Running one testbench with Verilator:

```sh
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/nrd_pkg.sv tb/tb_nrd_top.sv --top-module tb_nrd_top -o sim
./obj_dir/sim
```

Change the operand width with the `WIDTH` parameter of any module. Its default
comes from `nrd_pkg::NRD_WIDTH`. Every block works for any `WIDTH >= 2`.
