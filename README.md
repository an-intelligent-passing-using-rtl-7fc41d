# Fully reused FM0 / Manchester encoder

DSRC (dedicated short-range communication, used for vehicle-to-vehicle and
vehicle-to-roadside links such as electronic toll collection) line-codes its
downlink with FM0 or Manchester. Both codes keep the line DC-balanced: every
data bit turns into two half-bit symbols, and the line changes level often
enough that it has no DC drift. A transmitter that supports both codes usually
has an FM0 encoder and a Manchester encoder side by side, plus a multiplexer.
Whichever code is active, the other encoder's logic sits idle.

This encoder builds both codes from one small circuit in which every part works
in both modes: one flip-flop, one XOR, one mode multiplexer, one inverter and
one multiplexer selected by the bit clock. After synthesis that is five cells
and one flip-flop bit.

## The two codes

Each bit X is sent during one period of the bit clock CLK. The first half-bit
(A) goes out while CLK is high and the second (B) while CLK is low.

**Manchester** is simply `X xor CLK`: the first half is `~X` and the second half
is `X`. There is always a transition in mid-bit.

**FM0** has memory:

1. there is a transition at every bit boundary: `A(t) = ~B(t-1)`;
2. for X = 0 there is a transition in mid-bit: `B(t) = ~A(t)`;
3. for X = 1 there is none: `B(t) = A(t)`.

Rules 2 and 3 together give `B(t) = A(t) xnor X`. Substituting rule 1 gives
the form the hardware uses:

    A(t) = ~B(t-1)
    B(t) =  B(t-1) xor X

So FM0 needs one bit of state, B(t-1), and one XOR.

Example, starting from B = 0:

| X      | 1  | 0  | 1  | 1  | 0  |
|--------|----|----|----|----|----|
| FM0 AB | 11 | 01 | 00 | 11 | 01 |

Manchester of 1, 0 is `01 10`.

## How one circuit makes both codes

```
xor_o     = DFFB ^ X                     the one XOR
DFFB     <= xor_o   at each rising CLK   cleared to 0 while CLR is high
first_leg = Mode ? xor_o : DFFB          the Mode multiplexer
enc_o     = CLK ? ~first_leg : xor_o     inverter and CLK multiplexer
```

| part            | FM0 (Mode = 0)                         | Manchester (Mode = 1)           |
|-----------------|----------------------------------------|---------------------------------|
| DFFB            | holds B(t-1)                           | held at 0 by CLR                |
| XOR (DFFB, X)   | B(t) = B(t-1) xor X; next DFFB content | 0 xor X = X                     |
| Mode mux, INV   | ~DFFB = A(t)                           | ~XOR = ~X                       |
| CLK mux         | A(t) while high, B(t) while low        | ~X while high, X while low      |

The trick is that clearing the state register turns the FM0 XOR into a
pass-through for X. From then on the FM0 datapath produces `X xor CLK`.
FM0's "A = inverse of the previous B" and Manchester's "first half = inverse
of X" then share the same inverter, and the CLK multiplexer that interleaves A
and B also interleaves ~X and X.

## Control: Mode and CLR

* `mode_i` = 0 selects FM0 and 1 selects Manchester (values in `sols_pkg::mode_e`).
* `clr_i` clears DFFB asynchronously. It serves two purposes. It initialises the
  encoder before FM0 traffic, so the first FM0 bit starts with a high half. It
  must also be held high for as long as Manchester is selected.

Mode and CLR are separate inputs on purpose. Deriving CLR as the inverse of
Mode would leave no way to initialise the register while in FM0 mode. Whatever
controls the transmitter drives both signals. An assertion in `sols_encoder`
flags any rising CLK edge at which Manchester is selected while CLR is low.

Switching modes is clean. Going to Manchester, raise CLR together with Mode.
Going back to FM0, lower both together: FM0 then restarts from B = 0. CLR can
also be pulsed for one CLK period in the middle of FM0 traffic. That period
carries no data bit, and the next bit starts from B = 0.

## Timing

* A bit period begins at a rising edge of CLK.
* X, Mode and CLR should change shortly after that rising edge and stay stable
  until the next one.
* At the rising edge that ends bit t, DFFB loads B(t).
* `enc_o` depends combinationally on X, CLK and DFFB. The bit applied during
  a CLK period goes out in that same period, so latency is zero and throughput
  is one bit per CLK cycle.
* `b_state_o` brings out the content of DFFB, which is B(t-1) during bit t.

CLK is both the flip-flop clock and the select of the output multiplexer.
That is inherent to this architecture. In a physical implementation, the
output multiplexer needs balanced CLK paths so that the line signal does not
glitch at the half-bit points.

## What the design is based on and what it chooses itself

Taken from the architecture this encoder implements:

* the FM0 rules and Manchester as the XOR of CLK and X;
* Mode = 0 for FM0 and Mode = 1 for Manchester;
* a single XOR shared between the FM0 state update and Manchester;
* the register DFFB, cleared by CLR for Manchester and for initialisation;
* Mode and CLR as two independent control inputs.

Own choices, where the source architecture is not specific:

* **Only one flip-flop.** The FM0 state code (A, B) has two bits, but A(t)
  always equals ~B(t-1). So the A half comes from an inverter on DFFB rather
  than from a second flip-flop. Here this stands in for the source's
  "area-compact retiming", whose exact circuit is not available.
* **Where the mode multiplexer sits.** It selects the first-half leg.
* **Asynchronous, active-high CLR.**
* **Bit timing.** The period starts at the rising edge, the output is
  combinational, and there is no registered output stage.
* **The assertion** tying Manchester mode to CLR.

Not included: the rest of the DSRC transceiver (microprocessor, modulation,
error correction, clock synchronisation, RF front end and receive path). They
are outside the encoder, and no circuit for them is given.

The source reports maximum clock rates of 2 GHz (Manchester) and 900 MHz (FM0)
in a 0.18 µm CMOS process, from a transistor-level implementation. RTL does not
fix these figures; they depend on the cell library and the layout. Because the
design sends one bit per cycle, the DSRC downlink rates (tens of Mbit/s at
most) need only a modest clock.

## Files

* `rtl/sols_pkg.sv`: the `mode_e` type.
* `rtl/sols_encoder.sv`: the encoder. It has no parameters.
* `tb/tb_sols_encoder.sv`: a self-checking testbench.

## Verification

`tb_sols_encoder` runs a 10 ns CLK and samples `enc_o` 3 ns into each half-bit.
It first checks the hand-worked vectors above. It then sends 400 random bits in
runs of random mode, with random one-period CLR pulses during FM0.

Every bit is checked in three independent ways:

* against a reference model of both codes;
* against the coding rules: for FM0, a boundary transition on every bit and a
  mid-bit transition exactly when X = 0; for Manchester, a mid-bit transition
  on every bit;
* by decoding the bit back to X.

The testbench also checks that DFFB holds the expected state, and that N
periods take exactly N CLK cycles. It counts FM0 bits with and without a
mid-bit transition, Manchester bits, switches in each direction and CLR
initialisations. Any of these that never happened counts as a failure. The
last line it prints is `TB_RESULT checks=<n> failures=<n>`.

Run it with:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
    rtl/sols_pkg.sv tb/tb_sols_encoder.sv --top-module tb_sols_encoder
./obj_dir/Vtb_sols_encoder
```

Lint:

```
verilator --lint-only -Wall -Wno-fatal -y rtl rtl/sols_pkg.sv rtl/sols_encoder.sv
```

This reports one SYNCASYNCNET warning. CLR is used both as the asynchronous
clear and inside the clocked assertion, which only simulation evaluates.
