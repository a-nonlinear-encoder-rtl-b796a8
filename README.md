# Nonlinear time-base encoder with a sinusoidal reference

A time-base encoder turns an analog voltage into a number by timing how long a
rising reference takes to reach it. Usually the reference is a ramp or an
exponential, and a linear counter counts clock pulses until the comparator
trips. This encoder uses a **sine wave** instead. A sine is cheap to generate,
strictly periodic and free of the switching transients of a reset ramp. The
price is that equal time steps no longer mean equal voltage steps. So the
counter is **nonlinear**: its states are chosen so that after k clock pulses it
holds the voltage the sine has reached at the k-th pulse. When the comparator
sees the reference pass the input, the pulses to the counter are cut off and
the counter already holds the answer. No sample-and-hold and no arithmetic are
needed.

This repository holds synthesizable SystemVerilog for the digital half of the
encoder: the inhibit gate, the counter (in its nonlinear form and in a
two-unit linear-plus-conversion form), the time delay and the
read-and-storage register. It also holds self-checking testbenches and a
behavioural model of the analog half.

## One conversion, step by step

```
 sine source ──► clip & shape ──A──►┐
      │                             │
      └──────► comparator ──B──────►│ inhibit  f = A·~B·C ──► counter ──► read & storage ──► code, sign
   input V ──► (sign switch)  │     │                            ▲            ▲
                              │  clock ──C──►┘                   └── clear ───┤
                              └──────────────► time delay ────────── store ───┘
```

1. **Positive-going zero crossing.** A (the reference clipped to a square
   wave) goes high. The comparator B was reset in the previous negative
   half-cycle, so clock pulses C reach the counter as `f`.
2. **Counting.** Each pulse moves the counter one step along the sine.
3. **Trip.** Once the reference exceeds the input magnitude, the comparator
   goes high and `f` stops. The counter freezes on the last level the sine
   reached *below* the input.
4. **Store and clear.** A fixed delay later, the read-and-storage register
   captures the code and the sign bit, raises `valid` for one cycle and clears
   the counter.
5. **Dead time.** The comparator stays high until the negative half of the
   reference resets it, and A is low throughout that half. So nothing is
   counted until the next positive zero crossing. The encoder produces one
   word per reference cycle.

The comparator only handles one polarity. An input sign switch in the analog
front end flips negative inputs and reports the flip on `sign_in`. That bit is
stored with the code, so 4 bits plus sign cover −7.5 V to +7.5 V.

## The count sequence

The reference is 10 V in amplitude. There are 60 clock pulses per reference
cycle, so there is one pulse every 6°, and the k-th pulse falls at (6k−3)°. The code is
a 4-bit binary number with a 0.5 V LSB. After k pulses it holds
`min(15, round(20·sin((6k−3)°)))`:

| pulses k | angle | reference (V) | code ABCD | decoded (V) |
|---:|---:|---:|:---:|---:|
| 0 | –   | 0.000  | 0000 | 0.0 |
| 1 | 3°  | 0.5234 | 0001 | 0.5 |
| 2 | 9°  | 1.5643 | 0011 | 1.5 |
| 3 | 15° | 2.5882 | 0101 | 2.5 |
| 4 | 21° | 3.5837 | 0111 | 3.5 |
| 5 | 27° | 4.5399 | 1001 | 4.5 |
| 6 | 33° | 5.4464 | 1011 | 5.5 |
| 7 | 39° | 6.2932 | 1101 | 6.5 |
| 8 | 45° | 7.0711 | 1110 | 7.0 |
| 9 | 51° | 7.7715 | 1111 | 7.5 (full scale) |

The next pulse takes 1111 back to 0000. The amplitude is well above full scale
so that the flat top of the sine is never used, because the comparator would
need far more sensitivity there.

`rtl/nonlinear_counter.sv` implements this with four flip-flops and these
next-state equations (A = MSB):

```
A' = A ^ (B & C & D)
B' = B ^ (C & D)
C' = C ? (A & B & ~D) : D
D' = D ? (~A | ~B) : ((A & B & C) | (~A & ~B & ~C))
```

The D equation is the original's. The A, B and C equations are simplified
forms derived here from the same sequence. The six unused codes are
don't-cares. From 0100 and 0110 the counter would hold. That cannot last,
because reset and every store clear the counter to 0000. An assertion flags
any state outside the sequence.

**Accuracy.** Each stored level is within one LSB of the true sine at its
pulse. But the input can fall anywhere between two pulses. Near zero the sine
rises about 1 V per pulse, so the error there can exceed one LSB. Near full
scale the steps are smaller. The error is known in advance and can be reduced
by using more bits.

## Two-unit counter (`LINEAR_COUNT = 1`)

At higher precision the logic of a nonlinear counter becomes hard to design.
The alternative is a plain binary counter (`linear_counter`, counting modulo
10) followed by a combinational conversion unit (`code_converter`) that maps
the pulse count to the table above. Both forms give identical codes at
identical times. The end-to-end testbench runs them side by side and compares
every cycle. The nonlinear counter is the default.

## Top-level interface: `nonlinear_encoder`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | system clock; asynchronous active-low reset |
| `ref_square` | in | 1 | A: high while the reference is positive (asynchronous) |
| `cmp_out` | in | 1 | B: comparator output (asynchronous) |
| `clock_pulse` | in | 1 | C: one-`clk`-cycle strobe per clock pulse |
| `sign_in` | in | 1 | 1 = input was negated by the sign switch; hold it steady during a conversion |
| `count_pulse` | out | 1 | f, the inhibited clock pulse |
| `count` | out | 4 | live counter contents |
| `code_out`, `sign_out` | out | 4, 1 | stored word (LSB = 0.5 V) and sign |
| `valid` | out | 1 | one-cycle pulse when a new word is stored |

| parameter | default | meaning |
|---|---|---|
| `SYNC_STAGES` | 2 | flip-flops synchronising A and B to `clk` |
| `DELAY` | 4 | clk cycles from the synchronised trip to the store strobe |
| `LINEAR_COUNT` | 0 | 0 = nonlinear counter, 1 = linear counter + conversion unit |

**Timing.** Suppose `cmp_out` rises in cycle n. Then no pulse is counted from
cycle n+`SYNC_STAGES` on. The store strobe fires in cycle
n+`SYNC_STAGES`+`DELAY`. `valid`, `code_out` and `sign_out` appear in cycle
n+`SYNC_STAGES`+`DELAY`+1 (n+7 at the defaults), with the counter already at
0. A pulse is counted in the cycle its strobe is high if the synchronised A is
high and the synchronised B is low. So a comparator trip less than
`SYNC_STAGES` cycles before a pulse still lets that pulse through. Make the
pulse period long against that.

## How this RTL departs from the original circuit

- **Synchronous clocking.** The original clocks the counter directly with the
  gated pulse train. Here everything runs on one `clk`, and the clock pulses
  and `f` are one-cycle enables.
- **Synchronisers** on A and B are an addition, because both come from analog
  circuits.
- **Time delay.** The original uses an analog delay of unstated length. Here
  it is a rising-edge detector and a `DELAY`-stage shift register. Each trip
  yields exactly one store.
- **Output handshake.** The `valid` pulse and holding the word until the next
  store are this design's own choices.
- **Out-of-range inputs.** Inputs between 7.77 V and 8.39 V store 1111.
  Larger inputs let the counter wrap, as the sequence prescribes. An input
  above the reference amplitude never trips the comparator, so that cycle
  stores nothing and the counter is not cleared. The original does not say
  what should happen.
- **Precision** is fixed at the 4-bit, 10-level sequence above. No larger
  sequence is defined, and the two-unit form is the route to more bits.
- **The analog parts are not RTL.** These are the sine source, clip-and-shape,
  the tunnel-diode comparator, the clock oscillator and the input sign switch.
  `tb/analog_front_end_model.sv` models them behaviourally, using `real`
  arithmetic, for simulation only.

## Files

| file | contents |
|---|---|
| `rtl/encoder_pkg.sv` | code width, number of levels, types, the level table as a function |
| `rtl/nonlinear_counter.sv` | four-flip-flop sinusoidal counter |
| `rtl/inhibit_circuit.sv` | synchronisers and the gate f = A·~B·C |
| `rtl/time_delay.sv` | trip-to-store delay |
| `rtl/read_store.sv` | output register, sign bit, counter clear |
| `rtl/linear_counter.sv`, `rtl/code_converter.sv` | two-unit counter |
| `rtl/nonlinear_encoder.sv` | top level |
| `tb/analog_front_end_model.sv` | behavioural sine, comparator, clip, sign switch, clock pulses |
| `tb/tb_<block>.sv` | one self-checking testbench per block |
| `tb/tb_nonlinear_encoder.sv` | end to end: 60 constant and 20 moving inputs, both counter forms compared |
| `tb/tb_encoder_full_size.sv` | end to end, one encoder with no parameter overrides |
| `tb/tb_fast_clock_inhibit.sv` | 400 Hz reference against 1 MHz clock pulses: gating only |

## Simulating

Verilator 5 is all that is needed. From the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/encoder_pkg.sv tb/tb_nonlinear_encoder.sv --top-module tb_nonlinear_encoder
./obj_dir/Vtb_nonlinear_encoder
```

Replace the testbench name to run any other testbench. Each one prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. Each also has a
watchdog that counts a failure if the run hangs. The end-to-end testbenches
work out every expected code from the sine itself: they count the pulses
before the first one at which 10·sin((6k−3)°) reaches the input. They skip
inputs whose trip lands within about one degree of a pulse, where synchroniser
latency decides. They also check the trip-to-store latency, the clear, and one
word per cycle. They count how often the comparator and the negative half
blocked pulses, and how many negative, zero and full-scale words were stored.
`tb_nonlinear_encoder` then feeds inputs that keep moving during the count.
Nothing holds the input, so the expected code is the level reached at the
instant the reference first passes the moving input.

To change the design: the sequence lives in `encoder_pkg::level_code`, which
drives the conversion unit, and in the equations of `nonlinear_counter`. The
two must agree, and the end-to-end testbench checks that they do.
