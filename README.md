# PRBS-7: a differential 2^7−1 pseudo-random bit sequence generator

An on-chip pattern source for testing a high-speed serial transmitter. Instead of an external
pattern generator, a seven-stage linear feedback shift register (LFSR) produces a
pseudo-random bit stream, one bit per clock, on a differential pair (OUT+/OUT−). The stream
repeats every 127 bits and looks random enough to exercise a serial link and produce a useful eye
diagram. The target circuit runs at 3.4 Gb/s from a 3.4 GHz PLL clock, built from current-mode
logic (CML) gates and sense-amplifier flip-flops in a 0.18 µm, 1.8 V CMOS process. This RTL
describes the logic of that circuit: the register, its tap, and the two differential cells it is
built from.

## The register and its polynomial

Seven D flip-flops are chained in series and clocked together. The output of flip-flop 3 and the
output of flip-flop 7 go into an XOR gate; the XOR output feeds flip-flop 1. Flip-flop 7 drives
the serial output.

```
        +----------------------- XOR <--------------+-----------+
        |                         ^                 |           |
        v                         |                 |           |
clk -> [FF1] -> [FF2] -> [FF3] ---+-> [FF4] -> [FF5] -> [FF6] -> [FF7] --> OUT+/OUT-
```

This is the Fibonacci form of the feedback polynomial **P(x) = x^7 + x^3 + 1**. The polynomial
is primitive, so from any non-zero start the register steps through all 2^7 − 1 = 127 non-zero
states before it returns, and the output sequence has period 127. Each period holds 64 ones and
63 zeros. Written on the output bits, the recurrence is

    s(k) = s(k−3) xor s(k−7)

which is the simplest way to check a captured stream: any 7 consecutive correct bits predict all
the following ones.

With the default all-ones seed, the first period after reset is

```
1111111000111011000101001011111010101000010110111100111001010110
011000001101101011101000110010001000000100100110100111101110000
```

(the first seven bits are the seed, read from flip-flop 7 back to flip-flop 1).

The all-zero state is the one state the register can never leave: XOR of two zeros is zero.
The circuit as described has no reset, so its start state is whatever it powers up in. This RTL adds
an asynchronous, active-low reset that loads a non-zero seed, which is this design's own choice;
an elaboration check rejects an all-zero `SEED`, and an assertion flags the register if it ever
reaches zero.

## Differential signals

Every signal between the cells is a complementary pair, carried as the packed struct
`prbs_pkg::diff_t` with fields `p` (the + rail) and `n` (the − rail). In a valid level the two
rails differ and the value is the `p` rail. Keeping both rails in the RTL lets the flip-flop
model react to the one situation the pairs make possible that a single wire does not: both rails
at the same level.

## The cells

**`saff_dff`, sense-amplifier flip-flop.** The silicon flip-flop is a two-stage cell. A clocked
sense amplifier compares DIN+ with DIN− at the rising clock edge and pulls one of two outputs,
set (S) or reset (R), active; an S/R latch then holds DOUT+/DOUT− until the next edge. The
latch is what gives the cell its speed and drive. The model follows the same split: the rising
edge either sets the stored bit (DIN+ high, DIN− low), resets it (the opposite), or, when both
rails are equal and the sense stage drives neither S nor R, leaves it alone. That hold behaviour
is this design's reading of an S/R output latch. The output is always a complementary pair. A
`RESET_VAL` parameter gives each flip-flop its own reset value, which is how `prbs7_gen`
distributes the seed.

**`cml_xor`, current-mode XOR.** In silicon, two differential pairs on the A inputs are steered
by a differential pair on the B inputs, over a current-source tail, into resistive loads. At the
logic level it is Y = A xor B with a complementary output. The model resolves each input pair by
its + rail; it does not model a pair with equal rails, which a CML gate would resolve by analog
imbalance.

Neither model includes delay, voltage swing or power.

## Interface of the top, `prbs7_gen`

| port    | dir | type                | meaning                                                    |
|---------|-----|---------------------|------------------------------------------------------------|
| `clk`   | in  | `logic`             | bit clock; one output bit per rising edge                  |
| `rst_n` | in  | `logic`             | asynchronous active-low reset, loads `SEED`                |
| `out`   | out | `prbs_pkg::diff_t`  | serial output OUT+/OUT− (`out.p`, `out.n`), from flip-flop 7 |
| `state` | out | `logic [LFSR_LEN-1:0]` | flip-flop outputs, `state[0]` = flip-flop 1 (added for observation) |

| parameter  | default | meaning                                             |
|------------|---------|-----------------------------------------------------|
| `LFSR_LEN` | 7       | number of flip-flops                                |
| `TAP`      | 3       | flip-flop whose output joins the last one at the XOR |
| `SEED`     | all ones | register contents loaded by reset (must be non-zero) |

Timing: while `rst_n` is low the register holds `SEED` and `out` shows `SEED[LFSR_LEN-1]`. After
release, the register shifts on every rising edge; the output returns to its reset state after
exactly 2^LFSR_LEN − 1 clocks when the polynomial is primitive. Changing `LFSR_LEN` and `TAP`
gives other Fibonacci LFSRs with two-input feedback; only the default pair (7, 3) is the
circuit described here, and a maximal-length sequence needs a primitive x^LFSR_LEN + x^TAP + 1.

The clock source (a PLL in the target circuit) and the transmitter that receives the stream
are outside this RTL: the clock comes in on `clk`, the stream leaves on `out`.

## What the RTL does not capture

- The 3.4 Gb/s rate. The RTL produces one bit per clock; the rate is the clock rate. The target
  reaches 3.4 GHz with custom CML gates and sense-amplifier flip-flops; what clock a synthesized
  version reaches depends on the cell library.
- Output swing (rail to rail at 1.8 V), jitter (about 2.75 ps at 3.4 Gb/s) and power (about
  21 mW for the generator, a few µW per flip-flop): properties of the transistor circuit.
- The reset and the `state` output are additions; the target circuit has neither.

## Files

- `rtl/prbs_pkg.sv`: `diff_t`, the default length and tap, helper functions.
- `rtl/cml_xor.sv`, `rtl/saff_dff.sv`: the two cells.
- `rtl/prbs7_gen.sv`: the register (top).
- `tb/tb_cml_xor.sv`: exhaustive and random truth-table check of the XOR, both rails.
- `tb/tb_saff_dff.sv`: asynchronous reset to both reset values, capture only at the rising
  edge, hold on an equal-rail input, complementary output.
- `tb/tb_prbs7_gen.sv`: end-to-end test at the default parameters. From reset it checks the
  seed, the first seven bits, the recurrence s(k) = s(k−3) xor s(k−7) over four periods, the
  period of exactly 127 with 127 distinct states, 64 ones per period, the shift from stage to
  stage and complementary rails. It then resets again in mid-run and repeats. It also counts
  resets, wrap-arounds to the seed and ones fed back through the XOR, and fails if any of them
  never happened.

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`; each has a
watchdog.

## Simulating

With Verilator 5 (the package must come first):

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb \
    rtl/prbs_pkg.sv rtl/cml_xor.sv rtl/saff_dff.sv rtl/prbs7_gen.sv tb/tb_prbs7_gen.sv \
    --top-module tb_prbs7_gen -o sim
./obj_dir/sim
```

Replace the testbench and `--top-module` to run the cell tests. Each run takes well under a
second. Lint with `verilator --lint-only -Wall`; the remaining warnings are unused `n` rails in
`cml_xor` (see above), unused package constants, and `rst_n` used both as the asynchronous
reset and as the disable of the top's assertions.
