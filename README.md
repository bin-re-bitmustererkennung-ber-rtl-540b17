# Serial detector for the bit code 10110

A single finite-state machine watches a serial bit stream, one bit per
clock, and recognises the five-bit code **10110** in it. Besides the usual
"found it" flag it reports progress: a 3-bit output tells at every moment
how many leading bits of the code the most recent input bits match (0 to 5).
Two reset inputs, a power-on reset and a reset button, both return it to
its home state.

The whole design is one module, `pattern_detect_fsm`, plus a package of
shared types.

## States and what they mean

The state *is* the progress count. Six states are needed, one for each
number of matched bits:

| state | bits matched | `yet_right_out` | `pattern_detect_out` |
|-------|--------------|-----------------|----------------------|
| S0 (home) | –        | 000 | 0 |
| S1    | 1            | 001 | 0 |
| S2    | 10           | 010 | 0 |
| S3    | 101          | 011 | 0 |
| S4    | 1011         | 100 | 0 |
| S5    | 10110        | 101 | 1 |

The state encoding is chosen equal to the count, so the progress output is
the state register itself (delayed, see below) and no decoder is needed.

## Transitions, and where they depart from a textbook detector

| state | next on 0 | next on 1 |
|-------|-----------|-----------|
| S0    | S0        | S1        |
| S1    | S2        | S1        |
| S2    | S0        | S3        |
| S3    | S2        | S4        |
| S4    | S5        | **S0**    |
| S5    | S0        | S3        |

On a mismatch the machine does not simply go home: it falls back to the
longest part of the code that the recent bits still match. For example
"101" followed by 0 gives "1010", whose tail "10" is the start of the code,
so S3 goes to S2. Detections may overlap. After a complete 10110 a further
1 leaves "101" matched (S5 → S3), so `10110110` holds two codes and both
are reported.

The one exception is **S4 on 1**. After "1011" a further 1 could start a new
code, and a strict overlapping detector would go to S1. This machine's state
diagram sends it home to S0 instead, and the RTL keeps that rule. The
consequence is that in `1011 10110` (with no gap, i.e. `101110110`) the
code starting at the fifth bit is **not** reported. A user who needs every
occurrence should change the `S4` line of the next-state `case` to
`serial_in ? S1 : S5`. The testbench's reference model encodes the
exception in one clearly marked line, so it would need the same edit.

## Timing

Everything happens on the **falling** edge of `clk_in`. On each falling edge:

1. the state advances according to `serial_in` (sampled at that edge), and
2. the two outputs are loaded with the state *being left*:
   `yet_right_out` gets its number and `pattern_detect_out` gets 1 if it was S5.

So the outputs are registered and lag the state by one clock. If the last
bit of the code is sampled at falling edge *k*, the state becomes S5 at edge
*k*, and `pattern_detect_out` is 1 from edge *k+1* to edge *k+2*: one full
clock period, one period after the completing bit. The progress count shows
the same delay: after the edge that samples the first 1 of the code it still
reads 0, and it reads 1 from the next edge. Drive `serial_in` so that it is
stable around the falling edge, for example by changing it on the rising
edge.

The registered outputs are glitch-free and add no logic after the flops.
To get outputs without the one-clock delay, decode them from `state`
combinationally instead.

## Reset

`por_in` and `reset_in` are both active high and **synchronous**. If either
is 1 at a falling edge, the state goes to S0 and both outputs are cleared on
that same edge. The two inputs behave identically inside the module. Their
separate pins let a board tie a power-on pulse to one and a push-button to
the other without external gating. Keep a power-on reset high for at least
one falling edge, because the state register has no defined value before
that.

The unused state codes 110 and 111 can only appear through an upset. If they
do, the machine returns to S0 on the next edge.

## Interface

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk_in` | in | 1 | clock, falling edge active |
| `serial_in` | in | 1 | serial data, one bit per clock |
| `reset_in` | in | 1 | reset (button), synchronous, active high |
| `por_in` | in | 1 | power-on reset, synchronous, active high |
| `yet_right_out` | out | 3 | code bits matched so far, state of the previous period |
| `pattern_detect_out` | out | 1 | 1 for one period after a complete code |

The code, the six states and the 3-bit width are fixed. The module has no
parameters. In synthesis it is 3 state flip-flops, 4 output flip-flops and a
few gates.

## Files

- `rtl/pattern_pkg.sv`: the state type `state_t` (S0..S5, encoded as 0..5)
  and the output width.
- `rtl/pattern_detect_fsm.sv`: the detector.
- `tb/pattern_detect_fsm_tb.sv`: a randomized, self-checking test against a
  reference model (see below).
- `tb/pattern_doc_stream_tb.sv`: a fixed 31-bit stream with the state
  expected after each bit, followed by a button reset and a power-on reset.

## Verification

`pattern_detect_fsm_tb` has a reference model that does not use the design's
transition table. After each bit it computes the longest prefix of 10110 that
ends the string "matched prefix + new bit". The S4-on-1 rule is the one hand
coded exception. The model also reproduces the one-clock output delay, so
every output is compared at every edge. The test runs in three parts:

- directed sequences: an overlapping double code, the `101110110` case and a
  reset in the middle of a partial match;
- about 4,000 clocks of random bits, biased toward the code;
- random power-on and button resets.

It counts each of the twelve transitions, resets from a busy state of both
kinds, overlapping detections and the S4-on-1 return. Any of these that
never happened counts as a failure.

`pattern_doc_stream_tb` checks a hand-written list of the expected state
after each of 31 bits. The stream holds four codes, two of them overlapping.
The test also checks that each reset clears the outputs on its own edge and
suppresses a code that was one bit from completion.

Both testbenches end with a line `TB_RESULT checks=N failures=M` and have
a watchdog.

## Simulating

```
verilator --binary --timing --assert -Irtl \
    rtl/pattern_pkg.sv rtl/pattern_detect_fsm.sv tb/pattern_detect_fsm_tb.sv \
    --top-module pattern_detect_fsm_tb -o sim
./obj_dir/sim
```

Use `tb/pattern_doc_stream_tb.sv` and `--top-module pattern_doc_stream_tb`
for the fixed stream. Both finish in well under a second.

## Choices made in this RTL

The transitions, the output values per state, the falling clock edge, the
registered outputs and the "either input resets" behaviour follow the
original description of the detector. Its informal notes could be read as
requiring *both* reset inputs to be high. The logic it describes resets on
either one, and that is what is built. The following are this
implementation's own choices:

- The outputs are cleared on reset. In the original description they keep
  their old value until the first clock after reset.
- Unused state codes recover to S0.
- The package-based `enum` state type and the choice to make the encoding
  equal to the count.
