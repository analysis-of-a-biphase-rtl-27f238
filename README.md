# Biphase mark link: coder, sampler and decoder

Biphase mark is a line code that carries both data and a clock on a single
wire. Time is cut into *cells*, one per bit. The line level always flips at the
start of a cell. For a `1` it flips a second time partway through the cell, at
the start of the *code subcell*. For a `0` it stays put until the next cell.
The receiver has no shared clock. It waits for the flip that opens a cell,
counts a fixed number of its own clock ticks (the *sampling distance*), and
looks at the line again. If the level is unchanged, the bit is `0`; if it has
changed, the bit is `1`.

Every cell starts with an edge, so the receiver resynchronises on every bit.
Long runs of equal bits therefore cannot make the two clocks drift apart.
What remains is a timing puzzle, and it is the subject of most of this
document:

- the two clocks drift and jitter;
- the line is unreadable for a while after each edge;
- the receiver samples at some unknown instant in its clock cycle.

Given all three, how should the cell be laid out so that no bit is ever
misread?

This repository contains:

- synthesizable RTL for the encoder (`bmp_coder`), the line sampler
  (`bmp_sampler`) and the decoder (`bmp_decoder`);
- a package with the timing arithmetic (`bmp_pkg`);
- behavioural models of the two oscillators and the line (`bmp_clock_model`,
  `bmp_wire_model`);
- a top level (`bmp_system`) that wires all of them into a complete link;
- self-checking testbenches.

## Parameters and the three timing constraints

All lengths of the cell are counted in ticks of the local clock:

| parameter    | default | meaning |
|--------------|---------|---------|
| `CELL`       | 16      | ticks per cell (coder side) |
| `MARK`       | 8       | ticks from the cell edge to the mid-cell edge of a `1` (coder side) |
| `SAMPLE`     | 11      | sampling distance, ticks after the detected cell edge (decoder side) |
| `MIN`, `MAX` | 89, 100 | shortest and longest clock period, in ns, for both clocks |
| `EDGELENGTH` | 89      | ns during which the line is unreadable after an edge |

16/8/11 is the cell layout of the Intel 82530 serial controller. The timing
values are a deliberately poor example: each clock may be 11 % off and may
change rate on every cycle. The line needs almost a full clock period to settle.

The link is correct exactly when three strict inequalities hold. Each one rules
out one way of failing:

1. `MARK*MIN > 2*MAX + EDGELENGTH`. The short pulse between a cell edge and the
   mid-cell edge of a `1` must be long enough to be seen. Otherwise a slow
   receiver can sample just before the first edge settles and again just
   after the second one. It then sees no change, misses the cell, and the rest
   of the stream is garbled.
2. `(SAMPLE-1)*MIN > MARK*MAX + EDGELENGTH`. A fast receiver must not sample
   before the mid-cell edge of a slow transmitter has settled. Otherwise it
   reads a `1` as a `0`.
3. `CELL*MIN > (SAMPLE+2)*MAX + EDGELENGTH`. A slow receiver must sample
   before a fast transmitter starts the next cell.

`bmp_pkg` provides these checks as functions: `edge_detected_ok`,
`sample_not_early_ok`, `sample_not_late_ok` and `params_ok`. `bmp_system`
evaluates them at elaboration time and issues a `$warning` if they fail. It
deliberately does not stop, so that broken parameter sets can still be
simulated.

The defaults pass with almost no room on constraint (2):
10·89 = 890 > 8·100 + 89 = 889.

### Choosing a cell

Write ρ = MIN/MAX for clock quality and E = EDGELENGTH/MAX for distortion in
clock periods. The constraints then become:

- `MARK·ρ > 2 + E`
- `(SAMPLE−1)·ρ > MARK + E`
- `CELL·ρ > SAMPLE + 2 + E`

A DC-balanced cell (`CELL = 2·MARK`, so the line is high half the time) makes
the first constraint redundant. The distortion tolerance is largest when the
sampling distance is `sample_opt(MARK)`:

- `(3·MARK−1)/2` for odd `MARK`;
- `(3·MARK−2)/2` for even `MARK`.

To get the fastest link for a given E and ρ, take the smallest `MARK` whose
tolerance exceeds E, then set `CELL = 2·MARK` and `SAMPLE = sample_opt(MARK)`.
The package computes this at elaboration time:

- `e_opt(MARK, ρ)` gives the tolerance bound of a layout;
- `fastest_mark(E, ρ)` picks the smallest `MARK` above it.

For example, E = 1 gives 14/7/10 and E = 5.9 gives 30/15/22, each at
ρ = 0.999.

For a given layout, `rho_min(CELL, MARK, SAMPLE, E)` returns the largest of
the three ratios `(2+E)/MARK`, `(MARK+E)/(SAMPLE−1)` and
`(SAMPLE+2+E)/CELL`. The clock ratio must lie strictly above it.
`e_max(CELL, MARK, SAMPLE, ρ)` returns the smallest of the three margins, and
E must lie strictly below it. Each column of the table below holds the first
value that works, in steps of 0.01 for ρ and 0.001 for E. `bmp_configs_tb`
checks every entry against these two functions.

Common layouts compare as follows:

| cell/mark/sample | smallest ρ (E = 1) | largest E (ρ = 0.999) | remark |
|---|---|---|---|
| 16/8/11  | 0.91 | 1.989 | Intel 82530 layout, the default |
| 32/16/23 | 0.82 | 5.977 | conventional 32-tick layout |
| 18/5/10  | 0.73 | 2.994 | |
| 11/4/7   | 0.91 | 1.988 | smallest cell for E = 1 |
| 14/7/10  | 0.93 | 1.985 | smallest DC-balanced cell, about 14 % faster than 16/8/11 for the same E |

Realistic crystals give ρ ≈ 0.99999, so clock tolerance is rarely the limit;
edge distortion is. All five layouts are plain parameter overrides of the same
RTL.

## The coder (`bmp_coder`)

A tick counter `n` runs from 0 to `CELL-1`. The state machine has three
states: `CODER_START` before the first cell, `CODER_MARK_PH` while a `1`
still owes its mid-cell edge, and `CODER_CODE_PH` for the rest of the cell.

- `get` is high combinationally when the next clock edge opens a cell: the
  first edge after reset, or `n = CELL-1`.
- On that edge the coder takes `in_bit`, flips `v` and clears `n`.
- For a `1` it flips `v` again on the edge where `n = MARK-1`.

As a result:

- cell edges are exactly `CELL` ticks apart;
- the mid-cell edge comes exactly `MARK` ticks after its cell edge;
- `v` is a register output.

The underlying protocol model has five control locations. Two are
zero-time: "fetch the bit" and "emit the edge". Here those happen on the same
clock edge as the tick that leads into them, so three states suffice.

There is no idle state. The protocol assumes a next bit is always available,
so whatever sits on `in_bit` while `get` is high gets sent. Framing, start of
transmission and an idle line are outside this design.

## The receiver (`bmp_sampler` and `bmp_decoder`)

This is the part that needs the most care.

**Sampler.** The line `w` can change at any instant and is garbage for
`EDGELENGTH` after an edge. The decoder must work on a value that cannot
change during a decision. `bmp_sampler` is the register that provides it: it
loads `w` on every decoder clock edge, and the decoder reads that register on
the *next* edge. In timing terms, each cycle samples at its start. The
abstract protocol allows the sample to fall anywhere in the cycle, and the
start is one admissible choice. No synchroniser stages are added. The timing
analysis ignores metastability, and a real implementation would need at
least a second flop on `w`, which moves every decoder timing by one period.

**Decoder.** The decoder keeps `old`, the line level it last accepted. It has
two states:

- `DEC_WAIT_EDGE`: on each tick, compare the sample `new_i` with `old`. A
  difference is the edge that opens a cell. Copy the sample into `old`, clear
  the counter `m` and move to `DEC_COUNT`.
- `DEC_COUNT`: count ticks. On the `SAMPLE`-th tick after the detecting tick,
  decide `out = new_i XOR old`: `0` if the line still matches, `1` if the
  mid-cell edge has happened. On the same tick, copy the sample into `old`,
  raise `put` for one cycle and return to `DEC_WAIT_EDGE`.

Two details are easy to get wrong:

- *Updating `old` at the decision.* For a `1`, the line changed in mid-cell.
  If `old` kept the cell-start level, the decoder would take the mid-cell edge
  for the start of the next cell.
- *Where the count starts.* The decision tick is the `SAMPLE`-th tick after
  the one that saw the edge, not the `SAMPLE`-th tick after the edge itself.
  This is the only convention under which constraint (2) reads
  `(SAMPLE-1)*MIN` and constraint (3) reads `(SAMPLE+2)*MAX`:
  - the detecting tick can come arbitrarily soon after the edge, or up to
    `2*MAX + EDGELENGTH` after it;
  - `SAMPLE` whole cycles then follow;
  - in the fastest case the deciding cycle starts `(SAMPLE-1)*MIN` after the
    edge.

**Extra margin.** Because the sample is taken at the start of the cycle, this
receiver has one clock period more margin on each side than the constraints
assume. The tightest cases for this RTL are:

- `MARK*MIN > MAX + EDGELENGTH` for constraint (1);
- `SAMPLE*MIN > MARK*MAX + EDGELENGTH` for constraint (2);
- `CELL*MIN > (SAMPLE+1)*MAX + EDGELENGTH` for constraint (3).

The published constraints remain the right design rule. They hold for any
sampling instant, including a sampler built differently from this one.

**Timing.** `put` rises on the deciding clock edge. With correct parameters,
each bit is delivered before the coder asks for the next one, so at most one
bit is ever in transit.

## Clocks, line and the top level

`bmp_clock_model` and `bmp_wire_model` are simulation models with `#` delays,
not synthesizable logic. Time unit is 1 ns.

**Clock model.** Each period is drawn afresh from `[MIN, MAX]` with a private
xorshift generator, so runs repeat exactly for a given `SEED`. This gives
drift and jitter. `MODE` 1 runs always fast and `MODE` 2 always slow; these are
the worst-case clocks of the failure scenarios. A tick is a rising edge.

**Line model.** After each edge of `v`, it keeps `unstable` high for
`EDGELENGTH` and then sets `w = v`. Within that window, `w` does one of three
things, chosen per edge or fixed by `MODE`:

- follows `v` at once;
- holds the old level to the end;
- rings with random values.

An edge that arrives while the line is unstable sets the sticky `collision`
flag. Correct parameters never do that. The window is tracked by polling every
1..`max(8, EDGELENGTH/32)` ns. While `rst` is high the line is idle, so the
coder's power-up level is not mistaken for an edge.

**Top level.** `bmp_system` wires the link together:

```
tx clock -> coder -> v -> line -> w -> sampler -> decoder -> put/out
                                         ^            ^
                                   rx clock ----------+
```

Its ports are:

- `rst`, active high and synchronous; it is released for both sides at once;
- `in_bit` and `get`, on the coder side;
- `put` and `out`, on the decoder side;
- the two clocks, `v`, `w` and the line flags, for observation.

Because of the models, `bmp_system` is a simulation top. For hardware, use
`bmp_coder` in the transmitter and `bmp_sampler` followed by `bmp_decoder` in
the receiver, with the parameters chosen by the rules above.

**Assertions.** The link's two safety properties are built into the RTL as
assertions. They are active in simulation with `--assert`.

- In `bmp_system`, present only when the parameters satisfy (1)–(3):
  - no coder edge arrives while the line is still unstable;
  - the coder never asks for a new bit while the previous one is
    undelivered, so at most one bit is ever in flight.
- In the coder and decoder: their counters stay below `CELL` and `SAMPLE`.

A receiver that decides too late trips the in-flight assertion before it
delivers a wrong bit.

Three things are simplified in the design:

- reset values: both line levels start at 0;
- the strobe-style interfaces;
- the models' random distributions.

The protocol analysis leaves all three open.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it shows |
|---|---|
| `bmp_coder_tb` | tick-exact line waveform and `get` timing against a reference encoder, for 16/8 and 14/7 |
| `bmp_sampler_tb` | sample equals the line at the clock edge, is held for the cycle, and has the right reset value |
| `bmp_decoder_tb` | 500 cells of random length and mid-cell position: every bit right, `put` exactly `SAMPLE` ticks after detection |
| `bmp_clock_model_tb` | periods stay within `[MIN, MAX]` and cover the range; worst-case modes are exact |
| `bmp_wire_model_tb` | window length, the three distortion shapes, settling, collision flag |
| `bmp_system_tb` | full link at the defaults, 20 000 random bits, random jitter on both clocks and random distortion. Every bit is correct and in order, at most one bit is in transit, and the line never collides. It also counts that 0s, 1s, mid-cell edges, distortion, jitter and drift all occurred |
| `bmp_configs_tb` | the margin and layout-selection functions against the table above, and the five layouts above, each with E = 1 and ρ = 0.95, and with ρ = 0.999 and E just under its bound. Each of the ten runs under random, coder-fast/decoder-slow and coder-slow/decoder-fast clocks: 30 links, all error-free |
| `bmp_error_scenarios_tb` | the three failure modes. Under worst-case clocks, a parameter set that violates one constraint (24/2/11, 20/8/10 and 10/4/8) decodes wrong bits. A set that differs in one parameter and satisfies all three decodes every bit |

`bmp_tester` is a testbench helper. It supplies random bits on `get` and
checks every `put` against the oldest bit in transit.

To simulate with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    --top-module bmp_system_tb rtl/bmp_pkg.sv \
    rtl/bmp_{coder,sampler,decoder,clock_model,wire_model,system}.sv \
    tb/bmp_tester.sv tb/bmp_system_tb.sv
./obj_dir/Vbmp_system_tb
```

Verilator warns (ZERODLY) that the random delays in the two models could be
zero. They cannot: every period and window is at least 1 ns. `-Wno-fatal`
keeps that warning from stopping the build.

Replace the top module and testbench file to run another bench. The block
benches need only the package and their own module. All benches finish in
under a minute.

## Limits

- The timing constraints are taken as given. The simulations exercise them,
  including worst-case corners, but they are not a proof.
- The oscillator and line models reduce "any value at any time" to a few
  concrete shapes and integer-nanosecond periods.
- The design does not cover any of the following:
  - an idle line or framing;
  - metastability hardening;
  - transmission delay;
  - a PLL-based receiver, as some controllers use instead of counting from
    the edge.
