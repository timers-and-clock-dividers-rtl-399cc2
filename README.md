# Keypad tone generator: timers and a clock divider on a CPLD

Press one chosen key on a 4x4 matrix keypad and a speaker plays a square-wave
tone. The tone has a fixed pitch and lasts a fixed time, however briefly or
however long the key is held. Apart from the I/O, the circuit is two
down-counters and a four-state controller:

- a **duration timer** sets how many clock cycles the tone lasts;
- a **clock divider**, the half-period timer, sets how many cycles each half
  of the square wave lasts;
- a **state machine** waits for the key, starts both counters and flips the
  speaker each time the divider runs out.

Three digits n1, n2 and n3 customise the design. Key n1 starts the tone, the
tone frequency is f = 500 + 100·n2 Hz, and the tone lasts 0.5·n3 s. The
defaults are n1 = 4, n2 = 5, n3 = 6 with a 50 MHz clock. That gives a 1000 Hz
tone for 3 s when key 4 is pressed. The target is a small CPLD (MAX II class),
so the whole design is 45 flip-flops and a handful of comparators.

## Counter lengths

Both counters count whole clock cycles:

| quantity | formula | default |
|---|---|---|
| N, tone length in cycles | CLK_HZ × 0.5 × n3 | 150,000,000 (28-bit counter) |
| M, half period in cycles | CLK_HZ / (2 f) | 25,000 (15-bit counter) |

Each counter is loaded with its length minus one. It counts down to zero, so a
load of N−1 covers exactly N cycles. `tone_pkg` computes N and M from the
digits and `$clog2` sizes the counters. If CLK_HZ/(2f) is not a whole number,
M is rounded down. If n3 = 0, N is clamped to 1, which makes the tone a single
silent cycle.

## The state machine

| state | meaning | speaker |
|---|---|---|
| `keylo` | waiting for the key to be released | low |
| `keyhi` | key released, waiting for a press | low |
| `spkrlo` | tone playing, low half | low |
| `spkrhi` | tone playing, high half | high |

The key input `k` is active low. In each state the rules below are tried in
order. The first rule that matches wins. If none matches, the state holds.

| state | condition | next state |
|---|---|---|
| keylo | k = 1 | keyhi |
| keyhi | k = 0 | spkrlo |
| spkrlo, spkrhi | c1 = 0 | keylo |
| spkrlo | c2 = 0 | spkrhi |
| spkrhi | c2 = 0 | spkrlo |

Because the c1 rule is tried first, the end of the tone takes priority over a
toggle that falls on the same cycle. Because the machine must pass through
`keylo`, the key has to be released and pressed again before it can start
another tone. That is why a long press gives one tone and not a train of them.

## How the counters follow the states

The counters never decide anything themselves. Each one looks at the current
state and the *next* state (`state_next`, the combinational output of the
state machine) and applies its own rules, tried in order:

**c1, duration timer (`duration_timer`)**
1. on keyhi → spkrlo, load N−1;
2. if the next state is spkrlo or spkrhi, decrement;
3. otherwise hold.

**c2, half-period timer (`halfperiod_timer`)**
1. on keyhi → spkrlo, spkrlo → spkrhi or spkrhi → spkrlo, load M−1;
2. if the next state is spkrlo or spkrhi, decrement;
3. otherwise hold.

Deciding on the next state keeps the counters in step with the state register
without an extra cycle. The edge that enters a tone state also loads the
counter. Every later edge inside the tone decrements it. A toggle reloads c2 on
the same edge that changes the speaker. The timing works out as follows,
counting from clock edge E0, the first edge that sees the key pressed after a
release:

- after E0 the state is `spkrlo` with c1 = N−1 and c2 = M−1;
- the speaker is low for edges E0 … E0+M−1 and high for the next M, and so on:
  in cycle i of the tone (0 ≤ i < N) it is high when ⌊i / M⌋ is odd;
- at edge E0+N the state returns to `keylo` and the speaker goes low.

The tone therefore lasts exactly N cycles, and each half period lasts exactly
M cycles. The tone always starts with a low half. When N is a multiple of 2M,
as at the defaults, it ends after a high half.

## Keypad connection

Only the row holding key n1 is driven low. The other three rows are driven
high. The column of key n1 is read as `k`, with the columns pulled up on the
board. As a result:

- a key in another row cannot pull that column low, even if it shares the
  column;
- a key in the same row but another column drives a different column line,
  which the design ignores.

So only key n1 starts a tone. The row outputs are constant, and a synthesis
report lists them as tied off.

The keypad layout is an assumption of this design. `tone_pkg::key_row` and
`key_col` assume the common layout below, with row 0 and column 0 at the top
left. Edit those two functions for a keypad wired differently.

```
1 2 3 A
4 5 6 B
7 8 9 C
* 0 # D
```

The `led` output shows the key input: it is high while key n1 is pressed. It
is there to check the keypad wiring on the board.

## Ports of the top level, `lab4`

| port | dir | width | board pin (reference build) |
|---|---|---|---|
| `clk50` | in | 1 | 50 MHz oscillator, PIN_12 |
| `col` | in | 4 | col[3:0] = PIN_89, 87, 85, 83, with weak pull-ups |
| `row` | out | 4 | row[3:0] = PIN_99, 97, 95, 91 |
| `spkr` | out | 1 | PIN_26, speaker to ground |
| `led` | out | 1 | PIN_77, on-board LED (high = on) |

Parameters: `CLK_HZ` (default 50,000,000), `N1` (4), `N2` (5) and `N3` (6).

## Files

| file | content |
|---|---|
| `rtl/tone_pkg.sv` | state type, the N/M formulas, keypad layout |
| `rtl/tone_fsm.sv` | the four-state controller and speaker decode |
| `rtl/duration_timer.sv` | c1 |
| `rtl/halfperiod_timer.sv` | c2, the clock divider |
| `rtl/lab4.sv` | top level: keypad row/column, LED, wiring |
| `tb/keypad_model.sv` | behavioural 4x4 switch matrix with pull-ups (simulation only) |
| `tb/*_tb.sv` | self-checking testbenches, one per module, plus `lab4_full_tb` |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops. Build and
run one with Verilator 5, for example:

```
verilator --binary --timing -y rtl -y tb rtl/tone_pkg.sv tb/lab4_tb.sv --top-module lab4_tb
./obj_dir/Vlab4_tb
```

- `tone_fsm_tb` drives random key and counter-zero inputs. It compares the
  state, next state and speaker with a model written directly from the
  ordered rule table, and checks that every rule is used.
- `duration_timer_tb` and `halfperiod_timer_tb` drive random state pairs
  against each counter's rule table. They then time one tone (N cycles) and
  several half periods (M cycles each).
- `lab4_tb` runs two copies of the design at reduced clock rates:
  - 20 kHz, key 4, 3 s (N = 60,000, M = 10);
  - 27 kHz, key 9, 0.5 s (N = 13,500, M = 13).

  It compares the speaker pin with the expected waveform every cycle, for
  presses shorter and longer than the tone, a second press during the tone,
  and every other key. It also counts the tone starts, both kinds of toggle,
  tones that end in each half, and a key held past the end of the tone.
- `lab4_full_tb` runs the top level at its defaults. It checks a full
  3-second, 1000 Hz tone (150 million cycles, 3000 periods of 25,000 + 25,000
  cycles). It takes about two minutes.

The registers start from power-up values (state `keylo`, both counters 0), so
no reset is needed in simulation or on a CPLD that clears its registers at
configuration.

## Limitations and design choices

- **No reset pin.** The reference pin list has none. The three registers use
  declaration initialisers, which Verilator reports as a style warning
  (PROCASSINIT). On an ASIC or an FPGA that ignores initial values, add a
  reset.
- **No synchroniser or debouncer on the key.** The column is used directly,
  as in the reference design. Bounce while the tone plays is harmless,
  because c1 must reach zero first. Bounce on the release *after* a tone can
  start a new tone, and a press that is not synchronised to the clock can
  cause a metastable sample. A two-flop synchroniser and a debounce timer
  would fix both; they would also delay the start of the tone by a few cycles.
- **Own choices:** the 2-bit state encoding (all four codes are legal states,
  so the machine cannot lock up), the keypad layout, what the LED shows,
  rounding of M, and the clamp for n3 = 0. The state machine, both counter
  rule tables, the formulas for N and M, and the pin set follow the
  reference design.
