# Cricket game and score-board in SystemVerilog

This is a small digital model of cricket in two independent parts.

- **The game** plays a two-team match with no input from the players beyond
  "play". A 4-bit linear feedback shift register (LFSR) gives a pseudo-random
  number every clock. Each clock is one ball, and a fixed table turns the
  number into runs or a wicket. Team 1 bats until it loses 10 wickets or has
  faced 120 balls. Team 2 then does the same, and the higher score wins.
- **The score-board** is the electronic board of a real match. An operator
  presses one-bit buttons (single, four, six, wide, no ball, wicket, ball, dot
  ball), and the board keeps the score, wickets, extras and balls bowled.

Every total is kept in binary. For display it is converted to decimal digits
and shown on seven-segment patterns.

## The game

### From random number to ball

The LFSR has four stages, X1 to X4, and all four share the clock. On each
clock every stage takes the value of the stage before it, and X1 takes
`X3 xor X4`. This is the primitive polynomial x^4 + x^3 + 1. From any non-zero
seed the register visits all 15 non-zero values once, then repeats. It never
reaches 0. The state, read as the number `{X1,X2,X3,X4}` with X1 as the most
significant bit, is the ball's number:

| LFSR number | ball |
|---|---|
| 0 – 6   | that many runs |
| 7, 8, 9 | wicket, no runs |
| 10 – 15 | number − 9 runs (1 – 6) |

Because the LFSR steps through a fixed cycle, every 15 balls bring exactly
3 wickets and 42 runs. An innings is therefore always all out after 46 to
54 balls, with between 126 and 158 runs. The 120-ball limit is never
reached at the default size. A testbench can reach it by building the game
with a smaller `MAX_BALLS`. The 15-ball cycle also explains why the score is
8 bits wide: a 7-bit score would overflow, because innings of 128 runs do
occur.

The LFSR runs on every clock, including while the game is idle. The match you
get therefore depends on the clock on which `play` is pressed. With a fixed
reset and a fixed press time the match is fully repeatable, which is what the
testbenches rely on.

### An innings (`innings_scorer`)

One scorer per team holds:

- the score, updated through an 8-bit ripple-carry adder;
- the wickets, counted by a 4-bit counter that stops at 10;
- the balls, counted by an 8-bit counter that stops at `MAX_BALLS`;
- the boundaries (balls of 4 or 6 runs).

`done` goes high when wickets reach `MAX_WICKETS` or balls reach `MAX_BALLS`.
After that the scorer ignores further balls.

### The match (`cricket_game`) and its timing

```
IDLE --play--> BAT1 --team 1 done--> BAT2 --team 2 done--> OVER
  ^                                                          |
  +------------------------- restart ------------------------+
```

- `play` is sampled in IDLE. The first ball is the next clock.
- In BAT1 every clock is a ball for team 1, and in BAT2 for team 2.
- Once an innings is done, one clock passes with no ball before the state
  moves on.
- A match with innings of b1 and b2 balls ends `b1 + b2 + 2` clocks after the
  clock that took `play`.
- Team 2 starts from wherever the LFSR stands when team 1 finishes. It bats
  its full innings even after it has passed team 1's score.
- `restart` (synchronous) returns to IDLE and clears both teams' totals. It
  does not reseed the LFSR; `rst` does.

The outputs are `team1` and `team2` (who is batting), each team's score and
wickets ("out"), the balls of the innings in progress, the LFSR number `o`
with its runs `a`, and, in OVER, `game_over`, `winner` and `win_reason`.

### Deciding the winner (`winner_compare`)

1. More runs wins.
2. If the runs are equal, the team that lost fewer wickets wins.
3. If runs and wickets are equal, the team with more boundaries wins.
4. Otherwise the result is `WIN_TIE`.

`win_reason` says which rule decided the match. At the default 120-ball size,
every one of the 15 possible starting points is decided on runs. With very
short innings (4 or 5 balls), rules 2 and 3 do occur. With this LFSR a full
tie cannot happen, because team 2 never starts at the same point of the cycle
as team 1.

## The score-board (`scoreboard`)

On each rising clock with `enable` high, every input that is high takes
effect:

| input | score | extras | wickets | balls |
|---|---|---|---|---|
| `one`    | +1 | | | |
| `four`   | +4 | | | |
| `six`    | +6 | | | |
| `wide`   | +1 | +1 | | no ball counted this clock |
| `noball` | +1 | +1 | | no ball counted this clock |
| `wick`   | | | +1, stops at 10 | |
| `ball`   | | | | +1 |
| `dot`    | | | | |

A normal delivery is therefore `ball` together with its result, e.g. `ball`
and `four`. `ball` is ignored in a clock where `wide` or `noball` is high,
because those deliveries do not count towards the over. `dot` changes no
total; it exists so that the operator has a key for a dot ball. Score and balls
are 8 bits wide, and wickets and extras 4 bits. Score, extras and balls wrap
around at their width. The score and extras are summed through ripple-carry
adders (8 bits and 4 bits), and so are the wickets and balls (+1 through the
carry-in). Reset is synchronous and active high.

For example, twelve legal balls (1, W, 1, W, 1, 4, 1, 6, 1, 4, dot, dot)
followed by a no ball and a wide read **21 – 2, extras 2, balls 12**.

## Decimal displays (`decimal_display`)

`bin2bcd` turns a binary value into decimal digits by the shift-and-add-3
method. It shifts in one bit per step, after first adding 3 to every digit
that is 5 or more, and the steps are unrolled into combinational logic.
`seg7_decoder` then maps each digit to `{g,f,e,d,c,b,a}`, active high. The top
gives 3 digits to 8-bit values and 2 digits to 4-bit ones. Index 0 of every
`*_seg` array is the units digit.

## Top level (`cricket_top`)

The top holds the game and the score-board side by side. They share `clk` and
`rst`, and otherwise have their own ports. The game brings out its binary
totals and the displays `team1_score_seg`, `team1_out_seg`, `team2_score_seg`,
`team2_out_seg` and `game_balls_seg`. The score-board brings out `sb_score`,
`sb_wickets`, `sb_extras` and `sb_balls`, each with a `_seg` display.

Parameters (all modules that take them):

| parameter | default | meaning |
|---|---|---|
| `SEED`        | `4'b0001` | LFSR value after `rst` (0 is replaced by 1) |
| `MAX_BALLS`   | 120 | balls per innings |
| `MAX_WICKETS` | 10  | wickets that end an innings (also the board's wicket cap) |

Shared types and constants, such as the `winner_e` and `win_reason_e` enums
and the total widths, are in `rtl/cricket_pkg.sv`.

## What is specified and what was chosen here

These parts follow the original description of the design:

- the LFSR stages and taps;
- the number-to-ball table;
- the 10-wicket and 120-ball limits;
- an 8-bit adder for the score and an up counter for the wickets;
- the order of the winner rules;
- the score-board's eight inputs, their effects and the widths of its four
  totals;
- conversion to decimal before display.

These are choices made here:

- the seed and the bit order of the LFSR number;
- the free-running LFSR and the IDLE/BAT1/BAT2/OVER controller with its
  `play` and `restart` buttons;
- that fewer wickets wins the second rule;
- counting boundaries as balls of 4 or 6 runs;
- the tie result;
- ignoring `ball` beside an extra;
- the score-board's wicket cap and wrap-around;
- synchronous resets;
- ripple-carry adders;
- shift-and-add-3 conversion and the segment encoding.

The original implementation reported a much smaller FPGA footprint:
16 flip-flops, 25 4-input LUTs and 24 I/O pins for its game/display design.
This RTL keeps full per-team totals, boundary counts and a controller. In
synthesis the game alone has 64 flip-flops, and the full top has 88 plus the
display logic. So it is not a gate-for-gate match of that implementation.

The same game was also drawn as a gate-level schematic in the original work.
That drawing is not reproduced here beyond its display and button names.

## Simulating

Each module is in `rtl/<module>.sv`, and the package is `rtl/cricket_pkg.sv`.
Every testbench in `tb/` is self-checking and prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl \
  rtl/cricket_pkg.sv tb/cricket_top_tb.sv --top-module cricket_top_tb -o sim
./obj_dir/sim
```

| testbench | what it covers |
|---|---|
| `lfsr4_tb` | seed, hand-worked first states, the feedback rule, period 15, hold |
| `lfsr_reassign_tb` | all 16 numbers |
| `ripple_adder_tb` | 8-bit and 4-bit adders, exhaustive |
| `sat_up_counter_tb` | wicket counter stopping at 10, ball counter at 120 |
| `innings_scorer_tb` | random balls against a model; all-out and 120-ball endings |
| `winner_compare_tb` | each rule, then random close totals |
| `decimal_display_tb` | all 8-bit and 4-bit values, digits and segments |
| `scoreboard_tb` | the keyed innings above, random button combinations, wicket cap |
| `cricket_game_tb` | 20 matches at full size and with 20-ball innings, clock by clock |
| `cricket_top_tb` | end to end: board, then matches from all 15 LFSR starting points at 120, 4 and 5 balls; displays decoded back; every mechanism counted |
| `cricket_top_full_tb` | the top at its default parameters: the keyed innings and one full match |

`tb/game_ref_model.sv` is the clock-by-clock reference for the game. It is
used by the game and top testbenches, and it also checks the match length
in clocks.

The two-state simulation starts unreset variables at random values. Every
register here is cleared by `rst`, so hold `rst` for at least one clock before
use.
