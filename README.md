# Pong on a 16 x 16 bicolor LED board

Two-player Pong for an FPGA board (DE1-SoC style: 50 MHz clock, four push
buttons, ten switches, six seven-segment displays) driving a 16 x 16
red/green LED matrix. The design is a worked example of breaking a small game
into hardware blocks that each own one resource (a paddle position, the ball
state, a score) and run side by side, connected by a few narrow signals.

## The game

```
 column  0                           15
 row  0  O O O O O O O O O O O O O O O O   O = orange wall (red + green)
      1  G . . . . . . . . . . . . . . .
      2  G . . . . . . . . . . . . . . G   G = green paddle, 5 rows
      3  G . . . . . . . . . . . . . . G
      4  G . . . . . . . R . . . . . . G   R = red ball, 1 pixel
      5  G . . . . . . . . . . . . . . G
      6  . . . . . . . . . . . . . . . G
     ..
     14  . . . . . . . . . . . . . . . .
     15  O O O O O O O O O O O O O O O O
```

* Rows 0 and 15 are walls. Rows 1 to 14 are the playing field.
* Player 1's paddle is in column 0 and Player 2's in column 15. Each is five
  rows long.
* The ball moves only diagonally and bounces off the walls and the paddles.
* When the ball reaches column 0 or 15, the other player scores. The ball is
  then served again from (7, 7) in one of the four diagonal directions, chosen
  at random.
* KEY[3] and KEY[2] move Player 1 up and down. KEY[1] and KEY[0] move Player 2.
  Each press moves a paddle one row.
* SW[9] is reset. HEX0 shows Player 1's score and HEX5 shows Player 2's.
* The first player to reach 7 points wins. The ball then stays in the centre
  until reset.

## Coordinates and encodings (`pong_pkg`)

Everything shares the package `pong_pkg`:

| item | encoding |
|---|---|
| pixel planes | `pixels_t = logic [15:0][15:0]`, indexed `[row][column]`. Orange is a pixel lit in both planes. |
| ball position | `ball_pos_t`, a packed struct `{x, y}` of 4 bits each. `BallPos[1]` is x (column) and `BallPos[0]` is y (row). |
| direction | `dir_t`. Bit 1 is 0 for north (towards row 0) and 1 for south. Bit 0 is 0 for east (towards column 15) and 1 for west. So 0 = NE, 1 = NW, 2 = SE, 3 = SW. |
| paddle position | 4-bit offset counted from row 1. Offset `p` covers rows `p+1` to `p+5`. Offsets run from 0 to 9, so a paddle never covers a wall. |

## How the ball moves: one step

The ball step is the least obvious part of the design. It is split between a
combinational block and a register block.

1. **`collision_detection`** looks at the ball position, its current
   direction `BallDir` and both paddle offsets. It outputs `NewDir`, the
   direction the ball should take on its next step. `NewDir` starts as
   `BallDir`, and then:
   * **Wall bounce.** If the ball is on row 1 heading north, or on row 14
     heading south, the vertical bit flips.
   * **Paddle bounce.** First it works out the row the ball will move to,
     using the vertical direction *after* the wall correction. If the ball is
     in column 1 heading west and that row is on Player 1's paddle, the
     horizontal bit flips. Column 14 heading east is tested against Player 2's
     paddle the same way.
   * Both bounces can happen in one step, when the ball hits a paddle in a
     corner.
   * If the ball heads into column 0 or 15 with no paddle in the way, nothing
     changes and the ball goes on into the goal column.
2. **`ball`** holds `BallPos` and `BallDir`. A speed counter counts
   0, 1, ..., `TICK_MAX` and wraps. When it equals `TICK_MAX`, the ball takes
   one step: `BallDir <= NewDir`, x moves by one according to `NewDir[0]`, and
   y moves by one according to `NewDir[1]`. The registers load `NewDir`, not
   `BallDir`, so a bounce and the step away from the wall or paddle happen on
   the same clock. The ball can never enter a wall row. An assertion in `ball`
   checks this.

With `TICK_MAX = 3`, the ball moves on every fourth game clock. A paddle can
move on any game clock. This is what makes the paddles faster than the ball.

## Points, serving and winning

A point is detected from the ball position alone. Two `score` instances watch
`BallPos.x`:

* Player 1's counter goes up when x = 15.
* Player 2's counter goes up when x = 0.

The ball stays in a goal column for exactly one game clock. On the next clock
`ball` serves it again: the position becomes (7, 7), the direction comes from
bits [1:0] of a free-running 10-bit LFSR, and the speed counter restarts. Each
point is therefore counted once, and the first move after a serve always
comes `TICK_MAX + 1` clocks later.

The LFSR (`lfsr`, polynomial x^10 + x^7 + 1, period 1023) has no reset. If
reset cleared it, every game would open with the same serve. Because it keeps
running, the first serve depends on how long SW[9] was held, and later serves
depend on when points are scored. If the register ever holds all zeros (for
example at power-up), a 1 is shifted in, so it cannot lock up.

When a counter reaches `WIN_SCORE`, it stops and raises `Win`. The top feeds
`P1Win | P2Win` to the ball's `hold` input. This freezes the ball at the
centre, where the winning point's serve has just put it, until reset.

## Blocks

| module | kind | owns / does |
|---|---|---|
| `pong` | top | wires everything below; ports are the board's pins plus the pixel planes |
| `clock_divider` | sequential | 32-bit free-running counter on CLOCK_50; bit i is a clock of 50 MHz / 2^(i+1) |
| `user_input` | sequential | two-flip-flop synchroniser per key, then a press-edge detector: one pulse per press |
| `paddle` (x2) | sequential | one paddle offset, moved by up/down pulses, stops at 0 and 9 |
| `collision_detection` | combinational | `NewDir` from ball, direction and paddles |
| `ball` | sequential | ball position, direction, speed counter, serve; contains `lfsr` |
| `lfsr` | sequential | random bits for the serve direction |
| `score` (x2) | sequential | one player's points and win flag |
| `board` | combinational | draws walls, paddles and ball into `RedPixels` / `GrnPixels` |
| `seg7` (x2) | combinational | score digit to active-low segments for HEX0 and HEX5 |

Signals between the blocks: `KeyPulse[3:0]`, `P1Pos`, `P2Pos`, `BallPos`,
`BallDir`, `NewDir`, `P1Score`, `P2Score`, `P1Win`, `P2Win`.

### Not included: the LED matrix driver

The scan logic that moves `RedPixels` and `GrnPixels` onto the LED board's
GPIO header is not part of this design. The top brings out what such a
driver needs:

* `RedPixels` and `GrnPixels`;
* `LedClk`, which is `divided_clocks[LED_CLOCK]` (about 1.5 kHz by default);
* `LedReset`, which is SW[9].

Which physical side column 0 appears on depends on that driver.

## Clocks and reset

* The whole game runs on one clock, `divided_clocks[GAME_CLOCK]`. With the
  default `GAME_CLOCK = 21`, that is 50 MHz / 2^22, about 11.9 Hz. The ball
  therefore makes about three moves per second.
* This clock comes from a counter bit, not from a clock buffer or PLL. That
  is fine for this small, slow design on an FPGA.
* SW[9] is used directly as a synchronous, active-high reset in the game clock
  domain. It must be held for at least one game clock. It is not passed
  through a synchroniser.
* The clock divider is never reset. Resetting it would stop the game clock
  that the synchronous reset needs.
* The keys are active low and pass through `user_input`. A pulse appears two
  to three game clocks after a press. Holding a key moves the paddle only once.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `pong` | `GAME_CLOCK` | 21 | divider bit used as the game clock |
| `pong` | `LED_CLOCK` | 14 | divider bit brought out as `LedClk` |
| `pong`, `ball` | `TICK_MAX` | 3 | the ball moves every `TICK_MAX + 1` game clocks |
| `pong`, `score` | `WIN_SCORE` | 7 | points needed to win (1 to 9, to show on one digit) |
| `score` | `GOAL_COL` | 15 | column where this counter's player scores |
| `paddle` | `RESET_POS` | 4 | offset after reset (rows 5 to 9) |
| `lfsr` | `WIDTH` | 10 | register width. The taps are right only for 10 bits. |
| `user_input` | `N` | 4 | number of keys |

The board size, paddle length, wall rows and serve point are constants in
`pong_pkg`. The logic assumes a 16 x 16 board, because coordinates are 4 bits.

## Design choices and deviations

The original problem statement fixes the rules, the colours and sizes, the
key and display assignment, the block split, the direction encoding, the
collision regions, the serve point and the speed-counter idea. The following
are this design's own decisions:

* **Paddle range 0 to 9, not 0 to 10.** The statement gives the paddle
  offset a range of 0 to 10. With 14 playable rows, offset 10 would put the
  paddle's last pixel on the bottom wall. The range stops at 9 so that the
  walls stay orange.
* **Order of the collision checks.** The wall check comes first, and the
  paddle check uses the corrected row. The statement does not fix this
  order.
* **Serve timing.** The ball stays in the goal column for exactly one game
  clock, then the speed counter restarts at the serve.
* **Winning.** The game ends at 7 points, and the `hold` input on `ball`
  stops it. The statement names win detection but gives no target score and
  no game-over behaviour.
* **Key handling.** Each press moves the paddle once, using a two-flip-flop
  synchroniser and an edge detector.
* **Clock taps.** The game clock is bit 21 and the LED scan clock is bit 14.
* **Displays.** HEX1 to HEX4 are dark. SW[8:0] are unused.

## Simulation

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops, and each has a watchdog. The
testbenches use only SystemVerilog and need no data files. Example with
Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/pong_pkg.sv tb/pong_tb.sv \
    --top-module pong_tb -y rtl +libext+.sv
./obj_dir/Vpong_tb
```

| testbench | what it covers |
|---|---|
| `collision_detection_tb` | all 78,400 in-field cases against a geometric model of the next step |
| `ball_tb` | step spacing of exactly 4 clocks, goals on both sides, serve position and LFSR direction, all four serve directions, hold, reset in flight |
| `lfsr_tb` | each step against a model, period of exactly 1023, all four low-bit values |
| `paddle_tb` | moves, both stops, simultaneous pulses, reset |
| `score_tb` | one count per goal clock, the other goal column ignored, stop and `Win` at 7, reset |
| `board_tb` | all 512 pixels for random and extreme positions |
| `user_input_tb` | pulse timing against a delayed model, one pulse per long press |
| `seg7_tb` | all 16 inputs against segment lists |
| `clock_divider_tb` | increment and toggle counts of bits 0 to 11 |
| `pong_tb` | whole games through the ports only (see below) |
| `pong_full_tb` | one point at the default parameters |

A simulation should hold reset from time zero. Before the first reset the
ball registers hold arbitrary values, and the wall-row assertion in `ball`
would trip if it sees row 0 or 15 with reset low.

**`pong_tb`** runs at `GAME_CLOCK = 1` and reads the game back from the
pixel planes and HEX displays. Scripted players either track the ball or
avoid it. On every game clock it checks that the field is well formed, that
every bounce happened on a paddle row, that every goal missed the paddle,
the score display, the serve from (7, 7), and that the ball is frozen after a
win. It counts each mechanism and fails if any count is zero: held key,
paddle stops, paddle bounces, wall bounces, points for both players, serves,
win hold, reset.

**`pong_full_tb`** uses the top exactly as built. It checks that a key tap
moves the paddle one row, that the ball steps exactly every 4 x 2^22 CLOCK_50
cycles, and that a point is scored, displayed and followed by a new serve.
It simulates a few hundred million CLOCK_50 cycles, which takes under a
minute.
