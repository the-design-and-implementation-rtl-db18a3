# Acoustic dartboard with automatic scoring

A dart hitting a cork board makes a sharp click. Three microphones at known
points around the board hear that click at slightly different times, and
those time differences fix where the dart landed. This design turns the
three arrival times into board coordinates, keeps the darts of one turn,
scores each one by ring and sector, and runs a two-player 301 or 601 game on
a 1024x768 VGA screen. The players see the board picture with a marker on
each dart. If a dart was placed wrongly they can nudge it with the arrow
buttons before the turn is charged.

The logic has two halves, each on its own clock:

* **detection**, at 27 MHz: microphone timing, triangulation and the dart
  register;
* **display and game**, at 65 MHz (the XVGA pixel clock): scoring, game
  rules, dart correction and the picture.

Three darts at a time cross from one half to the other through a small
handshake.

```
 mic latches ──► mic_counter ──► cycles_to_mm ──► calc_d ─► calc_y ─► calc_x
      ▲             (2.7 MHz)      (÷8 = mm)          (arithmetic chain)   │
      │                                                                     ▼
 analog_latch_reset ◄── reset_lc ── dart_register ◄── x_steady ◄───────────┘
                                        │ data_ready / data_taken (synchronised)
 ───────────────────────────────────────┼──────────────────── 27 MHz │ 65 MHz
                                        ▼
  xvga ──► dbdisplay: 3 × dartscore (polargen), game301 (numtotext),
                      dartblob ×3, turnblob, text_display ×11 ──► convertcolor ──► VGA
```

## Locating a dart

This is the hardest part of the design.

### Geometry

The board centre is the origin, x points right and y points up, and units
are millimetres. The three microphones sit 200 mm from the centre:

| microphone | position   |
|------------|------------|
| 0          | (0, 200)   |
| 1          | (200, 0)   |
| 2          | (-200, 0)  |

Let *d* be the unknown distance from the dart to the microphone that heard
it first. Each microphone *i* heard the click *d_i* millimetres of travel
later than that, so its distance to the dart is *d + d_i*. One of d0, d1, d2
is zero. The dart lies where the three circles of radius *d + d_i* meet.

Subtracting the circle equations in pairs removes x² and y² and leaves a
quadratic in *d*. With K = 80000 = 2·200², its smaller root is

```
      N - sqrt(T)
d = ---------------
          2A

N = K(d1+d2) - 2d0³ + d0²(d1+d2) + d0(d1²+d2²) - d1³ - d2³
T = (K - (d0-d1)²) · (K - (d0-d2)²) · (2K - (d1-d2)²)
A = -K + 2d0² + d1² + d2² - 2d0(d1+d2)
```

Once *d* is known, microphones 0 and 1 give y directly:

```
y = ( K + (d+d1)² - (d+d0)² - sqrt( (K - (d0-d1)²) · ((2d+d0+d1)² - K) ) ) / 800
```

Microphone 0 then gives the size of x, and the sign comes from which of
microphones 1 and 2 is closer:

```
|x| = sqrt( (d+d0)² - (y-200)² ),   x > 0 when d1 <= d2
```

### Arithmetic

Each equation has its own unit: `calc_d`, `calc_y` and `calc_x`. Each unit
works in four steps:

1. It forms the products in one cycle of wide integer arithmetic (48 to 52
   bits).
2. It takes the square root with a bit-serial restoring square root,
   `isqrt_seq`, at one result bit per cycle.
3. `calc_d` and `calc_y` then divide with a bit-serial restoring divider,
   `udiv_seq`, at one quotient bit per cycle.
4. It stores the result.

All results are truncated toward zero. The latency from start to result is
fixed:

| unit   | latency, 27 MHz cycles |
|--------|------------------------|
| calc_d | 63                     |
| calc_y | 57                     |
| calc_x | 15                     |

The chain takes 135 cycles, or 5 µs. That is tiny next to the time between
throws. The units run one after another, each started by the previous one's
`done`.

### Limits of the method

These come from the equations, not from the arithmetic.

* **y picks the wrong intersection in one region.** The minus sign in front
  of the square root in the y equation picks one of the two points where two
  circles cross. For darts up and to the right of the board, where roughly
  x + y > 200 mm, it picks the wrong one and y is wrong. On the board this
  is the outer part of the upper right quarter, more than about 141 mm from
  the centre, around sectors 18, 4 and 13.
* **x is imprecise near the vertical axis.** There the square root in the x
  equation magnifies the 1 mm rounding of the inputs. x can be off by
  several millimetres close to the axis, while y stays good.

In the end-to-end simulation, darts in the sectors used (20, 1, 5, 19 and
12) were located within 8 mm, measured as |dx| + |dy|.

### From sound to millimetres

The microphone amplifiers and latches are outside this design. Each latch
output goes high when its microphone hears the impact. `mic_counter` is an
eight-state machine:

* one idle state;
* six counting states, one for each set of microphones still waiting;
* one ready state.

It runs on a 2.7 MHz enable from `enable_divider`, which divides 27 MHz by
ten. From the first latch edge, every microphone that has not yet fired
counts enables, and each stops when its own latch fires. Sound travels
340 m/s, or 0.126 mm per 2.7 MHz period. Eight counts are therefore almost
exactly 1 mm, and `cycles_to_mm` is just a three-bit shift. The counts are
12 bits wide (up to 4095, or 512 mm) and saturate.

### Deciding that a dart has landed

The same inputs always give the same result, so the `x_steady` check is
mainly a guard. `x_steady` rises once both of these hold:

* x has been valid and unchanged for 30 consecutive cycles;
* the counter has stayed ready all that time.

In the top level, x also counts as valid only after the chain has finished
for the current impact. Without that, the previous dart's x could pass the
filter while the new dart is still being computed.

Each rising edge of `x_steady` stores one dart in `dart_register`:

* A dart outside ±226 mm (the half-width of the board picture) is stored as
  (175, 175). That point is just off the scoring area, so the throw still
  counts as a miss.
* After each dart, `reset_lc` starts `analog_latch_reset`. For 9,000,000
  cycles (1/3 s) it holds the external latches in reset (`latch_reset` low)
  and keeps the counter idle. The latches need far more than one cycle to
  clear.
* After the third dart, `data_ready` rises. Further darts are ignored until
  the display has taken the three.

## Crossing to the display clock

The three darts stay constant while `data_ready` is high, so only the two
handshake lines are synchronised, each with two flip-flops:

1. `data_ready` crosses to 65 MHz.
2. `dbdisplay` copies the darts, flipping y to screen orientation (down is
   positive), and raises `data_taken`.
3. `data_taken` stays high until `data_ready` falls. A one-cycle pulse at
   65 MHz could be missed at 27 MHz.
4. On `data_taken`, the dart register clears its darts to 230 (off the
   picture), drops `data_ready` and restarts the latch hold.

## Scoring a dart

`dartscore` works on screen coordinates, with the bull at the origin and
1 pixel per millimetre.

**Polar conversion.** `polargen` is an iterative vectoring CORDIC:

1. A ±90° pre-rotation brings the point into the right half-plane.
2. Twelve micro-rotations drive y to zero.
3. One constant multiply removes the CORDIC gain (0.60725 ≈ 39797/2¹⁶).

The outputs are:

* r, rounded to the nearest pixel;
* θ/π as a signed fixed-point number with seven fraction bits, so
  128 = 180°.

**Sector.** The sector index is k = (10·|θ| + 64) >> 7. This divides each
half of the board into 18° sectors, one centred on each multiple of 18°.
The sign of θ picks the lower or upper half of the screen, and the index
then selects the board number.

**Ring.** The radius picks the ring:

| r (mm)         | result                           |
|----------------|----------------------------------|
| ≤ 7            | 50, counts as a double           |
| ≤ 16           | 25                               |
| 99 to 107      | treble                           |
| 162 to 170     | double                           |
| above 170      | `"NO SCORE"`, the dart is off the board |
| any other      | single                           |

The score is an eight-byte ASCII string with the two digits in the low
bytes, ready to be drawn on screen.

**Timing.** A new score appears 15 cycles after `ce`. The display
re-scores all three darts whenever the darts arrive or one is moved.

## The game

`game301` keeps both players' remaining totals in 10-bit registers. Switch 0
chooses 301 or 601, and the choice takes effect until the first turn is
committed.

On a commit (rising edge of button 0) the current player's three scores are
applied:

* **Double-in.** Until a player has scored, only the first double dart and
  the darts after it count. The double bull counts as a double.
* **Subtract.** If the turn leaves 2 or more, it is subtracted.
* **Win.** If the turn reaches exactly zero and the last scoring dart was a
  double, the player wins. `"WIN"` is shown and further commits are ignored
  until reset.
* **Bust.** Anything else (going below zero, leaving 1, or reaching zero
  without a double) is a bust. `"BUST"` is shown and the total is unchanged.
* The turn passes to the other player after every commit.

`numtotext` turns a total into three right-aligned ASCII digits. For
example, the opening screen shows `" 301"`, the 32-bit value 0x00333031. A
64-point opening turn that starts with a double changes it to `" 237"`.

## The screen

`xvga` produces the standard 1024x768 60 Hz timing at 65 MHz: 1344 × 806
clocks per frame, with active-low syncs. `dbdisplay` composes the picture.

**Board area.** The board occupies lines 0 to 452 and columns 262 to 716.
Its pixels come from an external synchronous ROM (one-cycle latency),
addressed row by row: `rom_addr = line × 456 + (column − 261)`. The bull
is at image position (226, 226). Each dart is an 8 × 8 orange square drawn
over the image.

**Outside the board area.** The background is palette entry 252, blue. The
low three bits of the palette index are ORed with:

* eleven `text_display` strings:
  * "PLAYER 1" / "PLAYER 2" with underlines;
  * the game type;
  * each player's total or "BUST"/"WIN";
  * the three dart scores below the board;
* a 32 × 32 turn marker beside the player whose turn it is.

The strings use a small 5x7 font in 8x8 cells.

**Colours.** `convertcolor` maps each 8-bit index to 24-bit RGB through a
256-entry palette:

* entries 10 to 245 follow r = 32·(i mod 8), g = 32·(⌊i/8⌋ mod 8),
  b = 64·⌊i/64⌋;
* the ten entries at each end are fixed colours.

**Delays.** The pixel and the syncs leave `dbdisplay` two clocks after
`hcount`/`vcount`, and the palette adds one more.

**Correcting a dart.** Switches 7, 6 and 5 choose dart 1, 2 or 3. While an
arrow button is held, that dart moves one pixel per frame, on the falling
edge of vsync. If several arrows are held, the priority is up, down, left,
right. The dart is re-scored after each move.

## Top level: `dartboard_top`

| port | dir | meaning |
|------|-----|---------|
| `clk27`, `clk65` | in | detection clock and pixel clock |
| `mic[2:0]` | in | latched microphone outputs, high once the impact is heard |
| `latch_reset` | out | active-low reset to the external latches |
| `button_enter` | in | user reset, restarts the game |
| `button0` | in | commit the turn |
| `button_up/down/left/right` | in | dart correction |
| `sw[7:0]` | in | `sw[0]` selects 601; `sw[7:5]` choose the dart to correct |
| `rom_addr[17:0]`, `rom_data[7:0]` | out/in | board picture ROM, one-cycle read |
| `vga_red/green/blue[7:0]`, `vga_hsync`, `vga_vsync`, `vga_blank_b` | out | video |
| `led[7:0]` | out | status lamps (active low): microphones fired, counter ready, darts ready, dart count |
| `hex_data[63:0]` | out | debug values for a hex display: steady x, steady y, dart 3 x, dart 3 y |

All buttons are active high and are debounced over 650,000 cycles (10 ms at
65 MHz). A power-on reset is generated in each clock domain.

Parameters:

| parameter | default | meaning |
|-----------|---------|---------|
| `HOLD_CYCLES` | 9,000,000 | latch hold (1/3 s at 27 MHz) |
| `DEBOUNCE_COUNT` | 650,000 | button debounce |
| `DIV` | 10 | 27 MHz to 2.7 MHz |

Reduce the first two only to shorten simulations.

**Outside this design:**

* the bitmap contents of the board picture;
* the microphone amplifiers and latches;
* the hex-display driver;
* the clock synthesiser that makes 65 MHz from 27 MHz.

Their signals are ports.

## Departures from the original design

* **Arithmetic cores.** The arithmetic units use their own bit-serial
  square root and divider instead of pipelined vendor cores. Their results
  truncate the same way.
* **CORDIC.** The polar conversion is a CORDIC written here instead of a
  vendor core.
* **Clock crossing.** The crossing uses synchronisers and a four-phase
  handshake. The original passed one-cycle pulses directly between the
  clocks.
* **Stale x.** The "fresh x" qualifier on the stability filter is an
  addition.
* **Sector boundaries.** The sector index uses one multiply and exact
  boundaries, not a chain of rounded comparisons.
* **Off-board darts.** An off-board dart clears the double flag.
* **Counter overflow.** The microphone counts saturate instead of wrapping.
* **Turn marker colour.** The marker is palette entry 253 (magenta). It is
  formed, as originally, by ORing one bit into the background index. The
  original intent was red.
* **ROM order.** The picture ROM is addressed in plain raster order.
* **Font.** The font is defined here.

## Simulating

Every block has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing -y rtl -y tb -Irtl rtl/dartboard_pkg.sv tb/tb_calc_d.sv
./obj_dir/Vdartboard_pkg
```

Use `--top-module tb_<name>` if Verilator picks the package as top.

Testbenches worth knowing:

* **`tb_dartboard_top`** plays a whole game at a reduced latch hold (3000
  cycles) and debounce (40 cycles). A microphone model turns each throw into
  arrival times. The bench then checks:
  * the located position and the score of every dart;
  * an off-board dart being parked;
  * a correction with the arrow buttons;
  * a turn without a double-in;
  * a bust and a win;
  * the 301/601 switch and the user reset;
  * orange dart pixels on the VGA output.

  It counts each of these events and fails if any never happens.
* **`tb_dartboard_full`** runs the top with all default parameters: three
  darts with the full 1/3 s latch holds, the hand-over, scoring and a
  debounced commit. It takes about a minute.
* **`tb_calc_d`, `tb_calc_y`, `tb_calc_x`** compare the arithmetic units
  against real-number versions of the equations and against the true dart
  position, and check their latencies.
* **`tb_dartscore`** scores random points against an independent model that
  measures the angle clockwise from the top of the board.
* **`tb_dbdisplay`** scans a whole frame and checks every pixel of the board
  area against the ROM and the dart markers.

## Files

| file | role |
|------|------|
| `rtl/dartboard_pkg.sv` | shared types, ring radii, sector table, ASCII helpers |
| `rtl/enable_divider.sv`, `rtl/mic_counter.sv`, `rtl/cycles_to_mm.sv` | timing of the impact |
| `rtl/calc_d.sv`, `rtl/calc_y.sv`, `rtl/calc_x.sv`, `rtl/isqrt_seq.sv`, `rtl/udiv_seq.sv` | triangulation |
| `rtl/x_steady.sv`, `rtl/dart_register.sv`, `rtl/analog_latch_reset.sv` | dart capture and latch reset |
| `rtl/sync2.sv`, `rtl/por_reset.sv`, `rtl/debounce.sv` | crossing, resets, buttons |
| `rtl/xvga.sv`, `rtl/dbdisplay.sv`, `rtl/dartblob.sv`, `rtl/turnblob.sv`, `rtl/text_display.sv`, `rtl/convertcolor.sv` | picture |
| `rtl/polargen.sv`, `rtl/dartscore.sv`, `rtl/game301.sv`, `rtl/numtotext.sv` | scoring and game |
| `rtl/dartboard_top.sv` | top level |
