# Fruit Ninja on an FPGA

This is a version of the touch-screen game Fruit Ninja for an FPGA with a VGA
monitor. The player holds a hand-held remote. A gyroscope in the remote turns
hand motion into a cursor position. The remote sends the position and a button
state over a Bluetooth serial link. Fruit (an apple, an orange and a peach) and
a bomb are thrown up from the bottom of a 1024x768 screen on parabolic paths.
Passing the cursor over a fruit cuts it in two, and the two halves fly apart.
Three fruit that fall back uncut, or one touch of the bomb, end the game. The
best score is kept in flash memory across power cycles. A piezo buzzer plays a
short sound for each cut, lost life and bomb, and a two-note jingle for a new
high score.

The RTL here is everything inside the FPGA except two things: the vendor clock
manager and the flash controller. The remote's firmware and the off-board parts
are outside it as well.

## Structure and clocks

```
                        65 MHz domain                                   27 MHz domain
 serial_in ─3 FF─► cursor_receiver ─┐
                                    ▼
 xvga ─hcount/vcount/vsync─► game_fsm ──pixel──► 2-clock-aligned VGA outputs
   random_bits_generator, 4x lookup_table, 4x coord_generator,
   3x slice_coord_generator, slice_dealer, 3x fruit_sprite,
   picture_blob (bomb, text), blob, score_display, background
                    │ game_state, score ───────── slower (3 FF) ──► max_score ◄──► flash_* pins
                    │ slice / fell / state                              │ high score
                    ▼                                                   │
                   sfx ◄── flash busy (2 FF) ◄───────────────────────────┘ (2 FF back)
                    └──► sound
 button_enter ─► debounce ─► game_fsm.resetbutton    button_up ─2 FF─► max_score.reset_score
```

`fruit_ninja` is the top module. The 65 MHz pixel clock drives the video
timing, the game and the sound. The 27 MHz clock drives only the high-score
keeper and the external flash controller. Each domain has its own 16-clock
power-on reset.

### Crossing between the clocks

- Game over and the score go from 65 to 27 MHz through three registers
  (`slower`). The score is stable long before and after the game-over flag
  changes, so no handshake is needed.
- The high score comes back to 65 MHz through two registers. It changes only
  at game over or on a clear.
- Flash `busy` also goes back through two registers. The sound unit uses it to
  detect that a new high score is being written.

## Frame timing and motion

`xvga` makes standard 1024x768 timing: 1344 clocks per line and 806 lines, so
65 MHz gives 60 frames per second. All motion advances once per frame. The
frame pulse (`tick`) is the rising edge of the active-low vertical sync, when
the sync pulse ends. It is used as an enable on the 65 MHz clock; nothing is
clocked by vsync itself.

**Throwing an object.** Each of the four objects has its own `coord_generator`.
At the start of a throw it reads three things from its `lookup_table`: an
initial upward speed (10 to 16 pixels per frame), a start column, and a
direction. The table index is 3 bits of a CRC-16 register
(`random_bits_generator`, polynomial x^16+x^15+x^2+1), which steps every frame.
The serial line is the bit fed into it. The bomb has its own table.

At the same moment the object latches one more random bit, `active`. An
inactive object still flies, but it is not drawn, cannot be cut and does not
cost a life. This makes the number of objects on screen vary.

**The parabola without multipliers.** Position and speed are updated by
addition only:

- The object starts at row 700.
- x moves 5 pixels per frame left or right.
- On the way up, y falls by the current speed every frame. Every `VEL_PERIOD`
  (9) frames the speed drops by 2 (gravity 2).
- When the speed reaches 2 or less, the object turns.
- On the way down, the speed grows by 2 every 9 frames, up to 30.
- Once the object passes row 768 it is parked there and a new throw starts.
- If it was active and uncut, the `fell` counter increments.

Initial speeds are even numbers, so the speed lands exactly on the turning
point.

**Cut fruit.** A `slice_coord_generator` per fruit tracks the lower half. Until
the fruit is cut, it copies the fruit's position. Once cut, it starts from
where the cut happened with zero speed. It falls with the same gravity while
moving 4 pixels per frame in the direction opposite the top half. The top half
keeps following the normal path. A new throw snaps the lower half back.

## Cutting: pixel-exact collision

There is no bounding-box arithmetic. `slice_dealer` looks at the pixels the
drawing units produce for the same screen position. If the cursor pixel and a
fruit pixel are both non-black at once, that fruit is cut. Image backgrounds
are black (zero), so only the visible shape counts.

The cut flag stays high until that fruit's next active throw. The
coordinate generator counts its rising edge as one point. The score is the sum
of the three fruit counters. The bomb is tested the same way. Touching an
active bomb during play ends the game.

## Drawing pipeline

Every drawing unit returns the pixel for the `hcount`/`vcount` it was given
**two clocks earlier**. This matches an image ROM with a registered index read
followed by a registered colour-map read. The plain rectangles (`blob`) are
padded to the same two clocks. The top module delays hsync, vsync and blank by
two clocks, plus one output register, to match.

- `sprite_rom`: stores 8-bit colour indices and a 256-entry, 24-bit colour map.
- `fruit_sprite`: draws a fruit. Uncut, it reads the image normally. Cut, it
  draws the top half at the fruit's position and the bottom half at the lower
  half's position. The bottom half reads from the second half of the same ROM
  (address offset `WIDTH*HEIGHT/2`).
- `picture_blob`: draws the bomb and the text images (logo, play, replay,
  score labels).
- `blob`: draws solid rectangles. `score_display` builds two seven-segment
  digits out of 14 rectangles.
- `background`: a colour with green 164 and blue 255. Red sweeps 0→255→0, one
  step per frame.

`game_fsm` layers them. From the bottom up: background, orange, peach, apple,
bomb, score and lives, cursor. Any non-zero pixel covers the layers below.

**Image content.** The original game used photographs of fruit and a
decorative font. Those bitmaps are not part of this RTL. The ROMs are filled at
elaboration by functions in `fn_pkg` that draw stand-in shapes at the original
sizes:

- Fruit: a coloured disc with a stem. The images are 150x150, except the peach,
  which is 132x150.
- Bomb: a dark disc with a fuse.
- Text: grey framed boxes.

To use real art, replace the initial loop in `sprite_rom` with `$readmemh`.

## Game states

| state | screen | leaves on |
|---|---|---|
| START (0) | logo, play button | click over the play button → PLAY |
| PLAY (1) | objects, score at (850,100), three life squares | three fruit lost or bomb touched → GAME_OVER; Enter → START |
| GAME_OVER (2) | score and high score | click over replay → PLAY; Enter → START |

A click is the rising edge of the remote's button bit. Leaving PLAY clears the
lost-fruit counters. Entering PLAY clears the score counters.

## Remote link

`cursor_receiver` reads 5-byte packets at 9600 baud. It samples at 16 times the
bit rate (423 clocks per sample at 65 MHz). The packet is x (2 bytes), y (2
bytes) and the button (1 byte). Each byte is sent most significant bit first,
and each 16-bit value is sent low byte first.

Before looking for a packet, the receiver requires the line to be idle high for
`HIGH_CYCLES` (1300) clocks. This stops it from locking onto the middle of a
packet. It finds each byte's start bit again from that byte's falling edge.
This tolerates the uneven byte spacing of Bluetooth modules. A full packet
updates the cursor and pulses `valid`.

## High score in flash

`max_score` runs a small state machine at 27 MHz:

1. **STARTUP / READ_LOOP:** hold `reading` for `READ_HOLD` (200) clocks.
2. **CHECK:** wait until the flash is not busy, then load the stored word into
   the high-score register.
3. **IDLE:** act on a new high score or a clear.
   - At game over with a score above the register, pulse both erase lines for
     one clock. Load the register and the write data with the new score, then
     go to RESET.
   - A rising edge of the Up button does the same with 0.
4. **RESET:** once the flash is no longer busy, assert `writing` and go to
   STORE.
5. **STORE:** once the flash is no longer busy, return to IDLE.

The flash controller itself is not part of this RTL. Its interface is
`flash_reading`, `flash_writing`, `flash_reset`/`flash_up_reset` (erase),
`flash_wdata`, `flash_rdata` and `flash_busy`. `tb/flash_model.sv` is a
behavioural model of it for simulation. The model goes busy on each request,
erases to FFFF, and allows a write only after an erase.

## Sound

`sfx` is one FSM. Each sound is a square wave on `sound` with a fixed half
period and length, given in clocks:

| sound | trigger | length | half period |
|---|---|---|---|
| fruit cut | rising edge of any fruit's cut flag (game state unchanged) | 6.5 M (0.1 s) | 30 000 (~1.1 kHz) |
| bomb | rising edge of `bomb_slice` | 30 M | 150 000 |
| life lost | lives-lost count changed, except the 3→0 clear at a new game | 6.5 M | 150 000 |
| jingle | flash busy seen during the bomb or last-life sound | 30 M silence, 15 M tone, 3 M tone | 110 670, 82 909 |

A new high score makes the flash busy exactly when the game ends, which is
during the bomb or the last-life sound. That sound therefore flags `r`, and
the jingle follows it.

## Parameters

All defaults are the game's own numbers. The other values exist only to make
simulation shorter.

| module | parameter | default | meaning |
|---|---|---|---|
| fruit_ninja | VEL_PERIOD | 9 | frames per gravity step |
| fruit_ninja | BAUD_CLK_HZ | 65e6 | clock rate the serial receiver assumes |
| fruit_ninja | DEBOUNCE_DELAY | 650 000 | Enter button stable time, in clocks (10 ms) |
| fruit_ninja | READ_HOLD | 200 | 27 MHz clocks that the start-up read request is held |
| fruit_ninja | SFX_DIV | 1 | divides every sound length and half period |
| cursor_receiver | HIGH_CYCLES | 1300 | idle time required before a packet |
| coord_generator | X_VEL / START_Y | 5 / 700 | horizontal speed, launch row |
| slice_coord_generator | X_VEL | 4 | horizontal speed of a lower half |
| lookup_table | BOMB | 0 | selects the bomb's table |

## Where this design departs from the original

- **Clocking.** The motion logic originally ran on vsync as a clock. Here it
  runs on the pixel clock with a per-frame enable.
- **Clock source.** The 65 MHz clock was made from 27 MHz by a vendor clock
  manager. Both clocks are inputs here.
- **High-score crossing.** The high score crossing back to 65 MHz gets two
  registers. The original used none.
- **Receiver idle time.** The original description says the idle wait was
  shortened to 200 ns. The original code uses 1300 clocks (20 µs), and that
  value is used here.
- **Flash start-up read.** The original description says the start-up state
  goes straight to CHECK. The original code holds the read request for a count
  first, and that is followed here.
- **Images.** They are stand-in shapes, as described above. Screen positions of
  the text images and the score digits are chosen here. A click is tested
  against the button's rectangle, not its pixels.
- **Limits added here.**
  - Falling speed is limited to 30.
  - The lives-lost output stops at 3.
  - Scores above 99 display as 99.
- **Known behaviour: replay click timing.** The lost-fruit counters clear on
  the first frame after a game ends. A replay click that arrives within that
  same frame (under 17 ms) starts a game that ends at once.
- **Known behaviour: receiver misframing.** The receiver cannot recover if it
  starts inside a packet and misreads a data bit as a start bit. It resynchronises
  only after an idle gap of `HIGH_CYCLES`.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M`. For example, with Verilator 5:

```
verilator --binary --timing -Irtl -y rtl -y tb rtl/fn_pkg.sv tb/tb_game_fsm.sv \
          --top-module tb_game_fsm -Mdir obj_game -o sim
obj_game/sim
```

### Testbenches worth knowing

- `tb_game_fsm` plays the game through the serial input on a real raster. It
  aims the cursor at fruit positions read from inside the design. It counts 13
  mechanisms, from an ignored click to the score clear on replay. Run time is
  about 1.5 minutes.
- `tb_fruit_ninja` is the end-to-end test of the top module, about 2.5 minutes.
  - It shortens gravity, baud rate, debounce, flash hold and sounds.
  - It covers the power-up flash read, start, cuts with their tone, lives lost
    with their tone, game over, the flash erase and write, the jingle, replay,
    the bomb with its tone, Enter, and clearing the high score with Up.
- `tb_fruit_ninja_full` runs one game at the default parameters. It runs at
  about one simulated frame per second, about 5.5 minutes in all (some 330
  frames).
  - The game: power-up read, start, one cut, the bomb, the high-score write and
    the jingle.

The image ROMs are filled by constant functions. A synthesis flow that limits
constant evaluation steps may need that limit raised for the larger text
images.
