# Space Shoot: a mouse-driven shooting game in SystemVerilog

A small arcade game built entirely in logic, for a 50 MHz FPGA board with a
PS/2 mouse and a VGA monitor. A ship sits near the bottom of a 640x480
picture. Three rows of aliens sweep sideways above it and bob up and down.
The left mouse button moves the ship left and the right button moves it right.
The middle button fires a missile. A missile that touches a live alien kills
it and scores 2 points. When all three rows are empty, the level goes up and
a new wave starts from the top.

There is no processor and no stored picture of the game. Every object is
drawn "on the beam": for each pixel the VGA scan reaches, the logic decides
which object, if any, covers it. Collision works the same way. An alien dies
when one scanned pixel belongs both to the missile and to that alien's
image.

## Block structure

```
             +--------------+  buttons   +----------------------------------------+
PS/2 mouse --| io_ps2_mouse |----------->| graphics                               |
 (open drain)|  ps2_tx      |            |  spaceship   missile   alien_motion    |
             |  ps2_rx      |            |  alien_group x3 (alien_rom)           |
             +--------------+            |  game_score  bin2bcd x2  text_display |
                                         |  frame_buffer (background)            |
             +--------------+  px_x/y    |  pixel_mux                            |
             |  vga_sync    |----------->|                      rgb_stream --+   |
             +--------------+ p_tick,    +-----------------------------------|---+
                 hsync, vsync video_on                                       |
                                                   rgb_out_reg (falling edge) --> rgb
```

`space_shoot_main` is the top. It has four parts:

- `io_ps2_mouse` is the mouse host.
- `graphics` holds the game and the pixel generation.
- `vga_sync` makes the timing.
- `rgb_out_reg` is an output flip-flop clocked on the falling edge.

All shared types and constants are in `space_shoot_pkg`. These include the
screen and frame-buffer sizes, the 3-bit colour type `rgb_t`, the colours of
the objects, and the PS/2 command codes.

Top-level ports:

| Port | Dir | Meaning |
|---|---|---|
| `clk` | in | 50 MHz clock |
| `not_reset` | in | synchronous, active-low reset |
| `ps3_clk_in`, `ps3_dat_in` | in | PS/2 clock and data lines as seen at the pins |
| `ps3_clk_out`, `ps3_dat_out` | out | open-drain drive: 0 pulls the line low, 1 releases it |
| `write`, `wr_addr[16:0]`, `wr_data[2:0]` | in | frame-buffer write port |
| `read`, `rd_addr[16:0]` | in | frame-buffer second read port |
| `rd_data[2:0]` | out | frame-buffer second read port data |
| `hsync`, `vsync` | out | VGA sync, active low |
| `rgb[2:0]` | out | one bit each of red, green, blue |

On a board, each PS/2 line is the wired AND of the mouse and the matching
`*_out` pin. That is an open-drain pad with a pull-up. The pad and the VGA
resistor network are board-level parts and are not part of this RTL.

## The PS/2 mouse host (`io_ps2_mouse`, `ps2_rx`, `ps2_tx`)

The mouse sends nothing until the host enables data reporting, so after
reset the host sends the command byte 0xF4. Host-to-device transfer
(`ps2_tx`) works like this:

1. The host holds the clock line low for `INHIBIT_CYCLES` (5000 clocks = 100 µs).
2. It pulls data low as a start bit and releases the clock.
3. The mouse then generates the clock. The host changes the data line after
   each falling edge: 8 data bits LSB first, odd parity, then a released stop bit.
4. On the eleventh falling edge the mouse pulls data low as an acknowledge.
   `ack_ok` records that.

The mouse answers with 0xFA, and `mousePresent` is then set. After that,
every movement or button change produces a three-byte packet.

Device-to-host frames (`ps2_rx`) are 11 bits: a start bit 0, 8 data bits LSB
first, odd parity, and a stop bit 1. The mouse clock is 10–17 kHz and
unrelated to the system clock. It is synchronised and then filtered: it must
be stable for `FILTER_LEN` clocks before an edge counts. Data is sampled on
each filtered falling edge. A frame with a bad start, parity or stop bit is
flagged with `rx_err`.

Packet assembly:

- Byte 1 carries L (bit 0), R (bit 1), M (bit 2), an always-1 bit 3, the X
  and Y sign bits (4, 5) and two overflow bits.
- Bytes 2 and 3 are the low 8 bits of the X and Y offsets. `deltaX` and
  `deltaY` are the 9-bit two's complement values.
- A bad frame, or a "first byte" whose bit 3 is 0, throws away the packet in
  progress. This is how the host falls back into step with the mouse.
- When the third byte arrives, all outputs update together and `trigger`
  pulses for one clock.
- `deltaZ` (wheel) is always 0, since a plain three-byte mouse has no wheel.

The game only uses the three button bits. The offsets are decoded but not
used.

## VGA timing (`vga_sync`)

This is standard 640x480 at about 60 Hz: 800 pixel times per line and 525
lines per frame. `p_tick` is high on every second 50 MHz clock, so the pixel
rate is 25 MHz. A frame is 840,000 clocks (16.8 ms).

The porch and sync widths are parameters with the usual values:

- horizontal: 16, 96 and 48;
- vertical: 10, 2 and 33.

`hsync` and `vsync` are registered and active low. `pixel_x`/`pixel_y` are
the counters. `video_on` marks the visible area.

## The game (`graphics` and its sub-blocks)

### One update per frame

`frame_tick` is a one-clock pulse when the scan reaches the first line below
the picture (row 480, column 0). The screen is blank then, so state can
change without tearing the image. On each `frame_tick`:

- **Ship** (`spaceship`). It moves `SHIP_STEP` = 4 pixels left or right while
  a button is held, and stops at the screen edges. It is a 32x16 green
  triangle on row `SHIP_Y` = 440, starting at x = 304.
- **Missile** (`missile`). Only one is in flight at a time. If fire is held
  and no missile is flying, one is launched from the middle of the ship. It
  is 4 pixels wide and `MISSILE_H` = 8 high. It climbs `MISSILE_STEP` = 8
  pixels per frame. It disappears at the top of the screen, or at once when
  it hits. Holding fire therefore fires again as soon as the previous missile
  is gone.
- **Alien formation** (`alien_motion`). It takes one step every
  `MOVE_FRAMES` = 30 frames (twice a second).

### Alien motion

The formation is placed by one "master" coordinate: its top-left corner,
starting at (192, 98). At each step:

- Horizontally, it moves 16 pixels in its current direction. If the step
  would take the formation's right edge past 640, or its left edge below 0,
  the direction reverses instead. On that step the formation does not move
  sideways. `A_WIDTH` = 368 is the formation width: 8 aliens at a 48-pixel
  pitch, minus the gap after the last.
- Vertically, it alternates between 4 pixels up and 4 pixels down, so the
  rows bob in place rather than descend.

`restart` puts the coordinate, direction and vertical phase back to their
start values.

### Aliens, drawing and collision (`alien_group`, `alien_rom`)

Each of the three rows is an `alien_group` with `N_ALIENS` = 8 aliens at
`PITCH` = 48. Rows are `ROW_PITCH` = 48 pixels apart, and a bit vector
`alive` tracks which aliens remain.

For a scanned pixel, the row works out four things:

- the pixel's offset from its origin;
- which alien slot covers it (offset / PITCH);
- the column inside the slot (offset mod PITCH);
- whether that position lies inside the 32x32 alien cell.

`alien_rom` holds the image. It is an 11x11 bitmap, each bit drawn as 2x2
pixels and centred in the 32x32 cell with a 5-pixel margin. The ROM is a
constant table, with no memory block. The alien is drawn only if its `alive`
bit is set.

Collision is tested at the same place. On a `p_tick` where the scanned pixel
is both a live-alien pixel and a missile pixel, that alien's `alive` bit is
cleared and `hit` pulses. The OR of the three rows' `hit` is `destruction`.
It removes the missile at once, so one missile kills at most one alien.
Since every visible pixel is scanned, a hit is found at most one frame after
the missile first overlaps an alien. A hit in a blank gap of the sprite (for
example between the legs) does not count.

### Score, level and restart (`game_score`, `bin2bcd`, `text_display`)

- Each `destruction` adds 2 to the 10-bit score.
- When all three rows report `defeated`, `restart` pulses for exactly one
  clock. The same clock raises the 8-bit level by one. An assertion checks
  that `restart` never stays high for two clocks.
- `restart` brings every alien back and returns the formation to its start.
  Score and level are kept.
- Two combinational double-dabble converters (`bin2bcd`) turn score and level
  into decimal digits.
- `text_display` writes `SCORE dddd LEVEL ddd` at (8, 8). It uses an 8x8 font
  scaled to 16x16 per character.

### Background frame buffer (`frame_buffer`)

The background comes from a 320x240 memory of 3-bit pixels (230,400 bits).
It has one write port and two synchronous read ports.

- **Read port A** follows the scan at address `(px_y/2)*320 + px_x/2`, so
  each stored pixel covers a 2x2 block of the screen.
- **The write port and read port B** are brought out of the top. External
  logic can paint the background, or read it back, while the game runs.

The memory powers up filled with the background colour (red). Its
simulation-only initial loop maps to BRAM initial contents in synthesis.

### Pixel priority and pipeline (`pixel_mux`, `rgb_out_reg`)

`pixel_mux` picks the colour in this order:

1. text (white)
2. missile (cyan)
3. ship (green)
4. alien (yellow)
5. the frame-buffer background

Outside the visible area the output is black.

Timing from coordinate to pin:

- The coordinates change on the clock where `p_tick` is high.
- The frame-buffer word arrives one clock later, on the next `p_tick` clock.
- `rgb_stream` is registered there, so it lags the coordinates by one pixel.
- `rgb_out_reg` adds half a clock (it samples on the falling edge).

The picture therefore sits one pixel (40 ns) right of the sync pulses. This
is well inside the porches.

## Parameters

All parameters are on `space_shoot_main` and passed down:

| Parameter | Default | Meaning |
|---|---|---|
| `N_ALIENS` | 8 | aliens per row |
| `MOVE_FRAMES` | 30 | frames between formation steps |
| `SHIP_STEP` | 4 | ship pixels per frame |
| `MISSILE_STEP` | 8 | missile pixels per frame |
| `MISSILE_H` | 8 | missile height |
| `ALIEN_X0` | 192 | formation start x |
| `INHIBIT_CYCLES` | 5000 | PS/2 request-to-send hold time |

The formation width (`A_WIDTH`) is computed from `N_ALIENS` and the pitch.

## Where the design follows its source and where it chooses

The following come from the description this design was built from:

- the block split;
- the signal names (`nes_left`, `nes_right`, `nes_a`, `px_x`, `px_y`, `p_tick`, `video_on`, `rgb_stream`, `fd_1`, the `ps3_*` pins);
- the 3-bit colour;
- the 32x32 alien cell and its bitmap;
- the alien motion rules (±16 sideways, reversing at the edges; ±4 up and down);
- the start coordinate (192, 98);
- the score rule (+2 per kill; new wave and level + 1 when all three groups are defeated);
- pixel-level collision;
- the 320x240x3 frame buffer with two read ports and one write port;
- the falling-edge output flip-flop.

These are this design's own choices:

- **Buttons.** Left moves left and right moves right. One drawing of the
  original wiring shows the two crossed; the written description, followed
  here, does not.
- **PS/2 host.** The 0xF4/0xFA start-up, the request-to-send timing, clock
  filtering and packet resynchronisation are the standard PS/2 procedure.
  The source only states that the mouse sends and receives serial data.
- **Speeds and sizes.** All speeds, the ship shape and position, the missile
  size, the alien pitch, the colours, the text layout and the font are
  chosen here. The alien count per row (8) is read from a photograph of the
  running game.
- **Frame buffer use.** Using the frame buffer as the background layer, and
  exposing its spare ports at the top, is an interpretation. The source
  gives the memory but not what fills it.
- **Timing details.** The update point at the start of vertical blanking and
  the one-pixel output lag are this design's.
- **Output width.** `rgb_stream` is 3 bits wide. One figure of the source
  labels it 10 bits; the text says 3.
- **Explosion.** An explosion picture after a kill is not drawn. Only its
  signal names exist in the source.
- **Game over.** There is no game-over state. Clearing all aliens starts the
  next level.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/ps2_mouse_model.sv`
is a behavioural mouse. It answers 0xF4 with 0xFA, checks the parity of host
commands, and sends packets with chosen buttons and offsets.

With Verilator 5, for example:

```
verilator --binary --timing -Irtl -Itb rtl/space_shoot_pkg.sv \
  $(ls rtl/*.sv | grep -v space_shoot_pkg) tb/ps2_mouse_model.sv \
  tb/tb_space_shoot_main.sv --top-module tb_space_shoot_main -o sim
./obj_dir/sim
```

For a single block, list the package, the block's files and its testbench.
`tb_graphics`, `tb_space_shoot_main` and `tb_space_shoot_full` also need
`tb/space_shoot_tb_common.svh` on the include path (`-Itb`).

The system-level tests are:

- **`tb_space_shoot_main`** runs the whole design with the mouse model at
  small settings: 2 aliens per row, formation start near the right edge,
  fast steps and a short inhibit time. It drives real PS/2 packets. It then
  runs these mechanisms:
  - mouse enable;
  - left and right moves;
  - formation steps and both turns at the edges;
  - missile launch;
  - a miss that leaves the screen;
  - hits on all six aliens;
  - score and level;
  - the wave restart;
  - frame-buffer writes and reads through the top ports.

  It counts each mechanism and fails if any never happened. It also captures
  whole frames from the `rgb` pins and checks the picture. It takes about two
  minutes (about 160 frames).
- **`tb_space_shoot_full`** uses every default, with no parameter overrides.
  It enables the mouse, checks the first picture, and steers the ship. It
  then fires until an alien is hit, and checks score 2 and the picture after
  the hit. It takes about 60 frames (under a minute).

Simulating one frame takes 840,000 clocks, about half a second of run time.
Verilator is a two-state simulator, so every register that is read has a
reset or an initial value.

## Synthesis notes

The design is plain synthesizable SystemVerilog with no vendor primitives.

- The frame buffer needs 230,400 bits of block RAM. Two read ports and one
  write port map to two simple-dual-port copies, or to a true dual-port RAM
  plus one more. Add the pattern and font tables, which are small
  constant ROMs.
- Without the frame buffer, the logic is a few hundred flip-flops and under a
  thousand generic cells.
- `rgb_out_reg` uses the falling clock edge. Constrain it as a half-cycle path
  from the `graphics` pipeline register.
