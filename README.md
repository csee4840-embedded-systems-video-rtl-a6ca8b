# Monster Casino display and sound peripheral

Monster Casino is a slot-machine and monster-battle game for an FPGA board
with an ARM processor (the DE1-SoC). All the game logic runs as software on
the processor: it reads the joystick, decides what happens, and talks to a
second board over the network. The FPGA only shows the game and plays its
sound. The software controls the FPGA through **eight 32-bit registers**. Each
register describes one group of things on screen: the boss, the sound, the
background, the slots and the enemy weapon, the elf's weapon, the elf and the
enemy, the character values, and the menu pointer. From these registers the
hardware draws every frame on its own.

This RTL is that peripheral. It has four parts:

```
 Avalon-MM write ──► avalon_regs ──► game_cmd_decoder ──► ppu ──────────► VGA DAC
                     (8 x 32 bit)    (fields -> commands)  ▲  picture ROMs,
                                            │              │  colour table,
                                            │         vga_timing  hard-coded shapes
                                            └──► audio_gen ─────────► codec interface
                                                 (8 kHz, 16 bit)      (Avalon-ST L/R)
```

The main idea is that the pictures are stored in ROM, not drawn by software.
The software never writes pixels. It only sets positions, picture numbers,
enable bits and a few values, so one register write changes what is shown.
Everything on screen is either a ROM picture or a simple shape made by logic.

## Register map

All registers are write-only. Their word addresses are 0 to 7, which are byte
offsets 00 to 28. The renderer samples them every clock, so a write shows up
from the next pixel drawn. To avoid tearing, software should write them during
vertical blank. The field names are the game's own. Reserved bits are ignored.

| Offset | Register | Bits: field |
|---|---|---|
| 00 | BOSS | 31:12 attack address (not drawn) · 11:8 boss blood (0–15) · 7:4 boss pattern (bits 5:4 pick one of 4 pictures) · 3 blood bar enable · 2 boss enable |
| 04 | SOUND | 19 stored-music enable · 18 tone enable · 17:0 tone half period, in clocks |
| 08 | BACKGROUND | 31:18 menu word enables · 17:14 fire size (flame tiles, at most 13) · 13:10 elf blood · 9:6 enemy blood · 5 fire enable · 4 elf blood bar · 3 enemy blood bar · 2 wall enable |
| 12 | SLOTS & WEAPON | 31:23 enemy weapon X · 22:14 enemy weapon Y · 13 enemy weapon shape · 12 enemy weapon enable · 11:9 slot 2 · 8:6 slot 1 · 5:3 slot 0 (pictures 0–4; 5–7 show nothing) · 2 slots visible |
| 16 | WEAPON | 31:23 elf weapon X · 22:14 elf weapon Y · 13:10 elf weapon colour · 9:7 elf weapon shape · 6 elf shield · 5 enemy shield · 4 elf attack (weapon visible) |
| 20 | ELF | 31:23 elf Y · 22:14 elf X · 13:12 enemy pattern (bit 12 picks the picture) · 11 elf picture · 10 enemy action · 9 elf action · 8 enemy fold · 7 elf fold · 6 enemy visible · 5 elf visible |
| 24 | CHAR | 31:24 HP · 23:16 ATK · 15:10 level · 9:4 coin |
| 28 | POINTER | 31:23 X · 22:14 Y · 13:10 colour · 9:6 move (not used) · 5 visible |

The published register table is the least certain part of this design. Its
field order and names are reliable. Its bit widths were partly rebuilt:

- X and Y fields are 9 bits, so the pointer, the elf and the weapons can reach
  x = 0 to 511.
- Each slot field is 3 bits, because there are five slot pictures.
- The boss attack address and the pointer move fields have no known effect,
  so nothing uses them.
- The sound register's fields are this design's own choice. The original only
  says the melody is set by writing a register.

The layouts live in `rtl/mc_pkg.sv` as packed structs (`boss_reg_t` and the
others). To change the map, edit those structs. The decoder follows them
automatically.

## What the decoder adds

`game_cmd_decoder` turns the raw fields into drawing commands (`draw_cmd_t`).
Its output is registered, so a command lags its register by one clock. It
does the following:

- **Blood bars.** A bar is 8 pixels long per blood step for the elf and the
  enemy, and 16 pixels per step for the boss. It is drawn only when its owner
  is visible.
- **Fold and action.** Fold mirrors a picture left to right. Action moves the
  sprite 16 pixels toward its opponent, as an attack lunge. The elf faces right
  and the enemy faces left.
- **Enemy position.** No register gives the enemy a position. It stands at the
  fixed point (448, 280).
- **Slot checks.** A slot number of 5 or more is marked as missing and is not
  drawn.
- **Read-outs.** Coin, level, ATK and HP become three decimal digits each.

## The picture generator (`ppu`)

For each screen position, the picture generator checks every element in the
order below. The first element that covers the pixel with a non-transparent
colour wins:

1. pointer: an 8x8 arrow in one of 16 fixed colours
2. text: the menu line `SLOT CATCH BATTLE BOSS ONLINE`, with one enable bit
   per word, and the labels `COIN LV ATK HP` (5x8 font ROM)
3. read-outs: three 16x16 digits per value (digit ROM)
4. elf weapon: a 16x16 shape, one of ball, diamond, block, cross, ring,
   horizontal bolt, vertical bolt or X, in 16 colours
5. enemy weapon: a 16x16 disc or diamond
6. shields: rings 36 to 40 pixels from the centre of the elf or the enemy
7. blood bars: 4 pixels high
8. elf, then enemy: 64x64 pictures. Both come from one ROM with two read ports,
   because they can share a scan line.
9. boss: a 96x128 picture at (272, 120)
10. slots: three 100x128 pictures at x = 170, 270 and 370, y = 176
11. flames and walls: 32x32 tiles. Flames stack up from the floor in both
    bottom corners. A wall frame runs round the screen, with a floor row at the
    bottom.
12. black

A ROM picture stores one byte per pixel. The byte indexes a 256-entry colour
table (`color_table`), and **byte 0 is transparent**. Storing one byte instead
of three cuts the ROM size by a factor of three. The hard-coded shapes (4 to
7) carry their own 24-bit colour and need no ROM.

**Pipeline.** The 50 MHz clock runs at twice the pixel rate.
`vga_timing` advances its counters every other clock, giving standard
640x480 at 60 Hz: 800x525 pixels per frame with a 25 MHz pixel clock. The
renderer itself runs on every clock:

| stage | work |
|---|---|
| 0 | every element's hit test and ROM address, from x and y |
| 1 | ROM bytes arrive (one-clock ROMs); hits are registered; the top element is chosen |
| 2 | colour-table lookup (registered) |
| 3, 4 | output registers |

Colour, syncs and blank leave **4 clocks after** their counter values, which
is exactly two pixels. Because the delay is even, `VGA_CLK` keeps its phase:
each colour is steady for two clocks, and `VGA_CLK` rises in the middle of it.

Screen positions, stacking order, shapes and colours are this design's own
choices. They are collected in `mc_pkg` and at the top of `ppu.sv`.

## Picture and sound contents

The original pictures and music were converted from image and MIDI files and
are not included. Every ROM is filled instead with a test pattern that is
computed when the ROM is initialised. Each ROM's header gives its formula:

- **Sprites.** A white one-pixel frame, then an ellipse whose colour depends
  on the picture number, the row band and the left or right half. The area
  outside the ellipse is transparent. Because the pattern is not symmetric,
  mirroring can be seen.
- **Tiles.** A checkerboard of 8x8 blocks.
- **Font.** Letters A to Z and digits 0 to 9 in a common 5x7 font.
- **Digits.** Seven-segment shapes.
- **Colour table.** 3-3-2 RGB: bits 7:5 are red, 4:2 green and 1:0 blue, each
  widened to 8 bits by repeating its bits.
- **Music ROM.** A 250 Hz triangle wave.

To load real pictures, pass a hex file through `pic_rom`'s `INIT_FILE`
parameter (the `SLOT_FILE`, `BOSS_FILE`, `ELF_FILE` and `TILE_FILE` parameters
of `ppu`). Use one byte per line, with pixel (x, y) of picture i at line
(i·H + y)·W + x. `music_rom` takes one 16-bit word per line in the same way.
`tb/pic_rom_tb.sv` tests this loading path with a small file,
`tb/pic_rom_small.hex`.

ROM sizes follow the original picture table: slots 64,000 bytes, boss 49,152,
elf 8,192, background 7,168, font 2,120 bits, digits 2,560 bits and music
8,192 bytes. That is about 138 KB in total, well within the board's on-chip
memory. The original text gives 60,000 bytes for the slots, but its own
dimensions (100x128x5) and the memory configuration both give 64,000.

## Sound (`audio_gen`)

A counter divides the clock to the 8 kHz sample rate: 6,250 clocks per sample
at 50 MHz. Each sample is a signed 16-bit value, the saturating sum of two
sources:

- **Tone.** A square wave of ±4096 that toggles every `half_period` clocks.
  Its frequency is 25,000,000 / `half_period` Hz; for example, 50,000 gives
  500 Hz. Software plays a melody by rewriting this period.
- **Stored music.** `music_rom` is read at one sample per period and loops.
  Clearing its enable restarts it from the beginning.

The same sample goes to the left and right Avalon-ST channels of the board's
audio codec interface, which buffers samples in its own FIFO. A channel keeps
its sample and `valid` until `ready` is seen high. If a new sample comes while
the old one is still waiting, the new one is dropped. An assertion checks that
a waiting sample stays stable.

## Departures and limits

- The bit widths of the register map are partly reconstructed, as described
  under "Register map".
- The ROM contents are test patterns, not the game's art or music.
- The following parts are left outside, as ports or not at all: the audio
  codec interface, its PLL, the codec itself, the processor software, USB input
  and Ethernet.
- The original system placed a separate weapon picture memory. Here, as in the
  original's own description of its graphics, the weapons are drawn by logic,
  so there is no weapon ROM.
- Several pictures are stored but never shown, because no register selects
  them: the second wall and floor tiles, and the reward symbol.
- With the test-pattern contents the sound mixer cannot reach saturation. The
  highest sum is 8192 + 4096.
- There is no read-back of the registers, and no frame-synchronous update of
  them.

## Simulating

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` at the end. To build and run one with Verilator:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/mc_pkg.sv tb/ppu_tb.sv --top-module ppu_tb -o sim
./obj_dir/sim
```

`tb/monster_casino_tb.sv` tests the whole peripheral at its default
parameters, in a few seconds. Acting as the game software, it writes the
registers for three game modes: slot, battle and boss. For each mode it
captures a full 640x480 frame from the VGA pins and compares pixels against
colours it works out itself. It also checks the line and frame lengths, the
tone, the music, the mix and a stalled audio channel, and it reports how often
each of these happened. The other testbenches cover single modules: the
register file, the decoder, the VGA timing, the sound source, the renderer
(single pixels, stacking order, latency), and each ROM and the colour table.
