# Guitar game hardware for a DE2 board

A rhythm game in the style of "Guitar Hero". A song plays while coloured notes fall
down five vertical strings on a VGA screen. The player presses the matching button on a
five-button guitar as each note crosses a horizontal hit bar. Scoring is shown two ways:
- a row of up to five balls in the top-right corner of the screen;
- the exact count of correct presses, on the four seven-segment displays of the board.

The game logic runs as software on a soft processor. This RTL is everything around it: a
set of small memory-mapped peripherals on the processor's data bus. Each peripheral does
one timing-critical job in hardware and leaves the decisions to software:

| Peripheral | Job |
|---|---|
| beat controller | ROM of the song's beat times (when a note must appear) |
| VGA controller | draws the whole screen from 16 cells the processor writes |
| input controller | cleans up the buttons and interrupts on a press |
| music controller | interrupts for each audio sample, serialises it to the audio codec |
| interval timer | interrupts every 10 ms, the game's time base |
| score controller | one register shown on the hex displays |

The processor itself, its SRAM, the flash chip holding the song samples and the codec's
configuration are not included. The processor's bus is a port of `guitar_top`. The flash is
reached through an address window whose signals are also brought out as ports.

## How the game uses the hardware

The software runs a loop driven by three interrupts:

1. **Timer, every 10 ms.** The processor clears the timeout flag. It moves every note on
   screen 2 pixels down by rewriting the VGA cells. It compares the elapsed time with the
   next entry of the beat ROM; when that time is reached, it puts a new note at the top.
2. **Music, once per audio sample.** The processor reads the next song byte from flash and
   writes it to the music controller. That write also clears the interrupt.
3. **Input, once per button press.** The processor reads which button was pressed. It
   checks that button against the note nearest the bar and updates the score. Then it
   writes to the input controller to clear the interrupt.

`tb/tb_guitar_top.sv` plays exactly this role. It is the clearest example of how to drive
the design.

## Bus and address map

There is one master, the processor, with a 23-bit byte address and 16-bit data. For
on-chip slaves, read data comes back with a `readdatavalid` pulse one cycle after the read.
Flash reads return whenever the external bridge raises `fl_readdatavalid`. Reads of
unmapped addresses return 0.

| Byte address | Slave | Registers |
|---|---|---|
| 0x000000-0x0007FF | beat controller | 1024 x 16-bit beat times, read-only |
| 0x001000-0x00101F | VGA controller | 16 cells, word address = cell number |
| 0x001100 | input controller | read: one-hot key of the last press; any write: clear interrupt |
| 0x001200 | score controller | 16-bit score, shown as four hex digits |
| 0x001300 | music controller | write: next 8-bit sample (clears interrupt); read: last sample |
| 0x001400-0x00140F | interval timer | 0 status {RUN, TO}; 2 control {STOP, START, CONT, ITO} |
| 0x400000-0x7FFFFF | flash window | passed to the `fl_*` ports, 22-bit byte address |

Only the flash base address is from the original design. The other windows are this
design's choice, collected in `guitar_pkg.sv`.

## The screen

The screen is 640x480 at 60 Hz, with a 25 MHz pixel rate made as a clock enable from the
50 MHz clock. The processor never writes pixels. It describes the scene in 16 cells of
15 bits (`cell_t`), and the controller works out every pixel on the fly.

- **Cell 0** is the number of score balls, 0 to 5.
- **Cells 1-15** are notes. Each holds:
  - bits [2:0]: colour code;
  - bits [12:3]: the note's vertical centre, `y`;
  - bit 13: a display flag;
  - bit 14: a "wrong" flag.

  Colour codes 2 to 6 put the note on strings 0 to 4, at `x = 156 + 50*k`. Any other code
  hides the note. The two flags are stored and read back, but they do not change the drawing. Game
  software writes notes as `colour + (y << 3)` with the display flag clear, so hiding a note
  is done with the colour code instead.

For each pixel, 15 copies of `button_display` test in parallel whether the pixel lies in
their note's 32x32 box, which is centred on the string and on `y`. A hit gives:
- the image number (the colour code minus 2);
- the column and row inside the image.

The lowest-numbered cell that hits addresses the sprite ROM at
`image*1024 + column*32 + row`. A note partly above the top edge (`y < 16`) is clipped
correctly, because the box arithmetic is signed.

Each sprite ROM word carries 10-bit blue, green and red fields, and a transparent flag at
bit 30. The pixel colour is the first of these that applies:

1. an opaque sprite pixel;
2. a score ball: discs of radius 20, 16, 12, 8, 4 centred at y = 40 and
   x = 500, 540, 572, 596, 612; only the first *n* are drawn, where *n* is cell 0;
3. the hit bar: x strictly between 140 and 370, y strictly between 380 and 400, cyan;
4. a string: one-pixel white lines;
5. black.

**Pipeline.** The pixel counters advance on the pixel enable. On the next clock, the
following are all registered together:
- the sprite ROM word;
- the hit, ball, bar and string flags.

On the following enable, colour, sync and blank are registered together. So the outputs
for pixel *n* all appear one pixel clock after the counters reach *n*, and they stay
aligned with each other. `vga_clk` rises in the middle of each output pixel. Sync pulses
are active low: 96 pixels of hsync and 2 lines of vsync, and active video starts at pixel
144 and line 35. `vga_sync_n` is held low.

## Buttons

Each of the five active-low buttons passes through three stages:

1. **`debouncer`.** A two-flop synchroniser, then a sample every `DELAY+1` clocks (1 ms at
   the default 50,000) into an 8-bit history. The output changes only when all 8 samples
   agree. A press is therefore seen 7 to 8 ms after the contacts settle, and shorter
   glitches are ignored.
2. **`pulser`.** Turns each press into a single one-clock pulse. After the pulse it waits
   for the button to be released.
3. **Input controller state machine**, with states IDLE, PRESSED and DELAY:
   - A pulse in IDLE records the key as a one-hot code in bits 0-4. If several keys pulse
     in the same cycle, the lowest wins. The machine then moves to PRESSED, which drives
     the interrupt.
   - A bus write moves it to DELAY.
   - After `WAIT_CYCLES` clocks (0.1 s) it returns to IDLE.
   - Presses during DELAY are not reported.

## Audio

The music controller feeds a codec serialiser, `wm8731_audio`, which runs on a clock
enable at a quarter of the system clock (12.5 MHz). The same rate drives the codec
master clock `aud_xck`.

- LRCK toggles every `LRCK_DIV+1` = 781 enable cycles.
- BCLK has a 12-cycle period. Data changes on its falling edge, most significant bit first.
- Each half of the LRCK period sends the same 16-bit word. The 8-bit sample from the
  processor goes in the upper byte, and the lower byte is zero.
- After each falling LRCK edge the serialiser asks for a new sample. The controller then
  sits in WAITING with its interrupt raised until the processor writes a sample.
- A sample written during a low LRCK half goes out in both halves of the next period.
- Writes that arrive while no sample was requested are ignored.
- The game software writes each sample as a signed byte (song value minus 127). Padded
  with a zero low byte, it is a two's-complement 16-bit sample for the codec.
- The serialiser also has a built-in test mode that plays a 48-step sine table. The table
  is computed at elaboration as `floor(32767*sin(2*pi*i/48))`.

**Sample rate.** The original design says it plays 16 kHz, 8-bit samples. The divider it
uses, at the 12.5 MHz rate, gives 12.5 MHz / (2 x 781) = 8003 requests per second. This
design keeps the divider, so the hardware asks for about 8,000 samples per second. Software
playing a 16 kHz recording has to skip every second byte. Alternatively, set `LRCK_DIV` to
389, but then a 16-bit word no longer fits in one LRCK half at the 12-cycle BCLK. Only
serial audio output is built; `aud_adcdat` is ignored.

## Beat times

`beat_rom` holds the song's 465 beat times in units of 10 ms, from 1.80 s to 196.71 s. The
rest of the 1024 words are zero. They are loaded from `rtl/beat_rom.hex`, a path relative to
the directory the simulator runs in. Reads are registered: `chipselect & read` loads the
output, which then holds.

## Timer

`interval_timer` is a cut-down interval timer with a fixed period of `LOAD_VALUE+1` clocks
(500,000 = 10 ms).

- Writing START to the control register reloads and starts it. STOP halts it.
- On reaching zero it sets TO and reloads. It keeps running only if CONT is set.
- Any write to the status register clears TO.
- The interrupt is `TO & ITO`.

The period registers of a full timer are not built. Writes to them are ignored.

The original game first used a home-made timer, a loadable 32-bit down-counter, and later
replaced it with the interval timer. The down-counter is therefore not part of this design.
Neither is a free-running 20-bit counter that was meant as a 20 ms debounce time base: the
debouncer counts its own sampling delay instead.

## Reset and clocking

Everything runs on the one 50 MHz clock, with synchronous active-low reset. `guitar_top`
holds the internal reset low for 2^16 clocks (1.3 ms) after `rst_n` goes high. The same
signal drives `fl_rst_n`. The codec and VGA rates are clock enables, not derived clocks.

## Departures from the original design

- **Note images.** The original images were photographs of buttons, which are not
  available. `sprite_rom` computes each of its five images instead: a disc of radius 13 in
  the note's colour (green, red, yellow, blue, orange), a white rim out to radius 15, and
  transparent corners. Replace the `pixel()` function to use real artwork; the word format
  stays the same.
- **Score balls.** Their geometry and colour are this design's reading of the original
  screen layout. The hit bar's bounds and colour are the original's. There the bar was
  only painted where a note was selected; here it is a background layer.
- **VGA outputs.** The original's blank output was low only during sync pulses, and its
  pixel clock output was the raw 25 MHz clock. Here `vga_blank_n` is low outside the
  visible area and `vga_clk` rises mid-pixel. Colours are black outside the visible area
  in both, so the picture is the same.
- **Transparency.** In the original, a transparent sprite pixel showed its stored colour,
  which is black. Here it shows the background (string, bar or ball) behind it.
- **String colour.** The original's string colour constant decodes to a pale yellow
  (blue field 0x00f), although its comment calls the lines white. Here they are full
  white.
- **Peripherals built here.** The original system got its bus, timer and flash bridge from
  the vendor's system builder. Here the address decoder and the timer are plain RTL. The
  flash bridge is left outside.
- **Rate and period.** Audio requests run at about 8 kHz (see Audio). The timer has a
  fixed period.

## Parameters (top level)

| Parameter | Default | Meaning |
|---|---|---|
| `DEBOUNCE_DELAY` | 50000 | clocks between debounce samples, minus one |
| `INPUT_WAIT` | 5000000 | dead time after a served key press (0.1 s) |
| `TIMER_LOAD` | 499999 | timer period minus one (10 ms) |
| `LRCK_DIV` | 780 | LRCK half period minus one, in 12.5 MHz cycles |
| `POR_BITS` | 16 | power-on reset counter width |

## Simulation

Every module has a self-checking testbench, `tb/tb_<module>.sv`, which prints
`TB_RESULT checks=N failures=M` and stops. A watchdog ends it if it hangs. Run from the
repository root, so that `rtl/beat_rom.hex` is found:

```
verilator --binary --timing -Wno-fatal -Irtl --top-module tb_vga_controller \
    rtl/guitar_pkg.sv rtl/sprite_rom.sv rtl/button_display.sv rtl/vga_controller.sv \
    tb/tb_vga_controller.sv -Mdir obj && ./obj/Vtb_vga_controller
```

For the whole system, pass `rtl/guitar_pkg.sv` first, then the other `rtl/*.sv` files and
`tb/tb_guitar_top.sv`. `tb_guitar_top` runs the complete system at its default parameters
for about 7 million clocks (about 10 s of simulation time). During the run it:
- rejects a glitch;
- serves two presses and ignores one inside the dead time;
- plays over a thousand samples fetched through the flash window, and checks every word
  sent to the codec;
- checks the 10 ms tick period, beat reads and the score on the displays;
- checks note, ball, bar and string pixels of a frame on the VGA outputs.

It prints how often each of these happened. A mechanism that never happened counts as a
failure.

`tb_song_workload` plays the whole song's note schedule, all 465 beats, through the
system. It shortens the timer tick to 200 clocks and keeps every other size at its
default. Acting as the game software, it:
- moves the notes 2 pixels per tick;
- places a new note in a free cell whenever the tick count reaches the next beat time;
- frees notes that leave the screen.

It checks that a free cell is always there and that the beat times never go backwards. It
reports the most notes on screen at once: 7 for this song, against 15 cells. At the end it
checks on the VGA outputs that every visible note is drawn in its colour.

The block testbenches use small settings where the defaults would make them slow, such as
a 3-clock debounce sample or a 100-clock timer. They check cycle counts where the design
has a rate:
- debounce settling time;
- LRCK half period and request position;
- timer period;
- VGA line and frame lengths and sync widths.
