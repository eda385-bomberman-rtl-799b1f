# Bomberman console hardware

This is the custom logic of a small game console in the style of the Super
Nintendo. It runs a four-player Bomberman game on an FPGA. A soft processor
runs the game. It sees three kinds of peripherals as memory:

- **GPU.** A tile-and-sprite graphics processor. It works out the colour of each
  pixel of a 640x480, 60 Hz VGA picture just as the raster reaches that pixel.
- **Sound generator.** A sample ring buffer that software keeps full. It is played
  at 39.06 kHz through an 8-bit pulse-width modulator into a speaker.
- **Gamepad interfaces.** Four of them, one per NES pad. Each reads its pad's eight
  buttons over the pad's latch/clock/data wires.

All of this is plain synthesizable SystemVerilog at a single 100 MHz clock. The
processor, its memories, the bus, the interrupt controller and the SPI flash
that holds the game data are not included. Their side of each peripheral
comes out of the top module as a simple block-RAM style port.

```
              +-------------+  hcount/vcount/active/pix_tick
              | vga_timing  |------------------+
              +-------------+                  |
                 | hsync/vsync (delayed 4 clk) v
                 |                     +----------------------------------+
 gpu_* port ---->|-------------------->| gpu                              |
                 |                     |  gpu_addresser  (host decode)    |
                 |                     |  gpu_tilemap    MAP + TILES      |--> rgb 6/6/6
                 |                     |  gpu_sprite     SAM + SPRITES +  |
                 |                     |                 LINE BUFFER      |
                 |                     |  gpu_palette    PALETTE          |
                 |                     |  gpu_interrupt                   |--> irq
                 |                     +----------------------------------+
 snd_* port ----> sound_generator --(sample_tick, sample_data)--> pwm --> pwm_out
 pad_en/rdata <-> gamepad_if x4 <--> pad_latch / pad_pulse / pad_data
```

## Picture: tiles, sprites and palettes

All graphics are built from 16x16-pixel bitmaps with 4 bits per pixel. A 4-bit
value is not a colour. It is an index into a **palette** of 16 colours. Each
tile or sprite also names one of 16 palettes, so the same bitmap can appear in
different colours. Each palette entry is an 18-bit word holding red, green and
blue as 6 bits each: `{r[17:12], g[11:6], b[5:0]}`.

There are two layers:

- **Background.** A fixed grid of tiles, described by a map.
- **Foreground.** Up to 512 sprites, each placed at any X/Y.

A sprite pixel with colour index 0 is transparent. Where the sprite layer is
transparent, the tile shows through.

### Logical pixels

The GPU works on **logical pixels of 2x2 screen pixels**, so the picture is
320x240 logical pixels (`SCALE_SHIFT = 1`). This makes the other sizes fit:

- A sprite's position fits the 18-bit attribute word: 9-bit X, 8-bit Y and an
  enable bit.
- A sprite line fits one 512-entry half of the line buffer.

The visible background is 20x15 tiles. `SCALE_SHIFT = 0` gives native
640x480 addressing. Sprites are then limited to the left 512 columns and the
top 256 lines, and the map is addressed modulo its size.

## Sprite rendering, one line ahead

This is the part to understand first. How much work a pixel needs depends on
how many sprites cover it, so the sprite layer cannot be computed on the fly
the way the background is. Instead, `gpu_sprite` draws each logical line into
a **line buffer** before that line is shown.

### Line buffer and when a render starts

The line buffer has two 512-entry halves. The half is chosen by the least
significant bit of the logical line number. While the display reads one half,
the render FSM fills the other.

A render starts at `hcount == 0` of the physical line just before a new logical
line. It writes that logical line. For line 0 this is physical line 524, the
last line of vertical blanking. A render therefore has one physical line, 3200
clocks, before its line appears.

### The render FSM

Each step takes one clock.

| state | clocks | work |
|---|---|---|
| CLEAR | 512 | write "transparent" to every entry of the target half |
| POS_REQ, POS_CHK | 2 per slot | read SAM word 0. Go on with the slot only if `enable` is set and `line - y` (mod 256) is below 16. |
| ATTR_REQ, ATTR_CHK | 2 | read SAM word 1 and keep it. Mirror the bitmap row if `invy` is set. |
| PIX (16) + DRAIN (1) | 17 | read the 16 pixels of the row, mirrored if `invx` is set. Write each non-transparent one as `{transparent=0, palette, colour}` at `(x + i) mod 512`. |

- **Render time:** `1536 + 19*n` clocks for `n` sprites on the line, so up to 87
  sprites fit on one logical line.
- **Overlaps:** later slots are written over earlier ones. Software that sorts the
  slots by Y therefore draws sprites lower on the screen in front.
- **Overrun:** if a render is still running when a physical line begins,
  `sprite_overrun` pulses. The render carries on, so that line may appear
  partly drawn. The next start always restarts the FSM.
- **Wrap-around:** X and Y wrap, modulo 512 and 256. A sprite can therefore
  enter the screen from the left or top edge.

### Sprite Attribute Memory (SAM)

The SAM has 512 slots of two words each. Slot `s` uses words `2s` and `2s+1`.

| word | bits |
|---|---|
| 0 (`sam_pos_t`) | `[17]` enable, `[16:8]` X, `[7:0]` Y (logical pixels, top-left corner) |
| 1 (`sam_attr_t`) | `[17]` invy, `[16]` invx, `[15:12]` palette, `[11:0]` bitmap index (low 6 bits used) |

### Bitmap memories

Sprite and tile bitmaps are stored the same way. Each word holds 4 pixels of a
row in bits `[15:0]`, with the leftmost pixel in `[3:0]`. The word address is
`{bitmap_index, row[3:0], column[3:2]}`, so each bitmap is 64 words.

## Background and colour pipeline

`gpu_tilemap` looks up the background directly from the raster counters:

1. The logical position selects a MAP entry. The MAP is 32x16 entries, row-major,
   and each entry has the same layout as SAM word 1; the flip bits are ignored.
2. The entry's bitmap index and the pixel's row and column select a word of
   TILES.
3. The pixel's nibble is the colour index.

In parallel, the sprite line buffer is read at the same logical position.
`gpu_palette` then does three things:

1. It picks the sprite's colour and palette if the sprite entry is not
   transparent, and the tile's otherwise.
2. It reads the palette RAM at `{palette, colour}`.
3. It forces black outside the visible area.

Latencies, counted from the clock in which `hcount/vcount` change:

| stage | clocks |
|---|---|
| tilemap (MAP, then TILES) / line buffer read | 2 |
| palette read + RGB register | 2 |
| **rgb valid** | **4** (one pixel at 25 MHz) |

`bomberman_top` delays hsync and vsync by the same 4 clocks.

## Host interfaces

Every host port works the same way:

- Inputs are enable, write enable, word address and write data.
- A write takes effect in the clock of the access.
- Read data is valid in the clock after the enable.
- Data is 18 bits, the block-RAM word width.

### GPU address map

Word addresses on the GPU port, decoded by `gpu_addresser` from bits `[14:12]`:

| base | memory | words | contents |
|---|---|---|---|
| 0x0000 | MAP | 512 | tile map entries |
| 0x1000 | TILES | 4096 | 64 tile bitmaps |
| 0x2000 | SAM | 1024 | 512 sprite slots |
| 0x3000 | SPRITES | 4096 | 64 sprite bitmaps |
| 0x4000 | PALETTE | 256 | 16 palettes x 16 colours |

Regions 5 to 7 read as 0 and ignore writes. All memories can be read back; for
example, software can read the SAM to sort sprites.

### Vertical blank interrupt

`irq` pulses for one clock at the start of line 480, once per frame. Game
software uses it to update its state and the GPU memories while nothing is
drawn.

## Sound: ring buffer and PWM

`sound_generator` holds a 1024-word buffer with two 8-bit samples per word. The
first sample is in `[7:0]` and the second in `[15:8]`, so the buffer holds 2048
samples.

- **Playback.** An 11-bit sample address advances every 2560 clocks. That is
  10 PWM periods of 256 clocks, or 39.06 kHz. The address wraps at the end of
  the buffer, so the buffer plays as a ring.
- **Half flag.** The top bit of the address says which half is playing. Every
  read of the sound port returns this bit in `data[0]`.
- **Refill.** Software polls the flag. When it changes, software refills the
  other half with the next 1024 samples, which take 26 ms to play.

`pwm` keeps an 8-bit counter running at 100 MHz:

- The output goes high when the counter starts a period.
- It goes low when the counter equals the sample.
- Each 256-clock period is therefore high for `sample` clocks. A sample of 0
  gives a constant low.
- A new sample is captured on `sample_tick` and used from the next counter wrap,
  so no period is cut short.
- Each sample lasts exactly ten periods.

## Gamepads

Each `gamepad_if` drives one NES pad. The pad holds an 8-bit parallel-load
shift register. Timings at 100 MHz:

- **LATCH:** high for 12 us (`LATCH_CYCLES`), then low for 6 us.
- **PULSE:** eight pulses, each 6 us high and 6 us low (`HALF_CYCLES`).
- **Bit order:** A, B, Select, Start, Up, Down, Left, Right. A is on DATA right
  after the latch. Each rising PULSE edge brings the next bit.
- **Sampling:** each bit is read at the end of a low phase, just before the next
  rising edge. DATA first passes through a two-flip-flop synchronizer.
- **Storage:** the word goes to the `buttons` register, with bit 0 = A and bit
  7 = Right. A standard pad drives a pressed button as 0, and the register
  stores DATA exactly as received.
- **Rate:** one read takes 114 us and repeats every 1,666,667 clocks (60 Hz).

## Files

| file | contents |
|---|---|
| `rtl/bomberman_pkg.sv` | VGA timing constants, word layouts (`sam_pos_t`, `sam_attr_t`, `lb_entry_t`, `rgb_t`), GPU address regions |
| `rtl/bomberman_top.sv` | top: timing, GPU, sound, PWM, four pad readers |
| `rtl/vga_timing.sv` | 640x480 counters and sync, pixel every `CLK_DIV` clocks |
| `rtl/gpu.sv` | GPU: addresser, interrupt, tilemap, sprite handler, palette |
| `rtl/gpu_tilemap.sv`, `rtl/gpu_sprite.sv`, `rtl/gpu_palette.sv`, `rtl/gpu_addresser.sv`, `rtl/gpu_interrupt.sv` | GPU parts |
| `rtl/sound_generator.sv`, `rtl/pwm.sv` | audio |
| `rtl/gamepad_if.sv` | one NES pad reader |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

Memories are plain arrays with one synchronous read per port. A synthesis tool
should map them to dual-port block RAMs. In total there are 189 kbit of memory
and about 510 flip-flops.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself, and a
watchdog ends a run that hangs. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb --top-module tb_bomberman_top \
    rtl/bomberman_pkg.sv tb/tb_bomberman_top.sv -y rtl -y tb +libext+.sv
./obj_dir/Vtb_bomberman_top
```

Replace the top-module name to run another testbench.
`tb_bomberman_top` runs the whole design at its default sizes for 5.4 million
clocks (about 3.2 frames) and finishes in about 10 seconds. It acts as the game
software and the four pads:

- It loads all GPU memories through the host port.
- It crowds 95 sprites onto lines 228 to 243 to force an overrun.
- It compares every pixel of a frame, and the sync pulses, with a reference
  picture computed in the testbench.
- It plays a sample stream through the ring buffer with refills until the
  buffer has wrapped, and decodes the PWM output back into samples.
- It checks every pad read.

The run fails if any of the following never happens:

- a vertical blank interrupt;
- a sprite overrun;
- X or Y mirroring;
- a tile seen through a transparent sprite pixel;
- a wrap of the sound buffer;
- a pad poll.

The module testbenches also check:

- the render time `1536 + 19n` (`tb_gpu_sprite`);
- the exact frame timing (`tb_vga_timing`);
- the 2560-clock sample period (`tb_sound_generator`);
- the PWM duty (`tb_pwm`);
- the 6 us and 12 us pad timings (`tb_gamepad_if`).

`tb_gamepad_if` shortens the poll period. All other testbenches use the
default parameters.

## How far this follows the original design, and where it departs

These parts follow the original design:

- the block structure and connections (timing unit, GPU with tilemap, sprite
  handler, palette, addresser and interrupt; sound buffer feeding a PWM; four
  pad readers);
- 16x16 tiles and sprites with 4-bit colour indices and 16-colour palettes;
- 512 sprite slots of two 18-bit words;
- line-ahead sprite rendering into a 2x512 line buffer with clear, scan,
  mirror and transparent-skip steps;
- the tile/sprite selection by the transparency bit;
- 18-bit RGB 6/6/6;
- the ring buffer with a polled half flag and two samples per word;
- the 8-bit PWM with the 10x256 sample divider;
- the pad protocol, bit order and 6 us pulse.

These are this design's own choices:

- **2x2 logical pixels.** This is the reading that makes the 18-bit sprite
  position and the 512-pixel line buffer consistent with a 640x480 screen.
- **Word layouts and the host address map.**
- **Memory sizes:** 64 tile and 64 sprite bitmaps, 16 palettes, a 1024-word
  sound buffer.
- **Transparent colour index 0.**
- **Render schedule and overrun rule:** the exact FSM schedule, the overrun
  behaviour, and position wrap-around.
- **Interrupt form:** a one-clock interrupt pulse at line 480.
- **VGA timing:** porch and sync widths, and a pixel every 4 clocks, which gives
  59.5 Hz rather than exactly 60 Hz.
- **Pad timing and storage:** latch width, sampling point, poll rate, and
  storing the pad bits unchanged, so a pressed button reads as 0.
- **Host ports.** Block-RAM style ports stand in for the AXI BRAM bridges.
- **Sync delay.** The 4-clock sync delay in the top.

Not included:

- the soft processor and its program memory;
- the bus, the interrupt controller and the SPI flash with its controller;
- the video DAC and the speaker.

The `pad_rdata` and `snd_rdata` ports keep the 18-bit bus width, so their
unused upper bits read as 0.
