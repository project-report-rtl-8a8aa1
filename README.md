# CUDoom ray-casting display in SystemVerilog

A Doom-style first-person view of a 32 x 32 grid world is drawn at 640 x 480,
60 Hz, without a frame buffer. A processor only decides *where* each of the
640 screen columns looks: for every column it hands the hardware a position,
a ray direction and a distance scale. The hardware marches that ray through
the map and reduces what it hits to one 256-bit word of column parameters:
where the wall starts and ends on screen, which texture and texture column it
shows, how to interpolate the floor below it. It also works out whether a
taller wall further back rises above the nearer one. The display side then
computes every pixel on the fly from the current column's word and the
current row: wall texel, floor texel, sky pixel or shaded texel. The whole
frame is therefore 640 words, not 307,200 pixels.

```
            50 MHz                              |            25 MHz
 processor --Avalon--> nios_interface           |
                           |  256-bit inputs    |
                        ray_fsm <-- world_map_rom
                           |  256-bit column word
                      column_fifo  ===== clock crossing =====>  column_memory (2 buffers)
                                                |                  |  word of current column
                                                |   vga_raster --> tex_gen --> texture_rom
                                                |      |  ^            |
 processor --Avalon--> sky_gen <-> SRAM --------|------'  '------------'  RGB, sync -> DAC
 processor <-irq-- sound_controller -> wm8731_audio -> codec pins
 processor <------ keyboard_controller <- ps2_rx <- PS/2 pins
                   framerate_calc -> status word
```

`cudoom_top` wires all of this together. The processor, bus fabric, SDRAM,
flash, PLL and codec configuration are not part of the RTL. Their slave
ports, SRAM pins and codec/PS/2/VGA pins are top-level ports, and the two
clocks are inputs.

## Numbers and fixed point

- Positions and steps are 32-bit unsigned with 22 fraction bits. One map
  cell is 1.0, and bits 26:22 are the cell index.
- The map holds 4-bit codes:

  | Code | Meaning |
  |---|---|
  | 0 | empty |
  | 1-4 | normal walls (textures 0-3) |
  | 5-8 | tall walls, 2.5 times as high as normal walls (textures 0-3) |
  | 9 | "fake" wall |

  A fake wall stops both rays and is drawn as sky, so a border of 9s makes
  the world look open. Texture number 4 means sky.
- The distance along a ray is accumulated as `count`. Each step adds
  `count_step = cos(angle to the view centre) / 32`, which removes the
  fish-eye effect. The on-screen wall height is `L = 480 / count` in whole
  pixels.

## The column word

Each column is one packed struct, `col_word_t` in `cudoom_pkg`, of 256 bits:

- **First wall** (the nearest wall of any height): draw start/end rows,
  `L - 480`, `count/960`, texture column, face (x or y), texture number.
- **Tall wall** (the nearest wall of height 5-8): the same fields, its own
  texture column and texture number.
- **Floor:** the point on the floor under the first wall, the player position
  (both 18 bits, 12 fraction bits) and `2^24 / count` as a 12-bit weight.
- **Display:** the sky angle (10 bits), the column number, and the
  vertical-blank flag that swaps the frame buffers.

## Ray FSM: finding the wall in a few hundred clocks

`ray_fsm` marches two rays at once from the same start:

- **Ray 1** stops at the first non-empty cell.
- **Ray 2** keeps going until it reaches a tall wall or a fake wall.

On each clock, each still-moving ray adds its direction to its position and
`count_step` to its count, and reads its new cell from one port of the map
ROM.

1. **Coarse march** (`EXTEND`). Steps are 1/32 of a cell along the ray. The
   march stops when ray 2 has stopped, or after 4095 steps.
2. **Back-trace** (`REDUCE`, `REFINE`). The step is divided by 32, to 1/1024
   of a cell. Each ray that is inside a wall steps back until it is outside
   (at most 63 fine steps). `STEP` then moves each ray one fine step forward
   onto the wall. This finds the wall surface to within 1/1024 of a cell
   without a DDA's per-step multiplications.
3. **Divisions** (`DIV_INIT`, `DIVIDE`). Five unsigned 32-bit divisions run
   side by side in a 32-clock restoring divider:
   - `L1` and `L2`, both `(480<<22) / count`
   - `count1/960` and `count2/960`, written as `(count>>1)/480`
   - `2^24 / (count1>>10)`
4. **`CALC`** forms the draw rows and clamps them to the screen:
   - start of the tall wall: `240 - 2.5 L`, using `L2` unless the first wall
     is itself tall
   - start of the first wall: `240 - L1/2`
   - end: `240 + L1/2`

   It also picks the face and texture column and builds the word. A ray hit
   an x face when it is closer to the cell's x edge than to its y edge. The
   texture column is bits 21:16 of the other coordinate, mirrored on faces
   seen from behind. The floor point is the cell corner or edge under the
   hit.
5. `WAIT_FIFO` holds while the FIFO is full. `CHECK_LAST` writes the word,
   except for column 639. `WAIT_VBLANK` holds column 639 until vertical
   blank, then writes it with the blank flag set.

The handshake with software: `ready` is high in `READY`. Software writes the
eight parameter words, writes 0 to the control word, polls the status word
until bit 0 is set, then writes all ones. The rising edge of control latches
the inputs and starts the column.

From the start edge to the FIFO write takes **40 + coarse steps + fine steps**
clocks. The test bench checks this against its model for every column.

## Crossing clocks and the two frame buffers

`column_fifo` is a Gray-pointer dual-clock FIFO, 16 words deep. The memory
side reads whenever the FIFO is not empty. `column_memory` turns that read
request, delayed one clock, into its write enable, and uses the column number
inside the word as the write address. No other handshake is needed.

Each of the two buffers is made of three RAMs: 512, 128 and 64 words of 256
bits. This avoids one 1024-word RAM per buffer. The banks overlap:

| Bank | Words | Written for columns | Read for columns |
|---|---|---|---|
| A | 512 | 0-509 | 0-495 |
| B | 128 | 514-639 | 528-639 |
| C (patch) | 64 | 482-541 | 496-527 |

Because of the overlap, no bank switch happens at column 512, where all
address bits change at once. At every read switch point both banks hold the
same word. A written word carrying the blank flag swaps the written and the
displayed buffer.

## Per-pixel work at 25 MHz

The pixel pipeline, for the counter value at clock t:

| Clock | What happens |
|---|---|
| t+1 | `vga_raster` registers the screen column and row. |
| t+2 | `column_memory` delivers that column's word. The SRAM delivers the sky byte for (row, sky angle). |
| t+3 | `tex_gen` registers the texel address. `texture_rom` answers without a clock. The sky decision is registered. |
| t+4 | RGB is registered. hsync, vsync and blank are delayed to match. |

In `tex_gen`, rows down to the wall end + 1 are wall pixels:

- They use the first wall's parameters at and below its top row, or always
  when the first wall is itself tall.
- Above its top row they use the tall wall's parameters.
- The texel row is `((2*row + L - 480) * count/960) >> 16`.

Rows below that are floor:

- A 240-entry table gives `240*4096/(240-k)` for `k = 480 - row`. The table
  is computed by a constant function at elaboration.
- The table value times `2^24/count` gives a weight `w` (12 fraction bits).
- The floor point is `w*floor + (1-w)*player` for each axis. That is three
  multiplies in series, the longest path of the design.
- Its fraction gives the texel. The parity of its cell picks texture 0 or 3,
  forming a checkerboard.

In `vga_raster` a pixel is sky when its row is at or above both wall tops, or
when its wall's texture number is 4. Otherwise it is the texel, with x faces
(and the floor) at half brightness.

The sky picture is 1024 x 480 grey bytes in the SRAM, two per word. The word
is `row*512 + angle/2` and the byte is selected by angle bit 0. The sky
therefore turns with the view. `sky_gen` gives the SRAM to the processor for
loading until the processor writes 1 to word 0x3FFFF; after that, the display
owns it.

## Sound and keyboard

- **`sound_controller`** raises an interrupt when the serialiser asks for a
  sample. It holds the interrupt until the processor writes an 8-bit sample,
  and sends that sample as the high byte of a 16-bit word.
- **`wm8731_audio`** runs on a clock enable at system clock / 4 (12.5 MHz,
  also driven out as XCK):
  - LRCK toggles every 418 ticks.
  - BCLK is 27 ticks long, rising at tick 12 and falling at tick 25.
  - Data is shifted MSB first on falling BCLK.
  - A request pulse follows each fall of LRCK.
- **`ps2_rx`** filters the PS/2 clock over 8 samples and checks start,
  parity and stop bits.
- **`keyboard_controller`** shows the last scan code. After a 0xF0 break
  prefix it shows the code minus 32, which marks the release.
- **`framerate_calc`** counts how often the software's column number leaves
  639 in each second of 50,000,000 clocks. The count appears in the Ray FSM's
  status word.

## Where this RTL departs from the original design

- **Map:** the 32 x 32 map (`rtl/world_map.hex`) is this design's own. The
  cell codes and their meanings are the original ones.
- **Textures:** the four 64 x 64 textures are computed from the address
  (brick, stone, blue tile, wood), not read from a bitmap ROM. The blue tile
  uses the original's colours.
- **FIFO:** the dual-clock FIFO is a plain Gray-pointer design, not vendor
  IP. The depth of 16 is a choice.
- **Ray FSM:**
  - Each ray reads its own new cell on each step, so a stopped ray keeps its
    cell.
  - Division by zero returns all ones.
  - The sky angle is latched with the other inputs.
  - Reset is synchronous.
- **VGA:**
  - Sync and blank are decoded from the counters and delayed four clocks to
    line up with the pixel pipeline.
  - Row 0 is the first visible line.
  - `vga_blank_n` is the active-video flag the DAC expects.
- **SRAM:** the sky generator drives the SRAM pins itself. A separate
  processor-side SRAM controller is not needed. The bidirectional data bus
  is split into in, out and enable.
- **Audio:**
  - The serialiser uses a clock enable instead of a divided clock.
  - It keeps the original divider values. These give about 14.95 kHz
    samples, not the 22 kHz the sample data was prepared for.
  - A 418-tick half period carries only 15 BCLK periods, so the sample's
    LSB is not sent.
  - The test-mode sine uses exact two's-complement negatives.
- **Frame rate:** the second ends at the first clock at or after the limit,
  so a second that ends while column 639 is held is not lost.
- **Keyboard quirk:** pressing the same key again right after releasing it
  still shows the release code, because a new code must differ from the last
  one. This is kept as in the original.
- **Not included:**
  - the processor and its software (ray setup, game logic, sample playback)
  - the bus fabric
  - the SDRAM and flash controllers
  - the PLL
  - the codec's I2C configuration

## Simulating

Each block has a self-checking test bench `tb/tb_<block>.sv` that prints
`TB_RESULT checks=N failures=M`. For example, from the directory holding
`rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_cudoom_top \
    rtl/cudoom_pkg.sv $(ls rtl/*.sv | grep -v cudoom_pkg) tb/sram_model.sv \
    tb/tb_cudoom_top.sv -Mdir obj -o sim && obj/sim
```

`rtl/world_map.hex` is read by a path relative to that directory.

`tb_cudoom_top` runs the whole design at full size in a few seconds:

- It loads the sky and sends three frames of 640 columns from different
  views.
- It compares every pixel of each displayed frame with an independent model
  of the arithmetic (about 920,000 checks).
- It holds the pixel clock for 2 ms during one frame, so the FIFO fills and
  the Ray FSM stalls. The frame must still come out exact.
- It counts each mechanism and fails if one never happened: fine
  back-trace, FIFO-full stall, wait for vertical blank, buffer swap, sky,
  fake-wall sky, tall wall above a nearer wall, shaded faces, both floor
  textures, sound interrupts and keyboard codes.

Other block tests:

- The Ray FSM test predicts the whole column word and its latency in clocks
  for 72 rays. It also checks the stall and the last-column blank wait.
- The VGA test checks all sync, porch and active-area counts over two frames.
- The audio tests check LRCK, BCLK and request timing, the serial data and
  the sine.

## Files

| File | Contents |
|---|---|
| `cudoom_pkg.sv` | constants, column word, texel address |
| `cudoom_top.sv` | top level and clock-domain synchronisers |
| `ray_fsm.sv`, `world_map_rom.sv`, `world_map.hex` | ray marcher and map |
| `nios_interface.sv` | processor slave of the Ray FSM |
| `column_fifo.sv`, `column_memory.sv`, `column_ram.sv` | crossing and frame buffers |
| `tex_gen.sv`, `texture_rom.sv` | texel addressing and textures |
| `vga_raster.sv`, `sky_gen.sv` | timing, pixel multiplexer, sky SRAM |
| `sound_controller.sv`, `wm8731_audio.sv` | audio |
| `ps2_rx.sv`, `keyboard_controller.sv` | keyboard |
| `framerate_calc.sv` | frame counter |
| `tb/sram_model.sv` | behavioural asynchronous SRAM for the tests |
