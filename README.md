# A Super Nintendo console around an external 65816 core

This RTL rebuilds the parts of the Super Nintendo that sit around the main
CPU, for one FPGA board driving a DVI monitor, an AC'97 codec and two original
game pads. The 65816-family CPU core is not included. It plugs into a simple
request/acknowledge port. Around it sit:

- the console's memory map: CPU RAM, the cartridge ROM (kept in on-board
  flash), and the PPU, audio, CPU and DMA registers;
- the eight-channel DMA/HDMA engine;
- a picture processor (PPU) with two background layers, sprites and
  fixed-colour math;
- the pad reader and the hardware multiplier/divider.

The sound processor is replaced, as in the original project, by a pre-recorded
single-channel music loop. It is stored in the same flash as the game and
streamed to the codec.

The central idea is that **everything runs on one clock**: the 25.175 MHz
pixel clock of a 640x480/60 Hz raster. The only exception is the codec link,
which uses its own bit clock. The console's CPU and its picture processor
are therefore never in different clock domains. Every bus master holds its
request until it is answered, so no write can vanish because a slower or
faster partner missed it.

## The bus

The CPU and the DMA engine share one bus, and only one of them owns it at a
time. A master raises `req` with `we`, a 24-bit address and write data. It
holds all four until `ack` comes for one clock, and read data is valid with
that `ack`. `mem_access` decodes the address once and then does one of two
things:

- **CPU RAM or a register block** (`T_WRAM`, `T_APU`, `T_CPUREG`, `T_DMA`,
  `T_WMPORT`): the access takes a fixed three clocks. These are the strobe,
  the capture and the `ack`. A new request can come every four clocks.
- **PPU or ROM** (`T_PPU`, `T_ROM`): the access waits for that unit's own
  acknowledge. A PPU access may wait for VRAM or CGRAM. A ROM access may wait
  for the flash, which can be busy with a music read.

A write to ROM is acknowledged and dropped. A read of an unmapped address
returns the last byte seen on the bus (open bus).

| CPU address | Target |
|---|---|
| banks 7E-7F, any offset | 128 KiB CPU RAM |
| other banks, 0x0000-0x1FFF | mirror of the first 8 KiB of CPU RAM (stack, direct page) |
| 0x2100-0x213F | PPU registers |
| 0x2140-0x2143 | the four audio mailbox ports |
| 0x2180-0x2183 | CPU RAM data port with its 17-bit auto-incrementing address |
| 0x4200-0x421F | CPU registers (NMI enable, multiply/divide, status, pads) |
| 0x4300-0x437F | DMA channel registers |
| other banks, 0x8000-0xFFFF | ROM, LoROM layout: byte `{bank[6:0], addr[14:0]}` |

ROM bytes come from 16-bit flash words. Bit 0 of the ROM byte address picks
the byte, and the even byte is the low half of the word. `ROM_BASE` moves the
image inside the flash.

The DMA engine tells `mem_access` when it has work (`dma_busy`). Ownership
changes only between accesses. While the engine owns the bus, `cpu_rdy` is
low and a waiting CPU request simply stays unanswered. A core that needs an
explicit stop signal can use `cpu_rdy`.

## DMA and HDMA

`dma_ctrl` holds the eight channels' registers at 0x43n0-0x43nA:

- control (direction, address step, transfer mode);
- B-bus register;
- A-bus address and bank;
- byte count;
- HDMA table address and line counter.

Every byte takes two bus accesses, a read and then a write. With the ~4-clock
register access, a RAM-to-PPU byte costs about 10 clocks. A ROM byte costs
about 14, because the flash needs three clocks plus arbitration. Modes 0-4
give the register patterns 1, 2, 2-same, 2x2 and 4. Modes 5-7 repeat 1, 2-same
and 2x2. The A address may increment, decrement or stay fixed, and either
direction is supported. Channels run lowest first. The engine writes the
A address and count back into the channel registers as it goes, so the CPU
sees where a transfer stopped.

HDMA runs in blanking only:

- **Frame strobe** (start of the last raster line): each enabled channel
  copies its table address and reads its first count byte.
- **Line strobe** (the clock after the last pixel of each of the 240 game
  lines): each live channel whose counter says so sends one unit from its
  table to its B-bus register. It then counts down.

A count byte with bit 7 set sends a new unit on every line of that entry.
Without bit 7, the entry sends one unit and then waits. A count byte of zero
ends the channel until the next frame.

A general DMA may be running when a line strobe comes, for example during a
large copy. HDMA then takes over at the next byte boundary and the DMA
resumes afterwards. Two separate unit counters keep the interrupted
transfer's position. Indirect HDMA is not implemented.

A unit sent at the end of game line *y* takes effect for line *y + 1*,
because the PPU draws a line one raster line ahead. Game line 0 therefore
uses whatever the registers held at the end of the previous frame.

## The picture processor

`ppu` has four parts:

- the register file `ppu_regs`, which also holds OAM (`oam_ram`, 544 bytes);
- VRAM (32K x 16) and CGRAM (256 x 15), each behind a two-port arbiter
  (`mem_arbiter`);
- the background renderer `bg_render` and the sprite renderer `obj_render`;
- a colour stage.

OAM is the exception to the arbiters: it has two real ports. The CPU
side gets bytes and the sprite renderer gets 32-bit words, so sprite
evaluation never waits.

**Arbitration.** The drawing side has fixed priority. A register access that
needs VRAM or CGRAM holds its request until the drawing side leaves a free
clock. Its data comes the clock after the grant. The renderer reads VRAM on
three clocks out of four, and the display reads CGRAM only inside the
256-pixel game window. The CPU side therefore always gets through within a
few clocks. The register access is acknowledged only once the memory has
answered.

**Register side.** VRAM works as on the console:

- Words are written on the low or high data byte, whichever VMAIN bit 7
  selects.
- The address advances by 1, 32 or 128 words.
- Setting the address, and each read that advances it, pre-fetches the next
  read word.

The other registers:

- CGRAM takes a colour as two byte writes and reads back low byte, then high.
- OAM is 544 bytes, wrapping at the end, and fully readable and writable.
- The scroll registers share one write latch, so two writes load a 10-bit
  value.

**Line drawing.** At pixel 320 of raster line *v*, `bg_render` starts
building game line *v + 1* (line 0 is built on the last raster line). For
each layer it walks the 33 tiles a line can touch. Each tile takes four
clocks: map entry, planes 0/1, planes 2/3, and a store. It stores eight
8-bit CGRAM indices (palette x 16 + colour) into a line buffer. Both layers
take 264 clocks, well inside the 480 clocks left before the line is shown.
The line buffers are double-buffered by line parity. The tile-map entry
follows the console:

- tile number (bits 9:0);
- palette (bits 12:10);
- horizontal flip (bit 14);
- vertical flip (bit 15).

The layer uses 4 bits per pixel and a 32x32 map, and wraps at 256 pixels.
BGMODE bits 4 and 5 switch BG1 or BG2 to 16x16 tiles. A map entry then
covers tiles n and n+1 above n+16 and n+17, which the flip bits swap, and
the map wraps at 512 pixels.
Vertical scroll is applied when the map row is chosen. Coarse horizontal
scroll is applied when the tiles are fetched, and the remaining 0-7 pixels
when the buffer is read.

**Sprites.** `obj_render` starts at the same moment as the background
renderer and works in two phases.

1. **Evaluation** (138 clocks). It reads the 32-byte size table, then walks
   the 128 OAM entries one per clock. It keeps the first 32 sprites that
   cover the next line: X (9 bits), Y, a 9-bit tile number, palette and
   flips.
2. **Drawing.** When `bg_render` finishes and frees VRAM, it fetches the two
   plane words of each 8-pixel sliver (three clocks each, at most 34
   slivers, so at most 103 clocks). It writes the visible, non-transparent
   pixels into its own double-buffered line buffer. A pixel already
   covered by a lower-numbered sprite is left alone.

OBSEL picks the pair of sizes (8/16 up to 32/64) and the character base.
Sprite tiles are arranged as on the console: tile+1 to the right and
tile+16 below, each wrapping in its 4-bit field. Sprites use palettes 8-15
(CGRAM 128-255). The worst case (background 265 clocks, sprites 138 in
parallel, then 103) ends about 370 clocks after pixel 320, before the line
is shown. A sprite covers lines Y to Y+size-1.

**Colour.** For each game pixel the colour stage picks the first of these
that has a pixel:

1. a sprite pixel, if sprites are enabled (TM bit 4);
2. BG1;
3. BG2;
4. colour 0.

It then reads CGRAM. If CGADSUB enables colour math for that source, the
fixed colour from COLDATA is added to or subtracted from each 5-bit
component. The result is clamped and, if selected, halved. The sources are
BG1, BG2, sprites of palettes 12-15 (OAM palette 4-7) and the backdrop.
Last come the master brightness `c*(b+1)/16` and forced blank. The colour
appears two clocks after the raster position it belongs to.

## Video output

`video_timing` produces the 800x525 raster (640+16+96+48, 480+10+2+33,
negative syncs). It also produces the strobes the rest of the console runs
on: end of each game line, start of vertical blank (line 240) and frame
start. The game picture is 256x240 and is placed unscaled in the top-left
corner. `video_window` delays the syncs by the PPU's two-clock latency,
widens the 5-bit colours to 8 bits, and sends black everywhere outside the
game area. The DVI transmitter chip is outside this design.

## Flash: one chip for the game and the music

`flash_ctrl` owns the parallel flash (22-bit word address, 16-bit data) and
serves two clients:

- the ROM port of `mem_access`;
- the music player.

The music has priority. A read holds chip enable and output enable for
`FLASH_WAIT` = 3 clocks (119 ns) and samples the data on the last one. A
music read every 524 clocks takes 4 of them, so the ROM port is slowed by
under 1 %, and by at most 4 clocks on a collision.

`sound_player` asks for one 16-bit sample every `SAMPLE_DIV` = 524 clocks,
which is 48.04 kHz. It walks `SOUND_LEN` = 1,440,000 words from word
`SOUND_BASE` = 0x100000, which is 30 s, and then starts again. It flips
`sample_tgl` for each new sample.

`ac97_link` runs on the codec's 12.288 MHz bit clock:

- It brings the sample across domains with a toggle and a two-flop
  synchroniser.
- At each frame start it builds a 256-bit output frame: a tag with slots 1-4
  valid, one command per frame, and the same sample in the left and right
  PCM slots.
- The commands cycle through master volume, headphone volume, PCM gain and
  a 48 kHz DAC rate.
- SYNC is high for the 16 tag bits.
- Data changes on the rising edge of the bit clock.

## Pads and CPU registers

`ctrl_reader` reads both pads at once:

1. a 12 µs latch pulse;
2. sixteen 12 µs clock periods, during which a pad shifts on the rising
   edge;
3. the reader samples just before that edge.

Data lines are active low. The first bit read becomes bit 15 (B, Y, Select,
Start, up, down, left, right, A, X, L, R, then four zeros). With NMITIMEN
bit 0 set, a read starts at the beginning of vertical blank, and 0x4212
bit 0 is high while it runs.

`cpu_regs` also holds:

- the vertical-blank NMI flag (set at line 240, read and cleared through
  0x4210, driving `cpu_nmi_n` when NMITIMEN bit 7 is set);
- the blanking status (0x4212);
- the 8x8 multiplier and 16/8 divider (`muldiv`). Their results are
  combinational, so a result register changes as soon as an operand is
  written. Division by zero gives 0xFFFF and the dividend as remainder.

## Audio mailbox

`apu_ports` holds the four bytes the CPU writes at 0x2140-0x2143. They go to
the sound-processor side (`to_apu`). A CPU read of the same addresses returns
what that side drives on `from_apu`. No sound processor is built. Both
vectors are top-level ports, so a processor model or a fixed handshake can
be attached.

## What is not here, and where this design departs

- **Left out:**
  - the CPU core;
  - the sound processor and its DSP (replaced by the music loop);
  - the priority bits of tiles and sprites (sprites are always in front);
  - colour math against the sub-screen (only the fixed colour is built), and
    the colour windows;
  - the sprite "range/time over" status flags;
  - background modes other than two 4-bit-per-pixel layers;
  - HiROM mapping, indirect HDMA and the horizontal/vertical IRQ timers;
  - the cartridge connector and the lock-out chip;
  - the DVI transmitter.
- **A single clock** instead of separate CPU and picture clocks. The CPU
  core must accept a held request, or be wrapped to do so.
- **Game picture at 1:1** in the corner of 640x480, not scaled.
- **Sample rate, sample width, byte order of ROM in flash, flash
  addresses, pad timing and all bus latencies** are this design's choices.
  They are parameters or localparams in `snes_top`, `mem_access` and
  `snes_pkg`.

## Parameters of the top

| Parameter | Default | Meaning |
|---|---|---|
| `FLASH_AW` | 22 | flash word-address width (4M words) |
| `FLASH_WAIT` | 3 | clocks per flash read |
| `SOUND_BASE` | 0x100000 | first word of the music |
| `SOUND_LEN` | 1,440,000 | music length in samples |
| `SAMPLE_DIV` | 524 | clocks per sample |
| `PAD_LATCH` | 302 | pad latch pulse, clocks |
| `PAD_HALF` | 151 | half pad-clock period, clocks |

## Simulating

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Two models stand in for the board:
`tb/flash_model.sv` is a flash whose word at address `a` is
`(a * 0x9E37) ^ (a >> 7)`, with a 70 ns access time, and `tb/pad_model.sv` is
a game pad. To run one testbench with Verilator:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/snes_pkg.sv tb/tb_snes_top.sv --top-module tb_snes_top -o sim
    ./obj_dir/sim

`tb_snes_top` plays the part of a game's start-up code through the CPU port:

1. It writes a tile map, a palette and an HDMA table into CPU RAM, partly
   through the 0x2180 port.
2. It moves them, and 3 KiB of tile graphics from ROM (flash), into VRAM and
   CGRAM with DMA.
3. It shows BG2 behind BG1 with 16x16 tiles and adds a fixed colour to BG2
   by colour math. It moves a 544-byte OAM image for six sprites into OAM by
   DMA.
4. It enables a per-line horizontal-scroll effect by HDMA and turns the
   screen on.
5. During the displayed frame it starts a 3000-byte ROM-to-RAM DMA that HDMA
   interrupts.

The testbench then compares a whole 640x480 frame with a reference computed
from the flash contents and the data written. It also checks the pads, the
NMI, the multiplier and divider, the mailbox and the sound path. It counts
each of these and fails if any never happened:

- DMA bytes and HDMA bytes;
- pixels where BG2 shows through and sprite pixels;
- HDMA cutting into a DMA;
- CPU cycles held by DMA;
- VRAM accesses that waited for the renderer;
- ROM reads that waited for a music read;
- music reads and restarts of the music loop;
- pad reads, NMIs and codec frames.

It shortens the music loop to 1500 samples so that the restart is seen.
`tb_snes_full` is the same run with every top-level parameter at its
default. Each takes a few seconds (about 1.9 M clocks).
