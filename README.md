# A Sega Genesis console in SystemVerilog

This is the logic of a Sega Genesis (Mega Drive) rebuilt for an FPGA. It covers
everything in the console except the two processors:

- the two system buses, their address decoders and the arbiter that lets each
  bus master borrow the other bus;
- 64 KB of work RAM and 8 KB of sound RAM, kept in one 72 KB dual-port RAM;
- the video processor (VDP) with its 64 KB VRAM, colour RAM, vertical-scroll
  RAM and DMA engine;
- the YM2612 FM synthesizer and the SN76489 square-wave/noise generator;
- the audio mixer;
- the controller ports, with player 2 played from a PS/2 keyboard;
- the game-ROM multiplexer, which switches between a cartridge and on-board
  flash;
- the clock-enable generator and the DVI video output stage.

The 68000 and Z80 cores sit outside the design. Each connects through a simple
request/acknowledge bus port on the top module, `genesis_top`.

The whole design runs on one 54 MHz clock. Each slower rate in the console is
a one-clock enable strobe derived from that clock, not a separate clock.

## Two buses, two address spaces

The hardest part of the console to follow is who may drive which bus.

### The two buses

**The 68k bus** has 24-bit byte addresses and 16-bit data. The 68k owns it by
default. Two other masters can take it over:

- The VDP's **DMA engine** copies game ROM or work RAM into video memory.
- The Z80's **bank window** maps a 32 KB slice of the 68k space into Z80
  addresses `$8000-$FFFF`.

Either one asks `bus_arbiter`, which raises the 68k's BR. Once the 68k answers
with BG, the arbiter grants the requester and holds the grant until that
requester lets go. If both ask together, DMA wins. While BG is high, the 68k
model must not start a cycle, so the CPU stalls for the length of the DMA
transfer.

**The Z80 bus** has 16-bit addresses and 8-bit data. The Z80 owns it by
default. The 68k asks for it by writing 1 to bit 8 of `$A11100`, then polls the
same bit until it reads 0, which means the Z80 has acknowledged. After that,
68k accesses to `$A00000-$A0FFFF` reach the Z80-side devices byte by byte:
sound RAM, the YM2612 and the PSG. Bit 8 of `$A11200` drives the Z80 reset
line. The Z80 is held in reset from power-up until the 68k releases it.

### 68k address map (`m68k_addr_decode`)

| Range | Target |
|---|---|
| `$000000-$3FFFFF` | game ROM (cartridge or flash, `game_rom_if`) |
| `$A00000-$A0FFFF` | Z80 space (only while the 68k holds the Z80 bus) |
| `$A10000-$A10FFF` | controller I/O (`io_ports`) |
| `$A11000-$A11FFF` | bus-request and Z80-reset registers (`bus_arbiter`) |
| `$C00000-$DFFFFF` | VDP ports (data `$0`, control `$4`, H/V counter `$8`) |
| `$FF0000-$FFFFFF` | work RAM |
| anything else | reads `$FFFF` |

### Z80 address map (`z80_bus_decode`)

| Range | Target |
|---|---|
| `$0000-$1FFF` | sound RAM |
| `$4000-$4003` | YM2612: part I address and data, part II address and data |
| `$6000` | bank register: 9 writes, one bit each in data bit 0, give 68k address bits 23..15 |
| `$7F11` | PSG |
| `$8000-$FFFF` | bank window into the 68k space |

### CPU port handshake

Each CPU port takes a one-clock request (`cpu_req` or `z80_req`) together with
address, data and write enable. It answers later with a one-clock acknowledge
(`cpu_ack` or `z80_ack`), which plays the role of DTACK or WAIT. Read data is
valid in the acknowledge cycle. A master must not issue a new request before
the acknowledge arrives.

A 68k byte cycle uses `cpu_be`, which is {UDS, LDS}. On the odd lane
(`cpu_be = 01`), the byte address into the Z80 space is odd.

How a Z80 bank-window access works:

1. The access latches its address.
2. It requests the 68k bus.
3. It makes one main-bus cycle.
4. It acknowledges the Z80 with the byte from the correct lane.

## Video (`vdp`)

`vdp_ctrl` implements the host side the way games program it:

- A control-port word `10rrrrrdddddddd` writes a register.
- Any other control word starts a two-word command. The command carries a
  6-bit access code and a 16-bit address.
- Data-port writes go to VRAM, CRAM or VSRAM, and the address advances by
  register 15 after each.
- Data-port reads return VRAM words.
- A command with code bit 5 set, DMA enabled (register 1 bit 4) and register 23
  bit 7 clear starts `vdp_dma`. The DMA copies `{reg20, reg19}` words from
  68k word address `{reg23[6:0], reg22, reg21}`, one bus read at a time.

`vdp_timing` counts 342 pixels per line and 262 lines per frame, with 256 pixels
visible and 224 or 192 visible lines (register 1 bit 2). One pixel takes 10
clocks (5.4 MHz).

Two register values are sampled at fixed moments:

- **Display enable** (register 1 bit 6) is latched only at the start of a line.
  Turning the display on mid-line therefore never starts the picture
  part-way across the screen.
- **The line mode** is latched only at the start of a frame.

### Line rendering

While line *v* is on screen, `vdp_render` draws line *v+1* of both background
planes into the other half of a double line buffer. For each plane it:

1. reads that plane's horizontal scroll word and its vertical scroll entry
   (VSRAM entry 0 for plane A, 1 for plane B);
2. walks 33 cell columns, reading the name-table entry and two pattern words
   for each;
3. writes `{priority, palette, colour index}` for every pixel that lands on
   screen, one per clock.

Plane sizes of 32, 64 or 128 cells come from register 16. The name tables sit
at registers 2 and 4.

Scrolling is set by register 11:

- Bits 1:0 choose where the horizontal scroll word comes from in the table at
  register 13:
  - one pair of words for the whole screen;
  - one pair per 8-line row;
  - one pair per line.
- Bit 2 switches vertical scrolling from one VSRAM pair for the whole screen
  to one pair per 2-cell column.

The window plane (registers 3, 17 and 18) replaces plane A where it is shown:

- on whole lines above cell row WVP (register 18 bit 7 clear), or from that row
  down (bit 7 set);
- on the other lines, left of pixel 16 × WHP (register 17 bit 7 clear), or from
  that pixel to the right (bit 7 set).

When any part of a line is inside the window, a third pass fetches 32 cells of
the window name table. This pass does not scroll. It writes over plane A's line
buffer only where the window is shown.

The plane passes take about 1220 clocks, or about 1650 with the window, out of
the 3420 available.

### Sprites

Once the plane pass is done, `vdp_sprites` uses the same VRAM read port to draw
the sprites of line *v+1* into a sprite line buffer of its own.

The sprite table is at register 5. It uses the original chip's 4-word entries:

- word 0: y position plus 128;
- word 1: width and height (1-4 cells each) and a link to the next entry;
- word 2: priority, palette, vertical and horizontal flip, first pattern;
- word 3: x position plus 128.

The walk starts at entry 0 and follows the links until a link of 0 or 80
entries. A sprite's patterns are numbered down its columns. Where two sprites
overlap, the one earlier in the list wins.

The cost per line is:

- 6 clocks for each listed sprite;
- 2 more for each sprite on the line;
- 13 more for each of its cell columns.

The pass stops when the next line starts. Sprites that do not fit in the time
left are dropped; this stands in for the original chip's per-line limit.

### Pixel selection

At display time each pixel takes the first non-transparent value in this order:

1. high-priority sprite
2. high-priority plane A
3. high-priority plane B
4. sprite
5. plane A
6. plane B
7. the background colour (register 7)

With the display disabled, the whole line shows the background colour. With
register 0 bit 5 set, the leftmost 8 pixels of every line do. Games use this
to hide the column that is being redrawn while they scroll.

With shadow/highlight on (register 12 bit 3):

- A pixel where no plane and no drawn sprite has priority is shown at half
  brightness.
- Sprite colours 14 and 15 of palette 3 are not drawn. They act on the pixel
  beneath:
  - colour 14 raises it one step (shadow to normal, normal to highlight);
  - colour 15 shadows it.

### Colour output

`vdp_color` turns a 9-bit CRAM colour into 4 bits per channel:

- normal: 2c
- shadow: c
- highlight: c + 7

`dvi_out` then multiplies each channel by 16 to get 8 bits and registers the
pixel together with hsync, vsync and data enable.

The VRAM's processor port keeps its read data unchanged during a write. A
value being written therefore never shows up as read data on that port.

## FM sound (`ym2612` and below)

### Slot timing

The real chip computes 24 operator slots per sample: 6 channels × 4 operators
at about 1.28 MHz, giving about 53 kHz. Here the sample strobe is 54 MHz / 1008
(53.6 kHz). Within each sample:

- Each of the six `ym_channel` instances runs its four operators one per clock,
  in the order op1, op2, op3, op4. Every modulator is therefore ready before
  the operator it feeds.
- The six results are summed into a 14-bit signed sample. A channel with both
  L and R off is left out.
- The envelopes step every third sample.

### Per operator

- **Phase (`ym_pg`)** is a 20-bit counter. Its increment comes from the 11-bit
  frequency number, the 3-bit block, detune and multiple:
  `((fnum << block) >> 1) ± detune`, times MUL (MUL = 0 means half).
  - The detune here is approximated as keycode × {0, 4, 8, 11} / 16.
  - The real chip uses a ROM table for detune.
- **Envelope (`ym_eg`)** is a 10-bit attenuation, with 0 loud and 1023 silent,
  about 0.094 dB per step.
  - Attack falls exponentially to 0.
  - Decay rises linearly to the sustain level, then sustain rises at D2R.
  - Key-off starts release.
  - Total level × 8 is added at the output.
  - A rate of R becomes 2R plus key scaling.
- **Operator (`ym_op`)** works entirely in the log domain:

  ```
  q    = phase[8] ? ~phase[7:0] : phase[7:0]          quarter-wave index
  tot  = logsin[q] + 4 * attenuation                  attenuate by adding
  mag  = (pow[tot[7:0]] << 2) >> tot[12:8]            back to linear
  out  = phase[9] ? -mag : mag                        14-bit signed
  ```

  The two 256-entry tables are stored in `rtl/ym_logsin.hex` and
  `rtl/ym_pow.hex`:

  ```
  logsin[i] = round(-log2(sin((i + 0.5) / 256 * pi / 2)) * 256)
  pow[i]    = round(1024 * 2^((255 - i) / 256))
  ```

### Algorithms and feedback

The 8 algorithms (written `>` for "modulates", `+` for "summed carriers"):

| # | Connection |
|---|---|
| 0 | 1 > 2 > 3 > 4 |
| 1 | (1 + 2) > 3 > 4 |
| 2 | (1 + (2 > 3)) > 4 |
| 3 | ((1 > 2) + 3) > 4 |
| 4 | (1 > 2) + (3 > 4) |
| 5 | 1 > each of 2, 3, 4 |
| 6 | (1 > 2) + 3 + 4 |
| 7 | 1 + 2 + 3 + 4 |

A modulator's output enters the next operator's phase halved. Operator 1 can
feed back into itself: the sum of its last two outputs, shifted right by
10 − FB.

### Other features

- The register map is the original chip's. The bank offsets `+0, +4, +8, +C`
  select operators 1, 3, 2, 4.
- The frequency high byte is held until the low byte is written.
- Timer A counts samples and timer B counts 16-sample units. Their overflow
  flags are read at any port.
- The DAC (`$2A`, `$2B`) replaces channel 6 with an 8-bit sample.
- Channel 3's special mode (`$27` bits 7:6 nonzero) gives each of its operators
  its own frequency, from `$A8-$AE`.

### Low-frequency oscillator

`ym_lfo` is switched on by `$22` bit 3; bits 2:0 pick its rate. Its 7-bit
counter steps once every 108, 77, 71, 67, 62, 44, 8 or 5 samples, which is
about 4 to 72 Hz. These periods are the original chip's. While the LFO is off,
the counter is held at 0.

From the counter it makes two triangles:

- **Amplitude**, 0 to 126 envelope steps (about 11.8 dB).
  - A channel's AMS (bits 5:4 of `$B4-$B6`) shifts it right by 8, 3, 1 or 0.
  - The result is added to the attenuation of that channel's operators that
    have AM set (bit 7 of `$60-$6F`).
- **Pitch**, a signed value p from −8 to +8.
  - The channel's PMS (bits 2:0) picks a depth D from 0, 16, 32, 47, 66, 95,
    189 or 379.
  - The frequency number becomes fnum + fnum · p · D / 65536, clamped to
    0..2047.
  - At the peaks of p this is about 0, 3.4, 6.7, 10, 14, 20, 40 or 80 cents.

The depths are this design's choice.

### PSG and mixing

`psg_sn76489` has:

- three 10-bit tone counters;
- a 16-bit LFSR noise source, white (taps 0 and 3) or periodic;
- a 2 dB-per-step attenuation table from 255 down to silence.

It ticks at the Z80 clock / 16 and its output is 11-bit signed.

`audio_mixer` adds the FM and PSG outputs with saturation to 14 bits. At 48 kHz
it widens the sum to 16 bits by shifting left two places and filling the two
new bits with the sign.

## Controllers and game data

- **`io_ports`** holds each port's data and direction registers (`$A10003`,
  `$A10005`, `$A10009`, `$A1000B`; version at `$A10001`). It drives a pad's
  Select line when direction bit 6 makes it an output.
- **`pad_mux`** reproduces the 3-button pad's multiplexing on the DB9 pins.
  - Pins 1 and 2 are Up and Down in either Select state.
  - With Select high, pins 3, 4, 6 and 9 give Left, Right, B and C.
  - With Select low, pins 6 and 9 give A and Start, and pins 3 and 4 read low.
- **`ps2_keyboard`** feeds player 2's buttons to `pad_mux`.
  - It receives 11-bit PS/2 frames: start bit, 8 data bits with LSB first, odd
    parity, stop bit.
  - It follows the `F0` break prefix and the `E0` prefix of the arrow keys.
  - Key map: Z = A, X = B, C = C, Enter = Start, and the arrows give the
    directions.
- **`game_rom_if`** serves game-ROM reads.
  - `sel_flash` chooses between the cartridge pins (a1-a23, data, active-low
    CE and OE) and the flash.
  - Each read waits a fixed number of clocks (8 for the cartridge, 6 for the
    flash).
  - Words from the flash are byte-swapped, because the flash stores them in
    the opposite byte order.

## Clock enables (`clk_enables`)

| Strobe | Division of 54 MHz | Rate |
|---|---|---|
| `cpu_en` | /7 | 7.71 MHz (68k) |
| `z80_en` | /15 | 3.6 MHz (Z80) |
| `psg_en` | /240 | 225 kHz |
| `fm_en` | /42 | 1.29 MHz (operator slot) |
| `fm_smp_en` | /1008 | 53.6 kHz (FM sample) |
| `pcm_en` | /1125 | 48 kHz (codec sample) |

## How closely this follows the console, and what is missing

What the design is built from:

- The block set, memory sizes and address maps follow the console as it was
  rebuilt on an FPGA.
- The same goes for these behaviours:
  - the 72 KB shared RAM;
  - VRAM reads held during writes;
  - display enable latched per line;
  - shadow/highlight;
  - the flash byte swap;
  - the pad pin multiplexing;
  - the keyboard key map;
  - the 14-to-16-bit widening;
  - the ×16 colour expansion;
  - the divide-by-7 68k clock.
- The original chips' register layouts, command words and table formulas fill
  in what that description leaves open.
- Timing numbers with no source are this design's own choices: raster totals,
  ROM wait states, the PS/2 time-out and the Z80, PSG and FM dividers.

Not built:

- **VDP:**
  - the sprite limit per line and the sprite collision flag;
  - 8×16 characters;
  - CRAM/VSRAM reads;
  - DMA fill and copy.
- **YM2612:**
  - SSG-EG (stored only);
  - separate left/right outputs. The audio path is mono.

  Only channel 3 has the per-operator frequency mode.
- **Off-chip parts:** the CPU cores, the AC'97 codec, the DVI transmitter, the
  clock manager, and the flash and cartridge themselves. Their signals are
  ports of `genesis_top`.

Games that use interlace mode or SSG-EG will not display or sound right,
even with CPU cores attached.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the module
with values the bench works out on its own, and each ends with a
`TB_RESULT checks=N failures=M` line. The longer ones are:

- `tb_vdp` programs the VDP through its ports, including a DMA from a modelled
  bus. It sets up a random sprite list, then compares eight whole frames pixel
  by pixel with a model of planes, window and sprites:
  - normal;
  - shadow/highlight, including the sprite operators;
  - display off;
  - per-line horizontal scrolling;
  - per-row horizontal scrolling;
  - per-column vertical scrolling;
  - two window layouts, the second with shadow/highlight and the left
    column masked.
- `tb_ym2612` checks single operators against a sine model. The operators are
  reached through the slot order and both register parts. It also checks the
  DAC, both timers, muting and channel 3's special mode. It then checks LFO
  amplitude and pitch modulation sample by sample.
- `tb_ym_channel` checks all eight algorithms and feedback against an integer
  model.
- `tb_genesis_top` runs the whole console at its default sizes, with
  bus-functional 68k and Z80 models, ROM models, a pad and a keyboard. It
  covers, among other things:
  - ROM reads from both sources;
  - Z80 reset and bus request;
  - the `$A00000` window;
  - a YM2612 timer and an FM note;
  - a PSG tone;
  - bank-window reads and writes;
  - two DMA transfers that stall the 68k;
  - three checked video frames;
  - the pads and the keyboard.

  It counts each of these mechanisms and fails if any never occurred. It takes
  about half a minute of simulation.

To run a testbench with Verilator (from the project root, because the FM
tables are loaded from `rtl/`):

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/genesis_pkg.sv rtl/ym_pkg.sv \
    tb/tb_genesis_top.sv --top-module tb_genesis_top -o sim
./obj_dir/sim
```

Three benches set parameters:

- `tb_vdp_ram` builds both RAM shapes.
- `tb_ps2_keyboard` shortens the keyboard time-out.
- `tb_game_rom_if` picks its own wait states.

The others, `tb_genesis_top` included, use the defaults.

## Files

- `rtl/genesis_pkg.sv` holds the shared types: bus regions, and pad buttons and
  pins.
- `rtl/ym_pkg.sv` holds the operator settings and envelope states.
- Every other `rtl/*.sv` file is one module, named after the file.
- The helper modules `vdp_ctrl`, `vdp_render` and `vdp_sprites` are parts of `vdp`.
- `tb/tb_<module>.sv` is the testbench for `<module>`.
