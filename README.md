# An Apple //e around its memory bus, for an FPGA

The Apple //e is a 6502 processor on one 64 KiB memory bus. Everything else
is memory-mapped: RAM, ROM, the keyboard, the speaker and the display mode
registers. Bank switching works by touching magic addresses called *soft
switches*. This RTL builds that machine for a Virtex-5 board, with every
part except the processor:

- a memory management unit (MMU) that decodes each bus access;
- 128 KiB of dual-clock block RAM (main plus auxiliary memory);
- the system ROM;
- the keyboard register and the 1-bit speaker;
- a display that draws the 40x24 text, lo-res graphics and mixed screens
  into a 640x480 DVI picture.

The display reads screen memory through the RAM's second port, which has its
own clock. So the fast video logic and the slow bus never share a clock, and
the screen data needs no handshake.

The processor is not included. Any synchronous 6502 core connects to the
`cpu_*` ports of the top, `apple2e`. Such a core presents an address every
bus clock and takes read data in the next clock. The ROM contents (monitor
and BASIC) and the character glyphs are the original machine's images. They
are not part of this RTL and are loaded from hex files given as parameters.

## Block map

| module | what it is |
|---|---|
| `apple2e` | top: bus, memories, devices, video |
| `mmu` | bus decoder; holds `soft_switches` |
| `soft_switches` | bank-switching and display-mode flags |
| `dp_ram` | 128 KiB RAM: port A read/write on the bus clock, port B read-only on the video clock |
| `sys_rom` | 16 KiB ROM for 0xC000-0xFFFF, image from `ROM_FILE` |
| `keyboard_latch` | key code plus strobe, read at 0xC000 |
| `speaker` | flip-flop toggled by each access to 0xC030 |
| `video` | video subsystem: `video_timing`, `video_pipeline`, `char_rom`, `dvi_out` |
| `video_timing` | 800x525 raster counters, DE, sync signals |
| `video_pipeline` | four-stage pixel pipeline, includes `lores_palette` |
| `char_rom` | 256 characters of 8x8 pixels, image from `CHAR_FILE` |
| `lores_palette` | 16 colours to 24-bit RGB |
| `dvi_out` | 24-bit pixel sent as two 12-bit halves at twice the pixel rate |
| `apple2_pkg` | `soft_sw_t` flag struct, address and screen constants |

## The soft switches

This is the part that decides what the processor sees at every address, and
it is the part most worth reading the code for (`soft_switches.sv`,
`mmu.sv`).

### Switch addresses

| flag | clears | sets | status read (bit 7) |
|---|---|---|---|
| 80STORE | write C000 | write C001 | C018 |
| RAMRD | write C002 | write C003 | C013 |
| RAMWRT | write C004 | write C005 | C014 |
| INTCXROM | write C006 | write C007 | C015 |
| ALTZP | write C008 | write C009 | C016 |
| SLOT3ROM | write C00A | write C00B | C017 |
| 80COL | write C00C | write C00D | C01F |
| ALTCHARSET | write C00E | write C00F | C01E |
| TEXT | access C050 | access C051 | C01A |
| MIXED | access C052 | access C053 | C01B |
| PAGE2 | access C054 | access C055 | C01C |
| HIRES | access C056 | access C057 | C01D |

Switches C000-C00F react to writes only. This matters because reading C000
returns the keyboard. The display switches C050-C057 react to reads as well
as writes, because the stock firmware sets them with reads. In the status
reads, bits 6:0 are the current key code.

### High RAM (the "language card")

The top 12 KiB, 0xD000-0xFFFF, is ROM or RAM. 0xD000-0xDFFF has two RAM
banks. Any access (read or write) to 0xC080-0xC08F sets the state from the
low address bits:

- **BANK1** = A3.
- **HARAMRD** (reads come from RAM) = A0 xnor A1. So C080, C083, C088 and
  C08B read RAM; the others read ROM.
- **PRE-WRITE** is set by a read with A0 = 1. A write, or an address with
  A0 = 0, clears it.
- **Write enable** is set by a read with A0 = 1 while PRE-WRITE is already
  set. Any address with A0 = 0 clears it.

So writing to high RAM needs two *reads* in a row of an odd address. For
example, reading C083 twice gives "read RAM, write RAM, bank 2", and reading
C081 twice gives "read ROM, write RAM". A read followed by a write of C081
does not enable writes. Bank 1 of 0xD000-0xDFFF is kept at RAM address
0xC000-0xCFFF, which the bus cannot otherwise reach.

### Address map (`mmu.sv`)

| range | goes to |
|---|---|
| 0000-01FF | RAM; auxiliary bank when ALTZP |
| 0200-BFFF | RAM; auxiliary bank for reads when RAMRD, for writes when RAMWRT |
| 0400-07FF with 80STORE | auxiliary bank when PAGE2 (RAMRD/RAMWRT ignored) |
| 2000-3FFF with 80STORE and HIRES | auxiliary bank when PAGE2 |
| C000-C0FF | I/O: keyboard, status, speaker, switches; anything else reads 0x00 |
| C100-CFFF | internal ROM when INTCXROM, and C300-C3FF when SLOT3ROM is off; otherwise an empty slot that reads 0x00 |
| D000-FFFF | ROM or high RAM as above; high RAM takes the auxiliary bank when ALTZP |

I/O details:

- C000-C00F reads the keyboard: the strobe in bit 7 and the 7-bit code below
  it.
- Reading C010 returns "a key is held" in bit 7 and clears the strobe. A
  write anywhere in C010-C01F also clears it.
- Any access to C030-C03F toggles the speaker.

No slot cards are present, so the firmware finds every slot empty.

### Reset

After a reset, TEXT is on and every other flag is off. That means: ROM read
at 0xD000-0xFFFF, bank 2, high RAM writes off, main memory everywhere, and
display page 1.

## Bus timing

Everything on the bus side runs on `clk_sys`, which was 3.125 MHz in the
original build (about three times a stock //e).

- An access is one clock with `cpu_valid` high, carrying `cpu_addr`,
  `cpu_we` and `cpu_wdata`.
- Writes and soft-switch changes take effect at the end of that clock.
- Read data appears on `cpu_rdata` during the next clock, because RAM and
  ROM are synchronous block memories. Back-to-back accesses are fine.
- A status read returns the flags as they were before the access.

The data bus is split into separate read and write paths. The original
machine's bus is tri-state.

## Display

### Screen memory

The screen is 40 columns by 24 rows, one byte per cell. Page 1 is at
0x0400-0x07FF and page 2 at 0x0800-0x0BFF. Rows are interleaved: row r
starts at `base + 128*(r mod 8) + 40*(r div 8)`. So each 128-byte block
holds rows r, r+8 and r+16, and its last 8 bytes are unused.

The display draws each cell as an 8x8 block. The original machine's cells
are 7 pixels wide, but 8 lets column and pixel be found with shifts. The
result is a 320x192 picture centred in the 640x480 frame at (160,144), with
a black border around it.

- **Lo-res graphics** (TEXT off): the low nibble of a byte colours the top
  four pixel rows of its block and the high nibble the bottom four, from 16
  colours.
- **Text** (TEXT on): the byte and the pixel row within the cell address
  `char_rom`. Bit 7-px of the returned row is the pixel (1 = white,
  0 = black). The inverse glyphs live in the character image itself.
  Flashing characters are not implemented.
- **Mixed** (TEXT off, MIXED on): rows 0-19 are graphics and rows 20-23 are
  text.

PAGE2 shows page 2, except when 80STORE is on: then PAGE2 selects memory for
the processor and page 1 stays on screen. HIRES, 80COL and ALTCHARSET are
kept as flags and status bits, but the display draws only the three modes
above.

### Pixel pipeline (`video_pipeline.sv`)

The pipeline advances once per pixel:

1. **Address.** It decides whether the raster position is inside the
   picture, and computes the screen byte's address and the pixel's (px, py)
   offset in its cell. Outside the picture it raises an out-of-bounds flag
   and uses address 0.
2. **Fetch.** It reads the byte from RAM port B, or takes 0 when the pixel is
   out of bounds.
3. **Colour.** It takes a lo-res nibble or a sprite bit, depending on the
   mode and the row. An out-of-bounds pixel is treated as graphics with byte
   0, which gives black.
4. **RGB.** A 16-entry case statement turns the colour into 24-bit RGB.

DE and the sync signals travel alongside the data. A pixel's result is
registered on the fourth enabled clock edge, counting the edge that captured
its position as the first.

### Clocks and DVI output

`clk_dvi` runs at twice the pixel rate. A phase flip-flop makes a pixel
enable on every second clock, and the raster and the pipeline run on that
enable.

`dvi_out` sends each 24-bit pixel to the DVI transmitter chip as two 12-bit
halves:

- first `{G[3:0], B}`, while `dvi_xclk` is high;
- then `{R, G[7:4]}`, while `dvi_xclk` is low.

`dvi_de` is high only for visible pixels, so it drops after every line.
`dvi_reset_b` is held high; the chip is configured over its serial bus,
which is outside this RTL.

The raster defaults are the standard 640x480 timing: 800x525 pixel periods
per frame, 16/96/48 horizontal porch/sync/porch and 10/2/33 vertical. That
is 60 Hz at a 25.175 MHz pixel rate, so `clk_dvi` = 50.35 MHz. The original
build ran the DVI clock at 100 MHz. With these porches that would give a
119 Hz frame, so either change the clock or lengthen the porches
(`video_timing` parameters) to suit the monitor.

The mode flags TEXT, MIXED, PAGE2 and 80STORE cross from the bus clock
through two-flop synchronisers. A mode change therefore reaches the screen
within a few video clocks, and may show mid-frame.

## Where this departs from, or adds to, the original description

- **HARAMRD decoding.** The published switch list gives `A1 xor A2` /
  `A1 xnor A2` for HARAMRD. Here it is A0 xnor A1, the decoding the stock
  firmware relies on.
- **HARAMWRT sense.** The list gives the HARAMWRT row the sense of a write
  *inhibit*. Here it is kept as a write enable with the same equations.
- **C011.** Bit 7 is the BANK1 flag as named in the list. The original
  machine reports "bank 2" there.
- **Display switches on reads.** TEXT, MIXED, PAGE2 and HIRES also react to
  reads, as the firmware needs.
- **Choices made here.** The empty-slot and unused-I/O value (0x00), where
  high RAM bank 1 is stored, the auxiliary memory regions, reset values,
  palette RGB numbers, sprite bit order, half order on the DVI bus, the
  synchronisers, and the clock enable in place of a separate half-rate
  pixel clock.
- **Keyboard input.** Keys arrive as ASCII with a one-clock `key_valid`
  pulse plus a `key_down` level. The physical keyboard decoder is not
  included.
- **Speaker.** It is a plain synchronous toggle. The original build's
  speaker did not work, so there was nothing to match.

## Not included

- **The 6502 processor.** It is a third-party core; the bus is on the top's
  ports.
- **The floppy disk controller.** It was never finished in the original
  project and no interface for it is defined.
- **Clock generation.** It uses the FPGA's clock managers; both clocks are
  inputs.
- **ROM and character images.** Both ROMs read as zeros unless `ROM_FILE` /
  `CHAR_FILE` name a hex file with one byte per line (`$readmemh` format;
  `@addr` lines are allowed). The ROM's address is the CPU address minus
  0xC000. The character ROM's address is `{code, row}`.
- **Hi-res graphics, 80-column text, flashing text and the alternate
  character set.**

## Simulating

All testbenches are self-checking and end with a line
`TB_RESULT checks=N failures=M`. Run them from the directory that holds
`rtl/` and `tb/`, because the test images are opened as `tb/...`.
Example:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_apple2e \
        -y rtl -y tb +libext+.sv -Irtl -Itb \
        rtl/apple2_pkg.sv tb/tb_ref_pkg.sv tb/tb_apple2e.sv
    ./obj_dir/Vtb_apple2e

Replace `tb_apple2e` with any other testbench name.

| testbench | covers |
|---|---|
| `tb_apple2e` | whole machine with test ROM and glyph images. The testbench acts as the processor. It checks whole DVI frames in text, lo-res, mixed and page-2 modes, pixel by pixel. It also exercises auxiliary memory, ALTZP, 80STORE, both high-RAM banks and write protection, the ROM and slot-ROM windows, the keyboard strobe and the speaker, and counts each of these mechanisms |
| `tb_apple2e_full` | the same with every parameter at its default (blank images); about 25 s |
| `tb_pong_screen` | replays the bus accesses of a lo-res Pong program (HOME, GR, PLOT, VLIN, HLIN, key read and clear), then checks two whole frames and the paddle and ball pixels |
| `tb_mmu`, `tb_soft_switches` | decoding and switch state; the switch test compares 3000 random accesses against a written-out model of the switch table |
| `tb_video`, `tb_video_pipeline`, `tb_video_timing`, `tb_dvi_out` | display path at full 640x480 size against a reference screen model (`tb/tb_ref_pkg.sv`) |
| `tb_dp_ram`, `tb_sys_rom`, `tb_char_rom`, `tb_keyboard_latch`, `tb_speaker`, `tb_lores_palette` | the small blocks |

The test images follow formulas, repeated in `tb_ref_pkg`:

- `tb/rom_test.hex`: byte i = (7i+3) mod 256.
- `tb/rom_top.hex`: the same 256 bytes placed at ROM offset 0x2000 (CPU
  0xE000).
- `tb/char_test.hex`: row r of code c = c xor (37r mod 256).

## How far to trust it

- Every module passes Verilator lint and elaborates in a second SystemVerilog
  front end.
- Every testbench passes. Each also fails when its block is replaced by a
  copy with one deliberate bug.
- The display is checked pixel by pixel over whole frames, against a model
  written independently of the RTL.
- Not verified: running real 6502 code, because no processor is included,
  and behaviour on real hardware (DVI chip set-up, timing closure).
