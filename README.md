# Text-mode VGA controller for an OPB bus

A 640×480 VGA display with one bit per pixel needs 37.5 KB of frame buffer. A small
FPGA such as the Spartan-IIE XC2S300E has only 8 KB of block RAM, in sixteen
512×8 dual-ported blocks. This controller therefore draws text, not a bitmap.
The screen is 80 columns by 30 rows of 8×16-pixel characters, and 80×8 = 640,
30×16 = 480. It needs only two tables:

| table            | contents                                  | size                         |
|------------------|-------------------------------------------|------------------------------|
| character array  | one 8-bit code per cell, 80×30 = 2400     | 2.5 KB = 5 block RAMs        |
| font             | 96 glyphs (codes 32–127) × 16 rows × 8 px | 1.5 KB = 3 block RAMs        |

Together they use 4 KB, half of the chip's block RAM. The pixels are built
on the fly, 8 at a time, from these tables. A processor writes the tables over the
On-chip Peripheral Bus (OPB, IBM CoreConnect's peripheral bus). Each block RAM
has two ports. One port belongs to the bus and the other to the video side, so
the processor never waits for the display, the display never waits for the
processor, and the two sides run on unrelated clocks.

The output is white-on-black: 10-bit red, green and blue words for an external
video DAC, with BLANK_N, HSYNC_N and VSYNC_N.

## Using it from software

The controller occupies a 4 KB window at `C_BASEADDR`, which defaults to
`0xFEFF1000` (with `C_HIGHADDR = 0xFEFF1FFF`). Each address holds one byte.

| offset          | RAMs      | contents                                                       |
|-----------------|-----------|----------------------------------------------------------------|
| `0x000`–`0x95F` | 0–4       | character at column *c*, row *r*: offset `c + 80·r`            |
| `0x960`–`0x9FF` | 4         | spare (160 bytes, not displayed)                               |
| `0xA00`–`0xFFF` | 5–7       | glyph row *y* (0 = top) of code *k*: offset `0xA00 + 16·(k−32) + y` |

- **Font bits:** bit 7 of a glyph byte is the leftmost pixel, and a 1 bit is white.
- **Character codes:** only bits 6:0 of a code are used. Codes 0–31 have no glyph and show as blank cells.
- **Write data:** taken from `OPB_DBus[7:0]`.
- **Read data:** the byte is returned in all four byte lanes of `VGA_DBus`, so byte and word loads both work.
- **Ignored inputs:** `OPB_BE` and `OPB_seqAddr`.
- **Tied-low outputs:** `VGA_retry`, `VGA_toutSup` and `VGA_errAck`.
- **Other addresses:** an address outside the window is not acknowledged, and no RAM is touched.

The RAMs power up (and stay, in simulation) at zero, and a reset does not clear
them. Software must load the font before anything is visible.

## How a character cell becomes pixels

This is the heart of the design and the part most worth reading twice. The
video side is one pipeline, clocked by the 25 MHz pixel clock, that does three
things for every 8-pixel cell. They are decoded from the low three bits of the
horizontal counter `Hcount` and happen three clocks ahead of the cell's first
pixel:

| Hcount (cell 0, cell 1, …, cell 79) | strobe       | what happens at the end of that clock                                    |
|--------------------------------------|--------------|--------------------------------------------------------------------------|
| 141, 149, …, 773                     | `LoadChar`   | character RAM reads `CharAddr`; the code appears on `CharData`             |
| 142, 150, …, 774                     | `FontLoad`   | font RAM reads `{code[6:0], glyph row}`; the byte appears on `FontData`    |
| 143, 151, …, 775                     | `LoadNShift` | shift register loads `FontData`                                          |
| 144–151, 152–159, …, 776–783         | –            | shift register shifts left; its MSB is the pixel                         |

The address arithmetic is:

- `CharAddr = Column + 80·Row`
- `Column = (Hcount − 141) / 8`, which becomes valid at Hcount 141, the cycle of the first `LoadChar`
- `Row = (Vcount − 35) / 16`
- the glyph row is `(Vcount − 35) mod 16`

The multiply by 80 is a constant multiply, so synthesis reduces it to shifts and adds.

Both RAM outputs are registered. Each port is enabled only by its own strobe,
so a fetched value holds for the whole cell while the next cell's fetch is
prepared. The strobes keep running through the blanking intervals. What they
fetch there is never shown.

Each table is split over several 512-byte RAMs, and the RAM outputs are simply
ORed. This works because every RAM that is not addressed has its
output register held at zero through its synchronous RST input. On the video
port:

- character address bits 11:9 pick one of the five character RAMs, and addresses 2560 and up pick none;
- font address bits 10:9 pick a font RAM: `01`, `10` and `11` select the three RAMs, and `00` (codes 0–31) selects none, which is what makes control codes blank.

The pixel bit is ANDed with `HBLANK_N & VBLANK_N` and registered in
`video_out`, together with the composite `VIDOUT_BLANK_N`. The colour on the
DAC pins is therefore one pixel clock later than the internal pixel, so pixel 0 of
a line is on the pins during Hcount 145. HSYNC_N and VSYNC_N are not delayed
by that extra register.

## Frame timing

The timing is standard 640×480 at 60 Hz (25.175 MHz nominal; any pixel clock near
25 MHz works). Each line and each frame starts with its sync pulse:

| horizontal, pixel clocks          | vertical, lines                  |
|-----------------------------------|----------------------------------|
| sync 96 (Hcount 0–95)             | sync 2 (Vcount 0–1)              |
| back porch 48                     | back porch 33                    |
| active 640 (Hcount 144–783)       | active 480 (Vcount 35–514)       |
| front porch 16                    | front porch 10                   |
| total 800                         | total 525                        |

`Hcount` wraps at 799. `Vcount` advances when `Hcount` wraps and itself wraps at 524.
The sync and blank signals are registers that are set and cleared on counter
compares, so they are glitch-free. Their edges sit exactly on the boundaries in the
table. All numbers are parameters of `video_timing`, with these defaults. The
fetch strobes assume the active area begins on a multiple of 8 pixels.

## The bus side

OPB inputs arrive late in the clock cycle, so `opb_controller` registers all of
them first. A transfer then takes a fixed sequence of OPB clocks. Cycle 0 is the one in which `OPB_select` rises:

| cycle | what happens                                                                          |
|-------|---------------------------------------------------------------------------------------|
| 0     | master drives select, address, RNW, data                                              |
| 1     | inputs registered; if the address is in the window, one RAM access is made: for a read, RST is released on the addressed RAM; for a write, WE is pulsed on it |
| 2     | `MemCycle1`: the read byte is on the ORed RAM output and is registered                 |
| 3     | `MemCycle2`: `VGA_xferAck` high, `VGA_DBus` carries the byte                             |
| 4     | master has seen the acknowledge and drops select; the slave is idle again              |

The registered select is cleared right after the acknowledge, so each
select produces exactly one access, even though the master drops select only
in the following cycle. `VGA_DBus` is zero whenever `VGA_xferAck` is low, as
the OPB requires of a slave. The bus-side ports of all eight RAMs are always
enabled and normally held in reset. That keeps their outputs zero so they can be ORed.
Concurrent assertions in `opb_controller` check the bus rules:

- the acknowledge lasts one cycle;
- `VGA_DBus` is zero when there is no acknowledge;
- at most one RAM is written at a time.

## Module hierarchy

```
opb_xsb300e_vga            top: OPB slave + video output, two clock domains
├── opb_controller         OPB_Clk: registers, address decode, access/MemCycle1/MemCycle2, xferAck
├── char_ram               5 × ramb4_s8_s8, 2.5 KB character array, page select + OR
├── font_ram               3 × ramb4_s8_s8, 1.5 KB font, page select + OR (codes 0–31 blank)
├── video_timing           Pixel_Clock: Hcount/Vcount, syncs, blanks, fetch strobes, CharAddr
├── shift_register         8-bit load/shift, MSB is the pixel
└── video_out              pixel AND blank, registered 10-bit RGB and BLANK_N
vga_pkg                    timing and geometry constants, RAM map, controller state type
ramb4_s8_s8                512×8 true dual-port RAM, per-port EN / RST / WE / write-through
```

Timing: the top's outputs change on the rising edge of `Pixel_Clock`
(video) or `OPB_Clk` (bus). `OPB_Rst` is an asynchronous reset for both
domains. It clears all registers, drives the syncs low and asserts blank.

`ramb4_s8_s8` follows the port list and truth table of the Xilinx
RAMB4_S8_S8 primitive (EN=0 hold; RST clears the output register; WE writes;
RST=0 with WE=1 is write-through), written as a plain array that any synthesis
tool maps to a two-port RAM. Lint tools warn that its array is written from two
clocks. That is inherent to a true dual-port memory. On an FPGA you may instead
instantiate the vendor primitive of the same name and ports and drop this file.

## Interpretations and departures

The controller follows its source design closely. Where that design's
description was ambiguous or inconsistent, these choices were made:

- **Column offset.** `Column = (Hcount − 141) / 8`, so column 1 starts at Hcount 149. One
  formulation of the original computes `Hcount − 140`, which would move the fetch one clock
  early. The signal definitions and timing diagrams agree on 141, and 141 is also what makes the
  three strobes line up with the cell.
- **HBLANK_N edges.** HBLANK_N is high exactly for Hcount 144–783, per the signal
  definitions and timing diagrams. A registered compare against 144 would be one clock late.
- **Font select.** Control codes 0–31 select no font RAM and show blank. The original's
  select table is ambiguous for that range; the reading used here is the only one consistent
  with a 96-glyph, 3-RAM font.
- **Video-port page select through RST.** The video ports select their RAM through RST, as
  the bus ports do. This is what lets the ORed outputs work; a constant RST of 0 would not.
- **Blanking in the DAC register.** The DAC register gates pixels with both blanks and
  registers BLANK_N every cycle, as the block diagram shows (pixel AND blank).
- **Choices of this design.** These are not specified by the original: the bus byte lane
  (`DBus[7:0]` in, all lanes out), the order of the RAMs in the address window (character
  RAMs first), the exact clock of each bus step within the described sequence, and zero
  power-up contents.

The video DAC, the processor and the pixel-clock source are outside this
design: they connect through the top's `VIDOUT_*`, `OPB_*` and `Pixel_Clock`
ports.

## Simulating

Every block has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
    rtl/vga_pkg.sv tb/tb_opb_xsb300e_vga.sv --top-module tb_opb_xsb300e_vga
./obj_dir/Vtb_opb_xsb300e_vga
```

Replace the testbench name for the others: `tb_ramb4_s8_s8`, `tb_char_ram`,
`tb_font_ram`, `tb_video_timing`, `tb_shift_register`, `tb_video_out`,
`tb_opb_controller`.

`tb_opb_xsb300e_vga` runs the whole controller at its default size, with
unrelated 14 ns and 40 ns clocks. It takes about 5 s of CPU time.

1. An OPB master model loads the 96-glyph font and a screen that contains every code,
   including control codes and codes with bit 7 set.
2. It checks every active pixel of a frame on the DAC pins. It locates the beam from the sync
   pins alone, while the master reads the RAMs back during active video.
3. It rewrites 600 characters during active video and checks the next frame against the new screen.
4. Along the way it checks the line period (800), the frame period (420 000), the sync widths,
   the 4-clock bus latency and that foreign addresses are ignored.
5. It counts each mechanism and fails if any never happened: bus reads, writes during display,
   every RAM page used, blank control codes.

`tb_video_timing` compares every counter, sync, blank, strobe and address
output with an independent model for two full frames. The block-level RAM,
controller and datapath testbenches use random stimulus against reference
models.

All testbenches pass. Each was also run against a copy of its module with one
deliberate bug (for example, the fetch moved one pixel early, or write-through removed
from the RAM), and each detected it.
