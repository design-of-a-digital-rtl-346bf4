# Character display controller for a stand-alone cash register

A point-of-sale terminal does not need a PC. In this design a small
microcontroller does the work of a register: it reads the keyboard and the
bar-code gun, looks products up on an SD card, computes totals and drives the
receipt printer. A low-cost FPGA takes over the one job that needs fast,
cycle-exact hardware: keeping a picture on a VGA (CRT) monitor. The
microcontroller only sends "put this character at this row and column" over
SPI. The FPGA stores the character in its own RAM and redraws the whole screen
60 times a second, without any further help.

The RTL here is that FPGA side. It shows an 80 × 60 character screen
(8 × 8 pixel cells) on a standard 640 × 480, 60 Hz raster. It runs on one
25 MHz pixel clock and needs about 33 kbit of block RAM.

The structure follows a published design: E. Jacinto, F. Martínez and
H. Montiel, *Design of a Digital Register (Stand-Alone) through the use of a
Mixed Embedded Platform*. From it come the blocks and how they connect (SPI
interface, binary-to-ASCII translation, RAM with its port control, Read Data,
synchronism signals, a general control unit) and the update state sequence
init → Addr_RAM → bin2ascii → Read_Data → VGA. The publication gives no
widths, timing values, word format, character set or memory sizes. Every one
of those is chosen here, as listed in
[What is given and what is chosen](#what-is-given-and-what-is-chosen).

## The two halves of the design

The controller has two independent loops that meet only at the display RAM.

```
              update path (event driven)                    refresh path (runs forever)
 SPI ──► spi_slave ──► ctrl_fsm ──► bin2ascii              vga_sync ──► read_data ──► VGA port
                          │   ◄────────┘                                  │  ▲   │  ▲
                          └── write ──► ram_port_ctrl ◄── read ───────────┘  │   │  │
                                              │                               │   ▼  │
                                           text_ram ──── glyph index ─────────┘  char_rom
```

* **Update path.** An SPI word arrives. The control unit computes the cell's
  RAM address and has the translation table turn the character code into a
  glyph number. It then writes that number into the display RAM.
* **Refresh path.** The sync generator scans the raster. For every 8-pixel
  cell, Read Data fetches the glyph number from the display RAM and the
  glyph's pixel row from the character ROM. It then shifts the eight pixels
  out to the monitor.

The display RAM has **a single port**, and both paths use it. Sharing that port
without disturbing the picture is the main timing problem of the design. It is
covered in [Sharing the display RAM](#sharing-the-display-ram).

## Update words

The microcontroller is the SPI master. Each transfer is one 32-bit word sent
most significant bit first, in SPI mode 0: chip select is active low, SCK
idles low, the slave samples MOSI on the rising edge, and MISO changes on the
falling edge.

| bits    | field | meaning                                                        |
|---------|-------|----------------------------------------------------------------|
| [31:24] | row   | text row, 0 = top, 0–59                                        |
| [23:16] | col   | text column, 0 = left, 0–79                                    |
| [15:8]  | –     | ignored                                                        |
| [7:0]   | code  | ASCII code, or 0x00–0x0F for a binary nibble (shown as 0–F)    |

While a word is shifted in, MISO shifts out the previous word received. The
master can use this to check that the last word arrived intact. A word with
row ≥ 60 or column ≥ 80 is dropped. A transfer that chip select ends before
the 32nd bit is discarded.

`spi_slave` passes SCK, MOSI and chip select through two-flip-flop
synchronisers into the pixel-clock domain and detects SCK edges there. SCK
must therefore be slow compared with the pixel clock. The testbenches use
clk/8 (about 3 MHz), the fastest rate verified.

## The control unit

`ctrl_fsm` handles one word in five one-clock states:

| state       | what happens                                                                  |
|-------------|-------------------------------------------------------------------------------|
| S_INIT      | idle; on the SPI event (`frame_valid`) the word is latched                    |
| S_ADDR_RAM  | address = row × 80 + col is registered; off-screen words return to S_INIT     |
| S_BIN2ASCII | the translation table is strobed; its registered result is ready next clock   |
| S_READ_DATA | write request to the RAM port; stays here while the raster holds the port     |
| S_VGA       | the port is left to the raster; `done` pulses on the next clock               |

`done` comes 5 clocks after the SPI event, or 6 if the write had to wait.
A word takes at least 256 clocks to arrive, so the machine is always back in
S_INIT before the next one. No queue is needed.

## Translation table and glyphs

`bin2ascii` maps a code to one of 64 glyphs:

| glyph | characters                                                     |
|-------|----------------------------------------------------------------|
| 0     | space                                                          |
| 1–10  | `0`–`9` (also codes 0x00–0x09)                                 |
| 11–36 | `A`–`Z` (also `a`–`z`, and codes 0x0A–0x0F for `A`–`F`)        |
| 37–59 | `. , : $ - + * / = # % ( ) ? ! ' " < > _ & @ ;`               |
| 60–62 | unused, blank                                                  |
| 63    | solid box, shown for any other code (`upd_unknown` pulses)     |

The glyph shapes are 5 × 7 dot matrices in `font_pkg`: one 64-bit constant
per glyph, row 0 in the top byte, bit 7 the leftmost pixel. Each glyph leaves
its right column and bottom row empty, so neighbouring characters do not
touch. `char_rom` reads that table synchronously, as one block RAM would.
To change the character set, edit `font_pkg` and the case list in `bin2ascii`
together.

## Drawing the screen

`vga_sync` counts pixels (x) and lines (y). Each count starts with the
visible part of its period:

| | visible | front porch | sync pulse | back porch | total |
|---|---|---|---|---|---|
| horizontal (clocks) | 640 | 16 | 96 | 48 | 800 |
| vertical (lines)    | 480 | 10 | 2  | 29 | 521 |

Both syncs are active low. At 25 MHz this gives 31.25 kHz lines and 59.98 Hz
frames. All values are parameters of `vga_sync`, with defaults set in
`vga_pkg`.

`read_data` is a three-stage pipeline:

1. At the first pixel of each visible cell (x mod 8 = 0), read the display
   RAM at (y / 8) × 80 + x / 8.
2. Read the character ROM with the returned glyph number and row y mod 8.
3. Load the 8-bit row into a shift register and send the leftmost pixel
   first. Set pixels are white (`FG_RGB`) and clear pixels black (`BG_RGB`).
   Blanking is always black.

hsync, vsync and the display enable go through the same three registers.
The VGA outputs therefore lag the raster counters by three clocks but stay
aligned with each other. A monitor only sees the syncs and colours, so this
lag is invisible.

## Sharing the display RAM

FPGA block RAM has a read port and a write port, but this design gives the
display RAM one port on purpose. The updates are so rare that a second port
would buy nothing. `ram_port_ctrl` decides who uses the port:

* The raster cannot wait, so a Read Data request always wins.
* The raster reads only once per 8-pixel cell: one clock in eight during the
  visible part of a line, and never during blanking.
* A write is granted in any clock without a raster read. In S_READ_DATA the
  control unit therefore waits at most one clock.

The rule is written down as an assertion in `ram_port_ctrl`: in a clock with
a raster read, nothing is written and the RAM sees the raster's address.
A write that landed in a raster-read clock would put the glyph in the wrong
cell and drop that cell's read. The end-to-end testbench makes such
collisions happen and checks the picture afterwards.

`text_ram` starts out blank: FPGA block RAM takes initial contents from the
configuration. The screen is empty after power-up without a clearing pass.

## Modules

| file | role |
|------|------|
| `rtl/vga_pkg.sv` | timing constants, text grid, glyph width, update word struct, FSM state enum |
| `rtl/font_pkg.sv` | the 64 glyph images |
| `rtl/fpga_top.sv` | top level: wires everything below |
| `rtl/spi_slave.sv` | SPI interface, 32-bit words, SPI event pulse, MISO echo |
| `rtl/ctrl_fsm.sv` | general control unit (update sequence) |
| `rtl/bin2ascii.sv` | translation table code → glyph |
| `rtl/ram_port_ctrl.sv` | display RAM port sharing (raster priority) |
| `rtl/text_ram.sv` | display RAM, 4800 × 6 bit, single port |
| `rtl/char_rom.sv` | character generator ROM, 512 × 8 bit |
| `rtl/vga_sync.sv` | raster counters and syncs |
| `rtl/read_data.sv` | pixel pipeline to the VGA port |

Top-level ports of `fpga_top`:

| port | dir | meaning |
|------|-----|---------|
| `clk` | in | 25 MHz pixel clock, also the clock of all logic |
| `rst_n` | in | asynchronous reset, active low |
| `spi_cs_n`, `spi_sck`, `spi_mosi` | in | SPI from the microcontroller |
| `spi_miso` | out | previous word echoed; driven low when not selected |
| `vga_hsync_n`, `vga_vsync_n` | out | syncs, active low |
| `vga_rgb[2:0]` | out | red, green, blue, one bit each |
| `upd_done` | out | one-clock pulse per character written |
| `upd_unknown` | out | with `upd_done`: the code had no glyph |
| `upd_dropped` | out | one-clock pulse per word addressed off the screen |

After synthesis the top has about 236 flip-flop bits, about 240 word-level
cells and 32,896 memory bits (28,800 display RAM and 4,096 ROM). That fits
the 64 kbit of block RAM in an iCE40HX1K.

## Simulation

Every module has a self-checking testbench in `tb/<module>_tb.sv`. It ends by
printing `TB_RESULT checks=N failures=M`. With Verilator 5, from the folder
that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/vga_pkg.sv rtl/font_pkg.sv \
          tb/fpga_top_tb.sv --top-module fpga_top_tb
./obj_dir/Vfpga_top_tb
```

Replace `fpga_top` with any other module name to run its testbench. Each runs
in a second or less.

* `fpga_top_tb` runs the whole design at its real size. A bit-level SPI
  master writes a sales line, lower-case text, hexadecimal nibbles, an
  unknown code and off-screen words. More words follow while a frame is being
  drawn. The testbench then recovers the picture from the sync outputs alone
  and compares every pixel of two full frames with its own screen model. It
  also counts SPI words, writes, writes held back by a raster read, dropped
  words, unknown codes and MISO echoes, and fails if any of these never
  occurred.
* `screen_fill_tb` writes all 4800 cells over SPI, a full screen of
  printable ASCII. It then checks every pixel of the next frame. This shows
  that the display RAM holds a complete screen and that every cell address
  lands in the right place.
* `vga_sync_tb` checks every clock of two frames against the timing table.
* `read_data_tb` models the RAM and ROM and checks every pixel of a frame and
  every RAM read address.
* `ctrl_fsm_tb` checks the state order, the write address and data, the
  latency including waits for the port, and dropped words.
* `spi_slave_tb`, `bin2ascii_tb` (all 256 codes), `char_rom_tb`,
  `text_ram_tb` and `ram_port_ctrl_tb` cover the remaining modules.

## What is given and what is chosen

Taken from the published description:

* The split into an SPI interface, binary-to-ASCII translation, RAM with its
  read-data port control, Read Data, synchronism signals and a general control
  unit.
* The general control unit is a state machine with the states init, Addr_RAM,
  bin2ascii, Read_Data and VGA, in that order. It waits in init for an SPI
  event.
* The FPGA holds the display memory and character ROMs and refreshes the VGA
  screen on its own. The microcontroller only sends what to show.
* The SPI link uses 32-bit transfers, MSB first, and the slave returns the
  previous transfer while the next one comes in.
* The screen timing is described as display time, front porch, sync pulse and
  back porch within one period.

Chosen here, with no source in the description:

* 640 × 480 at 60 Hz with a 25 MHz pixel clock, and active-low syncs.
* Text mode with 8 × 8 cells and an 80 × 60 grid, instead of a pixel frame
  buffer. A 640 × 480 bit map would need 307 kbit, far more than a
  small iCE40 has.
* The update word layout, the address formula, dropping off-screen words,
  SPI mode 0 and the clk/8 SCK limit.
* The character set, the glyph shapes and the nibble-to-hex rule.
* The meaning given to the last two states. Read_Data writes the glyph into
  the memory the raster reads. VGA hands the port back to the raster.
* A single-port display RAM with raster priority, and the three-stage pixel
  pipeline.
* A one-bit-per-colour output and white-on-black text.
* The asynchronous active-low reset and the blank RAM at power-up.

Not included:

* The microcontroller and its firmware (keyboard and bar-code input, product
  look-up, SD-card storage, receipt printing), and the peripherals and monitor
  themselves.
* The described use of the FPGA as auxiliary memory for the
  microcontroller's data, beyond the echo on MISO. No read command or format
  for it is defined.
* A request or interrupt line from the FPGA to the microcontroller. One
  appears in the firmware flow but not in the FPGA structure.
* A direct link between the control unit and the sync generator. The block
  diagram draws one. Here the control unit only learns about the raster
  through the RAM port grant, which depends on Read Data's raster reads.
* A PLL. The iCEstick board oscillator is 12 MHz, so on that board a PLL or
  an external 25 MHz clock must supply `clk`.
