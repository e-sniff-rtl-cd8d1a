# E-sniff display and keyboard hardware

E-sniff is a small embedded Ethernet packet sniffer. A soft processor on an FPGA board
captures frames from a 10/100 Ethernet controller, filters and decodes them, and shows them
on a VGA monitor; a PS/2 keyboard takes commands. The processor is busy with packets, so
the user interface is done in hardware. It has two parts:

* a **text-mode display controller**. It turns three character memories into a 640 x 480
  VGA picture with a border. It scrolls by moving a pointer, not by copying text.
* a **PS/2 keyboard controller**. It decodes keystrokes and writes them straight into the
  display's input line. The processor only hears about the keyboard when enter is pressed.
  It then reads the finished command line back from the display memory.

This repository holds that hardware in SystemVerilog. The design follows the E-sniff project
description ("E-sniff: An Embedded Ethernet Packet Sniffer"). Where that description gives
only a block's job, the details are choices made here. The section "Where this RTL departs
or had to choose" lists them. The processor system itself is not here: a vendor soft CPU,
its bus peripherals, the Ethernet chip, SDRAM and flash controllers, and the PLL. Their
signals are ports of the top module. The top also drives two simple board outputs: the
system clock to the SDRAM chip (`dram_clk`), and all-ones to the eight seven-segment
displays (`hex_seg`), which are otherwise lit at power-up.

## Block map

```
                       esniff_top
 ps2_clk/dat ─► kbd_controller ─────────────── write, data, backspace ──┐
               ├ ps2_receive   (frames, checks, timeout, scan-code FSM) │
               └ kbd_translate (scan code + shift -> ASCII)             │
                     └── enter ──► kbd_irq (to the processor)           ▼
 processor   ─► vga_controller ───────────────────────────────────────────────► VGA / DAC
 parallel port   timing   : vga_hsync_gen, vga_vsync_gen          (25 MHz)
 signals         memories : vga_text_ram (4800 B output ring), vga_text_ram (80 B status),
                            vga_input_ram (80 B input line, 2 read ports)
                 control  : vga_line_return, vga_cpu_write_fsm, vga_kbd_input_fsm
                 raster   : vga_counter -> memories -> vga_border_gen -> vga_font_rom
                            -> vga_cursor -> vga_rgb_out                (100 MHz)
```

Shared constants and the pixel-position struct `pix_pos_t` are in `rtl/esniff_pkg.sv`.
The font is in `rtl/font8x8.hex`.

## The screen

The picture is 80 x 60 character cells of 8 x 8 pixels:

| screen row | contents |
|---|---|
| 0 | border |
| 1 .. 54 | output text: 54 lines of the output ring |
| 55 | border |
| 56 | status line (80-byte status memory) |
| 57 | border |
| 58 | keyboard input line (80-byte input memory), with the blinking cursor |
| 59 | border |

Columns 0 and 79 are border, so 78 characters of each line are visible. The border is drawn
with glyph 0x01, a solid block. Characters are 7-bit ASCII; bit 7 of a stored byte is
ignored. Pixels are white on black.

### The output ring and scrolling

The 4800-byte output memory holds 60 lines of 80 bytes. It is used as a ring. Line *L*
starts at byte 80·*L*. `vga_line_return` keeps `top_line`, the ring index of the line in
screen row 1. The counter reads screen row *r* (1..54) from ring line
`(top_line + r − 1) mod 60`.

A line return adds one to `top_line`. The whole picture moves up one row, and no text is
copied. The bottom visible line is `base_line = (top_line + 53) mod 60`, and new text always
goes there. After a line return the new base line still holds a line from the last trip
round the ring, six lines back. `vga_cpu_write_fsm` therefore fills it with spaces, one byte
per clock, which takes 80 clocks. Processor writes that arrive in that time are held and done
afterwards. The six lines above the window are never shown. They are the slack that lets
the pointer move without the bottom line showing old text.

## Processor interface

The processor drives these signals from a parallel I/O port. They are levels in the 100 MHz
domain, and the hardware acts on **rising edges**, so software sets a bit and then clears it.

| signal | meaning |
|---|---|
| `cpu_vga_char[7:0]`, `cpu_vga_wr` | write a character. `cpu_vga_sel = 0`: at the output base line; `1`: in the status line. The column then moves right. Characters past column 78 are dropped. |
| `cpu_vga_enter` | with `sel = 0`: line return (scroll, clear the new line, column 0). With `sel = 1`: status column back to 0. |
| `cpu_vga_busy` | a request is still pending or a line is being cleared. |
| `cpu_kbd_erase` | clear the keyboard input line (80 clocks) and put the cursor at column 0. |
| `cpu_kbd_rd_addr[6:0]` → `cpu_kbd_rd_data[7:0]` | read the input line, one clock latency (the input memory's second read port). |
| `kbd_irq` | one-clock pulse when enter is pressed. This is the keyboard interrupt. |

A command cycle goes like this. The user types, and the characters appear without the
processor. The user presses enter and `kbd_irq` pulses. Software reads the line over the
read port, raises `cpu_kbd_erase`, and prints its answer with `cpu_vga_wr` and
`cpu_vga_enter`.

## Clocks and the raster pipeline

The design uses three clocks from one PLL. Their phase relation matters:

* `clk_100`: everything except the sync generators.
* `clk_25`: the pixel clock for `vga_hsync_gen` and `vga_vsync_gen`. These give 640 x 480
  timing: 800 clocks per line (96 clocks of sync, 16 front porch, 48 back porch) and 521
  lines per frame (2 lines of sync, 10 front porch, 29 back porch). Both syncs are active
  low.
* `clk_25_dac`: the pixel clock shifted by −90°. It only clocks the external video DAC
  (`vga_clk`).

The raster pipeline runs at 100 MHz. It does not receive pixel coordinates. Instead,
`vga_counter` samples the two display enables from the 25 MHz domain directly, which is safe
only because both clocks come from the same PLL. Inside the visible area it counts system
clocks, four per pixel. From that count it forms the character cell, the pixel inside the
glyph, and the three memory read addresses. The stages after it:

| clock edge (from the sampled enable) | stage |
|---|---|
| 1 | enable sampled |
| 2 | pixel counters |
| 3 | `vga_counter`: cell, glyph pixel, read addresses |
| 4 | memories return bytes |
| 5 | `vga_border_gen`: picks border / output / status / input byte |
| 6 | `vga_font_rom`: glyph row lookup → 3-bit colour |
| 7 | `vga_cursor`: inverts the cursor cell while the blink is on |
| 8 | `vga_rgb_out`: 3 bits → 3 × 10 bits to the DAC |

Colour therefore appears 8 system clocks (2 pixel clocks) after the pixel clock edge that
opens the pixel. `vga_controller` delays hsync, vsync and blank by `SYNC_DELAY = 2` pixel
clocks so that all outputs line up. The DAC then samples each pixel in the middle of its
four-clock window. The testbenches use this clock arrangement: the pixel clock is 2 ns after
a system clock edge, and the DAC clock is 30 ns after the pixel clock. If you change the
pipeline depth or the clock phases, check this alignment again.

The cursor blinks once per second. It is on for `BLINK_HALF_PERIOD` = 50,000,000 clocks and
off for the same time. It sits in the cell after the last typed character.

## Keyboard path

`ps2_receive` synchronises the PS/2 clock and data and takes one bit per falling clock edge.
A frame is 11 bits: start 0, eight data bits LSB first, odd parity, stop 1. A frame with a
bad start bit, stop bit or parity is dropped, and `frame_err` pulses.

Alignment guard: if a frame has started but is not finished within `TIMEOUT` clocks (2 ms),
the receiver starts over. The keyboard may have lost a clock edge. Without the guard, every
later frame would be read one bit out of place.

The scan-code state machine uses scan code set 2:

* `E0` marks an extended key and `F0` a release. Releases do nothing, except releasing shift.
* Left and right shift are tracked while held. Caps lock toggles on each press. The
  translator receives one shift level: shift held XOR caps lock. So caps lock also shifts
  digits and punctuation.
* Enter gives the `enter` pulse (`kbd_irq`). Backspace gives `backspace`. Neither writes a
  character.
* Any other key press puts its code on `data`. Extended keys, such as the arrows, give code
  00.

`kbd_translate` is a registered lookup table for the main block of a US keyboard: letters,
digits, punctuation and space, unshifted and shifted. Every other code gives a space. This
covers the number pad, function keys and arrows.

Timing into the memory: the scan code changes at clock *t*, and the ASCII code is registered
at *t+1*. The `write` strobe comes at *t+2*, so `data` is always stable for a clock before
and after the strobe. `vga_kbd_input_fsm` registers the character on the strobe. It writes
the character at the cursor column on the next clock and moves the cursor. Backspace moves
the cursor back and writes a space. Input stops at column 78. The keyboard is receive-only:
nothing is ever sent to it.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `esniff_top` | `BLINK_HALF_PERIOD` | 50,000,000 | cursor on/off time in system clocks (0.5 s) |
| `esniff_top` | `PS2_TIMEOUT` | 200,000 | PS/2 frame timeout in system clocks (2 ms) |
| `vga_controller` | `SYNC_DELAY` | 2 | pixel clocks added to hsync/vsync/blank |
| `vga_hsync_gen` / `vga_vsync_gen` | `VISIBLE`, `FRONT`, `SYNC`, `BACK` | 640/16/96/48, 480/10/2/29 | raster timing |
| `vga_text_ram` | `DEPTH` | 4800 | 4800 for the output ring, 80 for the status line |
| `vga_line_return` | `LINES`, `VIS_LINES` | 60, 54 | ring lines, lines on screen |
| `vga_cursor` | `HALF_PERIOD` | 50,000,000 | as above |
| `vga_font_rom` | `FONT_FILE` | `rtl/font8x8.hex` | glyph table, path relative to where the simulator runs |

The screen layout constants (`COLS`, `ROWS`, row numbers) are in `esniff_pkg`. The sync
generator parameters can be changed alone. The counter and the layout, however, assume
640 x 480.

The font file holds 1024 bytes: byte `8·code + row` is one glyph row, with bit 7 as the
leftmost pixel. Codes 0x20–0x7E are a standard public-domain 8x8 ASCII font. Code 0x01 is a
solid block (all rows 0xFF). All other codes are blank.

## Simulating

All files are plain SystemVerilog-2017. Run from the repository root, so that
`rtl/font8x8.hex` is found. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/esniff_pkg.sv tb/tb_esniff_top.sv --top-module tb_esniff_top
./obj_dir/Vtb_esniff_top
```

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. Each one also has a
watchdog that counts a failure if the test hangs.

| testbench | what it checks |
|---|---|
| `tb_esniff_top` | End to end, with a shorter blink and a faster PS/2 bit rate. Typing with shift, caps lock and backspace. A parity error and a timed-out frame are rejected. Enter raises the interrupt, then read-back and erase. Status line writes. More than 60 line returns, which wrap the ring, plus a line past the column limit. After each step a whole frame is compared pixel by pixel with a screen model kept by the testbench. Both cursor phases must be seen. About 35 s. |
| `tb_esniff_top_full` | One command cycle ("help", enter, read, erase, reply) with every default and a real PS/2 bit rate. About 12 s. |
| `tb_vga_controller` | The display alone, as in the top test, with keystrokes given as strobes. |
| `tb_vga_counter` | One whole frame: every pixel held exactly 4 clocks, raster order, ring addresses. |
| `tb_ps2_receive`, `tb_kbd_controller`, `tb_kbd_translate` | Frames and errors, modifiers, strobe timing; typed text end to end; all 256 codes × shift. |
| the other `tb_vga_*` | Each display block against its own reference model. |

`tb/vga_frame_grab.sv` is a monitor that captures frames the way a DAC would see them. It
is useful on its own for looking at the picture.

## Where this RTL departs or had to choose

These follow the E-sniff description:

* The block structure: 13 display blocks in four groups, and a keyboard receiver plus
  translator.
* The memory sizes: 4800, 80 and 80 bytes, with the input line read by both the raster and
  the processor.
* The clocks: 100 MHz, 25 MHz for the sync generators, and a −90° DAC clock.
* Scrolling by a line pointer over a ring, with new text written at the bottom of the
  screen.
* A 128-glyph 8x8 font with a 3-bit colour output, expanded to 30 bits for the DAC.
* A cursor that blinks once per second at the end of the input line.
* The PS/2 frame checks, the alignment timeout, the trapped keys, and spaces for keys
  outside the main block.
* Receive-only PS/2.

These are choices made here, where the description is silent:

* The 640 x 480 timing numbers. They are standard VGA values and match 80 x 60 cells of
  8 x 8 pixels.
* The screen layout, the one block glyph for the border, and the glyph shapes.
* The whole processor-side signal set and its edge-triggered behaviour.
* Clearing the new base line after a line return. Dropping characters past column 78.
* Following the 25 MHz raster from the 100 MHz domain, and `SYNC_DELAY`.
* Combining shift and caps lock by XOR. The treatment of `E0`/`F0` prefixes. The US layout.
* The 2 ms timeout value.
* The inverted-cell cursor.
* Power-up contents of the memories (spaces). Synchronous active-high reset.

The display memories are written as inferred arrays with registered reads. The font is a
ROM loaded by `$readmemh`. Both map onto FPGA block RAM. The testbenches check everything
above against reference models. The original board, the DAC's analog behaviour and real
keyboards were not available for testing.
