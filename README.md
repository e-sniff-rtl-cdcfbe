# E-Sniff display and keyboard hardware

E-Sniff is a standalone Ethernet packet sniffer built on an FPGA board. An Ethernet
controller in promiscuous mode captures every frame on a monitored link. A soft
processor checks each frame against user filters and prints one line of text per
packet on a VGA monitor. The user types filter and capture commands on a PS/2
keyboard. The device never transmits on the network. With no keyboard attached it
starts capturing on its own.

This repository holds the custom hardware around that processor, in synthesizable
SystemVerilog:

- a text-mode VGA driver, 640x480 at 60 Hz, with its own font ROM;
- a scrolling video memory that moves the whole screen up one line in a single clock;
- a separate one-line keyboard input buffer;
- a PS/2 keyboard driver. It tests for a keyboard at boot, checks every frame for
  errors, translates scan codes to ASCII, raises an interrupt on return, and can send
  any command byte to the keyboard.

These parts are not here: the processor core, the Ethernet controller chip, the
frame SRAM, the optional CompactFlash storage, and the capture, filter and display
software. They are vendor IP, off-chip parts or software. The processor's side of
every interface is a plain port on the top module `esniff_top`.

```
            PS/2 pins                                   VGA DAC
               |                                           ^
       +-------v--------+   one char / clock   +-----------+-----------+
       | keyboard_driver|--------------------->| kbd_line_buffer (row 29)|
       |  ps2_line_sync |                      +-----------+-----------+
       |  ps2_rx/ps2_tx |                                  | read
       |  scancode_to_  |                      +-----------v-----------+
       |  ascii         |                      |   vga_text_driver     |
       +---+--------+---+                      |  vga_timing, font_rom |
   irq, line_ready  | cmd                      +-----------^-----------+
           |        |                                      | read
           v        |        write / scroll    +-----------+-----------+
     processor ports <----------------------->  |  video_ram (rows 0-28) |
                                               +-----------------------+
```

Everything runs on one 100 MHz clock with an active-low asynchronous reset `rst_n`.

## The screen

The display is a grid of 80 x 30 character cells of 8 x 16 pixels. Each cell holds
one ASCII code. Rows 0 to 28 are the message area: packet summaries and replies,
with new lines at the bottom and old ones dropping off the top. Row 29 is the
keyboard input line, drawn in yellow. The message area is white on black.

The processor never draws pixels. It writes ASCII codes into the video memory, and
the VGA hardware turns them into pixels on every frame.

## Scrolling with a line offset (`video_ram`)

The message area is a dual-port RAM of 29 x 80 bytes. The processor writes through
port A and the VGA driver reads through port B. Both ports give a *screen* row. A line
offset register maps it to a *physical* row:

    physical_row = (screen_row + offset) mod 29
    address      = physical_row * 80 + column

A one-clock pulse on `scroll` adds one to `offset`, wrapping from 28 to 0. After
that, screen row 0 shows what used to be row 1, and so on. The old top line now
appears as the bottom row, so the processor overwrites that row with the new
message. Printing a line therefore costs 1 scroll clock plus 80 write clocks,
instead of rewriting all 2,320 characters.

Details:

- A write in the same clock as a scroll uses the offset from before the scroll.
- Reads are synchronous: `rd_char` is valid one clock after `rd_en`.
- A write to a row or column out of range is dropped, and a read there returns a
  space.
- Reset clears only the offset. The character cells are not reset, because the
  memory is meant for block RAM. Software clears the screen at start-up.

## The keyboard input line (`kbd_line_buffer`)

The input line is held in 80 registers rather than a RAM, because the whole line
must be cleared to spaces (0x20) at once by an asynchronous reset. It has three
users:

- The keyboard driver writes it.
- The VGA driver reads it through its own combinational port.
- The processor reads it through a second combinational port.

Because every reader has its own port, no two users ever contend for one set of
address lines. A synchronous `clear` also fills the line with spaces. The driver
uses it once the processor has taken a command.

## Drawing pixels (`vga_text_driver`, `vga_timing`, `font_rom`)

`vga_timing` divides the 100 MHz clock by 4 into a 25 MHz pixel strobe. It counts
the standard 800 x 525 pixel frame, which gives 59.5 Hz. It has 640x480 visible,
sync pulses at columns 656-751 and lines 490-491, both active low.

The driver is a three-stage pipeline that advances on the pixel strobe:

1. The counters address a cell: column `x/8` and row `y/16`. Both the video RAM and
   the input line are read; row 29 selects the input line.
2. The character code and the glyph row `(y mod 16)/2` address the font ROM. Each
   8x8 glyph row covers two scan lines.
3. Bit `7 - (x mod 8)` of the glyph row selects foreground or black. This stage
   registers the colour, the blanking and the syncs.

The syncs go through the same three stages, so pixels and syncs stay aligned. The
outputs lag the counters by three pixels. The fetch happens for every pixel and
nothing can stall it. The refresh rate therefore does not depend on what the memory
holds or on what the processor is doing.

`font_rom` holds 128 glyphs of 8 bytes, loaded from `rtl/font8x8.hex`, one byte per
line. The address is `{code[6:0], row[2:0]}` and bit 7 is the leftmost pixel.
Printable ASCII 0x21-0x7E are 5x7 dot-matrix glyphs in columns 1-5 and rows 0-6, so
adjacent characters never touch. Codes 0x00-0x20 and 0x7F are blank.

Colour outputs are 10 bits per channel, with an active-low blanking signal, for a
video DAC.

## The keyboard path (`keyboard_driver`)

`ps2_line_sync` brings the PS/2 clock and data pins into the system clock domain. It
uses a two-flop synchroniser and an 8-sample glitch filter. It gives one strobe per
falling edge of the keyboard clock.

**Receiving.** `ps2_rx` shifts in the 11-bit PS/2 frame: start 0, eight data bits
LSB first, odd parity, stop 1. After the 11th bit it checks the start, parity and
stop bits. A bad frame pulses `err` and flags which check failed. Its byte goes no
further, so the keystroke is ignored. If a frame stops for 200 µs, the part received
so far is dropped, and the receiver locks onto the next frame.

**Translating.** `scancode_to_ascii` follows scan code set 2. It tracks the F0
(release) and E0 (extended) prefixes and both shift keys. It gives one ASCII
character, one clock later, for each press of a known key:

- letters and digits;
- the punctuation on the main keys and the keypad (`. / - : ;` and so on, which are
  enough for IP addresses, masks and commands);
- space, return (0x0D) and backspace (0x08).

Key releases, modifiers and keys with no ASCII meaning give nothing. The table is
`scan_to_ascii()` in `esniff_pkg`.

**Line entry.** Each character is written into the input line at the cursor, in one
clock, the clock after translation. Backspace moves the cursor back and blanks that
cell. Characters past column 79 are dropped.

**Handing a line to the processor.** Return raises `irq` for exactly two clocks and
sets `line_ready`. While `line_ready` is high, the driver leaves the line alone and
drops new keys. The processor reads `line_len` characters through `kbd_rd_col` /
`kbd_rd_char`. It then pulses `line_ack`, which clears the line, puts the cursor back
at column 0 and drops `line_ready`. An assertion in the driver checks the two-clock
interrupt length.

**Sending to the keyboard.** `ps2_tx` implements the PS/2 host-to-device sequence:

1. Hold the clock low for 100 µs.
2. Pull data low as the start bit.
3. Release the clock.
4. Put out one bit after each falling edge of the keyboard clock: data, odd parity,
   then the stop bit.
5. Check the device's acknowledge on the 11th falling edge.

A missing acknowledge, or no finished frame within 15 ms, ends with `err`. After
boot, the processor sends any byte with `kbd_cmd_valid` / `kbd_cmd_data`, for example
ED to set the keyboard LEDs. The receiver is switched off while the transmitter owns
the lines. The pins are open drain: `ps2_clk_oe` and `ps2_data_oe` high mean "pull
the line low".

**Boot test.** After reset, the driver sends the keyboard reset command FF. It then
waits up to 1 s for the self-test pass byte AA:

- If AA arrives, `kbd_present` goes high.
- If the transfer fails (nothing drives the clock) or AA never comes, `auto_start`
  goes high. The processor then starts capturing with default settings.

`kbd_boot_done` marks the end of the test. Commands are accepted only after it.

## Processor interface of `esniff_top`

| Port | Dir | Meaning |
|---|---|---|
| `vram_we`, `vram_row[4:0]`, `vram_col[6:0]`, `vram_char[7:0]` | in | write one character of the message area (row 0-28) |
| `vram_scroll` | in | one-clock pulse: scroll the message area up one row |
| `kbd_rd_col[6:0]` / `kbd_rd_char[7:0]` | in/out | read the input line (combinational) |
| `kbd_irq` | out | two-clock interrupt on return |
| `kbd_line_ready`, `kbd_line_len[7:0]` | out | a line is waiting, and its length |
| `kbd_line_ack` | in | line taken: clear it and resume typing |
| `kbd_cmd_valid`, `kbd_cmd_data[7:0]` | in | send a byte to the keyboard (when `kbd_cmd_busy` is low) |
| `kbd_cmd_busy`, `kbd_cmd_done`, `kbd_cmd_err` | out | command status |
| `kbd_boot_done`, `kbd_present`, `auto_start` | out | boot test result |
| `kbd_rx_err` | out | a corrupted keyboard frame was dropped |
| `frame_start` | out | start of each VGA frame |

To print a packet line, the software pulses `vram_scroll` and then writes 80
characters to row 28. That is 81 clocks, within the budget of about 100 clocks per
line that the system needs.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `vga_timing`, `vga_text_driver`, `esniff_top` | `CLK_DIV` | 4 | system clocks per pixel (100 → 25 MHz) |
| `vga_timing` | `H_*`, `V_*` | 640/16/96/48, 480/10/2/33 | active, front porch, sync, back porch |
| `video_ram` | `COLS`, `ROWS` | 80, 29 | message area size |
| `kbd_line_buffer` | `COLS`, `FILL` | 80, 0x20 | line length, reset character |
| `ps2_line_sync` | `FILTER` | 8 | glitch filter length in clocks |
| `ps2_rx` | `TIMEOUT` | 20,000 | clocks before a stalled frame is dropped (200 µs) |
| `ps2_tx` | `INHIBIT`, `TIMEOUT` | 10,000, 1,500,000 | clock-low request time (100 µs), transfer timeout (15 ms) |
| `keyboard_driver` | `BOOT_TIMEOUT` | 100,000,000 | wait for the self-test answer (1 s) |

The timeouts assume a 100 MHz clock. Scale them if you change the clock.

## What follows the specification and what is this design's choice

These points come from the original functional specification:

- 640x480 at 60 Hz, with Hsync and Vsync made in hardware;
- a character-code video memory with a font ROM inside the VGA hardware;
- a dual-port video memory scrolled by adding one to a line offset in a single clock;
- a separate input line, reset asynchronously to 0x20 and readable by both the VGA
  driver and the processor;
- a shift-register PS/2 receiver that checks start, parity and stop bits and ignores
  bad keystrokes;
- sending arbitrary codes to the keyboard;
- scan code to ASCII translation for letters, digits and the punctuation needed for
  addresses;
- one character per clock into the line;
- a two-clock interrupt on return;
- a boot-time keyboard test that starts capture automatically;
- a 100 MHz system clock.

These are this design's own choices:

- 8x16 cells with 8x8 glyphs and doubled rows;
- the 29 + 1 row split;
- the colours and 10-bit outputs;
- the VESA porch and sync values;
- the pipeline;
- write-before-scroll ordering;
- no reset of the character cells;
- separate read ports as the means of avoiding bus contention;
- the `line_ready`/`line_ack` handshake and dropping keys while a line is pending;
- backspace;
- using FF/AA as the presence test;
- all timeouts and the glitch filter;
- the set of keys translated.

Caps lock is not handled. The specification also says "all" scan codes should be
translated; this design translates only keys that have an ASCII meaning.

Not implemented in RTL: the processor, the Ethernet controller set-up, frame
copying, filtering, packet-loss reporting, the three interrupt priorities, the
external SRAM and the non-volatile storage. These belong to the processor, its
software or off-chip parts.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares the module
with values worked out independently and prints `TB_RESULT checks=N failures=M`:

- `tb_vga_timing` walks two whole frames. It checks every coordinate, sync and
  blanking level, the 96-pixel hsync, the 2-line vsync, and a frame period of
  1,680,000 clocks (59.5 Hz).
- `tb_vga_text_driver` compares every pixel of two frames with an image built from a
  model of the character grid and the font table.
- `tb_video_ram` runs random writes, reads and scrolls against a screen model,
  including offset wrap-around.
- `tb_kbd_line_buffer` checks the asynchronous reset with no clock running.
- `tb_ps2_rx` and `tb_ps2_tx` exercise good frames and every error and timeout case.
- `tb_scancode_to_ascii` tests shifted keys, unshifted keys, released keys and
  extended keys.
- `tb_keyboard_driver` runs against `tb/ps2_kbd_model.sv`, a behavioural PS/2
  keyboard. It covers boot with a keyboard, boot without one, and boot with a
  keyboard that never reports its self-test result. It also covers typing, a
  corrupted frame, return, the hand-over, the line limit, and a command byte that
  succeeds and one that fails.
- `tb_esniff_top` runs the whole top at its default parameters: real PS/2 timing
  (12.5 kHz keyboard clock) and a full VGA frame. It does the following and counts
  each mechanism:
  1. boots with a keyboard;
  2. fills the screen, prints three lines with scrolls;
  3. types a command with shift, backspace and a corrupted frame;
  4. checks one whole frame pixel by pixel;
  5. presses return, reads and acknowledges the line;
  6. sends a command;
  7. boots again with no keyboard.

  It takes about 10 s.

To run a testbench with Verilator, from the repository root (the font file is found
by a path relative to it):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/esniff_pkg.sv tb/tb_esniff_top.sv --top-module tb_esniff_top
./obj_dir/Vtb_esniff_top
```

Replace `tb_esniff_top` with any other testbench name. To lint a module:
`verilator --lint-only -Wall -Irtl -y rtl rtl/esniff_pkg.sv rtl/<module>.sv`.

The remaining lint warnings are all harmless:

- The video RAM's `offset` output is not used in the top.
- Some unused bits remain, such as bit 7 of a character code, which the 7-bit font
  ignores.
- Verilator reports `rst_n` as used both synchronously and asynchronously. This is
  caused by the `disable iff` clause of the interrupt assertion.
