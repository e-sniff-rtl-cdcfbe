// vga_text_driver: text-mode VGA display driver, 640x480 at 60 Hz.
//
// The screen is a grid of 8x16-pixel character cells, 80 columns by 30 rows. For each
// pixel the driver fetches the ASCII code of its cell, looks the glyph row up in the
// font ROM and drives the pixel on or off. Rows 0..28 come from the scrolling video
// RAM; row 29 shows the keyboard input line. Glyphs are 8x8 and each glyph row is shown
// on two scan lines, filling the 16-line cell.
//
// Pipeline, one stage per pixel strobe: (1) the vga_timing counters address the video
// RAM and the input line, (2) the font ROM is read with the returned code, (3) the
// pixel bit is selected and the colour, syncs and blanking are registered. The syncs
// are delayed through the same three stages, so the image lines up with them. Because
// the fetch repeats on every pixel and nothing else can stall it, the screen refreshes
// at the full rate whatever the memory holds and whatever the rest of the system does.
//
// Colour outputs are 10 bits per channel for a video DAC. Message text is FG_TEXT and
// the input line FG_INPUT, on black. Text mode, the font ROM inside the driver and the
// 640x480/60 Hz timing follow the specification; the cell size, the layout of the
// rows, the colours and the pipeline are this design's own.
module vga_text_driver #(
  parameter int unsigned CLK_DIV   = 4,
  parameter logic [29:0] FG_TEXT   = {10'h3FF, 10'h3FF, 10'h3FF},
  parameter logic [29:0] FG_INPUT  = {10'h3FF, 10'h3FF, 10'h000},
  parameter string       FONT_FILE = "rtl/font8x8.hex"
) (
  input  logic        clk,
  input  logic        rst_n,
  // video RAM read port (one-clock synchronous read)
  output logic        vram_rd_en,
  output logic [4:0]  vram_row,
  output logic [6:0]  vram_col,
  input  logic [7:0]  vram_char,
  // keyboard input line read port (combinational read)
  output logic [6:0]  kbd_col,
  input  logic [7:0]  kbd_char,
  // VGA outputs
  output logic        vga_hs,
  output logic        vga_vs,
  output logic        vga_blank_n,
  output logic [9:0]  vga_r,
  output logic [9:0]  vga_g,
  output logic [9:0]  vga_b,
  output logic        frame_start
);
  import esniff_pkg::*;

  typedef struct packed {
    logic [2:0] xbit;      // pixel within the cell
    logic [2:0] grow;      // glyph row (scan line / 2)
    logic       input_row; // cell belongs to the keyboard line
    logic       active;
    logic       hs;
    logic       vs;
  } stage_t;

  logic       pix_en, active, hsync, vsync;
  logic [9:0] x, y;

  vga_timing #(.CLK_DIV(CLK_DIV)) u_timing (
    .clk, .rst_n, .pix_en, .x, .y, .active, .hsync, .vsync, .frame_start
  );

  // stage 1: character fetch
  logic [4:0] cell_row;
  assign cell_row   = y[8:4];
  assign vram_rd_en = pix_en;
  assign vram_row   = cell_row;
  assign vram_col   = x[9:3];
  assign kbd_col    = x[9:3];

  stage_t     s1, s2;
  logic [7:0] kbd_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1    <= '{default: '0, hs: 1'b1, vs: 1'b1};
      s2    <= '{default: '0, hs: 1'b1, vs: 1'b1};
      kbd_q <= ASCII_SPACE;
    end else if (pix_en) begin
      s1    <= '{xbit: x[2:0], grow: y[3:1], input_row: (cell_row == 5'(ROWS - 1)),
                 active: active, hs: hsync, vs: vsync};
      s2    <= s1;
      kbd_q <= kbd_char;
    end
  end

  // stage 2: glyph row lookup
  logic [7:0] code, glyph;
  assign code = s1.input_row ? kbd_q : vram_char;

  font_rom #(.INIT_FILE(FONT_FILE)) u_font (
    .clk, .en(pix_en), .char_code(code[6:0]), .row(s1.grow), .row_bits(glyph)
  );

  // stage 3: pixel out
  logic        pixel_on;
  logic [29:0] fg;
  assign pixel_on = glyph[3'd7 - s2.xbit] && s2.active;
  assign fg       = s2.input_row ? FG_INPUT : FG_TEXT;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vga_hs      <= 1'b1;
      vga_vs      <= 1'b1;
      vga_blank_n <= 1'b0;
      {vga_r, vga_g, vga_b} <= '0;
    end else if (pix_en) begin
      vga_hs      <= s2.hs;
      vga_vs      <= s2.vs;
      vga_blank_n <= s2.active;
      {vga_r, vga_g, vga_b} <= pixel_on ? fg : '0;
    end
  end

endmodule
