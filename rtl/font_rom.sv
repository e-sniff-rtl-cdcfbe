// font_rom: character generator ROM of the text-mode VGA driver.
//
// Holds one 8x8 glyph for each 7-bit ASCII code (128 x 8 bytes). The address is the
// character code followed by the glyph row; the data is that row, bit 7 being the
// leftmost pixel. Glyphs are 5x7 pixels drawn in columns 1..5 and rows 0..6, so
// neighbouring characters and rows stay apart. Codes below 0x20 and 0x7F are blank;
// the top bit of an 8-bit code is ignored.
//
// The read is synchronous and gated by 'en': 'row_bits' shows the row addressed in the
// cycle 'en' was high, one clock later. The specification asks only that the font be
// kept in a ROM inside the VGA hardware; the glyph set and the 8x8 format are this
// design's own. The contents come from font8x8.hex (one byte per line, glyph-major).
module font_rom #(
  parameter string INIT_FILE = "rtl/font8x8.hex"
) (
  input  logic       clk,
  input  logic       en,
  input  logic [6:0] char_code,
  input  logic [2:0] row,
  output logic [7:0] row_bits
);

  logic [7:0] rom [128*8];

  initial $readmemh(INIT_FILE, rom);

  always_ff @(posedge clk) begin
    if (en) row_bits <= rom[{char_code, row}];
  end

endmodule
