// tb_vga_text_driver: renders two full frames from a video RAM model and an input-line
// model and compares every output pixel, sync and blanking level with an image worked
// out here from the character grid (8x16 cells, glyph rows doubled) and the font table.
// The screen contents change between the frames, so the second frame also shows that
// the display follows memory updates. Pixels appear 3 pixel strobes after the timing
// counters reach them, the same delay as the syncs.
module tb_vga_text_driver;
  localparam logic [29:0] FG_TEXT  = {10'h3FF, 10'h3FF, 10'h3FF};
  localparam logic [29:0] FG_INPUT = {10'h3FF, 10'h3FF, 10'h000};
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  logic vram_rd_en;
  logic [4:0] vram_row;
  logic [6:0] vram_col, kbd_col;
  logic [7:0] vram_char, kbd_char;
  logic vga_hs, vga_vs, vga_blank_n, frame_start;
  logic [9:0] vga_r, vga_g, vga_b;
  int checks = 0, failures = 0;

  vga_text_driver dut (.*);

  logic [7:0] screen [29][80];
  logic [7:0] kline [80];
  logic [7:0] font [1024];

  initial $readmemh("rtl/font8x8.hex", font);

  always_ff @(posedge clk)
    if (vram_rd_en) vram_char <= (vram_row < 29 && vram_col < 80) ? screen[vram_row][vram_col] : 8'h20;
  assign kbd_char = (kbd_col < 80) ? kline[kbd_col] : 8'h20;

  task automatic fill(input int seed);
    for (int r = 0; r < 29; r++)
      for (int c = 0; c < 80; c++) screen[r][c] = 8'((r * 80 + c + seed) % 95 + 32);
    for (int c = 0; c < 80; c++) kline[c] = 8'((c * 3 + seed) % 95 + 32);
  endtask

  initial begin
    #40_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k = 0, bad = 0, lit = 0, lit_input = 0;
    fill(0);
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (k < 2 * 800 * 525 + 4) begin
      @(negedge clk);
      if (dut.u_timing.pix_en) begin
        k++;
        if (k == 800 * 525) fill(17);   // change the picture for frame 2 (well before it is read)
        if (k >= 4) begin
          int p, x, y, row, col;
          logic [7:0] ch, g;
          logic act, on;
          logic [29:0] want;
          p = (k - 4) % (800 * 525);
          x = p % 800; y = p / 800;
          act = x < 640 && y < 480;
          want = '0;
          if (act) begin
            row = y / 16; col = x / 8;
            ch = (row == 29) ? kline[col] : screen[row][col];
            g = font[{ch[6:0], 3'((y % 16) / 2)}];
            on = g[7 - x % 8];
            if (on) want = (row == 29) ? FG_INPUT : FG_TEXT;
            if (on) lit++;
            if (on && row == 29) lit_input++;
          end
          checks++;
          if (vga_hs != !(x >= 656 && x < 752) || vga_vs != !(y >= 490 && y < 492) ||
              vga_blank_n != act || {vga_r, vga_g, vga_b} != want) begin
            failures++;
            if (bad++ < 10)
              $display("FAIL pixel (%0d,%0d) hs %b vs %b bl %b rgb %h want %h",
                       x, y, vga_hs, vga_vs, vga_blank_n, {vga_r, vga_g, vga_b}, want);
          end
        end
      end
    end
    checks++;
    if (lit < 10000 || lit_input < 100) begin failures++; $display("FAIL too few lit pixels"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
