// tb_font_rom: checks glyph rows of the font ROM against glyphs drawn here, the blank
// control codes, the one-clock read latency and the hold when 'en' is low.
module tb_font_rom;
  logic clk = 0;
  always #5 clk = ~clk;

  logic       en;
  logic [6:0] char_code;
  logic [2:0] row;
  logic [7:0] row_bits;
  int checks = 0, failures = 0;

  font_rom dut (.*);

  // Reference glyphs, drawn as text: '#' = pixel on, 5 columns placed at bits 6..2.
  function automatic logic [7:0] ref_row(input logic [6:0] c, input int r);
    string a[7], z[7], zero[7], dot[7], s;
    a    = '{".###.", "#...#", "#...#", "#...#", "#####", "#...#", "#...#"};
    z    = '{"#####", "....#", "...#.", "..#..", ".#...", "#....", "#####"};
    zero = '{".###.", "#...#", "#..##", "#.#.#", "##..#", "#...#", ".###."};
    dot  = '{".....", ".....", ".....", ".....", ".....", ".##..", ".##.."};
    if (r == 7) return 8'h00;
    case (c)
      7'h41: s = a[r];
      7'h5A: s = z[r];
      7'h30: s = zero[r];
      7'h2E: s = dot[r];
      default: return 8'h00;
    endcase
    ref_row = 8'h00;
    for (int i = 0; i < 5; i++) if (s[i] == "#") ref_row[6-i] = 1'b1;
  endfunction

  task automatic check_glyph(input logic [6:0] c);
    for (int r = 0; r < 8; r++) begin
      @(negedge clk);
      en = 1; char_code = c; row = 3'(r);
      @(negedge clk);
      en = 0;
      checks++;
      if (row_bits !== ref_row(c, r)) begin
        failures++;
        $display("FAIL char %h row %0d: got %b want %b", c, r, row_bits, ref_row(c, r));
      end
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; char_code = 0; row = 0;
    repeat (2) @(negedge clk);
    check_glyph(7'h41);
    check_glyph(7'h5A);
    check_glyph(7'h30);
    check_glyph(7'h2E);
    // control codes and DEL are blank, space is blank
    for (int c = 0; c < 128; c++) begin
      if (c < 32 || c == 32 || c == 127) begin
        for (int r = 0; r < 8; r++) begin
          @(negedge clk); en = 1; char_code = 7'(c); row = 3'(r);
          @(negedge clk); en = 0;
          checks++;
          if (row_bits !== 8'h00) begin failures++; $display("FAIL blank %h", c); end
        end
      end
    end
    // every printable glyph other than space has some pixel, and column 0, 6, 7 stay dark
    for (int c = 33; c < 127; c++) begin
      logic [7:0] acc;
      acc = 0;
      for (int r = 0; r < 8; r++) begin
        @(negedge clk); en = 1; char_code = 7'(c); row = 3'(r);
        @(negedge clk); en = 0;
        acc |= row_bits;
      end
      checks++;
      if (acc == 0 || (acc & 8'h81) != 0) begin failures++; $display("FAIL glyph %h cols %b", c, acc); end
    end
    // read latency: data appears one clock after the address; en low holds it
    @(negedge clk); en = 1; char_code = 7'h41; row = 3'd4;
    @(negedge clk); en = 0; char_code = 7'h5A; row = 3'd0;
    checks++;
    if (row_bits !== 8'h7C) begin failures++; $display("FAIL latency %h", row_bits); end
    repeat (3) @(negedge clk);
    checks++;
    if (row_bits !== 8'h7C) begin failures++; $display("FAIL hold %h", row_bits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
