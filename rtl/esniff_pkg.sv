// esniff_pkg: constants and helpers shared by the E-Sniff display and keyboard hardware.
//
// The screen is a 640x480 text display made of 8x16-pixel character cells, which gives
// 80 columns by 30 rows. The bottom row shows the keyboard input line; the 29 rows above
// it are the scrolling message area written by the processor. The 640x480 resolution and
// the 60 Hz refresh follow the specification; the cell size and the split of the screen
// into 29 message rows plus one input row are choices of this design.
//
// scan_to_ascii() maps PS/2 scan code set 2 make codes to ASCII. It covers letters,
// digits, the punctuation needed for IP addresses, masks and simple commands, space,
// return and backspace. Codes it does not know map to 8'h00.
package esniff_pkg;

  localparam int unsigned COLS       = 80;   // characters per row (640 / 8)
  localparam int unsigned ROWS       = 30;   // character rows (480 / 16)
  localparam int unsigned TEXT_ROWS  = ROWS - 1;  // scrolling rows above the input line

  localparam logic [7:0] ASCII_SPACE = 8'h20;
  localparam logic [7:0] ASCII_CR    = 8'h0D;
  localparam logic [7:0] ASCII_BS    = 8'h08;

  // PS/2 keyboard protocol bytes
  localparam logic [7:0] PS2_BREAK    = 8'hF0;
  localparam logic [7:0] PS2_EXTEND   = 8'hE0;
  localparam logic [7:0] PS2_LSHIFT   = 8'h12;
  localparam logic [7:0] PS2_RSHIFT   = 8'h59;
  localparam logic [7:0] PS2_CMD_RESET = 8'hFF;
  localparam logic [7:0] PS2_BAT_OK   = 8'hAA;

  // Scan code set 2 make code -> ASCII. 'ext' marks an E0-prefixed code.
  function automatic logic [7:0] scan_to_ascii(input logic [7:0] code, input logic shift,
                                               input logic ext);
    logic [7:0] lo, hi;
    lo = 8'h00;
    hi = 8'h00;
    if (ext) begin
      unique case (code)
        8'h5A: begin lo = ASCII_CR; hi = ASCII_CR; end  // keypad enter
        8'h4A: begin lo = "/";      hi = "/";      end  // keypad slash
        default: ;
      endcase
    end else begin
      unique case (code)
        8'h1C: begin lo = "a"; hi = "A"; end
        8'h32: begin lo = "b"; hi = "B"; end
        8'h21: begin lo = "c"; hi = "C"; end
        8'h23: begin lo = "d"; hi = "D"; end
        8'h24: begin lo = "e"; hi = "E"; end
        8'h2B: begin lo = "f"; hi = "F"; end
        8'h34: begin lo = "g"; hi = "G"; end
        8'h33: begin lo = "h"; hi = "H"; end
        8'h43: begin lo = "i"; hi = "I"; end
        8'h3B: begin lo = "j"; hi = "J"; end
        8'h42: begin lo = "k"; hi = "K"; end
        8'h4B: begin lo = "l"; hi = "L"; end
        8'h3A: begin lo = "m"; hi = "M"; end
        8'h31: begin lo = "n"; hi = "N"; end
        8'h44: begin lo = "o"; hi = "O"; end
        8'h4D: begin lo = "p"; hi = "P"; end
        8'h15: begin lo = "q"; hi = "Q"; end
        8'h2D: begin lo = "r"; hi = "R"; end
        8'h1B: begin lo = "s"; hi = "S"; end
        8'h2C: begin lo = "t"; hi = "T"; end
        8'h3C: begin lo = "u"; hi = "U"; end
        8'h2A: begin lo = "v"; hi = "V"; end
        8'h1D: begin lo = "w"; hi = "W"; end
        8'h22: begin lo = "x"; hi = "X"; end
        8'h35: begin lo = "y"; hi = "Y"; end
        8'h1A: begin lo = "z"; hi = "Z"; end
        8'h45: begin lo = "0"; hi = ")"; end
        8'h16: begin lo = "1"; hi = "!"; end
        8'h1E: begin lo = "2"; hi = "@"; end
        8'h26: begin lo = "3"; hi = "#"; end
        8'h25: begin lo = "4"; hi = "$"; end
        8'h2E: begin lo = "5"; hi = "%"; end
        8'h36: begin lo = "6"; hi = "^"; end
        8'h3D: begin lo = "7"; hi = "&"; end
        8'h3E: begin lo = "8"; hi = "*"; end
        8'h46: begin lo = "9"; hi = "("; end
        8'h29: begin lo = " "; hi = " "; end
        8'h5A: begin lo = ASCII_CR; hi = ASCII_CR; end
        8'h66: begin lo = ASCII_BS; hi = ASCII_BS; end
        8'h0E: begin lo = "`"; hi = "~"; end
        8'h4E: begin lo = "-"; hi = "_"; end
        8'h55: begin lo = "="; hi = "+"; end
        8'h54: begin lo = "["; hi = "{"; end
        8'h5B: begin lo = "]"; hi = "}"; end
        8'h5D: begin lo = "\\"; hi = "|"; end
        8'h4C: begin lo = ";"; hi = ":"; end
        8'h52: begin lo = "'"; hi = "\""; end
        8'h41: begin lo = ","; hi = "<"; end
        8'h49: begin lo = "."; hi = ">"; end
        8'h4A: begin lo = "/"; hi = "?"; end
        // numeric keypad, not affected by shift
        8'h70: begin lo = "0"; hi = "0"; end
        8'h69: begin lo = "1"; hi = "1"; end
        8'h72: begin lo = "2"; hi = "2"; end
        8'h7A: begin lo = "3"; hi = "3"; end
        8'h6B: begin lo = "4"; hi = "4"; end
        8'h73: begin lo = "5"; hi = "5"; end
        8'h74: begin lo = "6"; hi = "6"; end
        8'h6C: begin lo = "7"; hi = "7"; end
        8'h75: begin lo = "8"; hi = "8"; end
        8'h7D: begin lo = "9"; hi = "9"; end
        8'h71: begin lo = "."; hi = "."; end
        8'h79: begin lo = "+"; hi = "+"; end
        8'h7B: begin lo = "-"; hi = "-"; end
        8'h7C: begin lo = "*"; hi = "*"; end
        default: ;
      endcase
    end
    return shift ? hi : lo;
  endfunction

endpackage
