// scancode_to_ascii: turns a stream of PS/2 scan codes (set 2) into ASCII key presses.
//
// A key press arrives as its make code, a release as F0 followed by the make code,
// and some keys carry an E0 prefix. The translator keeps the break and extended
// prefixes and the state of both shift keys, and for each make code of a known key
// emits a one-cycle 'ascii_valid' with the character one clock after 'code_valid'.
// Releases, shift keys and unknown codes produce nothing. The table (scan_to_ascii in
// esniff_pkg) holds letters, digits, punctuation, space, return (0x0D) and
// backspace (0x08).
//
// Translation to ASCII is what the specification asks for; the choice of keys and the
// shift handling are this design's own.
module scancode_to_ascii (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] code,
  input  logic       code_valid,
  output logic [7:0] ascii,
  output logic       ascii_valid
);
  import esniff_pkg::*;

  logic brk, ext, lshift, rshift;
  logic [7:0] ch;
  assign ch = scan_to_ascii(code, lshift | rshift, ext);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      brk         <= 1'b0;
      ext         <= 1'b0;
      lshift      <= 1'b0;
      rshift      <= 1'b0;
      ascii       <= '0;
      ascii_valid <= 1'b0;
    end else begin
      ascii_valid <= 1'b0;
      if (code_valid) begin
        if (code == PS2_BREAK) brk <= 1'b1;
        else if (code == PS2_EXTEND) ext <= 1'b1;
        else begin
          brk <= 1'b0;
          ext <= 1'b0;
          if (code == PS2_LSHIFT && !ext) lshift <= !brk;
          else if (code == PS2_RSHIFT && !ext) rshift <= !brk;
          else if (!brk && ch != 8'h00) begin
            ascii       <= ch;
            ascii_valid <= 1'b1;
          end
        end
      end
    end
  end

endmodule
