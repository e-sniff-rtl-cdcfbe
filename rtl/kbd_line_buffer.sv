// kbd_line_buffer: the keyboard input line, a separate partition of the video memory.
//
// COLS character registers. The keyboard driver writes one character per clock
// ('wr_en', 'wr_col', 'wr_char'); the VGA driver and the processor each have their
// own combinational read port, so neither read can collide with the driver's write.
// The asynchronous reset 'arst_n' sets every character to FILL (0x20, a space). A
// synchronous 'clear' does the same at a clock edge; the keyboard driver uses it to
// empty the line once the processor has taken a command.
//
// The single line, the asynchronous reset to 0x20 and the three users follow the
// specification; the separate read ports and the synchronous clear are this design's
// own way of keeping the users apart.
module kbd_line_buffer #(
  parameter int unsigned COLS = 80,
  parameter logic [7:0]  FILL = 8'h20
) (
  input  logic                    clk,
  input  logic                    arst_n,
  input  logic                    clear,
  input  logic                    wr_en,
  input  logic [$clog2(COLS)-1:0] wr_col,
  input  logic [7:0]              wr_char,
  input  logic [$clog2(COLS)-1:0] vga_col,
  output logic [7:0]              vga_char,
  input  logic [$clog2(COLS)-1:0] cpu_col,
  output logic [7:0]              cpu_char
);

  logic [7:0] line [COLS];

  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) begin
      for (int i = 0; i < int'(COLS); i++) line[i] <= FILL;
    end else if (clear) begin
      for (int i = 0; i < int'(COLS); i++) line[i] <= FILL;
    end else if (wr_en && (wr_col < $clog2(COLS)'(COLS))) begin
      line[wr_col] <= wr_char;
    end
  end

  assign vga_char = (vga_col < $clog2(COLS)'(COLS)) ? line[vga_col] : FILL;
  assign cpu_char = (cpu_col < $clog2(COLS)'(COLS)) ? line[cpu_col] : FILL;

endmodule
