// video_ram: scrolling character memory of the text display.
//
// A dual-port RAM of ROWS x COLS ASCII codes. Port A is the processor's write port,
// port B the VGA driver's read port. Both ports address the memory by screen row and
// column; a line offset register is added to the row (modulo ROWS) to find the
// physical row. A one-cycle 'scroll' pulse adds one to the offset, which moves every
// line on screen up by one row in a single clock: the old top line becomes the bottom
// line, and the processor then writes only the new bottom line instead of redrawing
// the screen.
//
// Timing: a write takes effect at the clock edge where 'wr_en' is high, using the
// offset from before a 'scroll' in the same cycle. Reads are synchronous: 'rd_char'
// holds the character addressed when 'rd_en' was high, one clock later. Writes to a
// row outside 0..ROWS-1 are dropped and reads there return a space.
//
// The dual-port organisation, the line offset and the one-cycle scroll follow the
// specification. The port layout, the write-before-scroll ordering and the reset of the
// offset to zero are this design's choices; the character cells are not reset.
module video_ram #(
  parameter int unsigned COLS = 80,
  parameter int unsigned ROWS = 29
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // processor port
  input  logic                     wr_en,
  input  logic [$clog2(ROWS)-1:0]  wr_row,
  input  logic [$clog2(COLS)-1:0]  wr_col,
  input  logic [7:0]               wr_char,
  input  logic                     scroll,
  // VGA port
  input  logic                     rd_en,
  input  logic [$clog2(ROWS)-1:0]  rd_row,
  input  logic [$clog2(COLS)-1:0]  rd_col,
  output logic [7:0]               rd_char,
  output logic [$clog2(ROWS)-1:0]  offset
);

  localparam int unsigned RW    = $clog2(ROWS);
  localparam int unsigned CW    = $clog2(COLS);
  localparam int unsigned DEPTH = ROWS * COLS;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic [7:0] mem [DEPTH];

  // Screen row -> physical row through the line offset, modulo ROWS.
  function automatic logic [RW-1:0] phys_row(input logic [RW-1:0] row, input logic [RW-1:0] off);
    logic [RW:0] sum;
    sum = {1'b0, row} + {1'b0, off};
    if (sum >= (RW+1)'(ROWS)) sum = sum - (RW+1)'(ROWS);
    return sum[RW-1:0];
  endfunction

  function automatic logic [AW-1:0] addr_of(input logic [RW-1:0] prow, input logic [CW-1:0] col);
    return AW'(prow) * AW'(COLS) + AW'(col);
  endfunction

  logic in_range_wr, in_range_rd;
  assign in_range_wr = (wr_row < RW'(ROWS)) && (wr_col < CW'(COLS));
  assign in_range_rd = (rd_row < RW'(ROWS)) && (rd_col < CW'(COLS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) offset <= '0;
    else if (scroll) offset <= (offset == RW'(ROWS - 1)) ? '0 : offset + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (wr_en && in_range_wr) mem[addr_of(phys_row(wr_row, offset), wr_col)] <= wr_char;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_char <= in_range_rd ? mem[addr_of(phys_row(rd_row, offset), rd_col)] : 8'h20;
  end

endmodule
