// tb_video_ram: random writes, reads and scrolls against a screen model kept here.
// The model stores what each screen row should show; a scroll moves every row up one
// and brings the old top row to the bottom. Also checks the one-cycle scroll, the
// wrap of the line offset, the write-before-scroll order and out-of-range accesses.
module tb_video_ram;
  localparam int COLS = 80, ROWS = 29;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  logic wr_en, scroll, rd_en;
  logic [4:0] wr_row, rd_row, offset;
  logic [6:0] wr_col, rd_col;
  logic [7:0] wr_char, rd_char;
  int checks = 0, failures = 0;
  int scrolls = 0;

  video_ram #(.COLS(COLS), .ROWS(ROWS)) dut (.*);

  logic [7:0] screen [ROWS][COLS];

  task automatic do_scroll_model();
    logic [7:0] top [COLS];
    top = screen[0];
    for (int r = 0; r < ROWS - 1; r++) screen[r] = screen[r+1];
    screen[ROWS-1] = top;
    scrolls++;
  endtask

  task automatic read_check(input int r, input int c);
    @(negedge clk);
    rd_en = 1; rd_row = 5'(r); rd_col = 7'(c);
    @(negedge clk);
    rd_en = 0;
    checks++;
    if (rd_char !== ((r < ROWS && c < COLS) ? screen[r][c] : 8'h20)) begin
      failures++;
      $display("FAIL read (%0d,%0d) got %h want %h", r, c, rd_char,
               (r < ROWS && c < COLS) ? screen[r][c] : 8'h20);
    end
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; wr_en = 0; scroll = 0; rd_en = 0;
    wr_row = 0; wr_col = 0; wr_char = 0; rd_row = 0; rd_col = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // fill the screen
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        @(negedge clk);
        wr_en = 1; wr_row = 5'(r); wr_col = 7'(c); wr_char = 8'($urandom_range(32, 126));
        screen[r][c] = wr_char;
      end
    @(negedge clk) wr_en = 0;
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c += 7) read_check(r, c);
    // one scroll: the whole screen moves up in one clock
    @(negedge clk) scroll = 1;
    @(negedge clk) scroll = 0;
    do_scroll_model();
    checks++;
    if (offset !== 5'd1) begin failures++; $display("FAIL offset %0d", offset); end
    for (int r = 0; r < ROWS; r++) read_check(r, (r * 3) % COLS);
    // write a new bottom line, as the processor does after a scroll
    for (int c = 0; c < COLS; c++) begin
      @(negedge clk);
      wr_en = 1; wr_row = 5'(ROWS - 1); wr_col = 7'(c); wr_char = 8'("A" + c % 26);
      screen[ROWS-1][c] = wr_char;
    end
    @(negedge clk) wr_en = 0;
    for (int c = 0; c < COLS; c++) read_check(ROWS - 1, c);
    // write and scroll in the same clock: the write lands before the scroll
    @(negedge clk);
    wr_en = 1; wr_row = 5'd0; wr_col = 7'd5; wr_char = 8'h7E; scroll = 1;
    screen[0][5] = 8'h7E;
    @(negedge clk) begin wr_en = 0; scroll = 0; end
    do_scroll_model();
    read_check(ROWS - 1, 5);
    // random mix, across more than one wrap of the offset
    for (int i = 0; i < 4000; i++) begin
      int op, r, c;
      op = $urandom_range(0, 9);
      if (op < 5) begin
        r = $urandom_range(0, ROWS - 1); c = $urandom_range(0, COLS - 1);
        @(negedge clk);
        wr_en = 1; wr_row = 5'(r); wr_col = 7'(c); wr_char = 8'($urandom);
        screen[r][c] = wr_char;
        @(negedge clk) wr_en = 0;
      end else if (op < 6) begin
        @(negedge clk) scroll = 1;
        @(negedge clk) scroll = 0;
        do_scroll_model();
      end else begin
        read_check($urandom_range(0, ROWS - 1), $urandom_range(0, COLS - 1));
      end
    end
    checks++;
    if (int'(offset) != scrolls % ROWS) begin failures++; $display("FAIL offset wrap"); end
    checks++;
    if (scrolls < ROWS) begin failures++; $display("FAIL too few scrolls %0d", scrolls); end
    // out of range: write dropped, read gives a space
    @(negedge clk); wr_en = 1; wr_row = 5'd30; wr_col = 7'd2; wr_char = 8'h55;
    @(negedge clk); wr_en = 0;
    read_check(30, 2);
    read_check(3, 100);
    for (int r = 0; r < ROWS; r++) read_check(r, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
