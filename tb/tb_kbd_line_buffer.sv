// tb_kbd_line_buffer: checks the asynchronous reset to spaces (with no clock edge),
// writes seen on both read ports, the synchronous clear, and that a write to a column
// past the end is dropped.
module tb_kbd_line_buffer;
  localparam int COLS = 80;
  logic clk = 0;
  logic clk_run = 0;
  always #5 if (clk_run) clk = ~clk;
  logic arst_n, clear, wr_en;
  logic [6:0] wr_col, vga_col, cpu_col;
  logic [7:0] wr_char, vga_char, cpu_char;
  logic [7:0] model [COLS];
  int checks = 0, failures = 0;

  kbd_line_buffer #(.COLS(COLS)) dut (.*);

  task automatic check_all(input string tag);
    for (int c = 0; c < COLS; c++) begin
      vga_col = 7'(c); cpu_col = 7'((c * 7) % COLS);
      #1;
      checks++;
      if (vga_char !== model[c] || cpu_char !== model[(c * 7) % COLS]) begin
        failures++;
        $display("FAIL %s col %0d vga %h cpu %h", tag, c, vga_char, cpu_char);
      end
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; wr_en = 0; wr_col = 0; wr_char = 0; vga_col = 0; cpu_col = 0;
    arst_n = 1;
    #3 arst_n = 0;   // asynchronous: no clock is running yet
    #3;
    foreach (model[i]) model[i] = 8'h20;
    check_all("async reset");
    arst_n = 1;
    clk_run = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      wr_en = 1; wr_col = 7'($urandom_range(0, COLS - 1)); wr_char = 8'($urandom);
      model[wr_col] = wr_char;
    end
    @(negedge clk); wr_en = 1; wr_col = 7'd100; wr_char = 8'h41;
    @(negedge clk); wr_en = 0;
    check_all("writes");
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    foreach (model[i]) model[i] = 8'h20;
    check_all("clear");
    @(negedge clk); wr_en = 1; wr_col = 7'd3; wr_char = 8'h31; model[3] = 8'h31;
    @(negedge clk); wr_en = 0;
    check_all("write after clear");
    #2 arst_n = 0;
    #1;
    foreach (model[i]) model[i] = 8'h20;
    check_all("async reset mid-clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
