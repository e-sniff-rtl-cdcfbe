// tb_esniff_top: end-to-end test of the display and keyboard hardware at its default
// parameters (100 MHz clock, real PS/2 and VGA timing).
//
// A behavioural keyboard and a processor model written here drive the top. The test
// boots with a keyboard attached, has the processor fill the message area and print
// lines with scrolls, types a command with shift, backspace and one corrupted frame,
// then compares one whole VGA frame pixel by pixel with the image expected from the
// screen contents, the input line and the font. It then presses return, reads the line
// back as the processor would after the two-clock interrupt, acknowledges it, sends a
// command byte to the keyboard, and finally boots again with no keyboard to see the
// automatic capture start. Each mechanism is counted; one that never happens fails.
module tb_esniff_top;
  logic clk = 0;
  always #5 clk = ~clk;   // 100 MHz
  logic rst_n, present;
  logic ps2_clk, ps2_data, ps2_clk_oe, ps2_data_oe;
  logic vga_hs, vga_vs, vga_blank_n, frame_start;
  logic [9:0] vga_r, vga_g, vga_b;
  logic vram_we, vram_scroll;
  logic [4:0] vram_row;
  logic [6:0] vram_col, kbd_rd_col;
  logic [7:0] vram_char, kbd_rd_char, kbd_line_len, kbd_cmd_data;
  logic kbd_irq, kbd_line_ready, kbd_line_ack, kbd_cmd_valid, kbd_cmd_busy, kbd_cmd_done;
  logic kbd_cmd_err, kbd_boot_done, kbd_present, auto_start, kbd_rx_err;
  int checks = 0, failures = 0;

  esniff_top dut (
    .clk, .rst_n, .ps2_clk_i(ps2_clk), .ps2_data_i(ps2_data), .ps2_clk_oe, .ps2_data_oe,
    .vga_hs, .vga_vs, .vga_blank_n, .vga_r, .vga_g, .vga_b,
    .vram_we, .vram_row, .vram_col, .vram_char, .vram_scroll,
    .kbd_rd_col, .kbd_rd_char, .kbd_irq, .kbd_line_ready, .kbd_line_len, .kbd_line_ack,
    .kbd_cmd_valid, .kbd_cmd_data, .kbd_cmd_busy, .kbd_cmd_done, .kbd_cmd_err,
    .kbd_boot_done, .kbd_present, .auto_start, .kbd_rx_err, .frame_start
  );

  ps2_kbd_model #(.HALF(4000)) kbd (
    .clk, .present, .host_clk_oe(ps2_clk_oe), .host_data_oe(ps2_data_oe), .ps2_clk, .ps2_data
  );

  // ---- mechanism counters ----
  int m_boot_present = 0, m_boot_absent = 0, m_scroll = 0, m_key = 0, m_backspace = 0;
  int m_frame_err = 0, m_irq = 0, m_line_read = 0, m_clear = 0, m_cmd = 0, m_frame = 0;
  int irq_len = 0;
  always @(posedge clk) begin
    if (rst_n && kbd_rx_err) m_frame_err++;
    if (rst_n && kbd_irq) irq_len++;
    if (rst_n && kbd_cmd_done) m_cmd++;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---- processor model ----
  logic [7:0] screen [29][80];

  task automatic cpu_write(input int r, input int c, input logic [7:0] ch);
    @(negedge clk) begin vram_we = 1; vram_row = 5'(r); vram_col = 7'(c); vram_char = ch; end
    @(negedge clk) vram_we = 0;
    screen[r][c] = ch;
  endtask

  task automatic cpu_print(input string s);
    logic [7:0] top [80];
    @(negedge clk) vram_scroll = 1;
    @(negedge clk) vram_scroll = 0;
    top = screen[0];
    for (int r = 0; r < 28; r++) screen[r] = screen[r+1];
    screen[28] = top;
    m_scroll++;
    for (int c = 0; c < 80; c++) cpu_write(28, c, (c < s.len()) ? s[c] : 8'h20);
  endtask

  task automatic press(input logic [7:0] sc);
    kbd.send_byte(sc);
    kbd.send_byte(8'hF0);
    kbd.send_byte(sc);
  endtask

  // ---- frame comparison ----
  logic [7:0] font [1024];
  initial $readmemh("rtl/font8x8.hex", font);

  task automatic compare_frame(input string kline_s);
    int k, bad, lit_text, lit_input;
    k = 0; bad = 0; lit_text = 0; lit_input = 0;
    do @(negedge clk); while (!frame_start);
    k = 1;
    while (k < 800 * 525 + 3) begin
      @(negedge clk);
      if (dut.u_vga.u_timing.pix_en) begin
        k++;
        if (k >= 4) begin
          int p, x, y, row, col;
          logic [7:0] ch, g;
          logic act, on;
          logic [29:0] want;
          p = k - 4; x = p % 800; y = p / 800;
          act = x < 640 && y < 480;
          want = '0;
          if (act) begin
            row = y / 16; col = x / 8;
            ch = (row == 29) ? ((col < kline_s.len()) ? kline_s[col] : 8'h20) : screen[row][col];
            g = font[{ch[6:0], 3'((y % 16) / 2)}];
            on = g[7 - x % 8];
            if (on) begin
              want = (row == 29) ? {10'h3FF, 10'h3FF, 10'h000} : {30{1'b1}};
              if (row == 29) lit_input++; else lit_text++;
            end
          end
          if (vga_hs != !(x >= 656 && x < 752) || vga_vs != !(y >= 490 && y < 492) ||
              vga_blank_n != act || {vga_r, vga_g, vga_b} != want) begin
            if (bad++ < 5) $display("FAIL pixel (%0d,%0d) rgb %h want %h", x, y,
                                    {vga_r, vga_g, vga_b}, want);
          end
        end
      end
    end
    check(bad == 0, $sformatf("%0d pixels differ in the frame", bad));
    check(lit_text > 10000 && lit_input > 50, "text and input line visible");
    m_frame++;
  endtask

  initial begin
    #400ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t;
    string got;
    present = 1;
    vram_we = 0; vram_scroll = 0; vram_row = 0; vram_col = 0; vram_char = 0;
    kbd_rd_col = 0; kbd_line_ack = 0; kbd_cmd_valid = 0; kbd_cmd_data = 0;
    rst_n = 0;
    repeat (10) @(negedge clk);
    rst_n = 1;

    // boot: reset command, self-test answer
    t = 0;
    while (!kbd_boot_done && t < 2_000_000) begin @(negedge clk); t++; end
    check(kbd_boot_done && kbd_present && !auto_start && kbd.last_rx == 8'hFF, "boot with keyboard");
    if (kbd_present) m_boot_present++;

    // processor fills the message area, then prints packet lines with scrolls
    for (int r = 0; r < 29; r++)
      for (int c = 0; c < 80; c++) cpu_write(r, c, 8'((r * 7 + c) % 95 + 32));
    cpu_print("ARP  192.168.0.1 -> 192.168.0.255");
    cpu_print("TCP  10.0.0.2:80 -> 10.0.0.9:4312");
    cpu_print("UDP  10.0.0.7:67 -> 255.255.255.255:68 DHCP");

    // type "Ip 10.x" + backspace, with one corrupted frame in between
    kbd.send_byte(8'h12); press(8'h43); kbd.send_byte(8'hF0); kbd.send_byte(8'h12);  // I
    m_key++;
    press(8'h4D); m_key++;                           // p
    press(8'h29); m_key++;                           // space
    press(8'h16); m_key++;                           // 1
    kbd.send_byte(8'h45, 1);                         // corrupted 0
    press(8'h45); m_key++;                           // 0
    press(8'h22); m_key++;                           // x
    press(8'h66); m_backspace++;                     // backspace
    press(8'h49); m_key++;                           // .
    repeat (1000) @(negedge clk);
    check(kbd_line_len == 8'd6, $sformatf("cursor %0d", kbd_line_len));

    compare_frame("Ip 10.");

    // return: two-clock interrupt, processor reads the line, then acknowledges
    irq_len = 0;
    press(8'h5A);
    t = 0;
    while (!kbd_line_ready && t < 1_000_000) begin @(negedge clk); t++; end
    repeat (10) @(negedge clk);
    check(kbd_line_ready && irq_len == 2, $sformatf("interrupt length %0d", irq_len));
    if (irq_len == 2) m_irq++;
    got = "";
    for (int c = 0; c < int'(kbd_line_len); c++) begin
      kbd_rd_col = 7'(c);
      #1 got = {got, string'(kbd_rd_char)};
    end
    check(got == "Ip 10.", {"line read by processor: ", got});
    if (got == "Ip 10.") m_line_read++;
    @(negedge clk) kbd_line_ack = 1;
    @(negedge clk) kbd_line_ack = 0;
    repeat (3) @(negedge clk);
    kbd_rd_col = 0;
    #1;
    check(!kbd_line_ready && kbd_line_len == 0 && kbd_rd_char == 8'h20, "line cleared");
    if (!kbd_line_ready && kbd_rd_char == 8'h20) m_clear++;

    // processor sends a command byte (set keyboard LEDs)
    while (kbd_cmd_busy) @(negedge clk);
    @(negedge clk) begin kbd_cmd_valid = 1; kbd_cmd_data = 8'hED; end
    @(negedge clk) kbd_cmd_valid = 0;
    t = 0;
    while (m_cmd == 0 && t < 1_000_000) begin @(negedge clk); t++; end
    repeat (20_000) @(negedge clk);
    check(m_cmd == 1 && kbd.last_rx == 8'hED, "command byte sent");

    // boot with no keyboard: capture starts on its own
    repeat (200_000) @(negedge clk);
    present = 0;
    rst_n = 0;
    repeat (10) @(negedge clk);
    rst_n = 1;
    t = 0;
    while (!kbd_boot_done && t < 3_000_000) begin @(negedge clk); t++; end
    check(kbd_boot_done && auto_start && !kbd_present, "boot without keyboard");
    if (auto_start) m_boot_absent++;

    $display("mechanisms: boot_present=%0d boot_absent=%0d scroll=%0d key=%0d backspace=%0d frame_err=%0d irq=%0d line_read=%0d clear=%0d cmd=%0d frame=%0d",
             m_boot_present, m_boot_absent, m_scroll, m_key, m_backspace, m_frame_err, m_irq,
             m_line_read, m_clear, m_cmd, m_frame);
    check(m_boot_present > 0, "mechanism boot with keyboard");
    check(m_boot_absent > 0, "mechanism automatic start");
    check(m_scroll > 0, "mechanism scroll");
    check(m_key > 0, "mechanism key entry");
    check(m_backspace > 0, "mechanism backspace");
    check(m_frame_err == 1, "mechanism frame error ignored");
    check(m_irq > 0, "mechanism return interrupt");
    check(m_line_read > 0, "mechanism line read");
    check(m_clear > 0, "mechanism line clear");
    check(m_cmd > 0, "mechanism command send");
    check(m_frame > 0, "mechanism frame display");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
