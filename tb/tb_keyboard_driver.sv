// tb_keyboard_driver: the keyboard driver against a behavioural PS/2 keyboard.
// Checks the boot test with a keyboard (reset command sent, self-test answer seen) and
// without one (auto start), typing with shift and backspace into the line buffer, a
// frame with a parity error being ignored, the two-clock interrupt on return, the line
// held while the processor owns it, the clear on acknowledge, the end-of-line limit,
// sending an arbitrary command byte, a command failing with no keyboard, and a
// keyboard that never reports its self-test result.
module tb_keyboard_driver;
  localparam int COLS = 80;
  localparam int HALF = 50;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, present;
  logic ps2_clk, ps2_data, ps2_clk_oe, ps2_data_oe;
  logic lb_wr_en, lb_clear, irq, line_ready, line_ack, cmd_valid, cmd_busy, cmd_done, cmd_err;
  logic boot_done, kbd_present, auto_start, rx_err;
  logic [6:0] lb_wr_col;
  logic [7:0] lb_wr_char, cmd_data;
  logic [7:0] line_len;
  int checks = 0, failures = 0;

  keyboard_driver #(.COLS(COLS), .RX_TIMEOUT(2000), .INHIBIT(200), .TX_TIMEOUT(20000),
                    .BOOT_TIMEOUT(50000)) dut (
    .clk, .rst_n, .ps2_clk_i(ps2_clk), .ps2_data_i(ps2_data), .ps2_clk_oe, .ps2_data_oe,
    .lb_wr_en, .lb_wr_col, .lb_wr_char, .lb_clear, .irq, .line_ready, .line_len, .line_ack,
    .cmd_valid, .cmd_data, .cmd_busy, .cmd_done, .cmd_err, .boot_done, .kbd_present,
    .auto_start, .rx_err
  );

  ps2_kbd_model #(.HALF(HALF)) kbd (
    .clk, .present, .host_clk_oe(ps2_clk_oe), .host_data_oe(ps2_data_oe), .ps2_clk, .ps2_data
  );

  // line buffer model and event counters
  logic [7:0] line [COLS];
  int n_wr = 0, n_clear = 0, n_rx_err = 0, n_irq_rise = 0, irq_len = 0, n_cmd_done = 0;
  int wr_run = 0, max_wr_run = 0;
  always @(posedge clk) begin
    if (rst_n && lb_wr_en) begin line[lb_wr_col] <= lb_wr_char; n_wr++; end
    if (rst_n && lb_clear) begin foreach (line[i]) line[i] <= 8'h20; n_clear++; end
    if (rst_n && rx_err) n_rx_err++;
    if (rst_n && irq) irq_len++;
    if (rst_n && cmd_done) n_cmd_done++;
    wr_run = lb_wr_en ? wr_run + 1 : 0;
    if (wr_run > max_wr_run) max_wr_run = wr_run;
  end
  logic irq_q = 0;
  always @(posedge clk) begin irq_q <= irq; if (irq && !irq_q) n_irq_rise++; end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic press(input logic [7:0] sc);
    kbd.send_byte(sc);
    kbd.send_byte(8'hF0);
    kbd.send_byte(sc);
  endtask

  task automatic check_line(input string s, input string tag);
    logic ok;
    ok = 1;
    for (int c = 0; c < COLS; c++) if (line[c] != ((c < s.len()) ? s[c] : 8'h20)) ok = 0;
    check(ok, {"line contents ", tag});
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t;
    foreach (line[i]) line[i] = 8'h20;
    present = 1; line_ack = 0; cmd_valid = 0; cmd_data = 0;
    rst_n = 0;
    repeat (5) @(negedge clk);
    rst_n = 1;
    // --- boot with a keyboard ---
    t = 0;
    while (!boot_done && t < 200000) begin @(negedge clk); t++; end
    check(boot_done && kbd_present && !auto_start, "boot with keyboard");
    check(kbd.last_rx == 8'hFF && kbd.rx_count == 1 && kbd.rx_parity_errors == 0,
          "reset command received by the keyboard");
    repeat (2000) @(negedge clk);
    // --- typing ---
    press(8'h1C);                                      // a
    press(8'h32);                                      // b
    kbd.send_byte(8'h12); press(8'h16); kbd.send_byte(8'hF0); kbd.send_byte(8'h12); // !
    press(8'h66);                                      // backspace
    kbd.send_byte(8'h22, 1);                           // x with a parity error
    kbd.send_byte(8'h22, 2);                           // x with a stop bit error
    press(8'h21);                                      // c
    repeat (100) @(negedge clk);
    check_line("abc", "after typing");
    check(n_rx_err == 2, $sformatf("frame errors seen %0d", n_rx_err));
    check(line_len == 8'd3, $sformatf("cursor %0d", line_len));
    check(max_wr_run == 1, "one character written per key, in one clock");
    check(n_wr == 5, $sformatf("line writes %0d", n_wr));
    // --- return ---
    irq_len = 0;
    press(8'h5A);
    repeat (100) @(negedge clk);
    check(n_irq_rise == 1 && irq_len == 2, $sformatf("interrupt pulses %0d length %0d", n_irq_rise, irq_len));
    check(line_ready, "line ready after return");
    press(8'h1A);                                      // z while the processor owns the line
    repeat (100) @(negedge clk);
    check_line("abc", "held while ready");
    @(negedge clk) line_ack = 1;
    @(negedge clk) line_ack = 0;
    repeat (3) @(negedge clk);
    check(!line_ready && line_len == 0 && n_clear == 1, "acknowledge clears the line");
    check_line("", "after clear");
    // --- command byte ---
    while (cmd_busy) @(negedge clk);
    @(negedge clk) begin cmd_valid = 1; cmd_data = 8'hED; end
    @(negedge clk) cmd_valid = 0;
    t = 0;
    while (n_cmd_done == 0 && t < 100000) begin @(negedge clk); t++; end
    repeat (3000) @(negedge clk);
    check(n_cmd_done == 1 && kbd.last_rx == 8'hED && kbd.rx_count == 2, "command ED sent");
    check_line("", "keyboard answer is not a key");
    // --- end of line: 82 key repeats fill 80 columns ---
    for (int i = 0; i < 82; i++) kbd.send_byte(8'h15);  // q
    repeat (100) @(negedge clk);
    check(line_len == 8'(COLS), $sformatf("cursor stops at %0d", line_len));
    check_line({80{"q"}}, "full line");
    // --- boot without a keyboard ---
    present = 0;
    rst_n = 0;
    repeat (5) @(negedge clk);
    rst_n = 1;
    t = 0;
    while (!boot_done && t < 200000) begin @(negedge clk); t++; end
    check(boot_done && !kbd_present && auto_start, "boot without keyboard starts capture");
    check(t > 20000, "presence test waits for the transfer timeout");
    // a command with no keyboard fails
    @(negedge clk) begin cmd_valid = 1; cmd_data = 8'hF4; end
    @(negedge clk) cmd_valid = 0;
    t = 0;
    while (!cmd_err && t < 100000) begin @(negedge clk); t++; end
    check(cmd_err && !cmd_done, "command without keyboard reports an error");
    // --- keyboard that answers the reset but never passes its self-test ---
    present = 1;
    kbd.answer_bat = 0;
    rst_n = 0;
    repeat (5) @(negedge clk);
    rst_n = 1;
    t = 0;
    while (!boot_done && t < 300000) begin @(negedge clk); t++; end
    check(boot_done && !kbd_present && auto_start, "boot without self-test answer starts capture");
    check(t > 50000, "presence test waits for the self-test timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
