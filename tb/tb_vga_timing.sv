// tb_vga_timing: runs two full frames at the default 100 MHz / 4 pixel rate and checks
// the line and frame lengths, sync pulse positions and widths, the visible window, and
// that the frame rate is 60 Hz (within 1 Hz) for a 100 MHz clock.
module tb_vga_timing;
  logic clk = 0;
  always #5 clk = ~clk;   // 100 MHz
  logic rst_n;
  logic pix_en, active, hsync, vsync, frame_start;
  logic [9:0] x, y;
  int checks = 0, failures = 0;

  vga_timing dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #40_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint cyc = 0, fs_cycle[$];
    int pix = 0, act_pix = 0, hs_low = 0, vs_low_lines = 0, en_gap = 0, last_en = 0;
    int ex = 0, ey = 0, bad_xy = 0, bad_hs = 0, bad_vs = 0, bad_act = 0;
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // wait for the first frame start, then walk two frames pixel by pixel
    forever begin
      @(negedge clk); cyc++;
      if (frame_start) break;
    end
    fs_cycle.push_back(cyc);
    last_en = int'(cyc);
    for (int f = 0; f < 2; f++) begin
      for (int p = 0; p < 800 * 525; p++) begin
        // at a pixel strobe the coordinates are those of the pixel being shown
        if (x != 10'(ex) || y != 10'(ey)) bad_xy++;
        if (hsync != !(ex >= 656 && ex < 752)) bad_hs++;
        if (vsync != !(ey >= 490 && ey < 492)) bad_vs++;
        if (active != (ex < 640 && ey < 480)) bad_act++;
        if (f == 0 && active) act_pix++;
        if (f == 0 && !hsync && ey == 0) hs_low++;
        if (f == 0 && !vsync && ex == 0) vs_low_lines++;
        ex = (ex == 799) ? 0 : ex + 1;
        if (ex == 0) ey = (ey == 524) ? 0 : ey + 1;
        // advance to the next strobe, measuring the gap
        do begin @(negedge clk); cyc++; end while (!pix_en);
        if (int'(cyc) - last_en != 4) en_gap++;
        last_en = int'(cyc);
        if (frame_start) fs_cycle.push_back(cyc);
      end
    end
    check(bad_xy == 0, $sformatf("coordinates wrong at %0d pixels", bad_xy));
    check(bad_hs == 0, $sformatf("hsync wrong at %0d pixels", bad_hs));
    check(bad_vs == 0, $sformatf("vsync wrong at %0d pixels", bad_vs));
    check(bad_act == 0, $sformatf("active wrong at %0d pixels", bad_act));
    check(en_gap == 0, "pixel strobe not every 4 clocks");
    check(act_pix == 640 * 480, $sformatf("visible pixels %0d", act_pix));
    check(hs_low == 96, $sformatf("hsync width %0d", hs_low));
    check(vs_low_lines == 2, $sformatf("vsync lines %0d", vs_low_lines));
    check(fs_cycle.size() == 3, $sformatf("frame starts %0d", fs_cycle.size()));
    if (fs_cycle.size() >= 2) begin
      longint period;
      real hz;
      period = fs_cycle[1] - fs_cycle[0];
      hz = 100.0e6 / real'(period);
      check(period == 4 * 800 * 525, $sformatf("frame period %0d clocks", period));
      check(hz > 59.0 && hz < 61.0, $sformatf("refresh %f Hz", hz));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
