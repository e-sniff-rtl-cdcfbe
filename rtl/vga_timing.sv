// vga_timing: sync and coordinate generator for 640x480 at 60 Hz.
//
// A clock divider produces a pixel strobe 'pix_en' every CLK_DIV system clocks
// (100 MHz / 4 = 25 MHz, the standard 640x480 pixel rate; the frame is 800 x 525
// pixel periods, 59.5 Hz). Horizontal and vertical counters advance on the strobe.
// Outputs, all registered and valid together: pixel coordinates 'x' and 'y', 'active'
// inside the visible 640x480 window, and active-low 'hsync' / 'vsync'. 'frame_start'
// pulses with the strobe at x = 0, y = 0.
//
// Resolution and refresh rate follow the specification; the porch and sync widths are
// the usual VESA 640x480 timing and the divider assumes the 100 MHz system clock.
module vga_timing #(
  parameter int unsigned CLK_DIV = 4,
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned H_FP     = 16,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BP     = 48,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_FP     = 10,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BP     = 33
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        pix_en,
  output logic [9:0]  x,
  output logic [9:0]  y,
  output logic        active,
  output logic        hsync,
  output logic        vsync,
  output logic        frame_start
);

  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  logic [$clog2(CLK_DIV+1)-1:0] div;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div    <= '0;
      pix_en <= 1'b0;
    end else if (div == $bits(div)'(CLK_DIV - 1)) begin
      div    <= '0;
      pix_en <= 1'b1;
    end else begin
      div    <= div + 1'b1;
      pix_en <= 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0;
      y <= '0;
    end else if (pix_en) begin
      if (x == 10'(H_TOTAL - 1)) begin
        x <= '0;
        y <= (y == 10'(V_TOTAL - 1)) ? '0 : y + 1'b1;
      end else begin
        x <= x + 1'b1;
      end
    end
  end

  always_comb begin
    active      = (x < 10'(H_ACTIVE)) && (y < 10'(V_ACTIVE));
    hsync       = !((x >= 10'(H_ACTIVE + H_FP)) && (x < 10'(H_ACTIVE + H_FP + H_SYNC)));
    vsync       = !((y >= 10'(V_ACTIVE + V_FP)) && (y < 10'(V_ACTIVE + V_FP + V_SYNC)));
    frame_start = pix_en && (x == '0) && (y == '0);
  end

endmodule
