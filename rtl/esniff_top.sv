// esniff_top: display and keyboard hardware of the E-Sniff standalone packet sniffer.
//
// The sniffer captures Ethernet frames with an on-board Ethernet controller, and a
// processor core filters them and prints one line of text per packet. This top holds
// the hardware around that processor: the text-mode VGA display (vga_text_driver with
// its font ROM), the scrolling video RAM, the keyboard input line and the PS/2
// keyboard driver. The processor, the Ethernet controller, the frame SRAM and the
// non-volatile storage are outside it; the processor's side of every interface is a
// port here:
//
//  * vram_*      write one character of the message area (row 0..28, column 0..79);
//                'vram_scroll' moves the whole message area up one row in one clock.
//  * kbd_rd_*    read the keyboard input line (combinational).
//  * kbd_irq     two-clock interrupt when return is pressed; 'kbd_line_ready' stays
//                high until the processor pulses 'kbd_line_ack', which clears the line.
//  * kbd_cmd_*   send any byte to the keyboard.
//  * kbd_present / auto_start  result of the boot-time keyboard test; 'auto_start'
//                tells the processor to capture with default settings.
//
// The PS/2 pins are open drain: each *_oe output pulls its line low when high. The
// VGA outputs drive a 10-bit-per-channel video DAC. One clock domain, 100 MHz.
module esniff_top #(
  parameter int unsigned CLK_DIV      = 4,
  parameter int unsigned PS2_FILTER   = 8,
  parameter int unsigned RX_TIMEOUT   = 20_000,
  parameter int unsigned INHIBIT      = 10_000,
  parameter int unsigned TX_TIMEOUT   = 1_500_000,
  parameter int unsigned BOOT_TIMEOUT = 100_000_000
) (
  input  logic        clk,
  input  logic        rst_n,
  // PS/2 keyboard
  input  logic        ps2_clk_i,
  input  logic        ps2_data_i,
  output logic        ps2_clk_oe,
  output logic        ps2_data_oe,
  // VGA
  output logic        vga_hs,
  output logic        vga_vs,
  output logic        vga_blank_n,
  output logic [9:0]  vga_r,
  output logic [9:0]  vga_g,
  output logic [9:0]  vga_b,
  // processor: message area
  input  logic        vram_we,
  input  logic [4:0]  vram_row,
  input  logic [6:0]  vram_col,
  input  logic [7:0]  vram_char,
  input  logic        vram_scroll,
  // processor: keyboard
  input  logic [6:0]  kbd_rd_col,
  output logic [7:0]  kbd_rd_char,
  output logic        kbd_irq,
  output logic        kbd_line_ready,
  output logic [7:0]  kbd_line_len,
  input  logic        kbd_line_ack,
  input  logic        kbd_cmd_valid,
  input  logic [7:0]  kbd_cmd_data,
  output logic        kbd_cmd_busy,
  output logic        kbd_cmd_done,
  output logic        kbd_cmd_err,
  output logic        kbd_boot_done,
  output logic        kbd_present,
  output logic        auto_start,
  output logic        kbd_rx_err,
  output logic        frame_start
);
  import esniff_pkg::*;

  // VGA <-> memories
  logic       v_rd_en;
  logic [4:0] v_row;
  logic [6:0] v_col, v_kbd_col;
  logic [7:0] v_char, v_kbd_char;
  logic [4:0] offset;

  // keyboard driver -> line buffer
  logic       lb_wr_en, lb_clear;
  logic [6:0] lb_wr_col;
  logic [7:0] lb_wr_char;

  vga_text_driver #(.CLK_DIV(CLK_DIV)) u_vga (
    .clk, .rst_n,
    .vram_rd_en(v_rd_en), .vram_row(v_row), .vram_col(v_col), .vram_char(v_char),
    .kbd_col(v_kbd_col), .kbd_char(v_kbd_char),
    .vga_hs, .vga_vs, .vga_blank_n, .vga_r, .vga_g, .vga_b, .frame_start
  );

  video_ram #(.COLS(COLS), .ROWS(TEXT_ROWS)) u_vram (
    .clk, .rst_n,
    .wr_en(vram_we), .wr_row(vram_row), .wr_col(vram_col), .wr_char(vram_char),
    .scroll(vram_scroll),
    .rd_en(v_rd_en), .rd_row(v_row), .rd_col(v_col), .rd_char(v_char), .offset
  );

  kbd_line_buffer #(.COLS(COLS)) u_line (
    .clk, .arst_n(rst_n), .clear(lb_clear),
    .wr_en(lb_wr_en), .wr_col(lb_wr_col), .wr_char(lb_wr_char),
    .vga_col(v_kbd_col), .vga_char(v_kbd_char),
    .cpu_col(kbd_rd_col), .cpu_char(kbd_rd_char)
  );

  keyboard_driver #(
    .COLS(COLS), .FILTER(PS2_FILTER), .RX_TIMEOUT(RX_TIMEOUT), .INHIBIT(INHIBIT),
    .TX_TIMEOUT(TX_TIMEOUT), .BOOT_TIMEOUT(BOOT_TIMEOUT)
  ) u_kbd (
    .clk, .rst_n, .ps2_clk_i, .ps2_data_i, .ps2_clk_oe, .ps2_data_oe,
    .lb_wr_en, .lb_wr_col, .lb_wr_char, .lb_clear,
    .irq(kbd_irq), .line_ready(kbd_line_ready), .line_len(kbd_line_len),
    .line_ack(kbd_line_ack),
    .cmd_valid(kbd_cmd_valid), .cmd_data(kbd_cmd_data), .cmd_busy(kbd_cmd_busy),
    .cmd_done(kbd_cmd_done), .cmd_err(kbd_cmd_err),
    .boot_done(kbd_boot_done), .kbd_present, .auto_start, .rx_err(kbd_rx_err)
  );

endmodule
