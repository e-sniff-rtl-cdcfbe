// keyboard_driver: PS/2 keyboard controller of the sniffer.
//
// Built from ps2_line_sync (pin synchroniser), ps2_rx (frame receiver with error
// checks), ps2_tx (command sender) and scancode_to_ascii, plus a controller that does:
//
//  * Boot test. After reset it sends the keyboard reset command (FF). If the transfer
//    fails (no keyboard drives the clock) or no self-test pass byte (AA) arrives within
//    BOOT_TIMEOUT clocks, 'kbd_present' stays low and 'auto_start' goes high: the
//    processor then starts capture with default settings. 'boot_done' marks the end.
//  * Line entry. Each translated key is written into the input line buffer one clock
//    after it is decoded, one character per clock, at the cursor, which then advances.
//    Backspace moves the cursor back and blanks that cell. Characters past the end of
//    the line are dropped. Frames with a start, parity or stop error never reach the
//    translator, so that keystroke is ignored ('rx_err' pulses).
//  * Return. The line is handed to the processor: 'irq' is high for exactly two clocks
//    and 'line_ready' stays high. While it is high the driver does not write the line,
//    so the processor can read it through its own port with no contention. The
//    processor pulses 'line_ack' when done; the line is then cleared to spaces and the
//    cursor goes back to column 0.
//  * Commands. After boot, 'cmd_valid' with 'cmd_data' sends any byte to the keyboard
//    (when 'cmd_busy' is low); 'cmd_done' or 'cmd_err' reports the outcome. The
//    receiver is switched off while the transmitter owns the lines.
//
// The boot test, the automatic start, the one-character-per-clock writes, the
// two-cycle interrupt and the command send follow the specification. The use of the FF
// reset command and its AA answer as the presence test, the hand-shake with
// 'line_ready'/'line_ack', backspace handling and all time-outs are this design's own.
module keyboard_driver #(
  parameter int unsigned COLS         = 80,
  parameter int unsigned FILTER       = 8,
  parameter int unsigned RX_TIMEOUT   = 20_000,
  parameter int unsigned INHIBIT      = 10_000,
  parameter int unsigned TX_TIMEOUT   = 1_500_000,
  parameter int unsigned BOOT_TIMEOUT = 100_000_000
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // PS/2 pins (open drain: *_oe high pulls the line low)
  input  logic                    ps2_clk_i,
  input  logic                    ps2_data_i,
  output logic                    ps2_clk_oe,
  output logic                    ps2_data_oe,
  // input line buffer write port
  output logic                    lb_wr_en,
  output logic [$clog2(COLS)-1:0] lb_wr_col,
  output logic [7:0]              lb_wr_char,
  output logic                    lb_clear,
  // processor side
  output logic                    irq,
  output logic                    line_ready,
  output logic [$clog2(COLS):0]   line_len,
  input  logic                    line_ack,
  input  logic                    cmd_valid,
  input  logic [7:0]              cmd_data,
  output logic                    cmd_busy,
  output logic                    cmd_done,
  output logic                    cmd_err,
  output logic                    boot_done,
  output logic                    kbd_present,
  output logic                    auto_start,
  output logic                    rx_err
);
  import esniff_pkg::*;

  localparam int unsigned CW = $clog2(COLS);

  // ---- PS/2 line handling ----
  logic clk_s, data_s, clk_fall;
  logic tx_send, tx_busy, tx_done, tx_err;
  logic [7:0] tx_data;
  logic [7:0] rx_code;
  logic       rx_valid;
  logic [2:0] rx_err_flags;

  ps2_line_sync #(.FILTER(FILTER)) u_sync (
    .clk, .rst_n, .ps2_clk_i, .ps2_data_i, .clk_s, .data_s, .clk_fall
  );

  ps2_rx #(.TIMEOUT(RX_TIMEOUT)) u_rx (
    .clk, .rst_n, .en(!tx_busy), .clk_fall, .data_s,
    .code(rx_code), .valid(rx_valid), .err(rx_err), .err_flags(rx_err_flags)
  );

  ps2_tx #(.INHIBIT(INHIBIT), .TIMEOUT(TX_TIMEOUT)) u_tx (
    .clk, .rst_n, .send(tx_send), .data(tx_data), .clk_fall, .data_s,
    .busy(tx_busy), .done(tx_done), .err(tx_err),
    .clk_oe(ps2_clk_oe), .data_oe(ps2_data_oe)
  );

  // ---- boot test ----
  typedef enum logic [2:0] {B_SEND, B_WAIT_TX, B_WAIT_BAT, B_RUN} boot_t;
  boot_t boot;
  logic [$clog2(BOOT_TIMEOUT+1)-1:0] boot_timer;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      boot        <= B_SEND;
      boot_timer  <= '0;
      kbd_present <= 1'b0;
      auto_start  <= 1'b0;
    end else begin
      unique case (boot)
        B_SEND:    boot <= B_WAIT_TX;
        B_WAIT_TX: begin
          if (tx_err) begin
            auto_start <= 1'b1;
            boot       <= B_RUN;
          end else if (tx_done) begin
            boot_timer <= '0;
            boot       <= B_WAIT_BAT;
          end
        end
        B_WAIT_BAT: begin
          if (rx_valid && rx_code == PS2_BAT_OK) begin
            kbd_present <= 1'b1;
            boot        <= B_RUN;
          end else if (boot_timer == $bits(boot_timer)'(BOOT_TIMEOUT - 1)) begin
            auto_start <= 1'b1;
            boot       <= B_RUN;
          end else boot_timer <= boot_timer + 1'b1;
        end
        B_RUN: ;
        default: boot <= B_RUN;
      endcase
    end
  end

  assign boot_done = boot == B_RUN;

  // ---- command send ----
  always_comb begin
    tx_send = 1'b0;
    tx_data = cmd_data;
    if (boot == B_SEND) begin
      tx_send = 1'b1;
      tx_data = PS2_CMD_RESET;
    end else if (boot == B_RUN && cmd_valid && !tx_busy) begin
      tx_send = 1'b1;
    end
  end

  logic cmd_owned;   // the transfer in flight was asked for by the processor
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cmd_owned <= 1'b0;
    else if (tx_send) cmd_owned <= boot == B_RUN;
    else if (tx_done || tx_err) cmd_owned <= 1'b0;
  end

  assign cmd_busy = tx_busy || !boot_done;
  assign cmd_done = tx_done && cmd_owned;
  assign cmd_err  = tx_err && cmd_owned;

  // ---- key translation and line entry ----
  logic [7:0] ascii;
  logic       ascii_valid;

  scancode_to_ascii u_xlate (
    .clk, .rst_n, .code(rx_code), .code_valid(rx_valid && boot_done),
    .ascii, .ascii_valid
  );

  logic [CW:0] cursor;
  logic [1:0]  irq_cnt;

  assign line_len = cursor;
  assign irq      = irq_cnt != '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cursor     <= '0;
      line_ready <= 1'b0;
      irq_cnt    <= '0;
      lb_wr_en   <= 1'b0;
      lb_wr_col  <= '0;
      lb_wr_char <= ASCII_SPACE;
      lb_clear   <= 1'b0;
    end else begin
      lb_wr_en <= 1'b0;
      lb_clear <= 1'b0;
      if (irq_cnt != '0) irq_cnt <= irq_cnt - 1'b1;
      if (line_ready) begin
        if (line_ack) begin
          line_ready <= 1'b0;
          lb_clear   <= 1'b1;
          cursor     <= '0;
        end
      end else if (ascii_valid) begin
        if (ascii == ASCII_CR) begin
          line_ready <= 1'b1;
          irq_cnt    <= 2'd2;
        end else if (ascii == ASCII_BS) begin
          if (cursor != '0) begin
            cursor     <= cursor - 1'b1;
            lb_wr_en   <= 1'b1;
            lb_wr_col  <= CW'(cursor - 1'b1);
            lb_wr_char <= ASCII_SPACE;
          end
        end else if (cursor < (CW+1)'(COLS)) begin
          cursor     <= cursor + 1'b1;
          lb_wr_en   <= 1'b1;
          lb_wr_col  <= CW'(cursor);
          lb_wr_char <= ascii;
        end
      end
    end
  end

  // The interrupt pulse is exactly two clocks long.
  property p_irq_two_cycles;
    @(posedge clk) disable iff (!rst_n) $rose(irq) |=> irq ##1 !irq;
  endproperty
  assert property (p_irq_two_cycles);

endmodule
