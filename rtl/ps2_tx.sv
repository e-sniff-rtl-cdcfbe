// ps2_tx: PS/2 host-to-device transmitter, for sending any command byte to the keyboard.
//
// Sequence, as the PS/2 protocol requires: the host holds the clock line low for
// INHIBIT clocks (100 us at 100 MHz), pulls data low as the start bit and lets the clock
// go. The device then clocks the frame: after each falling edge of its clock the host
// puts out the next bit, data LSB first, odd parity, then a released stop bit. On the
// 11th falling edge the device must hold data low as its acknowledge. A missing
// acknowledge, or no complete frame within TIMEOUT clocks (15 ms), ends the transfer
// with a one-cycle 'err'; success gives a one-cycle 'done'. Both lines are open drain:
// 'clk_oe' / 'data_oe' high pull the line low, low leaves it to the pull-up.
//
// 'send' is taken when 'busy' is low. The ability to send an arbitrary code follows the
// specification; the timeout values are this design's choice.
module ps2_tx #(
  parameter int unsigned INHIBIT = 10_000,
  parameter int unsigned TIMEOUT = 1_500_000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       send,
  input  logic [7:0] data,
  input  logic       clk_fall,
  input  logic       data_s,
  output logic       busy,
  output logic       done,
  output logic       err,
  output logic       clk_oe,
  output logic       data_oe
);

  typedef enum logic [1:0] {IDLE, HOLD_CLK, SHIFT, ACK} state_t;
  state_t      state;
  logic [9:0]  frame;    // {stop, parity, data}
  logic [3:0]  nfall;
  logic [$clog2(TIMEOUT+1)-1:0] timer;

  assign busy = state != IDLE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      frame   <= '0;
      nfall   <= '0;
      timer   <= '0;
      done    <= 1'b0;
      err     <= 1'b0;
      clk_oe  <= 1'b0;
      data_oe <= 1'b0;
    end else begin
      done <= 1'b0;
      err  <= 1'b0;
      unique case (state)
        IDLE: if (send) begin
          frame   <= {1'b1, ~^data, data};
          timer   <= '0;
          nfall   <= '0;
          clk_oe  <= 1'b1;
          state   <= HOLD_CLK;
        end
        HOLD_CLK: begin
          if (timer == $bits(timer)'(INHIBIT - 1)) begin
            timer   <= '0;
            data_oe <= 1'b1;          // start bit
            clk_oe  <= 1'b0;          // hand the clock to the device
            state   <= SHIFT;
          end else timer <= timer + 1'b1;
        end
        SHIFT, ACK: begin
          if (timer == $bits(timer)'(TIMEOUT - 1)) begin
            data_oe <= 1'b0;
            err     <= 1'b1;
            state   <= IDLE;
          end else begin
            timer <= timer + 1'b1;
            if (clk_fall) begin
              if (state == SHIFT) begin
                data_oe <= ~frame[nfall];
                if (nfall == 4'd9) state <= ACK;
                else nfall <= nfall + 1'b1;
              end else begin
                data_oe <= 1'b0;
                if (data_s == 1'b0) done <= 1'b1;
                else err <= 1'b1;
                state <= IDLE;
              end
            end
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
