// ps2_rx: PS/2 device-to-host frame receiver.
//
// A PS/2 frame is 11 bits sent by the device, each valid on a falling edge of the
// device's clock: start bit (0), eight data bits LSB first, odd parity, stop bit (1).
// The receiver shifts the data line into an 11-bit shift register on each 'clk_fall'
// strobe from ps2_line_sync. After the 11th bit it checks the start, parity and stop
// bits. A good frame gives a one-cycle 'valid' with the byte on 'code'; a bad one gives
// a one-cycle 'err' instead, with 'err_flags' = {start, parity, stop} showing which
// checks failed, and the byte is dropped. If a frame stops for TIMEOUT clocks the
// partial frame is discarded, so the receiver falls back into step with the device.
// 'en' low (while the host transmits) holds the receiver empty.
//
// The shift register and the start/parity/stop checks follow the specification; the
// timeout (200 us at 100 MHz, twice the longest PS/2 bit) is this design's choice.
module ps2_rx #(
  parameter int unsigned TIMEOUT = 20_000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       clk_fall,
  input  logic       data_s,
  output logic [7:0] code,
  output logic       valid,
  output logic       err,
  output logic [2:0] err_flags
);

  logic [10:0] shreg;
  logic [3:0]  nbits;
  logic [$clog2(TIMEOUT+1)-1:0] idle;
  logic [10:0] frame;
  logic        start_bad, parity_bad, stop_bad;

  assign frame      = {data_s, shreg[10:1]};   // the frame once the 11th bit arrives
  assign start_bad  = frame[0] != 1'b0;
  assign parity_bad = ^frame[9:1] != 1'b1;      // data + parity must have odd weight
  assign stop_bad   = frame[10] != 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg     <= '0;
      nbits     <= '0;
      idle      <= '0;
      code      <= '0;
      valid     <= 1'b0;
      err       <= 1'b0;
      err_flags <= '0;
    end else begin
      valid <= 1'b0;
      err   <= 1'b0;
      if (!en) begin
        nbits <= '0;
        idle  <= '0;
      end else if (clk_fall) begin
        idle  <= '0;
        shreg <= frame;
        if (nbits == 4'd10) begin
          nbits     <= '0;
          code      <= frame[8:1];
          err_flags <= {start_bad, parity_bad, stop_bad};
          if (start_bad || parity_bad || stop_bad) err <= 1'b1;
          else valid <= 1'b1;
        end else begin
          nbits <= nbits + 1'b1;
        end
      end else if (nbits != '0) begin
        if (idle == $bits(idle)'(TIMEOUT - 1)) begin
          nbits <= '0;
          idle  <= '0;
        end else idle <= idle + 1'b1;
      end
    end
  end

endmodule
