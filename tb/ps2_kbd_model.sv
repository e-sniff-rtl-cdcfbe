// ps2_kbd_model: behavioural PS/2 keyboard for simulation (not synthesizable).
//
// Drives the open-drain PS/2 clock and data lines together with the host's pull-downs
// ('host_clk_oe', 'host_data_oe'); 'ps2_clk' / 'ps2_data' are the resulting line levels.
// Timing is counted in cycles of 'clk', HALF cycles per half period of the PS/2 clock.
//
//  * send_byte(b, fault) sends one device-to-host frame. fault: 0 good frame, 1 bad
//    parity, 2 bad stop bit, 3 bad start bit.
//  * When the host requests to send (clock held low, then data low), the model clocks
//    in the byte, checks parity, acknowledges, records it in 'last_rx' / 'rx_count', and
//    answers FA; after the reset command FF it also sends the self-test result AA.
//  * 'answer_bat' low suppresses the AA answer.
//  * 'present' low makes the model silent, as if no keyboard were plugged in.
module ps2_kbd_model #(
  parameter int HALF = 50
) (
  input  logic clk,
  input  logic present,
  input  logic host_clk_oe,
  input  logic host_data_oe,
  output logic ps2_clk,
  output logic ps2_data
);

  logic dev_clk_low = 1'b0;
  logic dev_data_low = 1'b0;
  logic busy = 1'b0;
  logic answer_bat = 1'b1;   // low: the keyboard never reports its self-test result
  logic [7:0] last_rx = '0;
  int         rx_count = 0;
  int         rx_parity_errors = 0;

  assign ps2_clk  = !(host_clk_oe || dev_clk_low);
  assign ps2_data = !(host_data_oe || dev_data_low);

  task automatic wait_cycles(input int n);
    repeat (n) @(posedge clk);
  endtask

  task automatic send_byte(input logic [7:0] b, input int fault = 0);
    logic [10:0] f;
    wait (!busy);
    busy = 1'b1;
    f = {1'b1, ~^b, b, 1'b0};
    if (fault == 1) f[9]  = ~f[9];
    if (fault == 2) f[10] = 1'b0;
    if (fault == 3) f[0]  = 1'b1;
    while (!ps2_clk) wait_cycles(1);       // host inhibits: wait
    for (int i = 0; i < 11; i++) begin
      dev_data_low = !f[i];
      wait_cycles(HALF / 2);
      dev_clk_low = 1'b1;
      wait_cycles(HALF);
      dev_clk_low = 1'b0;
      wait_cycles(HALF / 2);
    end
    dev_data_low = 1'b0;
    wait_cycles(HALF * 2);
    busy = 1'b0;
  endtask

  // host-to-device reception
  initial begin
    logic [9:0] bits;
    forever begin
      @(posedge clk);
      if (present && host_clk_oe && !busy) begin
        busy = 1'b1;
        while (host_clk_oe) wait_cycles(1);
        wait_cycles(HALF);
        if (!ps2_data) begin
          for (int i = 0; i < 10; i++) begin
            dev_clk_low = 1'b1;
            wait_cycles(HALF);
            dev_clk_low = 1'b0;
            wait_cycles(HALF / 2);
            bits[i] = ps2_data;               // sample near the rising edge
            wait_cycles(HALF / 2);
          end
          dev_data_low = 1'b1;                // acknowledge
          wait_cycles(HALF / 2);
          dev_clk_low = 1'b1;
          wait_cycles(HALF);
          dev_clk_low = 1'b0;
          wait_cycles(HALF / 2);
          dev_data_low = 1'b0;
          wait_cycles(HALF * 2);
          last_rx  = bits[7:0];
          rx_count = rx_count + 1;
          if (^bits[8:0] != 1'b1) rx_parity_errors = rx_parity_errors + 1;
          busy = 1'b0;
          send_byte(8'hFA);
          if (bits[7:0] == 8'hFF && answer_bat) begin
            wait_cycles(HALF * 10);
            send_byte(8'hAA);
          end
        end else begin
          busy = 1'b0;
        end
      end
    end
  end

endmodule
