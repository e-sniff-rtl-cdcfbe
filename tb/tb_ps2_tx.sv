// tb_ps2_tx: a device model clocks bytes out of the transmitter. Checks the clock
// inhibit time, the start bit, the eight data bits, odd parity and the released stop
// bit, 'done' after the device's acknowledge, 'err' without an acknowledge, and 'err'
// after the timeout when no device answers.
module tb_ps2_tx;
  localparam int INHIBIT = 100, TIMEOUT = 3000;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, send, clk_fall, data_s;
  logic [7:0] data;
  logic busy, done, err, clk_oe, data_oe;
  int checks = 0, failures = 0;
  int n_done = 0, n_err = 0;

  ps2_tx #(.INHIBIT(INHIBIT), .TIMEOUT(TIMEOUT)) dut (.*);

  always @(posedge clk) begin
    if (done) n_done++;
    if (err) n_err++;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // device side: data line level is the host's pull-down or the device's
  logic dev_data_low = 0;
  assign data_s = !(data_oe || dev_data_low);

  task automatic fall();
    @(negedge clk) clk_fall = 1;
    @(negedge clk) clk_fall = 0;
    repeat (8) @(negedge clk);
  endtask

  // mode 0: normal; 1: device never acknowledges; 2: device never clocks
  task automatic transfer(input logic [7:0] b, input int mode);
    int held = 0;
    logic [9:0] got;
    int d0, e0;
    d0 = n_done; e0 = n_err;
    @(negedge clk) begin send = 1; data = b; end
    @(negedge clk) send = 0;
    while (clk_oe) begin held++; @(negedge clk); end
    check(held >= INHIBIT - 1 && held <= INHIBIT + 1, $sformatf("inhibit %0d clocks", held));
    check(data_oe == 1'b1, "start bit not driven");
    if (mode == 2) begin
      repeat (TIMEOUT + 10) @(negedge clk);
      check(n_err == e0 + 1 && n_done == d0 && !busy, "timeout without device");
      check(!data_oe && !clk_oe, "lines released after timeout");
      return;
    end
    repeat (20) @(negedge clk);
    for (int i = 0; i < 10; i++) begin
      fall();
      got[i] = data_s;
    end
    check(got[7:0] == b, $sformatf("data bits %h want %h", got[7:0], b));
    check(got[8] == ~^b, "parity bit");
    check(got[9] == 1'b1, "stop bit not released");
    if (mode == 0) dev_data_low = 1;
    fall();
    dev_data_low = 0;
    repeat (3) @(negedge clk);
    if (mode == 0) check(n_done == d0 + 1 && n_err == e0, "done after acknowledge");
    else check(n_err == e0 + 1 && n_done == d0, "err without acknowledge");
    check(!busy && !data_oe && !clk_oe, "idle after transfer");
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; send = 0; data = 0; clk_fall = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    transfer(8'hFF, 0);
    transfer(8'hED, 0);
    transfer(8'h00, 0);
    transfer(8'h5A, 1);
    transfer(8'h07, 2);
    for (int i = 0; i < 5; i++) transfer(8'($urandom), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
