// tb_ps2_rx: sends PS/2 frames as falling-edge strobes and data levels and checks that
// good frames deliver their byte, that each kind of bad frame (start, parity, stop) is
// reported and its byte dropped, that a broken-off frame is thrown away after the
// timeout, and that 'en' low holds the receiver idle.
module tb_ps2_rx;
  localparam int TIMEOUT = 200;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, en, clk_fall, data_s;
  logic [7:0] code;
  logic valid, err;
  logic [2:0] err_flags;
  int checks = 0, failures = 0;
  int n_valid = 0, n_err = 0;
  logic [7:0] last_code;
  logic [2:0] last_flags;

  ps2_rx #(.TIMEOUT(TIMEOUT)) dut (.*);

  always @(posedge clk) begin
    if (valid) begin n_valid++; last_code = code; end
    if (err) begin n_err++; last_flags = err_flags; end
  end

  task automatic bit_out(input logic b);
    @(negedge clk) data_s = b;
    repeat (5) @(negedge clk);
    clk_fall = 1;
    @(negedge clk) clk_fall = 0;
    repeat (5) @(negedge clk);
  endtask

  // fault: 0 none, 1 start, 2 parity, 3 stop; nbits < 11 breaks the frame off
  task automatic frame(input logic [7:0] b, input int fault = 0, input int nbits = 11);
    logic [10:0] f;
    f = {1'b1, ~^b, b, 1'b0};
    if (fault == 1) f[0] = 1'b1;
    if (fault == 2) f[9] = ~f[9];
    if (fault == 3) f[10] = 1'b0;
    for (int i = 0; i < nbits; i++) bit_out(f[i]);
    @(negedge clk) data_s = 1;
    repeat (3) @(negedge clk);
  endtask

  task automatic expect_byte(input logic [7:0] b, input int fault);
    int v0, e0;
    v0 = n_valid; e0 = n_err;
    frame(b, fault);
    checks++;
    if (fault == 0 && !(n_valid == v0 + 1 && n_err == e0 && last_code == b)) begin
      failures++; $display("FAIL good frame %h", b);
    end
    if (fault != 0 && !(n_valid == v0 && n_err == e0 + 1 && last_flags == 3'b100 >> (fault - 1))) begin
      failures++; $display("FAIL bad frame %h fault %0d flags %b", b, fault, last_flags);
    end
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; en = 1; clk_fall = 0; data_s = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    expect_byte(8'h1C, 0);
    expect_byte(8'hF0, 0);
    expect_byte(8'h00, 0);
    expect_byte(8'hFF, 0);
    for (int i = 0; i < 30; i++) expect_byte(8'($urandom), 0);
    expect_byte(8'h32, 1);
    expect_byte(8'h32, 2);
    expect_byte(8'h32, 3);
    expect_byte(8'h5A, 0);     // back in step after errors
    // broken-off frame, then a pause longer than the timeout, then a good frame
    frame(8'h77, 0, 6);
    repeat (TIMEOUT + 20) @(negedge clk);
    expect_byte(8'h2B, 0);
    // disabled receiver ignores a frame
    begin
      int v0;
      v0 = n_valid;
      en = 0;
      frame(8'h44);
      en = 1;
      checks++;
      if (n_valid != v0 || n_err != 3) begin failures++; $display("FAIL disabled"); end
    end
    expect_byte(8'hAA, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
