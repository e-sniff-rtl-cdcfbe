// ps2_line_sync: brings the PS/2 clock and data lines into the system clock domain.
//
// Each line passes through a two-flop synchroniser and a glitch filter that changes its
// output only after FILTER consecutive equal samples. 'clk_fall' is a one-cycle strobe
// on each falling edge of the filtered PS/2 clock; 'data_s' is the filtered data level.
// The output lags the pins by FILTER + 2 clocks, far less than the 30 us minimum PS/2
// half period. The filter length is this design's choice.
module ps2_line_sync #(
  parameter int unsigned FILTER = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ps2_clk_i,
  input  logic ps2_data_i,
  output logic clk_s,
  output logic data_s,
  output logic clk_fall
);

  logic [1:0] clk_meta, data_meta;
  logic [$clog2(FILTER+1)-1:0] clk_cnt, data_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clk_meta  <= 2'b11;
      data_meta <= 2'b11;
      clk_s     <= 1'b1;
      data_s    <= 1'b1;
      clk_cnt   <= '0;
      data_cnt  <= '0;
      clk_fall  <= 1'b0;
    end else begin
      clk_meta  <= {clk_meta[0], ps2_clk_i};
      data_meta <= {data_meta[0], ps2_data_i};
      clk_fall  <= 1'b0;
      if (clk_meta[1] == clk_s) clk_cnt <= '0;
      else if (clk_cnt == $bits(clk_cnt)'(FILTER - 1)) begin
        clk_cnt  <= '0;
        clk_s    <= clk_meta[1];
        clk_fall <= clk_s;            // was high, now going low
      end else clk_cnt <= clk_cnt + 1'b1;
      if (data_meta[1] == data_s) data_cnt <= '0;
      else if (data_cnt == $bits(data_cnt)'(FILTER - 1)) begin
        data_cnt <= '0;
        data_s   <= data_meta[1];
      end else data_cnt <= data_cnt + 1'b1;
    end
  end

endmodule
