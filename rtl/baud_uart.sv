// baud_uart: baud-rate generator of the UART.
//
// Divides the system clock by DIV = CLK_HZ / BAUD and raises baud_tick for one
// clock cycle at the end of every bit period; the transmitter and receiver use it
// as a clock enable instead of running on a derived clock. The divider counter
// restarts at synchronous reset, so the first tick comes DIV cycles after rst
// falls. Only the name and position of this block (beside the bit-clock mux,
// feeding transmitter and receiver) are given; the divider, the default 50 MHz
// clock and 9600 baud are this design's choices.
module baud_uart #(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned BAUD   = 9600
) (
  input  logic clk,
  input  logic rst,
  output logic baud_tick
);

  localparam int unsigned DIV   = (CLK_HZ / BAUD) < 1 ? 1 : (CLK_HZ / BAUD);
  localparam int unsigned CNT_W = DIV > 1 ? $clog2(DIV) : 1;

  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt       <= '0;
      baud_tick <= 1'b0;
    end else if (cnt == CNT_W'(DIV - 1)) begin
      cnt       <= '0;
      baud_tick <= 1'b1;
    end else begin
      cnt       <= cnt + 1'b1;
      baud_tick <= 1'b0;
    end
  end

endmodule
