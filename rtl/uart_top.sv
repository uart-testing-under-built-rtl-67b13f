// uart_top: UART core with transmitter, receiver, baud-rate generator and
// bit-clock select.
//
// baud_uart divides the system clock to one tick per bit period. The bit-clock mux
// (bclk select) passes that tick in normal mode and a tick on every clock cycle in
// test mode, so a self-test sends one bit per clock instead of one per baud
// period. The selected tick (bclk_en) clocks-enables both the transmitter and the
// receiver and is brought out for the response analyzer.
// Ports of the transmitter (tx_in, oen, tx_out, tx_done, TxRDY, TxE) and receiver
// (rx_in, wen, rx_out, rx_done, RxRDY, RxFULL) are passed straight through; see
// tx_top and rx_top for their timing. The four sub-blocks and the mux between the
// baud generator and the two halves follow the design; using the mux on a clock
// enable rather than on the clock itself is this design's choice.
module uart_top
  import uart_bist_pkg::*;
#(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned BAUD   = 9600
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              test_en,
  // transmitter
  input  logic [DATA_W-1:0] tx_in,
  input  logic              oen,
  output logic              tx_out,
  output logic              tx_done,
  output logic              tx_rdy,
  output logic              tx_empty,
  // receiver
  input  logic              rx_in,
  input  logic              wen,
  output logic [DATA_W-1:0] rx_out,
  output logic              rx_done,
  output logic              rx_rdy,
  output logic              rx_full,
  output logic              rx_discard,
  output logic              rx_frame_err,
  // selected bit clock enable
  output logic              bclk_en
);

  logic baud_tick;

  baud_uart #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u3 (
    .clk      (clk),
    .rst      (rst),
    .baud_tick(baud_tick)
  );

  // Bit-clock select
  always_comb bclk_en = test_en ? 1'b1 : baud_tick;

  tx_top u1 (
    .clk     (clk),
    .rst     (rst),
    .bit_tick(bclk_en),
    .oen     (oen),
    .tx_in   (tx_in),
    .tx_out  (tx_out),
    .tx_done (tx_done),
    .tx_rdy  (tx_rdy),
    .tx_empty(tx_empty)
  );

  rx_top u2 (
    .clk         (clk),
    .rst         (rst),
    .bit_tick    (bclk_en),
    .rx_in       (rx_in),
    .wen         (wen),
    .rx_out      (rx_out),
    .rx_done     (rx_done),
    .rx_rdy      (rx_rdy),
    .rx_full     (rx_full),
    .rx_discard  (rx_discard),
    .rx_frame_err(rx_frame_err)
  );

endmodule
