// tra: test response analyzer of the BIST.
//
// Two signature registers, one per UART path, feed a comparator:
//  * transmitter path: the serial line tx_serial is shifted into a 10-bit SIPO on
//    every bit tick. On the cycle in which tx_done pulses the SIPO holds the whole
//    frame just sent, and its eight data bits are clocked into the transmitter MISR.
//  * receiver path: the receiver already delivers a parallel byte, so rx_data is
//    clocked into the receiver MISR whenever rx_done pulses.
// After the last pattern the controller raises cmp for one cycle and the comparator
// checks both signatures against golden (see comparator for the result code).
// clr (synchronous) empties the SIPO and both MISRs and clears the result; it also
// acts as reset. The structure (SIPO on the transmitter output, MISRs, comparator)
// follows the design; the use of tx_done to frame the SIPO contents is this
// design's choice.
module tra
  import uart_bist_pkg::*;
(
  input  logic              clk,
  input  logic              clr,
  input  logic              bit_tick,
  input  logic              tx_serial,
  input  logic              tx_done,
  input  logic [DATA_W-1:0] rx_data,
  input  logic              rx_done,
  input  logic              cmp,
  input  logic [DATA_W-1:0] golden,
  output logic [DATA_W-1:0] sig_tx,
  output logic [DATA_W-1:0] sig_rx,
  output test_result_e      test_result,
  output logic              result_valid
);

  logic [FRAME_W-1:0] frame;

  sipo #(.WIDTH(FRAME_W)) u_sipo (
    .clk  (clk),
    .clr  (clr),
    .shift(bit_tick),
    .sin  (tx_serial),
    .q    (frame)
  );

  misr #(.N(DATA_W), .TAPS(FB_TAPS)) u_misr_tx (
    .clk(clk),
    .clr(clr),
    .en (tx_done),
    .d  (frame[DATA_W:1]),
    .sig(sig_tx)
  );

  misr #(.N(DATA_W), .TAPS(FB_TAPS)) u_misr_rx (
    .clk(clk),
    .clr(clr),
    .en (rx_done),
    .d  (rx_data),
    .sig(sig_rx)
  );

  comparator u_cmp (
    .clk   (clk),
    .clr   (clr),
    .cmp   (cmp),
    .sig_tx(sig_tx),
    .sig_rx(sig_rx),
    .golden(golden),
    .result(test_result),
    .valid (result_valid)
  );

endmodule
