// tpg: test pattern generator of the BIST.
//
// An LFSR produces a new pseudo-random byte each time trg is high. The byte goes in
// parallel to the transmitter input (pattern, with pattern_valid = the LFSR's
// trg_out marking the cycle it is new), and is also loaded, wrapped in a start and a
// stop bit, into a PISO whose serial output (rx_serial) drives the receiver input.
// The PISO shifts one bit per bit_tick, so the receiver sees a well-formed UART
// frame. The LFSR-plus-PISO structure follows the design (which calls the
// generator a cellular-automaton LFSR but draws a plain LFSR); framing the PISO
// word with start and stop bits is this design's choice.
module tpg
  import uart_bist_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              trg,
  input  logic              bit_tick,
  output logic [DATA_W-1:0] pattern,
  output logic              pattern_valid,
  output logic              rx_serial
);

  lfsr #(.N(DATA_W), .TAPS(FB_TAPS), .SEED(DATA_W'(1))) u_lfsr (
    .clk    (clk),
    .rst    (rst),
    .trg    (trg),
    .q      (pattern),
    .trg_out(pattern_valid)
  );

  piso #(.WIDTH(FRAME_W)) u_piso (
    .clk  (clk),
    .rst  (rst),
    .load (pattern_valid),
    .din  (make_frame(pattern)),
    .shift(bit_tick),
    .sout (rx_serial)
  );

endmodule
