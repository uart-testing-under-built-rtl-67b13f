// uart_bist_pkg: widths, polynomial and result codes shared by the BIST-enabled UART.
//
// The UART moves 8-bit characters in a 10-bit frame: one start bit (0), eight data
// bits sent least significant bit first, one stop bit (1). The pattern generator
// (LFSR) and both signature registers (MISR) use the same degree-8 primitive
// polynomial x^8 + x^6 + x^5 + x^4 + 1; FB_TAPS marks the middle coefficients h1..h7
// (bit i = h_i), so bits 4, 5 and 6 are set. The polynomial is this design's choice:
// the method only asks for a maximal-length register of the data width.
// The 2-bit test result encodes which UART path failed its signature check.
package uart_bist_pkg;

  localparam int unsigned DATA_W  = 8;
  localparam int unsigned FRAME_W = DATA_W + 2;   // start + data + stop

  // Middle feedback coefficients of x^8 + x^6 + x^5 + x^4 + 1.
  localparam logic [DATA_W-1:0] FB_TAPS = 8'b0111_0000;

  // BIST outcome, bit 0 = transmitter path, bit 1 = receiver path.
  typedef enum logic [1:0] {
    RES_PASS       = 2'b00,
    RES_TX_FAULT   = 2'b01,
    RES_RX_FAULT   = 2'b10,
    RES_BOTH_FAULT = 2'b11
  } test_result_e;

  // Builds the serial frame {stop, data, start}; bit 0 leaves the line first.
  function automatic logic [FRAME_W-1:0] make_frame(input logic [DATA_W-1:0] d);
    return {1'b1, d, 1'b0};
  endfunction

endpackage
