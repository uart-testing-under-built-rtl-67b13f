// bist_uart_top: UART with built-in self-test.
//
// Normal mode (Test_En = 0): an ordinary 8N1 UART. TxData_in is sent on Tx_out
// while Tx_en is high; frames on Rx_in are received and handed out on Rx_Data_out
// when the peripheral asks with Rx_rd.
// Test mode (Test_En = 1): the input multiplexers cut the UART off its normal inputs.
// The test pattern generator drives the transmitter's parallel input and, through
// its PISO, the receiver's serial input, with the same pseudo-random byte; the bit
// clock runs at one bit per system clock. The transmitter's serial output is
// compacted by one MISR (after a SIPO) and the receiver's parallel output by a
// second one. After N_PATTERNS patterns both signatures are compared with
// Golden_sign and Test_result tells which path failed (00 none, 01 transmitter,
// 10 receiver, 11 both); Test_done rises when it is valid and stays high until
// Test_En falls. Tx_out and Rx_Data_out show the UART's activity in both modes;
// Sign_tx and Sign_rx show the two running signatures, Tx_rdy, Rx_full and
// Rx_discard the transmitter buffer, receiver buffer and lost-frame flags.
// A test takes 16 clock cycles per pattern plus 3 (4099 cycles at 256 patterns).
//
// The division into pattern generator, UART and response analyzer, the port names
// of the original top level and the 256 patterns follow the design. Tx_en, Rx_rd,
// Test_done, the test-mode input multiplexers' exact placement and the default
// 50 MHz / 9600 baud are this design's choices. rst is synchronous, active high.
module bist_uart_top
  import uart_bist_pkg::*;
#(
  parameter int unsigned CLK_HZ     = 50_000_000,
  parameter int unsigned BAUD       = 9600,
  parameter int unsigned N_PATTERNS = 256
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              Test_En,
  input  logic [DATA_W-1:0] TxData_in,
  input  logic              Tx_en,
  input  logic              Rx_in,
  input  logic              Rx_rd,
  input  logic [DATA_W-1:0] Golden_sign,
  output logic              Tx_out,
  output logic              Tx_done,
  output logic [DATA_W-1:0] Rx_Data_out,
  output logic              Rx_done,
  output test_result_e      Test_result,
  output logic              Test_done,
  // status
  output logic              Tx_rdy,
  output logic              Rx_full,
  output logic              Rx_discard,
  output logic [DATA_W-1:0] Sign_tx,
  output logic [DATA_W-1:0] Sign_rx
);

  // Controller
  logic ctrl_clr, trg, cmp, ctrl_busy;
  logic [15:0] timeouts;

  // Pattern generator
  logic [DATA_W-1:0] pattern;
  logic              pattern_valid, tpg_serial;

  // UART
  logic [DATA_W-1:0] uart_tx_in;
  logic              uart_oen, uart_rx_in, uart_wen, bclk_en;
  logic              tx_empty, rx_rdy, rx_frame_err;

  // Response analyzer
  logic              result_valid;

  bist_ctrl #(.N_PATTERNS(N_PATTERNS)) u_ctrl (
    .clk      (clk),
    .rst      (rst),
    .test_en  (Test_En),
    .tx_done  (Tx_done),
    .rx_done  (Rx_done),
    .clr      (ctrl_clr),
    .trg      (trg),
    .cmp      (cmp),
    .busy     (ctrl_busy),
    .test_done(Test_done),
    .timeouts (timeouts)
  );

  tpg u_tpg (
    .clk          (clk),
    .rst          (rst),
    .trg          (trg),
    .bit_tick     (bclk_en),
    .pattern      (pattern),
    .pattern_valid(pattern_valid),
    .rx_serial    (tpg_serial)
  );

  // Test-mode input multiplexers: pattern generator or normal inputs.
  always_comb begin
    if (Test_En) begin
      uart_tx_in = pattern;
      uart_oen   = pattern_valid;
      uart_rx_in = tpg_serial;
      uart_wen   = 1'b1;
    end else begin
      uart_tx_in = TxData_in;
      uart_oen   = Tx_en;
      uart_rx_in = Rx_in;
      uart_wen   = Rx_rd;
    end
  end

  uart_top #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_uart (
    .clk         (clk),
    .rst         (rst),
    .test_en     (Test_En),
    .tx_in       (uart_tx_in),
    .oen         (uart_oen),
    .tx_out      (Tx_out),
    .tx_done     (Tx_done),
    .tx_rdy      (Tx_rdy),
    .tx_empty    (tx_empty),
    .rx_in       (uart_rx_in),
    .wen         (uart_wen),
    .rx_out      (Rx_Data_out),
    .rx_done     (Rx_done),
    .rx_rdy      (rx_rdy),
    .rx_full     (Rx_full),
    .rx_discard  (Rx_discard),
    .rx_frame_err(rx_frame_err),
    .bclk_en     (bclk_en)
  );

  tra u_tra (
    .clk         (clk),
    .clr         (rst || ctrl_clr),
    .bit_tick    (bclk_en),
    .tx_serial   (Tx_out),
    .tx_done     (Tx_done && Test_En),
    .rx_data     (Rx_Data_out),
    .rx_done     (Rx_done && Test_En),
    .cmp         (cmp),
    .golden      (Golden_sign),
    .sig_tx      (Sign_tx),
    .sig_rx      (Sign_rx),
    .test_result (Test_result),
    .result_valid(result_valid)
  );

  // The result is only reported once the comparison has been made.
  a_result_valid: assert property (@(posedge clk) disable iff (rst) Test_done |-> result_valid);

endmodule
