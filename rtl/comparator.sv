// comparator: final stage of the test response analyzer.
//
// On the clock edge where cmp is high it compares the final signature of each UART
// path with the golden signature and stores the 2-bit result:
//   00 no fault, 01 transmitter fault, 10 receiver fault, 11 both paths faulty
// (bit 0 = transmitter signature differs, bit 1 = receiver signature differs), and
// sets valid. clr clears the result and valid. Both paths carry the same patterns,
// so one golden signature serves both. The 2-bit code follows the design; the
// code 11 for two failing paths, the registered result and the valid flag are this
// design's choices.
module comparator
  import uart_bist_pkg::*;
(
  input  logic              clk,
  input  logic              clr,
  input  logic              cmp,
  input  logic [DATA_W-1:0] sig_tx,
  input  logic [DATA_W-1:0] sig_rx,
  input  logic [DATA_W-1:0] golden,
  output test_result_e      result,
  output logic              valid
);

  always_ff @(posedge clk) begin
    if (clr) begin
      result <= RES_PASS;
      valid  <= 1'b0;
    end else if (cmp) begin
      result <= test_result_e'({sig_rx != golden, sig_tx != golden});
      valid  <= 1'b1;
    end
  end

endmodule
