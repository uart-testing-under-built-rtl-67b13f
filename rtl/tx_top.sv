// tx_top: UART transmitter.
//
// Two registers in series, as in the transmitter of the design: the transmitter
// buffer register (TBR) takes a byte from the parallel input, and the 10-bit output
// register holds the whole frame START-DATA-STOP and shifts it out, bit 0 first.
// The output register shifts zeros in behind the frame, so it holds only zeros
// once the frame has gone; while it is empty the line is driven to the idle level 1.
//
// Interface and timing (all on the rising edge of clk, rst synchronous):
//  * oen: while high and the TBR is empty (tx_rdy = 1), tx_in is copied into the
//    TBR on the next edge. Holding oen high therefore sends tx_in frame after frame.
//  * bit_tick: one-cycle bit-clock enable. On a tick with the output register empty
//    (or finishing its stop bit) and the TBR full, the frame is loaded and the start
//    bit appears; every later tick moves to the next bit, so each bit lasts exactly
//    one tick period and a frame takes 10 ticks.
//  * tx_done: one-cycle pulse on the tick that ends the stop bit.
//  * tx_rdy (TxRDY): the TBR can take a byte. tx_empty (TxE): the output register
//    holds no frame.
// The flags TxRDY/TxE and the start/stop framing follow the design; the exact
// handshake on oen and the tick-aligned load are this implementation's choices.
module tx_top
  import uart_bist_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              bit_tick,
  input  logic              oen,
  input  logic [DATA_W-1:0] tx_in,
  output logic              tx_out,
  output logic              tx_done,
  output logic              tx_rdy,
  output logic              tx_empty
);

  logic [DATA_W-1:0]  tbr;
  logic               tbr_full;
  logic [FRAME_W-1:0] oreg;
  logic               busy;
  logic [3:0]         bcnt;      // index of the bit now on the line

  logic last_bit, load_frame;
  assign last_bit   = busy && bcnt == 4'(FRAME_W - 1);
  assign load_frame = bit_tick && tbr_full && (!busy || last_bit);

  always_ff @(posedge clk) begin
    if (rst) begin
      tbr      <= '0;
      tbr_full <= 1'b0;
      oreg     <= '0;
      busy     <= 1'b0;
      bcnt     <= '0;
      tx_done  <= 1'b0;
    end else begin
      tx_done <= bit_tick && last_bit;

      // Transmitter buffer register
      if (load_frame)
        tbr_full <= 1'b0;
      if (oen && (!tbr_full || load_frame)) begin
        tbr      <= tx_in;
        tbr_full <= 1'b1;
      end

      // Output register
      if (load_frame) begin
        oreg <= make_frame(tbr);
        busy <= 1'b1;
        bcnt <= '0;
      end else if (bit_tick && busy) begin
        oreg <= {1'b0, oreg[FRAME_W-1:1]};
        if (last_bit) begin
          busy <= 1'b0;
          bcnt <= '0;
        end else begin
          bcnt <= bcnt + 1'b1;
        end
      end
    end
  end

  assign tx_out   = busy ? oreg[0] : 1'b1;
  assign tx_rdy   = !tbr_full;
  assign tx_empty = !busy;

  // The line is at the idle level whenever no frame is being sent.
  a_idle_high: assert property (@(posedge clk) disable iff (rst) !busy |-> tx_out);
  // Every frame ends with a stop bit.
  a_stop_bit: assert property (@(posedge clk) disable iff (rst) last_bit |-> tx_out);

endmodule
