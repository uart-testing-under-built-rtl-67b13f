// rx_top: UART receiver.
//
// The input register samples the serial line once per bit tick: a 0 seen while idle
// is taken as a start bit, the next eight ticks shift the data bits in (least
// significant first) and the tick after them must see the stop bit (1). A good frame
// is moved into the receiver buffer register (RBR), which then counts as full.
// The receiver control logic follows the four cases of the design:
//  * peripheral requests (wen = 1) and RBR full: the RBR is handed to the
//    peripheral (rx_out) and emptied, rx_done pulses;
//  * no request and RBR full: a frame that arrives now is discarded (rx_discard);
//  * request and RBR not full: nothing is handed over, reception goes on;
//  * no request and RBR not full: reception goes on into the RBR.
//
// Interface and timing (rising edge of clk, rst synchronous):
//  * rx_in passes a two-flop synchroniser before it is sampled, so sampling happens
//    two clocks after the line value was present. Sampling is once per bit_tick,
//    with no oversampling: the line must change in step with the receiver's bit
//    clock, as it does when transmitter and receiver share the bit clock.
//  * rx_full (RxFULL) = RBR full; rx_rdy (RxRDY) = the receiver can store a frame.
//  * rx_done: one-cycle pulse; rx_out and rx_done change on the same edge, one
//    clock after wen found the RBR full. rx_frame_err pulses for a bad stop bit (the
//    frame is dropped). The synchroniser, the stop-bit check and the flag encodings
//    are this implementation's choices.
module rx_top
  import uart_bist_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              bit_tick,
  input  logic              rx_in,
  input  logic              wen,
  output logic [DATA_W-1:0] rx_out,
  output logic              rx_done,
  output logic              rx_rdy,
  output logic              rx_full,
  output logic              rx_discard,
  output logic              rx_frame_err
);

  typedef enum logic [1:0] {RX_IDLE, RX_DATA, RX_STOP} rx_state_e;

  rx_state_e         state;
  logic [1:0]        sync;
  logic [DATA_W-1:0] ireg;       // input register
  logic [DATA_W-1:0] rbr;        // receiver buffer register
  logic              rbr_full;
  logic [2:0]        dcnt;

  logic line;
  assign line = sync[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      sync         <= 2'b11;
      state        <= RX_IDLE;
      ireg         <= '0;
      rbr          <= '0;
      rbr_full     <= 1'b0;
      dcnt         <= '0;
      rx_out       <= '0;
      rx_done      <= 1'b0;
      rx_discard   <= 1'b0;
      rx_frame_err <= 1'b0;
    end else begin
      sync         <= {sync[0], rx_in};
      rx_done      <= 1'b0;
      rx_discard   <= 1'b0;
      rx_frame_err <= 1'b0;

      // Hand the buffer to the peripheral when it asks and the buffer is full.
      if (wen && rbr_full) begin
        rx_out   <= rbr;
        rbr_full <= 1'b0;
        rx_done  <= 1'b1;
      end

      if (bit_tick) begin
        unique case (state)
          RX_IDLE:
            if (!line) begin
              state <= RX_DATA;
              dcnt  <= '0;
            end
          RX_DATA: begin
            ireg <= {line, ireg[DATA_W-1:1]};
            dcnt <= dcnt + 1'b1;
            if (dcnt == 3'(DATA_W - 1))
              state <= RX_STOP;
          end
          RX_STOP: begin
            state <= RX_IDLE;
            if (!line) begin
              rx_frame_err <= 1'b1;
            end else if (rbr_full) begin
              rx_discard <= 1'b1;           // buffer still full: frame is lost
            end else begin
              rbr      <= ireg;
              rbr_full <= 1'b1;
            end
          end
          default: state <= RX_IDLE;
        endcase
      end
    end
  end

  assign rx_full = rbr_full;
  assign rx_rdy  = !rbr_full;

  // A byte is handed over at most every other cycle: the RBR must refill first.
  a_done_pulse: assert property (@(posedge clk) disable iff (rst) rx_done |=> !rx_done);

endmodule
