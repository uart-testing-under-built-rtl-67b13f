// bist_ctrl: test controller of the BIST.
//
// Sequences one self-test while test_en is high:
//   CLEAR   one cycle: clr empties the SIPO, both MISRs and the result.
//   ISSUE   one cycle: trg asks the pattern generator for a new pattern, which the
//           transmitter and the pattern generator's PISO then both send.
//   WAIT    waits until the transmitter has finished its frame (tx_done) and the
//           receiver has handed its byte over (rx_done). If either does not come
//           within WAIT_MAX cycles the pattern is closed anyway, so that a broken
//           path shows up as a wrong signature rather than a hung test
//           (timeouts counts such patterns).
//   COMPARE after N_PATTERNS patterns: cmp for one cycle.
//   DONE    test_done stays high until test_en falls.
// Dropping test_en returns to IDLE from any state; raising it again restarts the
// test. busy is high from CLEAR to COMPARE. The 256-pattern length, trg and the
// final comparison follow the design; the handshake with both UART paths, the
// timeout and the state encoding are this design's choices.
module bist_ctrl #(
  parameter int unsigned N_PATTERNS = 256,
  parameter int unsigned WAIT_MAX   = 64
) (
  input  logic clk,
  input  logic rst,
  input  logic test_en,
  input  logic tx_done,
  input  logic rx_done,
  output logic clr,
  output logic trg,
  output logic cmp,
  output logic busy,
  output logic test_done,
  output logic [15:0] timeouts
);

  typedef enum logic [2:0] {S_IDLE, S_CLEAR, S_ISSUE, S_WAIT, S_COMPARE, S_DONE} state_e;

  localparam int unsigned PAT_W  = $clog2(N_PATTERNS + 1);
  localparam int unsigned WAIT_W = $clog2(WAIT_MAX + 1);

  state_e            state;
  logic [PAT_W-1:0]  pat_cnt;
  logic [WAIT_W-1:0] wait_cnt;
  logic              got_tx, got_rx;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      pat_cnt  <= '0;
      wait_cnt <= '0;
      got_tx   <= 1'b0;
      got_rx   <= 1'b0;
      timeouts <= '0;
    end else if (!test_en) begin
      state <= S_IDLE;
    end else begin
      unique case (state)
        S_IDLE: state <= S_CLEAR;
        S_CLEAR: begin
          pat_cnt  <= '0;
          timeouts <= '0;
          state    <= S_ISSUE;
        end
        S_ISSUE: begin
          got_tx   <= 1'b0;
          got_rx   <= 1'b0;
          wait_cnt <= '0;
          state    <= S_WAIT;
        end
        S_WAIT: begin
          got_tx   <= got_tx | tx_done;
          got_rx   <= got_rx | rx_done;
          wait_cnt <= wait_cnt + 1'b1;
          if (((got_tx | tx_done) && (got_rx | rx_done)) || wait_cnt == WAIT_W'(WAIT_MAX)) begin
            if (wait_cnt == WAIT_W'(WAIT_MAX))
              timeouts <= timeouts + 1'b1;
            pat_cnt <= pat_cnt + 1'b1;
            state   <= (pat_cnt == PAT_W'(N_PATTERNS - 1)) ? S_COMPARE : S_ISSUE;
          end
        end
        S_COMPARE: state <= S_DONE;
        S_DONE:    state <= S_DONE;
        default:   state <= S_IDLE;
      endcase
    end
  end

  assign clr       = state == S_CLEAR;
  assign trg       = state == S_ISSUE;
  assign cmp       = state == S_COMPARE;
  assign busy      = state inside {S_CLEAR, S_ISSUE, S_WAIT, S_COMPARE};
  assign test_done = state == S_DONE;

endmodule
