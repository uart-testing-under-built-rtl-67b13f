// lfsr: n-stage linear feedback shift register, the pseudo-random pattern source.
//
// Stages X[N-1] .. X[0] form a shift register that moves one place toward X[0] on
// each step. The bit entering X[N-1] is X[0] XOR the stages X[i] whose feedback
// coefficient h_i (TAPS[i], i = 1..N-1) is 1; this is the external-XOR form with
// one XOR per tap. With a primitive characteristic polynomial
// x^N + h_{N-1} x^{N-1} + ... + h_1 x + 1 the register runs through all 2^N - 1
// non-zero states before it repeats. The default taps give x^8+x^6+x^5+x^4+1,
// SEED starts the register with only X[0] set.
//
// Interface and timing: the register steps on a clock edge only while trg is high,
// so q changes one cycle after trg; trg_out is trg delayed by one cycle and marks
// the cycle in which q holds a fresh pattern. During rst, q returns to SEED and
// trg_out is low. The stage structure follows the design; the tap set, the seed and
// the trg_out timing are this design's choices.
module lfsr #(
  parameter int unsigned   N    = 8,
  parameter logic [N-1:0]  TAPS = N'(8'b0111_0000),
  parameter logic [N-1:0]  SEED = N'(1)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         trg,
  output logic [N-1:0] q,
  output logic         trg_out
);

  logic fb;
  assign fb = q[0] ^ (^(q & TAPS & ~N'(1)));

  always_ff @(posedge clk) begin
    if (rst) begin
      q       <= SEED;
      trg_out <= 1'b0;
    end else begin
      trg_out <= trg;
      if (trg)
        q <= {fb, q[N-1:1]};
    end
  end

  // The all-zero state is a lock-up state and must never be reached.
  a_nonzero: assert property (@(posedge clk) disable iff (rst) q != '0);

endmodule
