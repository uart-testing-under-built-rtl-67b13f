// misr: multiple-input signature register.
//
// An N-bit LFSR in internal-XOR form whose every stage also XORs in one bit of the
// response word d. On each clock with en high:
//   s'[N-1] = s[0] ^ d[N-1]
//   s'[i]   = s[i+1] ^ (h_{i+1} & s[0]) ^ d[i]    for i < N-1
// which divides the stream of response words by the characteristic polynomial
// x^N + h_{N-1} x^{N-1} + ... + h_1 x + 1 (TAPS holds h_i at bit i). Because the
// register is linear, the final signature is the XOR of the contributions of every
// word. clr (synchronous) sets the signature to zero before a test.
// Using one MISR per UART path follows the design; the polynomial, the internal-XOR
// form and the zero start value are this design's choices.
module misr #(
  parameter int unsigned  N    = 8,
  parameter logic [N-1:0] TAPS = N'(8'b0111_0000)
) (
  input  logic         clk,
  input  logic         clr,
  input  logic         en,
  input  logic [N-1:0] d,
  output logic [N-1:0] sig
);

  logic [N-1:0] feedback;
  assign feedback = sig[0] ? (TAPS & ~N'(1)) >> 1 : '0;

  always_ff @(posedge clk) begin
    if (clr)
      sig <= '0;
    else if (en)
      sig <= ({sig[0], sig[N-1:1]} ^ feedback ^ d);
  end

endmodule
