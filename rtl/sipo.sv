// sipo: serial-in, parallel-out shift register with clear.
//
// A chain of WIDTH D flip-flops sharing one clock and one clear. While shift is
// high, each clock edge moves the chain one place and takes sin into the first
// stage; all stages are readable at q at once. The first stage is q[WIDTH-1] and
// the chain moves toward q[0], so after a full UART frame has been shifted in
// least-significant-bit first, q holds the frame in its natural bit order
// (q[0] = start bit, q[WIDTH-1] = stop bit). clr clears every stage synchronously.
// The shift enable and the bit order are this design's choices.
module sipo #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             clr,
  input  logic             shift,
  input  logic             sin,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (clr)        q <= '0;
    else if (shift) q <= {sin, q[WIDTH-1:1]};
  end

endmodule
