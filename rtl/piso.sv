// piso: parallel-in, serial-out shift register.
//
// load copies din into the register; every shift step afterwards presents the next
// bit on sout, bit 0 first, while ones are shifted in behind the word so that sout
// rests at 1 (the idle level of a UART line) once the word has gone. load wins over
// shift in the same cycle. rst fills the register with ones. In the pattern
// generator it turns each pattern, already wrapped in start and stop bits, into the
// serial stream for the receiver. Fill value and load priority are this design's
// choices.
module piso #(
  parameter int unsigned WIDTH = 10
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic [WIDTH-1:0] din,
  input  logic             shift,
  output logic             sout
);

  logic [WIDTH-1:0] sr;

  always_ff @(posedge clk) begin
    if (rst)        sr <= '1;
    else if (load)  sr <= din;
    else if (shift) sr <= {1'b1, sr[WIDTH-1:1]};
  end

  assign sout = sr[0];

endmodule
