// accumulator: the A register.
//
// Loads the W bus on a clock edge when la is high. Its value is both the first
// ALU operand and, through the bus multiplexer (Ea), the source for the output
// registers. clr clears it asynchronously, active high.
//
// The block and its 8-bit width follow the source design; the single
// output (the source draws two) and the reset are this design's choices.
module accumulator #(
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              clr,
  input  logic              la,
  input  logic [DATA_W-1:0] d,
  output logic [DATA_W-1:0] q
);
  always_ff @(posedge clk or posedge clr)
    if (clr)     q <= '0;
    else if (la) q <= d;
endmodule
