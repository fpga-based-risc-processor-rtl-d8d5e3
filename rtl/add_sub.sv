// add_sub: the ALU, an adder/subtractor.
//
// Combinational. s = a + b when su is low and s = a - b (two's complement:
// a + ~b + 1) when su is high, both modulo 2**DATA_W, with no flags. Putting s
// on the bus (Eu) is done by the bus multiplexer.
//
// The source names the block AddSub; restricting it to add and subtract
// with no flags is this design's choice.
module add_sub #(
  parameter int unsigned DATA_W = 8
) (
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  input  logic              su,
  output logic [DATA_W-1:0] s
);
  always_comb s = a + (su ? ~b : b) + DATA_W'(su);
endmodule
