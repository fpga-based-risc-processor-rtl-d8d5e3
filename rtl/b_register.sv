// b_register: second ALU operand.
//
// Loads the W bus on a clock edge when lb is high; feeds the add/subtract
// unit only. clr clears it asynchronously, active high.
//
// The block and its 8-bit width follow the source design; the reset is
// this design's choice.
module b_register #(
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              clr,
  input  logic              lb,
  input  logic [DATA_W-1:0] d,
  output logic [DATA_W-1:0] q
);
  always_ff @(posedge clk or posedge clr)
    if (clr)     q <= '0;
    else if (lb) q <= d;
endmodule
