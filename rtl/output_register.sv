// output_register: one of the three output registers O, O1 and O2.
//
// Loads the W bus on a clock edge when lo is high and holds it. In the
// processor the three instances hold the proportional, integral and
// derivative gains that the program writes once after reset; they feed the
// PID block continuously. clr clears it asynchronously, active high.
//
// The source draws three identical registers (OReg, OReg1, OReg2); here one
// module serves all three.
module output_register #(
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              clr,
  input  logic              lo,
  input  logic [DATA_W-1:0] d,
  output logic [DATA_W-1:0] q
);
  always_ff @(posedge clk or posedge clr)
    if (clr)     q <= '0;
    else if (lo) q <= d;
endmodule
