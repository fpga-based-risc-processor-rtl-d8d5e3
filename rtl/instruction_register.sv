// instruction_register: holds the instruction being executed.
//
// Loads the 8-bit W bus on a clock edge when li is high. The high nibble is the
// opcode, read by the instruction decoder; the low nibble is the operand
// address, which the bus multiplexer puts on the bus when the control word
// asks for it (Ei). The 4/4 split is this design's choice. clr clears it
// asynchronously, active high.
//
// The block follows the source design, which draws two outputs on it.
module instruction_register #(
  parameter int unsigned DATA_W = 8
) (
  input  logic                clk,
  input  logic                clr,
  input  logic                li,
  input  logic [DATA_W-1:0]   d,
  output logic [DATA_W/2-1:0] opcode,
  output logic [DATA_W/2-1:0] operand
);
  logic [DATA_W-1:0] ir;

  always_ff @(posedge clk or posedge clr)
    if (clr)     ir <= '0;
    else if (li) ir <= d;

  assign opcode  = ir[DATA_W-1:DATA_W/2];
  assign operand = ir[DATA_W/2-1:0];
endmodule
