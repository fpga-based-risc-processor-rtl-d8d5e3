// program_counter: address of the next instruction.
//
// A plain AW-bit up-counter. It advances by one on a clock edge when cp is
// high and wraps from 2**AW-1 to 0. Putting the count on the W bus (the Ep
// signal) is done by the bus multiplexer in the top level, so this block has
// a single output. clr clears it asynchronously (active high); that reset
// style is this design's choice.
//
// The block and its 4-bit width (for the 16-word ROM) follow the source
// design; the separate count strobe and the reset are this design's choices.
module program_counter #(
  parameter int unsigned AW = 4
) (
  input  logic          clk,
  input  logic          clr,
  input  logic          cp,
  output logic [AW-1:0] pc
);
  always_ff @(posedge clk or posedge clr)
    if (clr)     pc <= '0;
    else if (cp) pc <= pc + 1'b1;
endmodule
