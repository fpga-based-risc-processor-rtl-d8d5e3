// memory_address_reg: holds the ROM address.
//
// Loads the low AW bits of the W bus on a clock edge when lm is high and holds
// them otherwise; its output addresses the ROM directly. clr clears it
// asynchronously (active high, this design's choice).
//
// The block and its 4-bit width follow the source design; the active-high
// load and the reset are this design's choices.
module memory_address_reg #(
  parameter int unsigned AW = 4
) (
  input  logic          clk,
  input  logic          clr,
  input  logic          lm,
  input  logic [AW-1:0] d,
  output logic [AW-1:0] q
);
  always_ff @(posedge clk or posedge clr)
    if (clr)     q <= '0;
    else if (lm) q <= d;
endmodule
