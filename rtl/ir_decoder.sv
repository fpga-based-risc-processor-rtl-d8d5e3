// ir_decoder: instruction decoder.
//
// Combinational. Raises exactly one of the lines ADD, HLT, LDA, OUTPUT,
// OUTPUT1, OUTPUT2, SUB for the opcode in the instruction register; an unused
// opcode raises none and executes as a no-operation. Opcode values are set in
// mp_pkg.
//
// The seven line names follow the source design; the opcode values are
// this design's choice.
module ir_decoder
  import mp_pkg::*;
(
  input  logic [3:0] opcode,
  output dec_t       dec
);
  always_comb begin
    dec = '0;
    unique case (opcode)
      OP_LDA:  dec.lda     = 1'b1;
      OP_ADD:  dec.add     = 1'b1;
      OP_SUB:  dec.sub     = 1'b1;
      OP_OUT:  dec.output0 = 1'b1;
      OP_OUT1: dec.output1 = 1'b1;
      OP_OUT2: dec.output2 = 1'b1;
      OP_HLT:  dec.hlt     = 1'b1;
      default: ;
    endcase
  end
endmodule
