// tb_ir_decoder: self-checking testbench for ir_decoder.
//
// Applies all 16 opcodes and compares the seven decoder lines with a table
// written out here: 0 LDA, 1 ADD, 2 SUB, C OUTPUT2, D OUTPUT1, E OUTPUT,
// F HLT, everything else no line.
module tb_ir_decoder;
  import mp_pkg::*;
  logic [3:0] opcode;
  dec_t dec;
  logic [6:0] expct;   // {add, hlt, lda, output0, output1, output2, sub}
  int checks = 0, failures = 0;

  ir_decoder dut (.opcode, .dec);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      opcode = 4'(i);
      #1;
      case (i)
        0:  expct = 7'b0010000;
        1:  expct = 7'b1000000;
        2:  expct = 7'b0000001;
        12: expct = 7'b0000010;
        13: expct = 7'b0000100;
        14: expct = 7'b0001000;
        15: expct = 7'b0100000;
        default: expct = 7'b0000000;
      endcase
      checks++;
      if (dec !== expct) begin
        failures++;
        $display("opcode %h: lines %b expected %b", i, dec, expct);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
