// tb_instruction_register: self-checking testbench for instruction_register.
//
// Loads random instructions under a random load strobe and checks that the
// opcode output is the high nibble and the operand output the low nibble of
// the last word loaded.
module tb_instruction_register;
  logic clk = 1'b0, clr = 1'b1, li = 1'b0;
  logic [7:0] d = '0, ref_ir = '0;
  logic [3:0] opcode, operand;
  int checks = 0, failures = 0;

  instruction_register #(.DATA_W(8)) dut (.clk, .clr, .li, .d, .opcode, .operand);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 clr = 1'b0;
    repeat (300) begin
      @(negedge clk);
      li = 1'($urandom_range(0, 1));
      d  = 8'($urandom);
      @(posedge clk);
      if (li) ref_ir = d;
      #1;
      checks++;
      if (opcode !== ref_ir[7:4] || operand !== ref_ir[3:0]) begin
        failures++;
        $display("mismatch %h%h expected %h", opcode, operand, ref_ir);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
