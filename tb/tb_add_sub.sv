// tb_add_sub: self-checking testbench for add_sub.
//
// Exhaustive over both 8-bit operands and both operations: the result must be
// (a + b) mod 256 or (a - b) mod 256, computed here with integer arithmetic.
module tb_add_sub;
  logic [7:0] a, b, s;
  logic su;
  int checks = 0, failures = 0;

  add_sub #(.DATA_W(8)) dut (.a, .b, .su, .s);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int op = 0; op < 2; op++)
      for (int i = 0; i < 256; i++)
        for (int j = 0; j < 256; j++) begin
          int expct;
          a = 8'(i); b = 8'(j); su = 1'(op);
          #1;
          expct = op ? (i - j + 256) % 256 : (i + j) % 256;
          checks++;
          if (int'(s) != expct) begin
            failures++;
            if (failures < 10) $display("a=%0d b=%0d su=%0d s=%0d expected %0d", i, j, op, s, expct);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
