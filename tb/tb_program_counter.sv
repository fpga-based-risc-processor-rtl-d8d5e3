// tb_program_counter: self-checking testbench for program_counter.
//
// Applies random count strobes for 300 clocks, enough to wrap the 4-bit
// counter many times, and compares with a reference count modulo 16 after
// every edge. Also checks the asynchronous clear.
module tb_program_counter;
  logic clk = 1'b0, clr = 1'b1, cp = 1'b0;
  logic [3:0] pc;
  int ref_pc = 0, checks = 0, failures = 0, wraps = 0;

  program_counter #(.AW(4)) dut (.clk, .clr, .cp, .pc);

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
    checks++;
    if (pc !== 4'd0) failures++;
    repeat (300) begin
      @(negedge clk);
      cp = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (cp) begin
        ref_pc = (ref_pc + 1) % 16;
        if (ref_pc == 0) wraps++;
      end
      #1;
      checks++;
      if (pc !== 4'(ref_pc)) begin
        failures++;
        $display("mismatch pc=%0d expected %0d", pc, ref_pc);
      end
    end
    clr = 1'b1; #1;
    checks++;
    if (pc !== 4'd0) failures++;
    checks++;
    if (wraps == 0) begin failures++; $display("counter never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
