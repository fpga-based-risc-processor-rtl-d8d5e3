// tb_memory_address_reg: self-checking testbench for memory_address_reg.
//
// Drives random bus values and a random load strobe for 400 clocks, with an
// asynchronous clear now and then, and compares the register with a
// reference value kept in the testbench after every edge.
module tb_memory_address_reg;
  localparam int W = 4;
  logic clk = 1'b0, clr = 1'b1, ld = 1'b0;
  logic [W-1:0] d = '0, q, ref_q;
  int checks = 0, failures = 0;

  memory_address_reg dut (.clk, .clr, .lm(ld), .d, .q);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_q = '0;
    #12 clr = 1'b0;
    repeat (400) begin
      @(negedge clk);
      ld = 1'($urandom_range(0, 1));
      d  = W'($urandom);
      if ($urandom_range(0, 49) == 0) begin
        clr = 1'b1; #1; ref_q = '0; clr = 1'b0;
        checks++;
        if (q !== '0) begin failures++; $display("clear failed q=%h", q); end
      end
      @(posedge clk);
      if (ld) ref_q = d;
      #1;
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("mismatch t=%0t q=%h expected %h", $time, q, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
