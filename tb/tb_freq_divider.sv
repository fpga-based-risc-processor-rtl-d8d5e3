// tb_freq_divider: self-checking testbench for freq_divider.
//
// Measures the period and high time of the divided clock, in input clocks,
// for a ratio of 8 and for the default ratio 1024, over several periods.
module tb_freq_divider;
  logic clk = 1'b0, clr = 1'b1;
  logic out8, outd;
  int checks = 0, failures = 0;

  freq_divider #(.DIV(8)) dut8 (.clk, .clr, .clk_out(out8));
  freq_divider            dutd (.clk, .clr, .clk_out(outd));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Count input clocks between output edges.
  task automatic measure(input int div, ref logic o);
    int hi, lo;
    @(posedge o);
    for (int p = 0; p < 4; p++) begin
      hi = 0; lo = 0;
      while (o) begin @(posedge clk); #1; hi++; end
      while (!o) begin @(posedge clk); #1; lo++; end
      checks++;
      if (hi != div / 2 || lo != div / 2) begin
        failures++;
        $display("DIV=%0d: high %0d low %0d clocks", div, hi, lo);
      end
    end
  endtask

  initial begin
    #12 clr = 1'b0;
    checks++;
    if (out8 !== 1'b0 || outd !== 1'b0) failures++;
    fork
      measure(8, out8);
      measure(1024, outd);
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
