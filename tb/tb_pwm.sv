// tb_pwm: self-checking testbench for pwm.
//
// For a list of duty values (0, 1, 64, 128, 200, 255 and random ones) it
// counts, over one full 256-clock period, how many clocks pwm_out is high;
// the count must equal the duty. pwm_n_out must always be the complement, and
// with ena low the output must stay low and the counter hold.
module tb_pwm;
  logic clk = 1'b0, clr = 1'b1, ena = 1'b0, pwm_out, pwm_n_out;
  logic [7:0] duty = '0;
  int checks = 0, failures = 0;

  pwm #(.DATA_W(8)) dut (.clk, .clr, .ena, .duty, .pwm_out, .pwm_n_out);

  always #5 clk = ~clk;

  always @(negedge clk) begin
    checks++;
    if (pwm_n_out !== ~pwm_out) begin failures++; $display("pwm_n_out not complement"); end
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic period(input logic [7:0] dv);
    int hi = 0;
    // Present the duty, let the current period finish so it is taken.
    duty = dv;
    while (dut.cnt != 8'hFF) @(negedge clk);
    @(negedge clk);
    for (int c = 0; c < 256; c++) begin
      if (pwm_out) hi++;
      @(negedge clk);
    end
    checks++;
    if (hi != int'(dv)) begin failures++; $display("duty %0d: high for %0d clocks", dv, hi); end
  endtask

  initial begin
    logic [7:0] held;
    #12 clr = 1'b0;
    @(negedge clk) ena = 1'b1;
    period(8'd0); period(8'd1); period(8'd64); period(8'd128); period(8'd200); period(8'd255);
    repeat (6) period(8'($urandom));
    // ena low: output low, counter frozen.
    duty = 8'd255;
    @(negedge clk) ena = 1'b0;
    held = dut.cnt;
    repeat (300) begin
      @(negedge clk);
      checks++;
      if (pwm_out !== 1'b0 || dut.cnt !== held) begin failures++; $display("ena low: output or count moved"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
