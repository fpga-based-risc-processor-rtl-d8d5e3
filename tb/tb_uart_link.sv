// tb_uart_link: self-checking testbench for uart_link (and its uart_tx).
//
// Runs with 16 clocks per bit. A receiver in the testbench finds each start
// edge, samples every bit in its middle, and checks start and stop bits.
// Decoded bytes must form frames 65, set point, 66, value, where the two
// values are the inputs as they were when the frame's first start bit
// appeared; the inputs change randomly every 37 clocks to make sure they are
// captured, not read late. It also checks that frames follow each other with
// no gap: 40 bit times from one frame start to the next.
module tb_uart_link;
  localparam int CPB = 16;
  logic clk = 1'b0, clr = 1'b0, tx;
  logic [7:0] sp = 8'd1, val = 8'd2;
  int checks = 0, failures = 0, frames = 0;

  uart_link #(.CLKS_PER_BIT(CPB)) dut (.clk, .clr, .setpoint(sp), .value(val), .tx);

  always #5 clk = ~clk;

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Stimulus: new random inputs every 37 clocks.
  initial forever begin
    repeat (37) @(posedge clk);
    sp  <= 8'($urandom);
    val <= 8'($urandom);
  end

  task automatic rx_byte(output logic [7:0] b, output logic [7:0] sp_at, output logic [7:0] val_at);
    @(negedge tx);
    sp_at = sp; val_at = val;
    repeat (CPB / 2) @(posedge clk);
    checks++;
    if (tx !== 1'b0) begin failures++; $display("start bit not low"); end
    for (int i = 0; i < 8; i++) begin
      repeat (CPB) @(posedge clk);
      b[i] = tx;
    end
    repeat (CPB) @(posedge clk);
    checks++;
    if (tx !== 1'b1) begin failures++; $display("stop bit not high"); end
  endtask

  initial begin
    logic [7:0] b, s0, v0, s1, v1, fsp, fval;
    time t_prev, t_now;
    #1 clr = 1'b1;
    #20 clr = 1'b0;
    t_prev = 0;
    for (int f = 0; f < 30; f++) begin
      rx_byte(b, fsp, fval);
      t_now = $time;
      checks++;
      if (b !== 8'd65) begin failures++; $display("frame %0d: tag %0d, expected 65", f, b); end
      if (f > 0) begin
        checks++;
        if (t_now - t_prev != 40 * CPB * 10) begin
          failures++; $display("frame period %0t, expected %0d clocks", t_now - t_prev, 40 * CPB);
        end
      end
      t_prev = t_now;
      rx_byte(b, s1, v1);
      checks++;
      if (b !== fsp) begin failures++; $display("frame %0d: set point %0d, expected %0d", f, b, fsp); end
      rx_byte(b, s1, v1);
      checks++;
      if (b !== 8'd66) begin failures++; $display("frame %0d: tag %0d, expected 66", f, b); end
      rx_byte(b, s1, v1);
      checks++;
      if (b !== fval) begin failures++; $display("frame %0d: value %0d, expected %0d", f, b, fval); end
      frames++;
    end
    $display("frames received: %0d", frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
