// pwm: pulse-width modulator for the pump motor driver.
//
// An 8-bit counter runs through 0..255 while ena is high. The duty input is
// taken into a holding register when the counter wraps, so a period is never
// cut short by a change of duty. pwm_out is high while the counter is below
// the held duty: high for 'duty' clocks out of every 256 (0 = always low,
// 255 = high 255 of 256 clocks). pwm_n_out is the complement. The period, the
// once-per-period duty update and forcing the output low while ena is low are
// this design's choices. clr (asynchronous, active high) clears counter and
// held duty, so the first period after clr is low.
module pwm #(
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              clr,
  input  logic              ena,
  input  logic [DATA_W-1:0] duty,
  output logic              pwm_out,
  output logic              pwm_n_out
);
  logic [DATA_W-1:0] cnt;
  logic [DATA_W-1:0] duty_q;

  always_ff @(posedge clk or posedge clr)
    if (clr) begin
      cnt    <= '0;
      duty_q <= '0;
    end else if (ena) begin
      cnt <= cnt + 1'b1;
      if (cnt == '1) duty_q <= duty;
    end

  assign pwm_out   = ena && (cnt < duty_q);
  assign pwm_n_out = ~pwm_out;
endmodule
