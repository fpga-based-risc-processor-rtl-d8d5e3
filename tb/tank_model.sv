// tank_model: behavioural model of the pump, tank and level sensor (testbench
// only, not synthesizable).
//
// Each 256-clock PWM period it counts the clocks the pump drive was high
// (duty, 0..256) and updates the level, in sensor counts 0..255:
//   level += K_IN * duty - K_OUT * level - load
// clamped to 0..255. K_OUT * level models gravity outflow and 'load' the
// extra draw of the hot-water spray. The sensor reading is the level rounded
// to an 8-bit count. init_level and the load are set by the testbench; a
// rising edge of 'preset' loads init_level.
module tank_model #(
  parameter real K_IN  = 0.004,
  parameter real K_OUT = 0.002
) (
  input  logic       clk,
  input  logic       pump,
  input  logic       preset,
  input  real        init_level,
  input  real        load,
  output logic [7:0] sensor
);
  real level = 0.0;
  int  cnt = 0, high = 0;

  always @(posedge clk or posedge preset) begin
    if (preset) begin
      level = init_level;
      cnt   = 0;
      high  = 0;
    end else begin
      if (pump) high++;
      cnt++;
      if (cnt == 256) begin
        level = level + K_IN * high - K_OUT * level - load;
        if (level < 0.0)   level = 0.0;
        if (level > 255.0) level = 255.0;
        cnt  = 0;
        high = 0;
      end
    end
  end

  always_comb sensor = 8'(int'(level));   // int'() rounds to nearest
endmodule
