// pid: discrete PID controller for the tank level.
//
// On every rising edge of clk (the divided sample clock) it takes the error
// e = setpoint - actual (9-bit signed) and updates
//   integ  <= sat(integ + e)                 INT_W-bit signed, saturating
//   e_prev <= e
//   u      <= clamp((kp*e + ki*integ' + kd*(e - e_prev)) >>> FRAC, 0, 255)
// where integ' is the updated sum. The gains are unsigned with FRAC fractional
// bits (0x10 = 1.0 for FRAC = 4). u is a registered 8-bit output that holds
// between samples. The three terms and their meaning (proportional to the
// error, to its rate of change, and to its running sum) follow the source
// description; the number format, the saturation of the sum and of the output
// are this design's choices. The gains are not adapted here: they come from
// the processor's output registers. clr (asynchronous, active high) clears
// the state and the output.
module pid #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned FRAC   = 4,
  parameter int unsigned INT_W  = 14
) (
  input  logic              clk,
  input  logic              clr,
  input  logic [DATA_W-1:0] setpoint,
  input  logic [DATA_W-1:0] actual,
  input  logic [DATA_W-1:0] kp,
  input  logic [DATA_W-1:0] ki,
  input  logic [DATA_W-1:0] kd,
  output logic [DATA_W-1:0] u
);
  localparam int unsigned SW = 40;  // wide enough for every product and sum
  localparam logic signed [SW-1:0] INT_MAX = SW'((64'sd1 <<< (INT_W - 1)) - 1);
  localparam logic signed [SW-1:0] INT_MIN = -INT_MAX - 1;
  localparam logic signed [SW-1:0] U_MAX   = SW'((64'sd1 <<< DATA_W) - 1);

  logic signed [INT_W-1:0] integ;
  logic signed [DATA_W:0]  e_prev;

  logic signed [DATA_W:0]  e;
  logic signed [SW-1:0]    integ_sum, integ_n, deriv, acc, scaled;
  logic [DATA_W-1:0]       u_n;

  always_comb begin
    e         = $signed({1'b0, setpoint}) - $signed({1'b0, actual});
    integ_sum = SW'(integ) + SW'(e);
    if (integ_sum > INT_MAX)      integ_n = INT_MAX;
    else if (integ_sum < INT_MIN) integ_n = INT_MIN;
    else                          integ_n = integ_sum;
    deriv  = SW'(e) - SW'(e_prev);
    acc    = $signed({{(SW-DATA_W){1'b0}}, kp}) * SW'(e)
           + $signed({{(SW-DATA_W){1'b0}}, ki}) * integ_n
           + $signed({{(SW-DATA_W){1'b0}}, kd}) * deriv;
    scaled = acc >>> FRAC;
    if (scaled > U_MAX)      u_n = '1;
    else if (scaled < 0)     u_n = '0;
    else                     u_n = scaled[DATA_W-1:0];
  end

  always_ff @(posedge clk or posedge clr)
    if (clr) begin
      integ  <= '0;
      e_prev <= '0;
      u      <= '0;
    end else begin
      integ  <= integ_n[INT_W-1:0];
      e_prev <= e;
      u      <= u_n;
    end
endmodule
