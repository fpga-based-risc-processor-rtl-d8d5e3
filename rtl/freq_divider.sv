// freq_divider: makes the PID sample clock.
//
// Counts system clocks and toggles clk_out every DIV/2 of them, so clk_out has
// period DIV clocks and 50% duty (DIV must be even and at least 2). clk_out
// clocks the PID block. The ratio 1024 is this design's choice. clr
// (asynchronous, active high) clears counter and output.
module freq_divider #(
  parameter int unsigned DIV = 1024
) (
  input  logic clk,
  input  logic clr,
  output logic clk_out
);
  localparam int unsigned HALF = DIV / 2;
  localparam int unsigned CW   = (HALF > 1) ? $clog2(HALF) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or posedge clr)
    if (clr) begin
      cnt     <= '0;
      clk_out <= 1'b0;
    end else if (cnt == CW'(HALF - 1)) begin
      cnt     <= '0;
      clk_out <= ~clk_out;
    end else begin
      cnt <= cnt + 1'b1;
    end
endmodule
