// uart_tx: asynchronous serial transmitter, 8 data bits, no parity, 1 stop
// bit, least significant bit first; the line idles high.
//
// A byte is accepted on a clock edge where start is high and busy is low; busy
// rises after that edge and falls in the final clock of the stop bit, so a
// start held high gives back-to-back frames with no idle time between them. Each bit lasts CLKS_PER_BIT clocks.
// Helper of uart_link. clr (asynchronous, active high) returns the line to
// idle.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 10417
) (
  input  logic       clk,
  input  logic       clr,
  input  logic       start,
  input  logic [7:0] data,
  output logic       tx,
  output logic       busy
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic [CW-1:0] tick;     // clocks left in the current bit
  logic [3:0]    nbit;     // bits left in the frame, including this one
  logic [8:0]    shreg;    // {stop, data} still to send after the current bit
  logic          active;   // a frame is on the line
  logic          last;     // final clock of the stop bit

  assign last = active && tick == '0 && nbit == 4'd1;
  assign busy = active && !last;

  always_ff @(posedge clk or posedge clr)
    if (clr) begin
      tx     <= 1'b1;
      active <= 1'b0;
      tick  <= '0;
      nbit  <= '0;
      shreg <= '1;
    end else if (!busy) begin
      if (start) begin
        tx     <= 1'b0;                // start bit
        active <= 1'b1;
        tick   <= CW'(CLKS_PER_BIT - 1);
        nbit   <= 4'd10;
        shreg  <= {1'b1, data};
      end else begin
        tx     <= 1'b1;
        active <= 1'b0;
      end
    end else if (tick != '0) begin
      tick <= tick - 1'b1;
    end else begin
      tx    <= shreg[0];
      shreg <= {1'b1, shreg[8:1]};
      nbit  <= nbit - 1'b1;
      tick  <= CW'(CLKS_PER_BIT - 1);
    end
endmodule
