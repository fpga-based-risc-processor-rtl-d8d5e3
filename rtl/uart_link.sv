// uart_link: serial link that reports the loop's values to a monitoring PC.
//
// Sends, back to back and for as long as the design runs, four-byte frames
//   65 ('A'), set point, 66 ('B'), value
// through uart_tx (8N1, CLKS_PER_BIT clocks per bit). The PC side splits the
// stream by looking for the tag bytes 65 and 66 and taking the byte that
// follows each. Both values are captured together when the first tag byte
// of a frame is accepted, so the two values of a frame belong to the same
// instant. The tag values follow the monitoring model the link was made for.
// The baud rate is this design's choice: 10417 clocks per bit is 9600 baud
// from a 100 MHz clock. One frame takes 40 bit times.
module uart_link #(
  parameter int unsigned CLKS_PER_BIT = 10417
) (
  input  logic       clk,
  input  logic       clr,
  input  logic [7:0] setpoint,
  input  logic [7:0] value,
  output logic       tx
);
  localparam logic [7:0] TAG_SP  = 8'd65;
  localparam logic [7:0] TAG_VAL = 8'd66;

  typedef enum logic [1:0] {S_TAG_SP, S_SP, S_TAG_VAL, S_VAL} slot_e;

  slot_e      slot;
  logic [7:0] sp_q, val_q, byte_d;
  logic       busy, start;

  assign start = !busy;

  always_comb
    case (slot)
      S_TAG_SP:  byte_d = TAG_SP;
      S_SP:      byte_d = sp_q;
      S_TAG_VAL: byte_d = TAG_VAL;
      default:   byte_d = val_q;
    endcase

  always_ff @(posedge clk or posedge clr)
    if (clr) begin
      slot  <= S_TAG_SP;
      sp_q  <= '0;
      val_q <= '0;
    end else if (start) begin
      if (slot == S_TAG_SP) begin
        sp_q  <= setpoint;
        val_q <= value;
      end
      slot <= slot_e'(slot + 2'd1);
    end

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .clr, .start, .data(byte_d), .tx, .busy
  );
endmodule
