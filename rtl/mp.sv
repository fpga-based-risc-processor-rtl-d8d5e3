// mp: 8-bit accumulator processor with a built-in PID level controller.
//
// The processor part is a six-T-state accumulator machine: program counter,
// memory address register, 16 x 8 ROM, instruction register and decoder,
// control unit, accumulator, B register, adder/subtractor and three output
// registers O, O1, O2, all joined by an 8-bit W bus. The program runs once
// after clr: it writes the proportional, integral and derivative gains into
// O, O1 and O2 and halts (hlt goes high). The three registers feed the pid
// block, which is clocked by pidclk, the system clock divided by DIV. pid
// compares the set point q4 with the measured level q5 and its 8-bit output
// (q3) sets the duty of the PWM that drives the pump motor through an
// opto-isolator and motor driver outside the chip. A serial link (txd)
// reports the set point and the PID output to a monitoring PC in tagged
// frames: 65, set point, 66, PID output.
//
// Ports and instance names follow the processor's published schematic. Which
// input is the set point, the bus as a multiplexer rather than tri-state
// drivers, the gain-to-register mapping (O = Kp, O1 = Ki, O2 = Kd), the copy
// of q4 on ADC_out, the baud rate and the divider ratio are this design's choices.
//
// Timing: every instruction takes 6 clocks; the default program halts after
// 9 instructions (54 clocks plus one to reach the halt state). The PID
// samples once per DIV clocks; the PWM period is 256 clocks; a serial frame
// takes 40 * CLKS_PER_BIT clocks.
module mp
  import mp_pkg::*;
#(
  parameter int unsigned DIV          = 1024,
  parameter int unsigned CLKS_PER_BIT = 10417
) (
  input  logic       clk,
  input  logic       clr,
  input  logic       ena,
  input  logic [7:0] q4,         // set point from the external ADC
  input  logic [7:0] q5,         // actual level from the external ADC
  output logic [7:0] ADC_out,    // copy of the set point for the display
  output logic [0:0] pwm_n_out,
  output logic [0:0] pwm_out,
  output logic [7:0] q3,         // PID output
  output logic       hlt,
  output logic       pidclk,
  output logic       txd         // serial report to the monitoring PC
);
  logic [DATA_W-1:0] w_bus;
  logic [ADDR_W-1:0] pc, mar;
  logic [DATA_W-1:0] rom_q, a_q, b_q, alu_s;
  logic [3:0]        opcode, operand;
  logic [DATA_W-1:0] kp, ki, kd;
  logic [T_STATES-1:0] tstate;
  dec_t dec;
  con_t con;

  program_counter    #(.AW(ADDR_W))     PC     (.clk, .clr, .cp(con.cp), .pc);
  memory_address_reg #(.AW(ADDR_W))     MAR    (.clk, .clr, .lm(con.lm), .d(w_bus[ADDR_W-1:0]), .q(mar));
  rom_16_8                              ROM_16_8 (.address(mar), .data_out(rom_q));
  instruction_register #(.DATA_W(DATA_W)) IR   (.clk, .clr, .li(con.li), .d(w_bus), .opcode, .operand);
  ir_decoder                            IRDec  (.opcode, .dec);
  control_unit                          CU     (.clk, .clr, .dec, .con, .tstate);
  accumulator        #(.DATA_W(DATA_W)) AC     (.clk, .clr, .la(con.la), .d(w_bus), .q(a_q));
  b_register         #(.DATA_W(DATA_W)) B_Reg  (.clk, .clr, .lb(con.lb), .d(w_bus), .q(b_q));
  add_sub            #(.DATA_W(DATA_W)) ALU    (.a(a_q), .b(b_q), .su(con.su), .s(alu_s));
  output_register    #(.DATA_W(DATA_W)) O      (.clk, .clr, .lo(con.lo),  .d(w_bus), .q(kp));
  output_register    #(.DATA_W(DATA_W)) O1     (.clk, .clr, .lo(con.lo1), .d(w_bus), .q(ki));
  output_register    #(.DATA_W(DATA_W)) O2     (.clk, .clr, .lo(con.lo2), .d(w_bus), .q(kd));

  // W bus: exactly one source is enabled in any T-state that drives it.
  always_comb begin
    w_bus = '0;
    case (1'b1)
      con.ep: w_bus = DATA_W'(pc);
      con.ce: w_bus = rom_q;
      con.ei: w_bus = DATA_W'(operand);
      con.ea: w_bus = a_q;
      con.eu: w_bus = alu_s;
      default: ;
    endcase
  end

  a_one_driver: assert property (@(posedge clk) disable iff (clr)
    $onehot0({con.ep, con.ce, con.ei, con.ea, con.eu}));

  assign hlt = dec.hlt;

  freq_divider #(.DIV(DIV)) FRE_DIV (.clk, .clr, .clk_out(pidclk));

  pid #(.DATA_W(DATA_W)) pid1 (
    .clk(pidclk), .clr, .setpoint(q4), .actual(q5), .kp, .ki, .kd, .u(q3)
  );

  pwm #(.DATA_W(DATA_W)) pwm1 (
    .clk, .clr, .ena, .duty(q3), .pwm_out(pwm_out[0]), .pwm_n_out(pwm_n_out[0])
  );

  uart_link #(.CLKS_PER_BIT(CLKS_PER_BIT)) uart1 (
    .clk, .clr, .setpoint(q4), .value(q3), .tx(txd)
  );

  assign ADC_out = q4;
endmodule
