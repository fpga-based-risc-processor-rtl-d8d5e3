// rom_16_8: program and data memory, 16 words of 8 bits.
//
// Asynchronous read: data_out shows the word at 'address' in the same cycle,
// so the control unit can put it on the bus and load it into a register within
// one T-state. The contents are the PROGRAM parameter, word i in bits
// [i*8 +: 8]. Instruction format: opcode in bits 7:4, operand address in 3:0.
//
// The default program (this design's own; none is given for the processor)
// writes the three PID gains once and stops:
//   0 LDA 9   1 OUT     A = Kp           -> O  (proportional gain)
//   2 LDA A   3 OUT1    A = Ki           -> O1 (integral gain)
//   4 LDA B   5 ADD C   6 SUB D   7 OUT2 A = B + C - D = Kd -> O2
//   8 HLT
// Data: 9: Kp = 0x30 (3.0), A: Ki = 0x02 (0.125), B..D give Kd = 0x10 (1.0);
// gains have four fractional bits.
module rom_16_8 #(
  parameter int unsigned DEPTH  = 16,
  parameter int unsigned DATA_W = 8,
  parameter logic [DEPTH*DATA_W-1:0] PROGRAM = {
    8'h00, 8'h00, 8'h04, 8'h08,   // F E D C
    8'h0C, 8'h02, 8'h30, 8'hF0,   // B A 9 8
    8'hC0, 8'h2D, 8'h1C, 8'h0B,   // 7 6 5 4
    8'hD0, 8'h0A, 8'hE0, 8'h09    // 3 2 1 0
  }
) (
  input  logic [$clog2(DEPTH)-1:0] address,
  output logic [DATA_W-1:0]        data_out
);
  logic [DATA_W-1:0] mem [DEPTH];

  always_comb
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = PROGRAM[i*DATA_W +: DATA_W];

  assign data_out = mem[address];
endmodule
