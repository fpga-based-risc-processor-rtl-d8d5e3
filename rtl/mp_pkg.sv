// mp_pkg: types and constants shared by the processor blocks.
//
// The processor follows the "simple as possible" accumulator scheme: an 8-bit
// W bus, a 16 x 8 ROM holding program and data, and a control word issued by a
// six-state ring counter. The instruction set is the one whose decoder lines
// the processor's schematic names: LDA, ADD, SUB, OUTPUT, OUTPUT1, OUTPUT2 and
// HLT. The opcode values are this design's choice: the five classic ones keep
// their usual codes, OUT1 and OUT2 take two free codes below OUT.
package mp_pkg;

  localparam int unsigned DATA_W = 8;
  localparam int unsigned ADDR_W = 4;

  typedef enum logic [3:0] {
    OP_LDA  = 4'h0,  // A <= ROM[addr]
    OP_ADD  = 4'h1,  // A <= A + ROM[addr]
    OP_SUB  = 4'h2,  // A <= A - ROM[addr]
    OP_OUT2 = 4'hC,  // O2 <= A   (derivative gain)
    OP_OUT1 = 4'hD,  // O1 <= A   (integral gain)
    OP_OUT  = 4'hE,  // O  <= A   (proportional gain)
    OP_HLT  = 4'hF   // stop
  } opcode_e;

  // One line per instruction, as drawn on the decoder's outputs.
  typedef struct packed {
    logic add;
    logic hlt;
    logic lda;
    logic output0;
    logic output1;
    logic output2;
    logic sub;
  } dec_t;

  // Control word. The first twelve fields are the classic accumulator-machine
  // word; lo1 and lo2 load the two extra output registers. All active high.
  typedef struct packed {
    logic cp;   // increment program counter
    logic ep;   // program counter drives bus
    logic lm;   // load memory address register
    logic ce;   // ROM drives bus
    logic li;   // load instruction register
    logic ei;   // instruction operand drives bus
    logic la;   // load accumulator
    logic ea;   // accumulator drives bus
    logic su;   // ALU subtracts
    logic eu;   // ALU drives bus
    logic lb;   // load B register
    logic lo;   // load output register O
    logic lo1;  // load output register O1
    logic lo2;  // load output register O2
  } con_t;

  localparam int unsigned T_STATES = 6;

endpackage
