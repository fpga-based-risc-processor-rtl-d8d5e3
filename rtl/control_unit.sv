// control_unit: the sequencer that drives every register and the bus.
//
// A six-state ring counter T1..T6 (tstate, one-hot, T1 = bit 0) advances on
// every clock. The control word con is combinational in the T-state and the
// decoded instruction:
//   T1  Ep Lm        bus = PC, MAR <= PC
//   T2  Cp           PC <= PC + 1
//   T3  CE Li        IR <= ROM[MAR]
//   LDA  T4 Ei Lm    T5 CE La                   T6 -
//   ADD  T4 Ei Lm    T5 CE Lb                   T6 Eu La
//   SUB  T4 Ei Lm    T5 CE Lb Su                T6 Eu La Su
//   OUT  T4 Ea Lo  (OUT1: Lo1, OUT2: Lo2)      T5, T6 -
//   HLT  the ring counter stops in T4 and stays there until clr.
// Every instruction therefore takes six clocks. This is the classic
// accumulator-machine microcode; the two extra output loads are this design's
// addition for the second and third output registers. clr (asynchronous,
// active high) returns the counter to T1.
module control_unit
  import mp_pkg::*;
(
  input  logic                clk,
  input  logic                clr,
  input  dec_t                dec,
  output con_t                con,
  output logic [T_STATES-1:0] tstate
);
  always_ff @(posedge clk or posedge clr)
    if (clr)                        tstate <= T_STATES'(1);
    else if (!(dec.hlt && tstate[3])) tstate <= {tstate[T_STATES-2:0], tstate[T_STATES-1]};

  always_comb begin
    con = '0;
    case (1'b1)
      tstate[0]: begin con.ep = 1'b1; con.lm = 1'b1; end
      tstate[1]: con.cp = 1'b1;
      tstate[2]: begin con.ce = 1'b1; con.li = 1'b1; end
      tstate[3]: begin
        if (dec.lda || dec.add || dec.sub) begin con.ei = 1'b1; con.lm = 1'b1; end
        if (dec.output0) begin con.ea = 1'b1; con.lo  = 1'b1; end
        if (dec.output1) begin con.ea = 1'b1; con.lo1 = 1'b1; end
        if (dec.output2) begin con.ea = 1'b1; con.lo2 = 1'b1; end
      end
      tstate[4]: begin
        if (dec.lda) begin con.ce = 1'b1; con.la = 1'b1; end
        if (dec.add || dec.sub) begin con.ce = 1'b1; con.lb = 1'b1; con.su = dec.sub; end
      end
      tstate[5]: begin
        if (dec.add || dec.sub) begin con.eu = 1'b1; con.la = 1'b1; con.su = dec.sub; end
      end
      default: ;
    endcase
  end

  // The ring counter is one-hot at all times.
  a_onehot: assert property (@(posedge clk) disable iff (clr) $onehot(tstate));
endmodule
