// tb_control_unit: self-checking testbench for control_unit.
//
// Runs each instruction through its six T-states and compares the control
// word in every state with a table of expected words written out here. Checks
// that the ring counter returns to T1 after exactly six clocks, that HLT
// freezes it in T4 and that clr brings it back to T1.
module tb_control_unit;
  import mp_pkg::*;
  logic clk = 1'b0, clr = 1'b1;
  dec_t dec;
  con_t con;
  logic [5:0] tstate;
  int checks = 0, failures = 0;

  control_unit dut (.clk, .clr, .dec, .con, .tstate);

  always #5 clk = ~clk;

  // Expected word as a 14-bit vector {cp ep lm ce li ei la ea su eu lb lo lo1 lo2}.
  function automatic logic [13:0] expected(string ins, int t);
    case (t)
      1: return 14'b01100000000000;              // Ep Lm
      2: return 14'b10000000000000;              // Cp
      3: return 14'b00011000000000;              // CE Li
      default: ;
    endcase
    case (ins)
      "LDA": case (t) 4: return 14'b00100100000000; 5: return 14'b00010010000000; default: return '0; endcase
      "ADD": case (t) 4: return 14'b00100100000000; 5: return 14'b00010000001000; 6: return 14'b00000010010000; default: return '0; endcase
      "SUB": case (t) 4: return 14'b00100100000000; 5: return 14'b00010000101000; 6: return 14'b00000010110000; default: return '0; endcase
      "OUT": return (t == 4) ? 14'b00000001000100 : '0;
      "OUT1": return (t == 4) ? 14'b00000001000010 : '0;
      "OUT2": return (t == 4) ? 14'b00000001000001 : '0;
      default: return '0;
    endcase
  endfunction

  function automatic dec_t lines(string ins);
    dec_t d = '0;
    case (ins)
      "LDA": d.lda = 1'b1;  "ADD": d.add = 1'b1;  "SUB": d.sub = 1'b1;
      "OUT": d.output0 = 1'b1; "OUT1": d.output1 = 1'b1; "OUT2": d.output2 = 1'b1;
      "HLT": d.hlt = 1'b1;
      default: ;
    endcase
    return d;
  endfunction

  task automatic run(string ins);
    dec = lines(ins);
    for (int t = 1; t <= 6; t++) begin
      #1;
      checks++;
      if (tstate !== 6'(1 << (t - 1))) begin failures++; $display("%s: tstate %b at T%0d", ins, tstate, t); end
      checks++;
      if (con !== expected(ins, t)) begin
        failures++;
        $display("%s T%0d: con %b expected %b", ins, t, con, expected(ins, t));
      end
      @(posedge clk);
    end
    #1;
    checks++;
    if (tstate !== 6'b000001) begin failures++; $display("%s did not end after 6 clocks", ins); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string prog [7] = '{"LDA", "ADD", "SUB", "OUT", "OUT1", "OUT2", "NOP"};
    dec = '0;
    @(negedge clk) clr = 1'b0;
    for (int k = 0; k < 3; k++)
      foreach (prog[i]) run(prog[i]);
    // HLT: stops in T4 with an idle control word.
    dec = lines("HLT");
    repeat (20) @(posedge clk);
    #1;
    checks++;
    if (tstate !== 6'b001000) begin failures++; $display("HLT: tstate %b", tstate); end
    checks++;
    if (con !== '0) begin failures++; $display("HLT: con %b", con); end
    clr = 1'b1; #1;
    checks++;
    if (tstate !== 6'b000001) begin failures++; $display("clr: tstate %b", tstate); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
