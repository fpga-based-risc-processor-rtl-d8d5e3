// tb_rom_16_8: self-checking testbench for rom_16_8.
//
// Loads a test pattern (word i = 8'h5A ^ (i * 37)) through the PROGRAM
// parameter and reads every address; then checks the default program word by
// word against its listing (LDA 9, OUT, LDA A, OUT1, LDA B, ADD C, SUB D,
// OUT2, HLT, data 30 02 0C 08 04).
module tb_rom_16_8;
  function automatic logic [127:0] pattern();
    logic [127:0] p;
    for (int i = 0; i < 16; i++) p[i*8 +: 8] = 8'h5A ^ 8'(i * 37);
    return p;
  endfunction

  localparam logic [127:0] PAT = pattern();
  localparam logic [7:0] DEF [16] = '{8'h09, 8'hE0, 8'h0A, 8'hD0, 8'h0B, 8'h1C, 8'h2D, 8'hC0,
                                      8'hF0, 8'h30, 8'h02, 8'h0C, 8'h08, 8'h04, 8'h00, 8'h00};
  logic [3:0] address;
  logic [7:0] q_pat, q_def;
  int checks = 0, failures = 0;

  rom_16_8 #(.PROGRAM(PAT)) dut_pat (.address, .data_out(q_pat));
  rom_16_8                  dut_def (.address, .data_out(q_def));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      address = 4'(i);
      #1;
      checks += 2;
      if (q_pat !== (8'h5A ^ 8'(i * 37))) begin failures++; $display("pattern word %0d = %h", i, q_pat); end
      if (q_def !== DEF[i]) begin failures++; $display("program word %0d = %h expected %h", i, q_def, DEF[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
