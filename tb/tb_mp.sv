// tb_mp: end-to-end testbench for the processor with its PID level loop, at
// the default parameters (PID sampled every 1024 clocks).
//
// For each of four set-point / starting-level cases (33/15, 45/0, 50/0,
// 170/84) it clears the design, lets the processor run its program and checks
// that:
//   - it halts on the 51st clock edge (8 instructions of 6 clocks, then the
//     fetch of HLT), having executed LDA, ADD, SUB, OUT, OUT1, OUT2 and HLT;
//   - the gains in O, O1, O2 are 0x30, 0x02, 0x10 as the program computes;
//   - the PID output q3 matches an integer model of the controller at every
//     sample, computed here from the same sensor value;
//   - pwm_out is high for q3 of every 256 clocks (checked once per period);
//   - the serial link sends frames 65, set point, 66, PID output;
//   - the closed loop around a tank model brings the level within 2 counts
//     of the set point and holds it there.
// It counts how often each mechanism happened (each instruction, halt, PID
// output at 255 and at 0, PWM periods, serial frames) and
// fails on one that never did. ADC_out must copy q4.
module tb_mp;
  logic clk = 1'b0, clr = 1'b0, ena = 1'b1;
  logic [7:0] q4 = '0, q5;
  logic [7:0] ADC_out, q3;
  logic [0:0] pwm_out, pwm_n_out;
  logic hlt, pidclk, txd;
  real init_level = 0.0, load = 0.0;
  logic preset = 1'b0;
  int checks = 0, failures = 0;
  int n_lda = 0, n_add = 0, n_sub = 0, n_out = 0, n_out1 = 0, n_out2 = 0, n_hlt = 0;
  int n_u255 = 0, n_u0 = 0, n_pwm = 0, n_samples = 0;

  mp dut (.clk, .clr, .ena, .q4, .q5, .ADC_out, .pwm_n_out, .pwm_out, .q3, .hlt, .pidclk, .txd);
  tank_model plant (.clk, .pump(pwm_out[0]), .preset, .init_level, .load, .sensor(q5));

  always #5 clk = ~clk;

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Count executed instructions at T4, where the opcode is decoded.
  always @(posedge clk) if (!clr && dut.tstate[3]) begin
    if (dut.dec.lda) n_lda++;
    if (dut.dec.add) n_add++;
    if (dut.dec.sub) n_sub++;
    if (dut.dec.output0) n_out++;
    if (dut.dec.output1) n_out1++;
    if (dut.dec.output2) n_out2++;
  end

  // PID reference model, stepped on each pidclk edge.
  int m_sum = 0, m_eprev = 0, m_u = 0;
  always @(posedge pidclk or posedge clr) begin
    if (clr) begin
      m_sum = 0; m_eprev = 0; m_u = 0;
    end else begin
      int e, acc, q;
      e = int'(q4) - int'(q5);
      m_sum += e;
      if (m_sum > 8191) m_sum = 8191;
      if (m_sum < -8192) m_sum = -8192;
      acc = 48 * e + 2 * m_sum + 16 * (e - m_eprev);
      m_eprev = e;
      q = (acc >= 0) ? acc / 16 : -((-acc + 15) / 16);
      m_u = q > 255 ? 255 : (q < 0 ? 0 : q);
      #1;
      checks++;
      n_samples++;
      if (int'(q3) != m_u) begin
        failures++;
        if (failures < 10) $display("PID: q3=%0d expected %0d (sp %0d pv %0d)", q3, m_u, q4, q5);
      end
      if (m_u == 255) n_u255++;
      if (m_u == 0) n_u0++;
    end
  end

  // PWM: count high clocks over each period of the free-running counter.
  int hi_cnt = 0;
  logic [7:0] duty_seen = '0;
  always @(posedge clk) if (!clr && ena) begin
    if (dut.pwm1.cnt == 8'hFF) begin
      if (pwm_out[0]) hi_cnt++;
      checks++;
      n_pwm++;
      if (hi_cnt != int'(dut.pwm1.duty_q)) begin
        failures++;
        if (failures < 10) $display("PWM: high %0d clocks, duty %0d", hi_cnt, dut.pwm1.duty_q);
      end
      hi_cnt = 0;
    end else if (pwm_out[0]) hi_cnt++;
    if (pwm_n_out[0] !== ~pwm_out[0]) begin failures++; checks++; end
  end

  // Serial monitor: 8N1 receiver at the default 10417 clocks per bit. A frame
  // is 65, set point, 66, PID output; the values must be those present when
  // the frame's first start bit appeared (the PID output may also be the one
  // of the sample before, if a sample edge fell on that very clock). Bytes
  // cut by a clear are dropped: the receiver restarts after every clear.
  localparam int CPB = 10417;
  int n_frames = 0, rx_pos = 0;
  logic [7:0] q3_prev = '0, f_sp, f_u, f_uprev;
  always @(posedge pidclk) q3_prev <= q3;

  task automatic rx_frames();
    forever begin
      logic [7:0] b, sp_at, u_at, uprev_at;
      logic ok;
      @(negedge txd);
      sp_at = q4; u_at = q3; uprev_at = q3_prev;
      repeat (CPB / 2) @(posedge clk);
      ok = (txd == 1'b0);
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = txd;
      end
      repeat (CPB) @(posedge clk);
      ok = ok && txd;
      checks++;
      if (!ok) begin failures++; $display("UART: bad start or stop bit"); end
      case (rx_pos)
        0: begin
          checks++;
          if (b != 8'd65) begin failures++; $display("UART: tag %0d, expected 65", b); end
          f_sp = sp_at; f_u = u_at; f_uprev = uprev_at;
        end
        1: begin
          checks++;
          if (b != f_sp) begin failures++; $display("UART: set point %0d, expected %0d", b, f_sp); end
        end
        2: begin
          checks++;
          if (b != 8'd66) begin failures++; $display("UART: tag %0d, expected 66", b); end
        end
        default: begin
          checks++;
          if (b != f_u && b != f_uprev) begin failures++; $display("UART: value %0d, expected %0d", b, f_u); end
          else n_frames++;
        end
      endcase
      rx_pos = (rx_pos + 1) % 4;
    end
  endtask

  // Restart the receiver at every clear.
  initial forever begin
    wait (clr);
    wait (!clr);
    rx_pos = 0;
    fork
      rx_frames();
      @(posedge clr);
    join_any
    disable fork;
  end

  task automatic run_case(input int sp, input int start, input real ld);
    int edges, max_lvl, settle, in_band;
    @(negedge clk) clr = 1'b1;
    q4 = 8'(sp); init_level = real'(start); load = ld;
    preset = 1'b1; #1 preset = 1'b0;
    @(negedge clk) clr = 1'b0;
    // Program: halt after 51 edges.
    edges = 0;
    while (!hlt && edges < 200) begin @(posedge clk); edges++; #1; end
    n_hlt++;
    checks++;
    if (edges != 51) begin failures++; $display("halt after %0d clocks, expected 51", edges); end
    checks++;
    if (dut.kp !== 8'h30 || dut.ki !== 8'h02 || dut.kd !== 8'h10) begin
      failures++; $display("gains %h %h %h", dut.kp, dut.ki, dut.kd);
    end
    checks++;
    if (ADC_out !== q4) begin failures++; $display("ADC_out %0d", ADC_out); end
    // Closed loop for 600 PID samples; record overshoot and settling sample.
    max_lvl = int'(q5); settle = -1; in_band = 0;
    for (int s = 0; s < 600; s++) begin
      @(posedge pidclk);
      if (int'(q5) > max_lvl) max_lvl = int'(q5);
      if (q5 >= 8'(sp - 2) && q5 <= 8'(sp + 2)) begin
        in_band++;
        if (settle < 0) settle = s;
      end else begin
        in_band = 0; settle = -1;
      end
      checks++;
      if (!hlt || dut.kp !== 8'h30) begin failures++; $display("processor left halt"); end
    end
    checks++;
    if (in_band < 100) begin
      failures++;
      $display("sp %0d: level %0d not settled", sp, q5);
    end
    if (start < sp)
      $display("case sp=%0d start=%0d: final level %0d, peak %0d (overshoot %0d%%), settled from sample %0d, u=%0d",
               sp, start, q5, max_lvl, (max_lvl - sp) * 100 / sp, settle, q3);
    else
      $display("case sp=%0d start=%0d: final level %0d, settled from sample %0d, u=%0d",
               sp, start, q5, settle, q3);
  endtask

  initial begin
    #1 clr = 1'b1;
    run_case(33, 15, 0.02);
    run_case(45, 0, 0.02);
    run_case(50, 0, 0.05);
    run_case(170, 84, 0.05);
    // Level above the set point: the controller must shut the pump off.
    run_case(100, 170, 0.05);
    // Mechanism coverage.
    checks++; if (n_lda == 0)  begin failures++; $display("LDA never ran");  end
    checks++; if (n_add == 0)  begin failures++; $display("ADD never ran");  end
    checks++; if (n_sub == 0)  begin failures++; $display("SUB never ran");  end
    checks++; if (n_out == 0)  begin failures++; $display("OUT never ran");  end
    checks++; if (n_out1 == 0) begin failures++; $display("OUT1 never ran"); end
    checks++; if (n_out2 == 0) begin failures++; $display("OUT2 never ran"); end
    checks++; if (n_hlt == 0)  begin failures++; $display("never halted");   end
    checks++; if (n_u255 == 0) begin failures++; $display("PID output never at 255"); end
    checks++; if (n_u0 == 0)   begin failures++; $display("PID output never at 0"); end
    checks++; if (n_pwm == 0)  begin failures++; $display("no PWM period"); end
    checks++; if (n_frames == 0) begin failures++; $display("no serial frame received"); end
    $display("instructions: LDA %0d ADD %0d SUB %0d OUT %0d OUT1 %0d OUT2 %0d HLT %0d",
             n_lda, n_add, n_sub, n_out, n_out1, n_out2, n_hlt);
    $display("PID samples %0d, output at 255: %0d, at 0: %0d; PWM periods %0d; serial frames %0d",
             n_samples, n_u255, n_u0, n_pwm, n_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
