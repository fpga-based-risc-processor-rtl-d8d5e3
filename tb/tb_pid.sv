// tb_pid: self-checking testbench for pid.
//
// Applies random set points, actual values and gains, one per sample clock,
// for 3000 samples, and compares the output with an integer model written
// here: e = sp - pv, sum += e limited to -8192..8191, d = e - e_prev,
// u = floor((kp*e + ki*sum + kd*d) / 16) limited to 0..255. Runs of constant
// error drive the sum into both limits, and the cases where the output
// clamps at 0 and at 255 are counted and must each occur.
module tb_pid;
  logic clk = 1'b0, clr = 1'b1;
  logic [7:0] sp = '0, pv = '0, kp = '0, ki = '0, kd = '0, u;
  int checks = 0, failures = 0;
  int m_sum = 0, m_eprev = 0, m_u = 0;
  int n_hi = 0, n_lo = 0, n_mid = 0, n_sat_pos = 0, n_sat_neg = 0;

  pid #(.DATA_W(8), .FRAC(4), .INT_W(14)) dut (.clk, .clr, .setpoint(sp), .actual(pv), .kp, .ki, .kd, .u);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e, d, acc, q;
    #12 clr = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (n % 300 < 100) begin
        // Long run of a fixed positive or negative error with small gains.
        sp = (n / 300) % 2 ? 8'd10 : 8'd250;
        pv = (n / 300) % 2 ? 8'd240 : 8'd5;
        kp = 8'($urandom_range(0, 8)); ki = 8'($urandom_range(0, 2)); kd = 8'($urandom_range(0, 8));
      end else begin
        sp = 8'($urandom); pv = 8'($urandom);
        kp = 8'($urandom); ki = 8'($urandom_range(0, 15)); kd = 8'($urandom_range(0, 63));
      end
      e = int'(sp) - int'(pv);
      m_sum = m_sum + e;
      if (m_sum > 8191) m_sum = 8191;
      if (m_sum < -8192) m_sum = -8192;
      if (m_sum == 8191) n_sat_pos++;
      if (m_sum == -8192) n_sat_neg++;
      d = e - m_eprev;
      m_eprev = e;
      acc = int'(kp) * e + int'(ki) * m_sum + int'(kd) * d;
      q = (acc >= 0) ? acc / 16 : -((-acc + 15) / 16);
      m_u = q > 255 ? 255 : (q < 0 ? 0 : q);
      if (m_u == 255) n_hi++; else if (m_u == 0) n_lo++; else n_mid++;
      @(posedge clk);
      #1;
      checks++;
      if (int'(u) != m_u) begin
        failures++;
        if (failures < 10) $display("n=%0d sp=%0d pv=%0d kp=%0d ki=%0d kd=%0d: u=%0d expected %0d",
                                    n, sp, pv, kp, ki, kd, u, m_u);
      end
    end
    checks++;
    if (n_hi == 0 || n_lo == 0 || n_mid == 0 || n_sat_pos == 0 || n_sat_neg == 0) begin
      failures++;
      $display("coverage: hi %0d lo %0d mid %0d sum+ %0d sum- %0d", n_hi, n_lo, n_mid, n_sat_pos, n_sat_neg);
    end
    $display("output 255: %0d  output 0: %0d  in range: %0d  sum limits: %0d/%0d",
             n_hi, n_lo, n_mid, n_sat_pos, n_sat_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
