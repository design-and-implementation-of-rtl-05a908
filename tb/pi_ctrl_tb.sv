// pi_ctrl_tb: PI regulator checks.
//  1. proportional only (Kp = 1.0): u = ref - meas, two clocks later;
//  2. integral only (Ki = 1.0, constant error 10): u ramps by 10 per clock;
//  3. windup: after saturation the output recovers at once (clamp);
//  4. random gains, references, measurements and clears against a cycle
//     model written here with 64-bit integers, including output clipping
//     and integrator clamping (anti-windup), and the sat flag.
module pi_ctrl_tb;
  localparam int DW = 18, GW = 18, KP_FRAC = 12, KI_FRAC = 16;
  localparam longint OMAX = (64'sd1 <<< (DW - 1)) - 1;
  localparam longint OMIN = -(64'sd1 <<< (DW - 1));
  logic clk = 0, rst_n = 0, clr = 0, sat;
  logic signed [DW-1:0] ref_i = '0, meas = '0, u;
  logic signed [GW-1:0] kp = '0, ki = '0;
  int checks = 0, failures = 0;

  pi_ctrl #(.DW(DW), .GW(GW), .KP_FRAC(KP_FRAC), .KI_FRAC(KI_FRAC)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cycle model
  longint m_err = 0, m_acc = 0, m_u = 0;
  bit     m_sat = 0;
  function automatic longint asr(input longint v, input int s);
    return v >>> s;
  endfunction

  task automatic model_step(input longint r, input longint m, input longint p, input longint i, input bit c);
    longint accn, us;
    bit as;
    as = 0;
    accn = m_acc + m_err * i;
    if (accn > (OMAX <<< KI_FRAC)) begin accn = OMAX <<< KI_FRAC; as = 1; end
    if (accn < (OMIN <<< KI_FRAC)) begin accn = OMIN <<< KI_FRAC; as = 1; end
    us = asr(m_err * p, KP_FRAC) + asr(accn, KI_FRAC);
    if (c) begin m_acc = 0; m_u = 0; m_sat = 0; end
    else begin
      m_acc = accn;
      if (us > OMAX) begin m_u = OMAX; m_sat = 1; end
      else if (us < OMIN) begin m_u = OMIN; m_sat = 1; end
      else begin m_u = us; m_sat = as; end
    end
    m_err = r - m;
  endtask

  int nclip = 0, nclr = 0;
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // 1. proportional only
    kp <= 18'sd4096; ki <= '0; clr <= 1;
    @(posedge clk);
    clr <= 0;
    for (int n = 0; n < 50; n++) begin
      int r, m;
      r = int'($urandom_range(0, 20000)) - 10000;
      m = int'($urandom_range(0, 20000)) - 10000;
      ref_i <= DW'(r); meas <= DW'(m);
      @(posedge clk); @(posedge clk); #1;
      check(int'(u) == r - m, $sformatf("P only: u=%0d expected %0d", u, r - m));
    end
    // 2. integral only: slope 10 per clock
    clr <= 1; kp <= '0; ki <= 18'sd65535; ref_i <= 18'sd10; meas <= '0;
    repeat (3) @(posedge clk);
    ki <= 18'sd65536 - 18'sd1;   // just under 1.0 per sample
    clr <= 0;
    repeat (3) @(posedge clk);
    begin
      int u0;
      #1 u0 = int'(u);
      repeat (100) @(posedge clk);
      #1;
      check(int'(u) - u0 >= 998 && int'(u) - u0 <= 1000, $sformatf("I ramp: %0d in 100 clocks", int'(u) - u0));
    end
    // 3. windup: a long, large error drives the integrator to its clamp;
    //    when the error reverses (-1000 per clock at Ki ~ 1.0) the output must
    //    leave the limit at once and fall by about 1000 per clock.
    clr <= 1; kp <= '0; ki <= 18'sd65535; ref_i <= 18'sd100000; meas <= '0;
    repeat (3) @(posedge clk);
    clr <= 0;
    repeat (200) @(posedge clk);
    #1 check(int'(u) == 131071 && sat, $sformatf("windup: output at the limit (%0d)", u));
    ref_i <= -18'sd1000;
    repeat (12) @(posedge clk);
    #1 check(int'(u) < 131071 - 8000 && int'(u) > 131071 - 12000,
             $sformatf("windup: output %0d ten clocks after the error reversed", u));
    // 4. random against the cycle model
    clr <= 1; @(posedge clk); clr <= 0;
    @(posedge clk);
    // resynchronise the model from a cleared state
    clr <= 1; ref_i <= '0; meas <= '0;
    repeat (3) @(posedge clk);
    m_err = 0; m_acc = 0; m_u = 0; m_sat = 0;
    for (int n = 0; n < 20000; n++) begin
      int r, m, p, i;
      bit c;
      r = (n % 2000 < 1000) ? int'($urandom_range(0, 4000)) - 2000 : int'($urandom_range(0, 262143)) - 131072;
      m = int'($urandom_range(0, 4000)) - 2000;
      p = int'($urandom_range(0, 40000)) - 20000;
      i = int'($urandom_range(0, 4000)) - 1000;
      c = ($urandom_range(0, 499) == 0);
      ref_i <= DW'(r); meas <= DW'(m); kp <= GW'(p); ki <= GW'(i); clr <= c;
      @(posedge clk); #1;
      model_step(r, m, p, i, c);
      if (m_sat) nclip++;
      if (c) nclr++;
      check(longint'(u) == m_u && sat == m_sat, $sformatf("model n=%0d u=%0d/%0d sat=%0d/%0d", n, u, m_u, sat, m_sat));
    end
    check(nclip > 0, "clipping never exercised");
    check(nclr > 0, "clear never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
