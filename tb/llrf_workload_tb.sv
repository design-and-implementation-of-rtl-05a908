// llrf_workload_tb: the operating points of the RFQ and of the mock-up
// cavity tests, run on the top (default parameters) around the behavioural
// cavity.
//  1. Longest RFQ pulse, 2 ms, at the 50 Hz repetition rate: two full 20 ms
//     periods in closed loop. The field must stay within 1 % / 1 deg of the
//     reference from 20 us into the pulse to its end, the pulse counter must
//     reach the full length, and the tuning loop must pull a 10 deg
//     detuning back inside its +-2 deg window during the first pulse.
//  2. Stability margin of the phase shifters: Teta is moved away from its
//     optimum in steps of 10 deg and each setting is run for one 250 us
//     pulse. The range in which the field is still regulated is printed;
//     the optimum and +-10 deg must regulate.
module llrf_workload_tb;
  import llrf_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam int  PERIOD     = 2_080_000;   // 20 ms at 104 MHz (50 Hz)
  localparam int  LONG_PULSE = 208_000;     // 2 ms
  localparam int  SHORT_PULSE = 26_000;     // 250 us

  logic      clk = 0, rst_n = 0, rf_gate = 0;
  llrf_cfg_t cfg;
  adc_iq_t   adc_cav, adc_fwd, adc_prb;
  dac_iq_t   dac_act;
  logic      tuner_in, tuner_out;
  llrf_mon_t mon;

  llrf_top dut (.*);

  real delta0 = 0.0, tune_step = 0.00002, v_i, v_q;
  int  tuner_pos;
  logic signed [13:0] c_i, c_q, f_i, f_q, p_i, p_q;

  cavity_model #(.DELAY(8), .TAU(64.0), .PHI_DEG(40.0)) u_cav (
    .clk, .dac_i(dac_act.i), .dac_q(dac_act.q), .tuner_in, .tuner_out,
    .delta0, .tune_step, .dist_i(0.0), .dist_q(0.0),
    .adc_cav_i(c_i), .adc_cav_q(c_q), .adc_fwd_i(f_i), .adc_fwd_q(f_q),
    .adc_prb_i(p_i), .adc_prb_q(p_q), .v_i, .v_q, .tuner_pos);

  assign adc_cav = '{i: c_i, q: c_q};
  assign adc_fwd = '{i: f_i, q: f_q};
  assign adc_prb = '{i: p_i, q: p_q};

  always #4.808 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [ANG_W-1:0] deg(input real d);
    real t;
    t = d / 360.0;
    t = t - $floor(t);
    return ANG_W'($rtoi($floor(t * 65536.0 + 0.5)) & 16'hFFFF);
  endfunction

  // one pulse of 'width' clocks followed by 'gap' clocks; counts the clocks
  // from 'from' on in which the field is within 1 % / 1 deg of (ei, eq)
  task automatic run_pulse(input int width, input int gap, input int from,
                           input real ei, input real eq, output int good, output int total,
                           output int last_count);
    good = 0; total = 0;
    rf_gate <= 1;
    for (int n = 0; n < width; n++) begin
      @(posedge clk);
      if (n >= from) begin
        real mag, emag, dph;
        mag = $sqrt(v_i * v_i + v_q * v_q);
        emag = $sqrt(ei * ei + eq * eq);
        dph = $atan2(v_q * ei - v_i * eq, v_i * ei + v_q * eq) * 180.0 / PI;
        total++;
        if (mag > 0.99 * emag && mag < 1.01 * emag && dph < 1.0 && dph > -1.0) good++;
      end
    end
    #1 last_count = int'(mon.pulse_count);
    rf_gate <= 0;
    repeat (gap) @(posedge clk);
  endtask

  initial begin
    int g, t, lc;
    real th, ei, eq;
    cfg = '0;
    cfg.kp = 18'sd8192; cfg.ki = 18'sd1500; cfg.teta = deg(-20.0);
    cfg.i_in_ofst = 18'sd37; cfg.q_in_ofst = -18'sd25;
    cfg.i_out_ofst = 18'sd50; cfg.q_out_ofst = -18'sd30;
    cfg.closed_loop = 1; cfg.lpf_en = 1; cfg.tune_en = 1;
    cfg.tune_thresh = 15'd364; cfg.settle_cycles = 20'd5200;
    cfg.iref = 18'sd3000; cfg.qref = 18'sd2000;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    repeat (100) @(posedge clk);

    // 1. 2 ms pulses at 50 Hz
    th = 2.0 * PI * $itor(cfg.teta) / 65536.0;
    ei = 3000.0 * $cos(th) + 2000.0 * $sin(th);
    eq = -3000.0 * $sin(th) + 2000.0 * $cos(th);
    delta0 = $tan(10.0 * PI / 180.0);
    for (int k = 0; k < 2; k++) begin
      real ph;
      run_pulse(LONG_PULSE, PERIOD - LONG_PULSE, 2080, ei, eq, g, t, lc);
      ph = $atan(delta0 - tune_step * tuner_pos) * 180.0 / PI;
      $display("2 ms pulse %0d: field in tolerance %0d of %0d clocks, counter %0d, detuning phase %0.2f deg",
               k, g, t, lc, ph);
      check(g == t && t > 0, "2 ms pulse regulated from 20 us to the end");
      check(lc == LONG_PULSE - 1, "pulse counter covers the 2 ms pulse");
      check(ph < 2.2 && ph > -2.2, "detuning inside the tuning window");
    end

    // 2. phase-shifter margin
    begin
      int lo, hi;
      lo = 0; hi = 0;
      for (int d = -90; d <= 90; d += 10) begin
        bit ok;
        cfg.teta <= deg(-20.0 + d);
        repeat (60) @(posedge clk);
        // the loop holds rot(meas, Teta) = ref
        th = 2.0 * PI * $itor(cfg.teta) / 65536.0;
        ei = 3000.0 * $cos(th) + 2000.0 * $sin(th);
        eq = -3000.0 * $sin(th) + 2000.0 * $cos(th);
        run_pulse(SHORT_PULSE, 2000, SHORT_PULSE - 10000, ei, eq, g, t, lc);
        ok = (g == t);
        $display("Teta offset %0d deg: %s", d, ok ? "regulated" : "not regulated");
        if (ok && d < lo) lo = d;
        if (ok && d > hi) hi = d;
        if (d >= -10 && d <= 10) check(ok, $sformatf("regulated at Teta offset %0d deg", d));
      end
      $display("regulated for Teta offsets from %0d to %0d deg", lo, hi);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
