// llrf_top_tb: end-to-end test of the LLRF program around a behavioural
// cavity (cavity_model), with every parameter of the top at its default.
// Every RF pulse is 250 us (26,000 clocks at 104 MHz), the shortest pulse of
// the RFQ; the tuning loop may act 50 us into each pulse.
//
// It checks, and counts:
//  - latency: ADC word to DAC word in 10 clocks (model disconnected);
//  - open loop: the DACs carry the feed-forward turned by Teta, less the
//    output offsets, and the cavity fills to that drive;
//  - closed loop, LPF on and LPF bypassed: the cavity field holds the
//    reference (turned back by Teta) within 1 % in amplitude and 1 deg in
//    phase once settled, with the ADC and modulator offsets compensated;
//  - reference phase stepped over 0..360 deg and amplitude from small to
//    large, each regulated;
//  - a feed-forward step in closed loop is removed by the loop; the
//    recovery time is printed and must be under 4 us;
//  - a change of Teta while running (coefficients revalidated);
//  - clipping of the DAC words and the PI output with an unreachable
//    reference;
//  - tuning: a detuned cavity is brought back inside the +-2 deg window by
//    inwards moves, and the other way by outwards moves; no tuner move ever
//    happens outside the pulse or before the field has settled.
module llrf_top_tb;
  import llrf_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam int  PULSE  = 26000;    // 250 us
  localparam int  SETTLE = 5200;     // 50 us
  localparam int  GAP    = 400;

  logic      clk = 0, rst_n = 0, rf_gate = 0;
  llrf_cfg_t cfg;
  adc_iq_t   adc_cav, adc_fwd, adc_prb;
  dac_iq_t   dac_act;
  logic      tuner_in, tuner_out;
  llrf_mon_t mon;

  llrf_top dut (.*);

  // plant
  logic signed [13:0] m_cav_i, m_cav_q, m_fwd_i, m_fwd_q, m_prb_i, m_prb_q;
  real  delta0 = 0.0, tune_step = 0.00002, dist_i = 0.0, dist_q = 0.0;
  real  v_i, v_q;
  int   tuner_pos;
  bit   use_model = 1;
  logic signed [13:0] t_cav_i = '0, t_cav_q = '0;

  cavity_model #(.DELAY(8), .TAU(64.0), .PHI_DEG(40.0)) u_cav (
    .clk, .dac_i(dac_act.i), .dac_q(dac_act.q), .tuner_in, .tuner_out,
    .delta0, .tune_step, .dist_i, .dist_q,
    .adc_cav_i(m_cav_i), .adc_cav_q(m_cav_q), .adc_fwd_i(m_fwd_i), .adc_fwd_q(m_fwd_q),
    .adc_prb_i(m_prb_i), .adc_prb_q(m_prb_q), .v_i, .v_q, .tuner_pos);

  assign adc_cav.i = use_model ? m_cav_i : t_cav_i;
  assign adc_cav.q = use_model ? m_cav_q : t_cav_q;
  assign adc_fwd.i = m_fwd_i;
  assign adc_fwd.q = m_fwd_q;
  assign adc_prb.i = m_prb_i;
  assign adc_prb.q = m_prb_q;

  always #4.808 clk = ~clk;   // 104 MHz

  int checks = 0, failures = 0;
  // mechanism counters
  int n_latency = 0, n_open = 0, n_closed_lpf = 0, n_closed_nolpf = 0, n_phase = 0,
      n_amp = 0, n_ffstep = 0, n_teta = 0, n_dac_sat = 0, n_pi_sat = 0,
      n_tune_in = 0, n_tune_out = 0, n_tune_window = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the tuner may move only during the pulse after settling
  int bad_moves = 0;
  always @(posedge clk) begin
    if (rst_n && (tuner_in || tuner_out) && !(mon.settled || $past(mon.settled))) bad_moves++;
    if (tuner_in)  n_tune_in++;
    if (tuner_out) n_tune_out++;
    if (mon.dac_sat) n_dac_sat++;
    if (mon.pi_sat)  n_pi_sat++;
  end

  // degrees -> 16-bit turn fraction
  function automatic logic [ANG_W-1:0] deg(input real d);
    real t;
    t = d / 360.0;
    t = t - $floor(t);
    return ANG_W'($rtoi($floor(t * 65536.0 + 0.5)) & 16'hFFFF);
  endfunction

  function automatic real teta_rad();
    return 2.0 * PI * $itor(cfg.teta) / 65536.0;
  endfunction

  // Run one pulse; from 'from' clocks into the pulse check that the true
  // cavity field equals the reference turned by -Teta (closed loop) or the
  // expected open-loop field, within 1 % and 1 deg. Returns the number of
  // clocks checked that were in tolerance and the total.
  task automatic pulse(input int from, input bit check_field, input real ei, input real eq,
                       input string name, output int good, output int total);
    good = 0; total = 0;
    rf_gate <= 1;
    for (int n = 0; n < PULSE; n++) begin
      @(posedge clk);
      if (check_field && n >= from) begin
        real ai, aq, mag, emag, dph;
        ai = v_i; aq = v_q;
        mag = $sqrt(ai * ai + aq * aq);
        emag = $sqrt(ei * ei + eq * eq);
        dph = $atan2(aq * ei - ai * eq, ai * ei + aq * eq) * 180.0 / PI;
        total++;
        if (mag > 0.99 * emag && mag < 1.01 * emag && dph < 1.0 && dph > -1.0) good++;
        else if (total - good < 3)
          $display("  %s n=%0d field (%0.1f,%0.1f) expected (%0.1f,%0.1f)", name, n, ai, aq, ei, eq);
      end
    end
    rf_gate <= 0;
    repeat (GAP) @(posedge clk);
  endtask

  task automatic closed_pulse(input real ref_i, input real ref_q, input string name, output bit ok);
    real th, ei, eq;
    int g, t;
    cfg.iref <= sample_t'($rtoi(ref_i));
    cfg.qref <= sample_t'($rtoi(ref_q));
    @(posedge clk);
    th = teta_rad();
    // loop holds rot(meas, Teta) = ref, so the field is ref turned by -Teta
    ei = ref_i * $cos(th) + ref_q * $sin(th);
    eq = -ref_i * $sin(th) + ref_q * $cos(th);
    pulse(2000, 1, ei, eq, name, g, t);
    ok = (g == t) && (t > 0);
    check(ok, $sformatf("%s: field in tolerance %0d of %0d clocks", name, g, t));
  endtask

  initial begin
    bit ok;
    int g, t;
    cfg = '0;
    cfg.kp            = 18'sd8192;     // 2.0
    cfg.ki            = 18'sd1500;     // 0.023 per sample
    cfg.teta          = deg(-20.0);    // 2*Teta cancels the 40 deg loop phase
    cfg.i_in_ofst     = 18'sd37;       // demodulator/ADC offsets of the plant
    cfg.q_in_ofst     = -18'sd25;
    cfg.i_out_ofst    = 18'sd50;       // cancels modulator leakage (+50, -30)
    cfg.q_out_ofst    = -18'sd30;
    cfg.lpf_en        = 1'b1;
    cfg.tune_en       = 1'b1;
    cfg.tune_phi_sp   = '0;
    cfg.tune_thresh   = 15'd364;       // 2 deg
    cfg.settle_cycles = 20'(SETTLE);
    repeat (4) @(posedge clk);
    rst_n <= 1;
    repeat (60) @(posedge clk);
    check(mon.coef_valid, "phase-shifter coefficients valid after reset");

    // ---- latency, model disconnected: Kp = 1, Ki = 0, Teta = 0, no LPF, no offsets
    begin
      llrf_cfg_t keep;
      int lat;
      keep = cfg;
      use_model = 0;
      cfg.kp <= 18'sd4096; cfg.ki <= '0; cfg.teta <= '0; cfg.lpf_en <= 0;
      cfg.i_in_ofst <= '0; cfg.q_in_ofst <= '0; cfg.i_out_ofst <= '0; cfg.q_out_ofst <= '0;
      cfg.closed_loop <= 1; cfg.tune_en <= 0;
      rf_gate <= 1;
      repeat (60) @(posedge clk);
      t_cav_i <= 14'sd1000;
      @(posedge clk);
      t_cav_i <= '0;
      lat = -1;
      for (int n = 1; n < 40; n++) begin
        #1;
        if (lat < 0 && dac_act.i == -14'sd1000) lat = n;
        @(posedge clk);
      end
      check(lat == 10, $sformatf("ADC to DAC latency %0d clocks, expected 10", lat));
      if (lat == 10) n_latency++;
      rf_gate <= 0;
      repeat (20) @(posedge clk);
      cfg <= keep;
      use_model = 1;
      repeat (60) @(posedge clk);
    end

    // ---- open loop: feed-forward only
    begin
      real th, fi, fq, di, dq, ei, eq, c, s;
      cfg.closed_loop <= 0;
      cfg.i_ff <= 18'sd3000; cfg.q_ff <= 18'sd1000;
      @(posedge clk);
      th = teta_rad();
      // DAC = rot(ff, Teta) - out_ofst; the plant adds its leakage back
      di = 3000.0 * $cos(th) - 1000.0 * $sin(th);
      dq = 3000.0 * $sin(th) + 1000.0 * $cos(th);
      c = $cos(40.0 * PI / 180.0); s = $sin(40.0 * PI / 180.0);
      ei = di * c - dq * s; eq = di * s + dq * c;
      fork
        pulse(1500, 1, ei, eq, "open loop", g, t);
        begin
          repeat (100) @(posedge clk);
          #1;
          check($itor(dac_act.i) - (di - 50.0) <= 1.0 && (di - 50.0) - $itor(dac_act.i) <= 1.0,
                $sformatf("open-loop DAC I %0d expected %0.1f", dac_act.i, di - 50.0));
          check($itor(dac_act.q) - (dq + 30.0) <= 1.0 && (dq + 30.0) - $itor(dac_act.q) <= 1.0,
                $sformatf("open-loop DAC Q %0d expected %0.1f", dac_act.q, dq + 30.0));
        end
      join
      check(g == t && t > 0, $sformatf("open loop: field in tolerance %0d of %0d clocks", g, t));
      if (g == t && t > 0) n_open++;
      cfg.i_ff <= '0; cfg.q_ff <= '0;
      cfg.closed_loop <= 1;
    end

    // ---- closed loop with and without the LPF
    closed_pulse(4000.0, 0.0, "closed loop, LPF on", ok);
    if (ok) n_closed_lpf++;
    cfg.lpf_en <= 0;
    closed_pulse(4000.0, 0.0, "closed loop, LPF bypassed", ok);
    if (ok) n_closed_nolpf++;
    cfg.lpf_en <= 1;

    // ---- reference phase over the whole circle
    for (int k = 0; k < 8; k++) begin
      closed_pulse(4000.0 * $cos(2.0 * PI * k / 8.0), 4000.0 * $sin(2.0 * PI * k / 8.0),
                   $sformatf("phase %0d deg", 45 * k), ok);
      if (ok) n_phase++;
    end
    // ---- amplitude from small to large
    for (int k = 0; k < 3; k++) begin
      real a;
      a = (k == 0) ? 500.0 : (k == 1) ? 2000.0 : 6000.0;
      closed_pulse(a, 0.0, $sformatf("amplitude %0.0f", a), ok);
      if (ok) n_amp++;
    end

    // ---- feed-forward step in closed loop
    begin
      real th, ei, eq, mag, emag, dph;
      int rec, dist_start;
      cfg.iref <= 18'sd4000; cfg.qref <= '0;
      @(posedge clk);
      th = teta_rad();
      ei = 4000.0 * $cos(th); eq = -4000.0 * $sin(th);
      rf_gate <= 1;
      repeat (10000) @(posedge clk);
      cfg.i_ff <= 18'sd1500;           // step disturbance through the feed-forward
      rec = -1;
      dist_start = 0;
      for (int n = 0; n < 10000; n++) begin
        @(posedge clk);
        mag = $sqrt(v_i * v_i + v_q * v_q);
        emag = $sqrt(ei * ei + eq * eq);
        dph = $atan2(v_q * ei - v_i * eq, v_i * ei + v_q * eq) * 180.0 / PI;
        if (mag > 1.01 * emag || mag < 0.99 * emag || dph > 1.0 || dph < -1.0) begin
          dist_start = 1;
          rec = n;
        end
      end
      rf_gate <= 0;
      cfg.i_ff <= '0;
      repeat (GAP) @(posedge clk);
      $display("feed-forward step: disturbed=%0d, back within 1%%/1 deg after %0d clocks (%0.2f us)",
               dist_start, rec + 1, (rec + 1) / 104.0);
      check(dist_start == 1, "the feed-forward step disturbed the field");
      check(rec >= 0 && rec < 416, "feed-forward step removed within 4 us");
      if (dist_start == 1 && rec >= 0 && rec < 416) n_ffstep++;
    end

    // ---- change of Teta while running (the loop phase is then wrong by 20 deg,
    //      which the loop tolerates), then back
    cfg.teta <= deg(-10.0);
    repeat (3) @(posedge clk);
    check(!mon.coef_valid, "coefficients invalid right after a Teta change");
    repeat (40) @(posedge clk);
    check(mon.coef_valid, "coefficients valid again after a Teta change");
    closed_pulse(4000.0, 1000.0, "Teta -10 deg", ok);
    if (ok) n_teta++;
    cfg.teta <= deg(-20.0);
    repeat (40) @(posedge clk);

    // ---- unreachable reference: DAC and PI clip
    begin
      int s0, p0;
      s0 = n_dac_sat; p0 = n_pi_sat;
      cfg.iref <= 18'sd20000; cfg.qref <= '0;
      rf_gate <= 1;
      repeat (3000) @(posedge clk);
      rf_gate <= 0;
      repeat (3 * GAP) @(posedge clk);
      check(n_dac_sat > s0, "DAC clipping with an unreachable reference");
      check(n_pi_sat > p0, "PI clipping with an unreachable reference");
    end

    // ---- tuning loop: +10 deg detuning, then -10 deg
    for (int k = 0; k < 2; k++) begin
      real ph;
      int in0, out0;
      in0 = n_tune_in; out0 = n_tune_out;
      // delta0 counts from the present tuner position
      delta0 = ((k == 0) ? 1.0 : -1.0) * $tan(10.0 * PI / 180.0) + tune_step * tuner_pos;
      cfg.iref <= 18'sd4000; cfg.qref <= '0;
      @(posedge clk);
      pulse(0, 0, 0.0, 0.0, "tuning", g, t);
      ph = $atan(delta0 - tune_step * tuner_pos) * 180.0 / PI;
      $display("tuning %0d: detuning phase after the pulse %0.2f deg, %0d in / %0d out moves",
               k, ph, n_tune_in - in0, n_tune_out - out0);
      check(ph < 2.2 && ph > -2.2, $sformatf("detuning phase %0.2f deg inside the window", ph));
      if (k == 0) check(n_tune_in > in0 && n_tune_out == out0, "inwards moves for positive detuning");
      else        check(n_tune_out > out0 && n_tune_in == in0, "outwards moves for negative detuning");
      if (ph < 2.2 && ph > -2.2) n_tune_window++;
    end
    check(bad_moves == 0, $sformatf("%0d tuner moves outside the settled pulse", bad_moves));

    // every mechanism must have happened
    check(n_latency > 0, "latency test");
    check(n_open > 0, "open-loop operation");
    check(n_closed_lpf > 0, "closed loop with LPF");
    check(n_closed_nolpf > 0, "closed loop without LPF");
    check(n_phase == 8, "full phase range");
    check(n_amp == 3, "amplitude range");
    check(n_ffstep > 0, "feed-forward step rejection");
    check(n_teta > 0, "Teta change");
    check(n_dac_sat > 0 && n_pi_sat > 0, "clipping");
    check(n_tune_in > 0 && n_tune_out > 0 && n_tune_window == 2, "tuner moves both ways");
    $display("mechanisms: latency=%0d open=%0d closed_lpf=%0d closed_nolpf=%0d phase=%0d amp=%0d ffstep=%0d teta=%0d dac_sat=%0d pi_sat=%0d tune_in=%0d tune_out=%0d",
             n_latency, n_open, n_closed_lpf, n_closed_nolpf, n_phase, n_amp, n_ffstep, n_teta,
             n_dac_sat, n_pi_sat, n_tune_in, n_tune_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
