// llrf_top: FPGA program of a pulsed digital LLRF system for an RFQ.
//
// Amplitude and phase regulation works directly on baseband I/Q: the cavity
// pickup is IQ-demodulated in the analog front end, the I and Q voltages are
// sampled by 14-bit ADCs at 104 MHz, and this module returns the I and Q
// drive (Iact, Qact) for the 14-bit DACs that feed the IQ modulator. Per
// channel the chain is
//
//   ADC -> LPF -> offset comp. -> [2x2] phase shifter (1) -> (ref - meas)
//       -> PI -> O.L./C.L. switch -> (+ feed-forward) -> [2x2] phase
//       shifter (2) -> offset comp. -> DAC
//
// with both phase shifters rotating by the same angle Teta. References and
// feed-forward are applied only while the RF gate is high; the PI
// integrators are held at zero while the loop is open or the pulse is off.
// In open loop (closed_loop = 0) the modulator sees only the feed-forward.
//
// The tuning loop compares the phases of the cavity forward and probe
// signals (two more I/Q pairs) in a CORDIC phase discriminator and moves the
// tuner inwards or outwards when the phase leaves a +-thresh window around
// its set point. It acts only during the pulse, after settle_cycles clocks,
// and only when both signals carry enough amplitude.
//
// Timing: one sample per clock. ADC word to DAC word takes 10 clocks
// (96 ns at 104 MHz): LPF 1, offset 1, shifter 2, PI 2, switch/adder 1,
// shifter 2, offset 1. The LPF's own smoothing (time constant 2^LPF_SHIFT
// clocks) comes on top when it is enabled. A change of Teta reaches the
// shifters within 2*18 clocks.
//
// The block structure, the signal order, the error signs and the tuning
// thresholds follow the reference system. Word widths, number formats, the
// filter type, offset sign, integrator clearing, settling detection and the
// tuner interface are this design's choices (see each block).
module llrf_top
  import llrf_pkg::*;
#(
  parameter int unsigned LPF_SHIFT = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  adc_iq_t   adc_cav,     // Icav, Qcav
  input  adc_iq_t   adc_fwd,     // forward I/Q (tuning loop)
  input  adc_iq_t   adc_prb,     // probe I/Q (tuning loop)
  input  logic      rf_gate,     // RF pulse gate from the timing system
  input  llrf_cfg_t cfg,
  output dac_iq_t   dac_act,     // Iact, Qact
  output logic      tuner_in,
  output logic      tuner_out,
  output llrf_mon_t mon
);
  // ---- pulse timing -------------------------------------------------------
  logic        pulse_on, pulse_start, settled;
  logic [19:0] pulse_count;

  pulse_timer #(.CW(20)) u_timer (
    .clk, .rst_n, .rf_gate, .settle_cycles(cfg.settle_cycles),
    .pulse_on, .pulse_start, .settled, .count(pulse_count));

  // ---- phase-shifter coefficients ----------------------------------------
  sample_t cos_t, sin_t;
  logic    coef_valid;

  sincos_gen #(.DW(DW), .ANG_W(ANG_W), .ITER(16)) u_sincos (
    .clk, .rst_n, .teta(cfg.teta), .cos_o(cos_t), .sin_o(sin_t), .valid(coef_valid));

  // ---- input side ---------------------------------------------------------
  iq_t adc_x, filt, unofs, meas;

  assign adc_x.i = sample_t'(adc_cav.i);
  assign adc_x.q = sample_t'(adc_cav.q);

  lpf #(.DW(DW), .SHIFT(LPF_SHIFT)) u_lpf_i (.clk, .rst_n, .en(cfg.lpf_en), .x(adc_x.i), .y(filt.i));
  lpf #(.DW(DW), .SHIFT(LPF_SHIFT)) u_lpf_q (.clk, .rst_n, .en(cfg.lpf_en), .x(adc_x.q), .y(filt.q));

  ofst_comp #(.DW(DW)) u_iofs_i (.clk, .rst_n, .ofst(cfg.i_in_ofst), .x(filt.i), .y(unofs.i));
  ofst_comp #(.DW(DW)) u_iofs_q (.clk, .rst_n, .ofst(cfg.q_in_ofst), .x(filt.q), .y(unofs.q));

  phase_shifter #(.DW(DW)) u_ps1 (
    .clk, .rst_n, .cos_i(cos_t), .sin_i(sin_t),
    .x_i(unofs.i), .x_q(unofs.q), .y_i(meas.i), .y_q(meas.q));

  // ---- regulation ---------------------------------------------------------
  iq_t     ref_g, ff_g, pi_u, drive;
  logic    pi_clr, sat_i, sat_q;

  assign ref_g.i = pulse_on ? cfg.iref : '0;
  assign ref_g.q = pulse_on ? cfg.qref : '0;
  assign ff_g.i  = pulse_on ? cfg.i_ff : '0;
  assign ff_g.q  = pulse_on ? cfg.q_ff : '0;
  assign pi_clr  = !cfg.closed_loop || !pulse_on;

  pi_ctrl #(.DW(DW), .GW(GW)) u_pi_i (
    .clk, .rst_n, .clr(pi_clr), .ref_i(ref_g.i), .meas(meas.i),
    .kp(cfg.kp), .ki(cfg.ki), .u(pi_u.i), .sat(sat_i));
  pi_ctrl #(.DW(DW), .GW(GW)) u_pi_q (
    .clk, .rst_n, .clr(pi_clr), .ref_i(ref_g.q), .meas(meas.q),
    .kp(cfg.kp), .ki(cfg.ki), .u(pi_u.q), .sat(sat_q));

  drive_sum #(.DW(DW)) u_sum_i (.clk, .rst_n, .closed(cfg.closed_loop), .ff(ff_g.i), .pi(pi_u.i), .y(drive.i));
  drive_sum #(.DW(DW)) u_sum_q (.clk, .rst_n, .closed(cfg.closed_loop), .ff(ff_g.q), .pi(pi_u.q), .y(drive.q));

  // ---- output side --------------------------------------------------------
  iq_t rot, outv;

  phase_shifter #(.DW(DW)) u_ps2 (
    .clk, .rst_n, .cos_i(cos_t), .sin_i(sin_t),
    .x_i(drive.i), .x_q(drive.q), .y_i(rot.i), .y_q(rot.q));

  ofst_comp #(.DW(DW)) u_oofs_i (.clk, .rst_n, .ofst(cfg.i_out_ofst), .x(rot.i), .y(outv.i));
  ofst_comp #(.DW(DW)) u_oofs_q (.clk, .rst_n, .ofst(cfg.q_out_ofst), .x(rot.q), .y(outv.q));

  // DAC words: the same scale as the ADC words, clipped to 14 bits.
  localparam sample_t DAC_MAX = sample_t'((1 <<< (DAC_W - 1)) - 1);
  localparam sample_t DAC_MIN = -sample_t'(1 <<< (DAC_W - 1));

  function automatic logic signed [DAC_W-1:0] to_dac(input sample_t v);
    if (v > DAC_MAX)      return DAC_W'(DAC_MAX);
    else if (v < DAC_MIN) return DAC_W'(DAC_MIN);
    else                  return DAC_W'(v);
  endfunction

  assign dac_act.i = to_dac(outv.i);
  assign dac_act.q = to_dac(outv.q);

  // ---- tuning loop --------------------------------------------------------
  logic [ANG_W-1:0]        dphi;
  logic                    mag_ok;
  logic signed [ANG_W-1:0] tune_err;

  phase_disc #(.DW(DW), .ANG_W(ANG_W), .NSTAGE(16)) u_disc (
    .clk, .rst_n,
    .fwd_i(sample_t'(adc_fwd.i)), .fwd_q(sample_t'(adc_fwd.q)),
    .prb_i(sample_t'(adc_prb.i)), .prb_q(sample_t'(adc_prb.q)),
    .dphi, .mag_ok);

  tuning_ctrl #(.ANG_W(ANG_W)) u_tune (
    .clk, .rst_n, .enable(cfg.tune_en && settled && mag_ok),
    .dphi, .phi_sp(cfg.tune_phi_sp), .thresh(cfg.tune_thresh), .invert(cfg.tune_invert),
    .tuner_in, .tuner_out, .phase_err(tune_err));

  // ---- monitoring ---------------------------------------------------------
  always_comb begin
    mon.cav        = meas;
    mon.drive      = drive;
    mon.pi_sat     = sat_i || sat_q;
    mon.dac_sat    = (outv.i != sample_t'(dac_act.i)) || (outv.q != sample_t'(dac_act.q));
    mon.tune_dphi  = dphi;
    mon.tune_err   = tune_err;
    mon.pulse_on   = pulse_on;
    mon.settled    = settled;
    mon.pulse_count = pulse_count;
    mon.pulse_start = pulse_start;
    mon.coef_valid = coef_valid;
  end
endmodule
