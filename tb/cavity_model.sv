// cavity_model: behavioural baseband model of the plant around the LLRF
// (DACs, IQ modulator, amplifier, detuned cavity, IQ demodulators, ADCs),
// for simulation only.
//
// Per clock, the drive d (DAC words plus modulator leakage, turned by the
// loop phase PHI_DEG) charges the cavity voltage v through a first-order
// response with time constant TAU clocks and detuning delta (in units of the
// half bandwidth):  v += (d - (1 - j*delta) * v) / TAU.
// The converters are modelled as a pure delay of DELAY clocks on the drive.
// adc_cav is v plus the demodulator/ADC offsets, adc_prb is v and adc_fwd is
// the drive, all rounded to 14 bits. The tuner position moves by one step
// per clock while tuner_in or tuner_out is high; delta =
// delta0 - tune_step * position (inwards lowers delta). In steady state the
// probe leads the forward signal by atan(delta).
module cavity_model #(
  parameter int  DELAY     = 8,
  parameter real TAU       = 64.0,
  parameter real PHI_DEG   = 40.0,
  parameter real GAIN      = 1.0,
  parameter int  ADC_OFS_I = 37,
  parameter int  ADC_OFS_Q = -25,
  parameter int  DAC_LEAK_I = 50,
  parameter int  DAC_LEAK_Q = -30
) (
  input  logic                clk,
  input  logic signed [13:0]  dac_i,
  input  logic signed [13:0]  dac_q,
  input  logic                tuner_in,
  input  logic                tuner_out,
  input  real                 delta0,
  input  real                 tune_step,
  input  real                 dist_i,      // disturbance added to the field
  input  real                 dist_q,
  output logic signed [13:0]  adc_cav_i,
  output logic signed [13:0]  adc_cav_q,
  output logic signed [13:0]  adc_fwd_i,
  output logic signed [13:0]  adc_fwd_q,
  output logic signed [13:0]  adc_prb_i,
  output logic signed [13:0]  adc_prb_q,
  output real                 v_i,
  output real                 v_q,
  output int                  tuner_pos
);
  localparam real PI = 3.14159265358979;
  real di_d [DELAY], dq_d [DELAY];
  real vi = 0.0, vq = 0.0;
  int  pos = 0;

  function automatic logic signed [13:0] q14(input real v);
    real r;
    r = $floor(v + 0.5);
    if (r > 8191.0) r = 8191.0;
    if (r < -8192.0) r = -8192.0;
    return 14'($rtoi(r));
  endfunction

  initial for (int k = 0; k < DELAY; k++) begin di_d[k] = 0.0; dq_d[k] = 0.0; end

  assign v_i = vi;
  assign v_q = vq;
  assign tuner_pos = pos;

  always @(posedge clk) begin
    real c, s, ai, aq, delta, ni, nq;
    // converter delay line
    for (int k = DELAY - 1; k > 0; k--) begin di_d[k] = di_d[k-1]; dq_d[k] = dq_d[k-1]; end
    di_d[0] = GAIN * ($itor(dac_i) + DAC_LEAK_I);
    dq_d[0] = GAIN * ($itor(dac_q) + DAC_LEAK_Q);
    c = $cos(PHI_DEG * PI / 180.0);
    s = $sin(PHI_DEG * PI / 180.0);
    ai = di_d[DELAY-1] * c - dq_d[DELAY-1] * s;
    aq = di_d[DELAY-1] * s + dq_d[DELAY-1] * c;
    if (tuner_in)  pos = pos + 1;
    if (tuner_out) pos = pos - 1;
    delta = delta0 - tune_step * pos;
    // dv = (a - (1 - j delta) v) / TAU
    ni = vi + (ai - (vi + delta * vq)) / TAU;
    nq = vq + (aq - (vq - delta * vi)) / TAU;
    vi = ni;
    vq = nq;
    adc_cav_i <= q14(vi + dist_i + ADC_OFS_I);
    adc_cav_q <= q14(vq + dist_q + ADC_OFS_Q);
    adc_prb_i <= q14(vi);
    adc_prb_q <= q14(vq);
    adc_fwd_i <= q14(ai);
    adc_fwd_q <= q14(aq);
  end
endmodule
