// llrf_pkg: widths, types and helpers shared by the pulsed I/Q LLRF blocks.
//
// The converters are 14-bit (ADCs at 104 MSPS, DACs at 480 MSPS with 4x
// interpolation), as in the system this design follows. Inside the FPGA every
// I or Q sample is an 18-bit signed word: the 14-bit ADC word sign-extended,
// which leaves 4 bits of headroom for offsets, rotation and regulation. The
// 18-bit width matches the multiplier of a Virtex-4 DSP48 slice; it is this
// design's choice, as are the angle format and the CORDIC table below.
//
// Angles are unsigned fractions of a full turn, ANG_W bits (65536 = 360 deg),
// so that phase wraps around by itself. The CORDIC units work with 20-bit
// turn fractions internally; CORDIC_ATAN[i] = round(atan(2^-i) / (2*pi) * 2^20).
package llrf_pkg;

  parameter int unsigned CLK_HZ = 104_000_000;  // ADC sample clock
  parameter int unsigned ADC_W  = 14;
  parameter int unsigned DAC_W  = 14;
  parameter int unsigned DW     = 18;           // internal sample width
  parameter int unsigned GW     = 18;           // gain word width
  parameter int unsigned ANG_W  = 16;           // angle word width (turn fraction)
  parameter int unsigned ZW     = 20;           // CORDIC internal angle width
  parameter int unsigned COEF_FRAC = 16;        // cos/sin coefficients: 1.0 = 2^16

  typedef logic signed [DW-1:0] sample_t;

  typedef struct packed {
    sample_t i;
    sample_t q;
  } iq_t;

  typedef struct packed {
    logic signed [ADC_W-1:0] i;
    logic signed [ADC_W-1:0] q;
  } adc_iq_t;

  typedef struct packed {
    logic signed [DAC_W-1:0] i;
    logic signed [DAC_W-1:0] q;
  } dac_iq_t;

  // Settings written by the control computer (the underlined parameters of
  // the regulation scheme plus the tuning-loop settings).
  typedef struct packed {
    sample_t                 iref;          // I reference during the pulse
    sample_t                 qref;          // Q reference during the pulse
    sample_t                 i_ff;          // I feed-forward during the pulse
    sample_t                 q_ff;          // Q feed-forward during the pulse
    logic signed [GW-1:0]    kp;            // proportional gain, 2^12 = 1.0
    logic signed [GW-1:0]    ki;            // integral gain per sample, 2^16 = 1.0
    logic [ANG_W-1:0]        teta;          // phase-shifter angle
    sample_t                 i_in_ofst;     // offsets removed after the LPFs
    sample_t                 q_in_ofst;
    sample_t                 i_out_ofst;    // offsets removed before the DACs
    sample_t                 q_out_ofst;
    logic                    closed_loop;   // O.L./C.L. switch, 1 = closed
    logic                    lpf_en;        // 0 bypasses the baseband LPFs
    logic                    tune_en;       // tuning loop enable
    logic                    tune_invert;   // swap tuner directions
    logic [ANG_W-1:0]        tune_phi_sp;   // desired forward/probe phase
    logic [ANG_W-2:0]        tune_thresh;   // +- window, 364 = 2 deg
    logic [19:0]             settle_cycles; // tuning starts this long into the pulse
  } llrf_cfg_t;

  // Monitoring outputs for the control computer.
  typedef struct packed {
    iq_t                     cav;           // cavity I/Q after phase shifter (1)
    iq_t                     drive;         // drive I/Q before phase shifter (2)
    logic                    pi_sat;        // a PI output or integrator clipped
    logic                    dac_sat;       // a DAC word clipped
    logic [ANG_W-1:0]        tune_dphi;     // forward/probe phase difference
    logic signed [ANG_W-1:0] tune_err;      // dphi - set point
    logic                    pulse_on;
    logic                    settled;
    logic [19:0]             pulse_count;   // clocks since the pulse started
    logic                    pulse_start;   // first clock of a pulse
    logic                    coef_valid;    // phase-shifter coefficients current
  } llrf_mon_t;

  localparam int unsigned CORDIC_N = 18;
  localparam logic [ZW-1:0] CORDIC_ATAN [CORDIC_N] = '{
    20'd131072, 20'd77376, 20'd40884, 20'd20753, 20'd10417, 20'd5213,
    20'd2607,   20'd1304,  20'd652,   20'd326,   20'd163,   20'd81,
    20'd41,     20'd20,    20'd10,    20'd5,     20'd3,     20'd1
  };

  // 1/K of the CORDIC, 0.60725 in units of 2^-16.
  localparam int CORDIC_INV_GAIN = 39797;

  // Saturate a wide signed value to DW bits.
  function automatic sample_t sat_dw(input logic signed [47:0] v);
    localparam logic signed [47:0] MAXV = (48'sd1 <<< (DW - 1)) - 48'sd1;
    localparam logic signed [47:0] MINV = -(48'sd1 <<< (DW - 1));
    if (v > MAXV)      return sample_t'(MAXV);
    else if (v < MINV) return sample_t'(MINV);
    else               return sample_t'(v);
  endfunction

endpackage
