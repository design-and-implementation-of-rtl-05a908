// tuning_ctrl: threshold controller of the cavity tuner.
//
// The phase error err = dphi - phi_sp (signed, wrapping at +-180 deg) is
// compared with a window of +-thresh around the desired phase phi_sp, the
// phase that gives zero reflected power with beam. If err leaves the window
// while enable is high, the tuner is commanded to move: err > +thresh moves
// it inwards and err < -thresh outwards (swapped when invert is high, to
// suit the tuner's mechanics). Inside the window, or while enable is low,
// both commands are low. The top drives enable only during the RF pulse
// after the field has settled, and only when the discriminator sees signal,
// so the tuner does not wear itself out moving back and forth.
//
// Timing: tuner_in, tuner_out and phase_err are registered (1 clock). The
// thresholds are typically +-2 deg (thresh = 364 with 65536 = 360 deg). The
// window and gating follow the reference system; the direction mapping and the level
// outputs are this design's choices.
module tuning_ctrl #(
  parameter int unsigned ANG_W = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     enable,
  input  logic [ANG_W-1:0]         dphi,
  input  logic [ANG_W-1:0]         phi_sp,
  input  logic [ANG_W-2:0]         thresh,
  input  logic                     invert,
  output logic                     tuner_in,
  output logic                     tuner_out,
  output logic signed [ANG_W-1:0]  phase_err
);
  logic signed [ANG_W-1:0] err;
  logic                    above, below;

  assign err   = signed'(dphi - phi_sp);
  assign above = err > signed'({1'b0, thresh});
  assign below = err < -signed'({1'b0, thresh});

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tuner_in  <= 1'b0;
      tuner_out <= 1'b0;
      phase_err <= '0;
    end else begin
      phase_err <= err;
      tuner_in  <= enable && (invert ? below : above);
      tuner_out <= enable && (invert ? above : below);
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n) assert (!(tuner_in && tuner_out)) else $error("tuner commanded both ways");
  end
endmodule
