// phase_disc: phase discriminator of the tuning loop.
//
// The cavity forward and probe voltages arrive as baseband I/Q pairs from
// two IQ demodulators. Each pair goes through a pipelined CORDIC (cordic_vec)
// that returns its phase; the discriminator output is
//   dphi = phase(probe) - phase(forward)   (mod 360 deg)
// as an unsigned ANG_W-bit turn fraction, which is the cavity's detuning
// angle plus a fixed cable offset. mag_ok is high when both signals exceed
// MIN_MAG (in CORDIC-scaled units), so that the phase of an empty cavity is
// not trusted. The CORDIC method and mag_ok are this design's choices; the
// reference system specifies only a phase discriminator programmed in the FPGA.
//
// Timing: one result per clock, latency NSTAGE + 3 = 19 clocks.
module phase_disc #(
  parameter int unsigned DW      = 18,
  parameter int unsigned ANG_W   = 16,
  parameter int unsigned NSTAGE  = 16,
  parameter int unsigned MIN_MAG = 256
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [DW-1:0] fwd_i,
  input  logic signed [DW-1:0] fwd_q,
  input  logic signed [DW-1:0] prb_i,
  input  logic signed [DW-1:0] prb_q,
  output logic [ANG_W-1:0]     dphi,
  output logic                 mag_ok
);
  logic [ANG_W-1:0] ang_f, ang_p;
  logic [DW+1:0]    mag_f, mag_p;

  cordic_vec #(.DW(DW), .ANG_W(ANG_W), .NSTAGE(NSTAGE)) u_fwd (
    .clk, .rst_n, .x_i(fwd_i), .x_q(fwd_q), .angle(ang_f), .mag(mag_f));
  cordic_vec #(.DW(DW), .ANG_W(ANG_W), .NSTAGE(NSTAGE)) u_prb (
    .clk, .rst_n, .x_i(prb_i), .x_q(prb_q), .angle(ang_p), .mag(mag_p));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dphi   <= '0;
      mag_ok <= 1'b0;
    end else begin
      dphi   <= ang_p - ang_f;
      mag_ok <= (mag_f >= (DW+2)'(MIN_MAG)) && (mag_p >= (DW+2)'(MIN_MAG));
    end
  end
endmodule
