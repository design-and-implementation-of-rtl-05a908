// cordic_vec: pipelined CORDIC in vectoring mode (magnitude and phase).
//
// Takes a signed I/Q pair every clock and returns its angle atan2(q, i) as
// an unsigned ANG_W-bit turn fraction (65536 = 360 deg) and its magnitude
// times the CORDIC gain K = 1.6468. A first stage turns vectors in the left
// half plane by 180 deg; NSTAGE micro-rotations of +-atan(2^-k) then drive
// q to zero while the rotated angles are summed. The inputs are scaled up
// by GUARD bits inside so that the shifts lose little to truncation. Angle error is below
// 0.01 deg for inputs well above the noise.
//
// Timing: fully pipelined, one result per clock, latency NSTAGE + 2 clocks.
// Used by the tuning loop's phase discriminator.
module cordic_vec #(
  parameter int unsigned DW     = 18,
  parameter int unsigned ANG_W  = 16,
  parameter int unsigned NSTAGE = 16,
  parameter int unsigned GUARD  = 6
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [DW-1:0] x_i,
  input  logic signed [DW-1:0] x_q,
  output logic [ANG_W-1:0]     angle,
  output logic [DW+1:0]        mag
);
  localparam int unsigned ZW = llrf_pkg::ZW;    // CORDIC angle width
  localparam int unsigned XW = DW + 2 + GUARD;   // growth by K, plus guard bits

  logic signed [XW-1:0] xs [NSTAGE+1];
  logic signed [XW-1:0] ys [NSTAGE+1];
  logic        [ZW-1:0] zs [NSTAGE+1];

  // stage 0: fold into the right half plane
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      xs[0] <= '0;
      ys[0] <= '0;
      zs[0] <= '0;
    end else if (x_i < 0) begin
      xs[0] <= -(XW'(x_i) <<< GUARD);
      ys[0] <= -(XW'(x_q) <<< GUARD);
      zs[0] <= ZW'(1) << (ZW - 1);
    end else begin
      xs[0] <= XW'(x_i) <<< GUARD;
      ys[0] <= XW'(x_q) <<< GUARD;
      zs[0] <= '0;
    end
  end

  for (genvar k = 0; k < NSTAGE; k++) begin : g_stage
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        xs[k+1] <= '0;
        ys[k+1] <= '0;
        zs[k+1] <= '0;
      end else if (ys[k] >= 0) begin
        xs[k+1] <= xs[k] + (ys[k] >>> k);
        ys[k+1] <= ys[k] - (xs[k] >>> k);
        zs[k+1] <= zs[k] + llrf_pkg::CORDIC_ATAN[k];
      end else begin
        xs[k+1] <= xs[k] - (ys[k] >>> k);
        ys[k+1] <= ys[k] + (xs[k] >>> k);
        zs[k+1] <= zs[k] - llrf_pkg::CORDIC_ATAN[k];
      end
    end
  end

  logic [ZW-1:0] z_round;
  assign z_round = zs[NSTAGE] + (ZW'(1) << (ZW - ANG_W - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      angle <= '0;
      mag   <= '0;
    end else begin
      angle <= z_round[ZW-1 -: ANG_W];
      mag   <= (DW+2)'(unsigned'(xs[NSTAGE] >>> GUARD));
    end
  end
endmodule
