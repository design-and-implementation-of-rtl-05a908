// phase_shifter: [2x2] baseband phase shifter.
//
// Rotates an I/Q pair by the angle whose cosine and sine are given:
//   I' = I*cos - Q*sin,   Q' = I*sin + Q*cos
// which turns the phase of the complex baseband signal by that angle without
// changing its magnitude. Used twice in the regulation loop, both driven by
// the same angle Teta: after the input offset compensation and before the
// output offset compensation. Adjusting Teta aligns the loop phase so the
// I and Q regulators act on decoupled axes.
//
// Timing: two pipeline stages (four products, then add, round and
// saturate), matching a DSP48 multiply-add. Coefficients have 1.0 = 2^16 and
// may change at any time; samples arrive every clock. The rounding,
// saturation and pipelining are this design's choices.
module phase_shifter #(
  parameter int unsigned DW = 18
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [DW-1:0] cos_i,
  input  logic signed [DW-1:0] sin_i,
  input  logic signed [DW-1:0] x_i,
  input  logic signed [DW-1:0] x_q,
  output logic signed [DW-1:0] y_i,
  output logic signed [DW-1:0] y_q
);
  localparam int unsigned PW = 2 * DW;
  localparam int unsigned FR = llrf_pkg::COEF_FRAC;
  localparam logic signed [PW:0] HALF = (PW+1)'(1) <<< (FR - 1);
  localparam logic signed [PW:0] MAXV = (PW+1)'((1 <<< (DW - 1)) - 1);
  localparam logic signed [PW:0] MINV = -(PW+1)'(1 <<< (DW - 1));

  logic signed [PW-1:0] p_ic, p_qs, p_is, p_qc;
  logic signed [PW:0]   s_i, s_q;
  logic signed [PW:0]   r_i, r_q;

  function automatic logic signed [DW-1:0] clip(input logic signed [PW:0] v);
    if (v > MAXV)      return DW'(MAXV);
    else if (v < MINV) return DW'(MINV);
    else               return DW'(v);
  endfunction

  assign s_i = (PW+1)'(p_ic) - (PW+1)'(p_qs) + HALF;
  assign s_q = (PW+1)'(p_is) + (PW+1)'(p_qc) + HALF;
  assign r_i = s_i >>> FR;
  assign r_q = s_q >>> FR;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      p_ic <= '0; p_qs <= '0; p_is <= '0; p_qc <= '0;
      y_i  <= '0; y_q  <= '0;
    end else begin
      p_ic <= x_i * cos_i;
      p_qs <= x_q * sin_i;
      p_is <= x_i * sin_i;
      p_qc <= x_q * cos_i;
      y_i  <= clip(r_i);
      y_q  <= clip(r_q);
    end
  end
endmodule
