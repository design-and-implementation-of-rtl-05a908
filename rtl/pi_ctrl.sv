// pi_ctrl: error node and PI regulator for one of the I or Q channels.
//
// err = ref - meas (the reference enters with '+', the measured, phase-
// shifted cavity signal with '-'). The output is
//   u = Kp*err / 2^KP_FRAC + acc / 2^KI_FRAC,   acc <= acc + Ki*err
// saturated to the DW-bit range. Gains are signed GW-bit run-time values set
// from the control computer. The integrator is clamped so that its
// contribution never exceeds the output range (anti-windup) and is held at
// zero while clr is high; the top asserts clr while the loop is open or the
// RF pulse is off. Gain formats, clamping and clearing are this design's
// choices: the reference system specifies a PI regulator with adjustable P and I gains.
//
// Timing: err is registered in the first clock, the output in the second,
// so u follows meas by 2 clocks. sat flags a clipped output or integrator.
module pi_ctrl #(
  parameter int unsigned DW      = 18,
  parameter int unsigned GW      = 18,
  parameter int unsigned KP_FRAC = 12,
  parameter int unsigned KI_FRAC = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  input  logic signed [DW-1:0] ref_i,
  input  logic signed [DW-1:0] meas,
  input  logic signed [GW-1:0] kp,
  input  logic signed [GW-1:0] ki,
  output logic signed [DW-1:0] u,
  output logic                 sat
);
  localparam int unsigned EW = DW + 1;             // error width
  localparam int unsigned AW = DW + KI_FRAC + 2;   // integrator width
  localparam int unsigned SW = EW + GW + 2;        // sum width
  localparam logic signed [SW-1:0] OMAX = SW'((1 <<< (DW - 1)) - 1);
  localparam logic signed [SW-1:0] OMIN = -SW'(1 <<< (DW - 1));
  localparam logic signed [AW-1:0] AMAX = AW'(OMAX) <<< KI_FRAC;
  localparam logic signed [AW-1:0] AMIN = AW'(OMIN) <<< KI_FRAC;

  logic signed [EW-1:0]    err;
  logic signed [AW-1:0]    acc;
  logic signed [EW+GW-1:0] p_term, i_inc;
  logic signed [AW:0]      acc_sum;
  logic signed [AW-1:0]    acc_next;
  logic signed [SW-1:0]    u_sum;
  logic                    acc_sat;

  assign p_term  = err * kp;
  assign i_inc   = err * ki;
  assign acc_sum = (AW+1)'(acc) + (AW+1)'(i_inc);

  always_comb begin
    acc_sat = 1'b0;
    if (acc_sum > (AW+1)'(AMAX)) begin
      acc_next = AMAX;
      acc_sat  = 1'b1;
    end else if (acc_sum < (AW+1)'(AMIN)) begin
      acc_next = AMIN;
      acc_sat  = 1'b1;
    end else begin
      acc_next = AW'(acc_sum);
    end
  end

  assign u_sum = SW'(p_term >>> KP_FRAC) + SW'(acc_next >>> KI_FRAC);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      err <= '0;
      acc <= '0;
      u   <= '0;
      sat <= 1'b0;
    end else begin
      err <= EW'(ref_i) - EW'(meas);
      if (clr) begin
        acc <= '0;
        u   <= '0;
        sat <= 1'b0;
      end else begin
        acc <= acc_next;
        if (u_sum > OMAX)      begin u <= DW'(OMAX); sat <= 1'b1; end
        else if (u_sum < OMIN) begin u <= DW'(OMIN); sat <= 1'b1; end
        else                   begin u <= DW'(u_sum); sat <= acc_sat; end
      end
    end
  end
endmodule
