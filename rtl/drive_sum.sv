// drive_sum: open-loop/closed-loop switch and feed-forward adder for one
// of the I or Q channels.
//
//   y = ff + (closed ? pi : 0), saturated to DW bits, registered (1 clock).
//
// With the switch open the modulator is driven by the feed-forward value
// alone: this runs the cavity in open loop for tests, or before the loop is
// trusted to be stable. With it closed the feed-forward adds to the PI output
// to cancel repetitive, predictable disturbances such as beam loading before
// the loop has to correct them. The switch and the adder follow the reference system;
// saturation is this design's choice.
module drive_sum #(
  parameter int unsigned DW = 18
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 closed,
  input  logic signed [DW-1:0] ff,
  input  logic signed [DW-1:0] pi,
  output logic signed [DW-1:0] y
);
  localparam logic signed [DW:0] MAXV = (DW+1)'((1 <<< (DW - 1)) - 1);
  localparam logic signed [DW:0] MINV = -(DW+1)'(1 <<< (DW - 1));

  logic signed [DW:0] s;
  assign s = (DW+1)'(ff) + (closed ? (DW+1)'(pi) : '0);

  always_ff @(posedge clk) begin
    if (!rst_n)         y <= '0;
    else if (s > MAXV)  y <= DW'(MAXV);
    else if (s < MINV)  y <= DW'(MINV);
    else                y <= DW'(s);
  end
endmodule
