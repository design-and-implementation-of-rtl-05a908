// ofst_comp: offset compensation for one I or Q channel.
//
// y = x - ofst, saturated to the DW-bit range and registered (one clock of
// latency). The offset is a run-time value set from the control computer.
// Four instances are used: after the input filters, to remove the DC offset
// of the IQ demodulator and ADCs, and before the DACs, to cancel the offset
// (carrier leakage) of the IQ modulator. The subtraction sign and the
// saturation are this design's choices; the reference system names the function only.
module ofst_comp #(
  parameter int unsigned DW = 18
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [DW-1:0] ofst,
  input  logic signed [DW-1:0] x,
  output logic signed [DW-1:0] y
);
  localparam logic signed [DW:0] MAXV = (DW+1)'((1 <<< (DW - 1)) - 1);
  localparam logic signed [DW:0] MINV = -(DW+1)'(1 <<< (DW - 1));

  logic signed [DW:0] diff;
  assign diff = (DW+1)'(x) - (DW+1)'(ofst);

  always_ff @(posedge clk) begin
    if (!rst_n)            y <= '0;
    else if (diff > MAXV)  y <= DW'(MAXV);
    else if (diff < MINV)  y <= DW'(MINV);
    else                   y <= DW'(diff);
  end
endmodule
