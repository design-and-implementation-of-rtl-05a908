// lpf: baseband low-pass filter for one I or Q channel.
//
// A first-order IIR (exponential smoother): acc <= acc + (x - y) >>> SHIFT,
// evaluated every sample. The accumulator carries SHIFT extra fraction bits so
// the DC gain is one; the update and the output are both rounded, so the
// state ends within half an output LSB of a constant input, which then
// comes out exactly. With SHIFT = 4
// the time constant is 16 samples, about 154 ns at 104 MHz; together with the
// output register this is close to the ~200 ns that the baseband filters add
// to the loop delay in the reference system. The filter type and SHIFT are
// this design's choices: the reference system only asks for "low-pass filtering" and
// reports that the loop also meets its stability targets without it, so the
// filter can be bypassed at run time (en = 0).
//
// Interface: x is a signed DW-bit sample every clock; y is registered. With
// en = 0, y is x delayed by one clock and the filter state follows x, so
// switching the filter on does not produce a transient.
module lpf #(
  parameter int unsigned DW    = 18,
  parameter int unsigned SHIFT = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [DW-1:0] x,
  output logic signed [DW-1:0] y
);
  localparam int unsigned AW = DW + SHIFT + 1;

  localparam logic signed [AW-1:0] HALF = AW'(1) <<< (SHIFT - 1);

  logic signed [AW-1:0] acc;     // y scaled by 2^SHIFT
  logic signed [AW-1:0] x_ext;
  logic signed [AW-1:0] acc_next;

  assign x_ext = AW'(x) <<< SHIFT;
  // (x*2^S - acc) / 2^S, rounded, added to acc
  assign acc_next = acc + ((x_ext - acc + HALF - 1) >>> SHIFT);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc <= '0;
      y   <= '0;
    end else if (en) begin
      acc <= acc_next;
      y   <= DW'((acc_next + HALF) >>> SHIFT);
    end else begin
      acc <= x_ext;
      y   <= x;
    end
  end
endmodule
