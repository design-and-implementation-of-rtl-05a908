// sincos_gen: cosine and sine of the phase-shifter angle Teta.
//
// An iterative CORDIC in rotation mode. Teta (ANG_W-bit turn fraction) is
// first folded into [-90, +90) deg by a half-turn rotation when needed (the
// result is then negated). The vector (1/K, 0) is then rotated by ITER
// micro-rotations of +-atan(2^-i), one per clock, which leaves
// (cos, sin) of the angle in x and y. A pass takes ITER+2 clocks (load,
// ITER rotations, output). The result is written to cos_o/sin_o
// at the end of each pass and a new pass starts at once, so a change of Teta
// shows at the outputs within 2*(ITER+2) clocks; valid is high when the
// outputs belong to the present Teta. Teta is a slow control value, so a
// serial CORDIC costs far less than a pipelined one.
//
// Format: cos_o and sin_o are signed DW-bit words with 1.0 = 2^16. The
// rotation matrix form of the phase shifter is from the reference system; the way its
// coefficients are produced is this design's choice.
module sincos_gen #(
  parameter int unsigned DW    = 18,
  parameter int unsigned ANG_W = 16,
  parameter int unsigned ITER  = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [ANG_W-1:0]     teta,
  output logic signed [DW-1:0] cos_o,
  output logic signed [DW-1:0] sin_o,
  output logic                 valid
);
  localparam int unsigned ZW = llrf_pkg::ZW;    // CORDIC angle width
  localparam int unsigned XW = 20;                   // CORDIC x/y width
  localparam int unsigned CW = $clog2(ITER + 2);

  logic signed [XW-1:0] x, y;
  logic signed [ZW-1:0] z;
  logic [CW-1:0]        step;
  logic                 flip;
  logic [ANG_W-1:0]     teta_run;   // angle of the pass in progress
  logic [ANG_W-1:0]     teta_out;   // angle of the outputs
  logic                 out_ok;

  logic [ZW-1:0] z_in;
  assign z_in = {teta, {(ZW-ANG_W){1'b0}}};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x        <= '0;
      y        <= '0;
      z        <= '0;
      step     <= '0;
      flip     <= 1'b0;
      teta_run <= '0;
      teta_out <= '0;
      out_ok   <= 1'b0;
      cos_o    <= '0;
      sin_o    <= '0;
    end else if (step == '0) begin
      // load: fold into [-1/4, 1/4) turn
      teta_run <= teta;
      flip     <= z_in[ZW-1] ^ z_in[ZW-2];
      z        <= (z_in[ZW-1] ^ z_in[ZW-2]) ? signed'(z_in + (ZW'(1) << (ZW-1)))
                                            : signed'(z_in);
      x        <= XW'(llrf_pkg::CORDIC_INV_GAIN);
      y        <= '0;
      step     <= CW'(1);
    end else if (step == CW'(ITER + 1)) begin
      // output the finished pass, start the next one
      step     <= '0;
      cos_o    <= flip ? -DW'(x) : DW'(x);
      sin_o    <= flip ? -DW'(y) : DW'(y);
      teta_out <= teta_run;
      out_ok   <= 1'b1;
    end else begin
      if (z >= 0) begin
        x <= x - (y >>> (step - 1));
        y <= y + (x >>> (step - 1));
        z <= z - signed'(llrf_pkg::CORDIC_ATAN[step - 1]);
      end else begin
        x <= x + (y >>> (step - 1));
        y <= y - (x >>> (step - 1));
        z <= z + signed'(llrf_pkg::CORDIC_ATAN[step - 1]);
      end
      step <= step + 1'b1;
    end
  end

  assign valid = out_ok && (teta_out == teta);
endmodule
