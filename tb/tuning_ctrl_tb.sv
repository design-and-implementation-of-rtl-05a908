// tuning_ctrl_tb: sweeps the measured phase across the whole circle around
// several set points and thresholds (2 deg = 364 among them) and checks the
// inwards/outwards commands one clock later, with and without invert, and
// that nothing moves while enable is low.
module tuning_ctrl_tb;
  localparam int ANG_W = 16;
  logic clk = 0, rst_n = 0, enable = 0, invert = 0;
  logic [ANG_W-1:0] dphi = '0, phi_sp = '0;
  logic [ANG_W-2:0] thresh = '0;
  logic tuner_in, tuner_out;
  logic signed [ANG_W-1:0] phase_err;
  int checks = 0, failures = 0;

  tuning_ctrl #(.ANG_W(ANG_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sps [4] = '{0, 12000, 32768, 65000};
    int ths [3] = '{364, 1, 5000};
    int nin = 0, nout = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int s = 0; s < 4; s++)
      for (int t = 0; t < 3; t++)
        for (int k = 0; k < 1200; k++) begin
          int d, e;
          bit en, inv, exp_in, exp_out;
          // dense near the thresholds, sparse elsewhere
          e = (k < 600) ? k - 300 + ((k % 2) ? ths[t] : -ths[t]) : int'($urandom_range(0, 65535)) - 32768;
          if (e > 32767) e -= 65536;
          if (e < -32768) e += 65536;
          d = (sps[s] + e) & 16'hFFFF;
          en = ($urandom_range(0, 7) != 0);
          inv = $urandom_range(0, 1);
          dphi <= ANG_W'(d); phi_sp <= ANG_W'(sps[s]); thresh <= (ANG_W-1)'(ths[t]);
          enable <= en; invert <= inv;
          exp_in  = en && (inv ? (e < -ths[t]) : (e > ths[t]));
          exp_out = en && (inv ? (e > ths[t]) : (e < -ths[t]));
          @(posedge clk); #1;
          checks++;
          if (tuner_in != exp_in || tuner_out != exp_out || int'(phase_err) != e) begin
            failures++;
            $display("FAIL: sp=%0d th=%0d err=%0d en=%0d inv=%0d -> in=%0d out=%0d perr=%0d", sps[s], ths[t], e, en, inv, tuner_in, tuner_out, phase_err);
          end
          if (tuner_in) nin++;
          if (tuner_out) nout++;
        end
    checks++;
    if (nin == 0 || nout == 0) begin failures++; $display("FAIL: a direction never commanded"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
