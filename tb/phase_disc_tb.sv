// phase_disc_tb: forward and probe vectors with random amplitudes and
// phases; dphi must equal the phase difference of the applied integer
// vectors within 3 LSB of 65536 per turn (0.017 deg), 19 clocks after the inputs. mag_ok must be low
// when either signal is tiny and high when both are large.
module phase_disc_tb;
  localparam int DW = 18, ANG_W = 16, NSTAGE = 16, LAT = NSTAGE + 3;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  logic signed [DW-1:0] fwd_i = '0, fwd_q = '0, prb_i = '0, prb_q = '0;
  logic [ANG_W-1:0] dphi;
  logic mag_ok;
  int checks = 0, failures = 0;

  phase_disc #(.DW(DW), .ANG_W(ANG_W), .NSTAGE(NSTAGE)) dut (.*);
  always #5 clk = ~clk;

  int  exp_d [$];
  bit  exp_ok [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nsmall = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    repeat (LAT + 2) @(posedge clk);
    for (int n = 0; n < 3000 + LAT - 1; n++) begin
      if (n < 3000) begin
        real a, b, pf, d;
        int dd;
        bit tiny;
        tiny = ($urandom_range(0, 9) == 0);
        a = tiny ? 50.0 : $urandom_range(2000, 8000);
        b = $urandom_range(1000, 8000);
        pf = 2.0 * PI * $urandom_range(0, 65535) / 65536.0;
        dd = $urandom_range(0, 65535);
        d = 2.0 * PI * dd / 65536.0;
        begin
          int fi, fq, pi_, pq;
          real qd;
          fi = $rtoi(a * $cos(pf)); fq = $rtoi(a * $sin(pf));
          pi_ = $rtoi(b * $cos(pf + d)); pq = $rtoi(b * $sin(pf + d));
          fwd_i <= DW'(fi); fwd_q <= DW'(fq);
          prb_i <= DW'(pi_); prb_q <= DW'(pq);
          // phase difference of the integer vectors actually applied
          qd = ($atan2(pq, pi_) - $atan2(fq, fi)) / (2.0 * PI) * 65536.0;
          dd = $rtoi($floor(qd + 0.5));
          dd = ((dd % 65536) + 65536) % 65536;
        end
        exp_d.push_back(dd);
        exp_ok.push_back(!tiny);
        if (tiny) nsmall++;
      end
      @(posedge clk); #1;
      if (n >= LAT - 1) begin
        int e, diff;
        bit ok;
        e = exp_d.pop_front();
        ok = exp_ok.pop_front();
        checks++;
        if (mag_ok != ok) begin failures++; $display("FAIL: n=%0d mag_ok=%0d expected %0d", n, mag_ok, ok); end
        if (ok) begin
          diff = int'(dphi) - e;
          if (diff > 32768) diff -= 65536;
          if (diff < -32768) diff += 65536;
          checks++;
          if (diff > 3 || diff < -3) begin failures++; $display("FAIL: n=%0d dphi=%0d expected %0d", n, dphi, e); end
        end
      end
    end
    checks++;
    if (nsmall == 0) begin failures++; $display("FAIL: tiny inputs never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
