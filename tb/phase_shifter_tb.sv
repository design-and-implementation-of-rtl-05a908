// phase_shifter_tb: rotates random I/Q samples by random angles whose
// cos/sin are computed here, and compares with the real-valued rotation,
// rounded and clipped (tolerance 1 LSB), two clocks after the input.
// Also checks that the magnitude is kept.
module phase_shifter_tb;
  localparam int DW = 18;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  logic signed [DW-1:0] cos_i = '0, sin_i = '0, x_i = '0, x_q = '0, y_i, y_q;
  int checks = 0, failures = 0;

  phase_shifter #(.DW(DW)) dut (.*);
  always #5 clk = ~clk;

  real exp_i [$], exp_q [$];

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real clip(input real v);
    if (v > 131071.0) return 131071.0;
    if (v < -131072.0) return -131072.0;
    return v;
  endfunction

  initial begin
    int nsat = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 2000 + 2; n++) begin
      if (n < 2000) begin
        real ph, c, s, xi, xq;
        int ci, si, amp;
        ph = 2.0 * PI * $urandom_range(0, 65535) / 65536.0;
        ci = $rtoi($floor($cos(ph) * 65536.0 + 0.5));
        si = $rtoi($floor($sin(ph) * 65536.0 + 0.5));
        amp = (n < 1500) ? 60000 : 131071;
        begin
          int ri, rq;
          ri = int'($urandom_range(0, 2*amp)) - amp;
          rq = int'($urandom_range(0, 2*amp)) - amp;
          xi = ri;
          xq = rq;
        end
        cos_i <= DW'(ci); sin_i <= DW'(si);
        x_i <= DW'($rtoi(xi)); x_q <= DW'($rtoi(xq));
        c = ci / 65536.0; s = si / 65536.0;
        exp_i.push_back(clip(xi * c - xq * s));
        exp_q.push_back(clip(xi * s + xq * c));
        if (xi * c - xq * s > 131071.0 || xi * c - xq * s < -131072.0) nsat++;
      end
      @(posedge clk); #1;
      if (n >= 1) begin
        real ei, eq;
        ei = exp_i.pop_front(); eq = exp_q.pop_front();
        checks++;
        if ($itor(y_i) - ei > 1.0 || ei - $itor(y_i) > 1.0 || $itor(y_q) - eq > 1.0 || eq - $itor(y_q) > 1.0) begin
          failures++;
          $display("FAIL: n=%0d y=(%0d,%0d) expected (%f,%f)", n, y_i, y_q, ei, eq);
        end
      end
      if (n == 0) begin
        // nothing out yet: a one-clock pipeline would already show it
      end
      if (exp_i.size() == 0 && n >= 2000) break;
    end
    checks++;
    if (nsat == 0) begin failures++; $display("FAIL: clipping never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
