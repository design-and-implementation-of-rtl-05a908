// lpf_tb: checks the baseband low-pass filter.
// A step must follow y[n] = A*(1 - (1 - 2^-SHIFT)^n) within 2 LSB, reach
// 63% of the step after about 2^SHIFT samples, settle to exactly A (unity DC
// gain), and with the filter bypassed y must equal x one clock later.
module lpf_tb;
  localparam int DW = 18;
  localparam int SHIFT = 4;
  logic clk = 0, rst_n = 0, en = 1;
  logic signed [DW-1:0] x = '0, y;
  int checks = 0, failures = 0;

  lpf #(.DW(DW), .SHIFT(SHIFT)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real a, yref;
    int t63;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // step responses of several sizes and signs
    for (int s = 0; s < 4; s++) begin
      int amp;
      amp = (s == 0) ? 20000 : (s == 1) ? -8191 : (s == 2) ? 131071 : -131072;
      // start from zero
      en <= 0; x <= '0; repeat (3) @(posedge clk);
      en <= 1;
      x <= DW'(amp);
      t63 = -1;
      for (int n = 1; n <= 400; n++) begin
        @(posedge clk); #1;
        a = 1.0 - 1.0 / (2.0 ** SHIFT);
        yref = amp * (1.0 - a ** real'(n));
        if (n <= 120) check(($itor(y) - yref) <= 2.0 && (yref - $itor(y)) <= 2.0,
                            $sformatf("step %0d n=%0d y=%0d ref=%f", amp, n, y, yref));
        if (t63 < 0 && ((amp > 0 && $itor(y) >= 0.632 * amp) || (amp < 0 && $itor(y) <= 0.632 * amp))) t63 = n;
      end
      check(y == DW'(amp), $sformatf("final value %0d != %0d", y, amp));
      check(t63 >= 15 && t63 <= 17, $sformatf("63%% rise after %0d samples", t63));
    end
    // bypass: one-clock delay, no smoothing
    en <= 0;
    for (int n = 0; n < 200; n++) begin
      logic signed [DW-1:0] v;
      v = DW'($urandom);
      x <= v;
      @(posedge clk); #1;
      check(y == v, "bypass output");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
