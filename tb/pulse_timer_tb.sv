// pulse_timer_tb: drives RF gates of several lengths and settling times and
// checks pulse_on (one clock after the gate), the single pulse_start strobe,
// the count, and that settled is high exactly in the clocks where at least
// settle_cycles have passed since the start, and never between pulses.
module pulse_timer_tb;
  localparam int CW = 20;
  logic clk = 0, rst_n = 0, rf_gate = 0;
  logic [CW-1:0] settle_cycles = '0, count;
  logic pulse_on, pulse_start, settled;
  int checks = 0, failures = 0;

  pulse_timer #(.CW(CW)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int widths [5] = '{100, 2000, 37, 5000, 1};
    int settle [5] = '{10, 1500, 60, 0, 0};
    repeat (2) @(posedge clk);
    rst_n <= 1;
    repeat (5) @(posedge clk);
    for (int p = 0; p < 5; p++) begin
      int nstart, nsettled;
      settle_cycles <= CW'(settle[p]);
      nstart = 0; nsettled = 0;
      rf_gate <= 1;
      for (int n = 0; n < widths[p]; n++) begin
        @(posedge clk); #1;
        check(pulse_on, "pulse_on during the gate");
        check(pulse_start == (n == 0), $sformatf("pulse_start at %0d", n));
        check(int'(count) == n, $sformatf("count %0d at %0d", count, n));
        check(settled == (n >= settle[p]), $sformatf("settled=%0d at %0d (settle %0d)", settled, n, settle[p]));
        if (settled) nsettled++;
      end
      rf_gate <= 0;
      repeat (20) begin
        @(posedge clk); #1;
        check(!pulse_on && !settled && !pulse_start, "quiet between pulses");
      end
      check(nsettled == ((widths[p] > settle[p]) ? widths[p] - settle[p] : 0), $sformatf("settled for %0d clocks", nsettled));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
