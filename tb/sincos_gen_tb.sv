// sincos_gen_tb: for a set of angles over the whole circle (all four
// quadrants and the fold boundaries), waits for valid and compares cos/sin
// with the real-valued functions scaled by 2^16 (tolerance 8 LSB). valid must
// drop when the angle changes and rise again within 2*(ITER+2) clocks.
module sincos_gen_tb;
  localparam int DW = 18, ANG_W = 16, ITER = 16;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  logic [ANG_W-1:0] teta = '0;
  logic signed [DW-1:0] cos_o, sin_o;
  logic valid;
  int checks = 0, failures = 0;

  sincos_gen #(.DW(DW), .ANG_W(ANG_W), .ITER(ITER)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [ANG_W-1:0] angles [12] = '{16'd0, 16'd16384, 16'd32768, 16'd49152, 16'd16383,
                                      16'd32767, 16'd49151, 16'd65535, 16'd5461, 16'd27307,
                                      16'd38000, 16'd60000};
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 12 + 200; n++) begin
      logic [ANG_W-1:0] a;
      real ph, ec, es;
      int wait_cyc;
      a = (n < 12) ? angles[n] : ANG_W'($urandom);
      if (a == teta) a = a + 1;
      teta <= a;
      @(posedge clk); #1;
      check(!valid, "valid must drop after an angle change");
      wait_cyc = 1;
      while (!valid && wait_cyc < 200) begin @(posedge clk); #1; wait_cyc++; end
      check(wait_cyc <= 2 * (ITER + 2), $sformatf("valid after %0d clocks", wait_cyc));
      ph = 2.0 * PI * a / 65536.0;
      ec = $cos(ph) * 65536.0;
      es = $sin(ph) * 65536.0;
      check($itor(cos_o) - ec < 8.0 && ec - $itor(cos_o) < 8.0, $sformatf("cos(%0d)=%0d exp %f", a, cos_o, ec));
      check($itor(sin_o) - es < 8.0 && es - $itor(sin_o) < 8.0, $sformatf("sin(%0d)=%0d exp %f", a, sin_o, es));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
