// ofst_comp_tb: random samples and offsets, including values that overflow
// the 18-bit range; y must equal x - ofst clipped to the range, one clock
// after x.
module ofst_comp_tb;
  localparam int DW = 18;
  localparam int MAXV = (1 << (DW - 1)) - 1;
  localparam int MINV = -(1 << (DW - 1));
  logic clk = 0, rst_n = 0;
  logic signed [DW-1:0] ofst = '0, x = '0, y;
  int checks = 0, failures = 0;

  ofst_comp #(.DW(DW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_v, nsat;
    nsat = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 1000; n++) begin
      int xv, ov;
      xv = (n < 500) ? int'($urandom_range(0, 2*8191)) - 8191 : int'($urandom_range(0, 2*MAXV+1)) + MINV;
      ov = (n % 3 == 0) ? int'($urandom_range(0, 2*MAXV+1)) + MINV : int'($urandom_range(0, 2000)) - 1000;
      x <= DW'(xv); ofst <= DW'(ov);
      exp_v = xv - ov;
      if (exp_v > MAXV) begin exp_v = MAXV; nsat++; end
      if (exp_v < MINV) begin exp_v = MINV; nsat++; end
      @(posedge clk); #1;
      checks++;
      if (int'(y) != exp_v) begin
        failures++;
        $display("FAIL: x=%0d ofst=%0d y=%0d expected %0d", xv, ov, y, exp_v);
      end
    end
    checks++;
    if (nsat == 0) begin failures++; $display("FAIL: saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
