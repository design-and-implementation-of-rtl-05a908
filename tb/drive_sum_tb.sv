// drive_sum_tb: with the switch open y = ff, with it closed y = ff + pi,
// clipped to 18 bits, one clock after the inputs. Random inputs, random
// switch position, both clipping directions.
module drive_sum_tb;
  localparam int DW = 18;
  localparam int MAXV = (1 << (DW - 1)) - 1;
  localparam int MINV = -(1 << (DW - 1));
  logic clk = 0, rst_n = 0, closed = 0;
  logic signed [DW-1:0] ff = '0, pi = '0, y;
  int checks = 0, failures = 0;

  drive_sum #(.DW(DW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nopen = 0, nclosed = 0, nsat = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 2000; n++) begin
      int f, p, e;
      bit c;
      c = $urandom_range(0, 1);
      f = int'($urandom_range(0, 2*MAXV+1)) + MINV;
      p = int'($urandom_range(0, 2*MAXV+1)) + MINV;
      if (n < 1000) begin f = f / 8; p = p / 8; end
      ff <= DW'(f); pi <= DW'(p); closed <= c;
      e = c ? f + p : f;
      if (e > MAXV) begin e = MAXV; nsat++; end
      if (e < MINV) begin e = MINV; nsat++; end
      if (c) nclosed++; else nopen++;
      @(posedge clk); #1;
      checks++;
      if (int'(y) != e) begin failures++; $display("FAIL: closed=%0d ff=%0d pi=%0d y=%0d exp %0d", c, f, p, y, e); end
    end
    checks++;
    if (nsat == 0 || nopen == 0 || nclosed == 0) begin failures++; $display("FAIL: coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
