// Self-checking test of the high/low resolution DPWM. For random duty
// commands in both resolutions it counts the high clocks of c in each
// 256-clock period and compares them with d (8 bits) or d with its 4 LSBs
// cleared (4 bits), checks that period_start comes every 256 clocks and
// that a change of d in mid-period only takes effect at the next period.
`timescale 1ns/1ps
module tb_hl_dpwm;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [7:0] d = '0, duty_applied;
  logic low_res = 1'b0, c, period_start;
  hl_dpwm dut (.clk, .rst_n, .d, .low_res, .c, .period_start, .duty_applied);
  int checks = 0, failures = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int highs, len, exp_h;
    logic [7:0] dd; logic lr;
    repeat (3) @(posedge clk); rst_n = 1'b1;
    @(negedge clk iff period_start);
    for (int n = 0; n < 300; n++) begin
      dd = (n == 0) ? 8'd0 : (n == 1) ? 8'd255 : 8'($urandom);
      lr = (n % 3 == 2);
      d = dd; low_res = lr;
      // wait until the next period begins: the new duty applies from there
      @(negedge clk iff period_start);
      d = ~dd;                       // mid-period change, must not show
      highs = 0; len = 0;
      do begin
        if (c) highs++;
        len++;
        @(negedge clk);
      end while (!period_start);
      exp_h = lr ? int'(dd & 8'hF0) : int'(dd);
      checks++;
      if (highs != exp_h) begin failures++; $display("FAIL: d=%0d lr=%0d highs=%0d exp=%0d", dd, lr, highs, exp_h); end
      checks++;
      if (len != 256) begin failures++; $display("FAIL: period %0d clocks", len); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
