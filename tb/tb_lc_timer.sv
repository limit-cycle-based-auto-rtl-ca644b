// Self-checking test of the measurement timer: after a trigger, enable must
// stay high for exactly TIMER_LEN (200) ticks and expired must pulse once;
// a new trigger restarts the window, halt closes it without expired.
`timescale 1ns/1ps
module tb_lc_timer;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic trigger = 1'b0, halt = 1'b0, tick = 1'b0, enable, expired;
  lc_timer dut (.clk, .rst_n, .trigger, .halt, .tick, .enable, .expired);
  int checks = 0, failures = 0, n_exp = 0, ticks_en = 0;
  always @(posedge clk) if (rst_n) begin
    if (expired) n_exp++;
    if (tick && enable) ticks_en++;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic ticks(int n);
    repeat (n) begin repeat (3) @(posedge clk); tick <= 1'b1; @(posedge clk); tick <= 1'b0; end
    repeat (2) @(posedge clk);
  endtask
  initial begin
    repeat (3) @(posedge clk); rst_n = 1'b1;
    @(posedge clk) trigger <= 1'b1; @(posedge clk) trigger <= 1'b0;
    ticks_en = 0;
    ticks(250);
    checks++; if (ticks_en != 200 || n_exp != 1 || enable) begin
      failures++; $display("FAIL: window %0d ticks, %0d expiries", ticks_en, n_exp); end
    // restart in mid-window
    @(posedge clk) trigger <= 1'b1; @(posedge clk) trigger <= 1'b0;
    ticks(100);
    @(posedge clk) trigger <= 1'b1; @(posedge clk) trigger <= 1'b0;
    ticks_en = 0;
    ticks(250);
    checks++; if (ticks_en != 200 || n_exp != 2) begin
      failures++; $display("FAIL: restarted window %0d ticks, %0d expiries", ticks_en, n_exp); end
    // halt
    @(posedge clk) trigger <= 1'b1; @(posedge clk) trigger <= 1'b0;
    ticks(50);
    @(posedge clk) halt <= 1'b1; @(posedge clk) halt <= 1'b0;
    ticks(250);
    checks++; if (enable || n_exp != 2) begin failures++; $display("FAIL: halt"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
