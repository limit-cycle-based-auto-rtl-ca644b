// Self-checking test of the limit-cycle period counter: random numbers of
// ticks between start and stop must be returned as count with done; count
// reads 0 before stop; ticks before start or after stop are ignored, and
// dropping enable stops the count.
`timescale 1ns/1ps
module tb_lc_counter;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic clear = 1'b0, tick = 1'b0, enable = 1'b0, start = 1'b0, stop = 1'b0, done;
  logic [7:0] count;
  lc_counter dut (.clk, .rst_n, .clear, .tick, .enable, .start, .stop, .count, .done);
  int checks = 0, failures = 0;
  initial begin
    repeat (500000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic ticks(int n);
    repeat (n) begin repeat (2) @(posedge clk); tick <= 1'b1; @(posedge clk); tick <= 1'b0; end
  endtask
  task automatic pulse_start(); @(posedge clk) start <= 1'b1; @(posedge clk) start <= 1'b0; endtask
  task automatic pulse_stop();  @(posedge clk) stop  <= 1'b1; @(posedge clk) stop  <= 1'b0; endtask
  initial begin
    int n;
    repeat (3) @(posedge clk); rst_n = 1'b1;
    for (int trial = 0; trial < 100; trial++) begin
      n = $urandom_range(1, 250);
      @(posedge clk) clear <= 1'b1; enable <= 1'b1;
      @(posedge clk) clear <= 1'b0;
      ticks($urandom_range(0, 5));          // before start: ignored
      pulse_start();
      ticks(n);
      @(posedge clk);
      checks++; if (count != 0 || done) begin failures++; $display("FAIL: count before stop"); end
      pulse_stop();
      ticks(7);                              // after stop: ignored
      @(posedge clk);
      checks++; if (!done || int'(count) != n) begin
        failures++; $display("FAIL: n=%0d count=%0d done=%0d", n, count, done); end
    end
    // enable low stops the count
    @(posedge clk) clear <= 1'b1; @(posedge clk) clear <= 1'b0;
    pulse_start(); ticks(10);
    @(posedge clk) enable <= 1'b0;
    ticks(10); pulse_stop();
    @(posedge clk);
    checks++; if (done) begin failures++; $display("FAIL: stop accepted while disabled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
