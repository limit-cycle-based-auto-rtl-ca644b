// Self-checking test of the incremental PID compensator.
//
// Drives random errors and random coefficient triples, one sample every 16
// clocks, and compares d with a reference model of
// u[n] = clamp(u[n-1] + a e[n] + b e[n-1] + c e[n-2], 0, 255*64), d = u >> 6,
// computed here in plain integers. Also checks that d_valid follows e_valid
// by exactly 5 clocks, and that both clamps are reached.
`timescale 1ns/1ps
module tb_pid_compensator;
  import lco_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic e_valid = 1'b0, d_valid;
  logic signed [E_W-1:0] e = '0;
  coef_t coef;
  logic [DPWM_BITS-1:0] d;

  pid_compensator dut (.clk, .rst_n, .e_valid, .e, .coef, .d, .d_valid);

  int checks = 0, failures = 0;
  int u_ref = 0, e1 = 0, e2 = 0, lat, n_lo = 0, n_hi = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ev, a, b, c;
    coef = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      if (n % 200 == 0) begin
        a = int'($urandom_range(0, 400)) - 100;
        b = -int'($urandom_range(0, 500));
        c = int'($urandom_range(0, 511)) - 200;
      end
      ev = (n % 400 < 100) ? 100 : ((n % 400 < 200) ? -100 : int'($urandom_range(0, 40)) - 20);
      @(posedge clk);
      e <= E_W'(ev);
      coef <= '{a: COEF_W'(a), b: COEF_W'(b), c: COEF_W'(c)};
      e_valid <= 1'b1;
      @(posedge clk);
      e_valid <= 1'b0;
      lat = 0;
      while (!d_valid && lat < 20) begin @(posedge clk); lat++; end
      u_ref = u_ref + a * ev + b * e1 + c * e2;
      if (u_ref < 0) begin u_ref = 0; n_lo++; end
      if (u_ref > 255 * 64) begin u_ref = 255 * 64; n_hi++; end
      e2 = e1; e1 = ev;
      checks++;
      if (lat != 6) begin failures++; $display("FAIL: latency %0d", lat - 1); end
      checks++;
      if (int'(d) != u_ref / 64) begin
        failures++;
        if (failures < 10) $display("FAIL: n=%0d d=%0d expected %0d", n, d, u_ref / 64);
      end
      repeat (10) @(posedge clk);
    end
    checks++;
    if (n_lo == 0 || n_hi == 0) begin failures++; $display("FAIL: clamps not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
