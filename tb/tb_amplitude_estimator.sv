// Self-checking test of the amplitude estimator. Quantised, slightly
// asymmetric sine-like limit cycles of random amplitude and period are fed
// as e[n], with a one-LSB toggle added near the peaks. The expected a_max,
// a_min and a_pp are the extremes of each half cycle, known from the way the
// signal is built. Also checks that clear drops pp_valid.
`timescale 1ns/1ps
module tb_amplitude_estimator;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic clear = 1'b0, e_valid = 1'b0, pp_valid;
  logic signed [7:0] e = '0, a_max, a_min;
  logic [8:0] a_pp;
  amplitude_estimator dut (.clk, .rst_n, .clear, .e_valid, .e, .a_max, .a_min, .a_pp, .pp_valid);
  int checks = 0, failures = 0;
  initial begin
    repeat (500000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic send(int v);
    @(posedge clk); e <= 8'(v); e_valid <= 1'b1;
    @(posedge clk); e_valid <= 1'b0;
    @(posedge clk);
  endtask
  initial begin
    int amp_p, amp_n, per, v;
    repeat (3) @(posedge clk); rst_n = 1'b1;
    for (int trial = 0; trial < 40; trial++) begin
      amp_p = $urandom_range(4, 60);
      amp_n = $urandom_range(4, 60);
      per   = 2 * $urandom_range(8, 40);
      @(posedge clk) clear <= 1'b1;
      @(posedge clk) clear <= 1'b0;
      @(posedge clk);
      checks++; if (pp_valid) begin failures++; $display("FAIL: pp_valid after clear"); end
      for (int cyc = 0; cyc < 3; cyc++) begin
        for (int k = 0; k < per; k++) begin
          // positive half: 0..amp_p, negative half: 0..-amp_n, peak held
          // three samples with a one-LSB dip in the middle
          if (k < per / 2) v = int'($floor(amp_p * $sin(3.14159265 * k / (per / 2)) + 0.5));
          else             v = -int'($floor(amp_n * $sin(3.14159265 * (k - per / 2) / (per / 2)) + 0.5));
          if (k == per / 4)         v = amp_p - 1;
          if (k == per / 4 - 1 || k == per / 4 + 1) v = amp_p;
          send(v);
        end
      end
      send(0); send(3); send(6);
      checks++;
      if (!pp_valid || a_max != 8'(amp_p) || a_min != -8'(amp_n) || int'(a_pp) != amp_p + amp_n) begin
        failures++;
        $display("FAIL: amp +%0d -%0d per %0d: a_max=%0d a_min=%0d a_pp=%0d v=%0d",
                 amp_p, amp_n, per, a_max, a_min, a_pp, pp_valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
