// Self-checking test of the instability detector. A sequence of error
// samples (quiet, a disturbance above E_DIST, a ringing decay, then quiet)
// is applied; a model counts the expected unstable pulses and the sample at
// which start_id must fire (N_REG = 64 quiet samples after the disturbance).
// Also checks that no start_id comes without a disturbance and that arm = 0
// clears the detector.
`timescale 1ns/1ps
module tb_instability_detector;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic e_valid = 1'b0, arm = 1'b1, unstable, regulated, start_id;
  logic signed [7:0] e = '0;
  instability_detector dut (.clk, .rst_n, .e_valid, .e, .arm, .unstable, .regulated, .start_id);
  int checks = 0, failures = 0;
  int n_unst = 0, n_start = 0, start_at = -1;
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) if (rst_n) begin
    if (unstable) n_unst++;
    if (start_id) n_start++;
  end
  task automatic send(int v);
    @(posedge clk); e <= 8'(v); e_valid <= 1'b1;
    @(posedge clk); e_valid <= 1'b0;
    repeat (3) @(posedge clk);
  endtask
  initial begin
    int exp_unst, quiet, exp_start_n, v;
    repeat (3) @(posedge clk); rst_n = 1'b1;
    // quiet: small errors only, no disturbance, so no start_id
    for (int n = 0; n < 200; n++) send(int'($urandom_range(0, 4)) - 2);
    checks++; if (n_start != 0 || n_unst != 0) begin failures++; $display("FAIL: output without disturbance"); end
    checks++; if (!regulated) begin failures++; $display("FAIL: regulated not set"); end
    // disturbance and decay
    exp_unst = 0; quiet = 0; exp_start_n = -1;
    for (int n = 0; n < 300; n++) begin
      v = (n < 40) ? int'(60.0 * $cos(n * 0.8) * (40 - n) / 40.0) : int'($urandom_range(0, 4)) - 2;
      send(v);
      if (v > int'(dut.E_DIST) || v < -int'(dut.E_DIST)) exp_unst++;
      if (v <= 2 && v >= -2) quiet++; else quiet = 0;
      if (quiet == 64 && exp_start_n < 0) exp_start_n = n;
      if (n_start > 0 && start_at < 0) start_at = n;
    end
    checks++; if (n_unst != exp_unst) begin failures++; $display("FAIL: unstable %0d exp %0d", n_unst, exp_unst); end
    checks++; if (n_start != 1) begin failures++; $display("FAIL: start_id count %0d", n_start); end
    checks++; if (start_at != exp_start_n) begin failures++; $display("FAIL: start_id at %0d exp %0d", start_at, exp_start_n); end
    // arm low clears the memory of a disturbance
    send(50);
    @(posedge clk) arm <= 1'b0;
    for (int n = 0; n < 100; n++) send(0);
    @(posedge clk) arm <= 1'b1;
    for (int n = 0; n < 100; n++) send(0);
    checks++; if (n_start != 1) begin failures++; $display("FAIL: start_id after disarm"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
