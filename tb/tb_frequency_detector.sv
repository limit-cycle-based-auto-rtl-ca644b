// Self-checking test of the frequency detector, driven with the counter's
// and timer's signals directly:
//  * symmetric extrema and done: f_valid with t_lc = count, halt, no retry;
//  * asymmetric extrema (a_max + a_min = +10): retry, v_ref offset -1;
//    (a_max + a_min = -10): retry, offset +1;
//  * expiry without done (T_LC = 0): retry, offset -1;
//  * MAX_TRIES (4) expiries: failed, no f_valid.
`timescale 1ns/1ps
module tb_frequency_detector;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic arm = 1'b0, expired = 1'b0, done = 1'b0, pp_valid = 1'b0;
  logic [7:0] count = '0, t_lc;
  logic signed [7:0] a_max = '0, a_min = '0, vref_ofs;
  logic retry, halt, f_valid, failed;
  frequency_detector dut (.clk, .rst_n, .arm, .expired, .done, .count, .a_max, .a_min,
                          .pp_valid, .retry, .halt, .vref_ofs, .t_lc, .f_valid, .failed);
  int checks = 0, failures = 0, n_retry = 0, n_fv = 0, n_fail = 0, n_halt = 0;
  always @(posedge clk) if (rst_n) begin
    if (retry) begin n_retry++; done <= 1'b0; end   // the counter clears on retry
    if (f_valid) n_fv++;
    if (failed)  n_fail++;
    if (halt)    n_halt++;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic do_arm(); @(posedge clk) arm <= 1'b1; @(posedge clk) arm <= 1'b0; endtask
  task automatic finish_with(int cnt, int amax, int amin);
    @(posedge clk) begin count <= 8'(cnt); a_max <= 8'(amax); a_min <= 8'(amin); pp_valid <= 1'b1; done <= 1'b1; end
    repeat (5) @(posedge clk);
  endtask
  task automatic expire(); @(posedge clk) expired <= 1'b1; @(posedge clk) expired <= 1'b0; repeat (4) @(posedge clk); endtask
  task automatic expect_counts(int r, int fv, int fl, int ofs, string what);
    checks++;
    if (n_retry != r || n_fv != fv || n_fail != fl || int'(vref_ofs) != ofs) begin
      failures++;
      $display("FAIL: %s: retry=%0d f_valid=%0d failed=%0d ofs=%0d", what, n_retry, n_fv, n_fail, vref_ofs);
    end
  endtask
  initial begin
    repeat (3) @(posedge clk); rst_n = 1'b1;
    // symmetric
    do_arm();
    finish_with(37, 12, -11);
    expect_counts(0, 1, 0, 0, "symmetric");
    checks++; if (t_lc != 8'd37 || n_halt != 1) begin failures++; $display("FAIL: t_lc %0d", t_lc); end
    done <= 1'b0;
    // asymmetric, positive then negative
    do_arm(); n_retry = 0; n_fv = 0;
    finish_with(30, 20, -10);
    expect_counts(1, 0, 0, -1, "asymmetric +");
    finish_with(30, 10, -20);
    expect_counts(2, 0, 0, 0, "asymmetric -");
    finish_with(31, 10, -10);
    expect_counts(2, 1, 0, 0, "then symmetric");
    checks++; if (t_lc != 8'd31) begin failures++; $display("FAIL: t_lc %0d", t_lc); end
    done <= 1'b0;
    // T_LC = 0 once, then a limit cycle
    do_arm(); n_retry = 0; n_fv = 0;
    expire();
    expect_counts(1, 0, 0, -1, "T_LC = 0");
    finish_with(44, 5, -5);
    expect_counts(1, 1, 0, -1, "after T_LC = 0");
    done <= 1'b0;
    // never a limit cycle
    do_arm(); n_retry = 0; n_fv = 0;
    repeat (4) expire();
    expect_counts(3, 0, 1, -3, "no limit cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
