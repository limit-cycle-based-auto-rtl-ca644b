// Self-checking test of the auto-tuning sequencer, with its inputs driven
// directly. It walks the sequence REGAIN -> SETTLE -> IDENTIFY -> LOOKUP ->
// NORMAL and checks at each step the mode, the coefficient set in use, the
// 4-bit resolution and reference-offset enables, the detector arm (including
// the blanking after tuning), the id_start and lut_lookup pulses and the
// fall-backs to REGAIN on a table miss, a failed identification and a new
// instability. Settle and blanking lengths are randomised.
`timescale 1ns/1ps
module tb_autotune_sequencer;
  import lco_pkg::*;
  localparam int SETTLE = 7, BLANK = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic tick = 1'b0, unstable = 1'b0, start_id = 1'b0, f_valid = 1'b0, id_failed = 1'b0;
  logic lut_done = 1'b0, lut_hit = 1'b0;
  coef_t slow_coef, lut_coef, coef;
  logic det_arm, id_start, lut_lookup, low_res, vref_en, tuned_valid;
  tuner_mode_t mode;
  autotune_sequencer #(.SETTLE_PERIODS(SETTLE), .BLANK_PERIODS(BLANK)) dut (
    .clk, .rst_n, .tick, .slow_coef, .unstable, .start_id, .f_valid, .id_failed,
    .lut_done, .lut_hit, .lut_coef, .det_arm, .id_start, .lut_lookup, .low_res,
    .vref_en, .coef, .tuned_valid, .mode);
  int checks = 0, failures = 0, n_id = 0, n_lk = 0;
  always @(posedge clk) if (rst_n) begin if (id_start) n_id++; if (lut_lookup) n_lk++; end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic pulse(ref logic s); @(negedge clk) s = 1'b1; @(negedge clk) s = 1'b0; endtask
  task automatic ticks(int n);
    repeat (n) begin
      @(negedge clk) tick = 1'b1; @(negedge clk) tick = 1'b0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
  endtask
  task automatic expect_state(tuner_mode_t m, logic arm, logic lr, logic ve, coef_t c, string what);
    checks++;
    if (mode != m || det_arm != arm || low_res != lr || vref_en != ve || coef != c) begin
      failures++;
      $display("FAIL: %s: mode=%0d arm=%b low_res=%b vref_en=%b", what, mode, det_arm, low_res, vref_en);
    end
  endtask
  initial begin
    slow_coef = '{a: 10'sd50, b: -10'sd80, c: 10'sd32};
    lut_coef  = '{a: 10'sd200, b: -10'sd340, c: 10'sd145};
    repeat (3) @(posedge clk); rst_n = 1'b1;
    @(negedge clk);
    expect_state(MODE_REGAIN, 1, 0, 0, slow_coef, "after reset");
    ticks(20);
    expect_state(MODE_REGAIN, 1, 0, 0, slow_coef, "waits for start_id");
    pulse(start_id); @(negedge clk);
    expect_state(MODE_SETTLE, 0, 1, 0, slow_coef, "settling");
    ticks(SETTLE - 1); @(negedge clk);
    checks++; if (mode != MODE_SETTLE || n_id != 0) begin failures++; $display("FAIL: settle too short"); end
    ticks(1); @(negedge clk);
    checks++; if (n_id != 1) begin failures++; $display("FAIL: id_start count %0d", n_id); end
    expect_state(MODE_IDENTIFY, 0, 1, 1, slow_coef, "identifying");
    // failed identification -> REGAIN
    pulse(id_failed); @(negedge clk);
    expect_state(MODE_REGAIN, 1, 0, 0, slow_coef, "after failed");
    // again, this time a miss
    pulse(start_id); ticks(SETTLE); pulse(f_valid); @(negedge clk);
    checks++; if (n_lk != 1) begin failures++; $display("FAIL: lookup count %0d", n_lk); end
    expect_state(MODE_LOOKUP, 0, 0, 0, slow_coef, "looking up");
    lut_hit = 1'b0; pulse(lut_done); @(negedge clk);
    expect_state(MODE_REGAIN, 1, 0, 0, slow_coef, "after miss");
    checks++; if (tuned_valid) begin failures++; $display("FAIL: tuned_valid after miss"); end
    // and a hit
    pulse(start_id); ticks(SETTLE); pulse(f_valid);
    lut_hit = 1'b1; pulse(lut_done); lut_hit = 1'b0; @(negedge clk);
    expect_state(MODE_NORMAL, 0, 0, 0, lut_coef, "tuned, blanking");
    checks++; if (!tuned_valid) begin failures++; $display("FAIL: tuned_valid low"); end
    pulse(unstable); @(negedge clk);
    expect_state(MODE_NORMAL, 0, 0, 0, lut_coef, "instability ignored while blanking");
    ticks(BLANK); @(negedge clk);
    expect_state(MODE_NORMAL, 1, 0, 0, lut_coef, "armed after blanking");
    ticks(10);
    expect_state(MODE_NORMAL, 1, 0, 0, lut_coef, "stays tuned");
    pulse(unstable); @(negedge clk);
    expect_state(MODE_REGAIN, 1, 0, 0, slow_coef, "instability -> regain");
    checks++; if (n_id != 3 || n_lk != 2) begin failures++; $display("FAIL: pulses id=%0d lookup=%0d", n_id, n_lk); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
