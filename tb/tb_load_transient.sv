// Load-transient comparison at the top level, all parameters at their
// defaults: a 2.5 W -> 8 W load step at 5 V (10 ohm -> 3.125 ohm, 38 uF) is
// applied twice to the closed loop around the behavioural buck model.
//  A. with an empty coefficient table: the start-up identification misses,
//     so the controller keeps the slow "regain stability" set, the one a
//     fixed-gain design would have to use everywhere;
//  B. with one valid table word holding the fast 38 uF set: start-up tuning
//     hits it and the step is taken in normal mode.
// For each run the peak |e| and the recovery time (switching periods until
// |e| <= 2 LSB holds for 32 periods) are measured. The tuned loop must stay
// in normal mode (the step must not trip the instability detector), recover
// faster and with no larger peak than the slow one.
`timescale 1ns/1ps
module tb_load_transient;
  import lco_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #(1000.0 / 51.2 / 2.0) clk = ~clk;

  logic [ADC_W-1:0] adc_code, vref;
  coef_t            slow_coef;
  logic             lut_wr_en;
  logic [$clog2(LUT_DEPTH)-1:0] lut_wr_addr;
  lut_entry_t       lut_wr_data;
  logic adc_sample, gate_hs, gate_ls, low_res, tuned_valid;
  logic [DPWM_BITS-1:0] duty;
  logic signed [E_W-1:0] e;
  logic [EST_W-1:0] est_r, est_c;
  tuner_mode_t mode;
  logic [E_W:0] a_pp;
  logic [CNT_W-1:0] t_lc;
  logic ev_unstable, ev_start_id, ev_retry, ev_failed, ev_lut_done;
  real c_uf, r_ohm, v_out;

  lco_digital_controller dut (
    .clk, .rst_n, .adc_code, .vref, .slow_coef, .lut_wr_en, .lut_wr_addr,
    .lut_wr_data, .adc_sample, .gate_hs, .gate_ls, .duty, .low_res, .e,
    .est_r, .est_c, .tuned_valid, .mode, .a_pp, .t_lc, .ev_unstable,
    .ev_start_id, .ev_retry, .ev_failed, .ev_lut_done
  );

  buck_plant_model plant (
    .clk, .rst_n, .gate_hs, .gate_ls, .adc_sample, .c_uf, .r_ohm, .adc_code,
    .v_out
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_periods(int n);
    repeat (n) @(posedge clk iff adc_sample);
  endtask

  task automatic wait_lut(int max_periods, output bit seen);
    int p;
    p = 0; seen = 0;
    while (p < max_periods && !seen) begin
      @(posedge clk);
      if (ev_lut_done) seen = 1;
      if (adc_sample) p++;
    end
  endtask

  // applies the step and measures peak |e| and recovery time
  task automatic step_response(output int peak, output int rec, output bit left_normal);
    int quiet, a;
    tuner_mode_t m0;
    m0 = mode;
    peak = 0; rec = -1; quiet = 0; left_normal = 0;
    r_ohm = 3.125;
    for (int p = 0; p < 3000 && rec < 0; p++) begin
      @(posedge clk iff adc_sample);
      @(posedge clk);
      a = (e < 0) ? -int'(e) : int'(e);
      if (a > peak) peak = a;
      if (mode != m0) left_normal = 1;
      quiet = (a <= 2) ? quiet + 1 : 0;
      if (quiet == 32) rec = p - 31;
    end
  endtask

  initial begin
    bit seen, left_a, left_b;
    int peak_a, rec_a, peak_b, rec_b;
    lut_entry_t w;
    vref = 8'd104;
    slow_coef = '{a: 10'sd50, b: -10'sd80, c: 10'sd32};
    lut_wr_en = 1'b0; lut_wr_addr = '0; lut_wr_data = '0;
    c_uf = 38.0; r_ohm = 10.0;

    // ---- A: slow set ----
    repeat (4) @(posedge clk); rst_n = 1'b1;
    wait_lut(4000, seen);
    check(seen && !dut.u_tuner.u_lut.hit, "empty table: start-up search misses");
    wait_periods(1500);
    check(mode == MODE_REGAIN, "slow set in use");
    step_response(peak_a, rec_a, left_a);
    $display("slow set:  peak |e| = %0d LSB, recovery %0d periods", peak_a, rec_a);
    check(rec_a > 0, "slow set recovers");

    // ---- B: tuned set ----
    r_ohm = 10.0;
    rst_n = 1'b0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    w = '0;
    w.valid = 1'b1; w.a_pp = 9'd8; w.t_lc = 8'd20;
    w.coef = '{a: 10'sd300, b: -10'sd500, c: 10'sd210};
    w.est_r = 8'd10; w.est_c = 8'd38;
    @(posedge clk) begin lut_wr_en <= 1'b1; lut_wr_addr <= '0; lut_wr_data <= w; end
    @(posedge clk) lut_wr_en <= 1'b0;
    wait_lut(4000, seen);
    check(seen, "start-up tuning finished");
    wait_periods(1500);
    check(mode == MODE_NORMAL && tuned_valid && est_c == 8'd38, "tuned set in use");
    step_response(peak_b, rec_b, left_b);
    $display("tuned set: peak |e| = %0d LSB, recovery %0d periods", peak_b, rec_b);
    check(rec_b > 0, "tuned set recovers");
    check(!left_b, "load step handled in normal mode");
    check(rec_b < rec_a, $sformatf("tuned recovery (%0d) faster than slow (%0d)", rec_b, rec_a));
    check(peak_b <= peak_a, $sformatf("tuned peak (%0d) not above slow peak (%0d)", peak_b, peak_a));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
