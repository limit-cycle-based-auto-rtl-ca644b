// End-to-end test of the auto-tuning buck controller, all parameters at their
// defaults, closed around the behavioural buck/ADC model.
//
// 1. Calibration: for each of 30 operating points (R = 5..30 ohm in 5 ohm
//    steps, C = 38, 60, 90, 120, 150 uF) the controller is reset with an
//    empty table. The start-up transient is a disturbance, so it runs one
//    identification; with no valid word the search misses and it falls back
//    to the slow set. The measured a_pp and t_lc become that point's table
//    word, with coefficients chosen by capacitance (see coef_for) and the R
//    and C values as estimate codes.
// 2. Capacitor step (38 -> 150 uF at 10 ohm): after start-up tuning to the
//    38 uF word, the fast set oscillates with 150 uF; the controller must see
//    the instability, regain regulation with the slow set, re-identify and
//    settle on a 150 uF word with a small error.
// 3. Load step 2.5 W -> 8 W (10 -> 3.1 ohm): the error must return within
//    a bounded time.
// 4. References around 5 V are scanned until one gives no limit cycle in a
//    window: that window must end with T_LC = 0 and a reference nudge, and
//    the identification must still complete.
// Each table choice is checked against a nearest-word search done here from
// the tb's own copy of the table. Events (instability, identification, retry,
// table hit, table miss, low-resolution operation, dead time) are counted and
// each must occur at least once.
`timescale 1ns/1ps
module tb_lco_digital_controller;
  import lco_pkg::*;

  localparam int NPTS = 30;
  localparam int WATCHDOG_CYCLES = 40_000_000;

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
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- event counters ----------------
  int n_unstable = 0, n_start_id = 0, n_retry = 0, n_failed = 0, n_hit = 0,
      n_miss = 0, n_lowres = 0, n_deadtime = 0, n_overlap = 0, n_tlc0 = 0,
      n_sym = 0, n_normal = 0, n_regain = 0;
  always @(posedge clk) if (rst_n) begin
    if (ev_unstable) n_unstable++;
    if (ev_start_id) n_start_id++;
    if (ev_retry)    n_retry++;
    // retry causes, read from the frequency detector's inputs
    if (ev_retry && !dut.u_tuner.u_freq.done) n_tlc0++;
    if (ev_retry &&  dut.u_tuner.u_freq.done) n_sym++;
    if (adc_sample && mode == MODE_NORMAL) n_normal++;
    if (adc_sample && mode == MODE_REGAIN) n_regain++;
    if (ev_failed)   n_failed++;
    if (ev_lut_done) begin
      if (dut.u_tuner.u_lut.hit) n_hit++; else n_miss++;
    end
    if (adc_sample && low_res) n_lowres++;
    if (!gate_hs && !gate_ls)  n_deadtime++;
    if (gate_hs && gate_ls)    n_overlap++;
  end

  // ---------------- table kept by the tb ----------------
  lut_entry_t table_q [NPTS];

  function automatic real r_of(int i); return 5.0 * (i % 6 + 1); endfunction
  function automatic real c_of(int i);
    case (i / 6)
      0: return 38.0;  1: return 60.0;  2: return 90.0;
      3: return 120.0; default: return 150.0;
    endcase
  endfunction
  // Gains (Kp, Ki, Kd in 1/64 duty LSB per error LSB) chosen per capacitance
  // on the model: a = Kp+Ki+Kd, b = -Kp-2Kd, c = Kd.
  function automatic coef_t coef_for(real cap);
    coef_t k;
    if (cap < 50.0)       begin k.a = 300; k.b = -500; k.c = 210; end
    else if (cap < 75.0)  begin k.a = 200; k.b = -340; k.c = 145; end
    else                  begin k.a = 100; k.b = -170; k.c = 72;  end
    return k;
  endfunction
  function automatic int nearest(int pp, int t);
    int best = -1, bd = 1 << 30, dd;
    for (int i = 0; i < NPTS; i++) begin
      dd = ((pp > table_q[i].a_pp) ? pp - table_q[i].a_pp : table_q[i].a_pp - pp) +
           ((t > table_q[i].t_lc) ? t - table_q[i].t_lc : table_q[i].t_lc - t);
      if (dd < bd) begin bd = dd; best = i; end
    end
    return best;
  endfunction

  task automatic do_reset();
    rst_n = 1'b0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
  endtask

  task automatic wait_periods(int n);
    repeat (n) @(posedge clk iff adc_sample);
  endtask

  // waits for the end of a table search, at most max_periods
  task automatic wait_lut(int max_periods, output bit seen);
    int p;
    p = 0;
    seen = 0;
    while (p < max_periods && !seen) begin
      @(posedge clk);
      if (ev_lut_done) seen = 1;
      if (adc_sample) p++;
    end
  endtask

  // largest |e| over n periods
  task automatic max_err(int n, output int m);
    m = 0;
    repeat (n) begin
      @(posedge clk iff adc_sample);
      @(posedge clk);
      if ((e < 0 ? -int'(e) : int'(e)) > m) m = (e < 0 ? -int'(e) : int'(e));
    end
  endtask

  initial begin
    repeat (WATCHDOG_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen;
    int m, k, id0, t_start, t_end;
    vref = 8'd104;                       // 5.2 V with 50 mV steps
    slow_coef = '{a: 10'sd50, b: -10'sd80, c: 10'sd32};
    lut_wr_en = 1'b0; lut_wr_addr = '0; lut_wr_data = '0;
    c_uf = 38.0; r_ohm = 10.0;

    // ---- 1. calibration ----
    for (int i = 0; i < NPTS; i++) begin
      c_uf = c_of(i); r_ohm = r_of(i);
      do_reset();
      wait_lut(4000, seen);
      check(seen, $sformatf("calibration point %0d identified", i));
      check(!dut.u_tuner.u_lut.hit, "empty table misses");
      table_q[i].valid = 1'b1;
      table_q[i].a_pp  = a_pp;
      table_q[i].t_lc  = t_lc;
      table_q[i].coef  = coef_for(c_uf);
      table_q[i].est_r = EST_W'($rtoi(r_ohm));
      table_q[i].est_c = EST_W'($rtoi(c_uf));
      $display("cal %0d: C=%0.0f uF R=%0.0f ohm  a_pp=%0d t_lc=%0d (a_max %0d, a_min %0d, v_ref offset %0d)", i, c_uf, r_ohm, a_pp, t_lc,
               dut.u_tuner.a_max, dut.u_tuner.a_min, dut.u_tuner.ofs);
      check(t_lc > 0, "limit cycle period measured");
      wait_periods(20);
      check(mode == MODE_REGAIN, "falls back to slow set after a miss");
    end

    // ---- 2. capacitor step 38 -> 150 uF ----
    c_uf = 38.0; r_ohm = 10.0;
    do_reset();
    for (int i = 0; i < NPTS; i++) begin
      @(posedge clk);
      lut_wr_en <= 1'b1; lut_wr_addr <= 5'(i); lut_wr_data <= table_q[i];
    end
    @(posedge clk) lut_wr_en <= 1'b0;
    wait_lut(4000, seen);
    check(seen, "start-up tuning finished");
    id0 = nearest(a_pp, t_lc);
    @(posedge clk);
    check(dut.u_tuner.u_lut.hit, "table hit after start-up");
    check(est_c == table_q[id0].est_c && est_r == table_q[id0].est_r,
          $sformatf("start-up picks nearest word %0d (C=%0d R=%0d)", id0, est_c, est_r));
    check(est_c == 8'd38, $sformatf("start-up estimates C=38 uF, got %0d", est_c));
    wait_periods(20);
    check(mode == MODE_NORMAL, "normal mode with tuned set");
    wait_periods(200);
    max_err(300, m);
    check(m <= 2, $sformatf("tuned regulation at 38 uF, max |e|=%0d", m));
    k = n_unstable;
    c_uf = 150.0;
    wait_lut(6000, seen);
    check(seen, "re-tuning after capacitor step");
    check(n_unstable > k, "instability detected after capacitor step");
    id0 = nearest(a_pp, t_lc);
    @(posedge clk);
    check(est_c == table_q[id0].est_c && est_r == table_q[id0].est_r,
          $sformatf("re-tune picks nearest word %0d (C=%0d R=%0d)", id0, est_c, est_r));
    check(est_c == 8'd150, $sformatf("re-tune estimates C=150 uF, got %0d", est_c));
    wait_periods(200);
    max_err(300, m);
    check(mode == MODE_NORMAL && m <= 2, $sformatf("tuned regulation at 150 uF, max |e|=%0d", m));

    // ---- 3. load step 2.5 W -> 8 W ----
    r_ohm = 3.1;
    t_start = 0;
    max_err(50, m);
    $display("load step: max |e| = %0d", m);
    wait_periods(3000);
    max_err(300, m);
    check(m <= 2, $sformatf("regulation after load step, max |e|=%0d mode=%0d", m, mode));

    // ---- 4. no limit cycle at the first attempt ----
    // At some references a 4-bit duty level lands the output inside the ADC
    // bin of the reference, so the error stays at zero and no limit cycle
    // forms. Scan references around 5 V until one such window occurs.
    k = n_tlc0;
    id0 = n_failed;
    c_uf = 38.0; r_ohm = 10.0;
    for (int v = 95; v <= 110 && n_tlc0 == k; v++) begin
      vref = 8'(v);
      do_reset();
      wait_lut(3000, seen);
      if (n_tlc0 > k) begin
        $display("T_LC = 0 window at v_ref code %0d", v);
        check(seen || n_failed > id0,
              "identification ends (table search, or give-up) after a T_LC = 0 window");
      end
    end
    check(n_tlc0 > k, "reference nudged after T_LC = 0");

    // ---- mechanisms ----
    check(n_unstable > 0, "instability events");
    check(n_start_id > 0, "start-identification events");
    check(n_tlc0 > 0,     "T_LC = 0 retries");
    check(n_sym > 0,      "asymmetry retries");
    check(n_normal > 0,   "periods with the tuned set");
    check(n_regain > 0,   "periods with the slow set");
    check(n_hit > 0,      "table hits");
    check(n_miss > 0,     "table misses");
    check(n_lowres > 0,   "low-resolution DPWM periods");
    check(n_deadtime > 0, "dead-time intervals");
    check(n_overlap == 0, "gates never on together");
    $display("events: unstable=%0d start_id=%0d retry(T_LC=0)=%0d retry(asym)=%0d failed=%0d hit=%0d miss=%0d lowres_periods=%0d",
             n_unstable, n_start_id, n_tlc0, n_sym, n_failed, n_hit, n_miss, n_lowres);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
