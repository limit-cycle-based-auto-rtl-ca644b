// Self-checking test of the auto-tuner with a synthetic error signal (no
// plant). Three table words are loaded. A large error arms the instability
// detector; a quiet error then starts identification. During identification
// the error is a symmetric triangular limit cycle of chosen peak-to-peak
// amplitude and period, so the tuner must measure both, pick the nearest
// word and return to normal operation with its coefficients. A second run
// begins identification with a flat error (no limit cycle): a T_LC = 0 retry
// with a negative reference offset is expected before the limit cycle is
// applied and measured. Finally a new disturbance must send the tuner back to
// the slow set.
`timescale 1ns/1ps
module tb_auto_tuner;
  import lco_pkg::*;
  localparam int PER = 8;   // clocks per switching period in this test
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic tick = 1'b0, e_valid = 1'b0, lut_wr_en = 1'b0;
  logic signed [E_W-1:0] e = '0, vref_ofs;
  logic [LUT_AW-1:0] lut_wr_addr = '0;
  lut_entry_t lut_wr_data = '0;
  coef_t slow_coef, coef;
  logic low_res, tuned_valid, ev_unstable, ev_start_id, ev_retry, ev_failed, ev_lut_done;
  logic [EST_W-1:0] est_r, est_c;
  tuner_mode_t mode;
  logic [E_W:0] a_pp;
  logic [CNT_W-1:0] t_lc;
  auto_tuner dut (.clk, .rst_n, .tick, .e_valid, .e, .slow_coef, .lut_wr_en, .lut_wr_addr,
                  .lut_wr_data, .coef, .low_res, .vref_ofs, .est_r, .est_c, .tuned_valid,
                  .mode, .a_pp, .t_lc, .ev_unstable, .ev_start_id, .ev_retry, .ev_failed,
                  .ev_lut_done);
  int checks = 0, failures = 0;
  int n_unst = 0, n_sid = 0, n_retry = 0, n_fail = 0, n_done = 0, min_ofs = 0, n_lowres = 0;
  int pp_at_done = 0, wave = 0, noise = 1, level = 0, amp = 9, period = 40, ph = 0;
  always @(posedge clk) if (rst_n) begin
    if (ev_unstable) n_unst++;
    if (ev_start_id) n_sid++;
    if (ev_retry)    n_retry++;
    if (ev_failed)   n_fail++;
    if (ev_lut_done) begin n_done++; pp_at_done = int'(a_pp); end
    if (int'(vref_ofs) < min_ofs) min_ofs = int'(vref_ofs);
    if (tick && low_res) n_lowres++;
  end
  initial begin
    int cnt;
    cnt = 0;
    forever begin
      @(posedge clk);
      tick    <= (cnt == 0);
      e_valid <= (cnt == 1);
      if (cnt == 0) begin
        if (wave != 0) begin
          int q, v;
          q = (ph < period / 2) ? ph : period - ph;
          v = -amp + (2 * amp * q) / (period / 2);
          if (v == 0) v = 1;
          e <= E_W'(v);
          ph = (ph + 1) % period;
        end else e <= E_W'(level + (noise != 0 ? int'($urandom_range(0, 2)) - 1 : 0));
      end
      cnt = (cnt + 1) % PER;
    end
  end
  initial begin
    repeat (5000000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic periods(int n); repeat (n * PER) @(posedge clk); endtask
  task automatic write_word(int addr, int pp, int t, int ca, int cb, int cc, int r, int c);
    lut_entry_t w;
    w = '0; w.valid = 1'b1; w.a_pp = (E_W+1)'(pp); w.t_lc = CNT_W'(t);
    w.coef.a = COEF_W'(ca); w.coef.b = COEF_W'(cb); w.coef.c = COEF_W'(cc);
    w.est_r = EST_W'(r); w.est_c = EST_W'(c);
    @(negedge clk) begin lut_wr_en = 1'b1; lut_wr_addr = LUT_AW'(addr); lut_wr_data = w; end
    @(negedge clk) lut_wr_en = 1'b0;
  endtask
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (mode=%0d a_pp=%0d t_lc=%0d)", what, mode, a_pp, t_lc); end
  endtask
  task automatic wait_lut_done(int max_periods);
    int n0;
    n0 = n_done;
    for (int i = 0; i < max_periods * PER && n_done == n0; i++) @(posedge clk);
  endtask
  task automatic disturb_then_quiet();
    wave = 0; level = 20; periods(10);
    level = 0; periods(70);
  endtask
  initial begin
    slow_coef = '{a: 10'sd50, b: -10'sd80, c: 10'sd32};
    repeat (3) @(posedge clk); rst_n = 1'b1;
    write_word(3,  18, 30, 300, -500, 210, 10, 38);
    write_word(11, 18, 50, 200, -340, 145, 10, 90);
    write_word(20, 36, 30, 100, -170,  72, 25, 38);
    check(mode == MODE_REGAIN && coef == slow_coef, "starts on the slow set");
    // run 1: limit cycle with pp 18, period 50
    amp = 9; period = 50;
    disturb_then_quiet();
    check(n_unst > 0 && n_sid == 1, "disturbance then regulation start identification");
    check(mode == MODE_SETTLE && low_res, "settling at low resolution");
    ph = 0; wave = 1;
    wait_lut_done(100 + 4 * period);
    wave = 0; level = 0;
    periods(2);
    check(n_done == 1 && mode == MODE_NORMAL && tuned_valid, "tuned");
    check(int'(t_lc) == 50 && pp_at_done == 18, "measured the limit cycle");
    check(coef.a == 10'sd200 && est_c == 8'd90 && est_r == 8'd10, "picked the nearest word");
    check(!low_res && vref_ofs == '0, "back at full resolution, no offset");
    // run 2: large amplitude short period, starting with no limit cycle
    wave = 0;
    periods(110);                        // past the blanking after tuning
    n_sid = 0; n_retry = 0; min_ofs = 0;
    disturb_then_quiet();
    noise = 0;
    check(mode == MODE_REGAIN || mode == MODE_SETTLE, "instability sends back to the slow set");
    check(coef == slow_coef, "slow set in use");
    periods(100 + 210);                  // settle, then a whole window without oscillation
    check(n_retry >= 1 && min_ofs < 0 && mode == MODE_IDENTIFY, "T_LC = 0 retry moved the reference");
    amp = 18; period = 30; ph = 0; wave = 1;
    wait_lut_done(4 * period + 40);
    wave = 0; level = 0;
    periods(2);
    check(mode == MODE_NORMAL && coef.a == 10'sd100 && est_r == 8'd25, "second tuning");
    check(int'(t_lc) == 30 && pp_at_done == 36, "measured the second limit cycle");
    check(n_fail == 0 && n_lowres > 0, "no failure, low resolution used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
