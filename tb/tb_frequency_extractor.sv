// Self-checking test of the frequency extractor chain (comparator logic,
// counter, timer, frequency detector). A generated symmetric triangular
// limit cycle of known period P (in switching periods) must give t_lc = P.
// A constant zero error (no limit cycle) must give a T_LC = 0 retry, with
// the v_ref offset moved down, and after MAX_TRIES windows failed.
`timescale 1ns/1ps
module tb_frequency_extractor;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start_id = 1'b0, tick = 1'b0, e_valid = 1'b0, pp_valid = 1'b1;
  logic signed [7:0] e = '0, a_max = 8'sd10, a_min = -8'sd10, vref_ofs;
  logic [7:0] t_lc;
  logic f_valid, failed, retry;
  frequency_extractor dut (.clk, .rst_n, .start_id, .tick, .e_valid, .e, .a_max, .a_min,
                           .pp_valid, .t_lc, .vref_ofs, .f_valid, .failed, .retry);
  int checks = 0, failures = 0, n_fv = 0, n_fail = 0, n_retry = 0, mode_lc = 1, period = 20, ph = 0;
  always @(posedge clk) if (rst_n) begin
    if (f_valid) n_fv++;
    if (failed) n_fail++;
    if (retry) n_retry++;
  end
  // one switching period = 8 clocks: tick, then e_valid one clock later
  initial begin
    int cnt;
    cnt = 0;
    forever begin
      @(posedge clk);
      tick <= (cnt == 0);
      e_valid <= (cnt == 1);
      if (cnt == 0) begin
        if (mode_lc) begin
          // triangle from -10 to +10 and back, odd values only (never zero)
          int q;
          q = (ph < period / 2) ? ph : period - ph;
          e <= 8'(-10 + (20 * q) / (period / 2) - ((20 * q / (period / 2)) % 2 == 0 ? 1 : 0));
          ph = (ph + 1) % period;
        end else e <= '0;
      end
      cnt = (cnt + 1) % 8;
    end
  end
  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(posedge clk); rst_n = 1'b1;
    for (int k = 0; k < 6; k++) begin
      period = 2 * (8 + 7 * k);
      mode_lc = 1; n_fv = 0;
      repeat (8 * 3 * period) @(posedge clk);
      @(posedge clk) start_id <= 1'b1; @(posedge clk) start_id <= 1'b0;
      repeat (8 * 3 * period) @(posedge clk);
      checks++;
      if (n_fv != 1 || int'(t_lc) != period) begin
        failures++; $display("FAIL: period %0d: f_valid=%0d t_lc=%0d", period, n_fv, t_lc); end
    end
    mode_lc = 0; n_retry = 0; n_fail = 0;
    @(posedge clk) start_id <= 1'b1; @(posedge clk) start_id <= 1'b0;
    repeat (8 * 210) @(posedge clk);
    checks++; if (n_retry != 1 || vref_ofs != -8'sd1) begin
      failures++; $display("FAIL: T_LC=0: retries=%0d ofs=%0d", n_retry, vref_ofs); end
    repeat (8 * 210 * 4) @(posedge clk);
    checks++; if (n_fail != 1 || n_retry != 3) begin
      failures++; $display("FAIL: give-up: failed=%0d retries=%0d", n_fail, n_retry); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
