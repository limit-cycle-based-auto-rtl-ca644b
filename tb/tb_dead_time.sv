// Self-checking test of the dead-time generator. Random PWM pulses of 1 to
// 40 clocks drive c; a reference model of the expected gates (a gate is on
// when c has held its level for more than DT_CYCLES clocks) is compared each
// clock, and the gates must never be on together.
`timescale 1ns/1ps
module tb_dead_time;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic c = 1'b0, gate_hs, gate_ls;
  dead_time dut (.clk, .rst_n, .c, .gate_hs, .gate_ls);
  int checks = 0, failures = 0, n_dead = 0;
  int held = 0;      // clocks c has held its level, as seen by the model
  logic c_q = 1'b0, exp_hs = 1'b0, exp_ls = 1'b0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // Model of the registers, stepped at each falling edge from the values the
  // next rising edge will see (c only changes at rising edges).
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (gate_hs !== exp_hs || gate_ls !== exp_ls) begin
      failures++;
      if (failures < 10) $display("FAIL: c=%0d hs=%0d/%0d ls=%0d/%0d", c, gate_hs, exp_hs, gate_ls, exp_ls);
    end
    if (gate_hs && gate_ls) begin failures++; $display("FAIL: overlap"); end
    if (!gate_hs && !gate_ls) n_dead++;
    exp_hs = c && (c == c_q) && (held == 4);
    exp_ls = !c && (c == c_q) && (held == 4);
    if (c != c_q) held = 0; else if (held < 4) held++;
    c_q = c;
  end
  initial begin
    repeat (3) @(posedge clk); rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      repeat ($urandom_range(1, 40)) @(posedge clk);
      c <= ~c;
    end
    checks++; if (n_dead == 0) begin failures++; $display("FAIL: no dead time seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
