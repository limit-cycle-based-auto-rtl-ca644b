// Self-checking test of the zero-crossing comparator logic. Square-ish
// limit cycles with random half-periods, including samples of exactly zero
// at each crossing, are applied inside an enabled window. start must come at
// the first change of side and stop at the third, i.e. exactly one period
// (2 half-periods, in samples) later. Also checks that nothing is issued
// while enable is low and that a constant error gives no pulse.
`timescale 1ns/1ps
module tb_zero_cross_logic;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic arm = 1'b0, enable = 1'b0, e_valid = 1'b0, start, stop;
  logic signed [7:0] e = '0;
  zero_cross_logic dut (.clk, .rst_n, .arm, .enable, .e_valid, .e, .start, .stop);
  int checks = 0, failures = 0;
  int n_start = 0, n_stop = 0, idx = 0, start_idx = -1, stop_idx = -1;
  always @(posedge clk) if (rst_n) begin
    if (start) begin n_start++; start_idx = idx; end
    if (stop)  begin n_stop++;  stop_idx = idx; end
  end
  initial begin
    repeat (500000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic send(int v);
    @(posedge clk); e <= 8'(v); e_valid <= 1'b1;
    @(posedge clk); e_valid <= 1'b0; idx++;
    @(posedge clk);
  endtask
  initial begin
    int hp1, hp2, hp3, s;
    repeat (3) @(posedge clk); rst_n = 1'b1;
    // disabled: no output
    for (int k = 0; k < 20; k++) send((k % 4 < 2) ? 5 : -5);
    checks++; if (n_start != 0) begin failures++; $display("FAIL: output while disabled"); end
    for (int trial = 0; trial < 50; trial++) begin
      hp1 = $urandom_range(3, 30); hp2 = $urandom_range(3, 30); hp3 = $urandom_range(3, 30);
      @(posedge clk) arm <= 1'b1; enable <= 1'b1;
      @(posedge clk) arm <= 1'b0;
      n_start = 0; n_stop = 0; idx = 0;
      // constant positive level first
      for (int k = 0; k < 5; k++) send(7);
      // negative half (first sample zero), positive half, negative half
      s = idx;
      for (int k = 0; k < hp1; k++) send(k == 0 ? 0 : -int'($urandom_range(1, 20)));
      for (int k = 0; k < hp2; k++) send(k == 0 ? 0 : int'($urandom_range(1, 20)));
      for (int k = 0; k < hp3; k++) send(k == 0 ? 0 : -int'($urandom_range(1, 20)));
      send(9);
      // first crossing: first negative sample (index s + 1); third: first
      // negative sample of the last half (s + hp1 + hp2 + 1)
      checks++;
      if (n_start != 1 || n_stop != 1 || start_idx != s + 2 || stop_idx != s + hp1 + hp2 + 2) begin
        failures++;
        $display("FAIL: hp=%0d/%0d/%0d starts=%0d stops=%0d at %0d/%0d exp %0d/%0d",
                 hp1, hp2, hp3, n_start, n_stop, start_idx, stop_idx, s + 2, s + hp1 + hp2 + 2);
      end
      @(posedge clk) enable <= 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
