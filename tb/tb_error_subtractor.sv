// Self-checking test of the error subtractor: random ADC codes and
// references, including the saturation corners, compared with
// clamp(vref - adc, -128, 127); e_valid must follow sample by one clock.
`timescale 1ns/1ps
module tb_error_subtractor;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic sample = 1'b0, e_valid;
  logic [7:0] adc_code = '0, vref = '0;
  logic signed [7:0] e;
  error_subtractor dut (.clk, .rst_n, .sample, .adc_code, .vref, .e, .e_valid);
  int checks = 0, failures = 0;
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int exp_e, n_sat = 0;
    repeat (2) @(posedge clk); rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      @(posedge clk);
      adc_code <= (n < 4) ? ((n % 2) ? 8'd255 : 8'd0) : 8'($urandom);
      vref     <= (n < 4) ? ((n % 2) ? 8'd0 : 8'd255) : 8'($urandom);
      sample   <= 1'b1;
      @(posedge clk); sample <= 1'b0;
      @(posedge clk);
      exp_e = int'(vref) - int'(adc_code);
      if (exp_e > 127)  begin exp_e = 127;  n_sat++; end
      if (exp_e < -128) begin exp_e = -128; n_sat++; end
      checks++;
      if (int'(e) != exp_e || !e_valid) begin
        failures++; $display("FAIL: vref=%0d adc=%0d e=%0d exp=%0d v=%0d", vref, adc_code, e, exp_e, e_valid);
      end
    end
    checks++; if (n_sat < 4) begin failures++; $display("FAIL: saturation not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
