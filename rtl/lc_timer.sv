// Measurement timer of the frequency extractor.
//
// A trigger (signal I, or a retry from the frequency detector) opens a window
// of TIMER_LEN switching periods: enable is high from the clock after the
// trigger until TIMER_LEN ticks have passed, then expired pulses for one
// clock. A new trigger restarts the window; halt closes it early without
// expired. The window gates the period counter, so a limit cycle that does
// not complete within it reads as T_LC = 0.
// The timer and its gating of the counter follow the source design; the
// window length is this design's choice (1 ms at 200 kHz, over 1.5 periods of
// an LCO down to about 1.5 kHz).
module lc_timer #(
  parameter int unsigned TIMER_LEN = 200
) (
  input  logic clk,
  input  logic rst_n,
  input  logic trigger,
  input  logic halt,
  input  logic tick,
  output logic enable,
  output logic expired
);
  localparam int unsigned TW = $clog2(TIMER_LEN + 1);
  logic [TW-1:0] left;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      left <= '0; enable <= 1'b0; expired <= 1'b0;
    end else begin
      expired <= 1'b0;
      if (trigger) begin
        left   <= TW'(TIMER_LEN);
        enable <= 1'b1;
      end else if (halt) begin
        enable <= 1'b0;
      end else if (enable && tick) begin
        left <= left - 1'b1;
        if (left == TW'(1)) begin
          enable  <= 1'b0;
          expired <= 1'b1;
        end
      end
    end
  end
endmodule
