// High/low resolution counter-comparator DPWM.
//
// A free-running DPWM_BITS counter defines the switching period
// (2^DPWM_BITS clocks; 256 clocks of 51.2 MHz give 200 kHz). The output c is
// high while the counter is below the duty applied in this period. Duty and
// resolution are taken only at the counter wrap, so c never glitches. With
// low_res set, the duty keeps only its LOW_RES_BITS most significant bits, so
// the converter sees 2^LOW_RES_BITS duty steps; this is how the auto-tuner
// provokes limit cycles. period_start pulses in the clock in which the new
// period begins; it is the sampling strobe for the ADC and the loop.
// The 8-bit normal and 4-bit reduced resolutions follow the source design;
// the counter architecture and the truncation are this design's choices.
module hl_dpwm #(
  parameter int unsigned DPWM_BITS    = lco_pkg::DPWM_BITS,
  parameter int unsigned LOW_RES_BITS = lco_pkg::LOW_RES_BITS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [DPWM_BITS-1:0] d,
  input  logic                 low_res,
  output logic                 c,
  output logic                 period_start,
  output logic [DPWM_BITS-1:0] duty_applied
);
  localparam logic [DPWM_BITS-1:0] LOW_MASK =
    {{LOW_RES_BITS{1'b1}}, {(DPWM_BITS-LOW_RES_BITS){1'b0}}};

  logic [DPWM_BITS-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt          <= '0;
      duty_applied <= '0;
      period_start <= 1'b0;
      c            <= 1'b0;
    end else begin
      cnt          <= cnt + 1'b1;
      period_start <= (cnt == '1);
      if (cnt == '1) begin
        duty_applied <= low_res ? (d & LOW_MASK) : d;
        c            <= ((low_res ? (d & LOW_MASK) : d) != '0);
      end else begin
        c            <= ((cnt + 1'b1) < duty_applied);
      end
    end
  end
endmodule
