// Error subtractor: e[n] = v_ref[n] - H1*v_out[n].
//
// Once per switching period (sample strobe) it takes the ADC code and the
// reference and registers their difference, saturated to a signed E_W-bit
// value. e_valid pulses for one clock in the cycle after the strobe, when e
// holds the new value. The sign convention (reference minus measurement)
// follows the controller's block diagram; the saturation is this design's
// own addition so that the error cannot wrap.
module error_subtractor #(
  parameter int unsigned ADC_W = lco_pkg::ADC_W,
  parameter int unsigned E_W   = lco_pkg::E_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  sample,
  input  logic [ADC_W-1:0]      adc_code,
  input  logic [ADC_W-1:0]      vref,
  output logic signed [E_W-1:0] e,
  output logic                  e_valid
);
  localparam logic signed [ADC_W:0] EMAX = (ADC_W+1)'(2**(E_W-1) - 1);
  localparam logic signed [ADC_W:0] EMIN = -(ADC_W+1)'(2**(E_W-1));

  logic signed [ADC_W:0] diff;
  assign diff = $signed({1'b0, vref}) - $signed({1'b0, adc_code});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e       <= '0;
      e_valid <= 1'b0;
    end else begin
      e_valid <= sample;
      if (sample) begin
        if (diff > EMAX)      e <= E_W'(EMAX);
        else if (diff < EMIN) e <= E_W'(EMIN);
        else                  e <= E_W'(diff);
      end
    end
  end
endmodule
