// Behavioural model (not synthesizable) of the converter around the digital
// controller: synchronous buck power stage, output-voltage sensing and ADC.
//
// Power stage: Vin = 12 V, L = 20 uH with 0.1 ohm winding resistance, output
// capacitor c_uf (microfarads) with 0.02 ohm ESR, resistive load r_ohm. The
// state (inductor current, capacitor voltage) is integrated with forward
// Euler once per clock of period T_CLK_NS. The switch node is at Vin while
// gate_hs is on and at 0 V otherwise (ideal, lossless commutation during the
// dead time; gate_ls is only checked by the testbench). ADC: the output voltage is quantised with a step of ADC_LSB_V
// volts (sensing gain and converter step folded together) to an 8-bit code;
// the code is refreshed every clock, so the controller's sample at
// adc_sample sees the output voltage of one clock earlier.
// c_uf and r_ohm may change at any time to model capacitor and load steps.
// Capacitance added while running is taken to be uncharged: the capacitor
// voltage drops by charge sharing to v_c * C_old / C_new.
module buck_plant_model #(
  parameter real VIN_V     = 12.0,
  parameter real L_H       = 20.0e-6,
  parameter real DCR_OHM   = 0.1,
  parameter real ESR_OHM   = 0.02,
  parameter real T_CLK_NS  = 1.0e3 / 51.2,
  parameter real ADC_LSB_V = 0.05
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       gate_hs,
  input  logic       gate_ls,
  input  logic       adc_sample,
  input  real        c_uf,
  input  real        r_ohm,
  output logic [7:0] adc_code,
  output real        v_out
);
  real i_l, v_c, v_sw, dt, i_load, code_r;
  int  n_samples = 0;   // conversions the controller has requested
  real c_prev = 0.0;

  assign v_out = v_c + ESR_OHM * (i_l - v_c / r_ohm);

  always @(posedge clk) begin
    if (!rst_n) begin
      i_l      <= 0.0;
      v_c      <= 0.0;
      c_prev   <= 0.0;
      adc_code <= 8'd0;
    end else begin
      dt = T_CLK_NS * 1.0e-9;
      if (gate_hs) v_sw = VIN_V;
      else         v_sw = 0.0;
      i_load = v_out / r_ohm;
      i_l <= i_l + (v_sw - i_l * DCR_OHM - v_out) * dt / L_H;
      // capacitance switched in is uncharged: charge is shared
      if (c_prev > 0.0 && c_uf > c_prev)
        v_c <= v_c * c_prev / c_uf;
      else
        v_c <= v_c + (i_l - i_load) * dt / (c_uf * 1.0e-6);
      c_prev <= c_uf;
      code_r = v_out / ADC_LSB_V + 0.5;
      if (code_r < 0.0)        adc_code <= 8'd0;
      else if (code_r > 255.0) adc_code <= 8'd255;
      else                     adc_code <= 8'($rtoi(code_r));
      if (adc_sample) n_samples <= n_samples + 1;
    end
  end
endmodule
