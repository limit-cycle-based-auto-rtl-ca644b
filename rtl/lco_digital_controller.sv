// Digital controller of a buck converter with limit-cycle based auto-tuning.
//
// Closed loop, one sample per switching period: the ADC code of the output
// voltage is subtracted from the reference (plus the auto-tuner's offset),
// the programmable PID turns the error into a duty command, the high/low
// resolution DPWM turns it into the PWM signal c(t), and the dead-time block
// drives the two switches. The auto-tuner watches the error, and after a
// disturbance re-identifies the plant from a provoked limit cycle and reloads
// the PID coefficients from its tables.
// Clock: 2^DPWM_BITS clocks per switching period (51.2 MHz for 200 kHz).
// adc_sample pulses at the start of each period; adc_code must hold that
// period's conversion by the next adc_sample (it is taken with the strobe
// and used for the following duty update). The power stage, the sensing gain
// and the ADC are outside this module.
// The loop structure follows the source design's system diagram.
module lco_digital_controller #(
  parameter int unsigned DT_CYCLES      = 4,
  parameter int unsigned ACC_FRAC       = 6,
  parameter int unsigned E_DIST         = 16,
  parameter int unsigned E_REG          = 2,
  parameter int unsigned N_REG          = 64,
  parameter int unsigned SETTLE_PERIODS = 100,
  parameter int unsigned TIMER_LEN      = 200,
  parameter int unsigned SYM_TOL        = 1,
  parameter int unsigned MAX_TRIES      = 4,
  parameter int unsigned HYST           = 2
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic [lco_pkg::ADC_W-1:0]              adc_code,
  input  logic [lco_pkg::ADC_W-1:0]              vref,
  input  lco_pkg::coef_t                         slow_coef,
  input  logic                                   lut_wr_en,
  input  logic [$clog2(lco_pkg::LUT_DEPTH)-1:0]  lut_wr_addr,
  input  lco_pkg::lut_entry_t                    lut_wr_data,
  output logic                                   adc_sample,
  output logic                                   gate_hs,
  output logic                                   gate_ls,
  output logic [lco_pkg::DPWM_BITS-1:0]          duty,
  output logic                                   low_res,
  output logic signed [lco_pkg::E_W-1:0]         e,
  output logic [lco_pkg::EST_W-1:0]              est_r,
  output logic [lco_pkg::EST_W-1:0]              est_c,
  output logic                                   tuned_valid,
  output lco_pkg::tuner_mode_t                   mode,
  output logic [lco_pkg::E_W:0]                  a_pp,
  output logic [lco_pkg::CNT_W-1:0]              t_lc,
  output logic                                   ev_unstable,
  output logic                                   ev_start_id,
  output logic                                   ev_retry,
  output logic                                   ev_failed,
  output logic                                   ev_lut_done
);
  import lco_pkg::*;

  logic                  e_valid, d_valid, c;
  logic [DPWM_BITS-1:0]  d;
  logic signed [E_W-1:0] vref_ofs;
  logic [ADC_W-1:0]      vref_eff;
  logic signed [ADC_W+1:0] vref_sum;
  coef_t                 coef;

  // reference plus offset, clamped to the code range
  always_comb begin
    vref_sum = $signed({2'b00, vref}) + (ADC_W+2)'(vref_ofs);
    if (vref_sum < 0)                            vref_eff = '0;
    else if (vref_sum > $signed({2'b00, {ADC_W{1'b1}}})) vref_eff = '1;
    else                                         vref_eff = vref_sum[ADC_W-1:0];
  end

  error_subtractor #(.ADC_W(ADC_W), .E_W(E_W)) u_err (
    .clk, .rst_n, .sample(adc_sample), .adc_code, .vref(vref_eff), .e, .e_valid
  );

  pid_compensator #(.E_W(E_W), .DPWM_BITS(DPWM_BITS), .ACC_FRAC(ACC_FRAC)) u_pid (
    .clk, .rst_n, .e_valid, .e, .coef, .d, .d_valid
  );

  hl_dpwm #(.DPWM_BITS(DPWM_BITS), .LOW_RES_BITS(LOW_RES_BITS)) u_dpwm (
    .clk, .rst_n, .d, .low_res, .c, .period_start(adc_sample), .duty_applied(duty)
  );

  dead_time #(.DT_CYCLES(DT_CYCLES)) u_dt (
    .clk, .rst_n, .c, .gate_hs, .gate_ls
  );

  auto_tuner #(.E_DIST(E_DIST), .E_REG(E_REG), .N_REG(N_REG),
               .SETTLE_PERIODS(SETTLE_PERIODS), .TIMER_LEN(TIMER_LEN),
               .SYM_TOL(SYM_TOL), .MAX_TRIES(MAX_TRIES), .HYST(HYST)) u_tuner (
    .clk, .rst_n, .tick(adc_sample), .e_valid, .e, .slow_coef,
    .lut_wr_en, .lut_wr_addr, .lut_wr_data, .coef, .low_res, .vref_ofs,
    .est_r, .est_c, .tuned_valid, .mode, .a_pp, .t_lc,
    .ev_unstable, .ev_start_id, .ev_retry, .ev_failed, .ev_lut_done
  );
endmodule
