// Limit-cycle auto-tuner.
//
// Watches the error e[n] and sets the compensator coefficients, the DPWM
// resolution and a reference offset. The instability detector flags
// disturbances and issues I once regulation returns; the sequencer then cuts
// the DPWM resolution, and the amplitude estimator (A_max, A_min, a_pp) and
// the frequency extractor (T_LC) measure the resulting limit cycle. The
// coefficient tables are searched with the two features and the chosen
// coefficients and R/C codes are applied.
// Interface: e/e_valid once per switching period, tick at each period start;
// slow_coef is the safe low-gain set; the table is loaded through
// lut_wr_en/lut_wr_addr/lut_wr_data. Status outputs (mode, a_pp, t_lc and the
// event pulses) let the system observe each run.
// The structure follows the source design's auto-tuner block diagram.
module auto_tuner #(
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
  input  logic                                   tick,
  input  logic                                   e_valid,
  input  logic signed [lco_pkg::E_W-1:0]         e,
  input  lco_pkg::coef_t                         slow_coef,
  input  logic                                   lut_wr_en,
  input  logic [$clog2(lco_pkg::LUT_DEPTH)-1:0]  lut_wr_addr,
  input  lco_pkg::lut_entry_t                    lut_wr_data,
  output lco_pkg::coef_t                         coef,
  output logic                                   low_res,
  output logic signed [lco_pkg::E_W-1:0]         vref_ofs,
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

  logic det_arm, regulated, id_start, lut_lookup, vref_en, f_valid, pp_valid;
  logic lut_hit, lut_busy;
  logic signed [E_W-1:0] a_max, a_min, ofs;
  coef_t lut_coef;

  instability_detector #(.E_W(E_W), .E_DIST(E_DIST), .E_REG(E_REG), .N_REG(N_REG)) u_det (
    .clk, .rst_n, .e_valid, .e, .arm(det_arm),
    .unstable(ev_unstable), .regulated, .start_id(ev_start_id)
  );

  amplitude_estimator #(.E_W(E_W), .HYST(HYST)) u_amp (
    .clk, .rst_n, .clear(id_start | ev_retry), .e_valid, .e,
    .a_max, .a_min, .a_pp, .pp_valid
  );

  frequency_extractor #(.E_W(E_W), .CNT_W(CNT_W), .TIMER_LEN(TIMER_LEN),
                        .SYM_TOL(SYM_TOL), .MAX_TRIES(MAX_TRIES)) u_freq (
    .clk, .rst_n, .start_id(id_start), .tick, .e_valid, .e, .a_max, .a_min,
    .pp_valid, .t_lc, .vref_ofs(ofs), .f_valid, .failed(ev_failed),
    .retry(ev_retry)
  );

  coef_lut #(.LUT_DEPTH(LUT_DEPTH)) u_lut (
    .clk, .rst_n, .wr_en(lut_wr_en), .wr_addr(lut_wr_addr), .wr_data(lut_wr_data),
    .lookup(lut_lookup), .a_pp, .t_lc, .coef(lut_coef), .est_r, .est_c,
    .hit(lut_hit), .busy(lut_busy), .done(ev_lut_done)
  );

  autotune_sequencer #(.SETTLE_PERIODS(SETTLE_PERIODS)) u_seq (
    .clk, .rst_n, .tick, .slow_coef, .unstable(ev_unstable),
    .start_id(ev_start_id), .f_valid, .id_failed(ev_failed),
    .lut_done(ev_lut_done), .lut_hit, .lut_coef, .det_arm, .id_start,
    .lut_lookup, .low_res, .vref_en, .coef, .tuned_valid, .mode
  );

  assign vref_ofs = vref_en ? ofs : '0;
endmodule
