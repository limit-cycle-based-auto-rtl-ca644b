// Frequency extractor: measures the period of the limit cycle.
//
// Chain: the comparator logic finds zero crossings of e[n]; the counter
// counts switching periods from the first to the third crossing while the
// timer's window is open; the frequency detector turns the count into T_LC,
// or, when there is no oscillation (T_LC = 0) or it is lopsided, moves the
// reference by one LSB and retriggers the timer. The timer is (re)started by
// start_id (signal I) or by the detector's retry. retry is also brought out so
// that the amplitude estimator restarts with each attempt.
// Timing: t_lc/f_valid (or failed) follow start_id after one or more timer
// windows of TIMER_LEN switching periods at most.
// The four parts and their connection follow the source design; the
// amplitude inputs of the frequency detector are this design's addition.
module frequency_extractor #(
  parameter int unsigned E_W       = lco_pkg::E_W,
  parameter int unsigned CNT_W     = lco_pkg::CNT_W,
  parameter int unsigned TIMER_LEN = 200,
  parameter int unsigned SYM_TOL   = 1,
  parameter int unsigned MAX_TRIES = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start_id,
  input  logic                  tick,
  input  logic                  e_valid,
  input  logic signed [E_W-1:0] e,
  input  logic signed [E_W-1:0] a_max,
  input  logic signed [E_W-1:0] a_min,
  input  logic                  pp_valid,
  output logic [CNT_W-1:0]      t_lc,
  output logic signed [E_W-1:0] vref_ofs,
  output logic                  f_valid,
  output logic                  failed,
  output logic                  retry
);
  logic trigger, enable, expired, halt, start, stop, done;
  logic [CNT_W-1:0] count;

  assign trigger = start_id | retry;

  zero_cross_logic #(.E_W(E_W)) u_cmp (
    .clk, .rst_n, .arm(trigger), .enable, .e_valid, .e, .start, .stop
  );

  lc_counter #(.CNT_W(CNT_W)) u_cnt (
    .clk, .rst_n, .clear(trigger), .tick, .enable, .start, .stop, .count, .done
  );

  lc_timer #(.TIMER_LEN(TIMER_LEN)) u_tmr (
    .clk, .rst_n, .trigger, .halt, .tick, .enable, .expired
  );

  frequency_detector #(.CNT_W(CNT_W), .E_W(E_W), .SYM_TOL(SYM_TOL),
                       .MAX_TRIES(MAX_TRIES)) u_det (
    .clk, .rst_n, .arm(start_id), .expired, .done, .count, .a_max, .a_min,
    .pp_valid, .retry, .halt, .vref_ofs, .t_lc, .f_valid, .failed
  );
endmodule
