// Auto-tuning sequencer (the estimator's mode control).
//
// Steps the controller through the phases of an auto-tuning run:
//   REGAIN   slow, low-gain PID (slow_coef), full DPWM resolution, until the
//            instability detector reports regulation again (start_id, I).
//   SETTLE   DPWM resolution reduced (low_res = 1) so the loop limit-cycles;
//            waits SETTLE_PERIODS switching periods, then pulses id_start.
//   IDENTIFY the amplitude estimator and frequency extractor measure the limit
//            cycle; the reference offset of the frequency extractor is applied
//            (vref_en) only here.
//   LOOKUP   the tables are searched with the measured a_pp and t_lc.
//   NORMAL   the chosen coefficients, full resolution. For the first
//            BLANK_PERIODS periods the detector stays disarmed, so the decay of
//            the limit cycle is not taken for a disturbance; after that a
//            disturbance (unstable) returns to REGAIN.
// After reset the sequencer starts in REGAIN, so the start-up transient is the
// first disturbance and the first identification follows it. If no limit
// cycle appears (id_failed) or no table word is valid, it falls back to REGAIN
// and keeps the slow set. det_arm enables the instability detector in REGAIN
// and (after the blanking time) NORMAL only. All outputs are registered or decoded from the state.
// The phase order and the use of the slow set follow the source design; the
// settle time, the start-up behaviour and the fall-backs are this design's
// choices.
module autotune_sequencer #(
  parameter int unsigned SETTLE_PERIODS = 100,
  parameter int unsigned BLANK_PERIODS  = 100
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        tick,
  input  lco_pkg::coef_t              slow_coef,
  input  logic                        unstable,
  input  logic                        start_id,
  input  logic                        f_valid,
  input  logic                        id_failed,
  input  logic                        lut_done,
  input  logic                        lut_hit,
  input  lco_pkg::coef_t              lut_coef,
  output logic                        det_arm,
  output logic                        id_start,
  output logic                        lut_lookup,
  output logic                        low_res,
  output logic                        vref_en,
  output lco_pkg::coef_t              coef,
  output logic                        tuned_valid,
  output lco_pkg::tuner_mode_t        mode
);
  import lco_pkg::*;
  localparam int unsigned SW = $clog2(SETTLE_PERIODS + 1);
  localparam int unsigned BW = $clog2(BLANK_PERIODS + 1);

  tuner_mode_t state;
  coef_t       tuned;
  logic [SW-1:0] settle;
  logic [BW-1:0] blank;   // periods left before the detector is re-armed

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= MODE_REGAIN; tuned <= '0; tuned_valid <= 1'b0; settle <= '0;
      blank <= '0;
      id_start <= 1'b0; lut_lookup <= 1'b0;
    end else begin
      id_start   <= 1'b0;
      lut_lookup <= 1'b0;
      unique case (state)
        MODE_NORMAL:   if (blank != '0) begin
                         if (tick) blank <= blank - 1'b1;
                       end else if (unstable) begin
                         state <= MODE_REGAIN;
                       end
        MODE_REGAIN:   if (start_id) begin
                         state  <= MODE_SETTLE;
                         settle <= '0;
                       end
        MODE_SETTLE:   if (tick) begin
                         if (settle == SW'(SETTLE_PERIODS - 1)) begin
                           id_start <= 1'b1;
                           state    <= MODE_IDENTIFY;
                         end else begin
                           settle <= settle + 1'b1;
                         end
                       end
        MODE_IDENTIFY: if (f_valid) begin
                         lut_lookup <= 1'b1;
                         state      <= MODE_LOOKUP;
                       end else if (id_failed) begin
                         state <= MODE_REGAIN;
                       end
        MODE_LOOKUP:   if (lut_done) begin
                         if (lut_hit) begin
                           tuned       <= lut_coef;
                           tuned_valid <= 1'b1;
                           blank       <= BW'(BLANK_PERIODS);
                           state       <= MODE_NORMAL;
                         end else begin
                           state <= MODE_REGAIN;
                         end
                       end
        default:       state <= MODE_REGAIN;
      endcase
    end
  end

  assign mode    = state;
  assign det_arm = ((state == MODE_NORMAL) && (blank == '0)) ||
                   (state == MODE_REGAIN);
  assign low_res = (state == MODE_SETTLE) || (state == MODE_IDENTIFY);
  assign vref_en = (state == MODE_IDENTIFY);
  assign coef    = (state == MODE_NORMAL) ? tuned : slow_coef;
endmodule
