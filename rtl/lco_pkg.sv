// Shared definitions for the limit-cycle auto-tuning SMPS controller.
//
// The controller regulates a buck converter with a programmable PID. When the
// converter is disturbed it falls back to a slow PID, then cuts the DPWM
// resolution from 8 to 4 bits so that the loop limit-cycles, measures the
// peak-to-peak amplitude and period of that limit cycle, and picks new PID
// coefficients from a 30-entry table of pre-calibrated operating points.
//
// The 10-bit coefficient width, the 30-entry table and the 8/4-bit DPWM
// resolutions follow the source design. The 8-bit error and ADC widths, the
// 8-bit period counter and the estimate codes are choices of this design.
package lco_pkg;

  localparam int unsigned COEF_W       = 10;  // PID coefficient width (signed)
  localparam int unsigned LUT_DEPTH    = 30;  // operating points in the tables
  localparam int unsigned LUT_AW       = $clog2(LUT_DEPTH);
  localparam int unsigned DPWM_BITS    = 8;   // steady-state DPWM resolution
  localparam int unsigned LOW_RES_BITS = 4;   // resolution during identification
  localparam int unsigned ADC_W        = 8;   // ADC code width (unsigned)
  localparam int unsigned E_W          = 8;   // error e[n] width (signed)
  localparam int unsigned CNT_W        = 8;   // LCO period counter width
  localparam int unsigned EST_W        = 8;   // estimated R / C code width

  // Coefficients of the incremental PID:
  //   u[n] = u[n-1] + a*e[n] + b*e[n-1] + c*e[n-2]
  typedef struct packed {
    logic signed [COEF_W-1:0] a;
    logic signed [COEF_W-1:0] b;
    logic signed [COEF_W-1:0] c;
  } coef_t;

  // One operating point of the look-up tables: the LCO features measured
  // there, the compensator for it and the R / C codes it stands for.
  typedef struct packed {
    logic              valid;
    logic [E_W:0]      a_pp;   // peak-to-peak LCO amplitude, error LSBs
    logic [CNT_W-1:0]  t_lc;   // LCO period, switching periods
    coef_t             coef;
    logic [EST_W-1:0]  est_r;
    logic [EST_W-1:0]  est_c;
  } lut_entry_t;

  // Phases of the auto-tuner, in the order they follow one another.
  typedef enum logic [2:0] {
    MODE_NORMAL   = 3'd0,  // tuned PID, full DPWM resolution
    MODE_REGAIN   = 3'd1,  // slow PID until regulation returns
    MODE_SETTLE   = 3'd2,  // low DPWM resolution, waiting for the LCO
    MODE_IDENTIFY = 3'd3,  // measuring amplitude and period
    MODE_LOOKUP   = 3'd4   // searching the tables
  } tuner_mode_t;

endpackage
