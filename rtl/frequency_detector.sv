// Frequency detector of the frequency extractor.
//
// arm starts an identification: the reference offset is cleared and the
// attempt count reset. Each attempt ends either with the counter's done (a
// full limit-cycle period was counted) or with the timer's expiry (none was,
// T_LC = 0):
//   * T_LC > 0 and the extrema roughly symmetric (|a_max + a_min| <= SYM_TOL):
//     t_lc takes the period and f_valid pulses; halt closes the window.
//   * T_LC > 0 but asymmetric: vref_ofs moves one LSB against the sign of
//     a_max + a_min and retry starts a new attempt.
//   * T_LC = 0: no oscillation; vref_ofs moves down one LSB and retry starts a
//     new attempt.
// After MAX_TRIES attempts the last result is accepted; if there never was a
// limit cycle, failed pulses instead of f_valid. retry, halt, f_valid and
// failed are one-clock pulses one clock after done or expired.
// Detecting T_LC = 0 and starting the oscillation with a small reference
// change, and using the same block to make the extrema symmetric, follow the
// source design. The step size and sign, the symmetry test and the attempt
// limit are this design's choices. The period is delivered rather than its
// reciprocal, the frequency, because the table search works on it directly.
module frequency_detector #(
  parameter int unsigned CNT_W     = lco_pkg::CNT_W,
  parameter int unsigned E_W       = lco_pkg::E_W,
  parameter int unsigned SYM_TOL   = 1,
  parameter int unsigned MAX_TRIES = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  arm,
  input  logic                  expired,
  input  logic                  done,
  input  logic [CNT_W-1:0]      count,
  input  logic signed [E_W-1:0] a_max,
  input  logic signed [E_W-1:0] a_min,
  input  logic                  pp_valid,
  output logic                  retry,
  output logic                  halt,
  output logic signed [E_W-1:0] vref_ofs,
  output logic [CNT_W-1:0]      t_lc,
  output logic                  f_valid,
  output logic                  failed
);
  localparam int unsigned NW = $clog2(MAX_TRIES + 1);

  logic [NW-1:0]       tries;
  logic                busy;
  logic signed [E_W:0] asym;
  logic signed [E_W:0] tol;
  logic                last_try;

  assign asym     = (E_W+1)'(a_max) + (E_W+1)'(a_min);
  assign tol      = signed'((E_W+1)'(SYM_TOL));
  assign last_try = (tries == NW'(MAX_TRIES - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tries <= '0; busy <= 1'b0; vref_ofs <= '0; t_lc <= '0;
      retry <= 1'b0; halt <= 1'b0; f_valid <= 1'b0; failed <= 1'b0;
    end else begin
      retry   <= 1'b0;
      halt    <= 1'b0;
      f_valid <= 1'b0;
      failed  <= 1'b0;
      if (arm) begin
        tries    <= '0;
        busy     <= 1'b1;
        vref_ofs <= '0;
      end else if (busy && done && !retry) begin
        if (!last_try && pp_valid &&
            (asym > tol || asym < -tol)) begin
          vref_ofs <= (asym > 0) ? vref_ofs - 1'b1 : vref_ofs + 1'b1;
          tries    <= tries + 1'b1;
          retry    <= 1'b1;
        end else begin
          t_lc    <= count;
          f_valid <= 1'b1;
          halt    <= 1'b1;
          busy    <= 1'b0;
        end
      end else if (busy && expired && !retry) begin
        if (!last_try) begin
          vref_ofs <= vref_ofs - 1'b1;
          tries    <= tries + 1'b1;
          retry    <= 1'b1;
        end else begin
          t_lc   <= '0;
          failed <= 1'b1;
          busy   <= 1'b0;
        end
      end
    end
  end
endmodule
