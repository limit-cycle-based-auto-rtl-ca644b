// Pre-stored look-up tables of the auto-tuner.
//
// LUT_DEPTH operating points (30 by default). Each word holds the limit-cycle
// features measured at that operating point (peak-to-peak amplitude a_pp in
// error LSBs and period t_lc in switching periods), the three COEF_W-bit PID
// coefficients designed for it, and codes for the load R and capacitance C it
// stands for. The table is a register file, cleared (all words invalid) at
// reset and loaded through the write port (wr_en, wr_addr, wr_data) with the
// system's calibration.
// A lookup pulse starts a search that visits one word per clock and keeps the
// valid word nearest to the measured features, by the distance
// |a_pp - a_pp_i| + |t_lc - t_lc_i| (ties keep the lower address). done pulses
// LUT_DEPTH + 1 clocks after lookup, with coef/est_r/est_c of the chosen word
// and hit = 1, or hit = 0 if no word is valid. busy is high during the search.
// Writes during a search are not allowed (assertion).
// The 30 words of three 10-bit coefficients and the features as inputs follow
// the source design; the stored feature keys, the nearest-neighbour search
// and the R/C codes are this design's choices.
module coef_lut #(
  parameter int unsigned LUT_DEPTH = lco_pkg::LUT_DEPTH
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           wr_en,
  input  logic [$clog2(LUT_DEPTH)-1:0]   wr_addr,
  input  lco_pkg::lut_entry_t            wr_data,
  input  logic                           lookup,
  input  logic [lco_pkg::E_W:0]          a_pp,
  input  logic [lco_pkg::CNT_W-1:0]      t_lc,
  output lco_pkg::coef_t                 coef,
  output logic [lco_pkg::EST_W-1:0]      est_r,
  output logic [lco_pkg::EST_W-1:0]      est_c,
  output logic                           hit,
  output logic                           busy,
  output logic                           done
);
  localparam int unsigned AW    = $clog2(LUT_DEPTH);
  localparam int unsigned PP_W  = lco_pkg::E_W + 1;
  localparam int unsigned CNT_W = lco_pkg::CNT_W;
  localparam int unsigned DW    = (PP_W > CNT_W ? PP_W : CNT_W) + 1;

  lco_pkg::lut_entry_t mem [LUT_DEPTH];

  logic [AW-1:0]    idx, best_idx;
  logic [DW-1:0]    best_dist, distance;
  logic             found;
  logic [PP_W-1:0]  q_pp;
  logic [CNT_W-1:0] q_t;
  lco_pkg::lut_entry_t cur;

  assign cur = mem[idx];

  always_comb begin
    logic [PP_W-1:0]  dpp;
    logic [CNT_W-1:0] dt;
    dpp  = (q_pp > cur.a_pp) ? q_pp - cur.a_pp : cur.a_pp - q_pp;
    dt   = (q_t  > cur.t_lc) ? q_t  - cur.t_lc : cur.t_lc - q_t;
    distance = DW'(dpp) + DW'(dt);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LUT_DEPTH; i++) mem[i] <= '0;
    end else if (wr_en && !busy) begin
      mem[wr_addr] <= wr_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx <= '0; best_idx <= '0; best_dist <= '1; found <= 1'b0;
      q_pp <= '0; q_t <= '0; busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (lookup && !busy) begin
        q_pp <= a_pp; q_t <= t_lc;
        idx <= '0; best_dist <= '1; found <= 1'b0; busy <= 1'b1;
      end else if (busy) begin
        if (cur.valid && (!found || distance < best_dist)) begin
          best_dist <= distance;
          best_idx  <= idx;
          found     <= 1'b1;
        end
        if (idx == AW'(LUT_DEPTH - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end
  end

  // The result is read from the chosen word; it holds until the next lookup
  // or a write to that word.
  lco_pkg::lut_entry_t best;
  assign best = mem[best_idx];

  assign hit   = found;
  assign coef  = best.coef;
  assign est_r = best.est_r;
  assign est_c = best.est_c;

  a_no_write_in_search: assert property (@(posedge clk) disable iff (!rst_n)
    !(wr_en && busy));
endmodule
