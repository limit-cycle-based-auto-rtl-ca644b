// Limit-cycle amplitude estimator.
//
// Follows the sign of the discrete derivative dA[n] = e[n] - e[n-1], once per
// switching period. While the error rises, the largest value reached is
// tracked; when the error has fallen HYST LSBs below it, that value is a
// maximum (a_max) and the direction becomes falling. Likewise a fall followed
// by a rise of HYST LSBs gives a minimum (a_min). With HYST = 1 this is
// exactly the rule "the sample before the derivative turns from positive to
// negative is the maximum" (and the opposite for the minimum), with flat tops
// counted as one extremum; the default HYST = 2 also ignores a one-LSB
// toggle of the quantised error near a peak. At every new extremum, once one
// of each kind has been seen, a_pp = a_max - a_min is updated and pp_valid is
// set (it stays set until clear). Outputs change in the clock after e_valid.
// The derivative-sign detection and the peak-to-peak difference of
// successive extrema follow the source design; the hysteresis is this
// design's choice.
module amplitude_estimator #(
  parameter int unsigned E_W  = lco_pkg::E_W,
  parameter int unsigned HYST = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic                  e_valid,
  input  logic signed [E_W-1:0] e,
  output logic signed [E_W-1:0] a_max,
  output logic signed [E_W-1:0] a_min,
  output logic        [E_W:0]   a_pp,
  output logic                  pp_valid
);
  typedef enum logic [1:0] {DIR_NONE, DIR_UP, DIR_DOWN} dir_t;

  logic signed [E_W-1:0] ext;        // running extremum in the present direction
  logic                  have_first, have_max, have_min;
  dir_t                  dir;
  logic signed [E_W+1:0] e_x, ext_x, hyst_x;

  assign e_x   = (E_W+2)'(e);
  assign ext_x = (E_W+2)'(ext);
  assign hyst_x = signed'((E_W+2)'(HYST));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ext <= '0; have_first <= 1'b0; have_max <= 1'b0; have_min <= 1'b0;
      dir <= DIR_NONE; a_max <= '0; a_min <= '0; a_pp <= '0; pp_valid <= 1'b0;
    end else if (clear) begin
      have_first <= 1'b0; have_max <= 1'b0; have_min <= 1'b0;
      dir <= DIR_NONE; pp_valid <= 1'b0;
    end else if (e_valid) begin
      if (!have_first) begin
        ext        <= e;
        have_first <= 1'b1;
      end else begin
        unique case (dir)
          DIR_NONE: begin
            if (e > ext)      begin dir <= DIR_UP;   ext <= e; end
            else if (e < ext) begin dir <= DIR_DOWN; ext <= e; end
          end
          DIR_UP: begin
            if (e > ext) begin
              ext <= e;
            end else if (e_x <= ext_x - hyst_x) begin
              a_max    <= ext;
              have_max <= 1'b1;
              if (have_min) begin
                a_pp     <= (E_W+1)'((E_W+1)'(ext) - (E_W+1)'(a_min));
                pp_valid <= 1'b1;
              end
              dir <= DIR_DOWN;
              ext <= e;
            end
          end
          default: begin  // DIR_DOWN
            if (e < ext) begin
              ext <= e;
            end else if (e_x >= ext_x + hyst_x) begin
              a_min    <= ext;
              have_min <= 1'b1;
              if (have_max) begin
                a_pp     <= (E_W+1)'((E_W+1)'(a_max) - (E_W+1)'(ext));
                pp_valid <= 1'b1;
              end
              dir <= DIR_UP;
              ext <= e;
            end
          end
        endcase
      end
    end
  end
endmodule
