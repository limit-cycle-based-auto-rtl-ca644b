// Digital comparator logic of the frequency extractor.
//
// Compares the error e[n] (input A) with zero (B = 0) once per switching
// period. The comparator keeps the side of zero the error was last seen on:
// e > 0 (A > B) sets it positive, e < 0 (A < B) negative, and e = 0 leaves it
// unchanged, so an error toggling between 0 and one side is not a crossing.
// A zero crossing is a change of that side inside the enabled window. The first crossing pulses
// start and the third pulses stop, so start-to-stop spans one full
// oscillation period. Dropping enable, or arm, restarts the count. start and
// stop are one-clock pulses in the clock after e_valid.
// The comparison with zero and the three-crossing rule follow the source
// design; the treatment of e = 0 is this design's choice.
module zero_cross_logic #(
  parameter int unsigned E_W = lco_pkg::E_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  arm,
  input  logic                  enable,
  input  logic                  e_valid,
  input  logic signed [E_W-1:0] e,
  output logic                  start,
  output logic                  stop
);
  logic       a_lt_b, a_gt_b;   // A < B and A > B, B = 0
  logic       prev_lt;          // side last seen: 1 = negative
  logic       have_prev;
  logic [1:0] ncross;

  assign a_lt_b = (e < 0);
  assign a_gt_b = (e > 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_lt <= 1'b0; have_prev <= 1'b0; ncross <= '0;
      start <= 1'b0; stop <= 1'b0;
    end else begin
      start <= 1'b0;
      stop  <= 1'b0;
      if (arm || !enable) begin
        have_prev <= 1'b0;
        ncross    <= '0;
      end else if (e_valid && (a_lt_b || a_gt_b)) begin
        prev_lt   <= a_lt_b;
        have_prev <= 1'b1;
        if (have_prev && (a_lt_b != prev_lt) && (ncross != 2'd3)) begin
          ncross <= ncross + 1'b1;
          if (ncross == 2'd0) start <= 1'b1;
          if (ncross == 2'd2) stop  <= 1'b1;
        end
      end
    end
  end
endmodule
