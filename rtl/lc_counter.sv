// Limit-cycle period counter.
//
// Counts switching periods (tick) from a start pulse to a stop pulse while the
// timer's enable is high. At stop, done is set and count holds c[n], the
// number of switching periods in one limit-cycle period (T_LC). Until a stop
// has been seen, count reads 0, the "no limit cycle" value. The count
// saturates at 2^CNT_W - 1. clear restarts it.
// The counter, its start/stop/enable inputs and its output c[n] follow the
// source design; the width and the saturation are this design's choices.
module lc_counter #(
  parameter int unsigned CNT_W = lco_pkg::CNT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             tick,
  input  logic             enable,
  input  logic             start,
  input  logic             stop,
  output logic [CNT_W-1:0] count,
  output logic             done
);
  logic             running;
  logic [CNT_W-1:0] acc;

  assign count = done ? acc : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0; acc <= '0; done <= 1'b0;
    end else if (clear) begin
      running <= 1'b0; acc <= '0; done <= 1'b0;
    end else if (!enable) begin
      running <= 1'b0;
    end else begin
      if (start && !done) begin
        running <= 1'b1;
        acc     <= '0;
      end else if (running && stop) begin
        running <= 1'b0;
        done    <= 1'b1;
      end else if (running && tick && acc != '1) begin
        acc <= acc + 1'b1;
      end
    end
  end
endmodule
