// Instability detector.
//
// Watches the error e[n] once per switching period. A sample with
// |e| > E_DIST is taken as a disturbance that may lead to instability:
// unstable pulses and the detector remembers it. Regulation counts as regained
// once |e| <= E_REG has held for N_REG consecutive samples (regulated); if a
// disturbance was seen, the detector then pulses start_id (signal I), which
// starts the parameter extraction. While arm is low (identification in
// progress) the detector is held cleared and gives no output.
// Outputs are registered and change in the clock after e_valid.
// Its role (disturbance in, start-identification signal I out) follows the
// source design, which takes the detector itself from elsewhere; the
// threshold scheme and the values of E_DIST, E_REG and N_REG are this
// design's choices.
module instability_detector #(
  parameter int unsigned E_W    = lco_pkg::E_W,
  parameter int unsigned E_DIST = 16,
  parameter int unsigned E_REG  = 2,
  parameter int unsigned N_REG  = 64
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  e_valid,
  input  logic signed [E_W-1:0] e,
  input  logic                  arm,
  output logic                  unstable,
  output logic                  regulated,
  output logic                  start_id
);
  localparam int unsigned RW = $clog2(N_REG + 1);

  logic [E_W-1:0] abs_e;
  logic [RW-1:0]  reg_cnt;
  logic           disturbed;

  assign abs_e = e[E_W-1] ? E_W'(-e) : E_W'(e);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_cnt   <= '0;
      disturbed <= 1'b0;
      unstable  <= 1'b0;
      regulated <= 1'b0;
      start_id  <= 1'b0;
    end else begin
      unstable <= 1'b0;
      start_id <= 1'b0;
      if (!arm) begin
        reg_cnt   <= '0;
        disturbed <= 1'b0;
        regulated <= 1'b0;
      end else if (e_valid) begin
        if (abs_e > E_W'(E_DIST)) begin
          unstable  <= 1'b1;
          disturbed <= 1'b1;
        end
        if (abs_e <= E_W'(E_REG)) begin
          if (reg_cnt != RW'(N_REG)) reg_cnt <= reg_cnt + 1'b1;
          if (reg_cnt == RW'(N_REG - 1)) begin
            regulated <= 1'b1;
            if (disturbed) begin
              start_id  <= 1'b1;
              disturbed <= 1'b0;
            end
          end
        end else begin
          reg_cnt   <= '0;
          regulated <= 1'b0;
        end
      end
    end
  end
endmodule
