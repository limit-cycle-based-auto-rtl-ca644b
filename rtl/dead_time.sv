// Dead-time generator for the two switches of a synchronous buck.
//
// From the PWM signal c it derives gate_hs (high-side switch, on while c is
// high) and gate_ls (low-side switch, on while c is low). A gate turns off in
// the clock after c changes; the other gate turns on only after c has held its
// new level for DT_CYCLES further clocks, so the two gates are never on
// together. A pulse of c shorter than DT_CYCLES clocks leaves both gates off.
// The block's place between the DPWM and the gate drivers follows the source
// design; the dead time of 4 clocks (78 ns at 51.2 MHz) is this design's
// choice.
module dead_time #(
  parameter int unsigned DT_CYCLES = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic c,
  output logic gate_hs,
  output logic gate_ls
);
  localparam int unsigned DW = $clog2(DT_CYCLES + 1);

  logic          c_q;
  logic [DW-1:0] hold;   // clocks c has kept its present level, saturating

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_q     <= 1'b0;
      hold    <= '0;
      gate_hs <= 1'b0;
      gate_ls <= 1'b0;
    end else begin
      c_q <= c;
      if (c != c_q)                  hold <= '0;
      else if (hold != DW'(DT_CYCLES)) hold <= hold + 1'b1;
      gate_hs <= c  && (c == c_q) && (hold == DW'(DT_CYCLES));
      gate_ls <= !c && (c == c_q) && (hold == DW'(DT_CYCLES));
    end
  end
endmodule
