// Programmable multiplier-based PID compensator (incremental form).
//
//   u[n] = u[n-1] + a*e[n] + b*e[n-1] + c*e[n-2]
//   d[n] = u[n] >> ACC_FRAC, u clamped to [0, (2^DPWM_BITS - 1) << ACC_FRAC]
//
// Three signed COEF_W-bit coefficients, the contents of one word of each of
// the three coefficient tables, set the proportional, integral and derivative
// action: for gains Kp, Ki, Kd, a = Kp+Ki+Kd, b = -Kp-2Kd, c = Kd. A single
// multiplier is used for the three products on three successive clocks.
// Timing: e_valid loads e[n] and latches coef; d and d_valid (one-clock pulse)
// appear 5 clocks later, far inside a switching period of 2^DPWM_BITS clocks.
// The clamp keeps the integrator from winding up beyond the duty range.
// The multiplier-based PID follows the source design; the velocity form, the
// ACC_FRAC fractional scaling and the sequential multiplier are this design's
// choices.
module pid_compensator #(
  parameter int unsigned E_W       = lco_pkg::E_W,
  parameter int unsigned DPWM_BITS = lco_pkg::DPWM_BITS,
  parameter int unsigned ACC_FRAC  = 6
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  e_valid,
  input  logic signed [E_W-1:0] e,
  input  lco_pkg::coef_t        coef,
  output logic [DPWM_BITS-1:0]  d,
  output logic                  d_valid
);
  localparam int unsigned COEF_W = lco_pkg::COEF_W;
  localparam int unsigned U_W   = DPWM_BITS + ACC_FRAC;       // clamped range
  localparam int unsigned S_W   = U_W + COEF_W + E_W - 2 + 4;  // sum headroom
  localparam logic signed [S_W-1:0] U_MAX = S_W'((2**DPWM_BITS - 1) * (2**ACC_FRAC));

  logic signed [E_W-1:0]    e0, e1, e2;
  lco_pkg::coef_t           cf;
  logic [2:0]               step;
  logic signed [S_W-1:0]    sum;
  logic [U_W-1:0]           u;

  // the one shared multiplier
  logic signed [COEF_W-1:0]      m_coef;
  logic signed [E_W-1:0]         m_err;
  logic signed [COEF_W+E_W-1:0]  prod;

  always_comb begin
    unique case (step)
      3'd1:    begin m_coef = cf.a; m_err = e0; end
      3'd2:    begin m_coef = cf.b; m_err = e1; end
      default: begin m_coef = cf.c; m_err = e2; end
    endcase
    prod = m_coef * m_err;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e0 <= '0; e1 <= '0; e2 <= '0;
      cf <= '0;
      step <= '0;
      sum <= '0;
      u <= '0;
      d <= '0;
      d_valid <= 1'b0;
    end else begin
      d_valid <= 1'b0;
      if (e_valid) begin
        e0   <= e;
        e1   <= e0;
        e2   <= e1;
        cf   <= coef;
        sum  <= S_W'($signed({1'b0, u}));
        step <= 3'd1;
      end else begin
        unique case (step)
          3'd1, 3'd2, 3'd3: begin
            sum  <= sum + S_W'(prod);
            step <= step + 3'd1;
          end
          3'd4: begin
            if (sum < 0)          u <= '0;
            else if (sum > U_MAX) u <= U_W'(U_MAX);
            else                  u <= U_W'(sum);
            step <= 3'd5;
          end
          3'd5: begin
            d       <= u[U_W-1:ACC_FRAC];
            d_valid <= 1'b1;
            step    <= 3'd0;
          end
          default: step <= 3'd0;
        endcase
      end
    end
  end
endmodule
