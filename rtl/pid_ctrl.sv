// pid_ctrl: discrete PID controller in incremental (velocity) form.
//
// Each sample evaluates
//     e(k) = setpoint - feedback
//     u(k) = u(k-1) + K1*e(k) + K2*e(k-1) + K3*e(k-2)
// with the control signal saturated to 0..2^DUTY_W-1 (0..255). The datapath
// is one subtractor, three combinational multipliers and three adders, with
// registers holding e(k), e(k-1), e(k-2), u(k-1) and the output, as in the
// source design. The coefficients are signed fixed-point numbers with FRAC
// fractional bits; u(k-1) is kept at that precision and clamped to the
// output range, so the integral action cannot wind up beyond the limits.
// The duty output is the integer part of u(k).
//
// Interface: sample_valid strobes in a new feedback word; setpoint is read
// on the same cycle. u_valid pulses when u is updated.
// Timing: two-cycle latency. Cycle 1 registers e(k) and shifts the error
// history; cycle 2 computes and registers u(k). A new sample may arrive every
// second cycle.
// Follows the source design: the difference equation, the 8-bit saturated
// output, the three stored errors and the resource mix. This design's
// choices: the fixed-point format, the coefficient mapping from Kp/Ki/Kd
// (see dbc_pkg), truncation to the integer part, reset of all state to zero.
module pid_ctrl #(
  parameter int unsigned DW     = dbc_pkg::ADC_W,
  parameter int unsigned UW     = dbc_pkg::DUTY_W,
  parameter int unsigned FRAC   = dbc_pkg::PID_FRAC,
  parameter int unsigned COEF_W = dbc_pkg::PID_COEF_W,
  parameter int signed   K1     = dbc_pkg::PID_K1,
  parameter int signed   K2     = dbc_pkg::PID_K2,
  parameter int signed   K3     = dbc_pkg::PID_K3
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sample_valid,
  input  logic [DW-1:0] setpoint,
  input  logic [DW-1:0] feedback,
  output logic [UW-1:0] u,
  output logic          u_valid
);

  localparam int unsigned EW    = DW + 1;                 // signed error width
  localparam int unsigned PW    = EW + COEF_W;            // product width
  localparam int unsigned AW    = PW + 4;                 // accumulator width
  localparam int unsigned UQW   = UW + FRAC + 1;          // u(k-1), signed, fixed point

  localparam logic signed [COEF_W-1:0] C1 = COEF_W'(K1);
  localparam logic signed [COEF_W-1:0] C2 = COEF_W'(K2);
  localparam logic signed [COEF_W-1:0] C3 = COEF_W'(K3);
  localparam logic signed [AW-1:0]     U_MAX = AW'(((2 ** UW) - 1) * (2 ** FRAC));

  logic signed [EW-1:0]  e0, e1, e2;      // e(k), e(k-1), e(k-2)
  logic signed [UQW-1:0] u_prev;          // u(k-1), fixed point
  logic                  calc;

  logic signed [PW-1:0]  p1, p2, p3;
  logic signed [AW-1:0]  acc, acc_sat;

  // Stage 1: error and error history
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      e0   <= '0;
      e1   <= '0;
      e2   <= '0;
      calc <= 1'b0;
    end else begin
      calc <= sample_valid;
      if (sample_valid) begin
        e0 <= $signed({1'b0, setpoint}) - $signed({1'b0, feedback});
        e1 <= e0;
        e2 <= e1;
      end
    end
  end

  // Stage 2: difference equation and saturation
  always_comb begin
    p1  = PW'(C1) * PW'(e0);
    p2  = PW'(C2) * PW'(e1);
    p3  = PW'(C3) * PW'(e2);
    acc = AW'(u_prev) + AW'(p1) + AW'(p2) + AW'(p3);
    if (acc < 0)
      acc_sat = '0;
    else if (acc > U_MAX)
      acc_sat = U_MAX;
    else
      acc_sat = acc;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      u_prev  <= '0;
      u       <= '0;
      u_valid <= 1'b0;
    end else begin
      u_valid <= calc;
      if (calc) begin
        u_prev <= UQW'(acc_sat);
        u      <= acc_sat[FRAC +: UW];
      end
    end
  end

endmodule
